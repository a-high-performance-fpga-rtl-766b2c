// tb_unpack_512: random 512-bit words with random gaps and output stalls;
// the beats must come out lowest 128 bits first, in order, and an unstalled
// stream of words must give one beat per cycle.
module tb_unpack_512;
  import face_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  word_t in_data = '0;
  beat_t out_data;
  int checks = 0, failures = 0;
  beat_t exp_q [$];
  int    gaps = 0, got = 0;

  unpack_512 dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      for (int n = 0; n < 300; n++) begin
        @(negedge clk);
        in_valid = (n < 30) || ($urandom_range(3) == 0);
        for (int i = 0; i < 16; i++) in_data[32*i +: 32] = $urandom;
        #1;
        if (in_valid && in_ready)
          for (int b = 0; b < 4; b++) exp_q.push_back(in_data[128*b +: 128]);
      end
      for (int n = 0; n < 800; n++) begin
        @(negedge clk);
        out_ready = (n < 60) || ($urandom_range(2) != 0);
        #1;
        if (n >= 4 && n < 28 && !out_valid) gaps++;
        if (out_valid && out_ready) begin
          checks++;
          got++;
          if (out_data != exp_q.pop_front()) begin failures++; $display("beat mismatch"); end
        end
      end
    join
    checks++;
    if (gaps != 0 || exp_q.size() != 0) begin failures++; $display("gaps=%0d left=%0d", gaps, exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
