// tb_pack_512: streams of 128-bit beats with random gaps and output stalls;
// every 512-bit word must hold four consecutive beats, the first in the low
// bits, and carry the last flag of its fourth beat. Also checks that an
// unstalled stream is accepted at one beat per cycle.
module tb_pack_512;
  import face_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, in_last = 0, out_valid, out_ready = 0, out_last;
  beat_t in_data = '0;
  word_t out_data;
  int checks = 0, failures = 0;
  beat_t beats [$];
  logic  lasts [$];
  int    stalls = 0;

  pack_512 dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      for (int n = 0; n < 400; n++) begin
        @(negedge clk);
        in_valid = (n < 40) || ($urandom_range(3) != 0);
        in_data  = {$urandom, $urandom, $urandom, $urandom};
        in_last  = $urandom_range(1);
        #1;
        if (n < 40 && n > 0 && !in_ready) stalls++;
        if (in_valid && in_ready) begin beats.push_back(in_data); lasts.push_back(in_last); end
      end
      for (int n = 0; n < 500; n++) begin
        @(negedge clk);
        out_ready = (n < 45) || ($urandom_range(2) != 0);
        #1;
        if (out_valid && out_ready) begin
          word_t e;
          logic  l;
          for (int b = 0; b < 4; b++) begin e[128*b +: 128] = beats.pop_front(); l = lasts.pop_front(); end
          checks++;
          if (out_data != e || out_last != l) begin failures++; $display("word mismatch"); end
        end
      end
    join
    checks++;
    if (stalls != 0) begin failures++; $display("not one beat per cycle"); end
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
