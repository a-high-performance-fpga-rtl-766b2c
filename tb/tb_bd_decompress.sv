// tb_bd_decompress: random compressed halves and raw words, with random
// output stalls; each output must be the word rebuilt by adding the deltas
// in turn (or the raw word unchanged), in input order with its tag and flag,
// 15 cycles after entry when the pipeline is not stalled.
module tb_bd_decompress;
  import face_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, in_raw = 0, in_flag = 0, out_valid, out_ready = 0, out_flag;
  word_t in_data = '0, out_data;
  logic [3:0] in_tag = 0, out_tag;
  int checks = 0, failures = 0;
  word_t exp_q [$];
  logic [4:0] ctl_q [$];
  int t_q [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  bd_decompress #(.TAG_W(4)) dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      for (int n = 0; n < 500; n++) begin
        word_t e;
        logic [31:0] acc;
        @(negedge clk);
        in_valid = (n < 40) || ($urandom_range(3) != 0);
        in_raw   = (n % 4 == 3);
        in_tag   = 4'($urandom);
        in_flag  = $urandom_range(1);
        for (int i = 0; i < 16; i++) in_data[32*i +: 32] = $urandom;
        if (in_raw) e = in_data;
        else begin
          in_data[511:CPART_W] = '0;
          acc = in_data[31:0];
          e[31:0] = acc;
          for (int i = 1; i < 16; i++) begin
            acc = acc + 32'(in_data[32 + 13*(i-1) +: 13]);
            e[32*i +: 32] = acc;
          end
        end
        #1;
        while (in_valid && !in_ready) begin @(negedge clk); #1; end
        if (in_valid) begin exp_q.push_back(e); ctl_q.push_back({in_tag, in_flag}); t_q.push_back(cyc); end
      end
      for (int n = 0; n < 900; n++) begin
        @(negedge clk);
        out_ready = (n < 60) || ($urandom_range(2) != 0);
        #1;
        if (out_valid && out_ready) begin
          int t0;
          t0 = t_q.pop_front();
          checks++;
          if (out_data != exp_q.pop_front() || {out_tag, out_flag} != ctl_q.pop_front()) begin
            failures++; $display("output mismatch");
          end
          if (n < 40) begin
            checks++;
            if (cyc - t0 != 15) begin failures++; $display("latency %0d, expected 15", cyc - t0); end
          end
        end
      end
    join
    checks++;
    if (exp_q.size() != 0) failures++;
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
