// tb_sort_net: checks the 16-input sorting network against a software sort.
// Random words (and some with repeated values) go in back-to-back while the
// output is randomly stalled; every output word must be the ascending sort
// of the matching input word, and a word must take 10 cycles through an
// unstalled pipeline.
module tb_sort_net;
  import face_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic  in_valid = 0, in_ready, out_valid, out_ready = 0;
  word_t in_data = '0, out_data;
  int checks = 0, failures = 0;
  word_t sent [$];
  int    t_in [$];
  int    cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  sort_net dut (.*);

  function automatic word_t sorted_of(input word_t w);
    logic [31:0] q [$];
    word_t r;
    for (int i = 0; i < 16; i++) q.push_back(w[32*i +: 32]);
    q.sort();
    for (int i = 0; i < 16; i++) r[32*i +: 32] = q[i];
    return r;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      begin
        for (int n = 0; n < 300; n++) begin
          word_t w;
          for (int i = 0; i < 16; i++) w[32*i +: 32] = (n % 5 == 0) ? 32'($urandom_range(3)) : $urandom;
          if (n == 7) w = '1;
          @(negedge clk);
          in_valid = 1; in_data = w;
          #1;
          while (!in_ready) begin @(negedge clk); #1; end
          sent.push_back(w);
          t_in.push_back(cyc);
        end
        @(negedge clk);
        in_valid = 0;
      end
      begin
        int got = 0;
        while (got < 300) begin
          @(negedge clk);
          out_ready = (got < 20) ? 1'b1 : ($urandom_range(3) != 0);
          #1;
          if (out_valid && out_ready) begin
            word_t e;
            int    t0;
            e  = sorted_of(sent.pop_front());
            t0 = t_in.pop_front();
            checks++;
            if (out_data !== e) begin failures++; $display("mismatch at word %0d", got); end
            if (got < 10) begin
              checks++;
              if (cyc - t0 != 10) begin failures++; $display("latency %0d, expected 10", cyc - t0); end
            end
            got++;
          end
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
