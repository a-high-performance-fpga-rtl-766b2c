// tb_input_buffer: Units of E_p = 32 elements (two words) are pushed into
// the Long FIFO ahead of time; for each Unit the buffer must send exactly its
// eight beats, then only maximum-value beats with unit_done high, and start
// the next Unit only after iter_clear. The output is randomly stalled.
module tb_input_buffer;
  import face_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic iter_clear = 0, in_valid = 0, in_ready, out_valid, out_ready = 0, unit_done;
  logic [31:0] e_p = 32;
  word_t in_data = '0;
  beat_t out_data;
  logic [3:0] fifo_count;
  int checks = 0, failures = 0;
  beat_t exp_q [$];
  localparam int UNITS = 6;

  input_buffer #(.DEPTH(8), .CNT_W(32)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Fill the Long FIFO (eight words, four Units).
    for (int w = 0; w < 2 * UNITS; w++) begin
      @(negedge clk);
      for (int i = 0; i < 16; i++) in_data[32*i +: 32] = 32'(w * 16 + i);
      in_valid = 1;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      for (int b = 0; b < 4; b++) exp_q.push_back(in_data[128*b +: 128]);
      if (w == 7) begin
        @(negedge clk);
        in_valid = 0;
        #1;
        chk(fifo_count == 8 || fifo_count == 7, "Long FIFO count");
        chk(!in_ready == (fifo_count == 8), "in_ready follows full");
        break;
      end
    end
    @(negedge clk);
    in_valid = 0;
    for (int u = 0; u < 4; u++) begin
      int got, maxb;
      got = 0;
      maxb = 0;
      for (int n = 0; n < 40; n++) begin
        @(negedge clk);
        out_ready = ($urandom_range(3) != 0);
        #1;
        if (out_valid && out_ready) begin
          if (got < 8) begin
            chk(!unit_done, "unit_done low during the Unit");
            chk(out_data == exp_q[0], $sformatf("Unit data u=%0d got=%0d %h exp %h", u, got, out_data, exp_q[0]));
            void'(exp_q.pop_front());
            got++;
          end else begin
            chk(unit_done && out_data == {4{32'hffff_ffff}}, $sformatf("maximum value after E_p elements: u=%0d done=%0d %h", u, unit_done, out_data));
            maxb++;
          end
        end
      end
      chk(got == 8 && maxb > 0, "whole Unit then maximum values");
      @(negedge clk);
      out_ready  = 0;
      iter_clear = 1;
      @(negedge clk);
      iter_clear = 0;
      #1;
      chk(!unit_done, "counter cleared by iter_clear");
    end
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
