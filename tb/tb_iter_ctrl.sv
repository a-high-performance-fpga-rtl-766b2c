// tb_iter_ctrl: a stand-in tree root offers numbered beats; with E_{p+1} = 32
// the controller must forward exactly 32 elements per Iteration, drop the
// rest, pulse iter_clear only once the Input Buffers report done, mark every
// region end (64 elements) with out_last and raise phase_done after N = 256.
module tb_iter_ctrl;
  import face_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic phase_start = 0, inbuf_done = 0, root_valid = 0, root_rd, out_valid, out_ready = 0;
  logic out_last, iter_clear, phase_done;
  logic [31:0] e_next = 32, region_elems = 64, n_total = 256;
  beat_t root_data = '0, out_data;
  int checks = 0, failures = 0;
  int fwd = 0, dropped = 0, clears = 0, lasts = 0, seq = 0;

  iter_ctrl #(.CNT_W(32)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    phase_start = 1;
    @(negedge clk);
    phase_start = 0;
    for (int it = 0; it < 8; it++) begin
      int in_iter, wait_cyc;
      in_iter = 0;
      wait_cyc = 0;
      // Stream the Iteration's beats, then maximum-value beats.
      while (in_iter < 12) begin
        root_valid = ($urandom_range(3) != 0);
        root_data  = (in_iter < 8) ? {4{32'(seq)}} : {4{32'hffff_ffff}};
        out_ready  = ($urandom_range(2) != 0);
        inbuf_done = (in_iter < 4);
        #1;
        chk(!(iter_clear && in_iter < 8), "reset before the Unit was complete");
        if (root_valid && out_valid) chk(in_iter < 8, "forwarded beyond E_{p+1}");
        if (out_valid && out_ready) begin
          fwd += 4;
          chk(out_data == {4{32'(seq)}}, "forwarded data");
          if (out_last) begin
            lasts++;
            chk(fwd % 64 == 0, "out_last not at a region end");
          end
          seq++;
        end
        if (root_valid && root_rd) begin
          if (in_iter >= 8) dropped++;
          in_iter++;
        end
        if (iter_clear) clears++;
        @(negedge clk);
      end
      // Hold until the reset, which must wait for inbuf_done.
      root_valid = 0;
      inbuf_done = 1;
      #1;
      chk(iter_clear, "iter_clear once the Unit is out and the buffers are done");
      if (iter_clear) clears++;
      @(negedge clk);
      inbuf_done = 0;
      #1;
      chk(!iter_clear, "iter_clear lasts one cycle");
      chk(phase_done == (it == 7), "phase_done after N elements");
    end
    chk(fwd == 256 && lasts == 4 && clears >= 8 && dropped > 0, $sformatf("totals fwd=%0d lasts=%0d clears=%0d", fwd, lasts, clears));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
