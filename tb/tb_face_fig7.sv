// tb_face_fig7: the worked example of the design description, run on the
// whole accelerator: a 4-way tree sorts the 256 elements 256, 255, ..., 1
// in two Phases. Phase 1 turns sixteen sorted 16-element Units into four
// 64-element Units in four Iterations and stores them; Phase 2 merges the
// four into one and streams it back. The harness checks the result against
// a software sort and the Phase cycle counts against the performance model.
module tb_face_fig7;
  int  c, f;
  bit  d;

  face_harness #(.WAYS(4), .PHASES(2), .PATTERNS(4'b0100)) u_run (
    .checks(c), .failures(f), .finished(d)
  );

  initial begin
    fork
      begin
        wait (d);
        $display("TB_RESULT checks=%0d failures=%0d", c, f);
      end
      begin
        repeat (20000) @(posedge u_run.clk);
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", c, f + 1);
      end
    join_any
    $finish;
  end
endmodule
