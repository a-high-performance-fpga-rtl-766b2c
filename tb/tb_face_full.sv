// tb_face_full: the accelerator with all parameters at their defaults
// (16-way tree, compression on) sorting N = 16*16^3 = 65536 elements in
// three Phases, so that the middle Phase both reads and writes the external
// memory. It sorts once with xorshift random data and once with data already
// in order, compares the result with a software sort and holds each Phase's
// cycle count against the performance model (see face_harness).
module tb_face_full;
  int  c, f;
  bit  d;

  face_harness #(.WAYS(16), .PHASES(3), .PATTERNS(4'b0011), .DEFAULT_DUT(1'b1)) u_run (
    .checks(c), .failures(f), .finished(d)
  );

  initial begin
    fork
      begin
        wait (d);
        $display("TB_RESULT checks=%0d failures=%0d", c, f);
      end
      begin
        repeat (400000) @(posedge u_run.clk);
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", c, f + 1);
      end
    join_any
    $finish;
  end
endmodule
