// tb_face_top: end-to-end test of the sorting accelerator at 4 ways.
//
// Three Phases (N = 1024 elements) for every data set: xorshift random,
// sorted, reverse order and narrow-range random, first with an ideal memory
// (checking the cycle count of every Phase against the performance model),
// then with random memory and host stalls at four Phases (N = 4096), then
// without compression.
module tb_face_top;
  int c0, f0, c1, f1, c2, f2;
  bit d0, d1, d2;

  face_harness #(.WAYS(4), .PHASES(3), .PATTERNS(4'b1111)) u_ideal (.checks(c0), .failures(f0), .finished(d0));
  face_harness #(.WAYS(4), .PHASES(4), .PATTERNS(4'b1001), .STALL_PCT(20)) u_stall (.checks(c1), .failures(f1), .finished(d1));
  face_harness #(.WAYS(4), .PHASES(3), .PATTERNS(4'b0011), .ENABLE_COMP(1'b0)) u_nocomp (.checks(c2), .failures(f2), .finished(d2));

  initial begin
    fork
      begin
        wait (d0 && d1 && d2);
        $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
      end
      begin
        repeat (400000) @(posedge u_ideal.clk);
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
      end
    join_any
    $finish;
  end
endmodule
