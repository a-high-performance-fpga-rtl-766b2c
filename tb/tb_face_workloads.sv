// tb_face_workloads: the evaluated configurations at simulation size. The
// accelerator is built with 4-, 8- and 16-way trees, each with and without
// the compression path, and every build sorts three data kinds one after
// the other: xorshift32 random data, data already in order and data in
// reverse order. Sizes are N = 16*k^P with P = 3 Phases at 4 ways (1024
// elements) and P = 2 at 8 and 16 ways (1024 and 4096 elements); the full
// evaluated size of 2^28 elements uses the same logic with more Phases.
// Each harness checks the sorted output against a software sort, that every
// mechanism of its build happened, and that every Phase took between N/4
// and N/4 + I*(3*log2(k)+1) + 40*k cycles (I Iterations in the Phase).
module tb_face_workloads;
  localparam int NRUN = 6;
  int  c [NRUN];
  int  f [NRUN];
  bit  d [NRUN];

  face_harness #(.WAYS(4),  .PHASES(3), .PATTERNS(4'b0111), .ENABLE_COMP(1'b1)) u_w4c  (.checks(c[0]), .failures(f[0]), .finished(d[0]));
  face_harness #(.WAYS(4),  .PHASES(3), .PATTERNS(4'b0111), .ENABLE_COMP(1'b0)) u_w4n  (.checks(c[1]), .failures(f[1]), .finished(d[1]));
  face_harness #(.WAYS(8),  .PHASES(2), .PATTERNS(4'b0111), .ENABLE_COMP(1'b1)) u_w8c  (.checks(c[2]), .failures(f[2]), .finished(d[2]));
  face_harness #(.WAYS(8),  .PHASES(2), .PATTERNS(4'b0111), .ENABLE_COMP(1'b0)) u_w8n  (.checks(c[3]), .failures(f[3]), .finished(d[3]));
  face_harness #(.WAYS(16), .PHASES(2), .PATTERNS(4'b0111), .ENABLE_COMP(1'b1)) u_w16c (.checks(c[4]), .failures(f[4]), .finished(d[4]));
  face_harness #(.WAYS(16), .PHASES(2), .PATTERNS(4'b0111), .ENABLE_COMP(1'b0)) u_w16n (.checks(c[5]), .failures(f[5]), .finished(d[5]));

  function automatic int sum(input int v [NRUN]);
    int s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  function automatic bit all_done();
    foreach (d[i]) if (!d[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    fork
      begin
        while (!all_done()) @(posedge u_w4c.clk);
        $display("TB_RESULT checks=%0d failures=%0d", sum(c), sum(f));
      end
      begin
        repeat (100000) @(posedge u_w4c.clk);
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", sum(c), sum(f) + 1);
      end
    join_any
    $finish;
  end
endmodule
