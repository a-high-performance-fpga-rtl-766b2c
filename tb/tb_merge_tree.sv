// tb_merge_tree: a 16-way tree (the default) gets one sorted Unit per leaf,
// each followed by maximum-value beats; the first elements out of the root
// must be the sorted merge of all Units. Trials are separated by a clear, the
// root is read with random stalls in later trials, and in the first trial
// (all leaves loaded at once, root always read) the first beat must appear
// within the 3*log2(k)+1 cycles of the document's Iteration overhead, and
// the root must then deliver one beat (4 elements) per cycle.
module tb_merge_tree;
  import face_pkg::*;
  localparam int K = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic  clear = 0, out_valid, out_rd = 0;
  logic  leaf_wr [K], leaf_full [K];
  beat_t leaf_data [K], out_data;
  int checks = 0, failures = 0;
  beat_t q [K][$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  merge_tree #(.WAYS(K)) dut (.*);

  for (genvar j = 0; j < K; j++) begin : g_leaf
    assign leaf_wr[j]   = (q[j].size() != 0) && !leaf_full[j];
    assign leaf_data[j] = (q[j].size() != 0) ? q[j][0] : '0;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      logic [31:0] all [$], got [$];
      int t0, first, gaps, prev, n;
      bit pop [K];
      all.delete();
      got.delete();
      @(negedge clk);
      for (int j = 0; j < K; j++) begin
        logic [31:0] v [$];
        int beats;
        beats = (t == 0) ? 8 : $urandom_range(1, 10);
        v.delete();
        for (int i = 0; i < 4 * beats; i++) v.push_back((t % 2) ? $urandom_range(50) : $urandom);
        v.sort();
        for (int b = 0; b < beats; b++) q[j].push_back({v[4*b+3], v[4*b+2], v[4*b+1], v[4*b]});
        for (int b = 0; b < 200; b++) q[j].push_back({4{32'hffff_ffff}});
        for (int i = 0; i < v.size(); i++) all.push_back(v[i]);
      end
      all.sort();
      t0 = cyc; first = -1; gaps = 0; prev = 0; n = 0;
      while (got.size() < all.size() && n < 2000) begin
        out_rd = 0;
        #1;
        out_rd = out_valid && ((t == 0) || $urandom_range(3) != 0);
        #1;
        if (out_rd) begin
          if (first < 0) first = cyc - t0;
          else if (cyc != prev + 1) gaps++;
          prev = cyc;
          for (int e = 0; e < 4; e++) got.push_back(out_data[32*e +: 32]);
        end
        for (int j = 0; j < K; j++) pop[j] = leaf_wr[j];
        @(posedge clk);
        #1;
        for (int j = 0; j < K; j++) if (pop[j]) void'(q[j].pop_front());
        @(negedge clk);
        n++;
      end
      for (int i = 0; i < all.size(); i++)
        chk(i < got.size() && got[i] == all[i], $sformatf("trial %0d element %0d", t, i));
      if (t == 0) begin
        $display("first root beat after %0d cycles", first);
        chk(first >= 1 && first <= 3 * $clog2(K) + 1 + 1, $sformatf("first root beat after %0d cycles", first));
        chk(gaps == 0, "root not one beat per cycle");
      end
      out_rd = 0;
      clear = 1;
      for (int j = 0; j < K; j++) q[j].delete();
      @(negedge clk);
      clear = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
