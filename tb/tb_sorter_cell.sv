// tb_sorter_cell: the two input FIFOs and the output FIFO are modelled with
// queues. Each trial puts two random sorted sequences (a multiple of four
// elements each, duplicates included) followed by maximum-value beats on the
// inputs; the first elements written out must be the sorted merge of both
// sequences. Between trials the cell is cleared. With a free output the
// first beat must be written three clock edges after both heads are present
// and later beats must follow every cycle; other trials stall the output.
module tb_sorter_cell;
  import face_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic  clear = 0, a_valid, b_valid, a_deq, b_deq, out_wr, out_full = 0;
  beat_t a_data, b_data, out_data;
  int checks = 0, failures = 0;
  beat_t qa [$], qb [$];
  logic [31:0] outq [$];
  int cyc = 0;

  sorter_cell dut (.*);

  assign a_valid = qa.size() != 0;
  assign b_valid = qb.size() != 0;
  assign a_data  = a_valid ? qa[0] : '0;
  assign b_data  = b_valid ? qb[0] : '0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic make_seq(ref beat_t q [$], ref logic [31:0] all [$], input int beats, input int range);
    logic [31:0] v [$];
    for (int i = 0; i < 4 * beats; i++) v.push_back($urandom_range(range));
    v.sort();
    for (int b = 0; b < beats; b++) q.push_back({v[4*b+3], v[4*b+2], v[4*b+1], v[4*b]});
    for (int i = 0; i < v.size(); i++) all.push_back(v[i]);
    for (int b = 0; b < 64; b++) q.push_back({4{32'hffff_ffff}});
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      logic [31:0] all [$];
      int la, lb, t0, first, gaps, n, prev;
      bit pa, pb;
      la = $urandom_range(1, 12);
      lb = (t == 0) ? la : $urandom_range(1, 12);
      all.delete();
      outq.delete();
      @(negedge clk);
      make_seq(qa, all, la, (t % 3 == 0) ? 20 : 100000);
      make_seq(qb, all, lb, (t % 3 == 0) ? 20 : 100000);
      all.sort();
      t0 = cyc; first = -1; gaps = 0; n = 0; prev = 0;
      while (outq.size() < all.size() && n < 400) begin
        out_full = (t > 1) && ($urandom_range(2) == 0);
        #1;
        if (out_wr) begin
          if (first < 0) first = cyc - t0;
          else if (cyc != prev + 1) gaps++;
          prev = cyc;
          for (int e = 0; e < 4; e++) outq.push_back(out_data[32*e +: 32]);
        end
        pa = a_deq;
        pb = b_deq;
        @(posedge clk);
        #1;
        if (pa) void'(qa.pop_front());
        if (pb) void'(qb.pop_front());
        @(negedge clk);
        n++;
      end
      for (int i = 0; i < all.size(); i++)
        chk(i < outq.size() && outq[i] == all[i], $sformatf("trial %0d element %0d", t, i));
      if (t <= 1) begin
        chk(first == 2, $sformatf("first output beat written in cycle %0d, expected 2", first));
        chk(gaps == 0, "output not one beat per cycle");
      end
      // Iteration reset: empty the cell and the modelled FIFOs.
      out_full = 0;
      clear = 1;
      qa.delete();
      qb.delete();
      @(negedge clk);
      clear = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (30000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
