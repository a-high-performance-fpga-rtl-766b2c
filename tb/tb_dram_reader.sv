// tb_dram_reader: four ways with random end pointers; the memory model
// answers after a few cycles, each answered word fills one or two Input
// Buffer entries (plain or packed) and returns its credit, and the Input
// Buffers drain at random. Checks: each way's region is read from its head up
// to its end pointer, every address once and in order; bursts hold at most
// RD_GRAIN words of one way; no Input Buffer ever overflows; done at the end.
module tb_dram_reader;
  localparam int WAYS = 4, RD_GRAIN = 4, IB_DEPTH = 16, REG_WORDS = 64;
  localparam logic [31:0] BASE = 32'h400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic phase_start = 0, ret_valid = 0, rd_valid, rd_ready = 0, done;
  logic [1:0] ret_way = 0, rd_tag;
  logic [31:0] rd_addr;
  logic [31:0] end_ptr [WAYS];
  logic [4:0]  ib_count [WAYS];
  int checks = 0, failures = 0;
  int next_off [WAYS];
  int occ [WAYS];
  int pend_way [$], pend_due [$];
  int cyc = 0, burst_len = 0, n_bursts = 0;
  logic [1:0] burst_way;
  bit prev_valid = 0;

  dram_reader #(.WAYS(WAYS), .RD_GRAIN(RD_GRAIN), .IB_DEPTH(IB_DEPTH)) dut (
    .clk, .rst_n, .phase_start, .area_base(BASE), .region_words(32'(REG_WORDS)), .end_ptr,
    .ib_count, .ret_valid, .ret_way, .rd_valid, .rd_ready, .rd_addr, .rd_tag, .done
  );

  for (genvar j = 0; j < WAYS; j++) begin : g_cnt
    assign ib_count[j] = 5'(occ[j]);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int j = 0; j < WAYS; j++) begin
      end_ptr[j] = (j == 2) ? 0 : $urandom_range(10, 60);
      next_off[j] = 0;
      occ[j] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    phase_start = 1;
    @(negedge clk);
    phase_start = 0;
    for (int n = 0; n < 6000 && !(done && pend_way.size() == 0 && n > 5); n++) begin
      bit take, ret;
      int rw;
      rd_ready = ($urandom_range(3) != 0);
      // Return one answered word per cycle at most.
      ret = (pend_way.size() != 0) && (pend_due[0] <= cyc);
      ret_valid = ret;
      ret_way = ret ? 2'(pend_way[0]) : 2'd0;
      #1;
      take = rd_valid && rd_ready;
      if (take) begin
        chk(int'(rd_tag) < WAYS && next_off[rd_tag] < int'(end_ptr[rd_tag]), "read beyond the end pointer");
        chk(rd_addr == BASE + 32'(int'(rd_tag) * REG_WORDS + next_off[rd_tag]), "read address");
        if (!prev_valid || burst_way != rd_tag || burst_len == RD_GRAIN) begin
          burst_len = 0;
          n_bursts++;
        end
        burst_len++;
        burst_way = rd_tag;
        chk(burst_len <= RD_GRAIN, "burst longer than RD_GRAIN");
      end
      @(posedge clk);
      #1;
      prev_valid = rd_valid;
      if (!rd_valid) burst_len = 0;
      if (take) begin
        next_off[rd_tag]++;
        pend_way.push_back(int'(rd_tag));
        pend_due.push_back(cyc + 4);
      end
      if (ret) begin
        rw = pend_way.pop_front();
        void'(pend_due.pop_front());
        occ[rw] += ($urandom_range(1) ? 2 : 1);
        chk(occ[rw] <= IB_DEPTH, "Input Buffer overflow");
      end
      for (int j = 0; j < WAYS; j++) if (occ[j] > 0 && $urandom_range(4) == 0) occ[j]--;
      @(negedge clk);
    end
    for (int j = 0; j < WAYS; j++) chk(next_off[j] == int'(end_ptr[j]), $sformatf("way %0d fully read", j));
    chk(done, "done");
    chk(n_bursts > WAYS, "several bursts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
