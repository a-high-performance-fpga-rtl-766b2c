// tb_dram_writer: 4 regions of 512 elements each, filled with a random mix of
// plain (16-element) and packed (32-element) words that arrive in the Output
// Buffer model at a random rate; the memory stalls at random. Checks: every
// word is written once, in order, to region base + offset; each region ends
// after exactly its elements and end_ptr holds its word count; no burst
// carries elements beyond its region; bursts started before the Threshold are
// GRAIN words long; Throttling happens; all_done rises at the end.
module tb_dram_writer;
  import face_pkg::*;
  localparam int WAYS = 4, GRAIN = 4, REG_ELEMS = 512, REG_WORDS = 32;
  localparam logic [31:0] BASE = 32'h100;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic phase_start = 0, in_rd, wr_valid, wr_ready = 0, wr_last, all_done, throttling;
  logic [6:0] in_count;
  word_t in_data, wr_data;
  logic [31:0] wr_addr;
  logic [31:0] end_ptr [WAYS];
  int checks = 0, failures = 0;
  word_t fifo [$];
  word_t src [$];
  int    src_region [$];
  int    words_in_region [WAYS];
  int    n_thr = 0, n_full_bursts = 0;

  dram_writer #(.WAYS(WAYS), .GRAIN(GRAIN), .FCNT_W(7)) dut (
    .clk, .rst_n, .phase_start, .area_base(BASE), .region_words(32'(REG_WORDS)),
    .region_elems(32'(REG_ELEMS)), .in_count, .in_data, .in_rd,
    .wr_valid, .wr_ready, .wr_addr, .wr_data, .wr_last, .end_ptr, .all_done, .throttling
  );

  assign in_count = 7'(fifo.size() > 100 ? 100 : fifo.size());
  assign in_data  = (fifo.size() != 0) ? fifo[0] : '0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int region, offset, rem, burst_len, burst_rem0;
    bit in_burst, pop;
    for (int r = 0; r < WAYS; r++) begin
      int left;
      left = REG_ELEMS;
      words_in_region[r] = 0;
      while (left > 0) begin
        word_t w;
        for (int i = 0; i < 16; i++) w[32*i +: 32] = $urandom | 32'h8000_0000;
        if (left >= 32 && $urandom_range(1)) begin
          w[511:479] = 33'h1;
          left -= 32;
        end else left -= 16;
        src.push_back(w);
        src_region.push_back(r);
        words_in_region[r]++;
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    phase_start = 1;
    @(negedge clk);
    phase_start = 0;
    region = 0; offset = 0; rem = REG_ELEMS; in_burst = 0; burst_len = 0; burst_rem0 = 0;
    for (int n = 0; n < 4000 && !(all_done && src.size() == 0); n++) begin
      int el;
      wr_ready = ($urandom_range(4) != 0);
      #1;
      pop = 0;
      if (wr_valid && wr_ready) begin
        el = is_packed(wr_data) ? 32 : 16;
        if (!in_burst) begin
          in_burst = 1;
          burst_len = 0;
          burst_rem0 = rem;
        end
        burst_len++;
        if (throttling) n_thr++;
        chk(wr_addr == BASE + 32'(region * REG_WORDS + offset), "write address");
        chk(wr_data == fifo[0], "write data");
        chk(el <= rem, "word beyond the region end");
        rem -= el;
        offset++;
        pop = 1;
        if (wr_last) begin
          in_burst = 0;
          if (burst_rem0 >= GRAIN * 32) begin
            chk(burst_len == GRAIN, "burst before the Threshold is GRAIN words");
            n_full_bursts++;
          end
        end
        if (rem == 0) begin
          chk(wr_last, "region end closes the burst");
          region++;
          offset = 0;
          rem = REG_ELEMS;
        end
      end
      @(posedge clk);
      #1;
      if (pop) void'(fifo.pop_front());
      if (src.size() != 0 && fifo.size() < 60 && $urandom_range(2) != 0) fifo.push_back(src.pop_front());
      @(negedge clk);
    end
    chk(all_done && region == WAYS, "all regions written");
    for (int r = 0; r < WAYS; r++)
      chk(end_ptr[r] == 32'(words_in_region[r]), $sformatf("end pointer of region %0d", r));
    chk(n_thr > 0 && n_full_bursts > 0, "both full bursts and Throttling seen");
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
