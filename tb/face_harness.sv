// face_harness: drives a face_top through complete sorts and checks them.
//
// Instantiates the accelerator with a memory model, sends N = 16*WAYS^PHASES
// elements from the host side, collects the result and compares it with a
// software sort of the same data. Each bit of PATTERNS selects a data set:
// bit 0 xorshift32 random, bit 1 already sorted, bit 2 reverse order (N down to 1),
// bit 3 random values in a narrow range (partly compressible). The harness
// counts how often each mechanism of the design happened (Iteration resets,
// maximum-value insertion, tree back-pressure, Throttling, packed and raw
// words written, packed words split on reading, Result Buffer back-pressure)
// and measures each Phase's cycles against the performance model
// C_n = N/4 + I_n*(3*log2(WAYS)+1) + WAYS*alpha with alpha = ALPHA.
// With DEFAULT_DUT set the accelerator is built with its default parameters.
module face_harness
  import face_pkg::*;
#(
  parameter int unsigned WAYS        = 4,
  parameter bit          ENABLE_COMP = 1'b1,
  parameter int unsigned PHASES      = 3,
  parameter int unsigned PATTERNS    = 4'b1111,
  parameter bit          DEFAULT_DUT = 1'b0,
  parameter int unsigned STALL_PCT   = 0,     // memory and host stalls
  parameter int unsigned ALPHA       = 40,
  parameter bit          CHECK_MODEL = 1'b1
) (
  output int  checks,
  output int  failures,
  output bit  finished
);
  localparam int unsigned LOG2K = $clog2(WAYS);
  localparam int unsigned N     = 16 * (1 << (LOG2K * PHASES));
  localparam int unsigned TAG_W = $clog2(WAYS);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              start = 1'b0;
  logic              busy, done;
  logic [7:0]        cur_phase;
  logic              h_in_valid = 1'b0, h_in_ready, h_out_valid, h_out_ready = 1'b0;
  beat_t             h_in_data = '0, h_out_data;
  logic              mem_wr_valid, mem_wr_ready, mem_wr_last;
  logic [31:0]       mem_wr_addr, mem_rd_addr;
  word_t             mem_wr_data, mem_rsp_data;
  logic              mem_rd_valid, mem_rd_ready, mem_rsp_valid, mem_rsp_ready;
  logic [TAG_W-1:0]  mem_rd_tag, mem_rsp_tag;

  if (DEFAULT_DUT) begin : g_def
    face_top u_dut (.*, .cfg_phases(8'(PHASES)));
  end else begin : g_par
    face_top #(.WAYS(WAYS), .ENABLE_COMP(ENABLE_COMP)) u_dut (.*, .cfg_phases(8'(PHASES)));
  end

  mem_model #(.WORDS(2 * N / 16), .TAG_W(TAG_W), .STALL_PCT(STALL_PCT)) u_mem (
    .clk, .rst_n, .wr_valid(mem_wr_valid), .wr_ready(mem_wr_ready), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data),
    .rd_valid(mem_rd_valid), .rd_ready(mem_rd_ready), .rd_addr(mem_rd_addr), .rd_tag(mem_rd_tag),
    .rsp_valid(mem_rsp_valid), .rsp_ready(mem_rsp_ready), .rsp_data(mem_rsp_data), .rsp_tag(mem_rsp_tag)
  );

  // ------------------------------------------------------- mechanism counts
  int n_iter, n_maxins, n_treestall, n_throttle, n_packed_wr, n_raw_wr, n_split, n_rb_bp, n_phase;
  logic [WAYS-1:0] maxins_v, stall_v;
  if (DEFAULT_DUT) begin : g_pd
    for (genvar j = 0; j < WAYS; j++) begin : g_w
      assign maxins_v[j] = g_def.u_dut.ib_done[j] && g_def.u_dut.leaf_wr[j];
      assign stall_v[j]  = g_def.u_dut.ib_out_valid[j] && g_def.u_dut.leaf_full[j];
    end
  end else begin : g_pp
    for (genvar j = 0; j < WAYS; j++) begin : g_w
      assign maxins_v[j] = g_par.u_dut.ib_done[j] && g_par.u_dut.leaf_wr[j];
      assign stall_v[j]  = g_par.u_dut.ib_out_valid[j] && g_par.u_dut.leaf_full[j];
    end
  end
  logic iter_clear_s, phase_start_s, throttling_s, rb_full_s;
  if (DEFAULT_DUT) begin : g_sd
    assign iter_clear_s  = g_def.u_dut.iter_clear;
    assign phase_start_s = g_def.u_dut.phase_start;
    assign throttling_s  = g_def.u_dut.wr_throttling;
    assign rb_full_s     = g_def.u_dut.rb_full;
  end else begin : g_sp
    assign iter_clear_s  = g_par.u_dut.iter_clear;
    assign phase_start_s = g_par.u_dut.phase_start;
    assign throttling_s  = g_par.u_dut.wr_throttling;
    assign rb_full_s     = g_par.u_dut.rb_full;
  end

  longint cyc = 0, phase_t0 = 0;
  longint phase_cycles [$];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && iter_clear_s) n_iter++;
    if (rst_n && maxins_v != '0) n_maxins++;
    if (rst_n && stall_v != '0) n_treestall++;
    if (rst_n && mem_wr_valid && mem_wr_ready) begin
      if (throttling_s) n_throttle++;
      if (is_packed(mem_wr_data)) n_packed_wr++; else n_raw_wr++;
    end
    if (rst_n && mem_rsp_valid && mem_rsp_ready && is_packed(mem_rsp_data)) n_split++;
    if (rb_full_s && h_out_valid && !h_out_ready) n_rb_bp++;
    if (phase_start_s) begin
      if (cur_phase != 8'd1) phase_cycles.push_back(cyc - phase_t0);
      phase_t0 = cyc;
      n_phase++;
    end
  end

  // --------------------------------------------------------------- data sets
  logic [31:0] xs_state;
  function automatic logic [31:0] xorshift32(input logic [31:0] s);
    logic [31:0] x = s;
    x ^= x << 13;
    x ^= x >> 17;
    x ^= x << 5;
    return x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_sort(input int pattern);
    logic [31:0] src [$];
    logic [31:0] ref_q [$];
    logic [31:0] got [$];
    longint t_start, t_end;
    bit ordered;
    int mism;
    for (int i = 0; i < int'(N); i++) begin
      case (pattern)
        0: begin
          xs_state = xorshift32(xs_state);
          src.push_back(xs_state);
        end
        1: src.push_back(32'(i) * 3 + 100);
        2: src.push_back(32'(N - i));
        default: begin
          xs_state = xorshift32(xs_state);
          src.push_back(32'h4000_0000 + (xs_state % 32'(N * 1024)));
        end
      endcase
    end
    ref_q = src;
    ref_q.sort();
    phase_cycles.delete();
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    t_start = cyc;
    fork
      begin : send
        int i = 0;
        while (i < int'(N)) begin
          if (STALL_PCT != 0 && $urandom_range(99) < STALL_PCT) begin
            h_in_valid <= 1'b0;
            @(posedge clk);
          end else begin
            h_in_valid <= 1'b1;
            h_in_data  <= {src[i+3], src[i+2], src[i+1], src[i]};
            @(posedge clk);
            while (!h_in_ready) @(posedge clk);
            i += 4;
          end
        end
        h_in_valid <= 1'b0;
      end
      begin : recv
        while (got.size() < int'(N)) begin
          h_out_ready <= (STALL_PCT == 0) || ($urandom_range(99) >= 3 * STALL_PCT);
          @(posedge clk);
          if (h_out_valid && h_out_ready)
            for (int e = 0; e < 4; e++) got.push_back(h_out_data[32*e +: 32]);
        end
        h_out_ready <= 1'b0;
      end
    join
    while (!done) @(posedge clk);
    t_end = cyc;
    phase_cycles.push_back(t_end - phase_t0);
    check(got.size() == int'(N), $sformatf("pattern %0d: got %0d elements", pattern, got.size()));
    mism = 0;
    ordered = 1'b1;
    for (int i = 0; i < int'(N); i++) begin
      if (i < got.size() && got[i] != ref_q[i]) mism++;
      if (i > 0 && i < got.size() && got[i] < got[i-1]) ordered = 1'b0;
    end
    check(ordered, $sformatf("pattern %0d: output not ascending", pattern));
    check(mism == 0, $sformatf("pattern %0d: %0d elements differ from the reference", pattern, mism));
    $display("pattern %0d: N=%0d sorted in %0d cycles", pattern, N, t_end - t_start);
    for (int p = 0; p < phase_cycles.size(); p++) begin
      longint model;
      model = N / 4 + (N / (16 * (1 << (LOG2K * (p + 1))))) * (3 * LOG2K + 1) + WAYS * ALPHA;
      $display("  phase %0d: %0d cycles, model bound %0d", p + 1, phase_cycles[p], model);
      if (CHECK_MODEL && STALL_PCT == 0)
        check(phase_cycles[p] <= model && phase_cycles[p] >= N / 4,
              $sformatf("pattern %0d phase %0d: %0d cycles outside [N/M, model]", pattern, p + 1, phase_cycles[p]));
    end
  endtask

  initial begin
    checks = 0; failures = 0; finished = 0;
    xs_state = 32'h2463_5381;
    n_iter = 0; n_maxins = 0; n_treestall = 0; n_throttle = 0; n_packed_wr = 0;
    n_raw_wr = 0; n_split = 0; n_rb_bp = 0; n_phase = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int p = 0; p < 4; p++) if (PATTERNS[p]) run_sort(p);
    $display("mechanisms: phases=%0d iteration_resets=%0d max_insert_cycles=%0d tree_stall_cycles=%0d",
             n_phase, n_iter, n_maxins, n_treestall);
    $display("            throttled_writes=%0d packed_writes=%0d raw_writes=%0d packed_reads=%0d result_backpressure=%0d",
             n_throttle, n_packed_wr, n_raw_wr, n_split, n_rb_bp);
    check(n_iter > 0, "no Iteration reset happened");
    check(n_maxins > 0, "no maximum-value insertion happened");
    check(n_treestall > 0, "the tree never back-pressured an Input Buffer");
    if (PHASES > 1) begin
      check(n_throttle > 0, "Throttling never happened");
      if (!ENABLE_COMP || (PATTERNS & 4'b1001) != 0)
        check(n_raw_wr > 0, "no uncompressed word was written");
      if (ENABLE_COMP && (PATTERNS & 4'b0110) != 0) begin
        check(n_packed_wr > 0, "no 2x-compressed word was written");
        check(n_split > 0, "no compressed word was read back");
      end
    end
    if (STALL_PCT != 0) check(n_rb_bp > 0, "the Result Buffer was never back-pressured");
    check(u_mem.bad_addr == 0, "memory access outside the model");
    finished = 1;
  end
endmodule
