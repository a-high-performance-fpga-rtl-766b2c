// face_top: FPGA sorting accelerator combining a sorting network, a k-way
// merge sorter tree and base+delta compression of the data kept in external
// memory.
//
// The host streams N = 16*WAYS^P 32-bit elements in as 128-bit beats. In
// Phase 1 every 16 elements are packed into a 512-bit word, sorted by the
// 16-input sorting network (a sorted Unit of 16) and handed round-robin to
// the WAYS Input Buffers. The merge sorter tree merges one Unit from every
// way per Iteration, emitting 4 elements per cycle, so Units grow by a
// factor WAYS per Phase: E_p = 16*WAYS^(p-1). Between Iterations the tree is
// emptied by the Iteration reset from iter_ctrl. In every Phase but the last
// the tree output is packed into 512-bit words, compressed (2x when two
// successive words have small neighbour deltas), queued in the Output Buffer
// and written to the external memory's Write Area, region by region with
// Throttling; in the next Phase each way reads its region back through the
// decompressor. The two memory areas swap roles every Phase. In the last
// Phase (P) the tree output goes through the Result Buffer to the host.
// This follows the document's data path. The host and memory interfaces are
// plain valid/ready streams chosen here in place of the PCIe and DDR3
// controllers, which are outside this design.
//
// Interfaces:
//   start/cfg_phases  start a sort of N = 16*WAYS^cfg_phases elements
//                     (cfg_phases >= 1); busy while sorting, done after the
//                     last element has left the Result Buffer.
//   h_in_*            128-bit host input (4 elements per beat), Phase 1 only.
//   h_out_*           128-bit sorted output, ascending, element 0 first.
//   mem_wr_*          512-bit word writes (word address), mem_wr_last ends a
//                     burst.
//   mem_rd_* / mem_rsp_*  word read requests with a way tag; responses must
//                     come back in request order with the same tag.
// Memory use: 2*N/16 words (Read Area and Write Area of N/16 words each).
// ENABLE_COMP=0 builds the variant without the compressor and decompressor.
// Lint notes: wr_throttling is kept as a named status signal for observation
// and has no load here; unused FIFO count and out_last pins are left open on
// purpose; rst_n also disables the assertions, hence its synchronous use.
module face_top
  import face_pkg::*;
#(
  parameter int unsigned WAYS        = 16,
  parameter int unsigned IB_DEPTH    = 32,  // Input Buffer Long FIFO, words
  parameter int unsigned TREE_DEPTH  = 4,   // short FIFOs inside the tree
  parameter int unsigned OB_DEPTH    = 64,  // Output Buffer, words
  parameter int unsigned RB_DEPTH    = 64,  // Result Buffer, beats
  parameter int unsigned DEC_DEPTH   = 16,  // decompressor FIFO, words
  parameter int unsigned GRAIN       = 16,  // write burst before Throttling
  parameter int unsigned RD_GRAIN    = 8,   // read burst
  parameter bit          ENABLE_COMP = 1'b1,
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned CNT_W       = 32,
  localparam int unsigned TAG_W      = $clog2(WAYS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [7:0]        cfg_phases,
  output logic              busy,
  output logic              done,
  output logic [7:0]        cur_phase,
  // host side
  input  logic              h_in_valid,
  output logic              h_in_ready,
  input  beat_t             h_in_data,
  output logic              h_out_valid,
  input  logic              h_out_ready,
  output beat_t             h_out_data,
  // external memory
  output logic              mem_wr_valid,
  input  logic              mem_wr_ready,
  output logic [ADDR_W-1:0] mem_wr_addr,
  output word_t             mem_wr_data,
  output logic              mem_wr_last,
  output logic              mem_rd_valid,
  input  logic              mem_rd_ready,
  output logic [ADDR_W-1:0] mem_rd_addr,
  output logic [TAG_W-1:0]  mem_rd_tag,
  input  logic              mem_rsp_valid,
  output logic              mem_rsp_ready,
  input  word_t             mem_rsp_data,
  input  logic [TAG_W-1:0]  mem_rsp_tag
);
  localparam int unsigned LOG2K = $clog2(WAYS);
  localparam int unsigned IBC_W = $clog2(IB_DEPTH + 1);
  localparam int unsigned OBC_W = $clog2(OB_DEPTH + 1);

  initial assert (WAYS >= 2 && (1 << LOG2K) == WAYS) else $error("WAYS must be a power of two");
  initial assert (IB_DEPTH >= 2 * RD_GRAIN) else $error("IB_DEPTH must hold two read bursts");
  initial assert (OB_DEPTH >= GRAIN) else $error("OB_DEPTH must hold one write burst");

  // ------------------------------------------------------------------ Phases
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;
  state_t          state;
  logic [7:0]      phase, n_phases;
  logic            phase_start, last_phase, phase_complete;
  logic [CNT_W-1:0] n_total, e_p, e_next, region_elems;
  logic [ADDR_W-1:0] area_words, region_words, wr_base, rd_base;

  assign n_total      = CNT_W'(1) << (4 + LOG2K * n_phases);
  assign e_p          = CNT_W'(WORD_ELEMS) << (LOG2K * CNT_W'(phase - 8'd1));
  assign e_next       = e_p << LOG2K;
  assign region_elems = n_total >> LOG2K;
  assign area_words   = ADDR_W'(n_total >> 4);
  assign region_words = ADDR_W'(region_elems >> 4);
  assign wr_base      = phase[0] ? '0 : area_words;   // Phase 1 writes area 0
  assign rd_base      = phase[0] ? area_words : '0;
  assign last_phase   = (phase == n_phases);
  assign busy         = (state != S_IDLE);
  assign cur_phase    = phase;

  logic phase_done_t, wr_all_done, rb_empty;

  assign phase_complete = phase_done_t && (last_phase || wr_all_done);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      phase       <= 8'd1;
      n_phases    <= 8'd1;
      phase_start <= 1'b0;
      done        <= 1'b0;
    end else begin
      phase_start <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state       <= S_RUN;
          phase       <= 8'd1;
          n_phases    <= (cfg_phases == 8'd0) ? 8'd1 : cfg_phases;
          phase_start <= 1'b1;
          done        <= 1'b0;
        end
        S_RUN: if (!phase_start && phase_complete) begin
          if (last_phase) state <= S_DRAIN;
          else begin
            phase       <= phase + 8'd1;
            phase_start <= 1'b1;
          end
        end
        S_DRAIN: if (rb_empty) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ------------------------------------------------- Phase 1: host input path
  logic  pk_in_valid, pk_in_ready, pk_out_valid, pk_out_ready;
  word_t pk_out_data;
  logic  sn_valid, sn_ready;
  word_t sn_data;
  logic [TAG_W-1:0] in_way;

  assign pk_in_valid = h_in_valid && (state == S_RUN) && (phase == 8'd1) && !phase_start;
  assign h_in_ready  = pk_in_ready && (state == S_RUN) && (phase == 8'd1) && !phase_start;

  pack_512 u_host_pack (
    .clk, .rst_n,
    .in_valid(pk_in_valid), .in_ready(pk_in_ready), .in_data(h_in_data), .in_last(1'b0),
    .out_valid(pk_out_valid), .out_ready(pk_out_ready), .out_data(pk_out_data), .out_last()
  );

  sort_net #(.LOG2N(4)) u_sort_net (
    .clk, .rst_n,
    .in_valid(pk_out_valid), .in_ready(pk_out_ready), .in_data(pk_out_data),
    .out_valid(sn_valid), .out_ready(sn_ready), .out_data(sn_data)
  );

  // ----------------------------------------------- later Phases: memory input
  logic             dec_valid, dec_ready, dec_end;
  word_t            dec_data;
  logic [TAG_W-1:0] dec_tag;

  if (ENABLE_COMP) begin : g_dec
    decompressor #(.TAG_W(TAG_W), .DEPTH(DEC_DEPTH)) u_decompressor (
      .clk, .rst_n,
      .in_valid(mem_rsp_valid), .in_ready(mem_rsp_ready), .in_data(mem_rsp_data), .in_tag(mem_rsp_tag),
      .out_valid(dec_valid), .out_ready(dec_ready), .out_data(dec_data), .out_tag(dec_tag),
      .out_end(dec_end)
    );
  end else begin : g_nodec
    assign dec_valid     = mem_rsp_valid;
    assign mem_rsp_ready = dec_ready;
    assign dec_data      = mem_rsp_data;
    assign dec_tag       = mem_rsp_tag;
    assign dec_end       = 1'b1;
  end

  // ------------------------------------------------------------ Input Buffers
  logic             ib_in_valid [WAYS];
  logic             ib_in_ready [WAYS];
  word_t            ib_in_data  [WAYS];
  logic [IBC_W-1:0] ib_count    [WAYS];
  logic             ib_out_valid[WAYS];
  logic             ib_out_ready[WAYS];
  beat_t            ib_out_data [WAYS];
  logic             ib_done     [WAYS];
  logic             leaf_wr     [WAYS];
  logic             leaf_full   [WAYS];
  logic             inbuf_done, iter_clear, tree_clear;

  assign tree_clear = iter_clear || phase_start;

  always_comb begin
    sn_ready  = 1'b0;
    dec_ready = 1'b0;
    for (int unsigned j = 0; j < WAYS; j++) begin
      if (phase == 8'd1) begin
        ib_in_valid[j] = sn_valid && (in_way == TAG_W'(j));
        ib_in_data[j]  = sn_data;
        if (in_way == TAG_W'(j)) sn_ready = ib_in_ready[j];
      end else begin
        ib_in_valid[j] = dec_valid && (dec_tag == TAG_W'(j));
        ib_in_data[j]  = dec_data;
        if (dec_tag == TAG_W'(j)) dec_ready = ib_in_ready[j];
      end
    end
  end

  // Phase 1 deals the sorted 16-element Units to the ways in turn.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  in_way <= '0;
    else if (phase_start)        in_way <= '0;
    else if (sn_valid && sn_ready) in_way <= in_way + 1'b1;
  end

  always_comb begin
    inbuf_done = 1'b1;
    for (int unsigned j = 0; j < WAYS; j++) inbuf_done = inbuf_done && ib_done[j];
  end

  for (genvar j = 0; j < WAYS; j++) begin : g_ib
    input_buffer #(.DEPTH(IB_DEPTH), .CNT_W(CNT_W)) u_input_buffer (
      .clk, .rst_n, .iter_clear(tree_clear), .e_p,
      .in_valid(ib_in_valid[j]), .in_ready(ib_in_ready[j]), .in_data(ib_in_data[j]),
      .fifo_count(ib_count[j]),
      .out_valid(ib_out_valid[j]), .out_ready(ib_out_ready[j]), .out_data(ib_out_data[j]),
      .unit_done(ib_done[j])
    );
    assign ib_out_ready[j] = !leaf_full[j] && !tree_clear;
    assign leaf_wr[j]      = ib_out_valid[j] && ib_out_ready[j];
  end

  // ------------------------------------------------------- merge sorter tree
  logic  root_valid, root_rd;
  beat_t root_data;

  merge_tree #(.WAYS(WAYS), .FIFO_DEPTH(TREE_DEPTH)) u_tree (
    .clk, .rst_n, .clear(tree_clear),
    .leaf_wr, .leaf_data(ib_out_data), .leaf_full,
    .out_valid(root_valid), .out_data(root_data), .out_rd(root_rd)
  );

  logic  it_valid, it_ready, it_last;
  beat_t it_data;

  iter_ctrl #(.CNT_W(CNT_W)) u_iter_ctrl (
    .clk, .rst_n, .phase_start, .e_next, .region_elems, .n_total, .inbuf_done,
    .root_valid, .root_data, .root_rd,
    .out_valid(it_valid), .out_ready(it_ready), .out_data(it_data), .out_last(it_last),
    .iter_clear, .phase_done(phase_done_t)
  );

  // ------------------------------------------------------------ Result Buffer
  logic rb_full, rb_wr, op_in_valid, op_in_ready;

  assign rb_wr       = it_valid && last_phase && !rb_full;
  assign op_in_valid = it_valid && !last_phase;
  assign it_ready    = last_phase ? !rb_full : op_in_ready;
  assign h_out_valid = !rb_empty;

  sync_fifo #(.WIDTH(BEAT_W), .DEPTH(RB_DEPTH)) u_result_buffer (
    .clk, .rst_n, .clear(1'b0),
    .wr_en(rb_wr), .wr_data(it_data), .full(rb_full),
    .rd_en(h_out_valid && h_out_ready), .rd_data(h_out_data), .empty(rb_empty), .count()
  );

  // ------------------------------------- output path: pack, compress, buffer
  logic  op_valid, op_ready, op_last;
  word_t op_data;
  logic  cp_valid, cp_ready;
  word_t cp_data;

  pack_512 u_out_pack (
    .clk, .rst_n,
    .in_valid(op_in_valid), .in_ready(op_in_ready), .in_data(it_data), .in_last(it_last),
    .out_valid(op_valid), .out_ready(op_ready), .out_data(op_data), .out_last(op_last)
  );

  if (ENABLE_COMP) begin : g_comp
    compressor u_compressor (
      .clk, .rst_n,
      .in_valid(op_valid), .in_ready(op_ready), .in_data(op_data), .in_last(op_last),
      .out_valid(cp_valid), .out_ready(cp_ready), .out_data(cp_data)
    );
  end else begin : g_nocomp
    assign cp_valid = op_valid;
    assign op_ready = cp_ready;
    assign cp_data  = op_data;
  end

  logic             ob_full, ob_empty, ob_rd;
  logic [OBC_W-1:0] ob_count;
  word_t            ob_data;

  assign cp_ready = !ob_full;

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(OB_DEPTH)) u_output_buffer (
    .clk, .rst_n, .clear(1'b0),
    .wr_en(cp_valid && !ob_full), .wr_data(cp_data), .full(ob_full),
    .rd_en(ob_rd), .rd_data(ob_data), .empty(ob_empty), .count(ob_count)
  );

  // ------------------------------------------------------ external memory
  logic [ADDR_W-1:0] end_ptr [WAYS];
  logic              wr_throttling, rd_done;

  dram_writer #(.WAYS(WAYS), .GRAIN(GRAIN), .ADDR_W(ADDR_W), .CNT_W(CNT_W), .FCNT_W(OBC_W)) u_writer (
    .clk, .rst_n, .phase_start(phase_start && !last_phase),
    .area_base(wr_base), .region_words, .region_elems,
    .in_count(ob_count), .in_data(ob_data), .in_rd(ob_rd),
    .wr_valid(mem_wr_valid), .wr_ready(mem_wr_ready), .wr_addr(mem_wr_addr),
    .wr_data(mem_wr_data), .wr_last(mem_wr_last),
    .end_ptr, .all_done(wr_all_done), .throttling(wr_throttling)
  );

  dram_reader #(.WAYS(WAYS), .RD_GRAIN(RD_GRAIN), .IB_DEPTH(IB_DEPTH), .ADDR_W(ADDR_W), .TAG_W(TAG_W)) u_reader (
    .clk, .rst_n, .phase_start(phase_start && (phase != 8'd1)),
    .area_base(rd_base), .region_words, .end_ptr, .ib_count,
    .ret_valid(dec_valid && dec_ready && dec_end), .ret_way(dec_tag),
    .rd_valid(mem_rd_valid), .rd_ready(mem_rd_ready), .rd_addr(mem_rd_addr), .rd_tag(mem_rd_tag),
    .done(rd_done)
  );

  // The Output Buffer is only read when it holds data, and a later Phase can
  // only finish once every stored word of the Read Area has been requested.
  assert property (@(posedge clk) disable iff (!rst_n) ob_rd |-> !ob_empty)
    else $error("Output Buffer read while empty");
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_RUN && phase_done_t && phase != 8'd1) |-> rd_done)
    else $error("Phase finished before the reader requested all words");
endmodule
