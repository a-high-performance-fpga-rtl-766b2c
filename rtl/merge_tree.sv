// merge_tree: k-way merge sorter tree built from sorter cells.
//
// WAYS leaf FIFOs take sorted Units as 128-bit beats (4 elements); WAYS-1
// sorter cells, connected as a perfect binary tree, merge them, and the root
// FIFO delivers the merged sequence at up to 4 elements per cycle. Every node
// has a short FIFO at its output, which is the input FIFO of its parent.
// Nodes are numbered as in a heap: node 1 is the root cell, cell n reads the
// FIFOs of nodes 2n and 2n+1, and the leaf FIFO of way w is node WAYS+w.
// A cell moves a beat only when both of its input FIFOs hold one and its
// output FIFO has room, as in the document. clear (the Iteration reset)
// empties every FIFO and cell of the tree in one cycle; Units must be
// followed by maximum-value beats (see input_buffer) so that the last real
// elements are flushed to the root. FIFO depths are this design's choice.
//
// Timing: each level adds three cycles, so after a clear the first beat
// reaches the root FIFO about 3*log2(WAYS)+1 cycles after all leaves hold
// data, matching the Iteration overhead the document gives.
// The FIFOs' occupancy counts are not needed and their pins are left open.
module merge_tree
  import face_pkg::*;
#(
  parameter int unsigned WAYS       = 16,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  leaf_wr   [WAYS],
  input  beat_t leaf_data [WAYS],
  output logic  leaf_full [WAYS],
  output logic  out_valid,
  output beat_t out_data,
  input  logic  out_rd
);
  localparam int unsigned NODES = 2 * WAYS;   // index 0 unused

  logic  f_wr    [NODES];
  beat_t f_wdata [NODES];
  logic  f_full  [NODES];
  logic  f_rd    [NODES];
  beat_t f_rdata [NODES];
  logic  f_empty [NODES];

  for (genvar n = 1; n < NODES; n++) begin : g_fifo
    sync_fifo #(.WIDTH(BEAT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .clear,
      .wr_en(f_wr[n]), .wr_data(f_wdata[n]), .full(f_full[n]),
      .rd_en(f_rd[n]), .rd_data(f_rdata[n]), .empty(f_empty[n]), .count()
    );
  end

  for (genvar c = 1; c < WAYS; c++) begin : g_cell
    sorter_cell u_cell (
      .clk, .rst_n, .clear,
      .a_valid(!f_empty[2*c]),   .a_data(f_rdata[2*c]),   .a_deq(f_rd[2*c]),
      .b_valid(!f_empty[2*c+1]), .b_data(f_rdata[2*c+1]), .b_deq(f_rd[2*c+1]),
      .out_wr(f_wr[c]), .out_data(f_wdata[c]), .out_full(f_full[c])
    );
  end

  for (genvar w = 0; w < WAYS; w++) begin : g_leaf
    assign f_wr[WAYS+w]    = leaf_wr[w];
    assign f_wdata[WAYS+w] = leaf_data[w];
    assign leaf_full[w]    = f_full[WAYS+w];
  end

  assign f_wr[0]    = 1'b0;
  assign f_wdata[0] = '0;
  assign f_rd[0]    = 1'b0;
  assign f_rdata[0] = '0;
  assign f_empty[0] = 1'b1;
  assign f_full[0]  = 1'b0;
  assign f_rd[1]    = out_rd;
  assign out_valid  = !f_empty[1];
  assign out_data   = f_rdata[1];
endmodule
