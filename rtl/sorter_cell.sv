// sorter_cell: node of the merge sorter tree that merges two sorted streams
// and emits four sorted elements per cycle.
//
// Each input is the head of a FIFO of 128-bit beats, each beat holding four
// ascending elements (element 0 in the low bits), and the beats of a stream
// are in ascending order too. Every cycle in which both heads are present and
// the internal FIFO has room, the smallest elements of the two heads are
// compared and the beat with the smaller one is dequeued into the internal
// FIFO (two entries). In the next stage that beat is merged, in a bitonic
// merge network of three compare-exchange levels, with the four largest
// elements kept from the previous merge (the feedback path). The four smallest
// of the eight go to the output FIFO; the four largest are fed back. The very
// first beat after a clear only fills the feedback register. A sequence ends
// with beats of the maximum value, which flush the last real elements out.
// This is the document's scheme; the two-entry internal FIFO depth, the
// bitonic form of the merge network and the first-beat rule are this
// design's choices.
//
// Timing: a beat needs three cycles from the head of an input FIFO to the
// output FIFO (select, merge, FIFO write); the cell emits one beat per cycle
// while its inputs keep up. clear empties the internal FIFO and the feedback
// register in one cycle (Iteration reset).
// The internal FIFO's occupancy count is not needed and its pin is left open.
module sorter_cell
  import face_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  a_valid,
  input  beat_t a_data,
  output logic  a_deq,
  input  logic  b_valid,
  input  beat_t b_data,
  output logic  b_deq,
  output logic  out_wr,
  output beat_t out_data,
  input  logic  out_full
);
  typedef elem_t vec8_t [8];

  logic  stg_full, stg_empty, stg_rd, stg_wr;
  beat_t stg_in, stg_out;
  beat_t fb_q;                 // four largest elements of the last merge
  logic  fb_valid;
  logic  pick_a;
  vec8_t merged;

  // Selection: the beat whose smallest element is smaller leaves its FIFO.
  assign pick_a = (a_data[ELEM_W-1:0] <= b_data[ELEM_W-1:0]);
  assign stg_wr = a_valid && b_valid && !stg_full && !clear;
  assign a_deq  = stg_wr && pick_a;
  assign b_deq  = stg_wr && !pick_a;
  assign stg_in = pick_a ? a_data : b_data;

  sync_fifo #(.WIDTH(BEAT_W), .DEPTH(2)) u_internal_fifo (
    .clk, .rst_n, .clear,
    .wr_en(stg_wr), .wr_data(stg_in), .full(stg_full),
    .rd_en(stg_rd), .rd_data(stg_out), .empty(stg_empty), .count()
  );

  // Bitonic merge of two ascending 4-element lists: feedback ascending,
  // new beat descending, then half-cleaners at distances 4, 2 and 1.
  function automatic vec8_t merge8(input beat_t lo, input beat_t hi);
    vec8_t v;
    for (int i = 0; i < 4; i++) begin
      v[i]     = lo[ELEM_W*i +: ELEM_W];
      v[7 - i] = hi[ELEM_W*i +: ELEM_W];
    end
    for (int d = 4; d >= 1; d = d / 2)
      for (int i = 0; i < 8; i++)
        if ((i & d) == 0 && v[i] > v[i+d]) begin
          elem_t t = v[i];
          v[i]     = v[i+d];
          v[i+d]   = t;
        end
    return v;
  endfunction

  assign merged = merge8(fb_q, stg_out);
  assign stg_rd = !stg_empty && !clear && (!fb_valid || !out_full);
  assign out_wr = stg_rd && fb_valid;
  always_comb begin
    for (int i = 0; i < 4; i++) out_data[ELEM_W*i +: ELEM_W] = merged[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fb_valid <= 1'b0;
      fb_q     <= '0;
    end else if (clear) begin
      fb_valid <= 1'b0;
    end else if (stg_rd) begin
      fb_valid <= 1'b1;
      if (fb_valid) for (int i = 0; i < 4; i++) fb_q[ELEM_W*i +: ELEM_W] <= merged[4+i];
      else          fb_q <= stg_out;
    end
  end
endmodule
