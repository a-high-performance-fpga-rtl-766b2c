// input_buffer: one way's Input Buffer in front of a leaf of the merge sorter
// tree.
//
// A Long FIFO of 512-bit words holds the sorted Units destined for this way;
// a 512-bit shift register breaks each word into 128-bit beats of 4 elements;
// a counter counts the elements sent to the tree. Once E_p elements (one Unit
// of the current Phase) have gone out, the buffer stops taking data and sends
// beats of the maximum value 0xffffffff instead, which keeps the Unit
// separate from the next one in the tree. The next Unit is released when
// iter_clear (the Iteration reset made at the tree root) clears the counter.
// This follows the document; the depth, the handshake and placing the counter
// and the maximum-value multiplexer after the shift register are this
// design's choices. unit_done tells the Iteration controller that the whole
// Unit has been sent. fifo_count is used for read credits in later Phases.
//
// Timing: out_valid is high whenever a beat (data or maximum value) is
// available; a beat moves when out_ready is high. e_p must be a multiple of 16
// and stay constant during a Phase.
module input_buffer
  import face_pkg::*;
#(
  parameter int unsigned DEPTH = 32,   // Long FIFO entries (512-bit words)
  parameter int unsigned CNT_W = 32    // element counter width
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       iter_clear,
  input  logic [CNT_W-1:0]           e_p,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  word_t                      in_data,
  output logic [$clog2(DEPTH+1)-1:0] fifo_count,
  output logic                       out_valid,
  input  logic                       out_ready,
  output beat_t                      out_data,
  output logic                       unit_done
);
  logic       f_full, f_empty, u_in_ready;
  word_t      f_data;
  logic       u_valid, u_ready;
  beat_t      u_data;
  logic [CNT_W-1:0] sent;

  assign in_ready = !f_full;

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(DEPTH)) u_long_fifo (
    .clk, .rst_n, .clear(1'b0),
    .wr_en(in_valid && !f_full), .wr_data(in_data), .full(f_full),
    .rd_en(u_in_ready && !f_empty), .rd_data(f_data), .empty(f_empty), .count(fifo_count)
  );

  unpack_512 u_unpack (
    .clk, .rst_n,
    .in_valid(!f_empty), .in_ready(u_in_ready), .in_data(f_data),
    .out_valid(u_valid), .out_ready(u_ready), .out_data(u_data)
  );

  assign unit_done = (sent >= e_p);
  assign u_ready   = out_ready && !unit_done;
  assign out_valid = unit_done || u_valid;
  assign out_data  = unit_done ? {BEAT_ELEMS{MAX_VAL}} : u_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                sent <= '0;
    else if (iter_clear)       sent <= '0;
    else if (u_valid && u_ready) sent <= sent + CNT_W'(BEAT_ELEMS);
  end
endmodule
