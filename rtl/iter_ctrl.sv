// iter_ctrl: the Output Buffer's element counter and the Iteration reset it
// produces.
//
// It sits at the root of the merge sorter tree and counts the elements the
// tree emits. The first E_{p+1} elements after a reset form the merged Unit
// of the current Iteration and are forwarded downstream; whatever the root
// emits after that (maximum-value beats) is drained and dropped. When
// E_{p+1} elements have been counted and every Input Buffer reports that its
// Unit has been sent, iter_clear is pulsed for one cycle: it empties all FIFOs
// of the tree and clears the counters of the Input Buffers and this one, and
// the next Iteration starts. Counting at the tree root, rather than at the
// Output Buffer's storage behind the compressor, and also waiting for the
// Input Buffers, are this design's choices; the latter keeps the Units apart
// even when real data contains the maximum value.
//
// It also counts the elements of the whole Phase: out_last marks the beat
// that completes a memory region of region_elems (N/k) elements, and
// phase_done rises once n_total elements have been forwarded. phase_start
// clears the Phase counters. All counts are in elements and must be multiples
// of 4.
module iter_ctrl
  import face_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             phase_start,
  input  logic [CNT_W-1:0] e_next,        // E_{p+1}
  input  logic [CNT_W-1:0] region_elems,  // N / WAYS
  input  logic [CNT_W-1:0] n_total,       // N
  input  logic             inbuf_done,    // all Input Buffers sent their Unit
  // tree root
  input  logic             root_valid,
  input  beat_t            root_data,
  output logic             root_rd,
  // downstream
  output logic             out_valid,
  input  logic             out_ready,
  output beat_t            out_data,
  output logic             out_last,
  output logic             iter_clear,
  output logic             phase_done
);
  logic [CNT_W-1:0] cnt_iter, cnt_region, cnt_phase;
  logic             unit_complete, fwd;

  assign unit_complete = (cnt_iter >= e_next);
  assign out_valid     = root_valid && !unit_complete;
  assign out_data      = root_data;
  assign out_last      = (cnt_region + CNT_W'(BEAT_ELEMS) == region_elems);
  assign root_rd       = root_valid && (unit_complete || out_ready);
  assign fwd           = out_valid && out_ready;
  assign iter_clear    = unit_complete && inbuf_done;
  assign phase_done    = (cnt_phase == n_total);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_iter   <= '0;
      cnt_region <= '0;
      cnt_phase  <= '0;
    end else if (phase_start) begin
      cnt_iter   <= '0;
      cnt_region <= '0;
      cnt_phase  <= '0;
    end else begin
      if (iter_clear)  cnt_iter <= '0;
      else if (fwd)    cnt_iter <= cnt_iter + CNT_W'(BEAT_ELEMS);
      if (fwd) begin
        cnt_phase  <= cnt_phase + CNT_W'(BEAT_ELEMS);
        cnt_region <= out_last ? '0 : cnt_region + CNT_W'(BEAT_ELEMS);
      end
    end
  end
endmodule
