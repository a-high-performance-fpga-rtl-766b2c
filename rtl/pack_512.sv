// pack_512: the 512-bit shift register that packs four 128-bit beats (4
// elements each) into one 512-bit word (16 elements).
//
// The accelerator uses it twice: after the 128-bit host interface, in front of
// the sorting network, and after the root of the merge sorter tree, in front
// of the compressor and Output Buffer. Each accepted beat is shifted in from
// the top, so the first beat ends up in bits [127:0] and element order is
// kept. The word is offered on out_* once the fourth beat is in; a beat can be
// accepted in the same cycle as the finished word leaves, so the packer
// sustains one beat per cycle. in_last on the fourth beat of a word is passed
// on as out_last (used to mark the end of a memory region). The handshake is
// this design's own choice.
module pack_512
  import face_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  beat_t in_data,
  input  logic  in_last,
  output logic  out_valid,
  input  logic  out_ready,
  output word_t out_data,
  output logic  out_last
);
  word_t      sr;
  logic [1:0] nbeats;      // beats held in the shift register, 0..3
  logic       full_q;      // four beats collected, word pending

  assign out_valid = full_q;
  assign out_data  = sr;
  assign in_ready  = !full_q || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbeats   <= '0;
      full_q   <= 1'b0;
      out_last <= 1'b0;
      sr       <= '0;
    end else begin
      if (full_q && out_ready) full_q <= 1'b0;
      if (in_valid && in_ready) begin
        sr     <= {in_data, sr[WORD_W-1:BEAT_W]};
        nbeats <= nbeats + 1'b1;
        if (nbeats == 2'd3) begin
          full_q   <= 1'b1;
          out_last <= in_last;
        end
      end
    end
  end
endmodule
