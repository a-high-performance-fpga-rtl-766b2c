// compressor: 2x compression of the sorted 512-bit words leaving the tree.
//
// Made of a Base+Delta Compressor, a one-word temp FIFO and a Data Packer.
// Each word from the 512-bit shift register is compressed to 227 bits while
// the original is kept. When two successive words are both compressible, the
// Data Packer writes them as one 512-bit word: first word's 227 bits low,
// second word's above, unused bits, and the 33-bit flag 0x0000_0000_1 at the
// top (see face_pkg). Otherwise the original words go out one by one. This
// follows the document. Its own choices: a compressible word marked in_last
// (the last word of a memory region) is never held, so a packed word never
// straddles two regions; a held word followed by an incompressible one is
// sent first and the incompressible word one cycle later.
//
// Timing: combinational from input to output apart from the held word; at
// most one output word per cycle, in_ready follows out_ready.
module compressor
  import face_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  word_t in_data,
  input  logic  in_last,
  output logic  out_valid,
  input  logic  out_ready,
  output word_t out_data
);
  cpart_t in_part;
  logic   in_comp;
  logic   held_valid;
  word_t  held_word;
  cpart_t held_part;
  logic   do_hold, send_held;

  bd_compress u_bd (.in_data(in_data), .out_part(in_part), .compressible(in_comp));

  // Hold a compressible word that may be paired with the next one.
  assign do_hold   = in_valid && !held_valid && in_comp && !in_last;
  // A held word followed by an incompressible one goes out alone first.
  assign send_held = held_valid && in_valid && !in_comp;

  always_comb begin
    out_valid = 1'b0;
    out_data  = in_data;
    in_ready  = 1'b0;
    if (held_valid) begin
      if (in_valid && in_comp) begin
        out_valid = 1'b1;
        out_data  = make_packed(held_part, in_part);
        in_ready  = out_ready;
      end else if (send_held) begin
        out_valid = 1'b1;
        out_data  = held_word;
      end
    end else if (do_hold) begin
      in_ready = 1'b1;
    end else begin
      out_valid = in_valid;
      in_ready  = out_ready;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held_valid <= 1'b0;
      held_word  <= '0;
      held_part  <= '0;
    end else if (do_hold) begin
      held_valid <= 1'b1;
      held_word  <= in_data;
      held_part  <= in_part;
    end else if (held_valid && out_valid && out_ready) begin
      held_valid <= 1'b0;
    end
  end
endmodule
