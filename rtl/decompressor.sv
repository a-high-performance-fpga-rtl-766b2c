// decompressor: expands the words read back from memory before they reach the
// Input Buffers.
//
// Words from the memory controller enter a FIFO; its head is copied into a
// one-word temp register that holds it until it has been handled. A word
// whose top 33 bits carry the flag 0x0000_0000_1 holds two compressed halves:
// the low half and then the high half are passed, one per cycle, to the
// pipelined Base+Delta Decompressor, which produces two 16-element words. Any
// other word is passed on unchanged. This follows the document. Each word
// carries a tag (the way it belongs to); out_end marks the last output word
// made from one stored word, so the reader can return its buffer credit.
// Routing raw words through the decompressor's pipeline to keep the order is
// this design's choice (see bd_decompress).
//
// Timing: one output word per cycle when the output is ready; 1 cycle in the
// FIFO, 1 in the temp register and 15 in the decompressor pipeline.
// The input FIFO's occupancy count is not needed and its pin is left open.
module decompressor
  import face_pkg::*;
#(
  parameter int unsigned TAG_W = 4,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  word_t            in_data,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  input  logic             out_ready,
  output word_t            out_data,
  output logic [TAG_W-1:0] out_tag,
  output logic             out_end
);
  logic                   f_full, f_empty, f_rd;
  logic [WORD_W+TAG_W-1:0] f_data;

  logic             t_valid, t_half;    // temp register, next half to send
  word_t            t_word;
  logic [TAG_W-1:0] t_tag;
  logic             t_packed;

  logic  d_in_valid, d_in_ready, d_raw, d_end;
  word_t d_in;

  assign in_ready = !f_full;

  sync_fifo #(.WIDTH(WORD_W + TAG_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .clear(1'b0),
    .wr_en(in_valid && !f_full), .wr_data({in_tag, in_data}), .full(f_full),
    .rd_en(f_rd), .rd_data(f_data), .empty(f_empty), .count()
  );

  assign t_packed   = is_packed(t_word);
  assign d_in_valid = t_valid;
  assign d_raw      = !t_packed;
  assign d_in       = !t_packed ? t_word :
                      (t_half ? word_t'(t_word[2*CPART_W-1:CPART_W]) : word_t'(t_word[CPART_W-1:0]));
  assign d_end      = !t_packed || t_half;
  // The temp register is refilled when it is empty or its last part leaves.
  assign f_rd       = !f_empty && (!t_valid || (d_in_ready && d_end));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_valid <= 1'b0;
      t_half  <= 1'b0;
      t_word  <= '0;
      t_tag   <= '0;
    end else begin
      if (t_valid && d_in_ready) begin
        if (d_end) begin
          t_valid <= 1'b0;
          t_half  <= 1'b0;
        end else begin
          t_half  <= 1'b1;
        end
      end
      if (f_rd) begin
        t_valid <= 1'b1;
        t_half  <= 1'b0;
        t_word  <= f_data[WORD_W-1:0];
        t_tag   <= f_data[WORD_W +: TAG_W];
      end
    end
  end

  bd_decompress #(.TAG_W(TAG_W)) u_bd (
    .clk, .rst_n,
    .in_valid(d_in_valid), .in_ready(d_in_ready), .in_raw(d_raw), .in_data(d_in),
    .in_tag(t_tag), .in_flag(d_end),
    .out_valid, .out_ready, .out_data, .out_tag, .out_flag(out_end)
  );
endmodule
