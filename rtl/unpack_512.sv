// unpack_512: the 512-bit shift register that breaks a 512-bit word (16
// elements) into four 128-bit beats (4 elements each), lowest elements first.
//
// One sits inside each Input Buffer, in front of its leaf of the merge sorter
// tree. A word is taken when the register
// is empty or its last beat is leaving, so a continuous stream of words gives
// one beat every cycle. The handshake is this design's own choice.
module unpack_512
  import face_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  word_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output beat_t out_data
);
  word_t      sr;
  logic [2:0] left;        // beats still to send, 0..4

  assign out_valid = (left != '0);
  assign out_data  = sr[BEAT_W-1:0];
  assign in_ready  = (left == '0) || (left == 3'd1 && out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left <= '0;
      sr   <= '0;
    end else if (in_valid && in_ready) begin
      sr   <= in_data;
      left <= 3'd4;
    end else if (out_valid && out_ready) begin
      sr   <= {BEAT_W'(0), sr[WORD_W-1:BEAT_W]};
      left <= left - 1'b1;
    end
  end
endmodule
