// bd_decompress: pipelined Base+Delta Decompressor.
//
// Rebuilds 16 sorted elements from a 227-bit compressed half (base in
// [31:0], delta_i in [32+13*(i-1) +: 13]) by a chain of additions,
// V_i = V_{i-1} + delta_i, one addition per pipeline stage, as the document
// does to keep the clock fast instead of a long combinational adder chain.
// A word marked in_raw (not compressed) travels through the same stages
// unchanged; carrying it through the pipeline rather than around it keeps
// words in order and is this design's choice. A tag of TAG_W bits and a
// flag travel with each word.
//
// Timing: 15 stages, one word per cycle; the whole pipeline holds while the
// output is valid and out_ready is low (in_ready is then low too).
module bd_decompress
  import face_pkg::*;
#(
  parameter int unsigned TAG_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic             in_raw,
  input  word_t            in_data,     // raw word, or compressed half in [226:0]
  input  logic [TAG_W-1:0] in_tag,
  input  logic             in_flag,
  output logic             out_valid,
  input  logic             out_ready,
  output word_t            out_data,
  output logic [TAG_W-1:0] out_tag,
  output logic             out_flag
);
  localparam int unsigned STAGES = WORD_ELEMS - 1;   // 15

  typedef elem_t vec_t [WORD_ELEMS];
  typedef struct packed {
    logic             valid;
    logic             raw;
    logic [TAG_W-1:0] tag;
    logic             flag;
  } ctl_t;

  vec_t vec_q [STAGES];
  ctl_t ctl_q [STAGES];
  vec_t in_vec;
  logic advance;

  assign advance  = !ctl_q[STAGES-1].valid || out_ready;
  assign in_ready = advance;

  // Unpack the input: base and zero-extended deltas, or the raw elements.
  always_comb begin
    for (int i = 0; i < WORD_ELEMS; i++) in_vec[i] = in_data[ELEM_W*i +: ELEM_W];
    if (!in_raw) begin
      in_vec[0] = in_data[ELEM_W-1:0];
      for (int i = 1; i < WORD_ELEMS; i++)
        in_vec[i] = elem_t'(in_data[ELEM_W + DELTA_W*(i-1) +: DELTA_W]);
    end
  end

  // Stage s (0-based) produces element s+1.
  function automatic vec_t add_stage(input vec_t v, input logic raw, input int s);
    vec_t r = v;
    if (!raw) r[s+1] = v[s+1] + v[s];
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < STAGES; s++) ctl_q[s] <= '0;
    end else if (advance) begin
      ctl_q[0] <= '{valid: in_valid, raw: in_raw, tag: in_tag, flag: in_flag};
      for (int s = 1; s < STAGES; s++) ctl_q[s] <= ctl_q[s-1];
    end
  end

  always_ff @(posedge clk) begin
    if (advance) begin
      vec_q[0] <= add_stage(in_vec, in_raw, 0);
      for (int s = 1; s < STAGES; s++) vec_q[s] <= add_stage(vec_q[s-1], ctl_q[s-1].raw, s);
    end
  end

  assign out_valid = ctl_q[STAGES-1].valid;
  assign out_tag   = ctl_q[STAGES-1].tag;
  assign out_flag  = ctl_q[STAGES-1].flag;
  always_comb begin
    for (int i = 0; i < WORD_ELEMS; i++) out_data[ELEM_W*i +: ELEM_W] = vec_q[STAGES-1][i];
  end
endmodule
