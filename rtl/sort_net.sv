// sort_net: pipelined Batcher odd-even merge sort network.
//
// Sorts the 16 elements of a 512-bit word into ascending order (element 0,
// in the low bits, becomes the smallest). With the default 16 inputs the
// network has 63 comparators in 10 stages, as in the document; a register
// follows every stage, so a word leaves 10 cycles after it enters and a new
// word can enter every cycle. Each comparator puts the smaller value on the
// lower-numbered wire.
//
// The comparator positions are generated from Batcher's iterative odd-even
// merge sort (for p = 1,2,4,..; for k = p,p/2,..,1: compare i+j with i+j+k
// when both lie in the same block of 2p), which yields log2(n)(log2(n)+1)/2
// stages. Flow control is this design's own: a valid bit travels with each
// stage and the whole pipeline holds while the output is valid and not
// accepted (in_ready low).
module sort_net
  import face_pkg::*;
#(
  parameter int unsigned LOG2N = 4                    // 16 inputs
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [ELEM_W*(1<<LOG2N)-1:0] in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [ELEM_W*(1<<LOG2N)-1:0] out_data
);
  localparam int unsigned N      = 1 << LOG2N;
  localparam int unsigned STAGES = LOG2N * (LOG2N + 1) / 2;

  typedef elem_t vec_t [N];

  // One stage of compare-exchange operations for block size p, distance k.
  function automatic vec_t apply_stage(input vec_t v, input int unsigned p, input int unsigned k);
    vec_t r = v;
    for (int unsigned j = k % p; j + k < N; j += 2 * k)
      for (int unsigned i = 0; i < k; i++)
        if ((i + j + k < N) && ((i + j) / (2 * p) == (i + j + k) / (2 * p))) begin
          if (r[i+j] > r[i+j+k]) begin
            elem_t t = r[i+j];
            r[i+j]   = r[i+j+k];
            r[i+j+k] = t;
          end
        end
    return r;
  endfunction

  vec_t stage_d [STAGES];   // input of each stage
  vec_t stage_q [STAGES];   // register after each stage
  logic valid_q [STAGES];
  logic advance;

  assign advance  = !valid_q[STAGES-1] || out_ready;
  assign in_ready = advance;

  always_comb begin
    for (int unsigned i = 0; i < N; i++) stage_d[0][i] = in_data[ELEM_W*i +: ELEM_W];
    for (int unsigned s = 1; s < STAGES; s++) stage_d[s] = stage_q[s-1];
  end

  // Stage number s = lp*(lp+1)/2 + (lp-lk) for p = 2**lp, k = 2**lk.
  for (genvar lp = 0; lp < LOG2N; lp++) begin : g_p
    for (genvar lk = lp; lk >= 0; lk--) begin : g_k
      localparam int unsigned S = lp * (lp + 1) / 2 + (lp - lk);
      always_ff @(posedge clk) begin
        if (advance) stage_q[S] <= apply_stage(stage_d[S], 1 << lp, 1 << lk);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < STAGES; s++) valid_q[s] <= 1'b0;
    end else if (advance) begin
      valid_q[0] <= in_valid;
      for (int unsigned s = 1; s < STAGES; s++) valid_q[s] <= valid_q[s-1];
    end
  end

  assign out_valid = valid_q[STAGES-1];
  always_comb begin
    for (int unsigned i = 0; i < N; i++) out_data[ELEM_W*i +: ELEM_W] = stage_q[STAGES-1][i];
  end
endmodule
