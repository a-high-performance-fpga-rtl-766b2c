// bd_compress: Base+Delta Compressor for one sorted 512-bit word.
//
// The 16 elements V0..V15 of a word from the tree are sorted, V0 smallest.
// V0 becomes the 32-bit base and each other element is replaced by its
// difference to its lower neighbour, delta_i = V_i - V_{i-1}. The word is
// compressible when every delta fits in 13 bits (<= 0x1fff); the result is
// then 32 + 15*13 = 227 bits: base in [31:0] and delta_i in
// [32+13*(i-1) +: 13]. Subtracting neighbours rather than the base, and the
// 13-bit delta, follow the document; the bit order inside the 227 bits is
// this design's choice. An unsorted word gives a wrapped, huge delta and is
// reported as not compressible. Purely combinational: 15 subtractors in
// parallel.
module bd_compress
  import face_pkg::*;
(
  input  word_t  in_data,
  output cpart_t out_part,
  output logic   compressible
);
  always_comb begin
    compressible = 1'b1;
    out_part     = '0;
    out_part[ELEM_W-1:0] = in_data[ELEM_W-1:0];
    for (int i = 1; i < WORD_ELEMS; i++) begin
      elem_t d;
      d = in_data[ELEM_W*i +: ELEM_W] - in_data[ELEM_W*(i-1) +: ELEM_W];
      if (d > elem_t'((1 << DELTA_W) - 1)) compressible = 1'b0;
      out_part[ELEM_W + DELTA_W*(i-1) +: DELTA_W] = d[DELTA_W-1:0];
    end
  end
endmodule
