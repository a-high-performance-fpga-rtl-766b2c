// face_pkg: types, sizes and helpers shared by the sorting accelerator.
//
// Elements are 32-bit unsigned integers sorted in ascending order. A 512-bit
// word carries 16 elements and a 128-bit beat carries 4; element i of a word
// or beat occupies bits [32*i+31 : 32*i], so element 0 (the smallest of a
// sorted word) sits in the least significant bits.
//
// The 2x compression format (one 512-bit word holding two sorted 16-element
// words) is:
//   [226:0]   first word : base (32 bits) + 15 neighbour deltas of 13 bits
//   [453:227] second word: same layout
//   [478:454] unused
//   [511:479] 33-bit flag 0x0000_0000_1 (bits 511..480 zero, bit 479 one)
// An uncompressed sorted word can never carry that flag: if its top element
// (bits 511..480) is zero, every element is zero, so bit 479 is zero too.
// The field sizes are the document's; the exact bit positions of the halves
// and the unused field are this design's choice.
package face_pkg;

  localparam int unsigned ELEM_W      = 32;
  localparam int unsigned WORD_W      = 512;
  localparam int unsigned BEAT_W      = 128;
  localparam int unsigned WORD_ELEMS  = WORD_W / ELEM_W;   // 16
  localparam int unsigned BEAT_ELEMS  = BEAT_W / ELEM_W;   // 4
  localparam int unsigned DELTA_W     = 13;
  localparam int unsigned CPART_W     = ELEM_W + (WORD_ELEMS - 1) * DELTA_W; // 227
  localparam int unsigned FLAG_W      = 33;
  localparam int unsigned FLAG_LSB    = WORD_W - FLAG_W;   // 479
  localparam logic [FLAG_W-1:0] FLAG_VAL = 33'h0_0000_0001;
  localparam logic [ELEM_W-1:0] MAX_VAL  = '1;

  typedef logic [ELEM_W-1:0] elem_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [BEAT_W-1:0] beat_t;
  typedef logic [CPART_W-1:0] cpart_t;

  // True when a 512-bit word read back from memory is a 2x-compressed word.
  function automatic logic is_packed(input word_t w);
    return w[WORD_W-1:FLAG_LSB] == FLAG_VAL;
  endfunction

  // Number of sorted elements a stored word stands for (16 or 32).
  function automatic int unsigned word_elem_count(input word_t w);
    return is_packed(w) ? 2 * WORD_ELEMS : WORD_ELEMS;
  endfunction

  // Builds the 2x-compressed word from two compressed halves.
  function automatic word_t make_packed(input cpart_t lo, input cpart_t hi);
    word_t w;
    w = '0;
    w[CPART_W-1:0]         = lo;
    w[2*CPART_W-1:CPART_W] = hi;
    w[WORD_W-1:FLAG_LSB]   = FLAG_VAL;
    return w;
  endfunction

endpackage
