// rm_pkg: shared constants and helpers for the reconfigurable array multiplier.
//
// The array is configured by one vertical control bit per A column (V) and
// one horizontal control bit per B row (H); cell (i, j) takes part in the
// sum when V[i] XOR H[j] is 1. The helpers below build the V/H words for
// the most common case, a two-way split: the low K bits of A times the low
// K bits of B in product bits [2K-1:0], and the remaining high bits of A
// times the high bits of B in product bits [2W-1:2K]. Setting K equal to
// the array width gives V = 0, H = all ones: every cell enabled, one
// full-precision product. The encoding V = 1 above the split, H = 1 below it
// follows the example control words 11110000 / 00001111 for an 8-bit array
// split at 4; the helper functions themselves are a convenience of this
// design.
package rm_pkg;

  // Largest array width the helpers can describe.
  localparam int unsigned MAX_WIDTH = 64;

  typedef logic [MAX_WIDTH-1:0] ctrl_word_t;

  // Vertical control word: 1 for columns at or above the split point.
  function automatic ctrl_word_t split_v(int unsigned k, int unsigned width);
    ctrl_word_t v;
    v = '0;
    for (int unsigned i = 0; i < MAX_WIDTH; i++)
      if (i >= k && i < width) v[i] = 1'b1;
    return v;
  endfunction

  // Horizontal control word: 1 for rows below the split point.
  function automatic ctrl_word_t split_h(int unsigned k, int unsigned width);
    ctrl_word_t h;
    h = '0;
    for (int unsigned j = 0; j < MAX_WIDTH; j++)
      if (j < k && j < width) h[j] = 1'b1;
    return h;
  endfunction

endpackage
