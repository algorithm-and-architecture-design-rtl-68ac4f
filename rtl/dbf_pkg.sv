// Shared types and constants of the in-place deblocking filter.
//
// A "word" is four 8-bit pixels moved in one cycle: pixel k sits in bits
// [8k+7:8k].  For a row of a 4x4 block, pixel k is column k; for a column,
// pixel k is row k.  Across an edge the p side word holds p3,p2,p1,p0 in
// pixels 0..3 and the q side word holds q0,q1,q2,q3 in pixels 0..3, so both
// a row taken left-to-right and a column taken top-to-bottom feed the filter
// without reordering.
package dbf_pkg;

  typedef logic [7:0]  pix_t;
  typedef logic [31:0] word_t;

  // Colour component of the macroblock part being processed.
  typedef enum logic [1:0] {COMP_Y = 2'd0, COMP_CB = 2'd1, COMP_CR = 2'd2} comp_e;

  // Boundary strength, 0 (no filtering) to 4 (strong filter).
  typedef logic [2:0] bs_t;

  function automatic pix_t get_pix(word_t w, int unsigned k);
    return w[8*k +: 8];
  endfunction

endpackage
