// Shared constants and types of the 4x4 Wallace multiplier.
//
// N is the operand width (4, the size the design is built for) and PW the
// product width, 2N, wide enough for 15 * 15 = 225. pp_matrix_t holds the
// N x N partial products: element [i][j] is b[i] & a[j] and carries weight
// 2^(i+j). The operand width comes from the design; the 8-bit product width
// is the natural consequence of unsigned N x N multiplication.
package wallace_pkg;

  localparam int unsigned N  = 4;
  localparam int unsigned PW = 2 * N;

  typedef logic [N-1:0]          operand_t;
  typedef logic [PW-1:0]         product_t;
  typedef logic [N-1:0][N-1:0]   pp_matrix_t;

endpackage : wallace_pkg
