// Partial-product generator: one AND gate per pair of operand bits.
//
// For an N x N multiplication it produces N*N partial products,
// pp[i][j] = b[i] & a[j], whose weight is 2^(i+j). Row i of the array is the
// multiplicand a gated by multiplier bit b[i]. The AND-array structure and the
// index convention (p_ij = b_i a_j) follow the design; the default N = 4
// gives the 16 AND gates of the 4x4 multiplier. Purely combinational.
module pp_gen #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]          a,
  input  logic [N-1:0]          b,
  output logic [N-1:0][N-1:0]   pp
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        pp[i][j] = b[i] & a[j];
      end
    end
  end

endmodule : pp_gen
