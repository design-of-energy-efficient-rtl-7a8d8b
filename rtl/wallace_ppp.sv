// Partial-product processing of the 4x4 multiplier: a two-stage Wallace tree
// built from half adders and 3:2 compressors.
//
// The 16 partial products form four rows (stage 1). Each stage groups the dots
// of a column into threes (3:2 compressor) or twos (half adder); the row count
// follows S(i+1) = 2*floor(S(i)/3) + S(i) mod 3, so 4 rows become 3 (stage 2)
// and then 2 (stage 3), where reduction stops and the final adder takes over.
//
// Column heights, weights 0..6:
//   stage 1: 1 2 3 4 3 2 1   HA at w1, 3:2 at w2 and w3, HA at w4
//   stage 2: 1 1 2 3 3 3 1   HA at w2, 3:2 at w3, w4 and w5
//   stage 3: 1 1 1 2 2 2 2   weights 0..2 are final; weights 3..6 go to the
//                            4-bit final adder as row_x and row_y
// The grouping and the column heights are those of the design's dot diagram.
// Which dot of a column enters which cell is this implementation's choice
// (it does not change the sum): at w3 the compressor takes p03, p12, p21 and
// p30 passes; at w4 the half adder takes p13, p22 and p31 passes.
//
// Two outputs are wired straight from inputs on purpose: p00 (low[0]) is
// alone in weight 0 and p33 (row_x[3]) is alone in weight 6 until the final
// addition, so no cell touches them.
//
// Interface: pp[i][j] = b[i] & a[j]. Outputs low[2:0] are product bits 0..2;
// low + ((row_x + row_y) << 3) equals the product. Purely combinational.
module wallace_ppp
  import wallace_pkg::*;
(
  input  pp_matrix_t  pp,
  output logic [2:0]  low,
  output logic [3:0]  row_x,
  output logic [3:0]  row_y
);

  // ---------------- stage 1 -> stage 2 ----------------
  logic s1_w1_s, s1_w1_c;   // half adder, weight 1
  logic s1_w2_s, s1_w2_c;   // 3:2 compressor, weight 2
  logic s1_w3_s, s1_w3_c;   // 3:2 compressor, weight 3
  logic s1_w4_s, s1_w4_c;   // half adder, weight 4

  half_adder     u_s1_w1 (.a(pp[0][1]), .b(pp[1][0]),               .s(s1_w1_s), .c(s1_w1_c));
  compressor_3_2 u_s1_w2 (.x(pp[0][2]), .y(pp[1][1]), .z(pp[2][0]), .s(s1_w2_s), .c(s1_w2_c));
  compressor_3_2 u_s1_w3 (.x(pp[0][3]), .y(pp[1][2]), .z(pp[2][1]), .s(s1_w3_s), .c(s1_w3_c));
  half_adder     u_s1_w4 (.a(pp[1][3]), .b(pp[2][2]),               .s(s1_w4_s), .c(s1_w4_c));

  // ---------------- stage 2 -> stage 3 ----------------
  // Stage-2 columns: w0 {p00}, w1 {s1_w1_s}, w2 {s1_w2_s, s1_w1_c},
  // w3 {s1_w3_s, s1_w2_c, p30}, w4 {s1_w4_s, s1_w3_c, p31},
  // w5 {s1_w4_c, p23, p32}, w6 {p33}.
  logic s2_w2_s, s2_w2_c;   // half adder, weight 2
  logic s2_w3_s, s2_w3_c;   // 3:2 compressor, weight 3
  logic s2_w4_s, s2_w4_c;   // 3:2 compressor, weight 4
  logic s2_w5_s, s2_w5_c;   // 3:2 compressor, weight 5

  half_adder     u_s2_w2 (.a(s1_w2_s), .b(s1_w1_c),               .s(s2_w2_s), .c(s2_w2_c));
  compressor_3_2 u_s2_w3 (.x(s1_w3_s), .y(s1_w2_c), .z(pp[3][0]), .s(s2_w3_s), .c(s2_w3_c));
  compressor_3_2 u_s2_w4 (.x(s1_w4_s), .y(s1_w3_c), .z(pp[3][1]), .s(s2_w4_s), .c(s2_w4_c));
  compressor_3_2 u_s2_w5 (.x(s1_w4_c), .y(pp[2][3]), .z(pp[3][2]), .s(s2_w5_s), .c(s2_w5_c));

  // ---------------- stage 3: two rows ----------------
  // w3 {s2_w3_s, s2_w2_c}, w4 {s2_w4_s, s2_w3_c}, w5 {s2_w5_s, s2_w4_c},
  // w6 {p33, s2_w5_c}.
  always_comb begin
    low   = {s2_w2_s, s1_w1_s, pp[0][0]};
    row_x = {pp[3][3], s2_w5_s, s2_w4_s, s2_w3_s};
    row_y = {s2_w5_c,  s2_w4_c, s2_w3_c, s2_w2_c};
  end

endmodule : wallace_ppp
