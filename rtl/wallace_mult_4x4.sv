// 4x4 unsigned Wallace multiplier, top level.
//
// p = a * b is computed in three steps:
//   1. pp_gen        16 AND gates form the partial products b[i] & a[j];
//   2. wallace_ppp   a two-stage Wallace tree of half adders and 3:2
//                    compressors reduces the four rows to two;
//   3. csa_adder     a 4-bit adder sums the two rows at weights 3..6 and its
//                    carry becomes product bit 7.
// Product bits 0..2 leave the tree already final.
//
// Interface: a, b are 4-bit unsigned operands, p the 8-bit product. The block
// is purely combinational: there is no clock, and p is valid one propagation
// delay after the operands settle. The three-step structure, the tree shape
// and the 4-bit final adder follow the design; unsigned operands and the
// absence of registers are this implementation's reading of it.
module wallace_mult_4x4
  import wallace_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t p
);

  pp_matrix_t pp;
  logic [2:0] low;
  logic [3:0] row_x, row_y;
  logic [3:0] fa_sum;
  logic       fa_cout;

  pp_gen #(.N(N)) u_pp_gen (
    .a  (a),
    .b  (b),
    .pp (pp)
  );

  wallace_ppp u_ppp (
    .pp    (pp),
    .low   (low),
    .row_x (row_x),
    .row_y (row_y)
  );

  csa_adder #(.W(4)) u_final (
    .x    (row_x),
    .y    (row_y),
    .sum  (fa_sum),
    .cout (fa_cout)
  );

  assign p = {fa_cout, fa_sum, low};

endmodule : wallace_mult_4x4
