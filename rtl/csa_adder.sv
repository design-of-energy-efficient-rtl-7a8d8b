// Final adder: resolves the last two rows of the reduction tree into one.
//
// The design specifies a 4-bit carry-save adder for this step and stresses
// that it starts without a carry input. The circuit is this implementation's
// choice: bit 0 is a half adder (no carry-in), and bits 1..W-1 are 3:2
// compressors, each adding the two row bits and the carry from the bit below.
// cout is the carry out of the top bit.
//
// Interface: {cout, sum} = x + y. W defaults to 4, the width of the design's
// final adder (product weights 3..6, cout is product bit 7).
// Purely combinational.
module csa_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] carry;   // carry[k] enters bit k; carry[0] is unused

  assign carry[0] = 1'b0;

  half_adder u_bit0 (.a(x[0]), .b(y[0]), .s(sum[0]), .c(carry[1]));

  for (genvar k = 1; k < W; k++) begin : g_bit
    compressor_3_2 u_fa (
      .x(x[k]), .y(y[k]), .z(carry[k]),
      .s(sum[k]), .c(carry[k+1])
    );
  end

  assign cout = carry[W];

endmodule : csa_adder
