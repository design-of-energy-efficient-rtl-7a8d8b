// 3:2 compressor: takes three bits of the same weight and returns a sum bit
// of that weight and a carry bit of the next higher weight, so that three
// rows of partial products become two.
//
// The multiplier relies on this cell for every group of three dots in the
// reduction tree and for the upper bits of the final adder. The circuit-level
// architecture of the low-energy compressor is not part of this RTL; the cell
// is written as its logic function, s = x ^ y ^ z and c = majority(x, y, z).
// Purely combinational, no clock.
module compressor_3_2 (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic c
);

  logic xy;

  always_comb begin
    xy = x ^ y;
    s  = xy ^ z;
    c  = (x & y) | (xy & z);
  end

endmodule : compressor_3_2
