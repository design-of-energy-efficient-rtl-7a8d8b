// Half adder: reduces two bits of one column of the partial-product array to
// a sum bit of the same weight and a carry bit of the next higher weight.
//
// The reduction tree uses a half adder wherever a group of two dots is
// compressed. The design calls for a low-energy transistor-level half adder;
// only its logic function is modelled here: s = a ^ b, c = a & b.
// Purely combinational, no clock.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  always_comb begin
    s = a ^ b;
    c = a & b;
  end

endmodule : half_adder
