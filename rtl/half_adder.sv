// half_adder: one-bit half adder, the only adder cell of the 2x2 Vedic
// multiplier.
//
// Adds two bits: s = x xor y is the sum bit, c = x and y the carry.
// Purely combinational, no clock.
module half_adder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic c
);

  always_comb begin
    s = x ^ y;
    c = x & y;
  end

endmodule
