// full_adder: one-bit full adder, the cell of the ripple-carry adder.
//
// Adds x, y and a carry in: s is the sum bit, co the carry out
// (majority of the three inputs). Purely combinational. It is the usual
// textbook cell; the multiplier architecture names ripple-carry adders but
// does not draw their cells.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic ci,
  output logic s,
  output logic co
);

  always_comb begin
    s  = x ^ y ^ ci;
    co = (x & y) | (ci & (x ^ y));
  end

endmodule
