// vedic_4x4: 4x4-bit unsigned multiplier built from four 2x2 Vedic
// multipliers and three 4-bit ripple-carry adders.
//
// The operands are split into halves, a = AH:AL and b = BH:BL (two bits
// each). The four 2x2 multipliers form, all at once, the vertical products
// q0 = AL*BL and q3 = AH*BH and the crosswise products q1 = AH*BL and
// q2 = AL*BH. The product is then
//   p = q3<<4 + (q1 + q2)<<2 + q0
// summed by three adders:
//   adder 1: {c1, m1} = q1 + q2
//   adder 2: {c2, m2} = m1 + q0[3:2]
//   p[1:0] = q0[1:0], p[3:2] = m2[1:0]
//   adder 3: p[7:4]   = q3 + {c1|c2, m2[3:2]}
// c1 and c2 both carry into bit 4 of p. The sum q1 + q2 + q0[3:2] is at
// most 2*9 + 3 = 21 < 32, so they are never set together and one OR gate
// merges them. The carry out of adder 3 is always 0, since the product fits
// in 8 bits. The four 2x2 products and the adder arrangement follow the
// architecture; the exact order of the three additions is this design's
// choice. Purely combinational.
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  logic [3:0] q0, q1, q2, q3;   // partial products
  logic [3:0] m1, m2, h;        // adder sums
  logic       c1, c2, cm;
  logic       top_carry_unused; // always 0, see above

  vedic_2x2 u_vm0 (.a(a[1:0]), .b(b[1:0]), .p(q0));  // AL*BL, vertical
  vedic_2x2 u_vm1 (.a(a[3:2]), .b(b[1:0]), .p(q1));  // AH*BL, crosswise
  vedic_2x2 u_vm2 (.a(a[1:0]), .b(b[3:2]), .p(q2));  // AL*BH, crosswise
  vedic_2x2 u_vm3 (.a(a[3:2]), .b(b[3:2]), .p(q3));  // AH*BH, vertical

  rc_adder #(.WIDTH(4)) u_r1 (
    .x(q1), .y(q2), .cin(1'b0), .s(m1), .cout(c1)
  );

  rc_adder #(.WIDTH(4)) u_r2 (
    .x(m1), .y({2'b00, q0[3:2]}), .cin(1'b0), .s(m2), .cout(c2)
  );

  assign cm = c1 | c2;

  rc_adder #(.WIDTH(4)) u_r3 (
    .x(q3), .y({1'b0, cm, m2[3:2]}), .cin(1'b0), .s(h), .cout(top_carry_unused)
  );

  assign p = {h, m2[1:0], q0[1:0]};

endmodule
