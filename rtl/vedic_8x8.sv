// vedic_8x8: 8x8-bit unsigned multiplier built from four 4x4 Vedic
// multipliers and three 8-bit ripple-carry adders.
//
// Same arrangement as the 4x4 stage one level up. With a = AH:AL and
// b = BH:BL (four bits each), the 4x4 multipliers form in parallel
//   q0 = AL*BL, q1 = AH*BL, q2 = AL*BH, q3 = AH*BH
// and p = q3<<8 + (q1 + q2)<<4 + q0 is summed as
//   adder 1: {c1, m1} = q1 + q2
//   adder 2: {c2, m2} = m1 + q0[7:4]
//   p[3:0] = q0[3:0], p[7:4] = m2[3:0]
//   adder 3: p[15:8]  = q3 + {c1|c2, m2[7:4]}
// q1 + q2 + q0[7:4] <= 2*225 + 15 = 465 < 512, so c1 and c2 are never set
// together and an OR gate merges them; the carry out of adder 3 is always
// 0. The four 4x4 blocks and three 8-bit ripple-carry adders follow the
// architecture; the order of the additions is this design's choice.
// Purely combinational.
module vedic_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);

  logic [7:0] q0, q1, q2, q3;
  logic [7:0] m1, m2, h;
  logic       c1, c2, cm;
  logic       top_carry_unused; // always 0, see above

  vedic_4x4 u_vm0 (.a(a[3:0]), .b(b[3:0]), .p(q0));  // AL*BL
  vedic_4x4 u_vm1 (.a(a[7:4]), .b(b[3:0]), .p(q1));  // AH*BL
  vedic_4x4 u_vm2 (.a(a[3:0]), .b(b[7:4]), .p(q2));  // AL*BH
  vedic_4x4 u_vm3 (.a(a[7:4]), .b(b[7:4]), .p(q3));  // AH*BH

  rc_adder #(.WIDTH(8)) u_r1 (
    .x(q1), .y(q2), .cin(1'b0), .s(m1), .cout(c1)
  );

  rc_adder #(.WIDTH(8)) u_r2 (
    .x(m1), .y({4'h0, q0[7:4]}), .cin(1'b0), .s(m2), .cout(c2)
  );

  assign cm = c1 | c2;

  rc_adder #(.WIDTH(8)) u_r3 (
    .x(q3), .y({3'b000, cm, m2[7:4]}), .cin(1'b0), .s(h), .cout(top_carry_unused)
  );

  assign p = {h, m2[3:0], q0[3:0]};

endmodule
