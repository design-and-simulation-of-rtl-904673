// vedic_16x16: 16x16-bit unsigned Vedic multiplier (Urdhva Tiryakbhyam,
// "vertically and crosswise"), the top of the design.
//
// The operands are split into bytes, a = AH:AL and b = BH:BL. Four 8x8
// Vedic multipliers form, all in parallel, the vertical byte products
// q0 = AL*BL and q3 = AH*BH and the crosswise products q1 = AH*BL and
// q2 = AL*BH. Three 16-bit adders then sum the rows
//   p = q3<<16 + (q1 + q2)<<8 + q0
// as
//   adder 1: {c1, m1} = q1 + q2
//   adder 2: {c2, m2} = m1 + q0[15:8]
//   p[7:0]  = q0[7:0], p[15:8] = m2[7:0]
//   adder 3: p[31:16] = q3 + {c1|c2, m2[15:8]}
// q1 + q2 + q0[15:8] <= 2*65025 + 255 < 2^17, so c1 and c2 are never set
// together and a single OR gate merges them; adder 3 never carries out,
// since the product fits in 32 bits. Each 8x8 block is itself four 4x4
// blocks, each of those four 2x2 blocks, so all 64 2x2 partial products are
// formed at once and only the adder tree follows.
//
// ADDER selects the three 16-bit adders: carry look-ahead (default, as the
// 16x16 architecture asks) or ripple carry. The blocks inside the 8x8
// multipliers always use ripple-carry adders. The byte split, the four 8x8
// blocks, the three adders and the OR gate follow the architecture; the
// order of the additions is this design's choice.
//
// Ports: a (multiplicand) and b (multiplier) in, p = a*b out, all unsigned.
// Purely combinational: no clock, no reset, p is valid one propagation
// delay after a and b change.
module vedic_16x16
  import vedic_pkg::*;
#(
  parameter adder_kind_e ADDER = ADDER_CLA
) (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);

  logic [15:0] q0, q1, q2, q3;
  logic [15:0] m1, m2, h;
  logic        c1, c2, cm;
  logic        top_carry_unused; // always 0, see above

  vedic_8x8 u_vm1 (.a(a[7:0]),  .b(b[7:0]),  .p(q0));  // AL*BL
  vedic_8x8 u_vm2 (.a(a[15:8]), .b(b[7:0]),  .p(q1));  // AH*BL
  vedic_8x8 u_vm3 (.a(a[7:0]),  .b(b[15:8]), .p(q2));  // AL*BH
  vedic_8x8 u_vm4 (.a(a[15:8]), .b(b[15:8]), .p(q3));  // AH*BH

  pp_adder #(.WIDTH(16), .ADDER(ADDER)) u_r1 (
    .x(q1), .y(q2), .cin(1'b0), .s(m1), .cout(c1)
  );

  pp_adder #(.WIDTH(16), .ADDER(ADDER)) u_r2 (
    .x(m1), .y({8'h00, q0[15:8]}), .cin(1'b0), .s(m2), .cout(c2)
  );

  assign cm = c1 | c2;

  pp_adder #(.WIDTH(16), .ADDER(ADDER)) u_r3 (
    .x(q3), .y({7'h00, cm, m2[15:8]}), .cin(1'b0), .s(h), .cout(top_carry_unused)
  );

  assign p = {h, m2[7:0], q0[7:0]};

endmodule
