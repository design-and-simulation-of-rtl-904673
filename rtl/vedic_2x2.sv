// vedic_2x2: 2x2-bit unsigned multiplier by the Urdhva Tiryakbhyam
// ("vertically and crosswise") rule, the leaf of the Vedic multiplier tree.
//
// With a = a1 a0 and b = b1 b0:
//   vertical   s0      = a0 b0
//   crosswise  c1 s1   = a1 b0 + a0 b1      (first half adder)
//   vertical   c2 s2   = c1 + a1 b1         (second half adder)
// and the product is p = c2 s2 s1 s0. That is four AND gates and two half
// adders, as the architecture specifies; the critical path is one AND gate
// and two half adders. Purely combinational.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic a0b0, a1b0, a0b1, a1b1;   // the four bit products
  logic s1, c1, s2, c2;

  always_comb begin
    a0b0 = a[0] & b[0];
    a1b0 = a[1] & b[0];
    a0b1 = a[0] & b[1];
    a1b1 = a[1] & b[1];
  end

  half_adder u_ha_cross (.x(a1b0), .y(a0b1), .s(s1), .c(c1));
  half_adder u_ha_high  (.x(c1),   .y(a1b1), .s(s2), .c(c2));

  assign p = {c2, s2, s1, a0b0};

endmodule
