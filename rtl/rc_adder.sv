// rc_adder: WIDTH-bit ripple-carry adder.
//
// A chain of WIDTH full adders: bit i adds x[i], y[i] and the carry out of
// bit i-1, bit 0 takes cin, and the carry out of the last bit is cout. The
// delay grows linearly with WIDTH. Purely combinational.
//
// The multiplier stages use three of these per stage: 4-bit ones in the
// 4x4 multiplier and 8-bit ones in the 8x8 multiplier. The default width of
// 8 is that of the 8-bit adder of the 8x8 stage. A carry in is provided for
// generality; the multiplier ties it to 0.
module rc_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  logic [WIDTH:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .x  (x[i]),
      .y  (y[i]),
      .ci (carry[i]),
      .s  (s[i]),
      .co (carry[i+1])
    );
  end

  assign cout = carry[WIDTH];

endmodule
