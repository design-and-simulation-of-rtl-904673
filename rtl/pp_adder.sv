// pp_adder: partial-product adder of the 16x16 stage, either a
// carry look-ahead adder or a ripple-carry adder.
//
// A thin selector: ADDER picks which of cla_adder and rc_adder is built,
// with the same ports (x + y + cin = {cout, s}). The look-ahead adder is the
// default, as the 16x16 architecture calls for; the ripple-carry form
// reproduces the all-ripple netlist of the same multiplier. Purely
// combinational.
module pp_adder
  import vedic_pkg::*;
#(
  parameter int unsigned WIDTH = 16,
  parameter adder_kind_e ADDER = ADDER_CLA
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  if (ADDER == ADDER_CLA) begin : g_cla
    cla_adder #(.WIDTH(WIDTH)) u_add (.x, .y, .cin, .s, .cout);
  end else begin : g_ripple
    rc_adder #(.WIDTH(WIDTH)) u_add (.x, .y, .cin, .s, .cout);
  end

endmodule
