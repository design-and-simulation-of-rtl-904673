// cla_adder: WIDTH-bit two-level carry look-ahead adder.
//
// Each bit forms a generate g = x & y and a propagate p = x ^ y. The bits
// are taken in groups of four. A group reports a group generate (it makes a
// carry by itself) and a group propagate (it passes its carry in through).
// The second level computes every group's carry in directly from cin and
// the group signals, and the first level computes every bit's carry inside
// a group directly from the group's carry in and the bit signals. Both
// levels are flat sums of products, so no carry ripples through more than
// one group: the carry path is a fixed number of gate levels instead of
// WIDTH of them. Purely combinational.
//
// The architecture asks for a 16-bit carry look-ahead adder to sum the
// partial product rows of the 16x16 multiplier; the group size of four and
// the two-level arrangement are this design's choice. WIDTH must be a
// multiple of 4.
module cla_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  localparam int unsigned GROUP  = 4;
  localparam int unsigned NGROUP = WIDTH / GROUP;

  if (WIDTH % GROUP != 0 || WIDTH == 0) begin : g_bad_width
    $error("cla_adder: WIDTH must be a non-zero multiple of 4");
  end

  logic [WIDTH-1:0]  g, p;        // bit generate and propagate
  logic [NGROUP-1:0] gg, gp;      // group generate and propagate
  logic [NGROUP:0]   gc;          // carry into each group, gc[NGROUP] = cout
  logic [WIDTH-1:0]  c;           // carry into each bit

  // Bit generate / propagate, and the group signals, all as sums of products.
  always_comb begin
    g = x & y;
    p = x ^ y;
    for (int k = 0; k < NGROUP; k++) begin
      gg[k] = 1'b0;
      for (int j = 0; j < GROUP; j++) begin
        logic term;
        term = g[k*GROUP+j];
        for (int m = j + 1; m < GROUP; m++) term &= p[k*GROUP+m];
        gg[k] |= term;
      end
      gp[k] = &p[k*GROUP +: GROUP];
    end
  end

  // Second level: the carry into group k, from cin and the group signals of
  // groups 0..k-1 only.
  always_comb begin
    for (int k = 0; k <= NGROUP; k++) begin
      logic all_p;
      gc[k] = 1'b0;
      for (int j = 0; j < k; j++) begin
        logic term;
        term = gg[j];
        for (int m = j + 1; m < k; m++) term &= gp[m];
        gc[k] |= term;
      end
      all_p = 1'b1;
      for (int m = 0; m < k; m++) all_p &= gp[m];
      gc[k] |= all_p & cin;
    end
  end

  // First level: the carry into bit i of group k, from the group carry and
  // the bit signals of the group's lower bits only.
  always_comb begin
    for (int k = 0; k < NGROUP; k++) begin
      for (int i = 0; i < GROUP; i++) begin
        logic cbit, all_p;
        cbit = 1'b0;
        for (int j = 0; j < i; j++) begin
          logic term;
          term = g[k*GROUP+j];
          for (int m = j + 1; m < i; m++) term &= p[k*GROUP+m];
          cbit |= term;
        end
        all_p = 1'b1;
        for (int m = 0; m < i; m++) all_p &= p[k*GROUP+m];
        c[k*GROUP+i] = cbit | (all_p & gc[k]);
      end
    end
  end

  assign s    = p ^ c;
  assign cout = gc[NGROUP];

endmodule
