// tb_vedic_16x16: end-to-end self-checking test of the 16x16 Vedic
// multiplier in both of its adder configurations.
//
// Two multipliers are driven with the same operands: one with the default
// carry look-ahead adders, one with ripple-carry adders. Operands are the
// worked example 61680 x 3855 = 237776400, directed corners (zero, one,
// all ones, single bits, alternating patterns, every byte extreme) and
// random pairs. Both products are compared with a * b computed by the
// testbench.
//
// The testbench also works out, from the operand bytes alone, which of the
// two middle carries of the 16x16 stage each operand pair makes: c1 from
// adding the crosswise products AH*BL + AL*BH, c2 from adding the low half
// of that sum to the high byte of AL*BL. It counts the pairs that set c1,
// that set c2, that set neither, and confirms that none sets both (the
// premise of merging them with an OR gate). Each of the first three must
// happen at least once or a failure is counted.
module tb_vedic_16x16;
  import vedic_pkg::*;

  logic [15:0] a, b;
  logic [31:0] p_cla, p_rc;
  int checks = 0;
  int failures = 0;
  int n_c1 = 0, n_c2 = 0, n_none = 0, n_both = 0;

  vedic_16x16 dut_cla (.a, .b, .p(p_cla));
  vedic_16x16 #(.ADDER(ADDER_RIPPLE)) dut_rc (.a, .b, .p(p_rc));

  task automatic apply(input logic [15:0] av, input logic [15:0] bv);
    logic [31:0] expected;
    logic [16:0] cross_sum;
    logic [16:0] mid;
    logic        c1, c2;
    a = av;
    b = bv;
    expected = 32'(av) * 32'(bv);
    cross_sum = 17'(16'(av[15:8]) * 16'(bv[7:0])) + 17'(16'(av[7:0]) * 16'(bv[15:8]));
    c1    = cross_sum[16];
    mid   = 17'(cross_sum[15:0]) + 17'((16'(av[7:0]) * 16'(bv[7:0])) >> 8);
    c2    = mid[16];
    if (c1 && c2) n_both++;
    else if (c1)  n_c1++;
    else if (c2)  n_c2++;
    else          n_none++;
    #1;
    checks++;
    if (p_cla !== expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL look-ahead %0d * %0d = %0d, expected %0d", av, bv, p_cla, expected);
    end
    checks++;
    if (p_rc !== expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL ripple %0d * %0d = %0d, expected %0d", av, bv, p_rc, expected);
    end
  endtask

  task automatic check_true(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] corners [12];
    corners = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h00FF, 16'hFF00,
                16'hAAAA, 16'h5555, 16'hF0F0, 16'h0F0F, 16'h7FFF, 16'h0100};

    // Worked example: 1111000011110000 x 0000111100001111.
    apply(16'd61680, 16'd3855);
    checks++;
    if (p_cla !== 32'd237776400) begin
      failures++;
      $display("FAIL worked example gave %0d", p_cla);
    end

    foreach (corners[i])
      foreach (corners[j])
        apply(corners[i], corners[j]);
    for (int k = 0; k < 16; k++)
      for (int m = 0; m < 16; m++)
        apply(16'(1) << k, 16'(1) << m);
    for (int i = 0; i < 200000; i++)
      apply(16'($urandom), 16'($urandom));

    $display("middle carries: c1 only %0d, c2 only %0d, neither %0d, both %0d",
             n_c1, n_c2, n_none, n_both);
    check_true(n_c1 > 0,   "c1 set at least once");
    check_true(n_c2 > 0,   "c2 set at least once");
    check_true(n_none > 0, "a pair with neither middle carry");
    check_true(n_both == 0, "c1 and c2 never set together");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
