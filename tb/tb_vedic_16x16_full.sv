// tb_vedic_16x16_full: the 16x16 Vedic multiplier exactly as built by
// default (carry look-ahead adders, no parameter overrides), taken through
// its worked example and a sweep of operands.
//
// The worked example multiplies 61680 (1111000011110000) by 3855
// (0000111100001111) and expects 237776400. The sweep multiplies every
// operand of the form k * 257 (both bytes equal, k = 0..255) by every
// other such operand, then 100000 random pairs. Every product is compared
// with a * b computed by the testbench.
module tb_vedic_16x16_full;

  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0;
  int failures = 0;

  vedic_16x16 dut (.a, .b, .p);

  task automatic apply(input logic [15:0] av, input logic [15:0] bv);
    logic [31:0] expected;
    a = av;
    b = bv;
    expected = 32'(av) * 32'(bv);
    #1;
    checks++;
    if (p !== expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL %0d * %0d = %0d, expected %0d", av, bv, p, expected);
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
    apply(16'd61680, 16'd3855);
    checks++;
    if (p !== 32'd237776400) begin
      failures++;
      $display("FAIL worked example gave %0d", p);
    end
    $display("worked example: %0d x %0d = %0d", a, b, p);

    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        apply(16'(i * 257), 16'(j * 257));
    for (int i = 0; i < 100000; i++)
      apply(16'($urandom), 16'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
