// tb_vedic_2x2: exhaustive self-checking test of the 2x2 Vedic multiplier.
//
// Applies every pair of 2-bit operands and compares the 4-bit product
// with a * b computed by the testbench's own multiplication.
module tb_vedic_2x2;

  logic [1:0]  a, b;
  logic [3:0] p;
  int checks = 0;
  int failures = 0;

  vedic_2x2 dut (.a, .b, .p);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      logic [3:0] expected;
      {a, b} = 4'(i);
      expected = 4'(a) * 4'(b);
      #1;
      checks++;
      if (p !== expected) begin
        failures++;
        if (failures < 10)
          $display("FAIL %0d * %0d = %0d, expected %0d", a, b, p, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
