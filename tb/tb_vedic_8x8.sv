// tb_vedic_8x8: exhaustive self-checking test of the 8x8 Vedic multiplier.
//
// Applies every pair of 8-bit operands and compares the 16-bit product
// with a * b computed by the testbench's own multiplication.
module tb_vedic_8x8;

  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0;
  int failures = 0;

  vedic_8x8 dut (.a, .b, .p);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      logic [15:0] expected;
      {a, b} = 16'(i);
      expected = 16'(a) * 16'(b);
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
