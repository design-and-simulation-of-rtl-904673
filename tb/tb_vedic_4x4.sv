// tb_vedic_4x4: exhaustive self-checking test of the 4x4 Vedic multiplier.
//
// Applies every pair of 4-bit operands and compares the 8-bit product
// with a * b computed by the testbench's own multiplication.
module tb_vedic_4x4;

  logic [3:0]  a, b;
  logic [7:0] p;
  int checks = 0;
  int failures = 0;

  vedic_4x4 dut (.a, .b, .p);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      logic [7:0] expected;
      {a, b} = 8'(i);
      expected = 8'(a) * 8'(b);
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
