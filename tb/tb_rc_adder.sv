// tb_rc_adder: self-checking test of the ripple-carry adder.
//
// The 8-bit adder (default width) is driven with every pair of operands and
// both carry-in values; a 4-bit instance, the width the 4x4 multiplier uses,
// is tested the same way. Each result is compared with x + y + cin
// computed one bit wider in the testbench.
module tb_rc_adder;

  logic [7:0] x8, y8, s8;
  logic       ci8, co8;
  logic [3:0] x4, y4, s4;
  logic       ci4, co4;
  int         checks = 0;
  int         failures = 0;

  rc_adder dut8 (.x(x8), .y(y8), .cin(ci8), .s(s8), .cout(co8));
  rc_adder #(.WIDTH(4)) dut4 (.x(x4), .y(y4), .cin(ci4), .s(s4), .cout(co4));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 17); i++) begin
      logic [8:0] expected;
      {ci8, x8, y8} = 17'(i);
      expected = 9'(x8) + 9'(y8) + 9'(ci8);
      #1;
      checks++;
      if ({co8, s8} !== expected) begin
        failures++;
        if (failures < 10)
          $display("FAIL 8-bit %0d + %0d + %0d = %0d", x8, y8, ci8, {co8, s8});
      end
    end
    for (int i = 0; i < (1 << 9); i++) begin
      logic [4:0] expected;
      {ci4, x4, y4} = 9'(i);
      expected = 5'(x4) + 5'(y4) + 5'(ci4);
      #1;
      checks++;
      if ({co4, s4} !== expected) begin
        failures++;
        if (failures < 10)
          $display("FAIL 4-bit %0d + %0d + %0d = %0d", x4, y4, ci4, {co4, s4});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
