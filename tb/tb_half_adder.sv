// tb_half_adder: exhaustive self-checking test of the half adder.
//
// Applies all four input pairs and compares the sum and carry with the
// two-bit sum x + y worked out in the testbench.
module tb_half_adder;

  logic x, y, s, c;
  int   checks = 0;
  int   failures = 0;

  half_adder dut (.x, .y, .s, .c);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      logic [1:0] expected;
      {x, y} = 2'(i);
      expected = 2'(x) + 2'(y);
      #1;
      checks++;
      if ({c, s} !== expected) begin
        failures++;
        $display("FAIL x=%0b y=%0b got c=%0b s=%0b", x, y, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
