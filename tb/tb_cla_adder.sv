// tb_cla_adder: self-checking test of the carry look-ahead adder.
//
// The 16-bit adder (default width) gets directed carry patterns (a carry
// generated in bit 0 and propagated through every group, propagate chains
// broken in each group, all ones, all zeros) and random operands with both
// carry-in values. An 8-bit instance is tested exhaustively. Results are
// compared with x + y + cin computed one bit wider.
module tb_cla_adder;

  logic [15:0] x, y, s;
  logic        ci, co;
  logic [7:0]  x8, y8, s8;
  logic        ci8, co8;
  int          checks = 0;
  int          failures = 0;

  cla_adder dut (.x, .y, .cin(ci), .s, .cout(co));
  cla_adder #(.WIDTH(8)) dut8 (.x(x8), .y(y8), .cin(ci8), .s(s8), .cout(co8));

  task automatic check16(input logic [15:0] xa, input logic [15:0] ya, input logic cia);
    logic [16:0] expected;
    x = xa; y = ya; ci = cia;
    expected = 17'(xa) + 17'(ya) + 17'(cia);
    #1;
    checks++;
    if ({co, s} !== expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL 16-bit %h + %h + %0d = %h, expected %h", xa, ya, cia, {co, s}, expected);
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
    // Directed carry patterns.
    check16(16'hFFFF, 16'h0001, 1'b0);
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h0000, 16'h0000, 1'b0);
    check16(16'h8000, 16'h8000, 1'b0);
    for (int k = 0; k < 16; k++) begin
      check16(16'hFFFF >> k, 16'h0001, 1'b0);
      check16(16'(1) << k, 16'(1) << k, 1'b1);
      check16(~(16'(1) << k), 16'h0001, 1'b0);
      check16(~(16'(1) << k), 16'h0000, 1'b1);
    end
    // Random operands.
    for (int i = 0; i < 100000; i++)
      check16(16'($urandom), 16'($urandom), 1'($urandom));
    // Exhaustive 8-bit instance.
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
