// tb_csa_adder: self-checking testbench for the carry select adder.
// Checks corner operands and 200000 random operand pairs with random carry in
// against the + operator, at the default 10-bit width with 4-bit groups and at
// a second geometry (16 bits, 3-bit groups) so every group boundary and the
// partial top group are exercised.
module tb_csa_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [9:0]  a, b, s;
  logic        ci, co;
  logic [15:0] a2, b2, s2;
  logic        ci2, co2;

  csa_adder dut (.a, .b, .cin(ci), .sum(s), .cout(co));
  csa_adder #(.W(16), .BLK(3)) dut2 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));

  task automatic check10(input logic [9:0] x, input logic [9:0] y, input logic c);
    logic [10:0] exp;
    a = x; b = y; ci = c;
    #1;
    exp = {1'b0, x} + {1'b0, y} + 11'(c);
    checks++;
    if ({co, s} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL 10b: %0d+%0d+%0d = %0d, expected %0d", x, y, c, {co, s}, exp);
    end
  endtask

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic c);
    logic [16:0] exp;
    a2 = x; b2 = y; ci2 = c;
    #1;
    exp = {1'b0, x} + {1'b0, y} + 17'(c);
    checks++;
    if ({co2, s2} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL 16b: %0d+%0d+%0d = %0d, expected %0d", x, y, c, {co2, s2}, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check10(10'd0, 10'd0, 1'b0);
    check10(10'h3ff, 10'd1, 1'b0);
    check10(10'h3ff, 10'h3ff, 1'b1);
    check10(10'h00f, 10'd1, 1'b0);   // carry into group 1
    check10(10'h0ff, 10'd1, 1'b0);   // carry into group 2
    check10(10'h0f0, 10'h010, 1'b0);
    check10(10'd540, 10'd38, 1'b0);  // largest address step used
    for (int i = 0; i < 200000; i++) begin
      check10(10'($urandom), 10'($urandom), 1'($urandom));
      check16(16'($urandom), 16'($urandom), 1'($urandom));
    end
    check16(16'hffff, 16'h0001, 1'b0);
    check16(16'h0007, 16'h0001, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
