// tb_vedic_mul16: self-check of the 16x16 Vedic multiplier.
// Corner operands, walking-one operands and 50,000 random operand pairs;
// each product is compared with the integer product computed here.
module tb_vedic_mul16;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;

  vedic_mul16 dut (.a(a), .b(b), .p(p));

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] exp;
    a = x;
    b = y;
    #1;
    exp = 32'(x) * 32'(y);
    checks++;
    if (p !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d: got %0d exp %0d", x, y, p, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'hFFFF, 16'hFFFF);
    check(16'hFFFF, 16'h0001);
    check(16'h8000, 16'h8000);
    check(16'h0000, 16'hFFFF);
    check(16'hAAAA, 16'h5555);
    check(16'd21908, 16'd23093);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        check(16'(1) << i, 16'hFFFF >> j);
    for (int k = 0; k < 50000; k++)
      check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
