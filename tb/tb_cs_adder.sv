// tb_cs_adder: self-check of the carry-save adder at its default width (32).
// Random and corner operands with both carry-in values; {co, s} is compared
// with the 33-bit sum x + y + ci. Carry-out cases are counted and must occur.
module tb_cs_adder;
  logic [31:0] x, y, s;
  logic        ci, co;
  int checks = 0, failures = 0, carries = 0;

  cs_adder dut (.x(x), .y(y), .ci(ci), .s(s), .co(co));

  task automatic check(input logic [31:0] xv, input logic [31:0] yv, input logic cv);
    logic [32:0] exp;
    x = xv; y = yv; ci = cv;
    #1;
    exp = 33'(xv) + 33'(yv) + 33'(cv);
    checks++;
    if ({co, s} !== exp) begin
      failures++;
      $display("FAIL %h + %h + %0d: got %h exp %h", xv, yv, cv, {co, s}, exp);
    end
    if (exp[32]) carries++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'hFFFF_FFFF, 32'h0000_0000, 1'b1);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check(32'h0000_0000, 32'h0000_0000, 1'b0);
    check(32'h5555_5555, 32'hAAAA_AAAA, 1'b0);
    check(32'h8000_0000, 32'h8000_0000, 1'b0);
    for (int k = 0; k < 20000; k++)
      check($urandom, $urandom, 1'($urandom));
    checks++;
    if (carries == 0) begin
      failures++;
      $display("FAIL no carry-out case was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
