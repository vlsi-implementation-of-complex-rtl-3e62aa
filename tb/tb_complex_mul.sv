// tb_complex_mul: end-to-end self-check of the 16-bit complex multiplier at
// its default parameters.
//
// It applies the three reference operand sets of the design's published
// simulation, with their expected real and imaginary parts written out as
// numbers, then corner cases and random operands whose expected results are
// computed here in 64-bit integer arithmetic. It counts the cases that make
// each mechanism act (negative real part through the subtractor, a carry out
// of the imaginary adder, a real part that is neither) and fails if any of
// them never happened.
module tb_complex_mul;
  logic [15:0] a, b, c, d;
  logic [31:0] re, im;
  logic        re_neg, im_carry;
  int checks = 0, failures = 0;
  int n_neg = 0, n_pos = 0, n_carry = 0;

  complex_mul dut (
    .a(a), .b(b), .c(c), .d(d),
    .re(re), .re_neg(re_neg), .im(im), .im_carry(im_carry)
  );

  task automatic check(input logic [15:0] av, input logic [15:0] bv,
                       input logic [15:0] cv, input logic [15:0] dv);
    longint er, ei;
    a = av; b = bv; c = cv; d = dv;
    #1;
    er = longint'(av) * longint'(cv) - longint'(bv) * longint'(dv);
    ei = longint'(av) * longint'(dv) + longint'(bv) * longint'(cv);
    checks++;
    if (re !== er[31:0] || re_neg !== er[32] || im !== ei[31:0] || im_carry !== ei[32]) begin
      failures++;
      $display("FAIL (%0d+j%0d)(%0d+j%0d): got re=%0d/%0d im=%0d/%0d exp re=%0d im=%0d",
               av, bv, cv, dv, re_neg, $signed(re), im_carry, im, er, ei);
    end
    if (er < 0) n_neg++; else n_pos++;
    if (ei[32]) n_carry++;
  endtask

  // Published reference vectors with their printed results.
  task automatic check_ref(input logic [15:0] av, input logic [15:0] bv,
                           input logic [15:0] cv, input logic [15:0] dv,
                           input int rexp, input int unsigned iexp);
    check(av, bv, cv, dv);
    checks++;
    if ($signed(re) != rexp || im != iexp) begin
      failures++;
      $display("FAIL reference vector: R=%0d (exp %0d) I=%0d (exp %0d)",
               $signed(re), rexp, im, iexp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_ref(16'd0,     16'd0,     16'd0,     16'd0,     0,           0);
    check_ref(16'd21908, 16'd23022, 16'd23093, 16'd23093, -25725602,   1037568490);
    check_ref(16'd32618, 16'd2773,  16'd27221, 16'd6821,  868979945,   297971211);
    check_ref(16'd27306, 16'd24330, 16'd28181, 16'd31395, 5670036,     1542915600);
    check(16'hFFFF, 16'hFFFF, 16'hFFFF, 16'hFFFF);
    check(16'h0000, 16'hFFFF, 16'h0000, 16'hFFFF);
    check(16'hFFFF, 16'h0000, 16'hFFFF, 16'h0000);
    check(16'h0001, 16'h0000, 16'h0000, 16'h0001);
    for (int k = 0; k < 20000; k++)
      check(16'($urandom), 16'($urandom), 16'($urandom), 16'($urandom));
    $display("mechanisms: negative real part %0d, non-negative real part %0d, imaginary carry-out %0d",
             n_neg, n_pos, n_carry);
    checks++;
    if (n_neg == 0 || n_pos == 0 || n_carry == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
