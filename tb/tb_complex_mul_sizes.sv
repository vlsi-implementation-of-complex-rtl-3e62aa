// tb_complex_mul_sizes: self-check of the complex multiplier at the reduced
// operand widths N = 2, 4 and 8. N = 2 and N = 4 are checked exhaustively
// (every combination of the four operands), N = 8 with random operands. The
// expected real part AC - BD (33-bit-style exact signed value {re_neg, re})
// and imaginary part AD + BC ({im_carry, im}) are computed here with integer
// arithmetic.
module tb_complex_mul_sizes;
  logic [1:0] a2, b2, c2, d2;  logic [3:0]  re2, im2;  logic rn2, ic2;
  logic [3:0] a4, b4, c4, d4;  logic [7:0]  re4, im4;  logic rn4, ic4;
  logic [7:0] a8, b8, c8, d8;  logic [15:0] re8, im8;  logic rn8, ic8;
  int checks = 0, failures = 0;

  complex_mul #(.N(2)) dut2 (.a(a2), .b(b2), .c(c2), .d(d2),
                             .re(re2), .re_neg(rn2), .im(im2), .im_carry(ic2));
  complex_mul #(.N(4)) dut4 (.a(a4), .b(b4), .c(c4), .d(d4),
                             .re(re4), .re_neg(rn4), .im(im4), .im_carry(ic4));
  complex_mul #(.N(8)) dut8 (.a(a8), .b(b8), .c(c8), .d(d8),
                             .re(re8), .re_neg(rn8), .im(im8), .im_carry(ic8));

  // Compare an exact result with its (2N+1)-bit hardware form.
  function automatic void compare(input int n, input int er, input int ei,
                                  input logic [16:0] got_re, input logic [16:0] got_im);
    int mask;
    mask = (1 << (2 * n + 1)) - 1;
    checks++;
    if ((er & mask) != int'(got_re) || (ei & mask) != int'(got_im)) begin
      failures++;
      if (failures < 10)
        $display("FAIL N=%0d: re %h exp %h, im %h exp %h", n, got_re, er & mask, got_im, ei & mask);
    end
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0; c8 = '0; d8 = '0;
    for (int v = 0; v < 256; v++) begin
      {a2, b2, c2, d2} = 8'(v);
      a4 = '0; b4 = '0; c4 = '0; d4 = '0;
      #1;
      compare(2, a2 * c2 - b2 * d2, a2 * d2 + b2 * c2, 17'({rn2, re2}), 17'({ic2, im2}));
    end
    for (int v = 0; v < 65536; v++) begin
      {a4, b4, c4, d4} = 16'(v);
      #1;
      compare(4, a4 * c4 - b4 * d4, a4 * d4 + b4 * c4, 17'({rn4, re4}), 17'({ic4, im4}));
    end
    for (int k = 0; k < 20000; k++) begin
      {a8, b8, c8, d8} = $urandom;
      #1;
      compare(8, a8 * c8 - b8 * d8, a8 * d8 + b8 * c8, 17'({rn8, re8}), 17'({ic8, im8}));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
