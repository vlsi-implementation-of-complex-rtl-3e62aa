// complex_mul: complex multiplier (A + jB)(C + jD) = (AC - BD) + j(AD + BC)
// built from four Vedic real multipliers, one subtractor and one adder.
//
// The four NxN Vedic multipliers form AC, BD, AD and BC side by side. The
// carry-save subtractor gives the real part AC - BD and the carry-save adder
// the imaginary part AD + BC. This is the structure of the method; N = 16 is
// its main size.
//
// Operands are unsigned N-bit numbers, as the Vedic multipliers are unsigned.
// The real and imaginary parts come out on 2N bits (re is two's complement,
// so it reads correctly as a signed number while |AC - BD| < 2^(2N-1)). Two
// extra flag bits, re_neg and im_carry, are this design's addition: they are
// bit 2N of the exact results, so {re_neg, re} is the exact signed real part
// and {im_carry, im} the exact unsigned imaginary part for every input.
//
// Interface: a, b, c, d (N bits each); re, im (2N bits each); re_neg,
// im_carry (1 bit each). Timing: purely combinational, no clock or reset.
module complex_mul #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,         // real part of the first operand (A)
  input  logic [N-1:0]   b,         // imaginary part of the first operand (B)
  input  logic [N-1:0]   c,         // real part of the second operand (C)
  input  logic [N-1:0]   d,         // imaginary part of the second operand (D)
  output logic [2*N-1:0] re,        // AC - BD, modulo 2^(2N)
  output logic           re_neg,    // AC < BD
  output logic [2*N-1:0] im,        // AD + BC, modulo 2^(2N)
  output logic           im_carry   // carry out of AD + BC
);
  logic [2*N-1:0] ac, bd, ad, bc;

  vedic_mul #(.N(N)) u_mul_ac (.a(a), .b(c), .p(ac));
  vedic_mul #(.N(N)) u_mul_bd (.a(b), .b(d), .p(bd));
  vedic_mul #(.N(N)) u_mul_ad (.a(a), .b(d), .p(ad));
  vedic_mul #(.N(N)) u_mul_bc (.a(b), .b(c), .p(bc));

  cs_subtractor #(.W(2*N)) u_sub_re (.x(ac), .y(bd), .d(re), .neg(re_neg));
  cs_adder      #(.W(2*N)) u_add_im (.x(ad), .y(bc), .ci(1'b0), .s(im), .co(im_carry));
endmodule
