// cs_subtractor: W-bit subtractor d = x - y for unsigned operands.
//
// It is the carry-save adder with y inverted and a carry-in of one
// (two's complement: x - y = x + ~y + 1). The carry out of that addition is
// one exactly when x >= y, so neg = ~carry flags a negative difference; the
// exact signed result is the (W+1)-bit value {neg, d}. Using the carry-save
// adder for the subtraction follows the method; the neg flag is this
// design's choice.
//
// Interface: x, y (W bits, unsigned), d (W bits, x - y modulo 2^W),
// neg (1 bit, x < y). Timing: combinational.
module cs_subtractor #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] d,
  output logic         neg
);
  logic co;

  cs_adder #(.W(W)) u_add (.x(x), .y(~y), .ci(1'b1), .s(d), .co(co));

  assign neg = ~co;
endmodule
