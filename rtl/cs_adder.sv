// cs_adder: W-bit adder with carry-in, built as one carry-save row followed
// by a carry-propagate adder.
//
// The three inputs x, y and the carry-in ci (placed at bit 0) are compressed
// by a 3:2 carry-save row into a sum and a carry vector, which the final
// adder combines into the W-bit result s and the carry out co. In the complex
// multiplier it forms the imaginary part AD + BC (ci = 0) and, with y
// inverted and ci = 1, the subtractor of the real part. Adding with a
// carry-save row follows the method; the carry-in and carry-out ports are
// this design's choice.
//
// Interface: x, y (W bits), ci (1 bit), s (W bits), co (1 bit);
// {co, s} = x + y + ci exactly. Timing: combinational.
module cs_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W-1:0] cs_sum, cs_carry;

  csa_3to2 #(.W(W)) u_csa (
    .x(x), .y(y), .z({{(W-1){1'b0}}, ci}), .sum(cs_sum), .carry(cs_carry)
  );

  assign {co, s} = {1'b0, cs_sum} + {cs_carry, 1'b0};
endmodule
