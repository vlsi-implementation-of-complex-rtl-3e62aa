// csa_3to2: one row of carry-save adding (a 3:2 compressor) over W bits.
//
// Each bit position is a full adder with no carry chain between positions:
// sum[k] = x[k] ^ y[k] ^ z[k] and carry[k] = majority(x[k], y[k], z[k]).
// x + y + z equals sum + (carry << 1), so three operands are reduced to two
// without any carry propagation; a single carry-propagate adder after the row
// finishes the addition.
//
// Interface: x, y, z (W bits each), sum and carry (W bits each; carry[k] has
// weight 2^(k+1)). Timing: combinational, one full-adder delay.
module csa_3to2 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  assign sum   = x ^ y ^ z;
  assign carry = (x & y) | (x & z) | (y & z);
endmodule
