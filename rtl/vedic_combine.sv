// vedic_combine: summing stage of one level of the Vedic multiplier tree.
//
// An NxN Vedic multiplier splits a = {ah,al} and b = {bh,bl} into halves of
// H = N/2 bits and forms four half-size products: q0 = al*bl and q3 = ah*bh
// (vertical) and q1 = ah*bl, q2 = al*bh (crosswise). This module adds them
// up: p = q0 + ((q1 + q2) << H) + (q3 << N).
// q0 and q3<<N do not overlap, so {q3,q0} is a single operand. With the two
// crosswise products shifted by H there are three operands; one 3:2
// carry-save row reduces them to two and one carry-propagate adder sums
// those. Summing with a carry-save row is this design's choice; the method
// only says that larger blocks are built from four smaller ones.
//
// The exact product fits in 2N bits, so the carry out of the top bit position
// of the carry-save row is always zero; it is left unused on purpose.
//
// Interface: q0..q3 (N bits each), p (2N bits). N even. Timing: combinational.
module vedic_combine #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   q0,
  input  logic [N-1:0]   q1,
  input  logic [N-1:0]   q2,
  input  logic [N-1:0]   q3,
  output logic [2*N-1:0] p
);
  localparam int unsigned H = N / 2;

  logic [2*N-1:0] opa, opb, opc;
  logic [2*N-1:0] cs_sum, cs_carry;

  assign opa = {q3, q0};
  assign opb = {{H{1'b0}}, q1, {H{1'b0}}};
  assign opc = {{H{1'b0}}, q2, {H{1'b0}}};

  csa_3to2 #(.W(2*N)) u_csa (
    .x(opa), .y(opb), .z(opc), .sum(cs_sum), .carry(cs_carry)
  );

  assign p = cs_sum + {cs_carry[2*N-2:0], 1'b0};
endmodule
