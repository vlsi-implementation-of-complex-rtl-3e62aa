// half_adder: one-bit half adder, s = x XOR y, c = x AND y.
// Purely combinational. It is the adding cell of the 2x2 Vedic multiplier,
// which uses two of them next to its four AND gates.
module half_adder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic c
);
  assign s = x ^ y;
  assign c = x & y;
endmodule
