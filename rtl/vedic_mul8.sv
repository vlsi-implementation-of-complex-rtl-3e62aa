// vedic_mul8: 8x8-bit unsigned Vedic (Urdhva Tiryakbhyam) multiplier.
//
// It is built from four 4x4 Vedic multipliers, as the method builds each
// larger block from four copies of the next smaller one. With a = {ah,al}
// and b = {bh,bl} split into 4-bit halves they form the vertical products
// al*bl and ah*bh and the crosswise products ah*bl and al*bh, all at once;
// vedic_combine then adds them with a carry-save row and one final adder
// (the summing structure is this design's choice).
//
// Interface: a, b (8 bits, unsigned), p (16 bits).
// Timing: combinational.
module vedic_mul8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [15:0] p
);
  logic [7:0] q0, q1, q2, q3;

  vedic_mul4 u_ll (.a(a[3:0]), .b(b[3:0]), .p(q0));  // vertical, low halves
  vedic_mul4 u_hl (.a(a[7:4]), .b(b[3:0]), .p(q1));  // crosswise
  vedic_mul4 u_lh (.a(a[3:0]), .b(b[7:4]), .p(q2));  // crosswise
  vedic_mul4 u_hh (.a(a[7:4]), .b(b[7:4]), .p(q3));  // vertical, high halves

  vedic_combine #(.N(8)) u_sum (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
endmodule
