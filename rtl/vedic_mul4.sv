// vedic_mul4: 4x4-bit unsigned Vedic (Urdhva Tiryakbhyam) multiplier.
//
// It is built from four 2x2 Vedic multipliers, as the method builds each
// larger block from four copies of the next smaller one. With a = {ah,al}
// and b = {bh,bl} split into 2-bit halves they form the vertical products
// al*bl and ah*bh and the crosswise products ah*bl and al*bh, all at once;
// vedic_combine then adds them with a carry-save row and one final adder
// (the summing structure is this design's choice).
//
// Interface: a, b (4 bits, unsigned), p (8 bits).
// Timing: combinational.
module vedic_mul4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;

  vedic_mul2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(q0));  // vertical, low halves
  vedic_mul2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(q1));  // crosswise
  vedic_mul2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(q2));  // crosswise
  vedic_mul2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(q3));  // vertical, high halves

  vedic_combine #(.N(4)) u_sum (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
endmodule
