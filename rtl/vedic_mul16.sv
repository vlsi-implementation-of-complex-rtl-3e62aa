// vedic_mul16: 16x16-bit unsigned Vedic (Urdhva Tiryakbhyam) multiplier.
//
// It is built from four 8x8 Vedic multipliers, as the method builds each
// larger block from four copies of the next smaller one. With a = {ah,al}
// and b = {bh,bl} split into 8-bit halves they form the vertical products
// al*bl and ah*bh and the crosswise products ah*bl and al*bh, all at once;
// vedic_combine then adds them with a carry-save row and one final adder
// (the summing structure is this design's choice).
//
// Interface: a, b (16 bits, unsigned), p (32 bits).
// Timing: combinational.
module vedic_mul16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);
  logic [15:0] q0, q1, q2, q3;

  vedic_mul8 u_ll (.a(a[7:0]), .b(b[7:0]), .p(q0));  // vertical, low halves
  vedic_mul8 u_hl (.a(a[15:8]), .b(b[7:0]), .p(q1));  // crosswise
  vedic_mul8 u_lh (.a(a[7:0]), .b(b[15:8]), .p(q2));  // crosswise
  vedic_mul8 u_hh (.a(a[15:8]), .b(b[15:8]), .p(q3));  // vertical, high halves

  vedic_combine #(.N(16)) u_sum (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
endmodule
