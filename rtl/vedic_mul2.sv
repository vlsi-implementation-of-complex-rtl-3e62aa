// vedic_mul2: 2x2-bit unsigned multiplier after the Urdhva Tiryakbhyam
// ("vertically and crosswise") rule, built at gate level.
//
// With a = {a1,a0} and b = {b1,b0}:
//   s0      = a0 b0                      (vertical, LSBs)
//   {c1,s1} = a1 b0 + a0 b1              (crosswise, half adder 1)
//   {c2,s2} = a1 b1 + c1                 (vertical, MSBs, half adder 2)
// so the product is p = {c2,s2,s1,s0}. Four AND gates and two half adders,
// exactly as the gate-level drawing of the method shows; nothing here is an
// own choice except the port names.
//
// Interface: a, b (2 bits each, unsigned), p (4 bits). Timing: combinational.
module vedic_mul2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic pp00, pp10, pp01, pp11;  // AND-gate partial products
  logic c1;

  assign pp00 = a[0] & b[0];
  assign pp10 = a[1] & b[0];
  assign pp01 = a[0] & b[1];
  assign pp11 = a[1] & b[1];

  assign p[0] = pp00;

  half_adder u_ha_cross (.x(pp10), .y(pp01), .s(p[1]), .c(c1));
  half_adder u_ha_msb   (.x(pp11), .y(c1),   .s(p[2]), .c(p[3]));
endmodule
