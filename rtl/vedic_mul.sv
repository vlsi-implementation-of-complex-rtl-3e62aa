// vedic_mul: NxN-bit unsigned Vedic multiplier for N = 2, 4, 8 or 16.
//
// It selects the fixed-size Vedic block of the requested width
// (vedic_mul2, vedic_mul4, vedic_mul8 or vedic_mul16), so the complex
// multiplier can be built at smaller operand widths without code changes.
// The default, N = 16, is the main size of the design.
//
// Interface: a, b (N bits, unsigned), p (2N bits). Timing: combinational.
module vedic_mul #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  if (N == 2) begin : g_2
    vedic_mul2 u_mul (.a(a), .b(b), .p(p));
  end else if (N == 4) begin : g_4
    vedic_mul4 u_mul (.a(a), .b(b), .p(p));
  end else if (N == 8) begin : g_8
    vedic_mul8 u_mul (.a(a), .b(b), .p(p));
  end else if (N == 16) begin : g_16
    vedic_mul16 u_mul (.a(a), .b(b), .p(p));
  end else begin : g_bad_n
    $error("vedic_mul: N must be 2, 4, 8 or 16");
  end
endmodule
