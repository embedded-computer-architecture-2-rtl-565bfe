// 100-input parallel FIR filter.
//
// The same combinational structure as fir_par (one multiplier per input and
// a chain of N-1 adders, critical path from x[0] through every adder), scaled
// to N = 100 inputs of 18 bits. Samples and coefficients are signed fixed
// point with FRAC fractional bits; each product is truncated back to 18 bits.
//
// The tap count follows the reference design. The 18-bit width is inferred
// from its pin count; the fixed-point format and the triangular low-pass
// coefficients (filt_pkg::tri_coef, unity DC gain) are choices of this design.
module fir_par_large #(
  parameter int N    = 100,
  parameter int W    = 18,
  parameter int FRAC = 14
) (
  input  logic signed [W-1:0] x [N],
  output logic signed [W-1:0] y
);
  typedef logic signed [W-1:0] coef_t [N];

  function automatic coef_t make_coefs();
    coef_t c;
    for (int k = 0; k < N; k++) c[k] = W'(filt_pkg::tri_coef(k, N, FRAC));
    return c;
  endfunction

  localparam coef_t H = make_coefs();

  fir_par #(.N(N), .W(W), .FRAC(FRAC), .H(H)) u_fir (.x(x), .y(y));
endmodule
