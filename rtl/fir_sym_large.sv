// 100-tap symmetric FIR filter with a shift-register input.
//
// The same factored structure as fir_sym, scaled to N = 100 taps of 18 bits:
// 50 pre-adders add mirrored delay-line taps r[i] + r[N-1-i], 50 multipliers
// weight them and an adder chain sums the products. One output per clock,
// y[n] = sum_i h[i] * x[n-1-i] with h mirrored.
//
// The tap count and the halving of the multipliers follow the reference
// design. The 18-bit width is inferred from its pin count; the fixed-point
// format and the triangular low-pass coefficients (filt_pkg::tri_coef, the
// first N/2 taps of the window) are choices of this design.
module fir_sym_large #(
  parameter int N    = 100,
  parameter int W    = 18,
  parameter int FRAC = 14
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  typedef logic signed [W-1:0] coef_t [N/2];

  function automatic coef_t make_coefs();
    coef_t c;
    for (int k = 0; k < N / 2; k++) c[k] = W'(filt_pkg::tri_coef(k, N, FRAC));
    return c;
  endfunction

  localparam coef_t H = make_coefs();

  fir_sym #(.N(N), .W(W), .FRAC(FRAC), .H(H)) u_fir (.clk(clk), .rst(rst), .x(x), .y(y));
endmodule
