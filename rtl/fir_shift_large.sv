// 100-tap FIR filter with a shift-register input.
//
// The same direct-form structure as fir_shift (an N-deep input delay line
// and a combinational multiply/adder chain, y[n] = sum_i H[i] * x[n-1-i],
// one output per clock) scaled to N = 100 taps of 18 bits, signed fixed point
// with FRAC fractional bits.
//
// The tap count follows the reference design. The 18-bit width is inferred
// from its pin count; the fixed-point format and the triangular low-pass
// coefficients (filt_pkg::tri_coef, unity DC gain) are choices of this design.
module fir_shift_large #(
  parameter int N    = 100,
  parameter int W    = 18,
  parameter int FRAC = 14
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  typedef logic signed [W-1:0] coef_t [N];

  function automatic coef_t make_coefs();
    coef_t c;
    for (int k = 0; k < N; k++) c[k] = W'(filt_pkg::tri_coef(k, N, FRAC));
    return c;
  endfunction

  localparam coef_t H = make_coefs();

  fir_shift #(.N(N), .W(W), .FRAC(FRAC), .H(H)) u_fir (.clk(clk), .rst(rst), .x(x), .y(y));
endmodule
