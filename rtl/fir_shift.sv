// FIR filter with a shift-register input (direct form).
//
// One sample per clock is shifted into an N-deep register line
// r[0..N-1] (r[0] holds the newest sample). The output is the combinational
// sum y = sum_i H[i] * r[i], built from one multiplier per tap and an adder
// chain, so y[n] = sum_i H[i] * x[n-1-i]: a new sample first shows on y one
// clock after it is presented, and one output is produced every clock.
//
// Defaults: 6 taps, 8 bits, coefficients 2,4,3,2,7,6, wrapping 8-bit
// arithmetic, as in the reference schematic. The asynchronous active-high
// reset that clears the delay line is a choice of this design.
module fir_shift #(
  parameter int N    = 6,
  parameter int W    = 8,
  parameter int FRAC = 0,
  parameter logic signed [W-1:0] H [N] = '{8'sd2, 8'sd4, 8'sd3, 8'sd2, 8'sd7, 8'sd6}
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  logic signed [W-1:0] r [N];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < N; i++) r[i] <= '0;
    end else begin
      r[0] <= x;
      for (int i = 1; i < N; i++) r[i] <= r[i-1];
    end
  end

  fir_par #(.N(N), .W(W), .FRAC(FRAC), .H(H)) u_sum (.x(r), .y(y));
endmodule
