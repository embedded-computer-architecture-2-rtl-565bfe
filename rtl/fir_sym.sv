// Symmetric FIR filter with a shift-register input.
//
// For a filter whose taps mirror (h[i] = h[N-1-i]) the sum is factored as
//     y = sum_{i<N/2} H[i] * (r[i] + r[N-1-i])
// so N/2 pre-adders feed N/2 multipliers, halving the multiplier count.
// r[0..N-1] is the input delay line (r[0] newest); the output is
// combinational from the registers, y[n] = sum over taps of x[n-1-i], one
// output per clock.
//
// Defaults: N = 6, 8 bits, H = 2,4,3 (h0 on the outer pair, h2 on the
// inner pair), wrapping 8-bit arithmetic, as in the reference schematic:
// pre-adds, then multiplies, then a sum of the products. The reference adds
// h0's product last, to the sum of the other two; here the products are
// summed in index order, which gives the same result in wrap-around
// arithmetic. N must be even. The asynchronous reset is a choice of this
// design.
module fir_sym #(
  parameter int N    = 6,
  parameter int W    = 8,
  parameter int FRAC = 0,
  parameter logic signed [W-1:0] H [N/2] = '{8'sd2, 8'sd4, 8'sd3}
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  localparam int M = N / 2;

  logic signed [W-1:0] r    [N];
  logic signed [W-1:0] pair [M];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < N; i++) r[i] <= '0;
    end else begin
      r[0] <= x;
      for (int i = 1; i < N; i++) r[i] <= r[i-1];
    end
  end

  for (genvar i = 0; i < M; i++) begin : g_pre
    assign pair[i] = r[i] + r[N-1-i];
  end

  fir_par #(.N(M), .W(W), .FRAC(FRAC), .H(H)) u_sum (.x(pair), .y(y));

  initial assert (N % 2 == 0) else $error("fir_sym: N must be even");
endmodule
