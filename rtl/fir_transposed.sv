// Transposed-form (transformed) FIR filter.
//
// The input sample is broadcast to every multiplier; partial sums move
// through a chain of N registers towards the output:
//     s[N-1] <= H[N-1]*x,   s[k] <= s[k+1] + H[k]*x,   y = s[0]
// Every register-to-register path is one multiplier plus at most one
// adder, so the critical path no longer grows with N. The result equals the
// direct form, y[n] = sum_k H[k] * x[n-1-k], with the output taken straight
// from a register (one clock from x to its first contribution on y).
//
// Defaults: 6 taps h0,h1,h2,h2,h1,h0 = 2,4,3,3,4,2, 8-bit wrapping
// arithmetic, one multiplier per tap (six, rather than sharing the three
// distinct products), as the reference schematic and resource count show.
// The asynchronous reset is a choice of this design.
module fir_transposed #(
  parameter int N    = 6,
  parameter int W    = 8,
  parameter int FRAC = 0,
  parameter logic signed [W-1:0] H [N] = '{8'sd2, 8'sd4, 8'sd3, 8'sd3, 8'sd4, 8'sd2}
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  logic signed [W-1:0] prod [N];
  logic signed [W-1:0] s    [N];

  for (genvar k = 0; k < N; k++) begin : g_tap
    fxp_mul #(.W(W), .FRAC(FRAC)) u_mul (.a(x), .b(H[k]), .p(prod[k]));
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int k = 0; k < N; k++) s[k] <= '0;
    end else begin
      s[N-1] <= prod[N-1];
      for (int k = 0; k < N - 1; k++) s[k] <= s[k+1] + prod[k];
    end
  end

  assign y = s[0];
endmodule
