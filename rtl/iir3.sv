// Third-order recursive (IIR) filter, direct form II.
//
// Three state registers w1..w3 hold the delayed internal signal w:
//     w = x - a1*w1 - a2*w2 - a3*w3
//     y = b0*w + b1*w1 + b2*w2 + b3*w3
// then w1 <= w, w2 <= w1, w3 <= w2. That is seven multipliers and three
// registers, one output per clock. y depends combinationally on x in the
// same cycle; the longest path runs through a feedback multiplier, the
// feedback adders, b0 and the output adders.
//
// Samples and coefficients are signed fixed point, W bits with FRAC
// fractional bits; each product is truncated to W bits and sums wrap.
// The order, the register count and the multiplier count follow the
// reference design; the direct-form-II arrangement, the 18-bit Q3.14 format
// and the coefficients (a third-order Butterworth low-pass from filt_pkg)
// are choices of this design. Reset (asynchronous, active high) clears the
// state.
module iir3 #(
  parameter int W    = 18,
  parameter int FRAC = 14,
  parameter logic signed [W-1:0] B [4] = '{
    W'(filt_pkg::to_fxp(filt_pkg::IIR_B0, FRAC)), W'(filt_pkg::to_fxp(filt_pkg::IIR_B1, FRAC)),
    W'(filt_pkg::to_fxp(filt_pkg::IIR_B2, FRAC)), W'(filt_pkg::to_fxp(filt_pkg::IIR_B3, FRAC))},
  // A[0..2] are a1..a3 (a0 = 1 is implied).
  parameter logic signed [W-1:0] A [3] = '{
    W'(filt_pkg::to_fxp(filt_pkg::IIR_A1, FRAC)), W'(filt_pkg::to_fxp(filt_pkg::IIR_A2, FRAC)),
    W'(filt_pkg::to_fxp(filt_pkg::IIR_A3, FRAC))}
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);
  logic signed [W-1:0] st [3];          // w1, w2, w3
  logic signed [W-1:0] fb [3];          // a_k * w_k
  logic signed [W-1:0] ff [4];          // b0*w, b_k * w_k
  logic signed [W-1:0] w;

  for (genvar k = 0; k < 3; k++) begin : g_fb
    fxp_mul #(.W(W), .FRAC(FRAC)) u_a (.a(st[k]), .b(A[k]),   .p(fb[k]));
    fxp_mul #(.W(W), .FRAC(FRAC)) u_b (.a(st[k]), .b(B[k+1]), .p(ff[k+1]));
  end

  assign w = x - fb[0] - fb[1] - fb[2];

  fxp_mul #(.W(W), .FRAC(FRAC)) u_b0 (.a(w), .b(B[0]), .p(ff[0]));

  assign y = ff[0] + ff[1] + ff[2] + ff[3];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int k = 0; k < 3; k++) st[k] <= '0;
    end else begin
      st[0] <= w;
      st[1] <= st[0];
      st[2] <= st[1];
    end
  end
endmodule
