// Fixed-point multiplier used by every filter tap.
//
// p = (a * b) >>> FRAC, kept to W bits (two's complement, wrapping). The full
// 2W-bit signed product is formed, shifted right arithmetically by FRAC and
// its low W bits are returned. With FRAC = 0 this is the plain W-bit
// wrap-around product the 8-bit filters use (a W x W multiplier whose low W
// output bits feed a W-bit adder). Purely combinational, no latency. The
// upper product bits are discarded on purpose (wrap-around arithmetic), so
// an unused-bits lint warning on "shifted" is expected.
module fxp_mul #(
  parameter int W    = 8,
  parameter int FRAC = 0
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] p
);
  logic signed [2*W-1:0] full;
  logic signed [2*W-1:0] shifted;

  always_comb begin
    full    = a * b;
    shifted = full >>> FRAC;
    p       = shifted[W-1:0];
  end
endmodule
