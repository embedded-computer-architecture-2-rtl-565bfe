// Parallel (fully combinational) FIR filter.
//
// All N samples arrive at once on x; each is multiplied by its own fixed
// coefficient and the products are summed by a chain of adders:
//     y = (((x[0]*H[0] + x[1]*H[1]) + x[2]*H[2]) + ...) + x[N-1]*H[N-1]
// The path from x[0] through the whole adder chain is the critical path.
// There are no registers, so y follows x in the same cycle.
//
// The default is the 6-input, 8-bit filter with coefficients 2,4,3,2,7,6
// taken from the reference schematic, where each product and each sum is
// truncated to 8 bits. The signed interpretation, the FRAC fixed-point
// option and the parameterisation are choices of this design.
module fir_par #(
  parameter int N    = 6,
  parameter int W    = 8,
  parameter int FRAC = 0,
  parameter logic signed [W-1:0] H [N] = '{8'sd2, 8'sd4, 8'sd3, 8'sd2, 8'sd7, 8'sd6}
) (
  input  logic signed [W-1:0] x [N],
  output logic signed [W-1:0] y
);
  logic signed [W-1:0] prod [N];
  logic signed [W-1:0] acc  [N];

  for (genvar i = 0; i < N; i++) begin : g_tap
    fxp_mul #(.W(W), .FRAC(FRAC)) u_mul (.a(x[i]), .b(H[i]), .p(prod[i]));
    if (i == 0) begin : g_first
      assign acc[i] = prod[i];
    end else begin : g_chain
      assign acc[i] = acc[i-1] + prod[i];
    end
  end

  assign y = acc[N-1];
endmodule
