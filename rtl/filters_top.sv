// Filter collection top level.
//
// Seven independent filters stand side by side, sharing only the clock and
// the reset; each has its own input and output ports:
//   par_*   fir_par          6 parallel 8-bit inputs, combinational
//   parl_*  fir_par_large    100 parallel 18-bit inputs, combinational
//   sh_*    fir_shift        6-tap direct form, 8-bit
//   shl_*   fir_shift_large  100-tap direct form, 18-bit
//   sym_*   fir_sym          6-tap symmetric (factored), 8-bit
//   syml_*  fir_sym_large    100-tap symmetric, 18-bit
//   tr_*    fir_transposed   6-tap transposed symmetric, 8-bit
//   iir_*   iir3             third-order IIR, 18-bit
// Every clocked filter accepts one sample and produces one output per
// clock; see each module for its latency. The reset is asynchronous and
// active high.
module filters_top (
  input  logic               clk,
  input  logic               rst,
  input  logic signed [7:0]  par_x  [6],
  output logic signed [7:0]  par_y,
  input  logic signed [17:0] parl_x [100],
  output logic signed [17:0] parl_y,
  input  logic signed [7:0]  sh_x,
  output logic signed [7:0]  sh_y,
  input  logic signed [17:0] shl_x,
  output logic signed [17:0] shl_y,
  input  logic signed [7:0]  sym_x,
  output logic signed [7:0]  sym_y,
  input  logic signed [17:0] syml_x,
  output logic signed [17:0] syml_y,
  input  logic signed [7:0]  tr_x,
  output logic signed [7:0]  tr_y,
  input  logic signed [17:0] iir_x,
  output logic signed [17:0] iir_y
);
  fir_par         u_par  (.x(par_x), .y(par_y));
  fir_par_large   u_parl (.x(parl_x), .y(parl_y));
  fir_shift       u_sh   (.clk(clk), .rst(rst), .x(sh_x),   .y(sh_y));
  fir_shift_large u_shl  (.clk(clk), .rst(rst), .x(shl_x),  .y(shl_y));
  fir_sym         u_sym  (.clk(clk), .rst(rst), .x(sym_x),  .y(sym_y));
  fir_sym_large   u_syml (.clk(clk), .rst(rst), .x(syml_x), .y(syml_y));
  fir_transposed  u_tr   (.clk(clk), .rst(rst), .x(tr_x),   .y(tr_y));
  iir3            u_iir  (.clk(clk), .rst(rst), .x(iir_x),  .y(iir_y));
endmodule
