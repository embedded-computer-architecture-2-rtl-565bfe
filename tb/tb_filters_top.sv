// End-to-end testbench for filters_top at its default (full) sizes.
//
// One random sample stream per word width drives every filter at once, and
// the filters are cross-checked against each other and against a reference:
//  - the parallel filters get the delay-line contents of the shift filters
//    as their inputs, so fir_par must equal fir_shift and fir_par_large
//    must equal fir_shift_large bit for bit, every cycle;
//  - fir_sym (factored) and fir_transposed (retimed) compute the same
//    symmetric filter and must agree every cycle, and both must match a
//    reference sum computed here;
//  - fir_sym_large must stay within a few LSBs of fir_shift_large fed the
//    same stream (only the truncation order differs);
//  - iir3 must keep ringing after its input returns to zero (feedback).
// Mechanisms counted, each of which must occur: one-clock delay of the shift
// register, symmetric pre-add agreement, transposed agreement, 8-bit
// wrap-around, IIR feedback tail, and reset. A watchdog ends a hung run.
module tb_filters_top;
  logic clk = 1'b0;
  logic rst;
  logic signed [7:0]  par_x [6];
  logic signed [7:0]  par_y;
  logic signed [17:0] parl_x [100];
  logic signed [17:0] parl_y;
  logic signed [7:0]  sh_x, sh_y, sym_x, sym_y, tr_x, tr_y;
  logic signed [17:0] shl_x, shl_y, syml_x, syml_y, iir_x, iir_y;

  int checks = 0, failures = 0;
  int n_shift = 0, n_sym = 0, n_tr = 0, n_wrap = 0, n_tail = 0, n_reset = 0;

  logic signed [7:0]  h8  [6];   // 8-bit history, [0] newest
  logic signed [17:0] h18 [100]; // 18-bit history

  localparam int HS [6] = '{2, 4, 3, 3, 4, 2};

  filters_top dut (.*);

  always #5 clk = ~clk;

  // parallel filters see the delay lines
  always_comb begin
    for (int i = 0; i < 6; i++) par_x[i] = h8[i];
    for (int i = 0; i < 100; i++) parl_x[i] = h18[i];
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic step(input logic signed [7:0] v8, input logic signed [17:0] v18, input logic signed [17:0] vi);
    sh_x = v8; sym_x = v8; tr_x = v8; shl_x = v18; syml_x = v18; iir_x = vi;
    @(posedge clk);
    for (int i = 5; i > 0; i--) h8[i] = h8[i-1];
    h8[0] = v8;
    for (int i = 99; i > 0; i--) h18[i] = h18[i-1];
    h18[0] = v18;
    @(negedge clk);
  endtask

  task automatic compare();
    int s;
    s = 0;
    for (int i = 0; i < 6; i++) s += int'(h8[i]) * HS[i];
    chk(par_y == sh_y, "fir_par vs fir_shift");
    chk(parl_y == shl_y, "fir_par_large vs fir_shift_large");
    chk(sym_y == 8'(s), "fir_sym vs reference");
    chk(tr_y == sym_y, "fir_transposed vs fir_sym");
    if (sym_y == 8'(s)) n_sym++;
    if (tr_y == sym_y) n_tr++;
    if (s != int'(sym_y)) n_wrap++;
    chk(((int'(syml_y) - int'(shl_y)) <= 60) && ((int'(shl_y) - int'(syml_y)) <= 60),
        $sformatf("fir_sym_large %0d near fir_shift_large %0d", syml_y, shl_y));
  endtask

  task automatic do_reset();
    rst = 1'b1;
    iir_x = '0;   // the IIR output also follows its input combinationally
    @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 6; i++) h8[i] = '0;
    for (int i = 0; i < 100; i++) h18[i] = '0;
    chk(sh_y == 0 && sym_y == 0 && tr_y == 0 && shl_y == 0 && syml_y == 0 && iir_y == 0,
        "outputs clear after reset");
    n_reset++;
  endtask

  initial begin
    sh_x = '0; sym_x = '0; tr_x = '0; shl_x = '0; syml_x = '0; iir_x = '0;
    @(negedge clk);
    do_reset();
    // impulse: the shift register delays it by exactly one clock
    step(8'sd1, 18'sd16384, 18'sd16384);
    chk(sh_y == 8'sd2, "shift-register first tap after one clock");
    if (sh_y == 8'sd2) n_shift++;
    compare();
    for (int n = 0; n < 120; n++) begin
      step('0, '0, '0);
      compare();
      if (n > 4 && iir_y != 0) n_tail++;
    end
    // random stream (18-bit samples kept within +-1.0)
    for (int n = 0; n < 600; n++) begin
      step(8'($urandom), 18'(int'($urandom_range(0, 32768)) - 16384),
           18'(int'($urandom_range(0, 16384)) - 8192));
      compare();
    end
    do_reset();
    for (int n = 0; n < 20; n++) begin
      step(8'($urandom), 18'(int'($urandom_range(0, 32768)) - 16384), '0);
      compare();
    end
    $display("mechanisms: shift=%0d sym=%0d transposed=%0d wrap=%0d iir_tail=%0d reset=%0d",
             n_shift, n_sym, n_tr, n_wrap, n_tail, n_reset);
    chk(n_shift > 0, "shift-register delay seen");
    chk(n_sym > 0, "symmetric pre-add seen");
    chk(n_tr > 0, "transposed agreement seen");
    chk(n_wrap > 0, "8-bit wrap-around seen");
    chk(n_tail > 0, "IIR feedback tail seen");
    chk(n_reset > 1, "reset seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
