// Self-checking testbench for fir_par_large (100 parallel 18-bit inputs).
//
// The expected coefficients are rebuilt here from the window formula
// h[k] = round(2^14 * min(k+1, 100-k) / 2550). Impulses on single inputs
// check each coefficient, a constant input of 1.0 checks the DC gain, and
// random vectors are compared against a reference sum using 18-bit Q3.14
// products (truncated right shift by 14, wrap to 18 bits).
module tb_fir_par_large;
  localparam int N = 100;
  localparam int W = 18;
  localparam int FRAC = 14;

  logic clk = 1'b0;
  logic signed [W-1:0] x [N];
  logic signed [W-1:0] y;
  longint href [N];
  int checks = 0, failures = 0;

  fir_par_large dut (.x(x), .y(y));

  always #5 clk = ~clk;

  function automatic longint wrapw(input longint v);
    logic signed [W-1:0] t;
    t = W'(v);
    return longint'(t);
  endfunction

  function automatic longint ref_sum();
    longint s = 0;
    for (int i = 0; i < N; i++) s = wrapw(s + wrapw((longint'(x[i]) * href[i]) >>> FRAC));
    return s;
  endfunction

  task automatic check(input string what, input longint exp);
    #1;
    checks++;
    if (longint'(y) != exp) begin
      failures++;
      $display("FAIL %s: y=%0d expected %0d", what, y, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin
      int w;
      w = (k < N / 2) ? k + 1 : N - k;
      href[k] = longint'($floor(real'(w) * 16384.0 / 2550.0 + 0.5));
    end
    // impulse of 1.0 (2^14) on input j gives h[j]
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) x[i] = (i == j) ? 18'sd16384 : 18'sd0;
      check($sformatf("impulse %0d", j), href[j]);
    end
    // DC: all inputs 1.0 gives the coefficient sum, close to 1.0
    for (int i = 0; i < N; i++) x[i] = 18'sd16384;
    check("dc", ref_sum());
    checks++;
    if (y < 18'sd16300 || y > 18'sd16470) begin
      failures++;
      $display("FAIL dc gain %0d not near 16384", y);
    end
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N; i++) x[i] = W'($urandom);
      check("random", ref_sum());
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
