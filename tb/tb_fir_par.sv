// Self-checking testbench for fir_par (6 parallel 8-bit inputs).
//
// Applies single-input impulses (y must equal that input's coefficient,
// 2,4,3,2,7,6), an all-ones vector, extreme values and random vectors, and
// compares y in the same cycle against a reference sum computed here with
// wrap-around 8-bit arithmetic. A watchdog ends the run if it hangs.
module tb_fir_par;
  localparam int N = 6;
  localparam int W = 8;
  localparam int HREF [N] = '{2, 4, 3, 2, 7, 6};

  logic clk = 1'b0;
  logic signed [W-1:0] x [N];
  logic signed [W-1:0] y;
  int checks = 0, failures = 0;

  fir_par dut (.x(x), .y(y));

  always #5 clk = ~clk;

  function automatic logic signed [W-1:0] ref_sum();
    int s = 0;
    for (int i = 0; i < N; i++) s += int'(x[i]) * HREF[i];
    return W'(s);
  endfunction

  task automatic check(input string what);
    #1;
    checks++;
    if (y !== ref_sum()) begin
      failures++;
      $display("FAIL %s: y=%0d expected %0d", what, y, ref_sum());
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) x[i] = '0;
    check("zero");
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) x[i] = (i == j) ? 8'sd1 : 8'sd0;
      #1;
      checks++;
      if (y !== W'(HREF[j])) begin
        failures++;
        $display("FAIL impulse on input %0d: y=%0d expected %0d", j, y, HREF[j]);
      end
    end
    for (int i = 0; i < N; i++) x[i] = 8'sd1;
    #1; checks++;
    if (y !== 8'sd24) begin failures++; $display("FAIL ones: y=%0d expected 24", y); end
    for (int i = 0; i < N; i++) x[i] = 8'sh7f;
    check("max");
    for (int i = 0; i < N; i++) x[i] = -8'sd128;
    check("min");
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < N; i++) x[i] = W'($urandom);
      check("random");
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
