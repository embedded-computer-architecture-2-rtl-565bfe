// Self-checking testbench for fir_shift_large (100-tap direct-form FIR, 18 bit Q3.14).
//
// The reference model here keeps the last N input samples (hist[0] newest,
// updated at each rising edge) and computes
//     y = sum_k h[k] * hist[k]
// with W-bit products shifted right by FRAC and wrapped, exactly as the
// filter's arithmetic is specified. Checks: reset clears the output; an
// impulse shows its first tap exactly one clock after it is sampled and
// then every coefficient in order, one per clock (throughput one output per
// clock); then every cycle of a long random stream matches the model; a
// reset in mid-stream clears the filter again. A watchdog ends a hung run.
module tb_fir_shift_large;
  localparam int N    = 100;
  localparam int W    = 18;
  localparam int FRAC = 14;
  localparam longint ONE = 64'sd1 <<< FRAC;

  logic clk = 1'b0;
  logic rst;
  logic signed [W-1:0] x;
  logic signed [W-1:0] y;
  longint h    [N];
  longint hist [N];
  int checks = 0, failures = 0;

  fir_shift_large dut (.clk(clk), .rst(rst), .x(x), .y(y));

  always #5 clk = ~clk;

  function automatic longint wrapw(input longint v);
    logic signed [W-1:0] t;
    t = W'(v);
    return longint'(t);
  endfunction

  function automatic longint fmul(input longint a, input longint b);
    return wrapw((a * b) >>> FRAC);
  endfunction

  function automatic longint model();
    longint s = 0;
    for (int k = 0; k < N; k++) s = wrapw(s + fmul(hist[k], h[k]));
    return s;
  endfunction

  task automatic expect_y(input string what, input longint exp);
    checks++;
    if (longint'(y) != exp) begin
      failures++;
      $display("FAIL %s: y=%0d expected %0d at %0t", what, longint'(y), exp, $time);
    end
  endtask

  // One clock, called and returning at a falling edge: drive v, shift the
  // model at the rising edge, return at the next falling edge.
  task automatic step(input longint v);
    x = W'(v);
    @(posedge clk);
    for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = wrapw(v);
    @(negedge clk);
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < N; k++) hist[k] = 0;
  endtask

  initial begin
    for (int k = 0; k < N; k++)
      h[k] = longint'($floor(real'((k < N / 2) ? k + 1 : N - k) * real'(ONE) / 2550.0 + 0.5));
    x = '0;
    do_reset();
    expect_y("after reset", 0);
    // impulse: one sample of ONE, then zeros
    step(ONE);
    for (int k = 0; k < N; k++) begin
      expect_y($sformatf("impulse tap %0d", k), h[k]);
      step(0);
    end
    expect_y("impulse gone", 0);
    // random stream
    for (int t = 0; t < 400; t++) begin
      step(longint'($urandom_range(0, (1 << W) - 1)) - (64'sd1 <<< (W - 1)));
      expect_y("random", model());
    end
    // constant input: DC gain
    for (int t = 0; t < N + 1; t++) step(ONE);
    expect_y("dc", model());
    // reset in mid-stream
    step(ONE);
    do_reset();
    expect_y("mid reset", 0);
    for (int t = 0; t < 20; t++) begin
      step(longint'($urandom_range(0, (1 << W) - 1)) - (64'sd1 <<< (W - 1)));
      expect_y("random after reset", model());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
