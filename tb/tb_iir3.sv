// Self-checking testbench for iir3 (third-order IIR, 18-bit Q3.14).
//
// Two references run beside the filter:
//  - a bit-exact fixed-point model of the direct-form-II recursion
//    (products shifted right by 14 and wrapped to 18 bits), compared every
//    cycle for an impulse, a step and a random input;
//  - a double-precision model of the same low-pass filter, against which the
//    impulse and step responses must agree to within 0.01.
// It also checks that the output answers the input in the same cycle
// (y = b0*x on the first impulse sample), that the step response settles to
// a DC gain of 1.0, and that reset clears the state. A watchdog ends a hung
// run.
module tb_iir3;
  localparam int W = 18;
  localparam int FRAC = 14;
  localparam real ONE = 16384.0;
  localparam real BR [4] = '{0.06225, 0.18675, 0.18675, 0.06225};
  localparam real AR [3] = '{-0.98643, 0.59354, -0.10911};

  logic clk = 1'b0;
  logic rst;
  logic signed [W-1:0] x;
  logic signed [W-1:0] y;
  int checks = 0, failures = 0;

  longint bq [4], aq [3];
  longint ws [3];      // fixed-point model state
  real    wr [3];      // real model state
  real    yr;
  longint last_y;     // y seen during the last sample's cycle

  iir3 dut (.clk(clk), .rst(rst), .x(x), .y(y));

  always #5 clk = ~clk;

  function automatic longint wrapw(input longint v);
    logic signed [W-1:0] t;
    t = W'(v);
    return longint'(t);
  endfunction

  function automatic longint fmul(input longint a, input longint b);
    return wrapw((a * b) >>> FRAC);
  endfunction

  function automatic longint q(input real v);
    return (v >= 0.0) ? longint'($floor(v * ONE + 0.5)) : -longint'($floor(-v * ONE + 0.5));
  endfunction

  // One sample, called at a falling edge: drive v (a real value), compare
  // y with both models, advance the models at the rising edge.
  task automatic sample(input real v, input bit check_real, input string what);
    longint xi, w, yf;
    real wv;
    xi = q(v);
    x  = W'(xi);
    w  = wrapw(xi - fmul(ws[0], aq[0]) - fmul(ws[1], aq[1]) - fmul(ws[2], aq[2]));
    yf = wrapw(fmul(w, bq[0]) + fmul(ws[0], bq[1]) + fmul(ws[1], bq[2]) + fmul(ws[2], bq[3]));
    wv = v - AR[0] * wr[0] - AR[1] * wr[1] - AR[2] * wr[2];
    yr = BR[0] * wv + BR[1] * wr[0] + BR[2] * wr[1] + BR[3] * wr[2];
    #1;
    last_y = longint'(y);
    checks++;
    if (longint'(y) != yf) begin
      failures++;
      $display("FAIL %s: y=%0d expected %0d at %0t", what, longint'(y), yf, $time);
    end
    if (check_real) begin
      checks++;
      if ((real'(y) / ONE - yr) > 0.01 || (yr - real'(y) / ONE) > 0.01) begin
        failures++;
        $display("FAIL %s: y=%f, real model %f", what, real'(y) / ONE, yr);
      end
    end
    @(posedge clk);
    ws[2] = ws[1]; ws[1] = ws[0]; ws[0] = w;
    wr[2] = wr[1]; wr[1] = wr[0]; wr[0] = wv;
    @(negedge clk);
  endtask

  task automatic do_reset();
    rst = 1'b1;
    x   = '0;
    @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 3; k++) begin ws[k] = 0; wr[k] = 0.0; end
  endtask

  real peak;
  int  peak_at;

  initial begin
    for (int k = 0; k < 4; k++) bq[k] = q(BR[k]);
    for (int k = 0; k < 3; k++) aq[k] = q(AR[k]);
    @(negedge clk);
    do_reset();
    // impulse of 1.0
    peak = 0.0; peak_at = -1;
    sample(1.0, 1'b1, "impulse 0");
    checks++;
    if (last_y != q(BR[0])) begin
      failures++;
      $display("FAIL same-cycle response: y=%0d expected b0=%0d", last_y, q(BR[0]));
    end
    for (int n = 1; n < 40; n++) begin
      sample(0.0, 1'b1, $sformatf("impulse %0d", n));
      if (real'(y) / ONE > peak) begin peak = real'(y) / ONE; peak_at = n; end
    end
    // low-pass impulse response: a single main lobe of about 0.4
    checks++;
    if (peak < 0.3 || peak > 0.5) begin
      failures++;
      $display("FAIL impulse peak %f", peak);
    end
    // step of 0.5: settles to 0.5 (DC gain 1)
    do_reset();
    for (int n = 0; n < 60; n++) sample(0.5, 1'b1, $sformatf("step %0d", n));
    checks++;
    if (y < W'(q(0.49)) || y > W'(q(0.51))) begin
      failures++;
      $display("FAIL step settles at %f", real'(y) / ONE);
    end
    // random input within +-1.0, bit-exact against the fixed-point model
    for (int n = 0; n < 400; n++)
      sample((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0, 1'b0, "random");
    // reset clears the state
    do_reset();
    sample(0.0, 1'b0, "after reset");
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
