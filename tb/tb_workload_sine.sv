// Workload testbench: the 100-tap low-pass FIRs on a noisy sine.
//
// One second of a 1 Hz sine (amplitude 0.9) with a 100 Hz ripple of
// amplitude 0.1 on top is sampled at 2 kHz (2000 samples, an assumed rate)
// and fed, in Q3.14, to fir_shift_large and fir_sym_large. After the delay
// line has filled, each output must follow the clean sine delayed by the
// filter's group delay of 50.5 samples to within 0.03: the ripple is removed
// and the low-frequency signal passes with unity gain. The two filters must
// also agree with each other to within a few LSBs on every sample.
module tb_workload_sine;
  localparam real FS = 2000.0;
  localparam real PI = 3.14159265358979;
  localparam real ONE = 16384.0;
  localparam int  NS = 2000;

  logic clk = 1'b0;
  logic rst;
  logic signed [17:0] x, y_dir, y_sym;
  int checks = 0, failures = 0;
  real worst = 0.0;

  fir_shift_large u_dir (.clk(clk), .rst(rst), .x(x), .y(y_dir));
  fir_sym_large   u_sym (.clk(clk), .rst(rst), .x(x), .y(y_sym));

  always #5 clk = ~clk;

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    real t, v, clean, err;
    rst = 1'b1;
    x   = '0;
    @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < NS; n++) begin
      t = real'(n) / FS;
      v = 0.9 * $sin(2.0 * PI * t) + 0.1 * $sin(2.0 * PI * 100.0 * t);
      x = 18'($rtoi(v * ONE));
      @(posedge clk);
      @(negedge clk);
      // output now reflects samples 0..n; group delay 49.5 from the newest
      // register plus the one-clock input register
      if (n >= 100) begin
        clean = 0.9 * $sin(2.0 * PI * (real'(n) - 49.5) / FS);
        err = absr(real'(y_dir) / ONE - clean);
        if (err > worst) worst = err;
        checks++;
        if (err > 0.03) begin
          failures++;
          $display("FAIL sample %0d: y=%f clean=%f", n, real'(y_dir) / ONE, clean);
        end
        checks++;
        if (absr(real'(y_dir) - real'(y_sym)) > 60.0) begin
          failures++;
          $display("FAIL sample %0d: direct %0d symmetric %0d", n, y_dir, y_sym);
        end
      end
    end
    $display("worst deviation from the clean sine: %f", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NS + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
