// tb_ddsrf_pll: closed-loop test of the PLL with the published unbalanced,
// distorted test voltage (positive 0.6 at pi/3, negative 0.07 at pi/4, zero
// 0.02 at pi/8, third harmonics 0.1/0.1/0.2), generated here in floating
// point at 5 kHz. Checks:
//  - latency of 6 clocks from `en` to `valid`;
//  - lock: cos(theta) follows sin(wt + pi/3), the positive sequence of
//    phase a, within two LUT areas (2*2*pi/128 of phase, 3217 LSB) and
//    stays there (checked on every sample), reached within LOCK_MAX samples;
//  - the filtered positive-frame d value is sqrt(3/2)*0.6 and the filtered
//    negative-frame vector has magnitude sqrt(3/2)*0.07 (averaged);
//  - a step of the line frequency to 51 Hz is tracked (mean of w).
module tb_ddsrf_pll;
  import ddsrf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, valid;
  q15_t va, vb, vc;
  logic [17:0] theta;
  sincos_t sc;
  logic signed [24:0] w;
  vec2_t vpos, vneg;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  always #4 clk = ~clk;

  ddsrf_pll dut (.clk, .rst_n, .en, .va, .vb, .vc, .theta, .sc, .w, .vpos, .vneg, .valid);

  localparam real PI = 3.14159265358979;
  localparam real T  = 0.0002;
  localparam int  LOCK_MAX = 250;          // 0.05 s
  real x = 0.0;                             // fundamental phase, rad
  int  last_bad = 0;
  real sum_vpd, sum_vn, sum_w;

  task automatic sample(input int n, input real f);
    real ea, eb, ec, errv;
    int lat;
    ea = 0.6 * $sin(x + PI/3) + 0.07 * $sin(x + PI/4) + 0.02 * $sin(x + PI/8) + 0.1 * $sin(3*x + PI/2);
    eb = 0.6 * $sin(x - PI/3) + 0.07 * $sin(x + PI/4 + 2*PI/3) + 0.02 * $sin(x + PI/8) + 0.1 * $sin(3*x + PI/5);
    ec = 0.6 * $sin(x + PI) + 0.07 * $sin(x + PI/4 - 2*PI/3) + 0.02 * $sin(x + PI/8) + 0.2 * $sin(3*x + PI/5);
    va = q15_t'($rtoi(32767.0 * ea));
    vb = q15_t'($rtoi(32767.0 * eb));
    vc = q15_t'($rtoi(32767.0 * ec));
    @(negedge clk);
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    lat = 1;
    while (!valid && lat < 20) begin @(negedge clk); lat++; end
    if (n == 0) begin
      checks++;
      if (lat != 6) begin failures++; $display("FAIL latency %0d", lat); end
    end
    errv = 32767.0 * $sin(x + PI/3) - real'(sc.c);
    if (fabs(errv) > 3217.0) last_bad = n;
    // Once locked, every sample must stay within two LUT areas.
    if (n >= LOCK_MAX) begin
      checks++;
      if (fabs(errv) > 3217.0) begin
        failures++; $display("FAIL sample %0d: error %f", n, errv);
      end
    end
    sum_vpd += real'(vpos.d);
    sum_vn  += $sqrt(real'(vneg.d) * real'(vneg.d) + real'(vneg.q) * real'(vneg.q));
    sum_w   += real'(w) / 32768.0;
    x += 2.0 * PI * f * T;
    if (x >= 2.0 * PI) x -= 2.0 * PI;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    va = '0; vb = '0; vc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      if (n == 500) begin sum_vpd = 0.0; sum_vn = 0.0; sum_w = 0.0; end
      sample(n, 50.0);
    end
    $display("lock after %0d samples (%f s)", last_bad + 1, real'(last_bad + 1) * T);
    checks++;
    if (last_bad + 1 > LOCK_MAX) begin failures++; $display("FAIL lock time"); end
    checks++;
    if (fabs(sum_vpd / 100.0 - 32768.0 * $sqrt(1.5) * 0.6) > 300.0) begin
      failures++; $display("FAIL vpos.d mean %f", sum_vpd / 100.0);
    end
    checks++;
    if (fabs(sum_vn / 100.0 - 32768.0 * $sqrt(1.5) * 0.07) > 300.0) begin
      failures++; $display("FAIL |vneg| mean %f", sum_vn / 100.0);
    end
    checks++;
    if (fabs(sum_w / 100.0 - 100.0 * PI) > 0.5) begin
      failures++; $display("FAIL w mean %f", sum_w / 100.0);
    end
    $display("means: vpos.d %f, |vneg| %f, w %f", sum_vpd / 100.0, sum_vn / 100.0, sum_w / 100.0);
    // Frequency step to 51 Hz.
    for (int n = 600; n < 1600; n++) begin
      if (n == 1500) sum_w = 0.0;
      sample(n, 51.0);
    end
    checks++;
    if (fabs(sum_w / 100.0 - 102.0 * PI) > 0.5) begin
      failures++; $display("FAIL w mean after step %f", sum_w / 100.0);
    end
    checks++;
    $display("after step: w %f, last sample off lock %0d", sum_w / 100.0, last_bad);
    if (last_bad > 900) begin failures++; $display("FAIL no relock after step (%0d)", last_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
