// tb_lpf: step and sine responses of the 40 Hz first-order IIR filter,
// compared with H(z) = (0.0245 + 0.0245 z^-1)/(1 - 0.9510 z^-1) evaluated
// in floating point with the nominal coefficients. Checks the first output
// sample of a step (0.0245 of the step), the settled dc gain of one, the
// attenuation of a 100 Hz (2w) ripple, and the one-clock update latency.
module tb_lpf;
  import ddsrf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, valid;
  sig_t x, y;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  always #4 clk = ~clk;

  lpf dut (.clk, .rst_n, .en, .x, .y, .valid);

  real yr = 0.0, xr1 = 0.0;
  int  lat;

  task automatic sample(input sig_t xi, input real tol);
    real xr;
    xr = real'(xi);
    @(negedge clk);
    x = xi; en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    yr  = 0.0245 * (xr + xr1) + 0.9510 * yr;
    xr1 = xr;
    checks++;
    if (!valid || fabs(real'(y) - yr) > tol) begin
      failures++;
      $display("FAIL x=%0d y=%0d model=%f valid=%b", xi, y, yr, valid);
    end
  endtask

  initial begin
    real peak;
    x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Step of 0.5: the first output is 0.0245*0.5 of full scale (401.4,
    // 401.5 with the Q15 coefficient).
    sample(sig_t'(16384), 2.0);
    checks++;
    if (y < sig_t'(401) || y > sig_t'(402)) begin failures++; $display("FAIL first step sample %0d", y); end
    // With a Q15 state the output settles once the per-sample increment
    // (1606*(x-y)/32768) rounds to zero, i.e. within about 10 LSB of x.
    for (int n = 1; n < 400; n++) sample(sig_t'(16384), 40.0);
    checks++;
    if (y < sig_t'(16372) || y > sig_t'(16396)) begin failures++; $display("FAIL dc gain %0d", y); end
    // 100 Hz at 5 kHz on top of the dc value: ripple must be reduced to
    // about |H(100 Hz)| = 0.37 of its input amplitude.
    peak = 0.0;
    for (int n = 0; n < 500; n++) begin
      sample(sig_t'(16384 + $rtoi(10000.0 * $sin(6.283185307 * 100.0 * n / 5000.0))), 60.0);
      if (n > 300 && fabs(real'(y) - 16384.0) > peak) peak = fabs(real'(y) - 16384.0);
    end
    checks++;
    if (peak < 3000.0 || peak > 4300.0) begin failures++; $display("FAIL ripple %f", peak); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
