// tb_vco: feeds constant and changing frequencies to the phase integrator
// and compares theta with a floating-point integral of the frequency,
// theta[n] = T * sum(w) wrapped to [0, 2*pi) whenever the stored sum reaches
// 2*pi/T. Checks that at 50 Hz the phase advances 2*pi/100 per sample and
// repeats every 100 samples, that the wrap happens, and the latency.
module tb_vco;
  import ddsrf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, valid;
  logic signed [24:0] w;
  logic [17:0] theta;
  int checks = 0, failures = 0, wraps = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  always #4 clk = ~clk;

  vco dut (.clk, .rst_n, .en, .w, .theta, .valid);

  localparam real T  = 0.0002;
  localparam real PI = 3.14159265358979;
  real acc = 0.0;                    // stored sum, rad/s
  logic [17:0] th_prev = '0;

  task automatic sample(input real wr);
    real f, s, er;
    @(negedge clk);
    w = 25'($rtoi(wr * 32768.0));
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    f = (acc >= 2.0 * PI / T) ? acc - 2.0 * PI / T : acc;
    s = real'(w) / 32768.0 + f;
    acc = s;
    er = T * s;
    checks++;
    if (!valid || fabs(real'(theta) / 32768.0 - er) > 0.0005) begin
      failures++;
      $display("FAIL w=%f theta=%f model=%f", wr, real'(theta) / 32768.0, er);
    end
    if (theta < th_prev) wraps++;
    th_prev = theta;
  endtask

  initial begin
    logic [17:0] th100;
    w = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 100; n++) sample(100.0 * PI);
    th100 = theta;
    checks++;
    // 100 samples of 2*pi/100 bring the phase back to 2*pi (== 0): the
    // wrap is applied when the stored sum is read on the next sample.
    if (theta > 18'd60 && theta < 18'd205827) begin failures++; $display("FAIL 50 Hz period: theta=%0d", theta); end
    for (int n = 0; n < 100; n++) sample(100.0 * PI);
    checks++;
    if (theta > th100 + 18'd2 || theta + 18'd2 < th100) begin
      failures++; $display("FAIL 50 Hz not periodic %0d %0d", th100, theta);
    end
    for (int n = 0; n < 400; n++) sample(100.0 * PI + 40.0 * $sin(real'(n) / 30.0));
    checks++;
    if (wraps < 5) begin failures++; $display("FAIL only %0d wraps", wraps); end
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
