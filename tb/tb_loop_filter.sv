// tb_loop_filter: drives error sequences into the PI loop filter and
// compares the output with a reference model of the published loop-filter diagram:
// an 18b/Q15 running sum of the errors times T*Ki, plus Kp times the error,
// each limited to its printed width (20b, 22b, 24b/Q15). The model uses
// real arithmetic for the gains, so it is independent of the rounding in
// the design; checks the proportional step, integration, saturation of
// the sum and of the proportional branch, and the one-clock latency.
module tb_loop_filter;
  import ddsrf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, valid;
  q15_t e;
  logic signed [23:0] u;
  int checks = 0, failures = 0;
  int n_sat_sum = 0, n_sat_p = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  function automatic real clip(input real v, input real lim);
    return (v > lim) ? lim : ((v < -lim) ? -lim : v);
  endfunction
  always #4 clk = ~clk;

  loop_filter dut (.clk, .rst_n, .en, .e, .u, .valid);

  localparam real T  = 0.0002;
  localparam real PI = 3.14159265358979;
  real ki, kp, sum;

  task automatic sample(input q15_t ei);
    real er, ip, pp, ur;
    er = real'(ei) / 32768.0;
    @(negedge clk);
    e = ei; en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    sum = sum + er;
    if (sum > 4.0 || sum < -4.0) n_sat_sum++;
    sum = clip(sum, 4.0);                     // 18b/Q15 register
    ip  = clip(T * ki * sum, 16.0);           // 20b/Q15
    pp  = kp * er;
    if (pp > 64.0 || pp < -64.0) n_sat_p++;
    pp  = clip(pp, 64.0);                     // 22b/Q15
    ur  = ip + pp;
    checks++;
    if (!valid || fabs(real'(u) / 32768.0 - ur) > 0.002) begin
      failures++;
      $display("FAIL e=%0d u=%f model=%f", ei, real'(u) / 32768.0, ur);
    end
  endtask

  initial begin
    ki = (35.0 * PI) * (35.0 * PI);
    kp = 1.414 * 35.0 * PI;
    sum = 0.0;
    e = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Step of 0.01: output = Kp*0.01 + T*Ki*0.01 after the first sample.
    sample(q15_t'(328));
    for (int n = 0; n < 50; n++) sample(q15_t'(328));
    for (int n = 0; n < 200; n++) sample(q15_t'(-5000));   // drives sum to -4
    for (int n = 0; n < 20; n++) sample(q15_t'(20000));    // Kp*0.61 > 64
    for (int n = 0; n < 300; n++) sample(q15_t'(int'($urandom % 4000) - 2000));
    checks++;
    if (n_sat_sum == 0 || n_sat_p == 0) begin
      failures++; $display("FAIL saturation not exercised");
    end
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
