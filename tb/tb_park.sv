// tb_park: rotates random alpha-beta vectors by random angles and compares
// d/q with the rotation [cos sin; -sin cos] evaluated in floating point
// (using the same Q15-rounded sin/cos); checks the one-clock latency.
module tb_park;
  import ddsrf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, valid;
  sig_t alpha, beta;
  sincos_t th;
  vec2_t dq;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  always #4 clk = ~clk;

  park dut (.clk, .rst_n, .en, .alpha, .beta, .th, .dq, .valid);

  initial begin
    real ang, ed, eq;
    alpha = '0; beta = '0; th = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      ang   = 6.283185307 * real'($urandom % 10000) / 10000.0;
      th.s  = q15_t'($rtoi($floor(32767.0 * $sin(ang) + 0.5)));
      th.c  = q15_t'($rtoi($floor(32767.0 * $cos(ang) + 0.5)));
      alpha = sig_t'(int'($urandom % 106000) - 53000);
      beta  = sig_t'(int'($urandom % 106000) - 53000);
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      ed = ( real'(th.c) * real'(alpha) + real'(th.s) * real'(beta)) / 32768.0;
      eq = (-real'(th.s) * real'(alpha) + real'(th.c) * real'(beta)) / 32768.0;
      checks++;
      if (!valid || fabs(real'(dq.d) - ed) > 1.0 || fabs(real'(dq.q) - eq) > 1.0) begin
        failures++;
        $display("FAIL got %0d %0d exp %f %f", dq.d, dq.q, ed, eq);
      end
      @(negedge clk);
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
