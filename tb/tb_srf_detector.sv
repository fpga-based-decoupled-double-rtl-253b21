// tb_srf_detector: supplies an ideal 50 Hz phase (sin/cos rounded to Q15)
// and balanced load currents with an active part Ip (in phase with the
// d axis, cos(theta)) and a reactive part Iq (sin(theta)). Once the LPF
// has settled, the compensation currents must be everything but the
// active part: ic_x = Iq*sin(theta_x). A second run adds a fifth harmonic,
// which must pass to the outputs as well. Checks latency (5 clocks).
module tb_srf_detector;
  import ddsrf_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, valid;
  q15_t il_a, il_b, il_c, ic_a, ic_b, ic_c;
  sincos_t sc;
  sig_t id_bar;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  always #4 clk = ~clk;

  srf_detector dut (.clk, .rst_n, .en, .il_a, .il_b, .il_c, .sc,
                    .ic_a, .ic_b, .ic_c, .id_bar, .valid);

  localparam real PI = 3.14159265358979;
  localparam real IP = 0.5, IQ = 0.2;

  task automatic run(input real h5, input real tol, input int n_samples);
    real th, e[3];
    int lat;
    for (int n = 0; n < n_samples; n++) begin
      th = 2.0 * PI * real'(n % 100) / 100.0;
      sc.s = q15_t'($rtoi($floor(32767.0 * $sin(th) + 0.5)));
      sc.c = q15_t'($rtoi($floor(32767.0 * $cos(th) + 0.5)));
      for (int k = 0; k < 3; k++) begin
        real tk;
        tk = th - 2.0 * PI * real'(k) / 3.0;
        e[k] = IQ * $sin(tk) + h5 * $cos(5.0 * tk);
      end
      il_a = q15_t'($rtoi(32767.0 * (IP * $cos(th) + e[0])));
      il_b = q15_t'($rtoi(32767.0 * (IP * $cos(th - 2.0*PI/3.0) + e[1])));
      il_c = q15_t'($rtoi(32767.0 * (IP * $cos(th + 2.0*PI/3.0) + e[2])));
      @(negedge clk);
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      lat = 1;
      while (!valid && lat < 20) begin @(negedge clk); lat++; end
      if (n == 0) begin
        checks++;
        if (lat != 5) begin failures++; $display("FAIL latency %0d", lat); end
      end
      if (n > 400) begin
        checks++;
        if (fabs(real'(ic_a) / 32767.0 - e[0]) > tol ||
            fabs(real'(ic_b) / 32767.0 - e[1]) > tol ||
            fabs(real'(ic_c) / 32767.0 - e[2]) > tol) begin
          failures++;
          $display("FAIL n=%0d got %0d %0d %0d exp %f %f %f", n, ic_a, ic_b, ic_c,
                   32767.0*e[0], 32767.0*e[1], 32767.0*e[2]);
        end
      end
      repeat (4) @(negedge clk);
    end
  endtask

  initial begin
    il_a = '0; il_b = '0; il_c = '0; sc = '{s: 0, c: 32767};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(0.0, 0.003, 600);
    checks++;
    // dc of i_d is sqrt(3/2)*Ip with the power-invariant transform.
    if (fabs(real'(id_bar) / 32768.0 - $sqrt(1.5) * IP) > 0.003) begin
      failures++; $display("FAIL id_bar %0d", id_bar);
    end
    // A balanced 5th harmonic (negative sequence) is a 6w ripple in i_d,
    // which the 40 Hz filter only attenuates to about 0.13.
    run(0.05, 0.012, 600);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
