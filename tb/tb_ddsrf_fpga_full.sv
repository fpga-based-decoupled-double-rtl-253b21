// tb_ddsrf_fpga_full: the whole system at its real rates, 125 MHz clock and
// 5 kHz sampling (25000 clocks per sample), running the on-chip test
// stimulus for 0.08 s (400 samples), as in the hardware verification.
// Checks the strobe period, the 8-clock latency from strobe to PLL result,
// lock within 0.05 s and the error staying within two LUT areas (3217 LSB)
// afterwards, and the SRF compensation currents (reactive part only) for
// balanced load currents once the detector's filter has settled.
module tb_ddsrf_fpga_full;
  import ddsrf_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real IP = 0.4, IQ = 0.15;
  localparam int  NS = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  q15_t il_a = '0, il_b = '0, il_c = '0;
  logic tick, out_valid, ic_valid;
  logic [17:0] theta;
  q15_t sin_theta, cos_theta, pos_sine, ideal_sine, err, ic_a, ic_b, ic_c;
  logic signed [24:0] freq;
  vec2_t vpos, vneg;
  sig_t id_bar;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  always #4 clk = ~clk;

  ddsrf_fpga_top dut (
    .clk, .rst_n, .use_rom(1'b1), .va_ext(16'sd0), .vb_ext(16'sd0), .vc_ext(16'sd0),
    .il_a, .il_b, .il_c,
    .sample_tick_o(tick), .theta, .sin_theta, .cos_theta, .pos_sine, .ideal_sine,
    .err, .freq, .vpos, .vneg, .out_valid, .ic_a, .ic_b, .ic_c, .id_bar, .ic_valid);

  function automatic real xk(input int k); return 2.0 * PI * real'(k % 100) / 100.0; endfunction

  int  ntick = 0, nout = 0, nic = 0, last_bad = 0, max_err_locked = 0;
  longint cyc = 0, last_tick = -1;

  always @(negedge clk) begin
    real phi;
    phi = xk(ntick) - PI/6;
    il_a <= q15_t'($rtoi(32767.0 * (IP * $cos(phi) + IQ * $sin(phi))));
    il_b <= q15_t'($rtoi(32767.0 * (IP * $cos(phi - 2.0*PI/3) + IQ * $sin(phi - 2.0*PI/3))));
    il_c <= q15_t'($rtoi(32767.0 * (IP * $cos(phi + 2.0*PI/3) + IQ * $sin(phi + 2.0*PI/3))));
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && tick) begin
      checks++;
      if (last_tick >= 0 && cyc - last_tick != 25000) begin
        failures++; $display("FAIL strobe period %0d", cyc - last_tick);
      end
      last_tick <= cyc;
      ntick <= ntick + 1;
    end
    if (rst_n && out_valid) begin
      if (nout == 0) begin
        checks++;
        if (cyc - last_tick != 8) begin failures++; $display("FAIL latency %0d", cyc - last_tick); end
      end
      if (fabs(real'(err)) > 3217.0) last_bad = nout;
      if (nout >= 250 && (int'(err) > max_err_locked || -int'(err) > max_err_locked))
        max_err_locked = (err < 0) ? -int'(err) : int'(err);
      nout++;
    end
    if (rst_n && ic_valid) begin
      real phi;
      phi = xk(nic) - PI/6;
      if (nic >= 300) begin
        checks++;
        if (fabs(real'(ic_a) - 32767.0 * IQ * $sin(phi)) > 1700.0 ||
            fabs(real'(ic_b) - 32767.0 * IQ * $sin(phi - 2.0*PI/3)) > 1700.0 ||
            fabs(real'(ic_c) - 32767.0 * IQ * $sin(phi + 2.0*PI/3)) > 1700.0) begin
          failures++; $display("FAIL ic at %0d: %0d %0d %0d", nic, ic_a, ic_b, ic_c);
        end
      end
      nic++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (nout == NS);
    $display("lock after %0d samples (%f s), max |error| once locked %0d",
             last_bad + 1, real'(last_bad + 1) / 5000.0, max_err_locked);
    checks++;
    if (last_bad + 1 > 250) begin failures++; $display("FAIL lock time"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NS + 2) * 25000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
