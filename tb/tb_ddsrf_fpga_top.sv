// tb_ddsrf_fpga_top: end-to-end test of the whole system with a short
// sample period (DIV = 16 clocks instead of 25000; nothing else depends on
// it). Phase 1 runs the PLL from the on-chip test ROM, as in the hardware
// verification, while balanced load currents with an active and a reactive
// part (aligned to the positive-sequence voltage) drive the SRF detector.
// Phase 2 switches the PLL to the external voltage inputs with a phase
// jump of 1 rad. Checked: strobe period, lock within 0.05 s and the error
// staying within two LUT areas (3217 LSB), the reported error equal to
// ideal - pos_sine, the compensation currents equal to the reactive part,
// and relock after the switch. Counted mechanisms (each must occur):
// sample strobes, ROM wrap-around, VCO phase wrap, lock, proportional
// saturation in the loop filter, mode switch and relock.
module tb_ddsrf_fpga_top;
  import ddsrf_pkg::*;
  localparam int DIV = 16;
  localparam real PI = 3.14159265358979;
  localparam real IP = 0.4, IQ = 0.15;

  logic clk = 1'b0, rst_n = 1'b0, use_rom = 1'b1;
  q15_t va_ext = '0, vb_ext = '0, vc_ext = '0, il_a = '0, il_b = '0, il_c = '0;
  logic tick, out_valid, ic_valid;
  logic [17:0] theta;
  q15_t sin_theta, cos_theta, pos_sine, ideal_sine, err, ic_a, ic_b, ic_c;
  logic signed [24:0] freq;
  vec2_t vpos, vneg;
  sig_t id_bar;
  int checks = 0, failures = 0;
  function automatic real fabs(input real v); return (v < 0.0) ? -v : v; endfunction
  always #4 clk = ~clk;

  ddsrf_fpga_top #(.DIV(DIV)) dut (
    .clk, .rst_n, .use_rom, .va_ext, .vb_ext, .vc_ext, .il_a, .il_b, .il_c,
    .sample_tick_o(tick), .theta, .sin_theta, .cos_theta, .pos_sine, .ideal_sine,
    .err, .freq, .vpos, .vneg, .out_valid, .ic_a, .ic_b, .ic_c, .id_bar, .ic_valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Sample k (0-based strobe count) is at fundamental phase x = 2*pi*k/100.
  int  ntick = 0, nout = 0, nic = 0;
  longint cyc = 0, last_tick = -1;
  int  n_rom_wrap = 0, n_vco_wrap = 0, n_psat = 0, n_switch = 0;
  int  last_bad_rom = 0, last_bad_ext = 0, switch_at = 1000000;
  logic [17:0] th_prev = '0;
  real xjump = 0.0;

  function automatic real xk(input int k); return 2.0 * PI * real'(k % 100) / 100.0; endfunction

  // Load currents and external voltages for the next strobe.
  always @(negedge clk) begin
    real phi;
    for (int p = 0; p < 3; p++) begin
      phi = xk(ntick) + PI/3 - PI/2 - 2.0 * PI * real'(p) / 3.0;
      case (p)
        0: il_a <= q15_t'($rtoi(32767.0 * (IP * $cos(phi) + IQ * $sin(phi))));
        1: il_b <= q15_t'($rtoi(32767.0 * (IP * $cos(phi) + IQ * $sin(phi))));
        default: il_c <= q15_t'($rtoi(32767.0 * (IP * $cos(phi) + IQ * $sin(phi))));
      endcase
    end
    va_ext <= q15_t'($rtoi(32767.0 * 0.8 * $sin(xk(ntick) + PI/3 + xjump)));
    vb_ext <= q15_t'($rtoi(32767.0 * 0.8 * $sin(xk(ntick) + PI/3 + xjump - 2.0*PI/3)));
    vc_ext <= q15_t'($rtoi(32767.0 * 0.8 * $sin(xk(ntick) + PI/3 + xjump + 2.0*PI/3)));
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && tick) begin
      if (last_tick >= 0 && cyc - last_tick != longint'(DIV)) check(0, "strobe period");
      last_tick <= cyc;
      ntick <= ntick + 1;
      if (ntick % 100 == 99) n_rom_wrap++;
    end
    if (rst_n && dut.u_pll.u_lf.valid &&
        (dut.u_pll.u_lf.p_w == 64'sd2097151 || dut.u_pll.u_lf.p_w == -64'sd2097152)) n_psat++;
  end

  // PLL result of sample nout.
  always @(posedge clk) if (rst_n && out_valid) begin
    real ev;
    if (theta < th_prev) n_vco_wrap++;
    th_prev = theta;
    ev = real'(int'(ideal_sine) - int'(pos_sine));
    ev = (ev > 32767.0) ? 32767.0 : ((ev < -32768.0) ? -32768.0 : ev);
    if (real'(err) != ev) check(0, "err != ideal - pos_sine (saturated)");
    if (use_rom) begin
      ev = 32767.0 * $sin(xk(nout) + PI/3);
      if (fabs(ev - real'(ideal_sine)) > 2.0) check(0, $sformatf("ideal sine %0d at %0d", ideal_sine, nout));
      if (fabs(real'(err)) > 3217.0) last_bad_rom = nout;
    end else begin
      ev = 32767.0 * $sin(xk(nout) + PI/3 + xjump);
      if (fabs(ev - real'(pos_sine)) > 3217.0) last_bad_ext = nout;
    end
    nout++;
  end

  // Compensation currents of sample nic: the reactive part only.
  always @(posedge clk) if (rst_n && ic_valid) begin
    real phi, e[3];
    for (int p = 0; p < 3; p++) begin
      phi = xk(nic) + PI/3 - PI/2 - 2.0 * PI * real'(p) / 3.0;
      e[p] = 32767.0 * IQ * $sin(phi);
    end
    if (nic >= 400 && nic < 600) begin
      checks++;
      if (fabs(real'(ic_a) - e[0]) > 1700.0 || fabs(real'(ic_b) - e[1]) > 1700.0 ||
          fabs(real'(ic_c) - e[2]) > 1700.0) begin
        failures++;
        $display("FAIL ic n=%0d got %0d %0d %0d exp %f %f %f", nic, ic_a, ic_b, ic_c, e[0], e[1], e[2]);
      end
    end
    nic++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (nout == 600);
    $display("ROM mode: lock after %0d samples", last_bad_rom + 1);
    check(last_bad_rom + 1 <= 250, "lock within 0.05 s from the ROM stimulus");
    check(fabs(real'(id_bar) / 32768.0 - $sqrt(1.5) * IP) < 0.01,
          $sformatf("active current %0d", id_bar));
    // Mode switch to the external inputs, with a phase jump of 1 rad.
    @(negedge clk);
    use_rom = 1'b0;
    xjump = 1.0;
    n_switch++;
    switch_at = nout;
    wait (nout == 1100);
    $display("external mode: last sample off lock %0d (switch at %0d)", last_bad_ext, switch_at);
    check(last_bad_ext > switch_at, "phase jump seen on the external inputs");
    check(last_bad_ext <= switch_at + 250, "relock within 0.05 s after the switch");
    $display("mechanisms: strobes %0d rom_wraps %0d vco_wraps %0d p_sat %0d switches %0d",
             ntick, n_rom_wrap, n_vco_wrap, n_psat, n_switch);
    check(ntick >= 1100, "sample strobes");
    check(n_rom_wrap >= 5, "ROM wrap-around");
    check(n_vco_wrap >= 10, "VCO phase wrap");
    check(n_psat > 0, "loop-filter saturation");
    check(n_switch == 1, "mode switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1200 * DIV + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
