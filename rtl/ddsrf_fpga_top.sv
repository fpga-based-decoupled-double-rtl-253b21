// ddsrf_fpga_top: DDSRF-PLL system with its on-chip verification set-up and
// the SRF compensation-current detector of a shunt active power filter.
//
// A counter divides the 125 MHz clock into the 5 kHz sampling strobe. On
// every strobe the three phase voltages are taken either from the external
// ports (use_rom = 0, e.g. from ADCs) or from the on-chip test ROM
// (use_rom = 1), which also supplies the ideal unit sine in phase with the
// positive sequence. The DDSRF-PLL produces the phase theta and its
// sin/cos; `pos_sine` is the PLL's unit wave in phase with the positive-
// sequence voltage of phase a (cos(theta) in this design's frame
// convention) and `err` = ideal - pos_sine is the tracking error, observed
// on a logic analyser in the hardware test. The PLL's sin/cos also drive
// the SRF detector, which turns the load currents sampled with the same
// strobe into the compensation currents of the active power filter. The
// reference-voltage calculation, PWM and inverter that would follow are
// outside this design; the compensation currents are brought out as ports.
//
// Timing: per sample, strobe -> ROM/inputs (1 clock) -> PLL (6 clocks) ->
// err, out_valid (8 clocks after the strobe). The SRF detector starts with
// the PLL and delivers ic_valid 6 clocks after the strobe.
// The structure follows the document; the input multiplexer and the
// signal names are this design's.
module ddsrf_fpga_top
  import ddsrf_pkg::*;
#(
  parameter int unsigned DIV = 25000        // 125 MHz / 5 kHz
) (
  input  logic               clk,          // 125 MHz global clock
  input  logic               rst_n,
  input  logic               use_rom,      // 1: test ROM drives the PLL
  input  q15_t               va_ext,
  input  q15_t               vb_ext,
  input  q15_t               vc_ext,
  input  q15_t               il_a,
  input  q15_t               il_b,
  input  q15_t               il_c,
  output logic               sample_tick_o,
  output logic        [17:0] theta,
  output q15_t               sin_theta,
  output q15_t               cos_theta,
  output q15_t               pos_sine,
  output q15_t               ideal_sine,
  output q15_t               err,
  output logic signed [24:0] freq,
  output vec2_t              vpos,
  output vec2_t              vneg,
  output logic               out_valid,
  output q15_t               ic_a,
  output q15_t               ic_b,
  output q15_t               ic_c,
  output sig_t               id_bar,       // active positive-sequence current (dc of i_d)
  output logic               ic_valid
);
  logic    tick, rom_valid, pll_valid;
  q15_t    rva, rvb, rvc, rideal;
  q15_t    va, vb, vc, ideal_r;
  q15_t    ila_r, ilb_r, ilc_r;
  sincos_t sc;

  sample_tick #(.DIV(DIV)) u_tick (.clk, .rst_n, .tick);
  assign sample_tick_o = tick;

  stimulus_rom u_rom (
    .clk, .rst_n, .en(tick),
    .va(rva), .vb(rvb), .vc(rvc), .ideal(rideal), .valid(rom_valid)
  );

  // Sample the external inputs on the strobe, aligned with the ROM read.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      {ila_r, ilb_r, ilc_r} <= '0;
      {va, vb, vc} <= '0;
    end else if (tick) begin
      {ila_r, ilb_r, ilc_r} <= {il_a, il_b, il_c};
      {va, vb, vc} <= {va_ext, vb_ext, vc_ext};
    end
  end

  q15_t pva, pvb, pvc;
  always_comb begin
    pva = use_rom ? rva : va;
    pvb = use_rom ? rvb : vb;
    pvc = use_rom ? rvc : vc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)         ideal_r <= '0;
    else if (rom_valid) ideal_r <= rideal;
  end

  ddsrf_pll u_pll (
    .clk, .rst_n, .en(rom_valid),
    .va(pva), .vb(pvb), .vc(pvc),
    .theta, .sc, .w(freq), .vpos, .vneg, .valid(pll_valid)
  );

  always_comb begin
    sin_theta = sc.s;
    cos_theta = sc.c;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos_sine   <= '0;
      ideal_sine <= '0;
      err        <= '0;
      out_valid  <= 1'b0;
    end else begin
      out_valid <= pll_valid;
      if (pll_valid) begin
        pos_sine   <= sc.c;
        ideal_sine <= ideal_r;
        err        <= sat_q15(64'(ideal_r) - 64'(sc.c));
      end
    end
  end

  // The PLL phase produced from sample n-1 is the phase expected at sample
  // n (the VCO integrator is T*z/(z-1)); this is also the phase the PLL
  // rotates sample n with, so the detector takes sample n together with the
  // PLL's sin/cos still on its outputs when the sample starts.
  srf_detector u_srf (
    .clk, .rst_n, .en(rom_valid),
    .il_a(ila_r), .il_b(ilb_r), .il_c(ilc_r), .sc,
    .ic_a, .ic_b, .ic_c, .id_bar, .valid(ic_valid)
  );
endmodule
