// stimulus_rom: on-chip test-signal ROMs for the hardware verification.
//
// Holds one 20 ms period (100 samples at 5 kHz) of an unbalanced, distorted
// three-phase voltage and of the ideal PLL output. With x = 2*pi*k/100:
//   v+ = 0.6  sin(x + pi/3)    positive sequence (b: -2pi/3, c: +2pi/3)
//   v- = 0.07 sin(x + pi/4)    negative sequence (b: +2pi/3, c: -2pi/3)
//   v0 = 0.02 sin(x + pi/8)    zero sequence, equal in all phases
//   ha = 0.1 sin(3x + pi/2), hb = 0.1 sin(3x + pi/5), hc = 0.2 sin(3x + pi/5)
//   va = v+a + v-a + v0 + ha  (likewise b, c)
//   ideal = sin(x + pi/3)      unit sine in phase with v+ of phase a
// Each is stored as round(32767*value) in 16b/Q15; one 64-bit word per
// sample, {va, vb, vc, ideal}, read from rtl/stimulus_table.hex. The
// signal amplitudes and phases follow the document; the 100-sample length,
// the packing and the phase-b/c rotation of each sequence are this design's.
//
// Timing: each `en` pulse outputs the next sample (starting at k = 0 after
// reset) one clock later with `valid` high; the address wraps after 99.
module stimulus_rom
  import ddsrf_pkg::*;
#(
  parameter int unsigned SAMPLES = 100
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output q15_t va,
  output q15_t vb,
  output q15_t vc,
  output q15_t ideal,
  output logic valid
);
  localparam int unsigned AW = $clog2(SAMPLES);

  logic [63:0]   rom [SAMPLES];
  logic [AW-1:0] addr;
  initial $readmemh("rtl/stimulus_table.hex", rom);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr  <= '0;
      valid <= 1'b0;
      {va, vb, vc, ideal} <= '0;
    end else begin
      valid <= en;
      if (en) begin
        {va, vb, vc, ideal} <= rom[addr];
        addr <= (addr == AW'(SAMPLES - 1)) ? '0 : addr + 1'b1;
      end
    end
  end
endmodule
