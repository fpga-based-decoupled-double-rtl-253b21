// sincos_lut: sine/cosine look-up table addressed by the PLL phase.
//
// The range [0, 2*pi) is split into POINTS equal areas; a phase theta lies
// in area p = floor(POINTS*theta/(2*pi)), and the table returns the stored
// value of that area. With POINTS = 128 the table holds one period of
//   ROM[k] = round(32767 * sin(2*pi*k/128)),   k = 0..127   (16b/Q15)
// read from rtl/sine_table.hex. The cosine is read a quarter period later
// (k + 32). The decoupling cells also need sin/cos of 2*theta; these are
// read from the same table at address 2p (mod 128). The area mapping, the
// 128 points and the Q15 format follow the document; one shared table with
// four read ports, the 2*theta read and the address arithmetic are this
// design's. The address is formed by multiplying theta (18b/Q15) by
// round(POINTS/(2*pi) * 2^16) and keeping the integer part; a phase just
// past 2*pi (see vco) wraps to the first areas.
//
// Timing: theta is taken on `en`; both sin/cos pairs appear one clock
// later with `valid` high for one cycle (a registered, block-RAM style read).
// Reset sets both pairs to the values for theta = 0.
module sincos_lut
  import ddsrf_pkg::*;
#(
  parameter int unsigned POINTS = 128,
  parameter int unsigned ADDR_K = 1335088      // POINTS/(2*pi) in Q16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [17:0] theta,
  output sincos_t     sc1,        // sin/cos(theta)
  output sincos_t     sc2,        // sin/cos(2*theta)
  output logic        valid
);
  localparam int unsigned AW = $clog2(POINTS);

  q15_t rom [POINTS];
  initial $readmemh("rtl/sine_table.hex", rom);

  logic [63:0]   prod;
  logic [AW-1:0] p, p_cos, p2, p2_cos;

  always_comb begin
    prod   = 64'(theta) * 64'(ADDR_K);
    p      = AW'(prod >> (FRAC + 16));
    p_cos  = p + AW'(POINTS / 4);
    p2     = {p[AW-2:0], 1'b0};
    p2_cos = p2 + AW'(POINTS / 4);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sc1 <= '{s: q15_t'(0), c: q15_t'(32767)};    // theta = 0
      sc2 <= '{s: q15_t'(0), c: q15_t'(32767)};
    end else if (en) begin
      sc1.s <= rom[p];
      sc1.c <= rom[p_cos];
      sc2.s <= rom[p2];
      sc2.c <= rom[p2_cos];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) valid <= 1'b0;
    else        valid <= en;
  end
endmodule
