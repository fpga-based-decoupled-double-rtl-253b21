// vco: phase integrator with modulo-2*pi wrap ("modified integral").
//
// The frequency input w (rad/s, 25b/Q15) is summed every sample into a
// 32b/Q15 register R. Instead of letting R overflow, the value read back is
// reduced by 2*pi/T whenever R >= 2*pi/T, so R always represents an angle
// in [0, 2*pi) divided by T:
//   f[n]     = R[n-1] - (R[n-1] >= 2pi/T ? 2pi/T : 0)
//   s[n]     = w[n] + f[n]                      (adder output, 32b/Q15)
//   R[n]     = s[n]
//   theta[n] = T * s[n]                          (18b/Q15, unsigned)
// with 2*pi/T = 31415.93 (1029437081 in Q15) and T = 0.2 ms held as a
// 64b/Q63 constant (1844674407370955). Since the wrap is applied when R is
// read, theta can exceed 2*pi by at most T*w (about 0.07 rad) for a single
// sample; the look-up table folds that back into its first entries.
// Structure, comparison, constants and widths follow the document's VCO
// diagram; truncating theta (rather than rounding) is this design's choice.
//
// Timing: w is taken on `en`, theta appears one clock later with `valid`.
module vco
  import ddsrf_pkg::*;
#(
  parameter logic signed [31:0] TWO_PI_T = 32'sd1029437081,       // 2*pi/T, Q15
  parameter logic signed [63:0] T_Q63    = 64'sd1844674407370955  // T, Q63
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic signed [24:0] w,
  output logic        [17:0] theta,
  output logic               valid
);
  logic signed [31:0] r, f, s;
  logic signed [95:0] prod;
  logic        [17:0] theta_w;

  always_comb begin
    f    = (r >= TWO_PI_T) ? r - TWO_PI_T : r;
    s    = 32'(w) + f;
    prod = 96'(s) * 96'(T_Q63);
    theta_w = 18'(prod >>> 63);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r     <= '0;
      theta <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        r     <= s;
        theta <= theta_w;
      end
    end
  end
endmodule
