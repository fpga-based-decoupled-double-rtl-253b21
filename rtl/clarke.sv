// clarke: three-phase (abc) to stationary alpha-beta transform.
//
// Implements the power-invariant matrix
//   [C] = sqrt(2/3) * [ 1  -1/2   -1/2      ]
//                     [ 0  sqrt3/2 -sqrt3/2 ]
// given for the load currents of the SRF method and used again as the
// [T_ab] block that feeds the DDSRF-PLL. It is computed as
//   alpha = sqrt(2/3)/2 * (2a - b - c),  beta = (1/sqrt2) * (b - c)
// with both gains as Q15 constants and round-to-nearest. Inputs are
// 16b/Q15, outputs 18b/Q15 (a full-scale input gives |alpha| up to 1.63).
// The matrix is the document's; the widths and rounding are this design's.
//
// Timing: the inputs are taken when `en` is high and the result appears
// on the outputs one clock later, with `valid` high for that one cycle.
module clarke
  import ddsrf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  q15_t a,
  input  q15_t b,
  input  q15_t c,
  output sig_t alpha,
  output sig_t beta,
  output logic valid
);
  logic signed [63:0] sum_a, diff_b, prod_a, prod_b;

  always_comb begin
    sum_a  = 64'(2 * 64'(a)) - 64'(b) - 64'(c);
    diff_b = 64'(b) - 64'(c);
    prod_a = sum_a * 64'(K_SQRT_2_3);                // Q15 * Q15, /2 below
    prod_b = diff_b * 64'(K_INV_SQRT2);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      alpha <= '0;
      beta  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        alpha <= sat_sig((prod_a + 64'sd32768) >>> (FRAC + 1));
        beta  <= sat_sig(rshift_round(prod_b));
      end
    end
  end
endmodule
