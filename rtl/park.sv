// park: rotation of a stationary alpha-beta vector into a dq frame.
//
// Computes
//   d =  cos(th)*alpha + sin(th)*beta
//   q = -sin(th)*alpha + cos(th)*beta
// which is [T_dq] of the SRF method and [T_dq+1] of the DDSRF-PLL when
// the frame angle th is the PLL phase. The negative-sequence frame
// [T_dq-1] rotates by -th; it is the same module fed with the sine
// negated, which the enclosing PLL does. cos/sin are 16b/Q15 from the
// look-up table, the vector is 18b/Q15, products are rounded to Q15 and
// saturated to 18 bits. The rotation is the document's; the widths and
// rounding are this design's.
//
// Timing: operands are taken when `en` is high; the result appears one
// clock later with `valid` high for one cycle.
module park
  import ddsrf_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  sig_t    alpha,
  input  sig_t    beta,
  input  sincos_t th,
  output vec2_t   dq,
  output logic    valid
);
  logic signed [63:0] d_w, q_w;

  always_comb begin
    d_w =  64'(th.c) * 64'(alpha) + 64'(th.s) * 64'(beta);
    q_w = -64'(th.s) * 64'(alpha) + 64'(th.c) * 64'(beta);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dq    <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        dq.d <= sat_sig(rshift_round(d_w));
        dq.q <= sat_sig(rshift_round(q_w));
      end
    end
  end
endmodule
