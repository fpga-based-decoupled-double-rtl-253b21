// srf_detector: synchronous-reference-frame compensation current detection.
//
// For a shunt active power filter, the current the filter must inject is
// everything in the load current except the positive-sequence active
// fundamental. The three load currents are transformed to alpha-beta with
// [C] and rotated into the frame of the PLL phase theta; the positive-
// sequence fundamental becomes the dc part of i_d, and a low-pass filter
// extracts it (i_d_bar). Only i_d_bar is kept (i_q is dropped, full
// compensation), transformed back with [T_dq]^T and [C]^T, and subtracted
// from the load currents:
//   i_c = i_l - [C]^T [T_dq]^T [i_d_bar; 0]
// With the DDSRF-PLL supplying theta the result stays correct when the
// supply voltage is unbalanced. The equations are the document's; the
// filter (the same 40 Hz first-order LPF as the PLL uses, since the document
// gives no separate one), widths and pipelining are this design's.
//
// Ports: il_a..c load currents and sc = sin/cos(theta) (16b/Q15), ic_a..c
// compensation currents (16b/Q15, saturated), id_bar (18b/Q15).
// Timing: inputs are taken on `en`; the outputs appear five clocks later
// with `valid` high for one cycle.
module srf_detector
  import ddsrf_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  q15_t    il_a,
  input  q15_t    il_b,
  input  q15_t    il_c,
  input  sincos_t sc,
  output q15_t    ic_a,
  output q15_t    ic_b,
  output q15_t    ic_c,
  output sig_t    id_bar,
  output logic    valid
);
  sig_t    i_alpha, i_beta;
  vec2_t   idq;
  logic    v_clk, v_park, v_lpf, v_bk;
  sincos_t sc_r;
  q15_t    il_r [3];
  sig_t    f_alpha, f_beta;          // fundamental, back in alpha-beta
  logic signed [63:0] fa_w, fb_w, ka_w, kb_w;
  logic signed [63:0] fund_a, fund_b, fund_c;

  // Hold the sample's currents and angle for the later stages.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sc_r <= '{s: q15_t'(0), c: q15_t'(32767)};
      il_r <= '{default: '0};
    end else if (en) begin
      sc_r <= sc;
      il_r <= '{il_a, il_b, il_c};
    end
  end

  clarke u_clarke (
    .clk, .rst_n, .en, .a(il_a), .b(il_b), .c(il_c),
    .alpha(i_alpha), .beta(i_beta), .valid(v_clk)
  );

  park u_park (
    .clk, .rst_n, .en(v_clk), .alpha(i_alpha), .beta(i_beta), .th(sc_r),
    .dq(idq), .valid(v_park)
  );

  lpf u_lpf (
    .clk, .rst_n, .en(v_park), .x(idq.d), .y(id_bar), .valid(v_lpf)
  );

  // [T_dq]^T [id_bar; 0] = [cos*id_bar; sin*id_bar]
  always_comb begin
    fa_w = rshift_round(64'(sc_r.c) * 64'(id_bar));
    fb_w = rshift_round(64'(sc_r.s) * 64'(id_bar));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      f_alpha <= '0;
      f_beta  <= '0;
      v_bk    <= 1'b0;
    end else begin
      v_bk <= v_lpf;
      if (v_lpf) begin
        f_alpha <= sat_sig(fa_w);
        f_beta  <= sat_sig(fb_w);
      end
    end
  end

  // [C]^T: a = sqrt(2/3)*alpha, b,c = -sqrt(2/3)/2*alpha +/- beta/sqrt2
  always_comb begin
    ka_w   = 64'(f_alpha) * 64'(K_SQRT_2_3);
    kb_w   = 64'(f_beta) * 64'(K_INV_SQRT2);
    fund_a = rshift_round(ka_w);
    fund_b = ((-ka_w + 64'sd32768) >>> (FRAC + 1)) + rshift_round(kb_w);
    fund_c = ((-ka_w + 64'sd32768) >>> (FRAC + 1)) - rshift_round(kb_w);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ic_a  <= '0;
      ic_b  <= '0;
      ic_c  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= v_bk;
      if (v_bk) begin
        ic_a <= sat_q15(64'(il_r[0]) - fund_a);
        ic_b <= sat_q15(64'(il_r[1]) - fund_b);
        ic_c <= sat_q15(64'(il_r[2]) - fund_c);
      end
    end
  end
endmodule
