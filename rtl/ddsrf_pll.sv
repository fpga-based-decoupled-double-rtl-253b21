// ddsrf_pll: decoupled double synchronous reference frame PLL.
//
// Tracks the phase of the positive-sequence fundamental of a three-phase
// voltage that may be unbalanced and distorted. The sampled phase voltages
// are turned into an alpha-beta vector and projected onto two frames, dq+1
// rotating with the PLL phase theta and dq-1 rotating with -theta. In each
// frame the other sequence appears as a 2w ripple; two decoupling cells
// remove it using the low-pass filtered (dc) components of the other frame,
// which four identical 40 Hz LPFs provide. The decoupled positive-sequence
// q component is zero when theta is locked, so it is the phase error. A PI
// loop filter turns it into a frequency deviation, the nominal frequency
// w0 = 100*pi rad/s is added, and the VCO integrates the result into theta,
// wrapped to [0, 2*pi). A 128-point LUT returns sin/cos(theta) for the next
// sample and sin/cos(2*theta) for the decoupling cells.
//
// Convention: with [T_dq] = [cos sin; -sin cos] the d axis locks onto the
// positive-sequence voltage vector, so cos(theta) is in phase with the
// positive-sequence component of phase a when that is written as a cosine;
// for v_a+ = V*sin(wt+phi), cos(theta) = sin(wt+phi).
//
// Timing: one update per sample. The three voltages are taken on `en`; the
// stages clarke, park, decoupling, LPF/loop filter, VCO and LUT each take one
// clock, so the new theta and its sin/cos are on the outputs six clocks
// later, flagged by `valid`. The decoupling cells use the LPF outputs of the
// previous sample (which breaks the algebraic loop through the LPFs), and
// the frames of sample n are rotated with the phase produced by sample n-1.
// The block structure is the document's; the pipelining, the use of the
// previous LPF outputs and the 2*theta look-up are this design's choices.
module ddsrf_pll
  import ddsrf_pkg::*;
#(
  parameter logic signed [24:0] W0 = 25'sd10294371   // 100*pi rad/s in Q15
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,          // one pulse per sample
  input  q15_t               va,
  input  q15_t               vb,
  input  q15_t               vc,
  output logic        [17:0] theta,       // 18b/Q15 phase, [0, 2*pi)
  output sincos_t            sc,          // sin/cos(theta), 16b/Q15
  output logic signed [24:0] w,           // estimated frequency, rad/s Q15
  output vec2_t              vpos,        // filtered dq+1 components
  output vec2_t              vneg,        // filtered dq-1 components
  output logic               valid
);
  sig_t    alpha, beta;
  logic    v_clk, v_park, v_park_n, v_dc, v_dc_n, v_lf, v_vco;
  logic    v_lpf [4];
  vec2_t   dq_p, dq_n, dc_p, dc_n;
  sincos_t sc2, rot_n, th_n;
  logic signed [23:0] u;

  clarke u_clarke (
    .clk, .rst_n, .en,
    .a(va), .b(vb), .c(vc),
    .alpha, .beta, .valid(v_clk)
  );

  // [T_dq+1] rotates by theta, [T_dq-1] by -theta.
  always_comb th_n = '{s: q15_t'(-sc.s), c: sc.c};

  park u_park_pos (
    .clk, .rst_n, .en(v_clk), .alpha, .beta, .th(sc),
    .dq(dq_p), .valid(v_park)
  );
  park u_park_neg (
    .clk, .rst_n, .en(v_clk), .alpha, .beta, .th(th_n),
    .dq(dq_n), .valid(v_park_n)
  );

  // DC(+1,-1) rotates the negative-frame dc values by 2*theta,
  // DC(-1,+1) the positive-frame ones by -2*theta.
  always_comb rot_n = '{s: q15_t'(-sc2.s), c: sc2.c};

  decoupling_cell u_dc_pos (
    .clk, .rst_n, .en(v_park), .x(dq_p), .xbar(vneg), .rot(sc2),
    .y(dc_p), .valid(v_dc)
  );
  decoupling_cell u_dc_neg (
    .clk, .rst_n, .en(v_park), .x(dq_n), .xbar(vpos), .rot(rot_n),
    .y(dc_n), .valid(v_dc_n)
  );

  lpf u_lpf_dp (.clk, .rst_n, .en(v_dc), .x(dc_p.d), .y(vpos.d), .valid(v_lpf[0]));
  lpf u_lpf_qp (.clk, .rst_n, .en(v_dc), .x(dc_p.q), .y(vpos.q), .valid(v_lpf[1]));
  lpf u_lpf_dn (.clk, .rst_n, .en(v_dc), .x(dc_n.d), .y(vneg.d), .valid(v_lpf[2]));
  lpf u_lpf_qn (.clk, .rst_n, .en(v_dc), .x(dc_n.q), .y(vneg.q), .valid(v_lpf[3]));

  loop_filter u_lf (
    .clk, .rst_n, .en(v_dc), .e(sat_q15(64'(dc_p.q))),
    .u, .valid(v_lf)
  );

  always_comb w = 25'(u) + W0;

  vco u_vco (
    .clk, .rst_n, .en(v_lf), .w, .theta, .valid(v_vco)
  );

  sincos_lut u_lut (
    .clk, .rst_n, .en(v_vco), .theta, .sc1(sc), .sc2, .valid
  );

  // The two frames and the four filters always advance together.
  a_frames_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    v_park == v_park_n && v_dc == v_dc_n &&
    v_lpf[0] == v_lf && v_lpf[1] == v_lf && v_lpf[2] == v_lf && v_lpf[3] == v_lf);
  // A new sample must not arrive while the previous one is in the pipeline.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    en |-> !(v_clk || v_park || v_dc || v_lf || v_vco));
endmodule
