// decoupling_cell: one decoupling cell (DC) of the DDSRF-PLL.
//
// In the dq frame rotating with +theta the negative-sequence vector shows up
// as an oscillation at twice the line frequency, and vice versa. The cell
// subtracts that oscillation, estimated from the low-pass filtered
// (dc) components of the other frame rotated by the angle between the two
// frames:
//   d* = d - ( cos(2th)*dbar + sin(2th)*qbar )
//   q* = q - (-sin(2th)*dbar + cos(2th)*qbar )
// The DC(+1,-1) cell of the positive frame is fed sin(2th); the DC(-1,+1)
// cell of the negative frame is fed -sin(2th), i.e. it rotates by -2th.
// The document names the cells and their connections (figure of the PLL);
// the equations are the standard decoupling cell of the double-SRF PLL, and
// the widths, rounding and saturation are this design's.
//
// Ports: x (dq vector of this frame, 18b/Q15), xbar (filtered dq vector of
// the other frame), rot (cos/sin of the angle between frames, 16b/Q15),
// y (decoupled vector). Timing: taken on `en`, result one clock later with
// `valid` high for one cycle.
module decoupling_cell
  import ddsrf_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  vec2_t   x,
  input  vec2_t   xbar,
  input  sincos_t rot,
  output vec2_t   y,
  output logic    valid
);
  logic signed [63:0] od_w, oq_w, d_w, q_w;

  always_comb begin
    od_w =  64'(rot.c) * 64'(xbar.d) + 64'(rot.s) * 64'(xbar.q);
    oq_w = -64'(rot.s) * 64'(xbar.d) + 64'(rot.c) * 64'(xbar.q);
    d_w  = 64'(x.d) - rshift_round(od_w);
    q_w  = 64'(x.q) - rshift_round(oq_w);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y     <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        y.d <= sat_sig(d_w);
        y.q <= sat_sig(q_w);
      end
    end
  end
endmodule
