// loop_filter: proportional-integral loop filter of the PLL.
//
// The error input is the decoupled positive-sequence q voltage. Two
// branches run in parallel on every sample:
//   integral:      s[n] = s[n-1] + e[n]            (18b/Q15 register)
//                  i[n] = (T*Ki) * s[n]            (20b/Q15)
//   proportional:  p[n] = Kp * e[n]                (22b/Q15)
//   output:        u[n] = i[n] + p[n]              (24b/Q15, rad/s)
// This is the discrete integrator T*z/(z-1) with the sampling period T
// folded into the gain, so the accumulator holds the plain sum of errors.
// Ki = (35*pi)^2 and Kp = 1.414*35*pi (damping 0.707), T = 0.2 ms, so
// T*Ki = 2.41812 (79235 in Q15, 17 bits unsigned) and Kp = 155.478
// (5094684 in Q15, 23 bits unsigned). Gains, structure and every word
// width follow the document's loop-filter diagram; saturating at each
// width (instead of wrapping) and rounding the products are this design's
// own choices, taken so that a large start-up error cannot wrap around.
//
// Timing: e is taken on `en`, u appears one clock later with `valid`.
module loop_filter
  import ddsrf_pkg::*;
#(
  parameter int unsigned TKI = 79235,        // T*Ki in Q15
  parameter int unsigned KP  = 5094684,      // Kp in Q15
  parameter int unsigned ACC_W = 18,         // integrator register width
  parameter int unsigned I_W   = 20,         // integral product width
  parameter int unsigned P_W   = 22,         // proportional product width
  parameter int unsigned OUT_W = 24          // output width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  q15_t                    e,
  output logic signed [OUT_W-1:0] u,
  output logic                    valid
);
  logic signed [ACC_W-1:0] acc;
  logic signed [63:0] sum_w, i_w, p_w;
  logic signed [OUT_W-1:0] u_w;

  always_comb begin
    sum_w = sat_w(64'(acc) + 64'(e), ACC_W);
    i_w   = sat_w(rshift_round(sum_w * $signed(64'(TKI))), I_W);
    p_w   = sat_w(rshift_round(64'(e) * $signed(64'(KP))), P_W);
    u_w   = OUT_W'(sat_w(i_w + p_w, OUT_W));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc   <= '0;
      u     <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        acc <= ACC_W'(sum_w);
        u   <= u_w;
      end
    end
  end
endmodule
