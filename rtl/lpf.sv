// lpf: first-order Butterworth IIR low-pass filter.
//
// Realises H(z) = (B0 + B0 z^-1) / (1 - A1 z^-1), a 40 Hz cut-off at the
// 5 kHz sampling rate, with B0 = 0.0245 and A1 = 0.9510 held as 16-bit Q15
// coefficients (803 and 31162, whose dc gain 2*803/(32768-31162) is exactly
// one). One update per sample:
//   y[n] = B0*(x[n] + x[n-1]) + A1*y[n-1]
// The sum is rounded to Q15 and saturated to 18 bits. The four filters of
// the decoupling network are identical instances of this module, and the
// SRF current detector uses one more. Transfer function and coefficient
// format follow the document; the direct-form structure, the 18-bit state
// and the rounding are this design's.
//
// Timing: x is taken on `en`; y is the filter output after that update,
// one clock later, with `valid` high for one cycle. y holds between updates.
module lpf
  import ddsrf_pkg::*;
#(
  parameter logic signed [15:0] B0 = 16'sd803,     // 0.0245 in Q15
  parameter logic signed [15:0] A1 = 16'sd31162    // 0.9510 in Q15
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  sig_t x,
  output sig_t y,
  output logic valid
);
  sig_t x1;                               // x[n-1]
  logic signed [63:0] acc;

  always_comb
    acc = 64'(B0) * (64'(x) + 64'(x1)) + 64'(A1) * 64'(y);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x1    <= '0;
      y     <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        x1 <= x;
        y  <= sat_sig(rshift_round(acc));
      end
    end
  end
endmodule
