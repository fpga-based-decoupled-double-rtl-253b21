// ddsrf_pkg: fixed-point types, constants and helpers shared by the
// DDSRF-PLL datapath.
//
// Every signal is a two's-complement fixed-point number with 15 fractional
// bits (Q15). Sampled voltages, currents, sine and cosine values enter and
// leave the design as 16-bit Q15 words, as the loop-filter, LPF and LUT
// descriptions require. Inside the voltage path (alpha-beta and both dq
// frames) the words are widened to 18 bits so that a power-invariant
// transform of a full-scale input (gain up to 1.63) cannot overflow; the
// extra width is a choice of this design. Narrowing always saturates.
package ddsrf_pkg;

  localparam int unsigned FRAC = 15;         // fractional bits of every Q15 word
  localparam int unsigned IO_W = 16;         // width of sampled inputs, sin/cos
  localparam int unsigned SIG_W = 18;        // width of the internal voltage path

  typedef logic signed [IO_W-1:0]  q15_t;    // 16b/Q15
  typedef logic signed [SIG_W-1:0] sig_t;    // 18b/Q15

  // One vector in a rotating (or stationary) two-axis frame.
  typedef struct packed {
    sig_t d;
    sig_t q;
  } vec2_t;

  // Sine and cosine of one angle, 16b/Q15.
  typedef struct packed {
    q15_t s;
    q15_t c;
  } sincos_t;

  // sqrt(2/3) in Q15, the gain of the power-invariant Clarke matrix [C].
  localparam logic signed [16:0] K_SQRT_2_3 = 17'sd26755;
  // 1/sqrt(2) = sqrt(2/3)*sqrt(3)/2 in Q15.
  localparam logic signed [16:0] K_INV_SQRT2 = 17'sd23170;

  // Arithmetic right shift by FRAC with round-half-up.
  function automatic logic signed [63:0] rshift_round(input logic signed [63:0] x);
    return (x + 64'sd16384) >>> FRAC;
  endfunction

  // Saturate a wide signed value to an 18-bit word.
  function automatic sig_t sat_sig(input logic signed [63:0] x);
    if (x > 64'sd131071)       return sig_t'(18'sd131071);
    else if (x < -64'sd131072) return sig_t'(-18'sd131072);
    else                       return sig_t'(x);
  endfunction

  // Saturate a wide signed value to a 16-bit word.
  function automatic q15_t sat_q15(input logic signed [63:0] x);
    if (x > 64'sd32767)       return q15_t'(16'sd32767);
    else if (x < -64'sd32768) return q15_t'(-16'sd32768);
    else                      return q15_t'(x);
  endfunction

  // Saturate a wide signed value to a w-bit signed range (result still 64b).
  function automatic logic signed [63:0] sat_w(input logic signed [63:0] x,
                                               input int unsigned w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (w - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (w - 1));
    if (x > hi)      return hi;
    else if (x < lo) return lo;
    else             return x;
  endfunction

endpackage
