// rrc_pkg: shared constants and the coefficient set of the 25-tap pulse-shaping
// filter built with distributed arithmetic (DA).
//
// The filter is a linear-phase FIR of order 24 (25 taps) with roll-off 0.5 and
// two samples per symbol, windowed by a Gaussian window. Because the impulse
// response is symmetric, only the 13 distinct coefficients h[0..12] are stored;
// h[12] is the centre tap and h[24-k] = h[k].
//
// Coefficient formula (n = k - 12, L = 2 samples per symbol, beta = 0.5):
//   rc(n) = (1/L) * sinc(n/L) * cos(pi*beta*n/L) / (1 - (2*beta*n/L)^2)
//   w(n)  = exp(-0.5 * (alpha * n / 12)^2),  alpha = 0.5
//   COEF[k] = round(rc(n) * w(n) * 2^15)
// Order, roll-off, the Gaussian window and the centre value 0.5 with zero
// crossings every second tap follow the published design. The window
// parameter alpha = 0.5 is this design's choice: a wide window, which at a
// 48 kHz sample rate puts the first stopband null near 18 kHz with sidelobes
// near -60 dB. The Q1.15 coefficient format and all word widths below are
// also this design's choices. tb_rrc_response recomputes the table from the
// formula and measures the filter's impulse and frequency response.
//
// Number formats: input Q1.15 (16 bit), coefficients Q1.15 (16 bit), output
// Q2.14 (16 bit, truncated toward minus infinity). The filter's absolute
// coefficient sum is about 1.2, so the output cannot overflow Q2.14.
package rrc_pkg;

  localparam int NTAPS     = 25;                    // filter order 24
  localparam int NUNIQ     = (NTAPS + 1) / 2;       // distinct coefficients
  localparam int IN_W      = 16;                    // filter_in width
  localparam int IN_FRAC   = 15;
  localparam int COEF_W    = 16;
  localparam int COEF_FRAC = 15;
  localparam int OUT_W     = 16;                    // filter_out width
  localparam int OUT_FRAC  = 14;
  localparam int SUM_W     = IN_W + 1;              // symmetric pre-add result
  localparam int NBITS     = SUM_W;                 // bit-serial cycles per sample
  localparam int LUT_IN    = 4;                     // address bits per DA LUT partition
  localparam int NPART     = (NUNIQ + LUT_IN - 1) / LUT_IN;
  localparam int LUT_W     = COEF_W + $clog2(LUT_IN);
  localparam int P_W       = LUT_W + $clog2(NPART); // summed partial product
  localparam int ACC_W     = P_W + NBITS;           // shift-accumulator width
  localparam int OUT_SHIFT = IN_FRAC + COEF_FRAC - OUT_FRAC;

  typedef logic signed [IN_W-1:0]   sample_t;
  typedef logic signed [SUM_W-1:0]  presum_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  localparam coef_t COEF [NUNIQ] = '{
     16'sd0,    -16'sd21,    16'sd0,    -16'sd40,    16'sd0,
     16'sd90,    16'sd0,     16'sd275,   16'sd0,    -16'sd1951,
     16'sd0,     16'sd9825,  16'sd16384 };

endpackage
