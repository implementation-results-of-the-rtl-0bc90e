// dif_pkg: widths, filter coefficients and controller types shared by the
// digital IF processor.
//
// The processor turns a 200 MS/s real IF (two 10-bit samples per 100 MHz clock)
// into a 100 MS/s complex baseband stream of 16-bit I/Q samples.  The widths
// below (10-bit ADC samples, 24-bit full-precision filter results, 16-bit
// outputs cut from bits [19:4]) follow the design description.
//
// Filter coefficients.  The image-reject lowpass has 63 taps.  Its coefficient
// values are this design's own: a Kaiser-windowed sinc,
//   h[n] = round( S * w(n) * sinc(2*fc*(n-31)) / sum_k(w(k)*sinc(2*fc*(k-31))) ),
//   n = 0..62,  fc = 0.125 (25 MHz at 200 MS/s),  Kaiser beta = 6.5,  S = 2044,
// which gives a half-power bandwidth of 2 x 23.5 MHz = 47 MHz, < 0.05 dB pass-band
// ripple and about 52 dB of stop-band attenuation with 10-bit coefficients.
// The taps sum to 2047, so a full-scale tone in the pass band leaves each
// branch at up to about 2^19 and fits the 20-bit window that bits [19:4] keep.
// Because fc = fs/8, every fourth tap away from the centre is zero.
//
// The filter runs as two polyphase branches at 100 MHz: the real branch uses
// the even-indexed taps h[0], h[2], ..., h[62] (32 taps) and the imaginary
// branch the odd-indexed taps h[1], ..., h[61] (31 taps).
package dif_pkg;

  localparam int ADC_W   = 10;  // AD9410 sample width
  localparam int COEF_W  = 10;  // coefficient width (signed)
  localparam int FIR_W   = 24;  // full-precision filter result width
  localparam int OUT_W   = 16;  // output sample width
  localparam int SLICE_LSB = 4; // lowest filter result bit kept (bits [19:4])
  localparam int NTAPS   = 63;  // prototype lowpass length

  typedef logic signed [COEF_W-1:0] coef_t;

  localparam int H [NTAPS] = '{
      0,   0,   0,   0,   1,   2,   2,   0,  -3,  -5,  -5,   0,   7,  12,  10,   0,
    -15, -24, -20,   0,  28,  47,  40,   0, -56, -97, -85,   0, 149, 321, 459, 511,
    459, 321, 149,   0, -85, -97, -56,   0,  40,  47,  28,   0, -20, -24, -15,   0,
     10,  12,   7,   0,  -5,  -5,  -3,   0,   2,   2,   1,   0,   0,   0,   0};

  // Number of taps in polyphase branch `phase` (0: even taps, 1: odd taps).
  function automatic int branch_taps(int phase);
    return (NTAPS - phase + 1) / 2;
  endfunction

  // Tap k of polyphase branch `phase`.
  function automatic coef_t branch_coef(int phase, int k);
    return coef_t'(H[2*k + phase]);
  endfunction

  // Controller outputs, one set per clock (see dif_controller).
  typedef struct packed {
    logic neginput;  // 0: negate bus M, 1: negate bus N
    logic swap;      // 1: exchange real and imaginary
    logic negimag;   // 1: negate the imaginary output
    logic negreal;   // 1: negate the real output
  } dif_ctrl_t;

  typedef enum logic [1:0] {S0 = 2'd0, S1 = 2'd1, S2 = 2'd2, S3 = 2'd3} dif_state_e;

endpackage
