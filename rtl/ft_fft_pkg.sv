// Shared constants and types of the fault-tolerant parallel FFT design.
//
// The design protects four FFTs that run in parallel on different input
// frames. N_FFT = 4 is the configuration the protection schemes are presented
// with. The FFT size, the sample width and the twiddle precision are not fixed
// by the schemes; the defaults below are this design's own choice (8 points,
// 12-bit complex samples, 14 fractional twiddle bits).
//
// err_loc_e names which of the four protected FFTs a check pattern points to.
package ft_fft_pkg;

  localparam int N_FFT    = 4;   // protected FFTs
  localparam int N_POINTS = 8;   // FFT length
  localparam int IN_W     = 12;  // signed width of the real and imaginary input parts
  localparam int TW_F     = 14;  // fractional bits of the twiddle factors

  // Location of a single error found by the checks.
  typedef enum logic [2:0] {
    LOC_NONE   = 3'd0,  // every check passed
    LOC_FFT1   = 3'd1,
    LOC_FFT2   = 3'd2,
    LOC_FFT3   = 3'd3,
    LOC_FFT4   = 3'd4,
    LOC_UNCORR = 3'd7   // checks failed in a pattern no single FFT explains
  } err_loc_e;

endpackage
