// dwt_pkg: types and constants shared by the polymorphic 5/3 - 9/7 wavelet datapath.
//
// Two select lines steer the shared datapath: the band select picks the low-pass or the
// high-pass output and the wavelet select picks the 5/3 or the 9/7 filter. Both are
// enumerations here. Samples travel as signed fixed-point words of DATA_W bits with
// FRAC_BITS fractional bits; an 8-bit pixel enters as pixel * 2**FRAC_BITS. Inside the
// filter every product is kept exactly at 64 times its value (COEF_SHIFT = 6), because all
// filter taps used are multiples of 1/64, and the result is rounded back at the output.
// The word widths and the rounding are this design's choices.
package dwt_pkg;

  typedef enum logic {
    BAND_LOW  = 1'b0,
    BAND_HIGH = 1'b1
  } band_t;

  typedef enum logic {
    WAV_53 = 1'b0,
    WAV_97 = 1'b1
  } wavelet_t;

  localparam int unsigned PIXEL_W    = 8;   // image samples enter as 8-bit values
  localparam int unsigned DATA_W     = 16;  // sample word inside the transform
  localparam int unsigned FRAC_BITS  = 4;   // fractional bits of a sample word
  localparam int unsigned COEF_SHIFT = 6;   // all taps are k / 2**COEF_SHIFT
  localparam int unsigned ACC_W      = 24;  // exact datapath width (DATA_W + 8)
  localparam int unsigned TAPS       = 9;   // longest filter: 9/7 low-pass

endpackage
