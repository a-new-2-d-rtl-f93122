// iir2d_pkg: number formats and sizes shared by the locally broadcast 2-D
// IIR/FIR filter and its cascade form.
//
// All samples travel in raster-scan order, one pixel per enabled clock, so a
// vertical delay z1^-1 is a delay of IMG_M samples and a horizontal delay
// z2^-1 is one sample. The filter structure (rows of PE0, chains of PE1, the
// z^-P registers) follows the published architecture; the word lengths, the
// image width and P are this design's own choices, since none is fixed by the
// architecture:
//   * input/output samples  : DATA_W-bit two's complement
//   * coefficients          : COEF_W-bit two's complement, COEF_FRAC fraction bits
//   * products              : full product, arithmetic shift right by COEF_FRAC
//                             (truncation), kept at ACC_W bits
//   * partial sums, SR words: ACC_W bits, wrap-around (modulo 2^ACC_W)
//   * filter output y       : ACC_W sum saturated to DATA_W bits; this value is
//                             also the one fed back to the recursive taps
package iir2d_pkg;
  localparam int unsigned DATA_W    = 16;
  localparam int unsigned COEF_W    = 16;
  localparam int unsigned COEF_FRAC = 12;
  localparam int unsigned ACC_W     = 24;
  // Image width M (samples per raster line) and the horizontal advance P of
  // the reordering, 1 <= P <= M-1.
  localparam int unsigned IMG_M     = 512;
  localparam int unsigned ADV_P     = 1;
  // Order of one section of the cascade form (second order in both directions).
  localparam int unsigned SEC_N     = 2;
endpackage
