// fir_pkg: widths shared by the audio FIR filter and its multiplier blocks.
// The filter takes 16-bit signed audio samples. Its coefficients
// {23, 81, 81, 23} sum to 208 < 2^8, so a full-precision output needs
// 16 + 8 = 24 bits and can never overflow. The 16-bit sample width follows the
// source design; the coefficient set and the output width are this design's
// choice.
package fir_pkg;
  localparam int unsigned XW     = 16;  // audio sample width
  localparam int unsigned YW     = 24;  // filter output / partial-sum width
  localparam int unsigned NTAPS  = 4;   // filter length
endpackage
