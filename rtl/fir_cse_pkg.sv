// fir_cse_pkg -- constants shared by the 12-tap CSE FIR filter and its blocks.
//
// The filter has 12 taps whose coefficients are 12-digit canonic signed digit
// (CSD) fractions: digit position p (1..12) weighs 2^-p. The RTL works on
// integers, so every coefficient is scaled by 2^CoefWl and a digit at position
// p becomes a left shift by (CoefWl - p). Only the first half of the taps is
// distinct; the second half mirrors it (linear phase).
//
// Output growth: the sum of the magnitudes of the twelve scaled coefficients
// is 2 * (629 + 668 + 133 + 338 + 306 + 1188) = 6524 < 2^13, so a DATA_W-bit
// signed sample times the filter fits in DATA_W + OutGrowth bits, signed,
// without any possibility of overflow.
package fir_cse_pkg;

  // CSD word length of the coefficients (digit positions 1..12).
  localparam int unsigned CoefWl   = 12;
  // Filter length; taps NumTaps/2..NumTaps-1 mirror taps 0..NumTaps/2-1.
  localparam int unsigned NumTaps  = 12;
  // Bits the full-precision output needs above the sample width.
  localparam int unsigned OutGrowth = 13;

endpackage
