// dwt_pkg: widths, number formats and default filter coefficients shared by
// the poly-phase DWT modules.
//
// Number formats (this design's choice; the source fixes only the 8-bit
// input samples, the 16-bit words of the two-level datapath and the Haar
// coefficient 0.7071):
//   input sample   XW = 8 bits, signed integer
//   stage word     DW = 16 bits, signed, FRAC = 4 fractional bits
//   coefficient    CW = 16 bits, signed, CF = 14 fractional bits
// A filter output is sum(coef * word), rounded half-up back to the stage-word
// format and saturated, so every decomposition level uses the same word.
//
// The default filter is the 2-tap Haar pair used in the worked example:
//   low  g = { c,  c }   high h = { -c, c },   c = 1/sqrt(2)
// Tap k multiplies x[2n+1-k], so a[n] = c*(x[2n]+x[2n+1]) and
// d[n] = c*(x[2n]-x[2n+1]).
package dwt_pkg;

  localparam int XW    = 8;
  localparam int DW    = 16;
  localparam int FRAC  = 4;
  localparam int CW    = 16;
  localparam int CF    = 14;
  localparam int TAPS  = 2;
  localparam int LEVELS = 2;
  localparam int FRAME = 8;

  // round(0.70710678 * 2^14)
  localparam logic signed [CW-1:0] HAAR_C = 16'sd11585;

  // Packed coefficient vectors: element k is tap k.
  localparam logic [TAPS-1:0][CW-1:0] HAAR_LO = {HAAR_C, HAAR_C};
  localparam logic [TAPS-1:0][CW-1:0] HAAR_HI = {HAAR_C, -HAAR_C};

  // Width of a full-precision filter sum of `taps` products.
  function automatic int acc_width(int dw, int cw, int taps);
    return dw + cw + $clog2(taps) + 1;
  endfunction

endpackage
