// Shared sizes of the 4-tap offset-binary-coded (OBC) distributed-arithmetic
// FIR filter. TAPS, XW and WW are the filter's published configuration
// (4 taps, 4-bit samples, 8-bit weights); the derived widths are this
// design's own, chosen so that no intermediate value can overflow:
//   LUT_DW : a doubled OBC word is w0 +/- w1 +/- w2 +/- w3, |.| <= 4*128,
//            so WW + log2(TAPS) + 1 bits.
//   ACC_W  : the running shift-accumulator value stays below 3*2^(LUT_DW-2)
//            in magnitude, so one bit more than a LUT word.
//   Y_W    : |y| <= TAPS * 2^(XW-1) * 2^(WW-1), so WW + XW + log2(TAPS) bits.
package da_fir_pkg;
  localparam int unsigned TAPS   = 4;
  localparam int unsigned XW     = 4;
  localparam int unsigned WW     = 8;
  localparam int unsigned LUT_DW = WW + $clog2(TAPS) + 1;
  localparam int unsigned ACC_W  = LUT_DW + 1;
  localparam int unsigned Y_W    = WW + XW + $clog2(TAPS);
endpackage
