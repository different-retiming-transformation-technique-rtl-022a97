// Shared constants for the retimed FIR filters.
//
// The paper does not give word lengths, so the 16-bit sample and coefficient
// widths here are this design's own choice. The default tap count, 128, is the
// largest filter length the paper evaluates; shorter filters run on it with
// their unused coefficients set to zero. acc_width() gives the accumulator width
// that can hold a full sum of TAPS products without overflow.
package retime_fir_pkg;

  localparam int unsigned DATA_W_DEF = 16;
  localparam int unsigned COEF_W_DEF = 16;
  localparam int unsigned TAPS_DEF   = 128;

  // Bits needed for the exact sum of `taps` products of dw x cw signed operands.
  function automatic int unsigned acc_width(int unsigned dw, int unsigned cw,
                                            int unsigned taps);
    return dw + cw + ((taps > 1) ? $clog2(taps) : 0);
  endfunction

endpackage
