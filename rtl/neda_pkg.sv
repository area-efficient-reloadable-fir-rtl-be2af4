// neda_pkg: constants shared by the NEDA FIR filter modules.
//
// The filter works on two's-complement fractional numbers. Coefficients are
// 8-bit with 7 fraction bits (sign bit weighted -2^0, bit b weighted 2^(b-7)),
// as the design specifies. The input samples use the same 8-bit, 7-fraction
// format; that choice for the data is this design's own (the data width of 8
// bits is specified, its binary point is not). The default filter has 7 taps.
//
// Width rules (derived, not specified):
//   partial sum of one coefficient bit plane: DATA_W + clog2(TAPS) bits,
//     enough for TAPS samples of DATA_W bits all at the most negative value;
//   filter output: partial-sum width + COEF_W bits, with 7 + 7 = 14
//     fraction bits (sample fraction bits plus coefficient fraction bits).
package neda_pkg;

  parameter int unsigned DEF_TAPS      = 7;  // taps of the main filter
  parameter int unsigned DEF_DATA_W    = 8;  // input sample width
  parameter int unsigned DEF_COEF_W    = 8;  // coefficient width (sfix 8_7)

  // Width of the sum of `taps` signed samples of `data_w` bits.
  function automatic int unsigned psum_width(int unsigned data_w, int unsigned taps);
    return data_w + $clog2(taps);
  endfunction

  // Width of the filter output: partial sum shifted over coef_w bit planes.
  function automatic int unsigned y_width(int unsigned data_w, int unsigned coef_w,
                                          int unsigned taps);
    return psum_width(data_w, taps) + coef_w;
  endfunction

endpackage
