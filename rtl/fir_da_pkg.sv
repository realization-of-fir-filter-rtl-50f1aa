// fir_da_pkg: constants shared by the distributed-arithmetic FIR filter.
//
// The filter is an 8-tap low-pass FIR (cut-off 1.5 MHz at a 5 MHz sample
// rate, Hamming window). Its coefficients
//   h = {0.0022, -0.0320, 0.0418, 0.4880, 0.4880, 0.0418, -0.0320, 0.0022}
// are held as 12-bit two's complement numbers with 11 fraction bits (Q1.11),
// i.e. round(h * 2048) = {5, -66, 86, 999, 999, 86, -66, 5}. Input samples are
// 8-bit two's complement fractions (Q1.7: 8'h40 = +0.5, 8'hC0 = -0.5).
// The tap count, the sample width, the 11 fraction bits and the coefficient
// values are the filter's specification; the 12-bit coefficient word,
// round-to-nearest quantisation and the 4-input LUT partition are choices of
// this implementation.
package fir_da_pkg;

  localparam int unsigned TAPS       = 8;   // filter length, h(0)..h(7)
  localparam int unsigned DATA_W     = 8;   // input sample width (Q1.7)
  localparam int unsigned COEF_W     = 12;  // coefficient width (Q1.11)
  localparam int unsigned COEF_FRAC  = 11;  // coefficient fraction bits
  localparam int unsigned LUT_INPUTS = 4;   // address bits of one LUT partition

  // Coefficients, packed so that element k is h(k).
  localparam logic [TAPS-1:0][COEF_W-1:0] LPF_COEFS = {
    12'sd5, -12'sd66, 12'sd86, 12'sd999,    // h(7) h(6) h(5) h(4)
    12'sd999, 12'sd86, -12'sd66, 12'sd5     // h(3) h(2) h(1) h(0)
  };

  // Width of a LUT sum over all taps; the accumulator and the output add
  // DATA_W bits to it.
  localparam int unsigned SUM_W = COEF_W + $clog2(TAPS);

endpackage
