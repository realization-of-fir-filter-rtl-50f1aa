// fir_da_top: 8-tap low-pass FIR filter in distributed arithmetic.
//
// The filter (cut-off 1.5 MHz, 5 MHz sampling, Hamming window, coefficients
// in fir_da_pkg) computes y(n) = sum_k h(k) x(n-k) without a multiplier:
// tap_delay_line keeps the last TAPS input samples and da_fir_core evaluates
// the sum bit-serially from look-up tables of precomputed coefficient sums.
//
// Interface: x_in is an 8-bit two's complement fraction (8'h40 = +0.5),
// taken when in_valid and in_ready are both high; one sample is accepted
// every DATA_W clocks, so a 5 MHz sample rate needs a 40 MHz clock. y is the
// full-precision output (23 bits by default), real value y * 2^-18, and
// y_valid pulses DATA_W+1+LUT_REG clocks after the accepting cycle. `sign`
// is high during the sign-bit step of each computation. Synchronous
// active-high reset clears the tap history and the output.
// The structure and the coefficients follow the filter's design; the sample
// handshake, the delay line in hardware (rather than in the stimulus) and the
// widths not fixed by the specification are this design's choices.
module fir_da_top #(
  parameter int unsigned TAPS       = fir_da_pkg::TAPS,
  parameter int unsigned DATA_W     = fir_da_pkg::DATA_W,
  parameter int unsigned COEF_W     = fir_da_pkg::COEF_W,
  parameter int unsigned LUT_INPUTS = fir_da_pkg::LUT_INPUTS,
  parameter bit          LUT_REG    = 1'b0,
  parameter logic [TAPS-1:0][COEF_W-1:0] COEFS = fir_da_pkg::LPF_COEFS,
  localparam int unsigned Y_W = COEF_W + $clog2(TAPS) + DATA_W
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [DATA_W-1:0]     x_in,
  output logic signed [Y_W-1:0] y,
  output logic                  y_valid,
  output logic                  sign
);

  logic [TAPS-1:0][DATA_W-1:0] taps;

  tap_delay_line #(.TAPS(TAPS), .DATA_W(DATA_W)) u_delay (
    .clk, .rst,
    .advance (in_valid && in_ready),
    .x_in,
    .taps
  );

  da_fir_core #(
    .TAPS       (TAPS),
    .DATA_W     (DATA_W),
    .COEF_W     (COEF_W),
    .LUT_INPUTS (LUT_INPUTS),
    .LUT_REG    (LUT_REG),
    .COEFS      (COEFS)
  ) u_core (
    .clk, .rst, .in_valid, .in_ready,
    .x_taps (taps),
    .y, .y_valid, .sign
  );

endmodule
