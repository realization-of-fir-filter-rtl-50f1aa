// da_fir_core: multiplier-free FIR inner product by distributed arithmetic.
//
// Computes y = sum_{k=0}^{TAPS-1} h(k) * x_taps[k] for TAPS parallel tap words
// (x_taps[0] is the newest sample, x_taps[k] the sample k periods older).
// Each tap word goes into a da_shift_reg; every clock the registers present
// one bit of each word, LSB first, as the address of the divided look-up
// table (da_lut_bank), whose output is the sum of the coefficients selected
// by those bits. da_accumulator adds these sums with a one-bit right shift
// per step and subtracts the one for the sign bits. da_ctrl sequences it.
//
// An optional register between the table and the accumulator (LUT_REG = 1)
// shortens the critical path at the cost of one clock of latency; the basic
// structure leaves it out (LUT_REG = 0, the default).
//
// Interface and timing: x_taps is taken on the edge where in_valid and
// in_ready are both high. y (Y_W bits, real value y * 2^-(COEF_FRAC+DATA_W-1),
// 2^-18 by default) is written DATA_W+LUT_REG clocks after that edge and
// y_valid pulses in the following cycle, i.e. latency DATA_W+1+LUT_REG clocks
// from the accepting cycle to y_valid. A new sample is accepted every DATA_W
// clocks. `sign` is high while the sign-bit step is in progress.
// The coefficient values follow the filter specification; the handshake, the
// output width (full precision) and the reset are this design's choices.
module da_fir_core #(
  parameter int unsigned TAPS       = fir_da_pkg::TAPS,
  parameter int unsigned DATA_W     = fir_da_pkg::DATA_W,
  parameter int unsigned COEF_W     = fir_da_pkg::COEF_W,
  parameter int unsigned LUT_INPUTS = fir_da_pkg::LUT_INPUTS,
  parameter bit          LUT_REG    = 1'b0,
  parameter logic [TAPS-1:0][COEF_W-1:0] COEFS = fir_da_pkg::LPF_COEFS,
  localparam int unsigned SUM_W = COEF_W + $clog2(TAPS),
  localparam int unsigned Y_W   = SUM_W + DATA_W
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         in_valid,
  output logic                         in_ready,
  input  logic [TAPS-1:0][DATA_W-1:0]  x_taps,
  output logic signed [Y_W-1:0]        y,
  output logic                         y_valid,
  output logic                         sign
);

  logic load, shift, step_valid, step_first, step_sign;
  logic [TAPS-1:0] bits;
  logic signed [SUM_W-1:0] lut_sum;

  da_ctrl #(.DATA_W(DATA_W)) u_ctrl (
    .clk, .rst, .in_valid, .in_ready, .load, .shift,
    .step_valid, .step_first, .step_sign
  );

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    da_shift_reg #(.DATA_W(DATA_W)) u_sr (
      .clk, .rst, .load, .shift,
      .d       (x_taps[k]),
      .bit_out (bits[k])
    );
  end

  da_lut_bank #(
    .TAPS   (TAPS),
    .P      (LUT_INPUTS),
    .COEF_W (COEF_W),
    .COEFS  (COEFS)
  ) u_lut (
    .bits (bits),
    .sum  (lut_sum)
  );

  // Optional pipeline register after the table; the step flags travel with
  // the table output so the accumulator sees them together.
  logic                    acc_valid, acc_first, acc_sign;
  logic signed [SUM_W-1:0] acc_in;

  if (LUT_REG) begin : g_lut_reg
    always_ff @(posedge clk) begin
      if (rst) begin
        acc_valid <= 1'b0;
        acc_first <= 1'b0;
        acc_sign  <= 1'b0;
        acc_in    <= '0;
      end else begin
        acc_valid <= step_valid;
        acc_first <= step_first;
        acc_sign  <= step_sign;
        acc_in    <= lut_sum;
      end
    end
  end else begin : g_no_lut_reg
    assign acc_valid = step_valid;
    assign acc_first = step_first;
    assign acc_sign  = step_sign;
    assign acc_in    = lut_sum;
  end

  da_accumulator #(.IN_W(SUM_W), .DATA_W(DATA_W)) u_acc (
    .clk, .rst,
    .step_valid (acc_valid),
    .step_first (acc_first),
    .step_sign  (acc_sign),
    .partial    (acc_in),
    .y, .y_valid
  );

  assign sign = acc_sign;

endmodule
