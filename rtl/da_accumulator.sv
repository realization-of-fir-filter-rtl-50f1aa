// da_accumulator: the add/subtract and scaling accumulator of a DA engine.
//
// The bits of the tap words arrive least significant first. For bit n the
// look-up table gives L(n) = sum_k h(k) * b_k(n), and the inner product is
//   y = sum_{n=0}^{DATA_W-2} L(n) * 2^n  -  L(DATA_W-1) * 2^(DATA_W-1),
// the minus sign coming from the two's complement sign bit. The accumulator
// computes it with one adder/subtractor and a right shift in its feedback
// path:
//   acc <= (first ? 0 : acc >>> 1)  +/-  L(n) * 2^(DATA_W-1)
// subtracting on the sign-bit step. Every right shift is exact (the bits it
// drops are zero), so after DATA_W steps acc is y with no rounding: y is an
// integer whose real value is y * 2^-(coefficient fraction bits + DATA_W-1).
//
// Interface and timing: one step per clock while `step_valid` is high;
// `step_first` marks the LSB step, `step_sign` the sign-bit step. At the edge
// that ends the sign-bit step the result is written to `y` and `y_valid`
// pulses for one cycle; `y` then holds until the next result. Synchronous
// active-high reset clears both.
module da_accumulator #(
  parameter int unsigned IN_W   = fir_da_pkg::SUM_W,
  parameter int unsigned DATA_W = fir_da_pkg::DATA_W,
  localparam int unsigned ACC_W = IN_W + DATA_W
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   step_valid,
  input  logic                   step_first,
  input  logic                   step_sign,
  input  logic signed [IN_W-1:0] partial,
  output logic signed [ACC_W-1:0] y,
  output logic                   y_valid
);

  logic signed [ACC_W-1:0] acc, base, addend, next;

  always_comb begin
    addend = ACC_W'(partial) <<< (DATA_W - 1);
    // Written as an if so that the shift stays arithmetic (signed context).
    if (step_first) base = '0;
    else            base = acc >>> 1;
    next   = step_sign ? (base - addend) : (base + addend);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= 1'b0;
      if (step_valid) begin
        acc <= next;
        if (step_sign) begin
          y       <= next;
          y_valid <= 1'b1;
        end
      end
    end
  end

endmodule
