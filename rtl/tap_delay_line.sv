// tap_delay_line: the FIR tap history X(0)..X(TAPS-1).
//
// The DA core takes all taps in parallel: X(0) is the current input sample
// x(n) and X(k) is x(n-k). This block builds them from a single sample
// stream with TAPS-1 word registers. X(0) is the input itself
// (combinational); on each `advance` the history moves one place, so in the
// cycle of the next advance X(k) shows the sample taken k advances earlier.
// Reset clears the history, so samples before time zero read as 0, which
// gives the filter's start-up outputs y(0) = h(0)x(0), y(1) = h(0)x(1) +
// h(1)x(0), and so on.
//
// Interface: `advance` must be high exactly in the cycles where the consumer
// takes `taps`. Synchronous active-high reset.
module tap_delay_line #(
  parameter int unsigned TAPS   = fir_da_pkg::TAPS,
  parameter int unsigned DATA_W = fir_da_pkg::DATA_W
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        advance,
  input  logic [DATA_W-1:0]           x_in,
  output logic [TAPS-1:0][DATA_W-1:0] taps
);

  logic [TAPS-1:1][DATA_W-1:0] hist;

  always_ff @(posedge clk) begin
    if (rst) begin
      hist <= '0;
    end else if (advance) begin
      hist[1] <= x_in;
      for (int k = 2; k < TAPS; k++) hist[k] <= hist[k-1];
    end
  end

  always_comb begin
    taps[0] = x_in;
    for (int k = 1; k < TAPS; k++) taps[k] = hist[k];
  end

endmodule
