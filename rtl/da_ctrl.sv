// da_ctrl: bit-step sequencer of the DA filter.
//
// A DA engine works on one bit of every tap word per clock, so each sample
// takes DATA_W clocks. This controller takes a sample on a valid/ready
// handshake, loads the tap shift registers, and then runs DATA_W bit steps,
// flagging the first (LSB) step, where the accumulator starts from zero, and
// the last one, the sign bit, where it subtracts (`step_sign`).
//
// Timing: a sample is taken at the edge ending a cycle with in_valid and
// in_ready both high (`load` is high in that cycle). Bit step n (n = 0 ..
// DATA_W-1) then occupies the (n+1)-th following cycle. `in_ready` is high
// when idle and during the sign-bit step, so back-to-back samples are taken
// every DATA_W clocks with no gap; at other times offered samples wait.
// `shift` is high during every step. The handshake and the counter are this
// design's own; the step order (LSB first, sign last, subtract on the sign
// step) follows distributed arithmetic.
module da_ctrl #(
  parameter int unsigned DATA_W = fir_da_pkg::DATA_W
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  output logic in_ready,
  output logic load,
  output logic shift,
  output logic step_valid,
  output logic step_first,
  output logic step_sign
);

  localparam int unsigned CNT_W = (DATA_W > 1) ? $clog2(DATA_W) : 1;
  localparam logic [CNT_W-1:0] LAST = CNT_W'(DATA_W - 1);

  logic             busy;
  logic [CNT_W-1:0] cnt;

  assign step_valid = busy;
  assign step_first = busy && (cnt == '0);
  assign step_sign  = busy && (cnt == LAST);
  assign in_ready   = !busy || (cnt == LAST);
  assign load       = in_valid && in_ready;
  assign shift      = busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (load) begin
      busy <= 1'b1;
      cnt  <= '0;
    end else if (busy) begin
      if (cnt == LAST) busy <= 1'b0;
      else             cnt  <= cnt + 1'b1;
    end
  end

  // A step is never first and sign at once (DATA_W >= 2).
  initial assert (DATA_W >= 2) else $error("da_ctrl: DATA_W must be at least 2");
  a_step_kind: assert property (@(posedge clk) disable iff (rst) !(step_first && step_sign));

endmodule
