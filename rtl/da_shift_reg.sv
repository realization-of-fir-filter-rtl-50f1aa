// da_shift_reg: parallel-in, serial-out register for one tap word.
//
// Distributed arithmetic addresses the look-up table with one bit of every
// tap word at a time. This register holds one word and hands its bits out
// least significant bit first, so the sign bit (bit DATA_W-1) comes last,
// which is the order in which the word's bits are drawn next to the LUT in
// the basic DA structure.
//
// Interface and timing: `load` captures `d` at the clock edge; `shift` moves
// the word one place right at the edge. `bit_out` is the register's bit 0,
// valid throughout the cycle after a load or shift. `load` wins over `shift`,
// so a new word can be loaded in the same cycle its predecessor's sign bit is
// in use. Synchronous active-high reset clears the word (reset style is this
// design's choice).
module da_shift_reg #(
  parameter int unsigned DATA_W = fir_da_pkg::DATA_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              load,
  input  logic              shift,
  input  logic [DATA_W-1:0] d,
  output logic              bit_out
);

  logic [DATA_W-1:0] word;

  always_ff @(posedge clk) begin
    if (rst)        word <= '0;
    else if (load)  word <= d;
    else if (shift) word <= word >> 1;
  end

  assign bit_out = word[0];

endmodule
