// da_lut_bank: the filter's look-up table, divided into smaller tables.
//
// A single DA table for TAPS taps needs 2**TAPS words (256 for 8 taps). To
// save memory the taps are split into TAPS/P groups of P; each group has its
// own 2**P-word da_lut (two 16-word tables for 8 taps and P = 4), and the
// group outputs are added. The result equals the word the single large table
// would have held: sum over k of h(k) * bits[k]. Dividing the tables follows
// the filter's design; the group size P = 4 and the plain adder are this
// implementation's choices. P = TAPS gives the undivided table.
//
// Interface: `bits[k]` is the current bit of tap k; `sum` is combinational,
// COEF_W+clog2(TAPS) bits, two's complement.
module da_lut_bank #(
  parameter int unsigned TAPS   = fir_da_pkg::TAPS,
  parameter int unsigned P      = fir_da_pkg::LUT_INPUTS,
  parameter int unsigned COEF_W = fir_da_pkg::COEF_W,
  parameter logic [TAPS-1:0][COEF_W-1:0] COEFS = fir_da_pkg::LPF_COEFS,
  localparam int unsigned SUM_W = COEF_W + $clog2(TAPS)
) (
  input  logic [TAPS-1:0]         bits,
  output logic signed [SUM_W-1:0] sum
);

  localparam int unsigned NPART  = TAPS / P;
  localparam int unsigned PART_W = COEF_W + $clog2(P);

  if (NPART * P != TAPS) begin : g_bad_partition
    $error("da_lut_bank: TAPS (%0d) must be a multiple of P (%0d)", TAPS, P);
  end

  logic signed [PART_W-1:0] part [NPART];

  for (genvar j = 0; j < NPART; j++) begin : g_part
    logic [P-1:0] addr;
    // Tap j*P is the most significant address bit of its table.
    for (genvar k = 0; k < P; k++) begin : g_addr
      assign addr[P-1-k] = bits[j*P + k];
    end
    da_lut #(
      .P      (P),
      .COEF_W (COEF_W),
      .COEFS  (COEFS[j*P +: P])
    ) u_lut (
      .addr (addr),
      .data (part[j])
    );
  end

  always_comb begin
    sum = '0;
    for (int j = 0; j < NPART; j++) sum += SUM_W'(part[j]);
  end

endmodule
