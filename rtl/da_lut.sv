// da_lut: distributed-arithmetic look-up table for P taps.
//
// Entry `addr` holds the sum of the coefficients whose address bit is set:
// with P = 4 and coefficients A1..A4 the 16 words are 0, A4, A3, A3+A4, A2,
// ... up to A1+A2+A3+A4. Following the usual DA table layout, the first tap
// (A1, COEFS[0]) drives the most significant address bit.
//
// The contents are computed at elaboration from the COEFS parameter, so the
// ROM is a constant array; reading it is combinational (asynchronous), which
// maps to LUT fabric or a small ROM. The default coefficients are the first
// four taps of the low-pass filter in fir_da_pkg.
//
// Interface: `addr` (P bits, one bit per tap), `data` (COEF_W+clog2(P)
// bits, two's complement) in the same cycle.
module da_lut #(
  parameter int unsigned P      = fir_da_pkg::LUT_INPUTS,
  parameter int unsigned COEF_W = fir_da_pkg::COEF_W,
  parameter logic [P-1:0][COEF_W-1:0] COEFS = fir_da_pkg::LPF_COEFS[P-1:0],
  localparam int unsigned OUT_W = COEF_W + $clog2(P)
) (
  input  logic [P-1:0]            addr,
  output logic signed [OUT_W-1:0] data
);

  localparam int unsigned DEPTH = 2 ** P;

  typedef logic signed [OUT_W-1:0] rom_t [DEPTH];

  function automatic rom_t build_rom();
    rom_t r;
    for (int unsigned a = 0; a < DEPTH; a++) begin
      logic signed [OUT_W-1:0] s;
      s = '0;
      for (int unsigned k = 0; k < P; k++)
        if (a[P-1-k]) s += OUT_W'($signed(COEFS[k]));
      r[a] = s;
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  assign data = ROM[addr];

endmodule
