// tb_da_lut_bank: checks that the divided table gives sum_k h(k)*bits[k]
// for all 256 bit patterns of the 8-tap low-pass filter, with two 4-input
// tables (the default), four 2-input tables and one undivided 8-input table,
// and with random 12-bit coefficients in the default arrangement.
module tb_da_lut_bank;
  localparam int unsigned TAPS = 8;
  localparam int H [TAPS] = '{5, -66, 86, 999, 999, 86, -66, 5};
  localparam logic [TAPS-1:0][11:0] RND = {
    -12'sd2048, 12'sd2047, -12'sd1, 12'sd1234, -12'sd777, 12'sd3, 12'sd1500, -12'sd1999};

  logic [TAPS-1:0] bits;
  logic signed [14:0] s4, s2, s8, sr;
  int checks = 0, failures = 0;

  da_lut_bank u_p4 (.bits, .sum(s4));
  da_lut_bank #(.P(2)) u_p2 (.bits, .sum(s2));
  da_lut_bank #(.P(8)) u_p8 (.bits, .sum(s8));
  da_lut_bank #(.COEFS(RND)) u_rnd (.bits, .sum(sr));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s bits=%b: got %0d expected %0d", what, bits, got, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < 256; a++) begin
      int exp, expr;
      bits = 8'(a);
      #1;
      exp = 0; expr = 0;
      for (int k = 0; k < TAPS; k++)
        if (bits[k]) begin
          exp  += H[k];
          expr += int'($signed(RND[k]));
        end
      check(int'(s4), exp, "P=4");
      check(int'(s2), exp, "P=2");
      check(int'(s8), exp, "P=8");
      check(int'(sr), expr, "random coefficients");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
