// tb_da_lut: checks the DA table contents. Instance u_ex uses the worked
// example A1..A4 = 2, 3, 4, 5 and is compared word by word with the
// expected 16-word table (A1 on the most significant address bit). Instance
// u_lpf holds the first four low-pass coefficients and is compared with
// sums worked out here from the coefficient list.
module tb_da_lut;
  logic [3:0] addr;
  logic signed [13:0] data_ex, data_lpf;
  int checks = 0, failures = 0;

  // Element k is A(k+1).
  da_lut #(.P(4), .COEF_W(12), .COEFS({12'sd5, 12'sd4, 12'sd3, 12'sd2}))
    u_ex (.addr, .data(data_ex));
  da_lut u_lpf (.addr, .data(data_lpf));

  localparam int EXAMPLE [16] = '{0, 5, 4, 9, 3, 8, 7, 12, 2, 7, 6, 11, 5, 10, 9, 14};
  localparam int H [4] = '{5, -66, 86, 999};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      int exp;
      addr = 4'(a);
      #1;
      checks++;
      if (int'(data_ex) != EXAMPLE[a]) begin
        failures++;
        $display("FAIL example addr %b: got %0d expected %0d", addr, data_ex, EXAMPLE[a]);
      end
      exp = 0;
      for (int k = 0; k < 4; k++) if (addr[3-k]) exp += H[k];
      checks++;
      if (int'(data_lpf) != exp) begin
        failures++;
        $display("FAIL lpf addr %b: got %0d expected %0d", addr, data_lpf, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
