// tb_tap_delay_line: checks taps[k] = x(n-k) against a software history for
// a random sample stream with random gaps, starting from the all-zero
// history that reset gives.
module tb_tap_delay_line;
  localparam int unsigned TAPS = 8, DATA_W = 8;

  logic clk = 1'b0, rst, advance;
  logic [DATA_W-1:0] x_in;
  logic [TAPS-1:0][DATA_W-1:0] taps;
  int checks = 0, failures = 0;

  tap_delay_line #(.TAPS(TAPS), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DATA_W-1:0] hist [TAPS];    // hist[k] = x(n-k), hist[0] unused
    rst = 1'b1; advance = 0; x_in = 8'hFF;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    foreach (hist[k]) hist[k] = '0;
    for (int t = 0; t < 3000; t++) begin
      x_in = DATA_W'($urandom);
      advance = ($urandom_range(0, 2) != 0);
      #1;
      for (int k = 0; k < TAPS; k++) begin
        logic [DATA_W-1:0] exp;
        exp = (k == 0) ? x_in : hist[k];
        checks++;
        if (taps[k] !== exp) begin
          failures++;
          $display("FAIL t=%0d tap %0d: got %h expected %h", t, k, taps[k], exp);
        end
      end
      @(posedge clk);
      if (advance) begin
        for (int k = TAPS-1; k > 1; k--) hist[k] = hist[k-1];
        hist[1] = x_in;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
