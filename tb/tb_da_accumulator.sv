// tb_da_accumulator: feeds random table outputs L(0)..L(7) through a full
// computation and checks y = sum_{n<7} L(n)*2^n - L(7)*2^7, that y_valid
// pulses for exactly one cycle right after the sign step, that y holds
// between results, and that idle cycles inside a computation change nothing.
module tb_da_accumulator;
  localparam int unsigned IN_W = 15, DATA_W = 8;

  logic clk = 1'b0, rst, step_valid, step_first, step_sign, y_valid;
  logic signed [IN_W-1:0] partial;
  logic signed [IN_W+DATA_W-1:0] y;
  int checks = 0, failures = 0;

  da_accumulator #(.IN_W(IN_W), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint exp, last_y;
    rst = 1'b1; step_valid = 0; step_first = 0; step_sign = 0; partial = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(y, 0, "reset y");
    check(y_valid, 0, "reset y_valid");
    last_y = 0;
    for (int t = 0; t < 500; t++) begin
      exp = 0;
      for (int n = 0; n < DATA_W; n++) begin
        int l;
        case (t % 4)
          0: l = $urandom_range(0, 32767) - 16384;          // full range
          1: l = (n % 2) ? -16384 : 16383;                  // extremes
          2: l = 16383;
          default: l = $urandom_range(0, 200) - 100;
        endcase
        partial = IN_W'(l);
        step_valid = 1; step_first = (n == 0); step_sign = (n == DATA_W-1);
        exp += (n == DATA_W-1) ? -(longint'(l) <<< n) : (longint'(l) <<< n);
        @(posedge clk); #1;
        step_valid = 0; step_first = 0; step_sign = 0;
        if (n < DATA_W-1) begin
          check(y_valid, 0, "no y_valid mid-computation");
          check(y, last_y, "y holds mid-computation");
          if ($urandom_range(0, 4) == 0) begin     // idle gap inside a computation
            partial = IN_W'($urandom);
            @(posedge clk); #1;
          end
        end
      end
      check(y_valid, 1, "y_valid after sign step");
      check(y, exp, $sformatf("result %0d", t));
      last_y = exp;
      @(posedge clk); #1;
      check(y_valid, 0, "y_valid is one cycle");
      check(y, exp, "y holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
