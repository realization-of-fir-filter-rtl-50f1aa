// tb_da_ctrl: checks the bit-step sequence against a cycle-level model:
// a sample is taken only when in_ready is high, it is followed by exactly
// DATA_W step cycles with step_first on the first and step_sign on the last,
// in_ready is high only when idle or on the sign step, and back-to-back
// samples are taken every DATA_W clocks.
module tb_da_ctrl;
  localparam int unsigned DATA_W = 8;

  logic clk = 1'b0, rst, in_valid, in_ready, load, shift, step_valid, step_first, step_sign;
  int checks = 0, failures = 0;

  da_ctrl #(.DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  // model: steps_left = number of bit steps still to do, including this cycle
  int steps_left, n_loads, n_b2b, n_stall, last_load_cycle, cycle;
  initial begin
    rst = 1'b1; in_valid = 0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    steps_left = 0; n_loads = 0; n_b2b = 0; n_stall = 0; last_load_cycle = -100; cycle = 0;
    for (int t = 0; t < 4000; t++) begin
      logic exp_ready;
      in_valid = (t < 1500) ? ($urandom_range(0, 5) == 0) :
                 (t < 3000) ? 1'b1 : ($urandom_range(0, 1) == 1);
      #1;
      exp_ready = (steps_left == 0) || (steps_left == 1);
      check(in_ready,   exp_ready, "in_ready");
      check(load,       in_valid && exp_ready, "load");
      check(step_valid, steps_left > 0, "step_valid");
      check(shift,      steps_left > 0, "shift");
      check(step_first, steps_left == DATA_W, "step_first");
      check(step_sign,  steps_left == 1, "step_sign");
      if (in_valid && !exp_ready) n_stall++;
      @(posedge clk);
      cycle++;
      if (in_valid && exp_ready) begin
        if (cycle - last_load_cycle == DATA_W) n_b2b++;
        last_load_cycle = cycle;
        n_loads++;
        steps_left = DATA_W;
      end else if (steps_left > 0) begin
        steps_left--;
      end
      #1 in_valid = 0;
    end
    checks++;
    if (n_loads < 100 || n_b2b < 100 || n_stall < 100) begin
      failures++;
      $display("FAIL coverage loads=%0d back-to-back=%0d stalls=%0d", n_loads, n_b2b, n_stall);
    end
    $display("loads=%0d back-to-back=%0d stalled offers=%0d", n_loads, n_b2b, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
