// tb_da_fir_core: checks the DA inner product y = sum_k h(k)*x_taps[k]
// against a direct multiply-and-add, first for the 21 parallel tap patterns
// X(0)..X(7) of the square-wave reference stimulus (the current sample and
// its seven delayed copies), then for random and extreme tap words, with
// and without the register after the table (LUT_REG = 0 and 1). It also
// checks the latency (DATA_W+1+LUT_REG clocks from the accepting cycle to
// y_valid), the rate (one result every DATA_W clocks when fed back to back)
// and that `sign` is high for one clock per computation.
module tb_da_fir_core;
  localparam int unsigned TAPS = 8, DATA_W = 8, Y_W = 23;
  localparam int H [TAPS] = '{5, -66, 86, 999, 999, 86, -66, 5};

  logic clk = 1'b0, rst;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  function automatic longint ref_y(input logic [TAPS-1:0][DATA_W-1:0] x);
    longint s = 0;
    for (int k = 0; k < TAPS; k++) s += longint'(H[k]) * longint'($signed(x[k]));
    return s;
  endfunction

  // 1 MHz square wave of amplitude 0.5 sampled at 5 MHz: 0, then
  // +0.5, +0.5, +0.5, -0.5, -0.5 repeated.
  function automatic logic [DATA_W-1:0] sq(input int n);
    if (n == 0) return 8'h00;
    return ((n - 1) % 5 < 3) ? 8'h40 : 8'hC0;
  endfunction

  // One harness per LUT_REG setting.
  for (genvar R = 0; R < 2; R++) begin : g_h
    logic in_valid, in_ready, y_valid, sign;
    logic [TAPS-1:0][DATA_W-1:0] x_taps;
    logic signed [Y_W-1:0] y;
    longint expq[$];
    int acc_cycle[$];
    int cycle = 0, n_out = 0, n_sign = 0, last_out = -1, n_full_rate = 0;
    bit done = 0;

    da_fir_core #(.LUT_REG(R)) dut (.*);

    always @(posedge clk) if (!rst) cycle++;

    // Output side, sampled mid-cycle: compare in order, check latency and rate.
    always @(negedge clk) if (!rst) begin
      if (sign) n_sign++;
      if (y_valid) begin
        check(y, expq.pop_front(), $sformatf("LUT_REG=%0d result %0d", R, n_out));
        check(cycle - acc_cycle.pop_front(), DATA_W + 1 + R, "latency");
        if (last_out >= 0 && cycle - last_out == DATA_W) n_full_rate++;
        last_out = cycle;
        n_out++;
      end
    end

    initial begin
      in_valid = 0; x_taps = '0;
      @(negedge rst);
      for (int t = 0; t < 600; t++) begin
        if (t < 21) begin
          // Tap words laid out as the filter's reference stimulus: X(k) is
          // the square-wave sample k periods earlier, 0 before time zero.
          for (int k = 0; k < TAPS; k++) x_taps[k] = (t - k < 0) ? 8'h00 : sq(t - k);
        end else case (t % 5)
          0: for (int k = 0; k < TAPS; k++) x_taps[k] = 8'h80;         // most negative
          1: for (int k = 0; k < TAPS; k++) x_taps[k] = (H[k] < 0) ? 8'h80 : 8'h7F;
          default: for (int k = 0; k < TAPS; k++) x_taps[k] = DATA_W'($urandom);
        endcase
        in_valid = 1'b1;
        @(negedge clk);
        while (!in_ready) @(negedge clk);
        expq.push_back(ref_y(x_taps));
        acc_cycle.push_back(cycle);
        @(posedge clk);
        #1 in_valid = 1'b0;
        if (t >= 300) repeat ($urandom_range(0, 10)) @(posedge clk);  // gaps
        #1;
      end
      repeat (DATA_W + 4) @(posedge clk);
      check(n_out, 600, "result count");
      check(n_sign, 600, "one sign step per result");
      checks++;
      if (n_full_rate < 250) begin
        failures++;
        $display("FAIL only %0d results at full rate", n_full_rate);
      end
      done = 1;
    end
  end

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait (g_h[0].done && g_h[1].done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
