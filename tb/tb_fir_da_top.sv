// tb_fir_da_top: end-to-end test of the 8-tap DA low-pass filter at its
// default parameters.
//
// Phase 1 plays the filter's reference stimulus: a 1 MHz square wave of
// amplitude 0.5 sampled at 5 MHz, i.e. x = 0, then +0.5, +0.5, +0.5, -0.5,
// -0.5 repeated (8'h40 / 8'hC0), 21 samples, fed back to back (one sample
// per DATA_W clocks). Phase 2 plays random samples with random gaps and
// offers samples while the filter is busy, so that the input stalls. Every
// output is compared with a direct-form y(n) = sum_k h(k) x(n-k) computed
// here with multiplications; the start-up outputs therefore also check the
// zero history. The test also checks latency and rate, and counts the
// mechanisms of the design: sign-bit subtract steps, back-to-back samples,
// stalled offers, and negative and positive outputs.
module tb_fir_da_top;
  localparam int unsigned TAPS = 8, DATA_W = 8, Y_W = 23;
  localparam int H [TAPS] = '{5, -66, 86, 999, 999, 86, -66, 5};
  localparam int N_SQUARE = 21, N_RANDOM = 2000;

  logic clk = 1'b0, rst, in_valid, in_ready, y_valid, sign;
  logic [DATA_W-1:0] x_in;
  logic signed [Y_W-1:0] y;
  int checks = 0, failures = 0;

  fir_da_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // reference model state
  int hist [TAPS];            // hist[k] = x(n-k)
  longint expq[$];
  int acc_cycle[$];
  int cycle = 0, n_out = 0, last_out = -1;
  int n_sign = 0, n_b2b = 0, n_stall = 0, n_neg = 0, n_pos = 0, last_acc = -100;
  bit show = 1'b1;

  always @(posedge clk) if (!rst) cycle++;

  always @(negedge clk) if (!rst) begin
    if (sign) n_sign++;
    if (in_valid && !in_ready) n_stall++;
    if (y_valid) begin
      longint e;
      e = expq.pop_front();
      check(y, e, $sformatf("y(%0d)", n_out));
      check(cycle - acc_cycle.pop_front(), DATA_W + 1, "latency");
      if (show)
        $display("y(%0d) = %0d = %f", n_out, y, real'(y) / real'(1 << 18));
      if (y < 0) n_neg++;
      if (y > 0) n_pos++;
      last_out = cycle;
      n_out++;
    end
  end

  task automatic send(input logic [DATA_W-1:0] x);
    longint e;
    x_in = x;
    in_valid = 1'b1;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    for (int k = TAPS-1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = int'($signed(x));
    e = 0;
    for (int k = 0; k < TAPS; k++) e += longint'(H[k]) * longint'(hist[k]);
    expq.push_back(e);
    if (cycle - last_acc == DATA_W) n_b2b++;
    last_acc = cycle;
    acc_cycle.push_back(cycle);
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0; x_in = '0;
    foreach (hist[k]) hist[k] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(y, 0, "reset output");

    // Phase 1: the square wave, back to back.
    for (int n = 0; n < N_SQUARE; n++) begin
      logic [DATA_W-1:0] x;
      if (n == 0)                 x = 8'h00;
      else if ((n - 1) % 5 < 3)   x = 8'h40;
      else                        x = 8'hC0;
      send(x);
    end
    repeat (DATA_W + 3) @(posedge clk);
    check(n_out, N_SQUARE, "square-wave outputs");
    check(n_b2b, N_SQUARE - 1, "square wave at full rate");
    show = 1'b0;
    #1;

    // Phase 2: random samples; offers during busy cycles stall.
    for (int n = 0; n < N_RANDOM; n++) begin
      send(DATA_W'($urandom));
      if (n % 3 == 0) repeat ($urandom_range(0, 2 * DATA_W)) @(posedge clk);
      #1;
    end
    repeat (DATA_W + 3) @(posedge clk);
    check(n_out, N_SQUARE + N_RANDOM, "all outputs");

    // Mechanism coverage: each must have happened.
    $display("sign steps=%0d back-to-back=%0d stalled offers=%0d negative=%0d positive=%0d",
             n_sign, n_b2b, n_stall, n_neg, n_pos);
    check(n_sign, N_SQUARE + N_RANDOM, "one sign-bit step per output");
    checks += 4;
    if (n_b2b == 0)   begin failures++; $display("FAIL no back-to-back samples"); end
    if (n_stall == 0) begin failures++; $display("FAIL no stalled offer"); end
    if (n_neg == 0)   begin failures++; $display("FAIL no negative output"); end
    if (n_pos == 0)   begin failures++; $display("FAIL no positive output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
