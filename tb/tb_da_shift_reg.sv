// tb_da_shift_reg: checks that da_shift_reg hands out a loaded word LSB
// first, one bit per shift, that load wins over shift, that the word holds
// when neither is asserted, and that reset clears it.
module tb_da_shift_reg;
  localparam int unsigned DATA_W = 8;

  logic clk = 1'b0, rst, load, shift, bit_out;
  logic [DATA_W-1:0] d;
  int checks = 0, failures = 0;

  da_shift_reg #(.DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    logic [DATA_W-1:0] w, w2;
    rst = 1'b1; load = 1'b0; shift = 1'b0; d = '1;
    @(posedge clk); #1;
    check(bit_out, 1'b0, "reset clears");
    rst = 1'b0;
    for (int t = 0; t < 200; t++) begin
      w = DATA_W'($urandom);
      d = w; load = 1'b1; shift = (t % 2 == 0);   // load beats shift
      @(posedge clk); #1;
      load = 1'b0;
      for (int b = 0; b < DATA_W; b++) begin
        check(bit_out, w[b], $sformatf("word %h bit %0d", w, b));
        // hold for a random cycle now and then: bit must not move
        if ($urandom_range(0, 3) == 0) begin
          shift = 1'b0;
          @(posedge clk); #1;
          check(bit_out, w[b], "hold");
        end
        shift = 1'b1;
        @(posedge clk); #1;
        shift = 1'b0;
      end
    end
    // load in the same cycle as the last bit is in use
    w = 8'hA5; w2 = 8'h3C;
    d = w; load = 1'b1; @(posedge clk); #1; load = 1'b0;
    for (int b = 0; b < DATA_W; b++) begin
      check(bit_out, w[b], "first word");
      if (b == DATA_W-1) begin d = w2; load = 1'b1; end
      shift = 1'b1; @(posedge clk); #1; shift = 1'b0; load = 1'b0;
    end
    for (int b = 0; b < DATA_W; b++) begin
      check(bit_out, w2[b], "second word");
      shift = 1'b1; @(posedge clk); #1; shift = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
