// tb_gated_clock_control -- self-checking test of the two latch-based clock
// gates.
//
// clk has a period of 20 time units (rising edges at 10, 30, ...). h is
// changed at random, twice in every half-period and never at a clock edge, to
// show that changes of h inside a half-period cannot reach the gated clocks.
// Expected values, sampled three times per half-period:
//   low half  : gclk1 = h as it was at the preceding falling edge, gclk2 = 0
//   high half : gclk1 = 1, gclk2 = NOT h as it was at that rising edge
// During reset both gates pass clk unchanged. The test counts master and
// slave pulses that were passed and that were suppressed, and fails if any of
// the four never happened. A watchdog ends the run with a failure if it hangs.
module tb_gated_clock_control;

  logic clk = 1'b0;
  logic rst;
  logic h;
  logic gclk1, gclk2;

  logic h_at_fall, h_at_rise;

  int unsigned checks   = 0;
  int unsigned failures = 0;
  int unsigned n_master_pass = 0, n_master_stop = 0;
  int unsigned n_slave_pass  = 0, n_slave_stop  = 0;

  gated_clock_control dut (
    .clk  (clk),
    .rst  (rst),
    .h    (h),
    .gclk1(gclk1),
    .gclk2(gclk2)
  );

  always #10 clk = ~clk;

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    h   = 1'b1;
    // Reset: both gates pass clk.
    for (int t = 0; t < 40; t++) begin
      #1;
      if ((t % 10) != 9) begin
        check("gclk1 = clk in reset", gclk1, clk);
        check("gclk2 = clk in reset", gclk2, clk);
      end
    end
    // Release reset in the middle of a high half-period (t = 45).
    #5 rst = 1'b0;
    h_at_rise = 1'b0;            // cleared by reset
    h_at_fall = 1'b0;
    for (int half = 0; half < 4000; half++) begin
      // Half-periods start at multiples of 10; we are at the start of one here
      // only after the first partial half, so align first.
      @(clk);
      if (clk) h_at_rise = h; else h_at_fall = h;
      if (clk) begin
        if (h_at_rise) n_slave_stop++; else n_slave_pass++;
      end else begin
        if (h_at_fall) n_master_stop++; else n_master_pass++;
      end
      for (int t = 1; t < 10; t++) begin
        #1;
        if (t == 3 || t == 7) h = 1'($urandom);
        if (t == 1 || t == 5 || t == 9) begin
          if (clk) begin
            check("gclk1 high half", gclk1, 1'b1);
            check("gclk2 high half", gclk2, ~h_at_rise);
          end else begin
            check("gclk1 low half", gclk1, h_at_fall);
            check("gclk2 low half", gclk2, 1'b0);
          end
        end
      end
    end
    checks++;
    if (n_master_pass == 0 || n_master_stop == 0 || n_slave_pass == 0 || n_slave_stop == 0) begin
      failures++;
      $display("FAIL coverage: master pass %0d stop %0d, slave pass %0d stop %0d",
               n_master_pass, n_master_stop, n_slave_pass, n_slave_stop);
    end
    $display("master pulses passed %0d suppressed %0d, slave pulses passed %0d suppressed %0d",
             n_master_pass, n_master_stop, n_slave_pass, n_slave_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
