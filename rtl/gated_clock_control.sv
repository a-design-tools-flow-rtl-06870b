// gated_clock_control -- latch-based clock gating of the master and slave
// latch banks.
//
// The inhibition signal h (1 = present state takes a self-loop) stops both
// latch clocks, so in a self-loop neither latch bank toggles. Each gate pairs
// a latch on h with a gate on Clk, the latch keeping h steady for the whole
// half-period in which the gate passes the clock, so that changes of h can
// never cut a clock pulse short or add a spurious one:
//   * GCLK1 = Clk | L1.Q. L1 is transparent while Clk is high and holds during
//     the low half. When the held h is 1, GCLK1 stays high and the master
//     latches (transparent while GCLK1 is low) stay closed.
//   * GCLK2 = Clk & ~L2.Q. L2 is transparent while Clk is low and holds during
//     the high half. When the held h is 1, GCLK2 stays low and the slave
//     latches (transparent while GCLK2 is high) stay closed.
// So the master bank sees h as sampled at the falling edge of Clk, the slave
// bank h as sampled at the rising edge. The two latches, their clock
// polarities, the OR/AND gates and the use of Q and ~Q follow the published
// gated-clock schematic; the asynchronous reset (both latches cleared, clocks
// running) is this design's addition.
//
// The latches are intentional and so is the clock passing through logic; any
// latch or clock-gating warning a tool gives for this module stands.
module gated_clock_control (
  input  logic clk,
  input  logic rst,
  input  logic h,
  output logic gclk1,
  output logic gclk2
);

  logic l1_q;   // h held during the low half of clk
  logic l2_q;   // h held during the high half of clk

  always_latch begin
    if (rst)      l1_q = 1'b0;
    else if (clk) l1_q = h;
  end

  always_latch begin
    if (rst)       l2_q = 1'b0;
    else if (!clk) l2_q = h;
  end

  assign gclk1 = clk | l1_q;
  assign gclk2 = clk & ~l2_q;

endmodule
