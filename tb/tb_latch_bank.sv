// tb_latch_bank -- self-checking test of latch_bank.
//
// Two banks are tested side by side: one with the default settings (4 bits,
// enable active high, reset to 0) and one like the master bank of the
// controller (6 bits, enable active low, non-zero reset value). For each bank
// the test checks that reset forces the reset value whatever the enable, that
// q follows every change of d while the enable is at its active level, and
// that q keeps the value present when the enable went inactive however d moves
// afterwards. A watchdog ends the run with a failure if it ever hangs.
module tb_latch_bank;

  localparam logic [5:0] RV_LO = 6'b10_1101;

  logic       rst;
  logic       en_hi, en_lo;
  logic [3:0] d_hi, q_hi;
  logic [5:0] d_lo, q_lo;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  latch_bank u_hi (
    .rst(rst), .en(en_hi), .d(d_hi), .q(q_hi)
  );

  latch_bank #(
    .WIDTH(6), .EN_ACTIVE_LOW(1'b1), .RESET_VALUE(RV_LO)
  ) u_lo (
    .rst(rst), .en(en_lo), .d(d_lo), .q(q_lo)
  );

  task automatic check4(input string what, input logic [3:0] got, input logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic check6(input string what, input logic [5:0] got, input logic [5:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] held_hi;
    logic [5:0] held_lo;

    // Reset with both banks enabled and with both closed.
    rst = 1'b1; en_hi = 1'b1; en_lo = 1'b0; d_hi = 4'hF; d_lo = 6'h3F;
    #1;
    check4("hi reset while open", q_hi, 4'h0);
    check6("lo reset while open", q_lo, RV_LO);
    en_hi = 1'b0; en_lo = 1'b1; d_hi = 4'h5; d_lo = 6'h15;
    #1;
    check4("hi reset while closed", q_hi, 4'h0);
    check6("lo reset while closed", q_lo, RV_LO);
    rst = 1'b0;
    #1;
    check4("hi holds reset value", q_hi, 4'h0);
    check6("lo holds reset value", q_lo, RV_LO);

    for (int round = 0; round < 200; round++) begin
      // Open both banks and move d several times: q must follow.
      en_hi = 1'b1; en_lo = 1'b0;
      for (int k = 0; k < 3; k++) begin
        d_hi = 4'($urandom);
        d_lo = 6'($urandom);
        #1;
        check4("hi transparent", q_hi, d_hi);
        check6("lo transparent", q_lo, d_lo);
      end
      held_hi = d_hi;
      held_lo = d_lo;
      // Close both banks and move d: q must hold.
      en_hi = 1'b0; en_lo = 1'b1;
      #1;
      for (int k = 0; k < 3; k++) begin
        d_hi = ~held_hi ^ 4'($urandom);
        d_lo = ~held_lo ^ 6'($urandom);
        #1;
        check4("hi holds", q_hi, held_hi);
        check6("lo holds", q_lo, held_lo);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
