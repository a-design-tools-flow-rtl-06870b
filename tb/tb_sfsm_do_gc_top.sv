// tb_sfsm_do_gc_top -- end-to-end test of the gated-clock direct-output
// controller, at its only (default) configuration.
//
// clk has a period of 20 time units, rising edges at 10, 30, ... Inputs are
// never changed at a clock edge.
//
// Reference model (written from the state graph, not from the RTL): the
// master latches only open in a low half of clk if h was 0 at the falling
// edge that started it, and the slave latches only open in a high half if h is
// 0 at the rising edge. Hence at each rising edge the reference state s moves
// to next(s, inputs at that edge) when s is not in a self-loop both for the
// inputs at the previous falling edge and for the inputs at this rising edge;
// otherwise it stays. With inputs that change only in the high half this is
// an ordinary Moore machine clocked on the rising edge.
//
// Phase 1 walks the sequence A E F B A E F C A E F D (each exit of F once)
// with inputs changed just after the rising edge and compares every state with
// a fixed expected list. Phase 2 drives random inputs at random times in both
// halves of the clock, with occasional resets, and compares against the
// reference model. Throughout, the test checks z1, z2, q and h against the
// reference in the end of each half-period, checks gclk1/gclk2, and fails
// on any change of the outputs while clk is low (a glitch or an unexpected
// update). It counts the mechanisms of the design and fails if one never
// happened: clock pulses suppressed in a self-loop (master and slave),
// transitions taken, each state entered, a self-loop exit delayed because the
// input arrived during the low half, and a reset during operation.
module tb_sfsm_do_gc_top;
  import sfsm_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  logic       sa, sb;
  logic       z1, z2;
  logic [1:0] q;
  logic       h;
  logic       gclk1, gclk2;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  // Mechanism counters.
  int unsigned n_slave_stopped  = 0;   // rising edges with the slave clock suppressed
  int unsigned n_master_stopped = 0;   // low halves with the master clock suppressed
  int unsigned n_transitions    = 0;
  int unsigned n_delayed_exit   = 0;
  int unsigned n_resets         = 0;
  int unsigned n_entered [6];

  ref_state_e s_ref;
  logic       loop_at_fall;

  sfsm_do_gc_top dut (
    .clk  (clk),
    .rst  (rst),
    .sa   (sa),
    .sb   (sb),
    .z1   (z1),
    .z2   (z2),
    .q    (q),
    .h    (h),
    .gclk1(gclk1),
    .gclk2(gclk2)
  );

  always #10 clk = ~clk;

  task automatic check(input string what, input logic [3:0] got, input logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t (ref state %s)", what, got, exp, $time,
               ref_name(s_ref));
    end
  endtask

  // ---------------------------------------------------------------- reference
  always @(negedge clk) begin
    if (!rst) begin
      loop_at_fall = ref_self_loop(s_ref, sa, sb);
      if (loop_at_fall) n_master_stopped++;
    end
  end

  always @(posedge clk) begin
    if (!rst) begin
      automatic logic loop_at_rise = ref_self_loop(s_ref, sa, sb);
      if (loop_at_rise) n_slave_stopped++;
      if (!loop_at_rise && loop_at_fall) n_delayed_exit++;
      if (!loop_at_rise && !loop_at_fall) begin
        s_ref = ref_next(s_ref, sa, sb);
        n_transitions++;
        n_entered[s_ref]++;
      end
    end
  end

  // ---------------------------------------------- end-of-half-period checks
  always @(clk) begin
    #9;
    if (!rst) begin
      check("state {z1,z2,q1,q2}", {z1, z2, q}, ref_code(s_ref));
      check("h", {3'b000, h}, {3'b000, ref_self_loop(s_ref, sa, sb)});
      if (clk) begin
        check("gclk1 in high half", {3'b000, gclk1}, 4'b0001);
      end else begin
        check("gclk2 in low half", {3'b000, gclk2}, 4'b0000);
        check("gclk1 in low half", {3'b000, gclk1}, {3'b000, loop_at_fall});
      end
    end
  end

  // Outputs may only move while the slave latches are open (clk high).
  always @(z1, z2, q) begin
    if (!rst && !clk && $time > 0) begin
      checks++;
      failures++;
      $display("FAIL outputs changed while clk low at %0t", $time);
    end
  end

  // ------------------------------------------------------------- stimulus
  task automatic do_reset();
    @(posedge clk);
    #4 rst = 1'b1;
    s_ref = S_A;
    loop_at_fall = 1'b0;
    #3;
    check("reset forces A", {z1, z2, q}, 4'b0000);
    @(negedge clk);
    #4 rst = 1'b0;
    n_resets++;
  endtask

  // Called 4 units after a rising edge: set the inputs, then check the state
  // reached at the next rising edge (and return 4 units after it).
  task automatic step(input logic a, input logic b, input ref_state_e expect_next);
    {sa, sb} = {a, b};
    @(posedge clk);
    #4;
    check($sformatf("directed state %s", ref_name(expect_next)), {z1, z2, q}, ref_code(expect_next));
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_entered[i]) n_entered[i] = 0;
    rst = 1'b1; sa = 1'b0; sb = 1'b0;
    s_ref = S_A;
    loop_at_fall = 1'b0;
    #35 rst = 1'b0;

    // Phase 1: the three rounds A E F {B, C, D} A.
    @(posedge clk);
    #4;
    step(1'b0, 1'b0, S_A);
    step(1'b1, 1'b1, S_E);
    step(1'b1, 1'b1, S_E);
    step(1'b0, 1'b1, S_F);
    step(1'b0, 1'b0, S_F);
    step(1'b1, 1'b0, S_B);
    step(1'b1, 1'b0, S_A);
    step(1'b1, 1'b1, S_E);
    step(1'b0, 1'b0, S_F);
    step(1'b0, 1'b1, S_C);
    step(1'b0, 1'b0, S_A);
    step(1'b1, 1'b1, S_E);
    step(1'b1, 0,    S_F);
    step(1'b1, 1'b1, S_D);
    step(1'b1, 1'b1, S_A);

    // Phase 2: random inputs at random times in both halves, occasional reset.
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(posedge clk);
      if (($urandom % 500) == 0) begin
        do_reset();
      end else begin
        // One change in the high half and, sometimes, one in the low half.
        #(2 + $urandom % 7) {sa, sb} = 2'($urandom);
        if ($urandom % 3 == 0) begin
          @(negedge clk);
          #(2 + $urandom % 7) {sa, sb} = 2'($urandom);
        end
      end
    end

    // Coverage of the mechanisms.
    checks++;
    if (n_slave_stopped == 0 || n_master_stopped == 0 || n_transitions == 0 ||
        n_delayed_exit == 0 || n_resets == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    foreach (n_entered[i]) begin
      checks++;
      if (n_entered[i] == 0) begin
        failures++;
        $display("FAIL state %s never entered", ref_name(ref_state_e'(i)));
      end
    end
    $display("slave pulses suppressed %0d, master pulses suppressed %0d, transitions %0d",
             n_slave_stopped, n_master_stopped, n_transitions);
    $display("delayed self-loop exits %0d, resets %0d", n_delayed_exit, n_resets);
    $display("entered A %0d B %0d C %0d D %0d E %0d F %0d", n_entered[S_A], n_entered[S_B],
             n_entered[S_C], n_entered[S_D], n_entered[S_E], n_entered[S_F]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
