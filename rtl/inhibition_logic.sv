// inhibition_logic -- clock inhibition function h of the case-study controller.
//
// h is 1 exactly when the present state takes a self-loop under the present
// inputs, so that the gated-clock control can stop the latch clocks while
// nothing would change. It reads the primary inputs directly (not through the
// master latches) together with the present state held in the slave latches.
//
// Function (from the state graph and its inhibition table):
//   A (Z1Z2 q1q2 = 00 00): h = ~(SA & SB)
//   E (00 01):             h = SA & SB
//   F (00 10):             h = ~SA & ~SB
//   B, C, D:               h = 0 (no self-loop)
// Sum of four products, unused codes taken as don't cares:
//   h = ~Z1 ~Z2 ~q1 ~q2 ~SA + ~Z1 ~Z2 ~q1 ~q2 ~SB + q1 ~SA ~SB + q2 SA SB
// Purely combinational.
module inhibition_logic
  import sfsm_do_pkg::*;
(
  input  state_t  state,
  input  inputs_t in,
  output logic    h
);

  logic in_a;

  assign in_a = ~state.z1 & ~state.z2 & ~state.q1 & ~state.q2;

  always_comb begin
    h = (in_a & ~in.sa)
      | (in_a & ~in.sb)
      | (state.q1 & ~in.sa & ~in.sb)
      | (state.q2 & in.sa & in.sb);
  end

endmodule
