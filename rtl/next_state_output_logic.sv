// next_state_output_logic -- next-state and output equations of the case-study
// direct-output controller.
//
// Combinational logic that sits between the master and the slave latch banks.
// From the latched present state {Z1, Z2, q1, q2} and the latched inputs SA, SB
// it forms the next state, whose Z1 and Z2 bits are at the same time the next
// outputs (a direct-output machine has no separate output decoder).
//
// State graph (state/Z1Z2):
//   A/00: SA&SB -> E, otherwise stays      E/00: SA&SB stays, otherwise -> F
//   F/00: ~SA&~SB stays, SA&~SB -> B, ~SA&SB -> C, SA&SB -> D
//   B/10, C/01, D/11: -> A unconditionally
// with q1 q2 = 00 in A, B, C, D, 01 in E and 10 in F.
//
// Two-level equations, minimised here by hand with the unused codes as don't
// cares. They give the full next state, self-loops included, so the logic is
// correct on its own and does not rely on the clock being stopped in a
// self-loop:
//   Z1' = q1 SA
//   Z2' = q1 SB
//   q1' = q2 ~SA + q2 ~SB + q1 ~SA ~SB
//   q2' = SA SB ~q1 ~Z1 ~Z2
// Purely combinational, no timing of its own.
module next_state_output_logic
  import sfsm_do_pkg::*;
(
  input  state_t  state,
  input  inputs_t in,
  output state_t  next
);

  always_comb begin
    next.z1 = state.q1 & in.sa;
    next.z2 = state.q1 & in.sb;
    next.q1 = (state.q2 & ~in.sa)
            | (state.q2 & ~in.sb)
            | (state.q1 & ~in.sa & ~in.sb);
    next.q2 = in.sa & in.sb & ~state.q1 & ~state.z1 & ~state.z2;
  end

endmodule
