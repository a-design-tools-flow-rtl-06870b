// sfsm_do_gc_top -- low-power direct-output synchronous controller with gated
// clock, built in latch master-slave form for the six-state case study.
//
// Structure (one instance of each block):
//   master latch_bank (6 bits, transparent while GCLK1 is low) holds the
//     primary inputs SA, SB and the present state {Z1, Z2, q1, q2};
//   next_state_output_logic computes the next state from the master contents;
//   slave latch_bank (4 bits, transparent while GCLK2 is high) holds the next
//     state, whose Z1 and Z2 bits drive the outputs directly and whose
//     four bits feed back to the master bank and the inhibition logic;
//   inhibition_logic forms h from the raw inputs and the slave contents;
//   gated_clock_control derives GCLK1 and GCLK2 from Clk and h.
// Placing the logic between the two halves of the register means the slave
// latches only open for half a period after the inputs were frozen by the
// master, so glitches of the logic do not reach the outputs, and h keeps both
// latch banks still in every self-loop.
//
// Timing: with inputs stable around the rising edge of clk, the outputs change
// shortly after that rising edge (while the slave is open), like a Moore
// machine on flip-flops with no output decoder. A transition out of a
// self-loop needs h to be 0 both at the falling edge before (so the master
// opens and captures the inputs) and at the rising edge; an input that
// arrives during the low half of clk therefore takes effect one clock later.
//
// Interface: clk, asynchronous active-high rst (to state A; a reset is not
// part of the published circuit and is this design's addition), inputs sa,
// sb, outputs z1, z2. q, h, gclk1 and gclk2 are brought out only for
// observation.
//
// The feedback slave -> master -> logic -> slave is a combinational loop
// through latches; it is never transparent end to end because GCLK1 and
// GCLK2 are never active together, so a loop warning a tool gives here stands.
module sfsm_do_gc_top
  import sfsm_do_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       sa,
  input  logic       sb,
  output logic       z1,
  output logic       z2,
  output logic [1:0] q,
  output logic       h,
  output logic       gclk1,
  output logic       gclk2
);

  typedef struct packed {
    state_t  state;
    inputs_t in;
  } master_t;

  inputs_t in_raw;
  master_t master_d, master_q;
  state_t  next_state, state;

  assign in_raw = '{sa: sa, sb: sb};

  assign master_d = '{state: state, in: in_raw};

  latch_bank #(
    .WIDTH        ($bits(master_t)),
    .EN_ACTIVE_LOW(1'b1),
    .RESET_VALUE  ({ST_RESET, 2'b00})
  ) u_master (
    .rst(rst),
    .en (gclk1),
    .d  (master_d),
    .q  (master_q)
  );

  next_state_output_logic u_logic (
    .state(master_q.state),
    .in   (master_q.in),
    .next (next_state)
  );

  latch_bank #(
    .WIDTH        (STATE_W),
    .EN_ACTIVE_LOW(1'b0),
    .RESET_VALUE  (ST_RESET)
  ) u_slave (
    .rst(rst),
    .en (gclk2),
    .d  (next_state),
    .q  (state)
  );

  inhibition_logic u_inhibit (
    .state(state),
    .in   (in_raw),
    .h    (h)
  );

  gated_clock_control u_gcc (
    .clk  (clk),
    .rst  (rst),
    .h    (h),
    .gclk1(gclk1),
    .gclk2(gclk2)
  );

  // The master (open while gclk1 is low) and the slave (open while gclk2 is
  // high) must never be open together, or the state would race through both.
  always_comb begin
    assert final (gclk1 || !gclk2)
      else $error("master and slave latch banks open at the same time");
  end

  assign z1 = state.z1;
  assign z2 = state.z2;
  assign q  = {state.q1, state.q2};

endmodule
