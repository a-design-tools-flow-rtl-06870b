// sfsm_do_pkg -- shared types and state codes of the case-study controller.
//
// The controller is a direct-output machine: its two outputs Z1 and Z2 are
// also state variables. Two more state variables, q1 and q2, are added so that
// every state gets its own code; with them the six states of the specification
// are told apart by the 4-bit vector {Z1, Z2, q1, q2}. The codes below are the
// ones of the conflict-free state graph (state/output pairs A/00, E/00, F/00,
// B/10, C/01, D/11 and q1 q2 = 00, 01, 10, 00, 00, 00). The order of the fields
// inside the packed struct is this design's own choice.
package sfsm_do_pkg;

  // Full state code: outputs first, then the inserted state variables.
  typedef struct packed {
    logic z1;
    logic z2;
    logic q1;
    logic q2;
  } state_t;

  // Primary inputs of the controller.
  typedef struct packed {
    logic sa;
    logic sb;
  } inputs_t;

  localparam int unsigned STATE_W  = $bits(state_t);

  //                                    z1    z2    q1    q2
  localparam state_t ST_A = '{z1: 1'b0, z2: 1'b0, q1: 1'b0, q2: 1'b0};
  localparam state_t ST_E = '{z1: 1'b0, z2: 1'b0, q1: 1'b0, q2: 1'b1};
  localparam state_t ST_F = '{z1: 1'b0, z2: 1'b0, q1: 1'b1, q2: 1'b0};
  localparam state_t ST_B = '{z1: 1'b1, z2: 1'b0, q1: 1'b0, q2: 1'b0};
  localparam state_t ST_C = '{z1: 1'b0, z2: 1'b1, q1: 1'b0, q2: 1'b0};
  localparam state_t ST_D = '{z1: 1'b1, z2: 1'b1, q1: 1'b0, q2: 1'b0};

  // State entered on reset.
  localparam state_t ST_RESET = ST_A;

endpackage
