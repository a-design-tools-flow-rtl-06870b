// sfsm_ref_pkg -- behavioural reference of the case-study state graph, used by
// the testbenches to compute expected values independently of the RTL.
//
// States and outputs (Z1 Z2): A/00, E/00, F/00, B/10, C/01, D/11.
// Transitions: A -> E on SA&SB, else A; E -> E on SA&SB, else F;
// F -> F on ~SA&~SB, B on SA&~SB, C on ~SA&SB, D on SA&SB; B, C, D -> A.
// The state codes {Z1, Z2, q1, q2} are written out here by hand, separately
// from the RTL package.
package sfsm_ref_pkg;

  typedef enum logic [2:0] {S_A, S_B, S_C, S_D, S_E, S_F} ref_state_e;

  function automatic ref_state_e ref_next(input ref_state_e s, input logic sa, input logic sb);
    case (s)
      S_A:     return (sa && sb) ? S_E : S_A;
      S_E:     return (sa && sb) ? S_E : S_F;
      S_F: begin
        case ({sa, sb})
          2'b00:   return S_F;
          2'b10:   return S_B;
          2'b01:   return S_C;
          default: return S_D;
        endcase
      end
      default: return S_A;   // B, C, D
    endcase
  endfunction

  // 1 when the state stays where it is (a self-loop).
  function automatic logic ref_self_loop(input ref_state_e s, input logic sa, input logic sb);
    return ref_next(s, sa, sb) == s;
  endfunction

  // Code {Z1, Z2, q1, q2}.
  function automatic logic [3:0] ref_code(input ref_state_e s);
    case (s)
      S_A:     return 4'b0000;
      S_E:     return 4'b0001;
      S_F:     return 4'b0010;
      S_B:     return 4'b1000;
      S_C:     return 4'b0100;
      default: return 4'b1100;   // D
    endcase
  endfunction

  function automatic string ref_name(input ref_state_e s);
    case (s)
      S_A: return "A";
      S_B: return "B";
      S_C: return "C";
      S_D: return "D";
      S_E: return "E";
      default: return "F";
    endcase
  endfunction

endpackage
