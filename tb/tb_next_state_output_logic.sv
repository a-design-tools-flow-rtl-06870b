// tb_next_state_output_logic -- exhaustive check of the next-state/output
// equations against the behavioural state graph.
//
// Every reachable state (A..F) is combined with all four input values SA SB,
// and the 4-bit next code {Z1, Z2, q1, q2} of the logic is compared with the
// code of the state the reference graph moves to. Self-loops are included:
// the logic is required to give the full next state. The whole sweep is
// repeated several times with a settling delay between patterns. A watchdog
// ends the run with a failure if it hangs.
module tb_next_state_output_logic;
  import sfsm_do_pkg::*;
  import sfsm_ref_pkg::*;

  state_t  state, next;
  inputs_t in;

  int unsigned checks   = 0;
  int unsigned failures = 0;

  next_state_output_logic dut (
    .state(state),
    .in   (in),
    .next (next)
  );

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_state_e s, n;
    for (int rep = 0; rep < 4; rep++) begin
      for (int si = 0; si < 6; si++) begin
        for (int v = 0; v < 4; v++) begin
          s     = ref_state_e'(si);
          state = state_t'(ref_code(s));
          in    = inputs_t'(v[1:0]);
          #1;
          n = ref_next(s, in.sa, in.sb);
          checks++;
          if (next !== state_t'(ref_code(n))) begin
            failures++;
            $display("FAIL state %s SA=%b SB=%b: next code %b expected %b (%s)",
                     ref_name(s), in.sa, in.sb, next, ref_code(n), ref_name(n));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
