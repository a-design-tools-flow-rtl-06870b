// tb_inhibition_logic -- exhaustive check of the clock inhibition function.
//
// For every reachable state (A..F) and all four input values SA SB, h must be
// 1 exactly when the behavioural state graph keeps the machine in the same
// state. The test also counts how many patterns inhibit and how many do not,
// and fails if the sweep did not contain both. A watchdog ends the run with a
// failure if it hangs.
module tb_inhibition_logic;
  import sfsm_do_pkg::*;
  import sfsm_ref_pkg::*;

  state_t  state;
  inputs_t in;
  logic    h;

  int unsigned checks   = 0;
  int unsigned failures = 0;
  int unsigned n_inhibit = 0;
  int unsigned n_run     = 0;

  inhibition_logic dut (
    .state(state),
    .in   (in),
    .h    (h)
  );

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_state_e s;
    logic       exp_h;
    for (int rep = 0; rep < 4; rep++) begin
      for (int si = 0; si < 6; si++) begin
        for (int v = 0; v < 4; v++) begin
          s     = ref_state_e'(si);
          state = state_t'(ref_code(s));
          in    = inputs_t'(v[1:0]);
          #1;
          exp_h = ref_self_loop(s, in.sa, in.sb);
          if (exp_h) n_inhibit++; else n_run++;
          checks++;
          if (h !== exp_h) begin
            failures++;
            $display("FAIL state %s SA=%b SB=%b: h=%b expected %b",
                     ref_name(s), in.sa, in.sb, h, exp_h);
          end
        end
      end
    end
    checks++;
    if (n_inhibit == 0 || n_run == 0) begin
      failures++;
      $display("FAIL sweep lacks inhibiting (%0d) or running (%0d) patterns", n_inhibit, n_run);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
