# Gated-clock direct-output controller in latch master-slave form

A finite state machine controller in which **the outputs are the state**, the
state lives in **transparent latches instead of flip-flops**, and the clock is
**stopped whenever the machine would stay where it is**.

These three ideas each cut dynamic power:

* **Direct output.** In a direct-output Moore machine the output bits are
  themselves state variables, so no output decoder follows the state
  register. The outputs come straight from storage elements, so they cannot
  glitch and arrive with less delay. Extra state variables are added only where
  two states with the same output must be told apart.
* **Latch master-slave pair with the logic in the middle.** A master bank of
  latches freezes the inputs and the present state. The next-state/output logic
  works on these frozen values. A slave bank of latches stores the result. The
  slave only opens after the master has closed, so hazards in the logic never
  reach the outputs.
* **Clock inhibition on self-loops.** A combinational function `h` is 1 exactly
  when the present state loops back to itself under the present inputs. While
  `h` is 1, both latch clocks are held inactive, so neither bank toggles. Many
  controllers spend most of their cycles waiting in a state, and those cycles
  then cost almost no clock power.

The RTL implements this architecture for a six-state example controller, with
two inputs `SA`, `SB` and two outputs `Z1`, `Z2`.

## The example controller

State graph (state / `Z1 Z2`):

| state | Z1 Z2 | q1 q2 | SA SB = 00 | 01 | 10 | 11 |
|-------|-------|-------|-----------|----|----|----|
| A     | 00    | 00    | A         | A  | A  | E  |
| E     | 00    | 01    | F         | F  | F  | E  |
| F     | 00    | 10    | F         | C  | B  | D  |
| B     | 10    | 00    | A         | A  | A  | A  |
| C     | 01    | 00    | A         | A  | A  | A  |
| D     | 11    | 00    | A         | A  | A  | A  |

The outputs give only four distinct codes for six states, and A, E and F share
`Z1 Z2 = 00`. The state assignment therefore adds two state variables, `q1` and
`q2`. The full stored state is the 4-bit vector `{Z1, Z2, q1, q2}`
(`sfsm_do_pkg::state_t`). The outputs are taken straight from the slave
latches.

Next-state and output equations, with the ten unused codes as don't cares:

```
Z1' = q1·SA
Z2' = q1·SB
q1' = q2·~SA + q2·~SB + q1·~SA·~SB
q2' = SA·SB·~q1·~Z1·~Z2
```

Inhibition function (1 = self-loop):

```
h = ~Z1·~Z2·~q1·~q2·~SA + ~Z1·~Z2·~q1·~q2·~SB + q1·~SA·~SB + q2·SA·SB
```

The next-state equations give the full next state, self-loops included. The
logic is therefore correct even if the clock is never stopped, and `h` is
purely a power optimisation. Both sets of equations were minimised by hand
for this RTL. Together they use 10 product terms.

## How the latches and the gated clocks cooperate

This is the part that takes the most care.

```
            +-----------+      +------------------+      +-----------+
 SA,SB ---->|  master   |----->| next-state and   |----->|  slave    |---> Z1,Z2 (q1,q2)
 state ---->| 6 latches |      | output logic     |      | 4 latches |--+
   ^        +-----------+      +------------------+      +-----------+  |
   |           en: GCLK1 (active low)                      en: GCLK2    |
   +--------------------------------------------------------------------+
 SA,SB, state --> inhibition logic --> h --> gated-clock control --> GCLK1, GCLK2
```

`gated_clock_control` contains two latches on `h`, each followed by a gate:

| signal  | formula                    | latch on `h` is transparent while | bank it drives (open while)        |
|---------|----------------------------|-----------------------------------|------------------------------------|
| `GCLK1` | `Clk OR h_L1`              | `Clk` high (holds in the low half)  | master, open while `GCLK1` low       |
| `GCLK2` | `Clk AND NOT h_L2`         | `Clk` low (holds in the high half)  | slave, open while `GCLK2` high       |

Each gating latch holds `h` steady for exactly the half-period in which its
gate passes the clock. A change of `h` can therefore never shorten a clock
pulse or create a spurious one. The resulting behaviour:

* **Low half of `Clk`.** The master is open if `h` was 0 at the falling edge.
  It then follows the inputs and the present state. The slave is closed.
* **Rising edge.** The master closes and freezes (state, inputs). The gate for
  the slave samples `h` from the live inputs and the present state.
* **High half of `Clk`.** If that `h` is 0, the slave opens and takes the
  next state computed from the frozen master contents, so the outputs change
  shortly after the rising edge. If `h` is 1, nothing moves.

Two properties follow, and the end-to-end testbench checks both.

1. **The outputs only change while `Clk` is high,** and only once per cycle.
2. **When an input takes effect.** If the inputs are stable from the start of
   the high half until the next rising edge, the controller behaves exactly
   like a Moore machine on rising-edge flip-flops. If the machine is waiting in
   a self-loop and the input that releases it arrives during the low half, the
   master was kept closed in that half (`h` was 1 at the falling edge). The
   exit then happens one cycle later, provided the input is still there. The
   delayed cycle is harmless. When the slave opens while the master is still
   closed, it rewrites the state the frozen master contents already produced
   last time, so nothing changes.

   The precise rule, used as the reference model: at a rising edge the state
   moves to `next(s, inputs)` if and only if `s` is not in a self-loop for the
   inputs at the preceding falling edge, and not in a self-loop for the inputs
   at this rising edge.

## Files

| file | contents |
|------|----------|
| `rtl/sfsm_do_pkg.sv` | `state_t` `{z1,z2,q1,q2}`, `inputs_t` `{sa,sb}`, the six state codes |
| `rtl/latch_bank.sv` | `WIDTH` transparent D latches, common enable of selectable polarity (`EN_ACTIVE_LOW`), asynchronous reset to `RESET_VALUE` |
| `rtl/next_state_output_logic.sv` | next-state/output equations above |
| `rtl/inhibition_logic.sv` | the function `h` |
| `rtl/gated_clock_control.sv` | the two latch-based clock gates |
| `rtl/sfsm_do_gc_top.sv` | the complete controller (top) |
| `tb/sfsm_ref_pkg.sv` | behavioural state graph used by the testbenches as reference |
| `tb/tb_*.sv` | one self-checking testbench per module |

Top-level ports of `sfsm_do_gc_top`: `clk`, `rst` (asynchronous, active high,
to state A), `sa`, `sb`, `z1`, `z2`. Also brought out, for observation only:
`q` (`{q1,q2}`), `h`, `gclk1` and `gclk2`. The design has no size parameters.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
For example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/sfsm_do_pkg.sv tb/sfsm_ref_pkg.sv tb/tb_sfsm_do_gc_top.sv \
    --top-module tb_sfsm_do_gc_top -o sim
./obj_dir/sim
```

The simulation has zero delays, so inputs must never change in the same time
step as a clock edge. All testbenches obey this.

* `tb_sfsm_do_gc_top` first walks A E F B A E F C A E F D, which takes each
  exit of F once, and compares each state with a fixed list. It then runs
  20 000 cycles of random inputs that change at random times in both clock
  halves, with occasional resets. Against the reference rule above it checks
  the state, `h`, `gclk1` and `gclk2` in every half-period, and it flags any
  output change while `Clk` is low. It also counts suppressed master and slave
  clock pulses, transitions, entries into every state, delayed self-loop exits
  and resets, and fails if any of these never happened. A typical run has
  about 10 000 suppressed pulses per bank, 8 700 transitions and 1 000 delayed
  exits.
* `tb_gated_clock_control` toggles `h` twice in every half-period and checks
  that each gated clock only reflects `h` as sampled at the proper edge.
* `tb_latch_bank` checks transparency, hold and reset for both enable
  polarities.
* `tb_next_state_output_logic` and `tb_inhibition_logic` check every
  reachable (state, input) pair against the state graph.

## Departures and choices not fixed by the architecture

* **Z1 and Z2 are latched in the master bank,** alongside `q1`, `q2`, `SA`
  and `SB` (6 master latches). Without `Z1`/`Z2`, state D under `SA SB = 11`
  cannot be told from state A under the same inputs, yet one must go to A and
  the other to E.
* **Reset.** The architecture has no reset. This RTL adds an asynchronous
  active-high reset to state A (code 0000). It clears both latch banks and both
  gating latches, so the clocks run right after reset.
* **Equations.** The logic equations are this design's own two-level
  minimisation. A published minimisation of the same machine has 10 products
  and 31 literals; these equations have 10 products and 32 literals.
* **Observation ports.** `q`, `h`, `gclk1` and `gclk2` are extra ports.
* **Results not reproduced.** Nothing here reproduces the power, frequency or
  area measurements of an FPGA implementation, which cannot be simulated at
  RTL. The claims behind the design are that it saves dynamic power against a
  conventional gated-clock FSM and that it has glitch-free outputs. The RTL
  only establishes the logic that makes both plausible: inactive clocks in
  every self-loop, and outputs that move once per cycle.

## Tool warnings that stand

* **Latches.** Latches are intended throughout. In the full controller, lint
  may report "no latches detected" for `latch_bank`, because the banks sit
  inside a feedback loop. Synthesis does map every bit to a latch (12 in
  total).
* **Combinational loop.** The loop slave → master → logic → slave, and the one
  through `h` and the gating latches, is reported as combinational. It is
  never transparent end to end, because `GCLK1` (low) and `GCLK2` (high) are
  never active at the same time.

## Using the architecture for another controller

Replace `next_state_output_logic` and `inhibition_logic` with the equations
of the new machine. Change `state_t`/`inputs_t` and the state codes in
`sfsm_do_pkg`. The bank widths in the top follow from `$bits` of these types.
The latch banks and `gated_clock_control` stay unchanged. The state
assignment must give every state a distinct code, adding state variables
beyond the outputs where needed. `h` must be 1 only where the next state
equals the present one.
