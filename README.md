# Testable reversible latches from Fredkin gates

This design is a set of four level-sensitive latches (D, T, JK and RS). Each is
built only from Fredkin gates, which are *conservative reversible* gates. The
target technology is molecular quantum-dot cellular automata (QCA), where
defects are common and testing must be cheap.

A conservative gate has as many 1s on its outputs as on its inputs, and it maps
inputs to outputs one-to-one. A combinational circuit made only of such gates
needs just two test vectors to find any unidirectional stuck-at fault: all 0s
and all 1s. With all 0s applied, every wire must be 0, because no gate can
make a 1 from nothing. With all 1s applied, every wire must be 1. So a fault
shows up as a wrong value on some output.

A latch breaks this property, because its feedback loop keeps a value. After
all 1s, the loop still holds 1 when all 0s is applied, and a good circuit then
looks like one with a stuck-at-1 fault. Reversible logic also forbids fan-out,
yet a latch output must both leave the latch and feed back into it.

Both problems are solved by one extra Fredkin gate with two control inputs, C1
and C2:

* In normal mode it works as a fan-out gate. It makes a copy of the latch value
  for the feedback and its complement as Q'.
* In test mode it forces the feedback wire to a constant, 0 or 1. This cuts the
  loop, and the whole latch can then be tested like a combinational
  conservative circuit.

## The Fredkin gate

```
p = a
q = a ? c : b        = a'b + ac
r = a ? b : c        = ab + a'c
```

`a` is passed through. When `a = 1`, `b` and `c` swap places. The gate is built
the way it is laid out in QCA:

* two inverters on `a`;
* four majority voters with one input at 0, used as ANDs: `ab`, `a'c`, `a'b`
  and `ac`;
* two majority voters with one input at 1, used as ORs.

`maj3` and `qca_inverter` are these two QCA devices. `fredkin_gate` contains an
immediate assertion that the number of 1s is kept on every evaluation.

Two facts are used below. Fixing one input to a constant turns the gate into a
familiar function:

* `F(x, 0, 1)` gives `x` on `q` and `x'` on `r`. This is a fan-out with a
  complement.
* `F(x, y, 0)` gives `x·y` on `r`.
* `F(x, 1, y)` gives `x' + y` on `q`.

Second, if `b` and `c` are equal, then `q` and `r` both equal that value
whatever `a` is. This is how the controls cut the feedback.

## Control codes

| C1C2 | D, T and JK latches | RS latch |
|------|---------------------|----------|
| 01   | normal operation | (not used) |
| 00   | test: feedback forced to 0; apply the all-0s vector | test: apply the all-0s vector |
| 11   | test: feedback forced to 1; apply the all-1s vector | normal operation, and also the all-1s test |

In the testbenches these codes are named in `tb/rlatch_pkg.sv` (`CTRL_NORMAL`,
`CTRL_TEST_ALL0`, `CTRL_TEST_ALL1`, `RS_CTRL_NORMAL`).

Some gates have constant inputs, drawn as fixed 0 or 1. These come out as a port
`anc` (ancilla) so that a tester can drive them with the test vector too. In
normal use, tie them to the values in the table below. The testbenches use the
constants `*_ANC_NORMAL` for this.

Each latch also has a port `garbage`. It carries every gate output that the
latch does not use, so that all outputs can be observed during a test.

## The four latches

`Tn` is the fed-back copy of the state. `Fk` is the k-th Fredkin gate. In every
latch the gates are combinational. The only storage is one flip-flop (two in
the JK latch) on the feedback wire, clocked by `clk` (see *Timing* below).

### D latch: `Q+ = D·E + E'·Q` (`testable_d_latch`, 2 gates)

```
F1(a=E,   b=D,  c=T1) : r = E ? D : T1            -> next state x
F2(a=x,   b=C1, c=C2) : p = x  (port q)
                        q = x ? C2 : C1  = T1  (x  when C1C2 = 01)
                        r = x ? C1 : C2  = T2  (x' when C1C2 = 01)
```

T1 goes back to F1. T2 is Q'.

### T latch: `Q+ = (T·E) xor Q` (`testable_t_latch`, 3 gates, `anc = 0`)

```
F1(a=T,   b=E,  c=anc) : r = T·E
F2(a=T1,  b=C1, c=C2)  : p = stored Q (port q_prev), q = Q, r = Q'    (01)
F3(a=T·E, b=F2.q, c=F2.r) : q = T1 = (T·E) xor Q,  r = T2 = its complement
```

F3 swaps Q and Q' when T·E = 1. In test mode F2 drives both data inputs of F3 to
the same constant, so T1 and T2 are both that constant.

### JK latch: `Q+ = (J·Q' + K'·Q)·E + E'·Q` (`testable_jk_latch`, 4 gates, `anc = 01`)

```
F1(a=K,  b=anc[1], c=anc[0]) : r = K'
F2(a=T2 (Q'), b=J, c=K')     : r = Q' ? J : K' = J·Q' + K'·Q
F3, F4                       : the D latch above, with F2.r as D
```

F4.q (T1) goes back to F3. F4.r (T2 = Q') goes back to F2. Both feedback wires
are registered.

### RS latch: `Q+ = S·E + (R·E)'·Q` (`testable_rs_latch`, 4 gates, `anc = 00`)

```
F1(a=E,  b=S,  c=anc[1]) : r = S·E,  p = E passed to F2
F2(a=E,  b=R,  c=anc[0]) : r = R·E
F4(a=T1 (stored Q), b=R·E, c=C2) : r = T2 = Q ? R·E : C2 = Q' + R·E      (C2 = 1)
F3(a=T2, b=C1, c=S·E)            : q = T1 = T2 ? S·E : C1 = T2' + S·E    (C1 = 1)
```

F3 and F4 form a cross-coupled OR/implication pair, and C1 and C2 are their
constant-1 inputs. With C1C2 = 00 and all 0s applied, both gates see only 0s, so
T1 = T2 = 0 whatever the loop holds. With the all-1s vector, both gates see only
1s, so normal mode is also the all-1s test.

**This wiring of F3 and F4 is a reconstruction.** The gate count, the equation,
the control codes and the Q'-feedback are those of the original design, but
which pins carry which signal is this design's choice. It was picked as the
wiring that meets the equation and both test conditions. Take it as
"functionally equivalent", not "identical".

Behaviour to know about:

* S = R = E = 1 is the forbidden input of an RS latch. It gives Q = Q' = 1.
* In a cycle that sets a latch holding 0, `qn` still shows 1 until the next
  clock edge.

## Timing

In QCA every wire and gate is clocked. Four clock zones make one cycle, and one
Fredkin gate delays its output by one cycle. This RTL abstracts that:

* The gates are combinational.
* Each feedback loop holds exactly one register (`clk`, rising edge). In the JK
  latch the two feedback wires each have one.
* Outputs answer the inputs in the same cycle, so the latch is transparent while
  E = 1.
* The state moves on at the next rising edge of `clk`. A T latch (T = E = 1) or
  a JK latch (J = K = E = 1) therefore toggles once per clock, not
  continuously.

There is no reset port. The test modes serve for initialisation:

* One clock with C1C2 = 00 clears the D, T and JK latches.
* One clock with C1C2 = 11 presets them.
* For the RS latch, one clock in 00 with S·E = 0 clears it.

The register starts at an unknown value until one of these is applied.

After a test, the JK latch's two feedback registers hold the same value, which
is not a legal Q/Q' pair. The first normal cycle should have E = 0. That cycle
reloads Q from T1 and makes the pair consistent again.

## The gate with its QCA clock zones

`fredkin_gate_qca` is the same gate, timed as it is laid out in QCA. The input
cells sit in clock zone 0, the AND voters in zone 1, buffer cells in zone 2 and
the OR voters in zone 3. Each zone is one register clocked by `phase_clk`, which
has one rising edge per zone (four per QCA cycle). So `q` and `r` follow the
inputs by four edges. `p` is tapped from the zone-0 input line and follows `a`
by one edge. The top places one of these on its own, with ports `phase_clk` and
`qg_*`. The latches do not use it: they keep the one-register-per-loop model
described above.

## How this differs from the gate-level QCA original

* **Per-gate delay.** The QCA layouts delay each gate by a full clock cycle, so
  a loop of k gates holds k values in flight. In the latches, one register per
  loop replaces them. Only the stand-alone `fredkin_gate_qca` keeps the timing
  of each zone.
* **Fan-out at ports.** Wires such as T1 feed both the register and an output
  port. In the original these are the latch's output wires, and the fan-out
  only happens outside the reversible circuit.
* **Extra ports.** The `anc` and `garbage` ports are additions. They only expose
  what the original ties off or leaves open.
* **Q' feedback in the T latch.** A compact QCA layout of the T latch feeds back
  Q' instead of Q. The block-level wiring with Q feedback is followed here.
* **Not modelled.** The QCA cell, binary wire and inverter chain have no logic
  function beyond a wire, so they have no RTL. The four-phase clock appears
  only as the zone registers of `fredkin_gate_qca`.

## Files

| file | contents |
|------|----------|
| `rtl/maj3.sv`, `rtl/qca_inverter.sv` | QCA majority voter and inverter |
| `rtl/fredkin_gate.sv` | Fredkin gate from 6 voters and 2 inverters, conservation assertion |
| `rtl/fredkin_gate_qca.sv` | the same gate pipelined by QCA clock zone (latency 4 `phase_clk` edges) |
| `rtl/testable_d_latch.sv`, `rtl/testable_t_latch.sv`, `rtl/testable_jk_latch.sv`, `rtl/testable_rs_latch.sv` | the four latches |
| `rtl/testable_latches_top.sv` | all four side by side on one `clk`, every port brought out with a `d_`, `t_`, `jk_`, `rs_` prefix; plus one clock-zoned gate (`qg_` ports, `phase_clk`) |
| `tb/latch_ref_pkg.sv` | characteristic equations and the Fredkin truth table, used as reference models |
| `tb/rlatch_pkg.sv` | control-code enum and normal-mode constants |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_two_vector_test` (fault coverage of the two-vector test) |

## Verification

Every testbench ends with a line `TB_RESULT checks=N failures=M` and has a
watchdog.

* **Gates.** `tb_maj3`, `tb_qca_inverter` and `tb_fredkin_gate` are exhaustive.
  The Fredkin test also checks conservation and that the mapping is one-to-one.
  `tb_fredkin_gate_qca` checks the clock-zoned gate on 500 random vectors. It
  also measures its latency, which must be exactly four `phase_clk` edges.
* **Single latches.** Each latch testbench runs 400 cycles of random inputs in
  normal mode, compared with the latch's characteristic equation. Bursts of
  test mode are mixed in. They check the forced feedback values, and that every
  output, `garbage` included, equals the applied all-0s or all-1s vector once
  the loop has flushed. Each testbench counts how often every behaviour (set,
  reset, toggle, hold, the two tests) occurred, and fails if one never did.
* **Whole design.** `tb_testable_latches_top` runs all four latches together
  for 2000 cycles. It mixes random normal operation with about 90 whole-design
  tests for each of the two vectors, plus the switches between the modes.
  Meanwhile it checks the clock-zoned gate on its own clock.
* **The two-vector claim.** `tb_two_vector_test` applies the two-vector
  procedure to the whole design: two clocks of all 0s with C1C2 = 00, then two
  clocks of all 1s with C1C2 = 11, observing every output in the second clock.
  It first checks that the fault-free design passes. It then forces a
  stuck-at-0 and a stuck-at-1 fault on each of the 44 Fredkin gate outputs and
  feedback wires. A feedback wire is forced where it enters its gate. Every one
  of the 88 faults is detected, and so are 200 random multiple faults that all
  stick at the same value. The faults are applied with `force` from the
  testbench. Assertions are switched off meanwhile, because a forced output
  breaks the conservation that `fredkin_gate` asserts. The claim holds for
  faults on the terminals of the Fredkin gates. It does not cover nodes inside
  a gate: a stuck-at-0 on the `a'c` voter, for example, is never excited by
  either vector.

All testbenches pass. A deliberate wiring error in any module, such as swapped
C1/C2 or J/K', makes the matching testbench fail.

Simulating with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    tb/latch_ref_pkg.sv tb/rlatch_pkg.sv tb/tb_testable_latches_top.sv \
    --top-module tb_testable_latches_top -o sim
./obj_dir/sim
```

Replace the last file and the top module name to run another testbench. The
RTL has no parameters: every block is one bit wide, as in the original design.
