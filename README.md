# JANUS-HD obfuscated finite state machine

Logic locking hides a circuit's function behind a secret key. Locking schemes
that resist SAT-based key pruning usually rely on a *point function*, such as a
Hamming distance (HD) comparator. A point function corrupts only a tiny set of
inputs, so a chip used with a wrong key still works almost everywhere.
JANUS-HD removes that trade-off for FSMs. The key decides only **when the
state flip-flops change their behaviour**. What the flip-flops do in between
follows from the machine's own transition history.

* The states of the FSM are split into two groups, V_D and V_T. Every
  transition leaving a V_D state is implemented for **D flip-flops**: the
  next-state logic (NSL) outputs the next state. Every transition leaving a
  V_T state is implemented for **T flip-flops**: the NSL outputs the bits that
  must toggle. The resulting NSL is correct under neither static reading. It is
  only correct when the flip-flops switch reading at the right moments.
* A one-bit register, the configuration control unit (CCU), holds the current
  reading. It toggles only when the machine enters an **entrance state**, a
  state reached from the other group. Entrance states are encoded so that they,
  and nothing else, sit at Hamming distance `h` from the key. An HD comparator
  against the key therefore drives the toggle.
* With a wrong key, the CCU toggles at the wrong states. From then on the
  machine runs its transitions under the wrong reading and goes off its proper
  path. About half of all states are corrupted, not just the few on-set codes.
  Meanwhile the comparator still exposes only a handful of on-set codes, so a
  key-pruning attack learns little.

This RTL implements that architecture for a small example machine.

## Block diagram

```
            x ─┐
               v
  state ──> obf_nsl ──y──> reconfig_ff (D or T, scannable) ──> state
                             ^      |  q_next
                         cfg |      v
                           ccu: hd_comparator(q_next, key) ─> T flip-flop
                                scan_cripple_ctrl(se) ─> freeze + force DUMMY_CFG
```

| File | Role |
|---|---|
| `rtl/janus_hd_pkg.sv` | `ff_cfg_e` type, example machine, its partition and encoding, and the `obf_next` formula |
| `rtl/obf_nsl.sv` | obfuscated NSL of the example machine (table built at elaboration from `obf_next`) |
| `rtl/reconfig_ff.sv` | N-bit state register: D load, T toggle or scan shift |
| `rtl/hd_comparator.sv` | `hit = (popcount(value ^ key) == H)` |
| `rtl/scan_cripple_ctrl.sv` | sticky "scan enable seen since power-up" flag |
| `rtl/ccu.sv` | T flip-flop holding the configuration, toggled by the comparator, with the scan override |
| `rtl/janus_hd_top.sv` | the complete obfuscated FSM |

## How the configuration stays in step with the state

This is the part that needs the most care. Several pieces have to agree.

**Which state is compared.** The register loads `q_next`, which is the
D-reading or T-reading of the NSL output. The comparator looks at `q_next`,
the state being entered, not at the registered state. So the configuration
flip-flop toggles on the same clock edge that loads an entrance state. The
transition that leaves that state then already uses the new group's reading.
If the comparator watched the registered state, the flip would come one
transition too late. The testbenches check this choice (see the fault test
below).

**Why states get duplicated.** If a state can be entered both from its own
group and from the other group, "toggle whenever we enter it" is wrong for one
of the two kinds of arrival. Such a state is split into two copies with the
same outgoing transitions:

* copy A is entered only across groups and gets an on-set code;
* copy B is entered only from inside the group and gets an off-set code.

After the split, a state that toggles the CCU is never entered without a
change of group. The NSL picks the copy: a move that crosses groups targets
the A copy, and a move within a group targets the B copy.

**NSL formula.** Let state `s` in group `g` go to state `t`. The NSL
output is:

```
y = code(t)             if g = D
y = code(s) ^ code(t)   if g = T
```

Codes that no state uses send the machine to the reset code under the D
reading.

## The example machine

Real benchmark FSMs are not included. The RTL carries an 8-state machine with
one input bit. Its partition and encoding were produced with the method's
steps:

* a balanced bipartition with imbalance ε = 0.2, minimising entrance states;
* duplication of mixed entrance states;
* HD-driven encoding with key `1100` and `h = 1`.

```
original (next on 0, next on 1)     transformed, encoded
S0: S0,S1   S1: S2,S1               S0  0000 D        S4 0011 T
S2: S3,S4   S3: S0,S5               S1  0001 D        S5 1110 T  entrance
S4: S6,S2   S5: S7,S6               S2A 0100 T entr.  S6 0101 T
S6: S4,S7   S7: S5,S0               S2B 0010 T        S7 1101 D  entrance
                                    S3  1000 D  entrance
```

* **Partition:** V_D = {S0, S1, S3, S7} and V_T = {S2, S4, S5, S6}, with 4
  entrance states.
* **Duplicated state:** S2 is entered from S1 (group D) and from S4 (group T),
  so it is split.
* **On-set:** with key `1100` and `h = 1`, the comparator's on-set is {0100,
  1000, 1110, 1101}. These are exactly the four entrance codes.
* **Corruption under a fixed reading:** the D reading alone gets 10 of the 18
  transitions wrong.

To obfuscate a different machine, make these changes:

1. Replace `ORIG_NEXT`, `XF`, `RESET_CODE` and `RESET_CFG` in `janus_hd_pkg`.
2. Set `STATE_W` and `IN_W`.
3. Give the key and `H` that your encoding uses.

`obf_nsl` rebuilds its table from the formula. The other modules take `N`
and `H` as parameters.

## Scan chain crippling

With `se = 1` the state register shifts: `si` goes into bit 0, and `so` is
bit 3. The first cycle with `se = 1` sets a sticky flag that only the power-on
reset (`rst_n`) clears. While the flag is set:

* the CCU flip-flop is frozen;
* the flip-flops run under a constant dummy configuration (`DUMMY_CFG`, D
  by default).

Scan access therefore reveals only the NSL under one fixed reading, and never
the comparator's response to a chosen state. Structural tests still work.
Scan in a pattern, capture for one cycle, and the value shifted out is the
D-reading successor of that pattern. `ccu` and `scan_cripple_ctrl` carry
assertions for these rules: the flag is sticky, the stored configuration is
frozen, and the output is the dummy configuration. `scan_used` shows the flag, so
test equipment knows which reading applies.

## Interface of `janus_hd_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, all flip-flops on the rising edge |
| `rst_n` | in | 1 | asynchronous active-low power-on reset: state 0000 (S0), configuration D, scan flag cleared |
| `x` | in | 1 | FSM input, sampled at each rising edge |
| `key` | in | 4 | key; the correct value for the example encoding is `1100` |
| `se`, `si`, `so` | in/in/out | 1 | scan enable, scan in, scan out |
| `state` | out | 4 | registered present state (the example machine's output) |
| `scan_used` | out | 1 | scan mode used since power-up |

The machine makes one transition per clock with no added latency. The
critical path runs NSL → D/T mux → HD comparator → configuration flip-flop
enable.

Parameters: `H` (default 1) and `DUMMY_CFG` (default `CFG_D`).

## Design choices not fixed by the method

The following are decisions of this implementation:

* The comparator's on-set is distance **exactly** `h`, as in SFLL-hd, not
  "at most `h`".
* The comparator watches the incoming state, as explained above.
* The dummy configuration is D.
* The CCU resets to the group of the reset state.
* One reset serves as the power-on reset. The scan flag is cleared by that
  reset and by nothing else.
* The key enters on a port. How the key is stored is outside this design.
* The FSM output is the state itself. The method says nothing about output
  logic.
* The scan chain covers the state register only. The CCU flip-flop is not in
  the chain.

## Known limits

* **Only the example machine is included.** The benchmark machines the method
  was evaluated on (MCNC/HP FSMs, two extracted from ITC'99 b06 and ISCAS'89
  s444, 4 to 21 state bits) are not included. Area, delay and power figures
  were not reproduced.
* **The design-time flow is not in the RTL.** Partitioning, duplication and
  encoding are software steps. Their results for the example are written into
  `janus_hd_pkg`.

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a cycle
watchdog. They need only Verilator 5. For example:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/janus_hd_pkg.sv \
          tb/tb_janus_hd_top.sv --top-module tb_janus_hd_top
./obj_dir/Vtb_janus_hd_top
```

| Testbench | What it checks |
|---|---|
| `tb_hd_comparator` | 4-bit, h=1, all value/key pairs and on-set size; 20-bit, h=3, random pairs plus pairs at distance 2, 3 and 4 |
| `tb_reconfig_ff` | random D / T / shift cycles against a model, including `q_next`, `so` and the reset value |
| `tb_scan_cripple_ctrl` | the flag rises with `se`, is sticky, and is cleared only by reset |
| `tb_ccu` | toggles on on-set inputs, holds otherwise; after scan, forced dummy output and a frozen flip-flop; 6-bit, h=2 |
| `tb_obf_nsl` | every code and input: the right original successor, the A/B copy rule, entrance codes in the on-set, unused codes to reset |
| `tb_janus_hd_top` | default parameters, end to end (details below) |

`tb_janus_hd_top` runs four phases:

1. 3000 random inputs with the correct key, each checked against the exact
   expected code.
2. All 15 wrong keys, 300 inputs each. All 15 corrupt the machine, in about
   47% of cycles.
3. A scan shift-in of a chosen state, with the old state checked on `so`,
   then 400 cycles checked against the D reading. Then 20 structural tests:
   scan in a random pattern, capture one cycle, scan out, and compare with
   the pattern's successor under the D reading.
4. Recovery after a new power-on reset.

The testbench counts configuration flips, D moves, T moves, visits to both S2
copies, scan shifts and dummy moves, and fails if any of them never occurs.
