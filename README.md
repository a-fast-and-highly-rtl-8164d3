# Replay: emulating path delays with plain logic

Timing speculation runs a circuit with a clock period shorter than its worst-case path
delay and relies on detecting (and recovering from) the rare cycles in which a slow path
is actually exercised. Whether that pays off depends on how often those cycles occur for
real input data, which static timing analysis cannot tell and delay-annotated gate-level
simulation is far too slow to measure over whole programs.

This RTL implements **Replay**, a way to predict, cycle by cycle and with ordinary
zero-delay logic, what every endpoint flip-flop would capture if the clock edge came at
an aggressive time, the *TS boundary*. Because the predictor is just logic, it runs in
an ordinary simulator or on an FPGA at close to full speed. The same predictor can also
feed its (possibly wrong) values back into the circuit, which emulates timing faults,
for instance during a supply-voltage drop, and lets their effect on a running program be
observed.

## The idea: a one-cycle-late copy with "met" nodes tied to the present

Think of each gate input as holding last cycle's value until this cycle's new value has
arrived. If every path through a gate input to the endpoint is shorter than the TS
boundary, that input will certainly have its new value in time; otherwise treat it as
still holding the old value. Replay turns that into a circuit, per endpoint:

1. **Timing analysis.** For every gate input node k of gate g compute the longest path
   through it to the endpoint:

       PD(g,k) = AT(input net) + delay(g) + DN(output of g)

   where AT is the latest arrival time from the startpoints and DN the longest delay from
   a net to the endpoint. The first example net (below) has PD values of
   30, 40, 35/40, 30/40, 40 and 15/40 ps.
2. **Replication.** Copy the endpoint's fan-in logic.
3. **One cycle late.** Drive the copy's startpoints from a register holding the
   *previous* cycle's startpoints. Alone, the copy reproduces last cycle's endpoint value.
4. **Replacement.** Every input node with PD < TS boundary ("met") is disconnected from
   the copy and tied to the same net of the original logic, which carries this cycle's
   settled value. Nodes at or above the boundary keep the late copy's value.

The copy's endpoint is the prediction. Where the prediction differs from the correct
endpoint value, a timing error is reported for that endpoint; a cycle is in error when
any endpoint is.

What makes this better than simply asking "did any slow startpoint change?" is that a
met path can mask a violated one: with an AND gate whose met input is 0 this cycle, a
late change on the other input cannot reach the endpoint. The replaced node reproduces
that masking, and masking along several gates multiplies, as it does in the real circuit.

### Worked example (the default net)

Startpoints A (net 0) and B (net 1), one endpoint, TS boundary 32 ps:

| net | gate           | delay | longest path through its input node(s) |
|-----|----------------|-------|-----------------------------------------|
| 2   | P = NOT A      | 5 ps  | 30                                      |
| 3   | NOT B          | 5 ps  | 40                                      |
| 4   | A AND n3       | 10 ps | 35 (A), 40 (n3)                         |
| 5   | Q = n2 AND n4  | 10 ps | 30 (n2), 40 (n4)                        |
| 6   | NOT n5         | 5 ps  | 40                                      |
| 7   | R = n2 AND n6  | 10 ps | 15 (n2), 40 (n6) — endpoint             |

At 32 ps the input of P and the inputs of Q and R that come from P are met and get
replaced, so the prediction is `~A & ~(~A & A' & ~B')` where primes denote last cycle's
values. Worst-case arrival is 40 ps. The delays are those of the published example; the
gate functions are this implementation's choice, since the example specifies only the
delays and the structure.

### Where the heuristic goes wrong

The rule uses the *longest* path through a node. If the paths through a node have very
different delays, a node can be declared late although the change that actually happens
arrives early. The second example net in `replay_pkg` (`FIG11_*`: X = A AND (B OR C),
endpoint = X AND (X XOR NOT D), all gates 10 ps, boundary 25 ps) shows this: nothing is
replaced, so when (A,B,C,D) goes from 1111 to 0111 the predictor reports the old value 1
and an error, while in the real circuit the endpoint has already fallen to 0 by 20 ps. The
testbench checks exactly this false positive. Circuits with many reconvergent paths of
unequal length, such as multipliers, are where this costs accuracy.

## Blocks

All blocks are parameterized by the same gate-net description from `replay_pkg`:

* `NS` startpoints (nets `0..NS-1`), then `NG` gates in topological order, gate `g`
  driving net `NS+g`. A gate is a `gate_t` struct: function (`BUF INV AND OR NAND NOR
  XOR XNOR`), two input net numbers (the second ignored by single-input gates) and a delay
  in ps. Net numbers are 16 bits. Gates with more inputs must be split into 2-input gates.
* `ENDPOINTS`: the endpoint net numbers. `TS_BOUNDARY_PS`: the boundary in ps.

Changing the target circuit or the boundary means changing parameters; the timing
analysis and the node replacement are redone at elaboration by constant functions.

| module | role |
|---|---|
| `replay_pkg` | `gate_t`, gate evaluation, the two example nets |
| `replay_logic` | original zero-delay logic; exposes every net |
| `replay_tse_block` | one endpoint's predictor: elaboration-time timing analysis (`NODE_PD`, `MET` localparams), previous-startpoint register, replicated logic with met-node replacement |
| `replay_ts_predictor` | one shared `replay_logic`, one `replay_tse_block` per endpoint, `!=` per endpoint, OR to the cycle error |
| `replay_fault_injector` | a sequential target: startpoints = input ports then state flip-flops; per endpoint a 2:1 mux chooses correct (drop flag 0) or predicted (flag 1) values for the outputs and the flip-flops |
| `voltage_drop_flag_gen` | periodic drop flag: `interval_cycles` low, `drop_cycles` high, repeated |
| `ts_accuracy_counter` | counts the four outcomes of actual vs. emulated error |
| `replay_emulator_top` | all of the above around one target |

### Timing of the predictor

`sp` carries the startpoints of the current emulated cycle (in a real design, the
outputs of the launching flip-flops). Each TSE block registers `sp` on every rising clock
edge, so its prediction in cycle *t* is built from the startpoints of cycles *t−1* and
*t*; outputs `correct`, `predicted`, `ep_err` and `err` are combinational and belong to
cycle *t*. The previous-startpoint register has no reset: hold the startpoints for at
least one clock (for example during reset) before trusting the first prediction.

### Fault injection and error propagation

In `replay_fault_injector` the prediction is not only compared: while `drop` is high it
*replaces* the correct values at the outputs and at the state flip-flops. A wrong value
then becomes a startpoint of the next cycle, so faults propagate through the design as
they would in hardware without per-flip-flop error correction. This covers two uses:
coarse-grained (architecture-level) speculation, where errors must travel into later
pipeline stages before they are detected, and error-tolerant applications, where the
interest is in how much the program's output degrades. The comparator output is kept,
so the same build gives the error trace when `drop` stays low.

The voltage-drop model is simple: during a drop the circuit is assumed to behave as if
clocked at the (shorter) TS boundary the emulator was built for, and correctly otherwise.
In the published study the drop boundary was 0.75 of the worst-case arrival time. For the
default 40 ps example that is 30 ps, which replaces only R's 15 ps node and never changes
the endpoint; the default therefore keeps the example's 32 ps, and the 30 ps instance is
tested separately. `voltage_drop_flag_gen` starts with an interval period one clock
after `enable` rises; counting from that edge (k = 0), the flag is high when
`k mod (I+D) >= I`. 32-bit lengths cover the published sweep (drops of 1 to about 50K
cycles, intervals of 10K to 100M cycles).

### Judging accuracy

`ts_accuracy_counter` takes an externally supplied actual error (from a delay-accurate
reference run in lock-step) and the emulated error, and counts A (both), B (actual only,
false negative), C (emulated only, false positive) and D (neither). Accuracy is
(A+D)/N, false-positive rate C/N, false-negative rate B/N, actual error rate (A+B)/N.

## Top level

`replay_emulator_top` instantiates the fault injector, the drop-flag generator and the
counter. With `drop_en` low it is a pure timing-error tracer (`err` each cycle); with
`drop_en` high it injects faults periodically. The actual error for the counters enters
on `actual_err`/`actual_valid`. Defaults: the worked example with A an input port and B a
state flip-flop that captures the endpoint (that feedback is this implementation's
choice, to give the example some state), boundary 32 ps, 32-bit counters.

## How far to trust it

Follows the method as published:
* the node-delay formula, the strict "below the boundary" replacement rule, replication
  per endpoint, the one-cycle-late startpoints, the `!=` comparator, the cycle error as
  OR over endpoints, the flag-selected mux feeding outputs and flip-flops, and the four
  outcome counts;
* elaborated node delays match all printed delays of both examples (checked).

This implementation's own choices:
* doing the timing analysis and generation inside SystemVerilog at elaboration instead
  of in a separate generator reading a synthesis tool's timing reports;
* the gate-net format (2-input gates, integer ps), the gate functions of the examples,
  the sequential wrapping of the first example, sharing one original-logic copy;
* the drop-flag generator's start/idle behaviour, counter widths, resets and clears.

Not provided: the processor and FPGA platform used in the published evaluation, and the
benchmark netlists; any gate net in the format above can be supplied instead. Nets must
be written out by hand or by a script as parameter values; large nets make elaboration
proportionally slower (the analysis is O(gates) per endpoint).

Accuracy seen in simulation, always against a transport-delay reference:

* default net at 32 ps, random inputs, 4000 cycles: agreement on every cycle;
* generated 8x8 array multiplier (320 two-input gates, 16 endpoints, AND/OR 2 ps,
  XOR 3 ps, 2000 random operand pairs), averaged over endpoints: at 0.8 of worst-case
  arrival (74 of 93 ps) about 99.4% accuracy with 0.1% false positives and 0.5% false
  negatives; at 0.9 about 99.98%. Per cycle (any endpoint wrong) the 0.8 accuracy is
  about 93.5%, most misses being false negatives.

The heuristic is exact only when all paths through a node have similar delay, so deep
arithmetic with reconvergent paths is where to expect disagreement. A 16x16 version of the
multiplier test is meant to be possible (the RTL has no size limit below 65,536 nets),
but Verilator's elaboration of 64 endpoint predictors over 1408 gates did not finish in
15 minutes; 8x8 is the largest size simulated.

## Simulating

Testbenches are self-checking and print `TB_RESULT checks=N failures=M`. They share
`tb/tb_delay_ref_pkg.sv`, which holds a transport-delay model of a gate net (each net
evaluated on a 1 ps grid, the endpoint sampled at the boundary; an actual error is a
value at the boundary differing from the settled value) and an independent Replay
reference driven by hand-typed node delays.

    verilator --binary --timing --assert -Wno-fatal \
      rtl/replay_pkg.sv tb/tb_delay_ref_pkg.sv rtl/replay_logic.sv \
      rtl/replay_tse_block.sv rtl/replay_ts_predictor.sv rtl/replay_fault_injector.sv \
      rtl/voltage_drop_flag_gen.sv rtl/ts_accuracy_counter.sv rtl/replay_emulator_top.sv \
      tb/tb_replay_emulator_top.sv --top-module tb_replay_emulator_top -o sim
    ./obj_dir/sim

Swap the last file and `--top-module` for any other `tb/tb_*.sv`.
`tb_replay_multiplier_workload` generates its multiplier net at elaboration (change `W`
to resize it) and prints accuracy, false-positive and false-negative rates at 0.8 and 0.9
of worst-case arrival. `tb_replay_emulator_top`
runs the top at its default parameters: 3000 cycles of error tracing, a counter clear,
then 6000 cycles with an interval of 7 and a drop of 3 cycles, checking flag, outputs,
state, error trace and counters every cycle and requiring that errors, drops, injected
faults and the clear all occurred.

To emulate another circuit, write its gates as a `gate_t` array (topological order) and
pass `NS`/`NI`/`NF`, `NG`, `NE`, `GATES`, `ENDPOINTS` and `TS_BOUNDARY_PS`. Inspect
`u_tse.NODE_PD` and `u_tse.MET` inside a `replay_tse_block` instance to see which nodes
were replaced.
