# SPaRe: concurrent fault detection for FSMs by selective partial replication

A finite state machine can check itself while it runs if you build a copy of
its next-state logic next to it and compare the two every cycle. That is
duplication. It catches every error at once, but it costs more than the
machine itself. SPaRe uses a cheaper idea. Each transition is checked on only
**L of the K state bits**. Which L bits depends on the transition, so every
bit still gets checked often. The checker is a *partial* replica: a
prediction logic with L outputs instead of K.

The trade-off is **fault detection latency**. A permanent fault (for example a
stuck-at fault in the next-state logic or in the state register) is no longer
reported in the cycle it first corrupts the state. It is reported at the first
later transition that observes a corrupted bit. In exchange, no false alarm is
possible, and the FSM itself is not touched: its encoding, logic and state
register stay exactly as designed. All added hardware sits in parallel with
it.

This repository holds synthesizable SystemVerilog for:

* the method's worked example, a **2-bit up/down counter** checked on one bit
  per transition (`spare_counter`);
* the **general scheme** for a K-bit, N-input FSM, shown around random
  benchmark machines of 8 to 64 states (`spare_fsm`);
* a top level, `spare_top`, that holds both side by side;
* self-checking testbenches, including a stuck-at fault injection campaign
  that measures coverage and detection latency.

## The checker, cycle by cycle

```
            in ──┬──────────────────────────────┐
                 v                              v
        ┌────────────────┐             ┌─────────────────┐
   ┌───>│ next-state     │             │ prediction      │  L of the K
   │    │ logic (K out)  │             │ logic (L out)   │  next-state bits
   │    └───────┬────────┘             └────────┬────────┘
   │            v                               v
   │    ┌────────────────┐             ┌─────────────────┐
   │    │ K-bit state    │             │ predicted L-bit │
   │    │ register       │             │ register        │
   │    └───────┬────────┘             └────────┬────────┘
   │            │ state (FSM output)            │ pred_q
   ├────────────┤                               v
   │            │  addr ──> C flip-flops ──> ┌──────────────┐
   │            └──────────> L muxes ──obs──>│ L-bit        │──> test output
   │                                         │ comparator   │    (1 = fault)
   └── previous state                        └──────────────┘
```

Take a transition from state `ps` with input `in` at clock edge *t*:

1. During the cycle before edge *t*, the next-state logic computes
   `ns = f(ps, in)`. Alongside, the prediction logic computes
   `pred[j] = ns[R(g, j)]` for `j = 0..L-1`. Here `g` is the **group** of the
   transition (see below) and `R` is a table that names which L bits group
   `g` observes.
2. At edge *t* three things are stored at once. The state register loads
   `ns`. The predicted L-bit register loads `pred`. The C address flip-flops
   load `g`.
3. In the cycle after edge *t*, L multiplexers pick `state[R(g_q, j)]` out of
   the state register. The comparator raises the test output if any picked
   bit differs from `pred_q`.

The comparison happens one cycle late, after the state register, so faults
in the state register itself show up as well as faults in the next-state
logic. In a fault-free machine, the state register holds exactly `ns` one
cycle after the transition, and the picked bits equal the predicted bits, so
the test output cannot rise falsely. After reset every register is zero, the
FSM reset state is 0, and group 0's observed bits of state 0 are 0. So no
alarm follows reset either.

The test output is combinational. It refers to the transition made at the
previous clock edge.

## Groups: how the observed bits are chosen

The whole method rests on choosing, for every transition, which L bits to
observe, so that every fault is seen by some transition while L stays small.
Letting every one of the 2^(N+K) transitions pick any L bits would need an
"address logic": L·log2(K) extra functions of N+K inputs to drive the
multiplexer selects. That would eat up the savings. SPaRe removes it. Each
multiplexer select is wired **directly** to C of the previous-state and input
bits (C ≤ log2 K; C = 2 by default). Those C bits split all transitions into
2^C groups. Every transition in a group observes the same L bits. As a
result, each multiplexer chooses among at most 2^C state bits.

Normally all L multiplexers share the same C address bits. They can also be
wired to different bits. A transition then falls into one group per
multiplexer, and slot `j` of the prediction follows multiplexer `j`'s group.

In the RTL this choice is two parameters, both packed tables of 8-bit
entries (see `spare_pkg`):

| parameter  | entry                       | meaning                                                          |
|------------|-----------------------------|------------------------------------------------------------------|
| `ADDR_IDX` | `j*C+i` at `[(j*C+i)*8 +: 8]` | address bit `i` of multiplexer `j` is bit `ADDR_IDX[j*C+i]` of `{inputs, state}` |
| `R_SEL`    | `g*L+j` at `[(g*L+j)*8 +: 8]` | slot `j` of group `g` observes state bit `R_SEL[g*L+j]`         |

In the vector `{inputs, state}`, the state bits are positions 0..K-1 and the
inputs are positions K..K+N-1.

The same two tables configure the prediction logic and the selection logic,
so the two agree by construction. `spare_selection_logic` stops elaboration
if an `R_SEL` entry in use names a bit outside the state.

**Finding good tables is an offline job.** It is not hardware, and it is not
included here. The method builds a fault-detection matrix from test
generation and fault simulation of the gate-level next-state logic: for each
fault, which output bits detect it under which input vectors. A randomized
greedy search then picks the address bits and the per-group bits. It favours
bits that detect faults few other vectors detect. It repeats until a target
coverage is reached (98.5% in the method's experiments). To use such a
result, pass it as `ADDR_IDX` and `R_SEL`.

The defaults are simple, and they are this design's own choice:

* `default_addr`: the address comes from the FSM inputs first. If there are
  fewer inputs than address bits, state bits from bit 0 upwards fill in.
* `default_rsel`: slot `j` of group `g` observes bit `(g·L + j) mod K`, so the
  groups cycle through all state bits.

The defaults are not optimized. One weakness shows up in the benchmark sweep.
If an address bit is a **state** bit, a stuck-at fault on that state register
bit also fixes the group. The corrupted bit may then never be observed. This
is the only fault the sweep misses: state bit 0 stuck-at-1 on the 8-state,
1-input machine. Driving the address from inputs avoids the problem, which is
why the default uses inputs first. An optimized table would also avoid it.

## The 2-bit up/down counter

`spare_counter` is the smallest complete instance. Its input U/D = 0 counts
up and U/D = 1 counts down.

| U/D PS1 PS0 | NS1 NS0 | observed bit | predicted value |
|:-----------:|:-------:|:------------:|:---------------:|
| 0 0 0 | 0 1 | NS0 | 1 |
| 0 0 1 | 1 0 | NS1 | 1 |
| 0 1 0 | 1 1 | NS1 | 1 |
| 0 1 1 | 0 0 | NS0 | 0 |
| 1 0 0 | 1 1 | NS0 | 1 |
| 1 0 1 | 0 0 | NS1 | 0 |
| 1 1 0 | 0 1 | NS1 | 0 |
| 1 1 1 | 1 0 | NS0 | 0 |

The observed bit is chosen by `PS1 xor PS0`. This is the one place where a
small select function replaces the direct wiring. It is delayed one cycle in
a D flip-flop and drives a 2-to-1 multiplexer: 0 routes bit 0 and 1 routes
bit 1. The prediction logic is one output:
`pred = ~UD & ~(PS1 & PS0) | UD & ~PS1 & ~PS0`. A one-bit D flip-flop and a
one-bit comparator complete the checker.

Observing one bit per transition can detect every single stuck-at fault of
a given counter implementation. Whether it does depends on the gates used.
Here the next-state logic is written as `NS0 = ~PS0`, `NS1 = PS1 ^ T` with
`T = PS0 ^ U/D`, and one fault escapes: `T` stuck-at-1. The faulty counter
then toggles both bits every cycle and stays in 00 and 11. In those states
`PS1 xor PS0 = 0`, so only NS0 is observed, and NS0 is still correct. The
testbench reports this fault as an expected escape. Every other injected
counter fault is detected. This is why the observed bits should be chosen
by test generation on the actual netlist, and under sequential operation:
a vector that detects a fault in isolation may never be reached by the
faulty machine.

The mapping of the multiplexer inputs is this design's choice. It agrees with
the observed-bit pattern of the example in every row. In the one row where
the example leaves it open (U/D=0, PS=10), both next-state bits are 1, so the
predicted value is the same either way.

## The general scheme and the benchmark machines

`spare_fsm` wraps the same checker around `rand_fsm_next_state`. That block
is the next-state logic of a random machine with 2^K states and N inputs. Its
table is filled at elaboration by a 32-bit integer mixer of
`(SEED, {inputs, state})`, so it behaves like an unstructured K-output
function of N+K inputs. How the random machines are generated is this
design's own choice. The method's benchmarks are random machines of ten
types, with the number of predicted bits found for each:

| states | inputs | K | L (predicted / state bits) |
|-------:|:------:|:-:|:--------------------------:|
| 8      | 1, 2    | 3 | 2 / 3 |
| 16     | 1, 2    | 4 | 2 / 4 |
| 32     | 1, 2, 3 | 5 | 2 / 5 |
| 64     | 1, 2, 3 | 6 | 3 / 6 |

The defaults of `spare_fsm` and `spare_top` are the largest type: K = 6,
N = 3, L = 3, C = 2. All ten types are reached by overriding K, N and L.

`rand_fsm_prediction_logic` builds the same table independently and outputs
the L bits its group names. A synthesis tool reduces this to L functions of
N+K inputs. That reduction is where the hardware saving over duplication
comes from: roughly L/K of the next-state logic for unstructured functions.
The method reports prediction logic at about 44–86% of the next-state logic
for these types.

The same comparison for the random machines here was made with yosys:
`synth -flatten`, then `abc -g AND,NAND,OR,NOR,XOR,XNOR`. The counts below
are 2-input gates plus inverters. Registers, multiplexers and comparators
are left out on both sides, as in the method's own comparison.

| type | next-state logic | prediction logic (L of K) | ratio |
|---|---:|---:|---:|
| (8,1)  | 15  | 14 (2 of 3)  | 93% |
| (8,2)  | 45  | 41 (2 of 3)  | 91% |
| (16,1) | 59  | 30 (2 of 4)  | 51% |
| (16,2) | 112 | 66 (2 of 4)  | 59% |
| (32,1) | 134 | 87 (2 of 5)  | 65% |
| (32,2) | 257 | 121 (2 of 5) | 47% |
| (32,3) | 474 | 311 (2 of 5) | 66% |
| (64,1) | 302 | 168 (3 of 6) | 56% |
| (64,2) | 551 | 313 (3 of 6) | 57% |
| (64,3) | 994 | 549 (3 of 6) | 55% |

From 16 states up, the ratio stays close to L/K, as expected for
unstructured functions. The 8-state machines are too small for the estimate
to hold.

## Fault injection and latency

The testbenches inject single stuck-at faults with `force` on RTL signals:
each next-state logic output bit, each state register bit, and each predicted
register bit. For the counter they also fault the prediction logic output
and the internal toggle net `T`. The
machine replays a fixed random input sequence.

* A fault is **activated** in the first cycle the FSM state differs from a
  fault-free reference model.
* It is **detected** in the first cycle the test output is 1.
* **Latency** is detection minus activation.
* A detection before activation would be a false alarm. The testbenches count
  it as a failure.

Results with the default tables, 5000 random patterns per type
(`tb_spare_workloads`):

| type (states, inputs) | faults | detected | max latency | avg latency |
|---|---:|---:|---:|---:|
| (8,1)  | 16 | 15 | 8  | 1.27 |
| (8,2)  | 16 | 16 | 15 | 1.92 |
| (16,1) | 20 | 20 | 7  | 1.94 |
| (16,2) | 20 | 20 | 14 | 1.81 |
| (32,1) | 24 | 24 | 15 | 3.80 |
| (32,2) | 24 | 24 | 9  | 4.85 |
| (32,3) | 24 | 24 | 15 | 2.90 |
| (64,1) | 30 | 30 | 10 | 2.62 |
| (64,2) | 30 | 30 | 6  | 1.67 |
| (64,3) | 30 | 30 | 9  | 2.08 |

These are faults on the block boundaries of the RTL. They are far fewer, and
far easier to detect, than the gate-level faults inside synthesized
next-state logic. Gate-level faults are what the method's own figures count:
over 99% coverage, average latency up to about 28 cycles, and a worst case of
a few thousand cycles on the largest type. A gate-level campaign needs a
netlist and a fault simulator, and is outside this RTL.

The workload testbench also prints the same statistics as snapshots after
10, 50, 100, 500, 1000 and 5000 patterns: faults not yet activated, detected,
and activated but not yet detected. With boundary faults every fault is
activated within the first 10 patterns, so the snapshots are all the same.
They become informative only with internal faults.

## Modules

| module | role |
|---|---|
| `spare_pkg` | table types, default `R_SEL`/`ADDR_IDX`, random-table mixer |
| `spare_register` | W-bit register, async active-low reset; state register, predicted register, address flip-flops |
| `spare_selection_logic` | C address flip-flops and L (2^C)-to-1 multiplexers driven by `R_SEL` |
| `spare_comparator` | L-bit inequality comparator, test output |
| `updown_next_state` | counter next-state logic |
| `updown_prediction_logic` | counter one-bit prediction |
| `spare_counter` | counter with its SPaRe checker |
| `rand_fsm_next_state` | random FSM next-state logic |
| `rand_fsm_prediction_logic` | L-bit partial replica for the random FSM |
| `spare_fsm` | random FSM with its SPaRe checker |
| `spare_top` | counter and random FSM side by side |

Ports of `spare_top`: `clk` and `rst_n` (shared); `cnt_ud_i`, `cnt_state_o[1:0]`
and `cnt_test_o` for the counter; `fsm_in_i[N-1:0]`, `fsm_state_o[K-1:0]` and
`fsm_test_o` for the random FSM. Inputs are sampled on the rising clock edge.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
    rtl/spare_pkg.sv tb/tb_spare_ref_pkg.sv tb/tb_spare_top.sv \
    --top-module tb_spare_top
./obj_dir/Vtb_spare_top
```

Replace `tb_spare_top` to run another testbench:

* `tb_spare_top`: end to end at default parameters. It runs a fault-free
  run, checks that every group of both checkers is used, and runs a fault
  campaign on both machines.
* `tb_spare_workloads`: the ten benchmark types.
* `tb_spare_fsm`: the default random FSM; every fault must be detected.
* `tb_spare_counter`, plus one testbench per leaf block.

`tb_spare_ref_pkg` is an independent reference model of the random table and
the default tables. `spare_fsm_campaign` is the reusable fault-campaign
harness. The testbenches use `$urandom` and no constraint solver. All run in
well under a second.

## Departures and limits

* **No selection algorithm.** `R_SEL` and `ADDR_IDX` defaults are simple
  patterns, not optimized results (see "Groups").
* **Per-multiplexer address bits.** Each multiplexer can be given its own
  C address bits through `ADDR_IDX`. The method allows this and notes that it
  may raise coverage. By default all multiplexers share the same bits.
  Registers are kept per multiplexer; synthesis merges the duplicates when
  the bits are shared.
* **No output logic.** The FSM outputs are taken to be the state register
  itself. Checking separate output logic would need the same scheme applied
  to it.
* **Own choices.** The reset (asynchronous, active low, all zero, FSM reset
  state 0) is this design's own. So are the unregistered test output and the
  random-machine generator.
* **General address logic is not provided.** This is the arbitrary select
  function that SPaRe deliberately removes. The counter's XOR is the only
  select function, and it is written inline.
* **Table limits.** The packed tables allow up to 8 groups (C ≤ 3, which
  covers C ≤ log2 K for K ≤ 8) and up to 8 predicted bits. Elaboration stops
  if either is exceeded.
* **Fault model of the tests.** The injected faults are stuck-at faults on
  RTL nets: block outputs, register bits, and the one internal net of the
  counter's next-state logic. They are not the gate-level fault lists
  behind the method's coverage and latency figures.
