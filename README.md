# Low-power systolic Viterbi decoder with trace-back route reuse

A Viterbi decoder spends much of its power in the survivor memory, the part
that traces back through stored decisions to find the decoded bits. In a
*systolic* trace-back array a new trace-back starts with every received symbol
and all of them run at once, one per trace-back unit, so the same stretch of
survivor path is retraced over and over: once two routes meet, everything
behind the meeting point is identical.

This design removes that repeated work. Every trellis stage carries an extra
register that remembers where the last route passed through it. A new route
compares its state with that register at each stage it reaches; as soon as
they agree (a *convergent point*) the route stops, because the rest of its path
is already known. The trace-back units beyond that point have nothing to do,
and their route registers get no clock edges (clock gating). In steady state
with a clean channel almost every route stops after one or two units.

The decoded bits are exactly those of a conventional systolic trace-back of
the same depth; the testbenches check this bit for bit.

## Code and trellis

* Rate 1/2, constraint length `K` (default 3, four states), hard decisions:
  each input symbol is two bits, `sym[1]` from generator `G0`, `sym[0]` from
  `G1` (defaults 7 and 5, octal).
* A state is the last `K-1` information bits, newest in the MSB. Input bit `u`
  takes state `s` to `{u, s[K-2:1]}`.
* The predecessors of state `n` are `{n[K-3:0], d}`, `d` = 0 or 1. The decision
  bit stored for state `n` is this `d`, so one trace-back step is
  `s <- {s[K-3:0], dv[s]}`, and the decoded bit of a stage is the MSB of the
  state the path occupies there.

## Blocks

```
             sym ──► vit_selection_unit ──dv, min_state──► vit_lp_tbu ──► dec_bit
                     ├─ vit_bmpu x 2^(K-1)                 ├─ vit_lp_tbu_cell x DEPTH
                     └─ vit_msu                            │    └─ vit_clock_gate
                                                           └─ output register
```

| module | role |
|---|---|
| `vit_pkg` | default parameters, code-bit function |
| `vit_bmpu` | branch metric process unit of one state: Hamming branch metrics, add-compare-select, decision bit, normalisation |
| `vit_msu` | min-selection unit: smallest-metric state (lowest index on ties) |
| `vit_selection_unit` | path-metric registers, one BMPU per state, the MSU; one stage per accepted symbol |
| `vit_clock_gate` | latch-based, glitch-free clock gate |
| `vit_lp_tbu_cell` | one low-power trace-back unit |
| `vit_lp_tbu` | chain of `DEPTH` units plus output register |
| `viterbi_top` | the decoder |

### Selection unit

On every accepted symbol each BMPU adds the Hamming distance of its two
incoming branches to the two predecessor metrics and keeps the smaller (ties
go to predecessor 0). The smallest metric of the previous stage, which the MSU
finds anyway, is subtracted from every new metric, so 8-bit metrics never
overflow. After reset state 0 has metric 0 and all others 64, since the
encoder starts in state 0. The registered decision vector and the MSU's
smallest-metric state of the newest stage go to the trace-back array.

### Trace-back array: how routes and stages line up

This is the least obvious part. Two streams move through the units:

* **Stage data** (decision vector, stage-valid flag, history register) move
  one *register* per symbol. Every unit holds two stage registers, so a stage
  moves one *unit* every two symbols.
* **Routes** (state and an active flag) move one unit per symbol and go one
  stage back in time per unit.

At time `n`, unit `j` therefore sees the route started at `n-j`, which has
reached stage `n-2j`, together with the data of stage `n-2j`. That is exactly
the stage it must step through next. After `DEPTH` units, the route started at
stage `r` sits at stage `r-DEPTH`, and its state's MSB is the decoded bit of
that stage.

In each unit:

| arriving route | history of the stage | action |
|---|---|---|
| inactive | any | passes on as inactive |
| active | valid and equal to route state | **convergent point**: route stops, history left as is, `merge` pulses |
| active | invalid or different | route writes its state into the history, steps back one stage; the unit's route register is clocked |

The route register is behind a `vit_clock_gate` whose enable is
`sym_valid & active & no match`; the stage registers advance on every accepted
symbol.

Why stopping is safe: the decision vectors of a stage never change, so two
routes in the same state at one stage are in the same states at every older
stage. Older routes always reach a given stage two symbols before the next
route does, so the history a route compares with is always the latest one, and
the route it matched keeps writing the older part of the shared path. The
output stage therefore takes the route's own state if the route is still
active after `DEPTH` units, and otherwise the history register of that
stage, which the earlier route wrote.

The first route after reset finds no valid history and runs the full depth.

### Clock gate

A latch, transparent while `clk` is low, captures the enable; `gclk = clk &
latched_enable`. An enable change during the high phase cannot shorten or
create a pulse. The latch is intentional.

## Interface and timing of `viterbi_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous, active-low reset |
| `sym_valid` | in | 1 | accept `sym` at this rising edge; low stalls the whole decoder |
| `sym` | in | 2 | received hard-decision symbol |
| `dec_bit` | out | 1 | decoded information bit |
| `dec_valid` | out | 1 | `dec_bit` is new (one cycle per bit) |
| `merge` | out | `DEPTH` | per unit: convergent point found this cycle |
| `trace_en` | out | `DEPTH` | per unit: its route register is clocked this cycle |

Throughput is one bit per accepted symbol. The bit of a symbol comes out after
the edge that accepts the `2*DEPTH+1`-th symbol after it: `2*DEPTH` for the
route to start and go `DEPTH` stages back, plus one output register (21
symbols at the defaults). Bits come out in order. To flush the last bits,
feed `K-1` zero tail symbols and then `2*DEPTH+1` more.

`merge` and `trace_en` are there to observe the route reuse and the gating;
they can be left open.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `K` | 3 | constraint length (`2^(K-1)` states), at least 3 |
| `DEPTH` | 10 | number of trace-back units = trace-back depth |
| `G0`, `G1` | 7, 5 (octal) | generator polynomials, bit `K-1` multiplies the newest input |
| `PM_W` | 8 | path-metric width |

The ten-unit default matches a four-state example with ten trace-back units,
where a route started at time 10 gives the first bit at time 20. The usual
rule of a trace-back depth of five constraint lengths would give 15 for `K=3`.
Both work. The K = 3, 4 and 5 configurations with depth 5K have been simulated.

## Where this departs from, or adds to, the original description

* Generators, code rate, metric width, reset values, tie rules, the
  `sym_valid` handshake and the output register are this design's choices.
* The original method copies stored older states after a match. Here the
  history already holds them, so nothing is copied: the route simply stops.
  The output rule that takes the history for stopped routes is this design's.
* A route starts with every stage from the first one after reset, rather
  than only once the array has filled; routes that run past the oldest real
  stage only touch empty stages, so the decoded bits are the same.
* Each route starts at the smallest-metric state (the algorithm summary also
  mentions starting from an arbitrary state; the worked example uses the
  smallest-metric state).
* The storage per unit is two stage registers of `2^(K-1)+K+1` bits each plus
  a `K`-bit route register (state and active flag). It is not the "5K bits"
  figure mentioned for the original unit.
* Power and area savings cannot be measured in simulation. As a proxy,
  `trace_en` shows how rarely route registers are clocked. In the tests, with
  sparse channel errors, about 90% of unit-cycles are gated.
* The conventional trace-back array used as the baseline is not built as RTL;
  it exists as a reference model in the testbenches.

## Verification

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_vit_bmpu` | all four K = 3 units against a hand-written trellis table, random metrics, ties |
| `tb_vit_msu` | eight states, random metrics with many ties |
| `tb_vit_selection_unit` | decision vectors and best state against an integer ACS model, random errors and stalls |
| `tb_vit_clock_gate` | pulses only when enabled, no glitches from enable changes in the high phase |
| `tb_vit_lp_tbu_cell` | every output against a register-level model; compare hit and miss; gated register holds |
| `tb_vit_lp_tbu` | random decision vectors and start states; every bit against a conventional full-depth trace-back; latency; reuse, gating, full-depth routes and stalls all occur |
| `tb_vit_lp_tbu_example` | a worked four-state example path (below): every route after the first stops in unit 1, units 2 and beyond are clocked only for the first route, every bit correct |
| `tb_viterbi_top` | default parameters end to end: encoder, isolated channel errors, stalls; every bit against a reference decoder and against the sent bit; latency and count |
| `tb_viterbi_workloads` | the same end-to-end check at K = 3/4/5 with depths 15/20/25 (generators 7/5, 15/17, 23/35) |

`tb_viterbi_workloads` uses the helper `tb/vit_e2e_harness.sv`.

The worked example uses this survivor path, by stage (`s1 s0`):
`00 00 10 01 10 01 00 00 10 11 01 10 01 00 10 01 00 10 11 01`, with each
stage's smallest-metric state on the path. The first route traces all ten
units; each later route starts one stage further on, finds in unit 1 the state
the previous route started from, and stops there.

`vit_lp_tbu` also carries an assertion of the property the output rule rests
on: whenever the route at the output has stopped, the history register of
that stage is valid.

Run one with Verilator, for example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/vit_pkg.sv tb/tb_viterbi_top.sv --top-module tb_viterbi_top
./obj_dir/Vtb_viterbi_top
```

Each run finishes in seconds.

Not covered: channels with dense error bursts (the decoded bits are still
compared with the reference decoder there, but not with the sent bits); gate-level
timing; the gated-clock path in a real clock tree.
