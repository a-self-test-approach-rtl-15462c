# Accumulator-based 3-weight BIST pattern generator

Weighted random testing biases some inputs of a circuit under test (CUT) so
that hard faults are reached with fewer patterns. The cheapest useful bias
uses three weights per input: constant 1, constant 0, or random (weight
0.5). A deterministic test set is split into subsets; each subset becomes one
*session* in which the inputs on which all its vectors agree are held
constant and the rest vary.

This design produces such sessions from an ordinary accumulator
(`A <= A + B`) without changing its adder. The trick is in the full-adder
truth table: whenever the two operand bits differ, the carry out equals the
carry in. So a bit is held at 1 by forcing `A[i]=1, B[i]=0`, or at 0 by
forcing `A[i]=0, B[i]=1`; in both cases the bit is transparent to the carry,
and the remaining bits keep accumulating as if the forced ones were not
there. The forcing uses only the asynchronous set and reset of the register
flip-flops, so any adder architecture works and its speed is untouched.

Around the generator sits a conventional BIST shell: a test controller,
an input isolation multiplexer in front of the CUT and a multiple-input
signature register (MISR) that compacts the responses into a pass/fail
verdict. A separate low-power single-input-change (SIC) generator, an LFSR
seed XORed with a gray-code counter, is included beside it.

## The accumulator cell (`accumulator_cell`)

One bit slice holds a full adder and two D flip-flops with asynchronous,
active-high set and reset (`sr_dff`): `A[i]`, loaded with the sum, and
`B[i]`, loaded with this bit of the constant addend. The control pair is
wired crosswise:

| Set[i] | Reset[i] | A[i] | B[i] | weight | carry |
|---|---|---|---|---|---|
| 1 | 0 | 1 (forced) | 0 (forced) | 1 | cout = cin |
| 0 | 1 | 0 (forced) | 1 (forced) | 0 | cout = cin |
| 0 | 0 | sum, on clock | addend, on clock | 0.5 | normal |

Forcing acts immediately, not at the next clock edge. Set and Reset
together never occur; if they do, reset wins in each flip-flop.

`weighted_accumulator` chains N cells (ripple carry, carry-in 0, carry-out
of the top bit dropped). If k bits are free, those bits read as a k-bit
number (forced bits removed) follow `x <= x + y mod 2^k`, where `y` is the
addend restricted to the free bits. The addend is all ones by default, so
`y` is odd for every weight assignment and the free bits step through all
2^k values, i.e. exhaustively. Any odd addend has that property; others
give shorter cycles.

## Sessions: LFSR, session counter and logic module (`weighted_tpg`)

* `lfsr`: a maximal-length LFSR with `LFSR_W = ceil(log2 N)` stages (3 for
  N=5) steps once per pattern. Its `wrap` flag marks the last state of its
  period, so it acts as a session timer of 2^LFSR_W-1 patterns.
* `session_counter` advances on each wrap and stops at `NUM_SESSIONS`,
  raising `done`.
* `weight_logic` turns the session number into the Set and Reset vectors
  from two parameter tables, `SET_MASK[s]` and `RESET_MASK[s]`. Outside a
  session (generator not running, or done) it drives every Reset bit, which
  parks A at zero and B at all ones.

Timing: after `rst`, raising `run` applies session 0's forcing immediately,
so the first pattern is valid in that same cycle. One pattern appears per
clock while `pattern_valid` is high. `done` rises after
`NUM_SESSIONS*(2^LFSR_W-1)` patterns.

### Worked example: c17

The defaults (`wpg_pkg`) target the five-input ISCAS-85 benchmark c17 with
the four-vector test set T1=00101, T2=01010, T3=10010, T4=11111 (A[4:0]).
Subset {T1,T4} gives weights `- - 1 - 1` and subset {T2,T3} gives
`- - 0 1 0`. The generator then applies:

| session | patterns A[4:0] |
|---|---|
| 0 (A2=A0=1) | 00101 11111 11101 10111 10101 01111 01101 |
| 1 (A2=A0=0, A1=1) | 00010 11010 10010 01010 00010 11010 10010 |

All four deterministic vectors occur. Session 1 has only two free bits, so
its four values repeat within the seven patterns. This generator holds 15
flip-flops: 5 in A, 5 in B, 3 in the LFSR and 2 in the session counter.

## BIST shell (`bist_top`)

* `test_controller`: IDLE (generator held in reset, MISR cleared, CUT on the
  system inputs) → RUN on `bist_start` → DONE when the generator reports
  `done`. `bist_done` stays high until `bist_start` is released, and the
  controller then returns to IDLE.
* `input_isolation`: a 2:1 multiplexer per CUT input, with `test_mode` high
  during RUN.
* `ora_misr`: an 8-bit Galois MISR (x^8+x^4+x^3+x^2+1) that takes the CUT
  outputs on each valid pattern. `bist_pass = bist_done && signature == GOLDEN`.

The CUT is outside `bist_top`: `cut_in` drives it and its outputs come back
on `cut_out` in the same cycle, so the CUT must be combinational (or the
analyzer enable delayed to match). `GOLDEN` defaults to 8'h60, the
signature of a fault-free c17 under the default generator (inputs
{N1,N2,N3,N6,N7} on A[4:0], outputs {N22,N23}). Change it whenever the CUT,
the masks or the addend change. The easy way to get the new value is to
simulate the fault-free CUT once. `sys_out` simply forwards the CUT outputs.

`sic_generator` (ports `sic_en`, `sic_pattern`) is not connected to the
BIST datapath. Its output is `seed ^ gray(count)`: each seed is followed by
2^W-1 patterns, each differing from the previous one in exactly one bit. The
seed LFSR is clocked only once per 2^W patterns.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `bist_top`, `weighted_tpg` | `N` | 5 | CUT inputs / generator width |
| | `NUM_SESSIONS` | 2 | weight assignments |
| | `LFSR_W` | ceil(log2 N) | session timer; session = 2^LFSR_W-1 patterns |
| | `ADDEND` | all ones | D inputs of register B |
| | `SET_MASK`, `RESET_MASK` | c17 sessions | `[session][bit]`, must be disjoint |
| `bist_top` | `M` | 2 | CUT outputs |
| | `SIG_W`, `GOLDEN` | 8, 8'h60 | MISR width, expected signature |

`lfsr` supports widths 2 to 16 (tap table in `wpg_pkg::lfsr_taps`).

## What is this design's own choice

The cell, the crosswise Set/Reset wiring, the register A/B/adder structure,
the c17 weights and the LFSR size of ceil(log2 N) follow the published
scheme. The following were filled in here:

* Session length equals the LFSR period. The scheme says only that the LFSR
  drives the session counter.
* The all-ones addend, carry-in 0, and the park state outside sessions.
* The state machine and handshake of the controller, the MISR polynomial and
  width, and the golden-signature comparison.
* The SIC generator's widths and LFSR polynomial. It is also unclear how the
  SIC generator should combine with the weighted generator, so it is left
  beside it rather than wired in.
* Table-driven weight logic. The gate-level decoder is not specified.

For larger benchmark circuits, raise `N`, supply their masks and sessions,
and recompute `GOLDEN`. No weight assignments for other circuits are
included.

## Simulation

Every module except the flip-flop primitive `sr_dff` (covered by
`tb_accumulator_cell`) has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. `tb/c17_model.sv` is a behavioural c17
with a selectable single stuck-at fault, used only by `tb_bist_top`. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/wpg_pkg.sv tb/tb_bist_top.sv \
          --top-module tb_bist_top -y rtl -y tb +libext+.sv
./obj_dir/Vtb_bist_top
```

`tb_bist_top` runs the full-size design end to end. It checks all 14
patterns against an independent model, normal-mode isolation, the pass
verdict on a fault-free c17, and the verdict for each of its 22 single
stuck-at faults (all 22 are detected). It also exercises the SIC generator
and counts each mechanism: forcing to 1 and to 0, carry passing through a
forced cell, session changes, pass, fail, normal mode and new SIC seeds.

`tb_tpg_benchmarks` runs the generator at 33, 60 and 233 bits, the input
counts of c1908, c880 and c2670, with three generated weight assignments
each. It checks every pattern and the session lengths (63, 63 and 255
patterns).

`sr_dff` uses two asynchronous controls. Verilator and slang accept this,
but Yosys' slang synthesis path does not map it ("multiple asynchronous
loads"). For synthesis with that flow, map `sr_dff` to a library
set/reset flip-flop.
