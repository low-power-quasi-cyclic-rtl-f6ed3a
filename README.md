# Quasi-cyclic low-power BIST pattern generator

Built-in self-test puts a pattern generator and a response checker next to
the circuit under test (CUT). A plain random pattern generator makes many
lines toggle on every test cycle, so a chip can draw more power in test
than in normal use. This design cuts that power in two ways:

1. **Low-transition test values.** A Johnson (twisted-ring) counter makes the
   test values. Successive values differ in exactly one bit.
2. **Quasi-cyclic signalling.** A logic 1 on an encoded line is high for only
   one quarter of a test cycle (a "quasi 1"), not the whole cycle. A decoder
   at the far end turns it back into a full-cycle level.

Between the two ends sits a **3-weight accumulator pattern generator**. It
sets each pattern bit, per test session, to one of three weights: always 0,
always 1, or pseudo-random (probability 0.5). An **analysis circuit** compares
the decoded CUT response with the response of a fault-free reference.

```
            test cycle = 4 clocks (slots 0..3)

 johnson_counter --> qc_encoder --> accumulator_tpg --> cut_pattern  ==> CUT (external)
   (1 bit per          (1 -> pulse     register B <- pulse (slot 0)
    step changes)       in slot 0)     A <- A + B + cin (slot 3)
                                       session_counter -> Set/Reset
                                                                     <== cut_resp, ref_resp
                       analysis_circuit <-- qc_decoder (x2) <-----------------'
                       (fail, counts)

 lfsr, t_flip_flop: low-transition generator pair, own ports, side by side
```

## Timing: slots and test cycles

Everything runs on one fast clock `clk`. `qc_phase` counts slots
0..`PHASES`-1 (default 4) and gives two strobes: `slot0` and `frame_end`
(the last slot). One test cycle is `PHASES` clocks. A quarter-cycle pulse is
one clock wide.

| slot | what happens at the clock edge that ends it |
|------|---------------------------------------------|
| 0    | register B captures the encoder's output (the pulse is only there now) |
| 1, 2 | decoders keep collecting their inputs |
| 3 (`frame_end`) | Johnson counter steps; encoder captures the counter value; register A takes A+B+cin; session counter counts; decoders hand over the collected value; the analysis circuit compares |

Latency along the chain: a Johnson value present in test cycle *k* is sent
as a pulse at the start of cycle *k*+1. It enters register B in slot 0 and
is added into A at the end of *k*+1. The new pattern drives the CUT in cycle
*k*+2. The CUT's response is decoded at the end of *k*+2 and compared at the
end of *k*+3.

## The accumulator cell and the three weights

This is the core of the generator. Each pattern bit *i* is an `acc_cell`:
a full adder plus two D flip-flops. A[i] holds the sum bit and feeds back
into the adder. B[i] is the addend. Both flip-flops have **asynchronous,
active-high** set/reset:

| line      | A[i] | B[i] | weight |
|-----------|------|------|--------|
| `set[i]`  | 1    | 0    | 1      |
| `reset[i]`| 0    | 1    | 0      |
| neither   | sum  | loaded from input | 0.5 |

The trick is in the full-adder truth table. Whenever A = NOT B, the carry
out equals the carry in. So a forced bit passes the carry through
unchanged. The free bits above it still see the carry a plain N-bit adder
would give them, and keep producing pseudo-random values. Without this, a
forced bit would cut the carry chain and stall the bits above it.

A bit forced at a clock edge ignores that edge's update. When the session
changes, the forcing takes effect at once. A bit released by the new session
keeps its forced value until its next update.

## Sessions

`session_counter` splits the test into `NUM_SESSIONS` sessions (default 4)
of `SESSION_LEN` test cycles (default 32). For each session it drives the
Set/Reset vectors, using the table in `qc_pkg::session_weight`:

| session | even bits | odd bits |
|---------|-----------|----------|
| 0       | 0.5       | 0.5      |
| 1       | 1         | 0.5      |
| 2       | 0         | 0.5      |
| 3       | 0         | 1        |

This table is this design's own placeholder. In practice the weights come
from analysing the CUT's hard-to-detect faults, so edit `session_weight` for
a real CUT. Set/Reset are registered, so they never glitch on the
asynchronous pins. After the last session `test_done` rises and all bits are
released.

## Quasi-cyclic encoder and decoder

* `qc_encoder` captures its input at `frame_end`. In the next slot it outputs
  the captured value, and zero in all other slots. A 1 is therefore high
  for 1/`PHASES` of the time.
* `qc_decoder` ORs its input over all slots of a test cycle (`seen_q`). At
  `frame_end` it moves the result to `dout`, where it holds for the whole next
  cycle. A pulse in any slot decodes as 1. So does a full-cycle level, so the
  decoder also accepts a CUT response that is not pulse-shaped.

## Response analysis

`analysis_circuit` compares the decoded CUT response with the decoded
reference response once per test cycle while `test_en` is high. It counts
comparisons and mismatches (16 bits, saturating) and sets a sticky `fail`
flag. It keeps comparing after `test_done`, so the last patterns in the
pipeline are also checked. The reference response must come from a
fault-free copy of the CUT (or a stored response) driven by `cut_pattern`.

## LFSR and T flip-flop

`lfsr` is an 8-bit LFSR, x^8+x^6+x^5+x^4+1, shifting left. Its `dout` is
the state of one clock earlier. From any non-zero seed it runs through all
255 non-zero states. `t_flip_flop` toggles when `data_in` is 1. The two are
part of a low-transition generator, but no connection between them and the
quasi-cyclic chain is defined. `qc_top` instantiates them side by side with
their own ports (`lt_dout`, `lt_state`, `tff_in`, `tff_out`).

## Top-level ports (`qc_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | fast clock; asynchronous active-low reset |
| `test_en` | in | 1 | test cycles advance while high (and not done) |
| `cin` | in | 1 | carry into the accumulator adder |
| `cut_pattern` | out | N | pattern to the CUT (register A) |
| `cut_resp`, `ref_resp` | in | M | CUT response, fault-free reference response |
| `resp_dec`, `ref_dec` | out | M | decoded responses |
| `fail`, `mismatch_count`, `compare_count` | out | 1, 16, 16 | analysis results |
| `test_done` | out | 1 | all sessions applied |
| `jc_value`, `enc_value`, `reg_b`, `session` | out | | observation of the chain |
| `lt_dout`, `lt_state`, `tff_in`, `tff_out` | | 8, 8, 1, 1 | LFSR / T flip-flop |

Parameters: `N`=9 pattern bits and `M`=11 response bits, the interface of
the ISCAS'89 s344 benchmark. Also `PHASES`=4, `NUM_SESSIONS`=4 and
`SESSION_LEN`=32. A full test at the defaults takes 4 x 32 x 4 = 512 clocks.

## What is not included, and what is this design's own

* **The CUT.** The s344 netlist is not part of this RTL. The pattern goes out
  of the top and the responses come back in.
* **Own choices:** the slot timing and fast clock; where the pulse sits (slot
  0); loading register B from the encoded Johnson value (how the generator
  input enters register B is not defined elsewhere); the weight table; session
  count and length; `cin` as a port; the counters and sticky flag of the
  analysis circuit; the LFSR taps and seed (chosen so the register shows the
  state pair 11010000 / 10100000 on consecutive clocks); all reset values;
  and the widths 9/11.
* **Simplest-form blocks.** The decoding rule (OR over the cycle) and the
  comparator-style analysis are the simplest circuits that do the job.
  Nothing more specific is defined for them.
* **Test-per-scan.** The Johnson counter has only its counting mode. A
  scan-shift mode and a scan-based (test-per-scan) application of the
  patterns are not defined in enough detail to build, so patterns are
  applied in parallel, one per test cycle (test-per-clock).
* **Not reproduced:** area and power numbers. They depend on the target
  technology and the CUT.

## Files and simulation

`rtl/` has one module or package per file. `qc_pkg.sv` (constants, weight
type and table) must be compiled first. `tb/tb_<module>.sv` is a
self-checking testbench for each module. Each prints
`TB_RESULT checks=<n> failures=<n>`:

* block testbenches compare against independent models: the closed form of
  the Johnson sequence, integer addition plus masks for the accumulator, a
  polynomial model for the LFSR, and so on;
* `tb_qc_top` runs a full test at the default parameters. It uses a stand-in
  combinational CUT with a stuck-at fault switched on during session 2. Every
  clock it checks every top output against a cycle model of the whole chain.
  It also confirms that each mechanism happens: quasi-cyclic pulses, B loads,
  set and reset forcing, all session switches, completion after 512 clocks,
  fault detection (and no mismatch without a fault), LFSR steps and
  T flip-flop toggles.

Example with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal rtl/qc_pkg.sv rtl/*.sv \
    tb/tb_qc_top.sv --top-module tb_qc_top
./obj_dir/Vtb_qc_top
```

The accumulator flip-flops are written with three asynchronous controls
(global reset, set, reset), exactly as the cell describes. Some synthesis
front ends accept only one asynchronous control per flip-flop. For those,
map the cell to a flip-flop with asynchronous set and clear.
