# Zero-aliasing space compactor for c432, with its BIST response path

A circuit under test (CUT) with many outputs is expensive to observe during built-in self-test. A
**space compactor** solves this. It is a small tree of logic gates that folds the *m* output lines
into a few lines, ideally one, before the response analyzer. The risk is **aliasing**: a fault
changes the outputs, but the compacted line still looks fault free.

The compactor here is built by grading pairs of output lines on how faults show at their merged
line:

- **Strongly compatible** (for a gate family AND/NAND, OR/NOR or XOR/XNOR): every fault seen at
  either line is still seen after the two are merged by that gate.
- **Weakly** or **simply compatible**: some faults are lost at the merged line, but other outputs
  of the circuit still catch them. Coverage stays at 100 %.
- **Incompatible**: coverage drops.

Pairwise strong compatibility carries over to a whole group: if A-B, B-C and A-C are all strongly
XOR compatible, one 3-input XOR over A, B and C loses no fault. The largest such groups are the
*maximal compatibility classes*. They are found with the Paull-Unger procedure known from
state minimisation: multiply out the product of the incompatible pairs, then take the complements
of the resulting terms.

The network is built stage by stage:

1. Merge the largest class into one new line.
2. Keep merging disjoint classes in the same way.
3. XOR together the lines that belong to no class.
4. Re-grade the faults on the circuit plus compactor.
5. Repeat until one line remains.

All of this grading and selection is a design-time (software) procedure. What reaches silicon is
only its result: a fixed, combinational gate network. That network is what this RTL implements,
for the ISCAS 85 benchmark **c432** (36 inputs; outputs 426 to 432). The RTL also builds the BIST
response path around it.

## The c432 compaction network

`space_compactor` folds the 7 lines into one line `z`, a compaction ratio of 1/7. It has three
stages and four gates:

| stage | new line | merge                     | lines carried     |
|-------|----------|---------------------------|-------------------|
| 1     | 433      | XOR3(426, 427, 429)       | 428, 430, 431, 432|
| 2     | 434      | XOR2(430, 432)            | 428               |
| 2     | 435      | XOR2(433, 431)            |                   |
| 3     | z        | XOR3(434, 435, 428)       |                   |

- **Stage 1** is the group {426, 427, 429}, whose pairs are strongly XOR compatible. No fault
  visible at those three lines is lost in line 433.
- **Stage 2** has no strongly compatible pairs left. The classes reported for this stage are all
  XOR classes: (430,432), (428,432), (433,431) and one more. This design merges the first class,
  (430,432), then the disjoint class (433,431). Line 428 is carried.
- **Stage 3** applies the "XOR whatever is left" rule.

As a result, `z` is the parity of the seven c432 outputs:

- An error on any single output line, or on any odd number of lines, always reaches `z`. The
  testbench proves this exhaustively.
- An error on an even number of lines cancels. This design assumes, as the method does, that the
  merge classes were chosen so that each modelled fault gives such a pattern on at least one
  test vector. That can only be confirmed by fault-simulating the real c432 netlist.

Each stage is an instance of the generic `compactor_stage`, so the network is data, not code. The
masks and gate types live in `compactor_pkg`:

- `C432_Sk_MASK[j]` is a bit mask. It selects the input lines that output line *j* of stage *k*
  merges. Input line *i* is bit *i*.
- `C432_Sk_GATE[j]` picks the gate: `GATE_AND`, `GATE_NAND`, `GATE_OR`, `GATE_NOR`, `GATE_XOR`,
  `GATE_XNOR`, or `GATE_PASS` to carry a line through. Use `GATE_PASS` with a one-hot mask.

To build the compactor for another circuit, write its stages the same way and chain
`compactor_stage` instances as `space_compactor` does. `merge_gate` handles any fan-in and any
family, including AND/OR classes. The c432 network happens to use XOR only.

**How far to trust it.** Stage 1 is exactly the published merge. Stages 2 and 3 are this design's
reading of the reported stage-2 classes plus the merge-the-rest rule. They have not been checked
against the published drawing of the final network. The published hardware-overhead table counts
the c432 compactor as 4 gates, as here, but with total fan-in 8 (average 2). This network has
fan-in 3+2+2+3 = 10, because the published stage 1 already uses a 3-input gate. If the published
network differs, only the two masks of stages 2 and 3 change.

## BIST response path (`bist_compactor_top`)

```
            +---------+  cut_pattern[35:0]   +---------+ cut_response[6:0]
 start ---->| control |--> lfsr_tpg --fi_in-->|   CUT   |------------------+
 capture -->|   FSM   |                      |(outside)|                  |
            +---------+                      +---------+     fault_inject_mux (fi_cut)
                 |                                                      |
                 |   valid/addr/capture                         space_compactor (fi_s1..3)
                 v                                                      | compact_out
            response_analyzer: fault-free buffer (4096 x 1) + comparator <-+
                 -> mismatch (per pattern), fail (OK / Not OK), err_count
```

- **Pattern generator (`lfsr_tpg`).** A Fibonacci LFSR: bits shift towards the higher index, and
  bit 0 takes the XOR of the tapped bits. The module's defaults are the classic 3-bit example,
  with taps Q2 and Q3 and seed 111. It runs 111, 011, 001, 100, 010, 101, 110 (period 7). The top
  uses 36 bits, one per c432 input, with taps 36 and 25 (x^36 + x^25 + 1) and an all-ones seed.
  This tap set is this design's choice.
- **CUT.** The CUT sits outside the top. `cut_pattern[k]` drives c432 input k+1, and
  `cut_response[k]` is output line 426+k. The CUT is assumed combinational: its response must be
  valid in the same clock cycle as the pattern.
- **Response analyzer (`response_analyzer`).** It has two modes:
  - *Golden session* (`capture_mode = 1`, on a known-good part or a fault-free simulation): each
    compacted bit is written to the buffer at the pattern index.
  - *Test session* (`capture_mode = 0`): each bit is compared with the stored one. A difference
    gives a one-cycle `mismatch` pulse, increments `err_count` and sets the sticky `fail` (Not OK).
- **Controller (`bist_controller`).** On `start` it:
  1. reloads the LFSR seed and clears the analyzer;
  2. applies `N_PATTERNS` patterns, one per clock;
  3. waits two cycles for the analyzer pipeline;
  4. raises `done`, which stays high until the next `start`.

  `capture_mode` is sampled when `start` is seen.

**Timing.**

- A session lasts exactly `1 + N_PATTERNS + 2` cycles from the `start` cycle to `done`: 3256
  cycles at the default 3253 patterns.
- Pattern *k* is on `cut_pattern` during run cycle *k*.
- The analyzer reads its buffer synchronously. A response presented in cycle *t* shows on
  `mismatch`, `fail` and `err_count` after the second following clock edge.

**Reset.** `rst_n` is asynchronous and active low. It loads the LFSR seed and clears the
controller and the analyzer flags. The buffer is not reset: a golden session must run before the
first test session.

## Fault injection

Every wire that this design owns can be forced stuck-at-0 or stuck-at-1 through a per-wire
multiplexer (`fault_inject_mux`), with a 2-bit select per wire:

| select | effect     |
|--------|------------|
| 00, 11 | normal     |
| 01     | stuck-at-1 |
| 10     | stuck-at-0 |

The top exposes the selects as five ports:

- `fi_in`: the 36 CUT input lines;
- `fi_cut`: the 7 CUT output lines;
- `fi_s1`, `fi_s2`, `fi_s3`: the 5 + 3 + 1 compactor wires.

These ports let the compactor be fault-graded together with the circuit, as the design flow
requires after each stage. Tie them all to `FI_NORMAL` (2'b00) for normal use. The multiplexers
on the compactor wires sit in the signal path. A production build that does not need in-silicon
fault injection can drop them by feeding `merged` straight to `lines_out` in `compactor_stage`.

## Parameters

| module              | parameter    | default        | origin |
|---------------------|--------------|----------------|--------|
| bist_compactor_top  | N_PATTERNS   | 3253           | reported pseudorandom test length for c432 with compactor |
| bist_compactor_top  | DEPTH        | 4096           | own choice, ≥ N_PATTERNS |
| bist_compactor_top  | TPG_WIDTH    | 36             | c432 input count |
| bist_compactor_top  | TPG_TAPS     | bits 35, 24    | own choice (maximal-length trinomial) |
| lfsr_tpg            | WIDTH/TAPS/SEED | 3 / Q2,Q3 / 111 | the classic 3-bit example |
| merge_gate          | N/GATE/MASK  | 3 / XOR / all  | the stage-1 gate |
| compactor_stage     | N_IN/N_OUT/MASK/GATE | c432 stage 1 | as above |
| response_analyzer   | W            | 1              | one compacted line |

## What is not here

- **The c432 circuit itself.** It is a published benchmark netlist and is not reproduced; the top
  brings its ports out. For simulation, `tb/cut_stub.sv` is a stand-in with the same 36-in/7-out
  shape but unrelated logic. Replace it with the real netlist for meaningful coverage figures.
- **A time compactor** (signature register, counter) after the space compactor. Here every
  pattern's compacted bit is compared with a stored fault-free bit.
- **The design-time procedures**: pair grading, Paull-Unger class search and the stage-selection
  loop. They run in software and produce the masks above.
- **Compactor networks for the other ISCAS 85 and ISCAS 89 circuits.** `compactor_stage` can
  express them, but their merge classes are not part of this design.

## Simulation

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and ends with
`$finish`, and each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/compactor_pkg.sv \
    tb/tb_bist_compactor_top.sv --top-module tb_bist_compactor_top -o sim
./obj_dir/sim
```

Use the same command for the other benches:

| testbench | what it checks |
|-----------|----------------|
| `tb_merge_gate` | all six gate families, exhaustively |
| `tb_fault_inject_mux` | every select code |
| `tb_compactor_stage` | c432 stage 1, exhaustively, with every output wire faulted, plus a mixed AND/OR/XNOR stage |
| `tb_space_compactor` | all 128 responses, the 18 compactor wire faults, the zero-aliasing property for single-line errors |
| `tb_lfsr_tpg` | the 3-bit sequence and period; a 36-bit register against a model |
| `tb_response_analyzer` | capture, compare, the two-cycle latency, error counting, clear |
| `tb_bist_controller` | session length, address order, mode sampling |
| `tb_bist_compactor_top` | the full-size end-to-end test at all default parameters |

`tb_bist_compactor_top` runs 106 sessions of 3253 patterns:

- one golden session;
- one clean session;
- one session for each single stuck-at fault on the 36 CUT inputs, the 7 CUT outputs and the 9
  compactor wires, both polarities.

It follows the patterns with its own LFSR model and recomputes the compacted bit with its own
model of the network. It checks `compact_out` every cycle, predicts `err_count` for every session
and checks the 3256-cycle session length. It also counts each mechanism: capture, clean pass, CUT
input fault, CUT output fault, compactor fault, stuck-at-0, stuck-at-1, detection and mismatch
pulse. Every output-side fault must be detected. With the stand-in circuit, all 104 faults are
detected. The run takes about a second.
