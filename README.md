# Status-bit-controlled BIST for a sequential circuit

Pseudo-random built-in self-test works well on combinational logic but
poorly on sequential circuits without scan: random values at the primary
inputs rarely steer the controller of a datapath design into its deep or
rarely taken branches, because the branch conditions are *status bits*
computed by the datapath (comparisons, zero tests), not the inputs
themselves. This design makes those status bits controllable during test.
A multiplexer sits on every status signal between the datapath and the
control FSM. In working mode the FSM sees the datapath's status bits. In
test mode it sees *mask* values chosen by the BIST controller, so the test
logic decides which branch the FSM takes while a linear feedback shift
register (LFSR) still feeds pseudo-random data into the datapath. The
status bits that are masked out remain visible on extra observation
outputs.

The masks are chosen so that together they drive the FSM along every branch
of its state transition graph (all-branches coverage). Only a few status
bits are involved in typical controllers (0 to 2 in common high-level
synthesis benchmarks), so the added hardware is a handful of 2:1
multiplexers plus a small sequencer.

## Architecture

```
            tm ─────────────┬───────────────────────┬──────────────┐
                            │                       │              │
   pi ──────────────────────┼──────────────► ┌───────────┐   ┌───────────────┐
                            │                │ input_mux │──►│  dft_system   │──► po
              ┌─────────────▼──┐  bist_sel   └───────────┘   │  (CUT)        │──► obs
              │ bist_controller│──► prpg_lfsr ──── pr ──►     │               │
              │                │── mask ─────────────────────►│               │
              │                │── cut_rst ──── (OR rst) ────►│               │
              └────────────────┘── done ──► bist_done         └───────────────┘
```

| Module | Role |
|---|---|
| `bist_top` | Wires the blocks together; top of the design. |
| `bist_controller` | Starts on `tm`, runs the test in sequences, drives PRPG enable, masks and the CUT reset. |
| `prpg_lfsr` | 16-bit Galois LFSR, one new pattern per enabled clock. |
| `input_mux` | Normal inputs (`tm`=0) or LFSR patterns (`tm`=1) into the CUT. |
| `dft_system` | The circuit under test after the DfT change: FSM + datapath + status multiplexer. |
| `status_mux` | Datapath status (`tm`=0) or mask (`tm`=1) into the FSM; datapath status to `obs`. |
| `example_fsm` | Six-state control FSM with two branch points (status bits A, B). |
| `example_datapath` | Small datapath that computes A and B and the primary outputs. |
| `bist_pkg` | State type, control-signal struct, status bit positions, default mask table. |

The test-mode signal goes to three places: the input multiplexer, the
status multiplexer inside the CUT and the controller. Adding the DfT logic
to a circuit therefore adds `mask bits + 1` primary inputs (the masks and
`tm`) and as many observation outputs as there are masked status bits.

## The example circuit and its masks

The controller of the example circuit has this state graph (A and B are the
status bits):

```
s0 ──► s1 ──A=1──► s5 ──► s0
        │
       A=0
        ▼
        s2 ──B=1──► s4 ──► s1
        │           ▲
       B=0          │
        ▼           │
        s3 ─────────┘
```

Eight branches in all. Three constant masks cover every one of them:

| Mask | A | B | Path it forces |
|---|---|---|---|
| 0 | 1 | 0 (don't care) | s0 → s1 → s5 → s0 |
| 1 | 0 | 0 | s0 → s1 → s2 → s3 → s4 → s1 |
| 2 | 0 | 1 | s1 → s2 → s4 → s1 |

The table lives in `bist_pkg::BRANCH_MASKS` (bit 0 = A, bit 1 = B) and
is a parameter of `bist_controller`, so another FSM only needs its own
table and width.

The datapath is this design's own; it exists to give the FSM real status
bits. It has registers X, Y, Z: s0 loads X from operand `a` and clears Y;
s3 adds operand `b` to Y; s4 decrements X; s5 copies Y to Z, the primary
output. A is `X == 0` and B is `X[0]` (X odd). In working mode the circuit
therefore computes `Z = b * floor(a/2) mod 2^W`, and takes
`1 + 3a + floor(a/2) + 2` clocks from reset until Z holds the result.

Why masking matters here: under pure pseudo-random inputs X is loaded with
a random 8-bit value, so the branch s1 → s5 needs up to about 900 clocks of
counting down and is almost never reached inside a short test sequence.
With mask 0 it is taken every third clock. `tb_bist_configs` measures this
with the default LFSR, seed and sequence length:

| Configuration | 1000 vectors | 10000 vectors |
|---|---|---|
| Masks drive the status bits (`tm`=1) | 8 of 8 branches | 8 of 8 branches |
| Same patterns, FSM follows the datapath status | 6 of 8 (s1 → s5 and s5 → s0 never taken) | 8 of 8 (s1 → s5 taken 13 times) |

## How a self-test runs

1. Hold `tm` low for normal operation; the controller is idle and the
   LFSR holds its state.
2. Raise `tm`. On the next clock the controller starts the first test
   sequence.
3. Each test sequence is one clock of CUT reset (`cut_rst`) followed by
   `SEQ_LEN` clocks in which the LFSR advances every clock (one new
   vector each) and the reset stays inactive. The mask is constant within a
   sequence; consecutive sequences use masks 0, 1, 2, 0, 1, ...
4. After `TEST_LEN` vectors in total the controller stops the LFSR and
   raises `bist_done`, which stays high until `tm` falls. Dropping `tm` at
   any time aborts the test and returns everything to working mode.

Two assertions in `bist_controller` state the protocol: the CUT is never
reset in a clock that applies a vector, and the mask does not change within
a sequence.

At the defaults (1000 vectors, sequences of 20) a test has 50 sequences and
`bist_done` rises 1051 clocks after the first clock edge that sees `tm`
high. During the test, observe `po` and `obs`; compacting them into a
signature is not part of this design.

## Parameters

| Parameter | Where | Default | Origin |
|---|---|---|---|
| `TEST_LEN` | `bist_top`, `bist_controller` | 1000 | The evaluated test length; 10000 is the other length used in the evaluation. |
| `SEQ_LEN` | `bist_top`, `bist_controller` | 20 | Own choice. |
| `W` | `bist_top`, `dft_system`, `example_datapath` | 8 | Own choice; the CUT has `2*W` primary input bits. |
| `LFSR_POLY`, `LFSR_SEED` | `bist_top` | `16'hB400`, `16'hACE1` | Own choice: x^16+x^14+x^13+x^11+1, maximal length. Must be `2*W` bits wide; change them when you change `W`. |
| `MASK_W`, `NMASK`, `MASKS` | `bist_controller` | 2, 3, the table above | From the example state graph. |

All resets are synchronous. `rst_n` (active low) resets the controller, the
LFSR and the CUT; inside the CUT reset is active high.

## What is own choice, and limits

Taken from the source design: the overall architecture (PRPG, controller,
input multiplexer, CUT), the LFSR as pattern generator, the status
multiplexer selected by the test-mode signal, the observation outputs for
the masked status bits, the example state graph and its three masks, the
1000-vector test length and keeping reset inactive during a test sequence.

Own choices: every width; the LFSR's polynomial, seed and Galois form; the
example datapath in full; the controller's internals (four states, masks
applied round-robin one per sequence, one reset clock per sequence,
`bist_done`); how the CUT reset is formed (OR of system reset and the
controller's pulse). One departure from the source structure: there the
reset enters only the FSM, while here it also clears the datapath registers,
so that outputs are defined from the first clock after reset.

Not included:

* The benchmark circuits the approach was evaluated on (DIFFEQ, ELLIPF,
  GCD, MULT8x8, RISC, SOSQ) are external designs and are not provided;
  only the example circuit is. To test another circuit, replace
  `dft_system`: give it a status multiplexer per branch-controlling status
  bit, widen the LFSR to its input count, and give the controller a mask
  table for its state graph.
* No response compactor (MISR) or signature comparison.
* Fault coverage is not measured here; the testbenches measure branch
  coverage of the FSM instead.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/bist_pkg.sv rtl/*.sv \
          tb/tb_bist_top.sv --top-module tb_bist_top
./obj_dir/Vtb_bist_top
```

| Testbench | What it shows |
|---|---|
| `tb_bist_top` | Whole design at default parameters against a cycle-accurate reference model: working-mode results, a complete 1000-vector self-test (50 sequences, done at clock 1051), return to working mode; every mechanism (both mode switches, sequence resets, each mask, all eight branches, a mask overriding the datapath status, test end) must occur. |
| `tb_bist_configs` | Branch coverage with and without masking for 1000- and 10000-vector tests (table above); checks every FSM step against the status bits it was shown. Uses `tb/unmasked_bist_harness.sv`. |
| `tb_bist_controller` | Clock-by-clock output sequence for a short test (47 vectors, last sequence cut short) and the default test; abort by dropping `tm`. |
| `tb_prpg_lfsr` | Every step against the polynomial, hold when disabled, period exactly 2^16-1. |
| `tb_dft_system` | Working-mode results and their clock count; random modes, masks and resets against a reference model. |
| `tb_example_fsm`, `tb_example_datapath`, `tb_status_mux`, `tb_input_mux` | Unit checks against reference models. |
