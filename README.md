# Controllable gates for testable logic: a 74181 ALU example

Testing a large combinational network is hard when its internal nodes can
neither be set nor seen from the pins. Test points and scan chains cost pins,
wiring and test time. Multiplexers that cut the logic into small blocks,
which are then tested exhaustively, cost area and delay.

This design uses a cheaper idea. A few ordinary gates are replaced by
**controllable gates (C-gates)**. A C-gate behaves as its plain gate in
normal mode. In test mode it becomes "transparent": its output follows one
chosen input and ignores the others. Placed at the right points, a handful
of such gates split the logic into partitions. Each partition can then be
driven from the primary inputs and observed at the primary outputs. A small
serially loaded **C-register** holds the control lines. An optional on-chip
**sequencer** cycles each partition through every input combination, so no
test patterns need to be generated or stored.

The RTL contains:

- the gate cells (C-NAND, C-NOR, and two multiplexing NANDs, C' and C'');
- a 74181 4-bit ALU with four C-NANDs, split into partitions alpha, beta
  and gamma;
- the C-register;
- the self-test sequencer;
- a top level, `ctest_top`, that joins them.

All of it is SystemVerilog-2017 and synthesizable. It has been checked with
Verilator and with the slang front end of Yosys.

## The controllable gate cells

Each cell is modelled by its logic function only. The transistor circuits
are n-MOS, and the delay and area they add are outside the RTL.

| cell | module | normal mode | test / access mode |
|---|---|---|---|
| C-NAND | `c_nand #(N, PRIO)` | `c=0`: `y = NAND(x)` | `c=1`: `y = NOT x[PRIO]` |
| C-NOR | `c_nor #(N, PRIO)` | `c=1`: `y = NOR(x)` | `c=0`: `y = NOT x[PRIO]` |
| C'-NAND | `c1_nand #(N, P)` | all `c=0`: `f = NAND(a)` | `c[j]=1` and `NAND(a)=1`: `f = NOT x[j]` |
| C''-NAND | `c2_nand #(N)` | `c=0`: `f = NAND(a)` | `c=1`: `f = NOT x` |

The C-NAND and C-NOR differ in the control level that means "normal". A
C-NAND has one extra pull-down transistor that shorts the series chain. A
C-NOR has one series transistor that disconnects the other pull-downs. So
the C-NAND is normal at `c=0` and the C-NOR is normal at `c=1`.

The C' and C'' cells turn a NAND gate into a cheap multiplexer. This lets an
internal node (`x`) be seen at a primary output that the gate already
drives.

The C'-NAND adds only a series pair (`x`, `c`) parallel to the NAND
pull-down, so in full it computes
`f = NOT(AND(a) OR OR_j(c[j] AND x[j]))`. Some `a` input must be held low
while observing. It supports `P` access points.

The C''-NAND adds a transistor that cuts off the NAND chain, plus an
inverter. So it needs no condition on `a`.

In both multiplexing cells the access input appears **complemented** at
`f`. That is what a pull-down transistor driven by `x` produces, and it
matches the published test table of the C' cell. The formulas printed for
the two cells write plain `x`.

## The testable 74181

`alu181` is the standard 74181 with active-high operands. `Cn` and `C(n+4)`
are active-low carries. `P'` and `G'` are the active-low look-ahead outputs.
`A=B` is the AND of the F outputs.

The ALU is split into three partitions:

- **alpha** (`alu181_alpha`, one slice per bit): forms two internal lines per
  bit from `A_i`, `B_i` and `S3..S0`:
  - `H_i = NOT(A + B.S0 + (NOT B).S1)`
  - `L_i = NOT(A.(NOT B).S2 + A.B.S3)`
- **beta** (`alu181_beta`): the F outputs and A=B. It uses `Cn`, `M`, `H` and
  `L`, with two-level carry look-ahead (`g = NOT L`, `p = NOT H`).
- **gamma** (`alu181_gamma`): `P'`, `G'` and `C(n+4)`, formed from `H`, `L`
  and `Cn`.

### Why four C-NANDs, and where

In a normal 74181, `H_i = 1` implies `A_i = 0`, which forces `L_i = 1`. So
beta and gamma never see `H = 1, L = 0` on any bit, and they cannot be
tested exhaustively from the pins.

Each alpha slice therefore builds its `A.B.S3` product with a three-input
C-NAND whose priority input is `B`. All four C-NANDs share one control line.
With the control set to 1 and `S0 = S1 = S2 = 0`:

    H_i = NOT A_i        L_i = NOT B_i

Every internal line is now set directly and independently from the pins.
Beta (10 inputs) and gamma (9 inputs) can be cycled through all their input
combinations. The published method specifies four C-NANDs in partition
alpha and a single control line. **Which** gate in each slice becomes the
C-NAND is this design's choice. It is the smallest change that removes the
`H → L` dependency.

### Exhaustive partition test

The top-level testbench and the sequencer apply these patterns:

| partition | C-register | inputs cycled | patterns | compared outputs |
|---|---|---|---|---|
| alpha | 0 (normal) | A, B (same value in every bit), S3..S0; M = 1, Cn = 1 | 64 | all |
| beta | 1 (test) | A, B, Cn, M; S = 0 | 1024 | F, A=B |
| gamma | 1 (test) | A, B, Cn; M = 0, S = 0 | 512 | P', G', C(n+4) |

That totals 1600 patterns. The published figure for this ALU is 448
patterns, obtained from properties of the partitions that are not spelled
out. This design does not reproduce that count.

## C-register

`c_register #(W)` holds the C-gate control lines:

- One cell can drive one or several C-gates.
- Serial load: while `shift_en` is high, one bit per clock enters at the top
  end, `ctrl[W-1]`. The cell `ctrl[0]` is driven out on `so`. A tester can
  therefore shift a new word in and read the old one back on the same
  clocks.
- `load_en` loads `load_data` in parallel, for on-chip self-test. It takes
  priority over shifting.
- `rst_n` is an asynchronous, active-low reset. It clears every cell, which
  puts all C-gates in normal mode.

The top uses one cell (`ctest_pkg::CREG_W = 1`), because all four C-NANDs
share one line.

## Self-test sequencer

`self_test_seq #(NPART)` carries out the partition-by-partition test
procedure on chip. For each partition in turn it does three things:

1. **Load.** It pulses `creg_load` for one cycle with the partition's
   C-register word.
2. **Apply.** It applies `2**nbits` patterns, one per clock, from a binary
   counter. Each of the 14 pattern bits takes either a chosen counter bit or
   a fixed value, so one counter bit can feed several inputs. Alpha uses this
   to test the four slices in parallel.
3. **Compare.** It compares the response with `expected` under the
   partition's `cmp_mask`, in the same cycle the pattern is applied, and
   counts mismatches.

After the last partition it loads an all-zero C-register word and raises
`done`. `fail` and `mismatches` stay set until the next `start`.

A run takes `NPART + sum(2**nbits) + 2` clock cycles from the start pulse to
`done`. With the table above that is 1605 cycles.

The per-partition record is `ctest_pkg::part_cfg_t`. It holds the C-register
word, `nbits`, one `bit_src_t` per pattern bit, and `cmp_mask`. The expected
responses would live in an on-chip control store. That store is **not** part
of this RTL: its record and response enter on ports. The encoding of the
record and the one-pattern-per-clock timing are this design's own.

## Top level: `ctest_top`

The top level has four groups of pins:

- **74181 pins:** `a`, `b`, `s`, `cn`, `m` → `f`, `aeqb`, `p_n`, `g_n`,
  `cn4`. The ALU is purely combinational.
- **C-register pins:** `creg_shift`, `creg_si` and `creg_so` (serial load
  and observation), clocked by `clk`, reset by `rst_n`.
- **Self-test pins:**
  - `st_start` starts a run.
  - `st_cfg[3]` gives the alpha, beta and gamma records.
  - `st_expected` is the expected response for the pattern now shown on
    `st_pat`.
  - The status outputs are `st_pat_valid`, `st_part`, `st_busy`, `st_done`,
    `st_fail` and `st_mismatches`.

  While `st_pat_valid` is high, a multiplexer feeds the sequencer's pattern
  to the ALU instead of the pins. This multiplexer is this design's
  addition.
- **Gate-cell pins:** one C-NAND, C-NOR, C'-NAND and C''-NAND, each on its
  own pins and unconnected to the ALU.

## Files

| file | content |
|---|---|
| `rtl/ctest_pkg.sv` | ALU in/out structs, sequencer configuration types, `CREG_W` |
| `rtl/c_nand.sv`, `c_nor.sv`, `c1_nand.sv`, `c2_nand.sv` | gate cells |
| `rtl/c_register.sv` | C-register |
| `rtl/alu181_alpha.sv`, `alu181_beta.sv`, `alu181_gamma.sv`, `alu181.sv` | partitioned 74181 |
| `rtl/self_test_seq.sv` | self-test sequencer |
| `rtl/ctest_top.sv` | top level |
| `tb/alu181_ref_pkg.sv` | reference models: 74181 function table and a ripple model of beta and gamma |
| `tb/<module>_tb.sv` | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- **Gate cells:** all input combinations. The C' cell is also checked
  against its published four-row test table.
- **`alu181_tb`:** all 16384 normal-mode input combinations against the
  74181 function table. This reference is written as "X plus Y" operands and
  16 logic functions, not as gate equations. The testbench also checks all
  1024 test-mode combinations.
- **`ctest_top_tb`**, end to end at the top's only configuration:
  - normal mode, exhaustively;
  - the gate cells;
  - entry into test mode through the serial C-register pin, with read-back;
  - beta and gamma, exhaustively from the pins;
  - a fault-free self-test, which must finish in 1605 cycles;
  - a self-test with `H2` forced stuck-at-0, which must fail (318
    mismatches).

  It counts each mechanism and fails if any of them never happened. It runs
  in well under a second.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/ctest_pkg.sv tb/alu181_ref_pkg.sv tb/ctest_top_tb.sv --top-module ctest_top_tb
    ./obj_dir/Vctest_top_tb

To lint a module:

    verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/ctest_pkg.sv rtl/ctest_top.sv

## Departures and limits

- **Complemented access input.** In the C' and C'' cells the access input
  appears complemented, following the transistor circuits rather than the
  formulas printed for the cells.
- **C'' control polarity.** The C'' cell is normal at `c = 0`. Its circuit
  drawing drives the NAND-chain transistor from `c` directly, which would
  mean the opposite polarity.
- **C-NAND priority input.** It defaults to input `x[0]` (the "a" of the
  three-input example). The transistor drawing would favour the top input,
  so `PRIO` makes either choice available.
- **Gamma uses `Cn`.** The carry out of a 74181 needs the carry in, so gamma
  takes `Cn`, although the partition is described as having no primary
  inputs.
- **Pattern count.** The exhaustive test uses 1600 patterns, not the
  published 448.
- **Not built:**
  - an alternative cited from other work, in which the NAND gate driving
    `C(n+4)` becomes a C-NAND to allow an 11-vector test;
  - the use of C-gates in sequential networks, which is only mentioned;
  - the on-chip control store, which is only named.
- **Not modelled:** analog properties (roughly 10 % extra delay for a
  C-NAND, 20 % for a C-NOR, about 20 % area per C-gate).

## Changing the design

- `c_nand`, `c_nor` and `c1_nand` take their width (`N`), priority input
  (`PRIO`) and number of access points (`P`) as parameters.
- To give each bit slice its own control line, raise `ctest_pkg::CREG_W`.
  Then connect `ctrl[i]` to slice `i` in `alu181`, which would then take a
  `[CREG_W-1:0]` control.
- New partitions for the sequencer are data, not logic. Add a `part_cfg_t`
  record and raise `NPART`.
