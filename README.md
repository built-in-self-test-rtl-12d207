# Parallel March C- built-in self test for a bit-oriented SRAM

A March test touches every cell about ten times, so its run time grows linearly with
the memory: 10·n operations for March C- on an n-bit RAM, about 42 million for 4 Mbit.
This design cuts that by testing many cells in the same cycle. The cell array
(√n × √n cells) is cut into a grid of equal *basic marching blocks* of k cells
(√k × √k). The BIST runs March C- on one block, and every operation it issues
is applied to the same cell position of every block at once:

* a **write** reaches all n/k copies of the position in one cycle, through address
  decoders that accept a mask word;
* a **read** can only use one word line, so it reads the √(n/k) copies that share a
  row, and a **parallel comparator** checks that they all hold the same value. It
  needs no expected value: cells written together must read back equal.

A full March C- then takes 5·√k·(√k + √n) cycles instead of 10·n. At the default
size (4 Mbit, 64 Kbit blocks) that is 2,949,120 cycles instead of 41,943,040.

The scheme follows the parallel BIST proposed by J.-C. Lee, Y.-S. Kang and S. Kang
("Built-In Self Test for High Density SRAMs"). The RTL here is an independent
implementation. Where their description stops, this design makes its own choices,
and these are listed in "Where this design chooses" below.

## Address layout

`LOG2N` and `LOG2K` give n = 2^LOG2N and k = 2^LOG2K. Both must be even, and
LOG2K ≤ LOG2N − 2. Row and column addresses each have RA = LOG2N/2 bits, split into two fields:

```
row address    = { block row    (HB bits) , row inside block    (LB bits) }
column address = { block column (HB bits) , column inside block (LB bits) }
HB = (LOG2N - LOG2K)/2      LB = LOG2K/2
```

At the defaults, RA = 11, HB = 3 and LB = 8. That makes 2048 × 2048 cells, organised as an 8 × 8 grid of
256 × 256-cell blocks. The normal-mode address port is `{row, column}`.

## Mask decoders: how one write reaches n/k cells

`mask_decoder` takes an address word and a mask word of the same width. It selects every
line whose index matches the address on all *unmasked* bits. A zero mask makes it
an ordinary one-hot decoder. With m mask bits set, it selects 2^m lines. The design has
two of these decoders, one for the word lines and one for the bit lines. `sram_array` writes every cell whose word
line and bit line are both selected.

In test mode, the mask address generator (`mag`) sets the masks for the upper HB bits only:

| operation        | row mask (upper HB bits) | column mask (upper HB bits) | cells touched |
|------------------|--------------------------|-----------------------------|---------------|
| test write       | all 1                    | all 1                       | n/k           |
| test read        | all 0                    | all 1                       | √(n/k), one row |
| normal mode      | all 0                    | all 0                       | 1             |

## The parallel comparator and what it cannot see

`parallel_comparator` looks at the sense-amplifier outputs of the selected bit lines.
It drives `error_flag_n` low when some selected outputs are 0 and others are 1. Outside test
reads it is isolated, and the flag stays high, which models the precharged flag line of
the circuit. The controller samples the flag in every read cycle. A low flag sets the
sticky `bist_fail` output.

Because it compares cells only with each other, a fault that gives the same wrong value
at the same position of *every* block cannot be seen. Cells at the same position of
different blocks are also always written together. A coupling fault between two of them
that forces the value being written (for example, a rising aggressor forces the victim
to 1 in the same cycle that both are written 1) is therefore never observed.

The authors estimate the resulting loss of fault coverage, relative to a plain March C-, at
about 1/k: 0.0015 % for 64 Kbit blocks. Stuck-at and transition faults keep full coverage.
The end-to-end testbench demonstrates both blind spots on purpose.

## The two counters and the march schedule

The block position and the current march element sit in one counter, `bmbag`
(LOG2K + 3 bits: `I/D`, `A`, `B`, block address). The carry or borrow out of the address field steps the three
top bits, so those bits count the elements:

| {I/D,A,B} | element | March C-      | address order |
|-----------|---------|---------------|---------------|
| 000       | M1      | ⇑(w0)         | up            |
| 001       | M2      | ⇑(r0,w1)      | up            |
| 010       | M3      | ⇑(r1,w0)      | up            |
| 111       | M4      | ⇓(r0,w1)      | down          |
| 110       | M5      | ⇓(r1,w0)      | down          |
| 101       | M6      | ⇓(r0)         | down          |
| 100       | done    |               |               |

When M3 finishes, the counter is not allowed to roll into 011. It is SET to all ones
instead, so M4 starts at the top address with `I/D = 1`, and `I/D` is then the count
direction for the rest of the run.

The upper row bits for reads come from the second counter, `mdag` (HB + 1 bits: `C` and the row-group
field). In an up element it starts from RESET (C = 0) and counts up. In a down element
it starts from SET (C = 1, field all ones) and counts down. When every row group has
been read, C has toggled, so **C ≠ I/D means that the reads of this position are done**.

`signal_generator` turns these counter bits into one memory operation per cycle:

* M1: one write per position (k cycles).
* M2 to M5: √(n/k) reads, one per row group, then one write. The write also steps `bmbag`
  and restarts `mdag`. This takes k·(√(n/k) + 1) cycles.
* M6: √(n/k) reads per position. `bmbag` steps on the last read, so no cycle is idle.

The total is 5·k + 5·√k·√n = 5·√k·(√k + √n) cycles. No cycle is spent
without a memory operation. `data_generator` supplies the write value of each element.

| memory | 64 Kbit blocks | 256 Kbit blocks | 1 Mbit blocks | plain March C- (10·n) |
|--------|---------------:|----------------:|--------------:|----------------------:|
| 4 Mbit   | 2,949,120  | 6,553,600  | 15,728,640 | 41,943,040 |
| 16 Mbit  | 5,570,560  | 11,796,480 | 26,214,400 | 167,772,160 |
| 64 Mbit  | 10,813,440 | 22,282,240 | 47,185,920 | 671,088,640 |
| 256 Mbit | 21,299,200 | 43,253,760 | 89,128,960 | 2,684,354,560 |

The published table gives 2.93 M for 4 Mbit with 64 Kbit blocks. Every other entry agrees with
the formula, and the RTL follows the formula (2.95 M).

## Top level: `sram_bist_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of the BIST state (not of the cells) |
| `tm` | in | 1 | test mode: the BIST owns the array; low = normal access |
| `bist_start` | in | 1 | one-cycle pulse with `tm` high: restart the test |
| `addr`, `we`, `wdata` | in | LOG2N, 1, 1 | normal-mode access; write on the rising edge |
| `rdata` | out | 1 | normal-mode read data, combinational from `addr` |
| `bist_busy`, `bist_done`, `bist_fail` | out | 1 | status; `bist_fail` is sticky until the next start |
| `error_flag_n` | out | 1 | raw comparator flag, 0 in a test read that saw a fault |
| `bist_element` | out | 3 | current march element (`sram_bist_pkg::march_elem_e`) |

**Timing.** Hold `rst_n` low across at least one rising clock edge after power-up. The start pulse is sampled on a rising edge. From the next cycle on, there is
exactly one memory operation per cycle. `bist_done` rises right after the edge that ends
the last operation, and `bist_fail` is final at that point. `tm` must stay high for the whole run. Dropping it pauses
the BIST, and raising it again resumes the run. After a complete March C- run, the array
holds all zeros.

## Modules

| file | role |
|------|------|
| `rtl/sram_bist_pkg.sv` | march element encoding and per-element read/write/data helpers |
| `rtl/sram_bist_top.sv` | top: BIST controller, normal/test multiplexing, two decoders, array, comparator |
| `rtl/bist_controller.sv` | groups the counters, mask generator, signal and data generators, and the sticky fail flag |
| `rtl/bmbag.sv` | block address + element counter |
| `rtl/mdag.sv` | row-group counter for reads |
| `rtl/mag.sv` | mask address generator |
| `rtl/signal_generator.sv` | per-cycle operation and counter control |
| `rtl/data_generator.sv` | write value per element |
| `rtl/mask_decoder.sv` | decoder with mask word |
| `rtl/parallel_comparator.sv` | reference-free equality check of selected sense outputs |
| `rtl/sram_array.sv` | √n × √n cell array with multi-cell write and single-row read |

## Simulating

Every testbench in `tb/` checks its own results. Each one ends by printing
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/sram_bist_pkg.sv \
    tb/tb_sram_bist_top.sv --top-module tb_sram_bist_top -o sim
./obj_dir/sim
```

* `tb_sram_bist_top` runs the whole design at 1 Kbit with 16-bit blocks. It covers:
  * normal-mode accesses, checked against a model;
  * a fault-free run, with exact operation counts per element, address order,
    selection widths and the 720-cycle length;
  * runs with an injected stuck-at-1, stuck-at-0, up-transition and inversion coupling fault, which must fail;
  * two faults the scheme cannot see, which must pass: an idempotent coupling between
    same-position cells, and one stuck-at fault copied into every block.

  The testbench also counts each mechanism: parallel write, single-line read, row-counter
  wrap, direction switch, comparator flag and normal access. A mechanism that never
  happens is counted as a failure.
* `tb_sram_bist_full` runs the default 4 Mbit / 64 Kbit configuration. It makes one full fault-free
  run of 2,949,120 cycles and one run with a stuck-at cell. This takes about 4–5 minutes.
* `tb_sram_bist_sizes` runs five sizes side by side. It checks the cycle formula and shows that
  the run grows about 2x when the memory grows 4x.
* `tb_<module>` exist for every module. `tb_signal_generator` compares the operation stream
  one operation at a time with an independently built March C- schedule.

The testbenches emulate faults by rewriting a cell of `u_array.mem` after every clock edge.

## Where this design chooses

The published description gives the following: the partitioning, the masked decoding, the
comparator's function, the two counters' widths, fields and controls, the mask generator,
March C-, and the operation count. This design chooses the rest:

* **Counter encoding.** The element codes in `{I/D,A,B}`, the SET at the end of M3, the C ≠ I/D rule,
  and the descending row-group order in down elements are a consistent reading of
  the two counters. The original does not spell them out.
* **Signal and data generators.** The original only states that these are easy to build. The
  decoding here is this design's own.
* **Clock.** The original mentions a generated clock for the counters. This design uses the system
  clock with count enables, at one operation per cycle.
* **Address split.** The upper half of the block address is the in-block row, and the lower half
  is the in-block column.
* **Control and normal-mode port.** The start/busy/done/fail handshake, the sticky fail flag,
  the asynchronous reset and the normal-mode one-bit port are all this design's additions.
* **Circuits modelled by behaviour.** The comparator is a logic equivalent of a precharged
  transistor circuit. The decoder is the logic function of the masked decoder. The array is a
  register array standing in for the SRAM cells, write drivers and sense amplifiers. At 4 Mbit
  that array is a simulation model: synthesizing it gives millions of flip-flops. A real
  macro would replace `sram_array` and keep the same select-line interface.
* **Not modelled.** The transistor-count overhead figures of the original
  (about 1,100–1,350 added transistors) are not modelled.
