# Row-parallel NOR arithmetic in memristor crossbars

This is RTL for a processing-in-memory system. It follows the architecture described in
"Automated Synthesis for In-Memory Computing" (the AUTO framework). Arithmetic runs where
the data is stored. Every wordline (row) of a 256x256 memristor crossbar holds its own
operands. A multiplication or dot product is broken down into a long sequence of NOR and
INV operations between columns, the MAGIC logic style. The crossbar evaluates each of
these operations in every row at once, in one cycle, and writes the result into another
column of the same row.

One kernel (one operation sequence) therefore does the same computation on 256 operand
sets per mat. Broadcast to all mats of a rank, it does the work on 16,384 sets at the
default size.

The RTL models this behaviour at the level of logic values. The cells are flip-flops; the
voltages, resistances and analog sensing of a real memristor array are left out. What
gets built here is the digital system around the crossbar: the drivers that turn an
operation into column selections, the copy path between neighbouring mats, the store
that holds and issues kernels, and the chip, bank and rank hierarchy with its host bus.

## Hierarchy

```
auto_imc_rank            CHIPS=8 chips, 32-byte host bus, chip select by address
└─ imc_chip              one kernel_sequencer + BANKS=2 banks
   ├─ kernel_sequencer   kernel memory (16384 micro-operations), issues 1 per cycle
   └─ imc_bank           global_driver + MATS=4 mats + 3 copy units
      ├─ global_driver   kernel ops to all mats; host access to one mat; kernel has priority
      ├─ mat_driver      row/column driver: operation -> driven columns, grounded column, wordline
      ├─ magic_mat       256x256 cells: NOR/INV in all rows, wordline read/write, column ports
      └─ rpc_unit        copies one column (all 256 rows) into the next mat
```

`imc_pkg` holds the shared types: the micro-operation `mop_t`, the host request
`host_req_t` and the geometry constants.

The values below come from the paper:

* the 256x256 mat;
* the 32-byte bus, exactly one wordline per transfer;
* the 256 wires of the local bus between mats, one per row;
* NOR with at most three inputs;
* one operation per cycle;
* eight chips per rank, as drawn in the architecture figure.

The paper gives no number of banks per chip or mats per bank, and no size for the kernel
store. The defaults here are this design's own choices:

| Parameter | Default | Reason |
|---|---|---|
| banks per chip | 2 | chosen |
| mats per bank | 4 | chosen |
| kernel store | 16384 words | holds the largest count the paper reports, 15,007 operations for one 32-bit multiplication |

## The micro-operation

All work is a stream of `mop_t` words:

| `op` | meaning |
|---|---|
| `MOP_NOR` | `out := NOR(in0[, in1[, in2]])` in every row. `n_in` = 1, 2 or 3; `n_in = 1` is an INV. |
| `MOP_COPY` | Column `in0` of every mat goes into column `out` of its right-hand neighbour. The row index stays the same. |
| `MOP_WRITE` | The host writes wordline `row`. The 256-bit data comes with a column mask, so one part of a wordline can be loaded alone. |
| `MOP_READ` | The sense amplifiers latch wordline `row`. |
| `MOP_NOP` | Nothing. |

These rules hold in the hardware:

* **The output column must not be one of the inputs, and `n_in` must not be 0.** In MAGIC
  the inputs are driven and the output column is grounded, so they cannot be the same
  column. `mat_driver` rejects such an operation: it raises `err` and changes no cell.
* **A copy arrives two clock edges after it is issued.** The source column is sensed and
  captured, then driven into the neighbour. `kernel_sequencer` therefore puts one idle
  cycle after every `MOP_COPY`. An operation right after the copy can then read the copied
  column. A kernel of `len` words with `k` copies keeps the sequencer busy for
  `len + k + 1` cycles.
* **Copies form a chain inside a bank.** Mat *m* copies into mat *m+1*. The last mat of a
  bank has no neighbour, and a copy issued there is dropped.
* **Cells are never reset.** They keep whatever was last written, like a non-volatile
  array. Only control state is reset, by the asynchronous active-low `rst_n`.
* **Simultaneous accesses to the same cell in one cycle have a fixed priority.** A column
  write wins over a wordline write, which wins over a NOR.

Pipeline timing: the global driver registers the operation, so an operation taken in
cycle *t* changes the cells at the end of cycle *t+1*. Read data appears two cycles after
the read request is accepted.

## How arithmetic runs in a wordline

A kernel is pure software: a list of micro-operations. The hardware has no fixed adders;
the kernel store is loaded with whatever netlist the host provides. The testbench package
`tb/mul_kernel_pkg.sv` generates correct kernels from these gates:

```
AND(x,y)    = NOR(~x, ~y)
half adder  c = NOR(~a, ~b)            s = NOR(c, NOR(a, b))                       5 ops
full adder  cout = NOR3(NOR(a,b), NOR(b,c), NOR(c,a))
            sum  = INV(NOR(NOR3(~a,~b,~c), NOR(NOR3(a,b,c), cout)))              12 ops
```

The carry expression and the 5-operation two-bit adder match the paper. The paper prints
a sum expression with one more outer inversion than shown here. Taken literally, that
expression gives the inverted sum, so the kernels here add the final INV. As a result,
the three-bit adder here takes 12 operations; the paper's synthesised one takes 11.

Covering three bits with three two-bit adders in sequence takes 15 operations. It also
produces a second carry bit that can never be 1. This is the paper's argument for
"semantically complete" adders, which are adders whose largest possible sum is
2^k - 1. `tb_custom_adders` runs all three kernels.

A wordline is split into segments:

* the inputs (A and B for every term);
* the current partial-product row;
* functional (scratch) cells;
* the result;
* a copy area that receives the left-hand neighbour's result.

`gen_mul(n)` adds the partial-product rows one after the other. `gen_dot(n, v)` adds all
partial-product rows of `v` products into a single accumulator of `2n + clog2(v)` bits.
`gen_sum` adds two fields of a wordline with a ripple of full adders.

A dot product that is too long for one wordline is split over neighbouring mats, at the
same wordline index in each, as the paper's matrix-vector mapping does. Every mat computes
its partial sum P. The partial results are then added along the copy chain:

```
ACC := P + RX                          (RX, the copy area, starts at zero)
repeat MATS-1 times:
    copy ACC into RX of the right-hand neighbour
    ACC := P + RX
```

The same kernel runs in every mat. Afterwards, mat m holds the sum of the partial results
of mats 0..m, so the last mat of the bank holds the whole dot product.

The paper's main point is that kernels built from custom multi-bit adders, found by
synthesis, need fewer operations than full-adder kernels like these. That optimisation
happens entirely in the offline tool that writes the kernel. This RTL executes such a
kernel unchanged. The optimised netlists are not reproduced in the paper, only their
operation counts, so they are not included here. For comparison, the generated kernels take:

| operation | generated kernel here | paper, full-adder baselines | paper, AUTO |
|---|---|---|---|
| 8-bit multiply | 696 ops | 871 / 726 / 518 | 478 |
| 16-bit multiply | 3056 ops | 3663 / 3110 / 2310 | 2024 |
| 32-bit multiply | 12768 ops | 15007 / 12870 / 10046 | 8462 |

Every operation is one cycle. The cycle count of a kernel is therefore its operation
count, plus one cycle per copy, plus one cycle.

How many dot-product terms fit in one 256-cell wordline depends on the kernel's scratch
cells. With the generated layout it is 12 terms at 8 bits, 4 at 16 bits and 1 at 32 bits;
the paper reports 13, 6 and 2 for its own kernels. At 16 bits, 4 terms need just more than
16384 operations with these kernels, so the workload test uses 3.

## Host interface (`auto_imc_rank`)

Requests use a valid/ready handshake (`req_valid`, `req_ready`). `req` is a `host_req_t`;
`wdata` and `wmask` are 256 bits wide.

| `req.cmd` | action | ready when |
|---|---|---|
| `HC_WRITE` | `wdata` goes to wordline `req.row` of mat `req.mat`, bank `req.bank`, chip `req.chip`, only in the columns set in `wmask` | the chip runs no kernel |
| `HC_READ` | the same wordline returns on `rd_data` with `rd_valid`, 2 cycles later | the chip runs no kernel |
| `HC_PROG` | stores `req.mop` at kernel address `req.addr` | always |
| `HC_RUN` | runs `req.len` words starting at `req.addr` | the chip is idle |

With `req.bcast = 1`, `HC_PROG` and `HC_RUN` go to every chip. The request is accepted
only when all chips are ready.

Status outputs:

* `busy` is high while any chip is running a kernel.
* `done[c]` pulses when chip *c* finishes.
* `last_steps[c]` and `last_cycles[c]` give the operation count and the cycle count of the
  last kernel on chip *c*.
* `err` is high when any mat rejected an illegal NOR.

## What is not modelled, and other departures

* **Electrical behaviour.** A NOR result is written into the output cell directly. A real
  MAGIC gate first initialises the output memristor, and that step is not modelled. The
  sense amplifiers appear only as the registered read port and the column sense port of
  `magic_mat`.
* **The network between chips.** The architecture figure names a network on the module
  between the chips but does not describe it. Here, chips are selected by plain address
  decoding.
* **The global driver.** Only its name is given. Its arbitration and register stage are
  this design's own choices. So are:
  * the micro-operation encoding;
  * the host command set;
  * one sequencer per chip shared by its banks;
  * the linear copy chain;
  * the idle cycle after a copy.
* **Software steps.** The custom-adder library, the covering algorithm that builds
  kernels, and the algorithm that splits a matrix-vector product across wordlines and
  mats are offline software, not hardware. The host has to supply their results: kernels,
  and operand placement in wordlines. `tb_mvm_partitioned` does this by hand for one
  fixed split.
* **Cost figures.** Area, power and energy numbers of the paper have no counterpart in
  RTL.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=N failures=M` line.

| testbench | what it checks |
|---|---|
| `tb_magic_mat` | random NOR2/NOR3/INV, masked wordline writes, column writes and reads against a bit-level reference |
| `tb_mat_driver` | decode of every operation kind, including rejected ones, against masks computed from the fields |
| `tb_rpc_unit` | one-cycle capture-and-drive of random (also back-to-back) copies |
| `tb_kernel_sequencer` | issue order, one idle cycle after each copy, `done`, and step/cycle counters |
| `tb_global_driver` | kernel broadcast, host access to one mat only, host stall while a kernel runs |
| `tb_imc_bank` | a half-adder kernel in all rows of two mats, a copy to the neighbour, rejection of an illegal NOR |
| `tb_imc_chip` | a two-term 8-bit dot product in every wordline of 4 mats, plus the copies and counts |
| `tb_auto_imc_rank` | full default size (see below) |
| `tb_custom_adders` | two-bit adder in 5 cycles; three-bit sum from three two-bit adders in 15 cycles, whose second carry is 0 in every row; a 12-operation three-bit adder |
| `tb_mvm_partitioned` | a 256 x 8 matrix-vector product at 16 bits on one bank of 4 mats: each mat computes 2 terms of every row, and the partial sums are added through the copy chain; every wordline of every mat is checked (10131 operations, 10237 cycles) |
| `tb_workloads` | 8/16/32-bit multiplication and dot products (8 bits with 2, 8 and 12 terms; 16 bits with 3 terms; 32 bits with 1 term) in every wordline of 2 mats, checked against reference arithmetic |

`tb_auto_imc_rank` runs at the full default size: 8 chips x 2 banks x 4 mats. It loads
16,384 wordlines, runs an 8-bit multiplication kernel broadcast to all chips, copies each
product to the neighbouring mat, and reads everything back. It also checks and counts:

* host and run requests stalled during the kernel;
* broadcast;
* masked writes;
* copies;
* INV, NOR2 and NOR3 operations;
* the illegal-NOR flag;
* the cycle count `len + copies + 1`.

It runs in a few seconds.

Run any testbench with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/imc_pkg.sv tb/mul_kernel_pkg.sv rtl/*.sv tb/tb_auto_imc_rank.sv \
    --top-module tb_auto_imc_rank
./obj_dir/Vtb_auto_imc_rank
```

Unit testbenches need only `rtl/imc_pkg.sv`, the module under test and the testbench.
Add `tb/mul_kernel_pkg.sv` for the bank, chip, rank and workload tests.

## Size and changing it

One default mat has 65,536 cell flip-flops. The default rank has 64 mats, about 4.2 Mbit
of cells, plus 8 kernel stores of 16384 x 45 bits. Simulation handles this easily. A
gate-level synthesis of the full rank is very large; synthesise `magic_mat` or a small
`imc_bank` on its own to see the per-mat cost.

* `CHIPS`, `BANKS` and `MATS` can be changed freely.
* `ROWS` and `COLS` can be lowered. Index fields are 8 bits wide, so neither can exceed
  256 without widening `imc_pkg::idx_t`.
* `COLS` must stay equal to the host bus width, which is `BUS_BYTES * 8`.
