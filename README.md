# A DDR4 rank with bulk-bitwise processing inside its banks, as FPGA logic

Processing-in-memory (PiM) proposals such as RowClone, LISA and Ambit change
what happens *inside* a DRAM bank. They copy rows without using the data bus
and compute bitwise AND/OR/NOT by opening several rows at once. Software
simulators of such proposals are slow. This RTL is the alternative described
in "PiMulator: a Fast and Flexible Processing-in-Memory Emulation Platform":
a cycle-level model of the memory itself that runs on an FPGA.

A normal memory controller drives it through the DDR4 pins. It behaves like a
DDR4 rank, including the bank states and timing. It also carries out in-memory
row copies and bitwise operations when the controller issues the command
sequences those schemes use.

The main problem it solves is capacity. An 8 GB DDR4 rank does not fit in FPGA
block RAM. Each bank therefore keeps only a few whole rows on chip, and a
per-bank row cache maps them onto any row of the emulated bank. The rest of
the rows live in board memory (DDR or HBM) reached over AXI. While a row moves,
the model raises `stall` and the whole emulated system pauses, so emulated
time stays exact.

The default parameters describe an 8 GB DDR4-2400 rank:
- 16 chips of 4 bits (64-bit data bus);
- 4 bank groups of 4 banks;
- 65536 rows of 1024 columns per bank;
- burst length 8;
- timing in clock cycles: tRCD = tCL = tRP = 17, tCWL = 12, tRAS = 39, tRFC = 312, tWR = 18, tRTP = 9.

## Two clocks: the model clock and emulated time

`clk` is the model clock. It runs at twice the interface clock, so one data
beat moves per `clk` cycle. The input `ck_t` tells the model which half of the
interface clock it is in. Commands are decoded only when `ck_t` is high and
`cs_n` is low.

All DDR timing parameters are given in interface clocks (tCK). Each bank's
state machine counts `2*t` model clocks. At the pins, for a command in model
clock `c`:

| command | data |
|---|---|
| RD / RDA | `dq_out` valid with `dq_oe = 1` in cycles `c+2*tCL+1 ... c+2*tCL+8` (the extra cycle is a block RAM read register) |
| WR / WRA | `dq_in` sampled in cycles `c+2*tCWL ... c+2*tCWL+7` |

Emulated time is the count of model clocks in which `stall` is low. While
`stall` is high, every emulated register holds its value: bank states,
counters, pending bursts and the burst counter. The controller in front of the
model must hold too, and issue nothing. The testbenches' controller model
counts emulated cycles, not `clk` edges, and the timing above is in emulated
cycles.

`stall` rises for three things:
1. a row-cache write back of a dirty row to board memory;
2. a row-cache fetch (allocate);
3. an in-memory operation (row copy or triple-row activation).

None of them take emulated time. Real timing for in-memory operations comes
from the activations the controller issues, which the bank state machine times
normally.

## Bank state and timing (`bank_timing_fsm`)

There is one state machine per bank, with these states: Idle, Activating,
Bank Active, ReActivating, Reading, Writing, Reading/Writing with auto
precharge, Precharging and Refreshing. A down-counter, loaded on entry, decides
when each state ends:

- ACT: Activating for tRCD.
- REF (all banks idle): Refreshing for tRFC.
- RD/WR in Bank Active: the burst starts after tCL/tCWL. A burst lasts BL/2
  clocks, then the bank returns to Bank Active. A RD/WR that is already queued
  goes on directly to the next burst.
- RDA/WRA: after the burst, the bank precharges once tRAS, tRTP (read) or
  tWR (write) have passed.
- PRE is accepted once tRAS from the ACT has passed. After a burst it also
  waits for tWR or tRTP. Then the bank is Precharging for tRP.
- A second ACT while Bank Active goes to ReActivating for tCL. This is the PiM
  hook, described next.

A command the current state cannot take is ignored and flagged on
`violation`. It is also counted in the statistics.

## In-memory operations, driven by ordinary commands (`pim_bank_ctrl`, `bank_pu`)

No new commands are added. Each operation is an ordinary DDR4 command sequence
that a PiM-aware controller would issue.

- **RowClone (fast parallel mode) and LISA copy.** The sequence is ACT src,
  then ACT dst to the same bank while src is open, then PRE. The second ACT
  copies row src into row dst.
  - If both rows are in the same subarray, this is a RowClone copy.
  - Otherwise it is a LISA copy along the chain of neighbouring subarrays. The
    number of subarrays crossed (`|src/512 - dst/512|`) is added to the
    statistics.
  - Subarrays are 512 rows (`SUBARRAY_ROWS`).
- **Ambit.** The top 16 row addresses of every bank are reserved:

| row (from 65520) | meaning |
|---|---|
| +0 .. +3 | T0..T3, compute rows |
| +4 / +5 | DCC0 through its normal / negated wordline |
| +6 / +7 | DCC1 through its normal / negated wordline |
| +8 / +9 | C0 (all zeros) / C1 (all ones), read only |
| +12 | T0, T1, T2 opened together |
| +13 | T1, T2, T3 |
| +14 | DCC0, T1, T2 |
| +15 | DCC1, T0, T3 |

  An ACT from Idle to one of +12..+15 is a triple-row activation. Each of the
  three rows becomes the bitwise majority of the three. With C0 as the third
  operand this is AND; with C1 it is OR. Copying a row into +5 (or +7) stores
  its complement in DCC0 (or DCC1), which gives NOT. Operands reach T/DCC rows
  with the copy sequence above, and the result is copied back the same way.
  Example: `D = A AND B` is
  1. copy A to T0;
  2. copy B to T1;
  3. copy C0 to T2;
  4. ACT +12;
  5. ACT D (a second ACT, which copies T0 into D);
  6. PRE.

The sequence runs as follows:
1. `pim_bank_ctrl` sees the second activation (or the ACT of a triple-row
   address).
2. It looks up the ordinary rows in the row cache. The source is kept from
   being evicted while the destination is looked up.
3. It raises `stall`.
4. It sends one command to the bank processing unit (`bank_pu`) of that bank
   in every chip.

The processing unit holds the six Ambit rows of its bank in LUT RAM, one
1024-word memory whose word carries all six rows of a column. It works one
column at a time: a copy takes 2 clocks per column, a majority 1 clock.

## The row cache (`dsync`) and board memory (`dsync_axi_ctrl`)

Each bank module holds `ROWS = 32` whole rows per chip, which is 0.05% of a
65536-row bank. `dsync` is a fully associative cache whose block is one whole
row. Its tag table holds, per local row, valid, dirty, the memory row number
and its subarray.

Its states are Compare Tag, Read/Write, Update Tag, Write Back and Allocate:
- Every RD/WR burst and every PiM operand is looked up.
- A hit costs no emulated time. Write hits mark the row dirty.
- On a miss, an invalid row is used if there is one. Otherwise the replacement
  policy picks a victim: FIFO by default, or a 16-bit LFSR when
  `POLICY_RANDOM = 1`.
- A dirty victim is written back first, then the new row is fetched. `stall`
  is high during Write Back and Allocate.

`dsync_axi_ctrl` serves these transfers one at a time, lowest bank first. One
AXI beat is one column of all 16 chips (64 bits). The board address of a word
is `((bank * 65536 + row) * 1024 + column) * 8`, so every row is one
contiguous 8 KiB region. That region is moved as four 256-beat INCR bursts.
- A fetch takes about one clock per beat.
- A write back takes three clocks per beat (read the bank module, then send).

The full 8 GiB emulated rank occupies 8 GiB of a 34-bit AXI address space.
AXI error responses are ignored.

## Data path (`dq_slice_demux`, `chip`, `bank_group`, `bank_mem`, `dq_concat_mux`)

The 64-bit word is sliced 4 bits per chip: chip `i` takes bits `4i+3..4i`.
Inside a chip, the flat bank number `{bank group, bank}` selects a bank group,
then a bank.

Each bank is a single-port block RAM (`bank_mem`) of `ROWS x COLS` 4-bit
words, with a one-cycle read. The same port serves three users, and they never
overlap:
- the controller's bursts;
- the row transfers to board memory, which happen only while stalled;
- the bank processing unit, which owns the port while busy, also only while
  stalled.

On the way out, the chips' data is concatenated:
- For controller reads, the word goes to `dq_out` with `dq_oe` high and
  `dqs_t` toggling once per beat.
- Otherwise it goes to the board-memory transfer.

The bidirectional pad buffer is not part of the RTL. The top brings out
`dq_in`, `dq_out` and `dq_oe` for it.

## Statistics (`trace_capture`)

`stats` (struct `stats_t` in `pim_pkg`) holds 32-bit counters:
- emulated and stalled cycles;
- ACT, RD, WR, PRE and REF commands;
- second activations, triple-row activations and LISA subarray hops;
- row-cache hits, misses and write backs;
- refused commands.

## Files

| file | contents |
|---|---|
| `rtl/pim_pkg.sv` | command, state, PU command and statistics types; the reserved-row decoder |
| `rtl/pimulator_top.sv` | the top: pins, per-bank logic (generate loop), chips, AXI master |
| `rtl/cmd_decoder.sv` | DDR4 truth table, open row and burst column per bank |
| `rtl/bank_timing_fsm.sv` | bank state machine |
| `rtl/dsync.sv`, `rtl/dsync_axi_ctrl.sv` | row cache and its board-memory mover |
| `rtl/pim_bank_ctrl.sv`, `rtl/bank_pu.sv` | PiM sequencing and the bank processing unit |
| `rtl/chip.sv`, `rtl/bank_group.sv`, `rtl/bank_mem.sv` | memory hierarchy |
| `rtl/dq_slice_demux.sv`, `rtl/dq_concat_mux.sv` | data bus in and out |
| `rtl/trace_capture.sv` | statistics |
| `tb/tb_<module>.sv` | self-checking test of each module |
| `tb/tb_pimulator_top.sv` | end-to-end test at reduced size |
| `tb/tb_pimulator_full.sv` | end-to-end test at the default (full) size |
| `tb/tb_ambit_ops.sv` | Ambit AND / OR / NOT / NAND / XOR sequences |
| `tb/tb_hopscotch.sv` | sequential / strided / random access kernels with hit rates |
| `tb/tb_ddr_tasks.svh` | controller and reference model shared by the end-to-end tests |
| `tb/axi_mem_model.sv` | behavioural AXI board memory (testbench only) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends. Each has a
watchdog that counts a failure if it hangs. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/pim_pkg.sv \
          $(ls rtl/*.sv | grep -v pim_pkg) tb/*.sv \
          --top-module tb_pimulator_top -Mdir obj && ./obj/Vtb_pimulator_top
```

Use any `tb_*` module as `--top-module`. The package file must come first.
`-Wno-fatal` keeps the width warnings of the testbench code from stopping the build.

**`tb_pimulator_top`** runs the whole model at a reduced size: 2 chips, 2×2
banks, 4 cached rows of 32 columns, 4096 rows in 16 subarrays, and short
timings. Its controller model checks every read beat, including the cycle it
appears in, against a reference model of the memory and of the Ambit rows. It
exercises:
- misses, hits and dirty write back;
- bank interleaving;
- auto precharge;
- refresh;
- a refused command;
- RowClone and LISA copies;
- Ambit AND, OR and NOT.

It then requires each of these mechanisms to show up in the statistics.

**`tb_pimulator_full`** instantiates the top with no parameter overrides, so
at the full 8 GB configuration. It runs, in about half a minute:
- a miss with a full-row fetch;
- reads and writes;
- two open banks;
- a RowClone copy;
- a LISA copy;
- an Ambit AND.

**`tb_hopscotch`** runs eight access kernels at the reduced size: sequential,
strided and random reads, writes and mixes, in the style of the Hopscotch
memory benchmark suite. Each access is ACT, one burst, PRE. The test checks
every read and prints each kernel's row-cache hit rate. Sequential kernels
reach 0.75-1.0, because four bursts share a fetched row. Random kernels reach
about 0, because every access fetches a row.

**`tb_ambit_ops`** builds AND, OR, NOT, NAND and XOR out of copies and
triple-row activations, using DDR4 commands only. It checks each result row
against the operation computed directly. It also prints the emulated cycles
per operation: at its short test timing, AND takes 137 cycles, NOT 68 and
XOR 544 for one 256-bit row.

## How far to trust it, and where it departs from the published design

- **Verified.** Every module has a self-checking test. Each test was also run
  against a deliberately broken copy of its module and caught the fault. The
  end-to-end tests compare every data beat on the pins with an independent
  reference model.
- **Timing beyond the listed parameters is not modelled.** This includes
  tRRD, tFAW, tCCD, bus turnaround, refresh scheduling and the extra latency
  of a LISA hop. The controller is trusted to respect these. The ReActivating
  state lasts tCL, which is a choice: the published state diagram shows the
  state but not its length.
- **Ambit rows.** There is one set of six Ambit rows per bank, not per
  subarray, and one processing unit per bank. The published study varies the
  number of Ambit rows per subarray and lets all subarrays compute at once.
  Neither is built, and the reserved-row map above is this design's choice.
- **Copies.** A RowClone copy writes the destination into its own cached row.
  It does not link several memory rows to one cached row, which is how the
  published design extends the tag table. The data seen by the controller is
  the same.
- **RowClone pipelined serial mode is not built.** This is the copy between
  two banks over the shared bus. Only copies inside a bank (RowClone fast
  parallel mode, LISA) exist.
- **Templates not built.** The bank-group, chip and rank-level PiM logic
  blocks are empty templates in the published design (places for user logic),
  and are not built. The bank-level unit here is the Ambit/RowClone one.
- **Not part of this RTL.** These come from elsewhere in the published
  platform and are not included:
  - the soft SoC and the memory controller that drive the pins;
  - the AXI interconnect;
  - the board memory (a behavioural model stands in for tests);
  - the tri-state pads.
- **Choices not fixed by the published design.**
  - the AXI address layout and burst split;
  - the row-cache handshake and its preference for invalid rows;
  - the statistics set;
  - the one-cycle read register at the pins.

## Changing it

- **Other organisations or speed grades.** Change the top's parameters:
  `NCHIPS`, `DW`, `NBG`, `NBA`, `ROWS`, `COLS`, `ROW_W`, `SUBARRAY_ROWS` and
  `T_*`. The end-to-end test shows a consistent reduced set.
- **More rows on chip.** Raise `ROWS`. Block RAM use scales with
  `NCHIPS * NBG * NBA * ROWS * COLS * DW` bits, which is 32 Mbit at the
  defaults.
- **New in-memory operations.** Add a reserved-row code in `pim_pkg`, handle
  it in `pim_bank_ctrl`, and add its datapath in `bank_pu`.
