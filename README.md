# A 4x4 shared-memory cell switch with barrel-shifted bank interleaving

This is the RTL of a switch fabric with four input and four output ports that
stores every cell in one buffer shared by all ports. Cells are 64 bytes long and
enter and leave as 32-bit words, one word per port per clock. The buffer is four
ordinary dual-port RAMs, each 32 bits wide, not one wide or multi-ported memory.
Two ideas let the four inputs and four outputs all run at full rate:

* **Diagonal (barrel-shifted) writes.** In every clock each input writes one
  word into a different bank, and the input-to-bank mapping rotates every four
  clocks. Over a 16-clock cell time every cell puts four words into every bank,
  and no bank is ever asked for two writes in one clock. Reads work the same
  way. The internal bus stays 32 bits per port, with no 128-bit staging bus and
  no faster multiplexer.
* **Linked-list buffer management.** Buffer space is handed out one cell at a
  time from a free list. Each output port has a FIFO list of cells waiting for
  it. All these lists are chains through one small link memory, so any port can
  use any part of the buffer.

The structure follows a published FPGA design (Xilinx Virtex-4, 173.575 MHz,
which gives 5.55 Gbit/s per port and 22.2 Gbit/s in all). Its block structure,
widths, cell format, diagonal write order, list management and memory sizes are
kept here. Where that description stops, this RTL makes its own choices: the
output path, the exact clock-by-clock schedule of the controller, the admission
rule and the port signals. They are listed under
[Choices and departures](#choices-and-departures).

## The cell time and the diagonal write

Everything is organised in **cell times** of 16 clocks. A free-running 4-bit
counter, `slot`, gives the clock inside the cell time. Write `slot = 4p + k`:
`p` is the *phase* (0..3) and `k` the *row* (0..3).

A cell is 16 words, W0..W15. It is stored as one **block**: four consecutive
words at the same place in each of the four banks. Word `Wj` goes to bank
`j mod 4`, row `j div 4` of the block:

| bank 0 | bank 1 | bank 2 | bank 3 |
|--------|--------|--------|--------|
| W0     | W1     | W2     | W3     |
| W4     | W5     | W6     | W7     |
| W8     | W9     | W10    | W11    |
| W12    | W13    | W14    | W15    |

In clock `4p + k`, input `i` writes word `((i + p) mod 4) + 4k` into bank
`(i + p) mod 4`, at bank address `{block_i, k}`. Name the cells of the four
inputs A, B, C and D:

| slot | bank 0 | bank 1 | bank 2 | bank 3 |
|------|--------|--------|--------|--------|
| 0    | A0     | B1     | C2     | D3     |
| 1    | A4     | B5     | C6     | D7     |
| 2    | A8     | B9     | C10    | D11    |
| 3    | A12    | B13    | C14    | D15    |
| 4    | D0     | A1     | B2     | C3     |
| 5    | D4     | A5     | B6     | C7     |
| ...  |        |        |        |        |
| 15   | B12    | C13    | D14    | A15    |

Words reach the switch in order W0, W1, ..., so they must be reordered before
this write. That is the job of the **sorter**. For each port it has two 16-word
register parts:

1. During one cell time the first part is filled from the input FIFO, one word
   per clock.
2. On the last clock the whole first part is copied into the second part.
3. During the next cell time the second part is read out in the diagonal order.

The **crossbar** is the barrel shifter. Bank `b` takes lane `(b - p) mod 4`, and
the crossbar appends the row `k` to that lane's block number to form the bank
address.

The output side is the mirror image. In clock `4p + k`, output `o` reads bank
`(o + p) mod 4` at `{block_o, k}`. A reorder register collects the 16 words,
copies them into a second register part, and sends them out in order W0..W15.

## Where a cell lives: blocks and the link memory

The bank address is 12 bits: a 10-bit block number followed by the 2-bit row.
With the default sizes each bank has 4096 words, and the buffer holds 1024
blocks, which is 1024 cells or 64 KiB.

The **memory of addresses** (`address_memory`) has one 10-bit entry per block.
Entry `a` holds the block that follows block `a` in whatever list block `a` is
on. There are five lists:

* the **free list**. Its head, tail and count are registers in the memory
  controller.
* one **output list** per output port. Its head ("first") and last pointers,
  and its length, are in the **first-last** module.

Every block is on exactly one list, or is being written or read. The list
operations are:

* **Reset.** After reset the controller writes `next[a] = a + 1` for every
  block, one entry per clock (1024 clocks at full size). Then it sets head = 0,
  tail = 1023 and count = 1024, and raises `init_done`. No cell is accepted
  before that.
* **Allocate.** Take the free head and follow its link (one read).
* **Append.** Adding a block to the end of output list q takes two writes.
  The first *registers* the block: `next[block] = block`, a link to itself that
  marks the end of a chain. The second links it: `next[last_q] = block`, and
  the block becomes the last pointer. If the list is empty, the second write is
  not needed: the block becomes head and last.
* **Dequeue.** Take the head of list q and follow its link to the new head (one
  read).
* **Free.** Add a block to the end of the free list, like an append.

The link memory has one read port and one write port. Each clock therefore
allows at most one link to be followed and one link to be made.

## The controller's schedule

The memory controller uses a fixed plan inside every cell time, so no two users
ever compete for a port of the link memory:

| slot        | link-memory port | action |
|-------------|------------------|--------|
| 0           | -                | **admission**: input `i` with a whole cell in its FIFO is granted if fewer than `free_count` lower-numbered inputs also ask |
| 0, 2, 4, 6  | read             | allocate a free block for granted input 0, 1, 2, 3 |
| 0 .. 3      | write            | register the block input 0, 1, 2, 3 writes during this cell time (self-link) |
| 1, 3, 5, 7  | read             | dequeue the head of output list 0, 1, 2, 3, if the list is not empty |
| 8 .. 11     | write            | append one reported cell to its output list |
| 12 .. 15    | write            | free the block that output 0, 1, 2, 3 reads during this cell time |

A read returns one clock later, and the returned link becomes the new head of
the free list or of the output list. Appends and dequeues can meet on the same
output list: the dequeue of list 3 returns in slot 8, where an append may also
arrive. The first-last module handles this case. If the list held one cell, the
appended block becomes the head.

At the end of the cell time two things happen. The blocks just allocated become
the crossbar's *write address array* for the next cell time. The blocks just
dequeued become the output path's read addresses for the next cell time.

When the crossbar has written a cell, it reports the cell's block and its
destination port, lane `i` in slot `12 + i`. The reports go through two small
dual-clock FIFOs: one carries the block address, the other the destination
port. They are pushed and popped together. In this top level both of their
sides run on the same clock.

## A cell's journey

| cell time | what happens to a cell that entered input i for output o |
|-----------|----------------------------------------------------------|
| before    | its 16 words collect in input FIFO i |
| T         | slot 0: admitted; the sorter loads it; a free block is allocated for it |
| T+1       | slot i: its block is registered in the link memory; the crossbar writes it diagonally into the block; it is reported in slot 12+i |
| T+2       | slots 8-11: appended to output list o |
| T+3       | slot 2o+1: dequeued, if it is at the head of list o |
| T+4       | read from the banks; its block returns to the free list in slot 12+o |
| T+5       | sent on output o: W0 in slot 1, ..., W15 in slot 0 of T+6 |

With no queueing, a cell therefore takes five cell times plus one clock from
admission to its first output word. Each block stays in use for five cell
times, from allocation to free. Full rate on all four ports therefore needs at
least 20 blocks in the buffer. The reduced-size test uses 32; a buffer of 16
blocks works correctly but cannot keep four ports busy.

If there is no free block when a cell is ready, the cell stays in its input
FIFO. When that FIFO is full, `in_ready` falls. Cells are never dropped inside
the fabric. Cells from one input to one output always leave in the order they
arrived.

## Top-level interface (`shared_memory_switch`)

| port        | dir | width     | meaning |
|-------------|-----|-----------|---------|
| `clk`, `rst_n` | in | 1      | clock; synchronous active-low reset |
| `in_valid`  | in  | [4]       | a word is offered on input i |
| `in_ready`  | out | [4]       | input FIFO i has room; a word is taken when valid and ready |
| `in_data`   | in  | [4] x 32  | input word |
| `in_dest`   | in  | [4] x 2   | destination port, read with the first word of each cell |
| `out_valid` | out | [4]       | output i carries a cell word this clock |
| `out_sop`   | out | [4]       | first word of a cell |
| `out_data`  | out | [4] x 32  | output word |
| `init_done` | out | 1         | free list built; cells are accepted from now on |

Framing is by count: every 16 words accepted on an input form one cell. The
outputs take no back-pressure. A cell, once started, is sent in 16 consecutive
clocks.

Parameters: `N` (ports, 4; the diagonal scheme assumes 16-word cells, so only
4 is meaningful), `BANK_DEPTH_P` (words per bank, 4096, so blocks =
`BANK_DEPTH_P / 4`), `IN_FIFO_DEPTH` (words per input FIFO, 32 = two cells).

## Files

All modules are in `rtl/`, one per file. The package `sms_pkg` holds the shared
constants and types.

| module              | role |
|---------------------|------|
| `shared_memory_switch` | top level: slot counter and wiring of everything below |
| `sync_fifo`         | input FIFO, one per input port |
| `sorter`            | two register parts per port and the diagonal read-out |
| `crossbar`          | barrel shifter into the banks; reports written cells |
| `async_fifo`        | dual-clock FIFO, used twice for the reports (block address, destination) |
| `memory_controller` | free list, admission, allocation, append, dequeue, free |
| `first_last`        | head, last pointer and length of each output list |
| `address_memory`    | link memory, 1024 x 10, one read and one write port |
| `memory_bank`       | one bank, 4096 x 32, one read and one write port (four instances) |
| `output_part`       | diagonal bank reads, reorder registers, serial output |

Both memories are plain arrays with a registered read, so an FPGA tool maps
them to block RAM.

## Simulation

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. For example:

    verilator --binary --timing --assert --timescale 1ns/1ps \
      --top-module tb_shared_memory_switch -y rtl -y tb +libext+.sv -Irtl \
      rtl/sms_pkg.sv tb/tb_shared_memory_switch.sv
    ./obj_dir/Vtb_shared_memory_switch

There are two end-to-end testbenches:

* `tb_shared_memory_switch` runs the switch with 128-word banks (32 blocks),
  so that the buffer can be filled quickly.
* `tb_switch_full` runs it with every parameter at its default (1024 blocks).

Both send three kinds of traffic:

1. permutation traffic at full rate, which checks that every output sends
   back-to-back cells, one per 16 clocks;
2. a hotspot on output 0, which fills the whole buffer and back-pressures the
   inputs;
3. random destinations with idle clocks.

Every output word is checked against data the testbench computes, and cell order
is checked per input-output pair. The testbenches also count each mechanism:

* all four diagonal phases;
* admission held back for lack of free blocks;
* input back-pressure;
* appends to empty and to non-empty lists;
* dequeues;
* several cells waiting for one output;
* blocks returned to an empty free list.

A mechanism that never happened counts as a failure.

`tb_workload_uniform` runs the default-size switch under full offered load:
every input sends back-to-back cells with random destinations. It checks every
word and measures the carried load, which must be at least 0.9 of four words
per clock. At 173.575 MHz, 0.9 of four 32-bit ports is 20 Gbit/s. The measured
value is about 0.96, including the drain at the end. Each block has its own
testbench (`tb_<module>.sv`) that compares the block with a model written
independently of the RTL. Every testbench stops itself with a watchdog.

## Choices and departures

These points are this design's own, or differ from the original description:

* **Output path.** The original only says that cells are read from the banks and
  forwarded to the outputs. `output_part` is built here as the mirror of the
  write path: diagonal reads, then a reorder register.
* **Controller schedule and admission.** The slot plan above, the lowest-port-
  first admission rule and the per-list length counters are additions. The
  original specifies one append plus one free-block fetch per clock, head and
  last pointers per output list, and a free list that is built at start-up.
* **Register access of an append.** The original describes two link-memory
  writes per append: one to register the cell's address, one to link it to the
  previous element. What the first write stores is not spelled out. Here a
  link-memory entry's index *is* the block address, so the first write stores
  the block's own address in its entry, a self-link that marks the end of the
  chain. It is done one cell time before the link write, while the block is on
  no list and the write port is otherwise idle.
* **Read addresses.** In the original block diagram the bank read addresses come
  out of the link memory. Here the memory controller passes the dequeued heads to
  the output path, which addresses the banks.
* **Ports.** The inputs are described as serial. Here each port carries one
  32-bit word per clock, the internal width of the original. The destination
  port is a side-band signal taken with a cell's first word. How the original
  obtained it is not described.
* **Report FIFOs.** The report FIFOs are dual-clock, as named in the original
  block diagram. The original names only one clock, so both sides run on `clk`.
* **Sizes not given in the original.** The input FIFO depth (two cells), the
  report FIFO depth (8), the phase order of the rotation (one bank step every
  four clocks) and the reset style (synchronous, active low) are assumptions.
* **Not modelled.** FPGA timing (the 173.575 MHz result) and resource use are
  not modelled. The RTL only guarantees one word per port per clock.
