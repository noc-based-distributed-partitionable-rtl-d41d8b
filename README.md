# DiMArch: a distributed, partitionable memory for a coarse-grain reconfigurable array

A coarse-grain reconfigurable array (CGRA) of datapath units, small register files and
sequencers needs more storage than its 64-word register files, and it needs that storage to
be as parallel as its computation. This design spreads the memory over a grid of **memory
tiles** placed beside the array, one column of tiles per column of the array. Each tile holds
one SRAM bank with its own address generator. Two networks join the tiles:

* **dNoC**, a circuit-switched, half-duplex mesh of 256-bit links. It carries data between
  the banks and the register files. At 250 MHz one link moves 8 GB/s.
* **iNoC**, a bus/network hybrid that carries short programming messages from the sequencers
  to the tiles. Its bus segments can be split and joined at run time. This is what
  partitions the memory.

A sequencer joins bus segments to claim a group of tiles: a *memory partition*. It then
programs the tiles' controllers to stream data to and from its register file. A memory
partition together with the computation it serves is a *private execution environment*.
Several of these run in parallel on split segments. Repartitioning costs a few messages,
so the ratio of memory to computation can change while the system runs.

There are no memory locks or arbiters anywhere. All timing is decided when the program is
compiled: which tile drives which link in which cycle, and when each bank reads or writes.
The hardware only carries out those schedules. Assertions in the RTL catch the two ways a
bad schedule breaks the rules:

* two messages on one horizontal bus segment in the same cycle;
* a dNoC link driven from both ends at once.

```
          seq 0        seq 1        seq 2         (sequencers of the array)
            |            |            |
  row 0  [tile 0,0]---[tile 1,0]---[tile 2,0]     each tile: mBank + mFSM
            |            |            |                      dSwitch + cFSM
  row 1  [tile 0,1]---[tile 1,1]---[tile 2,1]                iSwitch + zFSM
            |            |            |                      2 splitters
  row 2  [tile 0,2]---[tile 1,2]---[tile 2,2]
   dNoC South ports of row 0 = RFMI links to register files 0..2
```

`x` grows eastward and `y` grows away from the array. Row 0 is next to both the sequencers
and the register files. The default grid is 3 x 3.

## Files

| file | what it is |
|---|---|
| `rtl/dimarch_pkg.sv` | shared types: directions, dCell/dSwitch configuration, instruction message, mFSM and cFSM records, opcodes |
| `rtl/dimarch.sv` | top: the grid, dNoC mesh wiring, iNoC bus wiring, half-duplex assertions |
| `rtl/mtile.sv` | one tile |
| `rtl/mbank.sv` | SRAM bank (64 x 256 bit = 2 KB), single port, one-cycle read |
| `rtl/mfsm.sv` | bank controller: address generator plus the three-delay timing model |
| `rtl/dswitch.sv`, `rtl/dcell.sv` | dNoC node and one of its five direction cells |
| `rtl/cfsm.sv` | schedule of dSwitch configurations |
| `rtl/iswitch.sv`, `rtl/splitter.sv`, `rtl/zfsm.sv` | iNoC node, bus splitter, instruction decoder |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fft_reorder.sv`, `tb/tb_mm_store.sv` | workload tests of the whole system (below) |
| `tb/dimarch_tb_pkg.sv` | helpers that build messages and routes |

## The instruction network and partitioning

This is the least conventional part of the design.

**Broadcast in two steps.** Sequencer `x` drives the vertical bus of column `x` at row 0.
In the same cycle, the message reaches every row that closed splitters join to row 0. The
iSwitch in the row named by the message registers it. In the next cycle that iSwitch
broadcasts it on its row's horizontal bus, east and west, as far as closed splitters reach.
The iSwitch whose `(x,y)` matches registers the message for its zFSM. In the third cycle
the zFSM decodes the message, and the target register changes at the end of that cycle.
This can be a splitter, an mFSM or a cFSM.

```
cycle t    : message on seq_i[x]; vertical broadcast; row match -> registered
cycle t+1  : horizontal broadcast; tile match -> registered
cycle t+2  : zFSM decodes; splitter / mFSM / cFSM register updates at the edge
cycle t+3  : new splitter state visible; a started mFSM/cFSM is running
```

Any reachable tile therefore gets a message two cycles after it is sent. A splitter takes
three cycles to change (identification, decoding, set). A sequencer can send one message
per cycle, and the messages are pipelined. A message that must cross a splitter can only be
sent once that splitter is closed, three cycles after the message that closed it.

**Splitters.** Every splitter is open after reset, so at first sequencer `x` reaches only
tile `(x,0)`. Each tile owns two splitters:

* the vertical splitter below it, between `(x,y)` and `(x,y+1)`;
* the horizontal splitter west of it, between `(x-1,y)` and `(x,y)`.

An `OP_VSPLIT` or `OP_HSPLIT` message to the tile toggles the matching splitter. Closed,
a splitter joins the two segments combinationally. A message from an unreachable
sequencer, or for a row its column cannot reach, is dropped without notice.

**Example** (the testbench `tb_dimarch` runs it):

1. Sequencers 1 and 2 both send `OP_VSPLIT` to `(1,0)` and `(2,0)` in the same cycle.
   Columns 1 and 2 now reach row 1.
2. Sequencer 1 closes the splitter below `(1,1)`.
3. Sequencer 1 tells `(1,2)` to close its horizontal splitter. Tile `(0,2)` is now part of
   sequencer 1's partition: a message from sequencer 1 to `(0,2)` goes down column 1 to
   row 2, then west.
4. Sequencer 0 still reaches only `(0,0)`. Its message to `(0,1)` is lost.

Two partitions can share a tile by making it reachable from both. The compiler must then
keep their messages apart in time.

## The data network

A **dSwitch** has five cells: MBank, South, West, East, North. Each cell has a
half-duplex port.

* In **input mode**, the word arriving on the port goes onto the cell's internal line.
* In **output mode**, the cell's IMUX takes the line of one of the other four cells
  (`isel`). That word either goes through a register or bypasses it (`psel`), and then
  drives the port (`iosel`).

A circuit through a node is one input-mode cell plus an output-mode cell that selects it.
Several output cells may select the same input, which gives multicast.

`isel` counts the other four directions in the order M, S, W, E, N, skipping the cell's
own direction. For example, for the North cell `isel = 1` means South. The `route()`
function in `tb/dimarch_tb_pkg.sv` computes this.

**Programmable pipelining.**

* A pipelined cell adds one cycle.
* A bypassed cell adds none. A word can then cross several tiles in one cycle: a *single
  cycle multi-hop transfer*.

Each hop can be chosen separately. This trades clock rate against hop latency: more
bypassed hops in a row make a longer combinational path. The compiler must never program
a ring of bypassed output cells. Because the mesh can be bypassed, it contains structural
combinational loops, and lint and synthesis tools report them. A valid configuration
never closes one.

Each word carries a valid bit. Words from a cell in input mode, or from a silent link,
are invalid.

The tri-state pins of the original cell drawing are modelled as `out`, `oe` and `in`
signals. The top asserts that no link is driven from both ends. The South port of tile
`(x,0)` is register file `x`'s interface:

* `rf_i_*` is what the register file sends into the dNoC;
* `rf_o_*` and `rf_oe` are what the dNoC sends back.

## Streams: the mFSM and the cFSM

**mFSM** (one per bank) runs a program:

* `OP_MFSM_ADDR` sets the mode, the direction (read or write), the base, the stride and
  `len`;
* `OP_MFSM_START` sets count, iterations (0 = endless) and three delays, and starts the
  program.

| mode | address of access `i` in a loop |
|---|---|
| `AGU_LINEAR` | `base + i*stride`. Restarts every loop. `count = 1` is a single access |
| `AGU_CIRC` | `base + p`. `p` steps by `stride` modulo `len` and is kept from loop to loop |
| `AGU_BITREV` | `base + bitreverse_len(i)`, the low `len` bits of `i` reversed |

Addresses wrap at the bank size.

Timing, with the start message sent in cycle `t` (its zFSM strobe is sampled at the end of
`t+2`):

* The first access is in cycle `t + 3 + init_dly`.
* Accesses within a loop are `mid_dly + 1` cycles apart.
* The last access of a loop and the first of the next are `end_dly + 1` cycles apart.
* The initial delay is used only once.
* A read puts its word on the dSwitch MBank port one cycle after the access.
* A write stores the word that the MBank cell delivers in the access cycle. It is skipped
  if that word is invalid.

`OP_MFSM_DLY` changes the delays while the program runs. A wait that is already counting
finishes with its old value. This is how a stream is made elastic: a sequencer can slow
it down or speed it up according to intermediate results.

**cFSM** (one per dSwitch) holds four configuration slots, each with a hold time.

* `OP_CFSM_SLOT` writes one slot.
* `OP_CFSM_START` sets how many slots are used, an initial delay and a number of rounds
  (0 = endless), and starts the schedule.
* A static circuit is one slot with 0 rounds.
* When no schedule runs, every cell is in input mode and the switch drives nothing.
* `OP_STOP` stops the mFSM (payload bit 0) and/or the cFSM (bit 1).

**Contiguous memory from several banks.** The register file should see one long stream
even though it comes from several banks. This takes the cFSM schedules and the mFSM
programs of the banks together, set so the banks take turns on the shared path. The
`tb_dimarch` case works like this:

* Column 1 reads words 0-3 from bank `(1,2)`, then words 4-7 from bank `(1,1)`.
* The cFSM of `(1,1)` gives its South output to the North input for 4 cycles, then to its
  own bank for 4 cycles.
* Bank `(1,2)` starts reading at `A = t2+7`. The `(1,1)` schedule starts at `A+1`, and
  bank `(1,1)` starts at `A+4`. Each time comes from its start message's send cycle plus
  its initial delay, using the formula above.
* Tile `(1,0)` forwards through its pipeline register, so the register file receives
  words 0..7 in the 8 cycles from `A+2`.

## Instruction message

`imsg_t` (61 bits) has these fields:

| field | bits | meaning |
|---|---|---|
| `vld` | 1 | message valid |
| `x` | 4 | destination column |
| `y` | 4 | destination row |
| `op` | 4 | opcode |
| `pay` | 48 | payload |

The payload holds one packed record, right-aligned:

| opcode | payload |
|---|---|
| `OP_VSPLIT`, `OP_HSPLIT` | none; toggles the splitter |
| `OP_MFSM_ADDR` | `mfsm_addr_t`: mode 2, wr 1, base 6, stride 6, len 8 |
| `OP_MFSM_START` | `mfsm_loop_t`: count 8, iters 8, init/mid/end delay 8 each |
| `OP_MFSM_DLY` | `delays_t`: init/mid/end delay 8 each |
| `OP_CFSM_SLOT` | `cfsm_slot_t`: slot 2, dSwitch configuration 20, hold 8 |
| `OP_CFSM_START` | `cfsm_loop_t`: nslots 3, init delay 8, rounds 8 |
| `OP_STOP` | bit 0 stops the mFSM, bit 1 stops the cFSM |

## Parameters

| parameter | default | meaning |
|---|---|---|
| `COLS`, `ROWS` (`dimarch`) | 3, 3 | tile grid: the 3 x 3 configuration of the architecture's partitioning and pipelining examples |
| `W` | 256 | dNoC width, also the bank word width |
| `DEPTH` | 64 | bank words. 64 x 32 B = 2 KB; banks are meant to be 2-4 KB, so 128 is also in range |
| `CF_SLOTS` (package) | 4 | cFSM slots |
| `XY_W` (package) | 4 | coordinate width, up to 16 x 16 tiles |

## What follows the architecture and what is this design's own

These parts follow the architecture:

* tile contents;
* the 256-bit half-duplex circuit-switched mesh;
* the five-cell dSwitch with IMUX/REG/PMUX and pipelined or bypassed hops;
* the mFSM addressing modes and three-delay timing model, with run-time delay changes;
* the cFSM's role of time-multiplexing banks into one contiguous memory;
* the two-step bus broadcast of the iNoC, with toggled splitters that are open at reset;
* partitioning by closing splitters;
* three cycles to set a splitter.

These are this design's own choices:

* all encodings: the message format, opcodes, payload records and `isel` order;
* bank word width = dNoC width, a single-ported bank, one-cycle read;
* the valid bit on dNoC words;
* the exact address formulas;
* the intermittent delay applies *between* accesses. Descriptions of the timing model
  differ on this point; this design follows the "between successive accesses" reading;
* the slot-table form of the cFSM;
* which splitters a tile owns;
* the priority when two messages meet on a horizontal segment, which a correct program
  never causes;
* synchronous active-high reset, with contents of the banks not reset.

These are not included:

* the reconfigurable array itself: datapath units, register files, sequencers and their
  switch box. The design brings out their connections as the top's ports;
* power-down of unused banks;
* clock or voltage scaling;
* chained elastic streams, which the architecture itself leaves for later.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. A watchdog ends the simulation if
it hangs. To run the full-system test at default size:

```
verilator --binary --timing --assert -Wno-fatal -Wno-UNOPTFLAT \
  rtl/dimarch_pkg.sv tb/dimarch_tb_pkg.sv rtl/*.sv tb/tb_dimarch.sv \
  --top-module tb_dimarch -o tb && ./obj_dir/tb
```

For a single block, list the package, the block's file, any modules it instantiates, and
`tb/tb_<block>.sv`, with `--top-module tb_<block>`.

`tb_dimarch` runs at the default parameters. It counts each mechanism and fails if any
never happens:

* vertical and horizontal splitter closing;
* partition privacy;
* pipelined hop, bypassed hop and multicast;
* cFSM time-multiplexing;
* mFSM write and read streams;
* a delay change during a stream.

It also checks the cycle counts of the message pipeline and of each stream. The block
testbenches compare every output with a reference model, cycle by cycle, over random
programs. This includes the exact cycle of every bank access in all three addressing
modes.

## Capacity and the published workloads

With the defaults, the memory holds 9 x 2 KB = 18 KB:

* A 4096-point complex FFT at 2 x 16 bit per sample needs 16 KB, so every FFT size from
  64 to 4096 points fits. Twiddle factors are kept in the register files.
* The 64 x 1 by 1 x 64 matrix product needs about 8.3 KB of 16-bit data and also fits.

The cycle counts of those workloads depend on the datapath units and sequencers, which are
outside this RTL, so it cannot reproduce them. What it does reproduce are the memory-side
mechanisms those mappings use. Two testbenches run that memory-side part on the full
system at default size:

* `tb_fft_reorder` handles the reordering between FFT stages. A register file writes a
  block of 64, 128, 256 or 512 points (8 to 64 words, one bank) into a bank in natural
  order. It then reads the block back in bit-reversed word order, one word per cycle. The
  reordering is done on whole words; reordering the 8 samples inside a word is left to
  the register file. Larger FFTs would need a partition of several banks, as in
  `tb_mm_store`.
* `tb_mm_store` handles the 64 x 64 product. Three register files store the 256 result
  words in parallel, each into a private two-bank partition (96 words, written 64 then
  32 under cFSM time-multiplexing). They then read the words back. Every word must
  arrive in order at its predicted cycle in all three columns.

The architecture reports gate-level timing of up to 400 MHz in a 90 nm process. This RTL
has not been synthesised for timing. Its critical path grows with the number of
consecutive bypassed hops.
