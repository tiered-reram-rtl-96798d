# Tiered-ReRAM memory controller in SystemVerilog

Triple-level-cell (TLC) crossbar ReRAM stores three bits per cell, but writing
it is slow and costly. Each cell is programmed by a SET pulse followed by a
series of RESET pulses, each one checked by a verify read. How long this takes
depends on the target state: 14.2 ns for S7 (`111`) but 383 ns for S3 (`011`).
In a long-bitline crossbar, IR drop and sneak currents through half-selected
low-resistance cells make it worse still.

Tiered-ReRAM attacks this with three ideas, all implemented here:

* **Tiered crossbar.** An isolation transistor cuts every bitline into a short
  *near* segment next to the write drivers and sense amplifiers, and a *far*
  segment three times as long (near : far = 1 : 3). Near cells are written
  about 60 % faster and with about 58 % less energy.
* **CIDM (compression-based incomplete data mapping), near segment.** Each
  cache line is compressed with Frequent Pattern Compression (FPC). The space
  this saves lets the line be written with fewer bits per cell, using only
  the fastest states: 2, 4 or 6 of the 8 states instead of all 8.
* **CFS (compression-based flip scheme), far segment.** The saved space holds
  flip flags instead. Groups of cell MSBs are inverted so that most cells
  have MSB 0, which are the high-resistance states S0..S3. This cuts the
  sneak currents that dominate far-segment write energy.

No capacity is lost, because each scheme only spends space that compression
has freed for that line.

## Line format

A 512-bit cache line (eight 64-bit words) lives in a slot of **171 data cells**
plus **4 flag cells** (`tr_pkg::CELLS = 175`). 171 cells hold 513 bits at three
bits per cell, so an incompressible line always fits in plain 3-bit mapping
(CDM).

* The **compressed stream** (`fpc_line_comp`) is built as follows. Word 7 down
  to word 0 are coded by FPC and packed MSB first at the top of a 512-bit
  vector. The `saved` bits left at the bottom are filled with 1s. `saved`
  ranges from 0 to 488 (8 x 61).
* The **slot** is `{stream, 1'b1}`, 513 bits. Data cell *i* covers slot bits
  `[3i+2:3i]`, so cell 170 holds the top of the stream.
* The **flag cells** 171..174 hold 12 bits, three per cell, in CDM:
  `{1'b1, scheme[2:0], comp_flags[7:0]}`. `comp_flags[w]` says word *w*
  carries an FPC prefix. `scheme` is `{0, IDM flag}` in the near segment and
  the 3-bit 0-DFS flag in the far segment.

### FPC (`fpc_word_comp`, `fpc_word_decomp`)

| prefix | pattern | code size |
|---|---|---|
| 000 | zero word | 3 |
| 001 | 8-bit value, sign-extended | 11 |
| 010 | 16-bit value, sign-extended | 19 |
| 011 | 32-bit value, sign-extended | 35 |
| 100 | upper 32 bits, lower 32 bits zero | 35 |
| 101 | two 32-bit halves, each a sign-extended 16-bit value | 35 |
| 110 | one 16-bit value repeated four times | 19 |

The shortest matching code wins, and ties go to the lower prefix. A word that
matches nothing is stored raw in 64 bits. Its compression flag is 0, so it
costs no prefix. Pattern 101 follows the worked example
`0xFFFFBEEF00003CAB -> 0x5BEEF3CAB`: each half is a sign-extended 16-bit
value, not an 8-bit one.

## CIDM: trading saved space for fast states (`cidm_encoder`, `cidm_decoder`)

The saved space picks the mapping:

| saved bits | mapping | flag | bits used | states |
|---|---|---|---|---|
| 341..488 | IDM((8,2),1): 1 bit per cell | 11 | stream[511:341] | S7, S6 |
| 170..340 | IDM((8,4),1): 2 bits per cell | 10 | stream[511:170] | S7, S6, S5, S0 |
| 85..169 | IDM((8,6),2): 5 bits per cell pair | 01 | stream[511:85] | S7, S6, S5, S0, S1, S4 |
| 0..84 | CDM: 3 bits per cell | 00 | whole slot | all |

Each threshold is exactly what fills the 171 cells. For example, 512 − 341 =
171 bits at one bit per cell. IDM((8,6),2) uses 85 cell pairs for 425 bits,
and cell 0 takes the last 2 bits.

**State order.** The states used are the fastest ones, sorted by
program-and-verify latency: S7 14.2 ns, S6 95.4, S5 192, S0 255.2, S1 286.8,
S4 290. A group of data bits `b` is written as the state at index `~b` in that
order. For the 1- and 2-bit mappings this reproduces the published examples
exactly:

* For 2 bits, `11→S7`, `10→S6`, `01→S5` and `00→S0`. The data
  `111 110 101 100 011 010 001 000` becomes
  `S7 S7 S6 S6 S7 S0 S5 S6 S6 S0 S6 S0`, which costs 197.5 pJ, with the
  worst cell at 255.2 ns.
* For 1 bit, `1→S7` and `0→S6`. The same data costs 182.4 pJ, worst cell
  95.4 ns.

Free space (all 1s) always lands in S7, the cheapest state.

For IDM((8,6),2) this design takes `u = ~b` (0..31). It writes
`idm_state(u % 6)` into the lower cell of the pair and `idm_state(u / 6)` into
the upper cell. This pair mapping is this design's own choice.

## CFS: flip flags in the freed space (`cfs_encoder`, `cfs_decoder`)

| saved bits | 0-DFS word size *W* | flag |
|---|---|---|
| 74..488 | 2 | 000 |
| 40..73 | 4 | 001 |
| 21..39 | 8 | 010 |
| 11..20 | 16 | 011 |
| 0..10 | none | 100 |

A cell is *occupied* when its MSB lies in compressed data, that is
`3i + 1 >= saved`. The MSBs of the occupied cells are cut into groups of *W*,
counted from cell 170 down; the last group may be short. A group with more 1s
than 0s is inverted.

The flag of group *g* goes into slot bit *g*, at the very bottom of the free
space. The thresholds guarantee there is room. For example, at saved = 74
with *W* = 2, the line has 146 occupied cells, which need 73 flags.

The decoder does not need the compressed length. It inverts every cell whose
group flag bit is 1. Groups that hold data always have genuine flags. Any
other "flags" only disturb free space, and FPC decompression never reads free
space.

The flip rule (majority of 1s), the group order and the flag placement are
this design's choices. The selection table is the published one.

**Observation.** With 64-bit FPC words, a line's saved space is a sum of 61,
53, 45 and 29. The range 11..20 therefore never occurs, so the 16-bit 0-DFS
is unreachable for real lines. It is built anyway and tested with synthetic
streams.

## Tiered crossbar and timing

`tiered_crossbar` stores `LINES` line slots of 175 3-bit cell states.
Addresses below `LINES/4` are near-segment lines. `iso_on` is the
isolation-transistor control: it is on for a far access and off for a near
one. The analog array itself is not modelled; its behaviour enters only
through the timing tables below.

`write_controller` programs a line and holds the array for:

    WR = ceil((tRCD + tCWD + worst_state_latency) / tCK)

* tRCD = 18 ns and tCWD = 13 ns.
* tCK = 1.5 ns, the DDR3-1333 clock.
* The worst state latency is the latency of the slowest state among the 175
  cells, so all cells are taken as programmed in parallel.

The energy it reports is the sum of the per-state energies of all 175 cells.
Far-segment values come from the published per-state table.

Near-segment values are this table scaled by 0.40 (latency) and 0.42 (energy).
Only these average reductions are published; the real near curve differs
from state to state. For example, a line holding S3 takes 123 cycles in the
near segment and 276 cycles in the far segment. After every write,
`wtr_block` enforces tWTR = 7.5 ns (5 cycles) before the next read.

The controller also reports `msb1_cells`, the number of cells left in a
low-resistance state (MSB 1). The energy table does not capture what CFS
saves, so this count is the measure of it. In the end-to-end test, far-segment
lines have about 22 % fewer such cells than plain CDM would leave, and
near-segment writes average 115 cycles against 276 in the far segment.

`read_controller` returns a line's cells `ceil((tRCD + tCL)/tCK)` = 22 cycles
after accepting the read.

## Controller (`tiered_reram_top`)

```
host wr_* -> write_buffer -> encoder_module (FPC -> CIDM | CFS) -> write_controller -> tiered_crossbar
host rd_* ----------------------------------------------------------> read_controller  -> tiered_crossbar
tiered_crossbar -> read_controller -> decoder_module (CIDM | CFS -> FPC) -> read_buffer -> host rsp_*
```

The encoder and decoder are combinational. The write controller registers the
encoded image, and the array is written in the next cycle.

The published architecture gives the blocks but not how they are scheduled.
The scheduling here is this design's:

* The array performs one access at a time.
* Reads go ahead of queued writes. The exception is a full write buffer
  (8 entries), which is drained first.
* A read waits while its address is still in the write buffer, so it never
  returns stale data.
* A read that is waiting only for tWTR or for the array keeps new writes from
  starting.
* A read starts only when the read buffer (8 entries) has room for its result,
  counting the read already in flight.

Status outputs let a testbench or a performance counter see each event:

* `wr_start` comes with the line's segment, IDM flag, 0-DFS flag and saved
  space.
* `wr_done` comes with the write's latency in cycles, its energy in fJ and
  its MSB-1 cell count.
* The `ev_*` pulses mark the stalls: write buffer full, read held by a queued
  write, read held by tWTR, read held by a full read buffer, and a forced
  drain.

## Files

| file | content |
|---|---|
| `rtl/tr_pkg.sv` | sizes, types, selection tables, state order, latency/energy tables, timing |
| `rtl/fpc_word_comp.sv`, `rtl/fpc_word_decomp.sv` | FPC of one word |
| `rtl/fpc_line_comp.sv`, `rtl/fpc_line_decomp.sv` | line compression and decompression |
| `rtl/cidm_encoder.sv`, `rtl/cidm_decoder.sv` | near-segment IDM mappings |
| `rtl/cfs_encoder.sv`, `rtl/cfs_decoder.sv` | far-segment 0-DFS flip scheme |
| `rtl/encoder_module.sv`, `rtl/decoder_module.sv` | complete write and read data paths, flag cells |
| `rtl/write_buffer.sv`, `rtl/read_buffer.sv` | request and response queues |
| `rtl/write_controller.sv`, `rtl/read_controller.sv` | array timing |
| `rtl/tiered_crossbar.sv` | cell storage, segment decode, isolation transistor |
| `rtl/tiered_reram_top.sv` | the controller |
| `tb/tr_ref_pkg.sv` | independent reference models and random line generator |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
to build and run the end-to-end test with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal rtl/tr_pkg.sv tb/tr_ref_pkg.sv \
    -y rtl -y tb tb/tb_tiered_reram_top.sv --top-module tb_tiered_reram_top
./obj_dir/Vtb_tiered_reram_top
```

Replace the top module to run any other testbench.

`tb_tiered_reram_top` runs the top at its default parameters: 1024 lines and
8-entry buffers. It checks every read against a memory model, and every
write's flags, latency and energy against the reference encoder. It fails if
any of the design's mechanisms never happened during the run:

* near and far writes;
* all four IDMs;
* 0-DFS with *W* = 2, 4 and 8, and with no flipping;
* the isolation transistor;
* each stall;
* a forced drain of the write buffer.

The block testbenches also check these:

* the published FPC examples;
* the published IDM examples, down to their energies;
* the 22-cycle read and per-line write latencies;
* every selection threshold.

## Where this design departs from, or goes beyond, the published design

* **Capacity.** The evaluated memory is 8 GB (4 channels × 2 ranks ×
  32 banks × 1024 crossbar arrays). The model holds one 1024-line slice
  (64 KiB), so the SPEC CPU2006 workloads used in the evaluation cannot be
  held or replayed here. `LINES` can be raised.
* **Hot/cold placement.** Hot data is meant to be remapped into near
  segments, but how is not described. Here the address decides the segment,
  so placement is up to whoever assigns addresses.
* **Near-segment timing.** This uses uniform average reductions, not a
  per-state characterisation.
* **Own choices.** The following are this design's own: the IDM((8,6),2)
  pair mapping, the CFS flip rule and flag layout, the flag-cell packing, the
  filling of free space with 1s, the buffer depths, the scheduling and tCK.
* **Not modelled.** tFAW, write energy of cells that already hold their
  target value (all cells are counted as written), and the analog behaviour
  of the array.
