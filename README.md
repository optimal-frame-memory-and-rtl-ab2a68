# Alpha-plane transfer and frame memory for an MPEG-4 binary shape encoder

MPEG-4 shape coding works on binary alpha blocks (BABs): 16 x 16 one-bit
pixels that mark which parts of a video object plane (VOP) belong to the
object. Most BABs are entirely transparent or entirely opaque. Only the
*boundary* BABs, which the object's outline crosses, carry real detail. This
RTL uses that fact in two places:

1. **Moving BABs over a shared bus.** Each BAB is sent row by row as
   run-length tuples. A row is one 16-bit word. The run length (1 to 16
   identical rows) goes in the *address* of the bus write, not the data, so a
   tuple costs exactly one transfer. A transparent or opaque BAB is one
   transfer instead of sixteen. No BAB ever takes more than sixteen. The
   receiver learns the BAB's class from the tuples themselves, so mode
   decision (transparent / opaque / boundary) needs no extra work.
2. **Storing the alpha plane compressed.** An index table holds one small
   entry per BAB. Only boundary BABs are written to the alpha frame memory,
   each in a 16-word *tile*. A VOP may have at most half boundary BABs, so the
   frame memory can be half the size of a full alpha plane. Non-boundary BABs
   are served from the index table alone. The memory has four banks, and
   neighbouring BABs always sit in different banks. A motion-estimation
   reference row of 31 pixels can straddle three BABs, and it is still read in
   one cycle.

The default configuration supports the largest MPEG-4 VOP, 1920 x 1088 pixels
(120 x 68 BABs). At that size the index table is 8160 entries of 13 bits, and
the frame memory is 4 banks of 16320 x 16 bits.

## Block overview

```
 BAB source ─► rlc_tx ══ shared bus (shape_bus_if) ══► rlc_rx ─► alpha_frame_buffer
               (RLC,       data = run, addr = base      │  (mode_decision)   │ index_table
                length in  + 0x100 + length             │                    │ tile_addr_gen x2
                address)                                 ▼                    │ alpha_frame_memory
                                              cur_* (BAB, class, bab_type)    ▼  (4 x alpha_bank)
                                                                      rd_* BAB reads, win_* window rows
```

| File | Role |
|---|---|
| `rtl/shape_pkg.sv` | BAB types, class enum, memory map, sizing functions |
| `rtl/shape_bus_if.sv` | valid/ready bus write channel with a hold-until-ready assertion |
| `rtl/rlc_tx.sv` | run-length transmitter (bus master) |
| `rtl/rlc_rx.sv` | bus slave: decodes the length from the address and rebuilds BABs |
| `rtl/mode_decision.sv` | class and bab_type of a BAB from its tuples |
| `rtl/index_table.sv` | per-BAB entries {class, tile index} |
| `rtl/tile_addr_gen.sv` | address generator: tile and row to bank and word, lane-to-bank routing |
| `rtl/alpha_bank.sv`, `rtl/alpha_frame_memory.sv` | four single-port 16-bit banks |
| `rtl/alpha_frame_buffer.sv` | controller: tile allocation, BAB write/read, cross-BAB window read |
| `rtl/shape_frame_top.sv` | the whole path |

The coding engines that consume these data are not part of this RTL: binary
motion estimation, size conversion, context-based arithmetic coding and
variable-length coding. Their connections are ports of the top:

* `cur_*` gives each BAB as it is stored, with its class and coding mode.
* `rd_*` reads a stored BAB.
* `win_*` reads reference rows for motion estimation.

## The run-length transfer

Row packing: row *r* of a BAB is word *r*. The leftmost pixel is bit 15, and
opaque is 1. A tuple is (run, length), where run is a row value and length is
the number of consecutive rows equal to it. For example, a BAB whose first two
rows have two transparent pixels on the left, and whose third row has three,
starts with the tuples (0x3FFF, 2) and (0x1FFF, 1).

The bus slave occupies a 1 KiB slot at `SLAVE_BASE` (default `0x4000_0000`):

| Offset | Write means |
|---|---|
| `0x000` | VOP start; `wdata = {height, width}` in BABs. Resets the BAB index. |
| `0x100 + L`, L = 1..16 | The next L rows of the current BAB equal `wdata`. |
| anything else | ignored |

`rlc_tx` finds the run length of the current row with a combinational
priority compare over the rows below it. It therefore sends one tuple per
cycle, and a BAB takes exactly as many cycles as it has tuples. With
`rlc_en = 0` it sends every row with length 1. This is the plain transfer the
scheme is measured against, and the receiver handles it too.

`rlc_rx` writes all L rows of a tuple into its current-BAB buffer in one
cycle. When row 16 is filled, it hands the BAB on with its raster BAB index
(0, 1, 2, ... since the last VOP start). While that BAB waits for the
consumer, `rlc_rx` stalls the bus by holding `ready` low. A run that would go
past row 16 is cut there and sets `err_overrun`.

`mode_decision` keeps two flags per BAB: "every run so far was 0x0000" and
"every run so far was 0xFFFF". For run-length coded input this is the same as
the rule "a single tuple (0x0000, 16) or (0xFFFF, 16) is a non-boundary BAB".
It also gives the right class for a BAB sent row by row. It reports
`bab_type` 2 (transparent) or 3 (opaque). These are the MPEG-4 coding modes
that need no further coding.

## The compressed alpha frame buffer

This is the least obvious part of the design.

**Index table entry** (`1 + ceil(log2(P*Q/2))` bits; 13 bits at 120 x 68):

| BAB | Entry |
|---|---|
| boundary | `1`, tile index |
| opaque | `0`, `0`, zeros |
| transparent | `0`, `1`, zeros |

**Tile allocation.** At a VOP start the next free tile is reset to 0. Each
boundary BAB that is written takes the next tile. BABs arrive in raster
order, so tile indices rise with BAB index and never exceed it. Each
boundary BAB has one tile, and at most half the BABs need one. If more than
half are boundary BABs, the extra BABs are dropped and the `overflow` flag is
set until the next VOP start. `tiles_used` tells how many tiles are taken.

**Address generation.** The bank is `tile[1:0]` and the word is
`{tile >> 2, row}`, i.e. `(tile >> 2) * 16 + row`. With four banks this is
pure bit selection. That is why the design uses four banks, although three
are enough for a 16-PE motion estimator. `tile_addr_gen` applies the mapping
to several lanes at once and routes each lane's address to its bank. It flags
two lanes that hit the same bank. The buffer asserts that this never happens.

**Operations.** Requests are valid/ready. One operation runs at a time, and a
write is served before a BAB read, which is served before a window read.

| Operation | What happens | Cycles |
|---|---|---|
| write, non-boundary BAB | index entry only | 1 |
| write, boundary BAB | index entry plus row 0 in the first cycle, rows 1-15 after | 16 |
| read BAB | index entry read; `rd_cls_valid` 1 cycle after the request; for a boundary BAB, rows on `rd_row_valid` 2 to 17 cycles after it | 2 or 17 |
| window | index lookups for the 3 BABs under the row (1 per cycle, 4 cycles), then one row per cycle; the lookup repeats when the rows enter the next BAB row | 4 + rows (+4 per BAB row crossed) |

**Why a window row costs one cycle.** A window row is the 31 pixels
x..x+30 (16 + N_PE - 1 with N_PE = 16) of row y. They lie in at most three
horizontally adjacent BABs. The boundary BABs among them were allocated
consecutive tiles, so they sit in different banks. All three are read in the
same cycle. A transparent lane supplies 0x0000 and an opaque lane 0xFFFF,
without a memory access. Lanes right of or below the VOP read as transparent.
The three words are concatenated and shifted by `x mod 16`, and the top 31
bits are the row, with pixel x in the MSB. No search-range buffer is needed.

**Memory traffic.** `idx_accesses` and `mem_accesses` count index-table and
bank accesses. Reading a non-boundary BAB costs 1 access and a boundary BAB
17, against 16 for either in an uncompressed plane. The relative traffic is
therefore 17/16 - P_NB, where P_NB is the fraction of non-boundary BABs. At
the worst legal case, P_NB = 0.5, that is 56.25 %.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `P_MAX`, `Q_MAX` | 120, 68 | largest VOP in BABs (1920 x 1088 pixels) |
| `N_PE` | 16 | motion-estimation PEs; window width is 16 + N_PE - 1 |
| `NUM_BANKS` | 4 | banks, a power of two, at least the banks a window row needs |
| `SLAVE_BASE` | `0x4000_0000` | bus slot of the receiver |

All widths are derived from these: BAB index, tile index, bank address and
window coordinates. For a QCIF-only system, `P_MAX = 11, Q_MAX = 9` gives 99
index entries of 7 bits and 49 tiles.

## Where this RTL departs from, or adds to, the scheme

* The bus is a generic valid/ready write channel, not a particular on-chip
  bus. The scheme needs only a data bus and a decoded address. An AHB-style
  bus needs an address/data-phase adapter.
* The VOP-start control write, the choice of 0x100 as the base of the length
  region, the overrun flag and the overflow behaviour are this design's.
* A single alpha plane is stored. The stored BAB also serves as the
  reconstructed BAB, which is right for lossless shape coding (no size
  conversion). A separate reference plane or reconstructed-BAB path is not
  built.
* Tile allocation assumes BABs are written in raster order within a VOP.
  Rewriting a BAB takes a new tile, and the old tile is not reclaimed until
  the next VOP start.
* The index table is one flat table. Splitting it into segments with shorter
  entries for low BAB indices is possible, since a tile index never exceeds
  its BAB index, but this is not done.
* The transmitter is a hardware block here. In a system the sender might be a
  CPU or DMA engine running the same encoding.

## Verification

Every module has a self-checking testbench in `tb/`. Reference values come
from `tb/shape_tb_pkg.sv`: an ellipse-with-a-hole pixel model, BAB
extraction, class and tuple count, all computed without the design.

| Testbench | Covers |
|---|---|
| `tb_mode_decision` | class and bab_type for RLC and row-by-row tuples |
| `tb_rlc_tx` | addresses, rebuilt rows, tuple count, one cycle per tuple, raw mode, bus back-pressure |
| `tb_rlc_rx` | rebuilt BABs, class, BAB index, VOP start, bus stall, ignored addresses, overrun |
| `tb_index_table` | entry encoding at full size (13 bits), random writes and reads |
| `tb_tile_addr_gen` | all 4080 tiles, random lanes, conflict detection, consecutive tiles never conflict |
| `tb_alpha_frame_memory` | parallel random access to all banks over the full depth |
| `tb_alpha_frame_buffer` | write and read timing, access counts, windows vs pixel model, overflow, VOP size change |
| `tb_shape_frame_top` | end to end at CIF size (22 x 18 BABs); see below |
| `tb_shape_frame_full` | end to end at the default 120 x 68 size, no parameter changed |
| `tb_shape_workloads` | QCIF, CIF and 1920 x 1088 frame sequences with a changing VOP size; transfer counts and memory reference counts per frame |

`tb_shape_frame_top` requires each mechanism to occur at least once:

* single-transfer non-boundary BABs
* merged runs in boundary BABs
* bus stalls
* plain (non-RLC) transfer
* VOP size changes
* tile overflow
* windows crossing BAB columns and BAB rows

It also prints the transfer time ratio, meaning bus transfers against 16 per
BAB. On the synthetic ellipse this is about 10.8 % for a CIF VOP and 7.2 % for
a 1920 x 1088 VOP. A random-content VOP gives about 22 %. Plain transfer is
exactly 100 %.

`tb_shape_workloads` runs frame sequences at the default parameters. The
object is a body with a moving head. It grows from half the frame to about
nine tenths, so the VOP size changes on every frame. Every frame is stored
and then read back in full. Per frame the testbench checks three things:

* bus transfers equal the sum of the row-run counts of the BABs
* tiles used equal the number of boundary BABs
* the read-back makes one index access per BAB and 16 memory accesses per
  boundary BAB, which is exactly 17/16 - P_NB of plain storage (P_NB is the
  share of non-boundary BABs)

| Sequence | Frames | BABs | Boundary | Transfer time ratio | Memory reference ratio |
|---|---|---|---|---|---|
| QCIF 176 x 144 | 10 | 561 | 251 | 19.63 % | 50.99 % |
| CIF 352 x 288 | 10 | 2085 | 540 | 13.37 % | 32.14 % |
| 1920 x 1088 | 2 | 8736 | 492 | 7.64 % | 11.88 % |

Small frames do worse because a larger share of their BABs lie on the
object's edge.

Running one testbench with Verilator (the package files first):

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/shape_pkg.sv tb/shape_tb_pkg.sv rtl/shape_bus_if.sv rtl/mode_decision.sv \
  rtl/rlc_tx.sv rtl/rlc_rx.sv rtl/index_table.sv rtl/tile_addr_gen.sv \
  rtl/alpha_bank.sv rtl/alpha_frame_memory.sv rtl/alpha_frame_buffer.sv \
  rtl/shape_frame_top.sv tb/tb_shape_frame_full.sv --top-module tb_shape_frame_full
./obj_dir/Vtb_shape_frame_full
```

Each testbench ends with `TB_RESULT checks=N failures=M`. The full-size run
takes a few seconds. Lint with `verilator --lint-only -Wall` on the same file
list and `--top-module shape_frame_top`. The memories are plain arrays, so a
synthesis tool infers RAMs: about 1.15 Mbit at the default size, 1.04 Mbit of
it frame memory.

What is not verified: behaviour on real MPEG-4 test sequences (only synthetic
shapes are used) and operation on a real on-chip bus.
