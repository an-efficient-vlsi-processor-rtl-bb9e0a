# Variable block size integer motion estimation processor for H.264/AVC

An H.264 encoder predicts each 16x16 macroblock (MB) of the current picture from
a displaced block of a reference picture. The displacement is the motion vector
(MV). The standard lets the encoder split the MB into smaller partitions, each
with its own vector: 16x16, two 16x8, two 8x16, or four 8x8 quadrants. Each
quadrant can be split again into two 8x4, two 4x8 or four 4x4 blocks. There are
41 distinct partitions in one MB. Integer motion estimation (IME) finds, for
every one of them, the whole-pixel vector with the lowest cost. It then picks
the partitioning whose total cost is lowest.

This RTL does that by full search. Every candidate vector in a square window of
+-h pixels around a predicted vector is tried, with h = 4, 8, 16 or 32. The
window is chosen per MB. The processor:

* computes the 16 sums of absolute differences (SADs) of the 4x4 blocks of one
  candidate position per clock, in a 2-D systolic array of 64 small processing
  elements;
* adds those SADs up into the 41 partition SADs;
* adds a motion-vector cost to each partition SAD;
* keeps the running minimum for every partition.

The architecture follows the article "An efficient VLSI processor chip for
variable block size integer motion estimation in H.264/AVC". Figure, equation
and table numbers in the source comments refer to that article. Where this RTL
differs from the article, the difference is stated; see
[Departures from the published design](#departures-from-the-published-design).

## The cost that makes the 41 searches parallel

The usual H.264 cost of a partition is

    J = SAD + lambda(QP) * R(mv - p)

Here `p` is the partition's own predicted vector. It is the median of vectors
of neighbouring partitions. Those vectors are known only once the neighbours'
searches have finished, so the 41 searches would have to run one after another.

This design uses a single prediction per MB instead:

    p16 = median(MV of the MB above-left, MV of the MB above, MV of the MB above-right)

The median is taken per component. Every partition's vector is then searched
relative to p16, and the cost becomes

    J = SAD + 2 * lambda(QP) * (|vx| + |vy| + 1)

Here `v = mv - p16` is the local vector, the same for all 41 partitions of a
candidate position. All 41 costs of one candidate can therefore be evaluated in
the same clock. The prediction also uses only the MB row above, so the
prediction for the next MB does not wait for the current MB to finish.
`lambda(QP)` is the usual encoder table: 1 for QP 0..15, rising to 91 at QP 51.
It lives in `ime_pkg::lambda_of_qp`.

Neighbours outside the picture count as zero vectors.

## Data flow for one macroblock

```
 external frames --4 px/clk--> addr_gen --+--> RAM1 (4 banks x 400 x 32, search area)
                                           +--> RAM2 (64 x 32, current MB)
                                                    |
            pu_ctrl --controls--> processing_unit (REGS 16x20, REGC 16x16, 64 PE)
                                                    | 16 SADs + vector tag per clock
                                                 me_unit (41 min-cost cells, 5 levels)
                                                    | 41 costs, 41 vectors
                                              mode_decision (serial, 65 clocks)
 RAM3 (180 x 32, MB vectors) <--> ime_ctrl --> mv_pred (median) --> addr_gen
```

`ime_ctrl` runs the phases of one MB one after another. For the +-16 window
the clock counts are:

| Phase | Clocks (+-16 window) |
|---|---|
| read the three neighbour vectors from RAM3; form p16 | 5 |
| fetch the (2h+16)^2 search area, then the 64 current-MB words | 576 + 64 |
| scan: load the registers, then all (2h+1)^2 candidates | 1288 |
| drain the minimum tree | 6 |
| mode decision | 65 |
| write the 16x16 vector to RAM3 | 1 |
| hand-over between phases | 7 |

The whole MB takes 2012 clocks. For the other windows:

| Window | Clocks per MB |
|---|---|
| +-4 | 476 |
| +-8 | 828 |
| +-32 | 6300 |

The end-to-end testbench checks these counts exactly.

## The systolic array

This is the heart of the design and the least obvious part.

### Registers

REGC holds the current MB. REGS holds a 16x20 window of the search area: the
candidate block plus one extra 4-pixel column on its right. Both are split into
4x4 subblocks:

* REGS has 4 subblock rows by 5 subblock columns.
* REGC has 4 by 4.

Each subblock stores four 32-bit words in four *row slots*. A word is one row of
4 pixels.

### Processing elements

Each of the 16 REGC subblocks has four PEs, 64 in all. PE k reads slot k:

* pixels k..3 of the word in slot k of its own REGS subblock;
* pixels 0..k-1 of slot k of the REGS subblock to the right.

So PE0 sees the block at horizontal offset 0, PE1 at offset 1, PE2 at 2 and PE3
at 3. Together the four PEs of a subblock cover four horizontal offsets without
moving any pixels sideways.

Each PE compares its 4 pixels with the same slot of the REGC subblock. It
accumulates one row per clock and so completes a 4x4 SAD every 4 clocks. The
four PEs are staggered by one clock, so every clock exactly one PE per subblock
finishes. All 16 finishing PEs belong to the same candidate vector, giving 16
SADs per clock.

### Register moves

The REGS moves (`ime_pkg::regop_e`) are:

| Move | Rows inside a subblock | Word that leaves | Word that enters |
|---|---|---|---|
| `OP_SHL` | move down one slot | slot 3 goes to slot 0 of the left neighbour | the rightmost column takes one new word per subblock row from RAM1 |
| `OP_SHR` | move up one slot | slot 0 goes to slot 3 of the right neighbour | the leftmost column takes the new words |
| `OP_ROTF` / `OP_ROTR` | same movement, forward or reverse | wraps within the subblock | none |
| `OP_DOWN` | only the slot holding the topmost image row changes | replaced by the same slot of the subblock below | the bottom subblocks take the new image row from RAM1, 5 words |
| `OP_LOAD` | one row slot written | none | initial fill |

With `OP_SHL` and `OP_SHR`, each shift moves the window four pixel positions per
slot-cycle. A word passes through four slots before it leaves. The stagger
between PEs turns this into a new candidate offset every clock.

`OP_DOWN` moves the candidate one line down.

REGC rotates in step with REGS so that slot k of a REGC subblock always holds
the MB row matching slot k of the REGS subblock above it:

* `SHL`, `ROTF` and `DOWN` rotate REGC forward.
* `SHR` and `ROTR` rotate it in reverse.

### Scan order

The scan is a snake over the window:

1. Initialise REGS and REGC, 64 clocks.
2. Right-to-left row, 2h+4 clocks: 3 rotations, 2h shifts left, 1 rotation.
   Results appear for offsets -h..+h.
3. One down step, 1 clock.
4. Left-to-right row, 2h+4 clocks: 2h shifts right, 4 rotations.
5. Down step, and so on for 2h+1 candidate rows.

The scan takes 64 + (2h+1)(2h+4) + 2h + 4 clocks.

`pu_ctrl` tags each clock with the candidate vector and the index of the PE that
finishes. The tag is delayed to match the PE pipeline, and `processing_unit`
selects the 16 finishing SADs with it.

### RAM1 layout

RAM1 must deliver two access patterns in one clock:

* four words per shift step: one per subblock row, rows r, r+4, r+8 and r+12 of
  the same 4-pixel column group;
* five words per down step: one image row, five column groups.

The search area is stored with word (row, column group cg) in:

* bank `(row/4 + cg) mod 4`;
* address `5*row + cg/4`.

With this layout each shift step reads all four banks once. A down step reads
four banks once and one bank twice. The second read of that bank uses the
bank's second port. The 80x80 area of the +-32 window exactly fills the
4 x 400 words.

## Processing element

`pe` computes |Y-X| for 4 pixels as Y + ~X. Its carry out tells which operand
is larger. The missing +1 corrections enter the adder tree as carry inputs
instead of needing separate adders. A pipeline register sits between the two
adder levels, so the longest path is about two adders. The SAD is ready 2 clocks
after the 4th row.

## Minimum tree and partition numbering

`me_unit` computes the vector cost 2·lambda·(|vx|+|vy|+1) in `lambda_r`, in one
clock. It then builds the partition SADs in five levels of `me_cell`s, one clock
each:

| Level | Partitions |
|---|---|
| 1 | 4x4 |
| 2 | 8x4 and 4x8 |
| 3 | 8x8 |
| 4 | 16x8 and 8x16 |
| 5 | 16x16 |

Each cell:

* adds its inputs;
* passes the sum down to the next level;
* adds the vector cost, delayed to match;
* keeps the smallest cost and its vector. On equal cost the earlier candidate
  stays.

The latency is 6 clocks.

The `cost` and `best_v` outputs are indexed as follows. Sizes are width x
height, and quadrants are numbered in raster order.

| Index | Partitions |
|---|---|
| 0..15 | 4x4 blocks, raster order |
| 16..23 | 8x4, two per quadrant (top, bottom) |
| 24..31 | 4x8, two per quadrant (left, right) |
| 32..35 | 8x8 quadrants |
| 36..37 | 16x8 (top, bottom) |
| 38..39 | 8x16 (left, right) |
| 40 | 16x16 |

`best_v` holds local vectors. The absolute vector is `pred + best_v`.

## Mode decision

`mode_decision` reads the 41 costs one per clock. One accumulator sums a
candidate partitioning, and a small register file keeps the best mode so far.

* **Per 8x8 quadrant, 13 clocks.** It compares the sums of four 4x4, two 4x8
  and two 8x4 costs with the 8x8 cost. The winner of each quadrant is kept.
* **For the MB, 13 clocks.** It compares the sum of the four quadrant winners
  with the 8x16 pair, the 16x8 pair and the 16x16 cost.

The whole decision takes 65 clocks. On equal totals the smaller partitioning,
examined first, is kept. The outputs are:

* `mb_mode`: 16x16, 16x8, 8x16 or 8x8;
* `sub_mode[q]`: meaningful when `mb_mode` is 8x8;
* `best_cost`.

## Interface of `ime_top`

The top has no parameters. Everything is selected at run time.

| Signal | Meaning |
|---|---|
| `start` | Pulse with `mbx`, `mby` (MB position), `mb_w` (picture width in MBs, at most 179), `sr` (`SR_8`, `SR_16`, `SR_32`, `SR_64` for h = 4, 8, 16, 32) and `qp` (0..51). Hold them until `mb_done`. |
| `ext_req`, `ext_cur`, `ext_x`, `ext_y` | Read request for the word of pixels (x..x+3, y). `ext_cur` = 1 selects the current frame, 0 the reference frame. |
| `ext_data` | The requested word, due in the clock after the request. Pixel j is in bits 8j+7:8j. Coordinates may lie outside the picture; the memory must return edge-padded pixels. |
| `mb_done` | Pulse when the MB is finished. `pred`, `mb_mode`, `sub_mode`, `best_cost`, `cost[41]` and `best_v[41]` are valid until the next `start`. |
| `busy` | The processor is working on an MB. |

MBs must be processed in raster order. RAM3 keeps the last 180 MB vectors in a
ring, addressed `(mby*mb_w + mbx) mod 180`. Pictures up to 179 MBs wide
(2864 pixels) are supported.

## Departures from the published design

* **Clocks per row.** The published schedule is (2h+2) clocks per candidate row
  plus 16 for initialisation. The row-slot scheme used here needs 2h+5 per row
  including the down step, plus 64 clocks of initialisation. One 32-bit RAM2 word
  per clock gives 64 clocks to fill REGC. Scan clocks for the four windows are
  184, 424, 1288 and 4552. The published figures are 165, 391, 1207 and 4375.
* **Fetch is not overlapped with the scan.** Fetching the next MB's data while
  the current one is scanned would need a second search-area buffer, which
  4 x 400 words cannot hold for the +-32 window. The phases run in sequence.
  The +-16 window therefore costs 2012 clocks per MB.
  * At 300 MHz, 1920x1088 at 30 frames/s allows about 1225 clocks per MB. This
    RTL meets that with the +-8 window (828 clocks) but not the +-16 window.
  * 1280x720 at 30 frames/s (about 2770 clocks) works with +-16.
  * 720x480 (about 7400 clocks) works with +-32.
* **RAM3 contents.** RAM3 stores only the absolute 16x16 vector of each MB, the
  one the prediction needs.
* **Edge padding.** Pixels outside the picture are left to the external memory.
* **Register-level structure.** The exact slot movement of REGS/REGC, the RAM1
  interleaving, the PE pipeline position, tie rules and the controller's
  sequencing are this design's own choices. The article gives the register
  modes, the PE taps and the module structure but not these details.
* **Clock gating.** Clock gating of REGC is modelled as a clock enable.
* **Timing.** Timing at 300 MHz has not been analysed.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_ime_top` | End to end at the real size. A 64x48 picture pair of 12 MBs, raster order, all four windows, QP 0/20/28/40. Every cost, vector, mode, prediction and the clock count are compared with an independent model in the testbench. It also counts how often each mechanism occurred and fails if one never did: every register move, each window, edge padding, a non-zero prediction, and each of the four MB modes and four quadrant sub-modes. |
| `tb_processing_unit` | Scan controller, RAM1, RAM2 and array against a direct SAD computation for every candidate, for the +-4, +-8 and +-16 windows. |
| `tb_pe`, `tb_regs`, `tb_regc`, `tb_ram1`, `tb_sp_ram`, `tb_lambda_r`, `tb_me_unit`, `tb_mode_decision`, `tb_mv_pred`, `tb_addr_gen` | Unit tests against reference models, including latencies and clock counts. |

To run one with Verilator 5, from the folder holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
          rtl/ime_pkg.sv tb/tb_ime_top.sv --top-module tb_ime_top -o sim
./obj_dir/sim
```

`-y rtl` lets Verilator find each module in its own file. `-Wno-fatal` keeps
the remaining width and unused-signal lint warnings from stopping the build.
The end-to-end test runs in well under a second.

Synthesis with Yosys (slang front end) maps the design to about 3500 cells and
9400 flip-flop bits, plus 59600 memory bits for RAM1 to RAM3.

## Files

| File | Contents |
|---|---|
| `rtl/ime_pkg.sv` | Types (pixels, words, vectors, modes, register moves), widths, lambda table |
| `rtl/ime_top.sv` | Top level |
| `rtl/ime_ctrl.sv` | MB sequencer, RAM3 addressing |
| `rtl/mv_pred.sv` | Median prediction |
| `rtl/addr_gen.sv` | Fetch addresses |
| `rtl/ram1.sv`, `rtl/sp_ram.sv` | RAM1, RAM2, RAM3 |
| `rtl/pu_ctrl.sv` | Scan sequencer |
| `rtl/processing_unit.sv` | Systolic array |
| `rtl/regs.sv`, `rtl/regc.sv` | REGS and REGC |
| `rtl/pe.sv` | Processing element |
| `rtl/lambda_r.sv` | Vector cost |
| `rtl/me_unit.sv`, `rtl/me_cell.sv` | Minimum tree |
| `rtl/mode_decision.sv` | Mode decision |
