# H.264/AVC de-blocking filter with a reordered macro-block schedule

H.264/AVC smooths the visible seams between the 4x4 blocks of every decoded
picture with an in-loop de-blocking filter. Each 16x16 macro-block (MB) has
16 luma edge segments in each direction and 8 per chroma plane. Every segment
is filtered across four lines, and the standard fixes the order: all vertical
edges of the MB from left to right, then all horizontal edges from top to
bottom. Each edge reads the result of the edge before it.

Filtering edge by edge in that order has two costs: a block is fetched from
memory once per edge it touches, and a block must be transposed before its
horizontal edges can be filtered. This design cuts both:

* **Reuse through small FIFOs.** After a block has been filtered on its left
  edge it stays in a 4-word data buffer and is fed straight back as the p side
  of its right edge. The same happens going down a column.
* **Two filter units in lock step.** They work on two block rows, or two
  block columns, at once.
* **Half a luma block at a time.** The upper half (block rows 0-1) is
  filtered completely, vertical and horizontal edges interleaved, before the
  lower half (rows 2-3) is loaded. The result is the same as the standard
  order, because an edge only depends on edges to its left and above. The
  internal SRAM therefore needs to hold only part of the MB.
* **Interleaved SRAMs.** The 4x4 blocks are spread over two SRAMs in a
  checkerboard, so the two filter units (and the p and q sides of one unit)
  never want the same SRAM in the same clock.

At default parameters one MB takes 397 clocks from `start` to `done`. When
the next MB is started (queued) while the current one is still running, an
MB completes every 336 clocks. At 100 MHz that is enough for 1280x720 at 60
frames/s: 3600 MBs x 60 = 216,000 MB/s needs 72.6 M clocks/s with queued
starts, or 85.8 M clocks/s if every MB waits for the previous `done`. The end-to-end testbench checks
every output pixel against an independent model of the standard's
filter.

## Datapath

```
             ext_rd_data                                   ext_wr_data
                 |                                              ^
                 v                                              |
   +-------------------------------- 32-bit word multiplexers --------------------+
   |  SRAM 0 (32x48)    SRAM 1 (32x48)     transpose arrays 0..3 (4x4 pixels each)|
   |      |                 |                   ^      |                          |
   |      v                 v                   |      v                          |
   |  filter unit 0: p,q -> p',q'      filter unit 1: p,q -> p',q'                |
   |      |      ^                         |      ^                               |
   |      v      |                         v      |                               |
   |   data FIFO 0 (4 words)            data FIFO 1 (4 words)                     |
   +------------------------------------------------------------------------------+
                 ^ control word dp (registered), SRAM read addresses
                 |
            dbf_controller  (schedule, Bs / alpha / beta / tC0 for each line)
```

Every bus carries one *word*: four 8-bit pixels of one row of a 4x4 block, or
of one column when the block is held transposed. Pixel k sits in bits
`8k+7:8k`. On the p side of an edge, pixel 3 of the word is p0. On the q side,
pixel 0 is q0. A transposed block presents its columns as words, so the same
filter unit serves vertical and horizontal edges.

The pipeline has one stage. In clock *n* the controller computes the control
word and issues SRAM and external reads. In clock *n+1* the registered control
word selects the SRAM outputs, FIFO heads, transpose-array outputs and
external data. These pass through the combinational filter units, and the
results are written to SRAMs, FIFOs, arrays or external memory at the end of
that clock. The filter units never take another unit's output in the same
clock, so the datapath has no combinational loops.

| Module | Role |
|---|---|
| `dbf_pkg` | Types, block numbering, SRAM placement of every block |
| `edge_filter` | One line across an edge per clock: normal mode (Bs 1-3), strong mode (Bs 4), luma or chroma |
| `dbf_threshold` | alpha, beta and tC0 from the two QPs, filter offsets and Bs (standard tables) |
| `dbf_sram` | 32-bit x 48 SRAM with one read port and one write port |
| `data_fifo` | 4 x 32-bit FIFO that carries a just-filtered block to its next edge |
| `transpose_array` | 4x4 pixel registers, written and read by row or by column |
| `dbf_controller` | Loads, filtering schedule, stores, thresholds |
| `deblock_top` | Wires two SRAMs, two filters, two FIFOs, four arrays and the controller together |

## The blocks of one MB

The filter works on 40 blocks of 4x4 pixels, numbered as in `dbf_pkg`:

```
            T1  T2  T3  T4                 T5  T6          T7  T8
       L1   B0  B1  B2  B3            L5  B16 B17     L7  B20 B21
       L2   B4  B5  B6  B7            L6  B18 B19     L8  B22 B23
       L3   B8  B9  B10 B11                Cb              Cr
       L4   B12 B13 B14 B15
                 luma
```

The ids are: B0-B15 = 0-15, Cb = 16-19, Cr = 20-23, L1-L8 = 24-31 and
T1-T8 = 32-39. L and T are the already decoded left and top neighbours. Their
pixels next to the MB are changed by the MB's outer edges, so they are read
and written back as well.

## The schedule

This is the part that takes the most effort to follow. An MB is handled in
three *phases*: the upper luma half, the lower luma half, and chroma. Each
phase filters for 13 *block cycles* of 4 clocks. In each clock a filter unit
processes one line (row or column) of a 4x4 edge.

### Luma half

For the upper half, unit 0 owns block row 0 and unit 1 owns block row 1. In
the "V" steps, unit 0 takes the even column of a pair and unit 1 the odd one.
H*n* is a vertical edge, filtered along rows. V*n* is a horizontal edge,
filtered along columns.

| Block cycle | Units do | Where data goes |
|---|---|---|
| 1 | move L1 / L2 into the FIFOs | |
| 2 | **H1**: L \| B0 and L \| B4 | L back to SRAM; B0, B4 into the FIFOs |
| 3 | **H2**: B0 \| B1, B4 \| B5 | B0, B4 written by rows into arrays 0 / 2; B1, B5 into the FIFOs |
| 4 | **H3**: B1 \| B2, B5 \| B6 | B1, B5 into arrays 1 / 3; B2, B6 into the FIFOs |
| 5 | move: B2 / B6 back to SRAM, T1 / T2 into the FIFOs | |
| 6 | **V4**: T1 over B0, T2 over B1 (arrays 0 / 1 read by columns) | T back to SRAM; B0, B1 into the FIFOs |
| 7 | **V5**: B0 over B4, B1 over B5 (arrays 2 / 3) | B0, B1 back to SRAM; B4, B5 by columns into arrays 2 / 3 |
| 8 | move: B4 / B5 back to SRAM, B2 / B6 into the FIFOs again | |
| 9 | **H6**: B2 \| B3, B6 \| B7 | B2 / B6 into arrays 0 / 2; B3 / B7 into arrays 1 / 3 |
| 10 | move: T3 / T4 into the FIFOs | |
| 11 | **V7**: T3 over B2, T4 over B3 | as in cycle 6 |
| 12 | **V8**: B2 over B6, B3 over B7 | as in cycle 7 |
| 13 | move: B6 / B7 back to SRAM | |

A block that has just been filtered on one edge goes into the unit's FIFO
and comes back out, four words in order, as the p side of the next edge.
Before a block's horizontal edges it is written by rows into a transpose
array and later read by columns. After its last horizontal edge it is kept in
column form.

The lower half repeats the table with block rows 2-3 and L3 / L4. B4-B7 act
as the top neighbours. They stay in the SRAMs from the upper half, already in
column form.

### Chroma

In the chroma phase each unit takes one block row of a component. The Cb
schedule is: move L5/L6, then H (left edge), H (middle edge), move T5/T6,
then V (top edge), V (middle edge), and write back. This takes 7 block cycles.
Cr follows the same pattern in block cycles 7-13. Its first move overlaps
Cb's write-back. A chroma edge uses the Bs of the luma edge at the same place
(chroma edges 0 and 1 take luma edges 0 and 2). Each chroma line takes the Bs
of the luma block beside it.

### SRAM placement

A block at block row r and column c (neighbours at r = -1 or c = -1) lives in
SRAM `(r + c + 1) mod 2`. In each SRAM it uses a *slot* of four words, one
per row (`dbf_pkg::blk_slot`):

| Slot | Upper half | Lower half | Chroma |
|---|---|---|---|
| 0-1 | B4-B7 | B4-B7 (kept) | Cb |
| 2-3 | B0-B3 | B8-B11 | Cr |
| 4-5 | T1-T4 | B12-B15 | T5-T8 |
| 6-7 | L1, L2 | L3, L4 | L5-L8 |

Only words 0-31 of each 48-word SRAM are used. The schedule keeps any one
SRAM to at most one read and one write per clock. The controller checks this
with assertions.

### Loads, stores and their overlap

External memory is read and written one row of one block at a time. A
transfer is a two-stage pipeline through a pair of transpose arrays. While
block j streams into one array, block j-1 streams out of the other. A
transfer of N blocks therefore takes 4N + 4 clocks.

On the way in, top neighbours are transposed and all other blocks are copied
as they are. On the way out, every block that ended in column form is
transposed back, so external memory only ever sees rows.

Loads use arrays 0/1 and stores use arrays 2/3. This lets the stores of one
phase run in the same clocks as the loads of the next. The load order of the
next phase is arranged to reach each SRAM slot in the same position as the
store order of the current phase. Each word is therefore read out four clocks
before the incoming block overwrites it.

| Interval | Clocks |
|---|---|
| load upper half (L1, L2, T1-T4, B0-B7: 14 blocks) | 60 |
| filter upper half | 52 |
| store 10 blocks, beside load of lower half (L3, L4, B8-B15: 10 blocks) | 44 |
| filter lower half | 52 |
| store 14 blocks, beside load of chroma (16 blocks) | 68 |
| filter chroma | 52 |
| store chroma (16 blocks) | 68 |
| **total** | **396** (+1 from `start` to `done`) |

**Back-to-back MBs.** `start` may be pulsed again while an MB is running.
The controller keeps one queued MB and lowers `ready` until that MB begins.
If the queued MB arrives before the current MB finishes filtering its
chroma, its upper-half load (14 blocks) runs beside the final chroma store.
The 16-block store is longer, so the load is hidden completely. The chroma
store order is chosen so that each slot is again emptied before the load
refills it. The next MB then goes straight to filtering, and `done` pulses
every 52 + 44 + 52 + 68 + 52 + 68 = 336 clocks. If the queued MB arrives
later, it simply starts after `done` (397 clocks).

During that overlap the external side reads blocks of the new MB while it
still receives writes of the old one. In raster order this is safe:

* The new upper-half load needs L1 and L2, which are the old MB's B3 and B7.
  Those were written back in the old MB's first two phases.
* Its top neighbours come from the MB row above.
* Its chroma left neighbours (the old B17, B19, B21, B23) are read only in
  the new MB's chroma phase, long after the old chroma store.

The testbench keeps the two MBs in separate buffers of its memory model.

## Edge filter

`edge_filter` takes p3..p0 and q0..q3 of one line and the line's Bs, alpha,
beta and tC0. A line is filtered only when Bs != 0, |p0-q0| < alpha,
|p1-p0| < beta and |q1-q0| < beta.

* **Bs 1-3 (normal mode).** p0 and q0 move by
  `Clip3(-tc, tc, (4(q0-p0) + (p1-q1) + 4) >> 3)`.
  * For luma, p1 also moves when |p2-p0| < beta, by a delta clipped to tC0.
    The same rule applies to q1 with |q2-q0| < beta.
  * For luma, tc = tC0 plus one for each side where that condition holds.
  * For chroma, tc = tC0 + 1.
* **Bs 4 (strong mode).** On a luma side where |p2-p0| < beta (or |q2-q0| <
  beta) and |p0-q0| < (alpha >> 2) + 2, the unit rewrites p0-p2 (or q0-q2)
  with the 4- and 5-tap filters. Otherwise, and always for chroma, only p0
  (or q0) changes, through a 3-tap filter.

`dbf_threshold` computes qPav = (qPp + qPq + 1) >> 1. It then forms
indexA = Clip3(0, 51, qPav + FilterOffsetA) and indexB in the same way, and
reads the standard's alpha, beta and tC0 tables.

## Interface of `deblock_top`

| Port | Dir | Meaning |
|---|---|---|
| `start` | in | one-clock pulse while `ready` is high; latches `mb`. Starts at once when idle, otherwise queues the MB |
| `mb` (`mb_info_t`) | in | Bs of every luma edge segment: `bs_ve[edge][row]` and `bs_he[edge][column]`, edge 0 being the MB boundary. Luma, Cb and Cr QPs of the current, left and top MB. FilterOffsetA/B |
| `busy`, `done` | out | `done` pulses once per MB: 397 clocks after `start` from idle, 336 clocks after the previous `done` when queued in time |
| `ready` | out | low while one MB is already queued |
| `ext_rd_req/blk/row` | out | request row `row` of block `blk` |
| `ext_rd_data` | in | that row, **in the next clock** (fixed latency 1) |
| `ext_wr_en/blk/row/data` | out | write one filtered row |
| `filt_en`, `filt_active` | out | per unit: working on an edge / actually changed the line (monitoring) |

The external side works in block ids and rows, not addresses. The system
maps them to frame addresses. Bs, the QPs and the chroma QPs are inputs: they
come from the decoder, which knows the coding modes and motion vectors they
depend on. Reset is synchronous and active high.

## Where this design departs from the original architecture

* **13 block cycles per half, not 12.** The original schedule leaves the last
  filtered blocks in the transpose buffers. Here a 13th block cycle writes
  them back, and the write-backs in cycles 5 and 8 also go to the SRAM rather
  than straight to a transpose array. Filtering therefore takes 156 clocks
  per MB instead of 144.
* **External traffic.** Every MB reads and writes all 40 blocks: 160 words
  each way. The original counts 256 external access cycles per MB. Left
  neighbours are not kept on chip from one MB to the next.
* **Limited MB-level overlap.** Only the next MB's upper-half load overlaps
  the current MB's final store. Nothing of the next MB is loaded while the
  current one is being filtered. The result is 336 clocks per MB in a
  continuous stream (397 for one MB alone), against the original's 400.
* **Chroma schedule and memory map.** The original gives the luma schedule
  in detail and the memory map only by figure. The chroma schedule and the
  slot layout above are this design's own. The checkerboard matches the
  original's assignment of blocks to the two SRAMs.
* **p1/q1 in normal mode.** The original's text can be read as requiring
  both |p2-p0| < beta and |q2-q0| < beta before p1 and q1 change. The
  standard treats each side separately, and so does this design.
* **Transpose buffer.** It is built as four independent 4x4 arrays. They also
  serve as ping-pong buffers for external transfers.
* **Out of scope.** Bs derivation, the luma-to-chroma QP mapping, and the
  external frame memory and its addressing.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, has a watchdog, draws stimulus with
`$urandom`, and fails if a behaviour it is meant to cover never occurred.

| Testbench | What it checks |
|---|---|
| `tb_edge_filter` | 20,000 random lines, mostly "blocky" so that every mode occurs, against a model written from the standard's equations |
| `tb_dbf_threshold` | Every index, then random QPs and offsets, including clipping at 0 and 51 |
| `tb_dbf_sram` | Random reads and writes, read latency, hold, and read-old-data on a collision |
| `tb_data_fifo` | Random push/pop against a queue, and back-to-back streaming |
| `tb_transpose_array` | Row-in/column-out and column-in/row-out of random blocks |
| `tb_dbf_controller` | 397 clocks per MB, `ready` high when nothing is queued; every row of all 40 blocks read once and written once; 192 filtered lines per MB with the right Bs total |
| `tb_deblock_top` | 40 random MBs at default parameters against an independent model of the standard's filtering order, pixel by pixel, plus the clock counts (397 from idle, 336 done to done when queued). Most MBs are queued while the previous one runs. It also counts strong/normal/chroma filtering, lines gated off, Bs = 0, both units busy, FIFO reuse, transposed reads, stores overlapping loads, and the next MB loading beside the final store |

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/dbf_pkg.sv rtl/*.sv tb/tb_deblock_top.sv \
    --top-module tb_deblock_top
./obj_dir/Vtb_deblock_top
```

What is not verified: timing closure at 100 MHz, a `start` pulsed while
`ready` is low (it is dropped by design, and no test drives it), and real
decoded video. The
testbench's reference model and the RTL share the reading of the standard's
equations described above.

## Changing it

* `SRAM_DEPTH` (default 48) can grow. It cannot shrink below 32 without
  changing `dbf_pkg::blk_slot`.
* The FIFO depth of 4 equals one block and is tied to the schedule.
* The schedule lives in three functions of `dbf_controller`: `luma_op`,
  `chroma_step` and `load_blk`/`store_blk`. If you change an order there,
  re-check the SRAM-port assertions and the store/load slot pairing described
  above, then run `tb_deblock_top`.
