# Slice SRAM with line-pixel-lookahead for an H.264/AVC decoder

An H.264/AVC decoder keeps reaching back into the macroblock row above.
Intra prediction reads the pixel line just above a block. The deblocking
filter reads the four lines above each horizontal macroblock edge. Those
pixels were decoded one macroblock row earlier, a full frame width ago.
A decoder can either fetch them again from frame DRAM, which costs external
bandwidth and power, or keep a whole row of them on chip in a *slice SRAM*,
which costs area and power in proportion to the frame width.

This RTL sits between those two choices. It keeps the upper-neighbour pixels
of a column only when a small predictor expects that they will be used. When
the prediction is wrong, it fetches them from DRAM. The predictor is called
line-pixel-lookahead (LPL). It looks at one-bit TAGs recording which columns
needed their upper neighbours in the last two rows, and it guesses the same
bit for the row below. The RTL follows the scheme published in "Design of an
H.264/AVC Decoder with Memory Hierarchy and Line-Pixel-Lookahead". Where that
description stops, this design makes its own choices, listed in
[Departures and open points](#departures-and-open-points).

## Where it sits: a three-level memory hierarchy

| level | storage | in this RTL |
|---|---|---|
| L0 | register files next to the decoding ALUs | outside; its signals are ports |
| L1 | content SRAM: two macroblocks in ping-pong | `content_sram_pingpong` |
| L1 | slice SRAM, reduced, driven by the LPL logic | `lpl_unit` with `slice_sram` |
| L1 | slice SRAM, upper-neighbour syntax elements | `slice_syntax_sram` |
| L2 | frame DRAM, behind the system bus and an I/O bridge | outside; a system-bus read port |

The top module `h264_mem_hier_top` holds the two L1 parts side by side:

- The content SRAM passes macroblocks from the reconstruction ALUs to the
  deblocking filter.
- The LPL unit serves upper neighbours to whichever unit needs them, and
  reads frame DRAM over the system bus when it must.
- The syntax rows keep the upper-neighbour syntax elements for the whole
  frame width.

The two parts share no signals.

## Columns and TAG rows

All of the LPL logic works on a **column**: a 4-pixel-wide strip of luma at a
macroblock-row boundary, together with the 2 Cb and 2 Cr pixels above the
same place in a 4:2:0 frame. A 1920-pixel frame has 480 columns per
macroblock row. For each column, the decoder gives the LPL unit the
following:

- the prediction type and intra mode of the column's top 4x4 sub-block;
- the boundary strength (bS) of the macroblock edge above it;
- the four bottom lines of the column as eight 32-bit words. Word 2k is
  luma line k (four 8-bit pixels). Word 2k+1 is chroma line k, packed as
  {Cr, Cr, Cb, Cb}.

The unit returns the four lines just above the column, taken from the
previous macroblock row, in the same packing. With `CHROMA = 0` a column is
luma only: four words, with word k being luma line k.

Each column carries a **TAG pair**: one bit for the deblocking filter and one
for intra prediction. Two kinds of TAG are used:

- **D.TAG** (decoding TAG) says what the column really needs. The deblocking
  bit is 1 unless bS = 0 (the edge is not filtered). The intra bit is 1 for
  intra blocks unless the mode takes nothing from above. Those modes are
  4x4 horizontal (1), 4x4 horizontal-up (8) and 16x16 horizontal (1).
  Inter blocks have intra bit 0. This is `lpl_tag_predict`.
- **N.TAG** (neighbouring TAG) is what was predicted for this column one row
  earlier. It also says what was actually written to the slice SRAM.

## The 4x3 TAG template

While column *j* of row *r* is decoded, the unit predicts the TAG of column
*j* in row *r+1*. The prediction uses a template of the D.TAGs around it:

```
row r-1:   a  b  c  d        (columns j-2 .. j+1)
row r  :   e  f  g           (columns j-2 .. j; g is the column now decoded)
row r+1:         x           (column j: the TAG to predict)
```

`lpl_tag_decision` applies this table, taking the first row that matches:

| condition | prediction |
|---|---|
| a == f | x = f |
| a == g | x = e |
| c == g | x = g |
| otherwise | x = majority(e, f, g) |

When the last row is reached, *a* differs from both *f* and *g*. So *f*
equals *g*, and the majority is simply *f*. TAGs *b* and *d* are in the
template but no rule reads them.

The template is evaluated separately for the deblocking bit and the intra
bit. Each has its own `lpl_tag_buffer`, which holds two rows of 480 bits:

- the previous row's D.TAGs, which supply *a* and *c*;
- the N.TAGs predicted for the row now being decoded.

*e* and *f* come from a two-stage shift register inside `lpl_unit`. TAGs
outside the frame (the first two columns, the first row) read as 0.

## Hit, miss and what a miss costs

`lpl_tag_cmp` compares N.TAG with D.TAG for each of the two units:

| N.TAG | D.TAG | result | cost |
|---|---|---|---|
| 0 | 0 | hit | none |
| 0 | 1 | miss | the pixels must be read from frame DRAM |
| 1 | 0 | miss | none: the stored pixels are thrown away |
| 1 | 1 | hit | none |

A miss on either unit raises that unit's request bit (`up_req`).

The bottom lines of a column are written once for both units. They are
written when either predicted TAG is 1. A DRAM fetch is therefore needed
only when a unit needs the pixels and neither N.TAG is set.

## The reduced slice SRAM

Pixels are written in column order while a macroblock row is decoded. They
are read back in the same column order during the next row. `slice_sram` is
therefore a circular buffer of 32-bit words with one write pointer and one
read pointer. Reads and writes can happen in the same cycle. Read data
appear one cycle after the read enable. At the default size of 480 words it
holds 60 of the 480 columns. Storing every column would take 3840 words
(122,880 bits).

When a column must be stored and there is no room, the prediction is
dropped: the N.TAGs are stored as 0 (`up_dropped` flags this). Room is
counted after this column's own words leave the buffer. The next row then
sees what is really in the buffer. A dropped column can cost at most one
DRAM fetch later. Nothing is stored in the last macroblock row of a frame.
`frame_start` empties the buffer.

## Syntax-element rows

Decoding a macroblock also refers to syntax elements of the row above.
`slice_syntax_sram` keeps one row of each of two kinds, in full, with no
lookahead:

| row | entries at 1920 pixels | bits per entry | content |
|---|---|---|---|
| 4x4 column | 480 | 20 + 5 | motion-vector flags, CAVLC nC |
| macroblock | 120 | 160 | CBP, MB_Type and other CABAC flags |

Together that is 31,200 bits. Each row is a single-port RAM used
read-before-write. An access at a column returns the entry the row above
left there one cycle later, and stores the current row's entry in its place.
The fields are opaque to the store.

## Timing of a column

| step | cycles |
|---|---|
| accept the column (`col_valid` and `col_ready`) | 1 |
| slice SRAM transfer, if words are stored or to be stored: 8 words read and written in parallel, plus 1 cycle for the last read | 9 |
| DRAM fetch, if needed: 8 single-word reads, one outstanding at a time | 8 × (1 + DRAM latency + stalls) |
| result offered (`up_valid`) until `up_ready` | ≥ 1 |

Without a fetch, `up_valid` rises 1 cycle after acceptance, or 10 cycles
when there is an SRAM transfer. With `up_ready` held high, a column
therefore takes 2 or 11 cycles. Without chroma the transfer takes 5 cycles
instead of 9.

Fetched lines have these word addresses:

- luma: `frame_base + (16*r − 4 + k) * (FRAME_W/4) + j`
- chroma: `frame_base + (FRAME_W/4)*FRAME_H + (8*r − 4 + k) * (FRAME_W/4) + j`

Here *k* = 0..3 is the line, *r* the macroblock row and *j* the column.
Frame DRAM is assumed to hold the luma plane in raster order, four pixels
per word. The chroma plane follows it, with Cb and Cr interleaved per
column.

The system-bus port follows these rules:

- `bus_req_valid` stays high until `bus_req_ready`.
- Exactly one `bus_rsp_valid` pulse with the data follows each accepted
  request.
- There is at most one request outstanding.

Assertions in `lpl_unit` check the first two rules.

The `up_*` outputs also report what happened to the column: D.TAG pair,
request bits, the miss class of each unit, whether data came from DRAM, the
TAGs kept for the next row, which decision-table row chose each of them, and
whether the prediction was dropped.

## Content SRAM

`content_sram_pingpong` holds two macroblock banks of 96 words each: one
4:2:0 macroblock of 8-bit samples is 384 bytes. Each bank has a single
port. The producer writes one bank while the consumer reads the other:

- `wr_done` marks the producer's bank full and moves the producer to the
  other bank.
- `rd_done` frees the consumer's bank and moves the consumer on.
- `wr_ready` is low while the producer's bank is still full.
- `rd_avail` is high while the consumer's bank holds a macroblock.

Read data come one cycle after `rd_en`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `FRAME_W` | 1920 | luma width in pixels (1080HD) |
| `FRAME_H` | 1088 | luma height in pixels, 1080 rounded up to whole macroblocks |
| `SLICE_DEPTH` | 480 | slice SRAM words (32 bits) |
| `CHROMA` | 1 | keep the 4:2:0 chroma upper lines as well as luma |
| `MB_WORDS` | 96 | content SRAM words per bank |
| `ADDR_W` | 24 | system-bus word-address width |

`FRAME_W` must be a multiple of 4 and `FRAME_H` a multiple of 16. For QCIF
use 176 × 144; for CIF use 352 × 288.

## Departures and open points

- **Lookahead on pixels only.** The LPL scheme covers upper-neighbour
  pixels, four lines of luma and 4:2:0 chroma. The syntax-element rows are
  kept in full. The MBAFF same-parity rows are not built; a decoder for
  MBAFF streams needs them too.
- **One copy for both units.** Deblocking needs four lines and intra
  prediction needs one. The design stores all four lines whenever either
  predicted TAG is set, instead of keeping separate stores.
- **TAG buffer size.** The TAG buffers are sized as two rows of 4-pixel
  columns: 2 × 480 bits per unit at 1080HD. The published description
  gives "2W bits", with W the frame width. That figure reads either as
  counted in columns, as here, or in pixels.
- **Predictor.** Only the multi-dimensional 4x3 template is built. The
  simpler 1-tap vertical predictor (x = g) it improves on is not.
- **Near-horizontal modes.** The set of modes that count as near-horizontal
  (intra 4x4 modes 1 and 8, intra 16x16 mode 1) comes from the H.264/AVC
  mode list. "Not filtered" is read as bS = 0.
- **Own choices.** The slice SRAM depth, its circular organisation, the
  drop-on-full rule, the column handshake, the word packing, the bus
  protocol and the DRAM layout are all this design's choices.
- **What the content SRAM leaves out.** It is the two-bank ping-pong memory
  only. It is not connected to DRAM, since its DRAM refill of upper
  neighbours is what the slice SRAM replaces.
- **Outside the design.** The register files, decoding ALUs, I/O bridge and
  frame DRAM are not part of it.
- **Reset.** Reset is asynchronous and active low. It clears the control
  state and the TAG buffers. The SRAM arrays are not reset.

## Files

`rtl/`:

- `lpl_pkg.sv`: types (`blk_info_t`, `tag_pair_t`, `rule_e`, `cmp_e`) and
  constants.
- `lpl_tag_predict.sv`: D.TAG from mode and bS.
- `lpl_tag_decision.sv`: the 4x3 template decision table.
- `lpl_tag_buffer.sv`: two TAG rows of one unit.
- `lpl_tag_cmp.sv`: N.TAG / D.TAG compare and miss class.
- `slice_sram.sv`: circular slice SRAM.
- `lpl_unit.sv`: the LPL controller, which instantiates all of the above.
- `content_sram_pingpong.sv`: the ping-pong content SRAM.
- `slice_syntax_sram.sv`: the syntax-element rows of the slice SRAM.
- `h264_mem_hier_top.sv`: the top.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`.

- `tb_lpl_unit` runs three 48 × 128 frames against a separate reference
  model, with a slice SRAM of only four columns.
- `tb_h264_mem_hier_top` runs one full 1920 × 1088 frame at the default
  parameters while 64 macroblocks pass through the content SRAM and three
  rows of syntax elements pass through the syntax rows.

Both testbenches behave as follows:

- They check every output of every column, the latency of columns served
  without DRAM, and the number of bus reads.
- They generate spatially correlated block modes.
- A DRAM model returns a word that is a fixed function of its address.
- Every mechanism listed above must occur at least once: hits, both kinds of
  miss, fetch, store, drop, each decision-table row, back-pressure and bank
  swaps.

- `tb_lpl_workloads` runs the frame sizes of the published miss-rate
  study: QCIF (176 × 144) and CIF (352 × 288), two frames each. It also
  sweeps the slice SRAM depth at QCIF. It instantiates `lpl_harness`, the
  same checker as `tb_lpl_unit` packaged as a module with a seeded mode
  generator. It checks that every depth sees the same TAG stream, that a
  full-row SRAM never drops a prediction, and that DRAM traffic does not
  fall as the SRAM shrinks. One run printed:

| frame | slice SRAM (bits) | TAG miss rate | DRAM words per frame |
|---|---|---|---|
| QCIF | 11,264 (full row) | 0.324 | 632 |
| QCIF | 5,632 | 0.334 | 880 |
| QCIF | 2,816 | 0.364 | 1,260 |
| QCIF | 1,280 | 0.391 | 1,500 |
| QCIF | 512 | 0.399 | 1,624 |
| CIF | 22,528 (full row) | 0.351 | 1,908 |
| CIF | 2,816 | 0.479 | 7,552 |

  The mode streams are random with a 70 % chance of repeating the column
  above. The numbers therefore show the shape of the size/bandwidth
  trade-off, not the rates of real video.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

```
verilator --binary --timing --assert rtl/lpl_pkg.sv \
          $(ls rtl/*.sv | grep -v lpl_pkg) \
          tb/tb_h264_mem_hier_top.sv --top-module tb_h264_mem_hier_top
./obj_dir/Vtb_h264_mem_hier_top
```

The package must come first. Swap in any other `tb_*` for a single block;
`tb_lpl_workloads` also needs `tb/lpl_harness.sv` on the command line.
The full-frame run takes a few seconds.
