# DHP hit data path: zero suppression, column FIFOs, one-hit-per-clock hit finder

A pixel readout chip receives one row of 64 pixels, 8 bits each, every 25 ns
(40 MHz). A frame has 768 rows, so a new frame starts about every 19.2 µs. Only
a few percent of the pixels carry a signal. The chip must keep those pixels,
give each one an address and send it out on a serial link of 1.6 Gbit/s. About
80 % of that rate carries data, which is 1.28 Gbit/s. Data is lost where a
queue overflows, so the question is how large the queues must be, and how fast
the stage that empties them must run.

This RTL implements the variant that answers that question with little area:

- a **hit finder** that takes one hit out of the column queues on every
  80 MHz clock, however the hits are spread over the rows;
- **64 column FIFOs of depth 16** in front of the hit finder;
- an **output FIFO of 256 hit words** behind it.

It also implements the compact **16-bit row-header output format**. This format
sends a row address once and then only column and ADC value for each hit.

```
 in_adc[64] x 8 bit ──► zero_suppress ──► fifo_array1 ──► hit_finder ──► sync_fifo ──► data_formatter ──► out_word[15:0]
 in_valid (40 MHz)      row/frame count   64 x 16 x 18b   1 hit/clock    256 x 24b     frame hdr / row        (to the serial
                        keep ADC != 0     drop when full  row order      (Fifo 2)      hdr / data words        link, 1 word/clk)
                                 ▲                             │                             │
                                 └──── hit finder position ────┘                   cm_row ──►│◄── cm_value
                                       (order guard)                              (common-mode lookup)
```

Everything runs on a single 80 MHz clock. `in_valid` is high on every second
clock, and that gives the 40 MHz row rate.

## Addresses and words

| Word | Bits | Fields (most significant first) |
|---|---|---|
| column FIFO entry | 18 | row (10), ADC (8). The column is the FIFO's index. |
| hit word (output FIFO) | 24 | row (10), column (6), ADC (8) |
| frame marker (output FIFO) | 24 | frame ID (16, spread over the row and column fields), ADC = 0 |
| frame header (link) | 32, as 2 words | data type (3), reserved (5), chip ID (8), frame ID (16). The upper word is sent first. |
| row header (link) | 16 | 0, row (9), common mode (6) |
| data word (link) | 16 | 1, column (7), ADC (8) |

On the link, a "row" is 128 pixels, which is two physical rows. The 9-bit row
is `row[9:1]` and the 7-bit column is `{row[0], col}`. A row header is sent only
when the 9-bit row changes, and only if that row holds a hit. The frame header
is sent at the start of every frame, even a frame with no hits. Its data type
is 1 ("processed"); the parameter `DATA_TYPE` of `data_formatter` can change it.

Note on decoding: the first word of a frame header has bit 15 = 0, so its
structure looks like a row header. A receiver must know where a frame begins
from the link's own framing. `out_is_frame_header` marks these words at the
output of the formatter.

## The hit finder and how it keeps order

This is the part of the design that needs the most care.

**Selection.** On each clock the hit finder looks at the head entry of all 64
column FIFOs. A column FIFO holds its hits in row order, because rows are
written in order. The hit finder keeps `hf_row`, the row of the last hit it
took. Among the heads whose row is at or after `hf_row`, it takes the one
with the lowest row, and on a tie the lowest column. It writes that hit to the
output FIFO and pops that column, all in the same cycle. The output is
therefore sorted by row and then by column. That order is what lets the
formatter send one row header per row. Moving to the next row, or skipping
empty rows, costs no cycle. The selection is a tree of compare-and-select
stages, 6 levels deep for 64 columns. At each stage the left input covers the
lower columns and wins a tie.

**Frames.** The 18-bit column entries carry no frame number. A head entry
belongs to the current frame if its row is at or after `hf_row`. It belongs to
the next frame if its row is smaller. Sometimes no head belongs to the current
frame while the input stage is already writing a later frame (`wr_frame !=
hf_frame`). The hit finder then writes a **frame marker** instead of a hit,
moves to the next frame and restarts at row 0. A marker is a hit word with
ADC = 0. Real hits never have ADC = 0, because zero suppression removes them.
The marker travels through the output FIFO in order and becomes the frame
header. After reset the hit finder stands "before frame 0", so frame 0 also
gets a header.

**Order guard.** This way of telling frames apart is correct only while the
hit finder is less than one whole frame behind the input. In normal operation
it is far closer than that. If the link stops for a long time, though, the
output FIFO fills and the hit finder stalls, and the input keeps running. The
input stage therefore refuses a row that is a whole frame or more ahead of the
hit finder's position. It counts that row's hits in `lost_guard`.

**Stalls.** When the output FIFO is full the hit finder does nothing, and the
column FIFOs take up the backlog. No hit is lost behind the hit finder.

## Where data is lost

| Counter | Cause |
|---|---|
| `lost_fifo1` | A hit arrives for a column FIFO that is full. |
| `lost_guard` | A row arrives a whole frame ahead of the hit finder (after a long link stall). |

Every hit that enters is either delivered or counted in one of these two
counters. The end-to-end testbench checks this rule. `max_fill1` holds the
highest column FIFO fill level since reset. `fifo2_count` is the current fill
level of the output FIFO.

## Rates and sizes

- **Input:** one row of 64 pixels every 2 clocks. At occupancy p, the input
  brings 32·p hits per clock. That is 0.96 hits per clock at 3 %, which is
  below the hit finder's 1 hit per clock.
- **Link:** one 16-bit word per clock, which is 1.28 Gbit/s. A 128-pixel row
  holds at least one hit with probability 1 − (1−p)^128. This gives:

  | Occupancy | Data words / clock | Row headers / clock | Total words / clock | Fits in 1 word / clock? |
  |---|---|---|---|---|
  | 2 % | 0.64 | 0.23 | 0.87 | yes |
  | 3 % | 0.96 | 0.245 | 1.2 | no |

  Without triggers, the limit is therefore a little above 2 %. At 3 %,
  readout must skip frames, for example through triggers at about 30 kHz
  against a frame rate of about 50 kHz. This RTL has no trigger selection.
- **Measured** with `tb_occupancy_scan`, 8 frames per point, link at one word
  per clock:
  - 2 %: no loss, 0.87 words per clock, column FIFO fill at most 2.
  - 3 %: 9.5 % of the hits lost once the output FIFO and the column FIFOs are
    full.
- **Storage:**
  - column FIFOs: 64 × 16 × 18 bit = 18 kbit;
  - output FIFO: 256 × 24 bit = 6 kbit.

  Other depths can be set through the parameters of `dhp_top`.

## Top-level interface (`dhp_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 80 MHz clock; asynchronous active-low reset |
| `in_valid` | in | 1 | a pixel row is on `in_adc`; high at most every second clock |
| `in_adc` | in | 64 × 8 | ADC values of one row, 0 = no hit |
| `chip_id` | in | 8 | chip ID for frame headers |
| `cm_row` / `cm_value` | out / in | 9 / 6 | common-mode lookup; `cm_value` must answer `cm_row` in the same cycle |
| `out_valid`, `out_word`, `out_ready` | out, out, in | 1, 16, 1 | link words; a word is taken when `out_valid && out_ready` |
| `out_is_row_header`, `out_is_frame_header` | out | 1 | kind of the current word |
| `lost_fifo1`, `lost_guard` | out | 32 | loss counters |
| `max_fill1`, `fifo2_count` | out | 5, 9 | FIFO fill levels |
| `hf_stall`, `frame_marker_now` | out | 1 | hit finder is held up by a full output FIFO; a frame marker is written now |

Parameters: `N_COLS` = 64, `N_ROWS` = 768, `FIFO1_DEPTH` = 16,
`FIFO2_DEPTH` = 256.

Latency: a row is registered one clock after `in_valid`. Its hits can leave
the hit finder on the next clock. The output FIFO and the formatter are
first-word-fall-through, so a hit can reach `out_word` one clock after it is
written into the output FIFO.

## Files

| File | Contents |
|---|---|
| `rtl/dhp_pkg.sv` | word types, the frame-marker helpers |
| `rtl/sync_fifo.sv` | FIFO, used for the output FIFO and for each column FIFO |
| `rtl/zero_suppress.sv` | row and frame counting, zero suppression, order guard |
| `rtl/fifo_array1.sv` | 64 column FIFOs with loss counting |
| `rtl/hit_finder.sv` | one-hit-per-clock hit finder, frame markers |
| `rtl/data_formatter.sv` | 16-bit frame header / row header / data word output |
| `rtl/dhp_top.sv` | the data path |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_occupancy_scan` |

## What is not here

- **Serial link:** the protocol core that sends the words at 1.6 Gbit/s. The
  top ends at a 16-bit valid/ready word stream. The testbenches model the
  link as a sink that takes a word on chosen cycles.
- **Common-mode value:** how it is computed or stored is not defined here. The
  formatter only asks for it per 9-bit row.
- **Trigger selection of frames:** every frame is read out.
- **ADC front end chip:** it is represented by the `in_adc` input.

## Design choices beyond the basic architecture

These are choices of this implementation, not fixed properties of the
architecture:

- The 40 MHz input and the 80 MHz core run on one clock, with an input strobe
  instead of two clock domains.
- Zero suppression is a compare with zero. There is no threshold or pedestal.
- A full column FIFO drops the new hit. A full output FIFO stalls the hit
  finder.
- The selection rule of the hit finder, the frame markers and the order guard
  (see above).
- The frame header goes out as two 16-bit words, upper half first. The data
  type codes are 0 = raw and 1 = processed.
- The address reordering `row9 = row[9:1]`, `col7 = {row[0], col}`.
- Reset clears counters and empties all FIFOs.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/dhp_pkg.sv tb/tb_dhp_top.sv --top-module tb_dhp_top
./obj_dir/Vtb_dhp_top
```

Replace `tb_dhp_top` with any other testbench in `tb/`.

- `tb_dhp_top` runs the default-size design through these phases:
  1. 1 % occupancy, where no loss is allowed;
  2. an empty frame;
  3. 3 % occupancy with the link stopped for two frames, which fills the
     output FIFO, stalls the hit finder, overflows the column FIFOs and
     triggers the order guard;
  4. a drain.

  A scoreboard checks every delivered pixel (frame, row, column, ADC), the
  frame IDs, the common-mode values and the order. It also checks that
  delivered plus lost equals sent. It takes a few seconds.
- The unit testbenches check:
  - FIFO behaviour against queue models;
  - the hit finder's output order and its one-word-per-clock rate, with
    overlapping frames and random stalls;
  - the formatter's word stream against words built from the format
    definition.
