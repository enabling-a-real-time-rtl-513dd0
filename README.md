# Real-time vessel-direction filter for retinal images

Tracing the blood vessels of a retinal fundus image needs, at every point, the
local vessel direction. The tracing algorithm gets it from sixteen 11x11
"matched" templates, 22.5 degrees apart. Each template responds to a pair of
parallel edges in one orientation, and the template with the largest response
gives the direction. Evaluating sixteen 2-D templates for every pixel is far
too slow in software to keep up with a camera. Yet each template uses only
additions and shifts, and all sixteen are independent.

This RTL evaluates the sixteen templates on every pixel of a live 512 x 512,
12-bit camera stream, one frame at a time. It is designed for an FPGA board
with on-board SRAM that sits between the framegrabber and the host PC. For
each pixel it stores one 32-bit word:

| bits  | field                                                     |
|-------|-----------------------------------------------------------|
| 31:20 | original 12-bit grey value                                |
| 19:16 | direction 0..15 of the largest template response          |
| 15:0  | that response, 17 bits with the least significant bit dropped |

The host fetches the result frame by DMA. The first results are ready about
11 camera lines after the frame starts, not a whole frame later.

## Data flow

```
framegrabber (25 MHz)                           memory clock (65 MHz)
 pixels ─► rvt_data_packer ─► toggle CDC ─► rvt_input_mem_ctrl ◄──► SRAM bank 0 / bank 1
           5 px / 64-bit word               column reads, 1 word/clk
                                                   │
                                            rvt_neighborhood (11x15 buffer)
                                                   │ five 11x11 windows / 11 clk
                                            rvt_direction (8 x rvt_response + max tree)
                                                   │
                                            rvt_result_writer ─► 32-bit output SRAM ─► DMA
                                                   │
                                            rvt_host_if (trigger / ack register)
```

`rvt_smart_camera` is the top. The SRAM chips, the framegrabber, the PCI/DMA
controller and the clock sources are board parts, so their signals are ports
of the top.

## The templates and the response arithmetic

A template holds 28 non-zero weights: seven each of +1, +2, -1 and -2. The
template for direction d+8 is the one for d with its sign flipped, so only
eight templates are computed. For each, `rvt_response`:

1. sums each group of seven taps with a three-level adder tree;
2. doubles the two x2 sums with a one-bit shift;
3. forms POS = S(+1) + 2·S(+2) and NEG = S(-1) + 2·S(-2), both as magnitudes;
4. computes POS−NEG and NEG−POS side by side while a comparator tests NEG > POS;
5. selects the non-negative difference.

The result is |response| (17 bits) and a flag that says the complement
template won. On a tie, the template itself is reported. There is a register
after every step, so the latency is 7 clocks and a new tap set can enter on
every clock.

`rvt_direction` registers the incoming window. It wires the taps of each of
the eight templates to its own `rvt_response`, then reduces the eight results
with a 3-level pipelined comparator tree. The label is d, or d+8 when the
complement flag is set. On equal responses the lower d wins. A tag (centre
pixel, address, first-of-frame flag) travels alongside. The latency is 11
clocks and one window can enter per clock.

**Template shape.** The tap positions come from `rvt_pkg::tap_pos` and are
fixed when the design is elaborated. This design reconstructs the shape; the
source gives only its properties, listed above.

Each template is a strip seven pixels long along its direction (t = −3..3),
centred on the target pixel. Across the strip, from the left of the direction
to the right, the profile is −1, −2, 0, +2, +1. The strip is drawn along the
major grid axis of the direction:

- For d = 0, 1, 2, 6, 7 the tap is at column offset t and row offset
  round(t·tan θ) ± cross offset.
- For d = 3, 4, 5 rows and columns swap roles and cot θ is used.

Here θ = d·22.5°, measured counter-clockwise, with rows growing downward. This
construction gives 28 distinct taps for every direction, and all of them fit
in the 11x11 window. To use other templates, change `tap_pos`; nothing else
depends on the shape.

## Getting 11x11 windows out of a raster stream

This is the part that sets the latency and the memory traffic.

**Packing.** `rvt_data_packer` runs on the framegrabber clock. It puts five
12-bit pixels in each 64-bit word: pixel n sits in bits [12n+11:12n] and bits
63:60 are zero. It closes the last word of every line early, with zero pixels,
so a 512-pixel line becomes 515 pixels, or 103 words. No word holds pixels
from two lines.

When a word is complete, the packer updates the word, a start-of-frame flag
and an end-of-line flag, and toggles `ready_tgl_o`. These signals then stay
unchanged for at least five framegrabber clocks (about 13 memory clocks). The
memory side passes the toggle through a two-flop synchroniser and takes the
word on the toggle's edge.

**Two interleaved banks instead of ping-pong frames.** One SRAM cannot be read
and written in the same clock, and the read side needs one word on every
clock. Storing alternate frames in alternate banks would solve that, but
processing could then only start after a whole frame had arrived.

Instead, `rvt_input_mem_ctrl` stores word j of a frame in bank j mod 2, at
address j/2. A neighbourhood column is the 11 words (r+i, w), i = 0..10,
which sit 103 words apart. Because 103 is odd, consecutive reads always switch
banks, also across columns and rows. Each bank is therefore read at most
every other clock, and a pending write goes to its bank in a clock when that
bank is not being read. A write waits at most one clock.

Each bank holds two frame regions, and successive frames alternate between
them. Every read is checked by an assertion never to collide with a write on
the same bank.

**Waiting for lines.** The memory clock runs faster than the pixel rate. One
window row takes 103 × 11 = 1,133 clocks (17.4 µs), while a camera line
arrives in 20.5 µs or more. Before each window row r, the read sequencer
therefore waits until line r+10 has been completely written (it counts the
end-of-line words). Processing can start as soon as 11 lines are in memory.
The wait also keeps the design correct if either clock is changed later.

**Sliding neighbourhood.** `rvt_neighborhood` holds an 11 x 15 neighbourhood
as three 11 x 5 sections, plus a fill bank for the next column. When the 11th
word of a column arrives, the neighbourhood moves left by five pixels in one
clock: sections 1 and 2 move to 0 and 1, and the fill bank becomes section 2.

During the next five clocks it sends the five 11x11 windows centred on the
five pixels of the middle section. The steady rate is therefore five results
every 11 clocks, about 29.5 M results/s at 65 MHz.

The neighbourhood slides along the word stream without regard to line ends.
Windows that straddle two lines, or the frame's left and right edges, give
results with no meaning; the host ignores them. Centres cover rows 5..506 of
the output frame. The first column of each frame issues nothing, so
N = 502 × 103 × 5 − 5 = 258,525 results are written per frame.

The centre address in the padded frame is 5·(k−1) + 5·515 + j, where k is the
index of the column just completed (k = r·103 + w) and j (0..4) selects the
window.

## Results and the host handshake

`rvt_result_writer` packs the 32-bit word shown above and writes it to the
output SRAM at the centre pixel's address in a 512 x 515 frame. There is one
output region, overwritten every frame. The DMA reads it while new results are
still being written.

`rvt_host_if` counts the results of the current frame and raises the trigger
register at result `TRIGGER_AT`. The host polls this register, answers with a
one-clock acknowledge, and then starts the DMA. The trigger stays low until
the next frame reaches the same count.

The DMA moves two results per 66 MHz PCI clock, about 2 ms per frame, so it is
much faster than result production (one frame per ~33 ms of camera time). To
avoid overtaking the writes, it may start only after N·(1 − q) results are
stored, where q is the production-to-DMA rate ratio. The default is N − N/32,
which leaves a margin for the host's polling delay.

A counter measures each trigger-to-acknowledge round trip
(`host_lat_cycles_o`), so the host-side delay can be characterised.

## Timing summary

| item                                                  | value            |
|-------------------------------------------------------|------------------|
| throughput                                            | 5 results / 11 memory clocks |
| `rvt_response` latency                                | 7 clocks         |
| `rvt_direction` latency                               | 11 clocks        |
| last read of a column → first result write            | 15 clocks (2 SRAM + 1 shift + 11 + 1) |
| start of frame → first window row                     | 11 lines written |
| first pixel → first stored result                     | 11 lines + 0.65 µs (232.7 µs at 512 px + 16 blank clocks per line, 25 MHz) |
| framegrabber / memory clock                           | 25 MHz / 65 MHz  |

## How far to trust it, and where it departs from the original system

Every block has a self-checking testbench. Each testbench compares the block
against an independent model: template sums computed from the tap table,
expected packed words, and the expected read-stream order.

The end-to-end test `tb_rvt_smart_camera` uses 32 x 24 frames (3 frames).
`tb_rvt_smart_camera_full` runs two full 512 x 512 frames with the top at its
default parameters, which takes a few seconds in Verilator. Both check every
stored result word against a reference filter. They also check:

- the 15-clock latency, and that the first result of a frame is stored within
  2 µs of the end of its 11th line;
- the 11-clock spacing of result groups;
- the trigger count and the round-trip counter;
- that line waits, deferred writes, reads of both banks, line padding,
  frame-region swaps, complement wins and the trigger/acknowledge handshake
  each occur.

`tb_rvt_input_mem_ctrl_overrun` runs the input memory interface with a memory
clock too slow for the re-reads, and checks that the sticky overrun flag
rises once the writer laps the reader.

The clock crossing needs the memory clock to sample the held packed word
before it changes: about three memory clocks within five framegrabber clocks.
The memory clock must therefore be above roughly 15 MHz with a 25 MHz
framegrabber clock. To keep up with the frames it must in any case run faster
than 11 × (rows read) / (lines) times the word rate (pixel rate / 5), which
is about 54 MHz for 512-line frames. The 65 MHz design point
meets both with margin.

Choices made here, not taken from the original system:

- **Template shape.** Reconstructed as described above. The coefficient
  pattern of the original filters may differ.
- **Bit layouts.** The order of pixels within the 64-bit word and of fields
  within the 32-bit result word are this design's own.
- **Control signals.** LineSync and FrameSync are taken as one-clock pulses
  that arrive with the first pixel. The host acknowledge is taken as a
  one-clock pulse synchronous to the memory clock.
- **READY.** It crosses the clock domains as a toggle.
- **Line counting.** Written lines are counted from the packer's end-of-line
  flag, not from a resynchronised LineSync.
- **Result path.** Results go from the Direction pipeline straight to the
  result writer; the original routes them back through the neighbourhood
  unit. The function is the same.
- **Pipeline fill.** It is 15 clocks from a column's last read to its result
  write. The original reports about 20 clocks to fill the pipeline plus 5 to
  write results; its register breakdown is unknown.
- **Rows computed.** Rows 0–4 and 507–511 of the output frame are never
  written; no full 11x11 window exists for them.
- **Storage.** SRAM read latency is 2 clocks (pipelined ZBT). Each input bank
  holds two frame regions, and the output memory one region.
- **Reset.** An asynchronous active-low reset is synchronised into each clock
  domain.

## Files

`rtl/`

| file                       | contents                                   |
|----------------------------|--------------------------------------------|
| `rvt_pkg.sv`               | widths, latencies, result struct, template geometry (`tap_pos`, `coef`) |
| `rvt_response.sv`          | one template / complement unit             |
| `rvt_direction.sv`         | eight units, tap wiring, comparator tree   |
| `rvt_data_packer.sv`       | 5-pixel packing and line padding (framegrabber clock) |
| `rvt_input_mem_ctrl.sv`    | clock-domain crossing, two-bank interleave, read sequencer and wait |
| `rvt_neighborhood.sv`      | 11x15 buffer and window issue              |
| `rvt_result_writer.sv`     | 32-bit result word to the output memory    |
| `rvt_host_if.sv`           | DMA trigger / acknowledge and round-trip counter |
| `rvt_smart_camera.sv`      | top                                        |

`tb/` holds one `tb_<module>.sv` per module, `tb_rvt_smart_camera_full.sv`,
`tb_rvt_input_mem_ctrl_overrun.sv`,
and `sram_model.sv`, a behavioural single-port synchronous SRAM.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/rvt_pkg.sv tb/tb_rvt_smart_camera.sv \
  --top-module tb_rvt_smart_camera -o sim
./obj_dir/sim
```

Use the same command for any other testbench: name its file and module. Lint
a module with
`verilator --lint-only -Wall -y rtl rtl/rvt_pkg.sv rtl/<module>.sv --top-module <module>`.

Parameters of the top:

- `IMG_W`, `IMG_H`: frame size. `IMG_W` must pad to an odd number of 5-pixel
  words per line; elaboration stops otherwise.
- `ADDR_W`: SRAM address width.
- `RD_LAT`: SRAM read latency.
- `TRIGGER_AT`: the DMA trigger count.

A new frame size needs no other change. Different templates need only a new
`tap_pos` in `rvt_pkg`.
