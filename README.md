# Intensified CMOS-APS photon counter: FPGA logic

Behind a micro-channel-plate image intensifier, a single photon becomes a
small spot of light, a few pixels wide, on the phosphor screen. A
1024 x 1024 CMOS active pixel sensor (APS) looks at that screen. The useful
result is not the image but a list of photon positions, each found to a
fraction of a pixel. This RTL is the FPGA that turns the sensor's pixel
stream into that list in real time:

* It reads the sensor one row at a time, 64 bits (eight 8-bit pixels) per clock.
* It slides a 3 x 3 window over every pixel. Eight windows are handled per clock.
* It keeps a window when its centre is a local peak above a discrimination level.
* For each kept window it computes the three-point centre of gravity in x and y.
* It sends one 32-bit word per photon to the host, over an 8-bit parallel
  port or a 16-bit optical link.

A second mode, the frame grabber, stores raw frames in an external ZBT SRAM
and reads them back later at the link's pace. It is used to look at the spots
themselves, for example to choose the threshold.

## Data flow

```
 pixel clock (clk_cmos)                                   host clock (clk_sys)
 ------------------------------------------------------   ---------------------------------
 sensor --64b--> aps_driver --> row_buffer --> window_latches --> 8 x (event_validate + center_cog)
                     |          (3 x 128x64     (8 windows        |
                     |           row FIFOs)      of 3x3 / clk)     v  row/column registers
                     |                                       8 event words / clk
                     |                                            v
                     |                                    event_fifo_bank (4 FIFOs, lanes paired)
                     |                                            v
                     |                                    4 x async_fifo ========> fifo_arbiter --+
                     |                                                                            |--> word_serializer 32->8  --> parallel port
                     +--(frame grabber mode)--> async_fifo (81 b) ==> frame_grabber <-> ZBT RAM  -+--> word_serializer 32->16 --> optical link
```

`photon_counter_top` wires this together. `mode` picks centroid or frame
grabber. `link_sel` picks the link. Both, and `first_row`, `num_rows` and
`threshold`, are meant to stay fixed while a frame is taken.

The design has two clock domains:

* The pixel domain runs on the sensor clock. The published detector runs it
  at 20, 40 or 50 MHz.
* The host domain drives the links and the RAM. A 120 MHz PLL is shown for
  it; here it is simply an input clock.

The two domains meet only in the asynchronous FIFOs. These use Gray-coded
pointers and two-flop synchronisers. The host clock must run at least twice
as fast as the pixel clock. Otherwise a frame grab loses data, and that loss
is flagged on `fg_overrun`.

## Driving the sensor (`aps_driver`)

The sensor converts a whole row at once, with one ADC per column. It then
moves the row into a "ping-pong" output register. That register is shifted
out 64 bits per clock while the next row converts. The driver overlaps the
two steps. For row i it does the following:

1. It sets `ROW ADDRESS` and pulses `ROW_START_N`. This starts converting row i.
2. It holds `DATA_READ_EN_N` low for 128 clocks. This reads out row i-1.
3. It waits for `ROW_DONE_N` low. A low level counts only if the line has been
   high since step 1. Without this rule, the done flag left over from the
   previous frame's last row would be taken as this row's.
4. It pulses `LOAD_SHFT_N`. This copies the ADC register into the output register.

`LOGIC_RST_N` is pulsed once before each frame. A frame is `num_rows` rows
(3 to 1024) from `first_row`. Reading a window of rows is how the frame rate
is raised.

Timing: one row takes max(conversion + 4, 128 + 3) clocks. With a fast
conversion, a full frame takes 1024 x 131 = 134,144 clocks:

| pixel clock | full frame | half frame (512 rows) | published figure |
|---|---|---|---|
| 20 MHz | 149 frames/s | 298 frames/s | 160 frames/s |
| 40 MHz | 298 frames/s | 596 frames/s | 320 frames/s |
| 50 MHz | 373 frames/s | 745 frames/s | 400 full, 800 half |

The published rates imply about 122 clocks per row. That is less than the
128 clocks the same description gives for reading out one row. So this
design follows the 128-clock readout and ends up about 7 % slower.

Pixel words leave the driver two clocks after their read enable. They carry
tags for row and word index and for start and end of frame. Pixel p of a word
sits in bits 8p+7..8p and is column 8·word + p.

## From rows to windows

`row_buffer` holds the last three rows in three cascaded synchronous FIFOs of
128 x 64 bits, chained as row delays. When a word of row n arrives, the same
word position of rows n-3, n-2 and n-1 comes out, and the window's centre row
n-2 is tagged on it. Once a frame's last word has passed, the buffer pushes one row of zero
words by itself. This flush row processes the frame's last valid centre row
without waiting for the next frame. A new frame clears the buffer.

`window_latches` keeps the current and the previous word of the three rows.
When word k arrives, it emits the eight windows centred on the pixels of word
k-1. It has all their left and right neighbours at that point. After the last
word of a row, it emits the final eight windows one clock later, with the
right neighbours set to zero. The result is eight complete 3 x 3 windows per
clock, indexed `[lane][row][column]`.

## Which windows are photons (`event_validate`)

A window holds an event when all three of these are true:

* Its centre pixel b is above `threshold`. The comparison is strict.
* b is **strictly greater** than the four neighbours that come before it in
  raster order: the three above it and the one to its left.
* b is **greater than or equal to** the four neighbours that come after it.

Because of this asymmetric tie rule, a flat-topped spot (two equal maximum
pixels) gives exactly one event, not zero or two. It also means that two
horizontally adjacent pixels are never both events. The event FIFOs rely on
that (see below).

Windows with the centre in column 0 or column 1023 are never valid, because
they lack a neighbour. The same holds for the first and last row of a frame,
since those rows are never a centre row.

## Centre of gravity and the event word (`center_cog`, `centroid_engine`)

With a, b, c the three pixels through the centre, the offset is (c−a)/(a+b+c):

* For x, a, b, c are left, centre and right.
* For y, a, b, c are above, centre and below.

The offset is computed as trunc(32·(c−a)/(a+b+c)), a signed number in units
of 1/32 pixel. Because b is the largest of the three, the value lies in
−16..+16. The divider is combinational, one per axis per lane, 16
dividers in all.

`centroid_engine` registers each lane's result as a 32-bit word:

| bits | 31..22 | 21..12 | 11..6 | 5..0 |
|---|---|---|---|---|
| field | row | column | dy (signed, 1/32 px) | dx (signed, 1/32 px) |

The photon position is (column + dx/32, row + dy/32). An event word appears
two clocks after the pixel word that completes its window enters the engine.

## Getting events to the host

`event_fifo_bank` has four synchronous FIFOs of 256 words. Lanes 2i and 2i+1
share FIFO i. The tie rule means the two lanes never fire in the same clock,
so each FIFO takes at most one word per clock. If a FIFO is full, the event
is dropped and counted in `n_dropped`. Each FIFO drains into its own
asynchronous FIFO of 512 words.

In the host domain, `fifo_arbiter` takes the four streams in round-robin
order. A `word_serializer` then cuts each word into slices, most significant
slice first:

* four bytes for the parallel port;
* two half-words for the optical link.

Both links have a valid/ready handshake. The host can therefore stall: the
FIFOs fill, and events are dropped only at the synchronous FIFOs, where they
are counted. A word that has entered an asynchronous FIFO is never lost.

## Frame grabber mode (`frame_grabber`)

In frame grabber mode, the pixel words cross to the host clock through a
fifth asynchronous FIFO, together with their row and word tags. There,
`frame_grabber` writes each 64-bit word to the ZBT RAM as two 32-bit words.
The address is `{row − first_row [8:0], word [6:0], half}`.

The RAM is 128 K x 32 bits, so it holds 512 full-width rows, which is half a
frame. Rows beyond that are not stored; their words are counted in
`n_skipped`. A 512 x 512 image fits, stored as 512 full rows.

The RAM is modelled as pipelined ZBT. The address is issued in one clock and
the data moves two clocks later, for both reads and writes. The grabber
therefore delays its write data by two clocks. On reads it keeps a small
output buffer, so that no returning word can overflow it when the link
stalls.

A pulse on `fg_read_start` reads `fg_read_len` words back through the
selected link. The first word is address 0.

## Parameters (`photon_counter_top`)

| parameter | default | meaning |
|---|---|---|
| NUM_ROWS | 1024 | sensor rows |
| WORDS_PER_ROW | 128 | 64-bit words per row (1024 pixels) |
| EV_FIFO_DEPTH | 256 | depth of each of the four synchronous event FIFOs |
| AF_DEPTH | 512 | depth of each clock-crossing FIFO |
| PIX_FIFO_DEPTH | 256 | depth of the frame grabber's clock-crossing FIFO |
| ZBT_ADDR_W | 17 | RAM address width (128 K words) |

These values come from the published detector:

* the sensor size;
* 64 bits per clock and 128 clocks per row;
* four event FIFOs and four asynchronous FIFOs;
* 32-bit event words;
* 8- and 16-bit links;
* the 128 K x 32 RAM.

All FIFO depths are this design's choice. The published block diagram's
asynchronous FIFOs appear to be about 511 x 32; 512 is used here.

Shared types (`pixel_t`, `window_t`, `event_t`) and widths are in
`rtl/pc_pkg.sv`. `sync_fifo` is a helper used for the row FIFOs, the event
FIFOs and the grabber's output buffer.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/pc_pkg.sv \
          tb/tb_photon_counter_top.sv --top-module tb_photon_counter_top
./obj_dir/Vtb_photon_counter_top
```

Replace the testbench name to run another one.

* `tb_photon_counter_top` runs the whole design at reduced size: 64 rows of
  8 words, small FIFOs and a 512-word RAM. It covers these cases:
  * centroid frames over both links;
  * windowed frames;
  * a host stall that makes events drop;
  * a frame grab larger than the RAM, read back;
  * back-to-back frames, with conversion overlapping readout.

  It counts each of these mechanisms and fails if any never happened. The
  received events are compared with an independent software reference.
* `tb_photon_counter_full` uses every default. It covers these cases:
  * a full 1024 x 1024 frame over the optical link;
  * a half frame over the parallel port;
  * a stalled full frame;
  * a 600-row grab (512 rows stored), read back completely.

  It also times a full and a half frame. It measures 134,250 and 67,179 pixel
  clocks, including frame start-up. It runs in a few seconds.
* The other testbenches exercise one block each. Some use smaller widths or
  depths.

The testbenches share some helpers:

* `tb/aps_model.sv` models the sensor's digital interface. It has a
  programmable conversion time and an image array.
* `tb/zbt_model.sv` models the RAM.
* `tb/pc_harness.sv` is the test harness for the full design.

## Where this design goes beyond, or differs from, the published detector

These points follow the published description:

* the block chain and the eight-windows-per-clock structure;
* the three-point truncated centre of gravity;
* the four-plus-four FIFO structure;
* the link widths;
* the RAM size;
* the sensor signal names (ROW ADDRESS, ROW_START_N, DATA_READ_EN_N,
  LOAD_SHFT_N, LogicRST, RowDone).

These are this design's own choices:

* **Sensor timing.** The order of the control pulses, the RowDone handshake,
  and the one-clock sensor read latency. The sensor's datasheet timing was
  not available.
* **Validation.** The tie rule, the edge rule, and the strict threshold.
* **Numbers.** Sub-pixel precision of 1/32 pixel with truncation, and the
  event word layout.
* **Row handling.** The cascaded row FIFOs with a flush row, and the
  two-clock engine latency.
* **Event FIFOs.** The lane pairing, and the drop-and-count policy at full
  FIFOs.
* **Links.** Round-robin merging, most-significant-slice-first order, and
  valid/ready handshakes at the links.
* **Frame grabber.** The separate clock-crossing FIFO, the RAM address map,
  the two-clock ZBT pipeline, and host-started read-back.
* **Frame rate.** It is about 7 % below the published figures (see the
  table above).

The RAM holds half a full frame. The published text gives 128 K words of
32 bits, while a diagram label suggests room for a full 1024 x 1024 x 8-bit
frame. This design follows the text. A full-frame grab therefore stores its
first 512 rows.

Not included:

* the intensifier, the optics, the sensor itself, the RAM chip, the PLL and
  the power supply;
* bias and telemetry generation, whose signals are not specified;
* the parallel-port protocol and the optical transceiver and its framing. The
  design stops at byte and half-word streams.
* loading the configuration from the host. The mode and settings are plain
  input ports.
