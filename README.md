# Low-latency FAST feature detection on the live pixel stream

A vision-based robot needs a steering command as soon as possible after the
camera has seen the scene. A CPU typically waits until a whole frame is in
memory, then detects features, describes them, matches them and votes on the
heading, so the acquisition time of a full frame is added to every command.
This design moves feature detection into FPGA fabric and runs it directly on
the pixels as the sensor reads them out. A feature leaves the detector a few
pixels after the last pixel of its neighbourhood has left the sensor. The
embedded processor can therefore describe and match each feature while the
rest of the frame is still arriving. Detection runs at one pixel per pixel
clock with no stalls.

The RTL here is the fabric half of such a processor-centric SoC. The processor
(a soft or hard CPU), its memory controller and the external DRAM are not
included. Their connections are the ports of the top module.

```
 sensor ──► camera_sync ──► preprocessor ──┬──► feature_detector ─────────────────► detector_interface ──► CPU (slave port + irq)
 fv/lv/data  common stream  pixel LUT      │    linebuffer(7) → fast_response →        latency subtraction,
                                           │    linebuffer(3) → nms_core                feature FIFO, registers
                                           └──► memory_buffer ──► memory controller (write master) ──► frame buffer in DRAM
```

All blocks run in one clock domain, the camera's continuous pixel clock.

## Files

| file | contents |
|---|---|
| `rtl/nav_pkg.sv` | stream bundle `pix_sync_t`, coordinate type, detector latency constants |
| `rtl/camera_sync.sv` | sensor interface → common stream |
| `rtl/preprocessor.sv` | programmable pixel look-up table |
| `rtl/line_fifo.sv` | one-line single-clock FIFO (block RAM) |
| `rtl/linebuffer.sv` | chained line FIFOs → N vertically aligned pixels |
| `rtl/fast_response.sv` | 7×7 window, pipelined FAST12 score |
| `rtl/nms_core.sv` | 3×3 non-maxima suppression |
| `rtl/feature_detector.sv` | linebuffer → response → linebuffer → NMS |
| `rtl/detector_interface.sv` | coordinates, feature FIFO, memory-mapped slave, interrupt |
| `rtl/memory_buffer.sv` | frame-buffer writer |
| `rtl/nav_fabric_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module (`tb_nav_fabric_top` is the full-size end-to-end test) |

## The common video stream

Every block from `camera_sync` on uses the same stream: `pixel_data` plus the
bundle `pix_sync_t` = {`blank`, `h_sync`, `x_cnt`, `y_cnt`}. The signals are
valid on the rising pixel-clock edge. `blank` is high in the blanking areas.
`h_sync` is a one-clock pulse together with the first active pixel of each
line. `x_cnt` and `y_cnt` are the coordinates of the pixel on that clock.
Downstream blocks rely on one rule: every line has exactly `IMG_W` active
pixels. `camera_sync` enforces it. It blanks pixels beyond column `IMG_W-1`
and lines beyond row `IMG_H-1`. A line of any other length sets the sticky
`sync_error` flag. A short line is flagged but not padded, so the line buffers
lose alignment until the next reset.

Because the stream format is fixed, `preprocessor` can be replaced by any
other pixel-wise block, or removed. Here it is a 1024-entry table that maps
10-bit sensor values to 8-bit pipeline values. Its initial contents are a
plain `>> 2`. The processor can load a histogram-equalisation or gamma curve
through `lut_we/lut_addr/lut_wdata`, even while the stream is running. The
preprocessor adds one clock of latency to data and sync alike.

## Line buffers and the active-pixel clock enable

This is the part that everything else depends on. A window detector needs
`n` vertically aligned pixels at once. `linebuffer` keeps `n-1` one-line FIFOs
in block RAM, chained output to input. A counter of `h_sync` pulses enables
the read of FIFO *k* once line *k+1* starts. The write of FIFO *k+1* follows
one pixel later, because a block-RAM read port is registered. The input pixel
is registered once as well, so all `n` taps change on the same edge. After
that start-up, each FIFO reads and writes once per pixel and stays one line
deep.

The entire detector (both line buffers, both windows, the response pipeline
and the NMS output register) advances **only on active pixels**. The clock
enable is `en = !blank`. Blanking of any length, inside a line or between
lines and frames, therefore has no effect. The detector output is a function
of the sequence of active pixels alone, and its latency is a fixed number of
active pixels:

* after the edge of active pixel *s*, `taps[k]` of a line buffer holds pixel
  *s − k·IMG_W*;
* the FAST window centre is 3 lines and 3 columns back, and the three
  response pipeline stages add 3 more pixels;
* the response line buffer adds one input register, the NMS window adds one
  line and 2 columns, and the NMS output register adds one more pixel.

Taken together: **on the clock of active pixel *s*, `feat_valid/feat_score`
describe pixel *s − (4·IMG_W + 12)*.** These are `FD_LAT_Y = 4` and
`FD_LAT_X = 12` in `nav_pkg`. If you change a pipeline stage, update these
constants. `tb_feature_detector` checks them.

One consequence: the last few features of a frame (bottom rows, right-hand
columns) come out only when the first pixels of the next frame push them
through. With continuous video this costs nothing. With a single frame, send
`FD_LAT_X` more active pixels to flush them.

## FAST12 response

`fast_response` shifts the seven taps into a 7×7 register window. The FAST12
test looks at the 16 pixels on a radius-3 circle around the centre *c*. A
circle pixel is *bright* if it is above *c + t* and *dark* if it is below
*c − t*. The centre is a corner if 12 circularly contiguous circle pixels are
all bright or all dark. Non-maximum suppression needs a value to compare. For
corners the response is

  V = max( Σ_bright (p − c − t), Σ_dark (c − p − t) )

taken over all 16 circle pixels. Elsewhere it is 0. The computation is split
into three stages, each enabled by `en`:

1. per-pixel flags and excesses;
2. the 12-of-16 arc test, plus sums over four groups of four;
3. the final sums and the selection.

The response is `DW+4 = 12` bits wide, which is enough for 16 differences of
8-bit values. `t` is the input `fast_threshold`.

## Non-maxima suppression

`nms_core` uses a 3-line line buffer of responses and a 3×3 register window.
The centre is a feature when it is above `nms_threshold` and is a local
maximum of its eight neighbours. Equal values are resolved in raster order.
The centre must be strictly greater than the row above and its left
neighbour, and at least equal to its right neighbour and the row below. So of
two equal adjacent maxima exactly one, the earlier one, is kept.

## Detector interface: coordinates without carrying coordinates

The pipeline does not carry coordinates. Its latency is fixed, so
`detector_interface` subtracts it from the `x_cnt/y_cnt` of the pixel that
enters the detector on the same clock. It subtracts `FD_LAT_X` from the
column, borrowing one row if the result is negative. Then it subtracts
`FD_LAT_Y` from the row, modulo `IMG_H`, because a bottom-row feature may come
out after the next frame has started. Features within `BORDER = 4` pixels of
the edge are dropped, since their windows reach outside the image. The border
is 3 for the FAST circle plus 1 for NMS.

Accepted features `{x, y, score}` go into a 256-entry FIFO. When it is full,
new features are dropped and a sticky overflow flag is set. The slave port
uses word addresses and 32-bit data. Reads return data one clock after
`s_read`, and the port never stalls.

| addr | name | access | contents |
|---|---|---|---|
| 0 | STATUS | r | [15:0] features waiting, [16] empty, [17] overflow, [18] interrupt enable |
| 1 | FEAT_XY | r | [15:0] x, [31:16] y of the oldest feature (no side effect) |
| 2 | SCORE | r | response of the oldest feature; **the read removes it** |
| 3 | CONTROL | r/w | [0] interrupt enable; write 1 to [1] to clear overflow |

Software reads FEAT_XY, then SCORE. It can poll STATUS, or set the interrupt
enable and wait on `irq`. `irq` is a level that stays high while the enable is
set and the FIFO is not empty.

## Memory buffer: sharing the image with the processor

The fabric holds only a few lines, but the descriptor (BRIEF in the intended
software) needs the image around each feature. `memory_buffer` therefore
writes every active pixel to a frame buffer in external memory. Pixels are
packed four to a 32-bit word, little-endian, with the lowest column in bits
7:0. The word for pixels *x..x+3* of row *y* goes to byte address
`frame_base + y·IMG_W + x`. The address restarts at `frame_base` with pixel
(0,0). The master port holds `m_address/m_write/m_writedata` until the
memory drops `m_waitrequest`. An assertion checks this rule.

A 16-word FIFO absorbs wait states. The average write rate is one word per
four pixels. If the memory stalls long enough to fill the FIFO, words are
lost and `mb_overflow` is set. `status_clr` clears both sticky flags of the
top.

The interrupt for a feature in row *y* comes while row *y + 4* is arriving.
At that point the rows below it are not yet in memory. Software must wait
until the rows its descriptor patch covers have been written.

## Timing summary

| from → to | latency |
|---|---|
| sensor pins → `camera_sync` outputs | 2 clocks |
| `preprocessor` | 1 clock |
| detector input → feature queued | 4 lines + 12 active pixels |
| last pixel of a feature's 9×9 neighbourhood leaves the sensor → feature in FIFO | 8 active pixels + 3 clocks |
| throughput | 1 pixel per pixel clock, no back-pressure |

At a 27 MHz pixel clock, 11 clocks is about 0.4 µs. Waiting for a whole
640×480 frame to be read out would take milliseconds.

## Parameters (top level)

| parameter | default | meaning |
|---|---|---|
| `CAM_DW` | 10 | sensor data width |
| `PIX_W` | 8 | pipeline pixel width (the memory buffer needs 8) |
| `IMG_W`, `IMG_H` | 640, 480 | active image size; `IMG_W` must be a multiple of 4 |
| `RESP_W` | 12 | response width |
| `FEAT_DEPTH` | 256 | feature FIFO entries |
| `MB_DEPTH` | 16 | memory-buffer FIFO words |

The fixed configuration inputs `fast_threshold`, `nms_threshold` and
`frame_base` would come from a GPIO block of the processor subsystem.

The workloads this design was sized for:

* **640×480 at 60 fps** fits the defaults. That is 18.4 Mpixel/s, one pixel
  per clock.
* **200 features per image** fit in the 256-entry FIFO, even if the processor
  reads none of them during the frame. `tb_workload` runs this case at
  60 fps sensor timing: 27 MHz pixel clock, 857 clocks per line, 525 lines
  per frame. Its processor model spends a fixed time on each feature. At
  71.7 µs per feature (200 features in 14.3 ms, a hard-core CPU class), every
  frame's features are processed 0.3 ms after its readout ends, before the
  next frame starts. At 120.7 µs per feature (24.1 ms, a soft-core CPU
  class), the processor falls behind by about 60 features per frame. The
  FIFO peaks at 139 entries after two such frames and would overflow after a
  few more.
* **1920×1080 at 60 fps** (124 Mpixel/s active) does not fit the defaults:
  the line FIFOs hold only 640 pixels. With `IMG_W=1920, IMG_H=1080` the
  same RTL holds it, with 8 line FIFOs of 1920 words. `tb_workload` also
  runs this size for two frames, with a 148.5 MHz pixel clock and 2200×1125
  total clocks per frame. All 200 features per frame match the model, and
  at 71.7 µs per feature each frame is processed 0.18 ms after its readout.
  Whether an FPGA reaches a 148.5 MHz clock with this RTL has not been
  checked.

A generic coarse synthesis of the top gives roughly 1000 word-level cells,
816 flip-flops and 64 kbit of memory. Most of the memory is the eight line
FIFOs, 6×640×8 + 2×640×12 bits, and the 1024×8 table.

## What follows the source design and what is this design's own

The source design specifies:

* the overall structure (the blocks and how they connect);
* the stream signals and the every-line-equal rule;
* line buffers as chained single-clock FIFOs with `h_sync`-triggered
  read/write enables, plus the input pixel as the n-th tap;
* FAST12 with pipelining;
* a 3-line buffer and 3×3 register NMS against a user threshold and eight
  neighbours;
* coordinates recomputed by subtracting the fixed latency;
* a memory-mapped slave with polling or interrupt;
* a memory buffer that shares the image with the processor;
* 640×480.

Choices made here:

* the sensor-side interface (frame/line valid), 10-bit input and 8-bit
  pipeline;
* the look-up-table preprocessor and its initial contents;
* the active-pixel clock enable and all register timing;
* the FAST score formula, the three-stage pipeline and the 7×7 direct window;
* tie breaking in NMS and a strict threshold;
* the border size handling;
* the register map, the FIFO depths, and the overflow and sticky-flag
  behaviour;
* the word packing and address layout of the frame buffer, and the Avalon-style
  handshakes;
* a single clock domain. A real SoC with a faster processor bus would need a
  clock-domain crossing in front of `detector_interface` and `memory_buffer`.

Not included:

* the processor and its software: BRIEF-32 description, matching against a
  map of learned features, and histogram voting for the heading correction;
* the memory controller and the DRAM;
* the camera;
* any selection of a fixed number of best features per image (all maxima
  above the threshold are reported);
* colour conversion and rectification in the preprocessor;
* a SURF response core. The same pipeline could host one, since any
  window-based response fits between the two line buffers.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own,
with a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/nav_pkg.sv tb/tb_nav_fabric_top.sv --top-module tb_nav_fabric_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace the testbench name to run another one. The simulator is two-state.
Every register that is read before it is written is reset, so random
initialisation (`+verilator+rand+reset+2`) must not change any result.

| testbench | what it checks |
|---|---|
| `tb_camera_sync` | coordinates, blank, h_sync and data for every clock; truncation of long lines; `sync_error` for long and short lines |
| `tb_preprocessor` | table output for random input; rewriting the table while streaming; one-clock sync delay |
| `tb_linebuffer` | every tap against the pixel k lines earlier, with random blanking inside and between lines |
| `tb_fast_response` | the response of every column against a direct FAST12 model, on dark, grey and bright backgrounds |
| `tb_nms_core` | decisions and scores against a direct model, with many ties |
| `tb_feature_detector` | the whole chain on 40×24 frames, and the 4·W+12 latency |
| `tb_detector_interface` | coordinate wrap, border, FIFO order and overflow, every register read, irq on every clock |
| `tb_memory_buffer` | every frame-buffer word and address under random wait states; overflow under a long stall |
| `tb_nav_fabric_top` | full 640×480 size and default parameters, three frames (below) |
| `tb_workload` | 640×480 and 1920×1080 at 60 fps timing, 200 features per image, two processor speeds (see Parameters) |

`tb_nav_fabric_top` sends three synthetic 640×480 frames. The first has one
over-long line. Before the second, the table is reloaded with an inverting
curve. During the third, the processor stops reading and the memory stalls
for 400 clocks. The testbench checks:

* every feature read by an interrupt-driven processor model against an
  independent FAST12 + NMS model (about 900 per frame);
* the queueing latency of each feature;
* both frame buffers word by word;
* that the feature FIFO keeps exactly 256 features when overflowed;
* both overflow flags.

It counts each mechanism and fails if one never occurred. It runs in a few
seconds.
