# Red-object tracking pipeline for a camera-guided robot

This RTL is the image-processing and motor-control hardware of a small robot
that follows a red ball. A 320x240 RGB565 camera frame is cleaned in four steps:

1. a 3x3 median filter removes impulse noise;
2. colour thresholds turn the frame into a one-bit object mask;
3. a 9x9 morphological opening and closing removes specks and fills holes;
4. a bounding box is found around the remaining object.

The size and position of that box decide whether the robot drives forward or
backward, or turns left or right. Two servo pulse generators then drive the
wheels.

Each image stage is a stream-processing core. The cores are pipelined so that
each produces several pixels per clock: 4 for the median filter and 9 for the
morphology. They sit between two clock-crossing FIFOs, like peripherals fed by
a DMA engine. The processor, the DMA engine and the external memory that feed
them in a complete system are not part of this RTL (see *Not included, and choices made here*).

```
 camera bus ──► camera_capture ──► RGB565 pixel stream (to memory / DMA)
 register writes ─► sccb_master ──► SIO_C / SIO_D to the camera

 3x4 RGB565 blocks ─► median_ip ─► 4 mask bits      (FIFO In ─ median_core ─ FIFO Out ─ color_sep)
 9x9 mask blocks   ─► morph_ip (erosion)  ─► 9 bits  (FIFO In ─ morph_core ─ FIFO Out)
 9x9 mask blocks   ─► morph_ip (dilation) ─► 9 bits
 raster mask bits  ─► object_locator ─► cometo/backward/left/right ─► motor_control_ip ─► signal_1, signal_2
```

`tracking_top` instantiates all of these. It exposes the stream ports of the
three image IPs, because in a complete system a DMA engine moves frames
between them through memory.

## The median pipeline (`median_core`)

The input is a band of three image rows. It arrives as a stream of
non-overlapping 3x4 blocks, one block per clock, walking the band from left to
right. Each RGB565 pixel is widened to 8 bits per channel by bit replication.
Each channel is then filtered on its own with 8-bit compare-exchange nodes
(`basic_node`: one comparator and two multiplexers).

The 3x3 median is found without sorting all nine values:

* sort each vertical triple of the window (3 nodes per column, `sort3`);
* take the maximum of the three column minima, the median of the three column
  middles and the minimum of the three column maxima;
* the median of those three values is the median of the window.

Two overlapping windows share a column, so each column is sorted only once.
The two right-most sorted columns of a block are kept for the next block.
Block *k* holds band columns 4k..4k+3. Together with the two kept columns,
there are six sorted columns. They give four windows, centred on columns
**4k-1 .. 4k+2**: `out_pix[j]` is the pixel at column 4k-1+j.

There are three register stages: the column sort, the cross sort and the final
median. A result appears exactly **3 clocks** after its block. At one block per
clock, that is 4 filtered pixels per clock. The core cannot stall; `control_bi`
guarantees that every result has room (see below).

## The morphology pipeline (`morph_core`)

Erosion (`DILATE=0`, AND of the window) and dilation (`DILATE=1`, OR) use a
9x9 square structuring element. The input is a band of nine mask rows. It
arrives as 9x9 bit blocks, one per clock. The previous block and the new block
form an 18-column strip, which goes down a nine-stage pipeline:

* stage *n* reduces the 81 bits in the left nine columns of the strip to
  output bit *n*;
* the strip then moves on shifted left by one column.

After nine clocks, the nine results for the centre row of the band are ready
together. They are centred on columns 4..12 of the strip, which is columns
9(k-1)+4 .. 9(k-1)+12 of the band for block *k*. From then on the core gives
9 result bits per clock. `out_bits[n]` (bit `8-n` of `morph_ip`'s `m_tdata`)
is the n-th of those nine.

## Feeding the image IPs

Neither core knows where a band starts or where the image ends. It simply
pairs each block with the previous one. Edge padding and dropping results that
fall outside the image are the stream source's job. The end-to-end testbench
uses this recipe for a W x H image (W=320, H=240):

* **Median:** for each output row *y*, send rows y-1, y, y+1. Clamp rows
  outside the image to the edge. Pad the band to 324 columns: 3 copies of
  column 0 on the left and 1 copy of column 319 on the right. That is 81
  blocks per band. Output word *k* (k ≥ 1) holds image columns 4k-4 .. 4k-1;
  word 0 is discarded.
* **Morphology:** for each output row *y*, send rows y-4 .. y+4. Pad with 4
  columns on the left and 9 on the right, to 333 columns (37 blocks). Output
  word *k* (k ≥ 1) holds image columns 9(k-1) .. 9(k-1)+8; word 0 and columns
  ≥ 320 are discarded.
* **Padding value:** use 1 for erosion and 0 for dilation, so that pixels
  outside the image take no part.

An opening is an erosion pass followed by a dilation pass. A closing is a
dilation pass followed by an erosion pass. Both are simply sequences of passes
through the two IPs.

## Clock domains and flow control

The stream ports run on `clk_axi` (100 MHz). The median and morphology cores
run on `clk_filt` (30 MHz). `async_fifo` crosses between the two domains. Its
pointers are Gray-coded and pass through two synchronising flip-flops, and its
read port is first-word fall-through. Each IP has two of these FIFOs, FIFO In
and FIFO Out.

The filter cores cannot stall. `control_bi` therefore pops FIFO In only when
the following holds:

  FIFO Out fill + blocks in the pipeline + 1 ≤ FIFO depth

It counts the blocks in flight. On the output side, it pops FIFO Out (`rd`)
when the output stream accepts a word.

The result is full AXI4-Stream back-pressure on both sides. Only
`tvalid`/`tready`/`tdata` are used. In steady state the 100 MHz side waits on
the 30 MHz core, so `s_tready` drops often.

## Object location and motor decisions

`object_locator` takes the final mask in raster order, one pixel per clock.
`sof` marks pixel (0,0) and resynchronises the counters. The locator tracks
the smallest and largest x and y of the object pixels. On the last pixel it
registers the following and pulses `done`:

* the box (`xmin`, `xmax`, `ymin`, `ymax`; y counts rows from the top);
* its centre (`xob`, `yob`: the mean of the edges);
* the movement requests below.

| condition (h = ymax − ymin, centre x = xob) | request |
|---|---|
| h > BETA (object close) | `backward` |
| h ≤ ALPHA (object far) | `cometo` |
| xob < W/2 (quadrants left of centre) | `left` |
| xob ≥ W/2 | `right` |
| no object pixel | none, `found` = 0 |

The defaults are ALPHA = 40 and BETA = 100 rows. There is no dead band for
turning: when an object is present, either `left` or `right` is raised.

`motor_fsm` takes one decision per frame: `done` drives its `update` input. It
chooses the movement by priority: backward, then forward, then left, then
right, and STOP when no request is raised. It drives the wheels as follows:

| movement | driver_1 (motor 1, left wheel) | driver_2 (motor 2, right wheel) |
|---|---|---|
| forward | forward | forward |
| backward | reverse | reverse |
| turn left | reverse | forward |
| turn right | forward | reverse |
| stop | stop | stop |

`servo_pwm` turns each command into a continuous-rotation servo pulse: a
20 ms frame with a 1.5 ms (stop), 2.0 ms (forward) or 1.0 ms (reverse) pulse,
at 100 MHz. The command is sampled at the start of each frame, so a change
shows on the next pulse and no pulse is ever cut short.

## Camera interface

`camera_capture` runs on the camera pixel clock. While `href` is high, it
pairs the bytes of the 8-bit bus into RGB565 pixels: first byte
R[4:0],G[5:3], second byte G[2:0],B[4:0]. It outputs each pixel with its x and
y, and `sof` on (0,0). A `vsync` high restarts the frame. Extra pixels per
line and extra lines beyond 320x240 are dropped.

`sccb_master` writes one camera register per `start` pulse over the camera's
serial control bus (SCCB). It sends a start condition, then three 9-bit phases
(device ID, register address, data), each ending with a bit during which
SIO_D is released (`sio_d_oe` low), then a stop condition. SIO_C runs at
clk/(4·QDIV), which is 100 kHz by default. Reads are not supported. The list
of registers written at power-up is left to the controlling processor.

## Not included, and choices made here

* **Soft processor, DMA engine, external memory controller, UART and clock
  generator:** these are vendor IP in the complete system. Here the clocks are
  inputs, and the IP stream ports are top-level ports.
* **Camera register configuration table:** the register values are not
  known; only the SCCB write engine is provided.
* **Motion conditions:** the conditions for forward, backward and stationary
  were reconstructed as described above. The thresholds ALPHA, BETA, R ≥ 150,
  G ≤ 90 and B ≤ 90 are example values. The colour thresholds are run-time
  inputs (`r_min`, `g_max`, `b_max`).
* **This design's own choices:** the FSM priority, the wheel mapping, the
  servo timing, the FIFO depth (16), the exact column alignment of the outputs
  and the padding recipe.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `tracking_top`, `object_locator`, `camera_capture` | `IMG_W`, `IMG_H` | 320, 240 | frame size |
| `object_locator` | `ALPHA`, `BETA` | 40, 100 | height limits for forward / backward |
| `median_core`, `basic_node`, `sort3` | `W` | 8 | channel width of the compare nodes |
| `morph_core` | `K` | 9 | structuring-element size |
| `morph_core`, `morph_ip` | `DILATE` | 1 | 1 dilation, 0 erosion |
| `median_ip`, `morph_ip` | `FIFO_DEPTH` | 16 | words per clock-crossing FIFO (power of two) |
| `sccb_master` | `QDIV` | 250 | clocks per quarter SIO_C period |
| `servo_pwm`, `motor_control_ip` | `PERIOD`, `PW_STOP`, `PW_FWD`, `PW_REV` | 2,000,000 / 150,000 / 200,000 / 100,000 | servo frame and pulse widths in clocks |

## Files

`rtl/track_pkg.sv` holds the shared types: `rgb565_t`, `rgb888_t`, the drive
and move enums, and `widen565`. Every other file in `rtl/` holds one module
named after the file. `tb/tb_<module>.sv` is the self-checking testbench of
each module. Each testbench prints `TB_RESULT checks=N failures=M` and has a
watchdog.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/track_pkg.sv tb/tb_median_core.sv \
          --top-module tb_median_core -o sim && ./obj_dir/sim
```

Replace `median_core` with any other module name.

`tb_tracking_top` runs the whole design at its default size. It runs five
synthetic 320x240 frames: a red rectangle with specks, a small red blob and a
hole in it. Before the frames, two camera register writes are decoded from
the SCCB pins and checked. The first frame is sent over the camera bus. Each frame then goes
through the median, opening and closing passes and the locator, and the servo
pulses are measured. Every stage is compared with a reference computed in the
testbench. The testbench also checks that these all happened:

* back-pressure at the input and at the output;
* the opening removed the blob;
* the closing filled the hole;
* all five movements occurred.

It takes about one minute to run, most of it spent in the simulated 20 ms
servo frames.
