# Self-adaptive multi-sensor vision pipeline

A camera with several different image sensors needs different restoration
processing for each sensor: a color sensor needs white balance, demosaicing
and a color-space transform, and an infrared sensor needs non-uniformity
correction and a median filter. This design carries one pipeline that
reconfigures itself when the operator switches sensors, with no software
involved. Every frame from a sensor starts with a 32-bit **stream header**
that describes the sensor. The receiving architecture watches these headers.
When the sensor ID changes and the new sensor is of another type, it waits
for a frame boundary and reloads the sensor-specific part of the pipeline
through the FPGA's partial reconfiguration (PR) port. The processing that
all sensors share (zoom and resize, contour enhancing, contrast enhancing)
is static. It only learns the new resolution.

The structure follows the self-adaptive architecture of Isavudeen,
Dokladalova, Ngan and Akil (MEMICS 2015): sensor frame grabbers with a
header encoder, then a header decoder, system monitor, adaptation
controller and PR manager, and a reconfigurable area next to a static
area. Their prototype has one color sensor, one infrared sensor and a
manual switch, and `vision_system` reproduces that setup. Widths,
handshakes, timing, the arithmetic of the image operators and the on-chip
buffering are this design's own choices. The operator algorithms are only
named in the original, so each one here is a simple standard version.

## Top level and clocks

```
 color readout ─► sensor_frame_grabber ─┐
                  (data_packaging,       ├─► sensor_selector ─► self_adaptive_arch ─► display
 IR readout ────► header_encoder) ──────┘     (manual switch)
```

`self_adaptive_arch`:

```
 link ─► header_decoder ─► frame_buffer(in) ─► recon_area ─► static_area ─► frame_buffer(out) ─► visualization_if
            │ header                             ▲   ▲  freeze/load           zoom_resize
            ▼                                     │   │                        contour_enhance
        cdc_bus_sync ─► system_monitor ─► adaptation_controller ─► pr_manager ─► bitstream memory / PR block
                              ▲ save_type       frame_sync ─┘
```

There are three clock domains, each with its own synchronous reset:

| clock        | logic                                                          |
|--------------|----------------------------------------------------------------|
| `clk_sensor` | frame grabbers, sensor selector, header decoder                |
| `clk_sys`    | monitor, controller, PR manager, both processing areas (100 MHz in the reference implementation) |
| `clk_vis`    | visualization interface                                        |

Pixels cross between domains in the two dual-clock `frame_buffer`s. The
decoded header crosses in `cdc_bus_sync`, a toggle handshake that holds the
32-bit word stable while it is sampled.

## The stream header

One 32-bit word follows each frame sync and comes before the frame's pixels:

| bits    | field  | meaning                                        |
|---------|--------|------------------------------------------------|
| [0]     | id     | sensor ID; a change means the sensor was switched |
| [2:1]   | stype  | 0 color, 1 low-light, 2 infrared                |
| [13:3]  | width  | pixels per line (up to 2047)                   |
| [24:14] | height | lines per frame (up to 2047)                   |
| [31:25] | fps    | frame rate (up to 127)                         |

The field order and boundaries come from the original header format. The
type encoding is this design's choice. `sav_pkg::stream_header_t` is the
packed struct for this word.

The link from a grabber has three signals:
- `link_fsync`: a one-clock pulse at the start of each frame.
- `link_valid`: marks a data word.
- `link_data`: 32 bits. The first word after the sync is the header. After
  it, each word carries two 12-bit pixels, the first in bits [15:0]. A line
  with an odd pixel count ends in a half-filled word.

The header decoder takes the header out of the stream, so the processing
area never sees it. It presents the header on `hdr_valid`/`hdr` three
clocks after the header word arrives, which is 30 ns at 100 MHz. It also
unpacks the pixels into a raster stream with `sof` and `eol` markers, using
the width and height from the header.

## Adaptation

`system_monitor` keeps the last header and the current sensor type.
- On each header it raises `new_sensor` if the ID differs from the saved
  one, or if no header has been seen yet. Then it saves the header.
- The current type resets to `DEFAULT_TYPE` (color), which is the chain
  loaded at power-up.

`adaptation_controller` runs the five-state machine of the original:

```
Idle --new_sensor--> Check type --same type--> Idle
                     Check type --other type--> Wait sync --frame sync--> Launch PR
Launch PR --pr_fail--> Check type        Launch PR --pr_done--> Save type --> Idle
```

- The frame sync is the reconfigurable area accepting a start-of-frame
  pixel. This way a reconfiguration never starts in the middle of a frame.
- In Check type the controller latches the new type and resolution. The
  static area takes the resolution from these registers, so a new sensor
  of the same type only changes the resize geometry.
  The reconfigurable chains need no resolution setting: they find line and
  frame boundaries from the `sof` and `eol` markers. Their only settings
  are the white-balance gains, which are top-level inputs.
- After a failure the controller retries at the next frame sync. It keeps
  retrying for as long as the header asks for a type that has no
  bitstream.

`pr_manager` does the reconfiguration:
1. On a request it raises `freeze`.
2. It reads the new type's bitstream from the external memory, one word
   at a time. The read port is `bs_req`/`bs_addr` with `bs_gnt`, then
   `bs_rvalid`/`bs_rdata`. Each bitstream's base address and length are
   parameters.
3. It streams the words to the FPGA's PR control block. `prb_start` begins
   a load, the words go out on `prb_valid`/`prb_ready`/`prb_data`, and the
   block answers with `prb_done` or `prb_error`.
4. On success it pulses `pr_done` and `load` with the new type. On
   `prb_error`, or for a type with no bitstream (low-light), it pulses
   `pr_fail`.

Bitstream lengths default to the sizes of the original's partial
bitstreams: 5.8 MB and 5.7 MB, that is 1 520 435 and 1 494 221 32-bit
words.

### How reconfiguration is modelled

An RTL simulation cannot rewrite FPGA fabric. For that reason `recon_area`
contains both restoration chains, and a register `active` chooses between
them. `load` from the PR manager is the moment the new bitstream becomes
the area's contents: it sets `active`.

While `freeze` is high, the chains are held in reset, just as fabric being
rewritten produces nothing. The input is accepted and discarded, so the
sensor side never backs up. The NUC coefficient stream is not consumed.
After `freeze` falls, input is still discarded until the next start of
frame, so the new chain only ever sees whole frames.

On a real FPGA the same ports would surround a PR region holding one
chain, and `active` would be unnecessary.

## Processing chains

All streams inside the processing area use valid/ready with `sof` (first
pixel of a frame) and `eol` (last pixel of a line). Each stage has one
output register and takes one pixel per clock.

The 3x3 operators (debayer, median, contour) share `window3x3`:
- It keeps two line buffers of `MAX_W` pixels.
- The output for input pixel (x, y) is centred on (x-1, y-1), so no flush
  is needed at the end of a frame. The image is therefore shifted one
  pixel right and down.
- Neighbours outside the frame are replaced by the nearest row or column.

**Color chain** (`white_balance` → `debayer` → `rgb2ycbcr`):
- **White balance.** RGGB Bayer mosaic with red at (0,0). The gains are
  Q2.8 per channel and the result saturates at 12 bits.
- **Debayer.** Bilinear demosaicing.
- **Color-space transform.** BT.601 full range with 8-bit coefficients
  on the top 8 bits of each channel.

**Infrared chain** (`nuc` → `median_filter`, then Y = pixel >> 4 with
Cb = Cr = 128):
- **NUC.** Two-point correction: `out = clamp((pix * gain >> 12) + offset)`.
  `gain` is unsigned Q4.12 and `offset` is signed. The coefficients come
  from outside as a second stream that carries its own `coef_sof`. The NUC
  aligns the two streams on frame starts: if they disagree, it drops items
  from the side that is ahead until both are at a frame start.
- **Median filter.** A rank-based 3x3 median.

**Static area** (`zoom_resize` → `contour_enhance` → `contrast_enhance`):
- **Zoom and resize.** `zoom_sh` selects a centre crop of 1/1, 1/2 or 1/4
  of the input size. The crop is scaled by nearest neighbour to
  `OUT_W` x `OUT_H`, using 16.16 steps computed once per frame. Each input
  line is written into a line buffer. The output lines that use it are
  then read out while the input is stalled. Downscaling 2:1 therefore costs
  about 1.25 clocks per input pixel, and a 1:1 copy costs 2.
- **Contour enhancing.** Sharpens luma with the Laplacian:
  Y' = clamp(5c - n - s - e - w).
- **Contrast enhancing.** Stretches each frame's luma linearly over 0..255,
  using the minimum and maximum of the previous frame. The first frame, and
  a frame that follows a flat one, pass unchanged.

## Image memories and the display

The original places frame buffers between the processing area and the
sensor and display sides, to separate the clock frequencies. Here they are
on-chip dual-clock FIFOs (`frame_buffer`):
- Gray-coded pointers, first-word fall-through read.
- Default depth 4096 entries.
- A write into a full FIFO is dropped and sets the sticky `in_overflow`
  (input side).
- On the output side, the full flag stalls the static area instead.

`visualization_if` generates a raster of `OUT_W + H_BLANK` by
`OUT_H + V_BLANK` clocks with `de`, `hsync` and `vsync`:
- It locks to the image only when a start-of-frame pixel is waiting at its
  first active position. Until then it discards pixels.
- While it is not locked, or the FIFO is empty, it shows black
  ({0, 128, 128}).
- Running dry while locked sets the sticky `vis_underflow`.

**Limitation.** These FIFOs do not hold whole frames, so they cannot absorb
a difference between the sensor and display frame rates. While the display
waits for its next frame start, the output FIFO must hold everything
produced in the meantime. At the default sizes and real frame rates
(45 fps in, about 60 fps out) that is far more than 4096 pixels. The output
FIFO then fills, the pipeline stalls and the input FIFO overflows.

Frames recover at the next start of frame, because every stage restarts on
`sof`. A product needs an external frame store that can drop or repeat
whole frames. That controller is not part of this design.

## Parameters

| module | parameter | default | origin |
|---|---|---|---|
| vision_system | `COL_W`, `COL_H`, `COL_FPS` | 1280, 960, 45 | example color sensor |
| vision_system | `IR_W`, `IR_H`, `IR_FPS` | 640, 480, 120 | example infrared sensor |
| all | `OUT_W`, `OUT_H` | 640 x 480 | own choice |
| all | `MAX_W` | 1280 | widest sensor line |
| all | `IN_DEPTH`, `OUT_DEPTH` | 4096 | own choice |
| all | `H_BLANK`, `V_BLANK` | 160, 45 | own choice (VGA-like) |
| all | `BS_LEN_COLOR`, `BS_LEN_IR` | 1520435, 1494221 | bitstream sizes |
| self_adaptive_arch | `BS_BASE_COLOR`, `BS_BASE_IR` | 0x0, 0x0100_0000 | own choice |
| self_adaptive_arch | `DEFAULT_TYPE` | color | own choice |

Pixels are 12 bits and the processed stream is 24-bit {Y, Cb, Cr}
(`sav_pkg`).

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. Expected
values are computed in the testbench, independently of the RTL: reference
window operators, the header bit layout and resize geometry, and models of
the bitstream memory (`bitstream_mem_model`) and the PR control block
(`pr_block_model`). The PR block model checks every bitstream word it
receives and can be told to fail a load.

The main system tests:
- **`tb_vision_system`** runs the whole system at small sizes: 16x12 color,
  8x6 infrared, 8x6 display and 16-word bitstreams. It starts on color,
  switches to infrared (the first load is made to fail and is retried),
  switches back, then drives the display clock fast (underflow) and slow
  (back-pressure until the input memory overflows). It checks that clean
  frames return. It counts every mechanism and fails if one never happened:
  header decoded, new sensor, same-type return, wait for sync, PR launch,
  failure, success, type saved, freeze drop, zoom stall, output
  back-pressure, input overflow, display underflow and lock, and sensor
  switch-over.
- **`tb_self_adaptive_arch`** feeds a generated link with these sensors in
  turn: a second color sensor with another resolution (no reconfiguration),
  a low-light sensor (every attempt fails and the color chain stays), and
  an infrared sensor.
- **`tb_vision_system_full`** uses every parameter at its default: 1280x960
  color, 640x480 infrared and output, and full-length bitstreams. It
  produces two clean color frames, does one complete infrared
  reconfiguration of 1 494 221 words, and produces two clean infrared
  frames. Because of the frame-rate limitation above, its sensors send long
  line blanks and the display clock is fast. It takes about two minutes
  with Verilator.

To run one test with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb rtl/sav_pkg.sv tb/tb_vision_system.sv \
          --top-module tb_vision_system -o sim && obj_dir/sim
```

All tests pass. Each one is written to catch a single wrong detail in its
module, such as swapped bitstream lengths, a missing frame-sync wait, or a
wrong filter weight.

## What is not here

- **Sensor-specific frame-grabbing IP.** The grabber starts from the
  sensor's frame-valid, line-valid and pixel signals.
- **Communication core between the grabber and the architecture.** It is
  a direct link.
- **Off-chip memory and frame store.** See the limitation above.
- **The FPGA's PR control block.** It is reached through ports.
- **Low-light processing chain.** No processing chain was defined for the
  low-light sensor type. Its header is understood, but reconfiguration to
  it fails by design.
