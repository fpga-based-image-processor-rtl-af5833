# VCC image processor: template matching and background subtraction at camera rate

This is synthesizable SystemVerilog for a small image processor meant to sit
next to a camera in a sensor node. It finds a 32×32 target in every 640×480
frame (template matching) and outlines whatever has changed against a stored
background (background subtraction). Both run at once, one pixel per clock, so
a frame is done as fast as the camera delivers it. No frame buffer is needed
beyond one external SRAM image and a few rows of on-chip memory.

The trick that keeps the hardware small is **vector code correlation (VCC)**.
Pixels are not compared by their intensity. Each pixel is first reduced to a
4-bit *vector code*: the sign of the local intensity gradient in x and in y.
Each direction gets 2 bits:

| gradient | code |
|----------|------|
| positive | `01` |
| neutral  | `00` |
| negative | `10` |

Two codes are compared by XOR, and the number of ones is their distance (0 to
4). The distance between two image patches is the sum over all their pixels.
The smaller it is, the more alike the patches are. Gradients survive uniform
changes in lighting, and a compare costs a 4-bit XOR and a popcount instead
of a subtract and a multiply.

The architecture (encoders, shift-register windows with row FIFOs, XOR/RR/SUM
datapath, comparison and region modules) follows a published FPGA design for
sensor-network image processing. Interfaces, register map, operating modes,
latencies and several small rules are this implementation's own. They are
listed in the section "What is fixed and what was chosen" below.

## Data flow

```
 camera ──► camera_if ──► vcc_encoder (camera image) ──► c_in  ┐
              │  ▲                                              │ image_proc_block
              ▼  │                                              │  ├ corr_calc ► match_compare ─► best match (value, x, y)
           external SRAM ──► vcc_encoder (stored image) ► c_sto ┘  └ bg_subtract ► region_detect ─► bounding box
              ▲                                                             │
 host bus ◄─► comm_if ◄────────────── results, settings ─────────────────────┘
```

The whole design runs on one clock, the camera's pixel clock (25 MHz in the
original system). At the same clock edge the camera interface hands both
encoders the camera pixel and the stored pixel at the same address. The two
code streams therefore stay aligned all the way through. An assertion in the
top level checks this.

## The vector-code encoder (`vcc_encoder`)

This is the least obvious block. Its row-buffer scheme sets the timing of
everything downstream.

* **Four row buffers.** Selector 1 writes each incoming row into the next
  buffer in turn. Selector 2 reads the other three, which hold the three most
  recent *complete* rows, and shifts one column per clock into a 3×3
  register window.
* **Consequence: a two-row delay.** While row *y* is arriving, the window is
  centred on row *y−2*. The code of pixel (x, y) therefore leaves the encoder
  exactly two rows plus three clocks after the pixel entered. The buffers are
  read one column ahead (column x+1). At the end of a row, the read already
  fetches column 0 of the next row's buffers. This keeps the output at exactly
  one code per input pixel, with the same raster position on every clock.
* **Filters.** The x gradient is (right column − left column)/6 and the y
  gradient is (bottom row − top row)/6. The /6 is never computed: the raw sums
  are compared with 6·Th, which is exactly equivalent. The result is `01` if
  the gradient is above Th1, `10` if it is below Th2, and `00` otherwise. Th1
  and Th2 are signed 8-bit registers, reset to +2 and −2.
* **Border.** The first and last row and column get code `0000`.
* **Frame wrap.** The codes of a frame's last two rows come out while the
  first two rows of the *next* frame arrive. Keep the camera running; after
  the last frame, two extra rows are needed to flush it out.

Encoder output: `out_valid`, `out_sof` (the code of (0,0)), `out_x`, `out_y`
and `out_code = {x[1:0], y[1:0]}`.

## Sliding windows over a code stream (`vcc_window`, `code_delay`)

Template matching and subtraction both need, on every clock, an N×N patch of
codes that ends at the newest code. Codes enter row 0 of a register array and
shift right. The code falling off the end of a row passes through a FIFO of
W−N codes and enters the next row. That makes N−1 FIFOs: 31 for the 32×32
window, 7 for each 8×8 window.

After the code of (x, y) has entered:

```
win[r][c] = code at (x − c, y − r)      newest at win[0][0], upper-left of the patch at win[N−1][N−1]
```

The patch is valid when x ≥ N−1 and y ≥ N−1. Each FIFO is a RAM of W−N−1
words behind an output register. It behaves exactly like a W−N stage shift
register.

## Correlation, matching, subtraction, region

* **`corr_calc`**: SR1 is the 32×32 window over the camera codes. SR2 is a
  32×32 register chain (no FIFOs) that holds the template. The template is
  shifted in, in raster order, with `tmpl_shift`. `vcc_xor_sum` XORs all 1024
  pairs into the RR register and adds up the ones with a pipelined adder
  tree. That gives one correlation value (0..4096) per clock, 12 clocks after
  its code.
* **`match_compare`**: X and Y counters follow the correlation stream.
  Register 1 keeps the smallest value seen in the frame, and registers 2 and
  3 keep where it was seen. After the last position, register 4 presents
  value, x and y, and `res_valid` pulses. Only windows fully inside the frame
  count. On a tie, the earlier position wins. The reported (x, y) is the
  lower-right corner of the matched patch; the patch spans (x−31..x, y−31..y).
* **`bg_subtract`**: two 8×8 windows, one on the camera codes and one on the
  stored background codes. Both see the same location at the same time. XOR,
  popcount sum (0..256), and a comparator: the subtraction value is 1
  ("object") when the sum is ≥ the threshold. Windows not fully inside the
  frame give 0. Latency is 8 clocks.
* **`region_detect`**: X and Y counters, plus four compare-and-select
  registers (min x, max x, min y, max y) that only move on object pixels.
  After each frame it outputs the box and a `found` flag.
* **`image_proc_block`** wires these four modules together, with both code
  streams going to both paths. It also captures the template (see modes).

## Operating modes, SRAM sharing and the host

The host sets the mode through `comm_if`. A frame takes the mode in force at
its first pixel and keeps it until its last pixel. Between frames, a new mode
applies at once.

| mode | SRAM | stored-image stream | purpose |
|------|------|---------------------|---------|
| `MODE_RUN` | read at the camera pixel's address | stored image | match and subtract against the stored image |
| `MODE_CAPTURE` | camera frame written | the camera pixel | store a background |
| `MODE_LOAD_TMPL` | read | stored image | shift the 32×32 codes at `TMPL_XY` of the stored image into SR2 |
| `MODE_HOST` | owned by the host interface | zero | host loads or reads an image |

A typical sequence:

1. The host writes a scene into the SRAM, or the camera captures it.
2. One `MODE_LOAD_TMPL` frame cuts out the template. SR2 then keeps it.
3. One `MODE_CAPTURE` frame stores the empty background.
4. `MODE_RUN` frames follow. Each one yields a match and a region.

The template load happens two rows into the frame, when the stored image's
codes come out of the encoder.

Register bus: `host_wr`/`host_rd`, a 4-bit word address, and 32-bit data.
Read data arrives one clock after `host_rd`.

| addr | name | contents |
|------|------|----------|
| 0 | MODE | `[1:0]` mode |
| 1, 2 | TH1, TH2 | signed 8-bit gradient thresholds |
| 3 | SUB_TH | subtraction threshold (reset 32) |
| 4 | TMPL_XY | template upper-left x `[15:0]`, y `[31:16]` (reset: frame centre) |
| 5 | SRAM_ADDR | SRAM pointer |
| 6 | SRAM_DATA | pixel at the pointer; the pointer then increments. Refused unless the frame mode is `MODE_HOST` |
| 7, 8 | MATCH_VAL, MATCH_XY | last best match: value; x `[15:0]`, y `[31:16]` |
| 9, 10 | REGION_X, REGION_Y | last region: min `[15:0]`, max `[31:16]` |
| 11 | STATUS | `[7:0]` results seen, `[15:8]` regions seen, `[16]` object found, `[17]` template loaded, `[18]` refused SRAM access (write STATUS to clear), `[20:19]` current frame mode |

The SRAM is asynchronous: read data must be valid in the same clock as the
address. It holds one byte per pixel at address y·W + x.

## Timing summary

| from → to | latency |
|-----------|---------|
| camera pixel → encoder inputs | 1 clock |
| pixel (x, y+2) → code of (x, y) | 3 clocks |
| code → correlation value | 2 + log2(TM²) clocks (12) |
| code → subtraction value | 2 + log2(BS²) clocks (8) |
| last value of a frame → result registers | 1 clock |

Throughput is one pixel per clock with no stalls of its own. Gaps in
`cam_valid` simply pause the pipeline. At 25 MHz a 640×480 frame needs
12.3 ms, within the 16.7 ms of a 60 fps camera.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `W`, `H` | 640, 480 | frame size |
| `TM` | 32 | template size (TM² must be a power of two) |
| `BS` | 8 | subtraction window (BS² must be a power of two) |

All defaults are the original system's numbers. On-chip memory at the
defaults is about 152 kbit:

* encoder row buffers: 41 kbit
* correlation FIFOs: 75 kbit
* subtraction FIFOs: 35 kbit

On top of that come about 8 kbit of window registers for SR1/SR2/RR.

## What is fixed and what was chosen

These follow the original architecture:

* the vector code definition
* the four-buffer encoder with its filter coefficients and two thresholds
* SR1/SR2 windows with row FIFOs, XOR into RR, and SUM
* comparison with registers 1–4
* the subtraction comparator (≥ threshold means object)
* the four-register region detector
* both methods running side by side on the same code streams
* all sizes and the single pixel clock

These are choices made here:

* **Comparator rule.** The thresholds' meaning is gradient > Th1 positive,
  < Th2 negative. Their widths and reset values are also chosen here.
* **Border codes** are zero.
* **Encoder latency** is the two-row delay described above.
* **Adder tree.** The SUM operators are pipelined, one register per level.
* **Edge windows** are ignored: only windows fully inside the frame take part.
* **Coordinates** are reported at the window's lower-right corner. On a tie,
  the first match wins.
* **Subtraction FIFOs** each hold the rest of a row (632 codes), by analogy
  with the correlation module.
* **Template loading** is done by cutting the template out of the stored
  image in a dedicated frame.
* **Operating modes** and SRAM ownership are as described above.
* **Host link.** The original system talks to a PC over a serial port and
  passes results through the SRAM. Here the host uses a parallel register
  bus and reads results from registers. No serial link is included.

Not included: the camera, the SRAM chip and the host processor. The
testbenches model them.

## Files

`rtl/`:

* `vcc_pkg.sv`: types and constants
* `vcc_encoder.sv`
* `code_delay.sv`
* `vcc_window.sv`
* `vcc_xor_sum.sv`
* `corr_calc.sv`
* `match_compare.sv`
* `bg_subtract.sv`
* `region_detect.sv`
* `image_proc_block.sv`
* `camera_if.sv`
* `comm_if.sv`
* `vcc_image_processor.sv`: the top level

`tb/`:

* one self-checking testbench per block (`tb_<module>.sv`)
* `tb_vcc_ref_pkg.sv`: reference models of coding, correlation and
  subtraction
* `tb_sram_model.sv`: asynchronous SRAM
* `tb_vcc_scenario.svh`: shared body of the two end-to-end tests

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. It also has a watchdog.
With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/vcc_pkg.sv tb/tb_vcc_ref_pkg.sv tb/tb_vcc_encoder.sv --top-module tb_vcc_encoder
./obj_dir/Vtb_vcc_encoder
```

Block testbenches use reduced frame and window sizes and run in well under a
second.

`tb_vcc_image_processor` runs the whole processor end to end at 80×60 with a
16×16 template. It drives the camera port and the host bus through this
sequence:

1. host SRAM fill
2. template load
3. background capture
4. a frame with the target moved
5. a background-only frame with camera stalls, plus a mid-frame mode request
   and a refused SRAM access
6. a flush frame

It checks the best match and the region against reference models computed
from the intensity images. It also counts that each mechanism happened.

`tb_vcc_full` runs the same sequence at the default 640×480 / 32×32 / 8×8
with no parameter overrides. That is about 2.2 million clocks. It takes
roughly 2.5 minutes to build and under a minute to run.

`tb_vcc_tracking` is a tracking workload at 96×64 with a 16×16 template.
A textured target stays still, moves left in stages, moves right and stops
again over seven frames. For every frame it checks three results against the
reference: the best match position, a correlation value of 0, and the
region box.

To change a size, override `W`, `H`, `TM` or `BS` on `vcc_image_processor`.
Keep TM² and BS² powers of two, and TM, BS < W.
