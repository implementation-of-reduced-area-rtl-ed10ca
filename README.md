# Point-operation image enhancer

A small FPGA datapath that brightens, darkens, inverts or thresholds a
stored RGB image. Each of these is a *point operation*: a pixel's new value
depends only on its own old value, never on its neighbours. No line buffers,
windows or neighbour arithmetic are needed. The hardware is a frame memory,
a raster scanner and two copies of a small per-pixel function. Two pixels
(columns `col` and `col+1`) are processed in every clock, so a W x H frame
takes W·H/2 clocks.

```
 ld_en/ld_addr/ld_pix         start, op, value, thr
        |                            |  (latched at start)
        v                            v
 +--------------+   pair addr  +-----------+
 | frame_buffer |<-------------| scan_ctrl |  row/col/last tags
 | even | odd   |              +-----------+------------+
 +--------------+                                       |
    | p0     | p1   (one pixel pair per clock)          |
    v        v                                          v
 point_op  point_op   (lane 0, lane 1)           tag delay
    |        |                                          |
    +--------+--> out_pair, out_valid, out_row, out_col, out_last, done
```

## The point operations

All operations work on 8-bit R, G and B components. The code
(`img_pkg::op_t`) selects one of them:

| `op` | name            | result per pixel                                           |
|------|-----------------|------------------------------------------------------------|
| 0    | `OP_BRIGHT_ADD` | each channel `min(c + value, 255)`                         |
| 1    | `OP_BRIGHT_SUB` | each channel `max(c - value, 0)`                           |
| 2    | `OP_INVERT`     | `g = (R+G+B)/3` (rounded down), all channels `255 - g`     |
| 3    | `OP_THRESHOLD`  | `g = (R+G+B)/3`, all channels `255` if `g > thr`, else `0` |

Inversion and thresholding first reduce the pixel to grey by averaging the
three components, so both give grey (R = G = B) outputs. Brightness works
on each channel separately and keeps the colour. Saturation is handled with
a ninth bit. On the add side the carry forces 255. On the subtract side the
borrow forces 0. A result never wraps around.

Each lane (`point_op_unit`) computes the grey average once (`gray_avg`) and
shares it between the invert path (`invert_op`) and the threshold path
(`threshold_op`). The brightness path (`brightness_op`) runs alongside. A
4-way multiplexer picks the result, and one register stage holds it. The
divide by the constant 3 is written as a plain division of a 10-bit sum. A
synthesis tool reduces it to constant arithmetic.

A grey level exactly equal to `thr` goes to black: only values strictly
above the threshold become white.

## Frame buffer and the two-pixel scan

The image is held in `frame_buffer` in raster order: pixel `(row, col)` has
index `n = WIDTH*row + col`. To deliver a pair from a single address, the
memory is split into two banks:

- **even bank:** the even columns, word `n >> 1`, when `n[0] = 0`.
- **odd bank:** the odd columns, word `n >> 1`, when `n[0] = 1`.

For an even `col`, the pixels at `col` and `col+1` share the word address
`n/2`. One read cycle on both banks returns the pair. Loading is one pixel
per clock through `ld_en/ld_addr/ld_pix`. The address bit 0 picks the bank
that is written. Each word holds one pixel's 24 bits (R in bits 23:16, G in
15:8, B in 7:0). Reads are synchronous, with data one clock after the
address, so the banks map onto block RAM. The memory has no reset. A frame
must be loaded before it is processed.

`WIDTH` must be even. Otherwise a pair would straddle two rows. Both
`frame_buffer` and `scan_ctrl` assert this when the design is elaborated.

`scan_ctrl` is a two-state machine (idle, scan). On `start` it issues pair
addresses 0, 1, 2, ... on consecutive clocks. Each issue is tagged with its
row, its even column and a `last` flag. After the final pair it returns to
idle and pulses `done`.

## Timing and handshake (`img_enhance_top`)

- `start` is accepted only while `busy` is low. On that clock `op`, `value`
  and `thr` are latched. Changing them during a frame affects the next
  frame only. A `start` while busy is ignored.
- The first pair appears on `out_pair` with `out_valid` **3 clocks** after
  the clock edge that accepted `start`:
  - 1 clock to enter the scan state,
  - 1 clock for the memory read,
  - 1 clock for the lane register.
- After that, one pair comes out per clock with no gaps, W·H/2 pairs in
  all. `out_row`/`out_col` give the position of `out_pair.p0`.
  `out_pair.p1` is the pixel at `out_col + 1`. `out_last` marks the final
  pair, and `done` pulses on the next clock.
- There is no back-pressure: the consumer must take one pair per clock
  while `out_valid` is high.
- Do not load the frame buffer while `busy` is high. An assertion in the
  top flags this in simulation.
- Reset is synchronous and active low (`rst_n`).

Parameters: `WIDTH = 768`, `HEIGHT = 512` on the top, `frame_buffer` and
`scan_ctrl`. The address and tag widths follow from them.

## Where this design departs from, or goes beyond, its description

The operations above, the two-pixels-per-step datapath and the raster
memory come from the original description. These parts are this
implementation's own:

- **Image size.** The description never gives the dimensions of the images
  it processed. 768 x 512 is an assumed default. Any even width works.
- **Operation select.** The description chooses one operation when the
  design is built. Here the operation is a run-time input, so one circuit
  holds all four paths and a multiplexer. A build-time choice would only
  remove the unused paths.
- **Colour planes.** The description keeps three separate R, G and B
  arrays. Here one 24-bit word per pixel in two column banks is used. The
  bits are the same, but a whole pixel pair comes from one address.
- **Brightness increase.** This design saturates at 255 on the add side,
  matching the clamp-to-zero that the subtract side is described with.
- **Threshold input.** The threshold compares the RGB average, the same
  grey value that inversion uses. Which value to compare is not otherwise
  specified.
- **Control.** The load port, the start/busy/done handshake, the
  valid/tag pipeline and the shared grey averager per lane are all choices
  made here.
- **Contrast.** Contrast adjustment is named as a fourth kind of
  enhancement, but no formula is given. It is **not implemented**: any
  contrast curve here would be an invention.
- **Outside the hardware.** The original flow converts a bitmap to hex
  text on a PC, reads it into simulation, writes the result to a file and
  shows it in a PC application. None of this is hardware and none of it is
  included. The testbenches generate their images and check the output
  stream directly.

## Fitting a device

The frame buffer dominates the area. At the default 768 x 512 it is
9,437,184 bits (2 x 196,608 words x 24 bits). The rest of the design is
under 150 flip-flops plus two small adder/compare lanes. The Artix-7
XC7A35T on a Basys 3 board has 1,800 Kbit (1,843,200 bits) of block RAM, so
the default frame does **not** fit there. The largest frame that does is
76,800 pixels: `WIDTH=320, HEIGHT=240` needs exactly 1,843,200 bits,
before any block-RAM packing loss. To process larger images on such a
part, the frame must be kept in external memory. Because the operations
have no neighbourhood, a streaming source could also feed the lanes
directly, with no frame storage at all.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares with an
integer reference model (`tb/img_ref_pkg.sv`), written without the RTL's
bit-width tricks:

| testbench           | what it checks |
|---------------------|----------------|
| `tb_gray_avg`       | corner pixels and 20,000 random pixels against `(R+G+B)/3` |
| `tb_brightness_op`  | add/subtract with random pixels and constants; checks that both saturation and clamping occurred |
| `tb_invert_op`      | every grey level |
| `tb_threshold_op`   | every grey level against thresholds 0, 1, 90, 128, 254, 255 (including equality) |
| `tb_point_op_unit`  | random stream with gaps in `in_valid` and random operations; exactly one clock of latency |
| `tb_frame_buffer`   | 8 x 6 frame written in shuffled order, every pair read back, read-data hold, single-pixel overwrite |
| `tb_scan_ctrl`      | 10 x 4 raster: every address/row/column/last, W·H/2-clock frame, one `done`, `start` ignored mid-scan |
| `tb_img_enhance_top`| the whole design at the default 768 x 512 (see below) |

`tb_img_enhance_top` runs with the top's parameters left at their defaults:

1. It loads a gradient image with a white top row and a black bottom row.
2. It runs one frame of each operation.
3. It reloads a random image and runs two more frames.

Every one of the 196,608 output pairs per frame is checked. So are its
row/column tag and `out_last`. The testbench also checks the 3-clock start
latency, the exact frame time, `done` and the return to idle. It counts
each mechanism and fails if one never happened:

- brightness saturation at 255,
- clamping at 0,
- inversion,
- both threshold outcomes,
- an operation change between frames,
- a `start` ignored while busy,
- a frame reload.

It takes about one second of simulation. Every testbench ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

Run one with Verilator, for example:

```
verilator --binary --timing --assert -Wall -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/img_pkg.sv tb/img_ref_pkg.sv tb/tb_img_enhance_top.sv \
  --top-module tb_img_enhance_top -o sim
./obj_dir/sim
```

List the two packages explicitly and ahead of the testbench. Verilator
finds the modules through `-y`. Any other testbench runs the same way with
its own file and top module name. For a smaller end-to-end run, change
`W`/`H` in the testbench and pass the same values to the top as
parameters.

## Files

- `rtl/img_pkg.sv` contains the pixel, pixel-pair and operation types.
- `rtl/gray_avg.sv`, `rtl/brightness_op.sv`, `rtl/invert_op.sv` and
  `rtl/threshold_op.sv` are the combinational operations.
- `rtl/point_op_unit.sv` is one registered pixel lane.
- `rtl/frame_buffer.sv` is the two-bank frame memory.
- `rtl/scan_ctrl.sv` is the raster scan controller.
- `rtl/img_enhance_top.sv` is the top level.
- `tb/` holds the testbenches and the reference package.
