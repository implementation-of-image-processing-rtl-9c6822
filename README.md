# Spatially parallel gray-scale image enhancement unit

Point operations on an image, such as brightness or contrast changes, treat
each pixel on its own. That makes them a good fit for hardware in two ways.
Pixels can stream through at one per clock, and several different operations
can work on the same pixel side by side. This design uses the second kind of
parallelism, *spatial parallelism*. Four independent processing units sit next
to each other and take the same input pixel every clock:

| unit               | result for an input gray level `r` (0..255)                    |
|--------------------|----------------------------------------------------------------|
| contrast stretching| `0` if `r < low`, else `min(255, ((r - low) * gain) >> 8)`       |
| brightness control | `min(255, max(0, r + offset))`                                  |
| threshold          | `255` if `r >= level`, else `0`                                 |
| negative (invert)  | `255 - r`                                                       |

So one pass over an image gives all four enhanced images, in the time that
one operation would take on its own. The image sits in on-chip memory for the
whole pass. An *input data buffer* (IDB) holds the original. Each unit writes
into an *output data buffer* (ODB) of its own, so all four results of a pixel
are stored in the same clock. The image comes in from an external
asynchronous SRAM. A VGA output shows any one of the four results, and a host
port reads them back.

The RTL targets an FPGA board of the Altera DE2-115 class. It has an
asynchronous 16-bit SRAM, a VGA video DAC and a 50 MHz oscillator, and a PLL
raises the processing clock. The SystemVerilog here covers the digital
design. The PLL, the SRAM chip and the video DAC are outside it.

## Data flow

```
           +-------------+    +-----+    +------------------------------+    +---------+
 SRAM ---> | sram_loader | -> | IDB | -> | spatial_fu                   | -> | 4 x ODB |
 (16 bit)  +-------------+    +-----+    |  contrast_stretch            |    +---------+
                                ^        |  brightness_ctrl             |      |     |
                                |        |  threshold_op                |   port A port B
                           proc_ctrl --->|  negative_op                 |      |     |
                         (addresses,     +------------------------------+  out_mux out_mux
                          valid, writes)                                       |     |
                                                                        host_data  vga_ctrl -> R,G,B,syncs
```

A frame has two phases, and each is started by a pulse:

1. **Load** (`load_start`). `sram_loader` reads `N_PIX/2` SRAM words. Each
   word holds two pixels, the even one in the low byte. The loader writes the
   pixels into the IDB in order. A word takes `RD_WAIT + 3` clocks, so with the
   default single wait state the load takes 2 clocks per pixel. `load_done`
   pulses at the end.
2. **Process** (`proc_start`). `proc_ctrl` reads the IDB at addresses 0 to
   N-1, one per clock. Every pixel goes through the four units, and each
   result is written to the same address of its ODB. `proc_done` pulses
   `N + 3` clocks after the start pulse, so 256x256 pixels take 65,539
   clocks.

Each phase ignores the other's start while it runs, so the IDB is never read
and written by the two phases at once. The VGA display runs all the time from
the ODBs' second read port, even while a frame is being processed.

## Timing inside a frame

Every element of the processing path has a fixed latency of one clock. This
is what keeps the four results aligned and the buffer addresses correct:

| clock after start | what happens                                                             |
|-------------------|--------------------------------------------------------------------------|
| 1 ... N           | `proc_ctrl` drives IDB read address `k - 1`                               |
| 2 ... N+1         | the IDB word is valid, and `fu_valid` marks it as the units' input        |
| 3 ... N+2         | the units' results are valid and are written to the ODBs at address `k - 3` |
| N+3               | `proc_done` is high and `busy` is low                                     |

Inside `proc_ctrl`, the read address is carried through two pipeline
registers (`a1`, `a2`) to become the write address. All four units register
their result exactly once. `spatial_fu` asserts that the four valid bits
always agree, and `img_fu_top` asserts that the units' valid equals the ODB
write enable. If you add a pipeline stage to one unit, you must add it to all
four and to `proc_ctrl` as well.

## The VGA path

`vga_ctrl` makes standard 640x480, 60 Hz timing. A line is 800 pixel clocks
(640 visible, 16 front porch, 96 sync, 48 back porch). A frame is 525 lines
(480 visible, then 10, 2 and 33). Both syncs are active low. The 256x256
image appears in the top-left corner, with black around it. The gray level
drives all three 8-bit colour channels. The controller runs on the system
clock. The pixel clock is a clock enable, `pix_ce`, which the top makes every
`PIX_DIV` clocks (2 by default, which gives 25 MHz from 50 MHz).

The ODB read has one clock of latency, so the timing signals are delayed to
meet the data:

* clock `E` (`pix_ce` high): the position counters step. The new position
  gives the ODB address.
* clock `E+1`: the ODB reads that address. The sync, blank and in-image flags
  of the same position are registered.
* clock `E+2`: the pixel and its flags are registered together on the
  outputs.

This works for any `PIX_DIV >= 1`, because each stage samples on the clock
right after the previous one. The outputs lag the counters by two system
clocks. `frame_start` pulses in the clock where pixel (0,0) appears on the
outputs.

## Interfaces of `img_fu_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | processing clock (from the PLL); asynchronous active-low reset |
| `load_start` / `load_busy` / `load_done` | in/out/out | 1 | SRAM-to-IDB load |
| `proc_start` / `proc_busy` / `proc_done` | in/out/out | 1 | one processing pass |
| `tune` | in | `tune_t` (41) | `cs_low` (8), `cs_gain` (16, 8.8 fixed point), `br_offset` (9, two's complement), `th_level` (8) |
| `host_sel`, `host_addr` | in | 2, 16 | which result image to read, and the pixel index `y*256 + x` |
| `host_data` | out | 8 | that pixel, one clock after the address |
| `disp_sel` | in | 2 | which result image the display shows |
| `vga_hsync_n`, `vga_vsync_n`, `vga_blank_n`, `vga_r/g/b`, `vga_frame_start` | out | 1/1/1/8/1 | video DAC side |
| `sram_addr`, `sram_dq` | out, in | 20, 16 | SRAM address and data (read only) |
| `sram_ce_n`, `sram_oe_n`, `sram_we_n`, `sram_lb_n`, `sram_hb_n` | out | 1 | SRAM controls, active low; `sram_we_n` stays high |

The select codes are in `img_pkg::disp_sel_e`: 0 contrast, 1 brightness,
2 threshold, 3 negative.

**Tuning the contrast stretch.** To map an input range `[lo, hi]` onto
`[0, 255]`, set `cs_low = lo` and `cs_gain = round(255 * 256 / (hi - lo))`.
Levels above `hi` then clip to 255. The divide is done once, by whoever sets
the tuning, so the hardware needs only a multiplier and a comparator. A gain
of 256 (1.0) with `cs_low = 0` is the identity.

Tuning values are read directly while a pass runs. Change them only between
passes.

## Parameters and size

| module | parameter | default | notes |
|--------|-----------|---------|-------|
| `img_fu_top` | `IMG_W`, `IMG_H` | 256, 256 | image size; `N_PIX = IMG_W*IMG_H` |
| `img_fu_top` | `PIX_DIV` | 2 | system clocks per VGA pixel |
| `sram_loader` | `RD_WAIT` | 1 | extra clocks for SRAM access time |
| `contrast_stretch` | `GAIN_FRAC` | 8 | fraction bits of the gain |
| `vga_ctrl` | `H_*`, `V_*` | 640x480 at 60 Hz | timing |

At the default size the design holds 5 x 64 KiB of buffer memory, which is
2,621,440 bits as arrays that map to block RAM. It also has about 150
flip-flops and one 8x16 multiplier. The SRAM address uses only its low 15
bits, because 65,536 pixels are 32,768 words, so the upper address bits are
constant 0.

## What is taken as given and what is chosen here

The following come from the architecture this design implements:

* the four enhancement operations, which run at the same time on a
  gray-scale image;
* on-chip input and output data buffers;
* an output multiplexer;
* an SRAM with output-enable, write-enable, byte-mask and chip-enable
  controls;
* a VGA output;
* a PLL-generated processing clock.

The following are choices made here:

* the 8-bit pixel and the 256x256 image size;
* the exact formulas above, such as the 8.8 gain, the 9-bit offset and
  ">=" for the threshold;
* one-clock latencies and one pixel per clock;
* one ODB per unit, with two read ports;
* the start/busy/done handshakes, and refusing a start while the other
  phase runs;
* two pixels per SRAM word, low byte first, and a read-only SRAM path;
* the VGA mode and image placement;
* one clock domain, with the pixel clock as a clock enable.

Things to know before trusting it on hardware:

* **Clock.** The architecture aims at a PLL-raised processing clock, up to
  1 GHz. That figure is a PLL output limit, not something this logic will
  meet on a Cyclone-IV-class FPGA. Its longest path is the 8x16 multiply and
  clamp in `contrast_stretch`, in one stage. Budget for roughly 100 to
  200 MHz there, or add a pipeline stage to all four units (see above).
* **VGA clock.** The display shares the processing clock through `pix_ce`.
  If `clk` is not twice the 25 MHz pixel rate, set `PIX_DIV` to match, or
  give `vga_ctrl` a clock of its own. That needs a clock-domain crossing on
  the ODB's port B, which this design does not have.
* **SRAM access.** The loader samples the SRAM `RD_WAIT + 1` clocks after it
  drives the address. Set `RD_WAIT` so that this covers the SRAM's access
  time.
* **No SRAM write path.** Images reach the SRAM by other means, such as the
  board's control panel or a host. Results are read back through
  `host_addr`/`host_data` and are not written to SRAM.
* **On-chip memory.** It limits the image size. A 640x480 input and four
  outputs would need about 12.3 Mbit, which is more than the block RAM of
  that FPGA family.

## Files

* `rtl/img_pkg.sv`: pixel type, tuning and result structs, select codes.
* `rtl/contrast_stretch.sv`, `brightness_ctrl.sv`, `threshold_op.sv`,
  `negative_op.sv`: the four point operations.
* `rtl/spatial_fu.sv`: the four operations side by side.
* `rtl/idb.sv`, `rtl/odb.sv`: input and output buffers.
* `rtl/proc_ctrl.sv`: the frame sequencer.
* `rtl/out_mux.sv`: the result selector.
* `rtl/vga_ctrl.sv`: the display.
* `rtl/sram_loader.sv`: SRAM to IDB.
* `rtl/img_fu_top.sv`: everything wired together.
* `tb/tb_<module>.sv`: one self-checking testbench per module.
  `tb/tb_img_fu_top.sv` is the end-to-end test at full size.
* `tb/tb_img_pkg.sv`: the test image and reference models.
* `tb/sram_model.sv`: a behavioural asynchronous SRAM. It computes its
  contents instead of storing them: word `a` = {`pix_at(2a+1)`,
  `pix_at(2a)`}, where `pix_at(i) = (73 i) xor (i >> 5) xor (29 (i >> 11))`,
  truncated to 8 bits.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each one has a watchdog that counts a failure if the test hangs.
With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb rtl/img_pkg.sv tb/tb_img_pkg.sv \
  tb/tb_img_fu_top.sv --top-module tb_img_fu_top
./obj_dir/Vtb_img_fu_top
```

Replace the top module to run another testbench (for example `tb_spatial_fu`
or `tb_vga_ctrl`). The simulator has two states, so the design resets
everything it reads. Run with `+verilator+rand+reset+2` to start the rest
from random values.

The end-to-end test (`tb_img_fu_top`, about 1.5 million clocks, a few
seconds) does the following:

* loads the 256x256 test image from the SRAM model;
* processes it with two tuning sets;
* reads back all 4 x 65,536 results and compares each with the reference
  models;
* checks the VGA output pixel by pixel for 260 lines with one selection,
  then the first lines after two display switches;
* checks the load time (2 clocks per pixel) and the frame time (N+3 clocks).

It also counts each mechanism and fails if one never happens:

* brightness saturation at 255 and at 0;
* contrast below `low`, and contrast clipped at 255;
* both threshold outcomes;
* starts refused while the other phase runs;
* display switches;
* sync pulses.

The module testbenches shrink buffers, frames or screens so that they run in
well under a second. `tb_vga_ctrl` uses an 8x6 visible screen, and
`tb_proc_ctrl` a 16-pixel frame.
