# Split-screen overlay of computer RGB video on RS-170 video

Two video sources that are not synchronised cannot be mixed line by line: at
any instant one may be in the middle of line 130 while the other is in vertical
retrace, and the mixed picture rolls and tears. This design fixes that with a
frame buffer. Once every eighth field it captures the computer's RGB picture
(a DEC PRO-350, 15.4 MHz pixels, 60 Hz non-interlaced fields) into memory. It
then reads the memory back in step with the RS-170 picture, so the stored
lines arrive at the right moment. An external MC1378 overlay IC switches,
line by line, between the live RS-170 video (lines 1-120 of each field) and
the stored RGB video (lines 121 on). The result is a split screen: the camera
on top, the computer picture below.

Two cost choices shape the whole design:

* **One bit per colour.** Each RGB input is sliced at 0.4 V, so the picture
  has eight colours. This saves three A/D converters and a factor of four
  in memory.
* **Half a picture, refreshed at 7.5 Hz.** Only the lower half of the RGB
  picture (RGB lines 121 on) is stored, and only in every eighth RGB field
  (60/8 = 7.5 Hz). The memory is single-ported in time. While it is being
  written it cannot be read, and the overlaid half of the screen is black
  for that RS-170 field.

## Block map

```
              PRO-350 RGB (volts)                          RS-170 composite
                     |                                           |
             +----------------+                          +---------------+
             | input_interface|  r,g,b bits, csync       |   MC1378      |  (external IC)
             | 4 comparators  |----------+               | VCO, V sync,  |
             +----------------+          |               | video switch  |
                                    sync_ff x4           +---------------+
                                         |                 |clk  ^ hsync ^ rgb_data
        +------------------------+       |  rs170_vsync -> |     |       | overlay_select
        |  video_memory_control  |<------+----------------------+|       |
        |  vblank_separator      |  csync                        |       |
        |  write_timing          |<-- overlay_sel ---+           |       |
        |  2:1 sync mux          |                   |           |       |
        +------------------------+           +------------------------+  |
          | mem_vblank, mem_hsync            | overlay_select_control |  |
          | count_en, we_n, read_valid       | line counter, =121     |  |
          v                                  +------------------------+  |
        +------------------------------------+     ^ hsync               |
        | video_memory                       |  +----------------+       |
        |  vmem_addr_gen (MEM EN, A15..A0,   |  | rs170_sync_gen |-------+
        |                 4K block selects)  |  | /2275, pix_ce  |
        |  vmem_color_path x3 (r, g, b):     |  +----------------+
        |   shift reg -> block reg -> 8 x    |
        |   sram_4kx4 -> output shift reg    |--> rgb_data (black unless read_valid)
        +------------------------------------+
```

`sph_top` wires all of these together. Every module is in `rtl/<name>.sv`,
and the shared types and default numbers are in `rtl/sph_pkg.sv`.

## How a memory update is timed

This is the least obvious part of the design. The same address counters serve
writing and reading. The syncs that drive them are switched between the two
sources.

1. **Separating RGB vertical blank.** The green input carries composite sync.
   Its slicer outputs 1 at or below 0.0 V, so every blanking interval looks
   like a sync pulse. Horizontal pulses last 10.9 us and vertical blanking
   about 1272 us. `vblank_separator` asserts the RGB vertical blank once
   `csync` has been high for 430 master clocks (12 us). It drops the signal
   when `csync` falls.
2. **Eighth-field detect.** `write_timing` counts RGB vertical-blank rising
   edges in a 3-bit counter. When all three bits are 1, `eighth_field`
   (`write_field` at the top) is high for that whole RGB field. After reset
   the first write field is the one after the 7th vertical blank, and then
   every 8th.
3. **Line 121.** An 8-bit counter is cleared during RGB vertical blank. It
   counts RGB sync edges and stops at 121. Line *n* is the *n*-th sync edge
   after vertical blank ends. TIME TO WRITE (`writing`) is `eighth_field AND
   line==121`. It stays high for the rest of the field, and in fact until
   the next vertical blank has been separated.
4. **Sync multiplexer.** While `eighth_field` is high, the address counters
   get the RGB vertical blank and RGB sync. Otherwise they get the RS-170
   ones. Because of this, the counters restart from zero at the RGB vertical
   blank that begins the write field.
5. **Counter enable and write enable.**
   `we_n = !time_to_write` and
   `count_en = time_to_write | (overlay_select & !eighth_field)`.
   In a write field the counters advance from RGB line 121. In any other
   field they advance from RS-170 line 121, exactly when `overlay_select`
   goes high. Memory line 0 is therefore line 121 of both pictures.
6. **Black during updates.** `read_valid` is set by an RS-170 vertical blank
   that occurs outside a write field. A write field clears it. While it is
   low, `rgb_data` is forced to black. An RS-170 field that overlaps a write
   field, even in part, shows black on its lower half. The next field that
   starts cleanly shows the new picture.

The sources drift against each other, so the RS-170 field that goes black
varies. The RGB side sets the update rate exactly, at one write field in
eight.

## Pixel blocks and the memory address

At 15.4 MHz a pixel lasts 65 ns, which is too short for one memory cycle per
pixel. Each colour path (`vmem_color_path`) therefore collects four pixels in
a shift register. On MEM EN, the fourth pixel enable after the line's sync
edge and every fourth one after it, it copies them into the pixel block
register. The block is written one clock later into the selected 4K x 4
chip. That is one write per about 260 ns. Reading mirrors this. On MEM EN the
addressed word is loaded into an output shift register and shifted out one
pixel per pixel enable, first-captured pixel first. As a result a stored line
comes out **one block (4 pixels) to the right** of where it was captured,
relative to the horizontal sync.

The 16-bit address is `{line[7:0], block[7:0]}`, so `0x0420` is block 0x20 of
line 4. Bits A11..A0 go to every chip. A15..A12 are decoded into one-hot 4K
block selects. The pixel and block counters are cleared at every horizontal
sync edge and at vertical blank. The line counter is cleared at vertical
blank and advances at each sync edge while `count_en` is high.

**Memory size.** A picture needs 120 lines x 200 blocks (800 pixels / 4) per
colour, or 96,000 bits. Packed densely, that fits in six 4K x 4 chips
(24K x 4), which is what the original hardware plan specifies.
With the line-major address above, however, 120 lines span A15..A12 = 0..7,
which needs eight 4K chips. This RTL keeps the address format and uses
**8 chips per colour** (`NUM_BANKS = 8`). With `NUM_BANKS = 6` the same logic
stores only lines 121-216 of the picture.

## Clocks

The MC1378 provides a 35.8 MHz master clock that is phase-locked to the
RS-170 sync, and every flip-flop in this design runs on it (`clk`).

* `rs170_sync_gen` divides it by 2275 to make the RS-170 horizontal sync
  (15.74 kHz, 390 clocks = 10.9 us wide). That sync goes back to the MC1378,
  which returns the vertical sync on `rs170_vsync`.
* The 15.4 MHz pixel clock is a clock enable, `pix_ce`. 15.4 MHz is not an
  integer division of 35.8 MHz, so a phase accumulator adds 154 per clock
  modulo 358. It is restarted at each line, so every line has the same 979
  pixel enables, spaced 2 or 3 clocks apart.
* The same pixel enable samples the incoming RGB. The PRO-350 is not locked
  to it, so the capture instant wanders by up to one master clock (28 ns).
  A hardware version would adjust the sampling phase with a delay line.
* The comparator outputs and the returned vertical sync are asynchronous.
  Each passes through a two-flop synchroniser (`sync_ff`). All sync-driven
  counters count detected rising edges instead of being clocked by the sync
  signals.

## Top-level interface (`sph_top`)

| port | dir | meaning |
|---|---|---|
| `clk` | in | 35.8 MHz master clock (MC1378 clock output) |
| `rst_n` | in | asynchronous active-low reset |
| `red_v`, `green_v`, `blue_v` | in, `real` | PRO-350 video in volts: colour 0.3 (off) to 0.7 V (on); sync on green at -0.3 V, blanking 0.0 V |
| `rs170_vsync` | in | RS-170 vertical sync/blank from the MC1378, active high |
| `rs170_hsync` | out | horizontal sync to the MC1378 |
| `rgb_data` | out, `rgb_t` | stored picture to the MC1378 RGB inputs (through a resistor divider) |
| `overlay_select` | out | MC1378 video select: 1 = `rgb_data`, 0 = live RS-170 |
| `write_field`, `writing` | out | status: update field, and TIME TO WRITE |

`overlay_select` rises one clock after the 121st RS-170 sync edge following
vertical blank. It falls during the next vertical blank.

## What is not logic

* **Input comparators** (`input_interface`). This is a behavioural model with
  `real` inputs and is not synthesizable. A hardware version uses four fast
  comparators: three at 0.4 V for the colours, and an inverting one at
  0.0 V for sync. The 75-ohm terminations and the 15 ns comparator delay are
  not modelled.
* **MC1378 overlay IC.** It contains the VCO that makes `clk`, the vertical
  sync, the RGB-to-composite encoder and the fast video switch. It is outside
  the RTL. Its pins are the top-level ports above, and `tb/mc1378_model.sv`
  models its vertical sync for simulation.
* **The resistor network** that scales TTL RGB down to about 1 V for the
  MC1378, and **the adjustable delay line** on the capture clock. Neither has
  a logic function.

## How far to trust it, and where it departs

The block structure, the thresholds, the divide by 2275, the 15.4 MHz pixel
rate, the 4-pixel blocks, the address format, the every-eighth-field update
and the line 121 split all come from the original description. The following
are this design's own choices:

* The design uses one clock, with clock enables and edge detection, instead of
  counters clocked by sync signals. It adds synchronisers.
* The vertical blank is found by counting clocks instead of with an RC timer.
  The separated vertical blank is active high.
* The pixel and block counters are also cleared at each horizontal sync.
  Without this, the block address would drift from line to line.
* There are 8 chips per colour instead of 6 (see above).
* The exact COUNT EN equation, and the `read_valid` flag that makes the
  update field black, are this design's own.
* The sync width of the generated RS-170 horizontal sync is taken equal to
  the 10.9 us PRO-350 pulse.
* The capture is one block ahead of the display (4 pixels to the right).

The end-to-end testbench runs the full-size design for 18 RGB fields against
independent models of both sources. It checks every mechanism above, but it
uses idealised sources: clean edges, and a single long vertical pulse instead
of RS-170 equalising and serration pulses. Real serrated vertical sync has
short gaps that would restart the vertical-blank timer. The separator
threshold and the line numbering assume the simplified sync.

## Simulating

Everything is plain SystemVerilog for Verilator 5. Each testbench prints
`TB_RESULT checks=N failures=M` and ends. Example, the end-to-end run (about
12 s):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl -y tb +libext+.sv rtl/sph_pkg.sv tb/tb_sph_top.sv \
  --top-module tb_sph_top --Mdir obj_top -o sim
obj_top/sim
```

Testbenches (`tb/`):

| testbench | what it checks |
|---|---|
| `tb_sph_top` | full design at default size: write fields, line-121 switching, stored picture replayed at the right line and position, black during updates, picture replaced by the next update, both RS-170 field lengths |
| `tb_input_interface` | slicing thresholds and sync polarity |
| `tb_rs170_sync_gen` | 2275-clock line, 390-clock sync, 979 pixel enables per line, 2-3 clock spacing |
| `tb_vblank_separator` | short pulses ignored, long pulses give vertical blank after 430 clocks (run with a 20-clock threshold) |
| `tb_write_timing` | eighth-field detect, TIME TO WRITE from line 121, /W and COUNT EN |
| `tb_video_memory_control` | sync multiplexer, separated vertical blank, `read_valid` |
| `tb_vmem_addr_gen` | MEM EN every 4th pixel, address = {line, block}, all 8 block selects |
| `tb_sram_4kx4` | memory chip read, write and deselect |
| `tb_vmem_color_path` | 600 blocks written and read back in pixel order |
| `tb_video_memory` | 24 lines of random colours written and read back one block later |

`tb/pro350_model.sv` and `tb/mc1378_model.sv` are the behavioural source
models used by `tb_sph_top`. The PRO-350 model draws 32-pixel stripes whose
colour is `(field + line + pixel/32) mod 8`. The testbench can therefore
tell which field was stored and whether lines and pixels line up.

## Changing it

The default numbers are in `sph_pkg`, and each module takes them as
parameters:

* `H_DIV`, `HSYNC_WIDTH`, `PIX_NUM`/`PIX_DEN` set the line and pixel timing.
* `VBLANK_MIN` is the vertical-blank threshold in clocks.
* `FIELD_BITS` sets the update interval, 2^FIELD_BITS fields.
* `WRITE_LINE`/`OVERLAY_LINE` set the split line. Keep them equal.
* `NUM_BANKS` is the number of 4K chips per colour, up to 16.

If the master clock changes, scale `HSYNC_WIDTH` and `VBLANK_MIN` with it.
`VBLANK_MIN` must stay above the horizontal sync width in clocks and below
the vertical pulse.
