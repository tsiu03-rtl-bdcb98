# VGA read-out of an SRAM frame buffer

This design shows a 640x480 image, held in an external 16-bit asynchronous
SRAM, on a VGA screen at 60 Hz. It generates the SRAM addresses, picks each
pixel's byte out of the 16-bit word that comes back, decodes the 8-bit colour
code to 24-bit RGB for an ADV7123 video DAC, and makes the horizontal and
vertical sync and blanking signals. The target is a Cyclone IV board (DE2-115
class) with a 50 MHz oscillator. The pixel rate, though, is 25 MHz.

The central idea is a **clock-enable pipeline**. Everything runs on the 50 MHz
clock. A clock enable that is high every second cycle advances the pixel and
line counters. Every other register loads on every 50 MHz edge. A pixel value
therefore stays on the counters for two cycles, and each pipeline stage adds
one 50 MHz cycle of delay. The same clock enable serves as the DAC's 25 MHz
pixel clock.

## Video timing

One frame is 798 x 525 pixel periods of 40 ns (59.7 frames per second).

| region           | horizontal (pixels) | vertical (lines) | hcnt / vcnt range |
|------------------|---------------------|------------------|-------------------|
| c, visible       | 640                 | 480              | 0..639 / 0..479   |
| d, front porch   | 15                  | 10               | 640..654 / 480..489 |
| a, sync pulse    | 95                  | 2                | 655..749 / 490..491 |
| b, back porch    | 48                  | 33               | 750..797 / 492..524 |

hsync, vsync and blank are all active low. blank is 0 everywhere outside the
visible picture. The horizontal total is 798, not the 800 of the common
640x480 timing: the front porch is 15 and the sync pulse 95. The constants live
in `rtl/vga_pkg.sv`. Changing them there changes the whole design.

## Pixel storage and colour code

Pixels are stored row by row, two per SRAM word. Pixel index
`i = vcnt*640 + hcnt` lives at word `i/2`:

* an even pixel in D7..D0;
* an odd pixel in D15..D8.

So `sram_addr = vcnt*320 + hcnt[9:1]` and the byte select is `hcnt[0]`. The
image fills words 0..153599. During blanking the address keeps following the
counters, up to 168078, and may point past the image. Those words are never
shown.

Each byte is a colour code:

| bit 7 | bits 6..0                                   |
|-------|---------------------------------------------|
| 0     | grey level, 0 = black .. 127 = white        |
| 1     | red [6:5] (0..3), green [4:2] (0..7), blue [1:0] (0..3) |

Each field is widened to the DAC's 8 bits by repeating its bits from the MSB
down. Zero then maps to 0 and the field's maximum maps to 255:

* green `x[2:0]` becomes `{x, x, x[2:1]}`;
* red and blue `x[1:0]` become `{x, x, x, x}`;
* grey `g[6:0]` becomes `{g, g[6]}` on all three channels.

The green rule is the specified one. The red, blue and grey rules apply the
same principle.

## The pipeline

```
 edge of clk      0        1         2          3
 stage            1        2         3          4
                 hcnt  -> hsync2 -> hsync3 -> hsync4   (VGA connector)
                 vcnt  -> vsync2 -> vsync3 -> vsync4   (VGA connector)
                 blank1 -> blank2 -> blank3 -> [DAC register]
                 addr,SRAM -> pixcode2 -> RGB -> [DAC register]
```

* **Stage 1** holds the counter outputs. The blanking decode, the address
  generation and the asynchronous SRAM read are combinational here.
* **Stage 2** holds the registered sync signals (`hs_gen`, `vs_gen`), `blank2`
  and the selected pixel byte (`pixel_reg`).
* **Stage 3** holds `blank3` and the decoded colour (`rgb_gen`), which go to
  the DAC.
* **Stage 4** is inside the DAC, which registers colour and blank on the rising
  edge of `vga_clk`. At the same moment the FPGA's `hsync4`/`vsync4`
  flip-flops update, so sync and picture stay aligned.

**Why the DAC may be clocked by the enable.** The counters change on the edge
where `ce` is 1, which is also the edge where `ce` falls. Stage-3 data change
two edges later, which is again a falling edge of `ce`. They are therefore
stable across the next rising edge of `ce`, the one that clocks the DAC. The
connector signals change three 50 MHz cycles after the counters.

**Why the line counter looks at 654.** vsync must change together with the
start of an hsync pulse, that is when `hcnt` becomes 655. The line counter's
enable is `ce && hcnt == 654`. Its register then loads on the same edge on
which `hcnt` goes from 654 to 655, and `vcnt` and `hcnt` change together.
Comparing with 655 would be the natural first attempt. It makes every line
(and vsync) one pixel late, because `hcnt` is already a register output when
the line counter reads it. `hs_gen` and `vs_gen` register their decodes from
`hcnt` and `vcnt` in the same stage. As a result, vsync edges fall exactly on
hsync falling edges.

## Modules

| file | role |
|------|------|
| `rtl/vga_pkg.sv`      | timing constants, counter and colour types |
| `rtl/vga_top.sv`      | top: wires the pipeline, brings out the SRAM, DAC and sync pins |
| `rtl/ce_gen.sv`       | toggling flip-flop, the clock enable and pixel clock |
| `rtl/pixelcounter.sv` | `hcnt` 0..797, advances with `ce` |
| `rtl/linecounter.sv`  | `vcnt` 0..524, advances with `ce` when `hcnt` is 654 |
| `rtl/blank_gen.sv`    | combinational visible-area decode (`blank1`) |
| `rtl/hs_gen.sv`, `rtl/vs_gen.sv` | registered sync decodes (`hsync2`, `vsync2`) |
| `rtl/pipe_delay.sv`   | plain delay registers for the sync and blank pipelines |
| `rtl/ram_control.sv`  | SRAM address, byte select, constant read controls |
| `rtl/pixel_reg.sv`    | byte select and stage-2 register |
| `rtl/rgb_gen.sv`      | colour decode and stage-3 register |

Top-level ports:

* `clk` (50 MHz) and `rstn` (asynchronous, active low).
* SRAM: `sram_addr[19:0]` and the active-low controls `sram_ce_n`,
  `sram_oe_n`, `sram_we_n`, `sram_ub_n`, `sram_lb_n`. In this design they are
  fixed at read with both bytes: 0, 0, 1, 0, 0. Read data comes in on
  `sram_data[15:0]`.
* DAC: `vga_r/g/b[7:0]`, `vga_clk`, `vga_blank` and `vga_sync`, which is held
  at 0.
* VGA connector: `hsync` and `vsync`.

## Where this design makes its own choices

* **Reset.** All registers use an asynchronous active-low reset. The counters
  reset to 0, the enable to 0, the syncs to 1 (inactive), blank to 0 and the
  pixel and colour registers to 0. The first frame therefore starts at pixel
  (0,0) right after reset.
* **SRAM data bus.** It is an input only, since nothing is ever written. On a
  real board the bidirectional pad stays undriven.
* **Counter width.** Both counters are 10 bits, the smallest width that holds
  797 and 524.
* **Line counter wrap.** It wraps after line 524 (480 + 10 + 2 + 33 = 525
  lines).
* **Colour widening.** Bit repetition is used for the 2- and 7-bit fields
  (see above).
* **Address multiply.** `vcnt*320` is written as a multiply by a constant,
  which synthesis reduces to shifts and an add.
* **Group-number display.** The surrounding board application also shows a
  fixed group number on the seven-segment LEDs, to identify the build that
  is running. It is not included: it is only a parameter driving constants.

## Verification

Every module has a self-checking testbench in `tb/`, `tb_<module>.sv`. Each
ends by printing `TB_RESULT checks=N failures=M`:

* `tb_pixelcounter`: random and regular enables. A line lasts exactly
  1596 cycles.
* `tb_linecounter`: more than a full frame. `vcnt` steps only on the edge
  where `hcnt` becomes 655, and wraps 524 to 0.
* `tb_blank_gen`: exhaustive over all counter values. The visible area is
  exactly 640 x 480.
* `tb_hs_gen`, `tb_vs_gen`: pulse position and length.
* `tb_ram_control`: every visible pixel against the storage rule, plus random
  blanking positions.
* `tb_rgb_gen`: all 256 codes against an arithmetic reference: 85x for
  2 bits, 36x + x/2 for 3 bits, 2g + g/64 for 7 bits.
* `tb_ce_gen`, `tb_pixel_reg`, `tb_pipe_delay`: phase, select and delay.

`tb_vga_top` is the end-to-end test at full size. It uses a behavioural SRAM
(`tb/sram_model.sv`) holding a computed image. The top-left pixels are 4, 80
(line 0) and 170, 213 (line 1). The other pixels are a hash of the index that
uses both colour modes. Words past the image read as 3. A model of the DAC's
input register (`tb/adv7123_model.sv`) sits between the design and the
checker. Over two whole frames and 40 lines of a third, the test checks:

* every horizontal region in pixels;
* every vertical region in lines;
* that vsync moves only with an hsync start;
* all 614400 visible pixels of both frames against the image;
* the latencies: 2 cycles to the DAC inputs, 3 to the connector;
* the `vga_clk` period;
* the constant outputs.

It counts the line wraps, frame wraps, hsync and vsync pulses, grey and RGB
pixels, and upper and lower byte reads, and fails if any of them never
happens. It runs 1.74 M clock cycles in a few seconds.

The end-to-end test compares the RGB outputs directly with the expected
colour. It does not re-encode them to a colour code, because that mapping is
not one-to-one: grey 0 and RGB black give the same output, as do grey 127 and
RGB white.

To simulate with Verilator, for example the whole design:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/vga_pkg.sv tb/tb_video_pkg.sv rtl/*.sv tb/sram_model.sv \
  tb/adv7123_model.sv tb/tb_vga_top.sv --top-module tb_vga_top -o sim
./obj_dir/sim
```

For a single block, give `rtl/vga_pkg.sv`, the block's file and its
testbench, with `--top-module tb_<block>`.

## Limits

* The SRAM's access time and the DAC's analogue side are not modelled. Timing
  closure at 50 MHz, with an asynchronous SRAM read inside one 20 ns stage,
  has to be confirmed on the target.
* Using `ce` (a register output) as the DAC clock relies on the half-period
  margin described above. The design does not add any other clock-domain
  protection.
