# VGA generator with colour, character and seven-segment modes

This is a small video generator for an FPGA board with a 50 MHz clock, a
video DAC (8 bits per colour plus blank and sync inputs), an external 1M x 16
asynchronous SRAM, twelve data switches, three mode switches and a push
button. It produces a 640x480 VGA picture in one of three modes:

| mode code | mode           | what is on the screen                                                  |
|-----------|----------------|------------------------------------------------------------------------|
| `000`     | colour         | the whole screen in the 12-bit colour on the data switches             |
| `001`     | character      | one character, chosen by switches 0-7, repeated over the screen, drawn from a font held in the SRAM |
| `010`     | seven-segment  | three large hexadecimal digits, one per group of four switches         |

The idea is to draw without a frame buffer. Every pixel is computed at the
moment the beam reaches it, from the screen position, the mode and the
switches. Each mode produces one bit per pixel ("lit or not"). A colorizer
then paints the lit pixels in the colour chosen last in colour mode.

## Blocks

```
 clk 50 MHz ─► clk_div2 ──pix_en──┬──────────────────────────────────────────────┐
                 │ vga_clk        ▼                                              │
                 ▼             h_timing ──x, h_blank, h_sync, line_end──┐        │
                              v_timing ◄──line_end                      │        │
                                 │ y, v_blank, v_sync                   ▼        │
  mode_sw, key_n ─► mode_fsm ────┼──────────────► char_controller ─char_bin─┐    │
                                 │                 ▲ sram_addr / sram_dq    │    │
                                 └──────────────► seg7_display ──seg_bin──┐ │    │
                                                  (clk32_div x2,          ▼ ▼    │
                                                   hex7seg,         pixel_source_mux
                                                   seg_pixel_decoder)     │ bin  │
                                                                          ▼      │
                                       sw ─────────────────────────► colorizer ◄─┘
                                                                          │
                                                                 vga_r/g/b (8 bits each)
 h_sync, v_sync, h_blank, v_blank ─► 2-pixel delay ─► AND gates ─► vga_hs, vga_vs,
                                                                  vga_sync_n, vga_blank_n
```

| file                      | block                                                         |
|---------------------------|---------------------------------------------------------------|
| `rtl/vga_pkg.sv`          | mode encoding, default timing numbers, colour widening        |
| `rtl/vga_top.sv`          | top level, wiring, sync/blank alignment, SRAM control pins    |
| `rtl/clk_div2.sv`         | 50 MHz to 25 MHz pixel clock and pixel enable                 |
| `rtl/h_timing.sv`         | horizontal counter: h_sync, h_blank, column, line end         |
| `rtl/v_timing.sv`         | vertical counter: v_sync, v_blank, line, frame end            |
| `rtl/mode_fsm.sv`         | three-state mode register                                     |
| `rtl/char_controller.sv`  | character mode: font SRAM addressing and glyph bit selection  |
| `rtl/seg7_display.sv`     | seven-segment mode: block grid and digit selection            |
| `rtl/clk32_div.sv`        | five-stage divide-by-32 used for the 32x32 blocks             |
| `rtl/hex7seg.sv`          | hex digit to active-low segments                              |
| `rtl/seg_pixel_decoder.sv`| which segment covers a block of a digit cell                  |
| `rtl/pixel_source_mux.sv` | picks the mode's pixel bit                                    |
| `rtl/colorizer.sv`        | stores the colour and paints the pixel bit                    |

## Clocking and timing

Everything runs on the 50 MHz board clock. `clk_div2` toggles a flip-flop to
make the 25 MHz pixel clock `vga_clk` for the DAC. It also makes `pix_en`, a
pulse in every second cycle, at the board-clock edge where `vga_clk` rises.
All pixel-rate registers advance only on `pix_en`. The true VGA pixel rate is
25.175 MHz; 25 MHz is close enough for monitors.

The timing is set by the parameters of `h_timing` and `v_timing`. Their
defaults are:

| horizontal (pixels) |     | vertical (lines) |     |
|---------------------|-----|------------------|-----|
| front porch         | 16  | active           | 480 |
| sync pulse          | 96  | front porch      | 11  |
| back porch          | 48  | sync pulse       | 2   |
| active              | 640 | back porch       | 31  |
| total               | 800 | total            | 524 |

A horizontal line starts with the front porch and ends with active video.
`line_end` marks the last active pixel and steps the line counter. A frame
starts with its active lines. The vertical numbers give 524 lines, about
59.6 frames per second. The common industry timing uses 10/2/33 (525 lines).
To use it, override the `v_timing` parameters in `vga_top`.

`h_blank` and `v_blank` are **high during active video**: they are active-low
blank signals. `h_sync` and `v_sync` are low during the sync pulse.
`vga_blank_n` is the AND of the two blanks. `vga_sync_n` is the AND of the two
syncs. `vga_hs` and `vga_vs` are also brought out on their own.

## How one pixel is made

This is the part that needs the most care. It is a two-stage pipeline.

1. In the pixel period where the counters point at pixel (x, y), the mode's
   generator computes that pixel's bit. It registers the bit on the next
   `pix_en`.
2. `pixel_source_mux` passes the current mode's bit to the colorizer. The
   colorizer registers the colour on the following `pix_en`.

So the RGB outputs show pixel (x, y) two pixel periods after the counters
were at it. `vga_top` delays `h_sync`, `v_sync`, `h_blank` and `v_blank` by
the same two pixels. Because of this delay, the blank edge falls exactly on
the first and last pixel of each line. If you add a stage to the pixel path,
add one to the `ctl_d1`/`ctl_d2` chain too.

The mode machine, the switches and the SRAM are read live. A change made
during active video takes effect from the next pixel. The picture is only
clean when changes happen while the screen is blank.

## Mode machine

`mode_fsm` holds a 3-bit state. While the button is released, the state
holds. While the button is held (`key_n` low), the state is loaded on each
pixel from the mode switches I2..I0:

| I2 I1 I0    | next state              |
|-------------|-------------------------|
| 001         | 001 character           |
| 010         | 010 seven-segment       |
| every other | 000 colour              |

In equations: S2 = 0, S1 = ~w·S1 + w·~I2·I1·~I0, S0 = ~w·S0 + w·~I2·~I1·I0.
Here w is the button. The button is used as a level, without debouncing.
Bouncing does no harm, because every load gives the same state. Reset
selects colour mode. An assertion checks that S2 never becomes 1.

## Colour mode and the colorizer

In colour mode the colorizer reads red from `sw[3:0]`, green from `sw[7:4]`
and blue from `sw[11:8]`. It widens each 4-bit value to 8 bits by **doubling
every bit**: b3 b3 b2 b2 b1 b1 b0 b0. For example, 4'b1100 becomes 8'hF0.
This is not the more usual nibble repetition (which would give 8'hCC). The
colour fills the whole screen and is stored on every pixel. The colour in
force when colour mode is left stays stored. The other modes paint it where
their bit is 1, and paint black elsewhere.

So the data switches must hold the wanted colour at the moment the button
switches to another mode. After that they can be set to a character code or
to digits.

## Character mode and the font SRAM

The font is the 256-character PC code page 437 set, with 8x16-pixel glyphs.
It must be loaded into the SRAM by other means, such as the board vendor's
PC control tool. This design only reads the SRAM. Its chip, output and byte
enables are held active, and write enable is held off.

Font layout (word address, 16-bit words):

```
word(code, r) = code * 8 + r / 2            r = glyph row 0..15
bits [7:0]  of the word: row r when r is even
bits [15:8] of the word: row r + 1
bit k of a row byte: pixel column k, bit 0 is the LEFTMOST pixel
```

A font image converts to this layout as follows. For each glyph and row, set
bit k when pixel k of that row is lit. Then pack two row bytes into each word,
the even row in the low byte. The font takes 2048 words, addresses 0 to 2047.

Each character cell on the screen is 16 pixels wide: the 8 glyph columns and
then an 8-pixel gap. Each cell is 16 lines high. The screen thus holds 40x30
cells, and all of them show the character on `sw[7:0]`. The SRAM address
depends only on the line, so it is set once per line. The SRAM has a whole
blanking interval to settle before the first pixel, so any asynchronous SRAM
fast enough for 25 MHz reads works.

## Seven-segment mode

The screen is cut into 32x32-pixel blocks, a grid of 20 columns by 15 rows.
Two `clk32_div` counters form the blocks. One counts pixels and is cleared
outside active video. The other counts lines and is cleared outside the
active frame. Their wrap pulses step three counters: a column within the
digit (0..4), the digit position and the block row.

A digit cell is 5 block columns wide: 4 for the digit and 1 empty column as a
gap. It is 8 block rows high, and the remaining 7 rows stay dark. Each
segment is two blocks long:

```
 col  0 1 2 3
row 0 . . . .
    1 . A A .
    2 F . . B
    3 F . . B
    4 . G G .
    5 E . . C
    6 E . . C
    7 . D D .
```

With 20 columns there are 4 digit positions. `seg7_display` supports all four
(`NUM_DIGITS = 4`), with a per-position enable. `vga_top` shows `sw[3:0]`
leftmost, then `sw[7:4]` and `sw[11:8]`. It keeps the fourth position dark.
`hex7seg` produces active-low segments, as a board's seven-segment decoder
does. `seg_pixel_decoder` inverts them. The digits use the usual shapes
0-9, A, b, C, d, E, F.

## Top-level ports (`vga_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | 50 MHz |
| `rst_n` | in | 1 | synchronous reset, active low |
| `sw` | in | 12 | data switches |
| `mode_sw` | in | 3 | mode switches I2..I0 |
| `key_n` | in | 1 | push button, active low |
| `sram_addr` | out | 20 | font SRAM word address |
| `sram_dq` | in | 16 | SRAM read data |
| `sram_ce_n`, `sram_oe_n`, `sram_we_n`, `sram_ub_n`, `sram_lb_n` | out | 1 | SRAM control, fixed for reading |
| `vga_clk` | out | 1 | 25 MHz pixel clock for the DAC |
| `vga_hs`, `vga_vs` | out | 1 | sync pulses, active low |
| `vga_blank_n`, `vga_sync_n` | out | 1 | AND of the blanks / of the syncs |
| `vga_r`, `vga_g`, `vga_b` | out | 8 | colour |
| `mode` | out | 3 | current mode state |
| `frame_end` | out | 1 | one-cycle pulse at the end of each frame (undelayed) |

## Departures from the original design

- **Not included: an image mode from SDRAM.** The original board plan had a
  mode that drew an image read from SDRAM, with muxes choosing between it and
  the colorizer. That path never worked, and its muxes were fixed to the
  colorizer. This RTL has no SDRAM port. The colorizer drives the outputs
  directly.
- **One clock domain.** The original ran the timing from the divided clock
  and the vertical counter from the h_sync edge. Here everything runs on the
  board clock with enables. The vertical line count steps at the end of each
  active line rather than on the sync edge.
- **Sync/blank alignment.** The original fed the sync and blank signals
  straight to the DAC, so the picture was shifted by the pixel pipeline. Here
  they are delayed to match.
- **Character mode** takes its cell column from the pixel column rather than
  from a free-running counter. The result is the same, because 800 and 160
  are both multiples of 16. The character code is 8 bits wide.
- **Mode code of character mode.** The state table and state diagram give
  character mode the code 001, and this RTL follows them. A user manual
  written for the original design says 100. With this RTL, 100 selects
  colour mode.
- **Three of four digit positions are used.** This follows the user manual
  of the original design, even though the screen has room for four.
- The vertical sync is 2 lines. A literal reading of the original counter
  comparison would give 3.
- **Chosen here:** the reset behaviour, the stored colour resetting to black,
  the seven-segment digit shapes and the button polarity.

## Simulation

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops. Each has a watchdog that ends the
run with a failure if it hangs. With Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_vga_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/vga_pkg.sv tb/tb_vga_top.sv
./obj_dir/Vtb_vga_top
```

Replace `tb_vga_top` with any other testbench name. Always list
`rtl/vga_pkg.sv` first.

| testbench | what it checks |
|-----------|----------------|
| `tb_vga_top` | six full frames at the default 640x480 timing. It checks every sync and blank period and width, and every active pixel in colour, character and seven-segment mode. It also checks holding the mode without a press and the fallback from an unused code to colour mode. It runs in a few seconds. |
| `tb_h_timing`, `tb_v_timing` | every pixel/line of three lines / two frames against the timing table |
| `tb_clk_div2`, `tb_clk32_div` | dividers, enables, clear |
| `tb_mode_fsm` | all 3 states x 16 input combinations against the next-state equations |
| `tb_colorizer` | random stimulus against a reference model |
| `tb_char_controller` | random font, random codes, every row and column |
| `tb_seg7_display` | two frames of random digits and enables |
| `tb_hex7seg`, `tb_seg_pixel_decoder`, `tb_pixel_source_mux` | exhaustive |

`tb/sram_model.sv` is a behavioural model of the asynchronous SRAM, for
simulation only. Its reads are combinational, and testbenches fill its array
directly. The testbenches generate their fonts at random, so no font file is
needed. The real code page 437 glyphs are not included. The simulator used
has only two states, so all state in the RTL is reset.
