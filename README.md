# Tetris display and sound peripheral

This is the FPGA half of a Tetris game. The other half is software on an ARM
processor. The software runs the whole game: falling, collisions, rotation
checks, line clears, scoring and the random choice of the next piece. After
every change it writes the visible state into a small register file on the
FPGA. The hardware turns that state into a 640x480 VGA picture and plays the
selected music through the board's WM8731 audio codec.

The screen stores no frame buffer. Each pixel is worked out on the fly from
about a thousand bits of registers:

- the 10x20 board;
- the position, shape and orientation of the falling piece;
- the next piece;
- two scores;
- two music settings.

## Block structure

```
             Avalon-MM (5-bit word address, 32-bit data, write only)
                               |
  tetris_top                   v
  +----------------------------------------------------------------------+
  | tetris_vga   tetris_regs --> game state                               |
  |                 |                                                     |
  |   vga_counters -+-> background_layer -> block_clut --+                |
  |   (hcount,      +-> falling_layer  --+               |  priority      |
  |    vcount)      +-> falling_layer  --+-> block_clut -+-> mux -> VGA_* |
  |                 |   (next piece)    ^                |                |
  |                 |       tetromino_rom (2 read ports) |                |
  |                 +-> bin2bcd x2 -> score_layer -------+                |
  |                                                                       |
  |   audio_player <-> audio_sample_rom                                   |
  +------|---------------------------------------------------------------+
         | two Avalon-ST streams (left, right)
         v
   audio_dac_out (2 x 128-sample FIFOs, left-justified serialiser) --> AUD_DACDAT
   wm8731_config (I2C start-up writes to the codec) --> I2C_SCLK / I2C_SDAT
```

`tetris_pkg` holds the shared types and constants: the register addresses,
`shape_t`, `rgb_t`, the `game_state_t` struct, and the tetromino masks as
functions. `sync_fifo` is a small helper FIFO used by `audio_dac_out`.

## Register map

All registers are write only. Each is one 32-bit word at the word address
shown.

| Address | Register | Bits used | Meaning |
|---|---|---|---|
| 0..19 | board row 0..19 | [29:0] | ten 3-bit colour codes; column 0 (left) in [2:0]; row 0 is the **bottom** row |
| 20 | falling vertical | [9:0] | signed: pixels from the top of the board to the top of the piece's 4x4 box |
| 21 | falling horizontal | [9:0] | signed: board column of the left edge of the 4x4 box |
| 22 | falling sprite | [2:0] | shape: I, O, T, S, Z, J, L = 0..6; 7 = no piece |
| 23 | next sprite | [2:0] | shape shown in the preview box; 7 = none |
| 24 | score | [31:0] | unsigned, shown in decimal |
| 25 | high score | [31:0] | unsigned, shown in decimal |
| 26 | music sound | [3:0] | which of 16 sounds to play |
| 27 | music enable | [0] | play the selected sound |
| 28 | falling orientation | [1:0] | quarter turns clockwise from the spawn orientation |

- Colour code 0 is an empty cell. Codes 1..7 are blue, white, red, yellow,
  green, purple and orange.
- A falling piece of shape `s` is drawn in colour `s + 1`. Software that
  locks a piece into the board should write that same code into the rows.
- Writes take effect at once, in the cycle after the bus write. The display
  does not wait for a frame boundary, so a write made mid-frame can tear for
  one frame. To avoid this, the software should write during vertical
  blanking.
- Reset clears every register and sets both sprite registers to 7 (none).
  The screen then shows an empty board and zero scores.

## How a pixel is chosen

`vga_counters` produces standard 640x480 at 60 Hz from the 50 MHz clock:

- `hcount` counts 1600 clocks per line, two clocks per pixel.
- `vcount` counts 525 lines.
- `VGA_CLK` is `hcount[0]`, a 25 MHz pixel clock.

Every layer is combinational in the pixel position (x, y):

- **Board** (`background_layer`). The board's top-left corner is at
  (240, 80). Cells are 16x16 pixels, inside a 4-pixel grey frame. The cell
  row gives the register: screen row `r` reads register `19 - r`. The
  column picks a 3-bit field.
- **Falling piece** (`falling_layer`). The piece is a 4x4 sprite box with its
  top-left corner at board pixel (`16*fall_h`, `fall_v`). The pixel's place in
  the box selects one bit of the shape's mask. The falling piece is drawn only
  inside the board, so it can slide in from above the top edge and stand
  partly past a wall.
- **Next piece.** A second `falling_layer` draws the next piece, in
  orientation 0, at (420, 80).
- **Block art** (`block_clut`). Settled and falling blocks share one look: a
  lighter top/left edge, a darker bottom/right edge and a flat face. The edge
  colours come from the base colour: light = 0x80 + c/2 and dark = c/2 per
  component. There are two instances, one for the sprite path and one for the
  board path.
- **Digits** (`bin2bcd`, `score_layer`).
  - Each score is converted to 10 BCD digits by a sequential double-dabble
    converter. It restarts whenever the value changes and is ready 34 clocks
    later.
  - The digits are drawn as 16x24 seven-segment glyphs at (420, 176). The high
    score is drawn 40 pixels lower.
- **Priority.** Inside the board, the falling piece wins over a settled block,
  and a settled block over the empty-cell colour (dark grey). Outside the
  board the order is frame, next piece, digits, then black.

The chosen colour is registered. So `VGA_R/G/B`, the syncs and
`VGA_BLANK_n` all change one clock after the counters. The picture is
therefore shifted by half a pixel, which cannot be seen.

### Tetromino masks

`tetromino_rom` is a table of 32 entries of 16 bits, indexed by
`{shape, orientation}`. It has two read ports: one for the falling piece and
one for the preview.

- Bit `4*r + c` is row `r` (top = 0), column `c` (left = 0) of the 4x4 box.
- The entries are computed at elaboration from the spawn shape and repeated
  quarter turns clockwise. J, L, S, T and Z turn in the top-left 3x3 box; I
  turns in the full 4x4 box.
- O is the same in every orientation. I has two states. That leaves 23
  distinct masks.
- The formula is in `tetris_pkg::rotate_cw`: cell (r, c) of the result is
  cell (n-1-c, r) of the source.

## Sound path

Sounds are 8 kHz, 16-bit, signed mono.

- `audio_sample_rom` holds 16 sounds of 2048 samples (0.26 s each). Set
  `INIT_FILE` to load a hex file with one 16-bit sample per line, sound
  after sound.
- Without a file, sound `k` is a triangle wave with a period of `16 + 4k`
  samples and an amplitude of ±8192. This is enough to hear and test the
  path.

`audio_player` (inside `tetris_vga`):

- While music enable is 1, it reads the selected sound and loops it.
- Each sample is offered six times on both the left and the right Avalon-ST
  stream, because the codec runs at 48 kHz.
- It changes sound, or stops, only at a sample boundary. A new selection
  starts from its first sample.
- The streams follow the usual ready/valid rule with ready latency 0. Valid
  and data hold until the word is taken. Assertions check this.

`audio_dac_out` (in `tetris_top`):

- It has one 128-sample FIFO per channel. `ready` means the FIFO is not full.
  The FIFOs pull the player along at exactly the codec's rate.
- The codec is the clock master. `AUD_BCLK` and `AUD_DACLRCK` are
  synchronised into the 50 MHz domain with two flip-flops. Each edge of the
  frame clock then starts one 16-bit word.
- The format is left justified:
  - The MSB is driven right after the frame-clock edge.
  - Each following bit is driven on a falling edge of `AUD_BCLK`, so the
    codec reads it on the rising edge.
  - The left channel is sent while `AUD_DACLRCK` is high.
- Both FIFOs are read at the start of the left half. The right word is then
  held for its half, so a left/right pair is never split across frames.
- An empty FIFO sends zero and increments `underflows`. This always happens
  for a few frames after reset or when music is switched off.

`AUD_XCK` is the 12.288 MHz input `audio_clk`, which comes from a PLL outside
this design. The codec divides it into a 3.072 MHz bit clock and a 48 kHz
frame clock.

### Codec set-up

`wm8731_config` sends eleven register writes to the codec after reset. Each
write is a 3-byte I2C transfer to device 0x34 at 100 kHz.

| Word | Setting |
|---|---|
| 1E00 | reset |
| 0017, 0217 | line-in volume 0 dB, unmuted |
| 0479, 0679 | headphone volume 0 dB |
| 081C | DAC selected, line bypass on, microphone to ADC, microphone bypass off |
| 0A00 | no de-emphasis, DAC soft mute off |
| 0C00 | everything powered |
| 0E41 | master mode, left justified, 16 bit |
| 1000 | normal mode, 48 kHz from 12.288 MHz |
| 1201 | interface active |

The data line is open drain. `I2C_SDAT_drive_low` tells the pad to pull low,
and `I2C_SDAT_in` reads the line back. The board wrapper must build the
tristate pad. `codec_ready` rises when all writes are done. `codec_ack_error`
latches if any byte was not acknowledged.

## Where this differs from the original design description

- **Row format.** The original description gives two different row formats.
  One is 20 bits per row, which can hold only three colours plus empty. The
  other is 30 bits with seven colours. This design uses 30 bits and seven
  colours. With 20-bit rows, only codes 0..3 would be usable.
- **Falling piece encoding.** A single 8-bit sprite number (one of ~25 stored
  sprites) is replaced by a 3-bit shape register and a 2-bit orientation
  register. The rotated masks are generated, not stored.
- **Next-piece address.** The "next" register had no address. It is placed at
  23, the only free word.
- **Bus width.** A 16-bit bus, with the score sent in two halves, was also
  mentioned. This design uses 32-bit writes throughout.
- **No pause/refresh register.** One was listed among the driver's duties
  but never given an address. The peripheral has no read-back.
- **Speaker.** The sound goes to the WM8731 codec. An early plan used a
  piezo speaker on a GPIO pin instead.
- **Audio core and PLL.** These were vendor IP blocks. This design has its
  own output path (`audio_dac_out`) and codec set-up (`wm8731_config`). The
  codec's audio input side is not built. The 12.288 MHz PLL is not built and
  enters as `audio_clk`.
- **Music.** The real theme recording is not included. Test tones stand in
  for it until a sample file is given.
- **Screen layout.** Screen layout, colours, block art and digit shapes
  were not specified and are this design's own.

## Files

- `rtl/`: one module or package per file. `tetris_top` is the top.
- `tb/tb_<module>.sv`: a self-checking testbench for each module. Each
  prints `TB_RESULT checks=N failures=M` and has a watchdog.
- `tb/tetris_ref_pkg.sv`: an independent model of the screen and of the test
  tones. The two system-level benches use it.
- `tb_tetris_vga` writes register states and compares whole frames pixel by
  pixel against the model. It also checks the sync pulse widths and the audio
  stream.
- `tb_tetris_top` runs the whole design at its default sizes. It includes a
  model of the codec's I2C acknowledge and of its bit and frame clocks. It:
  - configures the codec;
  - draws several board states and piece moves and rotations, and compares
    the frames;
  - plays two sounds while decoding the serial output;
  - switches music off;
  - checks that FIFO back-pressure and underflow each happened.

  It builds and runs in well under a minute.

## Simulating

Verilator 5 with `--timing` is enough. The package must come first:

```
verilator --binary --timing -Wno-fatal -j 0 \
  rtl/tetris_pkg.sv $(ls rtl/*.sv | grep -v tetris_pkg) \
  tb/tetris_ref_pkg.sv tb/tb_tetris_top.sv \
  --top-module tb_tetris_top -o sim && ./obj_dir/sim
```

For a single block, replace the testbench and the top module, for example
`tb/tb_bin2bcd.sv` with `--top-module tb_bin2bcd`. Only the blocks that
module uses are needed, but passing every file of `rtl/` is harmless. The
simulator is two-state. Every testbench resets or initialises what it reads.
