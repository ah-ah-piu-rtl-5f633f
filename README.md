# Ah-Ah-Piu FPGA hardware

Ah-Ah-Piu is a side-scrolling shooting game that you play with your voice. A long
sound makes the hero rise, a short burst fires a bullet, and silence lets the hero
sink. The game runs on an Altera DE2 board. A Nios II soft processor runs the game
logic in software. It reads microphone samples from the hardware, decides what is
on screen, and writes positions, animation frames, the score and sound commands
back to the hardware.

This repository holds the hardware side as synthesizable SystemVerilog:

- a VGA controller that composes 16 moving picture elements over a background
  image stored in external SRAM;
- an audio path for the WM8731 codec: microphone input, background music fed by
  interrupts, and sound effects played from an on-chip ROM;
- a seven-segment score display;
- the I2C sequence that configures the codec.

The processor, its memories, the codec chip and the monitor are outside the RTL. They
are reached through one Avalon-MM master port and the board pins of `ahp_top`.

## System structure

```
            Avalon-MM master (processor)
                     |
              avalon_decoder   m_address[7:6] selects the slave
   +---------+-------+--------+-------------+
   |0        |1               |2            |3
vga_raster  audio_out      audio_in_slave  led_controller
   |  |       |   |  \          |               |
 SRAM VGA   sfx_rom DACLRC   audio_in_deser   HEX3..HEX0
 (read) DAC        DACDAT     ADCLRC BCLK ADCDAT
                              codec_config -> I2C to the codec
```

| slave | `m_address[7:6]` | registers (word address `m_address[5:0]`) |
|---|---|---|
| VGA | 0 | 32 x 16-bit display registers, see below |
| audio out | 1 | 0: effect command; 1..31: next 31 music samples |
| audio in | 2 | any address: latest left-channel microphone sample |
| LED | 3 | 0..3: score digits, ones to thousands |

Each slave registers its read data. The decoder returns it with `m_readdatavalid`
one clock after `m_read`. Writes take effect at the clock edge where `m_write` is
high. An assertion in the decoder checks that read and write never come
together.

Everything runs from the 50 MHz board clock. The 25 MHz pixel rate and the 25 MHz
codec reference are clock enables, not separate clocks. `aud_xck` is a
divide-by-two register. Reset (`reset_n`) is synchronous and active low.

## The picture

### Layers and elements

The screen is 640 x 480 at about 60 Hz. The raster is 800 x 525 pixels at
25 MHz: HSYNC 96, back porch 48, active 640, front porch 16 pixels; VSYNC 2,
back porch 33, active 480, front porch 10 lines. The picture has four layers.
Within a layer, the element listed first wins.

| layer | elements (slot) | size | frames |
|---|---|---|---|
| 1 (top) | boss (0), firework (1), five ammo icons (2..6) | 60x80, 60x80, 20x46 | boss 3 |
| 2 | bullet (7), player (8), three life icons (9..11) | 66x25, 60x60, 30x30 | player 2 |
| 3 | three enemies (12..14), ammo box (15) | 60x80, 60x46 | |
| 4 (bottom) | SRAM background, menu, game-over and score images | | |

Every element is an instance of `sprite`, which contains:

- two `sprite_axis` comparators, one per axis, each deciding whether the scan
  position lies inside the element and giving the offset into the pattern;
- a `sprite_rom` holding one colour index (one byte) per pixel, with all frames
  stored one after another.

Index 0 is transparent. `layer_mux` takes the first opaque slot, or the background
index if there is none. `color_map` turns the index into 24-bit RGB. The palette is
the 216-colour cube: index = 36r + 6g + b, and level k gives intensity 255 - 51k.
So index 0 is white and index 215 is black. The palette is computed, not stored.

### Display registers

| reg | meaning | reg | meaning |
|---|---|---|---|
| 0 / 15 | boss X / Y | 9, 16, 17, 18 | score digits, thousands .. ones |
| 1 / 14 | bullet X / Y | 19 | background mode: 0 game, 1 menu, 2/3/4 game-over images |
| 2 / 13 | player X / Y | 20 / 21 | ammo box X / Y |
| 3 / 12, 4 / 11, 5 / 10 | enemies 0, 1, 2 X / Y | 22..26 | X of ammo icons 5..1 (row 65) |
| 7 / 8 | firework X / Y | 27..29 | X of life icons 3..1 (row 70) |
| 30 | boss frame 0..2 | 31 | player frame 0..1 |

Register 6 is unused. Reset values place the elements at their start positions
(for example the ammo icons at 510, 490, 470, 450 and 430). A frame number that is
out of range shows frame 0. Positions are the top-left pixel. An element partly
off the right or bottom edge is clipped.

### Background from SRAM

The 512 KB SRAM (256K x 16) holds two colour indices per word. The even column is
in the high byte and the odd column in the low byte. `bg_addr_gen` maps the scan
position to a word address:

| region | where on screen | address |
|---|---|---|
| full-screen scene | everywhere else | x/2 + 320 y |
| menu (mode 1) | 300 x 100 at (150, 330) | 153600 + 150 (y-330) + (x-150)/2 |
| game over A/B/C (modes 2/3/4) | 150 x 100 at (200, 330) | 168600 / 176100 / 183600 + 75 (y-330) + (x-200)/2 |
| score label (mode 0) | 60 x 30 at (200, 440) | 193500 + 30 (y-440) + (x-200)/2 |
| score digits (mode 0) | four 16 x 30 cells from (260, 440) | 191100 + 240 d + 8 (y-440) + ((x-260) mod 16)/2 |

The highest word used is 194,399, so the images fit in the SRAM's 262,144 words.
The SRAM is only read here. Loading the images is a separate step outside this
design.

### Pipeline and alignment

One pipeline stage per pixel:

1. **s0**: `vga_timing` counts the raster and gives x, y, active and syncs.
2. **s1**: each `sprite_axis` registers its hit and offset. The SRAM address is
   registered and goes to the pins.
3. **s2**: each pattern ROM is read. The SRAM word is captured; the asynchronous
   SRAM has one full pixel, 40 ns, to answer.
4. **s3**: `layer_mux` picks the layer.
5. **s4**: `color_map` looks up the colour and the outputs are registered.

HSYNC, VSYNC and blanking go through the same four stages. An element at
register (X, Y) therefore starts exactly at visible column X, row Y, and
background pixel x comes from the word for column x. No one-pixel correction is
needed. Blanked pixels are black. `vga_sync_n` is held low. The two low bits of
each 10-bit DAC colour are zero.

## Sound

### Microphone input

`audio_in_deser` makes the codec's ADCLRC and BCLK from the 25 MHz enable:

- ADCLRC toggles every 1563 ticks, an 8 kHz sample rate.
- BCLK has a period of 99 ticks, rising at tick 49 of each bit. It restarts at
  every ADCLRC edge, so each half frame has exactly 16 bit clocks.

Each bit of ADCDAT is taken as BCLK rises, MSB first (left-justified format). At the
next ADCLRC edge the finished word is presented on `data_out`, with a one-clock
`audio_req` pulse and `is_left`. `audio_in_slave` keeps the latest left-channel
word for the processor.

Software turns these samples into the three controls (silence, long sound, short
sound).

### Music and effects out

`audio_out` makes DACLRC from the 50 MHz clock: it toggles every 4168 clocks, so
samples go out at 6 kHz.

- **Channels.** Music goes to the left channel. The right channel carries the
  effect sample while an effect plays, and the same music sample otherwise.
- **Serial format.** Words are sent MSB first, left justified.
- **Bit clock.** The WM8731 has only one BCLK for ADC and DAC, and the
  microphone block drives it. So `audio_out` shifts DACDAT with that clock
  (`bclk_in`):
  - the codec samples on rising BCLK;
  - the word shifts on each falling BCLK that comes after a rising edge seen
    since the word was loaded.

  The block also makes its own 261-clock bit clock, `dac_bclk`. Tie it to
  `bclk_in` to use the block on its own.

**Music buffer and interrupt.** Software writes 31 samples to registers 1..31. A
pointer steps through them once per sample period: 1, 2, .., 31, 1, ...

- When word 31 has been loaded for sending, `request` (`irq_audio`) rises.
- Any bus write to the block clears it.
- Software then has one full sample period (167 us) before word 1 is read again,
  and 31 periods for the whole buffer.
- The right channel reuses a held copy of the current music word, so a refill in
  the middle of a frame cannot change it.

**Effects.** The 16K x 16 ROM holds three effects back to back: [0, 6314),
[6314, 10650) and [10650, 16184). Register 0 is a command:

| command | action |
|---|---|
| 1, 3, 5 | load the start address of effect 1, 2, 3 |
| 2, 4, 6 | play: step the address once per sample until the effect's end, then fall silent |
| 0 | stop |

Software writes the odd command, then the even one.

### Codec set-up

After reset, `codec_config` uses `i2c_master` to send eleven 3-byte write
transactions to the codec, at device address 0x1A (0x34 on the wire). SCL runs at
100 kHz. The words are sent in this order:

| word | register | value | setting |
|---|---|---|---|
| 1 | R15 | | reset |
| 2–3 | R0, R1 | 0x017 | line in 0 dB |
| 4–5 | R2, R3 | 0x079 | headphones 0 dB |
| 6 | R4 | 0x011 | DAC selected, microphone unmuted with boost, INSEL = 0 |
| 7 | R5 | 0x000 | |
| 8 | R6 | 0x000 | all powered |
| 9 | R7 | 0x001 | slave, 16 bit, left justified |
| 10 | R8 | 0x00C | |
| 11 | R9 | 0x001 | active |

A word that is not acknowledged is sent again, and `retries` counts these. `codec_ready` rises when
all eleven are through.

Note on INSEL: the original design describes INSEL = 0 as selecting the
microphone, and this RTL follows that. The WM8731 data sheet defines it the other
way round. If a board shows no microphone input, change R4 to 0x015 in
`ahp_pkg::codec_word`.

## What follows the original and what does not

Taken from the original design:

- the block structure;
- the layer contents and element counts;
- the register map, reset positions and SRAM image layout;
- the 216-colour palette;
- the audio dividers (8 kHz in, 6 kHz out) and the 31-word music buffer with its
  interrupt;
- the effect commands and ROM ranges;
- the codec register set.

Choices made here:

- **Clocking and bus.** A single clock with enables; the Avalon address map and a
  simple decoder in place of the generated fabric.
- **VGA pipeline.** An exactly aligned pipeline; background regions as exact
  image-size boxes.
- **DAC bit clock.** DACDAT shifts on the codec's shared BCLK.
- **Interrupt and channels.** When the interrupt rises; the right channel's
  fallback to music.
- **Codec set-up.** I2C timing and retry; the exact codec register values.

Where the original's numbers disagree, the divider and address constants were
used:

- **Input bit clock.** A 16-bit word at 8 kHz suggests a 128 kHz bit clock. The
  divider gives 252 kHz with 16 bits per channel.
- **Effect boundaries.** They are 6314, 10650 and 16184, taken as half-open
  ranges.
- **Output sample rate.** 6 kHz is made from 50 MHz.

**Not reproduced.** The game's artwork and recorded sound effects cannot be
recreated here:

- Without a pattern file, each `sprite_rom` holds a computed placeholder: an
  ellipse with a two-pixel black rim, a fill colour per element and frame, and
  transparent corners. Give real art with the `INIT_FILE` parameter, in the
  `$readmemh` format: one byte per pixel, row by row, frame after frame.
- Without an `INIT_FILE`, `sfx_rom` holds a triangle tone in each effect's range
  (periods 24, 40 and 16 samples, amplitude ±8000). Real samples load the same way.

**Memory.** The patterns take 420,080 bits, with one copy per element instance.
With the 262,144-bit effect ROM this is more block RAM than the DE2's Cyclone II
EP2C35 has (483,840 bits). On that part, share the ROM of identical elements or
build some patterns as logic.

**Not here.** These parts are outside the RTL:

- the processor, its on-chip memory, SDRAM and the SDRAM controller;
- the SRAM controller used to load images;
- the codec itself and the monitor.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. Each has a watchdog that counts a failure if it
hangs.

| testbench | what it checks |
|---|---|
| `tb_ahp_top` | the whole design at full size; see below |
| `tb_vga_raster` | three complete frames, every visible pixel against a reference model: overlaps, clipping, score digits, frame switch, menu and game-over modes, sync widths, line and frame length |
| `tb_audio_out` | music continuity across refills, the interrupt, effects 1 and 3 played word by word from start to end address, effect 2's start, the stop command; 6 kHz / 16-bit timing at full-size dividers |
| `tb_audio_in_deser` | 8 kHz frame length, 16 bit clocks per half frame, words from a codec model |
| `tb_codec_config`, `tb_i2c_master` | the eleven words, the I2C waveform, a refused word resent |
| the rest | exhaustive or random checks of each small block |

`tb_ahp_top` runs the top level with default parameters and real timing, about
3.7 million clocks (74 ms of operation: four video frames and fourteen music
refills). Around the top level it places:

- a processor model with an interrupt handler;
- an SRAM model;
- the codec's I2C slave and ADC models;
- a DACDAT decoder that reads the way the codec does.

It counts each mechanism and fails if one never happens:

- codec configuration;
- register read-back through the decoder;
- LED digits;
- microphone samples read over the bus;
- interrupt-driven music refills, and the continuity of the music;
- effect 2 played from the ROM;
- a sprite frame switch;
- a background mode switch (game to menu);
- the VGA frame period.

Run any testbench with plain Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/ahp_pkg.sv tb/tb_ahp_top.sv \
          --top-module tb_ahp_top
./obj_dir/Vtb_ahp_top
```

`tb_ahp_top` and `tb_vga_raster` each take a few seconds to a minute. The others are
quicker.

## Files

- `rtl/ahp_pkg.sv`: shared constants and types, including:
  - raster timing and register numbers;
  - element sizes and the placeholder art function;
  - the palette function and effect ROM ranges;
  - codec words;
  - the Avalon request struct `av_req_t` and the slave numbers.
- `rtl/ahp_top.sv`: the top level.
- `rtl/*.sv`: one module per file, as named above.
- `tb/*.sv`: testbenches, plus the models `i2c_slave_model` and
  `codec_adc_model`.
