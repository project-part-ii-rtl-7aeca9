# PacMan video system: a tile frame buffer on VGA for a small MIPS computer

This is the hardware around a MIPS processor that runs a simple PacMan game on
an FPGA board (a Spartan-3E class board with a 3-bit VGA port). The processor
does not draw pixels itself. It copies 8 x 8-pixel pictures (sprites) from a
small ROM into a frame buffer with ordinary `lw`/`sw` instructions. A VGA
driver scans that buffer out to the monitor without the processor's help. The
player steers with four slide switches or an Atari CX40 joystick. An optional
AY-3-8910 sound chip plays a tone when the stick moves.

The RTL covers everything between the processor's buses and the board pins:

| module        | role |
|---------------|------|
| `pacman_top`  | the system: memories, bus decoding, video, joystick and sound |
| `vga_driver`  | turns frame-buffer words into R, G, B, hsync, vsync |
| `vga_timing`  | 640 x 480 raster counters and sync pulses (used by `vga_driver`) |
| `data_memory` | 8K-word RAM; its first 8000 words are the frame buffer |
| `storage_rom` | sprite ROM |
| `instr_mem`   | program ROM for the processor |
| `bus_decoder` | address map of the processor's load/store bus |
| `joystick`    | direction register the program reads |
| `atari_if`    | input stage for the active-low CX40 joystick pins |
| `ay_sound`    | writes a tone into an AY-3-8910 over its register bus |
| `pacman_pkg`  | shared constants: geometry, VGA timing, codes, address map |

The processor is not included. Neither is the game program or the full sprite
set. The processor's instruction-fetch port and data bus are ports of
`pacman_top`, so any MIPS core with a one-cycle-latency memory interface can be
attached.

## How a picture is held in memory

This part needs the most care. Every module and every program that touches the
screen has to agree on it.

* The picture is **320 x 200 pixels**, which is **40 x 25 tiles** of 8 x 8 pixels.
* A pixel is **4 bits** in memory. The top bit is unused. The other three are
  red, green and blue, one bit each, so there are 8 colours:

  | code | colour  | code | colour  |
  |------|---------|------|---------|
  | 000  | black   | 100  | red     |
  | 001  | blue    | 101  | magenta |
  | 010  | green   | 110  | yellow  |
  | 011  | cyan    | 111  | white   |

* A 32-bit word holds **8 horizontally adjacent pixels**. The leftmost pixel is
  in the most significant nibble. For example, the word `0x77054071` reads left
  to right as white, white, black, magenta, red, black, white, blue.
* The buffer is a plain row-major array of words, starting at word 0 of the
  data RAM, with 40 words per pixel row:

      word address = row * 40 + column / 8        (row, column in pixels; integer division)
      red   = word[30 - 4 * (column % 8)]
      green = word[29 - 4 * (column % 8)]
      blue  = word[28 - 4 * (column % 8)]

* The whole picture takes 40 x 200 = 8000 words. The RAM has 8192, which
  leaves 192 words at byte addresses 0x7D00 to 0x7FFF for program data.
* A sprite in the ROM is 8 consecutive words, one per sprite line. The word
  format is the same as the buffer's, so drawing a sprite at tile (tx, ty)
  takes eight word copies. Copy *r* goes to `(ty*8 + r) * 40 + tx`.

The default ROM image (`rtl/storage_rom.hex`) holds one sprite in words 0 to 7.
It is a magenta ghost (`5`) with white (`7`) eyes and black (`0`) pupils on a
black background. The rest of the ROM is zero. Replace the file, or set
`ROM_INIT`, to load a real sprite set.

## Scanning the buffer out

`vga_timing` produces a standard 640 x 480 raster: 800 x 525 pixel periods,
with front porch, sync and back porch of 16/96/48 pixels and 10/2/33 lines. Both
sync pulses are negative. The design runs on one clock, `clk`, nominally
50 MHz. A divider gives one pixel tick every `PIX_CLK_DIV` = 2 clocks, which
makes the usual 25 MHz pixel rate.

The 320 x 200 picture is shown unscaled in the **top-left quarter** of the
screen, with its origin at the top-left corner. Everything outside it is black.

`vga_driver` is a two-stage pipeline clocked by the pixel tick:

1. On tick *k* it presents the word address of pixel *k* to the RAM's display
   port. It also stores pixel *k*'s column within the word, an
   "inside picture" flag, and the raw sync levels.
2. On tick *k+1* the RAM word is there. The driver picks the pixel's three bits
   and registers them onto `red_out`, `green_out` and `blue_out`, together with
   the delayed `hsync`/`vsync`.

The pins therefore lag the raster counters by two pixel periods, and colour and
sync stay aligned. During reset the three colour outputs are 0 and both syncs
are high (inactive).

The RAM reads the same word eight times in a row, once per pixel. This keeps
the driver simple. The RAM's second port is dedicated to the display, so these
reads never disturb the processor.

## The processor's view

All loads return their data **one clock after the address**, like a block RAM.
Stores take effect on the clock edge.

| byte address      | target | access |
|-------------------|--------|--------|
| 0x0000 – 0x7FFF   | data RAM (frame buffer at 0x0000 – 0x7CFF) | lw / sw |
| 0x8000 – 0xBFFF   | sprite ROM | lw |
| 0xC000            | joystick register, bits 3..0 | lw |
| 0xC004            | sound: `sw` sets the tone (bits 7..0) and plays it; `lw` returns bit 8 = busy, bits 7..0 = tone | lw / sw |

Address bits 31..16 are not decoded. Within 0xC000 to 0xFFFF, bit 2 alone
selects joystick or sound. The instruction memory has its own port
(`imem_pc` → `imem_instr`, also one clock of latency). By default it is loaded
from no file and holds zeros, which MIPS executes as no-ops. Set `IMEM_INIT` to a
`$readmemh` image of the program.

## Joystick

The register holds one of four one-hot codes, or 0000 when nothing is held:

| direction | code | slide switch | CX40 pin |
|-----------|------|--------------|----------|
| up        | 0001 | `sw[0]`      | 1 |
| right     | 0010 | `sw[1]`      | 4 |
| down      | 0100 | `sw[2]`      | 2 |
| left      | 1000 | `sw[3]`      | 3 |

The CX40's contacts close to ground and are pulled up on the board (through a
74244 buffer), so the `joy_*_n` pins are active low. `atari_if` samples and
inverts them. The stick's directions are ORed with the switches. The result
passes a two-flop synchronizer and is then encoded. If several directions are
held at once, the first of up, right, down, left wins, so the program always
sees a valid code. A change reaches the register 3 to 4 clocks after the pin
moves. Fire (pin 6) has no code; it comes out on `joy_fire`.

## Sound

The AY-3-8910 is programmed through registers over its DA0–DA7 bus. BDIR, BC2
and BC1 steer the bus: `111` latches a register number, `110` writes data into
it, and `010` leaves the bus idle. A8 is held high and /A9 low, so the chip is
always selected. Each time the program stores a tone value, or the joystick
register takes a new non-zero code, `ay_sound` writes four registers:

| register | value | meaning |
|----------|-------|---------|
| R7 | 0x3E | mixer: tone on channel A only |
| R8 | 0x0F | channel A at full amplitude |
| R1 | 0x00 | coarse tone period |
| R0 | 255 − tone | fine tone period |

A larger tone value gives a shorter period and so a higher pitch. Each write
takes four phases: latch, idle, write, idle. Each phase lasts `HOLD` = 32 clocks
(640 ns at 50 MHz), so one tone takes 16 × HOLD = 512 clocks. The bus pins are
registered, so they change cleanly. If a request arrives while a sequence
runs, it is queued (one deep). The chip's own clock comes from a separate
4 MHz crystal.

## Board connections

| top port | goes to |
|----------|---------|
| `red_out`, `green_out`, `blue_out` | VGA DE15 pins 1, 2, 3 (through the board's resistors) |
| `hsync`, `vsync` | VGA DE15 pins 13, 14 |
| `joy_up_n`, `joy_down_n`, `joy_left_n`, `joy_right_n`, `joy_fire_n` | CX40 DE9 pins 1, 2, 3, 4, 6 via pull-ups and a 74244 |
| `ay_da[7:0]` | AY-3-8910 DA7..DA0, pins 30..37 |
| `ay_bdir`, `ay_bc2`, `ay_bc1` | pins 27, 28, 29 |
| `ay_a8`, `ay_a9_n` | pins 25, 24 |

`rst` is synchronous and active high, and clears every register that drives a
pin.

## What follows the original specification and what is this design's own

These come from the original project specification: the picture size, tile
size, pixel packing, colour codes, the address and bit-select equations,
clearing the colours on reset, the 8K-word RAM, the sprite ROM, the joystick
codes and switch order, the CX40 pinout, and playing a tone through DA0–DA7
when the stick moves.

The following are choices made here, where the specification is silent:

* **VGA timing, clock and placement.** The porch and pulse widths, the sync
  polarity, the 50 MHz clock with a pixel enable, and showing the picture
  unscaled in the top-left quarter.
* **A second RAM port for the display.** The original system built the data
  RAM from a single-port block memory and did not describe how the display
  shared it. Here the display has its own read port.
* **The address map** and the one-clock load latency.
* **The joystick details.** The synchronizer, the priority rule for several
  directions, and ORing the stick with the switches.
* **The AY programming details.** Register numbers, mixer and amplitude
  values, inverting the tone value so that higher means higher pitch, the
  phase length, and the one-deep request queue.
* **Memory sizes and contents.** The sprite ROM depth (256 words), the
  instruction memory depth (1024 words), and the ghost as the only built-in
  sprite.

## Simulating

Every testbench in `tb/` checks its own results. Each ends by printing
`TB_RESULT checks=N failures=M`. Run them from the repository root, because
the memory images are loaded by paths relative to it:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/pacman_pkg.sv tb/pacman_top_tb.sv --top-module pacman_top_tb
    obj_dir/Vpacman_top_tb

Replace the testbench name to run another one.

* `pacman_top_tb` runs the whole system at its default sizes, in about two
  seconds. A bus-master model stands in for the processor. It copies the ghost
  from the ROM to five tiles and a row of random tiles, and reads words back. It
  moves every direction on the switches and on the stick, and plays tones,
  including one queued behind another. A model of the AY register bus checks
  what the chip would receive. Finally the testbench follows one complete VGA
  frame from the sync pulses alone and compares all 420,000 pixel periods on
  the colour pins with its own copy of the buffer.
* `pacman_screen_tb` fills all 1000 tiles of the picture through the bus.
  Half of them get the ghost and half get random pixels. It also fills the
  192 words after the picture. It then checks a whole frame pixel by pixel,
  redraws one tile, and checks that the next frame shows the change.
* `vga_driver_tb` does the same frame comparison against a pseudo-random
  buffer. `vga_timing_tb` measures every sync width and period.
* The memory, joystick, Atari, sound and bus-decoder testbenches each check
  their block against a reference model written independently in the testbench.

The simulations use two-state logic, and every register that reaches an output
is reset.
