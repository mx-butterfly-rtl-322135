# Battlezone on an FPGA: a vector arcade board with a raster display

Atari's 1980 *Battlezone* draws its 3-D world with an analog vector
generator (AVG). The AVG is a small processor that runs a list of
"move the beam by (dx, dy) at intensity z" instructions and steers a CRT
electron beam with them. A VGA monitor cannot be steered, so this design
keeps the AVG as a digital processor that executes the original vector
program, and puts a raster pipeline behind it:

```
 6502 CPU (external) ──► address decoder ──► program RAM / ROM, POKEY, switches,
                              │               Math Box ports (external), latches
                              ▼
                    vector RAM/ROM (8-bit CPU port, 16-bit AVG port)
                              │
                              ▼
      AVG ──line segments──► line register queue ──► rasterizer (Bresenham)
                                                        │ pixel writes
                                                        ▼
                              double frame buffer (2 x 640x480x4) ──► VGA 640x480@60
```

The rest of the board is rebuilt around that pipeline. The CPU sees the
memory map of the original board. The POKEY chip supplies the controls,
the random numbers and the sound. An NMI counter paces the game loop. Two
parts are not in this RTL and connect through ports of the top level:

- The 6502 CPU. Any cycle-level 6502 core can be attached.
- The Math Box, the game's arithmetic coprocessor.

The analog sound circuits (shell, explosion, engine) and the coin and
joystick hardware are off-chip too. Only their digital latches and input
bits are here.

Everything runs from one 100 MHz clock. The slower rates of the original
board are clock enables:

| enable | divider | rate |
|---|---|---|
| CPU and POKEY | 56 | 1.786 MHz |
| AVG | 16 | 6.25 MHz |
| VGA pixel | 4 | 25 MHz |
| 3 kHz clock | half period 16667 | 3.0 kHz |

## Files

All files are in `rtl/`. Each file starts with a comment describing the block
it holds.

| file | block |
|---|---|
| `bz_pkg.sv` | shared types: AVG opcodes, the decoded-instruction record, the line-segment record, screen geometry |
| `bz_top.sv` | the board: wires every block below and brings the CPU and Math Box buses out |
| `clk_enables.sv` | the clock enables and the 3 kHz square wave |
| `addr_decoder.sv` | CPU memory map, read mux, write strobes |
| `prog_ram.sv`, `prog_rom.sv` | 1 KB program RAM, 12 KB program ROM |
| `vector_mem.sv` | 8 KB vector RAM/ROM with an 8-bit CPU port and a 16-bit AVG port |
| `avg_decoder.sv`, `avg.sv` | AVG decode unit and AVG processor |
| `line_queue.sv` | line register queue: a FIFO of segments |
| `rasterizer.sv` | Bresenham line drawing into the frame buffer |
| `frame_buffer.sv`, `fb_bram.sv` | double-buffered page store and its controller; one page RAM |
| `vga_ctrl.sv` | 640x480@60 timing and colouring |
| `pokey.sv`, `audio_pwm.sv` | POKEY subset (pot scan, random numbers, 4 audio channels); PWM audio output |
| `nmi_counter.sv` | periodic NMI |

`tb/` holds one self-checking testbench per block, `tb_<block>.sv`, plus
`tb_bz_top.sv` for the whole board.

## The AVG

### Instruction encoding

Instructions are 16-bit words, little endian in vector memory. Bits 15:13
are the opcode. The layout below is the classic Atari AVG layout.

| op | name | layout | effect |
|---|---|---|---|
| 000 | VECTOR | w0 = `000 dy[12:0]`, w1 = `z[2:0] dx[12:0]` | 32-bit long vector |
| 001 | HALT | `001 -` | stop, raise `halt` |
| 010 | SVEC | `010 dy[4:0] z[2:0] dx[4:0]` | short vector; both deltas are doubled |
| 011, bit 12 = 0 | STAT | `0110 xxxx int[3:0] color[3:0]` | load INTENSITY and COLOR |
| 011, bit 12 = 1 | SCALE | `0111 x bin[2:0] lin[7:0]` | load BINSCALE and LINSCALE |
| 100 | CNTR | `100 -` | beam to the centre (X = Y = 0) |
| 101 | JSR | `101 x addr[11:0]` | push PC+2, jump to word `addr` |
| 110 | RET | `110 -` | pop the return address |
| 111 | JMP | `111 x addr[11:0]` | jump to word `addr` |

- **Deltas:** dx and dy are two's complement.
- **Intensity field z:**
  - 0: the vector is blank. The beam moves but nothing is drawn.
  - 1: use the INTENSITY register.
  - 2 to 7: the pixel intensity is 2·z.
- **Return stack:** four entries deep. A fifth JSR wraps around and
  overwrites the oldest entry.

### Scaling and screen mapping

Every delta is scaled before it is added to the beam position:

```
d' = ((d * (256 - LINSCALE)) >>> 8) >>> BINSCALE
```

- LINSCALE is a linear factor; 0 means full size.
- BINSCALE halves the vector once per step.

The beam position (X, Y) is a signed 16-bit value with 0 at the screen
centre. It maps to a pixel as follows:

```
sx = 320 + (X >>> POS_SHIFT)
sy = 240 - (Y >>> POS_SHIFT)
```

POS_SHIFT defaults to 1. With that value, beam positions of ±640 by ±480
units fill the 640x480 screen. Both formulas are
this design's own. The original did the BINSCALE step in analog
circuitry, so it has no exact digital reference.

### Timing: the latency counter

Each instruction has a fixed latency L. VECTOR has L = 7. Every other
instruction has L = 2. A 3-bit counter tracks the instruction, and it
advances only on cycles where the AVG clock enable is high:

| counter | what happens |
|---|---|
| 0 | The word addressed by PC is on the memory output. It is latched as the instruction and decoded, and the counter loads L. |
| L … 2 | Wait. For VECTOR, the memory is addressed at PC+2 during counts 7 and 6, and the second word is latched at the end of count 6. |
| 1 | The instruction executes: registers, beam position, stack, halt and segment output. The next PC goes to the memory, so the next word is ready at the following count 0. |

So an instruction takes L+1 AVG cycles: 8 for VECTOR and 3 for the others.
At 6.25 MHz that is 1.28 µs and 0.48 µs. The memory is a synchronous
block RAM, and the schedule above fits its one-cycle read latency exactly.

### Control

**`vggo`** is the CPU's write to 0x1200. On the first clock it is seen, the
AVG:

- clears `halt`,
- sets PC = 0 (CPU address 0x2000),
- empties the stack.

**`vgrst`** is the write to 0x1600. It stops the AVG and clears PC and the
beam position.

Both signals act on the system clock, not on the AVG clock enable. While
either is high, the memory is addressed at word 0, so the first
instruction is ready on the next cycle.

**Output.** When a visible vector (z ≠ 0) executes, `line_wr` goes high for
one AVG cycle. `line` then carries both end points in pixels and the
4-bit intensity.

**Stall.** If the line queue is full at that moment, the AVG stays at
count 1 until there is room. The original AVG never had to wait; this
stall is part of this design.

## The line register queue

`line_queue` is a 16-entry FIFO of segments.

- **Write edge:** the AVG's write strobe lasts a whole AVG cycle, which is
  16 system clocks. So the queue takes a segment only on a **rising edge**
  of `wr`: the strobe must drop before the next segment is accepted.
- **Read:** the rasterizer reads the head segment while `empty` is low, and
  a one-clock `rd` pulse removes it.
- **Overflow:** a write that arrives while the queue is full is dropped and
  flagged on `overflow`. In the assembled board this cannot happen, because
  the AVG stalls on `full`.

## The rasterizer

The rasterizer draws lines with Bresenham's algorithm in its integer form.
An error term collects the minor-axis delta and moves the minor coordinate
one step when it passes the major-axis delta. The result is exactly one
pixel per column for flat lines and one per row for steep lines.

It has three states:

- **IDLE:** wait for a segment.
- **PIXEL:** write the current pixel.
- **STEP:** update the error term and the position.

Each pixel takes two clocks, so a line of N pixels is done in 2N+1 clocks.
The pixel address is `y*640 + x` (19 bits), and the pixel value is the
segment's intensity. Pixels outside the screen are stepped through but
not written, so clipping costs time but never wraps around.

- `idle` is high between segments.
- `done` pulses on the last pixel of a segment.

## The frame buffer: double buffering and clearing

`frame_buffer` holds two pages, A and B. Each page is 307200 words of
4 bits, one per pixel, in a simple dual-port block RAM. A four-state
controller decides which page is drawn into, which page is shown and
which page is cleared:

```
      frame complete                 clear done and vggo seen
WRITE_A ───────────► CLEAR_B ───────────────────────────────► WRITE_B
  ▲    draw A, show B      clear B, show A              draw B, show A │
  │                                                                    │ frame complete
  └──────────────────── CLEAR_A (clear A, show B) ◄────────────────────┘
       clear done and vggo seen
```

- **Frame complete:** the AVG has halted, the line queue is empty and the
  rasterizer is idle, all three at once. Only then can no pixel of the
  frame still be in flight. `swap` pulses when the shown page changes.
- **Clearing:** the clear writes zero to one word per clock. A whole page
  takes 307200 cycles, 3.07 ms at 100 MHz. That is well inside one 16.7 ms
  display frame, so a clear normally ends long before the game starts the
  next frame.
- **Early `vggo`:** the game may send `vggo` before the clear has finished.
  The controller remembers it and enters the drawing state as soon as the
  clear is done. Drawing into a page that is only half cleared would leave
  stale lines behind.
- **`accept`:** this output is high only in the WRITE states. The top level
  gates the rasterizer's input with it, so segments the AVG sends during
  a clear wait in the line queue. If the queue fills, the AVG stalls as
  well.
- **Reads:** the VGA side always reads the shown page with one clock of
  latency.

Two page RAMs account for most of the block RAM: 2 × 307200 × 4 bits,
about 2.4 Mbit.

## VGA output

`vga_ctrl` produces standard 640x480 at 60 Hz from the 25 MHz pixel enable.

| | total | visible | front porch | sync | back porch |
|---|---|---|---|---|---|
| horizontal | 800 | 640 | 16 | 96 | 48 |
| vertical | 525 | 480 | 10 | 2 | 33 |

Both syncs are active low.

For every visible position, the controller reads the pixel's intensity from
the frame buffer. The next pixel enable registers the colour together with
the syncs, so all outputs lag the counters by one pixel.

The colour depends only on the row. The original cabinet put a coloured
overlay on its monochrome monitor, and this design copies that:

- rows above `RED_ROWS` (96) show the intensity on red;
- the rest show it on green;
- blue stays 0.

The boundary of 96 rows is an estimate, not a measured value.

## Memory map (CPU side)

Only address bits 14:0 are decoded. Every read returns its data one
system clock after the address, for memories and I/O alike. The CPU
enable comes only every 56 clocks, so this is far inside the CPU's cycle.
A write acts once, on the clock where `cpu_ce` and `cpu_we` are both high.

| address | read | write |
|---|---|---|
| 0000-03FF | program RAM | program RAM |
| 0800 | bit 7 = 3 kHz clock, bit 6 = AVG halt, bits 5:0 = coin/slam/self-test/diagnostic switches | |
| 0A00, 0C00 | option switch banks A and B | |
| 1000 | | coin counter latch |
| 1200 | | vector go (`vggo`) |
| 1400 | | watchdog clear (brought out as a strobe; no watchdog is built) |
| 1600 | | vector reset (`vgrst`) |
| 1800 | Math Box status (bit 7 = done) | |
| 1810 / 1818 | Math Box result low / high byte | |
| 1820-182F | POKEY | POKEY |
| 1840 | | sound latch for the external sound circuits |
| 1860-187F | | Math Box operation: op = address bits 4:0, operand = data |
| 2000-2FFF | vector RAM | vector RAM |
| 3000-3FFF | vector ROM | ignored |
| 5000-7FFF | program ROM (4 KB + 8 KB; the vectors are at the top) | ignored |

**Decoding.** The single I/O addresses are decoded on bits 14:9, so each
one has mirrors up to the next 512-byte boundary. The 0x18xx page is then
decoded on its low bits. Unmapped reads return 0.

**Vector memory.** This is one memory with two ports:

- The CPU sees bytes at 0x2000.
- The AVG sees 16-bit words from address 0. Word `w` is bytes `2w`
  (low half) and `2w+1` (high half).

It is built as two byte-wide banks, one for even bytes and one for odd
bytes, so a 16-bit AVG read is one read of each bank.

**Vector RAM/ROM boundary.** The range 2800-2FFF is marked as "RAM/ROM" in
the original map. Here it is writable RAM, so vector RAM covers 4 KB and
the ROM covers 3000-3FFF. The files `EVEN_FILE` and `ODD_FILE` load the
ROM contents and any initial RAM image.

**Writes during drawing.** The CPU may write vector RAM while the AVG is
drawing. The game does this deliberately, so there is no write buffer or
interlock.

## POKEY

`pokey.sv` implements only the three POKEY features the game uses. The
keyboard scan, the serial port and the interrupts are not built. The chip
advances on the 1.79 MHz CPU enable. Registers sit at CPU address bits
3:0:

| addr | write | read |
|---|---|---|
| 0,2,4,6 | AUDF1-4: channel frequency divider | |
| 1,3,5,7 | AUDC1-4: bits 7:5 noise/tone select, bit 4 volume-only, bits 3:0 volume | |
| 8 | AUDCTL | ALLPOT: the pot pins as latched by the last POTGO |
| 9 | STIMER: reload all dividers | |
| A | | RANDOM |
| B | POTGO: latch the pot pins | |

**Fast pot scan.** The game wires its joysticks and buttons to the eight
pot pins as digital levels and only uses fast-scan mode. A POTGO write
therefore copies all eight pins into one register in a single clock, and
ALLPOT reads them back. There is no counter-and-comparator ADC.

**Polynomial counters.** There are four XNOR-feedback shift registers:

| length | polynomial |
|---|---|
| 4 bits | x⁴+x³+1 |
| 5 bits | x⁵+x³+1 |
| 9 bits | x⁹+x⁵+1 |
| 17 bits | x¹⁷+x¹⁴+1 |

All four step on every chip clock. RANDOM returns the top 8 bits of the
17-bit counter. When AUDCTL bit 7 is set, it returns the top 8 bits of
the 9-bit counter instead, and channel noise uses the 9-bit counter too.
The tap positions are the usual maximal-length choices, not taken from
the chip.

**Channels.** Each channel has a divider that counts down from AUDF on its
clock and pulses when it reaches 0. So it divides by AUDF+1.

- **Clock source:** the default is a 64 kHz base clock (chip clock / 28).
  AUDCTL bit 0 switches it to 15 kHz (chip clock / 114). AUDCTL bits 6
  and 5 run channel 1 and channel 3 from the 1.79 MHz clock directly.
- **16-bit mode:** AUDCTL bits 4 and 3 join channels 1+2 and 3+4 into one
  16-bit divider each. The lower channel's AUDF is the low byte, and the
  upper channel is the one that sounds.
- **Output flip-flop:** on each pulse, the channel's output flip-flop:
  - stays as it is when AUDC bit 7 is 0 and the 5-bit counter output is 0;
  - otherwise toggles, for a pure tone (AUDC bit 5 = 1);
  - otherwise takes the 4-bit counter output (AUDC bit 6 = 1) or the
    17/9-bit counter output.
- **High-pass:** AUDCTL bits 2 and 1 XOR the output of channel 1 (or 2)
  with a copy of it. The copy is sampled on each pulse of channel 3 (or 4).
- **Mix:** a channel adds its 4-bit volume while its output is high, or
  always when volume-only is set. The sum of all four is a 6-bit level.
  `audio_pwm` turns that level into a 64-step PWM signal for an external
  RC filter.

The real chip adds a few clocks to the divide ratio in some modes. This
model divides by exactly AUDF+1, so pitches can be off by a fraction of a
percent.

## NMI and clocks

`nmi_counter` counts pulses of the 3 kHz clock:

- It starts at 2 after reset and counts up to 15.
- It holds `nmi` high while the count is 15, then reloads 2.

That is one NMI every 14 ticks of the 3 kHz clock, about 4.7 ms. The 3 kHz
square wave is also readable at bit 7 of 0x0800.

The CPU enable divides 100 MHz by 56, which gives 1.786 MHz. The original
CPU clock is 1.79 MHz (12.096 MHz / 8); this is the nearest integer
divider.

## Top-level interface (`bz_top`)

**Clock and reset**

- `clk`: 100 MHz.
- `rst`: synchronous, active high.

**CPU side**

- `cpu_ce`: the CPU must advance only on clocks where this enable is high.
- `cpu_nmi`: the NMI output.
- `cpu_addr[15:0]`, `cpu_we`, `cpu_wdata[7:0]`: the CPU bus.
- `cpu_rdata[7:0]`: valid from the clock after the address. A core that
  samples read data at its next enabled cycle works unchanged.
- `PROM_FILE`: a parameter naming a `$readmemh` image, one byte per line.
  It fills the program ROM, which otherwise reads as 0xEA, the 6502 NOP.
- `VROM_EVEN`, `VROM_ODD`: parameters naming the even-byte and odd-byte
  `$readmemh` images of the 8 KB vector memory. They fill the vector ROM
  at 0x3000-0x3FFF and, if wanted, an initial vector RAM image.

**Math Box**

- `mb_we`, `mb_op[4:0]`, `mb_wdata`: an operation write.
- `mb_done`, `mb_lo`, `mb_hi`: the Math Box's status and result bytes.

**Inputs**

- `in0[5:0]`: coin, slam, self-test and diagnostic switches.
- `opt_a`, `opt_b`: option switches.
- `pot_in[7:0]`: joysticks and buttons.

**Outputs**

- `vga_hsync`, `vga_vsync`, `vga_r/g/b[3:0]`: VGA.
- `audio_out`: PWM audio.
- `sound_latch[7:0]`: sound latch for the external sound circuits.
- `coin_ctr[7:0]`: coin counter latch.
- `watchdog_clr`: watchdog-clear strobe.

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>`, and a watchdog ends it if it hangs.
With Verilator 5, run this from the repository root, so the testbenches'
relative `$readmemh` paths resolve:

```
verilator --binary --timing -Irtl -y rtl rtl/bz_pkg.sv tb/tb_avg.sv --top-module tb_avg
./obj_dir/Vtb_avg
```

Replace `avg` with any block name.

`tb_bz_top` runs the whole board at its default size, with the full
640x480 pages. It takes about five seconds. The testbench plays the CPU:

1. It exercises the memory map: program RAM and ROM, POKEY random
   numbers, pot scan and audio, and the Math Box strobe and result bytes.
2. It writes a vector program into vector RAM: a subroutine that draws a
   10x10 square, called three times through JSR at different positions
   with blank vectors in between, a JMP over a HALT, then a long diagonal
   at intensity 9 that climbs into the red band, and a HALT.
3. It strobes vector go while the frame buffer is still clearing, so the
   go must be remembered and the AVG fills the line queue and waits. It
   then polls the halt bit at 0x0800, as the game does.
4. It captures one whole VGA frame and compares every pixel with the
   expected picture: 240 lit pixels, 26 of them in the red band.
5. It draws the frame again into the other page, compares it again, and
   also runs a vector reset.

It counts each mechanism and fails if any of them never happened:

- AVG stalls on a full queue;
- write strobes held across many clocks;
- JSR, RET and JMP;
- blank vectors;
- a `vggo` remembered during a clear;
- page swaps;
- page clears, each of which must take exactly 307200 clocks;
- NMIs;
- Math Box strobes;
- PWM activity.

Every block testbench checks against values it computes itself: a
reference Bresenham, model FIFOs and LFSRs, and counted cycle latencies.

## How far to trust it

**Checked in simulation:** the following are tested against independent
models in the testbenches:

- the AVG instruction set and its cycle counts;
- the queue, the rasterizer, the frame-buffer state machine, the VGA
  timing and the memory map;
- the POKEY random generator, pot scan and divider pitch;
- the NMI period.

Each testbench has also been shown to fail on a deliberately broken copy
of its block.

**Not checked:**

- **The real game.** The game ROMs are not part of this design, and no
  6502 or Math Box model is included. Images can be loaded through
  `PROM_FILE`, `VROM_EVEN` and `VROM_ODD`.
- **FPGA timing.** The design has not been run on an FPGA, so timing
  closure is unverified. The widest logic is the AVG's scale multiply at
  6.25 MHz and the rasterizer's address multiply-add at 100 MHz.

**Choices of this design, where the original hardware is unspecified or
analog:**

- The latency of 2 for all non-VECTOR instructions.
- The scale formula and the beam-to-pixel mapping.
- The AVG stalling on a full queue.
- The queue depth of 16.
- Remembering an early `vggo` instead of cutting the clear short.
- The red/green boundary at row 96.
- The mirrors in the I/O decoding.
- 2800-2FFF treated as RAM.
- The POKEY simplifications listed above.
- Deriving every clock as an enable of 100 MHz.
- Holding NMI for one 3 kHz period.

**Timing figures.** The original descriptions disagree on some numbers:

- The CPU clock is given as 1.79 MHz in one place and as 3 MHz in
  another. This design uses 1.79 MHz. With the 3 kHz clock and a count
  from 2 to 15, that puts an NMI every 14 ticks, about 8,300 CPU cycles.
  The figure of 13,000 quoted with the 3 MHz clock does not follow from
  either rate.
- The AVG's restart address is given as 0x2000 in CPU terms. That is word
  0 on the AVG's own port, which is what `vggo` loads.
