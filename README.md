# A Game Boy in synthesizable SystemVerilog

This is the original monochrome Game Boy rebuilt as one clocked digital design for an
FPGA. It follows the structure of the student FPGA Game Boy "The Fighting Meerkats' Game Boy".
Everything runs from a single clock at the CPU rate (4.194304 MHz nominal), except the monitor side
of the video converter. The design contains:

- a microcoded CPU that executes the Game Boy instruction set with cycle-exact timing;
- a scanline renderer for background, window and sprites;
- all four sound channels;
- the timer, the sprite DMA and the link-cable port;
- an adapter that reads an NES controller as the joypad;
- the cartridge pins;
- a frame-buffered converter to a 640x480 monitor.

Every block talks to the CPU through memory-mapped registers on one shared bus.

Some parts are not logic, or are not specified well enough to build. They sit outside the
top module `gb_top`, which gives them ports:

- the boot ROM contents (`boot_addr`/`boot_data`);
- the audio codec (`audio_left`/`audio_right`);
- the DVI encoder chip: its 12 double-data-rate pins (`dvi_*`) plus the 24-bit `rgb` with
  `hsync`/`vsync`/`de`, all clocked by `pclk`. The chip's I2C set-up is not included.

## The shared bus

All blocks sit on one 16-bit address bus and one 8-bit data bus. Every memory behaves like
an asynchronous SRAM. Reads are combinational: data follows the address within the same
clock. A write is a one-clock strobe. `gb_mmu` decodes the address into one select line per
block and multiplexes the read data back. It takes the place of tristate buffers.

| Address | Goes to |
|---|---|
| 0000-0103 | boot ROM port after reset; cartridge once FF50 is written with bit 0 set (permanent until reset) |
| 0000-7FFF | cartridge ROM (pins) |
| 8000-9FFF | VRAM, inside `gb_video` |
| A000-BFFF | cartridge RAM (pins, `/CS` low) |
| C000-DFFF | 8 KiB work RAM (`gb_ram`) |
| E000-FDFF | echo of work RAM: reads only, writes are dropped |
| FE00-FE9F | OAM (sprite table), inside `gb_video` |
| FF00 | joypad |
| FF01-FF02 | link port SB, SC |
| FF04-FF07 | timer DIV, TIMA, TMA, TAC |
| FF10-FF3F | sound registers and wave RAM |
| FF40-FF4B | LCD registers (FF46 is the DMA register) |
| FF0F, FF80-FFFE, FFFF | IF, high memory and IE: inside the CPU, never on the bus |

Unmapped addresses read 0xFF.

The bus has one master besides the CPU: the DMA block. A write to FF46 copies 160 bytes
from `XX00` into OAM at one byte per machine cycle (640 clocks). For that time the DMA
drives the bus address, and the CPU's `mem_disable` input is high: external reads return
0xFF and external writes are dropped. Because high memory is inside the CPU, code there keeps
running. This is how games use DMA: a routine in high memory starts the copy, spins for
exactly 160 machine cycles and returns. The CPU's instruction timing has to be exact for
that loop to end at the right moment.

## The CPU (`gb_cpu`)

The CPU is multi-cycle, microcoded and not pipelined.

- **Machine cycles.** Each machine cycle (M) is four clocks (T0-T3). The address goes out from T0. Read data is
  latched into a data register at T2. All register writes, including the write strobe, happen at
  T3.
- **Microcode.** A case statement on the current opcode and its M counter. For each cycle it says
  what goes on the address bus, which ALU operation runs and which registers load. Prefix CB
  opcodes are a second table. The counter resets when the last cycle of an instruction is
  reached.
- **Fetch overlap.** As on the real chip, the last M of every instruction is also the fetch of the
  next opcode. So a one-cycle instruction takes exactly 4 clocks and conditional
  instructions take their short time when not taken.
- **Testbench hooks.** `fetch_done` pulses at the end of each fetch, with `fetch_pc` the
  opcode's address. The breakpoint unit and the testbenches use them.

Blocks inside the CPU:

- **`gb_regfile`** holds B, C, D, E, H, L, SP and PC. It has an 8-bit write port, a 16-bit write port and
  separate SP and PC ports. A and F live in the CPU.
- **`gb_alu`** is combinational and has 29 operations:
  - the eight accumulator operations;
  - the CB rotates and shifts;
  - INC, DEC;
  - the accumulator rotates, DAA, CPL, SCF, CCF;
  - BIT, RES and SET.

  The opcode enum in `gb_pkg` is numbered so that the
  instruction's own bit fields index it directly. 16-bit arithmetic (`ADD HL,rr`,
  `ADD SP,e`) is done as two 8-bit passes. DAA works in two steps: it corrects the low
  nibble when H is set or the nibble is above 9, then corrects the high part when C is set or
  the value is above 0x99. After a subtraction it subtracts those corrections instead.
- **`gb_hram`**: the 127 bytes at FF80-FFFE.
- **`gb_interrupts`** holds IF and IE. In each clock the new IF is the old IF, minus the bit being
  acknowledged, replaced by a CPU write if there is one, with all requests of this clock ORed in.
  A request that coincides with a CPU write of IF is therefore not lost.

How interrupts are handled:

- They are checked at the fetch cycle. When IME is set and `IE & IF` is non-zero, the fetched opcode is
  discarded and a five-cycle dispatch runs: it pushes PC, clears the IF bit and IME, and jumps to
  `0x40 + 8n`, where the lowest bit has priority.
- EI takes effect after the following instruction.
- HALT waits until `IE & IF` is non-zero. With IME clear it resumes without dispatching.
- STOP and the undefined opcodes behave as one-cycle NOPs.
- The HALT double-read quirk is not modelled.

## The video module (`gb_video`)

It holds VRAM, OAM and the LCD registers (LCDC, STAT, SCY, SCX, LY, LYC, BGP, OBP0/1, WY, WX). It renders
one line at a time into two 160-bit scanline buffers: one holds the upper bit of every
pixel's shade, the other the lower bit. A line takes 456 clocks and a frame 154 lines, of which
144 are drawn. For each drawn line:

1. **Mode 2, the first 80 clocks.** OAM is searched, one entry per two clocks. The first ten
   sprites that cross the line are listed.
2. **Mode 3.** First, each of the 160 columns is filled with its background or window pixel,
   one column per clock. In that clock the tile map, tile data and palette are all read from
   asynchronous VRAM. Then each listed sprite is walked pixel by pixel, 8 clocks per sprite.
   - A non-transparent sprite pixel overwrites the buffers, unless the sprite has the
     behind-background attribute and the background colour is not 0.
   - A column that an earlier OAM entry already painted is not painted again.
   - X/Y flip, both object palettes and 8x16 sprites are supported.
3. **Mode 0 and output.** The finished line streams out one pixel per clock
   (`pix_valid`, `pix_x`, `pix_y`, `pix`). The output reads one bit from each buffer, and
   finishes before the next line starts writing.

Interrupts: VBlank pulses when line 144 begins. STAT pulses on a rising edge of any of
these STAT conditions: LY=LYC, mode 0, mode 1 or mode 2. With LCDC bit 7 clear, the
controller rests at line 0.

**`gb_video_conv`** turns the stream into monitor timing. It has two frame buffers of
160x144 two-bit pixels. The writer fills one. After the last pixel (159,143) the buffers
swap. The monitor side runs on its own clock, `pclk`. It passes the writer's buffer select
through two flops and takes the other buffer at the start of each monitor frame. So a frame
is never shown half-written.

It makes 640x480 timing with active-low syncs. The Game Boy frame appears unscaled in the
centre, with grey levels FF/AA/55/00 and black around it. The outputs are registered, one
`pclk` late.

**`gb_dvi`** drives the DVI encoder chip's 12 data pins at double data rate, so one whole
24-bit pixel goes out per `pclk` period. It registers each pixel and its syncs on the rising
edge. The pins then show rgb[11:0] while `pclk` is high and rgb[23:12] while it is low, and
`dvi_xclk` is `pclk` itself. On an FPGA the clock-selected multiplexer becomes a dedicated
double-data-rate output cell. The encoder's I2C configuration is not included.

## Sound (`gb_audio`)

- **`gb_sound_regs`** stores FF10-FF26 and the wave RAM. A write with bit 7 set to NR14,
  NR24, NR34 or NR44 gives a one-clock trigger pulse. Writes to the length registers give a
  load pulse.
- **`gb_frame_seq`** divides the clock to 512 Hz steps. Length ticks come on even steps
  (256 Hz), sweep on steps 2 and 6 (128 Hz), and envelope on step 7 (64 Hz).
- **`gb_square_ch`** (channels 1 and 2; only 1 has the sweep unit):
  - A counter at 131072 Hz counts the period `2048 - x`.
  - The output is low for the first 1/8, 1/4, 1/2 or 3/4 of it.
  - The length counter runs `64 - t` ticks.
  - The envelope changes the volume by one every `n` envelope ticks.
  - The sweep adds or subtracts `x >> shift` every `n` sweep ticks, and stops the channel when
    the result exceeds 2047.
  - A trigger restarts the channel.
- **`gb_wave_ch`** plays the 32 four-bit samples of wave RAM, high nibble of each byte first.
  Its step rate is 2097152/(2048-x) samples per second, so the whole wave repeats at
  65536/(2048-x) Hz.
  - It has length `256 - t` and output levels mute, 1, 1/2 and 1/4.
  - **Departure:** with `REVERSE=1` (the default) it starts at FF3F and moves down. The design
    this follows believed that order but never confirmed it. Standard hardware starts at
    FF30, which is `REVERSE=0`.
- **`gb_noise_ch`** (channel 4) is a 15-bit linear-feedback shift register. Each shift feeds
  bit 0 XOR bit 1 back into bit 14, and also into bit 6 in 7-bit mode (NR43 bit 3). The channel
  sounds at the current volume while bit 0 is 0.
  - It shifts every `d << s` ticks of 524288 Hz, where `d` is 1, 2, 4, 6, ..., 14 for divisor
    code 0-7 and `s` is NR43[7:4]. Shifts 14 and 15 stop it.
  - Its length and envelope work as on the square channels. A trigger fills the register with
    ones.
  - The design this follows never built channel 4. The taps and rates here are the standard
    hardware ones.
- **`gb_sound_mix`** adds the channels routed to each side by NR51. It multiplies each side by
  its NR50 volume plus one, giving 0-480. While NR52 bit 7 is clear, both outputs are 0.
- NR52 bits 3:0 show which channels are playing. They read 0 while the master enable is clear;
  the design this follows left these flags out.

## Timer, link port, joypad, cartridge, breakpoint

- **`gb_timer`**: a free-running 16-bit counter, with DIV as its top byte. Writing DIV clears the counter.
  TIMA counts falling edges of counter bit 9, 3, 5 or 7, giving 4096, 262144, 65536 or 16384 Hz. On
  overflow it reloads from TMA in the same clock and requests an interrupt.
- **`gb_serial`**: SB is the shift register.
  - SC bit 7 starts a transfer and reads as busy.
  - SC bit 0 = 1 uses the internal 8192 Hz clock and drives it out (`sck_out`, `sck_oe`).
    Otherwise the other console's clock on `sck_in` is used.
  - An edge detector on the chosen clock puts the next bit on `sout` at each falling edge. Each
    rising edge shifts `sin` in.
  - After the eighth bit, SC bit 7 clears and an interrupt is requested.
- **`gb_nes_ctrl`** polls an NES controller about 60 times a second with a 17-state machine:
  - idle;
  - latch;
  - eight sample states with a clock pulse between each pair.

  It converts the active-low serial bits (A, B, Select, Start, Up, Down, Left, Right) to the
  active-high `buttons` vector.
- **`gb_joypad`** (FF00): writing bit 4 low selects the direction keys and bit 5 low selects
  the buttons. Reads return the selected group, active low. A line going low requests the
  joypad interrupt.
- **`gb_cart_if`** drives the 16 address pins, `/RD`, `/WR`, and `/CS` (only for A000-BFFF)
  and the data-pin direction. The cartridge needs no clock. Writes to the ROM range are passed
  on, so a controller chip inside the cartridge can see them. No bank switching is done in
  the console, as on the real machine.
- **`gb_breakpoint`**: load a 16-bit address from 8 switches. One button picks the half,
  another stores the switches into it. When armed, the unit freezes the CPU (`stall`) right
  after the opcode at that address is fetched. A step button lets one more instruction
  through; a continue button resumes. Buttons must be debounced single-clock pulses.

## Where this departs from the design it follows, and from real hardware

- **Tristate bus.** The shared tristate bus is a decoder and a multiplexer.
- **DMA.** During DMA the CPU reads 0xFF from outside memory, not a floating bus.
- **Link port.** The source says the serial interrupt comes on the final clock edge. Here it
  comes right after the eighth bit is shifted in, when SC bit 7 clears. The source calls SC
  bit 0 "asserted low" without saying which value selects the internal clock; here 1 selects
  it, as on standard hardware.
- **Frequency sweep.** The source reports that adding to the frequency lowered the pitch and
  that they crossed the wires to fix it. Here the value is added to and the period is
  `2048 - x`, so adding raises the pitch with no correction needed.
- **Timings the source does not give.** These use the standard Game Boy values: video timing,
  timer rates, the link clock rate, the interrupt order and vectors, the joypad bit layout and
  the NR51 layout.
- **Beyond the source's own build.** The source's design had no channel 4, no NR52 playing
  flags and no sprite flipping or transparency that worked. All of these are built here as
  described for the Game Boy.
- **Echo RAM** covers E000-FDFF. It is read-only, as in the source; on real hardware it is
  writable.
- **Not built:** the codec set-up, the DVI encoder's I2C set-up and the boot ROM contents
  (these are ports, see the top). The same goes for the breakpoint's register display
  on the board's LCD, and the HALT quirk.
- **Clock rate.** The source ran the CPU at 4.125 MHz. All rates here are clock divisions, so
  at that clock they scale down in proportion.

## How far it has been tested

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

- **ALU and CPU.**
  - The ALU testbench compares the operations against a reference model in the testbench. It
    uses random operands for the arithmetic and logic groups, and every pair of BCD numbers for
    DAA after addition and subtraction.
  - The CPU testbench runs two hand-assembled programs against a memory model: DAA, loops, CB
    operations, stack, calls and an interrupt out of HALT. It compares the results and the
    exact clock count (592 clocks for the first program).
  - `tb_gb_cpu_timing` runs every defined opcode and all 256 CB opcodes, one at a time. It
    measures the clocks from one opcode fetch to the next and compares them with the standard
    machine-cycle table (taken and not-taken branches, calls, returns, RST and the
    interrupt-enable instructions included): 498 checks.
  - `tb_gb_cpu_random` generates 200 random programs of 300 instructions each. The instructions
    are loads (through HL, BC, DE and direct addresses), all eight ALU operations, INC/DEC,
    16-bit arithmetic, rotates, DAA, CPL, SCF, CCF, PUSH/POP, LD HL,SP+e, ADD SP,e, every CB
    operation, conditional JR and JP over a random instruction, and calls to one-instruction
    subroutines that end in RET, RETI or RET cc. The testbench runs each program on the CPU and
    on an instruction-level reference model, and compares all of memory afterwards. Each program
    dumps its registers to memory before HALT, so this also compares the registers.
- **Video.** The video testbench renders a whole frame from random VRAM and OAM. It compares
  every pixel with a separate reference model, once with the window off and once with it on.
  It also checks the 456-clock line, the 70224-clock frame and the LY=LYC interrupt.
- **Converter.** The converter testbench checks two full frames on the monitor side, running on
  an unrelated clock. The DVI testbench samples both halves of 500 random pixels in the middle of
  each clock phase.
- **Sound.** The sound testbenches measure duty, period, length, envelope, sweep, wave sample
  order and mixing. The noise testbench compares 64 shift periods for each of 12 random rate
  settings against a model of the shift register.
- **Whole system.** `tb_gb_top` runs the whole console at its default parameters. It uses a
  boot ROM model that hands over at FF50, a cartridge model, a second console on the link cable,
  an NES controller model and a breakpoint operator.

  The program it runs copies a DMA routine to high memory and starts DMA. It then draws, starts
  two sound channels, runs the timer, makes a link transfer, reads the joypad, and HALTs through
  three frames with all five interrupts enabled.

  The testbench counts each of these mechanisms and fails if any never happened: the boot switch,
  the DMA, CPU fetches during DMA, timer overflow, each interrupt, link clocking, HALT,
  breakpoint stall, sound, pixel output, monitor output and cartridge RAM writes. It also checks
  the results, the OAM contents, the 640-clock DMA and the frame period. It takes about a second.

- **Start-up.** `tb_gb_boot` runs a start-up program from the boot ROM port of the whole console,
  with the steps a Game Boy bootstrap performs. It clears VRAM, copies the 48-byte logo from the
  cartridge header into VRAM while comparing it with its own copy, and checks the header
  checksum. It stops in HALT on a mismatch, and otherwise writes FF50 and continues at 0x0100.
  Three runs: a good cartridge, one wrong logo bit, and a wrong checksum. Only the good
  cartridge may switch the boot ROM off and run its code.

Not tested: real cartridges and commercial game code. The random CPU programs leave out RST, JP HL,
LD SP,HL, the 0xFF00-page loads, HALT, STOP and interrupts. The hand-written programs and the
timing test cover those instructions, but no reference model checks them.

## Simulating

The package must come first. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/gb_pkg.sv tb/tb_gb_top.sv --top-module tb_gb_top -Mdir obj -o sim
./obj/sim
```

Any other testbench works the same way: replace `tb_gb_top` with its name. Verilator finds the
modules in `rtl/` by file name. The top's parameters set line and frame length, the sound
sequencer divider, the controller poll period, the link clock and the monitor size.
Testbenches may lower them to run shorter.
