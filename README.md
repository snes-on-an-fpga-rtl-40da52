# SNES console logic in SystemVerilog

This is the logic of a Super Nintendo console, written to sit between two processor cores that are not part of it:

- the 65C816 main CPU core;
- the SPC700 sound CPU.

Everything the console adds around those cores is here:

- the main CPU's memory map and bus timing;
- 128 KB of work RAM;
- the CPU's I/O registers: the multiplier, the divider, interrupts, the H/V timers and the controller reader;
- the eight-channel DMA/HDMA engine;
- a bus interface for a real cartridge connector;
- the picture processing unit (PPU) with its three memories;
- the four mailbox ports between the two CPUs;
- the 64 KB sound RAM;
- the eight-voice sound DSP.

The top module, `snes_top`, brings both cores' buses out as ports. The pins for the cartridge and the two controllers are also top-level ports, meant to go through 5 V to 3.3 V level shifters. Video comes out as a stream of pixels and audio as 16-bit stereo samples.

All files are in `rtl/`, one module or package per file. Shared types live in `snes_pkg`, `ppu_pkg` and `dsp_pkg`.

## The main bus and its memory map

The CPU side has two buses:

- The 24-bit **A-bus** reaches work RAM, the CPU registers and the cartridge.
- The 8-bit **B-bus** reaches the PPU registers (2100-213F) and the APU ports (2140-217F). CPU addresses 21xx map onto it.

`mem_map` decodes an A-bus address into a region and an access speed:

| Address (banks 00-3F, 80-BF) | Region | Speed |
|---|---|---|
| 0000-1FFF | work RAM (mirror of 7E:0000-1FFF) | 2.68 MHz (8 master cycles) |
| 2000-3FFF | B-bus (PPU, APU ports) | 3.58 MHz (6) |
| 4000-41FF | serial controller ports | 1.79 MHz (12) |
| 4200-5FFF | CPU I/O and DMA registers | 3.58 MHz (6) |
| 6000-7FFF | expansion | 2.68 MHz (8) |
| 8000-FFFF | cartridge | 2.68 MHz, or 3.58 MHz in banks 80-FF after 420D bit 0 is set |

Banks 40-7D and C0-FF are cartridge memory. Banks 7E-7F are the full 128 KB of work RAM.

The core talks to `snes_top` through a simple handshake:

1. The core pulses `cpu_rd` or `cpu_wr` for one clock, with the address and write data.
2. `snes_top` runs the access for the region's number of master cycles.
3. It answers with a one-cycle `cpu_ready` pulse that carries `cpu_rdata`.

A cartridge access instead lasts until the connector cycle completes.

The register strobe of an access fires only in its first cycle. Registers with read side effects therefore act once per access. Examples are the NMI flag (4210), the IRQ flag (4211) and the VRAM read port (2139/213A).

The core must not start an access while `cpu_halt` is high. `cpu_halt` is high whenever DMA or HDMA owns the buses.

## DMA and HDMA

`dma_hdma` holds eight channels, each with the registers 43X0-43XA:

- parameters: direction, indirect HDMA, decrement, fixed address and transfer mode;
- the B address;
- the A address and bank;
- the byte count, which HDMA uses as its indirect address;
- the indirect data bank;
- the table address;
- the line counter.

**General DMA** starts when 420B is written. The channels run lowest first. Each byte takes two clocks: a read, then a write on the other bus. The A address steps up, steps down or stays fixed. The B address follows the mode's pattern:

| Mode | DMA B-bus pattern | HDMA unit per line |
|---|---|---|
| 0 | B B B B | B |
| 1 | B B+1 B B+1 | B B+1 |
| 2 | B B B B | B B |
| 3 | B B B+1 B+1 | B B B+1 B+1 |
| 4 | B B+1 B+2 B+3 | B B+1 B+2 B+3 |

Modes 5-7 repeat modes 1-3.

**HDMA** channels are enabled in 420C. They are reloaded at the start of each frame and send one unit at each horizontal blank. The table sits in A-bus memory:

- A line-count byte comes first. Bit 7 means repeat, bits 6:0 give the line count, and 0 ends the table.
- The data follows, or, in indirect mode, a 16-bit pointer into the data bank.
- Without repeat, the unit is sent on the first line of the count only.

HDMA takes precedence over DMA: a pending line is served between two DMA bytes. The DMA pattern position is kept separately, so a general transfer resumes where it stopped.

Both buses answer a read one clock later. The only slow A-bus target is the cartridge. While the cartridge answers, `snes_top` holds the engine through the `a_wait` input and suppresses its strobes.

## CPU I/O block

`cpu_io` implements the register file at 4200-421B. It contains these sub-blocks:

- **`cpu_mult`**: an 8 x 8 shift-and-add multiplier. Writing 4203 starts it, and it takes 8 clocks.
- **`cpu_div`**: a 16 / 8 restoring divider. Writing 4206 starts it, and it takes 16 clocks.
  - The quotient is in 4214/4215.
  - The remainder is in 4216/4217, which are shared with the product.
  - Dividing by zero gives quotient FFFF and returns the dividend as the remainder.
- **`hv_timer`**: dot and line counters with these features:
  - 341 dots x 262 lines, with 256 x 224 visible;
  - blanking flags and start pulses;
  - the H/V IRQ compare (4207-420A, enabled by 4200 bits 5:4);
  - the counter latch read back through the PPU at 213C/213D.
- **`cpu_irq`**: interrupt logic.
  - The NMI flag is set at the start of vertical blank, gated by 4200 bit 7, and read and cleared at 4210.
  - The IRQ flag comes from the timer and is read and cleared at 4211.
  - The cartridge IRQ pin is ORed into the IRQ.
- **`joypad_if`**: the automatic controller read, enabled by 4200 bit 0 and run at each vertical blank.
  - It pulses the latch (COL), then clocks 16 bits out of each controller on CCLK1/CCLK2.
  - Data lines are active low.
  - Results go to 4218-421B. 4212 bit 0 shows a read in progress.

420D selects the fast cartridge speed. 4201 and 4213 are the programmable I/O port.

## Cartridge interface

`cart_if` runs one connector cycle per request:

- It drives the 24-bit address.
- It pulls /CART low for cartridge memory.
- It holds /RD or /WR low for the region's length.
- It turns the data level shifter (`ddir`) towards the cartridge for writes.
- It samples `din` on the last cycle of a read.

Either the CPU or DMA can use it. `snes_top` records who started each cycle, so a completed cycle is handed only to the master and address that asked for it.

## PPU

`ppu_top` combines the following units:

- **`ppu_regs`**: the B-bus register file, decoded into the `ppu_cfg_t` bundle.
  - VRAM is written through 2116-2119. The word address steps by 1, 32 or 128 after the low or high byte. Reads through 2139/213A are prefetched.
  - CGRAM is written through 2121/2122, two writes per colour.
  - OAM is written through 2102-2104.
  - The scroll registers take two writes each.
  - 2134-2136 give the signed product of the 16-bit value of 211B and the 8-bit value of 211C.
  - Reading or writing 2137 latches the H/V counters.
- **Memories**:
  - `vram`: 32K x 16, with byte enables;
  - `cgram`: 256 x 15-bit colours;
  - `oam`: a 512-byte low table and a 32-byte high table.
- **`ppu_bg`**: a background pixel unit for modes 0-6.
  - It reads one tile-map word, then one VRAM word per two bit planes: 2, 4 or 8 bpp, depending on the mode and layer.
  - It handles 8x8 or 16x16 tiles, flips, 32/64-tile screens and scrolling.
  - It returns the CGRAM index and the priority bit. Mode 0 gives each layer its own 32 colours.
- **`ppu_obj`**: the sprite pixel unit. For a screen position it scans OAM entries 0-127 in order, and the first opaque sprite pixel wins. It returns colour 128 + 16 x palette + pixel, and the sprite priority.
- **`ppu_mix`**: the layer mixer.
  - It picks the highest-ranked opaque layer using the mode's priority order, which includes the mode 1 BG3 priority bit.
  - It looks up the colour in CGRAM and applies fixed-colour add or subtract (2130-2132).
  - It then scales by the brightness, (b+1)/16, and forced blank gives black.

`ppu_top` itself handles two features that change what the layers see:

- **Mosaic** (2106): for each background whose enable bit is set (bit 0 = BG1), the unit is asked for the top-left pixel of the (size+1) x (size+1) block holding the current pixel. Two counters step with the raster to keep the block origin.
- **Main screen windows** (2123-212B, 212E): each layer has two windows (left and right positions in 2126-2129). Its nibble in 2123-2125 enables and inverts each window. When both are enabled, its 212A/212B field joins them with OR, AND, XOR or XNOR. A layer whose 212E bit is set is hidden inside the resulting region.

A `frame_start` pulse starts a frame. The sequencer then computes each pixel in raster order:

1. The four background units, one after the other, sharing the renderer's VRAM port.
2. The sprite unit.
3. The mixer.

A pixel takes from about ten to a few hundred clocks, depending on the mode and the sprites examined. So this PPU fills a frame buffer; it does not race the beam. Outside forced blank, CPU writes to VRAM, CGRAM and OAM are dropped while a frame is being drawn. The original hardware likewise only accepts them during blanking.

The PPU does not include these features:

- mode 7;
- the colour window (2125 high nibble, 212B bits 3:2, 2130 bits 7:4);
- the sub screen (212D, 212F), so colour math uses only the fixed colour;
- offset-per-tile;
- the 32-sprites-per-line limit;
- direct colour (2130 bit 0);
- the screen settings of 2133: interlace, pseudo-512, ExtBG and external sync.

## Sound: ports, sound RAM and DSP

**`apu_ports`** holds four bytes in each direction. The CPU writes 2140-2143, and the SPC700 reads them on its side; the other direction works the same way.

**`aram`** is the 64 KB sound RAM with two synchronous ports:

- port A for the SPC700, which wins a write collision;
- port B for the DSP.

**`dsp_top`** produces one stereo sample every `SAMPLE_CYCLES` clocks. The default is 768, which is 32 kHz from a 24.576 MHz clock. It holds the usual 128-byte DSP register map: voice registers x0-x9, and the global registers at xC, xD and xF. Each sample period runs these steps in order:

1. **Voices 0-7** (`dsp_voice`, one per voice). Each voice does the following:
   - On a key-on, it reads its directory entry (DIR x 256 + 4 x SRCN), loads the first 9-byte block, and restarts its decoder, pitch counter and envelope.
   - Each period it steps the pitch counter (`dsp_pitch`: 12-bit fraction, with pitch modulation by the previous voice when PMON is set).
   - It decodes as many new samples (`dsp_brr`) as the counter advanced, and follows the end and loop flags at block ends. ENDX records the end.
   - It outputs the sample or the noise times the envelope (`dsp_env`: ADSR, direct gain, or the four variable gain curves), then times the signed left and right volumes.
2. **Echo** (`dsp_echo`). It runs the following steps:
   - It reads the stereo pair at the ring position in sound RAM (ESA x 256, EDL x 2 KB long).
   - It runs an 8-tap FIR filter over the last 8 pairs.
   - It writes back the EON voices plus the filtered pair times EFB, unless FLG bit 5 disables writes.
3. **Mix**: the sum of the voices times MVOL, plus the echo times EVOL, each clamped to 16 bits. FLG bit 6 mutes the output. The noise generator (`dsp_noise`, a 15-bit LFSR at the FLG rate) then steps.

Each step waits for its unit to finish; the steps do not have fixed 24-clock slots. A period with every voice keyed on and loading blocks still fits easily in 768 clocks.

## Clocks and sizes

The whole design uses one clock. `snes_top` derives the dot rate as clock / `DOT_DIV`, which is 4 for a 21.47 MHz master clock. The DSP's sample period is counted on the same clock. A board would normally run the sound side from its own clock.

| Parameter (`snes_top`) | Default | Meaning |
|---|---|---|
| `H_DOTS`, `V_LINES` | 341, 262 | dots per line, lines per frame |
| `H_RES`, `V_RES` | 256, 224 | visible picture |
| `DOT_DIV` | 4 | master clocks per dot |
| `JOY_HALF` | 128 | clocks per half controller clock period |
| `SAMPLE_CYCLES` | 768 | clocks per stereo audio sample |

## Where this design departs from the original console

These parts are outside the design:

- the 65C816 and SPC700 cores;
- the AC'97 codec path;
- the level shifters;
- the cartridge lockout chip.

The following are simplified or missing:

- Every bus timing here is reduced to clock-cycle counts.
- Two-clock DMA bytes replace the original's cycle-exact DMA timing.
- The work RAM B-bus port (2180-2183) and the old serial controller ports 4016/4017 are not built; reads there return 0.
- Controllers 3 and 4 (421C-421F) read zero.

The PPU and DSP omissions are listed in their sections.

## Simulation

Each block has a self-checking testbench in `tb/<module>_tb.sv`. Each one prints `TB_RESULT checks=N failures=M` and stops, and each has a watchdog. Run one with:

```
verilator --binary --timing --top-module cpu_div_tb \
    rtl/*_pkg.sv $(ls rtl/*.sv | grep -v _pkg) tb/cpu_div_tb.sv -o sim
./obj_dir/sim
```

The packages must come first on the command line.

Two testbenches cover the whole design:

- **`snes_top_tb`** runs the whole design at a reduced screen size: 40 x 20 dots and 16 x 8 pixels. It stands in for both CPUs, a cartridge ROM and two controllers. It checks and counts these mechanisms:
  - bus timing for every region, and the 420D speed switch;
  - cartridge reads and writes;
  - multiply and divide;
  - NMI and timer IRQ;
  - the automatic controller read;
  - both directions of the APU ports;
  - DMA from cartridge ROM to VRAM, read back through the PPU, and DMA from the APU ports to work RAM;
  - HDMA (one byte on each of three lines);
  - a rendered frame;
  - DSP samples with and without echo.

  A mechanism that never happens counts as a failure.
- **`snes_top_full_tb`** is the same test with every parameter at its default, including a full 256 x 224 frame. It takes about a minute in Verilator.

The reference values in the testbenches come from integer models written in the testbenches, or from hand calculation noted in their comments.
