# ultraNES — an NES picture pipeline for FPGA

ultraNES rebuilds the video side of the Nintendo Entertainment System in
synthesizable SystemVerilog: the picture processing unit (PPU) with its video
memories, the console's CPU bus with work RAM and cartridge ROM, and a VGA
output stage that shows the NES's 256x240 picture on a 640x480-class monitor
by doubling it in both directions. A 6502 CPU core, which is not part of this
RTL, attaches to a bus port. A host processor (for example the ARM side of a
Cyclone V SoC, running Linux) loads cartridge images and controls the CPU
reset through an Avalon-MM slave.

Everything runs from one 50 MHz clock. Each subsystem advances only in the
clock cycles where its own clock enable is high, so there are no clock-domain
crossings anywhere.

```
                 +-----------------------------------------------------+
 host (Avalon) --+--> avalon_ctrl --+--> cpu_mem port B (RAM + PRG ROM)|
                 |                  +--> chr_rom loader port           |
                 |                  +--> CPU reset, mirroring mode     |
 6502 core <-----+--> cpu_bus --+--> cpu_mem port A                    |
  (external)     |      ^       +--> ppu registers $2000-$2007         |
                 |      |       +--> oam_dma ($4014) -- bus master     |
                 |   ppu: ppu_fsm, ppu_regs, ppu_bg, ppu_sprite,       |
                 |        ppu_prio_mux, nametable_ram, chr_rom,        |
                 |        palette_ram ----- pixel stream -----> vga ---+--> RGB, hsync, vsync
                 |   clk_en_gen: vga_en, ppu_en, cpu_ce                |
                 +-----------------------------------------------------+
```

## Clocking

| enable  | period (50 MHz clocks) | rate      | used by                      |
|---------|------------------------|-----------|------------------------------|
| vga_en  | 2                      | 25 MHz    | VGA counters and scan-out    |
| ppu_en  | 8                      | 6.25 MHz  | PPU (one PPU cycle per tick) |
| cpu_ce  | 24                     | 2.083 MHz | CPU bus, PPU registers, DMA  |

`clk_en_gen` derives all three from one counter that counts modulo 24, so every
`cpu_ce` coincides with a `ppu_en` and every `ppu_en` with a `vga_en`. The VGA
side runs exactly four times faster than the PPU. That makes a VGA frame exactly
four PPU frames' worth of cycles long, and the two rasters stay locked once
aligned.

Memories are clocked every cycle. A PPU fetch holds its address for two PPU
cycles, and the PPU reads the data on the second tick. The memories therefore
answer with one clock of latency however the enables are spaced, provided
`ppu_en` is never high in two consecutive clocks.

## The CPU bus

A bus cycle is a clock in which `cpu_ce` is high:

* The master presents the address, write enable and write data in that clock.
* A write commits at its clock edge.
* A read is captured at that edge. `cpu_rdata` then holds the byte until the
  next `cpu_ce`.

This is the synchronous-memory style that common 6502 soft cores expect.
`cpu_rdy` goes low while sprite DMA owns the bus, and the core must stall
then. `cpu_nmi` is the PPU's vblank flag ANDed with its NMI enable.
`cpu_rst` is driven by the host and is high after power-up.

The address decoder (`cpu_bus`) is deliberately incomplete, so the same byte
appears at several addresses:

| range          | target                     | decoded bits            |
|----------------|----------------------------|-------------------------|
| `$0000-$1FFF`  | 2 KB work RAM (4 mirrors)  | A15..A13 = 000          |
| `$2000-$3FFF`  | 8 PPU registers (mirrored) | A15..A13 = 001, A2..A0  |
| `$4014`        | OAMDMA                     | full compare            |
| `$8000-$FFFF`  | 32 KB program ROM          | A15 = 1                 |

Other addresses read as 0. The CPU cannot write the ROM. A 16 KB program image
must be loaded into both halves by the host.

Writing page number `$XX` to `$4014` starts `oam_dma`. The engine takes the bus
and copies `$XX00-$XXFF` into OAMDATA (`$2004`): first a read of the source
byte, then a write of that byte to `$2004`. That makes 512 bus cycles, during
which `cpu_rdy` is low.

## The PPU

### Frame and line timing (`ppu_fsm`)

A frame has 262 lines of 341 PPU cycles, which is 89,342 cycles; there is no
odd-frame short line. Line 261 is the pre-render line (the NES's line "−1").
Lines 0-239 are drawn, 240 is idle, and 241-260 are vertical blank:

* vblank is raised at line 241, cycle 1.
* vblank, sprite 0 hit and overflow are cleared at line 261, cycle 1.

On each visible line, cycle 0 is idle and cycles 1-256 produce pixel
`x = cycle − 1`. While they do, the PPU also fetches the tiles that will be
needed 16 pixels later. Cycles 257-320 fetch the sprite patterns for the next
line. Cycles 321-336 fetch the first two tiles of the next line.

Background fetches come in groups of 8 cycles, with four two-cycle fetches per
group:

| cycles in group | fetch             | address                                          |
|-----------------|-------------------|--------------------------------------------------|
| 1-2             | nametable byte    | `$2000 | v[11:0]`                                |
| 3-4             | attribute byte    | `$23C0 | v[11:10]<<10 | (coarseY/4)<<3 | coarseX/4` |
| 5-6             | pattern low byte  | `table<<12 | tile<<4 | fineY`                    |
| 7-8             | pattern high byte | same + 8                                         |

On the last tick of a group, the finished tile goes to the tile renderer and
coarse X is advanced. Other events:

* Fine and coarse Y advance at cycle 256.
* The horizontal scroll bits are copied from `t` to `v` at cycle 257.
* The vertical bits are copied during cycles 280-304 of the pre-render line.

All of this happens only while background or sprite rendering is enabled.

### Registers and scrolling (`ppu_regs`)

`PPUCTRL`, `PPUMASK`, `PPUSTATUS`, `OAMADDR`, `OAMDATA`, `PPUSCROLL`, `PPUADDR`
and `PPUDATA` use the NES bit layout. Scrolling follows the NES's shared
register scheme:

* `v` is the 15-bit VRAM address that rendering walks: fine Y, nametable, coarse
  Y, coarse X.
* `t` is its temporary copy, which `PPUCTRL`, `PPUSCROLL` and `PPUADDR` write.
* Fine X is a 3-bit register.
* `w` is the write-pair toggle, which a `PPUSTATUS` read clears.

A `PPUDATA` read below `$3F00` returns the byte fetched by the previous read
and refills the buffer. A palette read returns its value at once. Every
`PPUDATA` access advances `v` by 1 or 32. Each pixel leaves the PPU with the
three colour-emphasis bits of `PPUMASK` in force when it was drawn. The VGA
colour table applies them (see below).

### Background (`ppu_bg`)

Four 16-bit shift registers hold two tiles: pattern low, pattern high and the
two attribute bits (each repeated 8 times). The pixel is read at bit
`15 − fineX` and the registers shift once per pixel. At the end of each fetch
group the next tile enters the low byte. The attribute byte covers a 32x32
pixel area. `ppu_fsm` picks its 2-bit quadrant with coarse Y bit 1 and coarse X
bit 1.

### Sprites (`ppu_sprite`)

OAM holds 64 sprites of 4 bytes each: Y, tile, attribute, X. On every rendering
line:

1. At cycle 1 the 8-entry secondary OAM is cleared.
2. In cycles 65-128, one sprite per cycle is tested against the line. The first
   eight that cover the next line are copied. A ninth sets the overflow flag.
3. In cycles 257-320, each secondary entry's pattern bytes are fetched and
   loaded into one of 8 output units. Each unit holds a pair of 8-bit shift
   registers, with horizontal flip applied at load, plus the attribute and an X
   down-counter. Empty entries load a transparent pattern.
4. On the next line each counter counts down to 0, and then its unit shifts out
   8 pixels. Where several units are opaque, the lowest-numbered one wins.

A sprite whose Y byte is `y` covers lines `y+1 … y+h`, where `h` is 8, or 16 in
8x16 mode. In 8x16 mode, tile bit 0 selects the pattern table. Line 0 never
shows sprites, because the pre-render line does not evaluate any.

### Priority and colour (`ppu_prio_mux`, `palette_ram`)

The priority mux picks one pixel:

* If the background and the sprite are both transparent, it uses the backdrop
  (palette entry 0).
* If only one is opaque, it uses that one.
* If both are opaque, the sprite wins unless its priority bit puts it behind
  the background.

Sprite colours use palette entries 16-31. Entries 16, 20, 24 and 28 are stored
as entries 0, 4, 8 and 12. Sprite 0 hit is set when sprite 0 and the background
are opaque at the same column, except column 255. The greyscale bit clears the
hue bits of the 6-bit colour index.

### Video memories

| block           | size       | PPU address     | ports                                  |
|-----------------|------------|-----------------|----------------------------------------|
| `chr_rom`       | 8 KB       | `$0000-$1FFF`   | renderer, PPUDATA read, host write     |
| `nametable_ram` | 2 KB       | `$2000-$3EFF`   | renderer, PPUDATA read/write           |
| `palette_ram`   | 32 x 6 bit | `$3F00-$3FFF`   | renderer, PPUDATA read/write           |

Each memory has a separate port for rendering and for the CPU, so PPUDATA
accesses never collide with the fetch pipeline. The four logical nametables map
onto 2 KB with vertical mirroring (address bit 10 picks the bank) or horizontal
mirroring (bit 11). A host control bit selects the mode.

The PPU delivers each pixel as a one-clock `pix_valid` pulse that carries the
column, the line, the 6-bit colour index and the emphasis bits. It also exposes line-start
(`hsync`) and frame-start (`vsync`) pulses.

## From PPU lines to VGA lines (`vga`)

`vga_scanbuf` is a 256x2 array of 9-bit entries: the colour index and the
emphasis bits of each pixel. The PPU writes line `y` into
half `y mod 2`. Meanwhile `vga_counter` reads the other half, which holds the
line finished one PPU line earlier. It reads that half twice, because every PPU
line lasts exactly two VGA lines:

```
PPU line       = 341 PPU cycles = 1364 VGA cycles = 2 x 682
PPU frame      = 262 PPU lines                    = 524 VGA lines
VGA frame      = 682 x 524 = 357,368 VGA cycles   = 4 x 89,342
active picture = 512 x 480: each PPU pixel becomes 2x2 VGA pixels
```

The VGA line is 512 active cycles, then a 16-cycle front porch, a 96-cycle sync
pulse and a 58-cycle back porch. The frame is 480 active lines starting at VGA
line 2, then 10 front-porch lines, 2 sync lines and 32 back-porch lines. Both
syncs are active low.

This is not the standard 800x525 VGA timing. The line rate is about 36.7 kHz
and the frame rate about 70 Hz, which many monitors accept; check yours.
`vga_lut` turns each colour index into 24-bit RGB, using a common approximation
of the NES palette. It then applies emphasis. On the NES, each emphasis bit
darkens the other two colour channels of the analog signal. Here a channel is
scaled to 3/4 when any emphasis bit other than its own is set. So red emphasis
dims green and blue, and all three bits dim everything.

The PPU's frame-start pulse resynchronises the counters.

## Host interface (`avalon_ctrl`)

The slave uses byte addresses, 8-bit write data and 16-bit read data, with a
read latency of 1:

| address             | access | meaning                                               |
|---------------------|--------|-------------------------------------------------------|
| `0x00000-0x0FFFF`   | r/w    | CPU memory by CPU address (RAM and program ROM)       |
| `0x10000-0x11FFF`   | w      | CHR ROM                                               |
| `0x18000`           | w      | bit 0: CPU reset, bit 1: vertical mirroring           |
| `0x18000`           | r      | current CPU address bus                               |

Only address bits 16 and 15 select the region. So the CHR ROM repeats through
`0x17FFF`, and the control register answers anywhere in `0x18000-0x1FFFF`.

A typical load sequence:

1. Keep the CPU in reset (the power-up state).
2. Write the program ROM (`$8000-$FFFF`) and the CHR ROM.
3. Write `0x18000` with the cartridge's mirroring bit and reset = 0.

## What is the source description and what is added here

The block structure comes from the description this design implements. So do
the single clock with three enables and their ratios, the frame sizes (341x262
PPU, 357,368-cycle VGA frame), the 2-line scan buffer, the LUT, the dual-port
memories, the partial address decoding, nametable mirroring, the register set
and the sprite organisation (64/8, secondary OAM, counters that count down).

The following are choices made in this RTL:

* **Standard NES behaviour filled in**: register bit positions, `v`/`t`/`x`/`w`
  scrolling, read buffering, palette mirroring, priority and sprite-0 rules,
  attribute quadrants and exact event cycles.
* **Sprite evaluation**: one sprite per PPU cycle. The overflow flag is exact,
  not the NES's buggy scan.
* **OAM DMA**: 512 cycles, with no extra alignment cycle.
* **CPU bus**: timing and the `cpu_rdy` stall.
* **VGA**: porch and sync widths within the 682x524 raster, and the RGB values
  of the LUT.
* **Host interface**: the Avalon address map.
* **Sprite rendering and a finished background path**: the original project
  left these incomplete. Here both are built, following the NES's documented
  behaviour.
* **One clock for VGA**: the VGA stage runs on the 50 MHz clock with a
  25 MHz enable, not in a clock domain of its own. The scan buffer
  therefore needs no synchronisers.
* **Omitted memory**: the cartridge SRAM at `$6000` and the expansion area are
  not built.
* **Emphasis approximation**: colour emphasis is approximated digitally.
* **Ignored bit**: the master/slave bit.

Not built: the 6502 core (any core with a synchronous bus attaches to the
`cpu_*` ports), the controller port, the APU, and the Linux driver and utility.

## Files

`rtl/` holds one module per file. `nes_pkg.sv` holds the shared constants and
the `PPUCTRL`/`PPUMASK`/OAM struct types. The top is `ultranes.sv`. Every
module has a self-checking testbench `tb/tb_<module>.sv`, which prints
`TB_RESULT checks=N failures=M`.

To build and run one with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps --top-module tb_ppu \
    -y rtl -y tb +libext+.sv rtl/nes_pkg.sv tb/tb_ppu.sv
./obj_dir/Vtb_ppu
```

## How far it has been checked

All checks are simulations against reference values computed in the
testbenches; nothing here has been run on an FPGA.

* **`tb_ppu`** loads random patterns through the CHR loader port and programs
  everything else through the PPU registers: two nametables, the palette, 16
  sprites and a scroll that crosses nametables.
  It compares all 61,440 pixels of a frame with a reference renderer written
  from the NES rules. It also checks frame length, NMI timing, sprite 0 hit,
  overflow and buffered reads.
* **`tb_ppu_sprite`** compares every sprite pixel of 40 lines with a reference,
  in 8x8 and 8x16 mode. It includes flips, priorities and more than 8 sprites
  on one line.
* **`tb_ultranes`** is the whole console at its default sizes:
  * The host loads memories and releases reset.
  * A behavioural bus master stands in for the 6502 program: it sets up VRAM,
    runs OAM DMA (512 stalled bus cycles are checked), sets the scroll and
    enables NMI and green emphasis.
  * All 245,760 active VGA pixels of one frame are checked against the
    reference, through the pixel doubling, the RGB table and the emphasis.

  It takes a few seconds in Verilator.
* **`tb_vga`** cycles the emphasis bits through all 8 settings and checks
  every VGA clock of a frame: RGB, blanking and both syncs.
* **`tb_ppu_regs`** and **`tb_avalon_ctrl`** run thousands of random accesses
  against models:
  * The scroll registers `t`/`v`/fine X/`w`, the read buffer and VRAM.
  * The host address map, with memories behind it.
* **Fault injection**: a deliberately broken copy of each module was run
  against its testbench, and every one was detected.

Not verified:

* Operation with a real 6502 core or a real game image.
* Mid-frame register writes (raster effects), which depend on exact CPU/PPU
  phase.
* FPGA timing closure.
