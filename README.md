# Frito: many Chip-8 machines on one FPGA processor

Chip-8 is a tiny 1970s virtual machine. It has 4 KiB of memory, sixteen
8-bit registers, a 64×32 monochrome screen, a 16-key keypad and a beeper.
Its programs run at only a few hundred instructions per second. An FPGA
running at 100 MHz could run one instruction in a few cycles and then sit
idle for hundreds of thousands.

This design spends that idle time on more Chip-8 machines. One sequential
processor serves up to 36 independent Chip-8 *instances* in turn. Each
instance keeps its complete state in its own block RAM. The video output
shows all instances at once in a grid of up to 6×6 on a 1280×720 HDMI
picture.

The SystemVerilog in `rtl/` covers everything except the HDMI
encoder/serializer and the clock generators. A settings screen lets the user
change:
- the instruction rate
- the number of instances and the grid shape
- the Chip-8 compatibility quirks
- the sound

## Block overview

```
             clk_100mhz                                   clk_pixel (74.25 MHz)
 ┌───────────┐  tick   ┌──────────────┐ CLS/DRW ┌───────┐
 │ tick_gen  ├────────►│  processor   ├────────►│ video │
 └───────────┘         │ (one FSM for │◄────────┤       │
 ┌───────────┐ keys    │ all instances)│  done   └───┬───┘
 │ keypad    ├────────►│              │             │        ┌─────────────┐
 └───────────┘         └──────┬───────┘             │        │video_sig_gen│
 ┌───────────┐                │ port A, priority 1  │ 2      └──────┬──────┘
 │ debug     ├── priority 3 ──┼─────────────────────┘               │hcount/vcount
 │ (7-seg)   │          ┌─────▼───────────────────────┐ port B ┌────▼──────┐
 └───────────┘          │ memory: 36 × chip8_mem_core ├───────►│ video_mux ├─► pixels
                        └─────────────────────────────┘        └───────────┘
 ┌───────────┐ settings to all blocks                          ┌───────────┐
 │config_menu├────────────────────────────────────────────────►│ screen    │ (sw_menu
 └───────────┘          settings text screen ─────────────────►│ select    │  selects)
                                                               └───────────┘
             clk_audio (~98.3 MHz): sound_active[audio_inst] ─► audio ─► 1-bit PDM
```

`frito_top` wires these blocks together. Its ports are:
- three clocks
- a reset button
- the keypad header: `pmoda` rows in, `pmodb` columns out
- four menu buttons and the `sw_menu` switch
- the debug selection switches and the seven-segment outputs
- the pixel stream for an HDMI encoder: `hdmi_pixel`, `active_draw`, `hor_sync`, `vert_sync`
- the PDM audio bit

## One instance = one memory core

The processor has no register file. Everything an instance owns lives in
its `chip8_mem_core`: a 4407-byte, 8-bit-wide, dual-port RAM. Switching to
another instance therefore costs nothing: the processor just selects a
different core. The price is that every register access becomes a memory
access with latency.

The core is addressed as two regions. Every request carries `mem_type`
(`MEM_RAM` or `MEM_STATE`) and a 12-bit address.

| region / offset      | bytes | contents |
|----------------------|------:|----------|
| RAM 0x000–0x04F      | 80    | hex font, 5 bytes per digit 0–F |
| RAM 0x200–0xFFF      | 3584  | program, loaded from `ROM_FILE` at build time |
| STATE 0–255          | 256   | video buffer: 64×32 pixels, 8 bytes per row, MSB = leftmost pixel |
| STATE 256–271        | 16    | V0 … VF |
| STATE 272–303        | 32    | stack, 16 return addresses, high byte first |
| STATE 304–305        | 2     | PC (high, low); starts at 0x200 |
| STATE 306–307        | 2     | I (high, low) |
| STATE 308            | 1     | SP |
| STATE 309 / 310      | 1 / 1 | delay timer DT / sound timer ST |

4096 + 311 = 4407 bytes. The package `chip8_pkg` defines these offsets, the
request struct `mem_req_t` and the function `core_addr()` that maps
(type, address) to a core address.

Port A of a core is read/write. It is read-first: a read of the address
being written returns the old byte. Port B is read-only and runs on the
pixel clock. Both ports have a fixed read latency of 2 cycles.

## Sharing port A: `chip8_memory`

Three requesters use port A, with a fixed priority:
1. the processor
2. the video module
3. the debug reader

Each requester presents a `mem_req_t`: valid, write enable, type, address
and data. It holds the request until its `*_mem_ready` goes high. Ready is
combinational and means "taken this cycle". A taken read returns its byte on
the shared `mem_data`, with a one-cycle `*_mem_valid`, exactly two cycles
later. A requester may issue a new request every cycle, so reads pipeline.
Simulation assertions in `chip8_memory` check two rules:
- a request that was not taken is held unchanged
- at most one read result appears per cycle

The processor and the video module always talk to the instance being run
(`core_sel`). The debug reader has its own `debug_core` selection.

Port B belongs to the video multiplexer. It uses the flat address
`hdmi_mem_addr = instance·256 + byte`, which reaches the video buffer of any
instance.

## The time-multiplexed processor

`chip8_tick_gen` produces a *tick* every `tick_period` system cycles. The
default is 200 000 cycles, which gives 500 instructions per second. On each
tick, `chip8_processor` runs one instruction for each instance
0 … `num_active−1`, one after the other, then idles. At 100 MHz, 500 Hz and
36 instances, each instruction may take up to 5555 cycles. The longest one,
CLS, takes 281.

One instruction passes through these states:

- **LOAD.** Twelve reads are pipelined through port A:
  - PC (2 bytes)
  - the opcode (2 bytes at PC)
  - VX, VY, V0
  - I (2 bytes)
  - SP, DT and ST

  The opcode reads must wait for PC, and the operand reads must wait for the
  opcode. Inside each group the processor issues one read per cycle.
  `load_ok` gates a read until the data it depends on has arrived.
- **EXEC.** Decodes the instruction and computes its results.
  - CLS and DXYN are handed to the video module, and the processor waits for
    `video_done_drawing`.
  - 00EE reads its return address from the stack.
  - FX55/FX65 copy registers to or from RAM one byte at a time.
- **WRITE.** Drains a list of up to eight byte writes that EXEC prepared:
  - results, with VX written before VF so that VF wins when X = F
  - I, SP and the stack entry
  - the three BCD digits
  - the timers
  - finally the new PC

  The PC write is always last, which makes an instruction atomic from the
  point of view of the next round.

**Instruction behaviour:**
- Instructions follow the common Chip-8 definitions.
- Four compatibility switches (`quirks_t`) select between the behaviours
  that programs disagree on:

  | quirk | set | clear |
  |---|---|---|
  | `vf_reset` | 8XY1/2/3 clear VF | — |
  | `shift_vy` | 8XY6/8XYE shift VY | shift VX |
  | `mem_inc_i` | FX55/FX65 advance I | — |
  | `jump_vx` | BXNN adds VX | adds V0 |

- The 60 Hz timers are driven by a separate `timer_tick` from the tick
  generator. A pending timer tick is applied during the next round: each
  instance decrements its DT and ST as part of its instruction.
- `sound_active[i]` is high while ST of instance i is nonzero.
- **FX0A** (wait for key) leaves PC unchanged while no key is down, so it is
  simply re-executed on the next tick. Once a key is down, it stores the
  lowest pressed key.
- **CXNN** takes its random byte from one free-running LFSR that all instances
  share. Copies of the same program therefore diverge.
- DXYN wraps the start position modulo 64/32. Pixels that then fall off the
  right or bottom edge are clipped.

## Drawing: `chip8_video`

The video module does its work through port A, at the second priority:

- **CLS** writes 256 zero bytes, one per cycle. The clear itself takes
  258 cycles.
- **DXYN** handles one sprite row at a time:
  1. Read the sprite byte.
  2. Shift it to the pixel position, which splits it over two video bytes
     when x is not a multiple of 8.
  3. For each of the two bytes: read the old byte, XOR, write back.

  When the start column lies in the last byte of a row, the second part is
  dropped. That is the horizontal clipping. Rows below line 31 are dropped too.
  `video_collision` reports whether any lit pixel was turned off.

A four-row sprite takes 46 cycles in the video module. Each row costs about
12 cycles because of the two-cycle read latency.

## Showing the grid: `video_sig_gen` and `chip8_video_mux`

`video_sig_gen` produces standard 720p60 timing on the 74.25 MHz pixel clock:
- horizontal: 1280 active, then 110/40/220 front porch/sync/back porch
- vertical: 720 active, then 5/5/20
- the counters `hcount`/`vcount`, the syncs, `active_draw`, and a
  `new_frame` pulse when blanking starts

The multiplexer has two jobs: choose a layout, and map pixels to instances.

**Layout, once per frame.** At `new_frame` a small state machine uses the
sequential `divider` (restoring, one quotient bit per cycle) four times. It
computes:
- the largest integer scale S with `64·S·cols ≤ 1280` and `32·S·rows ≤ 720`
- the horizontal and vertical padding, `(1280 − 64·S·cols)/(cols+1)` and the
  same vertically, so the gaps around and between cells are equal

All four results are applied together, so a settings change never tears a
frame.

| grid | S  | pad_h | pad_v |
|------|----|-------|-------|
| 6×6  | 3  | 18    | 20    |
| 3×2  | 6  | 32    | 112   |
| 2×2  | 10 | 0     | 26    |

**Pixels, without division.** Two `grid_axis_tracker` instances, one per
axis, step along with `hcount` and `vcount`. They keep track of:
- whether the beam is in a gap or in a cell
- which cell it is in
- which Chip-8 pixel it is on within that cell

They count S screen pixels per Chip-8 pixel. From the cell (row r, column c)
the instance is `r·cols + c`. The byte address goes out on port B. Because the
byte returns two cycles later, the syncs, blanking and bit index are delayed
by two cycles, so all outputs lag the timing generator by two pixels.

**Colours:**
- lit pixel: `FFFFFF`
- dark pixel: `202020`
- padding and cells of inactive instances: `000040`
- blanking: black

## Settings screen: `config_menu`

The menu holds the settings as registers, in the system clock domain. It
draws them as text using two dual-port memories.

- **Symbol memory (2176 bytes).**
  - An 8×8 glyph for each of 256 character codes. The codes are ASCII; the
    digits, capital letters, space and `>` are drawn.
  - 128 bytes of names: the 12 item labels and the four timbre names.
- **Screen memory (920 bytes).** 40×23 characters, one per 32×32-pixel cell,
  with glyphs scaled by 4.

After reset, and after any button press, an updater rewrites the whole
screen memory. It takes one cell per cycle, 921 cycles in all. For each cell
it either copies a name byte from the symbol memory or writes a character
directly: the cursor, a hex digit or a space. The renderer on the pixel
clock reads the screen memory and then the glyph row, so its output lags by
three pixel clocks.

Items appear one per row. The cursor `>` marks the row being edited.
`btn_up`/`btn_down` move the cursor and `btn_inc`/`btn_dec` change the value;
each value stops at its limits.

| item | values | meaning |
|------|--------|---------|
| SPEED    | 0–F | instruction rate 100·(s+1) per second; 4 = 500 |
| ACTIVE   | 01–24 (hex) | number of running instances |
| COLUMNS, ROWS | 1–6 | grid shape |
| VF RESET, SHIFT VY, INC I, JUMP VX | 0/1 | quirks |
| TIMBRE   | SINE, TRIANGLE, SQUARE, SAWTOOTH | waveform |
| TONE     | 0–F | 155 + 85·t Hz (325 Hz at 2, 750 Hz at 7) |
| VOLUME   | 0–F | level ·v/16 |
| SOUND    | 00–23 (hex) | instance whose sound timer is heard |

The buttons act only while `sw_menu` shows the settings screen. The
emulator keeps running underneath.

The top parameters `DEF_*` give the reset values: 500 Hz, 36 instances, a
6×6 grid, sine, tone 5 and volume 15. `CLK_HZ` tells the menu the system
clock rate, which is needed to build its table of tick periods.

## Keypad, sound and debug display

- **`keypad_scanner`** drives one column of the 4×4 matrix low at a time and
  reads the four pulled-up rows. Each column takes two cycles, so the whole
  pad is read every 8 cycles. `keys_pressed[4·row + col]` is the key with
  that number.
- **`chip8_audio`**, on the audio clock, makes the sound:
  - A counter divides 98.304 MHz by `DECIM` = 32768, giving a 3 kHz sample
    strobe.
  - `tone_lut` turns the tone into a 16-bit phase increment, with rounding.
  - Four wave generators (`sine_wave`, `triangle_wave`, `square_wave`,
    `sawtooth_wave`) run in parallel. Each has its own phase accumulator and
    looks up its 64-entry shape with the top 6 phase bits.
  - The timbre picks one wave. The sample is forced to zero while the chosen
    instance's sound timer is zero.
  - `volume_control` computes `(sample·volume)>>4`.
  - `pdm`, a first-order sigma-delta, turns the 8-bit level into a one-bit
    stream for the audio jack.
- **`chip8_debug`** reads one byte of a chosen instance, about 100 times per
  second. It reads through the lowest-priority slot of port A, so it never
  delays emulation. The seven-segment display shows:
  - the region (0 = RAM, 1 = state area) and the 12-bit address on the four
    left digits
  - the byte on the two right digits

## Clocks and reset

There are three clock domains:
- `clk_100mhz`: processor, memories, menu, keypad and debug
- `clk_pixel` (74.25 MHz): timing, multiplexer, menu renderer, memory port B
- `clk_audio` (~98.3 MHz): audio

Synchronization:
- `btn_rst` is synchronized into each domain.
- Settings cross into the pixel and audio domains through two-flop
  synchronizers. They change only on a button press, and the video layout
  is recomputed once per frame, so a change that arrives skewed is never seen
  half-way.
- The memory cores cross domains by construction, as true dual-port RAMs.

## Parameters worth knowing

| module | parameter | default | |
|---|---|---|---|
| `frito_top`, `chip8_memory`, `chip8_processor` | `NUM_INST` | 36 | number of memory cores / instances |
| `frito_top`, `chip8_memory`, `chip8_mem_core` | `ROM_FILE` | `rtl/chip8_demo_rom.hex` | program loaded into the instances |
| `frito_top`, `chip8_memory` | `ROM_FILE_ALT`, `ROM_ALT_MASK` | same file, 0 | second program, for the instances whose mask bit is set |
| `frito_top`, `chip8_tick_gen` | `TIMER_PERIOD` | 1 666 667 | system cycles per 60 Hz timer tick |
| `frito_top`, `chip8_audio` | `DECIM` | 32768 | audio clocks per sample (3 kHz) |
| `frito_top`, `config_menu` | `CLK_HZ`, `DEF_*` | 100 MHz; 500 Hz, 36, 6×6, sine, 5, 15 | menu table and reset settings |
| `frito_top`, `chip8_debug` | `DBG_REFRESH` / `REFRESH` | 1 000 000 | cycles between debug reads |
| `frito_top`, `video_sig_gen` | `H_*`, `V_*` | 720p60 | video timing |

**Program file.** `ROM_FILE` is read with `$readmemh` into RAM from 0x200.
It holds hex bytes separated by spaces or line breaks, and `//` comments
are allowed; the bundled file lists two bytes (one instruction) per line. Every
instance gets this program, except those selected by `ROM_ALT_MASK`, which
get `ROM_FILE_ALT`. To run a game, convert its binary to this
format and point `ROM_FILE` at it. A path is relative to where the
simulator or synthesis tool is started.

**The bundled demo program** (84 bytes) exercises everything:
1. It clears the screen.
2. It draws a random number as three decimal digits, using BCD and the
   font.
3. It calls a subroutine that draws a sprite across the bottom-right corner
   twice. The sprite is clipped, and the second draw erases the first, which
   causes a collision.
4. It starts the sound timer.
5. It clears the screen again if key 0 is held.
6. It waits one second on the delay timer, then starts over.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. Run them from the repository root with plain Verilator 5; the root
matters because of the ROM path. For example:

```
verilator --binary --timing -Irtl -y rtl rtl/chip8_pkg.sv tb/chip8_video_tb.sv \
          --top-module chip8_video_tb -Mdir obj_video
./obj_video/Vchip8_video_tb
```

Substitute any testbench name. The ones worth knowing:

- **`frito_top_tb`** is the end-to-end test, about 15 s of simulation time.
  - It runs four instances in a 2×2 grid, with the timers sped up and a model
    of the key matrix on the keypad pins. Three instances run the demo
    program. The fourth is built with a second program
    (`tb/frito_alt_rom.hex`), which draws the letter A.
  - It counts each mechanism and fails any that never happens: rounds, CLS,
    DRW, collisions, clipped sprites, timer decrements, sound output, a key
    press taking the EX9E branch, debug reads waiting behind other
    requesters, and random numbers differing between instances.
  - It compares one whole captured 1280×720 frame, pixel by pixel, with the
    video buffers in the memory cores.
  - It measures the longest instruction, 281 cycles for CLS, and checks it
    against the 5555-cycle budget.
  - Finally it switches to the settings screen, changes the volume with the
    buttons, and checks that text replaces the grid.
- **`frito_top_full_tb`** runs the top with every parameter at its default:
  36 instances, 500 Hz, 60 Hz timers, 720p, 6×6.
  - All 36 instances start and run the demo into its wait loop, about 1080
    instructions in total.
  - One full frame is captured and checked pixel by pixel.
  - It checks that the longest round fits in one tick.
  - It takes about 15 s.
- **`chip8_processor_tb`** runs instruction sequences against a behavioural
  memory and video model. It checks register, memory and timer results, the
  quirks and the multiplexed schedule.

## Departures and limits

- **Two programs per build.** The original compiled a chosen game into each
  grid position. Here there are two program files: `ROM_FILE` for all
  instances, and `ROM_FILE_ALT` for the instances whose bit is set in
  `ROM_ALT_MASK`. More distinct games would need more file parameters on
  `chip8_memory`.
- **Audio sample rate.** A decimation of 1024 from ~98.3 MHz would give
  96 kHz, not the intended 3 kHz. `DECIM` is 32768, which gives exactly 3 kHz.
- **Block RAM shape.** Each core is 4407 × 8 bits = 35 256 bits, inside the
  36 864 bits of one 36-kbit block RAM. However, 4407 words exceed the
  4096-word depth of such a block at 8/9-bit width, so a vendor tool may add a
  small extra RAM per core. Splitting off the 311-byte state area, or using a
  wider port, would fix that. This has not been taken through an FPGA tool.
- **Instruction timing** is this design's own, and close to the original. The
  original reports about 270 cycles for CLS and 95 cycles for a four-row DRW.
  Measured here, over the whole instruction including fetch and write-back:
  - CLS: 281 cycles
  - a five-row DRW: 82 cycles
  - a full 36-instance round: 10 116 cycles, against 200 000 per 500 Hz tick
- **Items not specified by the original and chosen here:**
  - the timer handling (60 Hz, applied per round)
  - FX0A re-executing until a key is down
  - the shared random generator
  - the quirk set
  - the tone table (155–1430 Hz in 85 Hz steps)
  - linear volume
  - colours, layout formula, menu layout, glyphs, buttons and debug display
    format
- **Grid mapping by counters.** The original divides to find the instance
  under the beam. Here the divider is used only once per frame, for the
  layout. Per pixel, two counters track the position instead; the result is
  the same and needs no division per pixel.
- **Key numbering.** Key k of the Chip-8 keypad is matrix position
  4·row + column. A keypad whose printed labels follow the classic Chip-8
  layout needs its wiring, or this mapping, adapted.
- **The settings symbol memory** is 2176 bytes instead of 2160. It stores
  8-character names for all 12 items and 4 timbres.
- **Not included:**
  - the TMDS encoder/serializer for HDMI (the pixel stream is a port)
  - the clock managers that make 74.25 MHz and ~98.3 MHz (the clocks are
    ports)
  - the keypad's resistors
- **No FPGA testing.** The design is verified only in simulation: block
  testbenches, an end-to-end run, and the full-size run. It has not been
  run on an FPGA or against real Chip-8 game ROMs.
