# Orca: an RV32IM microcomputer with an AES-128 co-processor

Orca is a small FPGA computer built around a five-stage pipelined RISC-V
core (RV32IM). The core reaches its peripherals through a memory-mapped bus.
The peripherals are:

- a memory-mapped AES-128 encrypt/decrypt engine;
- a 160 x 45 text-mode video card that drives a 1280 x 720 picture;
- a PS/2 keyboard receiver with a scancode buffer;
- a microsecond COUNTER and a random ENTROPY register;
- a serial-line programmer that loads code and halts, starts or resets the
  core.

The core polls every device; there are no interrupts.

The top module is `orca_top` (`rtl/orca_top.sv`). It takes two clocks:

- `clk`: 50 MHz, for the CPU and everything on the bus;
- `clk_pixel`: 74.25 MHz, for the video card.

## Memory map

| Address            | Size     | Device                                         |
|--------------------|----------|------------------------------------------------|
| 0x00000 - 0x0FFFF  | 64 KiB   | program memory (instructions and data)         |
| 0x10000            | 4 B      | COUNTER: +1 every 50 cycles (1 us)             |
| 0x10004            | 4 B      | ENTROPY: 32-bit LFSR, steps every cycle        |
| 0x20000 - 0x2383F  | 14 400 B | video memory, 2 bytes per cell                 |
| 0x30000 - 0x3007F  | 128 B    | keyboard scancode buffer                       |
| 0x30080            | 1 B      | keyboard control: [0] data available, [7:1] count |
| 0x40000 - 0x40403  | 1028 B   | AES input buffer                               |
| 0x40404 - 0x40807  | 1028 B   | AES output buffer                              |
| 0x4F000            | 1 B      | AES control                                    |

Each character cell (x, y) occupies two bytes at `0x20000 + 2*(160*y + x)`:

- the first byte is the character code;
- the second byte is the attribute.

The attribute bits are:

- [3:0]: foreground, one of the 16 VGA colours;
- [6:4]: background, one of the first 8 colours;
- [7]: blink.

The report places the video buffer at 0x3000 in one sentence and at 0x20000 in
its address table. 0x3000 falls inside program memory, so the table's address
is used.

## The pipeline (`riscv_core`)

This is the hardest part of the design, and most of its logic is in the
hazard control. The stages are the classic ones:

1. **IF** fetches from the instruction cache.
2. **ID** decodes, reads registers and forwards operands.
3. **EX** runs the ALU and the single-cycle multiplier. It also resolves
   branches and drives the divider.
4. **MEM** talks to the bus.
5. **WB** writes the register file.

Each stage has its own hold and annul controls. A cycle-by-cycle table lives
in the header of `rtl/riscv_core.sv`.

**Forwarding.** Operands are forwarded from EX, MEM and WB into ID. The
youngest producer wins. A load result cannot be forwarded until it returns, so
a load-to-use stall remains:

- it applies when a load in EX or MEM writes a register that the ID
  instruction reads;
- it holds IF and ID;
- it sends a bubble into EX.

**Loads.** The bus returns read data two cycles after the address is first
presented. A load in MEM therefore holds IF through MEM for two extra cycles,
and WB receives a bubble. The report calls this a "data cache miss" on every
load, because there is no data cache. Stores finish in one cycle.

**Division.** `div`, `divu`, `rem` and `remu` start a restoring divider with
one setup cycle and 32 iterations (`riscv_divider`). While it runs, the divide
holds IF, ID and EX, and MEM receives bubbles. Other cases follow the RISC-V
rules:

- division by zero returns all ones and the dividend as remainder;
- the signed overflow case returns the dividend and remainder 0.

**Branches.** The core predicts every branch not taken. A taken branch, or any
jump, is resolved in EX and does three things:

- annuls the two younger instructions in IF and ID;
- redirects the pc;
- costs two cycles.

The tricky interactions are between held and annulled stages:

- A redirect that arrives while IF is stalled on a cache miss must win over
  the miss.
- A divide in EX must not retire into MEM until the divider's result
  register is valid.
- A load waiting in MEM must keep its address and control steady for the
  whole wait, because the bus does not latch them.

Each hazard was checked in isolation and in combination by the core's
testbench. The end-to-end test counts them again at system level.

**Instruction cache (`riscv_icache`).** The cache has two ways, 32 sets,
one-word lines and one LRU bit per set. A hit is combinational, so IF takes
one cycle. A miss reads program memory port A, which has a two-cycle latency,
and writes the line, for a 3-cycle stall. Small polling loops therefore run
entirely from the cache.

The cache is cleared on core reset. Every word written by the serial
programmer also resets the core, for this reason: the cache keeps filling while
the core is halted, and without the reset it could hold a stale word that was
fetched before the program arrived.

**Halting mode.** `halt_sw` freezes every pipeline register and any pending
store. Each rising edge of `step_btn` then advances the whole machine exactly
one cycle. The `dbg` output shows:

- the pc of every stage;
- the instruction in ID;
- the register selected by `dbg_reg_sel`;
- whether the core is halted.

`seven_seg_debug` shows one of them on an eight-digit seven-segment display
(`seg_an`, `seg_cat`, both active low). `dbg_view` picks the value: 0-4 the
stage pcs (IF to WB), 5 the ID instruction, 6 or 7 the selected register.
Each digit is lit for 1 ms in turn.

## The AES co-processor (`aes_coprocessor` and below)

This is the other substantial block. Software uses it in four steps:

1. Write 16-byte blocks into the input buffer, ending the list with the word
   0xDEADBEEF.
2. Write 1 (encrypt) or 2 (decrypt) to the control register.
3. Poll until bit 2 (output available) rises.
4. Read the output buffer.

The control register reads as follows:

- [0]: encrypt flag;
- [1]: decrypt flag;
- [2]: output available;
- [3]: busy;
- [7:4]: stage of the controller FSM.

The FSM has ten stages:

- `RD_DWORD_1..4` read four words from the input buffer.
- `START_AES` starts the core.
- `WAIT_FOR_AES_RESULT` waits for the result.
- `WB_DWORD_1..4` write the result to the same offset in the output buffer.

The terminator is tested on the first word of each block. Reaching the end of
the buffer also stops the run. The idle stage reads 10.

A block takes about 34 cycles of co-processor time, so a full buffer of 64
blocks takes about 2 200 cycles.

Byte order is a choice the report leaves open. Byte j of buffer word i is AES
block byte 4i + j, so a C byte array stored by the little-endian core is
processed in memory order.

`aes_core` has no pipeline registers between the AES stages. On each start it
does two things in turn:

1. It expands the key into an 11-entry key memory (`aes_key_schedule`,
   `aes_key_memory`), one round key per cycle.
2. It runs `aes_encryption` or `aes_decryption`, one full round per cycle.

Each round performs SubBytes, ShiftRows, MixColumns and AddRoundKey, or their
inverses. One block takes 25 cycles from start to done.

The S-boxes are computed as the GF(2^8) inverse (x^254) followed by the
affine map, rather than stored as a table.

The 128-bit key is the `AES_KEY` parameter of the top. The report does not say
how software would supply a key.

## Video (`video_card`)

The video card runs entirely in the pixel clock domain. Its only link to the
CPU is the dual-clock video RAM (`video_ram`). `video_sig_gen` produces the
standard 720p60 timing:

- 1650 x 750 total, 1280 x 720 active;
- positive syncs.

The renderer is a three-stage pipeline:

1. **Address.** From h and v it computes the cell index `160*(v/16) + h/8` and
   reads the video RAM word that holds that cell.
2. **Look up.** It picks the character byte and the attribute byte. It looks
   up the glyph row in `font_brom` and decodes the attribute in
   `attribute_brom`.
3. **Output.** It chooses the dot and the foreground or background colour.

The syncs and data enable are delayed by the same three cycles. Blinking cells
show only their background while bit 5 of the frame counter is set (about
0.5 s on and 0.5 s off). The output is raw 24-bit RGB with syncs and data
enable. An HDMI encoder would sit after it.

The code page 437 glyph bitmaps are not part of this design. `font_brom` loads
a font from its `INIT_FILE`/`FONT_FILE` parameter. Without one it holds a test
pattern: rows 1-14 of glyph c are the byte c, and rows 0 and 15 are blank.

## Keyboard, serial programmer, COUNTER and ENTROPY

**Keyboard.**

- `ps2_rx` synchronises the PS/2 clock and data and samples on falling clock
  edges.
- It receives 11-bit frames: start, 8 data bits LSB first, odd parity, stop.
- Frames with bad parity or a bad stop bit are dropped.
- `ps2_bram` appends each code to a 128-byte buffer and counts them in the
  control register.
- Any write to the control register empties the buffer.
- The count saturates at 127. Further codes are dropped and flagged.

**Serial programmer.** `uart_rx` receives 8N1 at `CLKS_PER_BIT` clocks per bit
(434, which is 115200 baud at 50 MHz). `uart_programmer` decodes these
commands:

| Command | Bytes                                   | Action                                      |
|---------|-----------------------------------------|---------------------------------------------|
| `W`     | `W`, 4 address bytes, 4 data bytes (LSB first) | write a word of program memory through the instruction port |
| `R`     | `R`                                     | reset the core                              |
| `H`     | `H`                                     | halt                                        |
| `S`     | `S`                                     | start                                       |

After power-up the core stays halted until `S` arrives.

**COUNTER.** It counts microseconds from reset.

**ENTROPY.** It is a maximal-length 32-bit Galois LFSR that steps every
cycle, so two reads a few cycles apart differ.

## Bus timing

`memory_controller` decodes each address to one device and passes on the
word index within that device. Every read returns exactly two cycles after
the address, whichever device answers. The pipeline relies on this fixed
latency.

Program memory is a true dual-port RAM:

- port A is used for instruction fetch and serial writes, and reads in two
  cycles;
- port B is used for data and has byte enables.

## What is not here

- The HDMI/TMDS encoder and serialisers are not included.
- The FPGA clock generator is not included.
- The real character font is not included (see above).
- There are no interrupts. The report mentions one for the keyboard but
  elsewhere says all devices are polled; polling is what is built.
- Misaligned loads and stores are not detected, as in the report.
- The report calls the scancode store a ring buffer. It also says software
  reads up to the count and then writes 0 to the control register. This
  design follows the second description: codes always start at byte 0 after
  a clear, and nothing wraps.
- The report quotes 200-300 cycles for an AES test. It does not say how
  many blocks that covers. Here a single block takes about 34 cycles of
  hardware time, and the rest of such a figure is software.

## Tests

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

The AES blocks are checked against the FIPS-197 vectors and a reference model
in `tb_aes_ref_pkg`. The CPU blocks are checked against models or
hand-worked programs assembled by `tb_rv_asm_pkg`.

`tb_orca_top` is the full-size system test, with every top-level parameter at
its default. It does the following:

1. Loads a program over the serial line at 115200 baud.
2. Starts the program.
3. Halts the core mid-run and single-steps it six times.
4. Lets the program run:
   - it draws two characters;
   - it encrypts and then decrypts the FIPS-197 block through the
     co-processor;
   - it divides and multiplies;
   - it times a loop with COUNTER and samples ENTROPY;
   - it waits for two scancodes typed by a PS/2 model, then clears the
     keyboard buffer.
5. Compares every stored result with the expected value.
6. Checks the rendered pixels of the two cells in the next frame.
7. Checks the `H` and `R` commands and the seven-segment view of a register.

It counts each mechanism and fails if any of them never occurred:

- load stalls, divide stalls, load-to-use stalls;
- cache misses, branch annuls, bypasses;
- single steps and programmer writes;
- AES encryptions, AES decryptions and terminator stops;
- scancodes, keyboard clears, keyboard overflows and PS/2 frame errors;
- foreground and background pixels.

`tb_aes_workload` runs the co-processor at its default size with a full
buffer of 64 blocks. Encrypting the buffer takes 2177 cycles, and decrypting
it takes another 2177. The first and last blocks must match FIPS-197, and all
64 blocks must round-trip.

After the program ends, a fast keyboard model sends one frame with bad parity
and then 130 codes. The system test checks that the bad frame is flagged,
that the count stops at 127 and that three codes are dropped. The receiver
samples synchronised clock edges, so a fast keyboard clock is fine for a
test.

## Simulating

Everything builds with plain Verilator 5. The packages must be listed before
the files that use them; the other modules are found through `-y`. For
example, the system test:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
  rtl/aes_pkg.sv rtl/orca_pkg.sv rtl/riscv_pkg.sv tb/tb_rv_asm_pkg.sv \
  tb/tb_orca_top.sv --top-module tb_orca_top -o sim
./obj_dir/sim
```

This takes about half a minute. Most of that time goes on loading the program
at 115200 baud.

The AES testbenches also need `tb/tb_aes_ref_pkg.sv` in the file list. To run
your own program without the serial loader, give `orca_top` a hex image
through `MEM_INIT_FILE` (one 32-bit word per line, as `$readmemh` reads it),
then send a single `S` byte. The core still waits halted after reset until
that byte arrives.
