# APB motion-estimation accelerator for an embedded H.264/AVC encoder

Motion estimation (ME) is by far the most expensive step of an H.264/AVC
encoder. In a small embedded system the encoder runs on a single soft-core
CPU (a Leon3-class SPARC processor on an AMBA AHB/APB bus). This RTL is the
piece that takes ME off that CPU: a small programmable ME processor, with its
own local memories and a debug unit, packaged as one AMBA-2.0 APB peripheral.

The CPU uses it like this, per 16x16 macroblock:

1. store the search firmware once (full search, three step search, diamond
   search, or any other search written for the processor);
2. store the current macroblock (256 pixels) and the search area around it
   (48x48 pixels for a 32x32 search range) with plain store instructions to
   one register;
3. toggle the BANK control bit so the processor reads what was just stored,
   set START, poll the status register;
4. read the best motion vector (x, y) and its SAD.

The macroblock and search-area memories are double-buffered: while the
processor searches one macroblock, the CPU can already store the next one
into the other bank (step 2 of the next macroblock overlaps step 3).

APB is enough because very little data moves per macroblock (2.5 KB in,
three words out) compared with the work done inside the core. The processor
runs on its own clock (`me_clk`, 90 MHz in the reference FPGA system, against
60 MHz for the bus), so the core has two clock domains.

```
            pclk domain                 |            me_clk domain
                                        |
APB --> me_apb_wrapper ---- commands ---+--> me_ice ---- go / goto ----+
        | registers       <-- status ---+--  (2 breakpoints,           |
        | Address/Data    <-- results --+--   run/stop/step/goto)      v
        |                               |                          me_asip
        +-- upload port --> me_dpram x3 (program, MB x2, SA x2)     |  16-bit regs, branches
                            port A: pclk, port B: me_clk <----------+  me_sad_unit
                                                                       +-- me_agu
```

## Files

| file | contents |
|---|---|
| `rtl/me_pkg.sv` | instruction set, register map, command codes |
| `rtl/me_apb_core.sv` | top level: wires everything together |
| `rtl/me_apb_wrapper.sv` | APB slave, upload port, clock-domain crossing |
| `rtl/me_ice.sv` | in-circuit emulator (debug controller) |
| `rtl/me_asip.sv` | the ME processor |
| `rtl/me_sad_unit.sv` | SAD unit with early termination |
| `rtl/me_agu.sv` | address generation for candidate blocks |
| `rtl/me_dpram.sv` | dual-clock scratchpad memory |
| `rtl/me_sync2.sv`, `rtl/me_rst_sync.sv` | synchronisers |
| `tb/tb_me_*.sv` | one self-checking testbench per module |
| `tb/tb_me_frame.sv` | workload: motion estimation of a whole QCIF picture |
| `tb/tb_me_apb_core_nodebug.sv` | the core built with `DEBUG = 0` |
| `tb/me_fw.svh` | firmware builders (FSBM, 3SS, DS) and a reference instruction-set model |

## Programming model

All registers are 32 bits, at byte offsets in a 256-byte APB window.

| offset | name | access | meaning |
|---|---|---|---|
| 0x00 | CTRL_SET | W / R | write 1s to set control bits; reads the control register |
| 0x04 | CTRL_CLR | W / R | write 1s to clear control bits; reads the control register |
| 0x08 | STATUS | R | bit 0 BUSY, bit 1 DONE, bit 2 BREAK, bit 3 CMD (command in flight) |
| 0x0C | ADDRESS | RW | bits 13:12 memory (0 program, 1 macroblock, 2 search area), bits 11:0 word |
| 0x10 | DATA_IN | W / R | store word at ADDRESS, then ADDRESS += 1 |
| 0x14 | DATA_OUT | R | word at ADDRESS, then ADDRESS += 1 |
| 0x18 | MV_X | R | best vector x, sign-extended |
| 0x1C | MV_Y | R | best vector y, sign-extended |
| 0x20 | SAD | R | best SAD |
| 0x40 | ICE_CMD | W | 1 run, 2 stop, 3 step, 4 goto, 5 start |
| 0x44 | ICE_GOTO | RW | PC for goto |
| 0x48 | ICE_BP0 | RW | bit 31 enable, low bits PC |
| 0x4C | ICE_BP1 | RW | bit 31 enable, low bits PC |
| 0x50 | ICE_PC | R | PC of the stopped processor |
| 0x54 | ICE_RSEL | RW | bits 2:0 select a processor register r0..r7 |
| 0x58 | ICE_RVAL | R | the selected register of the stopped processor, sign-extended |

Control bits: bit 0 START (cleared by hardware once sent), bit 1 RESET (holds
the processor, the emulator and the best match in reset while set), bit 2
BANK (the processor reads pixel bank BANK; DATA_IN and DATA_OUT access the
macroblock and search-area memories of the other bank). The program memory
has a single bank.

Pixels are packed four to a word, little-endian: pixel `a` of a memory is in
word `a/4`, bits `[8*(a%4)+7 : 8*(a%4)]`. The macroblock is stored row by
row (16 pixels per row). The search area is stored row by row, 48 pixels
wide; displacement (0,0) is the block whose top-left pixel is at column 16,
row 16. Valid displacements are -16..15 in x and y.

## The ME processor and its instruction set

The processor has eight 16-bit registers r0..r7, a program memory of 256
32-bit words and one special unit, the SAD unit. Each instruction takes two
ME clock cycles (issue, execute); a SAD instruction holds the processor until
the SAD unit finishes.

```
[31:28] opcode  [27:25] rd  [24:22] ra  [21:19] rb  [18:16] 0  [15:0] imm
```

| op | mnemonic | effect |
|---|---|---|
| 0 | NOP | |
| 1 | LDI rd, imm | rd = imm (sign-extended) |
| 2 | ADD rd, ra, rb | rd = ra + rb |
| 3 | ADDI rd, ra, imm | rd = ra + imm |
| 4 | SUB rd, ra, rb | rd = ra - rb |
| 5..8 | BLT / BGE / BEQ / BNE ra, rb, imm | branch to imm if ra <, >=, ==, != rb (signed) |
| 9 | JMP imm | pc = imm |
| 10 | SAD ra, rb | evaluate displacement (ra, rb); keep it if its SAD is lower than the best |
| 11 | CLRB | best SAD = maximum, best vector = (0,0) |
| 12 / 13 | GBX rd / GBY rd | rd = best vector x / y |
| 14 | HALT | stop; STATUS.DONE goes high |
| 15 | BLK imm | select the block that SAD matches (see below) |

START clears the registers and the best match and runs from PC 0. The best
vector and SAD at HALT are the results. A full search is ten instructions:

```
0  CLRB
1  LDI  r1, -16          ; y
2  LDI  r3, 16           ; limit
3  LDI  r0, -16          ; x          <- row loop
4  SAD  r0, r1           ;            <- column loop
5  ADDI r0, r0, 1
6  BLT  r0, r3, 4
7  ADDI r1, r1, 1
8  BLT  r1, r3, 3
9  HALT
```

Three step search and diamond search re-centre on the best vector found so
far with GBX/GBY; `tb/me_fw.svh` builds all three programs.

## Variable block sizes

By default SAD matches the whole 16x16 macroblock. BLK selects a smaller
block, so the H.264/AVC partitions 16x8, 8x16, 8x8, 8x4, 4x8 and 4x4 can be
searched too. Its immediate:

| bits | field | meaning |
|---|---|---|
| 1:0 | wsel | width = 16 >> wsel (0: 16, 1: 8, 2 or 3: 4) |
| 3:2 | hsel | height = 16 >> hsel |
| 7:4 | off_x4 | left column of the block inside the macroblock, in units of 4 pixels |
| 11:8 | off_y4 | top row of the block, in units of 4 pixels |

The block must lie inside the macroblock. The displacement given to SAD
moves that block, with the same -16..15 range. Each partition is a separate
search: set BLK, CLRB, search, read GBX/GBY (or HALT and read MV_X/MV_Y).
START resets the selection to 16x16. `fw_fsbm(p, blk)` in `tb/me_fw.svh`
builds a full search for any block.

## SAD unit and early termination

For a candidate, the AGU walks the pixel pairs of the block in raster order and the
SAD unit adds one absolute difference per cycle. After every pixel the
running sum is compared with the best SAD so far. Once it reaches the best,
the candidate cannot win, and the unit stops. This is where most of the time
goes: in the tests, about 960 of the 1024 full-search candidates stop early,
and a full search takes 82,000 to 179,000 ME cycles instead of about 266,000.

Rules that follow from this, and that software may rely on:

* a candidate that runs to the end is strictly better and becomes the best;
  ties keep the earlier candidate, so a full search returns the first minimum
  in scan order (y outer, x inner);
* evaluating the same candidate twice changes nothing;
* a displacement outside -16..15 is skipped (costs 2 cycles, never wins).

Latency of one candidate, counted from the cycle its SAD instruction executes:
W*H + 2 cycles if it completes (258 for 16x16), k + 3 if it stops at pixel k (0-based), 2 if
skipped. The SAD instruction as a whole takes that latency + 2 cycles.

## Debugging: the in-circuit emulator

The emulator sits between the processor and the bus and decides whether the
processor may issue its next instruction. Commands are written to ICE_CMD:

* **run** continues from the current PC. A breakpoint on that PC is passed
  once, so run after a breakpoint makes progress.
* **stop** stops before the next instruction (an instruction in progress,
  including a SAD, finishes first).
* **step** issues exactly one instruction (breakpoints do not apply), then
  stops.
* **goto** loads ICE_GOTO into the PC; it does not start the processor.
* **start** is what the START control bit sends.

Two breakpoints (ICE_BP0/1) stop the processor before it issues the
instruction at their address. STATUS.BREAK is then set and ICE_PC gives the
PC. ICE_RSEL and ICE_RVAL show the processor's registers, one at a time.
Registers and the best match are untouched by stop/step/goto, so a stopped
search can be resumed and gives the same result.

## Clock-domain crossing

This is the least obvious part of the core.

* **Memories** are true dual-clock: the bus side writes and reads back on
  `pclk`, the processor reads on `me_clk`. The pixel memories have two banks
  and the two sides always use different ones, so uploading the next
  macroblock while the processor runs is safe. Change BANK only while the
  processor is stopped; the bit reaches the ME side through a two-flop
  synchroniser, which has settled long before the START that follows. The
  program memory has one bank: write it only while the processor is stopped.
* **Commands** (start, run, stop, step, goto) cross one at a time with a
  request/acknowledge toggle pair. The command code and the goto PC stay
  stable while the request is in flight. The ME side acknowledges one cycle
  after acting, so when STATUS.CMD drops, BUSY/DONE/BREAK already reflect the
  command. **A command written while STATUS.CMD is set is dropped**; software
  must poll STATUS.CMD before writing ICE_CMD. START waits in the control
  register until the channel is free, and it waits while RESET is set.
* **Status bits** come back through two-flop synchronisers.
* **Results** (MV_X, MV_Y, SAD, ICE_PC) are copied into bus-side registers
  only while no command is pending and the processor is stopped. During that
  time the values do not change, so the multi-bit copy is safe.
* **Breakpoint registers and ICE_RSEL** are used directly by the ME side;
  write them only while the processor is stopped. ICE_RVAL is copied like
  the results.
* **Reset**: `presetn` resets both domains (synchronised into `me_clk`);
  CTRL.RESET resets the processor side only.

APB here is AMBA 2.0: no PREADY, no wait states. Writes take effect at the
end of the access phase. DATA_OUT is served from a memory read started in
the setup phase, which works because the memory reads the word at ADDRESS on
every cycle.

## Parameters

| parameter | default | where |
|---|---|---|
| `MB_SIZE` | 16 | block size (16x16 inter mode) |
| `SEARCH_RANGE` | 32 | 32x32 search range, displacements -16..15 |
| `PROG_DEPTH` | 256 | program memory words (this design's choice) |
| `DEBUG` | 1 | 0 leaves out the run-time debug facility: breakpoints, run, stop, step and goto are ignored and their registers read 0; START and HALT still work |

Memory depths follow from them: 2 x MB_SIZE²/4 and
2 x (MB_SIZE+SEARCH_RANGE)²/4 words (two banks each). The register file and
vector registers are 16 bits wide. Displacement immediates and branch
targets are 16-bit fields, of which the PC uses log2(PROG_DEPTH) bits.

## Performance against the reference system

With the default sizes, one 16x16 macroblock in the tests takes:

| search | ME cycles per MB | ms per QCIF frame (99 MB) at 90 MHz | measured on the reference FPGA system |
|---|---|---|---|
| full search | 82,198 – 179,316 | 90 – 197 | 200.9 ms |
| three step | 4,883 – 8,313 | 5.4 – 9.1 | 19.7 ms |
| diamond | 8,779 – 49,419 | 9.7 – 54 | 28.0 ms |

`tb_me_frame` runs a whole generated QCIF picture (99 macroblocks), with the
two pixel banks used as a pipeline:

| search | ME cycles per picture | ME time at 90 MHz | picture done, transfers included |
|---|---|---|---|
| full search | 8,276,703 | 92.0 ms | 92.0 ms |
| diamond | 505,026 | 5.61 ms | 5.65 ms |
| three step | 589,541 | 6.55 ms | 6.59 ms |

Per picture the bus spends 2.86 ms on search areas, 0.32 ms on macroblocks
and 0.015 ms on reading vectors. This is with a bus master that takes three
bus cycles per access. Almost all of it overlaps the searches. Each search
area is uploaded whole (2304 bytes). The reference system reports 0.71 ms,
0.16 ms and 0.99 ms per frame for these three transfers. Its search-area
figure is lower than a whole 48x48 upload per macroblock would allow over
APB, so it probably reuses the overlap between neighbouring search areas.
This core does not: its search area always starts at word 0.

The reference column comes from a system whose processor and firmware are
not this one, so only the order of magnitude is comparable. Full search is
close, which supports the one-pixel-per-cycle SAD datapath chosen here.

## What is and is not here

Built: everything inside the APB ME peripheral except the clock generator.

Not built, because it is third-party IP or a physical part: the CPU, AHB bus,
AHB/APB bridge, memory controller, interrupt controller, UART, timers, debug
support unit/JTAG, the external SRAM, and the clock generator (an FPGA DCM;
`me_clk` is an input).

This design's own choices, where the published design gives only the
function: the processor's instruction set, register count and timing; the
one-pixel-per-cycle SAD datapath with a per-pixel early-termination check;
the memory layouts and byte order; the register offsets and bit positions;
the debug register layout and command semantics (including the added stop
and start commands); the command-crossing scheme; the 256-word program
memory; the register view and the DEBUG option's exact extent. With
DEBUG = 0, a generic synthesis of the core (memories left as macros) has
354 instead of 413 coarse cells and 421 instead of 514 flip-flop bits,
about 15-20% less logic. The original processor's own instruction set and
the firmware it ran are not reproduced; the search programs in
`tb/me_fw.svh` are new.

The original processor fetched pixel data itself through its AGU, in
parallel with block matching. Here the host stores pixels through DATA_IN,
and the same overlap of transfer and matching comes from the two pixel
banks; the AGU generates the addresses of candidate and current blocks.
Variable-size partitions are searched one after another; choosing between
partitions (mode decision) is left to software.

## Simulation

Every testbench checks itself and ends with `TB_RESULT checks=N failures=M`.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_me_apb_core \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/me_pkg.sv tb/tb_me_apb_core.sv
./obj_dir/Vtb_me_apb_core
```

Replace the top module to run another testbench (`tb_me_asip`,
`tb_me_frame`, `tb_me_apb_core_nodebug`, `tb_me_sad_unit`, `tb_me_agu`, `tb_me_ice`, `tb_me_apb_wrapper`,
`tb_me_dpram`). The simulator is two-state, so each testbench resets or
initialises everything it reads.

* `tb_me_apb_core` runs the whole core at its default sizes, over APB with
  a 60 MHz bus clock and a 90 MHz ME clock. It runs full search, three step
  search and diamond search (also near the search-area edge), full search on
  8x8 and 4x8 sub-blocks, and a search during which the next macroblock is
  uploaded into the other bank. It also runs out-of-range candidates, both breakpoints, step, stop/resume, goto, a
  dropped command and the RESET bit. It checks every vector, SAD, candidate
  count and the exact ME cycle count against the reference model, and
  counts each mechanism. It takes a few seconds.
* `tb_me_frame` runs motion estimation of a whole QCIF picture (176x144,
  99 macroblocks) with each of the three searches. While one macroblock is
  searched, the next is uploaded into the other bank. It checks every result
  against the reference model and full search against the exhaustive
  minimum. It also checks that neither fast search beats full search, and
  prints the time per picture. It takes about ten seconds.
* `tb_me_apb_core_nodebug` builds the core with `DEBUG = 0`. It sends stop,
  step and goto during a search and checks that the search still ends with
  the reference result and cycle count, and that the debug registers read 0.
* `tb_me_asip` checks the processor alone, including every instruction and
  the exact cycle count, and checks full search against a plain exhaustive
  minimum.
* The remaining testbenches check one block each against values computed in
  the testbench.

The reference model in `tb/me_fw.svh` (`ref_run`) interprets a program with
the same early-termination rule and cycle costs. To add a search algorithm,
write a builder next to `fw_fsbm` and call `run_algo` with it.

## How far to trust it

All testbenches pass with Verilator 5. The designs also elaborate in a second
SystemVerilog front end. The results are checked against an independent
model, not only against themselves. The clock-domain crossing has been
simulated only with the 60/90 MHz clock pair. It follows standard patterns
(toggle handshake, two-flop synchronisers, copies of held values), but it has
not been checked by a CDC tool or on hardware. Real frames from video
sequences have not been run; the tests use generated textured pictures with
known planted motion.
