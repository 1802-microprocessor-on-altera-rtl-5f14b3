# A CDP1802 computer for an FPGA SoC board

This is a small COSMAC-style computer built around an RCA CDP1802
compatible processor core. It is meant for a board that also has a hard ARM
processor, such as the Cyclone V SoC on a DE1-SoC. The 1802 runs from a 4 KB
RAM. The ARM side loads programs into that RAM over an Avalon memory-mapped
port, and starts, stops and resets the 1802 through two reserved addresses.
This replaces the toggle switches of a classic "Elf" machine. The 1802's
state is shown on the board's six hex displays and ten LEDs. A 64 x 32
one-bit-per-pixel picture, the resolution CHIP-8 programs expect, appears
on a VGA monitor. The framebuffer behind it is filled from 1802 memory the
way the CDP1861 "Pixie" video chip did it: an interrupt, then a burst of
DMA-OUT cycles.

Everything is synthesizable SystemVerilog. The 1802 core implements the
whole instruction set, including the interrupt, DMA-IN, DMA-OUT and IDL
machinery. A reference model checks it instruction by instruction.

## System overview

```
            Avalon-MM (8-bit data, 12-bit address)
 host ────► host_ctrl ──port A──► ram_dp (4096 x 8) ◄──port B── cdp1802_cpu
               │  mode (CLEAR_n, WAIT_n)                  ▲  │ │  │
               └──────────────────────────────────────────┘  │ │  │ sc, tpb, N, bus_out
                                                             │ │  ▼
                          int_n, dma_out_n ◄──────────── display_dma
                                                                │ byte writes
                                    vga_display (framebuffer 64x32) ──► VGA
               hex7seg x6 ◄── D, R(P), address            LEDs ◄── mode, DF, Q, IE, ...
```

| File | Module | Role |
|---|---|---|
| `rtl/cdp1802_pkg.sv` | package | State codes, control modes, ALU operations, debug struct |
| `rtl/cdp1802_cpu.sv` | `cdp1802_cpu` | The processor |
| `rtl/alu1802.sv` | `alu1802` | 8-bit logic/add/subtract with DF |
| `rtl/ram_dp.sv` | `ram_dp` | 4 KB dual-port RAM, registered reads |
| `rtl/host_ctrl.sv` | `host_ctrl` | Avalon slave, run/stop/reset control |
| `rtl/display_dma.sv` | `display_dma` | Interrupt + DMA-OUT display handshake |
| `rtl/framebuffer.sv` | `framebuffer` | 2048-bit display memory |
| `rtl/vga_display.sv` | `vga_display` | 640x480 VGA scan-out of the framebuffer |
| `rtl/hex7seg.sv` | `hex7seg` | Hex digit to seven segments |
| `rtl/elf1802_top.sv` | `elf1802_top` | The whole system |

The top, `elf1802_top`, has two parameters. `RAM_ADDR_W` is 12 (4 KB).
`DMA_DELAY` is 32 machine cycles (see the display section). The 1802's own
I/O pins are brought out as ports for outside devices:

- the N lines;
- output data with a strobe;
- input data;
- EF1-EF4;
- Q;
- the state code and TPB;
- external interrupt, DMA-IN and DMA-OUT requests.

The external requests are ANDed, active low, with those of the display.

## The processor core

### Programmer's model

The registers are those of the 1802:

- sixteen 16-bit registers R(0)..R(F);
- the 4-bit P and X, which select the program counter R(P) and the data
  pointer R(X);
- I and N, the two nibbles of the opcode;
- D, the 8-bit accumulator, and DF, its carry/borrow flag;
- T, which holds the saved X and P after an interrupt;
- the Q output, and IE, the interrupt enable.

There is no separate program counter or stack pointer. By software
convention, R(2) is the stack and R(1) the interrupt handler's counter.
A "call" is just SEP n.

### Machine cycles and the four-clock schedule

The original 1802 spends eight clocks on each machine cycle. This core uses
four. A clock counter `cc` runs 0..3 inside every machine cycle:

| clock | what happens |
|---|---|
| cc0 | Memory address, write data and write enable are set up. In a fetch cycle the address is R(P). |
| cc1 | The RAM reads, or writes when `mem_we` is high. |
| cc2 | Read data is valid (one clock of RAM latency). All register results are committed at the end of this clock. This includes D/DF from the ALU, the R(n) updates and the branch targets. |
| cc3 | `tpb` is high. Output data is valid (`out_valid`). The next machine cycle is chosen at the end of this clock. |

An ordinary instruction is one fetch cycle (state code S0) plus one execute
cycle (S1), which is 8 clocks. The long-branch, long-skip and NOP group
(opcodes Cx) adds a forced second execute cycle, for 12 clocks in total.
For each instruction group, which cycles read or write memory follows the
1802's timing classes:

- long branches read the two target bytes in the two execute cycles;
- long skips and NOP access no memory in either.

The high byte of a long-branch target waits in the B register until the
low byte arrives.

At the end of each cycle, `cc3` chooses the next cycle in this order:

1. the forced second execute cycle of a Cx instruction;
2. DMA-IN, when `dma_in_n` is low;
3. DMA-OUT, when `dma_out_n` is low;
4. an interrupt cycle (S3), when `int_n` is low and IE = 1;
5. another execute cycle, while an IDL instruction is waiting;
6. otherwise, a fetch.

A DMA cycle (S2) moves one byte between the I/O bus and M(R(0)), then
increments R(0). An interrupt cycle saves X,P in T and sets P = 1, X = 2 and
IE = 0. Each of these takes four clocks. DMA and interrupt cycles only come
between instructions, never between the fetch and the execute of one.

IDL does not access memory. It repeats execute cycles until a DMA or
interrupt request arrives. Requests are sampled in cc3 of the last
machine cycle of each instruction (and of each DMA, interrupt or idle
cycle). A request is therefore served at the end of the current
instruction, at most three machine cycles later.

### Control modes

The active-low CLEAR and WAIT inputs select the mode:

| {CLEAR_n, WAIT_n} | mode | effect |
|---|---|---|
| 11 | RUN | runs |
| 01 | RESET | clears the machine and holds it |
| 10 | PAUSE | freezes the core at its current clock |
| 00 | LOAD | freezes the core (the host loads memory through its own RAM port) |

When RESET is released, the core runs one initialisation cycle. This cycle
clears X, P and R(0) and sets IE. The core then fetches from address 0.
Reset also clears every other register. That is a choice made here, so
that simulation never reads an uninitialised value.

### Instruction set notes

All 256 opcodes do something defined. These points are worth knowing:

- **Short branches** (3x) replace only the low byte of R(P), as on the
  COSMAC part. They cannot leave the current 256-byte page.
- **ADC** (74) adds M(R(X)), like the rest of its row. ADCI (7C) adds the
  immediate byte.
- **Subtraction** (SD, SM, SDB, SMB and their immediate forms) is done by
  adding the complement. DF = 1 after a subtraction means "no borrow".
- **SHRC/SHLC** (76/7E) rotate through DF.
- **SAV** (78) stores T at M(R(X)). **MARK** (79) pushes X,P at M(R(2)).
- **RET/DIS** (70/71) load X,P from M(R(X)), then set or clear IE.
- **OUT n** (61..67) puts M(R(X)) on `bus_out` with N on `n_lines`.
  **INP n** (69..6F) stores `bus_in` into M(R(X)) and D. Opcode 68 is a
  no-operation.
- **B1..B4/BN1..BN4** test the active-low EF inputs, so "EF1 true" means
  `ef_n[0]` is low.

### ALU

`alu1802` is a small combinational block. It computes OR, AND, XOR, add,
M-D and D-M, each with or without DF as the carry/not-borrow input. Logic
operations leave DF unchanged.

## Host port and control

`host_ctrl` is an Avalon-MM slave with 8-bit data, a 12-bit byte address
and one clock of read latency. Reads and writes go to port A of the RAM,
except for two addresses:

| address | on write |
|---|---|
| 0x010 | toggle between LOAD and RUN |
| 0x014 | one clock of RESET, then LOAD |

Writes to these two addresses do not reach the RAM. A 1802 program should
not keep data there. The host can read all of RAM at any time, including
while the core runs.

A typical sequence:

1. Write 0x014 (reset, core stopped in LOAD).
2. Write the program into RAM.
3. Write 0x010 (run).
4. Later, write 0x010 again to stop the core.

## Memory

`ram_dp` is 4096 x 8 with two fully independent synchronous ports. Data
appears one clock after the address. When both ports write the same
address in the same clock, port B (the CPU) wins. The core's address is 16
bits and the RAM decodes the low 12, so memory repeats every 4 KB.

4 KB is the size that lets a CHIP-8 interpreter sit in the first 512 bytes
with CHIP-8 programs loaded from 0x200 upward.

## Display: handshake, framebuffer and VGA

This is the part of the system that works most differently from the
original machine.

### The handshake (`display_dma`)

The CDP1861 interrupted the 1802 before each frame, then stole bytes by
DMA-OUT while the beam scanned. Here the picture is kept in a framebuffer
and scanned out by the VGA logic. So the handshake only has to copy the
picture from 1802 memory into the framebuffer, once per frame. It does
this during vertical blanking:

1. **Display off by default.** The display is turned on by `INP 1`
   (opcode 69). It is turned off by `OUT 1` (opcode 61). The `IO_N`
   parameter selects the N value.
2. **Interrupt.** At each `frame_start` from the VGA timing, `int_n` goes
   low. It is released when the core runs its interrupt cycle (state code
   S3 at `tpb`).
3. **Delay.** The handshake waits `DMA_DELAY` = 32 machine cycles. During
   this time the interrupt routine must point R(0) at the 256-byte picture.
   A typical routine saves T and D on the stack, loads R(0), does its own
   bookkeeping and returns with RET.
4. **Transfer.** `dma_out_n` goes low. Each DMA-OUT cycle delivers one byte
   (`out_valid` at `tpb` with state code S2), and byte *k* goes to
   framebuffer byte *k*. The request is released combinationally in the
   cycle that delivers byte 255. So the core takes exactly 256 DMA cycles.

The interrupt routine must be finished, or at least must no longer need
R(0), when the transfer starts. 32 machine cycles leave room for 16
ordinary instructions. The transfer takes 256 x 4 = 1024 clocks. Vertical
blanking at 640x480 lasts 45 lines x 1600 clocks = 72,000 clocks. So as
long as the program keeps interrupts enabled, the framebuffer is rewritten
well before the visible scan starts again.

### Framebuffer

`framebuffer` holds 64 x 32 one-bit pixels as 256 bytes. Byte *b* holds
pixels 8*b .. 8*b+7 in row-major order, with the most significant bit
leftmost. A row is 8 bytes, the same layout CHIP-8 uses. Writes are by
byte. Reads are by pixel address {row, column} with one clock of latency.

### VGA

`vga_display` divides the 50 MHz system clock by two and produces standard
640x480 at 60 Hz:

- 800 x 525 clocks per frame including blanking;
- horizontal sync is low for pixels 656..751;
- vertical sync is low for lines 490..491.

Each framebuffer pixel becomes a 10 x 15 block, white or black. The picture
and the sync pulses are delayed by the same one pixel period, so they stay
aligned. `frame_start` pulses when line 480, the first blank line, begins.

## Board displays

| display | shows |
|---|---|
| HEX5, HEX4 | D |
| HEX3, HEX2 | low byte of the program counter R(P) |
| HEX1, HEX0 | low byte of the memory address |

LEDR[9:0] show: mode (9:8), DF, Q, IE, idle, display on, memory read, and
the state code (1:0).

The segments are active low, with bit 0 = segment a.

## Where this design departs from the description it is based on

The design follows a student implementation of the 1802 on a Cyclone V SoC
and its description of the 1802 instruction set. That implementation left
out the interrupt and DMA states and the I/O instructions, and it never
finished the video handshake. Here all of them are built.

Where the written instruction descriptions disagreed with the COSMAC
definition, the COSMAC behaviour was used:

- the short-branch page rule;
- ADC's operand (R(X), not R(P)).

The following are this design's own choices:

- the four-clock schedule above;
- registered RAM outputs;
- a flat address bus with no multiplexed high byte or TPA;
- keeping control writes out of RAM;
- the whole display path after "64 x 32, one bit per pixel": the handshake
  timing, the picture layout, the VGA mode and the on/off instructions.

Not built:

- the ARM-side software and the SoC interconnect;
- sound from Q (Q is brought out as a pin);
- a cycle-accurate CDP1861;
- the CDP1852 I/O port chip.

## Simulation

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and contains a watchdog. With
Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_elf1802_top \
    -y rtl -y tb rtl/cdp1802_pkg.sv tb/tb_elf1802_top.sv
./obj_dir/Vtb_elf1802_top
```

Replace the testbench name to run the others:

| testbench | what it checks |
|---|---|
| `tb_cdp1802_cpu` | Random programs run in lockstep with an instruction-level 1802 model written in the testbench: all registers and flags at every fetch, and memory at the end. Also checked: random DMA-IN/DMA-OUT/interrupt requests, IDL, the priority of each next machine cycle, 8/12/4 clocks per instruction/Cx/DMA-or-interrupt, and the PAUSE, RESET and LOAD modes (about 78,000 checks). |
| `tb_alu1802` | Every operation, operand pair, DF and carry mode (exhaustive). |
| `tb_ram_dp` | Random traffic on both ports against a shadow array. |
| `tb_host_ctrl` | Address decode, and the LOAD/RUN/RESET sequencing. |
| `tb_framebuffer` | Every pixel after random byte writes. |
| `tb_vga_display` | Two full frames, pixel by pixel, including sync and blanking positions. |
| `tb_display_dma` | The handshake against a machine-cycle stand-in for the core: on/off, interrupt release, the exact delay, and exactly 256 DMA cycles to the right addresses, over three frames. |
| `tb_hex7seg` | All sixteen digits. |
| `tb_elf1802_top` | The whole system at its default sizes (see below). |
| `tb_workload_test_programs` | Two bring-up programs run on the whole system through the host port (load, run, stop, read back). One is an LDN test (`A1 01 11 51 00`, leaves A1 at address 1). The other is an LDX test (`A1 F0 51 00`, leaves 51 at address 0). Also checked: D, R1, the hex display and the clocks to IDL. |

`tb_elf1802_top` runs the system at full size. It takes about two seconds
of wall time. The host loads a program, reads part of it back and starts
the core. The program does the following:

- turns the display on;
- draws a 256-byte picture;
- does arithmetic with a carry and a rotate;
- sends the result out with OUT;
- waits on EF1;
- takes a long branch into an IDL loop.

A frame interrupt routine feeds the display, and the second VGA frame is
compared pixel by pixel with the picture. The testbench also injects one
external DMA-IN, then stops and resets the core through the host port. It
counts each mechanism and fails if any never happened:

- interrupt;
- DMA-OUT;
- DMA-IN;
- IDL wake-up;
- OUT and INP;
- EF branch;
- long branch;
- Q;
- LOAD stop;
- RESET.

## Limits worth knowing

- A 1802 program must not use addresses 0x010 and 0x014 for data that the
  host writes. The core itself can still read and write them.
- With the display on, the interrupt routine must restore everything it
  uses and return within a frame. It must also keep R(0) on the picture
  until the transfer is done. Programs written for a real CDP1861, whose
  routine reloads R(0) on every scan line, will not display correctly
  without changes.
- The design has one clock domain. The VGA pixel rate is an enable, not a
  second clock.
