# i281e: an 8-bit single-cycle teaching CPU with a front panel

The i281 is a small teaching processor used in an introductory digital logic course. It has:

- four 8-bit registers,
- a 16-bit instruction word,
- one instruction per clock,
- eight seven-segment displays mapped into data memory.

The i281e is a physical, chip-by-chip build of that processor, extended into a small computer:

- a 128-word boot ROM;
- 32 K words of banked code RAM, loaded either by a program or by hand;
- 32 KB of banked data memory;
- a front panel with run/halt, single step, a 12-position clock-rate switch, and *Examine*/*Deposit* switches for inspecting and entering memory.

This repository holds synthesizable SystemVerilog for that machine. It models the whole CPU, its memories, the display card, the clock board and the front-panel debug logic. It also includes self-checking testbenches for every block and for the complete machine.

The hardest parts to follow are:

- how code RAM is written at all in a single-cycle machine with single-ported RAM (see [Code memory](#code-memory-rom-banked-ram-and-the-read-only-rule));
- how the front panel works by *mocking instructions* on the instruction bus (see [Front panel](#front-panel-examine-and-deposit-by-mocked-instructions)).

## The machine at a glance

| Item | Value |
|---|---|
| Data width | 8 bits; registers A, B, C, D |
| Instruction | 16 bits: `[15:12]` opcode, `[11:10]` X register, `[9:8]` Y register, `[7:0]` immediate/offset |
| PC | 8 bits; 0x00-0x7F is the boot ROM, 0x80-0xFF is a 128-word window of code RAM |
| Code RAM | 32768 words = 256 banks × 128 words |
| Data memory | 32768 bytes; 0x00-0x7F is fixed, 0x80-0xFF is a 128-byte banked window |
| Displays | data addresses 0-7, written through to an 8-bit segment register each |
| Flags | Z (bit 0), N (bit 1), O (bit 2), C (bit 3) |
| Clock | 4 MHz oscillator divided down to 2 MHz … 0.95 Hz, or single step |

## Instruction set

Every instruction completes in one enabled clock. `R[X]` is the register named by bits 11:10, and `imm` is bits 7:0. Jumps and branches are relative: `PC <- PC + 1 + imm`, with `imm` as a two's-complement offset.

| Opcode | Mnemonic | Operation | Flags |
|---|---|---|---|
| 0 | NOOP | — | |
| 1, Y=00 | INPUTC imm | CMEM[imm] <- write-back word (normally the 16 switches) | |
| 1, Y=01 | INPUTCF X, imm | CMEM[R[X]+imm] <- write-back word | |
| 1, Y=10 | INPUTD imm | DMEM[imm] <- switches[7:0] | |
| 1, Y=11 | INPUTDF X, imm | DMEM[R[X]+imm] <- switches[7:0] | |
| 2 | MOVE X, Y | R[X] <- R[Y] (+imm, 0 in normal use) | |
| 3 | LOADI X, imm | R[X] <- imm | |
| 4 / 6 | ADD / SUB X, Y | R[X] <- R[X] ± R[Y] | ZNOC |
| 5 / 7 | ADDI / SUBI X, imm | R[X] <- R[X] ± imm | ZNOC |
| 8 | LOAD X, imm | R[X] <- DMEM[imm] | |
| 9 | LOADF X, Y, imm | R[X] <- DMEM[R[Y]+imm] | |
| A | STORE imm, X | DMEM[imm] <- R[X] | |
| B | STOREF Y, imm, X | DMEM[R[Y]+imm] <- R[X] | |
| C, bit 8=0/1 | SHIFTL / SHIFTR X | R[X] shifted one place (logical) | ZNC, O=0 |
| D | CMP X, Y | flags of R[X] − R[Y] | ZNOC |
| E | JUMP imm | PC <- PC+1+imm | |
| F | BRZ BRNZ BRG BRGE BRC BRNC BRO BRNO BRN BRNN | taken on Z, !Z, (!Z & N==O), N==O, C, !C, O, !O, N, !N; condition code = bits 11:8 = 0…9 | |

Flag details:

- Subtraction is A + ~B + 1, so C = 1 means "no borrow".
- Overflow is the carry into bit 7 XOR the carry out of bit 7.

The operations, the flag layout, the control-line numbering and the bus connections follow the i281e. The opcode numbers, the sub-encodings in bits 11:8, and the signed reading of BRG/BRGE are this implementation's choices. They live in one place, `rtl/i281e_pkg.sv` and `rtl/i281e_opcode_decoder.sv`, and changing them touches only those files and the test assembler `tb/i281e_asm_pkg.sv`.

## The single-cycle datapath

The datapath is a straight line from the PC to the register file, steered by eighteen control lines c1…c18. In the RTL they are the fields of the `ctrl_t` struct:

- c1: code-memory write
- c2: PC mux
- c3: PC write
- c4–c9: register selects
- c10: register write
- c11: ALU B source
- c12, c13: ALU select (shift-left, shift-right, add, subtract)
- c14: flag write
- c15: result mux
- c16: data-in mux
- c17: data-memory write
- c18: write-back mux

The four 2:1 muxes are wired as follows:

| Mux | input 0 | input 1 | output goes to |
|---|---|---|---|
| c11 | register read port 1 | immediate | ALU input B (port 0 is ALU input A) |
| c15 | ALU result | immediate | data-memory address, code-memory write address, c18 input 0 |
| c16 | register read port 1 | switches[7:0] | data-memory (and display) write data |
| c18 | c15 output | data-memory read data | register write data |

The PC offset passes through a "physical" mux: a board jumper choosing between the instruction's low byte (default) and the register write bus. It is the parameter `PC_OFFSET_FROM_REG`.

`i281e_control_table` is the control-line table as combinational logic; on the board it is EEPROM contents. `i281e_opcode_decoder` turns the word into a one-hot operation first.

The ALU is built the way the board builds it:

- an 8-bit shifter and an adder/subtractor feed a result mux;
- the adder is split into a 7-bit low part and the top bit, so the carry into bit 7 is visible for the overflow flag.

`NOR_VARIANT=1` selects an alternative ALU board on which select 00 gives NOR instead of shift-left.

## Code memory: ROM, banked RAM and the read-only rule

Addresses 0x00-0x7F fetch from the boot ROM. Addresses 0x80-0xFF fetch from code RAM at `{bank, addr[6:0]}`, where `bank` is an 8-bit register.

Real RAM chips are single-ported, so a RAM word cannot be fetched and written in the same cycle. The machine therefore has a rule:

- **code RAM is read-only while the PC is in code RAM**;
- INPUTC/INPUTCF writes are honoured only while the PC is in the ROM, or while the front panel owns the instruction bus.

Programs are therefore loaded by ROM code or by hand, then entered by a jump to 0x80. An INPUTC executed from RAM is silently refused.

The **write-back module** lets ROM code copy a 16-bit instruction out of the 8-bit data path into code RAM:

- with the write-back select (active low) asserted, every enabled clock latches register read port 1 as a high byte;
- the code-RAM write data becomes `{latched high byte, read port 1}`;
- with the select released, the write data is the 16 switches.

A copy loop thus reads the high byte into a register and executes an instruction that puts it on port 1 (for example `CMP A,A`) with the select low. It then reads the low byte into A and executes `INPUTCF` with the select low. The end-to-end testbench contains such a loader.

**Data memory:**

- Addresses 0x00-0x7F always reach the first 128 bytes.
- Addresses 0x80-0xFF reach `{data bank, addr[6:0]}`.
- A store to addresses 0-7 also loads that display's segment register.

The display register holds a hex-digit glyph of the low nibble in normal mode, or the raw byte (one bit per segment, bit 7 = decimal point) in game mode. It changes only on such writes.

### Memory controls without an instruction encoding

Three controls exist on the i281e boards, but their drive from the control EEPROM is not defined:

- the code-bank register load (active low);
- the write-back select (active low);
- the data-bank register load.

In this RTL they are the `ext` input of the top and the core. The code bank loads the c15 bus; the data bank loads the c16 bus. A system integrator either drives them from a decoder of unused instruction encodings or, as the testbenches do, from the PC at known addresses.

## Front panel: Examine and Deposit by mocked instructions

The front panel adds no datapath of its own. While the *Examine* or *Deposit* switch is held, the debug module takes over the instruction bus (`bus_released`) and presents a ready-made instruction. Releasing the switch produces exactly one CPU clock, which executes that instruction:

| Switch | Mocked instruction | Effect |
|---|---|---|
| Examine | `JUMP switches[7:0]` | PC <- PC + 1 + switches[7:0] |
| Deposit, code | `INPUTC PC` | CMEM[PC] <- 16 switches, PC + 1 |
| Deposit, data | `INPUTD PC` | DMEM[PC] <- switches[7:0], PC + 1 |

So entering a program by hand works like this:

1. Halt the machine.
2. Examine with offset 0x7F from PC 0, which lands on 0x80.
3. Set each word on the switches and flick Deposit.

Because the bus is released, RAM writes are allowed even when the PC is in RAM.

The clock module produces the CPU clock enable:

- In *run*, the enable comes every 2^k oscillator cycles, per rotary position:

  | Position | 12 | 11 | 10 | 9 | 8 | 7 | 6 | 5 | 4 | 3 | 2 | 1 |
  |---|---|---|---|---|---|---|---|---|---|---|---|---|
  | k | 1 | 2 | 4 | 6 | 7 | 9 | 11 | 14 | 16 | 19 | 21 | 22 |

  That is 2 MHz down to about 0.95 Hz from 4 MHz.
- In *halt*, the enable comes once per rising edge of the step switch, or once per debug-module request.

Switches pass two-flop synchronisers and are assumed debounced.

## Timing and reset

Everything runs on the oscillator clock with a one-cycle clock enable (`cpu_ce`); the board instead gates the CPU clock. Memory reads are combinational, because the machine is single-cycle.

Reset is synchronous, and the reset switch passes a two-flop synchroniser. Reset clears:

- PC, registers and flags;
- both bank registers;
- the write-back byte;
- the displays;
- the clock divider and the switch synchronisers.

RAM writes are blocked while reset is held. RAM contents are not cleared.

## Departures and assumptions

- **Not included.** The UART, the compact-flash interface and the expansion connector are not modelled: their registers and addressing are not defined. The BIOS/monitor software is not included; the ROM accepts any image through `ROM_INIT` (one hex word per line).
- **Own choices.** Opcode numbers and branch sub-codes (see above). Segment bit order and glyph shapes. Logical shift right. Flag behaviour of the NOR variant (C = O = 0). The data-memory bank scheme (low half fixed). Deposit addressing by placing the PC in the mocked instruction.
- **`ext` inputs.** The three memory controls are inputs, as explained above.
- **Clocking.** The clock enable replaces the gated clock. A rotary position outside 1…12 acts as position 1.

## Files

`rtl/` holds one module per file:

| Module | Role |
|---|---|
| `i281e_top` | front panel + clock module + debug module + core |
| `i281e_cpu` | single-cycle core |
| `i281e_pkg` | widths, opcodes, `ctrl_t`, `flags_t`, `ext_ctrl_t` |
| `i281e_opcode_decoder`, `i281e_control_table` | instruction to one-hot operation to c1…c18 |
| `i281e_regfile`, `i281e_alu`, `i281e_pc`, `i281e_mux2` | datapath |
| `i281e_code_memory`, `i281e_writeback` | ROM, banked code RAM, bank register, write-back word |
| `i281e_data_memory`, `i281e_video_card` | banked data RAM, display registers |
| `i281e_debug_module`, `i281e_clock_module` | front panel |

Parameters on the top and the core:

- `CMEM_RAM_WORDS` (32768)
- `DMEM_DEPTH` (32768)
- `ROM_INIT` ("")
- `NOR_VARIANT` (0)
- `PC_OFFSET_FROM_REG` (0)

## Verification

Each testbench in `tb/` is self-checking and prints `TB_RESULT checks=N failures=M`. Each has a watchdog.

- **`tb_i281e_top`** is the whole machine at its default sizes, operated through the front panel. It checks, in order:
  - Examine and Deposit a bubble-sort program and eight data bytes;
  - single-step, then run at 2 MHz;
  - the sorted memory and the hex displays;
  - Deposit a second program as byte pairs, reset, and let a ROM loader copy it into code bank 1 with the write-back module;
  - run at 1 MHz through an ALU flag test, a data-bank test, a game-mode display write and a refused RAM write.

  Enable rates are measured against the rotary position. A monitor counts each mechanism (taken and not-taken branches, overflow, carry, display writes in both modes, code writes and refusals, write-back, both bank loads, Examine, Deposit, single step, run) and fails on any that never occurred.
- **`tb_i281e_cpu`** compares the core cycle by cycle with an instruction-level model written in the testbench:
  1. a directed program with hand-checked results;
  2. every code-RAM bank and data-RAM bank filled with random words through mocked instructions;
  3. 300 000 cycles of random code with random clock enables, mocked instructions, switches, memory controls and resets;
  4. a full comparison of both RAMs.
- **Unit testbenches** cover each block against reference models:
  - the ALU: directed and random cases against integer arithmetic;
  - the opcode decoder: all 65536 words;
  - the control table: line by line per operation;
  - the clock module: enable periods for all twelve positions.

  `tb/i281e_asm_pkg.sv` is a small assembler (one function per mnemonic) shared by the testbenches.

To simulate with Verilator (5.x), for example the whole machine, run from the repository root:

```
verilator --binary --timing -Wno-fatal -y rtl +libext+.sv --top-module tb_i281e_top \
  rtl/i281e_pkg.sv tb/i281e_asm_pkg.sv tb/tb_i281e_top.sv -o sim
./obj_dir/sim
```

`-y rtl` lets Verilator find the modules by name. The package files go first because the modules import them. Replace the top module and the last file to run another testbench; the unit testbenches that do not use the assembler need only `rtl/i281e_pkg.sv`. Run from the root, since `tb_i281e_code_memory` reads `tb/i281e_rom_pattern.hex`. `-Wno-fatal` keeps lint warnings from stopping the build. The remaining warnings are unused package constants, and a few outputs of the unit blocks that the core does not consume.
