# i281: an 8-bit teaching CPU in single-cycle SystemVerilog

The i281 is a small processor built for teaching. Every part of it can be
watched while it runs, and it finishes each instruction in one clock. It has:

- four 8-bit registers (A, B, C, D);
- 16-bit instructions;
- an 8-bit ALU that can shift, add and subtract, with carry, overflow,
  negative and zero flags;
- a byte-wide data memory, whose first eight bytes also appear on eight
  7-segment displays.

This RTL describes the version meant to be built from discrete 74-series
chips rather than an FPGA. That version differs from the original teaching
model in three ways:

1. **The code memory is split into a boot ROM and a user RAM.** Real RAM chips
   cannot be read and written in the same cycle. So the RAM is read-only
   while the program in it is running. Only the boot program in ROM (the
   "BIOS") may fill it.
2. **A front panel drives the machine.** It can run, halt, single-step,
   examine and deposit. Examine and deposit work by putting a fake
   instruction on the instruction bus for one cycle, so the panel adds almost
   no datapath hardware.
3. **The program counter is 8 bits wide**, not 6. It addresses 256 code words.

All the blocks sit under `i281_top` (`rtl/i281_top.sv`). Each RTL file begins
with a comment that gives its timing and interface.

## Instruction word and operations

```
 15      12 11  10 9   8 7                 0
+----------+------+------+-------------------+
|  opcode  |  X   |  Y   |     immediate     |
+----------+------+------+-------------------+
```

- X and Y name registers: 00 = A, 01 = B, 10 = C, 11 = D.
- In three opcode groups, the Y field instead picks one of several operations.
- The immediate is an 8-bit constant, address or PC offset.
- Twenty-three operations are decoded in all.

| opcode | [9:8] | operation | effect |
|---|---|---|---|
| 0 | – | NOOP | PC+1 |
| 1 | 00 | INPUTC  | code[imm] ← switches[15:0] |
| 1 | 01 | INPUTCF | code[X+imm] ← switches[15:0] |
| 1 | 10 | INPUTD  | data[imm] ← switches[7:0] |
| 1 | 11 | INPUTDF | data[X+imm] ← switches[7:0] |
| 2 | Y | MOVE   | X ← Y + imm (flags unchanged) |
| 3 | – | LOADI/LOADP | X ← imm |
| 4 | Y | ADD   | X ← X + Y, flags |
| 5 | – | ADDI  | X ← X + imm, flags |
| 6 | Y | SUB   | X ← X − Y, flags |
| 7 | – | SUBI  | X ← X − imm, flags |
| 8 | – | LOAD  | X ← data[imm] |
| 9 | Y | LOADF | X ← data[Y+imm] |
| A | – | STORE | data[imm] ← X |
| B | Y | STOREF | data[Y+imm] ← X |
| C | x0 | SHIFTL | X ← X << 1, flags |
| C | x1 | SHIFTR | X ← X >> 1 (logical), flags |
| D | Y | CMP   | flags of X − Y |
| E | – | JUMP  | PC ← PC+1+imm |
| F | 00 | BRE/BRZ  | if Z: PC ← PC+1+imm |
| F | 01 | BRNE/BRNZ | if !Z |
| F | 10 | BRG  | if !Z and N = O (signed X > Y after CMP) |
| F | 11 | BRGE | if N = O (signed X ≥ Y) |

Opcodes are numbered in the order the operations appear in the control-line
table. The four branch conditions are this design's choice. They are the
usual signed tests after a CMP.

## Control lines c1–c18

`opcode_decoder` turns the instruction into a one-hot vector of 23
operations:

- a 4-to-16 decode of bits 15:12;
- three small sub-decoders on bits 9:8, for the INPUT, SHIFT and BRANCH
  groups.

`control_table` then maps each operation, together with the X/Y fields and
the flags, to eighteen control lines. The package `i281_pkg` gathers these
lines in the `ctrl_t` struct, with c1 as its most significant bit.

| line | name | 0 | 1 |
|---|---|---|---|
| c1 | INMEM_WRITE_ENABLE | – | write code memory |
| c2 | PROGRAM_COUNTER_MUX | PC+1 | PC+1+imm |
| c3 | PROGRAM_COUNTER_WRITE_ENABLE | hold | load (set for every operation) |
| c4,c5 | register port 0 select | | |
| c6,c7 | register port 1 select | | |
| c8,c9 | register write select | | |
| c10 | REGISTERS_WRITE_ENABLE | | |
| c11 | ALU_SOURCE_MUX | port 1 | immediate |
| c12,c13 | ALU_SELECT1/0 | 00 SHL, 01 SHR | 10 ADD, 11 SUB |
| c14 | FLAGS_WRITE_ENABLE | | |
| c15 | ALU_RESULT_MUX | ALU result | immediate |
| c16 | DMEM_INPUT_MUX | port 1 | switches[7:0] |
| c17 | DMEM_WRITE_ENABLE | | |
| c18 | REG_WRITEBACK_MUX | c15 output | data memory |

The output of the c15 multiplexer is the "address/value" bus. It feeds:

- the data-memory address (low 7 bits);
- the code-memory write address;
- input 0 of the write-back multiplexer.

Because of this, indexed operations such as LOADF, STOREF, INPUTCF and
INPUTDF compute their address in the ALU as register + immediate, with c11
selecting the immediate and the ALU set to ADD. Direct operations such as
LOAD, STORE, INPUTC, INPUTD and LOADI put the immediate straight onto that
bus with c15.

In the original design this table was a sum-of-products circuit. In the chip
version it is an EPROM. Here it is a `case` statement with the same contents.

## ALU and flags

`alu` contains:

- `alu_shifter`: one-place logical shift. Left when ALU_SELECT0 = 0. A zero
  fills the empty bit.
- `alu_addsub`: an adder whose Y input passes through XOR gates driven by
  ALU_SELECT0. The same line is the carry-in, so SUB computes X + ~Y + 1.
- Multiplexers on ALU_SELECT1 that choose:
  - the result: shifter or adder;
  - the carry flag: the shifted-out bit or the adder's carry out;
  - the overflow flag: 0 for shifts, or the adder's overflow.
- The zero flag (NOR of the result) and the negative flag (result bit 7).
- A 4-bit flag register, loaded when c14 is 1:
  F3 = carry, F2 = overflow, F1 = negative, F0 = zero.

Overflow is the XOR of the carries into and out of bit 7 (c7 ⊕ c8).

- An earlier breadboard version used the sum bit S7 in place of c7, which is
  wrong. The chip build later fixed this with an extra adder stage.
- Here the adder is one `+`, and c7 is recovered as S7 ⊕ X7 ⊕ Y7'.
  This is the same function.

After SUB or CMP, the carry flag is the adder's carry out, so C = 1 means
"no borrow".

## Program counter

- `pc_update_logic` has two adders: PC + 1, and (PC + 1) + immediate.
- Line c2 chooses between them. The immediate is treated as a signed
  two's-complement offset, and the sum wraps modulo 256.
- `program_counter` loads the chosen value when c3 is 1.
- Reset sets the PC to 0, the first word of the boot ROM.

The original teaching model had a 6-bit PC. This version widens it to 8 bits,
because the adder and multiplexer chips are 4 bits wide anyway.

## Code memory: BOOT and RUN

This is the part that differs most from a textbook single-cycle CPU.

`code_memory` holds 16-bit words in two regions:

| PC range | region | written by |
|---|---|---|
| 0x00–0x7F | ROM, 128 words (the BIOS) | the EPROM programmer port (`rom_prog_*`) only |
| 0x80–0xFF | RAM, 128 words (user program) | INPUTC / INPUTCF (c1), or a panel deposit |

- **BOOT mode** is simply "the PC is in the ROM". The `boot_mode` output shows
  it.
- While in BOOT mode, the loader runs from ROM and may write the RAM freely:
  the RAM is not being read for instructions at that moment.
- Once the loader jumps to 0x80 or above, the machine is in **RUN mode**, and
  the RAM becomes read-only.
- A write attempted in RUN mode does nothing and raises `inmem_write_blocked`
  for that cycle. The rest of the instruction still executes, and the PC
  advances.
- One exception: when the front panel supplies the instruction (a deposit),
  the RAM is again not supplying one, so the write is allowed even when the
  PC is in RAM. This is how a user types a program into RAM by hand.

Other behaviour:

- ROM writes by INPUTC are always ignored.
- Reads are combinational. Writes happen on the clock edge of the cycle that
  executes the instruction.
- A fetch from an address with no memory reads as NOOP. This cannot happen
  at the default sizes.

`ROM_WORDS` and `RAM_WORDS` are parameters; both default to 128. The original
model split 128 words into two halves. The chip version enlarged both
memories without stating a size, so here the two halves fill the 8-bit
address space.

A program can reach RAM in two ways:

1. A loader in ROM copies it. For example, a loop of INPUTCF with an index
   register copies words presented on the switches, then jumps to 0x80.
   `tb_i281_top` contains such a loader.
2. The user deposits it word by word from the panel.

## Front panel and debug operations

`user_panel` takes the raw switches and turns them into three things:

- the CPU's clock enable, `cpu_en`;
- the reset;
- for one cycle at a time, a mock instruction that replaces the one read
  from code memory.

All switches go through a two-flip-flop synchroniser. The strobe switches act
on their rising edge. The switches are assumed to be debounced already.

| switch | action |
|---|---|
| run | 1 = Run: the CPU advances on every tick of the clock module. 0 = Halt. |
| reset | returns the machine to the boot state: PC = 0, registers, flags and display bytes cleared. The data memory is not cleared. |
| game mode | display format, passed to the video card |
| single step | halted only: one cycle on the instruction at the PC |
| examine | halted only: one cycle on a mock `JUMP sw[7:0]`, giving PC ← PC + 1 + sw[7:0]. Nothing else changes. |
| deposit | halted only: one cycle on a mock `INPUTC PC` (code/data = 0) or `INPUTD PC` (code/data = 1). The switches are stored at the address in the PC, and the PC advances by one. |
| code/data | chooses what deposit writes |

Used together, examine moves to an address and deposit fills words
from there on. Each mock instruction goes through the normal decoder and
datapath. The only extra hardware is the multiplexer on the instruction bus,
in `code_memory`, controlled by `inject_valid`.

Timing: a strobe produces exactly one `cpu_en` cycle, two to three clocks
after its edge. While running, `cpu_en` equals the clock module's tick.

## Clock module

`clock_module` counts the 2 MHz oscillator in a 12-bit divider. A
5-position rotary switch (`speed_sel`) picks one divider stage, and the CPU
executes one instruction each time that stage wraps:

| speed_sel | instruction rate |
|---|---|
| 0 | 1 MHz |
| 1 | 500 kHz |
| 2 | 250 kHz |
| 3 | 7.8 kHz |
| 4 | 488 Hz |

The output is a one-clock enable, not a divided clock, so the whole CPU stays
on one clock. The slowest stages are for watching the machine run.

The rotary switch only governs user programs. While the PC is in the boot
ROM, the `fast` input (driven by `boot_mode`) forces the 1 MHz stage, so a
loader never crawls at a viewing speed. Single step and examine/deposit
still work one cycle at a time in either mode.

## Data memory and video card

`data_memory` holds 128 bytes. It is read combinationally and written on the
clock edge when c17 is 1.

`video_card` watches the same write port. A write to addresses 0–7 is also
stored in the card's own eight registers, so a digit changes only when its
byte is written. Each register drives one display, in one of two formats:

- **Hex mode** (game mode off): the low nibble is shown as a hexadecimal
  digit.
- **Game mode**: bit 0 lights segment a, through bit 6 for segment g, and
  bit 7 lights the decimal point. This lets programs draw patterns, for
  example a Pong ball.

`seg[i]` is `{dp,g,f,e,d,c,b,a}`, where 1 means lit.

## Top-level ports

- **Inputs:** the 2 MHz clock, the 16-bit switch register, the panel
  switches, `speed_sel`, and the ROM programming port.
- **Outputs:** everything the front LEDs display:
  - PC, instruction, registers, flags and ALU result;
  - all 18 control lines;
  - BOOT/RUN mode and run/halt;
  - `cpu_en` and `inmem_write_blocked`;
  - the video bytes and their segment patterns.

Power, LED drivers, control-line buffers and ribbon-cable buses have no logic
function and are not modelled.

## Simulating

Verilator 5 with timing support:

```
verilator --binary --timing --assert rtl/i281_pkg.sv \
    $(ls rtl/*.sv | grep -v i281_pkg) tb/tb_i281_top.sv --top-module tb_i281_top
./obj_dir/Vtb_i281_top
```

Every block has its own testbench `tb/tb_<block>.sv`, run the same way.
Each one prints `TB_RESULT checks=N failures=M`.

- The unit testbenches cover the arithmetic blocks exhaustively:
  - `alu_addsub` and `pc_update_logic`: all 2^17 input combinations;
  - `alu_shifter`: all inputs.
- The other unit testbenches compare against independent models under
  random stimulus.
- `tb_i281_top` runs the whole machine at its default sizes, in lock step
  with an instruction-level reference model. It goes through:
  - boot from ROM and loading RAM;
  - the switch into RUN mode and a refused RAM write;
  - all 23 operations;
  - branches both taken and not taken;
  - carry and overflow;
  - halt, single step, examine and both kinds of deposit;
  - both display formats, two clock speeds, the boot program running at
    full speed while the switch is on a slower setting, and reset.

  It counts each of these and fails if any never happens.
- `tb_i281_workload` fills all 128 words of code RAM. A 7-word loader in ROM
  copies the program from the switch register, and the program then runs
  from 0x80 to 0xFF.

To change a size, override the top's parameters: `ROM_WORDS`, `RAM_WORDS`,
`DMEM_BYTES`, `NDIGITS`. Widths are in `i281_pkg`.

## Where this RTL departs from, or fills in, the design

Filled-in choices, because the design does not state them:

- The opcode numbers and the position of the sub-operation bits. A
  program assembled for another i281 tool needs the same numbering to run
  unchanged.
- The branch conditions for BRG and BRGE.
- The code-memory sizes and map: ROM low, RAM high, reset into ROM.
- INPUTD stores the low switch byte. INPUTC uses the c15 bus as its write
  address.
- The panel's polarities, synchronisers, and the PC used as the deposit
  address.
- The video segment order, and reset behaviour in general.

Three control-table entries were also settled by consistency:

- SHIFTR sets ALU_SELECT0 and the flag write, like SHIFTL.
- INPUTD sets c15, c16 and c17.
- INPUTC sets c15, so its immediate is the address.

Deliberate differences from the design:

- The control table is logic, not an EPROM image. It has the same contents.
- The single-step and speed controls gate a clock enable. They do not gate
  the clock itself.
- The design asks only that the boot program run faster than user code.
  Here it always runs at the 1 MHz setting.
- The boot ROM is loaded through a programming port. Its contents, the
  BIOS, are software and are not part of this RTL.

Not built:

- **The "boot hard disk".** This is a separate ROM of example programs,
  chosen by switches SW4–SW0 and copied into RAM at boot. The design does
  not say how the CPU reads it. Programs reach RAM through a loader reading
  the switch register, or through the panel.
