# i281e: a single-cycle 8-bit teaching CPU in SystemVerilog

The i281e extends the i281, a small CPU used to teach digital logic. Every
instruction is 16 bits wide. Every instruction is fetched, decoded and completed
in one clock cycle, so each control signal in the machine has one fixed value
for the whole instruction. Students can watch those values on LEDs. The i281e
keeps the i281's single-cycle data path and its nineteen numbered control
signals, C0 to C18. It then enlarges the memories and adds what a machine needs
to load its own programs:

- a 128-word boot ROM;
- 32 K words of code RAM and 32 KB of data RAM, each reached through 256 banks;
- instructions that write code memory from a register pair (`CACHE`, `WRITE`);
- a NOR-based ALU that can build any logic function;
- signed and unsigned conditional branches on four flags.

This RTL describes that CPU as synchronous logic. It runs from a 1.8432 MHz
oscillator, and a clock enable sets the instruction rate.

## One instruction, one cycle

```
            +-----------+  isr[15:8]  +---------------+  C0..C18
   PC ----->| code      |------------>| control table |----------> every block
   ^        | memory    |  isr[7:0] = imm               ^ flags
   |        +-----------+      |                        |
   |                           v                        |
   |  reg port0 ------------------------> ALU A    +-------+
   |  reg port1 --+--[C11: port1 | imm]-> ALU B -->| flags |  (C14)
   |              |                         |       +-------+
   |              |            [C15: ALU result | imm] = "C15 out"
   |              |                  |      |      |
   |              |       data addr  |  code select|  PC offset (C2)
   |              +--[C16: port1 | switches]--> data in, code-word low byte
   |                                            |
   +-- PC+1 or PC+1+C15out (C2)   [C18: C15 out | data out] --> register write (C8,C9,C10)
```

Reading the picture:

- **ALU.** Register read port 0 always drives ALU input A. Input B is register
  port 1 or the immediate byte, chosen by C11.
- **C15 out.** The C15 mux picks the ALU result or the immediate. Its output is
  the busiest net in the machine. It is the data-memory address. It is the code
  memory's write address and the value loaded into the bank register. It is also
  the branch offset.
- **Memory inputs.** The C16 mux picks register port 1 or the low byte of the
  switches. Its output is the data written to data memory. It is also the low
  byte of a word written to code memory.
- **Register write.** The C18 mux picks C15 out or the data-memory output. The
  result is written to the register chosen by C8,C9 when C10 is set.
- **Next PC.** Normally the PC steps to PC + 1. When C2 is set it goes to
  PC + 1 + C15 out, with C15 out read as a signed byte. For example, `JUMP` with
  operand 0x0B at PC 0x00 goes to 0x0C.

Because the memories are read combinationally, a `LOAD` delivers its byte and
writes the register in the same cycle. All state changes together on the next
enabled clock edge: PC, registers, flags, bank register, CACHE and both memory
writes.

## Instruction encoding

`[15:12]` group · `[11:10]` register X · `[9:8]` register Y or sub-function ·
`[7:0]` immediate. The registers are A = 0, B = 1, C = 2, D = 3. Only the opcode
byte reaches the control table, and the immediate never affects a control
signal.

| group | instructions | effect |
|---|---|---|
| 0 | `BANK X+imm` | bank register ← X + imm |
| 1 | `INPUTC [imm]`, `INPUTCF [X+imm]` | code[addr] ← 16 switches |
|   | `INPUTD [imm]`, `INPUTDF [X+imm]` | data[addr] ← switches[7:0] |
|   | `CACHE A` (0x14) | CACHE ← A |
|   | `WRITE [X+imm],A` (0x16/1A/1E) | code[X+imm] ← {CACHE, A} |
| 2 | `MOV X,Y` (X = Y is a no-op) | X ← Y + imm; the assembler emits imm = 0 |
| 3 | `LOADI X,imm` | X ← imm |
| 4/5 | `ADD X,Y` / `ADDI X,imm` | X ← X + Y or X + imm, flags |
| 6/7 | `SUB X,Y` / `SUBI X,imm` | X ← X − Y or X − imm, flags |
| 8/9 | `LOAD X,[imm]` / `LOADF X,[Y+imm]` | X ← data[...] |
| A/B | `STORE [imm],X` / `STOREF [Y+imm],X` | data[...] ← X |
| C | `NORI X,imm` (Y=0), `SHIFTR X` (Y=1) | flags |
| D | `CMP X,Y` | flags of X − Y |
| E | `NOR X,Y` | X ← ~(X \| Y), flags |
| F | branches F0–FD, `JUMPR C+imm` (FE), `JUMP imm` (FF) | see below |

`SHIFTL X` is written as `ADD X,X`. `NOOP` is `MOV A,A`. Opcodes not listed do
nothing. The i281e opcode map is not binary-compatible with the i281's: `NOOP`,
`SHIFTL`, `JUMP` and the branches moved. Programs for the i281 must therefore be
reassembled.

## The control word

| signal | role | signal | role |
|---|---|---|---|
| C0 | load bank register from C15 out | C11 | ALU B = immediate |
| C1 | write code memory | C12,C13 | ALU operation |
| C2 | take branch | C14 | write flags |
| C3 | code word = {CACHE, data}; without C1: load CACHE | C15 | C15 out = immediate |
| C4,C5 | read port 0 register | C16 | data in = switches |
| C6,C7 | read port 1 register | C17 | write data memory |
| C8,C9 | write register | C18 | register input = data memory |
| C10 | write register enable | | |

`i281e_pkg::ctrl_t` packs these with C0 as the most significant bit. A `JUMP`
therefore decodes to `0010 00 00 00 0 0 00 0 1000`: only C2 and C15 are set.

## ALU, flags and branches

The ALU is built in the NOR style: a NOR stage feeds a shifter, and an
adder/subtractor runs alongside.

| C12,C13 | result | carry | overflow |
|---|---|---|---|
| 00 | NOR of A and B | 0 | 0 |
| 01 | A >> 1, logical | bit shifted out (A[0]) | 0 |
| 10 | A + B | carry out | signed overflow |
| 11 | A − B (A + ~B + 1) | carry out: 1 = no borrow | signed overflow |

Negative is bit 7 of the result. Zero means the result is 0. Flags are held as
C O N Z and are written by `ADD`, `ADDI`, `SUB`, `SUBI`, `CMP`, `NOR`, `NORI` and
`SHIFTR`.

Carry after a subtraction means "no borrow", so the unsigned branches read it
directly. After `CMP X,Y`:

| op | branch | taken when | op | branch | taken when |
|---|---|---|---|---|---|
| F0 | BRC / BRAE | C (X ≥ Y unsigned) | F8 | BRA | C ∧ ¬Z |
| F1 | BRNC / BRB | ¬C | F9 | BRBE | ¬C ∨ Z |
| F2 | BRO | O | FA | BRG | ¬Z ∧ N = O |
| F3 | BRNO | ¬O | FB | BRGE | N = O |
| F4 | BRN | N | FC | BRL | N ≠ O |
| F5 | BRNN / BRP | ¬N | FD | BRLE | Z ∨ N ≠ O |
| F6 | BRZ / BRE | Z | FE | JUMPR C+imm | always, offset C + imm |
| F7 | BRNZ / BRNE | ¬Z | FF | JUMP imm | always |

`JUMPR` adds C and the immediate in the ALU. The sum goes through the C15 mux
into the branch adder, so it is a computed jump relative to PC + 1 and needs no
extra hardware.

## Memory map and banking

The PC and every memory address are 8 bits wide. One 8-bit bank register,
loaded by `BANK X+imm`, extends both memories:

- **Code, 0x00–0x7F:** the boot ROM, 128 × 16. Writes to this range are ignored.
- **Code, 0x80–0xFF:** RAM word `{bank, addr[6:0]}`. There are 256 banks of 128
  words, 32 K words in all.
- **Data, 0x00–0xFF:** RAM byte `{bank, addr[6:0]}`. There are 256 banks of 128
  bytes, 32 KB in all. Address bit 7 is not decoded, so 0x80–0xFF mirrors
  0x00–0x7F.

Changing the bank changes the code window immediately. Code running from
0x80–0xFF should therefore switch banks only by way of the ROM, as the boot code
does.

## Loading programs: CACHE and WRITE

A 16-bit code word cannot pass through the 8-bit data path in one go, so the
code-writeback block keeps an 8-bit CACHE register. `CACHE A` stores the high
byte. `WRITE [X+imm],A` then writes `{CACHE, A}` to code address X + imm. This
lets boot code copy a program byte by byte from data memory, or from any other
source, into code RAM and then jump to it. `INPUTC` and `INPUTCF` instead write
the 16 front-panel switches directly, for entering a program by hand.

## Clock and stepping

`i281e_clock` turns the oscillator into `cpu_en`:

- **Run mode:** one pulse every 2^div_sel oscillator cycles for div_sel 0–14,
  which is 1.8432 MHz down to about 112 Hz. div_sel = 15 gives 1 Hz.
- **Step mode** (`run` = 0): each press of `step` gives exactly one pulse. The
  button is synchronised and edge-detected.

Every register in the CPU is clocked by the oscillator and updates only when
`cpu_en` is high. One pulse therefore executes exactly one instruction.

## Modules

| file | block |
|---|---|
| `i281e_pkg.sv` | control-word struct, ALU op and group enums, flags struct, debug struct |
| `i281e_cpu.sv` | top level; ports `clk`, `rst_n`, `switches[15:0]`, `run`, `step`, `div_sel[3:0]`, `dbg` |
| `i281e_control.sv` | control table (opcode and flags → C0..C18) |
| `i281e_pc.sv` | PC register, incrementer, branch adder, C2 mux |
| `i281e_regfile.sv` | registers A–D, two read ports, one write port |
| `i281e_alu.sv` | NOR / shift-right / add / subtract, flag outputs |
| `i281e_flags.sv` | C O N Z register |
| `i281e_mux2.sv` | 8-bit 2-to-1 mux (C11, C15, C16, C18, C2) |
| `i281e_code_memory.sv` | boot ROM + banked code RAM + bank register |
| `i281e_boot_rom.sv` | 128 × 16 ROM, image from `rtl/i281e_bios.hex` |
| `i281e_code_writeback.sv` | CACHE register and code-word source select |
| `i281e_data_memory.sv` | banked data RAM |
| `i281e_clock.sv` | oscillator → CPU clock enable, run or step |

The `dbg` output carries the values a front panel would show on LEDs: PC and
next PC, the instruction, the control word, the four registers, both read
ports, ALU input B and its result, the flags, the outputs of C15, C16 and C18,
the data-memory output, the bank and CACHE.

### The boot ROM image

`rtl/i281e_bios.hex` holds one 16-bit word per line. It is a 95-word self-check
program, not a real BIOS. It does the following:

- runs each instruction group at least once;
- tests every branch condition and jumps to a failure path on a wrong outcome;
- sums 1..10 in a loop;
- uses `INPUTD` and `INPUTDF` to read the switches into data memory;
- shows that data in bank 0 and bank 1 is separate;
- builds a four-word routine in code RAM with `CACHE`, `WRITE`, `INPUTC` and
  `INPUTCF`, jumps to it and returns;
- tests `JUMPR`.

It finishes by storing 0xA5 at data address 0x7F (0xBA on failure) and then
spins on `JUMP` to itself. The routine in code RAM includes one word taken from
the switches, so the testbench sets them to 0x5802, which is `ADDI C,2`. To boot
other code, give `BIOS_FILE` another image, or change the file.

## Simulating

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
The file paths inside are relative to the directory that holds `rtl/` and
`tb/`, so run from there:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb rtl/i281e_pkg.sv \
          tb/tb_i281e_cpu.sv --top-module tb_i281e_cpu -o sim && ./obj_dir/sim
```

To run a block testbench, swap in `tb/tb_i281e_<block>.sv` and its module name.

- **`tb_i281e_cpu`** runs the whole CPU at its default sizes, which are 32 K words
  of code RAM and 32 KB of data RAM. An instruction-level model of the
  instruction set, written separately from the RTL, executes the same ROM image
  alongside it. Before every instruction the testbench compares PC, registers,
  flags, bank and CACHE with the model. At the end it compares all data memory
  the model wrote, plus a list of hand-worked results.
- **Clock rate.** The same testbench single-steps five instructions, then runs at
  one instruction per four oscillator cycles, then at one per cycle. It checks
  that the interval between instructions is exactly that.
- **Mechanisms.** It counts how often each mechanism happens: every opcode group,
  branches taken and not taken, bank switching, execution from code RAM, code
  writes from the switches and from CACHE, and single steps. A mechanism that
  never happens counts as a failure. It runs in well under a minute.
- **`tb_i281e_loader`** boots a 13-word loader from `tb/tb_i281e_loader_bios.hex`
  instead of the self-check image. The loader reads a byte stream through the
  switches with `INPUTD`: first the word count, then the high and low byte of
  each word. It builds each word with `CACHE` and `WRITE` into code RAM from
  0x80 up, then jumps there. The testbench feeds the stream one byte per
  `INPUTD`. The program it delivers is a bubble sort of eight signed bytes. The
  testbench checks the loaded code, the sorted array against its own sort, and
  one instruction per clock: 763 instructions in 763 cycles.
- **Block testbenches.** `tb_i281e_alu` is exhaustive over all operand pairs and
  operations. `tb_i281e_control` checks full control words for representative
  opcodes. It also checks every branch condition against the comparison it
  names, on random operand pairs. The memory, register, PC, flag, writeback and
  clock testbenches compare against shadow models under random stimulus.

The simulator this was checked with has no X state. Registers that software
reads are reset. The RAMs are not, so a program must write data before reading
it.

## What is this implementation's own

The instruction set, the control-signal numbering and roles, the memory sizes
and bank counts, the ALU structure, the flag set and the relative branch target
come from the i281e design. The following were not specified and were chosen
here. Each one is also noted in the header of the file concerned.

- **Control table.** Only the `JUMP` row was available. Every other row was
  derived from what the instructions do.
- **`MOV`** passes the source through the adder with the immediate, so it needs
  a zero operand.
- **`JUMPR`** is a computed relative jump, as described above.
- **Flags.** Which instructions write them was chosen. `NOR` leaves carry 0, and
  the right shift is logical.
- **C3** both selects the code-word source and, without C1, loads CACHE.
- **Memory map:** ROM at the bottom half, the RAM window at the top, one bank
  register shared by code and data, data address bit 7 undecoded.
- **8-bit PC**, starting at 0 after reset, and an asynchronous active-low reset
  for all control state.
- **Clock:** the divider table, and using a clock enable rather than a divided
  clock.
- **Boot ROM:** the self-check program is original to this RTL; the real BIOS is
  not reproduced.

## Not included

- **Peripherals.** The boards also carry a video card with a seven-segment and
  character display, a compact-flash "hard disk", a UART serial port and a small
  S-100-style expansion bus. How the CPU addresses these is not specified, so
  none of them is modelled.
- **DOS/281.** The disk operating system is about 5 KB. It would fit in the
  memories, but it needs the compact flash and serial hardware.
- **Board hardware.** The LED panels, switches, connectors and power circuitry
  are outside the logic. Their signals are the top's ports.
