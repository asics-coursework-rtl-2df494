# A microcoded 8-bit CPU on a single data bus

This is a small teaching CPU in which no instruction is wired into logic.
Each instruction is a short micro-program: a list of 24-bit control words,
one per clock. Every word says which unit drives the shared 8-bit data bus
in that cycle, and which register takes the value at the next clock edge.
Adding an instruction only means writing more control words.

The same RTL also holds the finished building blocks of a planned 16-bit
successor: a flag-producing 16-bit ALU and a bank of four 16-bit registers
with two read ports. That CPU was never completed, so these blocks sit next
to the 8-bit CPU in the top level and bring out their own ports.

The two earlier versions of the CPU are built too, and sit in the same top:
a single-accumulator CPU with a 16-bit control word (`shc2_top`), and the
first, simple CPU with three instructions and an 8-byte program ROM
(`shc1_top`). See "The two earlier CPUs" below.

## The machine at a glance

```
                +-------------------- 8-bit data bus ---------------------+
                |              |                  |                       |
        +-------+------+  +----+-------+  +-------+--------+  +-----------+---+
        | cu           |  | memory     |  | alu_block      |  | inputoutput   |
        | IR, uPC,     |  | PC, MAR,   |  | 8 accumulators |  | 8 bidirection-|
        | 3 microcode  |  | 256 B ROM, |  | A..H, ALU,     |  | al 8-bit ports|
        | ROMs         |  | 256 B RAM  |  | result register|  | A..H          |
        +-------+------+  +----+-------+  +-------+--------+  +-------+-------+
                |              |                  |                   |
                +-- CU[23:0], strobes S1..S7, ALU function FN --------+
                               |
                          ADDRESS[7:0]
```

* **cu**: the control unit. It holds the instruction register (IR), a 4-bit
  micro-step counter (uPC) and three 256 x 8 microcode ROMs that together
  form a 24-bit control word.
* **memory**: the program counter (PC), the memory address register (MAR),
  the program ROM and the RAM. The PC or the MAR drives the 8-bit address bus.
* **alu_block**: eight accumulators A to H, a 14-function ALU and a result
  register. Accumulator H holds the operand of immediate instructions.
* **inputoutput**: eight 8-bit ports A to H. Each port can be an input or
  an output.

There is one data bus and one transfer per clock. So even `A = A + #`
takes several clocks: fetch the operand, compute, park the result, and
write it back.

## How an instruction runs

The microcode address is `{IR[3:0], uPC}`:

* The **low nibble of the opcode** chooses one of 16 micro-programs.
* The **high nibble** is sent straight to the ALU as its function code.

So one micro-program, such as "immediate operation on A", serves 16
opcodes: `0x83` is ADDA #, `0xA3` is SUBA #, `0x63` is XORA #, and so on.
The microcode does not need to know which operation it is carrying out.

Every micro-program ends with the same three-step fetch:

1. The PC drives the address bus.
2. The ROM drives the data bus.
3. The IR is loaded, the PC steps, and the micro-step counter is cleared.

The last step is one synchronous clear (`UPCCL`) of the counter, so the
next clock starts step 0 of the new opcode. Execution is strictly
sequential; nothing overlaps.

Cycle counts, with the fetch of the next opcode included:

| micro-program (low nibble)  | clocks | steps before the fetch |
|---|---|---|
| 3, 4, 5, 6: immediate op on A, B, C, D | 10 | operand to H (PC+1), ALU settles, ALU to result register, result onto bus, bus into accumulator |
| 2, 7, 8, 9: port A/B/C/D = A/B/C/D op H | 6 | ALU to result register, result onto bus, bus into port latch |
| A, B, C: port A = B/C/D op H | 6 | as above |
| D: A = port A pins | 6 | pins to port latch, latch onto bus, bus into A |
| 1: jump to the next byte | 6 | operand onto bus, bus into PC |
| 0, E, F: no operation | 3 | none: fetch only |

After reset, IR and uPC are both 0. The CPU therefore starts by running the
fetch at opcode 0 and reads the first opcode from address 0. This takes 3
clocks.

A program is a list of bytes. Two-byte instructions (immediates, jump)
carry their operand in the second byte. For example, the built-in program
counts on four ports:

```
00: 83 02   ADDA #2      A = A + 2
02: 02      OUTA A       port A = A
03: 84 04   ADDB #4
05: 07      OUTB B
06: 85 08   ADDC #8
08: 08      OUTC C
09: 86 10   ADDD #16
0B: 09      OUTD D
0C: 01 00   JMP 00
```

One pass of this loop takes 4 x (10 + 6) + 6 = 70 clocks.

### ALU functions (the opcode's upper nibble)

| code | result | code | result |
|---|---|---|---|
| 0 | op1 | 8 | op1 + op2 |
| 1 | op2 | 9 | op1 + op2 + 1 |
| 2 | not op1 | A | op1 - op2 |
| 3 | not op2 | B | op2 - op1 |
| 4 | op1 and op2 | C | op1 - 1 |
| 5 | op1 or op2 | D | op2 - 1 |
| 6 | op1 xor op2 | E, F | op1 (unused codes) |
| 7 | op1 + 1 | | |

In immediate instructions, op1 is the target accumulator and op2 is H (the
operand). So `0x13 #` loads #, `0xB3 #` computes # - A, and `0xD3 #`
computes # - 1. In OUT instructions, op1 is the accumulator being written
and op2 is H, which still holds the last immediate operand.

### The control word

| bits | name | meaning |
|---|---|---|
| 23:21 | SB | accumulator on ALU operand 2 |
| 20:18 | SA | accumulator on ALU operand 1 |
| 17:15 | SW | accumulator written by strobe S1 |
| 14:12 | port | port select, 0 = A to 7 = H |
| 11 | PortE | the selected port drives the data bus |
| 10 | Port_IO | the selected port is an input (the others stay outputs) |
| 9 | RAM_OUTE | RAM drives the data bus |
| 8 | RAM_WE | RAM write |
| 7 | ROME | program ROM drives the data bus |
| 6 | PCE (active low) | 0: PC on the address bus, 1: MAR |
| 5 | PCI | PC + 1 at the clock edge |
| 4 | RESE | result register drives the data bus |
| 3:1 | SEL S | one strobe, decoded: 1 accumulator, 3 result, 4 IR, 5 PC load, 6 MAR load, 7 port latch; 0 none |
| 0 | UPCCL | clear the micro-step counter |

Slice 0 of the microcode store holds bits 7:0, slice 1 holds 15:8 and
slice 2 holds 23:16. The contents are not stored as a table: the function
`shc_pkg::ucode_word` computes them, and each `ucode_rom` instance turns
that into a constant ROM at elaboration time. To add or change an
instruction, edit `ucode_word`.

Every strobe acts at the next rising edge. A source that is being
strobed keeps driving the bus in that cycle, so the value is stable at the
edge.

## The shared bus without tri-states

The original circuit used tri-state buffers on the data bus and inside
the port and accumulator blocks. In this RTL, the buffer `tri8` outputs
0 when disabled and reports through a `drv` flag whether it is driving.
Each bus is the OR of its drivers. A bus with no driver reads 0.

Assertions in `shc3_top` (data bus) and `inputoutput` (port outputs) fail
the simulation if two units ever drive at once. This keeps the design
synthesizable for FPGA and ASIC flows that have no internal tri-states.

## The ports

`inputoutput` decodes the port select. Two AND-gate arrays (`enablebus8`)
gate the decoded select with the strobe (S7) and with the direction
(Port_IO). So only the selected port can be strobed or turned around;
all other ports remain outputs and keep their values.

Inside one port (`bidport8`) four bus drivers set the direction around one
register:

* **Output mode:** bus -> register -> pins.
* **Input mode:** pins -> register -> bus.

At the top level each port is split into three signals:

* `port_in[k]`: what the pins read.
* `port_out[k]`: the driven value, 0 while the port is an input.
* `port_oe[k]`: 1 while the port is an output.

Only port A has an input instruction (`0x0D`). The other ports are built
and can be read by microcode, but no micro-program uses them.

## The 16-bit blocks

`alu16` is a chain of one-bit slices. Each slice conditions its operands
before the function is applied:

* `X' = CONST1 ? all ones : (ENABLEX ? X : 0)`
* `Y' = COMPY ? ~Y : Y`

`FN` selects what the slice computes:

| FN | function |
|---|---|
| 0 | X' + Y' + CIN |
| 1 | X' or Y' |
| 2 | X' and Y' |
| 3 | X' xor Y' |

With `COMPY = 1` and `CIN = 1` the add becomes X - Y. With `ENABLEX = 0`
it becomes a negate or a pass of Y. With `CONST1` it becomes a decrement.

The flags:

* `COUT`: carry out of bit 15.
* `OVFLAG`: carry into bit 15 xor carry out of bit 15. Both are produced
  only by the add.
* `ZFLAG`: the result is 0.
* `NFLAG`: result bit 15.

`regsel` is four `reg16` registers with per-register load lines `LD[3:0]`
and two `regmux16` read ports, `REGX` (`SELX`) and `REGY` (`SELY`). It is
meant to feed both ALU operands in one cycle. The registers have no reset.

## The two earlier CPUs

Both use the same data-bus scheme as the main CPU, with one accumulator
(ACC, strobe S1) on ALU operand 1 and a memory data register (MDR, S2) on
operand 2. The other strobes are S3 result register, S4 IR, S5 PC load,
S6 MAR and S7 output port. The instruction cycle counts match the main
CPU's: 10 clocks for an immediate, 6 for output and jump.

**`shc2_top` (single accumulator).** It uses the main CPU's `memory` block
(PC, MAR, 256-byte ROM and RAM) and a 16-bit control word held in two
8-bit microcode ROM slices (`ucode2_rom`):

| bits | field |
|---|---|
| 9, 8 | RAM output enable, RAM write |
| 7, 6, 5, 4 | ROME, PCE (active low), PCI, RESE |
| 3:1, 0 | SEL S, UPCCL |

As in the main CPU, the ALU function is the opcode's upper nibble. So
opcode `x3` is "ACC = ACC op #" (`13` LDA, `83` ADDA, `A3` SUBA) and `x2`
outputs "ACC op MDR". `01` jumps. Other low nibbles are 3-clock
no-operations. Ports: `CLK`, `RESET`, `d`, `ab`, `portaOP`, `S`. The
default program loads 80 and then, in a loop, XORs 5, adds 10 and
subtracts 5, writing the port each time: 80, 85, 95, 90, 100, 95, ...

**`shc1_top` (simple).** A 3-bit address bus reaches an 8-byte program
ROM. The IR uses two bits, so there are three instructions:

* `03 #`: add immediate.
* `02`: output ACC.
* `01 #`: jump.

A 12-bit control word comes from one 64-word store (`cu1`). Bits 7:4 of
the word carry the ALU function: 0 passes operand 1, 8 adds. The other
bits are ROME, PCE, PCI, RESE, SEL S and UPCCL, as above. Ports: `CLK`,
`RESET`, `CU`, `PROG` (the data bus), `AB`, `portaOP`, `S`. The default
program adds 1 and outputs it, in a 22-clock loop.

## Where this RTL departs from, or fills gaps in, its source

* **16-bit ALU function codes.** The prose for the original gives the
  function codes as "add, X, Y, X - Y". Its bit-slice description and its
  published results use add/or/and/xor. For X = 35425 and Y = 2144 these
  give 37569, 35425, 2144 and 33281. The bit-slice version was built.
* **Overflow flag.** Its definition is incomplete in the source. The
  standard two's-complement rule is used.
* **OUT micro-programs put H on ALU operand 2.** This is what the opcode
  list requires (`0x12` = "port A = H", `0x82` = "port A = A + H").
* **The IN micro-program keeps the port driving the bus** during the cycle
  that strobes A, as every other micro-program does for its source.
* **Opcodes 0, E and F** have no micro-program of their own. They behave as
  3-clock no-operations.
* **Reset.** The reset is active high and asynchronous on every register
  of the 8-bit CPU. The micro-step clear is synchronous.
* **Memory sizes.** ROM and RAM are 256 bytes each, the reach of the
  8-bit address bus. The ROM is read combinationally and loaded from a hex
  file (`PROG_FILE`). The RAM, the MAR and the PCE select are built and
  tested, but no micro-program uses them: there are no load or store
  instructions.
* **Earlier CPUs.** Both use the main CPU's bus scheme: an OR of drivers.
  `shc2_top` reuses its memory block, which takes RAM output enable and
  RAM write from control bits 9 and 8; its microcode never sets them. Its
  unused opcodes are no-operations. `shc1_top`'s program ROM is an
  8-entry array. Its PC is the 8-bit `pc` block, of which the low 3 bits
  drive `AB`. The connections of both follow their strobe lists and
  microcode tables, because their top-level schematics are not
  available.
* **The 16-bit CPU itself** (control unit, memory, instruction set) was
  never designed, so only its ALU and register blocks exist here.

## Files

`rtl/`:

| file | contents |
|---|---|
| `shc_top.sv` | top: the 8-bit CPU plus the 16-bit register bank and ALU (`m4_*` ports) and the two earlier CPUs (`m2_*`, `m1_*` ports) |
| `shc3_top.sv` | the 8-bit CPU |
| `shc_pkg.sv` | control-word struct, strobe and ALU enums, cycle counts, the microprogram (`ucode_word`) |
| `cu.sv`, `ucode_rom.sv`, `upc.sv` | control unit, microcode ROM slice, micro-step counter |
| `memory.sv`, `pc.sv`, `t_cell.sv` | memory block, program counter, one counter bit |
| `alu_block.sv`, `regbank8.sv`, `acc.sv`, `alu.sv` | ALU section, accumulator bank, one accumulator, 8-bit ALU |
| `inputoutput.sv`, `bidport8.sv`, `enablebus8.sv` | port block, one port, AND-gate array |
| `lat8.sv`, `tri8.sv` | strobed 8-bit register, bus driver |
| `alu16_pkg.sv`, `alu16.sv`, `reg16.sv`, `regmux16.sv`, `regsel.sv` | 16-bit blocks |
| `shc3_prog.hex` | default program (the four-port counter above) |
| `shc2_top.sv`, `shc2_pkg.sv`, `cu2.sv`, `ucode2_rom.sv`, `reg8.sv` | single-accumulator CPU: top, control word and microprogram, control unit, microcode ROM slice, result register with bus driver |
| `shc2_prog.hex` | its default program |
| `shc1_top.sv`, `shc1_pkg.sv`, `cu1.sv` | simple CPU: top, control word and microprogram, control unit |
| `shc1_prog.hex` | its default program |

`tb/`: one self-checking bench per module (`tb_<module>.sv`) and the
following benches and data:

| file | what it does |
|---|---|
| `shc3_model_pkg.sv` | instruction-level reference model of the CPU, cycle counts included |
| `tb_shc3_top.sv` | runs `shc3_all.hex` against the model, comparing PC, IR, all accumulators and all ports at every instruction boundary; exercises every micro-program and all 16 ALU codes |
| `tb_shc_top.sv` | end-to-end test of the top with the same program, plus the 16-bit blocks with their published test values and random vectors; and the two earlier CPUs' default programs; counts every mechanism and fails if one never occurs |
| `tb_shc_top_full.sv` | top at default parameters running the built-in programs (300 loops of the main CPU's, 200 port values of each earlier CPU), checking every port update at its exact clock |
| `tb_cpu_programs.sv` | small programs (`prog_*.hex`) on the main CPU and the single-accumulator CPU, checking the value sequence on the port and the spacing of its changes |
| `shc2_model_pkg.sv`, `tb_shc2_top.sv` | instruction-level model of the single-accumulator CPU, and its bench (`shc2_all.hex` plus the default program) |
| `tb_shc1_top.sv` | three programs on the simple CPU (`prog1_*.hex`) against a model in the bench, with reset pulsed at random times |

Each bench prints `TB_RESULT checks=N failures=M`. Each one has a
watchdog, and each one checks clock counts where the design defines them.

## Simulating

Verilator 5 example, from the directory holding `rtl/` and `tb/`. Hex
paths in the RTL and benches are relative to that directory.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/shc_pkg.sv rtl/alu16_pkg.sv rtl/shc2_pkg.sv rtl/shc1_pkg.sv \
    tb/shc3_model_pkg.sv tb/tb_shc_top.sv \
    --top-module tb_shc_top -o sim
./obj_dir/sim
```

Swap in any other bench file and top module name. To run your own
program:

1. Write the bytes as a `$readmemh` file (`//` comments allowed).
2. Pass the file to `shc_top` or `shc3_top` as `PROG_FILE`. For the
   earlier CPUs, use `shc2_top`'s or `shc1_top`'s `PROG_FILE`, or
   `shc_top`'s `PROG2_FILE` or `PROG1_FILE`.
3. Unwritten ROM bytes read 0, which is a no-operation. On the simple
   CPU, opcode 0 re-runs the fetch.

Hold `RST` across at least one rising clock edge. A 2-state simulator
starts registers at arbitrary values, and only the reset edge or a clock
edge during reset clears them.

## How far it is verified

* Every module has a randomized self-checking bench against an independent
  model.
* All three CPUs match instruction-level models on a program that uses
  every opcode class and ALU code, with exact clock counts.
* The original's published test programs and results reproduce, including
  the 16-bit ALU values and the 8-bit ALU table for op1 = 0x24,
  op2 = 0x12.
* Each bench was also shown to fail against a deliberately broken copy of
  its module.
* Synthesis with yosys reports no latches, loops or multiply-driven nets.
* Not verified: timing on real hardware, and any use of the RAM by
  software, since no instruction reaches it.
