# A microcoded 4-bit CPU with four registers

This is a very small processor. Each instruction is carried out by a short
program in a second memory, the microcode. The instruction's opcode picks a
block of microcode lines. A step counter walks through that block, one line
per clock. Each line raises at most one control flag, and that flag does one
small job in the datapath: latch an operand, write a register, update the
zero flag, or advance the program counter.

The machine has four 4-bit registers, named `00`, `01`, `10` and `11`. Its
9-bit instructions are `add`, `eq`, `ld`, `nop`, `skipz` and `halt`. The
design started as a teaching exercise in system integration. It was first
built from discrete parts in a logic simulator. This RTL is a synchronous,
single-clock version of that machine, written in SystemVerilog.

## Instruction set

| Instr. | Opcode (bits 8:6) | Bits 5:4 | Bits 3:2 | Bits 1:0 | Effect |
|--------|------|------|------|------|--------|
| `add`  | 000 | regA | regB | unused | `r00 <- regA + regB` (mod 16) |
| `ld`   | 001 | regA | imm[3:2] | imm[1:0] | `regA <- imm` |
| `eq`   | 010 | regA | regB | unused | `ZF <- (regA - regB == 0)` |
| `nop`  | 011 | unused | | | nothing |
| `halt` | 100 | unused | | | stop; the PC is never advanced again |
| `skipz`| 101 | unused | | | if ZF is set, skip the next instruction |

Opcodes 110 and 111 are not defined. Their microcode is empty, so the
machine stops on them with no flag raised.

The result of `add` always goes to register `00`. Only `eq` changes ZF, and
ZF keeps its value until the next `eq`. `add` drops its carry.

## Microcode

The microcode memory has 256 lines of 8 bits. Its address is
`{opcode, step}`, with a 5-bit step. So opcode *n* owns lines `32n` to
`32n+31`. The flag bits of a line are:

| Bit | Hex | Flag  | Action at the end of the clock |
|-----|-----|-------|--------------------------------|
| 0 | 01 | PC    | advance the fetch address; restart the step counter at 0 |
| 1 | 02 | ADD   | write latchA + latchB into register 00 |
| 2 | 04 | EQ    | ZF <- (latchA == latchB) |
| 3 | 08 | LD    | write the immediate into regA |
| 4 | 10 | SKIPZ | if ZF is set, mark the next instruction to be skipped |
| 5 | 20 | SET1  | latchA <- register regA |
| 6 | 40 | SET2  | latchB <- register regB |
| 7 | 80 | NOPE  | none; it only signals nop or halt |

The programs, with one line per clock:

| Instr. | Lines | Contents | Clocks |
|--------|-------|----------|--------|
| `add`  | 0-3     | 20 40 02 01 | 4 |
| `ld`   | 32-33   | 08 01 | 2 |
| `eq`   | 64-67   | 20 40 04 01 | 4 |
| `nop`  | 96-97   | 80 01 | 2 |
| `halt` | 128-159 | 80 on every line | never ends |
| `skipz`| 160-161 | 10 01 | 2 |

The other lines hold 00. `halt` fills its whole block with `80`, so the
5-bit step counter wraps inside the block. NOPE then stays high and PC never
rises again.

The table lives in one function, `cpu_pkg::ucode_line`. To add an
instruction, add an opcode to `opcode_e` and give it lines in that
function. If it needs a new datapath action, you also need a free flag bit,
and all eight are in use.

## How a skip works

The program counter is not a single register. `pc_unit` keeps two counters:

* `pc_count` counts PC flags, which is one per finished instruction;
* `skip_count` counts `skipz` instructions that were taken.

The fetch address is their sum. A taken `skipz` raises the sum by one more,
and that extra step skips the next instruction. This follows the original
machine.

The SKIPZ flag is raised on the first clock of `skipz`, and PC on the
second. If `skip_count` went up on the first clock, the fetch address would
change while the `skipz` microcode still needed its second line. So a taken
skip is first stored in `skip_pending`. It is added to `skip_count` on the
same edge as the PC flag, and the whole jump of two words happens at once.
This pending bit is a choice of this RTL.

## Datapath and register port

The register file has one address and one data output, as in the original.
Its address and write data come from `write_select`:

| Active flag | Register address | Write | Write data |
|-------------|------------------|-------|------------|
| ADD  | 00   | yes | ALU sum |
| LD   | regA | yes | immediate |
| SET2 | regB | no  | - |
| otherwise (SET1 ...) | regA | no | - |

Only one port is needed because the operands are read on different clocks.
SET1 reads regA into `latchA`. SET2 reads regB into `latchB`. On the ADD or
EQ clock the ALU works only on the two latches, so the port is free to write
register 00. The ALU (`alu`) adds and subtracts combinationally. It holds ZF
in a register that only EQ loads.

## Instruction fetch and timing

The instruction memory (`prog_ram`, 256 x 9 bits) is read asynchronously.
The word at the fetch address is valid throughout the clock. There is no
instruction register: the opcode bits go straight into the microcode
address. The fetch address changes only on the edge that ends an
instruction. On that same edge the step counter returns to 0, so the next
clock already runs line 0 of the next instruction.

All state changes on the rising edge of `clk`. Reset is synchronous and
active low. It clears the program counter, the step counter, the registers,
the operand latches and ZF. It does not clear the instruction memory.

## Top-level interface (`lab8_cpu`)

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `prog_we`, `prog_addr`, `prog_wdata` | in | 1, 8, 9 | write one instruction word |
| `fetch_addr` | out | 8 | address of the instruction now executing |
| `pc_count`, `skip_count`, `skip_pending` | out | 8, 8, 1 | the two PC counters and the pending skip |
| `instr_o` | out | 9 | current instruction |
| `ustep` | out | 5 | micro-step |
| `flags` | out | `uflags_t` | current microcode line, as a packed struct |
| `zf` | out | 1 | zero flag |
| `regs` | out | 4 x 4 | register contents |

The original machine showed its state on LEDs. Here the state comes out on
the observation ports. After power-up, the instruction memory holds the
demonstration program below. Set `INIT_EXAMPLE` to 0 on `prog_ram` to fill
it with `halt` instead. An assertion in the top checks that no microcode
line raises two flags.

## Demonstration program

| Addr | Word | Meaning |
|------|------|---------|
| 0  | 045 | ld r00, 5 |
| 1  | 051 | ld r01, 1 |
| 2  | 004 | add r00 + r01 -> r00 (6) |
| 3  | 066 | ld r10, 6 |
| 4  | 088 | eq r00, r10 -> ZF=1 |
| 5-7 | 0c0 | nop x3 |
| 8  | 140 | skipz (taken) |
| 9  | 004 | add (skipped) |
| 10 | 050 | ld r01, 0 |
| 11 | 084 | eq r00, r01 -> ZF=0 |
| 12 | 140 | skipz (not taken) |
| 13 | 045 | ld r00, 5 |
| 14 | 100 | halt |

The program reaches `halt` at address 14, 32 clocks after reset. The final
state is r00=5, r01=0, r10=6, r11=0 and ZF=0.

## Where this RTL departs from the original

* **One clock for everything.** The original had no proper write strobe for
  its registers. It used a push button, then a free-running oscillator,
  which sometimes wrote bad data. It also proposed a delayed one-shot pulse
  to fix this. A synchronous design writes on the clock edge and needs none
  of these, so the one-shot is not built.
* **Two operand latches.** The block diagram shows one latch in front of
  the ALU, but the description of SET1 and SET2 needs two. Two are built,
  as edge-triggered registers.
* **regB is read through the register address selector.** The original
  drawing shows only a `00`/regA selector.
* **Skip timing** uses the pending bit described above.
* **Assumed sizes and values.** The 8-bit program counter (256 words), reset
  values of 0, the dropped carry, and empty microcode for opcodes 110/111
  are all choices of this RTL.
* **One memory word per instruction.** The original stored each 9-bit word
  in two 8-bit memory devices. Here it is one 9-bit array with a write port
  added for loading programs.

## Files

`rtl/`: `cpu_pkg` (types, microcode table, demonstration program),
`lab8_cpu` (top), `pc_unit`, `prog_ram`, `ucode_counter`, `ucode_rom`,
`write_select`, `regfile`, `operand_latches`, `alu`.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. `tb_lab8_cpu` runs the whole CPU with an
instruction-level reference model. It checks the fetch address, the clock
count of each instruction, and all registers and ZF after every
instruction. It first runs the demonstration program, then 30 random
programs loaded through the write port. It also counts how often each
mechanism occurred: ld, add, eq true/false, nop, skipz taken/not taken,
halt and program load. `tb_demo_program` checks the demonstration program
clock by clock. It compares the microcode flags and the fetch address of
each of the first 40 clocks with a sequence worked out by hand.

## Simulating

With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal rtl/*.sv \
    tb/tb_lab8_cpu.sv --top-module tb_lab8_cpu -Mdir obj
./obj/Vtb_lab8_cpu
```

To test a single block, replace `rtl/*.sv` with `rtl/cpu_pkg.sv` and that
block's file, and use its testbench. `verilator --lint-only -Wall` is clean,
apart from notes about package constants that a given module does not use.
Every testbench passes. Each block's testbench was also run against a copy
of the block with a deliberate bug, and each copy was caught.
