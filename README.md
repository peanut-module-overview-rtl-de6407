# PeANUt: a 16-bit teaching computer in SystemVerilog

The PeANUt is a small von Neumann computer built for teaching. One memory of
1024 sixteen-bit words holds both program and data. A CPU with an accumulator
fetches one instruction word at a time through two registers: MAR, which drives
the memory's address lines, and MDR, which sits on its data lines. The CPU then
finds the instruction's operand in one of several addressing modes and carries
the instruction out.

This RTL builds the parts of that machine that are defined well enough to
build: the memory, the register set, the fetch/decode/operand sequence and the
three basic addressing modes. The one instruction whose encoding is known,
LOAD, runs in all three modes. A small byte-order interpreter stands beside the
computer. It is a separate piece that reads a 4-byte sequence as a big-endian
or little-endian 32-bit integer.

## How far to trust it

- **Built:** the memory, all registers, the control sequence, the address
  adder in front of MAR, LOAD in immediate, direct and indirect mode, and the
  byte-order interpreter.
- **Not built:**
  - The ALU: its operations, their encodings and the condition-code bits they
    set are not defined.
  - The exception unit and its table: what raises an exception, and what the
    table holds, are not defined.
  - The I/O unit.
  - Indexed and stack modes.
  - Every opcode other than LOAD.
- The CC field of the PSW therefore stays at 0, and SP and XR stay at 0.
- The CPU never writes memory, because no store instruction is defined. The
  memory itself supports writes, and the load port uses them.
- An instruction that the design cannot decode is skipped, not trapped. The
  `unimpl` output marks it.

Every testbench checks its block against values computed independently of it.
Every testbench was also run against a deliberately broken copy of its block
and caught the fault.

## Memory and the bus protocol (`peanut_memory`)

The memory has 1024 cells of 16 bits and 10 address lines. It has two control
lines, Read/Write (`rw`, 1 = Read) and Enable (`en`).

- **Read:** the CPU puts the address in MAR and raises Enable with `rw = 1`.
  The word appears on `rdata` in the same cycle. The CPU latches it into MDR
  at the clock edge.
- **Write:** the CPU puts the address in MAR and the data in MDR, then raises
  Enable with `rw = 0`. The word is stored at the clock edge.
- `rdata` is 0 whenever the memory is not being read.
- The PeANUt's bidirectional data lines are split into `wdata` and `rdata`.
- The array has no reset.

## Instruction word and addressing modes

The instruction word has three fields:

| bits  | field  | meaning                                   |
|-------|--------|-------------------------------------------|
| 15-13 | mode   | how the operand specifier is interpreted  |
| 12-10 | opcode | `001` = LOAD (the only opcode decoded)    |
| 9-0   | opspec | operand specifier                         |

This split is inferred from example words of LOAD: `000 001 31` in immediate
mode, and `001 001 a20` and `010 001 a20` in direct and indirect mode. The
first field changes with the mode and the second stays `001`. The direct-mode
LOAD of address octal 20 encodes as `0010 0100 0001 0000`. The testbench
checks that CI holds exactly that pattern.

The modes:

| mode | name     | operand                                                      |
|------|----------|--------------------------------------------------------------|
| 000  | immediate| the opspec itself, sign-extended to 16 bits; no memory access |
| 001  | direct   | `mem[opspec]`                                                |
| 010  | indirect | `mem[mem[opspec]]`, using the low 10 bits of the first word  |
| 011  | indexed  | not built; skipped                                           |
| 100  | stack    | not built; skipped                                           |

Addresses are often written in octal: a20 is cell 16 and a30 is cell 24. The
sign extension of an immediate opspec is this design's choice. The definition
says only that the operand "is" the opspec. Sign extension matches the
2's-complement arithmetic of the machine.

## The execution cycle and its timing (`peanut_control`, `peanut_cpu`)

The control unit is a state machine. It performs one register transfer per
clock:

| state         | transfer                          | used by                       |
|---------------|-----------------------------------|-------------------------------|
| `S_PC_INC`    | PC <- PC + 1                      | all (waits here while `run`=0) |
| `S_FETCH_MAR` | MAR <- PC - 1                     | all                           |
| `S_FETCH_RD`  | Read, Enable; MDR <- mem[MAR]     | all                           |
| `S_CI`        | CI <- MDR                         | all                           |
| `S_DECODE`    | decode CI                         | all                           |
| `S_OP_MAR`    | MAR <- opspec                     | direct, indirect              |
| `S_OP_RD`     | Read, Enable; MDR <- mem[MAR]     | direct, indirect              |
| `S_IND_MAR`   | MAR <- MDR[9:0]                   | indirect                      |
| `S_IND_RD`    | Read, Enable; MDR <- mem[MAR]     | indirect                      |
| `S_EXEC`      | AC <- operand; `instr_done`       | LOAD                          |

LOAD takes 6 cycles in immediate mode, 8 in direct mode and 10 in indirect
mode. An instruction that cannot be decoded ends in `S_DECODE` after 5 cycles,
with `unimpl` and `instr_done` pulsed.

The PC is incremented before the fetch, and the fetch reads from PC - 1. So
during execution PC already names the next instruction, as the architecture
defines. The cycle counts are this design's choice: the architecture fixes
only the order of the transfers.

Every address on its way to MAR passes through `peanut_addr_adder`, a 10-bit
modulo adder. For the fetch it adds all ones to PC, which subtracts one. For
an operand address it adds zero. PC wraps from 1023 to 0.

The architecture has a final "service exceptions" step after execution. That
step is left out, because the exception unit is not built.

## Registers

All registers are 16 bits wide, except MAR. MAR is 10 bits, the width of the
address lines.

| register | contents                                                   |
|----------|------------------------------------------------------------|
| PSW      | CC (condition codes) in bits 15-10, PC in bits 9-0          |
| AC       | accumulator; the destination of LOAD                        |
| SP, XR   | stack pointer and index register; present, never written    |
| CI       | current instruction                                         |
| MAR, MDR | memory address and data registers                           |

Reset is synchronous and active low. It clears every register and sets PC to
the `RESET_PC` parameter, which defaults to 0.

## Top level (`peanut_top`)

`peanut_top` connects the CPU to the memory. It adds a **load port**
(`ld_en`, `ld_addr`, `ld_data`), which is this design's own. While `run` is
low, the CPU waits at the start of a fetch and the load port writes one word
per clock. Raise `run` to start executing from `RESET_PC`.

The top also has these outputs:

- `regs`: every register.
- `mdr`: where an I/O unit would attach.
- `instr_done` and `unimpl`.

The byte-order interpreter `endian_word` sits beside the computer with its own
ports (`bytes`, `big_endian`, `value`):

- big-endian: byte 0 becomes the most significant byte, so `01 02 03 04`
  gives `32'h01020304`;
- little-endian: byte 3 becomes the most significant byte, so the same
  sequence gives `32'h04030201`.

## Files

| file | contents |
|------|----------|
| `rtl/peanut_pkg.sv` | widths, PSW and instruction structs, mode codes, states, control bundle |
| `rtl/peanut_memory.sv` | 1024 x 16 memory |
| `rtl/peanut_addr_adder.sv` | adder in front of MAR |
| `rtl/peanut_control.sv` | control unit state machine |
| `rtl/peanut_cpu.sv` | registers, datapath, control unit |
| `rtl/peanut_top.sv` | CPU + memory + load port, byte-order interpreter |
| `rtl/endian_word.sv` | byte-order interpreter |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Testbenches

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs.

- `tb_peanut_top` runs at the default sizes. It runs three phases:
  - the three addressing-mode examples: LOAD #31; LOAD a20 with 34 at a20;
    LOAD a20 indirect with a30 at a20 and 57 at a30;
  - a negative immediate and two skipped instructions;
  - 2000 random instructions spread over the full memory, checked against an
    instruction-level reference model.

  It checks AC, PC, CI and the cycle count of every instruction. It also counts
  that each mechanism happened: each addressing mode, a skipped instruction, a
  load-port write, a hold while `run` is low, and both byte orders.
- `tb_peanut_cpu` runs the CPU against a memory model held in the testbench.
- `tb_peanut_control` compares the control lines cycle by cycle with a table
  of expected steps.
- `tb_peanut_memory`, `tb_peanut_addr_adder` and `tb_endian_word` test their
  blocks on their own.

To simulate with Verilator 5, from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_peanut_top -y rtl +libext+.sv rtl/peanut_pkg.sv tb/tb_peanut_top.sv
./obj_dir/Vtb_peanut_top
```

Replace `tb_peanut_top` with any other testbench name. The package must come
first on the command line. Verilator finds the other modules through `-y rtl`.

## Extending it

- **New opcodes:** add them to `peanut_pkg` and to the `decodable` test in
  `peanut_control`. Then give `S_EXEC` (or new states) the transfers the
  opcodes need.
- **An ALU:** it would sit between MDR/AC and AC, and write CC.
- **Indexed and stack modes:** feed XR or SP into the second input of the
  address adder in `S_OP_MAR`.
- **A store:** drive `ctl.mem_rw = 0` with `mem_en` in a state where MDR holds
  the data.
