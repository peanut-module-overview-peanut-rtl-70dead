# PeANUt: a teaching accumulator machine in SystemVerilog

PeANUt is a small illustrative microprocessor meant for teaching how a CPU
fetches, decodes and executes instructions. It is a von Neumann machine: one
memory of 1024 sixteen-bit cells holds both program and data, and a single
accumulator (AC) is combined with an operand fetched from memory,
`AC <- AC op operand`. The operand is found according to an addressing mode
encoded in the instruction. The point of the machine is the plain, visible
data flow between a few named registers (CI, PSW, MAR, MDR, AC) and memory.

This RTL implements the part of the machine that is fully defined:
instruction fetch, the three basic addressing modes (immediate, direct,
indirect) and the two instructions whose encodings are known, LOAD and ADD.
Anything else stops the CPU (see *What is not there*).

## Machine organisation

```
            +----------------------- peanut_cpu ------------------------+
            |  control unit (FSM)                                       |
            |     |  CI  PSW={CC,PC}  AC                                |
            |     |                                                     |
            |   peanut_addr_adder  --> MAR --------------------------+  |
            |   peanut_alu (AC op MDR) <-- MDR <-------------------+ |  |
            +------------------------------------------------------|-|--+
                                                   mem_rdata       | | mem_addr, mem_en, mem_write
                                                  peanut_memory (1024 x 16)
```

| Register | Width | Role |
|---|---|---|
| CI  | 16 | current instruction |
| PSW | 16 | program status word: condition codes in bits 15-10, program counter in bits 9-0 |
| AC  | 16 | accumulator |
| MAR | 10 | memory address register, drives the memory address lines |
| MDR | 16 | memory data register, receives read data (and would hold write data) |

All arithmetic is 16-bit two's complement. Addresses are 10 bits and wrap
modulo 1024.

## Instruction word

Only format one is implemented:

```
 15   13 12   10 9                 0
+-------+-------+-------------------+
| mode  |opcode |      opspec       |
+-------+-------+-------------------+
```

| opcode | instruction | effect |
|---|---|---|
| `001` | LOAD | `AC <- operand` |
| `011` | ADD  | `AC <- AC + operand` |

| mode | name | operand |
|---|---|---|
| `000` | immediate | the opspec itself, sign-extended to 16 bits |
| `001` | direct    | `mem[opspec]` |
| `010` | indirect  | `mem[mem[opspec]]` (low 10 bits of the pointer) |

Examples: `000 001 0000011111` (LOAD #31) puts 31 in AC.
`001 001 0000010100` (LOAD 20) with 34 in cell 20 puts 34 in AC.
`010 001 0000010100` (LOAD @20) with 30 in cell 20 and 57 in cell 30 puts
57 in AC.

## Execution cycle and timing

The control unit steps through one register transfer per clock cycle. This is
the hardest part to follow when reading `peanut_cpu.sv`, so here is the whole
sequence:

| state | transfer | memory lines |
|---|---|---|
| FETCH_PC  | `PC <- PC + 1` | |
| FETCH_MAR | `MAR <- PC - 1` (via the address adder, offset all ones) | |
| FETCH_RD  | `MDR <- mem[MAR]` | Read, Enable |
| FETCH_CI  | `CI <- MDR` | |
| EVAL      | decode; immediate: `MDR <- sext(opspec)`; direct/indirect: `MAR <- opspec`; undefined word: go to HALT | |
| IND_RD    | indirect only: `MDR <- mem[MAR]` | Read, Enable |
| IND_MAR   | indirect only: `MAR <- MDR[9:0]` | |
| OP_RD     | direct and indirect: `MDR <- mem[MAR]` | Read, Enable |
| EXEC      | `AC <- ALU(AC, MDR)`, `CC <- ALU status`; `instr_done` high | |
| HALT      | stays here until reset; `halted` and `illegal` high | |

So an instruction takes **6 cycles in immediate mode, 7 in direct mode and 9
in indirect mode**, and HALT is reached 6 cycles after the previous EXEC.
Incrementing PC first and then addressing `PC - 1` mirrors the machine's
definition of the execution cycle; a real implementation would merge steps.

## Memory protocol

`peanut_memory` has the three line groups of the machine: 10 address lines
(from MAR), 16 data lines and two control lines, Read/Write and Enable. The
bidirectional data lines are split into `wdata` (from MDR) and `rdata` (to
MDR). Reading is combinational: while `en` is high and `write` low, `rdata`
shows the addressed cell and MDR captures it on the next clock edge. A write
happens on the clock edge where `en` and `write` are both high. With `en` low
`rdata` is zero. The memory contents are not reset.

## Condition codes

The CC field (PSW bits 15-10) holds ALU status. Its bit assignment is this
design's choice:

| PSW bit | flag | set when |
|---|---|---|
| 10 | Z | result is zero |
| 11 | N | result bit 15 is set |
| 12 | C | ADD carried out of bit 15 |
| 13 | V | ADD overflowed as a signed addition |
| 14-15 | - | always zero |

Both LOAD and ADD update CC; LOAD clears C and V.

## What is not there

The machine as a whole has more than this RTL. Missing, because their
definitions were not available:

- the indexed (`011`) and stack (`100`) addressing modes, and with them the
  stack pointer SP and index register XR;
- every opcode other than LOAD and ADD, including stores, branches, traps and
  the ALU's logic operations, and instruction formats two and three;
- the exception unit (with its vector table) and the I/O unit.

Any instruction word that is not a format-one LOAD or ADD in modes 000-010
sends the CPU to HALT with `illegal` set; there is no exception servicing.
Because no store exists, the CPU never drives the Write line (`mem_write` is
constantly 0), although the memory supports writing. Where the I/O and
exception units would attach, `peanut_top` brings the memory bus and the
CPU's visible state out as ports.

Other choices made here: immediate operands are sign-extended; reset is
synchronous and active low, clears PC, CC, AC, CI, MAR and MDR, and the CPU
starts fetching at address 0; there is no program-load port, so memory is
filled before reset is released (the testbenches write `u_mem.mem`
directly).

## Files

| file | content |
|---|---|
| `rtl/peanut_pkg.sv` | widths, instruction and PSW layouts, mode/opcode/ALU codes |
| `rtl/peanut_top.sv` | CPU plus memory |
| `rtl/peanut_cpu.sv` | control unit FSM and registers |
| `rtl/peanut_alu.sv` | 16-bit ALU (pass and add) with Z/N/C/V |
| `rtl/peanut_addr_adder.sv` | 10-bit adder in front of MAR |
| `rtl/peanut_memory.sv` | 1024 x 16 memory |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/peanut_pkg.sv tb/tb_peanut_top.sv --top-module tb_peanut_top
./obj_dir/Vtb_peanut_top
```

- `tb_peanut_top` runs a program at full size that uses every mode with both
  instructions, sets each condition code, and ends in an undefined word. It
  checks AC, CC, PC and the cycle count of every instruction, and counts how
  often each mechanism happened.
- `tb_peanut_cpu` compares the CPU with an instruction-level reference model
  on the three examples above and on 20 random programs, cycle counts
  included.
- `tb_peanut_alu`, `tb_peanut_addr_adder` and `tb_peanut_memory` check
  their modules against directed and random vectors.

The CPU also carries two assertions: the unused CC bits stay zero, and memory
is never enabled for a write.
