# A 16-bit accumulator processor

This is a small multicycle processor built around one idea: a program sees
exactly one register, the accumulator. Every arithmetic, logic and compare
instruction combines the accumulator with either a constant or one word of
memory, and writes the result back to the accumulator. There are no general
registers to pass subroutine arguments in. Arguments, return values and return
addresses all travel through a stack in data memory. Every instruction has the
same 16-bit shape, so a hex dump of a program reads almost like its assembly.

The RTL follows an earlier design description of such a machine. It gives
the instruction format, most of the instruction set, the stack calling
convention, the list of datapath registers and worked example programs. It does
not give the control sequencing, most of the opcode numbers, memory sizes or
reset behaviour. Those were chosen here; the section *What is original and what
is chosen* lists them.

## Instruction format

```
 15        10 9                    0
+------------+----------------------+
|  opcode 6  | immediate/address 10 |
+------------+----------------------+
```

The 10-bit field is used in one of five ways, depending on the instruction:

| use | meaning | instructions |
|---|---|---|
| signed constant | sign-extended to 16 bits | `ADDIMM SUBIMM ANDIMM ORIMM CMPE CMPLT` |
| shift amount | low 4 bits of the field | `SL SR` |
| data address | word index into data memory | `ADD SUB AND OR LOAD STORE` |
| code address | the field × 2 gives the byte address of the target instruction | `JUMP JUMPL BEZ BNEZ` |
| stack slot / size | signed offset from SP, or word count | `PUSH PULL PUSHRA ALLOCATE DEALLOCATE` |

The PC is a byte address and instructions are two bytes, so the PC counts
0, 2, 4, …. A 10-bit jump field therefore reaches 1024 instructions.

## Instruction set

| code | mnemonic | effect |
|---:|---|---|
| 0 | `ADD a` | Acc ← Acc + Mem[a] |
| 1 | `ADDIMM i` | Acc ← Acc + i |
| 2 | `AND a` | Acc ← Acc & Mem[a] |
| 3 | `ANDIMM i` | Acc ← Acc & i |
| 4 | `OR a` | Acc ← Acc \| Mem[a] |
| 5 | `ORIMM i` | Acc ← Acc \| i |
| 6 | `SUB a` | Acc ← Acc − Mem[a] |
| 7 | `SUBIMM i` | Acc ← Acc − i |
| 8 | `SL n` | Acc ← Acc << n |
| 9 | `SR n` | Acc ← Acc >> n (logical) |
| 10 | `BEZ L` | if Acc = 0: PC ← 2·L |
| 11 | `JUMP L` | PC ← 2·L |
| 12 | `JUMPL L` | RA ← PC + 2; PC ← 2·L |
| 13 | `LOAD a` | Acc ← Mem[a] |
| 14 | `STORE a` | Mem[a] ← Acc |
| 15 | `BNEZ L` | if Acc ≠ 0: PC ← 2·L |
| 16 | `JUMPACC` | PC ← Acc |
| 17 | `ALLOCATE n` | SP ← SP − n |
| 18 | `DEALLOCATE n` | SP ← SP + n |
| 19 | `PUSH k` | Mem[SP + k] ← Acc |
| 20 | `PULL k` | Acc ← Mem[SP + k] |
| 21 | `PUSHRA k` | Mem[SP + k] ← RA |
| 22 | `CMPE i` | Acc ← (Acc = i) ? 1 : 0 |
| 23 | `CMPLT i` | Acc ← (Acc < i, signed) ? 1 : 0 |

Codes 3, 5, 11, 12, 13, 14, 17, 19, 20 and 21 are those of the original
machine code. The rest were filled in here, keeping each memory form next to
its immediate form. The original design counts 27 instructions but names only
these 24. Every other code, 24 to 63 included, is a two-cycle no-operation.

Common idioms are short sequences: load a constant with `ANDIMM 0; ORIMM c`.
Compare two variables with `LOAD x; SUB y; CMPLT 0`. Return from a subroutine
with `PULL 0; …; JUMPACC`.

## The stack and the calling convention

This is the part that takes the most care when writing programs. The hardware
only provides SP, the word-granular `ALLOCATE`/`DEALLOCATE`, and slot-relative
`PUSH`/`PULL`/`PUSHRA`. The convention on top of them is:

* The stack grows downward. `ALLOCATE n` opens a frame of n words, and slot
  k of the current frame is at address SP + k.
* The caller allocates a frame and puts arguments into it with `PUSH k`. It
  then calls with `JUMPL`, which saves the return address in RA.
* The callee reads its arguments with `PULL k` *before* allocating anything
  of its own.
* A callee that calls further subroutines must save RA with `PUSHRA 0`,
  because the next `JUMPL` overwrites RA. Slot 0 therefore holds the return
  address.
* To return, the callee writes its result into a slot and reloads the return
  address into the accumulator with `PULL 0`. It then releases the frame with
  `DEALLOCATE n` and ends with `JUMPACC`.
* After the return, the result sits just below the stack pointer. The caller
  reads it with `PULL -1`, and a second result with `PULL -2`.

Worked example (the subroutine test, run from reset, SP = 0x3FB):

```
0x00 ALLOCATE 2        SP = 0x3F9
0x02 ANDIMM 0 / ORIMM 55 / PUSH 0     Mem[0x3F9] = 55
0x08 ANDIMM 0 / ORIMM 45 / PUSH 1     Mem[0x3FA] = 45
0x0e JUMPL ADD_FUNCTION               RA = 0x10
0x10 PULL -1           Acc = Mem[0x3FA] = 100
     ...
ADD_FUNCTION:
     PULL 1 / STORE b / PULL 0 / ADD b   Acc = 100
     PUSHRA 0          Mem[0x3F9] = 0x10
     PUSH 1            Mem[0x3FA] = 100   (result)
     PULL 0            Acc = 0x10
     DEALLOCATE 2      SP = 0x3FB
     JUMPACC           PC = 0x10
```

SP resets to 0x3FB, which makes this example end with SP = 0x3FB. The four
words above it, 0x3FC to 0x3FF, are free for other use.

## Microarchitecture

The accumulator is the only register a program sees. The datapath
(`datapath.sv`) keeps these registers around it:

| register | role |
|---|---|
| Acc | accumulator |
| IM | instruction register, loaded in fetch |
| PC | byte address of the next instruction |
| ALUOut | ALU result, written to Acc one cycle later |
| SP | stack pointer (`stack_pointer.sv`) |
| RA | return address, written by `JUMPL`, stored by `PUSHRA` |
| BA | branch address: field × 2, latched in decode |
| SA | stack address: SP + sign-extended field, latched in decode |
| memory read register | the registered output of data memory |

The ALU's first operand is always Acc. Its second is the sign-extended field or
the word just read from memory. Data memory is addressed either by the field
itself or by SA. It writes Acc, or RA for `PUSHRA`. The PC loads PC + 2, BA or
Acc.

### Control sequence

`control_unit.sv` is a Moore state machine. Every instruction begins with
FETCH, where IM ← imem[PC] and PC ← PC + 2, and DECODE, where BA and SA are
latched:

| class | states after DECODE | cycles |
|---|---|---:|
| ALU with constant, shifts, compares | EXEC (ALUOut ← Acc op imm) → ALUWB (Acc ← ALUOut) | 4 |
| ALU with memory operand | MEMRD → MEMALU (ALUOut ← Acc op mem) → ALUWB | 5 |
| `LOAD`, `PULL` | MEMRD → MEMWB (Acc ← mem) | 4 |
| `STORE`, `PUSH`, `PUSHRA` | MEMWR | 3 |
| jumps and branches | JUMP (PC ← BA or Acc; RA ← PC for `JUMPL`) | 3 |
| `ALLOCATE`, `DEALLOCATE` | SP | 3 |
| unused codes | — | 2 |

`instr_done` is high in the last cycle of every instruction. A branch's
condition is tested on Acc in the JUMP state. Because Acc only changes in
ALUWB or MEMWB, a branch always sees the result of the instruction before it.
Nothing is pipelined, so there are no hazards to manage. Assertions in the
control unit check three rules during simulation. Every instruction returns to
FETCH. PC is loaded only in FETCH or JUMP. Memory and Acc are never written in
the same cycle.

All control signals travel as one packed struct, `ctrl_t`, defined with the
opcode and state enums in `acc_pkg.sv`.

## Memories

* **Instruction memory** (`instr_mem.sv`): 1024 × 16. It is read
  combinationally at PC[10:1] and written through the load port.
* **Data memory** (`data_mem.sv`): 1024 × 16, word-addressed, with a
  synchronous read. A second, combinational read port exists for observation.
  Variables live wherever programs put them. The example programs use
  0x200 upward, spaced two apart as the original assembler allocated them. The
  stack lives at the top.

## Module hierarchy

```
acc_cpu                 top: control + datapath
├── control_unit        multicycle state machine
└── datapath
    ├── fetch_unit      PC + instruction memory + IM register
    │   ├── program_counter
    │   └── instr_mem
    ├── sign_ext        10 → 16 bit sign extension
    ├── stack_pointer   SP, ALLOCATE/DEALLOCATE, SP + offset
    ├── alu_aluout      ALU + ALUOut register
    │   └── alu
    └── data_mem
acc_pkg                 opcodes, ALU ops, control struct, states
```

## Using the top level

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `run` | in | 1 | low: wait in FETCH; high: execute |
| `prog_we`, `prog_addr`, `prog_data` | in | 1, 10, 16 | write one instruction word (word index) |
| `dbg_addr` / `dbg_data` | in / out | 10 / 16 | read a data-memory word |
| `acc_out`, `pc_out`, `sp_out`, `ra_out` | out | 16 | register values |
| `instr_done` | out | 1 | last cycle of an instruction |
| `state` | out | 4 | control state |

To start a program, hold `run` low, pulse `rst`, and write the program with
`prog_we`. Then raise `run`: execution starts at address 0 with Acc = 0 and
SP = 0x3FB. The processor has no halt instruction. Programs end in a jump to
themselves.

Instead of using the load port, a program can be given as a file. Set
`IMEM_INIT` to the path of a text file with one hex instruction word per line,
read by `$readmemh` at start-up. `tb/relprime.hex` is an example; its comments
show the assembly of each word.

Parameters: `IMEM_WORDS` and `DMEM_WORDS` (default 1024 each), `IMEM_INIT`
(default none) and `SP_RESET` (default 0x3FB). The data width is fixed at 16 by the instruction format.

## Simulation

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/acc_asm_pkg.sv` holds `enc()`, a one-line
assembler for instruction words, and the per-instruction cycle counts. With
Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/acc_pkg.sv tb/acc_asm_pkg.sv tb/tb_acc_cpu.sv --top-module tb_acc_cpu
./obj_dir/Vtb_acc_cpu
```

`tb_acc_cpu` runs the full-size processor through five programs. It checks the
accumulator after each instruction, the cycle count of each instruction, and
the final memory and SP:

1. an arithmetic sequence: `ADDIMM 5` … `SR 2`, ending with Acc = 4;
2. variables, a count-down loop with `BNEZ`, and a three-slot stack frame;
3. the subroutine example above;
4. and 5. `relprime(N)` for N = 30 and N = 210. This returns the smallest m ≥ 2
   with gcd(m, N) = 1 (7 and 11). `relprime` keeps its return address on the
   stack and calls a subtraction-based `gcd`, two levels deep.

It also counts how often every opcode ran, and how often `BEZ` and `BNEZ` were
taken and not taken. An opcode or branch direction that never occurred counts
as a failure. The whole run takes well under a second.
`tb_acc_cpu_hexprog` runs `relprime(30)` from `tb/relprime.hex` through
`IMEM_INIT`. It also checks the opcode numbers against machine words of the
original listing. Simulations read that file by the relative path
`tb/relprime.hex`, so run them from the directory that holds `rtl/` and `tb/`.
`tb_control_unit` walks every opcode through the state machine.
`tb_datapath` drives the control struct by hand, without the control unit.

## What is original and what is chosen

The following follows the original design:

* the 6 + 10 bit format;
* the accumulator as the only visible register;
* the named instructions and their effects;
* the ten opcode numbers listed above;
* the byte-addressed PC with jump targets at field × 2;
* RA = PC + 2;
* the stack convention: return address in slot 0, results at SP−1 and SP−2;
* SP = 0x3FB after the subroutine example;
* a multicycle datapath with IM, ALUOut and PC registers;
* the worked example programs and their expected accumulator values.

The following are choices made here, because the original does not specify them:

* The state sequence and the cycle counts.
* The remaining 14 opcode numbers. Unused codes are no-operations.
* The roles of BA and SA. The original names them as special registers
  without describing them.
* Signed `CMPLT` and logical `SR`.
* Shift amounts taken from the low 4 bits.
* Word-addressed data memory. The field is used directly as the word index.
* Memory sizes of 1024 words.
* The program-load port and the observation ports. The original loads
  programs from a memory-initialisation file. Here the file form is a plain
  hex file read by `$readmemh`.
* Synchronous reset, with Acc, PC and ALUOut cleared.
* One example line, `ANDIMM 20` giving 18 after 51, is inconsistent as printed.
  The tests use `ANDIMM 22`, which gives 18.
* The original shows only the first part of its relprime program. The
  `relprime` and `gcd` bodies in the testbench are new code that follows the
  same convention.

The original design also includes an assembler, a host program with
pseudo-instructions such as `LOADIMM`. It is not hardware and is not part of
this RTL.
