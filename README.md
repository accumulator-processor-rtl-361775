# A 16-bit multicycle accumulator processor

This processor has one working register, the accumulator `REG`. Every
arithmetic instruction takes one operand from `REG` and the other from
memory or from an immediate field, and writes the result back to `REG`. So
an instruction needs no register fields, and nearly the whole 16-bit word
can hold an address. The instruction set is 13 instructions in five formats.
A multicycle control unit runs each instruction in 3 to 6 clocks over one
shared ALU and one memory for code and data.

The RTL is in `rtl/` (SystemVerilog 2017, synthesizable) and the
self-checking testbenches are in `tb/`.

## Programmer's model

| State | Width | Role |
|---|---|---|
| `REG` | 16 | accumulator; also the output port; loaded from the input port at reset |
| `PC` | 16 | byte address of the next instruction; advances by 2 |
| `SP` | 16 | stack pointer; points at the next free stack slot; resets to `0x03FE` |
| memory | 1024 x 16 | code and data; direct word index = address bits [9:0] |

The architecture also has three internal registers. `IR` holds the
instruction, `OUT` holds the ALU result and `MDR` holds the last word read
from memory.

### Memory map

| Address | Use |
|---|---|
| `0x0000` | the constant 0. It is hard-wired: reads give 0 and writes are dropped. |
| `0x0002` | the comparison slot. Every branch compares `REG` with this word. |
| `0x0004`-`0x003E` | arguments and data |
| `0x0040` | start of the program text |
| up to `0x03FE` | stack, growing down from `0x03FE` |

Addresses step by 2, but the memory is indexed directly by the address.
Each address therefore names one 16-bit word, and the odd words are never
used. A program image has a real word at every even line and filler at the
odd lines.

After reset, `PC` is 0. The words below `0x0040` are zero at load time, and
a zero word decodes as `add 0`, which changes nothing. So the processor runs
through 32 no-ops and reaches the program at `0x0040`. That is 128 clocks.

### Instruction formats

```
 15 14 13 .............. 6  5   3  2   0
[        addr / imm [15:6]  | func3 | op ]   R, I, J, P types
[ cmp |  offset [13:6]      | func3 | op ]   C type (branches)
```

| Instr | op | func3 | Effect | Clocks |
|---|---|---|---|---|
| `add a` | 000 | 000 | `REG += M[a]` | 4 |
| `sub a` | 000 | 001 | `REG -= M[a]` | 4 |
| `lw a`  | 000 | 010 | `REG = M[a]` | 3 |
| `sw a`  | 000 | 011 | `M[a] = REG` | 3 |
| `beq o` | 001 | 000 | `if REG == M[2]: PC = PC+2+o` | 6 |
| `bne o` | 001 | 001 | `if REG != M[2]: ...` | 6 |
| `blt o` | 001 | 010 | `if REG <  M[2] (signed): ...` | 6 |
| `bge o` | 001 | 011 | `if REG >= M[2] (signed): ...` | 6 |
| `addi i`| 010 | 000 | `REG += i` | 3 |
| `subi i`| 010 | 001 | `REG -= i` | 3 |
| `jal a` | 011 | 000 | `PC = a` | 3 |
| `push`  | 100 | 000 | `M[SP] = PC+4; SP -= 2; PC += 2` | 5 |
| `pop`   | 100 | 001 | `SP += 2; PC = M[SP]` | 4 |

How the fields are read:

* All immediates and addresses are zero-extended. Nothing is sign-extended.
* The 10-bit fields (`a` and `i`) reach addresses 0-1023.
* The branch offset `o` is 8 bits and counts in address units. Branches can
  only go forward, by up to 255 bytes from the next instruction. A backward
  loop needs a forward branch out plus a `jal` back.
* The C-type format has a 2-bit compare-address field in bits [15:14], but
  the hardware ignores it. Every branch compares with the word at `0x0002`.
  The program stores the comparison value there with `sw 2` before the
  branch.
* An encoding that is not in the table behaves as a 2-clock no-op.

### Calling convention

A call is two instructions, `push` and then `jal target`. `push` stores the
address of its own word plus 4, which is the instruction after the `jal`,
and then decrements `SP`. The called routine ends with `pop`, which
increments `SP` and loads `PC` from the stack. Calls can nest. Arguments and
results are passed through the data area at `0x0004`-`0x003E` or in `REG`.

## Datapath

```
           MemIn: PC | OUT | SP                 A: REG | PC | 0 | SP
                 |                                   \
  PC --+----> [ MEMORY ] --+--> IR --> Immediate       ALU (+/-) --+--> OUT
  SP --+       ^ data in   |           Genie --> B: 2 | imm | MDR  |   SP
  OUT -+       |           +--> MDR ------------------^            |   PC (PCSource 1)
               |           +--> REG (RegSource 1)                  +--> REG (RegSource 0)
   DataSRC: REG | OUT      +--> PC  (PCSource 2)      Signage --> PC write gate
```

* `rtl/acc_alu.sv` holds the ALU together with its two operand muxes. The
  output `signage` is the branch condition that `BranchOp` selects. It
  compares A with B directly rather than through the sign of A-B, so the
  compare cannot overflow.
* `rtl/pc_reg.sv` writes `PC` when `PCWrite` is 1, or when `IsBranch` and
  `signage` are both 1. The three PC sources are `OUT`, the ALU result and
  the memory read data.
* The memory reads combinationally, so `Fetch` can load `IR` from `M[PC]` in
  the same clock that it writes `PC+2`. `MDR` has no enable: it samples the
  memory output on every clock, and the state after a read uses it.
* `rtl/imm_genie.sv` takes `IR[13:6]` for branches and `IR[15:6]` for
  everything else.

## Control unit (`rtl/acc_control.sv`)

The control unit is a Moore machine. Each state drives one constant set of
control bits. Only `Decode` and the states that end an instruction look at
the opcode. The control bits are collected in the struct `ctrl_t` in
`rtl/acc_pkg.sv`, and the mux encodings are enums there too.

| State | What it does |
|---|---|
| Fetch | `IR = M[PC]`, `PC = PC + 2` |
| Decode | `OUT = 0 + imm` (the data address, used by R-types) |
| AddSubMem / Add, Sub | `MDR = M[OUT]`; then `REG = REG ± MDR` |
| LW / SW | `REG = M[OUT]` / `M[OUT] = REG` |
| Addi, Subi | `REG = REG ± imm` |
| Jump | `PC = 0 + imm` |
| CompAddr | `OUT = 0 + 2` (the comparison slot) |
| ComparisonMem | `MDR = M[OUT]`; `OUT = PC + offset` (the branch target) |
| BEQ/BNE/BLT/BGE | ALU computes `REG - MDR` and the condition; `PC = OUT` if it holds |
| Compared | an idle clock, then back to Fetch |
| PCInc, PushStack, Push | `OUT = PC + 2`; `M[SP] = OUT`; `SP = SP - 2` |
| SPInc, Pop | `SP = OUT = SP + 2`; `PC = M[OUT]` |

The clock counts in the instruction table follow from these paths. A
program of simple loads and stores runs at a CPI near 3.6: the relPrime
program below measures 3.58.

## Input and output

The argument goes on `io_in` and is loaded into `REG` while `rst` is high.
The program typically saves it first with `sw 4`. The result is whatever
`REG` holds, which is visible on `io_out` at all times. A program ends by
jumping to itself (`HALT: jal HALT`).

The `ld_*` port loads a program into memory and reads memory back. It writes
only in clocks in which the processor does not write. It is meant to be used
while `rst` is high.

## Where this RTL decides what the source description left open

* **Stack top.** The stack is described as starting at `0x0400`, but the
  memory has 10-bit addresses, and `0x0400` would alias the hard-wired zero
  word. `SP` therefore resets to `0x03FE`, the highest even word. Change the
  `SP_INIT` parameter to move it.
* **Fetch does not write `REG`.** The state chart this design follows marks
  `RegWrite` in the Fetch state, which would overwrite the accumulator with
  `PC+2` on every instruction. That contradicts the accumulator's role, so
  the bit is left 0.
* **Compare address fixed at `0x0002`.** The C-type format also has a
  compare-address field, but the described state sequence always forms
  address 2. The state sequence is followed.
* **Signed `blt`/`bge`.** Signedness is not specified; it is chosen here.
* **Reset values** and input loading during reset are this design's own
  choices, and so is the no-op behaviour of undefined encodings. The
  `Compared` state writes nothing, but it is kept, so a branch takes 6
  clocks.
* **jal range.** The `jal` range is the 10-bit format field, addresses
  0-1023.

## Verification

Each module has a testbench `tb/tb_<module>.sv` that checks it against
values the testbench computes itself. Every testbench prints
`TB_RESULT checks=N failures=M`. The most complete one is
`tb/tb_acc_cpu.sv`, which runs the whole processor at its default
parameters:

* It contains its own interpreter of the 13 instructions. Each time the
  processor returns to Fetch, the testbench compares `PC` and `REG` with the
  interpreter. It also checks the clock count of the instruction just
  finished. At the end of each program it compares all 1024 memory words.
* It assembles its programs with SystemVerilog encoding functions. The
  programs are:
  * a directed program that uses every instruction, takes and skips each
    branch kind, nests two calls and writes the zero word;
  * three short sequences;
  * relPrime(n): the smallest m >= 2 coprime with n, with gcd computed by
    repeated subtraction in a called procedure. It runs for every n from 3
    to 64 and for n = 210, 720, 2310, 2520 and 5040.
* It counts each mechanism (each instruction, each branch taken and not
  taken, a nested call, a write to address 0) and fails if any of them never
  occurs.

relPrime(5040) returns 11 in 122,523 instructions and 439,030 clocks, a CPI
of 3.58. These counts include the 32 no-ops before `0x0040`. The program is
45 instructions (90 bytes) long. Simulation takes well under a second.

## Simulating

```
verilator --binary --timing --assert -Irtl rtl/acc_pkg.sv tb/tb_acc_cpu.sv \
          --top-module tb_acc_cpu -Mdir obj && ./obj/Vtb_acc_cpu
```

Replace `acc_cpu` with any other module name to run its unit test.
`acc_pkg.sv` must be read first. The other RTL files are found through
`-Irtl`.

## Files

| File | Content |
|---|---|
| `rtl/acc_pkg.sv` | opcodes, mux-select enums, `ctrl_t`, state enum |
| `rtl/acc_cpu.sv` | top level: wiring of all blocks |
| `rtl/acc_control.sv` | multicycle state machine |
| `rtl/acc_alu.sv` | operand muxes, adder/subtractor, branch condition |
| `rtl/imm_genie.sv` | immediate selection and zero extension |
| `rtl/mem_wrapper.sv` | MemIn and DataSRC muxes around the memory |
| `rtl/acc_memory.sv` | 1024 x 16 memory, zero word, load port |
| `rtl/main_reg.sv` | accumulator with RegSource mux and input load |
| `rtl/pc_reg.sv` | PC with PCSource mux and branch write gate |
| `rtl/ir_reg.sv` | instruction register and field split |
| `rtl/word_reg.sv` | enabled register used for OUT, SP and MDR |
