# Beta: a single-cycle 32-bit RISC processor with supervisor mode, traps and interrupts

This is synthesizable SystemVerilog for the Beta, the 32-bit load/store
processor used to teach computer architecture. It executes one instruction
per clock cycle. It implements the full base instruction set: ALU operations
in register and literal form, LD, ST, LDR, JMP, BEQ and BNE. The optional
MUL/DIV instructions can be switched on with a parameter.

The design adds three things to a plain datapath:

- **A supervisor bit.** Bit 31 of the PC marks supervisor mode.
- **Exceptions.** Any opcode that is not implemented traps.
- **An interrupt input.** IRQ is taken only in user mode.

Most of the subtle logic in the design exists to keep that supervisor bit
honest.

## The datapath

```
            +-------------------------- PCSEL -------------------------+
            |  4: 0x80000008  3: 0x80000004  2: JT  1: branch  0: PC+4 |
            +-----------------------------+----------------------------+
                                          v
   ia <-------------------------------- [ PC ] --> +4 --> PC+4
                                          |
   id --> Ra,Rb,Rc,C           branch adder: PC+4 + 4*SEXT(C)
             |
             v
   regfile RA1=Ra, RA2=(RA2SEL ? Rc : Rb), WA=(WASEL ? XP : Rc)
     RD1 --> Z = (RD1 == 0), JT, ASEL mux (RD1 | branch addr with bit31=0)
     RD2 --> BSEL mux (RD2 | SEXT(C)), mwd
             ALU(A, B) --> ma
   WDSEL: 0 PC+4, 1 ALU, 2 mrd  --> register write data
```

| Module | Role |
|---|---|
| `beta` | Top level. Wires the blocks below together and exposes the memory bus. |
| `pc_unit` | PC register, the PC+4 incrementer, the five-way next-PC mux, and reset. |
| `branch_adder` | Computes PC+4 + 4·SEXT(C), for branches and LDR. |
| `regfile` | 32 × 32 registers with two asynchronous read ports and one write port clocked on the rising edge. R31 always reads 0. |
| `wa_mux` | Picks the write address: Rc, or XP (R30). |
| `operand_sel` | The ASEL and BSEL operand muxes, the Z flag, and the JMP target. |
| `alu` | ADD, SUB, CMPEQ/LT/LE (signed), AND, OR, XOR, SHL, SHR, SRA, pass-A, and optionally MUL/DIV. |
| `wd_mux` | Picks the register write data: PC+4, the ALU result, or memory. |
| `control` | Combinational decoder, plus the trap, interrupt and reset overrides. |
| `beta_pkg` | Opcodes, ALU function codes, PCSEL/WDSEL codes, and the fixed addresses. |

Instruction fields:

| Field | Bits |
|---|---|
| opcode | `[31:26]` |
| Rc | `[25:21]` |
| Ra | `[20:16]` |
| Rb | `[15:11]` |
| literal C | `[15:0]` |

The opcode values follow the standard Beta encoding:

| Opcode | Instruction |
|---|---|
| 0x18 | LD |
| 0x19 | ST |
| 0x1B | JMP |
| 0x1C | BEQ |
| 0x1D | BNE |
| 0x1F | LDR |
| 0x20–0x2E | ALU, register form |
| 0x30–0x3E | ALU, literal form |

## The supervisor bit: what may change PC[31]

Only reset, an illegal-instruction trap or an interrupt can set PC[31]. The
datapath enforces this with the following wiring:

- **PC+4.** The incrementer adds only into bits 30:0, and bit 31 is copied
  from the current PC. A carry out of bit 30 is dropped, so sequential
  execution can never enter or leave supervisor mode.
- **Branch target.** This PCSEL input also takes bit 31 from the current
  PC. A branch cannot change the mode.
- **JMP target.** JT is `{PC31 & Reg[Ra][31], Reg[Ra][30:2], 2'b00}`:

  | old PC31 | Reg[Ra][31] | new PC31 |
  |---|---|---|
  | 0 | x | 0 |
  | 1 | 0 | 0 |
  | 1 | 1 | 1 |

  A JMP can therefore leave supervisor mode, but it can never enter it.
- **LDR address.** This is the branch-adder output with bit 31 forced to 0.
  Address arithmetic ignores the mode bit.
- **Saved PC+4.** The PC+4 value that BEQ, BNE, JMP and traps write to a
  register keeps bit 31. A handler that returns with `JMP(XP)` therefore goes
  back to the mode it came from.
- **Instruction fetch.** The memory sees the whole PC on `ia`. A
  1024-word memory uses only `ia[11:2]`, so it ignores bit 31.

## Reset, traps and interrupts

| Event | Next PC | Register write | Other effects |
|---|---|---|---|
| reset (synchronous, high) | 0x80000000 | none | WR = 0, MOE = 0 |
| unimplemented opcode | 0x80000004 | XP ← PC+4 | WR = 0, MOE = 0 |
| IRQ while PC31 = 0 | 0x80000008 | XP ← PC+4 | WR = 0, MOE = 0; the current instruction is aborted |
| IRQ while PC31 = 1 | (ignored) | — | — |

Software puts branch instructions at 0x0, 0x4 and 0x8. These send control to
the reset, illegal-instruction and interrupt handlers.

An interrupt aborts the instruction it lands on. Its register write, memory
write and branch all do not happen, and XP receives the address of the
*next* instruction. To re-execute the aborted instruction, a handler
subtracts 4 from XP before `JMP(XP)`.

Priority is reset > interrupt > illegal-op trap. An interrupt in user mode
that lands on an illegal opcode is taken as an interrupt. The illegal opcode
traps once the handler returns to it.

Unimplemented opcodes include:

- every opcode outside the list above;
- ALU function codes 7, B and F;
- MUL, MULC, DIV and DIVC when `MULDIV = 0`.

## Interface and timing

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | Clock. All state changes on the rising edge. |
| `reset` | in | 1 | Synchronous reset. Hold it high for at least one rising edge. |
| `irq` | in | 1 | Interrupt request. If it is high during a user-mode cycle, that cycle's instruction is replaced by the interrupt at the next rising edge. |
| `ia` | out | 32 | Instruction address: the PC. |
| `id` | in | 32 | Instruction at `ia`. It must be valid combinationally, in the same cycle. |
| `ma` | out | 32 | Data address: the ALU output. |
| `moe` | out | 1 | Data read enable, high for LD and LDR. |
| `mrd` | in | 32 | Data at `ma`. It must be valid in the same cycle. |
| `wr` | out | 1 | Write `mwd` to `ma` at the next rising edge. |
| `mwd` | out | 32 | Store data: Reg[Rc], read on register port 2. |

The processor expects an external memory with two asynchronous read ports and
one clocked write port. The reference memory is 1024 words, addressed by bits
11:2, with one instruction port and one data port. A memory of that kind is
provided as a simulation model in `tb/beta_mem_model.sv`.

All of an instruction happens in one cycle:

1. Fetch.
2. Register read.
3. The ALU or branch-adder operation.
4. The memory read.

The results (the register write, the memory write and the new PC) are then
committed together on the next rising edge. Bus outputs are stable just
before that edge, which is where the testbenches sample them. CPI is 1 for
every instruction.

The registers are not reset. Software must initialise them.

`beta` contains three concurrent assertions:

- WR and MOE are never high in the same cycle.
- WR stays low during reset.
- PC31 goes from 0 to 1 only through PCSEL 3 or 4, that is, through a trap or an interrupt.

Simulate with assertions enabled (`--assert` in Verilator) to use them.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `beta`, `alu`, `control` | `MULDIV` | 0 | Implements MUL/MULC/DIV/DIVC. The product is the low 32 bits of the signed product. The quotient is signed and truncated toward zero. x/0 gives 0xFFFFFFFF, and −2³¹/−1 gives −2³¹. |
| `regfile` | `NREGS`, `WIDTH` | 32, 32 | The register file's geometry. Register NREGS−1 reads as zero. |

## What is specified and what is chosen here

These parts follow the published design of this processor:

- the datapath structure and the numbering of its mux inputs;
- the supervisor-bit rules;
- the three fixed addresses, with XP as the link register;
- the interrupt and trap overrides;
- the processor's terminals;
- the 1024-word memory.

These are choices made for this implementation:

- **Decoder.** A combinational decoder with external Z logic, rather than
  a control ROM.
- **ALU encoding.** The 4-bit ALU function code is the low four bits of the
  opcode, plus a pass-A code (7) for LDR.
- **MOE during traps.** MOE is forced low during traps, interrupts and
  reset.
- **WERF during reset.** WERF is forced low during reset.
- **Unused select codes.** Unused PCSEL codes select PC+4, and WDSEL = 3
  selects the ALU.
- **MUL/DIV.** They are off by default, so those opcodes trap as
  unimplemented.
- **Reset.** Reset is synchronous. The PC's two low bits are hard-wired to
  zero.
- **Instruction encoding.** The opcode values are the standard ones of this
  instruction set.

The original acceptance program is not included. Its exact behaviour cannot
be reproduced here, for example that it first reaches address 0x3C4 on cycle
277. The testbenches described below use their own programs and an
independent reference model instead.

## Verification

Each module has a self-checking testbench, `tb/tb_<module>.sv`. Every
testbench ends with a `TB_RESULT checks=N failures=M` line.

- **`tb_beta`** runs the processor at its default parameters against an
  instruction-level reference model (`tb/beta_ref_pkg.sv`). It uses a 100 ns
  clock. Just before every rising edge it compares `ia`, `ma`, `mwd`, `wr`,
  `moe` and all 31 registers with the model. Phase 1 is a directed program:
  - every ALU operation;
  - LD, ST and LDR;
  - taken and untaken BEQ and BNE;
  - two illegal opcodes in supervisor mode and one in user mode;
  - a JMP into user mode;
  - a JMP that tries to set PC31;
  - an IRQ in cycle 10, while in supervisor mode, which must be ignored;
  - an IRQ inside a user-mode loop, which must be taken.

  It ends in a two-instruction loop and checks register values worked out by
  hand. Phase 2 runs 40 random programs of 1000 cycles each. Each program
  starts through reset, and the IRQ input is random. The test fails if any
  mechanism never occurred: reset, trap, interrupt taken, interrupt ignored,
  a JMP clearing PC31, a JMP prevented from setting it, branches taken and
  not taken, LD, ST, LDR, or a write to R31.
- **`tb_beta_muldiv`** runs the same kind of random test with `MULDIV = 1`.
- **`tb_alu`** and **`tb_control`** are exhaustive or corner-case tests of
  those units, covering both `MULDIV` settings. The remaining unit
  testbenches check their muxes and adders against formulas computed in the
  testbench.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  rtl/beta_pkg.sv tb/beta_asm_pkg.sv tb/beta_ref_pkg.sv rtl/*.sv \
  tb/beta_mem_model.sv tb/tb_beta.sv --top-module tb_beta -Mdir obj -o sim
./obj/sim
```

For a unit test, list `rtl/beta_pkg.sv`, the module and its testbench. The
testbenches need no input files. Test programs are built with the encoder
functions in `tb/beta_asm_pkg.sv`, or generated at random.
