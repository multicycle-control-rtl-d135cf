# A multicycle MIPS-subset processor

A single-cycle processor must finish every instruction in one clock period. It
therefore needs a separate instruction and data memory, extra adders for PC + 4
and the branch target, and a clock slow enough for the longest instruction.
This design runs each instruction over several short clock cycles instead. Each
cycle does one step: fetch, register read, ALU work, memory access or
write-back. An instruction uses only as many steps as it needs. Because steps
that need the same hardware fall in different cycles, the whole processor has
**one ALU and one memory**. A small finite-state machine sequences the steps
and drives the control signals.

Supported instructions (standard MIPS32 encodings):

| class  | instructions                  | cycles |
|--------|-------------------------------|--------|
| R-type | `add`, `sub`, `and`, `or`, `slt` | 4   |
| load   | `lw rt, imm(rs)`              | 5      |
| store  | `sw rt, imm(rs)`              | 4      |
| branch | `beq rs, rt, offset`          | 3      |

## Datapath: registers that carry values between cycles

Six registers hold values from one cycle to the next (`mc_reg` instances in
`mc_datapath`):

- **PC**: written only when `PCWrite` is high.
- **IR**: written only when `IRWrite` is high.
- **MDR, A, B, ALUOut**: written on *every* clock edge. Each of them holds a
  value for exactly one cycle, so it needs no enable.

The register file is always read at `IR[25:21]` (rs) and `IR[20:16]` (rt). A and
B therefore capture the source operands at the end of any cycle, with no
control signal. Likewise, MDR always captures the memory output.

Six multiplexers route data through the single ALU and the single memory:

| select     | 0               | 1             | 2                  | 3                        |
|------------|-----------------|---------------|--------------------|--------------------------|
| `IorD`     | PC              | ALUOut        |                    |                          |
| `RegDst`   | rt `IR[20:16]`  | rd `IR[15:11]`|                    |                          |
| `MemToReg` | ALUOut          | MDR           |                    |                          |
| `ALUSrcA`  | PC              | A             |                    |                          |
| `ALUSrcB`  | B               | constant 4    | sext(`IR[15:0]`)   | sext(`IR[15:0]`) << 2    |
| `PCSource` | ALU result      | ALUOut        |                    |                          |

The memory's write data always comes from B.

The ALU (`mc_alu`) is shared by every step. It computes PC + 4 in fetch, the
branch target in register fetch, and then, depending on the instruction, the
R-type result, the effective address, or A − B for the `beq` comparison. Its
`Zero` flag reports a zero result. ALU operation codes: `010` add, `110`
subtract, `000` and, `001` or, `111` slt (signed).

## Control: one FSM, nine states

`mc_control` is a state register plus next-state and output logic:

```
FETCH ──► DECODE ──┬─ beq ────► BRANCH ──────────────────────────► FETCH
                   ├─ R-type ─► RTYPE_EX ─► RTYPE_WB ─────────────► FETCH
                   └─ lw/sw ──► MEM_ADDR ─┬─ sw ─► MEM_WR ─────────► FETCH
                                          └─ lw ─► MEM_RD ─► REG_WR ► FETCH
```

| state     | work                                    | control values (all others 0)                                   |
|-----------|-----------------------------------------|-----------------------------------------------------------------|
| FETCH     | IR ← Mem[PC]; PC ← PC + 4               | MemRead, IRWrite, PCWrite; IorD=0, ALUSrcA=0, ALUSrcB=01, ALUOp=010, PCSource=0 |
| DECODE    | A, B ← regs; ALUOut ← PC + (sext(imm) << 2) | ALUSrcA=0, ALUSrcB=11, ALUOp=010                            |
| BRANCH    | if A == B then PC ← ALUOut              | ALUSrcA=1, ALUSrcB=00, ALUOp=110, PCSource=1, **PCWrite = Zero** |
| RTYPE_EX  | ALUOut ← A op B                         | ALUSrcA=1, ALUSrcB=00, ALUOp from the function field            |
| RTYPE_WB  | Reg[rd] ← ALUOut                        | RegWrite, RegDst=1, MemToReg=0                                  |
| MEM_ADDR  | ALUOut ← A + sext(imm)                  | ALUSrcA=1, ALUSrcB=10, ALUOp=010                                |
| MEM_WR    | Mem[ALUOut] ← B                         | MemWrite, IorD=1                                                |
| MEM_RD    | MDR ← Mem[ALUOut]                       | MemRead, IorD=1                                                 |
| REG_WR    | Reg[rt] ← MDR                           | RegWrite, RegDst=0, MemToReg=1                                  |

Three points in this schedule are easy to miss:

- **The branch target is computed before the instruction is known to be a
  branch.** In DECODE the ALU is otherwise idle, so it always computes
  PC + (offset << 2) into ALUOut. For non-branches the result is simply
  overwritten a cycle later. This is why DECODE is the same for every
  instruction.
- **BRANCH uses two ALU results from two different cycles.** The ALU subtracts
  A − B in the current cycle to produce `Zero`. Meanwhile, the PC is loaded from
  ALUOut, which holds the target computed in the previous cycle. `PCWrite` is
  the one output that depends on an input in the same cycle (it equals `Zero`).
  For that reason it is a separate port, not a field of the `ctrl_t` struct.
- **Every "write" takes effect at the clock edge that ends the step.** For
  example, in FETCH both the PC and IR are loaded at the end of the cycle, from
  the ALU result and the memory output of that same cycle.

Outputs a state does not name are driven to 0. This includes don't-care values.

## Files

| file | contents |
|------|----------|
| `rtl/mc_pkg.sv`      | ALU codes, opcodes, function codes, state enum, `ctrl_t` control struct |
| `rtl/mc_alu.sv`      | ALU with Zero flag |
| `rtl/mc_reg.sv`      | register with enable (PC, IR, MDR, A, B, ALUOut) |
| `rtl/mc_regfile.sv`  | 32 × 32 register file, two read ports, one write port |
| `rtl/mc_memory.sv`   | unified instruction/data memory with loader port |
| `rtl/mc_datapath.sv` | registers, muxes, sign-extend, shift-left-2, ALU, register file |
| `rtl/mc_control.sv`  | control FSM |
| `rtl/mc_cpu.sv`      | top: control + datapath + memory |
| `tb/tb_*.sv`         | one self-checking testbench per module |

## Top-level interface (`mc_cpu`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock; all state changes on the rising edge |
| `rst` | in | 1 | synchronous, active high: PC = 0, state FETCH, all registers cleared |
| `init_we`, `init_addr`, `init_wdata` | in | 1, 32, 32 | loader: writes one word per cycle at a byte address; use while `rst` is high |
| `pc`, `ir` | out | 32 | program counter and instruction register |
| `state` | out | 4 (`mc_pkg::state_t`) | current control state |

Parameter: `MEM_WORDS` (default 1024 words = 4 KiB) sets the memory size.
Addresses are byte addresses. Bits [1:0] are ignored, and address bits above
the array size wrap around. A program starts at address 0. There is no halt
instruction: end a program with `beq $0, $0, -1`.

## Choices this design makes on its own

The structure, the states and every control value above come from the source
description. The following details do not, and were chosen here:

- **Memory.** The size is 1024 words. Reads are combinational and gated by
  MemRead, so the output is 0 while MemRead is low. Writes happen at the clock
  edge. The loader port is an addition, and has priority over MemWrite.
- **Register file and reset.** Register 0 reads as 0 and ignores writes, as MIPS
  `$zero` does. Reset clears PC, the registers and the register file.
- **Encodings.** The encodings of and/or/slt in the ALU are this design's own,
  as are the opcode and function-field values. Add (`010`) and subtract (`110`)
  are given by the source.
- **Undefined inputs.** An unknown function code executes as add. An unknown
  opcode returns to FETCH after DECODE, so it acts as a no-op.
- **The `sw` memory-write step.** It uses MemWrite = 1 and IorD = 1. That is
  what the step must do (store B at the address in ALUOut), and it matches the
  state diagram.
- **How the FSM is built.** It is built as logic. The alternative of storing
  the state table in a ROM or PLA was not built, and neither was microprogrammed
  control.

## Verification

Each module has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`:

- `tb_mc_alu`: directed corner cases and 2000 random operations against a
  reference model. The reference computes signed slt from sign bits.
- `tb_mc_reg`, `tb_mc_regfile`, `tb_mc_memory`: random traffic against
  reference arrays.
- `tb_mc_control`: for each instruction class (including beq taken and not
  taken, all five functions, and an unknown opcode), it checks the state
  sequence, every control bit in every cycle against the table above, and the
  cycle count.
- `tb_mc_datapath`: the testbench acts as the control unit and the memory. It
  runs a hand-worked program (loads, all R-type operations, stores, a taken, an
  untaken and a backward branch) and checks the PC, IR, memory addresses and the
  final memory contents.
- `tb_mc_cpu`: end to end, at the default size. It runs four random programs of
  400 instructions with forward branches and random data. It compares the DUT
  against an instruction-level reference model in the testbench. It checks the
  PC of every fetch, the cycles of every instruction (3/4/4/5), the total cycle
  count, and the final registers and data memory. It also counts each FSM
  state, taken and untaken branches, every R-type function, writes aimed at
  register 0 and signed slt comparisons, and fails if any of these never
  happens.

- `tb_mc_cpu_examples`: the worked example instructions `add $t1,$t1,$t2`,
  `sw $a0,16($sp)`, a `lw` with a negative offset from `$sp`, and a taken
  `beq $t0,$t1,offset`. It checks per-instruction cycle counts, the PC
  sequence, register results, and the memory words written and skipped. It
  covers addressing through a non-zero base register, which the random
  programs do not use.

Simulating with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/mc_pkg.sv tb/tb_mc_cpu.sv --top-module tb_mc_cpu -o sim
./obj_dir/sim
```

Replace `tb_mc_cpu` with any other testbench name to run that one. All
testbenches finish in well under a second. Lint (`verilator --lint-only -Wall`)
reports only unused package constants and unused address bits.
