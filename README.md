# A single-cycle CPU for a seven-instruction MIPS subset

This is a CPU that executes each instruction in exactly one clock cycle.
Within one cycle an instruction is fetched, decoded, its operands are read,
the ALU computes, data memory is read or written, and at the single rising
clock edge that ends the cycle the PC, the register file and the data memory
are all updated at once. Nothing is pipelined and nothing stalls, so the
clock period must cover the slowest instruction (a load).

The datapath itself is simple. Most of the design's interest is in its
**control**: every instruction is a fixed setting of nine control points,
and the controller is a two-level AND/OR array that produces those settings
from the opcode and function fields. The design follows the single-cycle
processor of UC Berkeley's CS61C course (Lecture 20, "Controlling a
Single-Cycle CPU"). Where that lecture is silent or contradicts itself, the
choices made here are listed under [Choices and departures](#choices-and-departures).

## The instruction subset

| instruction  | format | op       | func    | register transfer |
|--------------|--------|----------|---------|-------------------|
| `add rd,rs,rt` | R    | `000000` | `100000` | R[rd] = R[rs] + R[rt] |
| `sub rd,rs,rt` | R    | `000000` | `100010` | R[rd] = R[rs] - R[rt] |
| `ori rt,rs,imm`| I    | `001101` | –        | R[rt] = R[rs] OR ZeroExt(imm16) |
| `lw rt,imm(rs)`| I    | `100011` | –        | R[rt] = MEM[R[rs] + SignExt(imm16)] |
| `sw rt,imm(rs)`| I    | `101011` | –        | MEM[R[rs] + SignExt(imm16)] = R[rt] |
| `beq rs,rt,imm`| I    | `000100` | –        | if R[rs] == R[rt]: PC = PC + 4 + SignExt(imm16)·4 |
| `j target`     | J    | `000010` | –        | PC = {PC[31:28], target, 00} |

Every instruction that does not branch or jump also does PC = PC + 4.

Fields: op `[31:26]`, rs `[25:21]`, rt `[20:16]`, rd `[15:11]`,
shamt `[10:6]` (unused), func `[5:0]`, imm16 `[15:0]`, target `[25:0]`.

Any other op/func pair decodes to no instruction. It writes nothing, and the
PC advances by 4, so it behaves as a no-op.

## How one cycle flows

```
          +--------------------- instr_fetch_unit ---------------------+
          |  PC --> inst_memory --> Instruction<31:0>                  |
          |   ^                                                        |
          |   +-- jump mux <-- branch mux <-- PC+4 / PC+4+SignExt*4    |
          +-----^------------^-----------^-----------------------------+
              Jump        nPC_sel       Zero
                ^            ^            |
   op,func --> main_control --> ctrl -----+------------------+
                                          |                  v
   rs,rt,rd,imm16 -------------------> datapath: regfile, extender, ALU,
                                       data_memory, RegDst/ALUSrc/MemtoReg muxes
```

- **Fetch** (`instr_fetch_unit`). The PC addresses the instruction memory,
  which is read combinationally. The PC's two low bits are always `00` and
  are not stored.
- **Decode** (`main_control`). op and func become the control struct
  `ctrl_t`.
- **Register read** (`regfile`). busA = R[rs] and busB = R[rt] are
  combinational reads.
- **Execute** (`extender`, `alu`). The ALU's second operand is busB
  (ALUSrc = 0) or the immediate (ALUSrc = 1). ExtOp selects zero extension
  (0) or sign extension (1) for the immediate.
- **Memory** (`data_memory`). The ALU result is the address and busB is the
  store data. The read is combinational.
- **Write-back**. busW is the ALU result (MemtoReg = 0) or the loaded word
  (MemtoReg = 1). It goes to R[rd] when RegDst = 1 and to R[rt] when
  RegDst = 0.
- **Clock edge**. The PC takes the next address. The register file writes
  if RegWr = 1, and data memory writes if MemWr = 1.

The longest path is that of `lw`: clock-to-Q of the PC, instruction memory
access, register file read, 32-bit add, data memory access, and setup of the
register file write. The design contains no timing model; it is purely
functional RTL.

## Next-address logic

The next-address logic is the part that needs the most care. Two muxes sit
in front of the PC:

1. **Branch mux.** Input 0 is PC + 4. Input 1 is PC + 4 + (SignExt(imm16) << 2).
   The "PC Ext" block sign-extends the offset and appends `00`. A second
   adder then adds the result to the output of the +4 adder.
2. **Jump mux**, after the branch mux. Input 0 is the branch mux output.
   Input 1 is `{PC[31:28], target[25:0], 00}`.

The controller's `nPC_sel` means "this is a branch instruction", not "take
the branch". The branch mux select is therefore `nPC_sel AND Zero`:

| nPC_sel | Zero | branch mux |
|---------|------|------------|
| 0       | x    | 0 (PC+4)   |
| 1       | 0    | 0 (PC+4)   |
| 1       | 1    | 1 (target) |

For `beq` the ALU subtracts, so Zero = 1 exactly when R[rs] == R[rt]. For a
jump the ALU still computes something from the instruction's bit fields, and
Zero may well be 1. This does no harm, because `nPC_sel` is 0 for `j` and the
jump mux overrides the branch mux anyway. The system test counts jumps made
while Zero was 1 to show this case.

The jump target's upper four bits come from the PC of the jump itself. Real
MIPS takes them from PC + 4; the two differ only for a jump in the last word
of a 256 MB region.

## The controller

The controller is built as a programmable-logic-array structure.

**AND plane.** There is one product term per instruction. Each term is the
AND of all six op bits, each used true or inverted. For `add` and `sub` the
term also includes all six func bits, combined with the R-type term:

```
rtype = ~op5 ~op4 ~op3 ~op2 ~op1 ~op0      ori  = ~op5 ~op4  op3  op2 ~op1  op0
lw    =  op5 ~op4 ~op3 ~op2  op1  op0      sw   =  op5 ~op4  op3 ~op2  op1  op0
beq   = ~op5 ~op4 ~op3  op2 ~op1 ~op0      jump = ~op5 ~op4 ~op3 ~op2  op1 ~op0
add   = rtype func5 ~func4 ~func3 ~func2 ~func1 ~func0
sub   = rtype func5 ~func4 ~func3 ~func2  func1 ~func0
```

**OR plane.** Each control signal is the OR of the terms that need it:

| signal     | equation            | meaning when 1 |
|------------|---------------------|----------------|
| RegDst     | add + sub           | write R[rd] (else R[rt]) |
| ALUSrc     | ori + lw + sw       | ALU B = immediate (else busB) |
| MemtoReg   | lw                  | busW = memory (else ALU) |
| RegWr      | add + sub + ori + lw | write register file |
| MemWr      | sw                  | write data memory |
| nPC_sel    | beq                 | branch instruction |
| Jump       | jump                | take jump target |
| ExtOp      | lw + sw             | sign-extend (else zero-extend) |
| ALUctr[0]  | sub + beq           | ALUctr: 00 ADD, 01 SUB, 10 OR |
| ALUctr[1]  | ori                 | |

The full control table has don't-care entries: RegDst and MemtoReg for `sw`
and `beq`, ExtOp for R-type, everything but the writes and Jump for `j`, and
so on. Writing each signal as the OR of only the terms that need it turns
every don't-care into 0. This is the simplification the don't-cares allow: a
signal needs no term for an instruction that does not care about it. The two
write enables (RegWr and MemWr) are never don't-cares, since a stray write
would corrupt state.

## Interface of `single_cycle_cpu`

| port | dir | width | |
|------|-----|-------|-|
| `clk` | in | 1 | everything updates on the rising edge |
| `rst` | in | 1 | synchronous, active high: PC ← `RESET_PC`, registers ← 0; data memory writes are blocked while it is high |
| `prog_we`, `prog_addr`, `prog_data` | in | 1, log2(`IMEM_WORDS`), 32 | write port for loading the instruction memory, one word per clock, word-indexed |
| `pc`, `instr` | out | 32, 32 | address and encoding of the instruction executing this cycle |
| `ctrl` | out | `ctrl_t` | its control points |
| `zero` | out | 1 | ALU Zero |
| `reg_wr`, `reg_waddr`, `reg_wdata` | out | 1, 5, 32 | the register write that happens at the coming edge |
| `mem_wr`, `mem_addr`, `mem_wdata` | out | 1, 32, 32 | the memory write that happens at the coming edge |

The outputs are a complete execution trace: comparing them each cycle with
an instruction-set model verifies the CPU.

| parameter | default | |
|-----------|---------|-|
| `IMEM_WORDS` | 1024 | instruction memory size in 32-bit words (power of two) |
| `DMEM_WORDS` | 1024 | data memory size in 32-bit words (power of two) |
| `RESET_PC` | 0 | PC after reset |

Both memories are word-addressed by byte address bits `[log2(WORDS)+1:2]`.
The two lowest bits are ignored, so there is no alignment trap, and higher
bits wrap around. Register 0 always reads 0, and writes to it are dropped.
Arithmetic wraps modulo 2^32, and there is no overflow exception.

To run a program:

1. Hold `rst` high.
2. Write the words through `prog_*`.
3. Release `rst`. The CPU starts at `RESET_PC` on the next cycle.

The data memory is not cleared by reset. A program that needs zeroed memory
must clear it; the system test does this with a store loop.

## Choices and departures

The lecture leaves these points open or states them in two ways. This design
does the following:

- **Branch target.** The design computes PC + 4 + SignExt(imm16)·4, the form
  the fetch-unit datapath computes. One summary line of the lecture writes
  PC + SignExt(imm16)‖00 instead.
- **Store data.** The stored word is R[rt], as the datapath wires busB to the
  memory's data input. One summary line of the lecture writes R[rs].
- **ori.** ori is an OR with the zero-extended immediate. One summary line of
  the lecture writes "+".
- **ALUctr width.** ALUctr is 2 bits (`00` ADD, `01` SUB, `10` OR), as in the
  controller's equations; the control table's heading says `ALUctr<2:0>`.
  Code `11` is never produced, and the ALU returns 0 for it.
- **nPC_sel for `j`.** The design sets it to 0, following `nPC_sel = beq`.
  The control table leaves it open.
- **Register 0.** Register 0 is hard-wired to zero, as in MIPS.
- **Undefined opcodes.** An undefined op/func pair is a no-op.
- **Memories.** Memory sizes, addressing and the program load port are this
  design's own. The lecture treats both memories as ideal (combinational read,
  clocked write).
- **Reset.** The reset behaviour is this design's own.
- **Clock edge.** Everything updates on the rising edge.

## Files

`rtl/`:

| file | |
|------|-|
| `cpu_pkg.sv` | opcode/func constants, `alu_ctr_e`, control struct `ctrl_t` |
| `single_cycle_cpu.sv` | top: fetch unit + controller + datapath |
| `instr_fetch_unit.sv` | PC, adders, PC Ext, branch and jump muxes; instantiates `inst_memory` |
| `inst_memory.sv` | instruction memory with load port |
| `main_control.sv` | AND/OR controller |
| `datapath.sv` | register file, extender, ALU, data memory and the three muxes |
| `regfile.sv`, `extender.sv`, `alu.sv`, `data_memory.sv` | the datapath units |

`tb/` has one self-checking testbench per module, named `tb_<module>.sv`.
Each prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_single_cycle_cpu` runs the CPU at its default sizes:
  1. A store loop clears all 1024 data words. The test checks that this
     takes exactly 4097 cycles.
  2. A loop that sums 10..1 stores partial sums, loads the result back and
     writes register 0. The test checks the stored values, the loaded 55 and
     a run of exactly 67 cycles.
  3. Twelve random programs of 2000 cycles each are compared, cycle by
     cycle, with an instruction-level model written in the testbench. The
     test counts each instruction, taken and untaken branches, jumps while
     Zero = 1, writes to register 0, loads of previously stored words and
     undefined encodings. It fails if any of these never occurs.
- `tb_main_control` applies all 4096 op/func pairs and checks them against
  the control table.
- The other testbenches compare their unit with an independent model under
  random stimulus.

## Simulating

With Verilator 5 (the package must come first):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_single_cycle_cpu \
    rtl/cpu_pkg.sv rtl/*.sv tb/tb_single_cycle_cpu.sv -Mdir obj_cpu -o sim
./obj_cpu/sim
```

Replace `tb_single_cycle_cpu` with any other `tb_<module>` to run a unit
test. Every run takes well under a second. The testbenches initialise all
state they read, so they also pass with `+verilator+rand+reset+2`.

To extend the instruction set, the changes go in these places:

1. Add the encoding to `cpu_pkg`.
2. Add a product term and its OR-plane contributions in `main_control`.
3. If needed, add a new ALU code or a new mux input in `datapath`.
4. Add the instruction to the reference model in `tb_single_cycle_cpu`.
