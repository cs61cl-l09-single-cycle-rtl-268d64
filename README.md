# MIPS-lite single-cycle CPU

This is a small MIPS processor. It finishes every instruction in one long
clock cycle. On each rising edge of the clock it commits one whole
instruction: the register file, the data memory and the PC all update
together. The clock period has to cover the slowest instruction, which is a
load. Between edges the instruction goes through five steps, all of them
combinational:

1. **Instruction fetch.** The instruction memory is read at PC. PC + 4 is
   computed (memory is byte-addressed and instructions are 4 bytes long).
2. **Decode and register read.** The opcode and funct fields set the control
   points. Registers rs and rt are read.
3. **Execute.** The ALU adds, subtracts or ORs. It also forms load and store
   addresses, and compares two registers for a branch.
4. **Memory.** Only lw and sw use the data memory.
5. **Register write.** The result is written to rd or rt.

Not every instruction uses every step. A store writes no register, and a
branch uses neither the memory nor register write. The datapath offers all
five steps, and the controller picks the ones an instruction needs.

## Instruction set

The CPU runs the "MIPS-lite" subset. It uses the standard 32-bit MIPS
encodings.

| instruction         | format | op     | funct  | register transfer                                  |
|---------------------|--------|--------|--------|----------------------------------------------------|
| `addu rd, rs, rt`   | R      | 0x00   | 0x21   | R[rd] = R[rs] + R[rt]                              |
| `subu rd, rs, rt`   | R      | 0x00   | 0x23   | R[rd] = R[rs] - R[rt]                              |
| `ori  rt, rs, imm`  | I      | 0x0d   |        | R[rt] = R[rs] \| ZeroExt(imm16)                    |
| `lw   rt, imm(rs)`  | I      | 0x23   |        | R[rt] = Mem[R[rs] + SignExt(imm16)]                |
| `sw   rt, imm(rs)`  | I      | 0x2b   |        | Mem[R[rs] + SignExt(imm16)] = R[rt]                |
| `beq  rs, rt, imm`  | I      | 0x04   |        | PC = PC + 4 + (R[rs] == R[rt] ? SignExt(imm16)\*4 : 0) |

Field positions:

- R-type: `op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0]`
- I-type: `op rs rt imm16[15:0]`

Any other opcode or funct runs as a no-operation: nothing is written and the
PC advances by 4. The all-zero word is therefore a NOP. Overflow is ignored,
as the "u" instructions require. There are no jumps and no `slti`.

## Datapath

```
            +------------------ next address logic ------------------+
            |   PC+4 = PC + 4                                         |
            |   target = PC+4 + SignExt(imm16)<<2                     |
            v   next = (nPC_sel & Equal) ? target : PC+4              |
   +----+   +--------------+  instr                                   |
   | PC |-->| instr memory |------+--> control --> control points     |
   +----+   +--------------+      |                                   |
     ^                            |rs,rt,rd,imm16                     |
     |                            v                                   |
     |      RegDst mux (rt/rd) -> Rw   +---------+ busA  +-----+      |
     |                   rs ---------->| RegFile |------>|     |Zero--+--> Equal
     |                   rt ---------->| 32 x 32 | busB  | ALU |
     |                                 |         |--+--->|     |--+--> address
     |                                 +---------+  |  ^ +-----+  |
     |                                     ^ busW   |  | ALUSrc   v
     |                                     |        |  +-- mux  +------+
     |                                     |        |  imm32    | data |
     |                                     |        +---------->| mem  |
     |                                     |        (write data)+------+
     |                                     +--- MemtoReg mux <----+ (ALU result / memory data)
     +--- (all state updates on the same rising edge)
```

- **Register file** (`regfile`). It has 32 registers of 32 bits.
  - Two read ports, RA→busA and RB→busB, are combinational.
  - One write port, RW/busW, writes on the rising edge when RegWr is 1.
  - Register 0 always reads as 0 and ignores writes.
  - RA is always rs and RB is always rt.
- **RegDst multiplexer.** It chooses the register to write: rd for R-type
  (RegDst = 1) and rt for I-type (RegDst = 0).
- **Extender** (`extender`). It widens imm16 to 32 bits.
  - With ExtOp = 0 it zero-extends, for `ori`.
  - With ExtOp = 1 it sign-extends, for the lw/sw offsets.
- **ALUSrc multiplexer.** The ALU's B input is busB (0) or the extended
  immediate (1).
- **ALU** (`alu`). It does ADD, SUB, OR, AND and signed set-less-than, and
  also gives Zero and overflow flags. The branch condition Equal is the Zero
  flag of a subtraction. The CPU does not need a separate comparator.
- **Data memory** (`ideal_mem`). The ALU result is the address and busB
  (R[rt]) is the write data. It is written on the rising edge when MemWr
  is 1.
- **MemtoReg multiplexer.** The register write value is the ALU result (0) or
  the data memory output (1).

For every multiplexer, select 0 picks input `a` and select 1 picks input `b`.

## Control

`control` decodes op and funct into a `ctrl_t` struct, defined in `mips_pkg`:

| instr | RegDst | RegWr | ALUSrc | ExtOp | ALUctr | MemWr | MemtoReg | nPC_sel |
|-------|--------|-------|--------|-------|--------|-------|----------|---------|
| addu  | 1 (rd) | 1     | 0      | -     | ADD    | 0     | 0        | 0       |
| subu  | 1 (rd) | 1     | 0      | -     | SUB    | 0     | 0        | 0       |
| ori   | 0 (rt) | 1     | 1      | 0     | OR     | 0     | 0        | 0       |
| lw    | 0 (rt) | 1     | 1      | 1     | ADD    | 0     | 1        | 0       |
| sw    | -      | 0     | 1      | 1     | ADD    | 1     | -        | 0       |
| beq   | -      | 0     | 0      | 1     | SUB    | 0     | -        | 1       |

A "-" means the value does not matter. The decoder drives 0 there.

ALUctr encoding: ADD = 0, SUB = 1, OR = 2, AND = 3, SLT = 4.

The table follows from the register transfer of each instruction. The
encodings are this design's choice.

## Instruction fetch and the next PC

`ifetch` holds three things:

- the PC, an `nbit_register` that is written every cycle;
- the instruction memory;
- two adders and a multiplexer.

The first adder gives PC + 4. The second adds the branch offset to it. The
offset is imm16, sign-extended and shifted left by two, so it counts in
instructions. The multiplexer takes the branch target only when the
instruction is a branch (nPC_sel) *and* the ALU reports Equal.

A beq with offset -1 branches to itself. The test programs use it to stop.

**Reset.** `rst` is synchronous and active high. It sets the PC to
`RESET_PC`, which defaults to 0. Registers and data memory are not reset.

**Loading a program.** The CPU never writes its instruction memory. While
`rst` is 1, a load port (`imem_load_we`, `imem_load_addr`, `imem_load_data`)
takes over the memory's address and writes one word per clock edge. The
address is a byte address. Out of reset the load port is ignored.

## Adder, adder-subtractor and overflow

The arithmetic is built from explicit parts rather than a `+` operator:

- **`adder`** is a ripple chain of 1-bit full adders. Besides CarryIn, Sum
  and CarryOut, it brings out the carry into the top bit.
- **`addsub`** turns the adder into a subtractor. Each bit of B goes through
  an XOR gate driven by `sub`, so the XOR acts as a conditional inverter.
  `sub` also drives CarryIn, which gives A + ~B + 1 = A - B.
- **Signed overflow** is `c[N] XOR c[N-1]`, the carry out of the sign bit
  XOR the carry into it:
  - a carry into the sign bit with none out of it means two positive
    operands gave a negative result;
  - a carry out with none in means two negative operands gave a positive
    result.
- **Set-less-than** uses the same subtraction. The result is the sign of the
  difference XOR overflow, so it stays correct when the subtraction
  overflows.

## Memories

`ideal_mem` is an idealized word memory. It serves as both instruction
memory and data memory.

- Reads are combinational: Data Out follows the address after the access
  time.
- The clock matters only for writes: the addressed word takes Data In on the
  rising edge when Write Enable is 1.
- Addresses are byte addresses. The word index is `addr[AW+1:2]`. The two low
  bits are ignored, so every access acts as an aligned word access. Upper
  address bits are ignored too, so the memory repeats through the 32-bit
  address space.
- Both memories default to 1024 words (4 KiB). Change this with the
  `IMEM_WORDS` and `DMEM_WORDS` parameters of `single_cycle_cpu`.

## Timing

Everything between the clock edges is combinational, so the clock period must
cover the longest path. That path belongs to lw:

- clock-to-Q of the PC
- instruction memory access
- register file access
- 32-bit add in the ALU
- data memory access
- setup time of the register file write

The ripple-carry adders make the ALU add its largest single part. This RTL has
no timing model. It only fixes the structure that the period must cover.

## Top-level interface (`single_cycle_cpu`)

| port                                   | dir | width | meaning                                    |
|----------------------------------------|-----|-------|--------------------------------------------|
| clk                                    | in  | 1     | clock; all state updates on the rising edge |
| rst                                    | in  | 1     | synchronous reset; enables program loading |
| imem_load_we / _addr / _data           | in  | 1/32/32 | instruction memory load port (during rst) |
| pc, instr                              | out | 32    | current PC and instruction                 |
| rf_we, rf_waddr, rf_wdata              | out | 1/5/32 | register write made at the next edge      |
| dm_we, dm_addr, dm_wdata               | out | 1/32/32 | memory write made at the next edge       |

The outputs exist only so the processor can be observed.

## Choices made in this design

These parts are choices of this design, added to the basic single-cycle
datapath:

- the opcode and funct values (standard MIPS);
- the ALUctr encoding;
- the names ExtOp, MemWr, MemtoReg and nPC_sel for the control points not
  named above;
- register 0 wired to zero;
- treating unknown instructions as NOPs;
- the synchronous PC reset;
- the instruction-memory load port;
- the memory sizes, the ignored low address bits and the address
  wrap-around;
- the observation outputs.

Two things are not built:

- jumps, although the J-type format (op, 26-bit target) exists in MIPS;
- a multiple-cycle version of the processor, where each step takes its own
  clock cycle and registers sit between the steps. It is a different design.

## Files

- `rtl/mips_pkg.sv`: field layout, opcodes, ALU operations and the `ctrl_t`
  control bundle.
- `rtl/single_cycle_cpu.sv`: top level, made of `ifetch`, `control` and
  `datapath`.
- `rtl/ifetch.sv`: PC, instruction memory and next address logic.
- `rtl/datapath.sv`: register file, extender, ALU, data memory and the
  multiplexers.
- `rtl/control.sv`: main decoder.
- `rtl/regfile.sv`, `rtl/alu.sv`, `rtl/addsub.sv`, `rtl/adder.sv`,
  `rtl/mux2.sv`, `rtl/extender.sv`, `rtl/ideal_mem.sv`,
  `rtl/nbit_register.sv`: the building blocks.
- `tb/tb_<module>.sv`: a self-checking testbench for each module.
- `tb/tb_walkthrough.sv`: runs the classic walkthrough instructions, addu,
  `sw $3,17($1)` and `lw $4,17($1)`, one per cycle.
- `tb/mips_asm_pkg.sv`: a small assembler and an instruction-level reference
  model, used by the CPU tests.

## Simulating

Every testbench prints one line, `TB_RESULT checks=N failures=M`, and then
calls `$finish`. For example, to run the end-to-end CPU test:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/mips_pkg.sv tb/mips_asm_pkg.sv tb/tb_single_cycle_cpu.sv \
    --top-module tb_single_cycle_cpu
./obj_dir/Vtb_single_cycle_cpu
```

Swap in another testbench name to run a different test. The simulator has
only two states, so the testbenches write every register and memory word
they later read.

`tb_single_cycle_cpu` runs the CPU at its default sizes. It loads a program
of about 600 instructions through the load port:

- a counted loop with a backward branch;
- stores followed by loads of the same words, including a negative offset;
- a write to register 0;
- random addu/subu/ori/lw/sw/beq instructions.

Each cycle it compares the CPU's PC and its pending register and memory
writes with the reference model. At the end it compares every register and
every memory word. Because the comparison is made every cycle, it also checks
that each instruction takes exactly one cycle. It counts each instruction
kind, taken and untaken branches, backward branches, writes to register 0 and
loads of previously stored words. A mechanism that never occurs counts as a
failure.

## How far it has been checked

- Every module has its own self-checking testbench. Each compares the module
  against values computed independently in the testbench. Examples: integer
  arithmetic for the adder, adder-subtractor and ALU, including every
  overflow case; a model array for the memories and the register file; a
  control table written separately for the decoder.
- Each of these testbenches was also run against a deliberately broken copy
  of its module, and it reported failures. Examples of the breaks: a carry
  term dropped, overflow taken from the carry out alone, register 0 made
  writable, the branch offset not multiplied by 4, the branch condition
  inverted.
- The CPU has been checked only in simulation, cycle by cycle, against an
  instruction-level model.
- It has been linted and elaborated by two SystemVerilog front ends and
  passed through coarse logic synthesis.
- No timing analysis has been done. No gate-level or FPGA run has been done.
