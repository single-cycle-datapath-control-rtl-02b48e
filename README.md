# Single-cycle MIPS datapath and control

A processor for a small MIPS subset (add, sub, and, or, slt, lw, sw, beq)
in which every instruction takes exactly one clock cycle. Between two
rising edges the instruction is fetched, decoded, its registers are read,
the ALU works, the data memory is read and both possible next PCs are
formed; the edge that ends the cycle commits everything at once: the
register write, the memory write and the new PC. There are no pipeline
registers, no stalls and no hazards. The price is a clock period as long
as the slowest instruction, lw, which goes through instruction memory,
register file, ALU, data memory and back into the register file.

The interesting part is the control unit: a purely combinational decoder
that turns the instruction's opcode and func fields, plus the ALU's Zero
flag, into the ten signals that steer the datapath's multiplexers and
write enables.

## Datapath

Connections, by stage:

* Fetch: PC -> instruction memory read address and PC+4 adder.
  PC+4 -> PCSrc mux input 0 and branch adder.
* Decode: I[25:21] -> Read register 1; I[20:16] -> Read register 2 and
  RegDst mux input 0; I[15:11] -> RegDst mux input 1; RegDst mux ->
  Write register; I[15:0] -> sign extend; I[31:26] and I[5:0] -> control.
* Execute: Read data 1 -> ALU a; Read data 2 -> ALUSrc mux input 0;
  sign-extended immediate -> ALUSrc mux input 1 and shift left 2 ->
  branch adder -> PCSrc mux input 1; ALU Zero -> control.
* Memory: ALU result -> data memory address; Read data 2 -> data memory
  write data.
* Write back: ALU result -> MemToReg mux input 0; data memory read data
  -> MemToReg mux input 1; MemToReg mux -> register Write data.
  PCSrc mux -> PC.

| Unit | Module | Role |
|------|--------|------|
| PC | `pc_reg` | 32-bit register, loaded every cycle |
| PC+4 adder, branch adder | `adder` | PC+4; PC+4 + offset*4 |
| Shift left 2 | `shift_left2` | offset (in instructions) to bytes |
| Sign extend | `sign_extend` | 16-bit immediate to 32 bits |
| RegDst, ALUSrc, MemToReg, PCSrc muxes | `mux2` | input 0 / input 1 as in the table below |
| Instruction memory | `imem` | combinational read at the PC |
| Register file | `regfile` | 32 x 32, two read ports, one write port |
| ALU | `alu` | and, or, add, sub, slt; Zero flag |
| Data memory | `dmem` | combinational read, write at the edge |
| Control unit | `control` | opcode + func + Zero to ten control signals |
| Top | `mips_single_cycle` | wires the above together |

Shared types (the ALU operation enum, opcode and func constants, and the
control-signal struct) are in `mips_pkg`.

Mux inputs: RegDst 0 = rt (I[20:16]), 1 = rd (I[15:11]); ALUSrc 0 = Read
data 2, 1 = sign-extended immediate; MemToReg 0 = ALU result, 1 = memory
read data; PCSrc 0 = PC+4, 1 = branch target.

## Control

The control unit sees 13 input bits (opcode I[31:26], func I[5:0], Zero)
and drives 10 output bits:

| Instr | Opcode | Func | RegDst | RegWrite | ALUSrc | ALUOp | MemWrite | MemRead | MemToReg |
|-------|--------|------|:-:|:-:|:-:|:-:|:-:|:-:|:-:|
| add | 000000 | 100000 | 1 | 1 | 0 | 010 | 0 | 0 | 0 |
| sub | 000000 | 100010 | 1 | 1 | 0 | 110 | 0 | 0 | 0 |
| and | 000000 | 100100 | 1 | 1 | 0 | 000 | 0 | 0 | 0 |
| or  | 000000 | 100101 | 1 | 1 | 0 | 001 | 0 | 0 | 0 |
| slt | 000000 | 101010 | 1 | 1 | 0 | 111 | 0 | 0 | 0 |
| lw  | 100011 | any | 0 | 1 | 1 | 010 | 0 | 1 | 1 |
| sw  | 101011 | any | 0* | 0 | 1 | 010 | 1 | 0 | 0* |
| beq | 000100 | any | 0* | 0 | 0 | 110 | 0 | 0 | 0* |

PCSrc, the tenth signal, is 1 only for beq with Zero = 1. Entries marked
`*` are don't-cares in the logic (nothing is written, so the mux choice
is irrelevant); the RTL drives them 0.

Points worth knowing:

* The ALUOp value is the ALU's operation code itself (3 bits), not a
  category code. For R-type instructions it comes from the func field, so
  the unit decodes func directly; there is no second-level "ALU control"
  block. The common textbook alternative (a main decoder producing a
  Branch signal and a 2-bit ALUOp, followed by a separate ALU control) is
  not implemented.
* beq makes the ALU subtract its two registers; Zero = 1 means equal, and
  the control unit raises PCSrc. Zero thus feeds back from the ALU into
  the control unit within the cycle; this is a plain combinational path,
  since PCSrc steers only the next-PC mux and never the ALU inputs.
* lw and sw both add the sign-extended offset to the base register (ALUOp
  010, ALUSrc 1); only lw writes a register, only sw writes memory.
* Any other opcode, or an R-type func outside the five above, asserts no
  write enable and no branch: the instruction does nothing but advance
  the PC. In particular `slti` is not executed.

## Timing within a cycle

All state (PC, register file, data memory) changes only at the rising
clock edge. Everything else is combinational. This is what makes
`add $t1, $t1, $t2` work: during the cycle, Read data 1 is the old $t1;
the sum appears on the register file's write port and is stored at the
edge ending the cycle. A read of the register being written returns the
old value until that edge.

The longest path is lw: instruction memory, register read, ALU address
add, data memory read, MemToReg mux, register file setup. With delays of
2, 1, 2, 2 and 1 ns for those stages (muxes and sign extension taken as
free) it needs 8 ns, so the clock cannot run faster than that. The RTL
contains no timing information; that figure is only an illustration.

## Choices this RTL makes on its own

* Widths: 32-bit data and addresses, 32 registers (5-bit fields).
* Register 0 always reads 0 and ignores writes, as in MIPS.
* Reset: synchronous, active high; clears the PC and all registers. The
  memories are not cleared.
* Memories: 256 words each (`IMEM_WORDS`, `DMEM_WORDS` on the top). Word
  accesses only; address bits [1:0] are ignored and addresses wrap modulo
  the memory size. Data-memory read data is 0 when MemRead is 0.
* Load ports: each memory has a write port (`*_load_we/addr/data`), one
  word per clock, used to place a program and data while reset is held.
  The data-memory load port has priority over MemWrite.
* slt compares signed values. The ALU has no overflow detection; unused
  ALUOp codes give 0.
* Func codes other than add's (100000) are the standard MIPS ones.
* Observation outputs on the top (`pc`, `instr`, `reg_write`,
  `reg_waddr`, `reg_wdata`, `mem_write`, `mem_addr`, `mem_wdata`,
  `pc_src`) show what the current instruction will commit at the next
  edge.

## Top-level interface

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| clk | in | 1 | clock |
| rst | in | 1 | synchronous reset |
| imem_load_we / _addr / _data | in | 1/32/32 | write one instruction word (byte address) |
| dmem_load_we / _addr / _data | in | 1/32/32 | write one data word (byte address) |
| pc, instr | out | 32 | current PC and instruction |
| reg_write, reg_waddr, reg_wdata | out | 1/5/32 | register write at the next edge |
| mem_write, mem_addr, mem_wdata | out | 1/32/32 | memory write at the next edge (mem_addr is also the lw address) |
| pc_src | out | 1 | branch taken this cycle |

Typical use: hold `rst`, load the program and data through the load
ports, release `rst`; from then on one instruction executes per clock,
starting at address 0. A `beq $0,$0,-1` (0x1000FFFF) is a convenient halt.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`)
that compares against values computed independently in the testbench,
prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

`tb_mips_single_cycle` runs the top at its default sizes. It contains an
instruction-level reference model and compares, every cycle, the PC, the
instruction and the commit (register write, memory write, branch taken);
that also checks one instruction per clock. It runs:

* the worked examples: `add $t1,$t1,$t2` with 1 and 2 (must write 3),
  `lw $t0,-4($sp)` (0x8FA8FFFC), `sw $a0,16($sp)` (0xAFA40010) and a
  taken `beq $at,$0,3` (0x10200003), plus an untaken beq;
* 40 random programs of all eight instructions plus undecoded ones,
  each followed by a read-back program that loads every data word, so
  the memory left behind is compared as well.

The top also carries three assertions, active in simulation with
`--assert`: no instruction writes both a register and memory, a taken
branch writes nothing, and the PC stays word aligned.

The testbench counts each instruction kind, taken and untaken branches, writes to
register 0 and undecoded instructions, and fails if any never occurred.

Simulate with Verilator 5 from the repository root, for example:

```
verilator --binary --timing --assert -y rtl --top-module tb_mips_single_cycle \
    rtl/mips_pkg.sv tb/tb_mips_single_cycle.sv
./obj_dir/Vtb_mips_single_cycle
```

Replace the testbench name to run another; modules are found in `rtl/`
through `-y rtl`, and `mips_pkg.sv` must be listed first.

## Extending it

New instructions need a row in `control` (and the constants in
`mips_pkg`), possibly a new ALU operation code in `alu_op_e` and `alu`,
and a matching case in the reference model of `tb_mips_single_cycle`.
An immediate ALU instruction such as slti needs only control changes:
ALUSrc = 1, RegDst = 0, RegWrite = 1 and ALUOp = slt. Memory sizes are
the top's parameters.
