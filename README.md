# Single-cycle MIPS-subset CPU with a two-plane controller

This is a processor that finishes every instruction in one clock cycle. The
PC, the register file and the data memory are all written on the same rising
edge. Everything between two edges is combinational: the instruction fetch,
the decode, the register read, the ALU, the memory access and the choice of
the value to write back. The clock period therefore has to cover the slowest
instruction, the load:

    PC clock-to-Q + instruction memory access + register file read
      + 32-bit ALU add + data memory access + register file setup

The CPU runs six MIPS instructions: `add`, `sub`, `ori`, `lw`, `sw` and `beq`.
It also decodes `j` (jump), but it does not execute it (see *Jump* below).
Most of the design work is in the controller. The controller turns the
opcode and funct fields into the control signals that set up the datapath
for each instruction.

## Instruction formats

```
         31    26 25   21 20   16 15   11 10    6 5     0
R-type  |  op    |  rs   |  rt   |  rd   | shamt | funct |   add, sub
I-type  |  op    |  rs   |  rt   |        imm16          |   ori, lw, sw, beq
J-type  |  op    |              target                   |   jump
```

| instruction | op      | funct   | effect |
|-------------|---------|---------|--------|
| add rd,rs,rt | 000000 | 100000 | R[rd] = R[rs] + R[rt] |
| sub rd,rs,rt | 000000 | 100010 | R[rd] = R[rs] - R[rt] |
| ori rt,rs,imm | 001101 | – | R[rt] = R[rs] \| ZeroExt(imm16) |
| lw rt,imm(rs) | 100011 | – | R[rt] = Mem[R[rs] + SignExt(imm16)] |
| sw rt,imm(rs) | 101011 | – | Mem[R[rs] + SignExt(imm16)] = R[rt] |
| beq rs,rt,imm | 000100 | – | if R[rs] == R[rt]: PC = PC + 4 + SignExt(imm16)·4 |
| j target      | 000010 | – | decoded only; raises `Jump` |

In every case other than a taken branch, PC = PC + 4.

## Structure

```
single_cycle_cpu
├── instr_fetch_unit      PC, next-PC adders and mux, instruction memory
│   └── inst_mem          ideal instruction memory (same-cycle read)
├── controller
│   ├── controller_and_plane   opcode/funct -> one line per instruction
│   └── controller_or_plane    instruction lines -> control signals
└── datapath
    ├── mux2 (RegDst)     rt or rd as the register to write
    ├── register_file     32 x 32, two read ports, one write port
    ├── extender          zero- or sign-extend imm16
    ├── mux2 (ALUSrc)     busB or the extended immediate
    ├── alu               ADD / SUB / OR, Zero flag
    ├── data_memory       ideal data memory (same-cycle read, clocked write)
    └── mux2 (MemtoReg)   ALU result or memory word onto busW
```

`cpu_pkg` holds the opcode and funct constants, the ALU and extender
encodings, and two packed structs: `inst_lines_t`, the seven instruction lines
between the controller planes, and `ctrl_t`, the control bundle.

## The control signals

| signal   | 0 | 1 |
|----------|---|---|
| RegDst   | write rt | write rd |
| ALUSrc   | ALU B = busB | ALU B = extended imm16 |
| MemtoReg | busW = ALU result | busW = data memory |
| RegWr    | – | write register file |
| MemWr    | – | write data memory |
| nPC_sel  | not a branch | branch: take it if Zero |
| ExtOp    | zero-extend | sign-extend |
| Jump     | – | instruction is a jump |
| ALUctr   | 2 bits: 00 ADD, 01 SUB, 10 OR | |

The values for each instruction (x = don't care):

|          | add | sub | ori | lw | sw | beq | jump |
|----------|-----|-----|-----|----|----|-----|------|
| RegDst   | 1 | 1 | 0 | 0 | x | x | x |
| ALUSrc   | 0 | 0 | 1 | 1 | 1 | 0 | x |
| MemtoReg | 0 | 0 | 0 | 1 | x | x | x |
| RegWr    | 1 | 1 | 1 | 1 | 0 | 0 | 0 |
| MemWr    | 0 | 0 | 0 | 0 | 1 | 0 | 0 |
| nPC_sel  | 0 | 0 | 0 | 0 | 0 | 1 | 0 |
| Jump     | 0 | 0 | 0 | 0 | 0 | 0 | 1 |
| ExtOp    | x | x | 0 | 1 | 1 | x | x |
| ALUctr   | ADD | SUB | OR | ADD | ADD | SUB | x |

## How the controller is built

The controller works like a PLA and has two planes.

**AND plane** (`controller_and_plane`). Each instruction is one product
term over the six opcode bits, each bit true or inverted. For example,
`lw = op5·~op4·~op3·~op2·op1·op0`. The R-type term (all opcode bits zero) is
ANDed with a full match of the funct field to give `add` and `sub`. At most
one of the seven lines is high. An opcode or funct value outside the subset
raises none of them.

**OR plane** (`controller_or_plane`). Each control signal is the OR of the
lines of the instructions that assert it:

    RegDst   = add + sub            MemWrite = sw
    ALUSrc   = ori + lw + sw        nPC_sel  = beq
    MemtoReg = lw                   Jump     = jump
    RegWrite = add + sub + ori + lw ExtOp    = lw + sw
    ALUctr[0] = sub + beq           ALUctr[1] = ori

These sums set every don't-care entry of the table to 0. An instruction
outside the subset raises no line, so it gets all-zero controls. It writes
no register and no memory word, and the PC moves on by 4: it behaves as a
no-op.

## The fetch unit and the branch

The PC always holds a word address, so only bits 31:2 are stored and the two
low bits read as 00. Two adders run in parallel:

* the first computes PC + 4;
* the second adds the sign-extended `imm16` (the "PC Ext" block; counted in
  words, which is the same as ×4 in bytes) to the output of the first.

A 2-input mux picks the next PC. `nPC_sel` means "this is a branch", not
"select input 1". The mux takes the branch target only when `nPC_sel = 1`
and the ALU's `Zero = 1`:

| nPC_sel | Zero | mux |
|---------|------|-----|
| 0 | x | PC + 4 |
| 1 | 0 | PC + 4 |
| 1 | 1 | branch target |

For `beq`, the controller sets ALUSrc = 0 and ALUctr = SUB, so the ALU
computes R[rs] − R[rt]. Zero is then exactly the test R[rs] == R[rt]. The
offset counts from the instruction after the branch, so `beq $0,$0,-1`
branches to itself.

## Jump

The controller decodes `j` and drives `Jump`. The fetch unit has no jump
path, because the next-PC rule for a jump is not part of this design.
`Jump` is brought out as an output of `single_cycle_cpu`. Inside the CPU a
jump writes nothing and goes on to PC + 4. To add jumps, put a third input on
the next-PC mux in `instr_fetch_unit`, selected by `Jump`, that forms the
target from the 26-bit field.

## Choices made in this RTL

These points are this design's own choices, not part of the reference
material it follows:

* **Register 0** always reads as zero and ignores writes, as in MIPS.
* **Reset**: `rst` is synchronous and active high. It sets the PC to
  `RESET_PC` (default 0) and clears all 32 registers. The memories are not
  reset.
* **Memories** are "ideal": a read returns data in the same cycle, and a
  write happens on the clock edge. Each holds 2^10 words by default
  (`IMEM_ADDR_W`, `DMEM_ADDR_W`). Only aligned words are accessed:
  address bits 1:0 are ignored, and addresses beyond the size wrap.
* **Program loading**: the instruction memory has its own write port
  (`prog_we`, `prog_addr` as a word address, `prog_data`). Load the program
  with the CPU held in reset.
* **ALUctr** is 2 bits wide. The code 11 is never produced, and the ALU
  treats it as OR. Arithmetic wraps, and no overflow is reported.
* **Observation ports**: `pc`, `instruction`, `jump`, and the register-write
  (`reg_wr`, `reg_rw`, `bus_w`) and memory-write (`mem_wr`, `mem_adr`,
  `mem_wdata`) buses of the current cycle. They show exactly what each
  instruction does.

Two points in the reference material disagree with each other; the RTL takes
the reading the datapath supports:

* `sw` stores R[rt] (busB, the Rb port), not R[rs].
* A taken branch goes to PC + 4 + offset·4, not PC + offset·4.

## Interface of `single_cycle_cpu`

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk | in | 1 | clock; all state changes on its rising edge |
| rst | in | 1 | synchronous reset |
| prog_we, prog_addr, prog_data | in | 1, IMEM_ADDR_W, 32 | instruction memory load port |
| pc, instruction | out | 32, 32 | instruction being executed this cycle |
| jump | out | 1 | controller's Jump |
| reg_wr, reg_rw, bus_w | out | 1, 5, 32 | register write at the end of this cycle |
| mem_wr, mem_adr, mem_wdata | out | 1, 32, 32 | memory write at the end of this cycle |

The parameters are `IMEM_ADDR_W` and `DMEM_ADDR_W`, both 10 by default.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| tb_controller_and_plane | all 4096 op/funct pairs against the opcode table |
| tb_controller_or_plane | each instruction line against its table column |
| tb_controller | the table through both planes; unsupported op/funct give all zeros |
| tb_alu | corner cases and random vectors of ADD/SUB/OR and Zero |
| tb_extender | every 16-bit value, both extensions |
| tb_register_file | random traffic against a shadow array; r0; write timing |
| tb_data_memory, tb_inst_mem | random traffic against a shadow array |
| tb_instr_fetch_unit | next PC for random nPC_sel/Zero and random offsets |
| tb_datapath | random add/sub/ori/lw/sw/beq with hand-set controls against a model |
| tb_single_cycle_cpu | the whole CPU at default sizes, in lockstep with a reference model |

`tb_single_cycle_cpu` compares the CPU with a reference model every cycle:
the PC, the instruction, and every register write, memory write and `Jump`.
So it also checks that each instruction takes exactly one cycle. It first
runs a directed program: a loop that sums 10..1, storing and reloading each
partial sum, with taken and not-taken branches. The program then goes on
through a jump, a write to r0, a load with a negative offset, `ori` with
bit 15 set and an unsupported opcode. Next it runs four random 300-instruction
programs. It counts each of these mechanisms and fails if any never happened.
`tb/mips_asm_pkg.sv` has the instruction encoders it uses.

To run one testbench with plain Verilator:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_single_cycle_cpu \
        -Irtl -Itb rtl/cpu_pkg.sv tb/mips_asm_pkg.sv rtl/*.sv tb/tb_single_cycle_cpu.sv
    ./obj_dir/Vtb_single_cycle_cpu

The package files must come first on the command line. The CPU testbench
runs in well under a second.

## Known limits

* No jump execution (see above), and no other MIPS instructions.
* No hazards to handle: the design is single-cycle, with no pipeline,
  forwarding or stalls.
* Word accesses only; no byte or halfword loads and stores.
* The memories are behavioural arrays with same-cycle read. A real SRAM
  with a registered read would need the CPU reorganised into a multi-cycle or
  pipelined design.
