// single_cycle_cpu: a single-cycle processor for a MIPS subset (add, sub, ori,
// lw, sw, beq), built from an instruction fetch unit, a datapath and a
// combinational controller.
//
// Every instruction takes exactly one clock cycle.  In that cycle the fetch
// unit reads the instruction at the PC; the controller decodes its opcode
// (bits 31:26) and funct (bits 5:0) into the control signals; the datapath
// reads rs (25:21) and rt (20:16), runs the ALU, reads or writes data memory
// and presents the value for rd (15:11) or rt.  The register file, the data
// memory and the PC are all written on the same rising edge, which ends the
// instruction.  The ALU's Zero flag goes back to the fetch unit, where together
// with nPC_sel it takes a beq branch.
// The controller also decodes jump and raises its Jump signal, which is
// brought out as a port: the fetch unit has no jump path, so inside this CPU
// a jump writes nothing and falls through to PC + 4.
// Ports: clk, synchronous active-high rst; a load port for the instruction
// memory; and, for observation, the PC, the instruction, the Jump signal and
// the register- and memory-write buses of the current cycle.
// The load port, the observation outputs, the reset and the memory sizes are
// choices of this implementation; the block structure and the control table
// follow the classic single-cycle design.
module single_cycle_cpu
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_ADDR_W = 10,  // 1024-word instruction memory
  parameter int unsigned DMEM_ADDR_W = 10   // 1024-word data memory
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   prog_we,
  input  logic [IMEM_ADDR_W-1:0] prog_addr,
  input  logic [XLEN-1:0]        prog_data,
  output logic [XLEN-1:0]        pc,
  output logic [XLEN-1:0]        instruction,
  output logic                   jump,
  output logic                   reg_wr,
  output logic [REG_ADDR_W-1:0]  reg_rw,
  output logic [XLEN-1:0]        bus_w,
  output logic                   mem_wr,
  output logic [XLEN-1:0]        mem_adr,
  output logic [XLEN-1:0]        mem_wdata
);

  ctrl_t ctrl;
  logic  zero;

  instr_fetch_unit #(.IMEM_ADDR_W(IMEM_ADDR_W)) u_ifu (
    .clk, .rst,
    .npc_sel(ctrl.npc_sel), .zero(zero),
    .instruction(instruction), .pc(pc),
    .prog_we, .prog_addr, .prog_data
  );

  controller u_ctrl (
    .op(f_op(instruction)), .func(f_funct(instruction)), .ctrl(ctrl)
  );

  datapath #(.DMEM_ADDR_W(DMEM_ADDR_W)) u_dp (
    .clk, .rst,
    .rs(f_rs(instruction)), .rt(f_rt(instruction)), .rd(f_rd(instruction)),
    .imm16(f_imm16(instruction)),
    .ctrl(ctrl), .zero(zero),
    .reg_wr, .reg_rw, .bus_w, .mem_wr, .mem_adr, .mem_wdata
  );

  assign jump = ctrl.jump;

endmodule
