// datapath: the execute, memory and write-back part of the single-cycle CPU.
//
// The register file reads rs onto busA and rt onto busB.  The extender widens
// imm16 per ExtOp, the ALUSrc mux feeds the ALU either busB or that immediate,
// and the ALU computes busA op (busB | imm) under ALUctr and reports Zero.  The
// ALU result is the data-memory address and busB its write data (MemWr).  The
// MemtoReg mux picks the ALU result or the memory word as busW, and the RegDst
// mux picks rt or rd as the register written on the clock edge when RegWr.
// Everything between the register read and the register write is
// combinational, so one instruction completes per clock.
// Interface: instruction fields and the control bundle in; Zero out to the
// fetch unit; the register- and memory-write buses are brought out so the
// effect of each instruction can be observed.  nPC_sel and Jump pass through
// the ctrl bundle unused here: they belong to the fetch unit.
module datapath
  import cpu_pkg::*;
#(
  parameter int unsigned DMEM_ADDR_W = 10  // data memory: 2**DMEM_ADDR_W words
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [REG_ADDR_W-1:0] rs,
  input  logic [REG_ADDR_W-1:0] rt,
  input  logic [REG_ADDR_W-1:0] rd,
  input  logic [15:0]           imm16,
  input  ctrl_t                 ctrl,
  output logic                  zero,
  // observation of the write buses
  output logic                  reg_wr,
  output logic [REG_ADDR_W-1:0] reg_rw,
  output logic [XLEN-1:0]       bus_w,
  output logic                  mem_wr,
  output logic [XLEN-1:0]       mem_adr,
  output logic [XLEN-1:0]       mem_wdata
);

  logic [REG_ADDR_W-1:0] rw;
  logic [XLEN-1:0] bus_a, bus_b, imm32, alu_b, alu_out, mem_out, wb;

  mux2 #(.WIDTH(REG_ADDR_W)) u_regdst_mux (
    .d0(rt), .d1(rd), .sel(ctrl.reg_dst), .y(rw)
  );

  register_file u_regfile (
    .clk, .rst,
    .ra(rs), .rb(rt), .rw(rw),
    .reg_wr(ctrl.reg_wr), .bus_w(wb),
    .bus_a(bus_a), .bus_b(bus_b)
  );

  extender u_ext (.imm16(imm16), .ext_op(ctrl.ext_op), .imm32(imm32));

  mux2 #(.WIDTH(XLEN)) u_alusrc_mux (
    .d0(bus_b), .d1(imm32), .sel(ctrl.alu_src), .y(alu_b)
  );

  alu u_alu (
    .a(bus_a), .b(alu_b), .alu_ctr(ctrl.alu_ctr), .result(alu_out), .zero(zero)
  );

  data_memory #(.ADDR_W(DMEM_ADDR_W)) u_dmem (
    .clk, .wr_en(ctrl.mem_wr), .adr(alu_out), .data_in(bus_b), .data_out(mem_out)
  );

  mux2 #(.WIDTH(XLEN)) u_memtoreg_mux (
    .d0(alu_out), .d1(mem_out), .sel(ctrl.mem_to_reg), .y(wb)
  );

  assign reg_wr    = ctrl.reg_wr;
  assign reg_rw    = rw;
  assign bus_w     = wb;
  assign mem_wr    = ctrl.mem_wr;
  assign mem_adr   = alu_out;
  assign mem_wdata = bus_b;

endmodule
