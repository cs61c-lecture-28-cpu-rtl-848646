// instr_fetch_unit: program counter, next-address logic and instruction memory.
//
// The PC holds a word address: its two low bits are always 00, so only bits
// 31:2 are stored.  Each cycle the instruction memory is read at the PC and the
// next PC is chosen by a 2-input mux.  Input 0 is PC + 4 from the first adder.
// Input 1 is PC + 4 + SignExt(imm16)*4 from the second adder, whose other
// operand comes from the PC extender (sign extension of imm16, shifted left
// by 2).  nPC_sel is encoded as "branch / not branch": the mux takes input 1
// only when nPC_sel = 1 and the ALU's Zero = 1.  The PC is loaded on the rising
// clock edge; a synchronous, active-high rst sets it to RESET_PC.
// Interface: nPC_sel and zero in; instruction and pc out; the instruction
// memory's load port passes through.
// The adders, the mux and the branch rule follow the classic single-cycle
// fetch unit; the reset value and the stored-bits-only PC are this
// implementation's choices.
module instr_fetch_unit
  import cpu_pkg::*;
#(
  parameter int unsigned IMEM_ADDR_W = 10,   // instruction memory: 2**IMEM_ADDR_W words
  parameter logic [XLEN-1:0] RESET_PC = '0   // byte address of the first instruction
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   npc_sel,
  input  logic                   zero,
  output logic [XLEN-1:0]        instruction,
  output logic [XLEN-1:0]        pc,
  input  logic                   prog_we,
  input  logic [IMEM_ADDR_W-1:0] prog_addr,
  input  logic [XLEN-1:0]        prog_data
);

  logic [XLEN-3:0] pc_q;        // PC bits 31:2
  logic [XLEN-3:0] pc_plus4;    // first adder
  logic [XLEN-3:0] pc_ext;      // PC Ext: SignExt(imm16), counted in words
  logic [XLEN-3:0] pc_br;       // second adder
  logic            mux_sel;
  logic [XLEN-3:0] pc_next;

  assign pc = {pc_q, 2'b00};

  inst_mem #(.ADDR_W(IMEM_ADDR_W)) u_imem (
    .clk, .adr(pc), .instr(instruction),
    .prog_we, .prog_addr, .prog_data
  );

  always_comb begin
    pc_plus4 = pc_q + 1'b1;
    pc_ext   = {{(XLEN-18){instruction[15]}}, instruction[15:0]};
    pc_br    = pc_plus4 + pc_ext;
    mux_sel  = npc_sel & zero;
    pc_next  = mux_sel ? pc_br : pc_plus4;
  end

  always_ff @(posedge clk) begin
    if (rst) pc_q <= RESET_PC[XLEN-1:2];
    else     pc_q <= pc_next;
  end

endmodule
