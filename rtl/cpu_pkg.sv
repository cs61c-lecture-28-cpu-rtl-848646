// cpu_pkg: types and constants shared by the single-cycle CPU.
//
// Instruction fields follow the three MIPS formats (R: op rs rt rd shamt funct,
// I: op rs rt immediate, J: op target).  The opcode and funct values are the
// ones of the instruction subset this CPU runs: add, sub, ori, lw, sw, beq and
// jump.  The ALU control code uses two bits: 00 ADD, 01 SUB, 10 OR.  The code
// 11 is not produced by the controller; the ALU treats it as OR.
// The instruction lines and the control-signal bundle are packed structs so that the controller, the
// datapath and the fetch unit share one definition.
package cpu_pkg;

  localparam int unsigned XLEN = 32;  // bus width of the datapath
  localparam int unsigned REG_ADDR_W = 5;  // Rs, Rt, Rd fields

  // Opcodes (instruction bits 31:26)
  localparam logic [5:0] OP_RTYPE = 6'b00_0000;
  localparam logic [5:0] OP_ORI   = 6'b00_1101;
  localparam logic [5:0] OP_LW    = 6'b10_0011;
  localparam logic [5:0] OP_SW    = 6'b10_1011;
  localparam logic [5:0] OP_BEQ   = 6'b00_0100;
  localparam logic [5:0] OP_JUMP  = 6'b00_0010;

  // funct values for R-type (instruction bits 5:0)
  localparam logic [5:0] FUNC_ADD = 6'b10_0000;
  localparam logic [5:0] FUNC_SUB = 6'b10_0010;

  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_OR  = 2'b10
  } alu_ctr_e;

  typedef enum logic {
    EXT_ZERO = 1'b0,
    EXT_SIGN = 1'b1
  } ext_op_e;

  // One-hot instruction lines between the controller's AND plane and OR plane
  typedef struct packed {
    logic add;
    logic sub;
    logic ori;
    logic lw;
    logic sw;
    logic beq;
    logic jump;
  } inst_lines_t;

  // Control signals driven by the controller
  typedef struct packed {
    logic     reg_dst;    // 0: write rt, 1: write rd
    logic     alu_src;    // 0: busB, 1: extended immediate
    logic     mem_to_reg; // 0: ALU result, 1: data memory output
    logic     reg_wr;     // write the register file
    logic     mem_wr;     // write the data memory
    logic     npc_sel;    // 1: this is a branch (taken when Zero)
    logic     jump;       // the instruction is a jump
    ext_op_e  ext_op;     // zero or sign extension of imm16
    alu_ctr_e alu_ctr;    // ALU operation
  } ctrl_t;

  // Instruction field helpers
  function automatic logic [5:0] f_op(input logic [31:0] i);
    return i[31:26];
  endfunction
  function automatic logic [4:0] f_rs(input logic [31:0] i);
    return i[25:21];
  endfunction
  function automatic logic [4:0] f_rt(input logic [31:0] i);
    return i[20:16];
  endfunction
  function automatic logic [4:0] f_rd(input logic [31:0] i);
    return i[15:11];
  endfunction
  function automatic logic [5:0] f_funct(input logic [31:0] i);
    return i[5:0];
  endfunction
  function automatic logic [15:0] f_imm16(input logic [31:0] i);
    return i[15:0];
  endfunction

endpackage
