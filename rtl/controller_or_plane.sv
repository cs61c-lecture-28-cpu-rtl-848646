// controller_or_plane: the signal-forming half of the main controller.
//
// Each control signal is the OR of the instruction lines that assert it:
//   RegDst = add+sub           ALUSrc = ori+lw+sw        MemtoReg = lw
//   RegWrite = add+sub+ori+lw  MemWrite = sw             nPCsel = beq
//   Jump = jump                ExtOp = lw+sw
//   ALUctr[0] = sub+beq        ALUctr[1] = ori
// with the ALU code 00 ADD, 01 SUB, 10 OR.  Where the control table marks a
// signal don't-care for an instruction, these sums give 0.  Purely
// combinational.
module controller_or_plane
  import cpu_pkg::*;
(
  input  inst_lines_t lines,
  output ctrl_t       ctrl
);

  logic [1:0] alu_ctr_bits;

  always_comb begin
    ctrl.reg_dst    = lines.add | lines.sub;
    ctrl.alu_src    = lines.ori | lines.lw | lines.sw;
    ctrl.mem_to_reg = lines.lw;
    ctrl.reg_wr     = lines.add | lines.sub | lines.ori | lines.lw;
    ctrl.mem_wr     = lines.sw;
    ctrl.npc_sel    = lines.beq;
    ctrl.jump       = lines.jump;
    ctrl.ext_op     = ext_op_e'(lines.lw | lines.sw);
    alu_ctr_bits    = {lines.ori, lines.sub | lines.beq};
    ctrl.alu_ctr    = alu_ctr_e'(alu_ctr_bits);
  end

endmodule
