// controller_and_plane: the instruction-detect half of the main controller.
//
// Each output line is the AND of the six opcode bits, true or inverted, that
// spell one instruction's opcode; for add and sub the R-type match is further
// ANDed with the six funct bits.  Opcodes: R-type 000000 (add funct 100000,
// sub funct 100010), ori 001101, lw 100011, sw 101011, beq 000100,
// jump 000010.  At most one line is high; none for an instruction outside the
// subset.  Purely combinational.
module controller_and_plane
  import cpu_pkg::*;
(
  input  logic [5:0]  op,
  input  logic [5:0]  func,
  output inst_lines_t lines
);

  logic rtype;

  always_comb begin
    rtype      = (op == OP_RTYPE);
    lines.add  = rtype && (func == FUNC_ADD);
    lines.sub  = rtype && (func == FUNC_SUB);
    lines.ori  = (op == OP_ORI);
    lines.lw   = (op == OP_LW);
    lines.sw   = (op == OP_SW);
    lines.beq  = (op == OP_BEQ);
    lines.jump = (op == OP_JUMP);
  end

endmodule
