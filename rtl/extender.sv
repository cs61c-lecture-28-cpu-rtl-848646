// extender: widens the 16-bit immediate of an I-type instruction to 32 bits.
//
// ExtOp selects the fill of the upper 16 bits: EXT_ZERO fills with zeros (ori),
// EXT_SIGN copies bit 15 (lw, sw).  Purely combinational.
module extender
  import cpu_pkg::*;
(
  input  logic [15:0] imm16,
  input  ext_op_e     ext_op,
  output logic [31:0] imm32
);

  always_comb begin
    if (ext_op == EXT_SIGN) imm32 = {{16{imm16[15]}}, imm16};
    else                    imm32 = {16'h0000, imm16};
  end

endmodule
