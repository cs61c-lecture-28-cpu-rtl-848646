// alu: the 32-bit arithmetic-logic unit of the single-cycle datapath.
//
// ALUctr chooses the operation: ALU_ADD gives a + b, ALU_SUB gives a - b and
// ALU_OR gives a | b (the unused code 11 also gives a | b).  Arithmetic wraps
// modulo 2^32; no overflow is signalled.  zero is 1 when the result is 0, so a
// subtraction of two equal operands raises it, which is what beq uses.
// The three operations and the Zero flag are those the instruction subset
// needs; the 2-bit encoding follows the controller's equations, and the
// handling of code 11 and of overflow is this implementation's choice.
// Purely combinational.
module alu
  import cpu_pkg::*;
#(
  parameter int unsigned WIDTH = XLEN
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  alu_ctr_e         alu_ctr,
  output logic [WIDTH-1:0] result,
  output logic             zero
);

  always_comb begin
    unique case (alu_ctr)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      default: result = a | b;
    endcase
    zero = (result == '0);
  end

endmodule
