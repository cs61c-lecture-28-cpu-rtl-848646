// controller: combinational main control of the single-cycle CPU.
//
// It is built as two planes, like a PLA.  The AND plane
// (controller_and_plane) matches the 6-bit opcode, and for R-type the 6-bit
// funct field, against each supported instruction and raises one of the
// one-hot lines add, sub, ori, lw, sw, beq, jump.  The OR plane
// (controller_or_plane) forms every control signal as the OR of the lines of
// the instructions that assert it.  An opcode or funct outside the subset
// raises no line, so every output is 0 and the instruction writes nothing
// (it behaves as a no-op).
// The two planes and their equations follow the classic single-cycle
// controller; treating unsupported encodings as no-ops is this
// implementation's choice.
// Interface: op = instruction[31:26], func = instruction[5:0]; ctrl is the
// control bundle of cpu_pkg.  No clock: the outputs settle within the cycle
// the instruction is fetched in.
module controller
  import cpu_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] func,
  output ctrl_t      ctrl
);

  inst_lines_t lines;

  controller_and_plane u_and (.op, .func, .lines);
  controller_or_plane  u_or  (.lines, .ctrl);

endmodule
