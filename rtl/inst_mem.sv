// inst_mem: ideal (single-cycle) instruction memory of 32-bit words.
//
// The CPU side is read-only and combinational: instr is the word at the byte
// address adr in the same cycle (adr[1:0] ignored, adr[ADDR_W+1:2] selects one
// of 2**ADDR_W words).  A separate load port (prog_we, prog_addr, prog_data,
// word-addressed, written on the rising clock edge) fills the memory with a
// program before it runs.  The contents are not reset.
// The size and the load port are choices of this implementation.
module inst_mem
  import cpu_pkg::*;
#(
  parameter int unsigned ADDR_W = 10  // word-address bits: 1024 words
) (
  input  logic              clk,
  input  logic [XLEN-1:0]   adr,
  output logic [XLEN-1:0]   instr,
  input  logic              prog_we,
  input  logic [ADDR_W-1:0] prog_addr,
  input  logic [XLEN-1:0]   prog_data
);

  logic [XLEN-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_data;
  end

  assign instr = mem[adr[ADDR_W+1:2]];

endmodule
