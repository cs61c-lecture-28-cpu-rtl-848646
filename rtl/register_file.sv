// register_file: 32 general registers of 32 bits with two read ports and one
// write port.
//
// Ra and Rb select the registers driven onto busA and busB; the reads are
// combinational.  On the rising clock edge, when RegWr is 1, busW is written
// into the register Rw selects.  Register 0 always reads as zero and ignores
// writes, as in the MIPS architecture.  A synchronous, active-high rst clears
// every register.  A register written in one cycle is seen on the read buses
// from the next cycle on.
// The port set follows the classic single-cycle register file; the register-0
// rule and the reset are choices of this implementation.
module register_file
  import cpu_pkg::*;
#(
  parameter int unsigned WIDTH  = XLEN,
  parameter int unsigned ADDR_W = REG_ADDR_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [ADDR_W-1:0] ra,
  input  logic [ADDR_W-1:0] rb,
  input  logic [ADDR_W-1:0] rw,
  input  logic              reg_wr,
  input  logic [WIDTH-1:0]  bus_w,
  output logic [WIDTH-1:0]  bus_a,
  output logic [WIDTH-1:0]  bus_b
);

  localparam int unsigned NREGS = 2 ** ADDR_W;

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (reg_wr && rw != '0) begin
      regs[rw] <= bus_w;
    end
  end

  assign bus_a = (ra == '0) ? '0 : regs[ra];
  assign bus_b = (rb == '0) ? '0 : regs[rb];

endmodule
