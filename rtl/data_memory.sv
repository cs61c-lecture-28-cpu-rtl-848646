// data_memory: ideal (single-cycle) data memory of 32-bit words.
//
// The read is combinational: data_out shows the word at adr in the same cycle.
// On the rising clock edge, when wr_en (MemWr) is 1, data_in is written to the
// word at adr.  adr is a byte address; only whole aligned words are accessed,
// so adr[1:0] is ignored and adr[ADDR_W+1:2] picks one of 2**ADDR_W words (the
// higher address bits wrap).  The contents are not reset.
// The size, the word-only access and the address wrap are choices of this
// implementation; the ports (WrEn, Adr, Data In) are those of the classic
// single-cycle datapath.
module data_memory
  import cpu_pkg::*;
#(
  parameter int unsigned ADDR_W = 10  // word-address bits: 1024 words
) (
  input  logic            clk,
  input  logic            wr_en,
  input  logic [XLEN-1:0] adr,
  input  logic [XLEN-1:0] data_in,
  output logic [XLEN-1:0] data_out
);

  logic [XLEN-1:0] mem [2**ADDR_W];
  logic [ADDR_W-1:0] widx;

  assign widx = adr[ADDR_W+1:2];

  always_ff @(posedge clk) begin
    if (wr_en) mem[widx] <= data_in;
  end

  assign data_out = mem[widx];

endmodule
