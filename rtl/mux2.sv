// mux2: two-input multiplexer of WIDTH bits; sel = 0 passes d0, sel = 1 d1.
// Used for the RegDst, ALUSrc and MemtoReg selections of the datapath.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);
  assign y = sel ? d1 : d0;
endmodule
