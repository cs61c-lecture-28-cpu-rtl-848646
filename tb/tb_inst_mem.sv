// tb_inst_mem: loads random words through the load port of a reduced-size
// instruction memory and reads them back by byte address.
module tb_inst_mem;
  localparam int AW = 6;
  logic clk = 0;
  logic [31:0] adr, instr;
  logic prog_we;
  logic [AW-1:0] prog_addr;
  logic [31:0] prog_data;
  logic [31:0] model [2**AW];
  int checks = 0, failures = 0;

  inst_mem #(.ADDR_W(AW)) dut (.clk, .adr, .instr, .prog_we, .prog_addr, .prog_data);

  always #5 clk = ~clk;

  initial begin
    prog_we = 0; adr = 0; prog_addr = 0; prog_data = 0;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = AW'(i); prog_data = $urandom; model[i] = prog_data;
    end
    @(negedge clk);
    prog_we = 0;
    for (int i = 0; i < 500; i++) begin
      int w;
      w = $urandom % (2**AW);
      adr = (32'(w) << 2) | 32'($urandom % 4); #1;
      checks++;
      if (instr !== model[w]) begin
        failures++;
        $display("FAIL word %0d = %h expected %h", w, instr, model[w]);
      end
    end
    // a load with prog_we = 0 must not change anything
    @(negedge clk);
    prog_addr = 3; prog_data = ~model[3];
    @(posedge clk); #1;
    adr = 32'd12; #1;
    checks++;
    if (instr !== model[3]) begin
      failures++;
      $display("FAIL write without prog_we");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
