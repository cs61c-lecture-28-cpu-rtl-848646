// tb_register_file: random writes and reads against a shadow array.  Checks the
// reset clear, that a write shows from the next cycle, that RegWr = 0 writes
// nothing and that register 0 stays zero.
module tb_register_file;
  logic clk = 0, rst;
  logic [4:0] ra, rb, rw;
  logic reg_wr;
  logic [31:0] bus_w, bus_a, bus_b;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  int cycles = 0;

  register_file dut (.clk, .rst, .ra, .rb, .rw, .reg_wr, .bus_w, .bus_a, .bus_b);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check_reads();
    for (int r = 0; r < 32; r++) begin
      ra = 5'(r); rb = 5'(31 - r); #1;
      checks++;
      if (bus_a !== model[r] || bus_b !== model[31-r]) begin
        failures++;
        $display("FAIL read r%0d=%h r%0d=%h expected %h %h", r, bus_a, 31-r, bus_b,
                 model[r], model[31-r]);
      end
    end
  endtask

  initial begin
    rst = 1; reg_wr = 0; rw = 0; bus_w = 0; ra = 0; rb = 0;
    @(posedge clk); @(posedge clk); #1;
    rst = 0;
    for (int r = 0; r < 32; r++) model[r] = 0;
    check_reads();
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      rw = 5'($urandom); reg_wr = ($urandom % 4) != 0; bus_w = $urandom;
      ra = rw; rb = 5'($urandom); #1;
      // before the edge the old value is still read
      checks++;
      if (bus_a !== model[rw]) begin
        failures++;
        $display("FAIL pre-edge read r%0d=%h expected %h", rw, bus_a, model[rw]);
      end
      @(posedge clk); #1;
      if (reg_wr && rw != 0) model[rw] = bus_w;
      checks++;
      if (bus_a !== model[ra] || bus_b !== model[rb]) begin
        failures++;
        $display("FAIL post-edge r%0d=%h r%0d=%h expected %h %h", ra, bus_a, rb, bus_b,
                 model[ra], model[rb]);
      end
    end
    reg_wr = 0;
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
