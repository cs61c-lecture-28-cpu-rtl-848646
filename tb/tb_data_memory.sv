// tb_data_memory: random word writes and reads against a shadow array, at a
// reduced size.  Checks that the read is combinational, that a write lands on
// the clock edge only when wr_en is 1, and that adr[1:0] is ignored.
module tb_data_memory;
  localparam int AW = 6;
  logic clk = 0;
  logic wr_en;
  logic [31:0] adr, data_in, data_out;
  logic [31:0] model [2**AW];
  logic        valid [2**AW];
  int checks = 0, failures = 0;

  data_memory #(.ADDR_W(AW)) dut (.clk, .wr_en, .adr, .data_in, .data_out);

  always #5 clk = ~clk;

  initial begin
    wr_en = 0; adr = 0; data_in = 0;
    for (int i = 0; i < 2**AW; i++) valid[i] = 0;
    // fill every word once
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      wr_en = 1; adr = 32'(i) << 2; data_in = $urandom;
      @(posedge clk); #1;
      model[i] = data_in; valid[i] = 1;
    end
    for (int i = 0; i < 3000; i++) begin
      int w;
      @(negedge clk);
      w = $urandom % (2**AW);
      wr_en = ($urandom % 2) == 1;
      adr = (32'(w) << 2) | 32'($urandom % 4);
      data_in = $urandom; #1;
      checks++;
      if (data_out !== model[w]) begin
        failures++;
        $display("FAIL read word %0d = %h expected %h", w, data_out, model[w]);
      end
      @(posedge clk); #1;
      if (wr_en) model[w] = data_in;
      checks++;
      if (data_out !== model[w]) begin
        failures++;
        $display("FAIL after edge word %0d = %h expected %h", w, data_out, model[w]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
