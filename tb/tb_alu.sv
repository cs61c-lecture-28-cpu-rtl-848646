// tb_alu: random and corner-case vectors for the ALU, compared with SystemVerilog
// arithmetic on the same operands; also checks the Zero flag.
module tb_alu;
  import cpu_pkg::*;

  logic [31:0] a, b, result;
  alu_ctr_e alu_ctr;
  logic zero;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .alu_ctr, .result, .zero);

  task automatic apply(input logic [31:0] ta, input logic [31:0] tb_, input alu_ctr_e c);
    logic [31:0] exp;
    a = ta; b = tb_; alu_ctr = c; #1;
    case (c)
      ALU_ADD: exp = ta + tb_;
      ALU_SUB: exp = ta - tb_;
      default: exp = ta | tb_;
    endcase
    checks++;
    if (result !== exp || zero !== (exp == 32'h0)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h got %h/%b expected %h", c, ta, tb_, result, zero, exp);
    end
  endtask

  initial begin
    apply(32'h0000_0005, 32'h0000_0005, ALU_SUB);       // equal: Zero
    apply(32'hffff_ffff, 32'h0000_0001, ALU_ADD);       // wraps to 0
    apply(32'h0000_0000, 32'h0000_0000, ALU_OR);
    apply(32'h1234_0000, 32'h0000_5678, ALU_OR);
    apply(32'h0000_0000, 32'h0000_0001, ALU_SUB);       // -1
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] ra, rb;
      ra = $urandom; rb = (i % 7 == 0) ? ra : $urandom;
      apply(ra, rb, alu_ctr_e'(i % 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
