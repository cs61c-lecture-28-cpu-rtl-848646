// tb_extender: checks zero and sign extension of imm16 for every 16-bit value.
module tb_extender;
  import cpu_pkg::*;

  logic [15:0] imm16;
  ext_op_e ext_op;
  logic [31:0] imm32;
  int checks = 0, failures = 0;

  extender dut (.imm16, .ext_op, .imm32);

  initial begin
    for (int v = 0; v < 65536; v++) begin
      imm16 = 16'(v);
      ext_op = EXT_ZERO; #1;
      checks++;
      if (imm32 !== 32'(v)) begin
        failures++;
        $display("FAIL zero-ext %h -> %h", imm16, imm32);
      end
      ext_op = EXT_SIGN; #1;
      checks++;
      if ($signed(imm32) !== 32'(v >= 32768 ? v - 65536 : v)) begin
        failures++;
        $display("FAIL sign-ext %h -> %h", imm16, imm32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
