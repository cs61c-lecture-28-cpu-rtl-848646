// tb_controller_and_plane: all 4096 combinations of opcode and funct, checked
// against the opcode/funct table (one line high for a match, none otherwise).
module tb_controller_and_plane;
  import cpu_pkg::*;

  logic [5:0] op, func;
  inst_lines_t lines;
  int checks = 0, failures = 0;

  controller_and_plane dut (.op, .func, .lines);

  initial begin
    for (int o = 0; o < 64; o++) begin
      for (int f = 0; f < 64; f++) begin
        logic [6:0] exp;  // {add, sub, ori, lw, sw, beq, jump}
        op = 6'(o); func = 6'(f); #1;
        case (o)
          'b000000: exp = (f == 'b100000) ? 7'b1000000 :
                          (f == 'b100010) ? 7'b0100000 : 7'b0;
          'b001101: exp = 7'b0010000;
          'b100011: exp = 7'b0001000;
          'b101011: exp = 7'b0000100;
          'b000100: exp = 7'b0000010;
          'b000010: exp = 7'b0000001;
          default:  exp = 7'b0;
        endcase
        checks++;
        if (lines !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL op=%b func=%b lines=%b expected %b", op, func, lines, exp);
        end
      end
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
