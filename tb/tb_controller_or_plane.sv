// tb_controller_or_plane: drives each instruction line alone, and none, and
// checks the control signals against the columns of the control table
// (don't-care entries are not checked).
module tb_controller_or_plane;
  import cpu_pkg::*;

  inst_lines_t lines;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  controller_or_plane dut (.lines, .ctrl);

  // row order: {RegDst, ALUSrc, MemtoReg, RegWrite, MemWrite, nPCsel, Jump, ExtOp, ALUctr[1:0]}
  task automatic check_col(input string name, input logic [6:0] l,
                           input logic [9:0] exp, input logic [9:0] mask);
    logic [9:0] got;
    lines = l; #1;
    got = {ctrl.reg_dst, ctrl.alu_src, ctrl.mem_to_reg, ctrl.reg_wr, ctrl.mem_wr,
           ctrl.npc_sel, ctrl.jump, ctrl.ext_op, ctrl.alu_ctr};
    checks++;
    if ((got & mask) !== (exp & mask)) begin
      failures++;
      $display("FAIL %s: got %b expected %b", name, got, exp);
    end
  endtask

  initial begin
    check_col("add",  7'b1000000, 10'b1_0_0_1_0_0_0_0_00, 10'b1_1_1_1_1_1_1_0_11);
    check_col("sub",  7'b0100000, 10'b1_0_0_1_0_0_0_0_01, 10'b1_1_1_1_1_1_1_0_11);
    check_col("ori",  7'b0010000, 10'b0_1_0_1_0_0_0_0_10, 10'b1_1_1_1_1_1_1_1_11);
    check_col("lw",   7'b0001000, 10'b0_1_1_1_0_0_0_1_00, 10'b1_1_1_1_1_1_1_1_11);
    check_col("sw",   7'b0000100, 10'b0_1_0_0_1_0_0_1_00, 10'b0_1_0_1_1_1_1_1_11);
    check_col("beq",  7'b0000010, 10'b0_0_0_0_0_1_0_0_01, 10'b0_1_0_1_1_1_1_0_11);
    check_col("jump", 7'b0000001, 10'b0_0_0_0_0_0_1_0_00, 10'b0_0_0_1_1_1_1_0_00);
    check_col("none", 7'b0000000, 10'b0, 10'b11_1111_1111);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
