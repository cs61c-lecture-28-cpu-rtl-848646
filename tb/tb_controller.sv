// tb_controller: checks the controller against the control-signal table.
//
// The expected values are the table's columns for add, sub, ori, lw, sw, beq and
// jump, written out bit by bit here; don't-care entries are not checked.
// Every other opcode, and R-type with every other funct, must assert nothing.
module tb_controller;
  import cpu_pkg::*;

  logic [5:0] op, func;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  controller dut (.op, .func, .ctrl);

  // expected row: {RegDst, ALUSrc, MemtoReg, RegWrite, MemWrite, nPCsel, Jump, ExtOp, ALUctr[1:0]}
  // mask marks the entries the table defines (1) versus don't-care (0)
  task automatic check_row(input string name, input logic [5:0] o, input logic [5:0] f,
                           input logic [9:0] exp, input logic [9:0] mask);
    logic [9:0] got;
    op = o; func = f; #1;
    got = {ctrl.reg_dst, ctrl.alu_src, ctrl.mem_to_reg, ctrl.reg_wr, ctrl.mem_wr,
           ctrl.npc_sel, ctrl.jump, ctrl.ext_op, ctrl.alu_ctr};
    checks++;
    if ((got & mask) !== (exp & mask)) begin
      failures++;
      $display("FAIL %s: got %b expected %b (mask %b)", name, got, exp, mask);
    end
  endtask

  initial begin
    //                              RD AS MR RW MW NP J  EO ALU
    check_row("add",  6'o00, 6'h20, 10'b1_0_0_1_0_0_0_0_00, 10'b1_1_1_1_1_1_1_0_11);
    check_row("sub",  6'o00, 6'h22, 10'b1_0_0_1_0_0_0_0_01, 10'b1_1_1_1_1_1_1_0_11);
    check_row("ori",  6'h0d, 6'h15, 10'b0_1_0_1_0_0_0_0_10, 10'b1_1_1_1_1_1_1_1_11);
    check_row("lw",   6'h23, 6'h3f, 10'b0_1_1_1_0_0_0_1_00, 10'b1_1_1_1_1_1_1_1_11);
    check_row("sw",   6'h2b, 6'h00, 10'b0_1_0_0_1_0_0_1_00, 10'b0_1_0_1_1_1_1_1_11);
    check_row("beq",  6'h04, 6'h20, 10'b0_0_0_0_0_1_0_0_01, 10'b0_1_0_1_1_1_1_0_11);
    check_row("jump", 6'h02, 6'h22, 10'b0_0_0_0_0_0_1_0_00, 10'b0_0_0_1_1_1_1_0_00);
    // the ori column: func bits are ignored for I-type
    for (int f = 0; f < 64; f++)
      check_row("ori-any-func", 6'h0d, 6'(f), 10'b0_1_0_1_0_0_0_0_10, 10'b1_1_1_1_1_1_1_1_11);
    // unsupported opcodes and funct codes: nothing asserted
    for (int o = 0; o < 64; o++) begin
      if (o inside {6'h00, 6'h0d, 6'h23, 6'h2b, 6'h04, 6'h02}) continue;
      check_row("other-op", 6'(o), 6'h20, 10'b0, 10'b11_1111_1111);
    end
    for (int f = 0; f < 64; f++) begin
      if (f inside {6'h20, 6'h22}) continue;
      check_row("other-func", 6'h00, 6'(f), 10'b0, 10'b11_1111_1111);
    end
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
