// tb_datapath: drives the datapath with instruction fields and hand-set control
// values for add, sub, ori, lw, sw and beq, one per cycle, and compares the
// register-write bus, the memory-write bus and Zero with a reference model of
// the register file and data memory kept in the testbench.
module tb_datapath;
  import cpu_pkg::*;
  localparam int AW = 6;
  logic clk = 0, rst;
  logic [4:0] rs, rt, rd;
  logic [15:0] imm16;
  ctrl_t ctrl;
  logic zero, reg_wr, mem_wr;
  logic [4:0] reg_rw;
  logic [31:0] bus_w, mem_adr, mem_wdata;
  logic [31:0] rf [32];
  logic [31:0] dm [2**AW];
  logic        dm_valid [2**AW];
  int checks = 0, failures = 0;
  int n_op [6];

  datapath #(.DMEM_ADDR_W(AW)) dut (
    .clk, .rst, .rs, .rt, .rd, .imm16, .ctrl, .zero,
    .reg_wr, .reg_rw, .bus_w, .mem_wr, .mem_adr, .mem_wdata
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    rst = 1; ctrl = '0; rs = 0; rt = 0; rd = 0; imm16 = 0;
    for (int i = 0; i < 32; i++) rf[i] = 0;
    for (int i = 0; i < 2**AW; i++) dm_valid[i] = 0;
    @(posedge clk); @(posedge clk);
    @(negedge clk); rst = 0;
    for (int i = 0; i < 4000; i++) begin
      int k;
      logic [31:0] a, b, ea, exp;
      @(negedge clk);
      // the first 200 cycles only write registers, with ori
      k = (i < 200) ? 2 : int'($urandom % 6);
      rs = 5'($urandom); rt = 5'($urandom); rd = 5'($urandom); imm16 = 16'($urandom);
      ctrl = '0;
      a = rf[rs]; b = rf[rt];
      case (k)
        0: begin ctrl.reg_dst = 1; ctrl.reg_wr = 1; ctrl.alu_ctr = ALU_ADD; end
        1: begin ctrl.reg_dst = 1; ctrl.reg_wr = 1; ctrl.alu_ctr = ALU_SUB; end
        2: begin ctrl.alu_src = 1; ctrl.reg_wr = 1; ctrl.ext_op = EXT_ZERO; ctrl.alu_ctr = ALU_OR; end
        3, 4: begin
          // lw / sw: base register 0 so that the address stays in the small memory
          rs = 0; a = 0;
          imm16 = 16'(($urandom % (2**AW)) * 4);
          ctrl.alu_src = 1; ctrl.ext_op = EXT_SIGN; ctrl.alu_ctr = ALU_ADD;
          if (k == 3) begin ctrl.mem_to_reg = 1; ctrl.reg_wr = 1; end
          else ctrl.mem_wr = 1;
        end
        default: begin
          if ($urandom % 2) rt = rs;
          b = rf[rt];
          ctrl.npc_sel = 1; ctrl.alu_ctr = ALU_SUB;
        end
      endcase
      n_op[k]++;
      ea = a + {{16{imm16[15]}}, imm16};
      if (k == 3 && !dm_valid[ea[AW+1:2]]) begin
        // never read a word that was not written: turn it into a store
        k = 4; ctrl.mem_to_reg = 0; ctrl.reg_wr = 0; ctrl.mem_wr = 1;
      end
      #1;
      case (k)
        0: exp = a + b;
        1: exp = a - b;
        2: exp = a | {16'h0, imm16};
        3: exp = dm[ea[AW+1:2]];
        default: exp = 0;
      endcase
      if (k <= 3) begin
        check(reg_wr && bus_w === exp && reg_rw === ((k <= 1) ? rd : rt),
              $sformatf("op %0d write r%0d=%h expected r%0d=%h", k, reg_rw, bus_w,
                        (k <= 1) ? rd : rt, exp));
        check(!mem_wr, "memory written by a register op");
      end else if (k == 4) begin
        check(mem_wr && mem_adr === ea && mem_wdata === b && !reg_wr,
              $sformatf("sw adr %h data %h expected %h %h", mem_adr, mem_wdata, ea, b));
      end else begin
        check(zero === (a == b) && !reg_wr && !mem_wr,
              $sformatf("beq zero %b for %h %h", zero, a, b));
      end
      @(posedge clk);
      if (k <= 3) begin
        if (((k <= 1) ? rd : rt) != 0) rf[(k <= 1) ? rd : rt] = exp;
      end else if (k == 4) begin
        dm[ea[AW+1:2]] = b; dm_valid[ea[AW+1:2]] = 1;
      end
    end
    for (int k = 0; k < 6; k++) check(n_op[k] > 0, $sformatf("operation %0d never ran", k));
    $display("add %0d sub %0d ori %0d lw %0d sw %0d beq %0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5]);
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
