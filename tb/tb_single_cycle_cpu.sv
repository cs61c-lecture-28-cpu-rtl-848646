// tb_single_cycle_cpu: end-to-end test of the CPU at its default sizes.
//
// An instruction-level reference model in this testbench runs in lockstep with
// the CPU: every cycle it checks the PC and the instruction, the register write
// (enable, register number and value), the data-memory write (enable, address
// and data) and the Jump output, then advances one instruction.  Any cycle that
// differs is a failure, so the test also checks that every instruction takes
// exactly one clock.
// Phase 1 runs a directed program: a loop summing 10..1 that stores and reloads
// each partial sum, leaves through a taken beq and loops back through another,
// then a jump, a write to register 0, a load with a negative offset, ori with a
// high immediate and an opcode outside the subset.  Phase 2 resets the CPU and
// runs random programs of the whole subset with forward branches.  The test
// counts how often each mechanism happened and fails any that never did.
module tb_single_cycle_cpu;
  import cpu_pkg::*;
  import mips_asm_pkg::*;

  localparam int IAW = 10;  // must match the CPU's default instruction memory
  localparam int DAW = 10;

  logic clk = 0, rst;
  logic prog_we;
  logic [IAW-1:0] prog_addr;
  logic [31:0] prog_data;
  logic [31:0] pc, instruction, bus_w, mem_adr, mem_wdata;
  logic jump, reg_wr, mem_wr;
  logic [4:0] reg_rw;

  single_cycle_cpu dut (
    .clk, .rst, .prog_we, .prog_addr, .prog_data, .pc, .instruction, .jump,
    .reg_wr, .reg_rw, .bus_w, .mem_wr, .mem_adr, .mem_wdata
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // reference model state
  logic [31:0] prog [2**IAW];
  logic [31:0] r [32];
  logic [31:0] m [2**DAW];
  bit          m_valid [2**DAW];
  logic [31:0] rpc;

  // mechanism counters
  typedef enum int {
    EV_ADD, EV_SUB, EV_ORI, EV_LW, EV_SW, EV_BEQ_TAKEN, EV_BEQ_NOT_TAKEN, EV_JUMP,
    EV_R0_WRITE, EV_NEG_OFFSET, EV_ORI_HIGH_IMM, EV_OTHER_OP, EV_LOAD_AFTER_STORE, EV_N
  } ev_e;
  int ev [EV_N];
  string ev_name [EV_N] = '{"add", "sub", "ori", "lw", "sw", "beq taken", "beq not taken",
                            "jump", "write to r0", "negative offset", "ori high imm16",
                            "opcode outside subset", "load after store"};

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL pc=%h: %s", rpc, msg);
    end
  endtask

  task automatic load_program(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = IAW'(i); prog_data = prog[i];
    end
    @(negedge clk);
    prog_we = 0;
  endtask

  task automatic reset_cpu();
    rst = 1;
    @(posedge clk); @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int i = 0; i < 32; i++) r[i] = 0;
    rpc = 0;
  endtask

  // one lockstep cycle: called just after a falling edge
  task automatic step();
    logic [31:0] ins, a, b, sext, zext, ea, exp;
    logic [5:0] op, fn;
    int rs, rt, rd, widx;
    bit exp_rw, exp_mw, exp_j;
    int wreg;
    ins = prog[rpc[IAW+1:2]];
    op = ins[31:26]; fn = ins[5:0];
    rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11];
    a = r[rs]; b = r[rt];
    sext = {{16{ins[15]}}, ins[15:0]};
    zext = {16'h0, ins[15:0]};
    ea = a + sext;
    widx = ea[DAW+1:2];
    exp_rw = 0; exp_mw = 0; exp_j = 0; wreg = 0; exp = 0;
    #1;
    check(pc === rpc, $sformatf("pc %h expected %h", pc, rpc));
    check(instruction === ins, $sformatf("instruction %h expected %h", instruction, ins));
    if (op == 6'h00 && fn == 6'h20) begin
      exp_rw = 1; wreg = rd; exp = a + b; ev[EV_ADD]++;
    end else if (op == 6'h00 && fn == 6'h22) begin
      exp_rw = 1; wreg = rd; exp = a - b; ev[EV_SUB]++;
    end else if (op == 6'h0d) begin
      exp_rw = 1; wreg = rt; exp = a | zext; ev[EV_ORI]++;
      if (ins[15]) ev[EV_ORI_HIGH_IMM]++;
    end else if (op == 6'h23) begin
      exp_rw = 1; wreg = rt; ev[EV_LW]++;
      if (ins[15]) ev[EV_NEG_OFFSET]++;
      if (m_valid[widx]) begin
        exp = m[widx]; ev[EV_LOAD_AFTER_STORE]++;
      end else begin
        // a word never stored: its power-up value is unknown, take the CPU's
        exp = bus_w; m[widx] = bus_w; m_valid[widx] = 1;
      end
    end else if (op == 6'h2b) begin
      exp_mw = 1; ev[EV_SW]++;
      if (ins[15]) ev[EV_NEG_OFFSET]++;
    end else if (op == 6'h04) begin
      if (a == b) ev[EV_BEQ_TAKEN]++; else ev[EV_BEQ_NOT_TAKEN]++;
    end else if (op == 6'h02) begin
      exp_j = 1; ev[EV_JUMP]++;
    end else begin
      ev[EV_OTHER_OP]++;
    end
    if (exp_rw && wreg == 0) ev[EV_R0_WRITE]++;
    check(reg_wr === exp_rw, $sformatf("RegWr %b expected %b (%h)", reg_wr, exp_rw, ins));
    if (exp_rw)
      check(reg_rw === 5'(wreg) && bus_w === exp,
            $sformatf("write r%0d=%h expected r%0d=%h", reg_rw, bus_w, wreg, exp));
    check(mem_wr === exp_mw, $sformatf("MemWr %b expected %b", mem_wr, exp_mw));
    if (exp_mw)
      check(mem_adr === ea && mem_wdata === b,
            $sformatf("store %h->[%h] expected %h->[%h]", mem_wdata, mem_adr, b, ea));
    check(jump === exp_j, $sformatf("Jump %b expected %b", jump, exp_j));
    // advance the model
    if (exp_rw && wreg != 0) r[wreg] = exp;
    if (exp_mw) begin m[widx] = b; m_valid[widx] = 1; end
    if (op == 6'h04 && a == b) rpc = rpc + 4 + {sext[29:0], 2'b00};
    else rpc = rpc + 4;
    @(negedge clk);
  endtask

  initial begin
    int n;
    rst = 1; prog_we = 0; prog_addr = 0; prog_data = 0;
    for (int i = 0; i < 2**DAW; i++) m_valid[i] = 0;
    for (int i = 0; i < 2**IAW; i++) prog[i] = asm_beq(0, 0, -1);

    // ---- phase 1: directed program ----
    n = 0;
    prog[n++] = asm_ori(1, 0, 10);        // r1 = 10 (counter)
    prog[n++] = asm_ori(2, 0, 0);         // r2 = 0  (sum)
    prog[n++] = asm_ori(3, 0, 1);         // r3 = 1
    prog[n++] = asm_ori(4, 0, 16'h100);   // r4 = 0x100 (pointer)
    prog[n++] = asm_ori(6, 0, 4);         // r6 = 4
    prog[n++] = asm_add(2, 2, 1);         // 5: loop: sum += counter
    prog[n++] = asm_sw(2, 0, 4);          //    mem[r4] = sum
    prog[n++] = asm_lw(5, 0, 4);          //    r5 = mem[r4]
    prog[n++] = asm_add(4, 4, 6);         //    r4 += 4
    prog[n++] = asm_sub(1, 1, 3);         //    counter -= 1
    prog[n++] = asm_beq(1, 0, 1);         // 10: leave when counter == 0
    prog[n++] = asm_beq(0, 0, -7);        // 11: back to 5
    prog[n++] = asm_jump(16'h40);         // 12: Jump raised, falls through
    prog[n++] = asm_add(0, 1, 3);         //     write to r0 is discarded
    prog[n++] = asm_lw(7, -4, 4);         //     r7 = last sum (55)
    prog[n++] = asm_sub(8, 0, 3);         //     r8 = -1
    prog[n++] = asm_ori(9, 0, 16'h8001);  //     r9 = 0x00008001
    prog[n++] = {6'h08, 5'd1, 5'd10, 16'd5}; //  opcode outside the subset
    prog[n++] = asm_sw(8, -8, 4);         //     mem[r4-8] = -1
    prog[n++] = asm_lw(10, -8, 4);
    prog[n++] = asm_beq(9, 8, 5);         //     not taken
    prog[n++] = asm_beq(0, 0, -1);        //     stop: branch to itself
    load_program(n);
    reset_cpu();
    for (int c = 0; c < 200 && rpc != 32'((n - 1) * 4); c++) step();
    check(rpc == 32'((n - 1) * 4), "directed program did not reach its end");
    check(r[7] == 32'd55 && r[2] == 32'd55 && r[5] == 32'd55, "sum of 10..1 is not 55");
    check(r[8] == 32'hffff_ffff && r[9] == 32'h0000_8001 && r[10] == 32'hffff_ffff,
          "sub/ori/lw results");
    repeat (3) step();  // the final self-branch keeps the PC in place

    // ---- phase 2: random programs ----
    for (int p = 0; p < 4; p++) begin
      n = 300;
      for (int i = 0; i < n; i++) begin
        int k, ra, rb, rc;
        k = $urandom % 10;
        ra = $urandom % 8; rb = $urandom % 8; rc = $urandom % 8;  // few registers: more equality
        case (k)
          0, 1: prog[i] = asm_add(ra, rb, rc);
          2:    prog[i] = asm_sub(ra, rb, rc);
          3, 4: prog[i] = asm_ori(ra, rb, int'($urandom % 65536));
          5:    prog[i] = asm_lw(ra, int'($urandom % 64) * 4, 0);
          6:    prog[i] = asm_sw(ra, int'($urandom % 64) * 4, 0);
          7:    prog[i] = asm_beq(ra, rb, int'($urandom % 4));
          8:    prog[i] = asm_beq(ra, ra, int'($urandom % 3));
          default: prog[i] = asm_sub(ra, rb, rb);  // writes 0, makes equal operands likely
        endcase
      end
      prog[n] = asm_beq(0, 0, -1);
      for (int i = n + 1; i < n + 8; i++) prog[i] = asm_beq(0, 0, -1);
      load_program(n + 8);
      reset_cpu();
      for (int c = 0; c < 2000 && rpc < 32'(n * 4); c++) step();
      check(rpc >= 32'(n * 4), "random program did not finish");
    end

    for (int e = 0; e < EV_N; e++) begin
      $display("%-22s %0d", ev_name[e], ev[e]);
      check(ev[e] > 0, $sformatf("mechanism never exercised: %s", ev_name[e]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
