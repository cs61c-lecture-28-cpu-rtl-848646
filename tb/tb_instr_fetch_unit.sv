// tb_instr_fetch_unit: loads random words into a reduced-size instruction
// memory, then drives nPC_sel and Zero at random and checks every cycle that
// the instruction is the word at the PC and that the next PC is PC + 4, or
// PC + 4 + SignExt(imm16)*4 when both nPC_sel and Zero are 1.  Each PC update
// takes exactly one clock.  Counts both kinds of update.
module tb_instr_fetch_unit;
  localparam int AW = 6;
  logic clk = 0, rst;
  logic npc_sel, zero;
  logic [31:0] instruction, pc;
  logic prog_we;
  logic [AW-1:0] prog_addr;
  logic [31:0] prog_data;
  logic [31:0] model [2**AW];
  logic [31:0] exp_pc;
  int checks = 0, failures = 0, taken = 0, seq = 0;

  instr_fetch_unit #(.IMEM_ADDR_W(AW)) dut (
    .clk, .rst, .npc_sel, .zero, .instruction, .pc, .prog_we, .prog_addr, .prog_data
  );

  always #5 clk = ~clk;

  initial begin
    rst = 1; npc_sel = 0; zero = 0; prog_we = 0; prog_addr = 0; prog_data = 0;
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = AW'(i);
      // small branch offsets, both signs
      prog_data = {16'($urandom), 16'(int'($urandom % 41) - 20)};
      model[i] = prog_data;
    end
    @(negedge clk);
    prog_we = 0;
    @(negedge clk);
    rst = 0;
    exp_pc = 0;
    checks++;
    if (pc !== 0) begin failures++; $display("FAIL reset pc %h", pc); end
    for (int i = 0; i < 3000; i++) begin
      npc_sel = ($urandom % 2) == 1; zero = ($urandom % 2) == 1; #1;
      checks++;
      if (instruction !== model[exp_pc[AW+1:2]]) begin
        failures++;
        $display("FAIL instruction at %h = %h expected %h", pc, instruction, model[exp_pc[AW+1:2]]);
      end
      if (npc_sel && zero) begin
        exp_pc = exp_pc + 4 + {{14{instruction[15]}}, instruction[15:0], 2'b00};
        taken++;
      end else begin
        exp_pc = exp_pc + 4;
        seq++;
      end
      @(posedge clk); #1;
      checks++;
      if (pc !== exp_pc) begin
        failures++;
        $display("FAIL pc %h expected %h", pc, exp_pc);
      end
      @(negedge clk);
    end
    if (taken == 0 || seq == 0) failures++;
    $display("branch updates %0d, +4 updates %0d", taken, seq);
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
