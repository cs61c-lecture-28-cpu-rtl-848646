// mips_asm_pkg: instruction encoders used by the testbenches.  Each function
// packs the fields of one instruction of the CPU's subset into its 32-bit word
// (R-type: op rs rt rd shamt funct; I-type: op rs rt imm16; J-type: op target).
package mips_asm_pkg;
  function automatic logic [31:0] r_type(input logic [5:0] funct, input int rd,
                                         input int rs, input int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, funct};
  endfunction
  function automatic logic [31:0] i_type(input logic [5:0] op, input int rt,
                                         input int rs, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] asm_add(input int rd, input int rs, input int rt);
    return r_type(6'h20, rd, rs, rt);
  endfunction
  function automatic logic [31:0] asm_sub(input int rd, input int rs, input int rt);
    return r_type(6'h22, rd, rs, rt);
  endfunction
  function automatic logic [31:0] asm_ori(input int rt, input int rs, input int imm);
    return i_type(6'h0d, rt, rs, imm);
  endfunction
  function automatic logic [31:0] asm_lw(input int rt, input int imm, input int rs);
    return i_type(6'h23, rt, rs, imm);
  endfunction
  function automatic logic [31:0] asm_sw(input int rt, input int imm, input int rs);
    return i_type(6'h2b, rt, rs, imm);
  endfunction
  // beq rs, rt, offset: offset counted in instructions from the next one
  function automatic logic [31:0] asm_beq(input int rs, input int rt, input int offset);
    return i_type(6'h04, rt, rs, offset);
  endfunction
  function automatic logic [31:0] asm_jump(input int target);
    return {6'h02, 26'(target)};
  endfunction
endpackage
