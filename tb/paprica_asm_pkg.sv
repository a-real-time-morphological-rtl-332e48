// paprica_asm_pkg -- instruction builders for the PAPRICA-3 testbenches.
//
// Small functions that assemble instr_t words, so that test programs read
// like the processor's assembly language, plus a software model of the
// 5x5 template match used to compute expected results independently.
package paprica_asm_pkg;
  import paprica_pkg::*;

  function automatic instr_t i_base(opcode_e op);
    instr_t i = '0;
    i.op = op;
    return i;
  endfunction

  // Rd acc= LOP(MOP(Rs1), Rs2) [%EN]
  function automatic instr_t i_morph(int rd, int rs1, int rs2, logic [24:0] care,
                                     logic [24:0] value, lop_e lop = LOP_M,
                                     acc_e acc = ACC_ST, logic en = 1'b0);
    instr_t i = i_base(OP_MORPH);
    i.rd = 4'(rd); i.rs1 = 4'(rs1); i.rs2 = 4'(rs2);
    i.care = care; i.value = value; i.lop = lop; i.acc = acc; i.en = en;
    return i;
  endfunction

  // Copy: Rd = centre(Rs)
  function automatic instr_t i_mov(int rd, int rs, acc_e acc = ACC_ST, logic en = 1'b0);
    return i_morph(rd, rs, 0, TPL_ID, TPL_ID, LOP_M, acc, en);
  endfunction

  function automatic instr_t i_ld(int rd, int desc, int plane, int off, acc_e acc = ACC_ST);
    instr_t i = i_base(OP_LD);
    i.rd = 4'(rd); i.acc = acc;
    i.imm = {4'(desc), 4'd0, 8'(plane), 8'(off)};
    return i;
  endfunction

  function automatic instr_t i_st(int rs, int desc, int plane, int off);
    instr_t i = i_base(OP_ST);
    i.rs1 = 4'(rs);
    i.imm = {4'(desc), 4'd0, 8'(plane), 8'(off)};
    return i;
  endfunction

  function automatic instr_t i_ldi(int rd, int plane);
    instr_t i = i_base(OP_LDI);
    i.rd = 4'(rd); i.imm = 24'(plane);
    return i;
  endfunction

  function automatic instr_t i_sti(int rs, int plane);
    instr_t i = i_base(OP_STI);
    i.rs1 = 4'(rs); i.imm = 24'(plane);
    return i;
  endfunction

  function automatic instr_t i_fen(int rs, int rsel);
    instr_t i = i_base(OP_FEN);
    i.rs1 = 4'(rs); i.rs2 = 4'(rsel);
    return i;
  endfunction

  function automatic instr_t i_icn(int rd, int rs, int rsw);
    instr_t i = i_base(OP_ICN);
    i.rd = 4'(rd); i.rs1 = 4'(rs); i.rs2 = 4'(rsw);
    return i;
  endfunction

  function automatic instr_t i_imm(opcode_e op, int imm, int rd = 0);
    instr_t i = i_base(op);
    i.rd = 4'(rd); i.imm = 24'(imm);
    return i;
  endfunction

  function automatic instr_t i_br(br_cond_e c, int target);
    return i_imm(OP_BR, target, int'(c));
  endfunction

  function automatic instr_t i_wld(int pm_start, int len);
    return i_imm(OP_WLD, (len << 12) | pm_start);
  endfunction

  // Software template match over a neighbourhood word.
  function automatic logic sw_match(logic [24:0] nb, logic [24:0] care, logic [24:0] value);
    for (int k = 0; k < 25; k++)
      if (care[k] && nb[k] != value[k]) return 1'b0;
    return 1'b1;
  endfunction

endpackage
