// asip_asm_pkg: small assembler for testbench programs. Each function
// returns an instruction word with only its own slot filled in; a VLIW word
// is built by OR-ing slots together, e.g.
//   mv(SRC_PKM, DST_DM, SZ16) | agu1(AGU_POSTINC, 1, 2) | agu2(AGU_POSTINC, 0, 2)
// Slots that use the shared 16 bit immediate must agree on its value.
package asip_asm_pkg;
  import asip_pkg::*;

  function automatic instr_t mv(ls_src_e s, ls_dst_e d, size_e sz,
                                int sreg = 0, int dreg = 0);
    instr_t i = '0;
    i.ls_src = s; i.ls_dst = d; i.ls_size = sz;
    i.ls_sreg = ridx_t'(sreg); i.ls_dreg = ridx_t'(dreg);
    return i;
  endfunction

  function automatic instr_t agu1(agu_mode_e m, int p, int off = 0);
    instr_t i = '0;
    i.agu1 = '{mode: m, ptr: ridx_t'(p), off: 5'(off)};
    return i;
  endfunction

  function automatic instr_t agu2(agu_mode_e m, int p, int off = 0);
    instr_t i = '0;
    i.agu2 = '{mode: m, ptr: ridx_t'(p), off: 5'(off)};
    return i;
  endfunction

  function automatic instr_t alu(alu_op_e op, int rd, int rs);
    instr_t i = '0;
    i.alu = '{op: op, rd: ridx_t'(rd), rs: ridx_t'(rs), use_imm: 1'b0};
    return i;
  endfunction

  function automatic instr_t alui(alu_op_e op, int rd, int imm);
    instr_t i = '0;
    i.alu = '{op: op, rd: ridx_t'(rd), rs: '0, use_imm: 1'b1};
    i.imm16 = 16'(imm);
    return i;
  endfunction

  function automatic instr_t imm(int v);
    instr_t i = '0;
    i.imm16 = 16'(v);
    return i;
  endfunction

  function automatic instr_t br(br_op_e op, int reg_i, int t0, int t1 = 0, bit delayed = 0);
    instr_t i = '0;
    i.br_op = op; i.br_reg = ridx_t'(reg_i); i.br_delay = delayed;
    i.imm16 = {8'(t1), 8'(t0)};
    return i;
  endfunction

  function automatic instr_t halt();
    instr_t i = '0;
    i.br_op = BR_HALT;
    return i;
  endfunction

  function automatic instr_t cs(bit en0, bit en1, bit sw = 0);
    instr_t i = '0;
    i.csum = '{en0: en0, en1: en1, swap: sw};
    return i;
  endfunction

  // ones' complement helpers for expected values
  function automatic int unsigned oc_fold(int unsigned s);
    while ((s >> 16) != 0) s = (s & 32'hFFFF) + (s >> 16);
    return s;
  endfunction
endpackage
