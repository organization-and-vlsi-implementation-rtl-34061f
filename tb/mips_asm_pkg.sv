// mips_asm_pkg: instruction encoders for the testbenches.
//
// One function per instruction format of mips_pkg; each returns the 32-bit
// machine word.  Used to build test programs in simulation.
package mips_asm_pkg;
  import mips_pkg::*;

  function automatic word_t a_alu3(alu_fn_e fn, int dst, int s2, int s1,
                                   bit k = 1'b0, int s3 = 0);
    return {OP_ALU3, fn, 4'(dst), 4'(s2), 4'(s1), k, 4'(s3), 7'd0};
  endfunction

  // double multiply / divide step: once in OD, once in SX
  function automatic word_t a_step2(alu_fn_e fn, int s1);
    return a_alu3(fn, 0, 0, s1) | 32'h40;
  endfunction

  // two-operand ALU part of a packed word: ds := ds fn s1
  function automatic logic [12:0] a_pk(alu_fn_e fn, int ds, int s1, bit k = 1'b0);
    return {fn, 4'(ds), 4'(s1), k};
  endfunction

  function automatic word_t a_ldp(int r, int base, int off6, logic [12:0] pk);
    return {OP_LDP, 4'(r), 4'(base), 6'(off6), 1'b1, pk};
  endfunction

  function automatic word_t a_stp(int r, int base, int off6, logic [12:0] pk);
    return {OP_STP, 4'(r), 4'(base), 6'(off6), 1'b1, pk};
  endfunction

  function automatic word_t a_ld(int r, int base, int disp);
    return {OP_LD, 4'(r), 4'(base), EA_BASED, 18'(disp)};
  endfunction

  function automatic word_t a_st(int r, int base, int disp);
    return {OP_ST, 4'(r), 4'(base), EA_BASED, 18'(disp)};
  endfunction

  function automatic word_t a_ldx(int r, int base, int idx);
    return {OP_LD, 4'(r), 4'(base), EA_INDEXED, 4'(idx), 14'd0};
  endfunction

  function automatic word_t a_stx(int r, int base, int idx);
    return {OP_ST, 4'(r), 4'(base), EA_INDEXED, 4'(idx), 14'd0};
  endfunction

  function automatic word_t a_lds(int r, int base, int idx);
    return {OP_LD, 4'(r), 4'(base), EA_SHIFTED, 4'(idx), 14'd0};
  endfunction

  function automatic word_t a_ldd(int r, int addr);
    return {OP_LD, 4'(r), 4'd0, EA_DIRECT, 18'(addr)};
  endfunction

  function automatic word_t a_std(int r, int addr);
    return {OP_ST, 4'(r), 4'd0, EA_DIRECT, 18'(addr)};
  endfunction

  function automatic word_t a_ldi(int r, int imm);
    return {OP_LDI, 4'(r), 24'(imm)};
  endfunction

  function automatic word_t a_bra(cond_e c, int s1, int s2, int off);
    return {OP_BRA, c, 4'(s1), 4'(s2), 16'(off)};
  endfunction

  function automatic word_t a_jmp(jmp_mode_e m, int r, int disp);
    return {OP_JMP, m, 4'(r), 22'(disp)};
  endfunction

  function automatic word_t a_trap(cond_e c, int s1, int s2, int code);
    return {OP_TRAP, c, 4'(s1), 4'(s2), 8'd0, 8'(code)};
  endfunction

  function automatic word_t a_set(cond_e c, int dst, int src);
    return {OP_SET, c, 4'(dst), 4'(src), 16'd0};
  endfunction

  function automatic word_t a_savepc(int sel, int base, int disp);
    return {OP_SAVEPC, 2'(sel), 4'(base), 22'(disp)};
  endfunction

  function automatic word_t a_movs_to(sp_e sp, int r);    // special := r
    return {OP_MOVS, 1'b1, sp, 4'(r), 20'd0};
  endfunction

  function automatic word_t a_movs_from(sp_e sp, int r);  // r := special
    return {OP_MOVS, 1'b0, sp, 4'(r), 20'd0};
  endfunction

  function automatic word_t a_nop();
    return {OP_NOP, 28'd0};
  endfunction

endpackage
