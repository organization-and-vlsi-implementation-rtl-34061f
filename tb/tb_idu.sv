// tb_idu: self-checking test of the instruction decoder.
//
// Encodes random instances of every instruction format with the assembler
// functions and checks the decoded control word: register fields, sign- or
// zero-extended displacements and constants, memory and write-back flags,
// the packed ALU part, branch / jump / trap / set flags and conditions, and
// the illegal-instruction and privilege checks in both user and supervisor
// state.
module tb_idu;
  import mips_pkg::*;
  import mips_asm_pkg::*;

  word_t instr;
  logic  sys, uses_dmem;
  ctrl_t ctrl;

  idu dut (.*);

  int checks = 0, failures = 0;
  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: instr=%h got %h expected %h", what, instr, got, exp);
    end
  endtask

  function automatic word_t sx(word_t v, int bits);
    return word_t'($signed(v << (32 - bits)) >>> (32 - bits));
  endfunction

  initial begin : watchdog
    #1_000_000;
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, b, x, d, s1, s2, dst;
    alu_fn_e f;
    cond_e   c;
    bit      k;
    for (int i = 0; i < 500; i++) begin
      r = $urandom_range(15); b = $urandom_range(15); x = $urandom_range(15);
      s1 = $urandom_range(15); s2 = $urandom_range(15); dst = $urandom_range(15);
      f = alu_fn_e'($urandom_range(15)); c = cond_e'($urandom_range(15)); k = 1'($urandom);
      sys = 1'($urandom);

      instr = a_alu3(f, dst, s2, s1, k, x); #1;
      check("alu fn", ctrl.fn, f);
      check("alu dst", ctrl.dst, dst);
      check("alu s1", ctrl.s1, s1);
      check("alu s2", ctrl.s2, s2);
      check("alu k", ctrl.s1_imm, k);
      check("alu imm", ctrl.imm, s1);
      check("alu s3", ctrl.s3, f == FN_IC ? dst : x);
      check("alu wb", ctrl.alu_wb, !(f inside {FN_MSTEP, FN_DSTEP}));
      check("alu step", ctrl.hl_step, f inside {FN_MSTEP, FN_DSTEP});
      check("alu double", ctrl.dbl, 0);
      instr = a_alu3(f, dst, s2, s1, k, x) | 32'h40; #1;
      check("alu double step", ctrl.dbl, f inside {FN_MSTEP, FN_DSTEP});
      check("alu mem", uses_dmem, 0);
      check("alu ok", ctrl.illegal | ctrl.priv, 0);

      d = $urandom_range(63);
      instr = a_ldp(r, b, d, a_pk(f, dst, s1, k)); #1;
      check("ldp rd", ctrl.mem_rd, 1);
      check("ldp reg", ctrl.mem_reg, r);
      check("ldp base", ctrl.base, b);
      check("ldp disp", ctrl.disp, d);
      check("ldp fn", ctrl.fn, f);
      check("ldp ds", ctrl.dst, dst);
      check("ldp s2", ctrl.s2, dst);
      check("ldp s1", ctrl.s1, s1);
      check("ldp illegal", ctrl.illegal, f inside {FN_RLC, FN_IC});
      check("ldp dmem", uses_dmem, 1);
      instr = a_stp(r, b, d, a_pk(f, dst, s1, k)); #1;
      check("stp wr", ctrl.mem_wr, 1);
      check("stp rd", ctrl.mem_rd, 0);

      d = $urandom_range(0, 'h3FFFF);
      instr = a_ld(r, b, d); #1;
      check("ld rd", ctrl.mem_rd, 1);
      check("ld mode", ctrl.ea_mode, EA_BASED);
      check("ld disp", ctrl.disp, sx(d, 18));
      check("ld wb", ctrl.alu_wb, 0);
      instr = a_stx(r, b, x); #1;
      check("stx wr", ctrl.mem_wr, 1);
      check("stx mode", ctrl.ea_mode, EA_INDEXED);
      check("stx idx", ctrl.idx, x);
      instr = a_lds(r, b, x); #1;
      check("lds mode", ctrl.ea_mode, EA_SHIFTED);
      instr = a_ldd(r, d); #1;
      check("ldd mode", ctrl.ea_mode, EA_DIRECT);

      d = $urandom_range(0, 'hFFFFFF);
      instr = a_ldi(r, d); #1;
      check("ldi imm", ctrl.imm, sx(d, 24));
      check("ldi dst", ctrl.dst, r);
      check("ldi fn", ctrl.fn, FN_PASS);
      check("ldi k", ctrl.s1_imm, 1);

      d = $urandom_range(0, 'hFFFF);
      instr = a_bra(c, s1, s2, d); #1;
      check("bra br", ctrl.br, 1);
      check("bra cond", ctrl.cond, c);
      check("bra s1", ctrl.s1, s1);
      check("bra s2", ctrl.s2, s2);
      check("bra disp", ctrl.disp, sx(d, 16));
      check("bra wb", ctrl.alu_wb, 0);

      d = $urandom_range(0, 'h3FFFFF);
      instr = a_jmp(JM_DIRECT, r, d); #1;
      check("jmp dir", ctrl.jmp_dir, 1);
      check("jmp disp", ctrl.disp, sx(d, 22));
      instr = a_jmp(JM_BASED, r, d); #1;
      check("jmp based", ctrl.jmp_based, 1);
      check("jmp based reg", ctrl.s2, r);
      check("jmp based imm", ctrl.imm, sx(d, 22));
      instr = a_jmp(JM_INDIRECT, r, d); #1;
      check("jmp ind", ctrl.jmp_ind & ctrl.mem_rd, 1);
      check("jmp ind rfe", ctrl.rfe, 0);
      check("jmp ind priv", ctrl.priv, 0);
      instr = a_jmp(JM_RETURN, r, d); #1;
      check("jmp ret", ctrl.jmp_ind & ctrl.rfe, 1);
      check("jmp ret priv", ctrl.priv, !sys);

      instr = a_trap(c, s1, s2, d[7:0]); #1;
      check("trap", ctrl.trap, 1);
      check("trap cond", ctrl.cond, c);
      check("trap code", ctrl.tcode, d[7:0]);

      instr = a_set(c, dst, s1); #1;
      check("set", ctrl.set & ctrl.alu_wb, 1);
      check("set s1", ctrl.s1, s1);
      check("set s2", ctrl.s2, dst);

      x = $urandom_range(3);
      instr = a_savepc(x, b, d); #1;
      check("savepc st", ctrl.mem_wr & ctrl.st_pc, 1);
      check("savepc sel", ctrl.pc_sel, x);
      check("savepc illegal", ctrl.illegal, x == 0);

      x = $urandom_range(7);
      instr = a_movs_to(sp_e'(x), r); #1;
      check("movs to", ctrl.sp_wr, 1);
      check("movs to illegal", ctrl.illegal, x > 5);
      check("movs to priv", ctrl.priv, !sys && x inside {2, 3, 4});
      instr = a_movs_from(sp_e'(x), r); #1;
      check("movs from", ctrl.sp_rd & ctrl.alu_wb, 1);
      check("movs from dst", ctrl.dst, r);

      instr = a_nop(); #1;
      check("nop", {ctrl.alu_wb, ctrl.mem_rd, ctrl.mem_wr, ctrl.illegal, ctrl.br}, 0);
      instr = {4'($urandom_range('hC, 'hE)), 28'($urandom)}; #1;
      check("unused opcode", ctrl.illegal, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
