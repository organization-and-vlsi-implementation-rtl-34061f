// idu: instruction decode unit.
//
// Maps one 32-bit machine instruction onto the datapath control word
// (ctrl_t).  As in the published design the decode is mostly a matter of
// routing nibbles of the instruction onto control-word fields; the IDU
// knows nothing about pipeline sequencing or exceptions beyond flagging an
// illegal instruction and a privilege violation, both of which the master
// pipeline control handles.  It also contains the displacement generator
// (sign- or zero-extension of offset fields) and the small constant port
// (the 4-bit constant that may replace source 1 of an ALU operation).
//
// A multiply or divide step may be doubled (ALU3 bit 6): the step is done
// once with the ALU in OD and again in SX, so one instruction retires four
// multiplier bits or two quotient bits.
//
// A packed word (OP_LDP, OP_STP) carries a based load or store and an
// independent two-operand ALU operation: the memory part uses the ALU in OD
// and memory in SX/OF, the ALU part uses the ALU in SX.  Packed combined
// rotates and byte inserts are illegal here because their third operand
// would need a third register read in OD.
//
// `uses_dmem` reports during decode whether the instruction will use its
// data-memory slot, so the system can be warned of free memory cycles.
// The bit layout is described in mips_pkg and is this design's own.
// Purely combinational.
module idu
  import mips_pkg::*;
(
  input  word_t  instr,
  input  logic   sys,        // supervisor state of the instruction
  output ctrl_t  ctrl,
  output logic   uses_dmem
);

  opcode_e op;
  alu_fn_e pfn;
  assign op  = opcode_e'(instr[31:28]);
  assign pfn = alu_fn_e'(instr[12:9]);

  function automatic logic is_step(alu_fn_e f);
    return f == FN_MSTEP || f == FN_DSTEP;
  endfunction

  always_comb begin
    ctrl = '0;
    ctrl.fn   = FN_ADD;
    ctrl.cond = C_NEVER;
    ctrl.ea_mode = EA_BASED;
    ctrl.sp   = SP_H;
    unique case (op)
      OP_ALU3: begin
        ctrl.fn      = alu_fn_e'(instr[27:24]);
        ctrl.dst     = instr[23:20];
        ctrl.s2      = instr[19:16];
        ctrl.s1      = instr[15:12];
        ctrl.s1_imm  = instr[11];
        ctrl.imm     = {28'd0, instr[15:12]};
        ctrl.s3      = (alu_fn_e'(instr[27:24]) == FN_IC) ? instr[23:20] : instr[10:7];
        ctrl.hl_step = is_step(alu_fn_e'(instr[27:24]));
        ctrl.dbl     = is_step(alu_fn_e'(instr[27:24])) && instr[6];
        ctrl.alu_wb  = !is_step(alu_fn_e'(instr[27:24]));
      end
      OP_LDP, OP_STP: begin
        ctrl.mem_rd  = (op == OP_LDP);
        ctrl.mem_wr  = (op == OP_STP);
        ctrl.mem_reg = instr[27:24];
        ctrl.base    = instr[23:20];
        ctrl.ea_mode = EA_BASED;
        ctrl.disp    = {26'd0, instr[19:14]};
        if (instr[13]) begin
          ctrl.fn      = pfn;
          ctrl.dst     = instr[8:5];
          ctrl.s2      = instr[8:5];
          ctrl.s1      = instr[4:1];
          ctrl.s1_imm  = instr[0];
          ctrl.imm     = {28'd0, instr[4:1]};
          ctrl.hl_step = is_step(pfn);
          ctrl.alu_wb  = !is_step(pfn);
          ctrl.illegal = (pfn == FN_RLC) || (pfn == FN_IC);
        end
      end
      OP_LD, OP_ST: begin
        ctrl.mem_rd  = (op == OP_LD);
        ctrl.mem_wr  = (op == OP_ST);
        ctrl.mem_reg = instr[27:24];
        ctrl.base    = instr[23:20];
        ctrl.ea_mode = ea_mode_e'(instr[19:18]);
        ctrl.idx     = instr[17:14];
        ctrl.disp    = {{14{instr[17]}}, instr[17:0]};
      end
      OP_LDI: begin
        ctrl.fn      = FN_PASS;
        ctrl.dst     = instr[27:24];
        ctrl.s1_imm  = 1'b1;
        ctrl.imm     = {{8{instr[23]}}, instr[23:0]};
        ctrl.alu_wb  = 1'b1;
      end
      OP_BRA: begin
        ctrl.br      = 1'b1;
        ctrl.cond    = cond_e'(instr[27:24]);
        ctrl.s1      = instr[23:20];
        ctrl.s2      = instr[19:16];
        ctrl.disp    = {{16{instr[15]}}, instr[15:0]};
      end
      OP_JMP: begin
        ctrl.base    = instr[25:22];
        ctrl.disp    = {{10{instr[21]}}, instr[21:0]};
        unique case (jmp_mode_e'(instr[27:26]))
          JM_DIRECT: ctrl.jmp_dir = 1'b1;
          JM_BASED: begin
            ctrl.jmp_based = 1'b1;
            ctrl.fn        = FN_ADD;
            ctrl.s2        = instr[25:22];
            ctrl.s1_imm    = 1'b1;
            ctrl.imm       = {{10{instr[21]}}, instr[21:0]};
          end
          default: begin           // indirect, or indirect with mode restore
            ctrl.jmp_ind = 1'b1;
            ctrl.mem_rd  = 1'b1;
            ctrl.ea_mode = EA_BASED;
            ctrl.rfe     = (instr[27:26] == JM_RETURN);
            ctrl.priv    = (instr[27:26] == JM_RETURN) && !sys;
          end
        endcase
      end
      OP_TRAP: begin
        ctrl.trap    = 1'b1;
        ctrl.cond    = cond_e'(instr[27:24]);
        ctrl.s1      = instr[23:20];
        ctrl.s2      = instr[19:16];
        ctrl.tcode   = instr[7:0];
      end
      OP_SET: begin
        ctrl.set     = 1'b1;
        ctrl.cond    = cond_e'(instr[27:24]);
        ctrl.dst     = instr[23:20];
        ctrl.s1      = instr[19:16];
        ctrl.s2      = instr[23:20];
        ctrl.alu_wb  = 1'b1;
      end
      OP_SAVEPC: begin
        ctrl.mem_wr  = 1'b1;
        ctrl.st_pc   = 1'b1;
        ctrl.pc_sel  = instr[27:26];
        ctrl.base    = instr[25:22];
        ctrl.ea_mode = EA_BASED;
        ctrl.disp    = {{10{instr[21]}}, instr[21:0]};
        ctrl.illegal = (instr[27:26] == 2'd0);
      end
      OP_MOVS: begin
        ctrl.sp      = sp_e'(instr[26:24]);
        ctrl.illegal = (instr[26:24] > 3'd5);
        ctrl.priv    = !sys && (sp_e'(instr[26:24]) inside {SP_PSW, SP_MASK, SP_PID});
        if (instr[27]) begin
          ctrl.sp_wr = 1'b1;
          ctrl.s1    = instr[23:20];
        end else begin
          ctrl.sp_rd  = 1'b1;
          ctrl.dst    = instr[23:20];
          ctrl.alu_wb = 1'b1;
        end
      end
      OP_NOP: ;
      default: ctrl.illegal = 1'b1;
    endcase
  end

  assign uses_dmem = ctrl.mem_rd || ctrl.mem_wr;

endmodule
