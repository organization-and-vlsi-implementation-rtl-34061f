// mips_top: the MIPS processor.
//
// A 32-bit load/store processor whose pipeline has no hardware interlocks:
// the code is scheduled so that no instruction reads a register before it
// has been written.  One clock is one pipestage; a machine cycle is two
// pipestages, and a new instruction starts every machine cycle.  Each
// instruction passes through five pipestages, overlapped with its
// neighbours:
//
//   slot:        A    B    A    B    A
//   instr I:     IF   ID   OD   SX   OF
//   instr I+1:             IF   ID   OD   SX   OF
//
//   IF  instruction address on the bus          ID  instruction word arrives, decoded
//   OD  ALU forms the data address or the       SX  data address on the bus; ALU does the
//       branch target                               register-register operation or compare
//   OF  load word arrives / store word driven
//
// Consequences that software must respect (as in the published design):
// a loaded register cannot be used by the next instruction; every branch
// (taken at the end of SX) is followed by one delay instruction, and an
// indirect jump (its target arrives in OF) by two.  A word may pack a based
// load or store with an independent two-operand ALU operation, which uses
// the ALU in SX while the memory part used it in OD; likewise a multiply or
// divide step may be doubled, using the ALU in both OD and SX.
//
// Exceptions are precise.  The instruction furthest along is reported; an
// instruction's writes are suppressed when it faults (an overflowing result
// is still written and the fault reported, so the run-time system can undo
// it).  On an exception the processor enters supervisor state, turns off
// address masking and interrupts, freezes the three-entry PC history (which
// then holds the faulting instruction, the next one and the next PC), runs a
// synchronization cycle and fetches from address zero.  SavePC stores the
// history entries; three indirect jumps return, the first of them with the
// mode-restoring flag.
//
// Pins: 24 address lines, 32 data lines (split into data_i / data_o with
// data_oe_o), status out (ifetch_o, rw_o, dref_o, dfree_o, dma_ack_o, exc_o,
// sys_o, addr_oe_o) and status in (ihit_i, dready_i, page_fault_i,
// bus_error_i, irq_i, dma_req_i, rst_n).  ihit_i / dready_i / page_fault_i
// are sampled in the address pipestage, bus_error_i in the data pipestage.
// dfree_o, during ID, warns that the next data slot will be unused.
// The grouping of status pins, the operand timing within a pipestage and the
// machine encoding (see mips_pkg) are this design's choices.
module mips_top
  import mips_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // memory bus
  output logic [ABUS_W-1:0] addr_o,
  output logic              addr_oe_o,
  output logic              ifetch_o,
  output logic              dref_o,
  output logic              rw_o,
  input  word_t             data_i,
  output word_t             data_o,
  output logic              data_oe_o,
  // status in
  input  logic              ihit_i,
  input  logic              dready_i,
  input  logic              page_fault_i,
  input  logic              bus_error_i,
  input  logic              irq_i,
  input  logic              dma_req_i,
  // status out
  output logic              dma_ack_o,
  output logic              dfree_o,
  output logic              exc_o,
  output exc_e              exc_cause_o,
  output logic              sys_o
);

  // ------------------------------------------------------------------
  // master pipeline control
  // ------------------------------------------------------------------
  mpc_state_e state;
  logic       slot_b, fetch, adv, take_exc, dma_ack;
  exc_e       exc_cause;

  // ------------------------------------------------------------------
  // pipeline registers
  // ------------------------------------------------------------------
  psw_t  psw;

  logic  f_valid;
  word_t f_pc;
  itag_t f_tag;
  exc_e  f_exc;

  logic  e_valid;
  ctrl_t e;
  word_t e_pc;
  itag_t e_tag;
  exc_e  e_exc;
  word_t e_s3;

  logic  m_valid;
  logic  m_ld, m_st, m_jind, m_rfe;
  reg_t  m_reg;

  // ------------------------------------------------------------------
  // datapath signals
  // ------------------------------------------------------------------
  word_t   rd_a, rd_b;
  reg_t    ra_a, ra_b;
  logic    we_a, we_b;
  word_t   alu_a, alu_b, alu_y, sh_a, sh_y, sx_result;
  alu_fn_e alu_fn, sh_fn;
  logic [4:0] sh_amt;
  logic    alu_ovf, cond_true;
  word_t   h, l;
  word_t   pc, btr, pc_m1, pc_m2, pc_m3;
  pc_src_e pc_sel;
  logic    pc_shift;
  logic [SEG_W-1:0] mask, pid;
  logic    map_err;
  ctrl_t   dec;
  logic    dec_dmem;

  logic    e_ok;          // instruction in OD/SX is live and carries no fault
  logic    e_mem, e_std_b, e_use_s3;
  logic    dref_active;
  logic    e_ovf, e_trap, e_pgf, e_merr;
  logic    sx_commit;     // slot-B edge on which the SX instruction completes
  word_t   ea, od_sum, sp_val, std_val;

  assign e_ok     = e_valid && (e_exc == EXC_NONE);
  assign e_mem    = e.mem_rd || e.mem_wr;
  assign e_std_b  = e.mem_wr && !e.st_pc && (e.ea_mode inside {EA_INDEXED, EA_SHIFTED});
  assign e_use_s3 = !e_mem && (e.fn == FN_RLC || e.fn == FN_IC) && e.alu_wb;

  // ------------------------------------------------------------------
  // register file: port use per pipestage
  //   slot A (OD): A = base (or third source), B = index or store word
  //   slot B (SX): A = source 1, B = source 2 (or store word, indexed modes)
  // ------------------------------------------------------------------
  always_comb begin
    if (!slot_b) begin
      ra_a = e_use_s3 ? e.s3 : (e.dbl ? e.s1 : e.base);
      ra_b = (e.ea_mode inside {EA_INDEXED, EA_SHIFTED}) ? e.idx : e.mem_reg;
    end else begin
      ra_a = e.s1;
      ra_b = e_std_b ? e.mem_reg : e.s2;
    end
  end

  reg_file u_rf (
    .clk  (clk),
    .rst_n(rst_n),
    .ra_a (ra_a),
    .rd_a (rd_a),
    .ra_b (ra_b),
    .rd_b (rd_b),
    .we_a (we_a),
    .wa_a (m_reg),
    .wd_a (data_i),
    .we_b (we_b),
    .wa_b (e.dst),
    .wd_b (sx_result)
  );

  // ------------------------------------------------------------------
  // ALU and shifter, shared between OD (slot A) and SX (slot B)
  // ------------------------------------------------------------------
  always_comb begin
    if (!slot_b) begin
      alu_fn = FN_ADD;
      alu_b  = e.br ? e_pc : ((e.ea_mode == EA_DIRECT || e.jmp_dir) ? '0 : rd_a);
      alu_a  = (e.ea_mode == EA_INDEXED && !e.br && !e.jmp_dir) ? rd_b : e.disp;
      if (e.dbl) begin                 // first half of a double step
        alu_fn = e.fn;
        alu_a  = e.s1_imm ? e.imm : rd_a;
      end
      sh_fn  = FN_SRL;
      sh_a   = rd_a;
      sh_amt = rd_b[4:0];
    end else begin
      alu_fn = e.fn;
      alu_a  = e.s1_imm ? e.imm : rd_a;
      alu_b  = rd_b;
      sh_fn  = e.fn;
      sh_a   = rd_b;
      sh_amt = alu_a[4:0];
    end
  end

  assign sx_commit = slot_b && adv && e_valid && (!take_exc || exc_cause == EXC_OVF);

  alu u_alu (
    .clk      (clk),
    .rst_n    (rst_n),
    .fn       (alu_fn),
    .a        (alu_a),
    .b        (alu_b),
    .cond     (e.cond),
    .step_en  (slot_b && adv && e_ok && e.hl_step && !take_exc),
    .od_step  (!slot_b && adv && e_ok && e.dbl),
    .use_pend (slot_b && e.dbl),
    .h_we     (slot_b && adv && e_ok && !take_exc && e.sp_wr && e.sp == SP_H),
    .l_we     (slot_b && adv && e_ok && !take_exc && e.sp_wr && e.sp == SP_L),
    .hl_wdata (rd_a),
    .y        (alu_y),
    .ovf      (alu_ovf),
    .cond_true(cond_true),
    .h        (h),
    .l        (l)
  );

  barrel_shifter u_bs (
    .fn (sh_fn),
    .amt(sh_amt),
    .a  (sh_a),
    .b  (e_s3),
    .c  (e_s3),
    .y  (sh_y)
  );

  assign od_sum = alu_y;
  assign ea     = (e.ea_mode == EA_SHIFTED) ? sh_y : od_sum;

  always_comb begin
    unique case (e.sp)
      SP_H:    sp_val = h;
      SP_L:    sp_val = l;
      SP_PSW:  sp_val = {{(XLEN-$bits(psw_t)){1'b0}}, psw};
      SP_MASK: sp_val = {{(XLEN-SEG_W){1'b0}}, mask};
      SP_PID:  sp_val = {{(XLEN-SEG_W){1'b0}}, pid};
      default: sp_val = {31'd0, psw.ovf_en};
    endcase
  end

  always_comb begin
    if (e.set)                                          sx_result = {XLEN{cond_true}};
    else if (e.sp_rd)                                   sx_result = sp_val;
    else if (e.fn inside {FN_SLL, FN_SRL, FN_SRA, FN_ROL,
                          FN_RLC, FN_XC, FN_IC})        sx_result = sh_y;
    else                                                sx_result = alu_y;
  end

  // SX faults
  assign dref_active = slot_b && e_ok && e_mem;
  assign e_pgf  = dref_active && page_fault_i;
  assign e_merr = dref_active && map_err;
  assign e_ovf  = e_ok && psw.ovf_en && e.alu_wb && !e.set && !e.sp_rd &&
                  (e.fn inside {FN_ADD, FN_SUB, FN_SUBR}) && alu_ovf;
  assign e_trap = e_ok && e.trap && cond_true;

  mpc u_mpc (
    .clk        (clk),
    .rst_n      (rst_n),
    .dma_req    (dma_req_i),
    .ihit       (ihit_i),
    .dready     (dready_i),
    .page_fault (page_fault_i),
    .dref_active(dref_active),
    .e_valid    (e_valid),
    .e_carried  (e_exc),
    .e_map_err  (e_merr),
    .e_pg_fault (e_pgf),
    .e_ovf      (e_ovf),
    .e_trap     (e_trap),
    .m_bus_err  (m_valid && bus_error_i),
    .state      (state),
    .slot_b     (slot_b),
    .fetch      (fetch),
    .adv        (adv),
    .take_exc   (take_exc),
    .exc_cause  (exc_cause),
    .dma_ack    (dma_ack)
  );

  // ------------------------------------------------------------------
  // register writes: loads in OF (slot A), results in SX (slot B)
  // ------------------------------------------------------------------
  assign we_a = !slot_b && adv && m_valid && m_ld && !take_exc;
  assign we_b = sx_commit && e_exc == EXC_NONE && e.alu_wb;

  // ------------------------------------------------------------------
  // program counter
  // ------------------------------------------------------------------
  always_comb begin
    pc_sel   = PC_HOLD;
    pc_shift = 1'b0;
    if (take_exc) begin
      pc_sel   = PC_ZERO;
      pc_shift = 1'b1;           // history then holds the faulting instruction,
                                 // the next one and the next PC
    end else if (!slot_b) begin
      if (fetch) begin
        pc_shift = 1'b1;
        pc_sel   = (m_valid && m_jind) ? PC_ABUS : PC_INC;
      end
    end else if (e_ok) begin
      if (e.jmp_dir || (e.br && cond_true)) pc_sel = PC_BRANCH;
      else if (e.jmp_based)                 pc_sel = PC_BBUS;
    end
  end

  pc_unit u_pc (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (adv),
    .sel    (pc_sel),
    .abus   (data_i),
    .bbus   (alu_y),
    .btr_we (!slot_b && e_ok && (e.br || e.jmp_dir)),
    .btr_d  (od_sum),
    .shift  (pc_shift),
    .hist_en(psw.hist_en),
    .pc     (pc),
    .btr    (btr),
    .pc_m1  (pc_m1),
    .pc_m2  (pc_m2),
    .pc_m3  (pc_m3)
  );

  // ------------------------------------------------------------------
  // memory interface
  // ------------------------------------------------------------------
  always_comb begin
    unique case (e.pc_sel)
      2'd1:    std_val = pc_m1;
      2'd2:    std_val = pc_m2;
      default: std_val = pc_m3;
    endcase
    if (!e.st_pc) std_val = rd_b;
  end

  mem_if u_mem (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (adv),
    .slot_b   (slot_b),
    .fetch    (fetch),
    .pc       (pc),
    .i_map    (psw.map_en),
    .mar_we   (!slot_b && e_ok && e_mem),
    .mar_d    (ea),
    .d_map    (e_tag.map_en),
    .d_rd     (e_ok && e.mem_rd),
    .d_wr     (e_ok && e.mem_wr),
    .mdr_we   (e_ok && e.mem_wr && (slot_b == e_std_b)),
    .mdr_d    (std_val),
    .st_drive (m_valid && m_st && (state == S_A || state == S_CM)),
    .mask_we  (slot_b && adv && e_ok && !take_exc && e.sp_wr && e.sp == SP_MASK),
    .pid_we   (slot_b && adv && e_ok && !take_exc && e.sp_wr && e.sp == SP_PID),
    .sp_wdata (rd_a[SEG_W-1:0]),
    .mask     (mask),
    .pid      (pid),
    .addr_o   (addr_o),
    .ifetch_o (ifetch_o),
    .dref_o   (dref_o),
    .rw_o     (rw_o),
    .data_o   (data_o),
    .data_oe_o(data_oe_o),
    .map_err  (map_err)
  );

  idu u_idu (
    .instr    (data_i),
    .sys      (f_tag.sys),
    .ctrl     (dec),
    .uses_dmem(dec_dmem)
  );

  // ------------------------------------------------------------------
  // pipeline and status register updates
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      psw       <= '0;
      psw.sys   <= 1'b1;
      psw.hist_en <= 1'b1;
      psw.cause <= EXC_RESET;
      f_valid   <= 1'b0;
      f_pc      <= '0;
      f_tag     <= '0;
      f_exc     <= EXC_NONE;
      e_valid   <= 1'b0;
      e         <= '0;
      e_pc      <= '0;
      e_tag     <= '0;
      e_exc     <= EXC_NONE;
      e_s3      <= '0;
      m_valid   <= 1'b0;
      m_ld      <= 1'b0;
      m_st      <= 1'b0;
      m_jind    <= 1'b0;
      m_rfe     <= 1'b0;
      m_reg     <= '0;
    end else if (adv) begin
      if (!slot_b) begin
        // ---- end of slot A: IF done, OD done, OF done
        f_valid <= fetch && !take_exc;
        f_pc    <= pc;
        f_tag   <= '{sys: psw.sys, map_en: psw.map_en, ie: psw.ie};
        f_exc   <= map_err ? EXC_MAPERR : (page_fault_i ? EXC_PGFAULT : EXC_NONE);
        if (e_use_s3) e_s3 <= rd_a;
        m_valid <= 1'b0;
        if (take_exc) e_valid <= 1'b0;
        if (m_valid && m_rfe && !take_exc) begin
          psw.sys     <= psw.prev_sys;
          psw.ie      <= psw.prev_ie;
          psw.map_en  <= psw.prev_map;
          psw.hist_en <= 1'b1;
        end
      end else begin
        // ---- end of slot B: ID done, SX done
        e_valid <= f_valid && !take_exc;
        e       <= dec;
        e_pc    <= f_pc;
        e_tag   <= f_tag;
        if (f_exc != EXC_NONE)          e_exc <= f_exc;
        else if (bus_error_i)           e_exc <= EXC_BUSERR;
        else if (dec.illegal)           e_exc <= EXC_ILLEGAL;
        else if (dec.priv)              e_exc <= EXC_PRIV;
        else if (irq_i && f_tag.ie)     e_exc <= EXC_INTR;
        else                            e_exc <= EXC_NONE;
        m_valid <= e_ok && e_mem && !take_exc;
        m_ld    <= e.mem_rd && !e.jmp_ind;
        m_st    <= e.mem_wr;
        m_jind  <= e.jmp_ind;
        m_rfe   <= e.rfe;
        m_reg   <= e.mem_reg;
        if (e_ok && !take_exc && e.sp_wr) begin
          if (e.sp == SP_PSW) psw <= psw_t'(rd_a[$bits(psw_t)-1:0]);
          if (e.sp == SP_OVF) psw.ovf_en <= rd_a[0];
        end
      end
      if (take_exc) begin
        f_valid      <= 1'b0;
        psw.prev_sys <= psw.sys;
        psw.prev_ie  <= psw.ie;
        psw.prev_map <= psw.map_en;
        psw.sys      <= 1'b1;
        psw.ie       <= 1'b0;
        psw.map_en   <= 1'b0;
        psw.hist_en  <= 1'b0;
        psw.cause    <= exc_cause;
        psw.tcode    <= (exc_cause == EXC_TRAP) ? e.tcode : 8'd0;
      end
    end
  end

  // ------------------------------------------------------------------
  // status pins
  // ------------------------------------------------------------------
  assign addr_oe_o   = !dma_ack;
  assign dma_ack_o   = dma_ack;
  assign dfree_o     = slot_b && !(f_valid && dec_dmem);
  assign exc_o       = take_exc;
  assign exc_cause_o = exc_cause;
  assign sys_o       = psw.sys;

endmodule
