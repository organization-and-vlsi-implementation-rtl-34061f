// tb_mips_top: end-to-end test of the processor with a behavioural memory.
//
// Loads an exception handler at address 0 and a user program at 0x100, then
// runs from reset.  The handler counts each exception cause in memory, saves
// the three restart addresses with SavePC and returns with indirect jumps:
// all three for a page fault, an interrupt or reset-time entry to user mode,
// the last two (skipping the faulting instruction) otherwise.  The user
// program runs in user state with address masking on and exercises every
// ALU and shifter operation, packed load/store + ALU words, all load
// addressing modes, delayed branches, direct / based / indirect jumps, the
// multiply and divide steps (single and double), and raises each exception
// kind at least once, including an overflow whose successor page-faults on
// its fetch (the overflow is reported first, the fetch fault on resuming),
// and a load that page-faults while its successor's fetch misses the cache
// and then page-faults (the load's fault is reported and the load restarted).
// The memory model adds instruction-cache misses, data wait states, four
// regions that are absent until the handler "pages them in", a bus-error port
// for data
// and one instruction word whose first fetch has a bus error; the
// testbench raises two interrupts and several DMA requests.
//
// Checks: each result word against values computed here; the exception
// counts; the default-size processor (no parameter overrides).  Each
// mechanism (cache miss, wait state, DMA hold, each exception kind,
// synchronization cycle, taken branch, based and indirect jump, mode-restoring
// return, packed word, multiply and divide step, double step, free data cycle warning,
// PID substitution on the address pins, fetch fault after cache-miss cycles)
// is counted and must occur.
module tb_mips_top;
  import mips_pkg::*;
  import mips_asm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [ABUS_W-1:0] addr;
  logic addr_oe, ifetch, dref, rw, data_oe, ihit, dready, page_fault, bus_error;
  logic irq, dma_req, dma_ack, dfree, exc, sys;
  exc_e exc_cause;
  word_t rdata, wdata;
  logic irq_clr, done;
  word_t done_val;

  mips_top dut (
    .clk(clk), .rst_n(rst_n),
    .addr_o(addr), .addr_oe_o(addr_oe), .ifetch_o(ifetch), .dref_o(dref), .rw_o(rw),
    .data_i(rdata), .data_o(wdata), .data_oe_o(data_oe),
    .ihit_i(ihit), .dready_i(dready), .page_fault_i(page_fault), .bus_error_i(bus_error),
    .irq_i(irq), .dma_req_i(dma_req),
    .dma_ack_o(dma_ack), .dfree_o(dfree), .exc_o(exc), .exc_cause_o(exc_cause), .sys_o(sys)
  );

  mips_mem_model u_mem (
    .clk(clk), .rst_n(rst_n), .addr(addr), .addr_oe(addr_oe), .ifetch(ifetch), .dref(dref),
    .rw(rw), .wdata(wdata), .wdata_oe(data_oe), .rdata(rdata), .ihit(ihit), .dready(dready),
    .page_fault(page_fault), .bus_error(bus_error), .irq_clr(irq_clr), .done(done),
    .done_val(done_val)
  );

  // ---------------------------------------------------------------- layout
  localparam int CNT   = 'h300;   // exception counters, indexed by cause
  localparam int SAVE  = 'h310;   // restart addresses saved by the handler
  localparam int BOOT  = 'h320;   // addresses for the first entry to user mode
  localparam int RES   = 'h200;   // results of the user program
  localparam int DATA  = 'h400;
  localparam int USER  = 'h100;
  localparam int INIT  = 'h40;
  localparam int H_PF  = 'h30;
  localparam int H_IRQ = 'h38;
  localparam int IO_PF_CLR  = 'h10000;
  localparam int IO_IRQ_CLR = 'h10001;
  localparam int IO_DONE    = 'h10002;
  localparam int IO_BUSERR  = 'h10003;

  int at;
  int npacked;
  task automatic emit(word_t w);
    u_mem.poke(at, w);
    at++;
  endtask
  function automatic int rel(int target);  // branch offset from the current word
    return target - at;
  endfunction

  // ---------------------------------------------------------------- program
  task automatic build();
    int loop_top, j1, j2, j3, done_loop, pf_back, ib_back, pf2_back;
    for (int i = 0; i < 'h3000; i++) u_mem.poke(i, a_nop());
    for (int i = CNT; i < CNT + 16; i++) u_mem.poke(i, 0);
    u_mem.poke(DATA + 0, 32'h600D_F00D);
    u_mem.poke(DATA + 5, 32'hABCD_1234);
    u_mem.poke('h2800, 32'hCAFE_F00D);
    u_mem.poke('h2B00, 32'h5EED_2B00);

    // exception handler at 0 (R12..R15 belong to it)
    at = 0;
    emit(a_movs_from(SP_PSW, 12));
    emit(a_ldi(13, 16));
    emit(a_alu3(FN_SRL, 12, 12, 13));
    emit(a_ldi(13, 15));
    emit(a_alu3(FN_AND, 12, 12, 13));            // R12 = cause
    emit(a_ldi(14, CNT));
    emit(a_ldx(13, 14, 12));
    emit(a_nop());                               // load delay
    emit(a_alu3(FN_ADD, 13, 13, 1, 1'b1));
    emit(a_stx(13, 14, 12));
    emit(a_savepc(3, 14, SAVE - CNT + 0));
    emit(a_savepc(2, 14, SAVE - CNT + 1));
    emit(a_savepc(1, 14, SAVE - CNT + 2));
    emit(a_ldi(15, EXC_RESET));
    emit(a_bra(C_EQ, 12, 15, rel(INIT)));
    emit(a_nop());
    emit(a_ldi(15, EXC_PGFAULT));
    emit(a_bra(C_EQ, 12, 15, rel(H_PF)));
    emit(a_nop());
    emit(a_ldi(15, EXC_INTR));
    emit(a_bra(C_EQ, 12, 15, rel(H_IRQ)));
    emit(a_nop());
    // default: resume after the faulting instruction
    emit(a_jmp(JM_RETURN, 14, SAVE - CNT + 1));
    emit(a_jmp(JM_INDIRECT, 14, SAVE - CNT + 2));
    emit(a_nop());

    at = H_PF;                                   // page fault: page in, restart
    emit(a_std(15, IO_PF_CLR));
    emit(a_jmp(JM_RETURN, 14, SAVE - CNT + 0));
    emit(a_jmp(JM_INDIRECT, 14, SAVE - CNT + 1));
    emit(a_jmp(JM_INDIRECT, 14, SAVE - CNT + 2));

    at = H_IRQ;                                  // interrupt: acknowledge, restart
    emit(a_std(15, IO_IRQ_CLR));
    emit(a_jmp(JM_RETURN, 14, SAVE - CNT + 0));
    emit(a_jmp(JM_INDIRECT, 14, SAVE - CNT + 1));
    emit(a_jmp(JM_INDIRECT, 14, SAVE - CNT + 2));

    at = INIT;                                   // after reset: set up and enter user state
    emit(a_ldi(13, 'hFFFC));
    emit(a_movs_to(SP_MASK, 13));
    emit(a_ldi(13, 'h0ED8));
    emit(a_movs_to(SP_PID, 13));
    emit(a_ldi(13, 'h79));                       // prev: user, ie, map; hist on, ovf on, sys
    emit(a_movs_to(SP_PSW, 13));
    emit(a_ldi(13, USER));
    emit(a_st(13, 14, BOOT - CNT + 0));
    emit(a_ldi(13, USER + 1));
    emit(a_st(13, 14, BOOT - CNT + 1));
    emit(a_ldi(13, USER + 2));
    emit(a_st(13, 14, BOOT - CNT + 2));
    emit(a_jmp(JM_RETURN, 14, BOOT - CNT + 0));
    emit(a_jmp(JM_INDIRECT, 14, BOOT - CNT + 1));
    emit(a_jmp(JM_INDIRECT, 14, BOOT - CNT + 2));

    // user program
    at = USER;
    npacked = 0;
    emit(a_ldi(0, 0));
    emit(a_ldi(9, 0));
    emit(a_ldi(10, RES));
    emit(a_ldi(11, DATA));
    emit(a_ldi(1, 1234567));
    emit(a_ldi(2, -89));
    emit(a_alu3(FN_ADD,  3, 2, 1)); emit(a_stp(3, 10, 0, a_pk(FN_ADD, 9, 1, 1'b1))); npacked++;
    emit(a_alu3(FN_SUB,  3, 2, 1)); emit(a_stp(3, 10, 1, a_pk(FN_ADD, 9, 1, 1'b1))); npacked++;
    emit(a_alu3(FN_SUBR, 3, 2, 1)); emit(a_stp(3, 10, 2, a_pk(FN_ADD, 9, 1, 1'b1))); npacked++;
    emit(a_alu3(FN_AND,  3, 2, 1)); emit(a_stp(3, 10, 3, a_pk(FN_ADD, 9, 1, 1'b1))); npacked++;
    emit(a_alu3(FN_OR,   3, 2, 1)); emit(a_stp(3, 10, 4, a_pk(FN_ADD, 9, 1, 1'b1))); npacked++;
    emit(a_alu3(FN_XOR,  3, 2, 1)); emit(a_stp(3, 10, 5, a_pk(FN_ADD, 9, 1, 1'b1))); npacked++;
    emit(a_alu3(FN_SLL,  3, 2, 5, 1'b1));  emit(a_st(3, 10, 6));
    emit(a_alu3(FN_SRL,  3, 2, 7, 1'b1));  emit(a_st(3, 10, 7));
    emit(a_alu3(FN_SRA,  3, 2, 3, 1'b1));  emit(a_st(3, 10, 8));
    emit(a_alu3(FN_ROL,  3, 1, 13, 1'b1)); emit(a_st(3, 10, 9));
    emit(a_ldi(4, 20));
    emit(a_alu3(FN_RLC,  3, 1, 4, 1'b0, 2)); emit(a_st(3, 10, 10));
    emit(a_alu3(FN_XC,   3, 1, 2, 1'b1));  emit(a_st(3, 10, 11));
    emit(a_ldi(6, 'h112233));
    emit(a_alu3(FN_IC,   6, 2, 1, 1'b1, 6));  emit(a_st(6, 10, 12));
    emit(a_alu3(FN_ADD,  7, 0, 1));
    emit(a_set(C_LT, 7, 2));               emit(a_st(7, 10, 13));
    emit(a_alu3(FN_ADD,  8, 0, 1));
    emit(a_set(C_EQ, 8, 2));               emit(a_st(8, 10, 14));
    // loop: sum 10..1, the delay slot counts iterations
    emit(a_ldi(3, 0));
    emit(a_ldi(4, 10));
    emit(a_ldi(5, 0));
    loop_top = at;
    emit(a_alu3(FN_ADD, 3, 3, 4));
    emit(a_alu3(FN_SUB, 4, 4, 1, 1'b1));
    emit(a_bra(C_GT, 4, 0, rel(loop_top)));
    emit(a_alu3(FN_ADD, 5, 5, 1, 1'b1));   // delay slot
    emit(a_st(3, 10, 15));
    emit(a_st(5, 10, 16));
    // multiply 12345 * -6789 with 16 Booth steps
    emit(a_ldi(1, 12345));
    emit(a_ldi(2, -6789));
    emit(a_movs_to(SP_H, 0));
    emit(a_movs_to(SP_L, 2));
    for (int i = 0; i < 16; i++) emit(a_alu3(FN_MSTEP, 0, 0, 1));
    emit(a_movs_from(SP_H, 3));
    emit(a_movs_from(SP_L, 4));
    emit(a_st(3, 10, 17));
    emit(a_st(4, 10, 18));
    // divide 1000003 / 977 with 32 steps
    emit(a_ldi(1, 977));
    emit(a_ldi(2, 1000003));
    emit(a_movs_to(SP_H, 0));
    emit(a_movs_to(SP_L, 2));
    for (int i = 0; i < 32; i++) emit(a_alu3(FN_DSTEP, 0, 0, 1));
    emit(a_movs_from(SP_L, 3));
    emit(a_movs_from(SP_H, 4));
    emit(a_st(3, 10, 19));
    emit(a_st(4, 10, 20));
    // the same with double steps (four / two bits per instruction)
    emit(a_ldi(1, -321));
    emit(a_ldi(2, 98765));
    emit(a_movs_to(SP_H, 0));
    emit(a_movs_to(SP_L, 2));
    for (int i = 0; i < 8; i++) emit(a_step2(FN_MSTEP, 1));
    emit(a_movs_from(SP_H, 3));
    emit(a_movs_from(SP_L, 4));
    emit(a_st(3, 10, 30));
    emit(a_st(4, 10, 31));
    emit(a_ldi(1, 1234));
    emit(a_ldi(2, 7654321));
    emit(a_movs_to(SP_H, 0));
    emit(a_movs_to(SP_L, 2));
    for (int i = 0; i < 16; i++) emit(a_step2(FN_DSTEP, 1));
    emit(a_movs_from(SP_L, 3));
    emit(a_movs_from(SP_H, 4));
    emit(a_st(3, 10, 32));
    emit(a_st(4, 10, 33));
    // jumps and their delay slots
    emit(a_ldi(5, 0));
    j1 = at + 4;
    emit(a_jmp(JM_DIRECT, 0, j1));
    emit(a_alu3(FN_ADD, 5, 5, 1, 1'b1));   // delay slot: executes
    emit(a_alu3(FN_ADD, 5, 5, 8, 1'b1));   // skipped
    emit(a_alu3(FN_ADD, 5, 5, 8, 1'b1));   // skipped
    j2 = at + 5;
    emit(a_ldi(6, j2));                    // j1
    emit(a_jmp(JM_BASED, 6, 0));
    emit(a_alu3(FN_ADD, 5, 5, 2, 1'b1));   // delay slot
    emit(a_alu3(FN_ADD, 5, 5, 8, 1'b1));   // skipped
    emit(a_alu3(FN_ADD, 5, 5, 8, 1'b1));   // skipped
    j3 = at + 6;                           // j2
    emit(a_ldi(7, j3));
    emit(a_st(7, 11, 'h100));
    emit(a_jmp(JM_INDIRECT, 11, 'h100));
    emit(a_alu3(FN_ADD, 5, 5, 4, 1'b1));   // delay slot 1
    emit(a_alu3(FN_ADD, 5, 5, 3, 1'b1));   // delay slot 2
    emit(a_alu3(FN_ADD, 5, 5, 8, 1'b1));   // skipped
    emit(a_st(5, 10, 21));                 // j3
    // exceptions, each skipped by the handler unless noted
    emit(a_trap(C_ALWAYS, 0, 0, 'h5A));
    emit(a_ldi(3, 'h7FFFFF));
    emit(a_alu3(FN_SLL, 3, 3, 8, 1'b1));
    emit(a_alu3(FN_ADD, 3, 3, 15, 1'b1));  // 0x7FFFFF0F
    emit(a_alu3(FN_ADD, 4, 3, 3));         // overflow: result written, then trap
    emit(a_st(4, 10, 22));
    emit(32'hC000_0000);                   // illegal
    emit(a_movs_to(SP_PSW, 0));            // privilege violation
    emit(a_ldd(3, 'h2800));                // page fault, restarted after paging in
    emit(a_nop());
    emit(a_st(3, 10, 23));
    // overflow in SX while the next fetch page-faults: the overflow is
    // reported; resuming then takes the page fault on the fetch
    emit(a_ldi(3, 'h7FFFFF));
    emit(a_alu3(FN_SLL, 3, 3, 8, 1'b1));
    emit(a_alu3(FN_ADD, 3, 3, 15, 1'b1));
    emit(a_jmp(JM_DIRECT, 0, 'h28FF));
    emit(a_nop());
    pf_back = at;
    emit(a_st(4, 10, 34));
    // a load that page-faults on the last word of a resident page while the
    // next fetch misses and page-faults: the load's fault is reported, and
    // the load is restarted (its region is paged in on the second fault)
    emit(a_ldi(6, 0));
    emit(a_jmp(JM_DIRECT, 0, 'h29FF));
    emit(a_nop());
    pf2_back = at;
    emit(a_st(6, 10, 36));
    // hard bus error on an instruction word: that instruction is skipped
    emit(a_ldi(5, 0));
    emit(a_jmp(JM_DIRECT, 0, 'hFFF));
    emit(a_nop());
    ib_back = at;
    emit(a_st(5, 10, 35));
    emit(a_ldi(4, 'h20000));
    emit(a_ld(3, 4, 0));                   // outside the visible segment: mapping error
    emit(a_nop());
    emit(a_st(3, 10, 24));
    emit(a_ldi(4, IO_BUSERR));
    emit(a_ld(8, 4, 0));                   // hard bus error in OF
    emit(a_nop());
    emit(a_nop());
    // addressing modes and a packed load
    emit(a_ldi(4, 5));
    emit(a_ldx(6, 11, 4));
    emit(a_nop());
    emit(a_st(6, 10, 25));
    emit(a_ldi(8, DATA << 3));
    emit(a_ldi(4, 3));
    emit(a_lds(7, 8, 4));
    emit(a_nop());
    emit(a_st(7, 10, 26));
    emit(a_ldp(6, 11, 5, a_pk(FN_ADD, 9, 1, 1'b1))); npacked++;
    emit(a_nop());
    emit(a_st(6, 10, 27));
    // user-level overflow mask: no trap this time
    emit(a_movs_to(SP_OVF, 0));
    emit(a_alu3(FN_ADD, 4, 3, 3));
    emit(a_alu3(FN_ADD, 4, 4, 0));
    emit(a_alu3(FN_ADD, 5, 0, 0));
    emit(a_ldi(3, 'h7FFFFF));
    emit(a_alu3(FN_SLL, 3, 3, 8, 1'b1));
    emit(a_alu3(FN_ADD, 3, 3, 15, 1'b1));
    emit(a_alu3(FN_ADD, 4, 3, 3));
    emit(a_st(4, 10, 28));
    emit(a_st(9, 10, 29));
    emit(a_std(9, IO_DONE));
    done_loop = at;
    emit(a_bra(C_ALWAYS, 0, 0, 0));
    emit(a_nop());
    at = 'hFFF;                            // its first fetch has a bus error
    emit(a_alu3(FN_ADD, 5, 5, 8, 1'b1));
    emit(a_jmp(JM_DIRECT, 0, ib_back));
    emit(a_nop());
    at = 'h28FF;                           // last word of the first paged region
    emit(a_alu3(FN_ADD, 4, 3, 3));         // overflows
    emit(a_jmp(JM_DIRECT, 0, pf_back));    // first word of the second region
    emit(a_nop());
    at = 'h29FF;                           // last word of the second region
    emit(a_ldd(6, 'h2B00));                // fourth region: absent
    emit(a_jmp(JM_DIRECT, 0, pf2_back));   // third region: absent
    emit(a_nop());
  endtask

  // ---------------------------------------------------------------- checking
  int checks = 0, failures = 0;
  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  // mechanism counters
  int n_cm, n_wt, n_dma, n_sync, n_br, n_based, n_ind, n_rfe, n_pack, n_mstep, n_dstep;
  int n_free, n_pid, n_cycles, n_dbl;
  int n_miss_pf;   // fetch of 0x2A00 that page-faulted after cache-miss cycles
  int n_exc [16];

  always @(posedge clk) if (rst_n) begin
    n_cycles++;
    if (dut.state == S_CM) n_cm++;
    if (dut.state == S_WT) n_wt++;
    if (dut.state == S_DMA) n_dma++;
    if (dut.state == S_SYNC_A) n_sync++;
    if (dut.adv && dut.pc_sel == PC_BRANCH && dut.slot_b && dut.e.br) n_br++;
    if (dut.adv && dut.pc_sel == PC_BBUS) n_based++;
    if (dut.adv && dut.pc_sel == PC_ABUS) n_ind++;
    if (dut.adv && !dut.slot_b && dut.m_valid && dut.m_rfe && !dut.take_exc) n_rfe++;
    if (dut.we_b && (dut.e.mem_rd || dut.e.mem_wr)) n_pack++;
    if (dut.adv && dut.slot_b && dut.e_ok && dut.e.fn == FN_MSTEP && dut.e.hl_step) n_mstep++;
    if (dut.adv && dut.slot_b && dut.e_ok && dut.e.dbl && !dut.take_exc) n_dbl++;
    if (dut.adv && dut.slot_b && dut.e_ok && dut.e.fn == FN_DSTEP && dut.e.hl_step) n_dstep++;
    if (dfree) n_free++;
    if (page_fault && ifetch && addr[15:0] == 16'h2A00 && dut.state == S_CM) n_miss_pf++;
    if (ifetch && !sys && addr[23:18] == 6'h36) n_pid++;
    if (exc) n_exc[exc_cause]++;
  end

  // an interrupt once the user program is well under way and a second one in
  // the middle of the double steps (cancelling one after its first half);
  // DMA requests now and then
  int user_cycles = 0;
  int irq_raised = 0;
  always @(posedge clk) begin
    if (rst_n && !sys) user_cycles <= user_cycles + 1;
    if (!rst_n) irq <= 1'b0;
    else if (irq_clr) irq <= 1'b0;
    else if (user_cycles == 60 && irq_raised == 0) begin
      irq <= 1'b1;
      irq_raised <= 1;
    end else if (irq_raised == 1 && !irq && !sys && dut.e_valid && dut.e.dbl) begin
      irq <= 1'b1;                     // lands inside a run of double steps
      irq_raised <= 2;
    end
  end

  int dma_len = 0;
  always @(posedge clk) begin
    if (!rst_n) begin
      dma_req <= 1'b0;
      dma_len <= 0;
    end else if (dma_ack) begin
      dma_len <= dma_len + 1;
      if (dma_len == 2) dma_req <= 1'b0;
    end else begin
      dma_len <= 0;
      if (n_cycles % 97 == 50) dma_req <= 1'b1;
    end
  end

  function automatic word_t rotl(word_t v, int s);
    return (v << s) | (v >> (32 - s));
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: program did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t r1, r2, q, h, rem;
    longint prod;
    for (int i = 0; i < 16; i++) n_exc[i] = 0;
    build();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    repeat (4) @(posedge clk);
    $display("finished after %0d cycles", n_cycles);

    r1 = 1234567;
    r2 = -89;
    check("add",  u_mem.peek(RES + 0), r2 + r1);
    check("sub",  u_mem.peek(RES + 1), r2 - r1);
    check("subr", u_mem.peek(RES + 2), r1 - r2);
    check("and",  u_mem.peek(RES + 3), r1 & r2);
    check("or",   u_mem.peek(RES + 4), r1 | r2);
    check("xor",  u_mem.peek(RES + 5), r1 ^ r2);
    check("sll",  u_mem.peek(RES + 6), r2 << 5);
    check("srl",  u_mem.peek(RES + 7), r2 >> 7);
    check("sra",  u_mem.peek(RES + 8), word_t'($signed(r2) >>> 3));
    check("rol",  u_mem.peek(RES + 9), rotl(r1, 13));
    check("rlc",  u_mem.peek(RES + 10), (r1 << 20) | (r2 >> 12));
    check("xc",   u_mem.peek(RES + 11), (r1 >> 16) & 32'hFF);
    check("ic",   u_mem.peek(RES + 12), (32'h112233 & ~32'hFF00) | ((r2 & 32'hFF) << 8));
    check("set lt", u_mem.peek(RES + 13), 32'hFFFF_FFFF);
    check("set eq", u_mem.peek(RES + 14), 32'h0);
    check("loop sum",   u_mem.peek(RES + 15), 55);
    check("delay slot", u_mem.peek(RES + 16), 10);
    prod = longint'(12345) * longint'(-6789);
    check("mul hi", u_mem.peek(RES + 17), word_t'(prod >> 32));
    check("mul lo", u_mem.peek(RES + 18), word_t'(prod));
    q   = 1000003 / 977;
    rem = 1000003 % 977;
    h   = u_mem.peek(RES + 20);
    check("div quotient", u_mem.peek(RES + 19), q);
    check("div remainder", (h == rem || h + 977 == rem) ? 1 : 0, 1);
    prod = longint'(-321) * longint'(98765);
    check("double mul hi", u_mem.peek(RES + 30), word_t'(prod >> 32));
    check("double mul lo", u_mem.peek(RES + 31), word_t'(prod));
    q   = 7654321 / 1234;
    rem = 7654321 % 1234;
    h   = u_mem.peek(RES + 33);
    check("double div quotient", u_mem.peek(RES + 32), q);
    check("double div remainder", (h == rem || h + 1234 == rem) ? 1 : 0, 1);
    check("jump delay slots", u_mem.peek(RES + 21), 10);
    check("overflow result", u_mem.peek(RES + 22), 32'h7FFFFF0F + 32'h7FFFFF0F);
    check("page-fault restart", u_mem.peek(RES + 23), 32'hCAFE_F00D);
    check("mapping error skipped", u_mem.peek(RES + 24), 32'h7FFF_FF0F);
    check("indexed load", u_mem.peek(RES + 25), 32'hABCD_1234);
    check("shifted load", u_mem.peek(RES + 26), 32'h600D_F00D);
    check("packed load",  u_mem.peek(RES + 27), 32'hABCD_1234);
    check("overflow before fetch fault", u_mem.peek(RES + 34), 32'h7FFFFF0F + 32'h7FFFFF0F);
    check("instruction bus error skipped", u_mem.peek(RES + 35), 0);
    check("data fault reported before fetch fault", u_mem.peek(RES + 36), 32'h5EED_2B00);
    check("masked overflow", u_mem.peek(RES + 28), 32'h7FFFFF0F + 32'h7FFFFF0F);
    check("packed count", u_mem.peek(RES + 29), npacked);
    check("done value", done_val, npacked);
    // exception counts recorded by the handler
    check("cnt reset",   u_mem.peek(CNT + EXC_RESET), 1);
    check("cnt trap",    u_mem.peek(CNT + EXC_TRAP), 1);
    check("cnt ovf",     u_mem.peek(CNT + EXC_OVF), 2);
    check("cnt illegal", u_mem.peek(CNT + EXC_ILLEGAL), 1);
    check("cnt priv",    u_mem.peek(CNT + EXC_PRIV), 1);
    check("cnt pgfault", u_mem.peek(CNT + EXC_PGFAULT), 4);
    check("cnt maperr",  u_mem.peek(CNT + EXC_MAPERR), 1);
    check("cnt buserr",  u_mem.peek(CNT + EXC_BUSERR), 2);
    check("cnt intr",    u_mem.peek(CNT + EXC_INTR), 2);

    // mechanisms
    $display("cm=%0d wt=%0d dma=%0d sync=%0d br=%0d based=%0d ind=%0d rfe=%0d pack=%0d mstep=%0d dstep=%0d free=%0d pid=%0d",
             n_cm, n_wt, n_dma, n_sync, n_br, n_based, n_ind, n_rfe, n_pack, n_mstep, n_dstep, n_free, n_pid);
    check("mech cache miss", n_cm > 0, 1);
    check("mech wait state", n_wt > 0, 1);
    check("mech dma hold",   n_dma > 0, 1);
    check("mech sync cycle", n_sync > 0, 1);
    check("mech taken branch", n_br > 0, 1);
    check("mech based jump", n_based > 0, 1);
    check("mech indirect jump", n_ind > 0, 1);
    check("mech mode return", n_rfe > 0, 1);
    check("mech packed word", n_pack > 0, 1);
    check("mech mstep", n_mstep, 16 + 8);
    check("mech dstep", n_dstep, 32 + 16);
    check("mech double step", n_dbl, 8 + 16);
    check("mech free cycle", n_free > 0, 1);
    check("mech pid on pins", n_pid > 0, 1);
    check("mech fetch fault after miss", n_miss_pf > 0, 1);
    for (int c = EXC_BUSERR; c <= EXC_INTR; c++)
      check($sformatf("mech exception %0d", c), n_exc[c] > 0, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
