// tb_workloads: the eight classic integer benchmarks run on the processor.
//
//   Bubble  bubble sort of 500 random integers
//   Intmm   product of two 40x40 integer matrices, each multiplication done
//           with eight double Booth steps on H/L
//   Towers  recursive Towers of Hanoi for 14 discs, with the pegs kept as
//           stacks in memory and every move checked for legality by the
//           program itself (a larger disc on a smaller one is reported)
//   Quick   recursive quicksort of 5000 random integers (middle element as
//           the pivot, the second recursive call made as a jump)
//   Perm    all permutations of one through seven by recursive exchange,
//           five times over; the count of calls (5 x 8660) and the restored
//           array are checked
//   Queen   the eight queens problem: a recursive search for the first
//           placement, repeated 50 times with the board cleared each time;
//           the placement found (1 5 8 6 3 7 2 4) is checked
//   Tree    tree insertion sort of 5000 random integers: each is inserted
//           into a binary search tree of three-word nodes (left, right,
//           value), then a recursive in-order walk writes them back
//   Puzzle  packing a 5x5x5 box with 18 pieces of 13 shapes in four classes
//           (a 512-cell padded board, one 512-cell map per shape) by a
//           recursive fit / place / remove search.  The boards are set up
//           and the first piece placed here; the machine runs the search.
//           The count of trials (2005) and the success are compared with
//           the same search run here.
//
// The programs are hand-scheduled machine code (load delay slots and branch
// delay slots filled or padded with no-ops), built with the assembler
// functions and run one after another from reset in supervisor state, at
// full size, with the behavioural memory system (cold instruction cache,
// wait states on odd data addresses).  A procedure call loads its return
// address with LDI and jumps; the return is a based jump through that
// register; arguments and the return address are saved on a stack in memory.
// Every result is compared with one computed here.  Cycle counts are printed, also
// converted to seconds at the 250 ns pipestage clock.  Any exception during
// the run counts as a failure.
module tb_workloads;
  import mips_pkg::*;
  import mips_asm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [ABUS_W-1:0] addr;
  logic addr_oe, ifetch, dref, rw, data_oe, ihit, dready, page_fault, bus_error;
  logic dma_ack, dfree, exc, sys;
  exc_e exc_cause;
  word_t rdata, wdata;
  logic irq_clr, done;
  word_t done_val;

  mips_top dut (
    .clk(clk), .rst_n(rst_n),
    .addr_o(addr), .addr_oe_o(addr_oe), .ifetch_o(ifetch), .dref_o(dref), .rw_o(rw),
    .data_i(rdata), .data_o(wdata), .data_oe_o(data_oe),
    .ihit_i(ihit), .dready_i(dready), .page_fault_i(page_fault), .bus_error_i(bus_error),
    .irq_i(1'b0), .dma_req_i(1'b0),
    .dma_ack_o(dma_ack), .dfree_o(dfree), .exc_o(exc), .exc_cause_o(exc_cause), .sys_o(sys)
  );

  mips_mem_model u_mem (
    .clk(clk), .rst_n(rst_n), .addr(addr), .addr_oe(addr_oe), .ifetch(ifetch), .dref(dref),
    .rw(rw), .wdata(wdata), .wdata_oe(data_oe), .rdata(rdata), .ihit(ihit), .dready(dready),
    .page_fault(page_fault), .bus_error(bus_error), .irq_clr(irq_clr), .done(done),
    .done_val(done_val)
  );

  localparam int NB     = 500;          // Bubble: number of integers
  localparam int NM     = 40;           // Intmm: matrix order
  localparam int SORT   = 'h4000;
  localparam int MA     = 'h5000;
  localparam int MB     = 'h6000;
  localparam int MC     = 'h7000;
  localparam int INTMM  = 'h200;
  localparam int TOWERS = 'h300;
  localparam int NDISC  = 14;
  localparam int PEGS   = 'h3000;         // peg p: sentinel at PEGS+16p, discs above
  localparam int TOPS   = 'h3040;         // TOPS+p: address of the free slot of peg p
  localparam int BAD    = 'h3100;
  localparam int MOVES  = 'h3101;
  localparam int STACK  = 'hF000;
  localparam int QUICK  = 'h400;
  localparam int NQ     = 5000;
  localparam int QA     = 'h8000;
  localparam int PERM   = 'h480;
  localparam int NP     = 7;
  localparam int PA     = 'h3200;         // PA+1 .. PA+7
  localparam int PCTR   = 'h3210;
  localparam int QUEEN  = 'h500;
  localparam int QB     = 'h3300;         // column free, 1..8
  localparam int QD1    = 'h3320;         // diagonal i+j free, 2..16
  localparam int QD2    = 'h3340;         // diagonal i-j+7 free, 0..14
  localparam int QX     = 'h3360;         // column of the queen in row i
  localparam int QOK    = 'h3370;         // passes that found a placement
  localparam int TREE   = 'h560;
  localparam int NT     = 5000;
  localparam int TIN    = 'h9400;         // input, and the sorted output
  localparam int NODES  = 'hA800;         // 3 x 5000 words
  localparam int TCNT   = 'h3380;
  localparam int PUZZLE = 'h700;
  localparam int PSIZE  = 511;
  localparam int PD     = 8;
  localparam int PTYPES = 13;
  localparam int PUZZL  = 'h3400;         // board, 1 = filled
  localparam int PBASE  = 'h3700;         // PBASE+i: address of the map of shape i
  localparam int PMAX   = 'h3710;         // PMAX+i: last cell of shape i's map
  localparam int PCLASS = 'h3720;
  localparam int PCOUNT = 'h3730;         // pieces left per class
  localparam int PZK    = 'h3740;         // trials
  localparam int PZOK   = 'h3741;         // 1 = packed
  localparam int NPROG  = 8;
  localparam int START [NPROG] = '{0, INTMM, TOWERS, QUICK, PERM, QUEEN, TREE, PUZZLE};
  localparam string PNAME [NPROG] = '{"Bubble 500", "Intmm 40x40", "Towers 14", "Quick 5000", "Perm 7 (x5)",
                                      "Queen (x50)", "Tree 5000", "Puzzle"};
  localparam int IO_DONE = 'h10002;

  int at;
  task automatic emit(word_t w);
    u_mem.poke(at, w);
    at++;
  endtask
  function automatic int rel(int target);
    return target - at;
  endfunction
  // forward labels: fix the target of an already emitted branch (PC-relative)
  // or of a jump / LDI (absolute) once the label is known
  task automatic patch_rel(int where, int target);
    word_t w = u_mem.peek(where);
    w[15:0] = 16'(target - where);
    u_mem.poke(where, w);
  endtask
  task automatic patch_abs(int where, int target);
    word_t w = u_mem.peek(where);
    w[21:0] = 22'(target);
    u_mem.poke(where, w);
  endtask

  localparam int QSOL [8] = '{1, 5, 8, 6, 3, 7, 2, 4};
  int    layout_bad = 0;                 // program layout guards that failed
  word_t ref_sort [NB];
  word_t ref_q [NQ], got_q [NQ];
  word_t ref_t [NT], got_t [NT];
  int    ma [NM][NM], mb [NM][NM];

  task automatic build();
    int outer, inner, noswap, iloop, jloop, kloop;
    int tmain, tproc, tret, r1, r2, fin, bad;
    int q, qloopi, qloopj, qskip, qsecond, qdone, qret1;
    int pm, pret, ploop, pr1, pr2;
    int qdoit, qinit, qtry, qtloop, qnext, qlast, qout, qtr;
    int tins, twalk, tgoleft, b_left, b_setr, b_setl, b_link, j_walk, l_fin, tw;
    int b_noleft, b_noright, l_b1, l_b2;
    int ptrial, ptloop, pfloop, pfnext, pploop, ppnext, psloop, psfound, prloop, prnext, ptnext, ptyes, ptret;
    int b_f1, b_f2, b_p1, b_s1, b_yes1, b_yes2, b_rn, b_tn1, b_ret, l_back;
    for (int i = 0; i < 'h800; i++) u_mem.poke(i, a_nop());
    // data
    for (int i = 0; i < NB; i++) begin
      ref_sort[i] = $urandom;
      u_mem.poke(SORT + i, ref_sort[i]);
    end
    for (int i = 0; i < NM; i++)
      for (int j = 0; j < NM; j++) begin
        ma[i][j] = int'($urandom_range(0, 2000)) - 1000;
        mb[i][j] = int'($urandom_range(0, 2000)) - 1000;
        u_mem.poke(MA + NM * i + j, ma[i][j]);
        u_mem.poke(MB + NM * i + j, mb[i][j]);
      end

    // ---------------- Bubble
    at = 0;
    emit(a_ldi(0, 0));
    emit(a_ldi(10, SORT));
    emit(a_ldi(2, NB - 1));                  // i: last index of the unsorted part
    outer = at;
    emit(a_alu3(FN_ADD, 3, 10, 0));          // p = &A[0]
    emit(a_alu3(FN_ADD, 4, 10, 2));          // end = &A[i]
    inner = at;
    emit(a_ld(5, 3, 0));
    emit(a_ld(6, 3, 1));
    emit(a_alu3(FN_ADD, 3, 3, 1, 1'b1));     // p++ (covers the load delay)
    noswap = at + 5;
    emit(a_bra(C_LE, 5, 6, rel(noswap)));
    emit(a_nop());
    emit(a_st(6, 3, -1));
    emit(a_st(5, 3, 0));
    emit(a_nop());
    emit(a_bra(C_LT, 3, 4, rel(inner)));     // noswap
    emit(a_nop());
    emit(a_bra(C_GT, 2, 0, rel(outer)));
    emit(a_alu3(FN_SUB, 2, 2, 1, 1'b1));     // delay slot: i--
    emit(a_jmp(JM_DIRECT, 0, INTMM));
    emit(a_nop());

    // ---------------- Intmm
    at = INTMM;
    emit(a_ldi(0, 0));
    emit(a_ldi(11, NM));
    emit(a_ldi(1, MA));                      // row of A
    emit(a_ldi(7, MC));                      // element of C
    emit(a_ldi(8, NM));                      // rows left
    iloop = at;
    emit(a_ldi(2, MB));                      // column of B
    emit(a_ldi(9, NM));                      // columns left
    jloop = at;
    emit(a_alu3(FN_ADD, 12, 1, 0));          // pa
    emit(a_alu3(FN_ADD, 13, 2, 0));          // pb
    emit(a_ldi(4, 0));                       // sum
    emit(a_ldi(3, NM));                      // k left
    kloop = at;
    emit(a_ld(5, 12, 0));
    emit(a_ld(6, 13, 0));
    emit(a_alu3(FN_ADD, 12, 12, 1, 1'b1));
    emit(a_movs_to(SP_H, 0));
    emit(a_movs_to(SP_L, 6));
    for (int s = 0; s < 8; s++) emit(a_step2(FN_MSTEP, 5));
    emit(a_movs_from(SP_L, 10));
    emit(a_alu3(FN_ADD, 4, 4, 10));
    emit(a_alu3(FN_ADD, 13, 13, 11));
    emit(a_alu3(FN_SUB, 3, 3, 1, 1'b1));
    emit(a_bra(C_GT, 3, 0, rel(kloop)));
    emit(a_nop());
    emit(a_st(4, 7, 0));
    emit(a_alu3(FN_ADD, 7, 7, 1, 1'b1));
    emit(a_alu3(FN_SUB, 9, 9, 1, 1'b1));
    emit(a_bra(C_GT, 9, 0, rel(jloop)));
    emit(a_alu3(FN_ADD, 2, 2, 1, 1'b1));     // delay slot: next column
    emit(a_alu3(FN_SUB, 8, 8, 1, 1'b1));
    emit(a_bra(C_GT, 8, 0, rel(iloop)));
    emit(a_alu3(FN_ADD, 1, 1, 11));          // delay slot: next row
    emit(a_jmp(JM_DIRECT, 0, TOWERS));
    emit(a_nop());

    // ---------------- Towers
    for (int p = 0; p < 3; p++) begin
      u_mem.poke(PEGS + 16 * p, 100);                      // sentinel: larger than any disc
      u_mem.poke(TOPS + p, PEGS + 16 * p + 1);
    end
    for (int d = 0; d < NDISC; d++) u_mem.poke(PEGS + 1 + d, NDISC - d);
    u_mem.poke(TOPS, PEGS + 1 + NDISC);
    u_mem.poke(BAD, 0);
    at = TOWERS;
    tmain = at;
    tproc = tmain + 14;
    fin   = tmain + 11;
    emit(a_ldi(0, 0));
    emit(a_ldi(10, TOPS));
    emit(a_ldi(14, STACK));
    emit(a_ldi(13, 0));                      // moves
    emit(a_ldi(1, NDISC));                   // n
    emit(a_ldi(2, 0));                       // from
    emit(a_ldi(3, 2));                       // to
    emit(a_ldi(4, 1));                       // via
    emit(a_ldi(15, fin));
    emit(a_jmp(JM_DIRECT, 0, tproc));
    emit(a_nop());
    emit(a_std(13, MOVES));                  // fin
    emit(a_jmp(JM_DIRECT, 0, QUICK));
    emit(a_nop());
    // towers(n = R1, from = R2, to = R3, via = R4), return address R15
    tret = tproc + 43;
    bad  = tret + 2;
    emit(a_bra(C_LE, 1, 0, rel(tret)));
    emit(a_nop());
    emit(a_st(15, 14, -1));
    emit(a_st(1, 14, -2));
    emit(a_st(2, 14, -3));
    emit(a_st(3, 14, -4));
    emit(a_st(4, 14, -5));
    emit(a_alu3(FN_SUB, 14, 14, 5, 1'b1));
    emit(a_alu3(FN_SUB, 1, 1, 1, 1'b1));     // towers(n-1, from, via, to)
    emit(a_alu3(FN_ADD, 5, 3, 0));
    emit(a_alu3(FN_ADD, 3, 4, 0));
    emit(a_alu3(FN_ADD, 4, 5, 0));
    r1 = at + 3;
    emit(a_ldi(15, r1));
    emit(a_jmp(JM_DIRECT, 0, tproc));
    emit(a_nop());
    emit(a_ld(1, 14, 3));                    // r1: reload the arguments
    emit(a_ld(2, 14, 2));
    emit(a_ld(3, 14, 1));
    emit(a_ld(4, 14, 0));
    emit(a_ldx(5, 10, 2));                   // free slot of "from"
    emit(a_ldx(6, 10, 3));                   // free slot of "to"
    emit(a_alu3(FN_SUB, 5, 5, 1, 1'b1));
    emit(a_ld(7, 5, 0));                     // disc moved
    emit(a_ld(8, 6, -1));                    // disc it lands on
    emit(a_stx(5, 10, 2));
    emit(a_bra(C_GE, 7, 8, rel(bad)));
    emit(a_nop());
    emit(a_st(7, 6, 0));
    emit(a_alu3(FN_ADD, 6, 6, 1, 1'b1));
    emit(a_stx(6, 10, 3));
    emit(a_alu3(FN_ADD, 13, 13, 1, 1'b1));
    emit(a_alu3(FN_SUB, 1, 1, 1, 1'b1));     // towers(n-1, via, to, from)
    emit(a_alu3(FN_ADD, 5, 2, 0));
    emit(a_alu3(FN_ADD, 2, 4, 0));
    emit(a_alu3(FN_ADD, 4, 5, 0));
    r2 = at + 3;
    emit(a_ldi(15, r2));
    emit(a_jmp(JM_DIRECT, 0, tproc));
    emit(a_nop());
    emit(a_ld(15, 14, 4));                   // r2: return
    emit(a_alu3(FN_ADD, 14, 14, 5, 1'b1));
    emit(a_nop());
    emit(a_jmp(JM_BASED, 15, 0));
    emit(a_nop());
    if (at != tret) begin layout_bad++; $display("FAIL assembler: Towers layout %0h != %0h", at, tret); end
    emit(a_jmp(JM_BASED, 15, 0));            // tret: n <= 0
    emit(a_nop());
    emit(a_ldi(12, 'hBAD));                  // bad: illegal move
    emit(a_std(12, BAD));
    emit(a_std(0, IO_DONE));
    emit(a_bra(C_ALWAYS, 0, 0, 0));
    emit(a_nop());

    // ---------------- Quick
    for (int i = 0; i < NQ; i++) begin
      ref_q[i] = $urandom;
      u_mem.poke(QA + i, ref_q[i]);
    end
    at = QUICK;
    q = QUICK + 8;
    emit(a_ldi(0, 0));
    emit(a_ldi(1, QA));                      // l (an address)
    emit(a_ldi(2, QA + NQ - 1));             // r
    emit(a_ldi(14, STACK));
    emit(a_ldi(15, QUICK + 7));
    emit(a_jmp(JM_DIRECT, 0, q));
    emit(a_nop());
    emit(a_jmp(JM_DIRECT, 0, PERM));         // fin
    // quicksort(l = R1, r = R2), return address R15; i = R3, j = R4, pivot R5
    if (at != q) begin layout_bad++; $display("FAIL assembler: Quick layout"); end
    emit(a_alu3(FN_ADD, 8, 1, 2));
    emit(a_alu3(FN_SRL, 8, 8, 1, 1'b1));
    emit(a_ld(5, 8, 0));
    emit(a_alu3(FN_ADD, 3, 1, 0));
    emit(a_alu3(FN_ADD, 4, 2, 0));
    qloopi = at;
    emit(a_ld(6, 3, 0));                     // while a[i] < x: i++
    emit(a_nop());
    emit(a_bra(C_LT, 6, 5, rel(qloopi)));
    emit(a_alu3(FN_ADD, 3, 3, 1, 1'b1));     // delay slot runs on exit too
    emit(a_alu3(FN_SUB, 3, 3, 1, 1'b1));
    qloopj = at;
    emit(a_ld(7, 4, 0));                     // while x < a[j]: j--
    emit(a_nop());
    emit(a_bra(C_LT, 5, 7, rel(qloopj)));
    emit(a_alu3(FN_SUB, 4, 4, 1, 1'b1));
    emit(a_alu3(FN_ADD, 4, 4, 1, 1'b1));
    qskip = at + 6;
    emit(a_bra(C_GT, 3, 4, rel(qskip)));
    emit(a_nop());
    emit(a_st(7, 3, 0));                     // exchange, i++, j--
    emit(a_st(6, 4, 0));
    emit(a_alu3(FN_ADD, 3, 3, 1, 1'b1));
    emit(a_alu3(FN_SUB, 4, 4, 1, 1'b1));
    if (at != qskip) begin layout_bad++; $display("FAIL assembler: Quick skip"); end
    emit(a_bra(C_LE, 3, 4, rel(qloopi)));    // until i > j
    emit(a_nop());
    qsecond = at + 15;
    emit(a_bra(C_GE, 1, 4, rel(qsecond)));   // if l < j: quicksort(l, j)
    emit(a_nop());
    emit(a_st(15, 14, -1));
    emit(a_st(2, 14, -2));
    emit(a_st(3, 14, -3));
    emit(a_alu3(FN_SUB, 14, 14, 3, 1'b1));
    emit(a_alu3(FN_ADD, 2, 4, 0));
    qret1 = at + 3;
    emit(a_ldi(15, qret1));
    emit(a_jmp(JM_DIRECT, 0, q));
    emit(a_nop());
    emit(a_alu3(FN_ADD, 14, 14, 3, 1'b1));
    emit(a_ld(15, 14, -1));
    emit(a_ld(2, 14, -2));
    emit(a_ld(3, 14, -3));
    emit(a_nop());
    if (at != qsecond) begin layout_bad++; $display("FAIL assembler: Quick second"); end
    qdone = at + 5;
    emit(a_bra(C_GE, 3, 2, rel(qdone)));     // if i < r: quicksort(i, r) as a jump
    emit(a_nop());
    emit(a_alu3(FN_ADD, 1, 3, 0));
    emit(a_jmp(JM_DIRECT, 0, q));
    emit(a_nop());
    emit(a_jmp(JM_BASED, 15, 0));            // qdone
    emit(a_nop());

    // ---------------- Perm
    for (int i = 1; i <= NP; i++) u_mem.poke(PA + i, i - 1);
    at = PERM;
    pm = PERM + 14;
    emit(a_ldi(11, PA));
    emit(a_ldi(12, 1));
    emit(a_ldi(13, 0));                      // count of calls
    emit(a_ldi(9, 5));                       // five passes
    emit(a_ldi(1, NP));
    emit(a_ldi(15, PERM + 8));
    emit(a_jmp(JM_DIRECT, 0, pm));
    emit(a_nop());
    emit(a_alu3(FN_SUB, 9, 9, 1, 1'b1));
    emit(a_bra(C_GT, 9, 0, rel(PERM + 4)));
    emit(a_nop());
    emit(a_std(13, PCTR));
    emit(a_jmp(JM_DIRECT, 0, QUEEN));
    emit(a_nop());
    // permute(n = R1), return address R15; frame: k, n, return address
    if (at != pm) begin layout_bad++; $display("FAIL assembler: Perm layout"); end
    pret = pm + 37;
    emit(a_alu3(FN_ADD, 13, 13, 1, 1'b1));
    emit(a_bra(C_EQ, 1, 12, rel(pret)));
    emit(a_nop());
    emit(a_st(15, 14, -1));
    emit(a_st(1, 14, -2));
    emit(a_alu3(FN_SUB, 14, 14, 3, 1'b1));
    emit(a_alu3(FN_SUB, 1, 1, 1, 1'b1));     // permute(n-1)
    pr1 = at + 3;
    emit(a_ldi(15, pr1));
    emit(a_jmp(JM_DIRECT, 0, pm));
    emit(a_nop());
    emit(a_ld(1, 14, 1));
    emit(a_nop());
    emit(a_alu3(FN_SUB, 3, 1, 1, 1'b1));     // k = n-1
    ploop = at;
    emit(a_st(3, 14, 0));
    emit(a_ldx(5, 11, 1));                   // exchange p[n], p[k]
    emit(a_ldx(6, 11, 3));
    emit(a_nop());
    emit(a_stx(5, 11, 3));
    emit(a_stx(6, 11, 1));
    emit(a_alu3(FN_SUB, 1, 1, 1, 1'b1));     // permute(n-1)
    pr2 = at + 3;
    emit(a_ldi(15, pr2));
    emit(a_jmp(JM_DIRECT, 0, pm));
    emit(a_nop());
    emit(a_ld(1, 14, 1));
    emit(a_ld(3, 14, 0));
    emit(a_nop());
    emit(a_ldx(5, 11, 1));                   // exchange back
    emit(a_ldx(6, 11, 3));
    emit(a_nop());
    emit(a_stx(5, 11, 3));
    emit(a_stx(6, 11, 1));
    emit(a_alu3(FN_SUB, 3, 3, 1, 1'b1));
    emit(a_bra(C_GT, 3, 0, rel(ploop)));
    emit(a_nop());
    emit(a_ld(15, 14, 2));
    emit(a_alu3(FN_ADD, 14, 14, 3, 1'b1));
    emit(a_nop());
    if (at != pret) begin layout_bad++; $display("FAIL assembler: Perm return"); end
    emit(a_jmp(JM_BASED, 15, 0));            // pret
    emit(a_nop());

    // ---------------- Queen
    u_mem.poke(QOK, 0);
    at = QUEEN;
    qtry = QUEEN + 29;
    emit(a_ldi(10, QB));
    emit(a_ldi(11, QD1));
    emit(a_ldi(12, QD2 + 7));
    emit(a_ldi(9, QX));
    emit(a_ldi(8, 8));
    emit(a_ldi(13, 50));                     // passes
    emit(a_ldi(14, STACK));
    qdoit = at;
    emit(a_ldi(4, 16));                      // mark every square free
    emit(a_ldi(5, 1));
    emit(a_ldi(7, QD2));
    qinit = at;
    emit(a_stx(5, 10, 4));
    emit(a_stx(5, 11, 4));
    emit(a_stx(5, 7, 4));
    emit(a_alu3(FN_SUB, 4, 4, 1, 1'b1));
    emit(a_bra(C_GE, 4, 0, rel(qinit)));
    emit(a_nop());
    emit(a_ldi(1, 1));
    emit(a_ldi(15, at + 3));
    emit(a_jmp(JM_DIRECT, 0, qtry));
    emit(a_nop());
    emit(a_ldd(4, QOK));                     // count the passes that succeeded
    emit(a_nop());
    emit(a_alu3(FN_ADD, 4, 4, 2));
    emit(a_std(4, QOK));
    emit(a_alu3(FN_SUB, 13, 13, 1, 1'b1));
    emit(a_bra(C_GT, 13, 0, rel(qdoit)));
    emit(a_nop());
    emit(a_jmp(JM_DIRECT, 0, TREE));
    emit(a_nop());
    // try(i = R1), result q in R2 (1 = placed); j in R3; frame: j, i, return address
    if (at != qtry) begin layout_bad++; $display("FAIL assembler: Queen layout"); end
    qnext = qtry + 40;
    qlast = qtry + 44;
    qout  = qtry + 45;
    emit(a_st(15, 14, -1));
    emit(a_st(1, 14, -2));
    emit(a_alu3(FN_SUB, 14, 14, 3, 1'b1));
    emit(a_ldi(3, 0));
    emit(a_ldi(2, 0));
    qtloop = at;
    emit(a_alu3(FN_ADD, 3, 3, 1, 1'b1));     // j++
    emit(a_ldx(5, 10, 3));
    emit(a_alu3(FN_ADD, 6, 1, 3));
    emit(a_alu3(FN_SUB, 7, 1, 3));           // i - j
    emit(a_ldx(6, 11, 6));
    emit(a_ldx(7, 12, 7));
    emit(a_bra(C_EQ, 5, 0, rel(qnext)));
    emit(a_nop());
    emit(a_bra(C_EQ, 6, 0, rel(qnext)));
    emit(a_nop());
    emit(a_bra(C_EQ, 7, 0, rel(qnext)));
    emit(a_nop());
    emit(a_alu3(FN_ADD, 6, 1, 3));           // place the queen
    emit(a_alu3(FN_SUB, 7, 1, 3));
    emit(a_stx(0, 10, 3));
    emit(a_stx(0, 11, 6));
    emit(a_stx(0, 12, 7));
    emit(a_stx(3, 9, 1));
    emit(a_bra(C_GE, 1, 8, rel(qlast)));
    emit(a_nop());
    emit(a_st(3, 14, 0));
    emit(a_alu3(FN_ADD, 1, 1, 1, 1'b1));     // try(i+1)
    qtr = at + 3;
    emit(a_ldi(15, qtr));
    emit(a_jmp(JM_DIRECT, 0, qtry));
    emit(a_nop());
    emit(a_ld(1, 14, 1));
    emit(a_ld(3, 14, 0));
    emit(a_bra(C_NE, 2, 0, rel(qout)));
    emit(a_nop());
    emit(a_alu3(FN_ADD, 6, 1, 3));           // not placed below: take the queen back
    emit(a_alu3(FN_SUB, 7, 1, 3));
    emit(a_ldi(5, 1));
    emit(a_stx(5, 10, 3));
    emit(a_stx(5, 11, 6));
    emit(a_stx(5, 12, 7));
    if (at != qnext) begin layout_bad++; $display("FAIL assembler: Queen next"); end
    emit(a_bra(C_NE, 3, 8, rel(qtloop)));
    emit(a_nop());
    emit(a_bra(C_ALWAYS, 0, 0, rel(qout)));
    emit(a_nop());
    emit(a_ldi(2, 1));                       // qlast: the eighth queen is placed
    emit(a_ld(15, 14, 2));                   // qout
    emit(a_alu3(FN_ADD, 14, 14, 3, 1'b1));
    emit(a_nop());
    emit(a_jmp(JM_BASED, 15, 0));
    emit(a_nop());

    // ---------------- Tree
    for (int i = 0; i < NT; i++) begin
      ref_t[i] = $urandom;
      u_mem.poke(TIN + i, ref_t[i]);
    end
    at = TREE;
    emit(a_ldi(10, TIN));                    // next input
    emit(a_ldi(11, NODES));                  // next free node
    emit(a_ldi(12, TIN + NT));
    emit(a_ldi(14, STACK));
    emit(a_ld(5, 10, 0));                    // the root holds the first number
    emit(a_alu3(FN_ADD, 13, 11, 0));
    emit(a_st(0, 11, 0));
    emit(a_st(0, 11, 1));
    emit(a_st(5, 11, 2));
    emit(a_alu3(FN_ADD, 11, 11, 3, 1'b1));
    emit(a_alu3(FN_ADD, 10, 10, 1, 1'b1));
    tins = at;
    emit(a_ld(5, 10, 0));                    // v; new node (nil, nil, v)
    emit(a_alu3(FN_ADD, 6, 13, 0));          // p = root
    emit(a_st(0, 11, 0));
    emit(a_st(0, 11, 1));
    emit(a_st(5, 11, 2));
    twalk = at;
    emit(a_ld(7, 6, 2));
    emit(a_nop());
    b_left = at; emit(a_bra(C_LT, 5, 7, 0));
    emit(a_nop());
    emit(a_ld(8, 6, 1));                     // v >= p.value: right
    emit(a_nop());
    b_setr = at; emit(a_bra(C_EQ, 8, 0, 0));
    emit(a_nop());
    emit(a_bra(C_ALWAYS, 0, 0, rel(twalk)));
    emit(a_alu3(FN_ADD, 6, 8, 0));
    tgoleft = at; patch_rel(b_left, tgoleft);
    emit(a_ld(8, 6, 0));
    emit(a_nop());
    b_setl = at; emit(a_bra(C_EQ, 8, 0, 0));
    emit(a_nop());
    emit(a_bra(C_ALWAYS, 0, 0, rel(twalk)));
    emit(a_alu3(FN_ADD, 6, 8, 0));
    patch_rel(b_setr, at);
    emit(a_st(11, 6, 1));                    // p.right = new
    b_link = at; emit(a_bra(C_ALWAYS, 0, 0, 0));
    emit(a_nop());
    patch_rel(b_setl, at);
    emit(a_st(11, 6, 0));                    // p.left = new
    patch_rel(b_link, at);
    emit(a_alu3(FN_ADD, 11, 11, 3, 1'b1));
    emit(a_alu3(FN_ADD, 10, 10, 1, 1'b1));
    emit(a_bra(C_LT, 10, 12, rel(tins)));
    emit(a_nop());
    emit(a_ldi(10, TIN));                    // in-order walk writes the output
    emit(a_alu3(FN_ADD, 1, 13, 0));
    l_fin = at; emit(a_ldi(15, 0));
    j_walk = at; emit(a_jmp(JM_DIRECT, 0, 0));
    emit(a_nop());
    u_mem.poke(l_fin, a_ldi(15, at));
    emit(a_alu3(FN_SUB, 10, 10, 12));        // fin: count written - NT
    emit(a_std(10, TCNT));
    emit(a_jmp(JM_DIRECT, 0, PUZZLE));
    emit(a_nop());
    // walk(p = R1, not nil), return address R15, output pointer R10
    tw = at; patch_abs(j_walk, tw);
    emit(a_st(15, 14, -1));
    emit(a_st(1, 14, -2));
    emit(a_alu3(FN_SUB, 14, 14, 2, 1'b1));
    emit(a_ld(2, 1, 0));
    emit(a_nop());
    b_noleft = at; emit(a_bra(C_EQ, 2, 0, 0));
    emit(a_nop());
    emit(a_alu3(FN_ADD, 1, 2, 0));
    l_b1 = at; emit(a_ldi(15, 0));
    emit(a_jmp(JM_DIRECT, 0, tw));
    emit(a_nop());
    u_mem.poke(l_b1, a_ldi(15, at));
    emit(a_ld(1, 14, 0));
    emit(a_nop());
    patch_rel(b_noleft, at);
    emit(a_ld(3, 1, 2));
    emit(a_nop());
    emit(a_st(3, 10, 0));
    emit(a_alu3(FN_ADD, 10, 10, 1, 1'b1));
    emit(a_ld(2, 1, 1));
    emit(a_nop());
    b_noright = at; emit(a_bra(C_EQ, 2, 0, 0));
    emit(a_nop());
    emit(a_alu3(FN_ADD, 1, 2, 0));
    l_b2 = at; emit(a_ldi(15, 0));
    emit(a_jmp(JM_DIRECT, 0, tw));
    emit(a_nop());
    u_mem.poke(l_b2, a_ldi(15, at));
    patch_rel(b_noright, at);
    emit(a_ld(15, 14, 1));
    emit(a_alu3(FN_ADD, 14, 14, 2, 1'b1));
    emit(a_nop());
    emit(a_jmp(JM_BASED, 15, 0));
    emit(a_nop());
    if (at > 'h700) begin layout_bad++; $display("FAIL assembler: Tree too long"); end

    // ---------------- Puzzle
    puzzle_setup();
    at = PUZZLE;
    emit(a_ldi(0, 0));
    emit(a_ldi(10, PUZZL));
    emit(a_ldi(11, PBASE));
    emit(a_ldi(12, PMAX));
    emit(a_ldi(13, PCLASS));
    emit(a_ldi(9, PCOUNT));
    emit(a_ldi(14, STACK));
    emit(a_ldi(8, 0));                       // trials
    emit(a_ldi(1, pz_n));
    l_back = at; emit(a_ldi(15, 0));
    emit(a_jmp(JM_DIRECT, 0, PUZZLE + 16));
    emit(a_nop());
    u_mem.poke(l_back, a_ldi(15, at));
    emit(a_std(8, PZK));
    emit(a_std(2, PZOK));
    emit(a_std(0, IO_DONE));
    emit(a_nop());
    // trial(j = R1) -> R2; frame: i, k, j, return address
    ptrial = at;
    if (ptrial != PUZZLE + 16) begin layout_bad++; $display("FAIL assembler: Puzzle layout"); end
    emit(a_alu3(FN_ADD, 8, 8, 1, 1'b1));
    emit(a_st(15, 14, -1));
    emit(a_st(1, 14, -2));
    emit(a_alu3(FN_SUB, 14, 14, 4, 1'b1));
    emit(a_ldi(3, 0));                       // i
    ptloop = at;
    emit(a_ldx(4, 13, 3));                   // pieces left of class[i]?
    emit(a_nop());
    emit(a_ldx(5, 9, 4));
    emit(a_nop());
    b_tn1 = at; emit(a_bra(C_EQ, 5, 0, 0));
    emit(a_nop());
    emit(a_ldx(6, 11, 3));                   // fit(i, j)
    emit(a_ldx(7, 12, 3));
    emit(a_alu3(FN_ADD, 2, 10, 1));
    emit(a_ldi(4, 0));
    pfloop = at;
    emit(a_ldx(5, 6, 4));
    emit(a_nop());
    b_f1 = at; emit(a_bra(C_EQ, 5, 0, 0));
    emit(a_nop());
    emit(a_ldx(5, 2, 4));
    emit(a_nop());
    b_f2 = at; emit(a_bra(C_NE, 5, 0, 0));   // cell taken: does not fit
    emit(a_nop());
    pfnext = at; patch_rel(b_f1, pfnext);
    emit(a_bra(C_LT, 4, 7, rel(pfloop)));
    emit(a_alu3(FN_ADD, 4, 4, 1, 1'b1));
    emit(a_ldi(4, 0));                       // place(i, j)
    pploop = at;
    emit(a_ldx(5, 6, 4));
    emit(a_nop());
    b_p1 = at; emit(a_bra(C_EQ, 5, 0, 0));
    emit(a_nop());
    emit(a_stx(5, 2, 4));
    patch_rel(b_p1, at);
    emit(a_bra(C_LT, 4, 7, rel(pploop)));
    emit(a_alu3(FN_ADD, 4, 4, 1, 1'b1));
    emit(a_ldx(4, 13, 3));
    emit(a_nop());
    emit(a_ldx(5, 9, 4));
    emit(a_nop());
    emit(a_alu3(FN_SUB, 5, 5, 1, 1'b1));
    emit(a_stx(5, 9, 4));
    emit(a_alu3(FN_ADD, 4, 1, 0));           // first empty cell from j, or 0
    emit(a_ldi(7, PSIZE));
    psloop = at;
    emit(a_ldx(5, 10, 4));
    emit(a_nop());
    b_s1 = at; emit(a_bra(C_EQ, 5, 0, 0));
    emit(a_nop());
    emit(a_bra(C_LT, 4, 7, rel(psloop)));
    emit(a_alu3(FN_ADD, 4, 4, 1, 1'b1));
    emit(a_ldi(4, 0));
    patch_rel(b_s1, at);
    emit(a_st(3, 14, 0));                    // trial(k) or (k = 0), the call made first
    emit(a_st(4, 14, 1));
    emit(a_alu3(FN_ADD, 1, 4, 0));
    l_back = at; emit(a_ldi(15, 0));
    emit(a_jmp(JM_DIRECT, 0, ptrial));
    emit(a_nop());
    u_mem.poke(l_back, a_ldi(15, at));
    emit(a_ld(3, 14, 0));
    emit(a_ld(1, 14, 2));
    emit(a_ld(4, 14, 1));
    b_yes2 = at; emit(a_bra(C_NE, 2, 0, 0));
    emit(a_nop());
    b_yes1 = at; emit(a_bra(C_EQ, 4, 0, 0)); // k = 0: the box is full
    emit(a_nop());
    emit(a_ldx(6, 11, 3));                   // remove(i, j)
    emit(a_ldx(7, 12, 3));
    emit(a_alu3(FN_ADD, 2, 10, 1));
    emit(a_ldi(4, 0));
    prloop = at;
    emit(a_ldx(5, 6, 4));
    emit(a_nop());
    b_rn = at; emit(a_bra(C_EQ, 5, 0, 0));
    emit(a_nop());
    emit(a_stx(0, 2, 4));
    patch_rel(b_rn, at);
    emit(a_bra(C_LT, 4, 7, rel(prloop)));
    emit(a_alu3(FN_ADD, 4, 4, 1, 1'b1));
    emit(a_ldx(4, 13, 3));
    emit(a_nop());
    emit(a_ldx(5, 9, 4));
    emit(a_nop());
    emit(a_alu3(FN_ADD, 5, 5, 1, 1'b1));
    emit(a_stx(5, 9, 4));
    ptnext = at; patch_rel(b_tn1, ptnext); patch_rel(b_f2, ptnext);
    emit(a_alu3(FN_SUB, 4, 3, PTYPES - 1, 1'b1));
    emit(a_bra(C_LT, 4, 0, rel(ptloop)));
    emit(a_alu3(FN_ADD, 3, 3, 1, 1'b1));
    emit(a_ldi(2, 0));                       // no shape fits here
    b_ret = at; emit(a_bra(C_ALWAYS, 0, 0, 0));
    emit(a_nop());
    ptyes = at; patch_rel(b_yes1, ptyes); patch_rel(b_yes2, ptyes);
    emit(a_ldi(2, 1));
    patch_rel(b_ret, at);
    emit(a_ld(15, 14, 3));
    emit(a_alu3(FN_ADD, 14, 14, 4, 1'b1));
    emit(a_nop());
    emit(a_jmp(JM_BASED, 15, 0));
    emit(a_nop());
    if (at > 'h800) begin layout_bad++; $display("FAIL assembler: Puzzle too long"); end
  endtask

  // Puzzle boards, shared by the machine's copy (memory) and the reference
  int pz_puzzl [PSIZE + 1 + 80];
  int pz_p [PTYPES][PSIZE + 1];
  int pz_max [PTYPES], pz_class [PTYPES], pz_count [4];
  int pz_kount, pz_n;

  function automatic int pz_addr(int t);     // where shape t's map lives
    return t < 12 ? 'h1000 + 512 * t : 'h3800;
  endfunction

  task automatic pz_shape(int t, int cls, int di, int dj, int dk);
    for (int i = 0; i <= di; i++)
      for (int j = 0; j <= dj; j++)
        for (int k = 0; k <= dk; k++) pz_p[t][i + PD * (j + PD * k)] = 1;
    pz_class[t] = cls;
    pz_max[t]   = di + PD * dj + PD * PD * dk;
  endtask

  function automatic bit pz_fit(int i, int j);
    for (int k = 0; k <= pz_max[i]; k++) if (pz_p[i][k] != 0 && pz_puzzl[j + k] != 0) return 0;
    return 1;
  endfunction

  function automatic int pz_place(int i, int j);
    for (int k = 0; k <= pz_max[i]; k++) if (pz_p[i][k] != 0) pz_puzzl[j + k] = 1;
    pz_count[pz_class[i]]--;
    for (int k = j; k <= PSIZE; k++) if (pz_puzzl[k] == 0) return k;
    return 0;
  endfunction

  function automatic void pz_remove(int i, int j);
    for (int k = 0; k <= pz_max[i]; k++) if (pz_p[i][k] != 0) pz_puzzl[j + k] = 0;
    pz_count[pz_class[i]]++;
  endfunction

  function automatic bit pz_trial(int j);
    int k;
    pz_kount++;
    for (int i = 0; i < PTYPES; i++)
      if (pz_count[pz_class[i]] != 0 && pz_fit(i, j)) begin
        k = pz_place(i, j);
        if (pz_trial(k) || k == 0) return 1;
        pz_remove(i, j);
      end
    return 0;
  endfunction

  // the box is cells (1..5, 1..5, 1..5) of an 8x8x8 board whose other cells
  // are filled; the first shape is placed at (1,1,1) before the search
  task automatic pz_init();
    foreach (pz_puzzl[m]) pz_puzzl[m] = 1;
    for (int i = 1; i <= 5; i++)
      for (int j = 1; j <= 5; j++)
        for (int k = 1; k <= 5; k++) pz_puzzl[i + PD * (j + PD * k)] = 0;
    foreach (pz_p[t, m]) pz_p[t][m] = 0;
    pz_shape(0, 0, 3, 1, 0);
    pz_shape(1, 0, 1, 0, 3);
    pz_shape(2, 0, 0, 3, 1);
    pz_shape(3, 0, 1, 3, 0);
    pz_shape(4, 0, 3, 0, 1);
    pz_shape(5, 0, 0, 1, 3);
    pz_shape(6, 1, 2, 0, 0);
    pz_shape(7, 1, 0, 2, 0);
    pz_shape(8, 1, 0, 0, 2);
    pz_shape(9, 2, 1, 1, 0);
    pz_shape(10, 2, 1, 0, 1);
    pz_shape(11, 2, 0, 1, 1);
    pz_shape(12, 3, 1, 1, 1);
    pz_count = '{13, 3, 1, 1};
    pz_kount = 0;
    pz_n = pz_place(0, 1 + PD * (1 + PD * 1));
  endtask

  task automatic puzzle_setup();
    pz_init();
    foreach (pz_puzzl[m]) u_mem.poke(PUZZL + m, pz_puzzl[m]);
    for (int t = 0; t < PTYPES; t++) begin
      for (int m = 0; m <= PSIZE; m++) u_mem.poke(pz_addr(t) + m, pz_p[t][m]);
      u_mem.poke(PBASE + t, pz_addr(t));
      u_mem.poke(PMAX + t, pz_max[t]);
      u_mem.poke(PCLASS + t, pz_class[t]);
    end
    for (int c = 0; c < 4; c++) u_mem.poke(PCOUNT + c, pz_count[c]);
  endtask

  int checks = 0, failures = 0;
  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  longint n_cycles = 0, n_instr = 0;
  longint t_start [NPROG + 1];
  initial for (int i = 0; i <= NPROG; i++) t_start[i] = -1;
  int n_exc = 0;
  always @(posedge clk) if (rst_n) begin
    n_cycles++;
    if (dut.adv && dut.slot_b && dut.e_ok) n_instr++;
    if (exc) n_exc++;
    for (int i = 0; i < NPROG; i++) if (t_start[i] < 0 && dut.pc == START[i]) t_start[i] = n_cycles;
  end

  initial begin : watchdog
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: programs did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t tmp;
    int    sum;
    build();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    repeat (4) @(posedge clk);
    t_start[NPROG] = n_cycles;
    for (int i = 0; i < NPROG; i++)
      $display("%-12s %8d cycles = %.2f s at 250 ns", PNAME[i], t_start[i + 1] - t_start[i],
               (t_start[i + 1] - t_start[i]) * 250e-9);
    $display("%0d instructions in all", n_instr);

    // reference results
    for (int i = NB - 1; i > 0; i--)
      for (int j = 0; j < i; j++)
        if ($signed(ref_sort[j]) > $signed(ref_sort[j + 1])) begin
          tmp = ref_sort[j]; ref_sort[j] = ref_sort[j + 1]; ref_sort[j + 1] = tmp;
        end
    for (int i = 0; i < NB; i++) check($sformatf("sorted[%0d]", i), u_mem.peek(SORT + i), ref_sort[i]);
    for (int i = 0; i < NM; i++)
      for (int j = 0; j < NM; j++) begin
        sum = 0;
        for (int k = 0; k < NM; k++) sum += ma[i][k] * mb[k][j];
        check($sformatf("C[%0d][%0d]", i, j), u_mem.peek(MC + NM * i + j), sum);
      end
    check("Towers moves", u_mem.peek(MOVES), (1 << NDISC) - 1);
    check("Towers no illegal move", u_mem.peek(BAD), 0);
    for (int p = 0; p < 3; p++)
      check($sformatf("Towers free slot of peg %0d", p), u_mem.peek(TOPS + p),
            PEGS + 16 * p + 1 + (p == 2 ? NDISC : 0));
    for (int d = 0; d < NDISC; d++)
      check($sformatf("Towers peg 2 slot %0d", d), u_mem.peek(PEGS + 33 + d), NDISC - d);
    // Quick: the result must be in signed order and hold the same numbers
    for (int i = 0; i < NQ; i++) got_q[i] = u_mem.peek(QA + i);
    for (int i = 1; i < NQ; i++)
      check($sformatf("Quick order at %0d", i), word_t'($signed(got_q[i - 1]) <= $signed(got_q[i])), 1);
    got_q.sort();
    ref_q.sort();
    for (int i = 0; i < NQ; i++) check($sformatf("Quick element %0d", i), got_q[i], ref_q[i]);
    check("Perm calls", u_mem.peek(PCTR), 5 * 8660);
    for (int i = 1; i <= NP; i++) check($sformatf("Perm p[%0d]", i), u_mem.peek(PA + i), i - 1);
    check("Queen passes", u_mem.peek(QOK), 50);
    foreach (QSOL[i]) check($sformatf("Queen row %0d", i + 1), u_mem.peek(QX + 1 + i), QSOL[i]);
    // Tree: all 5000 written back, in signed order, the same numbers
    check("Tree count", u_mem.peek(TCNT), 0);
    for (int i = 0; i < NT; i++) got_t[i] = u_mem.peek(TIN + i);
    for (int i = 1; i < NT; i++)
      check($sformatf("Tree order at %0d", i), word_t'($signed(got_t[i - 1]) <= $signed(got_t[i])), 1);
    got_t.sort();
    ref_t.sort();
    for (int i = 0; i < NT; i++) check($sformatf("Tree element %0d", i), got_t[i], ref_t[i]);
    // Puzzle: the same search run here
    begin
      bit ok;
      ok = pz_trial(pz_n);
      $display("Puzzle: %0d trials here, %0d on the machine", pz_kount, u_mem.peek(PZK));
      check("Puzzle trials", u_mem.peek(PZK), pz_kount);
      check("Puzzle packed", u_mem.peek(PZOK), word_t'(ok));
      check("Puzzle packed in the reference", word_t'(ok), 1);
      check("Puzzle trials, the benchmark's known count", pz_kount, 2005);
    end
    check("program layout", layout_bad, 0);
    check("no exceptions", n_exc, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
