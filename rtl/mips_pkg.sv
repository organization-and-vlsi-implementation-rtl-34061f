// mips_pkg: types and constants shared by the MIPS processor blocks.
//
// The processor is a 32-bit, word-addressed load/store machine with sixteen
// general registers, no condition codes and a five-pipestage pipeline (IF, ID,
// OD, SX, OF) in which one machine cycle is two pipestages.  Those facts, the
// operation list, the nine exception kinds and the exception entry rules
// (jump to location zero, translation off, interrupts off) follow the
// published description of the machine.
//
// The machine-level bit encoding below is this design's own: the published
// description lists the operations and the packing of a memory reference with
// an ALU operation into one word, but not the bit layout.  Register fields are
// four bits wide everywhere, so the decoder mostly routes nibbles of the word
// onto the control-word fields.
//
//   [31:28] opcode
//   OP_ALU3  fn[27:24] dst[23:20] src2[19:16] src1[15:12] k[11] src3[10:7]
//            (k=1: src1 is the 4-bit small constant in [15:12])
//            d2[6]: for MSTEP/DSTEP, a double step (one in OD, one in SX)
//   OP_LDP / OP_STP (packed memory reference + two-operand ALU operation)
//            r[27:24] base[23:20] off6[19:14] av[13]
//            fn[12:9] ds[8:5] src1[4:1] k[0]   (ds is source2 and destination)
//   OP_LD / OP_ST  r[27:24] base[23:20] mode[19:18] idx[17:14]
//            disp18[17:0] signed for based and direct modes
//   OP_LDI   dst[27:24] imm24[23:0] signed
//   OP_BRA   cond[27:24] src1[23:20] src2[19:16] off16[15:0] signed, PC-relative
//   OP_JMP   mode[27:26] reg[25:22] disp22[21:0] signed
//   OP_TRAP  cond[27:24] src1[23:20] src2[19:16] code[7:0]
//   OP_SET   cond[27:24] dst[23:20] src[19:16]      dst := cond(src,dst) ? -1 : 0
//   OP_SAVEPC sel[27:26] base[25:22] disp22[21:0]   M[base+disp] := PC-sel
//   OP_MOVS  dir[27] sp[26:24] reg[23:20]           move to/from a special register
//   OP_NOP
package mips_pkg;

  localparam int unsigned XLEN      = 32;  // data word
  localparam int unsigned NREGS     = 16;  // general registers
  localparam int unsigned RAW       = 4;   // register address width
  localparam int unsigned ABUS_W    = 24;  // address pins
  localparam int unsigned SEG_W     = 16;  // width of the mask and PID registers

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RAW-1:0]  reg_t;

  typedef enum logic [3:0] {
    OP_ALU3   = 4'h0,
    OP_LDP    = 4'h1,
    OP_STP    = 4'h2,
    OP_LD     = 4'h3,
    OP_ST     = 4'h4,
    OP_LDI    = 4'h5,
    OP_BRA    = 4'h6,
    OP_JMP    = 4'h7,
    OP_TRAP   = 4'h8,
    OP_SET    = 4'h9,
    OP_SAVEPC = 4'hA,
    OP_MOVS   = 4'hB,
    OP_NOP    = 4'hF
  } opcode_e;

  // ALU / shifter operations (src1 is the amount for shifts)
  typedef enum logic [3:0] {
    FN_ADD   = 4'h0,  // src2 + src1
    FN_SUB   = 4'h1,  // src2 - src1
    FN_SUBR  = 4'h2,  // src1 - src2
    FN_AND   = 4'h3,
    FN_OR    = 4'h4,
    FN_XOR   = 4'h5,
    FN_SLL   = 4'h6,
    FN_SRL   = 4'h7,
    FN_SRA   = 4'h8,
    FN_ROL   = 4'h9,
    FN_RLC   = 4'hA,  // (src2:src3) rotated by src1, upper word
    FN_XC    = 4'hB,  // byte src1 of src2
    FN_IC    = 4'hC,  // byte src1 of dst replaced by src2
    FN_MSTEP = 4'hD,  // Booth step, two multiplier bits
    FN_DSTEP = 4'hE,  // non-restoring divide step, one quotient bit
    FN_PASS  = 4'hF   // src1
  } alu_fn_e;

  typedef enum logic [3:0] {
    C_ALWAYS = 4'h0,
    C_EQ     = 4'h1,
    C_NE     = 4'h2,
    C_LT     = 4'h3,
    C_GE     = 4'h4,
    C_LE     = 4'h5,
    C_GT     = 4'h6,
    C_LTU    = 4'h7,
    C_GEU    = 4'h8,
    C_LEU    = 4'h9,
    C_GTU    = 4'hA,
    C_NEVER  = 4'hF
  } cond_e;

  typedef enum logic [1:0] {
    EA_BASED   = 2'd0,  // base + disp
    EA_INDEXED = 2'd1,  // base + idx
    EA_SHIFTED = 2'd2,  // base >> idx
    EA_DIRECT  = 2'd3   // disp
  } ea_mode_e;

  typedef enum logic [1:0] {
    JM_DIRECT   = 2'd0,
    JM_BASED    = 2'd1,
    JM_INDIRECT = 2'd2,
    JM_RETURN   = 2'd3   // indirect, and restores the previous mode bits
  } jmp_mode_e;

  typedef enum logic [2:0] {
    SP_H    = 3'd0,
    SP_L    = 3'd1,
    SP_PSW  = 3'd2,
    SP_MASK = 3'd3,
    SP_PID  = 3'd4,
    SP_OVF  = 3'd5
  } sp_e;

  // Exception causes, in the order used for the cause field
  typedef enum logic [3:0] {
    EXC_NONE    = 4'd0,
    EXC_RESET   = 4'd1,
    EXC_BUSERR  = 4'd2,
    EXC_PGFAULT = 4'd3,
    EXC_MAPERR  = 4'd4,
    EXC_ILLEGAL = 4'd5,
    EXC_PRIV    = 4'd6,
    EXC_OVF     = 4'd7,
    EXC_TRAP    = 4'd8,
    EXC_INTR    = 4'd9
  } exc_e;

  // Process status word
  typedef struct packed {
    exc_e       cause;
    logic [7:0] tcode;
    logic       prev_sys;
    logic       prev_ie;
    logic       prev_map;
    logic       hist_en;   // PC history shifts on each fetch
    logic       ovf_en;    // overflow trapping enabled
    logic       map_en;    // address masking enabled
    logic       ie;        // interrupts enabled
    logic       sys;       // supervisor state
  } psw_t;

  // Mode bits an instruction carries from its fetch
  typedef struct packed {
    logic sys;
    logic map_en;
    logic ie;
  } itag_t;

  // Datapath control word produced by the IDU
  typedef struct packed {
    logic      illegal;
    logic      priv;
    // OD: effective address or branch target
    ea_mode_e  ea_mode;
    reg_t      base;
    reg_t      idx;
    word_t     disp;
    // data memory
    logic      mem_rd;
    logic      mem_wr;
    reg_t      mem_reg;   // load destination or store source
    logic      st_pc;     // store data is a saved PC (SavePC)
    logic [1:0] pc_sel;
    // SX: ALU or shifter operation
    logic      alu_wb;    // result written to dst
    alu_fn_e   fn;
    reg_t      dst;
    reg_t      s1;
    reg_t      s2;
    reg_t      s3;
    logic      s1_imm;
    word_t     imm;
    logic      hl_step;   // multiply or divide step
    logic      dbl;       // step twice: in OD and again in SX
    // control transfer and compares
    logic      br;        // conditional PC-relative branch
    logic      jmp_dir;
    logic      jmp_based;
    logic      jmp_ind;
    logic      rfe;
    cond_e     cond;
    logic      trap;
    logic [7:0] tcode;
    logic      set;
    // special registers
    logic      sp_rd;
    logic      sp_wr;
    sp_e       sp;
  } ctrl_t;

  // Program counter sources
  typedef enum logic [2:0] {
    PC_INC    = 3'd0,
    PC_HOLD   = 3'd1,
    PC_ZERO   = 3'd2,
    PC_BRANCH = 3'd3,
    PC_ABUS   = 3'd4,
    PC_BBUS   = 3'd5
  } pc_src_e;

  // Master pipeline control states
  typedef enum logic [3:0] {
    S_RESET  = 4'd0,
    S_A      = 4'd1,   // IF / OD / OF pipestage
    S_B      = 4'd2,   // ID / SX pipestage
    S_CM     = 4'd3,   // instruction cache miss, first pipestage held
    S_WT     = 4'd4,   // data wait, second pipestage held
    S_DMA    = 4'd5,   // bus given to an external master
    S_SYNC_A = 4'd6,   // synchronization cycle after an exception
    S_SYNC_B = 4'd7
  } mpc_state_e;

  // Condition evaluation, shared by branches, traps and Set
  function automatic logic cond_eval(cond_e c, word_t a, word_t b);
    unique case (c)
      C_ALWAYS: return 1'b1;
      C_EQ:     return a == b;
      C_NE:     return a != b;
      C_LT:     return $signed(a) <  $signed(b);
      C_GE:     return $signed(a) >= $signed(b);
      C_LE:     return $signed(a) <= $signed(b);
      C_GT:     return $signed(a) >  $signed(b);
      C_LTU:    return a <  b;
      C_GEU:    return a >= b;
      C_LEU:    return a <= b;
      C_GTU:    return a >  b;
      default:  return 1'b0;
    endcase
  endfunction

endpackage
