// pc_unit: program counter, branch target register and PC history.
//
// The program counter holds the address of the next instruction to fetch.
// Each enabled cycle it takes one of six sources, as in the published
// design: increment, self-refresh (hold), zero (exception entry), the branch
// target register, or a value from either datapath bus (A: data returned by
// memory for an indirect jump; B: an address computed by the ALU for a based
// jump).  The increment is a plain +1 here; synthesis chooses the carry
// structure (the published design uses a carry-lookahead incrementer).
//
// The history is the three-entry shift register of the addresses of the
// last instructions fetched (PC-1 newest, PC-3 oldest).  It shifts the PC
// into PC-1 when `shift` is high and `hist_en` allows it.  After an exception
// the three entries are the restart addresses: the faulting instruction, the
// one after it and the next PC (see the top level for when it is pushed).
// The branch target register is loaded from btr_d when btr_we is high.
// All updates happen on the rising edge when `en` is high.
module pc_unit
  import mips_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  pc_src_e sel,
  input  word_t  abus,
  input  word_t  bbus,
  input  logic   btr_we,
  input  word_t  btr_d,
  input  logic   shift,
  input  logic   hist_en,
  output word_t  pc,
  output word_t  btr,
  output word_t  pc_m1,
  output word_t  pc_m2,
  output word_t  pc_m3
);

  word_t pc_n;

  always_comb begin
    unique case (sel)
      PC_INC:    pc_n = pc + 32'd1;
      PC_ZERO:   pc_n = '0;
      PC_BRANCH: pc_n = btr;
      PC_ABUS:   pc_n = abus;
      PC_BBUS:   pc_n = bbus;
      default:   pc_n = pc;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc    <= '0;
      btr   <= '0;
      pc_m1 <= '0;
      pc_m2 <= '0;
      pc_m3 <= '0;
    end else if (en) begin
      pc <= pc_n;
      if (btr_we) btr <= btr_d;
      if (shift && hist_en) begin
        pc_m1 <= pc;
        pc_m2 <= pc_m1;
        pc_m3 <= pc_m2;
      end
    end
  end

endmodule
