// alu: arithmetic and logic unit with the H (high) and L (low) registers.
//
// Combinational part: add, subtract, reverse subtract, and, or, xor and
// pass, with signed overflow, plus the compare-condition evaluation used by
// compare-and-branch, Trap and Set.  Inputs follow the operation table:
// a is source 1, b is source 2; Add gives b+a, Sub b-a, Subr a-b, and a
// condition is tested as cond(a, b).
//
// Sequential part: H and L support multiplication and division by repeated
// single-instruction steps, as the published design does; the arithmetic is
// carried out 34 bits wide so the two-bit shift-and-add cannot overflow.
//   FN_MSTEP  modified Booth step: the two low bits of L and the bit shifted
//             out last select 0, +-a or +-2a, which is added to H; {H,L} then
//             moves right two places (arithmetic).  Start with H=0 and L the
//             multiplier; after 16 steps {H,L} is the signed 64-bit product.
//   FN_DSTEP  non-restoring divide step: {R,L} moves left one place, then
//             a is subtracted from the remainder R if R was not negative and
//             added otherwise; the new quotient bit (1 when R is not negative)
//             enters L.  R is H with a sign bit held beside it.  Start with
//             H=0 and L the dividend; after 32 steps L is the unsigned
//             quotient, and H (plus a when the sign bit is set) the remainder.
// The Booth recoding table, the divide step and the initialisation are this
// design's choices; the published design gives only the rates (two bits per
// multiply step, one per divide step) and the 34-bit width.
// A double step (four multiplier bits or two quotient bits per instruction)
// uses the ALU twice: with od_step in the first pipestage the step result is
// kept in pending registers only, and the second step (step_en with
// use_pend) starts from them and commits to H and L.  An instruction
// cancelled between its two halves therefore leaves H and L untouched and
// can be restarted.  The pending registers are this design's choice.
// H and L update on the clock edge when step_en is high and fn is a step;
// y then shows the new H value combinationally.  Writing H clears the
// remainder sign, writing L clears the Booth history bit.
module alu
  import mips_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  alu_fn_e  fn,
  input  word_t    a,
  input  word_t    b,
  input  cond_e    cond,
  input  logic     step_en,
  input  logic     od_step,
  input  logic     use_pend,
  input  logic     h_we,
  input  logic     l_we,
  input  word_t    hl_wdata,
  output word_t    y,
  output logic     ovf,
  output logic     cond_true,
  output word_t    h,
  output word_t    l
);

  logic        lq;      // Booth: multiplier bit shifted out last
  logic        hs;      // divide: sign of the partial remainder
  word_t       ph, pl;  // result of the OD half of a double step
  logic        plq, phs;
  word_t       bh, bl;  // the values a step starts from
  logic        blq, bhs;

  assign bh  = use_pend ? ph  : h;
  assign bl  = use_pend ? pl  : l;
  assign blq = use_pend ? plq : lq;
  assign bhs = use_pend ? phs : hs;

  logic [33:0] a34, sum34, booth_add, div34, r2;
  word_t       h_n, l_n;
  logic        lq_n, hs_n;

  assign a34 = {{2{a[31]}}, a};

  // Booth radix-4 recoding of {L[1], L[0], lq}
  always_comb begin
    unique case ({bl[1:0], blq})
      3'b001, 3'b010: booth_add = a34;
      3'b011:         booth_add = a34 << 1;
      3'b100:         booth_add = -(a34 << 1);
      3'b101, 3'b110: booth_add = -a34;
      default:        booth_add = '0;
    endcase
  end
  assign sum34 = {{2{bh[31]}}, bh} + booth_add;

  // non-restoring divide step
  assign r2    = {bhs, bh, bl[31]};
  assign div34 = bhs ? (r2 + {2'b00, a}) : (r2 - {2'b00, a});

  always_comb begin
    h_n  = bh;
    l_n  = bl;
    lq_n = blq;
    hs_n = bhs;
    if (fn == FN_MSTEP) begin
      h_n  = sum34[33:2];
      l_n  = {sum34[1:0], bl[31:2]};
      lq_n = bl[1];
    end else if (fn == FN_DSTEP) begin
      h_n  = div34[31:0];
      hs_n = div34[33];
      l_n  = {bl[30:0], ~div34[33]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h  <= '0;
      l  <= '0;
      lq <= 1'b0;
      hs <= 1'b0;
      ph  <= '0;
      pl  <= '0;
      plq <= 1'b0;
      phs <= 1'b0;
    end else begin
      if (od_step && (fn == FN_MSTEP || fn == FN_DSTEP)) begin
        ph  <= h_n;
        pl  <= l_n;
        plq <= lq_n;
        phs <= hs_n;
      end
      if (step_en && (fn == FN_MSTEP || fn == FN_DSTEP)) begin
        h  <= h_n;
        l  <= l_n;
        lq <= lq_n;
        hs <= hs_n;
      end else begin
        if (h_we) begin
          h  <= hl_wdata;
          hs <= 1'b0;
        end
        if (l_we) begin
          l  <= hl_wdata;
          lq <= 1'b0;
        end
      end
    end
  end

  // 34-bit add/subtract with signed overflow
  logic [33:0] add34;
  always_comb begin
    unique case (fn)
      FN_SUB:  add34 = {{2{b[31]}}, b} - a34;
      FN_SUBR: add34 = a34 - {{2{b[31]}}, b};
      default: add34 = {{2{b[31]}}, b} + a34;
    endcase
  end

  always_comb begin
    ovf = 1'b0;
    unique case (fn)
      FN_ADD, FN_SUB, FN_SUBR: begin
        y   = add34[31:0];
        ovf = add34[32] != add34[31];
      end
      FN_AND:   y = a & b;
      FN_OR:    y = a | b;
      FN_XOR:   y = a ^ b;
      FN_PASS:  y = a;
      FN_MSTEP, FN_DSTEP: y = h_n;
      default:  y = add34[31:0];
    endcase
  end

  assign cond_true = cond_eval(cond, a, b);

endmodule
