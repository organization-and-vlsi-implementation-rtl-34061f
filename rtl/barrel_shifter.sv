// barrel_shifter: the processor's combined rotator.
//
// All shifts, rotates and the byte insert/extract operations use one
// mechanism.  An input multiplexer chooses the two 32-bit words (hi, lo) of a
// 64-bit quantity; the output is the 32-bit window of {hi,lo} that starts
// `s` bits above bit 0, s in 0..32.  The window is selected by two cascaded
// shifters, the first moving by s/4 nibbles and the second by s%4 bits.
// This organisation (input multiplexer, two-word combined rotator, coarse
// stage by amount/4 then fine stage by amount mod 4) follows the published
// design; the per-operation choice of hi, lo and s is this design's:
//
//   SRL  hi=0        lo=a  s=amt          SLL  hi=a  lo=0  s=32-amt
//   SRA  hi=sign(a)  lo=a  s=amt          ROL  hi=a  lo=a  s=32-amt
//   RLC  hi=a        lo=b  s=32-amt       XC   hi=0  lo=a  s=8*amt[1:0], low byte kept
//   IC   hi=a[7:0]   lo=0  s=32-8*amt[1:0], merged into c under a byte mask
//
// a is source 2 (the data), b is source 3 of a combined rotate, c is the old
// destination of a byte insert, amt is source 1.  Byte 0 is the least
// significant byte.  Purely combinational.
module barrel_shifter
  import mips_pkg::*;
(
  input  alu_fn_e     fn,
  input  logic [4:0]  amt,
  input  word_t       a,
  input  word_t       b,
  input  word_t       c,
  output word_t       y
);

  word_t       hi, lo;
  logic [5:0]  s;
  logic [63:0] coarse;
  logic [63:0] fine;
  logic [5:0]  bsh;       // byte position in bits
  word_t       bmask;

  always_comb begin
    bsh = {1'b0, amt[1:0], 3'b000};
    hi  = '0;
    lo  = a;
    s   = {1'b0, amt};
    unique case (fn)
      FN_SRL: begin hi = '0;            lo = a;  s = {1'b0, amt};     end
      FN_SRA: begin hi = {32{a[31]}};   lo = a;  s = {1'b0, amt};     end
      FN_SLL: begin hi = a;             lo = '0; s = 6'd32 - {1'b0, amt}; end
      FN_ROL: begin hi = a;             lo = a;  s = 6'd32 - {1'b0, amt}; end
      FN_RLC: begin hi = a;             lo = b;  s = 6'd32 - {1'b0, amt}; end
      FN_XC:  begin hi = '0;            lo = a;  s = bsh;             end
      FN_IC:  begin hi = {24'd0, a[7:0]}; lo = '0; s = 6'd32 - bsh;  end
      default: begin hi = '0;           lo = a;  s = '0;              end
    endcase
  end

  // coarse stage: s/4 nibbles; fine stage: s%4 bits
  assign coarse = {hi, lo} >> {s[5:2], 2'b00};
  assign fine   = coarse >> s[1:0];

  assign bmask  = 32'hFF << bsh;

  always_comb begin
    unique case (fn)
      FN_XC:   y = {24'd0, fine[7:0]};
      FN_IC:   y = (c & ~bmask) | (fine[31:0] & bmask);
      default: y = fine[31:0];
    endcase
  end

endmodule
