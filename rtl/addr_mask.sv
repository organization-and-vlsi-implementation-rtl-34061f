// addr_mask: address masking unit with its mask and process-ID registers.
//
// Converts a 32-bit process address into a virtual address.  The mask
// register marks the n high-order address bits (n contiguous ones from the
// top of a SEG_W-bit field covering address bits 31..32-SEG_W); under
// masking those bits are replaced by the same bits of the PID register.
// For example, process address FFFD74D3 with mask FFFC and PID 0ED8 gives
// virtual address 0ED974D3.  The replacement and the register names follow
// the published design; so does the rule that only the low 2^(31-n) and the
// high 2^(31-n) words of the process space are visible.  A process address
// is therefore legal only when its top n+1 bits are all equal (the bit just
// below the mask is the sign of the visible segment); otherwise map_err is
// raised.  With masking disabled (supervisor state after an exception) the
// address passes unchanged and no check is made.
//
// One unit serves both the instruction and the data address (the caller
// multiplexes them).  Translation is combinational; the two registers load
// on the rising clock edge and clear on reset.
module addr_mask
  import mips_pkg::*;
#(
  parameter int unsigned SEGW = SEG_W
)(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            mask_we,
  input  logic            pid_we,
  input  logic [SEGW-1:0] wdata,
  output logic [SEGW-1:0] mask,
  output logic [SEGW-1:0] pid,
  input  logic            map_en,
  input  word_t           pa,
  output word_t           va,
  output logic            map_err
);

  localparam int unsigned LO = XLEN - SEGW;   // lowest address bit under the mask field

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask <= '0;
      pid  <= '0;
    end else begin
      if (mask_we) mask <= wdata;
      if (pid_we)  pid  <= wdata;
    end
  end

  // field view over address bits [31:LO-1]; bit 0 of these vectors is LO-1
  logic [SEGW:0] m_ext;     // mask, shifted to line up with the field
  logic [SEGW:0] guard_sel; // the single bit just below the masked bits
  logic [SEGW:0] field;
  logic          guard;
  logic          legal;

  assign m_ext     = {mask, 1'b0};
  assign guard_sel = ~m_ext & {1'b0, m_ext[SEGW:1]};
  assign field     = pa[XLEN-1:LO-1];
  assign guard     = |(guard_sel & field);
  assign legal     = ((field & m_ext) == (m_ext & {(SEGW+1){guard}}));

  always_comb begin
    va = pa;
    if (map_en)
      va[XLEN-1:LO] = (pa[XLEN-1:LO] & ~mask) | (pid & mask);
  end

  assign map_err = map_en && (mask != '0) && !legal;

endmodule
