// reg_file: the sixteen general purpose registers.
//
// Every register can be read onto either of the two datapath buses (ports
// A and B) and written from either bus, as in the published register cell,
// which has a read and a write transistor to each bus.  Reads are
// combinational; writes take effect on the rising clock edge.  If both
// write ports name the same register in one cycle, port B wins (this design's
// choice).  Registers clear on reset, which the published design does not
// specify; it keeps simulation deterministic.  The published cell refreshes
// itself when not written, which in a clocked register is simply holding.
module reg_file
  import mips_pkg::*;
#(
  parameter int unsigned N = NREGS,
  parameter int unsigned W = XLEN
)(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] ra_a,
  output logic [W-1:0]         rd_a,
  input  logic [$clog2(N)-1:0] ra_b,
  output logic [W-1:0]         rd_b,
  input  logic                 we_a,
  input  logic [$clog2(N)-1:0] wa_a,
  input  logic [W-1:0]         wd_a,
  input  logic                 we_b,
  input  logic [$clog2(N)-1:0] wa_b,
  input  logic [W-1:0]         wd_b
);

  logic [W-1:0] regs [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) regs[i] <= '0;
    end else begin
      if (we_a) regs[wa_a] <= wd_a;
      if (we_b) regs[wa_b] <= wd_b;
    end
  end

  assign rd_a = regs[ra_a];
  assign rd_b = regs[ra_b];

endmodule
