// mem_if: processor side of the split address / data bus.
//
// Instruction and data references are interleaved on one address bus, one
// address per pipestage, as in the published bus timing: in the first
// pipestage of a machine cycle (slot A, ifetch_o high) the bus carries the
// instruction address (the PC); in the second (slot B) it carries the data
// address held in the memory address register (MAR), when the instruction in
// OD/SX makes a data reference.  Each reference's data moves in the following
// pipestage: an instruction word arrives in slot B, and a load word arrives
// (or a store word is driven, data_oe_o high) in the next slot A.
//
// Both addresses pass through the one address masking unit; the low ABUS_W
// bits of the virtual address go to the pins.  The MAR is loaded from the
// effective address computed in OD; the memory data register (MDR) is loaded
// with the store word before OF.  Register loads happen on rising edges when
// `en` (the pipeline advance) is high.  The multiplexing per slot follows the
// published timing diagram; signal names and the separate output-enable are
// this design's, standing in for bidirectional data pads.
module mem_if
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        slot_b,     // 0: first pipestage (slot A), 1: second
  input  logic        fetch,      // slot A carries a real instruction fetch
  input  word_t       pc,
  input  logic        i_map,      // masking enable for the fetch
  input  logic        mar_we,
  input  word_t       mar_d,
  input  logic        d_map,      // masking enable for the data reference
  input  logic        d_rd,
  input  logic        d_wr,
  input  logic        mdr_we,
  input  word_t       mdr_d,
  input  logic        st_drive,   // drive the MDR in this slot A
  input  logic        mask_we,
  input  logic        pid_we,
  input  logic [SEG_W-1:0] sp_wdata,
  output logic [SEG_W-1:0] mask,
  output logic [SEG_W-1:0] pid,
  output logic [ABUS_W-1:0] addr_o,
  output logic        ifetch_o,
  output logic        dref_o,
  output logic        rw_o,       // 1 read, 0 write
  output word_t       data_o,
  output logic        data_oe_o,
  output logic        map_err
);

  word_t mar, mdr, pa, va;
  logic  map_on;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mar <= '0;
      mdr <= '0;
    end else if (en) begin
      if (mar_we) mar <= mar_d;
      if (mdr_we) mdr <= mdr_d;
    end
  end

  assign pa     = slot_b ? mar   : pc;
  assign map_on = slot_b ? d_map : i_map;

  addr_mask u_mask (
    .clk     (clk),
    .rst_n   (rst_n),
    .mask_we (mask_we),
    .pid_we  (pid_we),
    .wdata   (sp_wdata),
    .mask    (mask),
    .pid     (pid),
    .map_en  (map_on),
    .pa      (pa),
    .va      (va),
    .map_err (map_err)
  );

  assign addr_o    = va[ABUS_W-1:0];
  assign ifetch_o  = !slot_b && fetch;
  assign dref_o    = slot_b && (d_rd || d_wr);
  assign rw_o      = !(slot_b && d_wr);
  assign data_o    = mdr;
  assign data_oe_o = !slot_b && st_drive;

endmodule
