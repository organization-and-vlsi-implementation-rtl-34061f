// mips_mem_model: behavioural memory system for the processor testbenches.
//
// Answers the processor's split address/data bus.  A reference is accepted
// in the pipestage that carries its address (when ihit / dready allow) and
// its data moves in the next pipestage; the response is held until the next
// accepted reference, so it stays valid through cache-miss and wait states.
//   * instruction cache: 4-word lines, cold at start; a fetch from a line not
//     yet present holds ihit low for MISS_CYC cycles, then fills the line.
//   * data wait: a data reference to an odd address holds dready low for
//     WAIT_CYC cycles.
//   * paging: four regions of words, PF_LO..PF_HI, PF2_LO..PF2_HI,
//     PF3_LO..PF3_HI and PF4_LO..PF4_HI, start absent; each write to the
//     PF_CLR port pages in the next absent region, in that order.  A data
//     reference to an absent word raises page_fault in its address
//     pipestage; a fetch of one first goes through the cache-miss cycles
//     (the cache tries main memory) and raises page_fault when they end.
//   * the first fetch of word IBERR answers with bus_error (a hard error on
//     an instruction word); later fetches of it are clean.
//   * I/O words (addr[17:16] == 1): PF_CLR, IRQ_CLR (clears irq), DONE
//     (records done_val), BUSERR (a read there answers with bus_error).
// Words are indexed by addr[15:0]; the higher address bits, which carry the
// process identifier under masking, are ignored (a direct map).
module mips_mem_model
  import mips_pkg::*;
#(
  parameter int MISS_CYC = 3,
  parameter int WAIT_CYC = 2,
  parameter int PF_LO    = 32'h2800,
  parameter int PF_HI    = 32'h28FF,
  parameter int PF2_LO   = 32'h2900,
  parameter int PF2_HI   = 32'h29FF,
  parameter int PF3_LO   = 32'h2A00,
  parameter int PF3_HI   = 32'h2AFF,
  parameter int PF4_LO   = 32'h2B00,
  parameter int PF4_HI   = 32'h2BFF,
  parameter int IBERR    = 32'h0FFF
)(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ABUS_W-1:0] addr,
  input  logic              addr_oe,
  input  logic              ifetch,
  input  logic              dref,
  input  logic              rw,
  input  word_t             wdata,
  input  logic              wdata_oe,
  output word_t             rdata,
  output logic              ihit,
  output logic              dready,
  output logic              page_fault,
  output logic              bus_error,
  output logic              irq_clr,
  output logic              done,
  output word_t             done_val
);

  localparam logic [ABUS_W-1:0] PF_CLR  = 24'h010000;
  localparam logic [ABUS_W-1:0] IRQ_CLR = 24'h010001;
  localparam logic [ABUS_W-1:0] DONE    = 24'h010002;
  localparam logic [ABUS_W-1:0] BUSERR  = 24'h010003;

  word_t mem [65536];
  logic  line_ok [16384];
  int    paged_in;
  logic  iberr_done;
  int    miss_cnt, wait_cnt;
  logic  [ABUS_W-1:0] wr_addr;
  logic  wr_pend;

  function automatic logic absent(logic [ABUS_W-1:0] a);
    return (paged_in < 1 && a[17:0] >= PF_LO[17:0]  && a[17:0] <= PF_HI[17:0]) ||
           (paged_in < 2 && a[17:0] >= PF2_LO[17:0] && a[17:0] <= PF2_HI[17:0]) ||
           (paged_in < 3 && a[17:0] >= PF3_LO[17:0] && a[17:0] <= PF3_HI[17:0]) ||
           (paged_in < 4 && a[17:0] >= PF4_LO[17:0] && a[17:0] <= PF4_HI[17:0]);
  endfunction

  wire [ABUS_W-1:0] a18 = {6'd0, addr[17:0]};

  always_comb begin
    ihit       = !ifetch || line_ok[addr[15:2]] || miss_cnt >= MISS_CYC;
    page_fault = addr_oe && (dref || (ifetch && ihit)) && absent(a18);
    dready     = !dref || !addr[0] || wait_cnt >= WAIT_CYC;
  end

  // program loading from the testbench, before reset is released
  task automatic poke(int a, word_t w);
    mem[a[15:0]] = w;
  endtask

  function automatic word_t peek(int a);
    return mem[a[15:0]];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      paged_in  <= 0;
      iberr_done <= 1'b0;
      for (int i = 0; i < 16384; i++) line_ok[i] <= 1'b0;
      miss_cnt  <= 0;
      wait_cnt  <= 0;
      rdata     <= '0;
      bus_error <= 1'b0;
      wr_pend   <= 1'b0;
      wr_addr   <= '0;
      irq_clr   <= 1'b0;
      done      <= 1'b0;
      done_val  <= '0;
    end else begin
      irq_clr <= 1'b0;
      // store data phase
      if (wdata_oe && wr_pend) begin
        if (wr_addr[17:16] == 2'b01) begin
          if (wr_addr == PF_CLR && paged_in < 4) paged_in <= paged_in + 1;
          if (wr_addr == IRQ_CLR) irq_clr <= 1'b1;
          if (wr_addr == DONE) begin
            done     <= 1'b1;
            done_val <= wdata;
          end
        end else begin
          mem[wr_addr[15:0]] <= wdata;
        end
      end
      if (addr_oe && ifetch) begin
        if (!ihit) miss_cnt <= miss_cnt + 1;
        else begin
          miss_cnt <= 0;
          if (!page_fault) begin
            line_ok[addr[15:2]] <= 1'b1;
            rdata     <= mem[addr[15:0]];
            bus_error <= (addr[15:0] == IBERR[15:0]) && !iberr_done;
            if (addr[15:0] == IBERR[15:0]) iberr_done <= 1'b1;
          end
          wr_pend <= 1'b0;
        end
      end else if (addr_oe && dref) begin
        if (!dready) wait_cnt <= wait_cnt + 1;
        else begin
          wait_cnt <= 0;
          if (!page_fault) begin
            if (rw) begin
              rdata     <= (a18[17:16] == 2'b01) ? 32'hDEAD_0000 : mem[addr[15:0]];
              bus_error <= (a18 == BUSERR);
              wr_pend   <= 1'b0;
            end else begin
              wr_pend   <= 1'b1;
              wr_addr   <= a18;
              bus_error <= 1'b0;
            end
          end
        end
      end
    end
  end

endmodule
