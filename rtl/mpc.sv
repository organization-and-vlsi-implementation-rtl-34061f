// mpc: master pipeline control.
//
// Sequences the machine and handles everything that is not instruction
// specific: it does not look at opcodes.  Each machine cycle is two
// pipestages, slot A (IF of one instruction, OD of the previous, OF of the
// one before) and slot B (ID and SX).  The state machine:
//
//   S_RESET  -> S_A
//   S_A      instruction address on the bus.  No hit from the instruction
//            cache (and no page fault) -> S_CM, holding the pipestage.  A DMA
//            request at the machine-cycle boundary -> S_DMA.  A hard bus error
//            on the data word of the instruction in OF takes an exception ->
//            S_SYNC_B.  Otherwise -> S_B.
//   S_CM     cache-miss state, repeats slot A until hit.
//   S_B      data address on the bus.  No ready (and no page fault) -> S_WT.
//            An exception of the instruction in SX is taken -> S_SYNC_A.
//            Otherwise -> S_A.
//   S_WT     wait state, repeats slot B until ready.
//   S_DMA    processor idle, bus granted (dma_ack) until dma_req falls.
//   S_SYNC_A, S_SYNC_B  synchronization cycle after an exception: no fetch,
//            the pipeline drains to bubbles, then fetching restarts at zero.
//
// `adv` is high on a clock edge where the pipeline advances.  `take_exc`
// pulses on the edge where an exception is taken and `exc_cause` names it.
// Arbitration: the instruction furthest along wins (OF before SX); for one
// instruction, an exception it carries from fetch or decode wins over its
// own SX faults, which rank mapping error, page fault, overflow, software
// trap.  The published design gives the states' roles (cache miss, wait,
// DMA, flush), the nine exception kinds and the "earliest instruction, then
// most serious" rule; the state encoding, the exact state set (eight states,
// where the published controller has sixteen) and the ranking are this
// design's.
module mpc
  import mips_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dma_req,
  input  logic       ihit,
  input  logic       dready,
  input  logic       page_fault,
  input  logic       dref_active,   // slot B carries a data reference
  // instruction in SX
  input  logic       e_valid,
  input  exc_e       e_carried,
  input  logic       e_map_err,
  input  logic       e_pg_fault,
  input  logic       e_ovf,
  input  logic       e_trap,
  // instruction in OF
  input  logic       m_bus_err,
  output mpc_state_e state,
  output logic       slot_b,
  output logic       fetch,
  output logic       adv,
  output logic       take_exc,
  output exc_e       exc_cause,
  output logic       dma_ack
);

  mpc_state_e state_n;
  exc_e       e_cause;

  always_comb begin
    if (e_carried != EXC_NONE)  e_cause = e_carried;
    else if (e_map_err)         e_cause = EXC_MAPERR;
    else if (e_pg_fault)        e_cause = EXC_PGFAULT;
    else if (e_ovf)             e_cause = EXC_OVF;
    else if (e_trap)            e_cause = EXC_TRAP;
    else                        e_cause = EXC_NONE;
  end

  always_comb begin
    state_n   = state;
    adv       = 1'b0;
    take_exc  = 1'b0;
    exc_cause = EXC_NONE;
    slot_b    = 1'b0;
    fetch     = 1'b0;
    dma_ack   = 1'b0;
    unique case (state)
      S_RESET: state_n = S_A;
      S_A, S_CM: begin
        fetch = 1'b1;
        if (state == S_A && dma_req) begin
          fetch   = 1'b0;
          state_n = S_DMA;
        end else if (!ihit && !page_fault) begin
          state_n = S_CM;
        end else begin
          adv = 1'b1;
          if (m_bus_err) begin
            take_exc  = 1'b1;
            exc_cause = EXC_BUSERR;
            state_n   = S_SYNC_B;
          end else begin
            state_n   = S_B;
          end
        end
      end
      S_B, S_WT: begin
        slot_b = 1'b1;
        if (dref_active && !dready && !page_fault) begin
          state_n = S_WT;
        end else begin
          adv = 1'b1;
          if (e_valid && e_cause != EXC_NONE) begin
            take_exc  = 1'b1;
            exc_cause = e_cause;
            state_n   = S_SYNC_A;
          end else begin
            state_n   = S_A;
          end
        end
      end
      S_DMA: begin
        dma_ack = 1'b1;
        if (!dma_req) state_n = S_A;
      end
      S_SYNC_A: begin
        adv     = 1'b1;
        state_n = S_SYNC_B;
      end
      S_SYNC_B: begin
        slot_b  = 1'b1;
        adv     = 1'b1;
        state_n = S_A;
      end
      default: state_n = S_RESET;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_RESET;
    else        state <= state_n;
  end

endmodule
