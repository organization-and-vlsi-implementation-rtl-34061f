// tb_mpc: self-checking test of the master pipeline control.
//
// Drives the state machine with random status inputs and compares state,
// slot, fetch, advance, exception and DMA outputs each cycle with a
// reference model of the state transitions: cache-miss and wait states,
// DMA hold, exception priority for the instruction in SX, bus error of the
// instruction in OF and the synchronization cycles.  Also checks that every
// state was visited.
module tb_mpc;
  import mips_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic dma_req, ihit, dready, page_fault, dref_active;
  logic e_valid, e_map_err, e_pg_fault, e_ovf, e_trap, m_bus_err;
  exc_e e_carried;
  mpc_state_e state;
  logic slot_b, fetch, adv, take_exc, dma_ack;
  exc_e exc_cause;

  mpc dut (.*);

  int checks = 0, failures = 0;
  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  initial begin : watchdog
    #2_000_000;
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int visits [8];

  initial begin
    mpc_state_e r_st, r_n;
    logic r_adv, r_exc, r_fetch, r_slot, r_ack;
    exc_e r_cause, ec;
    for (int i = 0; i < 8; i++) visits[i] = 0;
    {dma_req, ihit, dready, page_fault, dref_active, e_valid, e_map_err, e_pg_fault,
     e_ovf, e_trap, m_bus_err} = '0;
    e_carried = EXC_NONE;
    repeat (2) @(negedge clk);
    check("reset state", state, S_RESET);
    visits[S_RESET]++;
    rst_n = 1'b1;
    r_st = S_RESET;
    for (int i = 0; i < 20000; i++) begin
      dma_req     = ($urandom_range(15) == 0) || (dma_ack && $urandom_range(3) != 0);
      ihit        = $urandom_range(3) != 0;
      dready      = $urandom_range(3) != 0;
      page_fault  = $urandom_range(15) == 0;
      dref_active = $urandom_range(1);
      e_valid     = $urandom_range(3) != 0;
      e_carried   = ($urandom_range(7) == 0) ? exc_e'($urandom_range(1, 9)) : EXC_NONE;
      e_map_err   = $urandom_range(15) == 0;
      e_pg_fault  = $urandom_range(15) == 0;
      e_ovf       = $urandom_range(15) == 0;
      e_trap      = $urandom_range(15) == 0;
      m_bus_err   = $urandom_range(15) == 0;
      #1;
      // reference
      ec = e_carried != EXC_NONE ? e_carried : e_map_err ? EXC_MAPERR :
           e_pg_fault ? EXC_PGFAULT : e_ovf ? EXC_OVF : e_trap ? EXC_TRAP : EXC_NONE;
      r_adv = 0; r_exc = 0; r_cause = EXC_NONE; r_fetch = 0; r_slot = 0; r_ack = 0; r_n = r_st;
      case (r_st)
        S_RESET: r_n = S_A;
        S_A, S_CM: begin
          r_fetch = 1;
          if (r_st == S_A && dma_req) begin r_fetch = 0; r_n = S_DMA; end
          else if (!ihit && !page_fault) r_n = S_CM;
          else begin
            r_adv = 1;
            if (m_bus_err) begin r_exc = 1; r_cause = EXC_BUSERR; r_n = S_SYNC_B; end
            else r_n = S_B;
          end
        end
        S_B, S_WT: begin
          r_slot = 1;
          if (dref_active && !dready && !page_fault) r_n = S_WT;
          else begin
            r_adv = 1;
            if (e_valid && ec != EXC_NONE) begin r_exc = 1; r_cause = ec; r_n = S_SYNC_A; end
            else r_n = S_A;
          end
        end
        S_DMA: begin r_ack = 1; if (!dma_req) r_n = S_A; end
        S_SYNC_A: begin r_adv = 1; r_n = S_SYNC_B; end
        S_SYNC_B: begin r_slot = 1; r_adv = 1; r_n = S_A; end
        default: r_n = S_RESET;
      endcase
      check("state", state, r_st);
      check("slot_b", slot_b, r_slot);
      check("fetch", fetch, r_fetch);
      check("adv", adv, r_adv);
      check("take_exc", take_exc, r_exc);
      check("cause", exc_cause, r_cause);
      check("dma_ack", dma_ack, r_ack);
      visits[state]++;
      @(posedge clk);
      r_st = r_n;
      @(negedge clk);
    end
    for (int s = 0; s < 8; s++) check($sformatf("visited state %0d", s), visits[s] > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
