// tb_mem_if: self-checking test of the memory interface.
//
// Checks the bus slot usage: in slot A the (masked) PC is on the address
// lines with ifetch and, when a store is in its data pipestage, the MDR on
// the data lines; in slot B the (masked) MAR is on the address lines with
// dref and the read/write line.  Random MAR/MDR loads (only when enabled),
// random masking per reference, and the 24-bit truncation of the address
// are compared with a reference model.
module tb_mem_if;
  import mips_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        en, slot_b, fetch, i_map, mar_we, d_map, d_rd, d_wr, mdr_we, st_drive;
  logic        mask_we, pid_we, ifetch_o, dref_o, rw_o, data_oe_o, map_err;
  word_t       pc, mar_d, mdr_d, data_o;
  logic [15:0] sp_wdata, mask, pid;
  logic [23:0] addr_o;

  mem_if dut (.*);

  int checks = 0, failures = 0;
  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic word_t xlate(word_t a, logic on);
    if (!on) return a;
    return {(a[31:16] & ~16'hFFF0) | (16'h0AB5 & 16'hFFF0), a[15:0]};
  endfunction

  initial begin : watchdog
    #2_000_000;
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t r_mar, r_mdr;
    en = 0; slot_b = 0; fetch = 0; i_map = 0; mar_we = 0; d_map = 0; d_rd = 0; d_wr = 0;
    mdr_we = 0; st_drive = 0; mask_we = 0; pid_we = 0; pc = 0; mar_d = 0; mdr_d = 0; sp_wdata = 0;
    r_mar = 0; r_mdr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); sp_wdata = 16'hFFF0; mask_we = 1;
    @(negedge clk); mask_we = 0; sp_wdata = 16'h0AB5; pid_we = 1;
    @(negedge clk); pid_we = 0;
    check("mask", 32'(mask), 32'hFFF0);
    check("pid", 32'(pid), 32'h0AB5);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = ($urandom_range(5) != 0);
      slot_b = $urandom_range(1);
      fetch = $urandom_range(1);
      i_map = $urandom_range(1); d_map = $urandom_range(1);
      d_rd = $urandom_range(1); d_wr = !d_rd && $urandom_range(1);
      st_drive = $urandom_range(1);
      mar_we = $urandom_range(1); mdr_we = $urandom_range(1);
      pc = $urandom >> $urandom_range(31);
      mar_d = $urandom >> $urandom_range(31);
      mdr_d = $urandom;
      #1;
      if (!slot_b) begin
        check("addr A", 32'(addr_o), 32'(xlate(pc, i_map) & 32'hFF_FFFF));
        check("ifetch A", ifetch_o, fetch);
        check("dref A", dref_o, 0);
        check("rw A", rw_o, 1);
        check("data oe A", data_oe_o, st_drive);
      end else begin
        check("addr B", 32'(addr_o), 32'(xlate(r_mar, d_map) & 32'hFF_FFFF));
        check("ifetch B", ifetch_o, 0);
        check("dref B", dref_o, d_rd || d_wr);
        check("rw B", rw_o, !d_wr);
        check("data oe B", data_oe_o, 0);
      end
      check("data", data_o, r_mdr);
      @(posedge clk);
      if (en && mar_we) r_mar = mar_d;
      if (en && mdr_we) r_mdr = mdr_d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
