// tb_reg_file: self-checking test of the two-read, two-write register file.
//
// Checks the cleared state after reset, then random reads and writes on both
// ports against a shadow array, including both ports writing the same
// register in one cycle (port B wins) and reads of a register written in the
// same cycle (the old value is seen until the clock edge).
module tb_reg_file;
  import mips_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] ra_a, ra_b, wa_a, wa_b;
  word_t      rd_a, rd_b, wd_a, wd_b;
  logic       we_a, we_b;

  reg_file dut (.*);

  word_t shadow [16];
  int checks = 0, failures = 0;
  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we_a = 0; we_b = 0; wa_a = 0; wa_b = 0; wd_a = 0; wd_b = 0; ra_a = 0; ra_b = 0;
    for (int i = 0; i < 16; i++) shadow[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 16; i++) begin
      ra_a = 4'(i); ra_b = 4'(15 - i); #1;
      check("reset a", rd_a, 0);
      check("reset b", rd_b, 0);
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we_a = $urandom_range(1); we_b = $urandom_range(1);
      wa_a = 4'($urandom); wa_b = (i % 10 == 0) ? wa_a : 4'($urandom);
      wd_a = $urandom; wd_b = $urandom;
      ra_a = 4'($urandom); ra_b = 4'($urandom);
      #1;
      check("read a", rd_a, shadow[ra_a]);
      check("read b", rd_b, shadow[ra_b]);
      @(posedge clk);
      if (we_a) shadow[wa_a] = wd_a;
      if (we_b) shadow[wa_b] = wd_b;
    end
    @(negedge clk);
    we_a = 0; we_b = 0;
    for (int i = 0; i < 16; i++) begin
      ra_a = 4'(i); #1;
      check("final", rd_a, shadow[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
