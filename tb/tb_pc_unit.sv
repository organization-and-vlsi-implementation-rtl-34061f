// tb_pc_unit: self-checking test of the program counter and PC history.
//
// Random sequences of PC source selections (increment, hold, zero, branch
// target register, A bus, B bus), branch-target writes, history shifts with
// the history enabled or frozen, and enable low; every output is compared
// with a reference model after each clock.
module tb_pc_unit;
  import mips_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    en, btr_we, shift, hist_en;
  pc_src_e sel;
  word_t   abus, bbus, btr_d, pc, btr, pc_m1, pc_m2, pc_m3;

  pc_unit dut (.*);

  word_t r_pc, r_btr, r_m1, r_m2, r_m3;
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
    en = 0; btr_we = 0; shift = 0; hist_en = 0; sel = PC_INC;
    abus = 0; bbus = 0; btr_d = 0;
    r_pc = 0; r_btr = 0; r_m1 = 0; r_m2 = 0; r_m3 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("reset pc", pc, 0);
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      en = ($urandom_range(7) != 0);
      sel = pc_src_e'($urandom_range(5));
      abus = $urandom; bbus = $urandom; btr_d = $urandom;
      btr_we = $urandom_range(1);
      shift = $urandom_range(1);
      hist_en = ($urandom_range(3) != 0);
      @(posedge clk);
      if (en && shift && hist_en) begin
        r_m3 = r_m2; r_m2 = r_m1; r_m1 = r_pc;
      end
      if (en) begin
        case (sel)
          PC_INC:    r_pc = r_pc + 1;
          PC_ZERO:   r_pc = 0;
          PC_BRANCH: r_pc = r_btr;
          PC_ABUS:   r_pc = abus;
          PC_BBUS:   r_pc = bbus;
          default:   ;
        endcase
      end
      if (en && btr_we) r_btr = btr_d;
      #1;
      check("pc", pc, r_pc);
      check("btr", btr, r_btr);
      check("m1", pc_m1, r_m1);
      check("m2", pc_m2, r_m2);
      check("m3", pc_m3, r_m3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
