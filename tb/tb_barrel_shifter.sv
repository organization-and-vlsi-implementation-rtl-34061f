// tb_barrel_shifter: self-checking test of the combined rotator.
//
// Every operation (SLL, SRL, SRA, ROL, RLC, XC, IC) for every amount 0..31
// on random data, against reference expressions written directly from the
// operation definitions: logical and arithmetic shifts, left rotate, the
// double-word rotate of a and b, byte extract and byte insert.
module tb_barrel_shifter;
  import mips_pkg::*;

  alu_fn_e    fn;
  logic [4:0] amt;
  word_t      a, b, c, y;

  barrel_shifter dut (.*);

  int checks = 0, failures = 0;
  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s amt=%0d a=%h b=%h c=%h: got %h expected %h", what, amt, a, b, c, got, exp);
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
    logic [63:0] dw;
    int s, k;
    for (int i = 0; i < 200; i++) begin
      a = $urandom; b = $urandom; c = $urandom;
      if (i == 0) begin a = 32'h8000_0001; b = 32'hF0F0_0F0F; end
      for (s = 0; s < 32; s++) begin
        amt = 5'(s);
        fn = FN_SLL; #1; check("sll", y, a << s);
        fn = FN_SRL; #1; check("srl", y, a >> s);
        fn = FN_SRA; #1; check("sra", y, word_t'($signed(a) >>> s));
        fn = FN_ROL; #1; check("rol", y, s == 0 ? a : ((a << s) | (a >> (32 - s))));
        dw = {a, b} << s;
        fn = FN_RLC; #1; check("rlc", y, dw[63:32]);
        k = s % 4;
        fn = FN_XC; #1; check("xc", y, (a >> (8 * k)) & 32'hFF);
        fn = FN_IC; #1;
        check("ic", y, (c & ~(32'hFF << (8 * k))) | ((a & 32'hFF) << (8 * k)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
