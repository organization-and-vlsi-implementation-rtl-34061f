// tb_alu: self-checking test of the ALU and its H/L step registers.
//
// Random operands against reference expressions for add, subtract, reverse
// subtract (value and signed overflow), and, or, xor, pass and every branch
// condition; then full multiplications (16 Booth steps) and divisions (32
// steps) on random operands, checked against the product, quotient and
// remainder computed here.  The remainder is compared modulo 2^32 after the
// final correction by the divisor when the hidden sign is set.  Double
// steps (first half into the pending registers, second half committing) are
// checked the same way with 8 and 16 double steps, sometimes repeating the
// first half as a cancelled and restarted instruction would.
module tb_alu;
  import mips_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  alu_fn_e fn;
  word_t   a, b, hl_wdata, y, h, l;
  cond_e   cond;
  logic    step_en, od_step, use_pend, h_we, l_we, ovf, cond_true;

  alu dut (.*);

  int checks = 0, failures = 0;
  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic ref_cond(cond_e c, word_t x, word_t z);
    case (c)
      C_ALWAYS: return 1'b1;
      C_EQ:  return x == z;
      C_NE:  return x != z;
      C_LT:  return $signed(x) <  $signed(z);
      C_GE:  return $signed(x) >= $signed(z);
      C_LE:  return $signed(x) <= $signed(z);
      C_GT:  return $signed(x) >  $signed(z);
      C_LTU: return x <  z;
      C_GEU: return x >= z;
      C_LEU: return x <= z;
      C_GTU: return x >  z;
      default: return 1'b0;
    endcase
  endfunction

  word_t pick_vals [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000, 32'h1234_5678};

  function automatic word_t rnd();
    if ($urandom_range(3) == 0) return pick_vals[$urandom_range(5)];
    return $urandom;
  endfunction

  initial begin : watchdog
    #2_000_000;
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sa, sb, r;
    word_t  q, rem, hh;
    fn = FN_ADD; a = 0; b = 0; cond = C_ALWAYS;
    step_en = 0; od_step = 0; use_pend = 0; h_we = 0; l_we = 0; hl_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check("reset h", h, 0);
    check("reset l", l, 0);

    for (int i = 0; i < 2000; i++) begin
      a = rnd(); b = rnd();
      sa = longint'($signed(a)); sb = longint'($signed(b));
      fn = FN_ADD; #1;
      r = sb + sa;
      check("add", y, word_t'(r));
      check("add ovf", ovf, r > 64'sh7FFF_FFFF || r < -64'sh8000_0000);
      fn = FN_SUB; #1;
      r = sb - sa;
      check("sub", y, word_t'(r));
      check("sub ovf", ovf, r > 64'sh7FFF_FFFF || r < -64'sh8000_0000);
      fn = FN_SUBR; #1;
      r = sa - sb;
      check("subr", y, word_t'(r));
      check("subr ovf", ovf, r > 64'sh7FFF_FFFF || r < -64'sh8000_0000);
      fn = FN_AND; #1; check("and", y, a & b);
      fn = FN_OR;  #1; check("or", y, a | b);
      fn = FN_XOR; #1; check("xor", y, a ^ b);
      fn = FN_PASS; #1; check("pass", y, a);
      cond = cond_e'($urandom_range(15)); #1;
      check($sformatf("cond %s", cond.name()), cond_true, ref_cond(cond, a, b));
    end

    // multiplication: H=0, L=multiplier, 16 steps with the multiplicand on a
    for (int i = 0; i < 300; i++) begin
      word_t mc, mp;
      mc = rnd(); mp = rnd();
      @(negedge clk);
      hl_wdata = 0;  h_we = 1;
      @(negedge clk);
      h_we = 0; hl_wdata = mp; l_we = 1;
      @(negedge clk);
      l_we = 0; a = mc; fn = FN_MSTEP; step_en = 1;
      repeat (16) @(negedge clk);
      step_en = 0;
      r = longint'($signed(mc)) * longint'($signed(mp));
      check("mul", {h, l}, r);
    end

    // division: H=0, L=dividend, 32 steps with the divisor on a
    for (int i = 0; i < 300; i++) begin
      word_t dd, dv;
      dd = $urandom;
      dv = (i % 3 == 0) ? word_t'($urandom_range(1, 1000)) : ($urandom >> $urandom_range(31));
      if (dv == 0) dv = 7;
      @(negedge clk);
      hl_wdata = 0;  h_we = 1;
      @(negedge clk);
      h_we = 0; hl_wdata = dd; l_we = 1;
      @(negedge clk);
      l_we = 0; a = dv; fn = FN_DSTEP; step_en = 1;
      repeat (32) @(negedge clk);
      step_en = 0;
      q = dd / dv; rem = dd % dv;
      check("div quotient", l, q);
      hh = h;
      check("div remainder", (hh == rem || hh + dv == rem), 1);
    end

    // double steps: a first half into the pending registers, then a second
    // half from them that commits; half of the time the first half is done
    // twice (a cancelled and restarted instruction), which must not matter
    for (int i = 0; i < 200; i++) begin
      word_t mc, mp;
      bit is_div;
      int n;
      is_div = i[0];
      mc = rnd(); mp = rnd();
      if (is_div && mc == 0) mc = 3;
      @(negedge clk);
      hl_wdata = 0;  h_we = 1;
      @(negedge clk);
      h_we = 0; hl_wdata = mp; l_we = 1;
      @(negedge clk);
      l_we = 0; a = mc; fn = is_div ? FN_DSTEP : FN_MSTEP;
      n = is_div ? 16 : 8;
      for (int s = 0; s < n; s++) begin
        od_step = 1; use_pend = 0;
        if ($urandom_range(1)) @(negedge clk);
        @(negedge clk);
        od_step = 0; use_pend = 1; step_en = 1;
        @(negedge clk);
        step_en = 0; use_pend = 0;
      end
      if (is_div) begin
        q = mp / mc; rem = mp % mc;
        check("double div quotient", l, q);
        hh = h;
        check("double div remainder", (hh == rem || hh + mc == rem), 1);
      end else begin
        r = longint'($signed(mc)) * longint'($signed(mp));
        check("double mul", {h, l}, r);
      end
    end

    // step_en low leaves H/L alone
    @(negedge clk);
    hh = h; q = l;
    fn = FN_MSTEP; a = 32'h1234; step_en = 0;
    @(negedge clk);
    check("hold h", h, hh);
    check("hold l", l, q);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
