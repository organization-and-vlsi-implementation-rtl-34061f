// tb_addr_mask: self-checking test of address masking.
//
// Loads mask and PID through the register write ports, then checks the
// worked example (process address FFFD74D3, mask FFFC, PID 0ED8 gives
// 0ED974D3) and random addresses for every mask width 0..16 against a
// reference: the masked high bits come from the PID, the rest pass, and an
// address is legal only when its top n+1 bits agree.  With masking off the
// address passes unchanged and no error is raised.
module tb_addr_mask;
  import mips_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        mask_we, pid_we, map_en, map_err;
  logic [15:0] wdata, mask, pid;
  word_t       pa, va;

  addr_mask dut (.*);

  int checks = 0, failures = 0;
  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: pa=%h mask=%h pid=%h got %h expected %h", what, pa, mask, pid, got, exp);
    end
  endtask

  task automatic load(logic [15:0] m, logic [15:0] p);
    @(negedge clk);
    wdata = m; mask_we = 1;
    @(negedge clk);
    mask_we = 0; wdata = p; pid_we = 1;
    @(negedge clk);
    pid_we = 0;
  endtask

  function automatic logic ref_legal(word_t x, int n);
    logic [31:0] top;
    if (n == 0) return 1'b1;
    top = x >> (31 - n);                    // the top n+1 bits
    return top == 0 || top == ((32'd1 << (n + 1)) - 1);
  endfunction

  initial begin : watchdog
    #2_000_000;
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] m, p;
    mask_we = 0; pid_we = 0; wdata = 0; map_en = 0; pa = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check("reset mask", 32'(mask), 0);
    check("reset pid", 32'(pid), 0);

    load(16'hFFFC, 16'h0ED8);
    check("mask reg", 32'(mask), 32'hFFFC);
    check("pid reg", 32'(pid), 32'h0ED8);
    map_en = 1; pa = 32'hFFFD_74D3; #1;
    check("worked example", va, 32'h0ED9_74D3);

    for (int n = 0; n <= 16; n++) begin
      m = ~(16'hFFFF >> n);
      p = 16'($urandom);
      load(m, p);
      for (int i = 0; i < 400; i++) begin
        pa = $urandom;
        case (i % 4)
          0: pa = pa >> n;                  // low part of the space
          1: pa = ~(~pa >> n);              // high part of the space
          default: ;
        endcase
        map_en = 1; #1;
        check("masked va", va, {(pa[31:16] & ~m) | (p & m), pa[15:0]});
        check("map err", map_err, !ref_legal(pa, n));
        map_en = 0; #1;
        check("unmasked va", va, pa);
        check("unmasked err", map_err, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
