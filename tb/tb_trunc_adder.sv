// tb_trunc_adder - self-checking testbench for trunc_adder (Trunc imprecise adder).
//
// Three instances are checked:
//   * the default 32-bit adder with Q = 14, against a reference model on random and corner
//     operands;
//   * an 8-bit adder with Q = 4 on the worked example A = 00110101, B = 10111010, whose
//     result must be 11100000;
//   * a 12-bit adder with Q = 6, exhaustively over every pair of 6-bit tails and both values
//     of the lowest precise bit, where the error e = imprecise - exact must reach exactly the
//     closed-form minimum and maximum, and its total must match the closed-form mean:
//     min 2-2^(q+1), max 0, mean 1-2^q
// The reference model computes each result bit from its definition, independently of the
// adder's structure. Combinational: each check samples after a 1 ns settle time.
`timescale 1ns/1ps
module tb_trunc_adder;
  int checks = 0, failures = 0;

  // default configuration
  logic [31:0] a, b, s;
  logic        co;
  trunc_adder dut (.a(a), .b(b), .sum(s), .cout(co));

  // worked example
  logic [7:0] fa, fb, fs;
  logic       fco;
  trunc_adder #(.WIDTH(8), .Q(4)) dut_fig (.a(fa), .b(fb), .sum(fs), .cout(fco));

  // exhaustive error statistics
  logic [11:0] ea, eb, es;
  logic        eco;
  trunc_adder #(.WIDTH(12), .Q(6)) dut_ex (.a(ea), .b(eb), .sum(es), .cout(eco));

  // reference: result of the scheme for a WIDTH-bit adder with q imprecise bits
  function automatic longint unsigned ref_sum(longint unsigned x, longint unsigned y,
                                              int width, int q);
    longint unsigned lo_mask, hi, tail, xl, yl;
    lo_mask = (64'd1 << q) - 1;
    xl = x & lo_mask;
    yl = y & lo_mask;
    hi = ((x >> q) + (y >> q)) << q;
    tail = 0;
    return (hi | tail) & ((64'd1 << width) - 1);
  endfunction

  task automatic check_default(logic [31:0] x, logic [31:0] y);
    longint unsigned r, full;
    a = x; b = y;
    #1;
    r = ref_sum(x, y, 32, 14);
    full = ((longint'(x) >> 14) + (longint'(y) >> 14));
    checks++;
    if (s !== r[31:0] || co !== full[32 - 14]) begin
      failures++;
      if (failures < 10) $display("FAIL default a=%h b=%h sum=%h exp=%h cout=%b", x, y, s, r[31:0], co);
    end
  endtask

  initial begin : watchdog
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint emin, emax, esum, e;
    // corners and random operands
    check_default(32'h0, 32'h0);
    check_default(32'hFFFF_FFFF, 32'h0000_0001);
    check_default(32'h0000_3FFF, 32'h0000_3FFF);
    check_default(32'h7FFF_FFFF, 32'h7FFF_FFFF);
    check_default(32'h0000_4000, 32'h0000_C000);
    for (int i = 0; i < 20000; i++) check_default($urandom, $urandom);

    // worked example
    fa = 8'b00110101; fb = 8'b10111010;
    #1;
    checks++;
    if (fs !== 8'b11100000) begin
      failures++;
      $display("FAIL example: %b + %b = %b, expected 11100000", fa, fb, fs);
    end

    // exhaustive statistics, q = 6
    emin = 0; emax = 0; esum = 0;
    for (int up = 0; up < 2; up++) begin
      for (int xl = 0; xl < 64; xl++) begin
        for (int yl = 0; yl < 64; yl++) begin
          ea = 12'(up * 64 + xl);
          eb = 12'(yl);
          #1;
          e = longint'(es) - longint'(ea) - longint'(eb);
          checks++;
          if (es !== 12'(ref_sum(64'(ea), 64'(eb), 12, 6))) begin
            failures++;
            if (failures < 10) $display("FAIL q=6 a=%h b=%h sum=%h", ea, eb, es);
          end
          if (up == 0 && xl == 0 && yl == 0) begin emin = e; emax = e; end
          if (e < emin) emin = e;
          if (e > emax) emax = e;
          esum += e;
        end
      end
    end
    checks++;
    if (emin != -126 || emax != 0 || esum != -516096) begin
      failures++;
      $display("FAIL statistics q=6: min %0d (exp -126) max %0d (exp 0) sum %0d (exp -516096)",
               emin, emax, esum);
    end
    $display("q=6 error: min %0d max %0d mean %f", emin, emax, real'(esum) / 8192.0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
