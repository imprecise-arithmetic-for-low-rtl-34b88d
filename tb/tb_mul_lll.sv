// tb_mul_lll - self-checking testbench for the LLL multiplier (r4_multiplier with
// SCHEME = MUL_LLL).
//
// * 16 x 16, q = 8 (the published size): corner and random operands, each product
//   compared with the reference model of mul_ref_pkg. The error must lie within +-(2^q-1)^2/3.
// * 8 x 8, q = 2, 4 and 6: every one of the 65536 operand pairs, each product compared with
//   the reference model, and the error e = imprecise - exact (y*z) summarised and compared
//   with the closed-form statistics of the scheme:
//   mean 2^(q-3) - 1/4, |e| max (2^q-1)^2/3, symmetric.
// Combinational: each check samples after a 1 ns settle time.
`timescale 1ns/1ps
module tb_mul_lll;
  import imprecise_pkg::*;
  import mul_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [15:0] y, z;
  logic [31:0] p;
  r4_multiplier #(.SCHEME(MUL_LLL), .Q(8)) dut (.y(y), .z(z), .p(p));

  logic [7:0]  sy, sz;
  logic [15:0] sp [3];
  r4_multiplier #(.N(8), .SCHEME(MUL_LLL), .Q(2)) dut_q2 (.y(sy), .z(sz), .p(sp[0]));
  r4_multiplier #(.N(8), .SCHEME(MUL_LLL), .Q(4)) dut_q4 (.y(sy), .z(sz), .p(sp[1]));
  r4_multiplier #(.N(8), .SCHEME(MUL_LLL), .Q(6)) dut_q6 (.y(sy), .z(sz), .p(sp[2]));

  // sum_{a=1}^{q} ceil(a/2) * 2^(a-1)
  function automatic longint ceil_sum(int q);
    longint t = 0;
    for (int a = 1; a <= q; a++) t += longint'((a + 1) / 2) << (a - 1);
    return t;
  endfunction

  // (4^(n/2) - 1) / 3
  function automatic longint c_n(int n);
    return ((longint'(1) << n) - 1) / 3;
  endfunction

  task automatic check16(logic [15:0] a, logic [15:0] b);
    longint r, e;
    y = a; z = b;
    #1;
    r = mul_ref(MUL_LLL, 8, 16, 64'(a), 64'(b));
    checks++;
    if (p !== 32'(r)) begin
      failures++;
      if (failures < 10) $display("FAIL 16x16 y=%h z=%h p=%h exp=%h", a, b, p, 32'(r));
    end
    e = sext(64'(p), 32) - sext(64'(a), 16) * sext(64'(b), 16);
    checks++;
    if (e < -(((longint'(1) << 8) - 1) ** 2 / 3) || e > (((longint'(1) << 8) - 1) ** 2 / 3)) begin
      failures++;
      if (failures < 10) $display("FAIL 16x16 error %0d outside the bound", e);
    end
  endtask

  initial begin : watchdog
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint emin [3], emax [3], esum [3], e;
    int qs [3] = '{2, 4, 6};
    check16(16'h0000, 16'h0000);
    check16(16'h8000, 16'h8000);
    check16(16'h7FFF, 16'h8000);
    check16(16'hFFFF, 16'h7FFF);
    check16(16'h5555, 16'hAAAA);
    for (int i = 0; i < 20000; i++) check16(16'($urandom), 16'($urandom));

    for (int k = 0; k < 3; k++) begin emin[k] = 0; emax[k] = 0; esum[k] = 0; end
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        sy = 8'(a); sz = 8'(b);
        #1;
        for (int k = 0; k < 3; k++) begin
          checks++;
          if (sp[k] !== 16'(mul_ref(MUL_LLL, qs[k], 8, 64'(a), 64'(b)))) begin
            failures++;
            if (failures < 10) $display("FAIL 8x8 q=%0d y=%h z=%h p=%h", qs[k], sy, sz, sp[k]);
          end
          e = sext(64'(sp[k]), 16) - sext(64'(a), 8) * sext(64'(b), 8);
          if (e < emin[k]) emin[k] = e;
          if (e > emax[k]) emax[k] = e;
          esum[k] += e;
        end
      end
    end
    for (int k = 0; k < 3; k++) begin
      longint xmin, xmax, xsum;
      int q;
      q = qs[k];
      xmin = -(((longint'(1) << q) - 1) ** 2) / 3; xmax = (((longint'(1) << q) - 1) ** 2) / 3; xsum = (longint'(1) << q) * 8192 - 16384;
      checks++;
      if (emin[k] != xmin || emax[k] != xmax || esum[k] != xsum) begin
        failures++;
        $display("FAIL 8x8 q=%0d statistics: min %0d/%0d max %0d/%0d sum %0d/%0d", q,
                 emin[k], xmin, emax[k], xmax, esum[k], xsum);
      end
      $display("8x8 q=%0d: e min %0d max %0d mean %f", q, emin[k], emax[k], real'(esum[k]) / 65536.0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
