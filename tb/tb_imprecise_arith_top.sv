// tb_imprecise_arith_top - end-to-end testbench for imprecise_arith_top, at its full size.
//
// 1. Adder bank: random and structured operands; every one of the five outputs and carry
//    outs is compared with the reference model of its scheme.
// 2. Multiplier bank: random operands; every one of the seven products is compared with the
//    reference model of its scheme.
// 3. Both MACs run an 8x8 two-dimensional inverse DCT (P = ((A^T F) >> 16) A >> 16 with the
//    DCT matrix A scaled by 2^16) on two test blocks, eight multiply-accumulates per
//    output with clear on the first term and idle (en = 0) cycles between outputs. The
//    accumulators must hold during idle cycles, and each result is compared with an exact
//    integer model of the same computation: the mean absolute pixel error of the preferred
//    MAC (R4T q=15 / OR-tail q=17) must stay at or below 2, the error budget the sizes were
//    chosen for.
// Each mechanism is counted and must occur at least once: an error from each adder and
// multiplier scheme, a Carry-one pseudo carry into the precise part, negative radix-4
// digits, MAC clears, accumulations and holds, and an imprecise IDCT pixel.
`timescale 1ns/1ps
module tb_imprecise_arith_top;
  import imprecise_pkg::*;
  import mul_ref_pkg::*;
  import add_ref_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [31:0] add_a, add_b;
  logic [4:0][31:0] add_sum;
  logic [4:0] add_cout;
  logic [15:0] mul_y, mul_z, mac_y, mac_z;
  logic [6:0][31:0] mul_p;
  logic mac_en = 0, mac_clear = 0;
  logic [31:0] mac_acc_a, mac_acc_b;

  imprecise_arith_top dut (.*);

  always #5 clk = ~clk;

  localparam add_scheme_e ASCH [5] = '{ADD_TRUNC, ADD_FREEZE05, ADD_OR_TAIL, ADD_XOR_TAIL, ADD_CARRY_ONE};
  localparam int          AQ   [5] = '{14, 14, 14, 14, 15};
  localparam mul_scheme_e MSCH [7] = '{MUL_TEPPE, MUL_H2, MUL_LLL, MUL_R4T, MUL_H1, MUL_TNCB, MUL_TMCB};
  localparam int          MQ   [7] = '{2, 2, 8, 15, 15, 12, 11};

  // mechanism counters
  int add_err [5], mul_err [7];
  int pseudo_carry = 0, neg_digits = 0, mac_clears = 0, mac_accs = 0, mac_holds = 0;
  int idct_err_a = 0, idct_err_b = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL @%0t: %s", $time, msg);
  endtask

  task automatic check_adders(logic [31:0] x, logic [31:0] y);
    add_a = x; add_b = y;
    #1;
    for (int k = 0; k < 5; k++) begin
      longint unsigned r, up;
      r  = add_ref(ASCH[k], AQ[k], 32, 64'(x), 64'(y));
      up = (64'(x) >> AQ[k]) + (64'(y) >> AQ[k]);
      checks++;
      if (add_sum[k] !== 32'(r) || add_cout[k] !== up[32 - AQ[k]])
        fail($sformatf("adder %s: %h + %h = %h", ASCH[k].name(), x, y, add_sum[k]));
      if (add_sum[k] != x + y) add_err[k]++;
    end
    if (x[14] && y[14] && !(((x >> 15) + (y >> 15)) & 1)) pseudo_carry++;
  endtask

  task automatic check_multipliers(logic [15:0] a, logic [15:0] b);
    logic [16:0] ye;
    mul_y = a; mul_z = b;
    #1;
    for (int k = 0; k < 7; k++) begin
      checks++;
      if (mul_p[k] !== 32'(mul_ref(MSCH[k], MQ[k], 16, 64'(a), 64'(b))))
        fail($sformatf("multiplier %s: %h * %h = %h", MSCH[k].name(), a, b, mul_p[k]));
      if (mul_p[k] != 32'(sext(64'(a), 16) * sext(64'(b), 16))) mul_err[k]++;
    end
    ye = {a, 1'b0};
    for (int j = 0; j < 8; j++) if (nrp3a_digit(int'(ye[2*j +: 3])) < 0) neg_digits++;
  endtask

  // ---- inverse DCT on the MACs ----
  longint amat [8][8];     // DCT matrix scaled by 2^16

  // one dot product of eight terms on both MACs; returns both accumulators
  task automatic mac_dot(input longint ys [8], input longint zs [8],
                         output logic [31:0] ra, output logic [31:0] rb);
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      mac_en = 1; mac_clear = (k == 0);
      mac_y = 16'(ys[k]); mac_z = 16'(zs[k]);
      if (k == 0) mac_clears++;
      mac_accs++;
    end
    @(negedge clk);
    mac_en = 0; mac_clear = 0;
    ra = mac_acc_a; rb = mac_acc_b;
    // idle cycles: the accumulators must hold
    repeat (2) @(negedge clk);
    mac_holds++;
    checks++;
    if (mac_acc_a !== ra || mac_acc_b !== rb) fail("MAC accumulator changed while idle");
  endtask

  task automatic run_idct(input int blk, output real mean_a, output real mean_b);
    longint pix [8][8], f [8][8], tx [8][8], ta [8][8], tb [8][8];
    longint ys [8], zs [8];
    longint pe, pa, pb;
    logic [31:0] ra, rb;
    real acc, sa, sb;
    // test block: a smooth ramp (block 0) or a noisy texture (block 1)
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        pix[i][j] = (blk == 0) ? 40 + 20 * i + 8 * j : longint'($urandom % 256);
    // forward DCT in floating point, stored as integers: F = A P A^T
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        acc = 0.0;
        for (int i = 0; i < 8; i++)
          for (int j = 0; j < 8; j++)
            acc += (real'(amat[u][i]) / 65536.0) * real'(pix[i][j]) * (real'(amat[v][j]) / 65536.0);
        f[u][v] = longint'($rtoi(acc < 0.0 ? acc - 0.5 : acc + 0.5));
      end
    // first pass: T = (A^T F) >> 16; the smaller operand (F) is the recoded multiplier
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        longint e;
        e = 0;
        for (int k = 0; k < 8; k++) begin
          ys[k] = f[k][j];
          zs[k] = amat[k][i];
          e += f[k][j] * amat[k][i];
        end
        mac_dot(ys, zs, ra, rb);
        tx[i][j] = e >>> 16;
        ta[i][j] = sext(64'(ra), 32) >>> 16;
        tb[i][j] = sext(64'(rb), 32) >>> 16;
      end
    // second pass: P = (T A) >> 16, each MAC on its own first-pass result
    sa = 0.0; sb = 0.0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        longint e;
        logic [31:0] ra2, rb2, dummy;
        e = 0;
        for (int k = 0; k < 8; k++) begin
          e += tx[i][k] * amat[k][j];
          ys[k] = ta[i][k];
          zs[k] = amat[k][j];
        end
        pe = e >>> 16;
        mac_dot(ys, zs, ra2, dummy);
        for (int k = 0; k < 8; k++) ys[k] = tb[i][k];
        mac_dot(ys, zs, dummy, rb2);
        pa = sext(64'(ra2), 32) >>> 16;
        pb = sext(64'(rb2), 32) >>> 16;
        if (pa != pe) idct_err_a++;
        if (pb != pe) idct_err_b++;
        sa += real'(pa > pe ? pa - pe : pe - pa);
        sb += real'(pb > pe ? pb - pe : pe - pb);
      end
    mean_a = sa / 64.0;
    mean_b = sb / 64.0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ma, mb;
    foreach (add_err[k]) add_err[k] = 0;
    foreach (mul_err[k]) mul_err[k] = 0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        real c;
        c = (i == 0) ? $sqrt(1.0 / 8.0) : $sqrt(2.0 / 8.0);
        c = c * $cos(real'((2 * j + 1) * i) * 3.14159265358979 / 16.0) * 65536.0;
        amat[i][j] = longint'($rtoi(c < 0.0 ? c - 0.5 : c + 0.5));
      end
    mac_y = '0; mac_z = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (mac_acc_a !== '0 || mac_acc_b !== '0) fail("MAC accumulators not 0 in reset");
    rst_n = 1;

    // 1. adders
    check_adders(32'h0000_4000, 32'h0000_4000);
    check_adders(32'h0000_7FFF, 32'h0000_0001);
    for (int i = 0; i < 5000; i++) check_adders($urandom, $urandom);
    // 2. multipliers
    check_multipliers(16'h8000, 16'h8000);
    for (int i = 0; i < 5000; i++) check_multipliers(16'($urandom), 16'($urandom));
    // 3. inverse DCT on the MACs
    for (int blk = 0; blk < 2; blk++) begin
      run_idct(blk, ma, mb);
      $display("IDCT block %0d: mean |pixel error| R4T15/OR-tail17 %f, TNCB12/Freeze0.5_16 %f", blk, ma, mb);
      checks++;
      if (ma > 2.0) fail($sformatf("R4T15/OR-tail17 IDCT mean pixel error %f above 2", ma));
    end

    for (int k = 0; k < 5; k++) begin
      checks++;
      if (add_err[k] == 0) fail($sformatf("adder %s never erred", ASCH[k].name()));
    end
    for (int k = 0; k < 7; k++) begin
      checks++;
      if (mul_err[k] == 0) fail($sformatf("multiplier %s never erred", MSCH[k].name()));
    end
    checks++;
    if (pseudo_carry == 0 || neg_digits == 0 || mac_clears == 0 || mac_accs == 0 || mac_holds == 0 ||
        idct_err_a == 0 || idct_err_b == 0)
      fail("a mechanism never occurred");
    $display("mechanisms: adder errors %0d %0d %0d %0d %0d, multiplier errors %0d %0d %0d %0d %0d %0d %0d",
             add_err[0], add_err[1], add_err[2], add_err[3], add_err[4], mul_err[0], mul_err[1],
             mul_err[2], mul_err[3], mul_err[4], mul_err[5], mul_err[6]);
    $display("mechanisms: pseudo carries %0d, negative digits %0d, MAC clears %0d accumulates %0d holds %0d, imprecise IDCT pixels %0d / %0d",
             pseudo_carry, neg_digits, mac_clears, mac_accs, mac_holds, idct_err_a, idct_err_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
