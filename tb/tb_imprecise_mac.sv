// tb_imprecise_mac - self-checking testbench for imprecise_mac.
//
// Three MACs take the same random stream of en/clear/y/z:
//   dut    default configuration, R4T q=15 multiplier with OR-tail q=17 adder
//   dut_b  TNCB q=12 multiplier with Freeze0.5 q=16 adder
//   dut_x  exact multiplier with exact adder
// Checks, every cycle:
//   * dut_x: acc equals the integer model acc' = clear ? y*z : acc + y*z when en, holds when
//     en = 0, and the new value is visible exactly one clock after the inputs;
//   * dut and dut_b: the two vectors entering the final adder sum (mod 2^32) to the
//     scheme's reference product plus the fed-back accumulator (0 on clear), and the
//     accumulator loads exactly the reference imprecise adder's result of those two vectors
//     one clock later (or holds when en = 0);
//   * after reset all accumulators are 0.
// It also reports the drift of the imprecise accumulators from the exact one.
`timescale 1ns/1ps
module tb_imprecise_mac;
  import imprecise_pkg::*;
  import mul_ref_pkg::*;
  import add_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, clear = 0;
  logic [15:0] y = '0, z = '0;
  logic [31:0] acc, acc_b, acc_x;

  imprecise_mac dut (.clk, .rst_n, .en, .clear, .y, .z, .acc(acc));
  imprecise_mac #(.MUL_SCHEME(MUL_TNCB), .MUL_Q(12), .ADD_SCHEME(ADD_FREEZE05), .ADD_Q(16)) dut_b (
    .clk, .rst_n, .en, .clear, .y, .z, .acc(acc_b));
  imprecise_mac #(.MUL_SCHEME(MUL_EXACT), .MUL_Q(0), .ADD_SCHEME(ADD_EXACT), .ADD_Q(0)) dut_x (
    .clk, .rst_n, .en, .clear, .y, .z, .acc(acc_x));

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL @%0t: %s", $time, msg);
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] mx, exp_a, exp_b, fb_a, fb_b, fb_x;
    int clears = 0, holds = 0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (acc !== '0 || acc_b !== '0 || acc_x !== '0) fail("accumulators not 0 after reset");
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      // drive at the falling edge
      @(negedge clk);
      en    = ($urandom % 10) != 0;
      clear = (i == 0) || (($urandom % 12) == 0);
      y     = (i % 3 == 0) ? 16'($urandom % 512) : 16'($urandom);
      z     = 16'($urandom);
      if (en && clear) clears++;
      if (!en) holds++;
      #1;
      fb_a = clear ? '0 : acc;
      fb_b = clear ? '0 : acc_b;
      fb_x = clear ? '0 : acc_x;
      mx   = 32'(sext(64'(y), 16) * sext(64'(z), 16));
      checks += 2;
      if (dut.cs + dut.cc !== 32'(mul_ref(MUL_R4T, 15, 16, 64'(y), 64'(z))) + fb_a)
        fail("R4T15 vectors do not sum to product + accumulator");
      if (dut_b.cs + dut_b.cc !== 32'(mul_ref(MUL_TNCB, 12, 16, 64'(y), 64'(z))) + fb_b)
        fail("TNCB12 vectors do not sum to product + accumulator");
      exp_a = en ? 32'(add_ref(ADD_OR_TAIL, 17, 32, 64'(dut.cs), 64'(dut.cc))) : acc;
      exp_b = en ? 32'(add_ref(ADD_FREEZE05, 16, 32, 64'(dut_b.cs), 64'(dut_b.cc))) : acc_b;
      mx    = en ? fb_x + mx : acc_x;
      // before the edge nothing has changed yet
      @(posedge clk);
      #1;
      checks += 3;
      if (acc   !== exp_a) fail($sformatf("R4T15/OR17 acc %h expected %h", acc, exp_a));
      if (acc_b !== exp_b) fail($sformatf("TNCB12/Freeze16 acc %h expected %h", acc_b, exp_b));
      if (acc_x !== mx)    fail($sformatf("exact acc %h expected %h", acc_x, mx));
    end
    checks++;
    if (clears == 0 || holds == 0) fail("clear or hold never exercised");
    $display("clears %0d holds %0d; final drift R4T15/OR17 %0d, TNCB12/Freeze16 %0d", clears, holds,
             sext(64'(acc), 32) - sext(64'(acc_x), 32), sext(64'(acc_b), 32) - sext(64'(acc_x), 32));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
