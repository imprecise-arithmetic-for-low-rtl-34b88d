// tb_cla_adder - self-checking testbench for cla_adder (two-level carry-lookahead adder).
//
// Three instances: the default 32-bit adder with 4-bit groups, a 13-bit adder whose top group
// is only partly filled, and a 32-bit adder with 8-bit groups. Each is driven with corner
// cases (long propagate chains, all ones, carry-in) and random operands, and its sum and
// carry out are compared with the integer sum a + b + cin. Combinational: 1 ns settle time.
`timescale 1ns/1ps
module tb_cla_adder;
  int checks = 0, failures = 0;

  logic [31:0] a, b, s, a8, b8, s8;
  logic        ci, co, ci8, co8;
  logic [12:0] a13, b13, s13;
  logic        ci13, co13;

  cla_adder dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));
  cla_adder #(.WIDTH(13)) dut13 (.a(a13), .b(b13), .cin(ci13), .sum(s13), .cout(co13));
  cla_adder #(.WIDTH(32), .GROUP(8)) dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));

  task automatic check(logic [31:0] x, logic [31:0] y, logic c);
    longint unsigned r, r13;
    a = x; b = y; ci = c;
    a8 = x; b8 = y; ci8 = c;
    a13 = x[12:0]; b13 = y[12:0]; ci13 = c;
    #1;
    r   = longint'(x) + longint'(y) + longint'(c);
    r13 = longint'(x[12:0]) + longint'(y[12:0]) + longint'(c);
    checks += 3;
    if ({co, s} !== r[32:0]) begin
      failures++;
      if (failures < 10) $display("FAIL 32: %h + %h + %b = %b %h", x, y, c, co, s);
    end
    if ({co8, s8} !== r[32:0]) begin
      failures++;
      if (failures < 10) $display("FAIL 32/8: %h + %h + %b = %b %h", x, y, c, co8, s8);
    end
    if ({co13, s13} !== r13[13:0]) begin
      failures++;
      if (failures < 10) $display("FAIL 13: %h + %h + %b = %b %h", x[12:0], y[12:0], c, co13, s13);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h0, 32'h0, 1'b0);
    check(32'hFFFF_FFFF, 32'h0, 1'b1);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);
    check(32'h0FFF_FFFF, 32'h0000_0001, 1'b0);
    for (int i = 0; i < 32; i++) check(32'hFFFF_FFFF >> i, 32'h1, 1'b0);
    for (int i = 0; i < 32; i++) check(~(32'h1 << i), 32'h0, 1'b1);
    for (int i = 0; i < 30000; i++) check($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
