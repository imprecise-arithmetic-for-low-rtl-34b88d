// tb_csa_3to2 - self-checking testbench for csa_3to2 (row of full adders).
//
// Random and corner vectors: s must be the bitwise XOR of the three inputs, c[0] must be 0
// and s + c must equal x + y + z modulo 2^32. Combinational: 1 ns settle time.
`timescale 1ns/1ps
module tb_csa_3to2;
  int checks = 0, failures = 0;
  logic [31:0] x, y, z, s, c;

  csa_3to2 dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  task automatic check(logic [31:0] a, logic [31:0] b, logic [31:0] d);
    logic [31:0] ref_sum;
    x = a; y = b; z = d;
    #1;
    ref_sum = a + b + d;
    checks++;
    if (s !== (a ^ b ^ d) || c[0] !== 1'b0 || s + c !== ref_sum) begin
      failures++;
      if (failures < 10) $display("FAIL %h %h %h -> s %h c %h", a, b, d, s, c);
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
    check('1, '1, '1);
    check('0, '0, '0);
    check(32'h8000_0000, 32'h8000_0000, 32'h8000_0000);
    for (int i = 0; i < 20000; i++) check($urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
