// tb_pp_reducer - self-checking testbench for pp_reducer (compression tree).
//
// The default 17-row, 32-bit reducer and a 4-row and a 3-row one are fed random rows (and
// rows of all ones); s + c must equal the sum of the rows modulo 2^WIDTH. Combinational:
// 1 ns settle time.
`timescale 1ns/1ps
module tb_pp_reducer;
  int checks = 0, failures = 0;

  logic [31:0] rows17 [17];
  logic [31:0] s17, c17;
  logic [15:0] rows4 [4];
  logic [15:0] s4, c4;
  logic [7:0]  rows3 [3];
  logic [7:0]  s3, c3;

  pp_reducer dut (.rows(rows17), .s(s17), .c(c17));
  pp_reducer #(.NROWS(4), .WIDTH(16)) dut4 (.rows(rows4), .s(s4), .c(c4));
  pp_reducer #(.NROWS(3), .WIDTH(8))  dut3 (.rows(rows3), .s(s3), .c(c3));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] t17;
      logic [15:0] t4;
      logic [7:0]  t3;
      t17 = '0; t4 = '0; t3 = '0;
      for (int r = 0; r < 17; r++) begin
        rows17[r] = (i == 0) ? '1 : $urandom;
        t17 += rows17[r];
      end
      for (int r = 0; r < 4; r++) begin
        rows4[r] = (i == 0) ? '1 : 16'($urandom);
        t4 += rows4[r];
      end
      for (int r = 0; r < 3; r++) begin
        rows3[r] = (i == 0) ? '1 : 8'($urandom);
        t3 += rows3[r];
      end
      #1;
      checks += 3;
      if (s17 + c17 !== t17) begin
        failures++;
        if (failures < 10) $display("FAIL 17 rows: %h + %h != %h", s17, c17, t17);
      end
      if (s4 + c4 !== t4) begin
        failures++;
        if (failures < 10) $display("FAIL 4 rows: %h + %h != %h", s4, c4, t4);
      end
      if (s3 + c3 !== t3) begin
        failures++;
        if (failures < 10) $display("FAIL 3 rows: %h + %h != %h", s3, c3, t3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
