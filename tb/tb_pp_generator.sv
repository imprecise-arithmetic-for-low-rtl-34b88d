// tb_pp_generator - self-checking testbench for pp_generator.
//
// One generator per scheme at its published size (exact, TEPPE q=2, H2 q=2, LLL q=8,
// R4T q=15, H1 q=15, TNCB q=12, TMCB q=11) is fed the same digits, taken by the testbench
// from the NRP3a digit table, and the same multiplicand. For each one:
//   * the sum of all rows (mod 2^32) must equal the reference model of the scheme;
//   * every carry-bit row holds at most one bit, and it is set only for a negative digit;
//   * the truncating schemes (R4T, TNCB, TMCB) generate no bit below column q, and TMCB
//     generates no carry bit at all.
// Combinational: 1 ns settle time.
`timescale 1ns/1ps
module tb_pp_generator;
  import imprecise_pkg::*;
  import mul_ref_pkg::*;

  localparam int NS = 8;
  localparam mul_scheme_e SCH [NS] = '{MUL_EXACT, MUL_TEPPE, MUL_H2, MUL_LLL, MUL_R4T, MUL_H1,
                                       MUL_TNCB, MUL_TMCB};
  localparam int QS [NS] = '{0, 2, 2, 8, 15, 15, 12, 11};

  int checks = 0, failures = 0;
  r4_digit_t [7:0] digits;
  logic [15:0]     z;
  logic [31:0]     rows [NS][17];

  for (genvar i = 0; i < NS; i++) begin : g_dut
    if (i == 4) begin : g_default
      pp_generator dut (.digits(digits), .z(z), .rows(rows[i]));
    end else begin : g_param
      pp_generator #(.SCHEME(SCH[i]), .Q(QS[i])) dut (.digits(digits), .z(z), .rows(rows[i]));
    end
  end

  task automatic check(logic [15:0] yv, logic [15:0] zv);
    logic [16:0] ye;
    ye = {yv, 1'b0};
    for (int j = 0; j < 8; j++) begin
      int d;
      d = nrp3a_digit(int'(ye[2*j +: 3]));
      digits[j].one  = (d == 1 || d == -1);
      digits[j].two  = (d == 2 || d == -2);
      digits[j].sign = (d < 0);
    end
    z = zv;
    #1;
    for (int i = 0; i < NS; i++) begin
      logic [31:0] tot, lowmask;
      tot = '0;
      for (int r = 0; r < 17; r++) tot += rows[i][r];
      checks++;
      if (tot !== 32'(mul_ref(SCH[i], QS[i], 16, 64'(yv), 64'(zv)))) begin
        failures++;
        if (failures < 10) $display("FAIL scheme %s y=%h z=%h rows sum %h", SCH[i].name(), yv, zv, tot);
      end
      for (int j = 0; j < 8; j++) begin
        checks++;
        if ($countones(rows[i][8+j]) > 1 || (rows[i][8+j] != 0 && !digits[j].sign) ||
            (SCH[i] == MUL_TMCB && rows[i][8+j] != 0)) begin
          failures++;
          if (failures < 10) $display("FAIL scheme %s carry row %0d = %h", SCH[i].name(), j, rows[i][8+j]);
        end
      end
      if (SCH[i] == MUL_R4T || SCH[i] == MUL_TNCB || SCH[i] == MUL_TMCB) begin
        lowmask = (32'd1 << QS[i]) - 1;
        for (int r = 0; r < 17; r++) begin
          checks++;
          if ((rows[i][r] & lowmask) != 0) begin
            failures++;
            if (failures < 10) $display("FAIL scheme %s row %0d has bits below column q", SCH[i].name(), r);
          end
        end
      end
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
    check(16'h8000, 16'h8000);
    check(16'hFFFF, 16'h7FFF);
    check(16'h5555, 16'hAAAA);
    for (int i = 0; i < 5000; i++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
