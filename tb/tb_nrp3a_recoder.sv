// tb_nrp3a_recoder - self-checking testbench for nrp3a_recoder.
//
// For every one of the 65536 values of the 16-bit multiplier it checks that each of the
// eight digits matches the NRP3a digit table for its bit group (group 111 gives +0, never
// -0), that one and two are never both set, that sign is set only for a non-zero digit, and
// that sum d_j * 4^j equals y as a two's complement number. Combinational: 1 ns settle time.
`timescale 1ns/1ps
module tb_nrp3a_recoder;
  import imprecise_pkg::*;
  import mul_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [15:0] y;
  r4_digit_t [7:0] digits;

  nrp3a_recoder dut (.y(y), .digits(digits));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      longint tot;
      logic [16:0] ye;
      y = 16'(v);
      ye = {y, 1'b0};
      #1;
      tot = 0;
      for (int j = 0; j < 8; j++) begin
        int d, g;
        g = int'(ye[2*j +: 3]);
        d = nrp3a_digit(g);
        checks++;
        if (digits[j].one !== (d == 1 || d == -1) || digits[j].two !== (d == 2 || d == -2) ||
            digits[j].sign !== (d < 0) || (digits[j].one && digits[j].two)) begin
          failures++;
          if (failures < 10) $display("FAIL y=%h digit %0d = %b, expected %0d", y, j, digits[j], d);
        end
        tot += longint'((digits[j].sign ? -1 : 1) * (digits[j].two ? 2 : (digits[j].one ? 1 : 0)))
               <<< (2 * j);
      end
      checks++;
      if (tot != longint'($signed(y))) begin
        failures++;
        if (failures < 10) $display("FAIL y=%h digits sum to %0d", y, tot);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
