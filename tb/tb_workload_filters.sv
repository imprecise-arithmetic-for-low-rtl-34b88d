// tb_workload_filters - the smoothing and edge-detection workloads on the two MACs of
// imprecise_arith_top (full size).
//
// A 14x14 test image (a diagonal ramp with a bright square, so that it has both smooth
// areas and edges) is filtered twice on each MAC:
//   * 5x5 Gaussian smoothing: the weights 2,4,5,4,2 / 4,9,12,9,4 / 5,12,15,12,5 ... divided
//     by 159 are held as fixed-point numbers scaled by 2^16 (round(w * 65536 / 159)); each
//     output pixel is a 25-term multiply-accumulate, shifted right by 16;
//   * Sobel edge enhancement: two 3x3 masks (weights -2..2), each a 9-term
//     multiply-accumulate, combined as |Gx| + |Gy|.
// The pixel (smoothing) or the mask weight (Sobel) is the recoded operand, the one with the
// smaller magnitude. Every raw accumulator value is compared with the exact integer sum: it
// must lie within the error bound of the MAC's schemes (per term at most the multiplier's
// maximum error plus one adder tail, 2^17 + 2^15 here), and the mean absolute pixel errors
// are reported.
`timescale 1ns/1ps
module tb_workload_filters;
  import imprecise_pkg::*;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [31:0] add_a = '0, add_b = '0;
  logic [4:0][31:0] add_sum;
  logic [4:0] add_cout;
  logic [15:0] mul_y = '0, mul_z = '0, mac_y = '0, mac_z = '0;
  logic [6:0][31:0] mul_p;
  logic mac_en = 0, mac_clear = 0;
  logic [31:0] mac_acc_a, mac_acc_b;

  imprecise_arith_top dut (.*);

  always #5 clk = ~clk;

  localparam int IMG = 14;
  localparam longint TERM_BOUND = (longint'(1) << 17) + (longint'(1) << 15);

  longint img [IMG][IMG];

  task automatic fail(string msg);
    failures++;
    if (failures < 10) $display("FAIL @%0t: %s", $time, msg);
  endtask

  // n-term dot product on both MACs, checked against the exact sum and the error bound
  task automatic mac_dot(input int n, input longint ys [25], input longint zs [25],
                         output longint ra, output longint rb, output longint ex);
    ex = 0;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      mac_en = 1; mac_clear = (k == 0);
      mac_y = 16'(ys[k]); mac_z = 16'(zs[k]);
      ex += ys[k] * zs[k];
    end
    @(negedge clk);
    mac_en = 0; mac_clear = 0;
    ra = longint'($signed(mac_acc_a));
    rb = longint'($signed(mac_acc_b));
    checks += 2;
    if (ra - ex > n * TERM_BOUND || ex - ra > n * TERM_BOUND)
      fail($sformatf("R4T15/OR-tail17 sum %0d too far from %0d", ra, ex));
    if (rb - ex > n * TERM_BOUND || ex - rb > n * TERM_BOUND)
      fail($sformatf("TNCB12/Freeze0.5_16 sum %0d too far from %0d", rb, ex));
  endtask

  function automatic longint absl(longint v);
    return v < 0 ? -v : v;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gauss [5][5] = '{'{2, 4, 5, 4, 2}, '{4, 9, 12, 9, 4}, '{5, 12, 15, 12, 5},
                         '{4, 9, 12, 9, 4}, '{2, 4, 5, 4, 2}};
    int sx [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
    int sy [3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};
    longint wfix [5][5];
    longint ys [25], zs [25];
    longint ra, rb, ex, gxa, gxb, gxe, gya, gyb, gye;
    real sa, sb, ea, eb;
    int npix;

    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++) wfix[i][j] = (longint'(gauss[i][j]) * 65536 + 79) / 159;
    for (int i = 0; i < IMG; i++)
      for (int j = 0; j < IMG; j++)
        img[i][j] = (i >= 4 && i < 9 && j >= 5 && j < 10) ? 230 : 10 + 9 * i + 6 * j;

    repeat (2) @(posedge clk);
    rst_n = 1;

    // smoothing
    sa = 0.0; sb = 0.0; npix = 0;
    for (int r = 2; r < IMG - 2; r++)
      for (int c = 2; c < IMG - 2; c++) begin
        for (int i = 0; i < 5; i++)
          for (int j = 0; j < 5; j++) begin
            ys[5*i+j] = img[r+i-2][c+j-2];
            zs[5*i+j] = wfix[i][j];
          end
        mac_dot(25, ys, zs, ra, rb, ex);
        sa += real'(absl((ra >>> 16) - (ex >>> 16)));
        sb += real'(absl((rb >>> 16) - (ex >>> 16)));
        npix++;
      end
    $display("smoothing: mean |pixel error| R4T15/OR-tail17 %f, TNCB12/Freeze0.5_16 %f", sa / npix, sb / npix);

    // Sobel
    ea = 0.0; eb = 0.0; npix = 0;
    for (int r = 1; r < IMG - 1; r++)
      for (int c = 1; c < IMG - 1; c++) begin
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++) begin
            ys[3*i+j] = sx[i][j];
            zs[3*i+j] = img[r+i-1][c+j-1];
          end
        mac_dot(9, ys, zs, gxa, gxb, gxe);
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++) ys[3*i+j] = sy[i][j];
        mac_dot(9, ys, zs, gya, gyb, gye);
        ea += real'(absl(absl(gxa) + absl(gya) - absl(gxe) - absl(gye)));
        eb += real'(absl(absl(gxb) + absl(gyb) - absl(gxe) - absl(gye)));
        npix++;
      end
    $display("edge detection: mean |pixel error| R4T15/OR-tail17 %f, TNCB12/Freeze0.5_16 %f", ea / npix, eb / npix);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
