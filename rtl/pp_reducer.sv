// pp_reducer - partial-product reducer (compression tree) built from (3,2] counters.
//
// NROWS vectors of WIDTH bits are reduced to two, s and c, with the same sum modulo
// 2^WIDTH. Each level takes the rows three at a time through a row of (3,2] counters
// (csa_3to2) and passes the one or two left-over rows on unchanged, so a level turns n rows
// into 2*floor(n/3) + n mod 3. For the 17 rows of a 16x16 radix-4 multiplier that is
// 17 -> 12 -> 8 -> 6 -> 4 -> 3 -> 2, six full-adder delays. Constant-zero positions (bits
// a scheme does not generate) are left to synthesis to remove, which turns the affected
// counters into half adders or wires.
// Purely combinational. Reducing with (3,2] counters follows the published design; the
// row-wise (Wallace) arrangement is a choice of this design where the original assigns
// counters column by column.
module pp_reducer #(
  parameter int unsigned NROWS = 17,
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] rows [NROWS],
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] c
);
  function automatic int unsigned rows_at(int unsigned level);
    int unsigned n;
    n = NROWS;
    for (int unsigned l = 0; l < level; l++) n = 2 * (n / 3) + n % 3;
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned n, l;
    n = NROWS;
    l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + n % 3;
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  if (LEVELS == 0) begin : g_none
    assign s = rows[0];
    assign c = (NROWS > 1) ? rows[NROWS-1] : '0;
  end else begin : g_tree
    for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
      localparam int unsigned NIN  = rows_at(l);
      localparam int unsigned NGRP = NIN / 3;
      logic [WIDTH-1:0] din  [NIN];
      logic [WIDTH-1:0] dout [2*NGRP + NIN%3];
      if (l == 0) begin : g_first
        for (genvar r = 0; r < NIN; r++) begin : g_r
          assign din[r] = rows[r];
        end
      end else begin : g_next
        for (genvar r = 0; r < NIN; r++) begin : g_r
          assign din[r] = g_lvl[l-1].dout[r];
        end
      end
      for (genvar g = 0; g < NGRP; g++) begin : g_csa
        csa_3to2 #(.WIDTH(WIDTH)) u_csa (
          .x(din[3*g]),
          .y(din[3*g+1]),
          .z(din[3*g+2]),
          .s(dout[2*g]),
          .c(dout[2*g+1])
        );
      end
      for (genvar r = 3 * NGRP; r < NIN; r++) begin : g_pass
        assign dout[2*NGRP + r - 3*NGRP] = din[r];
      end
    end
    assign s = g_lvl[LEVELS-1].dout[0];
    assign c = g_lvl[LEVELS-1].dout[1];
  end
endmodule
