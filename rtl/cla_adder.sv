// cla_adder - exact two-level carry-lookahead adder.
//
// The operands are split into groups of GROUP bits. Level one forms the bit generate and
// propagate signals and, per group, a group generate G and propagate P. Level two is a
// lookahead unit that forms every group carry-in directly from the G/P of all groups below
// and from cin (a sum of products, no ripple between groups). Inside a group the bit carries
// are again formed by lookahead from the group carry-in. Purely combinational.
//
// This adder is the carry-propagate adder (CPA) of every multiplier and the precise upper
// part of every imprecise adder. The 32-bit width is the one used throughout; the group size
// of 4 is a choice of this design.
module cla_adder #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned GROUP = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NG = (WIDTH + GROUP - 1) / GROUP;

  logic [WIDTH-1:0] g, p;
  logic [NG-1:0]    gg, gp;   // group generate / propagate
  logic [NG:0]      gc;       // group carry-in
  logic [WIDTH:0]   c;        // bit carries

  assign g = a & b;
  assign p = a ^ b;

  // Level 1: group generate and propagate.
  always_comb begin
    for (int gi = 0; gi < NG; gi++) begin
      logic gacc, pacc;
      gacc = 1'b0;
      pacc = 1'b1;
      for (int k = 0; k < GROUP; k++) begin
        if (gi * GROUP + k < WIDTH) begin
          gacc = g[gi*GROUP+k] | (p[gi*GROUP+k] & gacc);
          pacc = pacc & p[gi*GROUP+k];
        end
      end
      gg[gi] = gacc;
      gp[gi] = pacc;
    end
  end

  // Level 2: every group carry as a sum of products of the group signals below it.
  always_comb begin
    for (int gi = 0; gi <= NG; gi++) begin
      logic term, acc;
      acc = 1'b0;
      for (int k = -1; k < gi; k++) begin
        term = (k < 0) ? cin : gg[k];
        for (int m = k + 1; m < gi; m++) term = term & gp[m];
        acc = acc | term;
      end
      gc[gi] = acc;
    end
  end

  // Bit carries inside each group, by lookahead from the group carry-in.
  always_comb begin
    c = '0;
    for (int i = 0; i < WIDTH; i++) begin
      logic term, acc;
      int unsigned base;
      base = (i / GROUP) * GROUP;
      acc  = gc[i/GROUP];
      for (int m = base; m < i; m++) acc = acc & p[m];
      for (int k = base; k < i; k++) begin
        term = g[k];
        for (int m = k + 1; m < i; m++) term = term & p[m];
        acc = acc | term;
      end
      c[i] = acc;
    end
    c[WIDTH] = gc[NG];
  end

  assign sum  = p ^ c[WIDTH-1:0];
  assign cout = c[WIDTH];
endmodule
