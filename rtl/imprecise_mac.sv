// imprecise_mac - multiply-accumulate unit built from an imprecise multiplier and an
// imprecise adder.
//
// Every cycle with en = 1 the unit adds y * z to its 2N-bit accumulator. The multiplier's
// reducer leaves the product as two vectors; a CSA32 row of (3,2] counters merges them with
// the accumulator (or with 0 when clear = 1), and the final carry-propagate adder, one of
// the imprecise adders, forms the new accumulator value, which is registered. The adder is
// therefore in the loop, and both its error and the multiplier's error accumulate.
//   en=1 clear=1 : acc <= y*z           (start a new sum)
//   en=1 clear=0 : acc <= acc + y*z
//   en=0         : acc holds
// One multiply-accumulate per cycle; acc shows the result one cycle after the inputs.
// rst_n is an asynchronous active-low reset to 0. The default configuration, an R4T
// multiplier with q = 15 and an OR-tail adder with q = 17, is the best imprecise MAC of the
// published study; TNCB (q = 12) with Freeze0.5 (q = 16) is its other configuration. The
// enable/clear interface and the reset are choices of this design.
module imprecise_mac
  import imprecise_pkg::*;
#(
  parameter int unsigned N          = 16,
  parameter mul_scheme_e MUL_SCHEME = MUL_R4T,
  parameter int unsigned MUL_Q      = 15,
  parameter add_scheme_e ADD_SCHEME = ADD_OR_TAIL,
  parameter int unsigned ADD_Q      = 17
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           clear,
  input  logic [N-1:0]   y,
  input  logic [N-1:0]   z,
  output logic [2*N-1:0] acc
);
  logic [2*N-1:0] ps, pc;        // product as sum/carry vectors
  logic [2*N-1:0] fb;            // accumulator fed back (0 on clear)
  logic [2*N-1:0] cs, cc;        // after the CSA32
  logic [2*N-1:0] acc_next;

  r4_mult_core #(.N(N), .SCHEME(MUL_SCHEME), .Q(MUL_Q)) u_core (.y, .z, .s(ps), .c(pc));

  assign fb = clear ? '0 : acc;

  csa_3to2 #(.WIDTH(2 * N)) u_csa32 (.x(ps), .y(pc), .z(fb), .s(cs), .c(cc));

  imprecise_adder #(.WIDTH(2 * N), .SCHEME(ADD_SCHEME), .Q(ADD_Q)) u_cpa (
    .a(cs), .b(cc), .sum(acc_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= acc_next;
  end
endmodule
