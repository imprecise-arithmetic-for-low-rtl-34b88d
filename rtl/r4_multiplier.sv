// r4_multiplier - N x N two's complement radix-4 multiplier, exact or imprecise.
//
// Recoder (NRP3a) -> partial-product generator -> reducer ((3,2] counters) -> exact
// two-level carry-lookahead adder. SCHEME and Q select the imprecise partial-product scheme
// (TEPPE, H2, LLL, R4T, H1, TNCB, TMCB) and its width; MUL_EXACT gives the error-free
// multiplier. The output p is the 2N-bit product y * z (or its approximation); y is the
// operand that is recoded, so the operand with the smaller magnitude should go there.
// Purely combinational. The structure and the default (R4T with q = 15, the multiplier the
// published study found best for the IDCT) follow the published design.
module r4_multiplier
  import imprecise_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter mul_scheme_e SCHEME = MUL_R4T,
  parameter int unsigned Q      = 15
) (
  input  logic [N-1:0]   y,
  input  logic [N-1:0]   z,
  output logic [2*N-1:0] p
);
  logic [2*N-1:0] s, c;
  logic           cout;

  r4_mult_core #(.N(N), .SCHEME(SCHEME), .Q(Q)) u_core (.y, .z, .s, .c);

  cla_adder #(.WIDTH(2 * N)) u_cpa (.a(s), .b(c), .cin(1'b0), .sum(p), .cout(cout));
endmodule
