// r4_mult_core - radix-4 multiplier up to, but not including, the carry-propagate adder.
//
// y (multiplier) is recoded into N/2 NRP3a digits, the partial-product generator builds the
// bit matrix of the chosen scheme, and the reducer compresses it to two 2N-bit vectors s and
// c with s + c = the (approximate) product mod 2^2N. Both the stand-alone multiplier and the
// multiply-accumulate unit are built on this core. Purely combinational.
module r4_mult_core
  import imprecise_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter mul_scheme_e SCHEME = MUL_R4T,
  parameter int unsigned Q      = 15
) (
  input  logic [N-1:0]   y,
  input  logic [N-1:0]   z,
  output logic [2*N-1:0] s,
  output logic [2*N-1:0] c
);
  localparam int unsigned NROWS = N + 1;

  r4_digit_t [N/2-1:0] digits;
  logic [2*N-1:0]      rows [NROWS];

  nrp3a_recoder #(.N(N)) u_rec (.y, .digits);

  pp_generator #(.N(N), .SCHEME(SCHEME), .Q(Q)) u_ppg (.digits, .z, .rows);

  pp_reducer #(.NROWS(NROWS), .WIDTH(2 * N)) u_ppr (.rows, .s, .c);
endmodule
