// pp_generator - radix-4 partial-product generator for the exact and the seven imprecise
// multiplier schemes.
//
// For digit d_j (one/two/sign) the partial product is the N+1 bit vector
// sign XOR (|d_j| * z), placed at column 2j; the +1 that completes a negative product is the
// carry bit C_j = sign. Sign extension is not replicated: the top bit of each partial product
// is inverted and one constant row, -sum_j 2^(N+2j), is added instead. The output is a set of
// 2N-bit rows whose sum (mod 2^2N) is the product:
//   rows[0 .. N/2-1]   the partial products
//   rows[N/2 .. N-1]   one row per carry bit C_j (all zero where the scheme drops it)
//   rows[N]            the sign-extension constant
// The imprecise schemes change which bits exist and where the carry bits go (q = Q):
//   TEPPE : the q low bits of every partial product are not generated; C_j moves up by q
//           places, to column 2j+q.
//   H2    : the q low bits of every partial product use the crippled digit set {-2,0,+2}
//           (one-digits give 0 or -0 there). The lowest such bit always equals sign, so it is
//           dropped and C_j is doubled instead (moved to column 2j+1).
//   LLL   : the product of the low q bits of y and the low q bits of z is left out: partial
//           products j < q/2 lose their q low bits; their C_j moves to column 2j+q. q even.
//   R4T   : every bit below column q is not generated; every C_j below column q is kept and
//           moved to column q.
//   H1    : as H2, but the crippled digit set is used for every bit below column q, and only
//           partial products that reach below column q have their C_j doubled.
//   TNCB  : as R4T, but C_j below column q is dropped.
//   TMCB  : as R4T, but every C_j is dropped.
// Purely combinational. The schemes, the NRP3a digits and the sign-extension method follow
// the published design; putting each carry bit in a row of its own (the reducer folds the
// empty positions away) is a choice of this design. Q must not exceed N.
module pp_generator
  import imprecise_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter mul_scheme_e SCHEME = MUL_R4T,
  parameter int unsigned Q      = 15,
  localparam int unsigned W     = 2 * N,
  localparam int unsigned NROWS = N + 1
) (
  input  r4_digit_t [N/2-1:0] digits,
  input  logic [N-1:0]        z,
  output logic [W-1:0]        rows [NROWS]
);
  localparam int unsigned NPP = N / 2;

  function automatic logic [W-1:0] sign_const();
    logic [W-1:0] k;
    k = '0;
    for (int j = 0; j < NPP; j++) k = k - (W'(1) << (N + 2 * j));
    return k;
  endfunction

  localparam logic [W-1:0] KSIGN = sign_const();

  // Is bit k of partial product j generated?  Is it in the crippled (hybrid) region?
  function automatic logic bit_kept(int j, int k);
    int col;
    col = 2 * j + k;
    case (SCHEME)
      MUL_TEPPE:                    return k >= int'(Q);
      MUL_LLL:                      return !(j < int'(Q) / 2 && k < int'(Q));
      MUL_R4T, MUL_TNCB, MUL_TMCB:  return col >= int'(Q);
      MUL_H2:                       return !(k == 0 && Q > 0);
      MUL_H1:                       return !(k == 0 && col < int'(Q));
      default:                      return 1'b1;
    endcase
  endfunction

  function automatic logic bit_hybrid(int j, int k);
    case (SCHEME)
      MUL_H2:  return k < int'(Q);
      MUL_H1:  return 2 * j + k < int'(Q);
      default: return 1'b0;
    endcase
  endfunction

  // Column of carry bit C_j, or -1 where the scheme drops it.
  function automatic int carry_col(int j);
    int col;
    col = 2 * j;
    case (SCHEME)
      MUL_TEPPE: return col + int'(Q);
      MUL_H2:    return (Q > 0) ? col + 1 : col;
      MUL_LLL:   return (j < int'(Q) / 2) ? col + int'(Q) : col;
      MUL_R4T:   return (col < int'(Q)) ? int'(Q) : col;
      MUL_H1:    return (col < int'(Q)) ? col + 1 : col;
      MUL_TNCB:  return (col < int'(Q)) ? -1 : col;
      MUL_TMCB:  return -1;
      default:   return col;
    endcase
  endfunction

  always_comb begin
    for (int r = 0; r < int'(NROWS); r++) rows[r] = '0;
    rows[N] = KSIGN;
    for (int j = 0; j < int'(NPP); j++) begin
      logic [N:0] zext, z2, full, hyb;
      int cc;
      zext = {z[N-1], z};
      z2   = {z, 1'b0};
      full = {(N+1){digits[j].sign}} ^
             (({(N+1){digits[j].one}} & zext) | ({(N+1){digits[j].two}} & z2));
      hyb  = {(N+1){digits[j].sign}} ^ ({(N+1){digits[j].two}} & z2);
      for (int k = 0; k <= int'(N); k++) begin
        logic b;
        b = bit_hybrid(j, k) ? hyb[k] : full[k];
        if (k == int'(N)) b = ~b;
        if (bit_kept(j, k) && (2 * j + k) < int'(W)) rows[j][2*j+k] = b;
      end
      cc = carry_col(j);
      if (cc >= 0 && cc < int'(W)) rows[NPP+j][cc] = digits[j].sign;
    end
  end
endmodule
