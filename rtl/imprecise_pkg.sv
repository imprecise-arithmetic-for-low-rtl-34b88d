// imprecise_pkg - types shared by the imprecise adders, multipliers and MAC.
//
// The scheme enums select how an operator departs from exact arithmetic:
//   adders      : Trunc, Freeze0.5, OR-tail, XOR-tail, Carry-one (q low bits imprecise)
//   multipliers : TEPPE, H2, LLL, R4T, H1, TNCB, TMCB (radix-4 partial products
//                 changed below a width q)
// The exact variants are kept so that the same framework can also be built error free.
// A radix-4 digit in {-2,-1,0,1,2} travels as the three signals one/two/sign; a negative
// partial product is formed as the one's complement of the magnitude, and the missing +1
// (the "carry bit" C_j) is equal to sign.
package imprecise_pkg;

  typedef enum logic [2:0] {
    ADD_EXACT     = 3'd0,
    ADD_TRUNC     = 3'd1,
    ADD_FREEZE05  = 3'd2,
    ADD_OR_TAIL   = 3'd3,
    ADD_XOR_TAIL  = 3'd4,
    ADD_CARRY_ONE = 3'd5
  } add_scheme_e;

  typedef enum logic [2:0] {
    MUL_EXACT = 3'd0,
    MUL_TEPPE = 3'd1,
    MUL_H2    = 3'd2,
    MUL_LLL   = 3'd3,
    MUL_R4T   = 3'd4,
    MUL_H1    = 3'd5,
    MUL_TNCB  = 3'd6,
    MUL_TMCB  = 3'd7
  } mul_scheme_e;

  // One recoded radix-4 digit: |d| = 1 (one), |d| = 2 (two), d < 0 (sign).
  typedef struct packed {
    logic one;
    logic two;
    logic sign;
  } r4_digit_t;

  // Rows handed from the partial-product generator to the reducer for an N x N
  // multiplier: N/2 partial products, N/2 carry-bit rows and one constant row that
  // completes the sign extension.
  function automatic int unsigned pp_rows(int unsigned n);
    return n + 1;
  endfunction

endpackage
