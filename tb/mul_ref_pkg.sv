// mul_ref_pkg - reference model of the radix-4 multiplier schemes, for the testbenches.
//
// mul_ref() returns the value an N x N multiplier of the given scheme and width q produces,
// computed as an integer sum over the partial-product bits: each digit d_j is looked up in
// the NRP3a digit table (and the crippled {-2,0,2} table for the hybrid schemes), each
// partial-product bit is added with its true two's complement weight (the top bit counts
// negative) when the scheme keeps it, and each carry bit is added at the column the scheme
// moves it to. It shares no code with the design, which uses the inverted-sign-bit and
// constant-row form of sign extension and a carry-save tree.
package mul_ref_pkg;
  import imprecise_pkg::*;

  // NRP3a digit of group (y[2j+1], y[2j], y[2j-1])
  function automatic int nrp3a_digit(int g);
    case (g & 7)
      0: return 0;   1: return 1;   2: return 1;   3: return 2;
      4: return -2;  5: return -1;  6: return -1;  default: return 0;
    endcase
  endfunction

  function automatic longint mul_ref(mul_scheme_e s, int q, int n, longint unsigned y,
                                     longint unsigned z);
    longint zs, tot, mag, hm, full, hyb, msk;
    longint unsigned ye;
    int d, col, cc, b;
    logic kept, hybrid;
    msk = (longint'(1) << (n + 1)) - 1;
    zs  = ((z >> (n - 1)) & 1) ? longint'(z) - (longint'(1) << n) : longint'(z);
    ye  = (y << 1) & ((64'd1 << (n + 1)) - 1);
    tot = 0;
    for (int j = 0; j < n / 2; j++) begin
      d    = nrp3a_digit(int'((ye >> (2 * j)) & 7));
      mag  = ((d < 0 ? -d : d) * zs) & msk;
      full = (d < 0) ? (mag ^ msk) : mag;
      hm   = ((d == 2 || d == -2) ? 2 * zs : 0) & msk;
      hyb  = (d < 0) ? (hm ^ msk) : hm;
      for (int k = 0; k <= n; k++) begin
        col = 2 * j + k;
        hybrid = (s == MUL_H2 && k < q) || (s == MUL_H1 && col < q);
        b = int'(((hybrid ? hyb : full) >> k) & 1);
        case (s)
          MUL_TEPPE:                   kept = (k >= q);
          MUL_LLL:                     kept = !(j < q / 2 && k < q);
          MUL_R4T, MUL_TNCB, MUL_TMCB: kept = (col >= q);
          MUL_H2:                      kept = !(k == 0 && q > 0);
          MUL_H1:                      kept = !(k == 0 && col < q);
          default:                     kept = 1'b1;
        endcase
        if (kept && b == 1) tot += (k == n) ? -(longint'(1) << col) : (longint'(1) << col);
      end
      col = 2 * j;
      case (s)
        MUL_TEPPE: cc = col + q;
        MUL_H2:    cc = (q > 0) ? col + 1 : col;
        MUL_LLL:   cc = (j < q / 2) ? col + q : col;
        MUL_R4T:   cc = (col < q) ? q : col;
        MUL_H1:    cc = (col < q) ? col + 1 : col;
        MUL_TNCB:  cc = (col < q) ? -1 : col;
        MUL_TMCB:  cc = -1;
        default:   cc = col;
      endcase
      if (cc >= 0 && d < 0) tot += longint'(1) << cc;
    end
    return tot;
  endfunction

  function automatic longint sext(longint unsigned v, int n);
    return ((v >> (n - 1)) & 1) ? longint'(v) - (longint'(1) << n) : longint'(v);
  endfunction
endpackage
