// add_ref_pkg - reference model of the imprecise adder schemes, for the testbenches.
//
// add_ref() computes, bit by bit from the scheme's definition, the result a WIDTH-bit adder
// with q imprecise low bits gives: exact sum of the upper parts with no carry from below,
// and a tail of zeros (Trunc), 100..0 (Freeze0.5), a|b (OR-tail), a^b (XOR-tail) or
// half-adder sums with each carry OR-ed one place up (Carry-one, whose top tail carry is
// also OR-ed into the lowest upper bit).
package add_ref_pkg;
  import imprecise_pkg::*;

  function automatic longint unsigned add_ref(add_scheme_e s, int q, int width,
                                              longint unsigned x, longint unsigned y);
    longint unsigned lo_mask, hi, tail, xl, yl;
    if (s == ADD_EXACT || q == 0) return (x + y) & ((64'd1 << width) - 1);
    lo_mask = (64'd1 << q) - 1;
    xl = x & lo_mask;
    yl = y & lo_mask;
    hi = ((x >> q) + (y >> q)) << q;
    case (s)
      ADD_TRUNC:    tail = 0;
      ADD_FREEZE05: tail = 64'd1 << (q - 1);
      ADD_OR_TAIL:  tail = xl | yl;
      ADD_XOR_TAIL: tail = xl ^ yl;
      default: begin
        tail = 0;
        for (int i = 0; i < q; i++) begin
          if (((xl ^ yl) >> i) & 1) tail |= 64'd1 << i;
          if (i > 0 && (((xl & yl) >> (i - 1)) & 1)) tail |= 64'd1 << i;
        end
        if (((xl & yl) >> (q - 1)) & 1) hi |= 64'd1 << q;
      end
    endcase
    return (hi | tail) & ((64'd1 << width) - 1);
  endfunction
endpackage
