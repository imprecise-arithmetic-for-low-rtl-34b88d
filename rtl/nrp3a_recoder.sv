// nrp3a_recoder - radix-4 recoder with the NRP3a digit set {-2,-1,0,1,2}.
//
// The N-bit two's complement multiplier y is cut into N/2 overlapping groups
// (y[2j+1], y[2j], y[2j-1]) with y[-1] = 0. Each group gives one digit d_j, sent as the
// signals one (|d| = 1), two (|d| = 2) and sign (d < 0), so that y = sum d_j * 4^j.
// Unlike Booth recoding the group 111 gives +0, not -0: sign is never set for a zero
// digit, so no zero partial product is ever inverted and no carry bit is raised for it.
// Purely combinational. The digit table follows the published design; the gate-level
// form is left to synthesis.
module nrp3a_recoder
  import imprecise_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]      y,
  output r4_digit_t [N/2-1:0] digits
);
  logic [N:0] ye;   // y with y[-1] = 0 appended below

  assign ye = {y, 1'b0};

  always_comb begin
    for (int j = 0; j < N / 2; j++) begin
      logic b2, b1, b0;
      b2 = ye[2*j+2];
      b1 = ye[2*j+1];
      b0 = ye[2*j];
      digits[j].one  = b1 ^ b0;
      digits[j].two  = (b2 & ~b1 & ~b0) | (~b2 & b1 & b0);
      digits[j].sign = b2 & ~(b1 & b0);
    end
  end
endmodule
