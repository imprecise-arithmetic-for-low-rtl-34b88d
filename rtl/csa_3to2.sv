// csa_3to2 - a row of (3,2] counters (full adders): carry-save adder.
//
// Reduces three WIDTH-bit vectors to a sum vector s and a carry vector c with
// x + y + z = s + c (mod 2^WIDTH). c is already shifted one place up (c[0] = 0). No carry
// propagates along the row, so the delay is one full adder whatever the width.
// Purely combinational. Used as the building block of the partial-product reducer and as
// the CSA32 that merges the accumulator into a multiply-accumulate.
module csa_3to2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [WIDTH-1:0] z,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] c
);
  logic [WIDTH-2:0] maj;

  assign s   = x ^ y ^ z;
  assign maj = (x[WIDTH-2:0] & y[WIDTH-2:0]) | (x[WIDTH-2:0] & z[WIDTH-2:0]) |
               (y[WIDTH-2:0] & z[WIDTH-2:0]);
  assign c   = {maj, 1'b0};
endmodule
