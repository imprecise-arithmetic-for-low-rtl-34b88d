// carry_one_adder - Carry-one imprecise adder.
//
// The lower Q bits are a row of independent half adders. The carry of each half adder
// travels exactly one place: it is OR-ed (not added) into the sum bit above it, so bit i of
// the result is (a[i] ^ b[i]) | (a[i-1] & b[i-1]). The carry of the top tail bit, Q-1, is
// OR-ed into the least significant bit of the exact upper sum. The upper WIDTH-Q bits are
// added by a two-level carry-lookahead adder with carry-in 0, so the carry network stops at
// bit Q as in the other tail schemes, but one carry's worth of information can still cross
// into the precise part ("pseudo carry").
// Purely combinational; cout is the carry out of the precise part.
// The scheme and the default widths (32 bits, Q = 15) follow the published design; the
// exact upper adder is the cla_adder of this design.
module carry_one_adder #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned Q     = 15
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-Q-1:0] hi_sum;
  logic [Q-1:0]       hs, hc;   // half-adder sum and carry of the tail
  logic [Q-1:0]       tail;

  cla_adder #(.WIDTH(WIDTH - Q)) u_hi (
    .a   (a[WIDTH-1:Q]),
    .b   (b[WIDTH-1:Q]),
    .cin (1'b0),
    .sum (hi_sum),
    .cout(cout)
  );

  assign hs   = a[Q-1:0] ^ b[Q-1:0];
  assign hc   = a[Q-1:0] & b[Q-1:0];
  assign tail = hs | {hc[Q-2:0], 1'b0};

  assign sum  = {hi_sum[WIDTH-Q-1:1], hi_sum[0] | hc[Q-1], tail};
endmodule
