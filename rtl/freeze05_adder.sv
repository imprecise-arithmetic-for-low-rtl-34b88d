// freeze05_adder - Freeze0.5 imprecise adder.
//
// The sum is split at bit Q. The upper WIDTH-Q bits are added exactly by a two-level
// carry-lookahead adder whose carry-in is 0: no carry ever leaves the lower part, so the
// carry network, and the critical path, stop at bit Q.
// The lower Q result bits are the constant 100..0 (half of 2^Q), which centres the error of
// the missing low sum. Needs Q >= 1.
// Purely combinational; cout is the carry out of the precise part.
// The scheme and the default widths (32 bits, Q = 14, the widest tail that kept the mean
// absolute pixel error of an 8x8 IDCT at or below 2) follow the published design; the exact
// upper adder is the cla_adder of this design.
module freeze05_adder #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned Q     = 14
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-Q-1:0] hi_sum;

  cla_adder #(.WIDTH(WIDTH - Q)) u_hi (
    .a   (a[WIDTH-1:Q]),
    .b   (b[WIDTH-1:Q]),
    .cin (1'b0),
    .sum (hi_sum),
    .cout(cout)
  );

  assign sum = {hi_sum, 1'b1, {(Q-1){1'b0}}};
endmodule
