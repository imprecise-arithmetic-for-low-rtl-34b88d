// imprecise_adder - selects one of the adder schemes by parameter.
//
// SCHEME picks the exact two-level carry-lookahead adder or one of the imprecise tail
// adders (Trunc, Freeze0.5, OR-tail, XOR-tail, Carry-one), each with its Q low bits
// imprecise. Used as the final carry-propagate adder of the multiply-accumulate unit.
// Purely combinational. The default (OR-tail, Q = 17) is the adder of the published
// R4T15 / OR-tail17 MAC.
module imprecise_adder
  import imprecise_pkg::*;
#(
  parameter int unsigned WIDTH  = 32,
  parameter add_scheme_e SCHEME = ADD_OR_TAIL,
  parameter int unsigned Q      = 17
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum
);
  logic cout;

  if (SCHEME == ADD_TRUNC) begin : g_trunc
    trunc_adder #(.WIDTH(WIDTH), .Q(Q)) u_add (.a, .b, .sum, .cout);
  end else if (SCHEME == ADD_FREEZE05) begin : g_freeze
    freeze05_adder #(.WIDTH(WIDTH), .Q(Q)) u_add (.a, .b, .sum, .cout);
  end else if (SCHEME == ADD_OR_TAIL) begin : g_or
    or_tail_adder #(.WIDTH(WIDTH), .Q(Q)) u_add (.a, .b, .sum, .cout);
  end else if (SCHEME == ADD_XOR_TAIL) begin : g_xor
    xor_tail_adder #(.WIDTH(WIDTH), .Q(Q)) u_add (.a, .b, .sum, .cout);
  end else if (SCHEME == ADD_CARRY_ONE) begin : g_c1
    carry_one_adder #(.WIDTH(WIDTH), .Q(Q)) u_add (.a, .b, .sum, .cout);
  end else begin : g_exact
    cla_adder #(.WIDTH(WIDTH)) u_add (.a, .b, .cin(1'b0), .sum, .cout);
  end
endmodule
