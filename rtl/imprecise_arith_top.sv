// imprecise_arith_top - the imprecise arithmetic operators side by side.
//
// Three independent groups, each with its own ports:
//   * Adder bank: the five 32-bit imprecise adders at the tail widths that keep the mean
//     absolute IDCT pixel error at or below 2, all fed the same a/b:
//       add_sum[0] Trunc q=14, [1] Freeze0.5 q=14, [2] OR-tail q=14, [3] XOR-tail q=14,
//       [4] Carry-one q=15
//   * Multiplier bank: the seven 16x16 imprecise radix-4 multipliers at their chosen sizes,
//     all fed the same y (recoded) and z:
//       mul_p[0] TEPPE q=2, [1] H2 q=2, [2] LLL q=8, [3] R4T q=15, [4] H1 q=15,
//       [5] TNCB q=12, [6] TMCB q=11
//   * Two multiply-accumulate units sharing one input stream:
//       mac_acc_a  R4T q=15 multiplier with OR-tail q=17 adder (the preferred MAC)
//       mac_acc_b  TNCB q=12 multiplier with Freeze0.5 q=16 adder
// The adder and multiplier banks are combinational; the MACs register their accumulators
// (one operation per cycle, result visible the cycle after, see imprecise_mac). The choice
// of schemes and sizes follows the published study; putting them in one top with shared
// operand ports is a choice of this design.
module imprecise_arith_top
  import imprecise_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // adder bank
  input  logic [31:0]      add_a,
  input  logic [31:0]      add_b,
  output logic [4:0][31:0] add_sum,
  output logic [4:0]       add_cout,   // carry out of each precise part
  // multiplier bank
  input  logic [15:0]      mul_y,
  input  logic [15:0]      mul_z,
  output logic [6:0][31:0] mul_p,
  // multiply-accumulate units
  input  logic             mac_en,
  input  logic             mac_clear,
  input  logic [15:0]      mac_y,
  input  logic [15:0]      mac_z,
  output logic [31:0]      mac_acc_a,
  output logic [31:0]      mac_acc_b
);

  trunc_adder     #(.WIDTH(32), .Q(14)) u_trunc (.a(add_a), .b(add_b), .sum(add_sum[0]), .cout(add_cout[0]));
  freeze05_adder  #(.WIDTH(32), .Q(14)) u_frz   (.a(add_a), .b(add_b), .sum(add_sum[1]), .cout(add_cout[1]));
  or_tail_adder   #(.WIDTH(32), .Q(14)) u_or    (.a(add_a), .b(add_b), .sum(add_sum[2]), .cout(add_cout[2]));
  xor_tail_adder  #(.WIDTH(32), .Q(14)) u_xor   (.a(add_a), .b(add_b), .sum(add_sum[3]), .cout(add_cout[3]));
  carry_one_adder #(.WIDTH(32), .Q(15)) u_c1    (.a(add_a), .b(add_b), .sum(add_sum[4]), .cout(add_cout[4]));

  r4_multiplier #(.N(16), .SCHEME(MUL_TEPPE), .Q(2))  u_teppe (.y(mul_y), .z(mul_z), .p(mul_p[0]));
  r4_multiplier #(.N(16), .SCHEME(MUL_H2),    .Q(2))  u_h2    (.y(mul_y), .z(mul_z), .p(mul_p[1]));
  r4_multiplier #(.N(16), .SCHEME(MUL_LLL),   .Q(8))  u_lll   (.y(mul_y), .z(mul_z), .p(mul_p[2]));
  r4_multiplier #(.N(16), .SCHEME(MUL_R4T),   .Q(15)) u_r4t   (.y(mul_y), .z(mul_z), .p(mul_p[3]));
  r4_multiplier #(.N(16), .SCHEME(MUL_H1),    .Q(15)) u_h1    (.y(mul_y), .z(mul_z), .p(mul_p[4]));
  r4_multiplier #(.N(16), .SCHEME(MUL_TNCB),  .Q(12)) u_tncb  (.y(mul_y), .z(mul_z), .p(mul_p[5]));
  r4_multiplier #(.N(16), .SCHEME(MUL_TMCB),  .Q(11)) u_tmcb  (.y(mul_y), .z(mul_z), .p(mul_p[6]));

  imprecise_mac #(
    .N(16), .MUL_SCHEME(MUL_R4T), .MUL_Q(15), .ADD_SCHEME(ADD_OR_TAIL), .ADD_Q(17)
  ) u_mac_a (
    .clk, .rst_n, .en(mac_en), .clear(mac_clear), .y(mac_y), .z(mac_z), .acc(mac_acc_a)
  );

  imprecise_mac #(
    .N(16), .MUL_SCHEME(MUL_TNCB), .MUL_Q(12), .ADD_SCHEME(ADD_FREEZE05), .ADD_Q(16)
  ) u_mac_b (
    .clk, .rst_n, .en(mac_en), .clear(mac_clear), .y(mac_y), .z(mac_z), .acc(mac_acc_b)
  );
endmodule
