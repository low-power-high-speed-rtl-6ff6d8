// csel_accumulator: adds the eight tap products of one FIR channel.
//
// How it works: a three-level binary tree of seven carry-select adders.
// Four 10-bit adders (staging 2-3-5) add product pairs, two 11-bit adders
// (2-3-6) add those results, and one 12-bit adder (2-4-6) gives the 13-bit
// sum. Each level widens the word by one bit, so the sum can neither
// overflow nor underflow. The tree, the widths and the stagings follow the
// source design.
//
// Ports: prod[8] (10-bit signed) in; sum (13-bit signed) out.
// Combinational; the source budgets about 25 ns for it in a 40 ns
// quarter-rate cycle.
module csel_accumulator
  import prml_pkg::*;
(
  input  prod_t prod [NTAPS],
  output acc_t  sum
);
  logic signed [PROD_W:0]   l1 [4];
  logic signed [PROD_W+1:0] l2 [2];

  for (genvar i = 0; i < 4; i++) begin : g_l1
    csel_adder #(.W(PROD_W), .S0(2), .S1(3), .S2(5)) u_add (
      .a(prod[2*i]), .b(prod[2*i+1]), .s(l1[i]));
  end
  for (genvar i = 0; i < 2; i++) begin : g_l2
    csel_adder #(.W(PROD_W+1), .S0(2), .S1(3), .S2(6)) u_add (
      .a(l1[2*i]), .b(l1[2*i+1]), .s(l2[i]));
  end
  csel_adder #(.W(PROD_W+2), .S0(2), .S1(4), .S2(6)) u_add3 (
    .a(l2[0]), .b(l2[1]), .s(sum));
endmodule
