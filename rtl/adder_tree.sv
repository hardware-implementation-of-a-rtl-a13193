// adder_tree: final addition stage of the filter, sums 14 signed products.
//
// Four levels of sign_ext_adder, each one bit wider than the last, so no level
// can overflow: seven PROD_W-bit adders, three (PROD_W+1)-bit adders, two
// (PROD_W+2)-bit adders (the seventh first-level sum, which has no partner, is
// sign-extended into the second of them) and one (PROD_W+3)-bit adder, giving
// a PROD_W+4 = 16-bit sum. Purely combinational; the ripple delay through all
// levels is longer than a clock, which the filter covers with its idle slot.
// The tree shape is the published design; it is fixed to 14 inputs.
module adder_tree #(
  parameter int PROD_W = 12
) (
  input  logic [13:0][PROD_W-1:0] prods,
  output logic [PROD_W+3:0]       sum
);
  logic [6:0][PROD_W:0]   l2;
  logic [2:0][PROD_W+1:0] l3;
  logic [1:0][PROD_W+2:0] l4;

  for (genvar i = 0; i < 7; i++) begin : g_l2
    sign_ext_adder #(.WIDTH(PROD_W)) u_add (
      .a(prods[2*i]), .b(prods[2*i+1]), .result(l2[i]));
  end

  for (genvar i = 0; i < 3; i++) begin : g_l3
    sign_ext_adder #(.WIDTH(PROD_W+1)) u_add (
      .a(l2[2*i]), .b(l2[2*i+1]), .result(l3[i]));
  end

  sign_ext_adder #(.WIDTH(PROD_W+2)) u_l4_0 (
    .a(l3[0]), .b(l3[1]), .result(l4[0]));
  sign_ext_adder #(.WIDTH(PROD_W+2)) u_l4_1 (
    .a(l3[2]), .b({l2[6][PROD_W], l2[6]}), .result(l4[1]));

  sign_ext_adder #(.WIDTH(PROD_W+3)) u_l5 (
    .a(l4[0]), .b(l4[1]), .result(sum));
endmodule
