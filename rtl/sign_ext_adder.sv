// sign_ext_adder: WIDTH-bit ripple-carry adder with automatic sign extension.
//
// WIDTH full adders are chained, carry out of bit i into bit i+1, carry into
// bit 0 tied low. The result is one bit wider than the addends so that a
// two's complement sum can never overflow. The extra bit does not come from
// the carry chain: it is 1 when both addend sign bits are 1, 0 when both are
// 0, and equal to the MSB of the ripple sum when the signs differ. That is
// exactly the sign of the (WIDTH+1)-bit sum. Purely combinational; the
// ripple delay grows with WIDTH, which the filter tolerates by running its
// adder tree in a spare multiplication slot. Structure and extension rule are
// the published design; WIDTH is a parameter here (the filter uses 8, 9, 12,
// 13, 14 and 15).
module sign_ext_adder #(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH:0]   result
);
  logic [WIDTH:0] carry;

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .s   (result[i]),
      .cout(carry[i+1])
    );
  end

  // Table of the sign extension: both negative -> 1, both positive -> 0,
  // mixed signs -> MSB of the ripple sum. The final ripple carry is unused.
  assign result[WIDTH] = (a[WIDTH-1] & b[WIDTH-1])
                       | ((a[WIDTH-1] ^ b[WIDTH-1]) & result[WIDTH-1]);

  logic unused_carry;
  assign unused_carry = carry[WIDTH];
endmodule
