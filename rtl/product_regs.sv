// product_regs: the NUM_COEF product registers in front of the final adder
// tree.
//
// When a multiplication finishes (`mult_done`) in slot k < NUM_COEF, the
// product magnitude `mag` is truncated to bits PROD_LSB+PROD_W-1..PROD_LSB
// (15..4: the four lowest bits are dropped so that the sum of 14 products
// fits the 16-bit output), the sign `neg` is applied by two's complement
// negation, and the result is written to prods[k]. Truncating the magnitude
// rounds toward zero. The registers hold until their slot comes round again,
// so the adder tree always sees a complete set.
//
// Truncation point, widths and write rule are the published design; `res`
// low clears the registers synchronously.
module product_regs #(
  parameter  int NUM_COEF = 14,
  parameter  int MAG_W    = 18,
  parameter  int PROD_W   = 12,
  parameter  int PROD_LSB = 4,
  localparam int SLOT_W   = $clog2(NUM_COEF + 1)
) (
  input  logic                             clk,
  input  logic                             res,
  input  logic                             mult_done,
  input  logic [SLOT_W-1:0]                slot,
  input  logic                             neg,
  input  logic [MAG_W-1:0]                 mag,
  output logic [NUM_COEF-1:0][PROD_W-1:0]  prods
);
  logic [PROD_W-1:0] trunc, signed_prod;

  always_comb begin
    trunc       = mag[PROD_LSB +: PROD_W];
    signed_prod = neg ? (~trunc + PROD_W'(1)) : trunc;
  end

  // Magnitude bits below and above the kept field are dropped on purpose.
  logic unused_mag;
  assign unused_mag = ^{mag[PROD_LSB-1:0], mag[MAG_W-1:PROD_LSB+PROD_W]};

  always_ff @(posedge clk) begin
    if (!res)
      prods <= '0;
    else if (mult_done && int'(slot) < NUM_COEF)
      prods[slot] <= signed_prod;
  end
endmodule
