// operand_mux: selects the operands of the shared multiplier for the current
// slot.
//
// In slot k (k < NUM_COEF) the multiplier operand is the folded sample sum
// folded[k] (DATA_W+1 bits) and the multiplicand is coefficient coefs[k],
// sign-extended to the same width. In the idle slot (k >= NUM_COEF) both
// operands are zero. Purely combinational. Slot-to-operand mapping as in the
// published design.
module operand_mux #(
  parameter  int NUM_COEF = 14,
  parameter  int DATA_W   = 8,
  parameter  int COEF_W   = 8,
  localparam int SLOT_W   = $clog2(NUM_COEF + 1)
) (
  input  logic [SLOT_W-1:0]                slot,
  input  logic [NUM_COEF-1:0][DATA_W:0]    folded,
  input  logic [NUM_COEF-1:0][COEF_W-1:0]  coefs,
  output logic [DATA_W:0]                  mplier,
  output logic [DATA_W:0]                  mcand
);
  always_comb begin
    mplier = '0;
    mcand  = '0;
    if (int'(slot) < NUM_COEF) begin
      mplier = folded[slot];
      mcand  = (DATA_W + 1)'($signed(coefs[slot]));
    end
  end
endmodule
