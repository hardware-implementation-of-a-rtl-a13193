// fold_adders: folds the symmetric impulse response so that each coefficient
// is multiplied only once.
//
// A linear-phase filter has c[k] = c[N-1-k], so taps k and N-1-k can be added
// before the multiplication. For NUM_TAPS = 27 this gives 13 pair sums from
// 13 sign_ext_adder instances (8-bit in, 9-bit out) and the centre tap, which
// has no partner and is sign-extended to 9 bits. folded[k] pairs taps[k] and
// taps[NUM_TAPS-1-k]; folded[NUM_COEF-1] is the centre tap. Purely
// combinational. The pairing and widths are those of the published design;
// NUM_TAPS must be odd.
module fold_adders #(
  parameter  int NUM_TAPS = 27,
  parameter  int DATA_W   = 8,
  localparam int NUM_COEF = (NUM_TAPS + 1) / 2
) (
  input  logic [NUM_TAPS-1:0][DATA_W-1:0] taps,
  output logic [NUM_COEF-1:0][DATA_W:0]   folded
);
  for (genvar k = 0; k < NUM_COEF - 1; k++) begin : g_pair
    sign_ext_adder #(.WIDTH(DATA_W)) u_add (
      .a     (taps[NUM_TAPS-1-k]),
      .b     (taps[k]),
      .result(folded[k])
    );
  end

  assign folded[NUM_COEF-1] = {taps[NUM_COEF-1][DATA_W-1], taps[NUM_COEF-1]};
endmodule
