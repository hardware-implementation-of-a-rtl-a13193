// fir_filter: 27-tap, 8-bit variable-coefficient FIR filter for 44.1 kHz
// audio, built around one serial multiplier.
//
// How it works. The impulse response is assumed symmetric, so the 27 taps are
// folded into 14 sums (fold_adders) that share 14 coefficients
// (coef_shift_reg). One serial_mult computes the 14 products one after the
// other, 21 clocks each; mac_sequencer counts the products as slots 0..13 and
// adds an idle slot 14, so one sampling period is 15 x 21 = 315 clocks
// (13.89 MHz / 315 = 44.1 kHz). operand_mux feeds slot k's folded sum and
// coefficient to the multiplier; product_regs keeps the truncated, signed
// product of each slot; adder_tree adds the 14 products combinationally and
// has the whole idle slot to settle; output_reg stores the sum at the start
// of slot 0 in the D/A converter's code. At the end of slot 13 the delay line
// takes the next sample from `datain`. ad_controller drives the converter so
// that its data are valid (RD low) at that moment.
//
// Interface and timing. `datain` is sampled once per period, on the clock that
// ends slot 13. `outdata` changes once per period, one clock after slot 0
// begins; a sample first shows in it 337 clocks after it was taken (the idle
// slot, one period of products, one clock for the output register). `shiftcoef` may come from another clock domain: each rising edge
// shifts `coeffin` into the coefficient register (first word sent = centre
// coefficient, fourteenth = outermost). `res` low clears the filter
// synchronously and resets the period to slot 0. Arithmetic:
// y = sum_k c[k] * (x[n-k] + x[n-26+k]) with c[13] on x[n-13] alone, each
// product truncated toward zero by 4 bits, result on 16 bits.
//
// The architecture, widths, cycle counts and control points are the published
// design; reset of the data and coefficient registers is this design's own.
module fir_filter
  import fir_pkg::*;
(
  input  logic              clk,
  input  logic              res,
  input  logic [DATA_W-1:0] datain,
  input  logic              shiftcoef,
  input  logic [COEF_W-1:0] coeffin,
  output dac_word_t         outdata,
  output logic              chip_select_n,
  output logic              read_n,
  output logic              write_n,
  output logic              ck
);
  count_t                             count;
  logic                               mult_start, mult_done, neg;
  mag_t                               mag;
  logic [MAG_W-2:0]                   mult_result;
  slot_t                              slot;
  logic                               data_shift;
  logic [NUM_TAPS-1:0][DATA_W-1:0]    taps;
  logic [NUM_COEF-1:0][DATA_W:0]      folded;
  logic [NUM_COEF-1:0][COEF_W-1:0]    coefs;
  logic                               shift_edge;
  logic [MULT_W-1:0]                  mplier, mcand;
  logic [NUM_COEF-1:0][PROD_W-1:0]    prods;
  dac_word_t                          sum;
  logic [5:0]                         adcount;

  serial_mult #(.WIDTH(MULT_W)) u_mult (
    .clk, .res, .mplier, .mcand, .count, .mult_start, .mult_done, .neg, .mag,
    .result(mult_result)
  );

  mac_sequencer #(.NUM_SLOTS(NUM_SLOTS)) u_seq (
    .clk, .res, .mult_done, .slot, .data_shift
  );

  tap_delay_line #(.NUM_TAPS(NUM_TAPS), .DATA_W(DATA_W)) u_taps (
    .clk, .res, .shift_en(data_shift), .din(datain), .taps
  );

  fold_adders #(.NUM_TAPS(NUM_TAPS), .DATA_W(DATA_W)) u_fold (
    .taps, .folded
  );

  coef_shift_reg #(.NUM_COEF(NUM_COEF), .COEF_W(COEF_W)) u_coef (
    .clk, .res, .shiftcoef, .coeffin, .shift_edge, .coefs
  );

  operand_mux #(.NUM_COEF(NUM_COEF), .DATA_W(DATA_W), .COEF_W(COEF_W)) u_mux (
    .slot, .folded, .coefs, .mplier, .mcand
  );

  product_regs #(.NUM_COEF(NUM_COEF), .MAG_W(MAG_W), .PROD_W(PROD_W),
                 .PROD_LSB(PROD_LSB)) u_prod (
    .clk, .res, .mult_done, .slot, .neg, .mag, .prods
  );

  adder_tree #(.PROD_W(PROD_W)) u_tree (
    .prods, .sum
  );

  output_reg #(.OUT_W(OUT_W)) u_out (
    .clk, .res, .update(mult_start && slot == '0), .sum, .outdata
  );

  ad_controller u_ad (
    .clk, .res, .count, .ck, .chip_select_n, .write_n, .read_n, .adcount
  );

  // The signed product register of the multiplier and the A/D counter are
  // observation points only; the filter uses the magnitude and sign directly.
  logic unused_obs;
  assign unused_obs = ^{mult_result, adcount, shift_edge};
endmodule
