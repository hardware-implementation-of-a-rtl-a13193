// fir_pkg: sizes shared by the blocks of the 27-tap variable-coefficient
// FIR audio filter.
//
// The filter takes 8-bit two's complement samples at 44.1 kHz, folds its
// symmetric 27-tap impulse response into 14 products, computes them one after
// another on a single 9-bit serial multiplier (21 clocks each) and adds one
// idle slot, so a sampling period is 15 x 21 = 315 clocks of a 13.89 MHz
// clock. All numbers below are those of the published design; NUM_COEF and the
// slot arithmetic follow from them.
package fir_pkg;
  localparam int DATA_W      = 8;                 // sample width
  localparam int COEF_W      = 8;                 // coefficient width
  localparam int NUM_TAPS    = 27;                // filter length
  localparam int NUM_COEF    = (NUM_TAPS + 1) / 2; // 14 folded products
  localparam int MULT_W      = DATA_W + 1;        // 9-bit serial multiplier
  localparam int MAG_W       = 2 * MULT_W;        // 18-bit product register
  localparam int PROD_LSB    = 4;                 // product bits dropped
  localparam int PROD_W      = 12;                // kept product bits 15..4
  localparam int OUT_W       = 16;                // D/A word
  localparam int NUM_SLOTS   = NUM_COEF + 1;      // 14 products + 1 wait
  localparam int SLOT_W      = $clog2(NUM_SLOTS); // 4-bit slot number
  localparam int CNT_W       = 5;                 // counts 0..20 of a product

  typedef logic [DATA_W-1:0] sample_t;
  typedef logic [COEF_W-1:0] coef_t;
  typedef logic [MULT_W-1:0] operand_t;
  typedef logic [PROD_W-1:0] prod_t;
  typedef logic [SLOT_W-1:0] slot_t;
  typedef logic [CNT_W-1:0]  count_t;
  typedef logic [MAG_W-1:0]  mag_t;
  typedef logic [PROD_LSB-1:0] dropped_t;          // bits lost to truncation
  typedef logic [OUT_W-1:0]  dac_word_t;
endpackage
