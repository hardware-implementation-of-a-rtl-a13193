// tap_delay_line: the filter's sample memory, NUM_TAPS stages of DATA_W bits.
//
// On a clock with `shift_en` high every stage takes the value of the one
// before it and stage 0 takes `din`; otherwise all stages hold. taps[0] is the
// newest sample, taps[NUM_TAPS-1] the oldest. The filter pulses `shift_en`
// once per sampling period, when the last product of the period is finished.
// `res` low clears all stages synchronously (the published design does not
// clear them; clearing is this design's choice so that the first outputs after
// reset are defined).
module tap_delay_line #(
  parameter int NUM_TAPS = 27,
  parameter int DATA_W   = 8
) (
  input  logic                             clk,
  input  logic                             res,
  input  logic                             shift_en,
  input  logic [DATA_W-1:0]                din,
  output logic [NUM_TAPS-1:0][DATA_W-1:0]  taps
);
  always_ff @(posedge clk) begin
    if (!res)
      taps <= '0;
    else if (shift_en)
      taps <= {taps[NUM_TAPS-2:0], din};
  end
endmodule
