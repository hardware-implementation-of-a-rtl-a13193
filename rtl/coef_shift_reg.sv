// coef_shift_reg: coefficient store of the filter, loaded one coefficient at a
// time from the serial receiver.
//
// The receiver runs on its own clock and raises `shiftcoef` (its
// StopReceiving line) when a new word is on `coeffin`. Two flip-flops detect a
// rising edge of that line in the filter clock domain: delay0 samples the
// line, delay1 samples the inverse of delay0, and `shift_edge` = delay0 &
// delay1 is high for exactly one filter clock after each rising edge, however
// long the line stays high and whatever the ratio of the two clocks. On that
// clock the NUM_COEF-entry register shifts by one: coefs[0] takes `coeffin`
// and coefs[i] takes coefs[i-1]. After NUM_COEF words the first word sent sits
// in coefs[NUM_COEF-1], the coefficient of the centre tap, and the last one in
// coefs[0], the coefficient of the two outermost taps.
//
// The edge detector and the shift register are the published design. Own
// choices: the synchronous clear on `res` low (coefficients to zero, detector
// primed so that a line already high at reset is not taken for an edge). As in
// the published design there is no extra synchronising stage in front of
// delay0. The assertion that the pulse lasts one clock is an own addition.
module coef_shift_reg #(
  parameter int NUM_COEF = 14,
  parameter int COEF_W   = 8
) (
  input  logic                             clk,
  input  logic                             res,
  input  logic                             shiftcoef,
  input  logic [COEF_W-1:0]                coeffin,
  output logic                             shift_edge,
  output logic [NUM_COEF-1:0][COEF_W-1:0]  coefs
);
  logic delay0, delay1;

  assign shift_edge = delay0 & delay1;

  always_ff @(posedge clk) begin
    if (!res) begin
      delay0 <= 1'b1;
      delay1 <= 1'b0;
      coefs  <= '0;
    end else begin
      delay0 <= shiftcoef;
      delay1 <= !delay0;
      if (shift_edge)
        coefs <= {coefs[NUM_COEF-2:0], coeffin};
    end
  end

  // One shift per received word: the edge pulse never lasts two clocks.
  a_single_shift: assert property (@(posedge clk) disable iff (!res)
                                   shift_edge |=> !shift_edge);
endmodule
