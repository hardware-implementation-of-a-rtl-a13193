// mac_sequencer: slot counter that time-multiplexes the single multiplier.
//
// `slot` counts finished multiplications (one `mult_done` pulse every 21
// clocks) from 0 to NUM_SLOTS-1 and wraps. Slots 0..NUM_SLOTS-2 each compute
// one folded product; the last slot computes nothing and only gives the ripple
// adders of the final addition stage time to settle. With 15 slots of 21
// clocks a sampling period is 315 clocks. The wrap is prepared one
// multiplication ahead by the registered flag `wrap`, as in the published
// design. `data_shift` is high on the `mult_done` clock of the last product
// slot: the delay line then takes the next sample.
//
// `res` low clears the counter synchronously.
module mac_sequencer #(
  parameter  int NUM_SLOTS = 15,
  localparam int SLOT_W    = $clog2(NUM_SLOTS)
) (
  input  logic              clk,
  input  logic              res,
  input  logic              mult_done,
  output logic [SLOT_W-1:0] slot,
  output logic              data_shift
);
  localparam logic [SLOT_W-1:0] LAST_SLOT = SLOT_W'(NUM_SLOTS - 1);
  localparam logic [SLOT_W-1:0] LAST_PROD = SLOT_W'(NUM_SLOTS - 2);

  logic wrap;

  assign data_shift = mult_done && (slot == LAST_PROD);

  always_ff @(posedge clk) begin
    if (!res) begin
      slot <= '0;
      wrap <= 1'b0;
    end else begin
      wrap <= (slot == LAST_SLOT);
      if (mult_done)
        slot <= wrap ? '0 : slot + SLOT_W'(1);
    end
  end
endmodule
