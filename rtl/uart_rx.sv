// uart_rx: receiver that turns the PC's serial coefficient stream into 8-bit
// words.
//
// Line format: 28,800 baud, 8 data bits, LSB first, one start and one stop
// bit, on a line of inverted sense: idle and stop bit low, start bit high, a
// logical 1 low and a logical 0 high. With a 3.6864 MHz clock a bit lasts 128
// clocks.
//
// How it works. `data_in` passes two flip-flops (data_delay); a rising edge of
// the line while idle is the start bit and sets `receiving`. While receiving,
// `sample_count` counts 0..HALF_BIT-1 and restarts, giving a `bit_edge` every
// HALF_BIT clocks, i.e. at every bit centre and every bit boundary counted
// from the start edge. `bit_clock` toggles on each `bit_edge`; each time it
// rises (at a bit centre) the inverted line is shifted into the top of the
// 8-bit register and `bit_counter` increments. The first shift samples the
// start bit, the ninth the last data bit, after which the register holds the
// word and `bit_counter` is 9. Then `stop_receiving` goes high for three
// clocks, clears `receiving`, and the receiver waits for the next start bit.
// `data_out` holds the word until the next word's first data bit arrives.
//
// Own choices: all registers run on `clk` with enables, where the published
// receiver clocks its shift register and bit counter from the derived bit
// clock (events move by about one clock); a synchronous active-low `rst_n`.
module uart_rx #(
  parameter int HALF_BIT = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       data_in,
  output logic [7:0] data_out,
  output logic       stop_receiving
);
  localparam int SC_W = $clog2(HALF_BIT) + 1;
  localparam logic [SC_W-1:0] EDGE_AT = SC_W'(HALF_BIT - 2);

  logic [1:0]      data_delay;
  logic            receiving;
  logic [SC_W-1:0] sample_count;
  logic            sample_count_reset;
  logic [3:0]      bit_counter;
  logic            bit_clock;
  logic            start_edge, bit_edge, bit_tick;

  always_comb begin
    start_edge = data_delay[1] & ~data_delay[0];
    bit_edge   = receiving && (sample_count == EDGE_AT);
    bit_tick   = bit_edge && !bit_clock;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data_delay         <= '0;
      receiving          <= 1'b0;
      sample_count       <= '0;
      sample_count_reset <= 1'b0;
      bit_counter        <= '0;
      bit_clock          <= 1'b0;
      data_out           <= '0;
      stop_receiving     <= 1'b0;
    end else begin
      data_delay <= {data_in, data_delay[1]};
      receiving  <= start_edge | (receiving & ~stop_receiving);
      if (receiving) begin
        sample_count       <= sample_count_reset ? '0 : sample_count + SC_W'(1);
        sample_count_reset <= bit_edge;
      end else begin
        sample_count       <= '0;
        sample_count_reset <= 1'b0;
      end
      if (!receiving)
        bit_clock <= 1'b0;
      else if (bit_edge)
        bit_clock <= ~bit_clock;
      if (!receiving)
        bit_counter <= '0;
      else if (bit_tick)
        bit_counter <= bit_counter + 4'd1;
      if (bit_tick)
        data_out <= {~data_in, data_out[7:1]};
      stop_receiving <= (bit_counter == 4'd9);
    end
  end
endmodule
