// fir_equalizer: digital core of a real-time audio equalizer whose frequency
// response is set by downloading FIR coefficients from a PC.
//
// Two clock domains side by side. The FIR filter (fir_filter) runs on `clk`
// (13.89 MHz, 315 clocks per 44.1 kHz sample), reads 8-bit samples from an
// external A/D converter through `adc_data` and the active-low
// CS/RD/WR lines and its clock `ck`, and presents 16-bit words for a D/A
// converter on `outdata`. The serial receiver (uart_rx) runs on `uart_clk`
// (3.6864 MHz) and decodes 28,800-baud bytes from `serial_in`. Its word
// and its StopReceiving strobe go straight to the filter's coefficient input;
// the filter finds the strobe's rising edge in its own clock domain, so the
// filter clock can be changed without touching the receiver.
//
// To load a filter, send 14 bytes: the centre coefficient first, the
// coefficient of the outermost tap pair last. `res` clears the filter,
// `uart_rst_n` the receiver; both are synchronous and active low.
// The partitioning (receiver and filter as separate units joined only by the
// strobe) is the published design.
module fir_equalizer
  import fir_pkg::*;
(
  input  logic              clk,
  input  logic              uart_clk,
  input  logic              res,
  input  logic              uart_rst_n,
  input  logic              serial_in,
  input  logic [DATA_W-1:0] adc_data,
  output logic [OUT_W-1:0]  outdata,
  output logic              chip_select_n,
  output logic              read_n,
  output logic              write_n,
  output logic              ck
);
  logic [7:0] rx_word;
  logic       stop_receiving;

  uart_rx u_rx (
    .clk           (uart_clk),
    .rst_n         (uart_rst_n),
    .data_in       (serial_in),
    .data_out      (rx_word),
    .stop_receiving(stop_receiving)
  );

  fir_filter u_fir (
    .clk, .res,
    .datain   (adc_data),
    .shiftcoef(stop_receiving),
    .coeffin  (rx_word),
    .outdata, .chip_select_n, .read_n, .write_n, .ck
  );
endmodule
