// adc1241_model: behavioural stand-in for the external A/D converter, for
// testbenches only (not synthesizable logic; the real part is an analog chip).
//
// On the falling edge of WR (with CS low) it takes `next_sample` as the new
// conversion. It drives that value on `data` only while CS and RD are both
// low, and 0 otherwise, so a filter that read the bus outside the read window
// would see a wrong sample. It counts the converter clocks CK between the
// start of a conversion and the read; fewer than 34 (7 acquisition + 27
// conversion) is counted in `violations`. `conversions` counts WR pulses.
module adc1241_model (
  input  logic       clk,
  input  logic       chip_select_n,
  input  logic       write_n,
  input  logic       read_n,
  input  logic       ck,
  input  logic [7:0] next_sample,
  output logic [7:0] data,
  output int         conversions,
  output int         violations
);
  logic [7:0] conv = '0;
  logic       prev_wr = 1'b1, prev_rd = 1'b1;
  int         ck_since_wr = 0;

  initial begin
    conversions = 0;
    violations  = 0;
  end

  always @(posedge clk) begin
    if (prev_wr && !write_n && !chip_select_n) begin
      conv <= next_sample;
      conversions <= conversions + 1;
      ck_since_wr <= 0;
    end else if (ck) begin
      ck_since_wr <= ck_since_wr + 1;
    end
    if (prev_rd && !read_n && conversions > 0 && ck_since_wr < 34)
      violations <= violations + 1;
    prev_wr <= write_n;
    prev_rd <= read_n;
  end

  assign data = (!chip_select_n && !read_n) ? conv : 8'h00;
endmodule
