// ad_controller: control lines of the external A/D converter, locked to the
// filter's sampling period.
//
// The converter wants a clock near 2 MHz. `ck` is a one-clock pulse derived
// from the multiplier's operation counter: it is set after counts 0, 7 and 14
// of every 21-clock multiplication, i.e. once every 7 system clocks (13.89 MHz
// / 7 = 1.98 MHz). The controller counter `adcount` advances on every `ck`
// pulse and runs 0..AD_LAST (45 steps = 315 system clocks, one sampling
// period); `adreset` is the registered "adcount == AD_LAST" flag that makes it
// wrap. The active-low outputs are registered decodes of `adcount`:
//
//   adcount   0      : CS low                (select)
//   adcount   1      : CS low, WR low        (start acquisition/conversion)
//   adcount   2..36  : all high              (conversion, 34 A/D clocks)
//   adcount  37      : CS low
//   adcount  38..44  : CS low, RD low        (converter drives its data)
//
// `res` low holds all three lines high and clears the counters
// (synchronously). After reset the filter takes its new sample at the end of
// product slot 13, when adcount is 42, so inside the read window.
//
// Everything here follows the published controller; `adcount` is brought out
// only for observation. The two assertions at the end (WR and RD never low
// together, neither low without CS) are this design's own additions.
module ad_controller #(
  parameter int AD_LAST = 44
) (
  input  logic       clk,
  input  logic       res,
  input  logic [4:0] count,
  output logic       ck,
  output logic       chip_select_n,
  output logic       write_n,
  output logic       read_n,
  output logic [5:0] adcount
);
  logic adreset;

  always_ff @(posedge clk) begin
    if (!res) begin
      ck            <= 1'b0;
      adcount       <= '0;
      adreset       <= 1'b0;
      chip_select_n <= 1'b1;
      write_n       <= 1'b1;
      read_n        <= 1'b1;
    end else begin
      ck      <= (count == 5'd0) || (count == 5'd7) || (count == 5'd14);
      adreset <= (adcount == 6'(AD_LAST));
      if (ck)
        adcount <= adreset ? '0 : adcount + 6'd1;
      if (adcount == 6'd0) begin
        chip_select_n <= 1'b0; write_n <= 1'b1; read_n <= 1'b1;
      end else if (adcount == 6'd1) begin
        chip_select_n <= 1'b0; write_n <= 1'b0; read_n <= 1'b1;
      end else if (adcount < 6'd37) begin
        chip_select_n <= 1'b1; write_n <= 1'b1; read_n <= 1'b1;
      end else if (adcount == 6'd37) begin
        chip_select_n <= 1'b0; write_n <= 1'b1; read_n <= 1'b1;
      end else begin
        chip_select_n <= 1'b0; write_n <= 1'b1; read_n <= 1'b0;
      end
    end
  end

  // Bus rules of the converter: writing and reading never overlap, and
  // neither happens without the chip selected.
  a_wr_rd_exclusive: assert property (@(posedge clk) disable iff (!res)
                                       !(!write_n && !read_n));
  a_strobe_needs_cs: assert property (@(posedge clk) disable iff (!res)
                                      (!write_n || !read_n) |-> !chip_select_n);
endmodule
