// tb_ad_controller: feeds the controller the multiplier's 21-clock operation
// count and checks the converter timing over 20 sampling periods: CK one
// clock high in every 7, during counts 1, 8 and 15; one WR pulse of 7 clocks,
// one RD window of 49 clocks and 70 clocks of CS low per 315 clocks; CS low
// whenever WR or RD is low; WR starts 7 clocks after the RD window ends; adcount runs
// 0..44; all lines high while res is low.
module tb_ad_controller;
  logic clk = 0, res = 0;
  logic [4:0] count = '0;
  logic ck, chip_select_n, write_n, read_n;
  logic [5:0] adcount;
  int checks = 0, failures = 0;

  ad_controller dut (.clk, .res, .count, .ck, .chip_select_n, .write_n, .read_n, .adcount);

  always #5 clk = ~clk;
  always @(posedge clk) count <= !res ? 5'd0 : (count == 5'd20 ? 5'd0 : count + 5'd1);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ck_n, wr_n, rd_n, cs_n, max_ad, last_wr_fall, rd_rise, t;
    logic prev_wr, prev_rd;
    repeat (5) @(posedge clk); #1;
    check(chip_select_n && write_n && read_n && !ck, "idle in reset");
    res = 1;
    // Skip the first period, then measure 20.
    repeat (315) @(posedge clk);
    #1;
    ck_n = 0; wr_n = 0; rd_n = 0; cs_n = 0; max_ad = 0; last_wr_fall = -1; rd_rise = -1;
    prev_wr = write_n; prev_rd = read_n;
    for (t = 0; t < 315 * 20; t++) begin
      if (ck) begin
        ck_n++;
        check(count == 5'd1 || count == 5'd8 || count == 5'd15, "CK at counts 1, 8, 15");
      end
      if (!write_n) wr_n++;
      if (!read_n) rd_n++;
      if (!chip_select_n) cs_n++;
      if (int'(adcount) > max_ad) max_ad = int'(adcount);
      check(!chip_select_n || (write_n && read_n), "CS low during WR/RD");
      check(write_n || read_n, "WR and RD never both low");
      if (!prev_rd && read_n) rd_rise = t;
      if (prev_wr && !write_n) begin
        if (last_wr_fall >= 0) check(t - last_wr_fall == 315, "WR period 315");
        if (rd_rise >= 0) check(t - rd_rise == 7, "WR 7 clocks after RD ends");
        last_wr_fall = t;
      end
      prev_wr = write_n; prev_rd = read_n;
      @(posedge clk); #1;
    end
    check(ck_n == 45 * 20, "45 CK pulses per period");
    check(wr_n == 7 * 20, "WR low 7 clocks per period");
    check(rd_n == 49 * 20, "RD low 49 clocks per period");
    check(cs_n == 70 * 20, "CS low 70 clocks per period");
    check(max_ad == 44, "adcount reaches 44 and wraps");
    res = 0;
    repeat (2) @(posedge clk); #1;
    check(chip_select_n && write_n && read_n, "lines high after res");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
