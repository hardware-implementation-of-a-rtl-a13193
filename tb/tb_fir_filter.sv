// tb_fir_filter: the filter alone, default sizes, coefficients strobed in
// directly. Loads nine coefficient sets in turn (the evaluated low-pass set,
// the four presets of the PC download program, then four random sets, the
// last including -128), runs 40 sampling periods of random samples
// (including the extremes -128 and 127) with each, and compares the D/A word
// once per period with the reference model. Also checks the 315-clock period
// and that each sample is taken while the A/D read window is open.
module tb_fir_filter;
  import fir_model_pkg::*;

  logic        clk = 0, res = 0, shiftcoef = 0;
  logic [7:0]  datain, coeffin = '0, next_sample = '0;
  logic [15:0] outdata;
  logic        chip_select_n, read_n, write_n, ck;
  int          conversions, violations;
  int checks = 0, failures = 0, cyc = 0, last_load = -1, n_compared = 0;

  fir_filter dut (.clk, .res, .datain, .shiftcoef, .coeffin, .outdata,
                  .chip_select_n, .read_n, .write_n, .ck);

  adc1241_model adc (.clk, .chip_select_n, .write_n, .read_n, .ck, .next_sample,
                     .data(datain), .conversions, .violations);

  always #36 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (res && dut.data_shift) begin
      check(!chip_select_n && !read_n, "sample taken inside read window");
      if (last_load >= 0) check(cyc - last_load == 315, "315 clocks per sample");
      last_load = cyc;
    end
  end

  coefs_t model_c;
  int last_change = 0;
  bit busy = 0;

  task automatic load_set(int set_c [NCOEF]);
    busy = 1;
    for (int n = 0; n < NCOEF; n++) begin
      @(negedge clk);
      coeffin = 8'(set_c[n]);
      shiftcoef = 1;
      repeat (3) @(negedge clk);
      shiftcoef = 0;
      repeat (4) @(negedge clk);
    end
    model_c = to_register_order(set_c);
    last_change = cyc;
    busy = 0;
  endtask

  int hist [$];
  logic prev_wr = 1;
  int sample_no = 0;

  always @(posedge clk) begin
    if (res && prev_wr && !write_n) begin
      hist_t x;
      logic [7:0] v;
      for (int i = 0; i < NTAPS; i++) x[i] = (i + 2 < hist.size()) ? hist[i + 2] : 0;
      if (!busy && (cyc - last_change) > 3 * 315) begin
        logic [15:0] exp_code;
        exp_code = dac_code(expected_sum(x, model_c));
        check(outdata == exp_code, $sformatf("output %h expected %h", outdata, exp_code));
        n_compared++;
      end
      case (sample_no % 16)
        3: v = 8'h80;
        7: v = 8'h7F;
        default: v = 8'($urandom);
      endcase
      // Nonblocking: the converter model, latching on this same edge, takes
      // the previous value; this one is converted in the next period.
      next_sample <= v;
      sample_no++;
      hist.push_front(int'($signed(v)));
      if (hist.size() > 40) void'(hist.pop_back());
    end
    prev_wr <= write_n;
  end

  initial begin
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rnd [NCOEF];
    foreach (model_c[i]) model_c[i] = 0;
    repeat (5) @(posedge clk);
    res = 1;
    load_set(LOWPASS);
    repeat (40 * 315) @(posedge clk);
    load_set(PRESET_LP);
    repeat (40 * 315) @(posedge clk);
    load_set(PRESET_HP);
    repeat (40 * 315) @(posedge clk);
    load_set(PRESET_BP);
    repeat (40 * 315) @(posedge clk);
    load_set(PRESET_BS);
    repeat (40 * 315) @(posedge clk);
    for (int s = 0; s < 4; s++) begin
      foreach (rnd[i]) rnd[i] = int'($signed(8'($urandom)));
      if (s == 3) rnd[0] = -128;
      load_set(rnd);
      repeat (40 * 315) @(posedge clk);
    end
    check(n_compared >= 300, "enough outputs compared");
    check(conversions > 0 && violations == 0, "A/D timing");
    $display("outputs compared %0d", n_compared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
