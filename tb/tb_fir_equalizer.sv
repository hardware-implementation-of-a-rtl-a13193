// tb_fir_equalizer: end-to-end run of the whole equalizer at its default
// sizes, with both clocks at their nominal rates (72 ns filter clock, 271.27 ns
// receiver clock), repeating the evaluation the filter was designed for.
//
// The three coefficient sets are downloaded one after the other through the
// serial line while the filter keeps running (14 bytes each, centre
// coefficient first), and each is exercised with the signals it was judged by:
//   low-pass   step from 0 to 100, then a 3 kHz square wave of +-100;
//   high-pass  the same step and the same 3 kHz square wave;
//   equalizer  a sine sweep of amplitude 100 from 0 Hz to 22.05 kHz, the
//              Nyquist limit of the 44.1 kHz sampling rate.
// Once per sampling period, at the start of the A/D conversion, the D/A word is
// compared with a reference model (fir_model_pkg) of the sample history, except
// within three periods of a coefficient change, when old and new coefficients
// mix. The settled step outputs are also checked on their own: the low-pass
// set passes DC with its gain of 507/16 (3166 after truncation), the high-pass
// set all but blocks it.
//
// Mechanisms that must each occur: coefficient shifts (42), received bytes
// (42), coefficient-set switches (2), negative products with sign restore,
// products with dropped low bits, idle wait slots, samples loaded inside the
// A/D read window (all of them), 315-clock sampling periods, and A/D
// conversions that respect the converter's conversion time.
module tb_fir_equalizer;
  import fir_model_pkg::*;

  logic        clk = 0, uart_clk = 0, res = 0, uart_rst_n = 0, serial_in = 0;
  logic [7:0]  adc_data, next_sample = '0;
  logic [15:0] outdata;
  logic        chip_select_n, read_n, write_n, ck;
  int          conversions, violations;
  int checks = 0, failures = 0;

  fir_equalizer dut (.clk, .uart_clk, .res, .uart_rst_n, .serial_in, .adc_data,
                     .outdata, .chip_select_n, .read_n, .write_n, .ck);

  adc1241_model adc (.clk, .chip_select_n, .write_n, .read_n, .ck, .next_sample,
                     .data(adc_data), .conversions, .violations);

  always #36 clk = ~clk;
  always #135.63 uart_clk = ~uart_clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- mechanism counters, from the filter's internal strobes ----
  int n_coef_shift = 0, n_neg = 0, n_trunc = 0, n_idle = 0, n_loads = 0;
  int n_load_outside = 0, n_words = 0, n_periods_ok = 0, n_periods_bad = 0;
  int n_compared = 0, n_skipped = 0, n_switch = 0;
  int cyc = 0, last_load = -1;
  logic prev_stop = 0;

  always @(posedge clk) begin
    cyc++;
    if (res) begin
      if (dut.u_fir.u_coef.shift_edge) n_coef_shift++;
      if (dut.u_fir.mult_done && dut.u_fir.slot < 4'd14) begin
        if (dut.u_fir.neg && dut.u_fir.mag != 0) n_neg++;
        if (dut.u_fir.mag[3:0] != 0) n_trunc++;
      end
      if (dut.u_fir.mult_done && dut.u_fir.slot == 4'd14) n_idle++;
      if (dut.u_fir.data_shift) begin
        n_loads++;
        if (chip_select_n || read_n) n_load_outside++;
        if (last_load >= 0) begin
          if (cyc - last_load == 315) n_periods_ok++; else n_periods_bad++;
        end
        last_load = cyc;
      end
    end
  end

  always @(posedge uart_clk) begin
    if (dut.stop_receiving && !prev_stop) n_words++;
    prev_stop <= dut.stop_receiving;
  end

  // ---- serial download, inverted line, 128 receiver clocks per bit ----
  bit busy = 0;
  int last_change = 0;
  coefs_t model_c;
  int pending [$];

  task automatic send_byte(logic [7:0] b);
    @(negedge uart_clk);
    serial_in = 1;
    repeat (128) @(negedge uart_clk);
    for (int i = 0; i < 8; i++) begin
      serial_in = ~b[i];
      repeat (128) @(negedge uart_clk);
    end
    serial_in = 0;
    repeat (128 + 40) @(negedge uart_clk);
  endtask

  task automatic download(int set_c [NCOEF]);
    busy = 1;
    for (int n = 0; n < NCOEF; n++) send_byte(8'(set_c[n]));
    model_c = to_register_order(set_c);
    last_change = cyc;
    busy = 0;
  endtask

  // ---- sample history and output comparison at each WR fall ----
  int hist [$];          // hist[0] = newest sample handed to the converter
  logic prev_wr = 1;
  int mode = 0;          // 0 step, 1 square wave, 2 sweep
  int sample_no = 0;
  real phase = 0.0;

  localparam real FS = 44100.0;
  localparam real PI = 3.14159265358979;
  localparam int  SWEEP_SAMPLES = 240;

  // Square wave: the sign of a 3 kHz sine sampled at 44.1 kHz. Sweep: the
  // frequency rises linearly from 0 Hz to FS/2 over SWEEP_SAMPLES samples.
  function automatic int stimulus(int m, int n);
    case (m)
      0: return (n < 5) ? 0 : 100;
      1: return (((n * 6000) / 44100) % 2 == 0) ? 100 : -100;
      default: begin
        real f;
        f = (FS / 2.0) * real'(n) / real'(SWEEP_SAMPLES);
        phase = phase + 2.0 * PI * f / FS;
        return int'($rtoi(100.0 * $sin(phase)));
      end
    endcase
  endfunction

  function automatic int dac_value(logic [15:0] code);
    return int'($signed({code[15], ~code[14:0]}));
  endfunction

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
      end else begin
        n_skipped++;
      end
      v = 8'(stimulus(mode, sample_no));
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
    // 3 downloads of about 5 ms plus 450 periods of 22.7 us: about 26 ms.
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model_c[i]) model_c[i] = 0;
    repeat (5) @(posedge clk);
    res = 1; uart_rst_n = 1;
    repeat (2000) @(posedge clk);

    download(LOWPASS);
    mode = 0; sample_no = 0;
    repeat (40 * 315) @(posedge clk);
    // Settled step response: 100 * sum of folded coefficients, truncated.
    check(dac_value(outdata) == 3166, "low-pass step settles at 3166");
    mode = 1; sample_no = 0;
    repeat (60 * 315) @(posedge clk);

    download(HIGHPASS);
    n_switch++;
    mode = 0; sample_no = 0;
    repeat (40 * 315) @(posedge clk);
    // The high-pass set has a DC gain of 1/16: the step all but disappears.
    check(dac_value(outdata) >= -16 && dac_value(outdata) <= 16,
          $sformatf("high-pass step settles near 0 (got %0d)", dac_value(outdata)));
    mode = 1; sample_no = 0;
    repeat (60 * 315) @(posedge clk);

    download(EQUALIZER);
    n_switch++;
    mode = 2; sample_no = 0; phase = 0.0;
    repeat ((SWEEP_SAMPLES + 10) * 315) @(posedge clk);

    $display("coefficient shifts %0d, bytes %0d, set switches %0d", n_coef_shift, n_words, n_switch);
    $display("negative products %0d, truncated products %0d, idle slots %0d", n_neg, n_trunc, n_idle);
    $display("samples loaded %0d (outside read window %0d), 315-clock periods %0d (other %0d)",
             n_loads, n_load_outside, n_periods_ok, n_periods_bad);
    $display("A/D conversions %0d, timing violations %0d", conversions, violations);
    $display("outputs compared %0d, skipped around coefficient changes %0d", n_compared, n_skipped);
    check(n_coef_shift == 42, "42 coefficient shifts");
    check(n_words == 42, "42 bytes received");
    check(n_switch == 2, "coefficient sets switched");
    check(n_neg > 0, "negative products occurred");
    check(n_trunc > 0, "truncated products occurred");
    check(n_idle > 0, "idle slots occurred");
    check(n_loads > 0 && n_load_outside == 0, "all loads inside the A/D read window");
    check(n_periods_ok > 0 && n_periods_bad == 0, "sampling period of 315 clocks");
    check(conversions > 0 && violations == 0, "A/D conversion time respected");
    check(n_compared >= 200, "enough outputs compared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
