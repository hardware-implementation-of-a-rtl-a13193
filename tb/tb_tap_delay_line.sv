// tb_tap_delay_line: shifts random samples into the 27-stage delay line with
// random gaps and compares every stage with a queue model; also checks that
// the line holds when shift_en is low and clears on res.
module tb_tap_delay_line;
  logic clk = 0, res = 0, shift_en = 0;
  logic [7:0] din;
  logic [26:0][7:0] taps;
  int checks = 0, failures = 0;
  int model [27];

  tap_delay_line dut (.clk, .res, .shift_en, .din, .taps);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < 27; i++) begin
      checks++;
      if (int'(taps[i]) != model[i]) begin
        failures++;
        if (failures < 10) $display("FAIL stage %0d: %0d vs %0d", i, taps[i], model[i]);
      end
    end
  endtask

  initial begin
    din = '0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    #1 compare();
    res = 1;
    for (int n = 0; n < 500; n++) begin
      shift_en = ($urandom % 3) != 0;
      din = 8'($urandom);
      @(posedge clk); #1;
      if (shift_en) begin
        for (int i = 26; i > 0; i--) model[i] = model[i-1];
        model[0] = int'(din);
      end
      compare();
    end
    res = 0;
    @(posedge clk); #1;
    foreach (model[i]) model[i] = 0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
