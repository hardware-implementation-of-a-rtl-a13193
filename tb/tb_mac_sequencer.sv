// tb_mac_sequencer: pulses mult_done every 21 clocks and checks that the slot
// runs 0, 1, .., 14, 0, .. (15 slots = 315 clocks per period) and that
// data_shift is high only on the mult_done clock of slot 13.
module tb_mac_sequencer;
  logic clk = 0, res = 0, mult_done = 0;
  logic [3:0] slot;
  logic data_shift;
  int checks = 0, failures = 0, cyc = 0, shifts = 0, last_shift = -1;

  mac_sequencer dut (.clk, .res, .mult_done, .slot, .data_shift);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_slot;
    repeat (2) @(posedge clk);
    #1 res = 1;
    exp_slot = 0;
    for (int n = 0; n < 15 * 21 * 20; n++) begin
      mult_done = (n % 21) == 20;
      #1;
      checks++;
      if (int'(slot) != exp_slot) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d slot %0d expected %0d", n, slot, exp_slot);
      end
      checks++;
      if (data_shift != (mult_done && exp_slot == 13)) failures++;
      if (data_shift) begin
        if (last_shift >= 0) begin
          checks++;
          if (n - last_shift != 315) failures++;
        end
        last_shift = n;
        shifts++;
      end
      @(posedge clk); #1;
      if (mult_done) exp_slot = (exp_slot + 1) % 15;
    end
    checks++;
    if (shifts != 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
