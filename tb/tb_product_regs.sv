// tb_product_regs: writes random product magnitudes and signs into random
// slots; the addressed register must take +/- (magnitude >> 4) on 12 bits,
// the others must hold, and slot 14 must write nothing.
module tb_product_regs;
  logic clk = 0, res = 0, mult_done = 0, neg = 0;
  logic [3:0] slot = '0;
  logic [17:0] mag = '0;
  logic [13:0][11:0] prods;
  int checks = 0, failures = 0;
  int model [14];

  product_regs dut (.clk, .res, .mult_done, .slot, .neg, .mag, .prods);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    #1 res = 1;
    for (int n = 0; n < 3000; n++) begin
      int m, v;
      slot = 4'($urandom % 15);
      m = int'($urandom % 32769);
      mag = 18'(m);
      neg = 1'($urandom);
      mult_done = ($urandom % 2) == 1;
      @(posedge clk); #1;
      if (mult_done && slot < 14) begin
        v = m >> 4;
        if (neg) v = -v;
        v = v & 32'hFFF;
        model[slot] = v;
      end
      for (int k = 0; k < 14; k++) begin
        checks++;
        if (int'(prods[k]) != model[k]) begin
          failures++;
          if (failures < 10) $display("FAIL reg %0d: %0h vs %0h", k, prods[k], model[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
