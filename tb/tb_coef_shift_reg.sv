// tb_coef_shift_reg: drives the strobe from an unrelated clock with high
// times of varying length and loads the 14 low-pass coefficients
// (127, 113, 76, 33, 0, -16, -16, -8, 0, 4, 3, 1, 0, 0). Each rising edge
// must give exactly one shift_edge pulse, the first value must end up in the
// centre position coefs[13], and a strobe already high at reset must not
// shift.
module tb_coef_shift_reg;
  import fir_model_pkg::*;
  logic clk = 0, res = 0, shiftcoef = 1;
  logic [7:0] coeffin = '0;
  logic shift_edge;
  logic [13:0][7:0] coefs;
  int checks = 0, failures = 0, edges = 0;

  coef_shift_reg dut (.clk, .res, .shiftcoef, .coeffin, .shift_edge, .coefs);

  always #5 clk = ~clk;
  always @(posedge clk) if (res && shift_edge) edges++;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #3 res = 1;                        // strobe is still high here
    repeat (10) @(posedge clk);
    checks++;
    if (edges != 0) begin failures++; $display("FAIL shift from a strobe high at reset"); end
    #7 shiftcoef = 0;
    for (int n = 0; n < NCOEF; n++) begin
      #(37 + 13 * n) coeffin = 8'(LOWPASS[n]);
      #(11) shiftcoef = 1;             // rising edge, asynchronous to clk
      #(20 + 29 * (n % 4)) shiftcoef = 0;
      #(5);
      checks++;
      if (edges != n + 1) begin failures++; $display("FAIL edge count %0d after word %0d", edges, n); end
    end
    repeat (3) @(posedge clk);
    for (int k = 0; k < NCOEF; k++) begin
      checks++;
      if (int'($signed(coefs[k])) != LOWPASS[NCOEF-1-k]) begin
        failures++;
        $display("FAIL coefs[%0d] = %0d, expected %0d", k, $signed(coefs[k]), LOWPASS[NCOEF-1-k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
