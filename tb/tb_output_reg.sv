// tb_output_reg: checks the complementary two's complement coding. An 8-bit
// instance is checked against the published code table (two's complement ->
// converter code: 7F->00, 7E->01, 02->7D, 01->7E, 00->7F, FF->80, FE->81,
// 81->FE, 80->FF); the 16-bit default against the rule, with holds between
// updates and the reset value (code of zero).
module tb_output_reg;
  logic clk = 0, res = 0, update = 0;
  logic [15:0] sum = '0, outdata;
  logic [7:0] sum8 = '0, out8;
  int checks = 0, failures = 0;

  output_reg              dut  (.clk, .res, .update, .sum, .outdata);
  output_reg #(.OUT_W(8)) dut8 (.clk, .res, .update, .sum(sum8), .outdata(out8));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] tc  [9] = '{8'h7F, 8'h7E, 8'h02, 8'h01, 8'h00, 8'hFF, 8'hFE, 8'h81, 8'h80};
    logic [7:0] ctc [9] = '{8'h00, 8'h01, 8'h7D, 8'h7E, 8'h7F, 8'h80, 8'h81, 8'hFE, 8'hFF};
    logic [15:0] prev;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (outdata != 16'h7FFF) failures++;
    res = 1;
    for (int i = 0; i < 9; i++) begin
      sum8 = tc[i]; update = 1;
      @(posedge clk); #1;
      checks++;
      if (out8 != ctc[i]) begin failures++; $display("FAIL table row %0d: %h", i, out8); end
    end
    for (int n = 0; n < 2000; n++) begin
      prev = outdata;
      sum = 16'($urandom);
      update = ($urandom % 2) == 1;
      @(posedge clk); #1;
      checks++;
      if (update ? (outdata != {sum[15], ~sum[14:0]}) : (outdata != prev)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
