// tb_serial_mult: checks the 9-bit signed serial multiplier.
// Operands are changed right after each mult_done and must give, at the next
// mult_done, the magnitude/sign pair and (one clock later) the signed result
// of their product. The spacing of mult_done pulses must be 21 clocks. The
// first case is 12 x 13, whose product register must read 13 at count 2 and
// 3078 at count 4 and end at 156.
module tb_serial_mult;
  logic        clk = 0, res = 0;
  logic [8:0]  mplier, mcand;
  logic [4:0]  count;
  logic        mult_start, mult_done, neg;
  logic [17:0] mag;
  logic [16:0] result;
  int checks = 0, failures = 0;
  int cyc = 0, last_done = -1;

  serial_mult dut (.clk, .res, .mplier, .mcand, .count, .mult_start, .mult_done,
                   .neg, .mag, .result);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, p;
    a = 12; b = 13;
    mplier = 9'(a); mcand = 9'(b);
    repeat (3) @(posedge clk);
    res <= 1;
    // First multiplication: trace points of the published simulation.
    @(negedge clk iff count == 5'd2);
    check(mag, 13, "product register at count 2");
    @(negedge clk iff count == 5'd4);
    check(mag, 3078, "product register at count 4");
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk iff mult_done);
      p = a * b;
      if (p != 0) check(neg, p < 0, "sign");
      check(mag, (p < 0) ? -p : p, "magnitude");
      if (last_done >= 0) check(cyc - last_done, 21, "cycles per product");
      last_done = cyc;
      // New operands for the next multiplication; avoid -256 x -256 whose
      // product does not fit the 17-bit signed result.
      case (n % 4)
        0: begin a = int'($signed(9'($urandom))); b = int'($signed(8'($urandom))); end
        1: begin a = -256; b = -128; end
        2: begin a = int'($signed(9'($urandom))); b = int'($signed(9'($urandom))); end
        default: begin a = 255; b = -255; end
      endcase
      if (a == -256 && b == -256) b = -255;
      @(posedge clk); #1;
      mplier = 9'(a); mcand = 9'(b);
      check(int'($signed(result)), p, "signed result");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
