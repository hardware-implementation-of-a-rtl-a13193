// tb_sign_ext_adder: checks the ripple adder with automatic sign extension.
// The default 8-bit adder is checked exhaustively against the signed sum;
// a 4-bit instance is checked exhaustively too (including 5 + -3 = 2, the
// case a plain ripple adder gets wrong) and a 15-bit one on random operands.
module tb_sign_ext_adder;
  logic [7:0]  a8, b8;
  logic [8:0]  r8;
  logic [3:0]  a4, b4;
  logic [4:0]  r4;
  logic [14:0] a15, b15;
  logic [15:0] r15;
  int checks = 0, failures = 0;

  sign_ext_adder                dut   (.a(a8),  .b(b8),  .result(r8));
  sign_ext_adder #(.WIDTH(4))   dut4  (.a(a4),  .b(b4),  .result(r4));
  sign_ext_adder #(.WIDTH(15))  dut15 (.a(a15), .b(b15), .result(r15));

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -128; i < 128; i++)
      for (int j = -128; j < 128; j++) begin
        a8 = 8'(i); b8 = 8'(j); #1;
        check(int'($signed(r8)), i + j, "8-bit");
      end
    for (int i = -8; i < 8; i++)
      for (int j = -8; j < 8; j++) begin
        a4 = 4'(i); b4 = 4'(j); #1;
        check(int'($signed(r4)), i + j, "4-bit");
      end
    a4 = 4'd5; b4 = -4'sd3; #1;
    check(int'($signed(r4)), 2, "5 + -3");
    for (int n = 0; n < 20000; n++) begin
      int i, j;
      i = int'($signed(15'($urandom)));
      j = int'($signed(15'($urandom)));
      if (n == 0) begin i = -16384; j = -16384; end
      if (n == 1) begin i = 16383; j = 16383; end
      a15 = 15'(i); b15 = 15'(j); #1;
      check(int'($signed(r15)), i + j, "15-bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
