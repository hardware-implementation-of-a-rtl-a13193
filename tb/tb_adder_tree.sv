// tb_adder_tree: random and extreme sets of 14 signed 12-bit products; the
// 16-bit result must equal their integer sum (which always fits).
module tb_adder_tree;
  logic [13:0][11:0] prods;
  logic [15:0] sum;
  int checks = 0, failures = 0;

  adder_tree dut (.prods, .sum);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int s;
      s = 0;
      for (int k = 0; k < 14; k++) begin
        int v;
        case (n)
          0: v = -2048;
          1: v = 2047;
          2: v = (k == 13) ? -2048 : 0;
          default: v = int'($signed(12'($urandom)));
        endcase
        prods[k] = 12'(v);
        s += v;
      end
      #1;
      checks++;
      if (int'($signed(sum)) != s) begin
        failures++;
        if (failures < 10) $display("FAIL set %0d: %0d vs %0d", n, $signed(sum), s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
