// tb_fold_adders: random (and extreme) delay-line contents; each folded sum
// must equal x[k] + x[26-k] as signed integers, the centre entry x[13].
module tb_fold_adders;
  logic [26:0][7:0] taps;
  logic [13:0][8:0] folded;
  int checks = 0, failures = 0;

  fold_adders dut (.taps, .folded);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 27; i++) begin
        case (n)
          0: taps[i] = 8'h80;
          1: taps[i] = 8'h7F;
          default: taps[i] = 8'($urandom);
        endcase
      end
      #1;
      for (int k = 0; k < 13; k++) begin
        checks++;
        if (int'($signed(folded[k])) != int'($signed(taps[k])) + int'($signed(taps[26-k]))) begin
          failures++;
          if (failures < 10) $display("FAIL pair %0d", k);
        end
      end
      checks++;
      if (int'($signed(folded[13])) != int'($signed(taps[13]))) failures++;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
