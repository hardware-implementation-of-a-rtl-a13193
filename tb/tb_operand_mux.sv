// tb_operand_mux: for every slot and random inputs, the multiplier operand
// must be the slot's folded sum and the multiplicand the slot's coefficient
// sign-extended to 9 bits; slot 14 and 15 must give zeros.
module tb_operand_mux;
  logic [3:0] slot;
  logic [13:0][8:0] folded;
  logic [13:0][7:0] coefs;
  logic [8:0] mplier, mcand;
  int checks = 0, failures = 0;

  operand_mux dut (.slot, .folded, .coefs, .mplier, .mcand);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int k = 0; k < 14; k++) begin
        folded[k] = 9'($urandom);
        coefs[k]  = 8'($urandom);
      end
      for (int s = 0; s < 16; s++) begin
        slot = 4'(s);
        #1;
        checks += 2;
        if (s < 14) begin
          if (mplier != folded[s]) failures++;
          if (int'($signed(mcand)) != int'($signed(coefs[s]))) failures++;
        end else begin
          if (mplier != 0) failures++;
          if (mcand != 0) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
