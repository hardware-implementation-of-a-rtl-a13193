// tb_uart_rx: sends bytes at 128 clocks per bit on the inverted line (idle
// and stop low, start high, data inverted, LSB first). The first byte is 5:
// its register must pass through 80, 40, A0, 50, 28, 14, 0A, 05 as in the
// published simulation. Every byte must be on data_out when stop_receiving
// rises, 8.5 bit times (1088 clocks) plus at most a few clocks after the start
// edge, with one stop_receiving pulse per byte. Bytes are sent back to back
// and with gaps.
module tb_uart_rx;
  logic clk = 0, rst_n = 0, data_in = 0;
  logic [7:0] data_out;
  logic stop_receiving;
  int checks = 0, failures = 0, cyc = 0;
  int start_cyc, pulses = 0;
  logic prev_stop = 0;
  logic [7:0] seen [$];
  logic [7:0] expected [$];

  uart_rx dut (.clk, .rst_n, .data_in, .data_out, .stop_receiving);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (seen.size() == 0 || seen[$] != data_out) seen.push_back(data_out);
    if (stop_receiving && !prev_stop) begin
      pulses++;
      check(expected.size() > 0, "unexpected word");
      if (expected.size() > 0) begin
        logic [7:0] e;
        e = expected.pop_front();
        check(data_out == e, $sformatf("word %0h expected %0h", data_out, e));
      end
      check(cyc - start_cyc >= 1088 && cyc - start_cyc <= 1096,
            $sformatf("word ready %0d clocks after start edge", cyc - start_cyc));
    end
    prev_stop <= stop_receiving;
  end

  task automatic send(logic [7:0] b, int gap);
    expected.push_back(b);
    @(negedge clk);
    data_in = 1; start_cyc = cyc;
    repeat (128) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      data_in = ~b[i];
      repeat (128) @(negedge clk);
    end
    data_in = 0;
    repeat (128 + gap) @(negedge clk);
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] trace [9] = '{8'h00, 8'h80, 8'h40, 8'hA0, 8'h50, 8'h28, 8'h14, 8'h0A, 8'h05};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (50) @(posedge clk);
    seen.delete();
    send(8'd5, 300);
    check(seen.size() == 9, "register trace length for 5");
    for (int i = 0; i < 9 && i < seen.size(); i++)
      check(seen[i] == trace[i], $sformatf("trace step %0d: %0h", i, seen[i]));
    for (int n = 0; n < 40; n++) send(8'($urandom), (n % 3 == 0) ? 0 : int'($urandom % 500));
    repeat (200) @(posedge clk);
    check(pulses == 41, "one stop_receiving pulse per byte");
    check(expected.size() == 0, "all bytes received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
