// tb_uart_tx: sends bytes back to back and samples txd in the middle of each
// 10-clock bit period; checks start bit, data bits LSB first, stop bit, the
// ready flag and the frame length.
module tb_uart_tx;
  localparam int DIV = 10;
  logic clk = 0, rst_n = 0;
  logic [7:0] data = 0;
  logic start = 0, ready, txd;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  uart_tx #(.CLK_HZ(1_000_000), .BAUD(100_000)) dut (.clk(clk), .rst_n(rst_n), .data(data), .start(start), .ready(ready), .txd(txd));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1;
    check(txd == 1 && ready, "idle line high, ready");
    for (int n = 0; n < 30; n++) begin
      logic [7:0] b;
      int len;
      b = 8'($urandom);
      len = 0;
      while (!ready) @(posedge clk);
      #1 data = b; start = 1;
      @(posedge clk); #1 start = 0; data = ~b;
      // find the start bit edge
      while (txd) begin @(posedge clk); #1; len++; end
      check(len <= 2, "start bit follows at once");
      repeat (DIV / 2) @(posedge clk); #1;
      check(txd == 0 && !ready, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(posedge clk); #1;
        check(txd == b[i], $sformatf("data bit %0d of %02h", i, b));
      end
      repeat (DIV) @(posedge clk); #1;
      check(txd == 1, "stop bit");
      check(!ready, "busy through the stop bit");
      repeat (DIV) @(posedge clk); #1;
      check(ready, "ready after the frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
