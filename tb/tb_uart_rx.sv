// tb_uart_rx: sends 8N1 frames (10 clocks per bit) into the receiver and
// checks every received byte, that it arrives within the stop bit, and that
// a frame with a bad stop bit is dropped.
module tb_uart_rx;
  localparam int DIV = 10;
  logic clk = 0, rst_n = 0, rxd = 1;
  logic [7:0] data;
  logic valid;
  int checks = 0, failures = 0;
  byte unsigned got[$];
  longint cyc = 0, t_valid;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (valid) begin got.push_back(data); t_valid = cyc; end
  uart_rx #(.CLK_HZ(1_000_000), .BAUD(100_000)) dut (.clk(clk), .rst_n(rst_n), .rxd(rxd), .data(data), .valid(valid));

  task automatic send(logic [7:0] b, bit stop = 1);
    logic [9:0] f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin rxd = f[i]; repeat (DIV) @(posedge clk); #1; end
    rxd = 1; repeat (DIV) @(posedge clk); #1;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  byte unsigned sent[$];
  longint t0;
  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    repeat (5) @(posedge clk); #1;
    for (int i = 0; i < 40; i++) begin
      logic [7:0] b;
      b = (i < 2) ? ((i == 0) ? 8'h00 : 8'hff) : 8'($urandom);
      got = {};
      t0 = cyc;
      send(b);
      check(got.size() == 1 && got[0] == b, $sformatf("byte %02h received", b));
      // valid comes during the stop bit: 9 to 10.5 bit periods after the start edge
      check(t_valid - t0 >= 9 * DIV && t_valid - t0 <= 11 * DIV, "receive latency");
    end
    got = {};
    send(8'h5a, 0);        // framing error
    repeat (3 * DIV) @(posedge clk); #1;
    check(got.size() == 0, "byte with bad stop bit dropped");
    send(8'hc3);
    check(got.size() == 1 && got[0] == 8'hc3, "recovers after framing error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
