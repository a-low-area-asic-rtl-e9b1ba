// tb_uart_apb_bridge: feeds command bytes straight into the bridge, models
// an APB slave with 256 bytes of memory and a UART transmitter that is busy
// for a few cycles per byte. Checks that write commands reach memory with
// a correct setup/access sequence, that read commands return the right byte
// through tx, and that stray bytes in the command position are ignored.
module tb_uart_apb_bridge;
  logic clk = 0, rst_n = 0;
  logic [7:0] rx_data = 0, tx_data, paddr, pwdata, prdata;
  logic rx_valid = 0, tx_start, tx_ready, psel, penable, pwrite;
  logic [7:0] mem [256];
  int checks = 0, failures = 0, tx_busy = 0, n_write = 0, n_bad_seq = 0;
  byte unsigned sent[$];
  always #5 clk = ~clk;
  uart_apb_bridge dut (.*);

  assign prdata  = (psel && !pwrite) ? mem[paddr] : 8'h00;
  assign tx_ready = (tx_busy == 0);
  logic setup_seen;
  always @(posedge clk) begin
    if (psel && penable && pwrite) begin mem[paddr] <= pwdata; n_write++; end
    if (psel && penable && !setup_seen) n_bad_seq++;
    setup_seen <= psel && !penable;
    if (tx_start) begin sent.push_back(tx_data); tx_busy <= 7; end
    else if (tx_busy != 0) tx_busy <= tx_busy - 1;
  end

  task automatic rx(logic [7:0] b);
    rx_data = b; rx_valid = 1;
    @(posedge clk); #1 rx_valid = 0;
    repeat (3) @(posedge clk); #1;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [7:0] ref_mem [256];
  initial begin
    for (int i = 0; i < 256; i++) begin mem[i] = 8'(i * 7); ref_mem[i] = 8'(i * 7); end
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      logic [7:0] a, d;
      a = 8'($urandom);
      d = 8'($urandom);
      if ($urandom_range(0, 1)) begin
        rx(8'h57); rx(a); rx(d);
        ref_mem[a] = d;
        check(mem[a] == d, $sformatf("write %02h to %02h", d, a));
      end else begin
        sent = {};
        rx(8'h52); rx(a);
        repeat (12) @(posedge clk); #1;
        check(sent.size() == 1 && sent[0] == ref_mem[a], $sformatf("read of %02h", a));
      end
      if (n % 10 == 0) rx(8'h00);   // stray byte
    end
    check(n_bad_seq == 0, "every access phase follows a setup phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
