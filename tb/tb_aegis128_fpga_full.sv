// tb_aegis128_fpga_full: one complete AEGIS128 encryption through the whole
// design at its default parameters (100 MHz clock, 115200 baud, so 868
// clocks per bit): key = IV = 0, no associated data, one zero block. The
// ciphertext and tag are checked against the published test vector.
module tb_aegis128_fpga_full;
  localparam int DIV = 100_000_000 / 115_200;
  logic clk = 0, rst_n = 0, rxd = 1, txd;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  aegis128_fpga_top dut (.clk(clk), .rst_n(rst_n), .uart_rxd(rxd), .uart_txd(txd));

  task automatic ser_send(logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin rxd = f[i]; repeat (DIV) @(posedge clk); #1; end
  endtask

  task automatic ser_recv(output logic [7:0] b);
    while (txd) @(posedge clk);
    repeat (DIV + DIV / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin b[i] = txd; repeat (DIV) @(posedge clk); end
    #1;
  endtask

  task automatic wr(logic [7:0] a, logic [7:0] d);
    ser_send(8'h57); ser_send(a); ser_send(d);
  endtask

  task automatic rd(logic [7:0] a, output logic [7:0] d);
    fork
      begin ser_send(8'h52); ser_send(a); end
      ser_recv(d);
    join
  endtask

  task automatic wait_state(logic [2:0] st);
    logic [7:0] d;
    do rd(8'h00, d); while (d[6:4] != st);
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200ms; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [127:0] c, t;
  logic [7:0] d;
  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    repeat (5) @(posedge clk); #1;
    for (int k = 0; k < 16; k++) begin wr(8'h10 + 8'(k), 8'h00); wr(8'h20 + 8'(k), 8'h00); end
    wr(8'h00, 8'h02);                       // start initialisation
    wait_state(3'd1);                       // LOAD_LEN
    for (int k = 0; k < 16; k++) wr(8'h20 + 8'(k), (k == 8) ? 8'h80 : 8'h00);  // msglen = 128
    wr(8'h00, 8'h02);
    wait_state(3'd3);                       // LOAD_DATA
    for (int k = 0; k < 16; k++) wr(8'h10 + 8'(k), 8'h00);
    wr(8'h00, 8'h02);
    wait_state(3'd4);                       // READ_CIPHER
    for (int k = 0; k < 16; k++) begin rd(8'h10 + 8'(k), d); c[8*k +: 8] = d; end
    check(c == 128'h7e7db0011f2e6dc12f1a2ba70f051b95, $sformatf("ciphertext %032h", c));
    wr(8'h00, 8'h02);
    wait_state(3'd5);                       // READ_TAG
    for (int k = 0; k < 16; k++) begin rd(8'h20 + 8'(k), d); t[8*k +: 8] = d; end
    check(t == 128'hf1d588e87e2122f44295247397a9d2a7, $sformatf("tag %032h", t));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
