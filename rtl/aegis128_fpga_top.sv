// aegis128_fpga_top: the AEGIS128 core behind a UART, for an FPGA board.
//
// The host talks to the unchanged core over a serial line: uart_rx collects
// bytes, uart_apb_bridge turns "write" (control, address, data) and "read"
// (control, address) commands into APB transfers on the core's 8-bit
// slave port, and uart_tx returns the byte of every read. The structure is
// the design's FPGA version; the 8N1 frame, the rate (BAUD) and the command
// codes are this implementation's choices. CLK_HZ is the 100 MHz target.
module aegis128_fpga_top #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic clk,
  input  logic rst_n,
  input  logic uart_rxd,
  output logic uart_txd
);

  logic [7:0] rx_data, tx_data;
  logic       rx_valid, tx_start, tx_ready;
  logic       psel, penable, pwrite;
  logic [7:0] paddr, pwdata, prdata;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk(clk), .rst_n(rst_n), .rxd(uart_rxd), .data(rx_data), .valid(rx_valid)
  );

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk(clk), .rst_n(rst_n), .data(tx_data), .start(tx_start), .ready(tx_ready),
    .txd(uart_txd)
  );

  uart_apb_bridge u_bridge (
    .clk(clk), .rst_n(rst_n),
    .rx_data(rx_data), .rx_valid(rx_valid),
    .tx_data(tx_data), .tx_start(tx_start), .tx_ready(tx_ready),
    .psel(psel), .penable(penable), .pwrite(pwrite), .paddr(paddr),
    .pwdata(pwdata), .prdata(prdata)
  );

  aegis128_top u_core (
    .pclk(clk), .presetn(rst_n), .psel(psel), .penable(penable), .pwrite(pwrite),
    .paddr(paddr), .pwdata(pwdata), .prdata(prdata)
  );

endmodule
