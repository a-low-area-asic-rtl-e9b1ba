// uart_tx: 8N1 UART transmitter of the FPGA host link.
//
// A byte offered with start while ready is high is sent as a start bit,
// eight data bits LSB first and a stop bit, each CLK_HZ / BAUD clocks long;
// ready is low for the whole frame. txd idles high. Frame format and rate
// are this implementation's choices; the design only names a UART.
module uart_tx #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       start,
  output logic       ready,
  output logic       txd
);

  localparam int unsigned DIV = CLK_HZ / BAUD;
  localparam int CW = $clog2(DIV + 1);

  logic [CW-1:0] cnt;
  logic [3:0]    nbits;    // bit periods left in the frame, 0 = idle
  logic [9:0]    shreg;    // {stop, data, start}, sent LSB first

  assign ready = (nbits == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      nbits <= '0;
      shreg <= '1;
      txd   <= 1'b1;
    end else if (ready) begin
      txd <= 1'b1;
      if (start) begin
        shreg <= {1'b1, data, 1'b0};
        nbits <= 4'd11;   // 10 frame bits plus a full stop period
        cnt   <= '0;
      end
    end else if (cnt != '0) begin
      cnt <= cnt - 1'b1;
    end else begin
      txd   <= shreg[0];
      shreg <= {1'b1, shreg[9:1]};
      nbits <= nbits - 4'd1;
      cnt   <= CW'(DIV - 1);
    end
  end

endmodule
