// uart_rx: 8N1 UART receiver of the FPGA host link.
//
// Waits for a falling edge on rxd (start bit), checks the start bit at its
// middle, then samples eight data bits (LSB first) at the middle of each bit
// period and the stop bit. A byte with a valid stop bit is presented on
// data with a one-cycle valid pulse; a framing error drops the byte. rxd is
// synchronised with two flip-flops. The bit period is CLK_HZ / BAUD clocks.
// The design only names a UART; frame format, rate and this structure are
// this implementation's choices.
module uart_rx #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 115_200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid
);

  localparam int unsigned DIV = CLK_HZ / BAUD;
  localparam int CW = $clog2(DIV + 1);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_BITS, RX_STOP} rx_state_e;

  rx_state_e     st;
  logic [CW-1:0] cnt;
  logic [2:0]    bit_i;
  logic [7:0]    shreg;
  logic [1:0]    sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= RX_IDLE;
      cnt   <= '0;
      bit_i <= '0;
      shreg <= '0;
      sync  <= 2'b11;
      data  <= '0;
      valid <= 1'b0;
    end else begin
      sync  <= {sync[0], rxd};
      valid <= 1'b0;
      unique case (st)
        RX_IDLE:
          if (!sync[1]) begin st <= RX_START; cnt <= CW'(DIV / 2); end
        RX_START:
          if (cnt != '0) cnt <= cnt - 1'b1;
          else if (sync[1]) st <= RX_IDLE;           // glitch, not a start bit
          else begin st <= RX_BITS; cnt <= CW'(DIV - 1); bit_i <= '0; end
        RX_BITS:
          if (cnt != '0) cnt <= cnt - 1'b1;
          else begin
            shreg <= {sync[1], shreg[7:1]};
            cnt   <= CW'(DIV - 1);
            bit_i <= bit_i + 3'd1;
            if (bit_i == 3'd7) st <= RX_STOP;
          end
        default:  // RX_STOP
          if (cnt != '0) cnt <= cnt - 1'b1;
          else begin
            st <= RX_IDLE;
            if (sync[1]) begin data <= shreg; valid <= 1'b1; end
          end
      endcase
    end
  end

endmodule
