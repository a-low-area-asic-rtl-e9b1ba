// uart_apb_bridge: turns byte commands from a UART into APB transfers.
//
// Protocol, as in the design's FPGA version: a write is three bytes -- a
// control byte asking for a write, the address, the data byte; a read is
// two bytes -- a control byte asking for a read and the address -- after
// which the byte read over APB is sent back over the UART. The control byte
// values (CMD_WRITE = 'W' = 0x57, CMD_READ = 'R' = 0x52) are this
// implementation's choice; any other byte in the command position is
// dropped, which lets the host resynchronise.
//
// Interface: rx_data/rx_valid from a UART receiver, tx_data/tx_start/
// tx_ready to a UART transmitter, and an APB master port (no wait states:
// one setup and one access cycle per transfer).
module uart_apb_bridge #(
  parameter logic [7:0] CMD_WRITE = 8'h57,
  parameter logic [7:0] CMD_READ  = 8'h52
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] rx_data,
  input  logic       rx_valid,
  output logic [7:0] tx_data,
  output logic       tx_start,
  input  logic       tx_ready,
  output logic       psel,
  output logic       penable,
  output logic       pwrite,
  output logic [7:0] paddr,
  output logic [7:0] pwdata,
  input  logic [7:0] prdata
);

  typedef enum logic [2:0] {B_CMD, B_ADDR, B_DATA, B_SETUP, B_ACCESS, B_SEND} br_state_e;

  br_state_e st;
  logic      is_write;

  assign psel     = (st == B_SETUP) || (st == B_ACCESS);
  assign penable  = (st == B_ACCESS);
  assign pwrite   = is_write;
  assign tx_start = (st == B_SEND) && tx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= B_CMD;
      is_write <= 1'b0;
      paddr    <= '0;
      pwdata   <= '0;
      tx_data  <= '0;
    end else begin
      unique case (st)
        B_CMD:
          if (rx_valid && (rx_data == CMD_WRITE || rx_data == CMD_READ)) begin
            is_write <= (rx_data == CMD_WRITE);
            st       <= B_ADDR;
          end
        B_ADDR:
          if (rx_valid) begin
            paddr <= rx_data;
            st    <= is_write ? B_DATA : B_SETUP;
          end
        B_DATA:
          if (rx_valid) begin
            pwdata <= rx_data;
            st     <= B_SETUP;
          end
        B_SETUP:  st <= B_ACCESS;
        B_ACCESS: begin
          if (!is_write) tx_data <= prdata;
          st <= is_write ? B_CMD : B_SEND;
        end
        default:  // B_SEND
          if (tx_ready) st <= B_CMD;
      endcase
    end
  end

endmodule
