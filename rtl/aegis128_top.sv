// aegis128_top: low-area AEGIS128 authenticated-encryption core.
//
// Three parts, as in the design: an 8-bit APB slave through which the host
// loads key, IV, lengths, associated data and message blocks and reads
// result blocks and the tag; a control unit (host-level state machine plus
// micro-sequencer); and a datapath with the 640-bit state, the shared DATA
// and TAG registers and a 128-bit accumulator ALU with one pipelined S-box.
// The host drives a whole AEAD operation through CONTROL writes (start,
// reset, mode) and polls CONTROL[6:4] for the state; see aegis_control_unit
// for the flow and cycle counts and aegis_apb_slave for the register map.
//
// Clock and reset: one clock (pclk), asynchronous active-low reset
// (presetn). APB transfers take two cycles and never wait.
module aegis128_top
  import aegis_pkg::*;
(
  input  logic       pclk,
  input  logic       presetn,
  input  logic       psel,
  input  logic       penable,
  input  logic       pwrite,
  input  logic [7:0] paddr,
  input  logic [7:0] pwdata,
  output logic [7:0] prdata
);

  host_state_e  state;
  logic         decrypt, busy, last_blk, ctrl_we;
  logic [7:0]   ctrl_wdata;
  logic [127:0] data_q, tag_q;
  bus_wr_t      bus_wr;
  uop_t         uop;

  aegis_apb_slave u_apb (
    .clk(pclk), .rst_n(presetn),
    .psel(psel), .penable(penable), .pwrite(pwrite), .paddr(paddr),
    .pwdata(pwdata), .prdata(prdata),
    .state(state), .decrypt(decrypt), .busy(busy),
    .data_q(data_q), .tag_q(tag_q),
    .bus_wr(bus_wr), .ctrl_we(ctrl_we), .ctrl_wdata(ctrl_wdata)
  );

  aegis_control_unit u_ctrl (
    .clk(pclk), .rst_n(presetn),
    .ctrl_we(ctrl_we), .ctrl_wdata(ctrl_wdata), .tag_q(tag_q),
    .state(state), .decrypt(decrypt), .busy(busy), .last_blk(last_blk),
    .uop(uop)
  );

  aegis_datapath u_dp (
    .clk(pclk), .rst_n(presetn), .uop(uop), .last_blk(last_blk),
    .bus_wr(bus_wr), .data_q(data_q), .tag_q(tag_q)
  );

endmodule
