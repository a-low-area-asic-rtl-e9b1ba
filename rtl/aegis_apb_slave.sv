// aegis_apb_slave: 8-bit AMBA APB slave and register map of the AEGIS128 core.
//
// Register map (byte addresses):
//   0x00        CONTROL  bit0 R/W decrypt mode (written in IDLE only)
//                        bit1 W   start        bit2 R  busy
//                        bit3 W   reset        bits 6:4 R  host state
//                        bit7     reserved, reads 0
//   0x10-0x1F   DATA     writes: key (IDLE), AD block (LOAD_AD),
//                        message block (LOAD_DATA); reads: result block
//                        (READ_CIPHER), 0x00 in any other state
//   0x20-0x2F   TAG      writes: IV (IDLE), adlen at 0x20-0x27 and msglen at
//                        0x28-0x2F (LOAD_LEN); reads: tag (READ_TAG), 0x00
//                        otherwise. Writes in other states are ignored.
// Byte n of a 128-bit register sits at offset n, so the address bits [3:0]
// select the byte lane directly (16-byte aligned registers); lengths are
// little-endian 64-bit numbers of bits. While the core is BUSY, writes to
// DATA and TAG are ignored. The map, the state rules for TAG and the
// alignment follow the design; the positions of the control bits, the
// read rule for DATA and the lane order are this implementation's choices.
//
// Protocol: APB without wait states (AMBA 2 APB signal set). A write takes
// effect at the end of its access phase (psel & penable & pwrite); prdata is
// combinational and valid during the access phase of a read.
module aegis_apb_slave
  import aegis_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // APB
  input  logic          psel,
  input  logic          penable,
  input  logic          pwrite,
  input  logic [7:0]    paddr,
  input  logic [7:0]    pwdata,
  output logic [7:0]    prdata,
  // core side
  input  host_state_e   state,
  input  logic          decrypt,
  input  logic          busy,
  input  logic [127:0]  data_q,
  input  logic [127:0]  tag_q,
  output bus_wr_t       bus_wr,
  output logic          ctrl_we,
  output logic [7:0]    ctrl_wdata
);

  logic       wr_access;
  logic [3:0] page, lane;

  assign wr_access = psel && penable && pwrite;
  assign page      = paddr[7:4];
  assign lane      = paddr[3:0];

  always_comb begin
    ctrl_we        = wr_access && (paddr == ADDR_CONTROL);
    ctrl_wdata     = pwdata;
    bus_wr.idx     = lane;
    bus_wr.wdata   = pwdata;
    bus_wr.data_we = wr_access && (page == PAGE_DATA) &&
                     (state inside {ST_IDLE, ST_LOAD_AD, ST_LOAD_DATA});
    bus_wr.tag_we  = wr_access && (page == PAGE_TAG) &&
                     (state inside {ST_IDLE, ST_LOAD_LEN});
  end

  always_comb begin
    prdata = 8'h00;
    if (psel && !pwrite) begin
      if (paddr == ADDR_CONTROL)
        prdata = {1'b0, state, 1'b0, busy, 1'b0, decrypt};
      else if (page == PAGE_DATA && state == ST_READ_CIPHER)
        prdata = data_q[8*lane +: 8];
      else if (page == PAGE_TAG && state == ST_READ_TAG)
        prdata = tag_q[8*lane +: 8];
    end
  end

  // APB rule: the access phase follows a setup phase with the same address.
  logic       setup_q;
  logic [7:0] addr_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      setup_q <= 1'b0;
      addr_q  <= '0;
    end else begin
      setup_q <= psel && !penable;
      addr_q  <= paddr;
    end

  assert property (@(posedge clk) disable iff (!rst_n)
    (psel && penable) |-> (setup_q && addr_q == paddr));

endmodule
