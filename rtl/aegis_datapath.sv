// aegis_datapath: registers and multiplexers of the AEGIS128 core.
//
// Holds the 640-bit STATE (five 128-bit words S0..S4), the shared DATA
// register (key, then associated data, message and result blocks, then the
// finalisation word tmp) and the shared TAG register (IV, then the two 64-bit
// lengths adlen = TAG[63:0] and msglen = TAG[127:64], then the tag). One
// operand multiplexer feeds the ALU from STATE, DATA, TAG, TEMP, the two
// AEGIS constants or the valid-bit mask; one result multiplexer writes the
// accumulator back into any register. All paths are 128 bits wide.
//
// TEMP is this design's addition: StateUpdate128 rewrites S0..S4 in a cycle
// of dependencies, and one new word has to be parked until the old S0 has
// been used. The mask keeps the first (msglen mod 128) bits of the last
// message block (all bits when msglen is a multiple of 128 or the block is
// not the last); bit i of the block is bit i of the 128-bit word.
//
// Interface: the control unit gives one micro-instruction (uop) per clock;
// a destination register takes the accumulator value of that same cycle.
// The bus port writes single bytes of DATA and TAG; the APB slave only
// issues such writes while the core is idle in a host state.
module aegis_datapath
  import aegis_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  uop_t          uop,
  input  logic          last_blk,   // current message block is the last one
  input  bus_wr_t       bus_wr,
  output logic [127:0]  data_q,
  output logic [127:0]  tag_q
);

  logic [127:0] s_q [5];
  logic [127:0] temp_q;
  logic [127:0] operand;
  logic [127:0] acc;
  logic [127:0] mask;
  logic [6:0]   rem_bits;

  aegis_alu u_alu (
    .clk(clk), .rst_n(rst_n), .op(uop.op), .idx(uop.idx),
    .operand(operand), .acc(acc)
  );

  assign rem_bits = tag_q[70:64];

  always_comb begin
    for (int i = 0; i < 128; i++)
      mask[i] = !last_blk || (rem_bits == 7'd0) || (i < int'(rem_bits));
  end

  always_comb begin
    unique case (uop.src)
      SRC_S0:   operand = s_q[0];
      SRC_S1:   operand = s_q[1];
      SRC_S2:   operand = s_q[2];
      SRC_S3:   operand = s_q[3];
      SRC_S4:   operand = s_q[4];
      SRC_DATA: operand = data_q;
      SRC_TAG:  operand = tag_q;
      SRC_TEMP: operand = temp_q;
      SRC_C0:   operand = CONST0;
      SRC_C1:   operand = CONST1;
      SRC_MASK: operand = mask;
      default:  operand = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < 5; j++) s_q[j] <= '0;
      data_q <= '0;
      tag_q  <= '0;
      temp_q <= '0;
    end else begin
      unique case (uop.dst)
        DST_S0:   s_q[0] <= acc;
        DST_S1:   s_q[1] <= acc;
        DST_S2:   s_q[2] <= acc;
        DST_S3:   s_q[3] <= acc;
        DST_S4:   s_q[4] <= acc;
        DST_DATA: data_q <= acc;
        DST_TAG:  tag_q  <= acc;
        DST_TEMP: temp_q <= acc;
        default: ;
      endcase
      if (bus_wr.data_we) data_q[8*bus_wr.idx +: 8] <= bus_wr.wdata;
      if (bus_wr.tag_we)  tag_q[8*bus_wr.idx +: 8]  <= bus_wr.wdata;
    end
  end

  // The bus and the sequencer never write the same register in one cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
    (bus_wr.data_we || bus_wr.tag_we) |-> uop.dst == DST_NONE);

endmodule
