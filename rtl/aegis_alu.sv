// aegis_alu: 128-bit accumulator ALU of the AEGIS128 datapath.
//
// Every operation reads and rewrites the accumulator acc:
//   LOAD  acc <= operand                       1 cycle
//   XOR   acc <= acc ^ operand                 1 cycle
//   AND   acc <= acc & operand                 1 cycle
//   SR    acc <= ShiftRows(acc)                1 cycle (fixed byte wiring)
//   MC    column idx <= MixColumn(column idx)  1 cycle per column, 4 per block
//   SB    byte-serial SubBytes, one S-box      17 cycles, idx = 0..16
// SubBytes uses a single pipelined S-box: in step idx (0..15) byte idx of acc
// is fed to the S-box, and in step idx (1..16) its result for byte idx-1
// is written back, so a whole block takes 17 steps. The idx input chooses
// the bytes an operation works on, as the design describes; no inverse AES
// functions exist. NOP holds acc. acc is reset to zero (active-low rst_n).
module aegis_alu
  import aegis_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  alu_op_e       op,
  input  logic [4:0]    idx,
  input  logic [127:0]  operand,
  output logic [127:0]  acc
);

  logic [7:0]   sbox_in, sbox_out;
  logic [31:0]  mc_in, mc_out;
  logic [127:0] sr_out;
  logic [127:0] acc_next;
  logic [1:0]   col;

  assign col = idx[1:0];

  aes_sbox u_sbox (.clk(clk), .din(sbox_in), .dout(sbox_out));
  aes_mix_column u_mc (.col_in(mc_in), .col_out(mc_out));

  // ShiftRows: row r of column c takes row r of column (c + r) mod 4.
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr_out[8*(4*c + r) +: 8] = acc[8*(4*((c + r) % 4) + r) +: 8];
  end

  always_comb begin
    sbox_in = acc[8*idx[3:0] +: 8];
    mc_in   = acc[32*col +: 32];
  end

  always_comb begin
    acc_next = acc;
    unique case (op)
      ALU_LOAD: acc_next = operand;
      ALU_XOR:  acc_next = acc ^ operand;
      ALU_AND:  acc_next = acc & operand;
      ALU_SR:   acc_next = sr_out;
      ALU_MC:   acc_next[32*col +: 32] = mc_out;
      ALU_SB:   if (idx != 5'd0) acc_next[8*(idx - 5'd1) +: 8] = sbox_out;
      default:  acc_next = acc;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) acc <= '0;
    else        acc <= acc_next;

  // SubBytes steps run 0..16 and MixColumns columns 0..3.
  assert property (@(posedge clk) disable iff (!rst_n) op == ALU_SB |-> idx <= 5'd16);
  assert property (@(posedge clk) disable iff (!rst_n) op == ALU_MC |-> idx <= 5'd3);

endmodule
