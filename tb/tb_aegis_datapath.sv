// tb_aegis_datapath: drives the datapath with bus writes and hand-written
// micro-instruction sequences. Checks byte-lane writes into DATA and TAG,
// the two constants, one complete AES round (LOAD, 17 SubBytes steps,
// ShiftRows, 4 MixColumns steps, XOR) written into each state word and
// TEMP and read back through DATA, and the valid-bit mask of a last block.
module tb_aegis_datapath;
  import aegis_pkg::*;
  import aegis_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  uop_t uop;
  logic last_blk;
  bus_wr_t bus_wr;
  logic [127:0] data_q, tag_q;
  blk_t a, b;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  aegis_datapath dut (.clk(clk), .rst_n(rst_n), .uop(uop), .last_blk(last_blk),
                      .bus_wr(bus_wr), .data_q(data_q), .tag_q(tag_q));

  task automatic u(alu_op_e op, src_e src, dst_e dst, int idx);
    uop = '{op: op, src: src, dst: dst, idx: 5'(idx)};
    @(posedge clk); #1;
    uop = UOP_NOP;
  endtask

  task automatic bus_blk(bit tag, blk_t v);
    for (int k = 0; k < 16; k++) begin
      bus_wr = '{data_we: !tag, tag_we: tag, idx: 4'(k), wdata: v[8*k +: 8]};
      @(posedge clk); #1;
    end
    bus_wr = '0;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    uop = UOP_NOP; bus_wr = '0; last_blk = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      a = {$urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom, $urandom};
      bus_blk(0, a); bus_blk(1, b);
      check(data_q == a && tag_q == b, "bus writes into DATA and TAG");
      // one AES round of DATA with key TAG into word t (t = 5: TEMP)
      u(ALU_LOAD, SRC_DATA, DST_NONE, 0);
      for (int s = 0; s <= 16; s++) u(ALU_SB, SRC_S0, DST_NONE, s);
      u(ALU_SR, SRC_S0, DST_NONE, 0);
      for (int c = 0; c < 4; c++) u(ALU_MC, SRC_S0, DST_NONE, c);
      u(ALU_XOR, SRC_TAG, DST_NONE, 0);
      u(ALU_NOP, SRC_S0, dst_e'(t + 1), 0);
      u(ALU_LOAD, SRC_C0, DST_NONE, 0);        // scramble acc
      u(ALU_LOAD, src_e'(t), DST_NONE, 0);
      u(ALU_NOP, SRC_S0, DST_DATA, 0);
      check(data_q == aes_round(a, b), $sformatf("AES round via S%0d", t));
    end
    // TEMP
    u(ALU_LOAD, SRC_TAG, DST_NONE, 0);
    u(ALU_NOP, SRC_S0, DST_TEMP, 0);
    u(ALU_LOAD, SRC_C1, DST_NONE, 0);
    u(ALU_LOAD, SRC_TEMP, DST_NONE, 0);
    u(ALU_NOP, SRC_S0, DST_DATA, 0);
    check(data_q == tag_q, "TEMP round trip");
    u(ALU_LOAD, SRC_C0, DST_DATA, 0);
    u(ALU_LOAD, SRC_C1, DST_DATA, 0);
    check(data_q == C0, "CONST0");
    u(ALU_NOP, SRC_C1, DST_DATA, 0);
    check(data_q == C1, "CONST1");
    // mask: msglen = 72 bits -> 72 valid bits in the last block
    b = '0; b[127:64] = 64'd328;   // 328 mod 128 = 72
    bus_blk(1, b);
    last_blk = 1;
    u(ALU_LOAD, SRC_MASK, DST_NONE, 0);
    u(ALU_NOP, SRC_S0, DST_DATA, 0);
    check(data_q == {56'h0, {72{1'b1}}}, "mask of a 72-bit last block");
    last_blk = 0;
    u(ALU_LOAD, SRC_MASK, DST_NONE, 0);
    u(ALU_NOP, SRC_S0, DST_DATA, 0);
    check(data_q == '1, "mask of a block that is not the last");
    b[127:64] = 64'd256; bus_blk(1, b); last_blk = 1;
    u(ALU_LOAD, SRC_MASK, DST_NONE, 0);
    u(ALU_NOP, SRC_S0, DST_DATA, 0);
    check(data_q == '1, "mask of a full last block");
    // AND with data
    a = {$urandom, $urandom, $urandom, $urandom};
    bus_blk(0, a);
    u(ALU_LOAD, SRC_DATA, DST_NONE, 0);
    u(ALU_AND, SRC_TAG, DST_NONE, 0);
    u(ALU_NOP, SRC_S0, DST_DATA, 0);
    check(data_q == (a & b), "AND");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
