// tb_aegis_control_unit: drives CONTROL writes and the length register into
// the control unit alone and checks the host-level state sequence, the
// length of every BUSY phase, the micro-instruction stream (SubBytes steps
// per update, order of the state words written, key/IV alternation of the
// initialisation input, the tag and tmp writes), the last-block flag, that
// start is ignored while busy and that the reset bit aborts.
module tb_aegis_control_unit;
  import aegis_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ctrl_we = 0;
  logic [7:0] ctrl_wdata = 0;
  logic [127:0] tag_q = '0;
  host_state_e state;
  logic decrypt, busy, last_blk;
  uop_t uop;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  aegis_control_unit dut (.*);

  // micro-instruction statistics of the current BUSY phase
  int n_sb, n_last, n_tag_m, n_data_m, n_cycles;
  dst_e dsts[$];
  src_e m_srcs[$];      // update input: the XOR that follows the XOR with S0
  logic after_s0;
  always @(posedge clk) after_s0 <= busy && uop.op == ALU_XOR && uop.src == SRC_S0;
  always @(posedge clk) if (busy) begin
    if (after_s0 && uop.op == ALU_XOR) m_srcs.push_back(uop.src);
    n_cycles++;
    if (uop.op == ALU_SB) n_sb++;
    if (last_blk) n_last++;
    if (uop.op == ALU_XOR && uop.src == SRC_TAG) n_tag_m++;
    if (uop.op == ALU_XOR && uop.src == SRC_DATA) n_data_m++;
    if (uop.dst != DST_NONE) dsts.push_back(uop.dst);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic ctrl(logic [7:0] v);
    ctrl_we = 1; ctrl_wdata = v;
    @(posedge clk); #1 ctrl_we = 0;
  endtask

  // start, then wait for the end of BUSY; check its length and next state
  task automatic run(logic [7:0] v, int cycles, host_state_e next, string what);
    n_sb = 0; n_last = 0; n_tag_m = 0; n_data_m = 0; n_cycles = 0; dsts = {}; m_srcs = {};
    ctrl(v);
    check(state == ST_BUSY && busy, {what, ": BUSY after start"});
    ctrl(v);                           // ignored while busy
    while (busy) @(posedge clk);
    #1;
    check(n_cycles == cycles, $sformatf("%s: %0d busy cycles, expected %0d", what, n_cycles, cycles));
    check(state == next, $sformatf("%s: state %0d, expected %0d", what, state, next));
  endtask

  task automatic step(logic [7:0] v, host_state_e next, string what);
    ctrl(v);
    check(state == next, $sformatf("%s: state %0d, expected %0d", what, state, next));
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam logic [7:0] START = 8'h02, RESET = 8'h08;
  dst_e upd_order[6] = '{DST_TEMP, DST_S4, DST_S3, DST_S2, DST_S1, DST_S0};

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    check(state == ST_IDLE, "IDLE after reset");
    // encryption: 200 bits of AD (2 blocks), 300 bits of message (3 blocks)
    tag_q = {64'd300, 64'd200};
    run(START, 1289, ST_LOAD_LEN, "initialisation");
    check(n_sb == 10 * 5 * 17, "170 SubBytes steps per update pair");
    check(n_data_m == 5 && n_tag_m == 5 + 1, "key, IV alternate as update input");
    check(m_srcs.size() == 10, "ten update inputs");
    foreach (m_srcs[i])
      check(m_srcs[i] == ((i % 2 == 0) ? SRC_DATA : SRC_TAG), $sformatf("update %0d input: key on even, IV on odd", i));
    check(dsts.size() == 5 + 10 * 6, "state writes of initialisation");
    for (int i = 0; i < 6; i++) check(dsts[5 + 6 + i] == upd_order[i], "word order of an update");
    step(START, ST_LOAD_AD, "lengths loaded");
    run(START, 128, ST_LOAD_AD, "AD block 1");
    check(n_data_m == 1 && n_sb == 85, "AD update");
    run(START, 128, ST_LOAD_DATA, "AD block 2");
    run(START, 137, ST_READ_CIPHER, "encrypt block 1");
    check(n_last == 0, "block 1 not last");
    check(dsts.size() == 1 + 1 + 6 && dsts[0] == DST_DATA && dsts[2] == DST_DATA, "mask, C into DATA");
    step(START, ST_LOAD_DATA, "next block");
    run(START, 137, ST_READ_CIPHER, "encrypt block 2");
    step(START, ST_LOAD_DATA, "next block");
    run(START, 137, ST_READ_CIPHER, "encrypt block 3");
    check(n_last == 137, "block 3 is last");
    run(START, 905, ST_READ_TAG, "finalisation");
    check(dsts[0] == DST_DATA && dsts[dsts.size() - 1] == DST_TAG, "tmp into DATA, tag into TAG");
    check(n_sb == 7 * 85, "seven updates");
    step(START, ST_IDLE, "tag read");
    // decryption, no AD, one block
    tag_q = {64'd128, 64'd0};
    run(START | 8'h01, 1289, ST_LOAD_LEN, "initialisation (decrypt)");
    check(decrypt, "decrypt mode latched");
    step(START | 8'h01, ST_LOAD_DATA, "AD skipped");
    run(START | 8'h01, 135, ST_READ_CIPHER, "decrypt block");
    check(dsts[0] == DST_DATA && n_last == 135, "P into DATA first, masked as last");
    run(START | 8'h01, 905, ST_READ_TAG, "finalisation");
    step(START, ST_IDLE, "tag read");
    // nothing to absorb: finalisation follows the lengths at once
    tag_q = '0;
    run(START, 1289, ST_LOAD_LEN, "initialisation");
    run(START, 905, ST_READ_TAG, "empty AD and message");
    step(RESET, ST_IDLE, "reset from READ_TAG");
    // reset aborts BUSY
    ctrl(START);
    repeat (50) @(posedge clk);
    #1 check(busy, "busy");
    step(RESET, ST_IDLE, "reset aborts initialisation");
    #1 check(!busy && uop == UOP_NOP, "sequencer stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
