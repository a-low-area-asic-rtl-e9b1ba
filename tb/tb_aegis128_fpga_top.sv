// tb_aegis128_fpga_top: end-to-end test of the whole design, the AEGIS128
// core behind the UART and the UART-to-APB bridge. A serial-line host sends
// write commands ('W', address, data) and read commands ('R', address) and
// runs complete operations: the published known-answer vector, an operation
// with no AD and no message, 20 bytes of AD with 40 bytes of message
// encrypted and then decrypted again, and a random operation. Results are
// compared with the behavioural reference in aegis_ref_pkg; the BUSY phases
// of the core are checked to the cycle. Each mechanism is counted and must
// occur: initialisation, AD absorption, encryption, decryption, partial last
// block, skipped AD phase, empty message, finalisation, reset bit, zero
// reads, ignored writes, UART write and read commands, stray command bytes.
// The bit period is shortened to 10 clocks to keep the run short.
module tb_aegis128_fpga_top;
  import aegis_pkg::*;
  import aegis_ref_pkg::*;
  localparam int DIV = 10;
  logic clk = 0, rst_n = 0, rxd = 1, txd;
  int checks = 0, failures = 0;
  bit mode = 0;
  always #5 clk = ~clk;
  aegis128_fpga_top #(.CLK_HZ(1_000_000), .BAUD(100_000)) dut (
    .clk(clk), .rst_n(rst_n), .uart_rxd(rxd), .uart_txd(txd));

  int n_init = 0, n_ad = 0, n_enc = 0, n_dec = 0, n_partial = 0, n_skip_ad = 0,
      n_empty_msg = 0, n_final = 0, n_reset = 0, n_read_zero = 0, n_wr_ignored = 0,
      n_uart_wr = 0, n_uart_rd = 0, n_stray = 0;

  // BUSY lengths of the core, cycle exact
  longint cyc = 0, busy_t0;
  longint busy_lens[$];
  always @(posedge clk) cyc <= cyc + 1;
  logic busy_q = 0;
  always @(posedge clk) begin
    busy_q <= dut.u_core.busy;
    if (dut.u_core.busy && !busy_q) busy_t0 = cyc;
    if (!dut.u_core.busy && busy_q) busy_lens.push_back(cyc - busy_t0);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic ser_send(logic [7:0] b);
    logic [9:0] f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin rxd = f[i]; repeat (DIV) @(posedge clk); #1; end
  endtask

  task automatic ser_recv(output logic [7:0] b);
    while (txd) @(posedge clk);
    repeat (DIV + DIV / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin b[i] = txd; repeat (DIV) @(posedge clk); end
    #1;
  endtask

  task automatic wr(logic [7:0] a, logic [7:0] d);
    ser_send(8'h57); ser_send(a); ser_send(d);
    n_uart_wr++;
  endtask

  task automatic rd(logic [7:0] a, output logic [7:0] d);
    fork
      begin ser_send(8'h52); ser_send(a); end
      ser_recv(d);
    join
    n_uart_rd++;
  endtask

  task automatic wr_blk(logic [3:0] page, blk_t v);
    for (int k = 0; k < 16; k++) wr({page, 4'(k)}, v[8*k +: 8]);
  endtask

  task automatic rd_blk(logic [3:0] page, output blk_t v);
    logic [7:0] d;
    for (int k = 0; k < 16; k++) begin rd({page, 4'(k)}, d); v[8*k +: 8] = d; end
  endtask

  task automatic wait_ready(output host_state_e st);
    logic [7:0] d;
    do rd(ADDR_CONTROL, d); while (d[6:4] == ST_BUSY);
    st = host_state_e'(d[6:4]);
  endtask

  task automatic start();
    wr(ADDR_CONTROL, 8'(1 << CTRL_START) | 8'(mode));
  endtask

  task automatic expect_busy(longint want, string what);
    check(busy_lens.size() == 1 && busy_lens[0] == want,
          $sformatf("%s: BUSY %0d cycles, expected %0d", what, busy_lens.size() ? busy_lens[0] : -1, want));
    busy_lens = {};
  endtask

  task automatic run_op(input blk_t key, input blk_t iv,
                        input blk_t ad[$], input longint unsigned adlen,
                        input blk_t msg[$], input longint unsigned msglen,
                        input bit dec, input bit extras,
                        output blk_t out[$], output blk_t tag);
    host_state_e st;
    blk_t v;
    logic [7:0] d;
    out = {};
    mode = dec;
    wr(ADDR_CONTROL, 8'(mode));
    wr_blk(PAGE_DATA, key);
    wr_blk(PAGE_TAG, iv);
    busy_lens = {};
    start();
    wait_ready(st);
    check(st == ST_LOAD_LEN, "LOAD_LEN after initialisation");
    expect_busy(1289, "initialisation");
    n_init++;
    for (int k = 0; k < 8; k++) wr(8'h20 + 8'(k), adlen[8*k +: 8]);
    for (int k = 0; k < 8; k++) wr(8'h28 + 8'(k), msglen[8*k +: 8]);
    start();
    if (ad.size() == 0) n_skip_ad++;
    if (msg.size() == 0) n_empty_msg++;
    foreach (ad[i]) begin
      rd(ADDR_CONTROL, d);
      check(d[6:4] == ST_LOAD_AD, "LOAD_AD");
      wr_blk(PAGE_DATA, ad[i]);
      if (extras && i == 0) begin
        rd(8'h2f, d); check(d == 8'h00, "TAG reads zero in LOAD_AD");
        n_read_zero++;
        wr(8'h20, 8'h55);            // would corrupt adlen
        n_wr_ignored++;
        ser_send(8'h00);             // stray byte in the command position
        n_stray++;
      end
      start();
      wait_ready(st);
      expect_busy((i == ad.size() - 1 && msg.size() == 0) ? 128 + 905 : 128, "AD block");
      n_ad++;
    end
    foreach (msg[i]) begin
      rd(ADDR_CONTROL, d);
      check(d[6:4] == ST_LOAD_DATA, $sformatf("LOAD_DATA, state %0d", d[6:4]));
      wr_blk(PAGE_DATA, msg[i]);
      start();
      wait_ready(st);
      check(st == ST_READ_CIPHER, "READ_CIPHER");
      expect_busy(dec ? 135 : 137, "message block");
      rd_blk(PAGE_DATA, v);
      out.push_back(v);
      if (dec) n_dec++; else n_enc++;
      if (i == msg.size() - 1 && msglen % 128 != 0) n_partial++;
      if (i != msg.size() - 1) start();
    end
    if (msg.size() != 0) start();
    wait_ready(st);
    check(st == ST_READ_TAG, "READ_TAG");
    if (msg.size() != 0 || ad.size() == 0) expect_busy(905, "finalisation");
    busy_lens = {};
    rd_blk(PAGE_TAG, tag);
    n_final++;
    start();
    rd(ADDR_CONTROL, d);
    check(d[6:4] == ST_IDLE, "IDLE after the tag");
  endtask

  task automatic compare(string name, blk_t key, blk_t iv, blk_t ad[$], longint unsigned adlen,
                         blk_t msg[$], longint unsigned msglen, bit dec, bit extras,
                         output blk_t out[$], output blk_t tag);
    blk_t eout[$], etag;
    run_op(key, iv, ad, adlen, msg, msglen, dec, extras, out, tag);
    aead(key, iv, ad, adlen, msg, msglen, dec, eout, etag);
    check(out.size() == eout.size(), {name, ": number of result blocks"});
    foreach (eout[i])
      check(out[i] == eout[i], $sformatf("%s block %0d: %032h expected %032h", name, i, out[i], eout[i]));
    check(tag == etag, $sformatf("%s tag %032h expected %032h", name, tag, etag));
  endtask

  initial begin
    #100ms; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  blk_t q_ad[$], q_msg[$], q_out[$], q_out2[$], q_none[$];
  blk_t tag, tag2, key, iv;
  logic [7:0] d;
  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    repeat (5) @(posedge clk); #1;

    q_msg = {128'h0};
    compare("kat", '0, '0, q_none, 0, q_msg, 128, 0, 0, q_out, tag);
    check(q_out[0] == 128'h7e7db0011f2e6dc12f1a2ba70f051b95, "published ciphertext");
    check(tag == 128'hf1d588e87e2122f44295247397a9d2a7, "published tag");

    compare("empty", '0, '0, q_none, 0, q_none, 0, 0, 0, q_out, tag);

    key = '0; iv = '0;
    for (int k = 0; k < 16; k++) begin key[8*k +: 8] = 8'(k); iv[8*k +: 8] = 8'(16 + k); end
    q_ad  = {128'h0f0e0d0c0b0a09080706050403020100, 128'h13121110};
    q_msg = {128'h0f0e0d0c0b0a09080706050403020100, 128'h1f1e1d1c1b1a19181716151413121110,
             128'h00000000000000002726252423222120};
    compare("ramp", key, iv, q_ad, 160, q_msg, 320, 0, 1, q_out, tag);
    compare("ramp-dec", key, iv, q_ad, 160, q_out, 320, 1, 0, q_out2, tag2);
    check(q_out2[0] == q_msg[0] && q_out2[2] == q_msg[2] && tag2 == tag, "decryption restores plaintext and tag");

    key = {$urandom, $urandom, $urandom, $urandom};
    iv  = {$urandom, $urandom, $urandom, $urandom};
    q_ad = {};
    q_msg = {};
    q_ad.push_back(blk_t'({$urandom, $urandom, $urandom, $urandom}));
    for (int i = 0; i < 2; i++) q_msg.push_back(blk_t'({$urandom, $urandom, $urandom, $urandom}));
    compare("random", key, iv, q_ad, 128, q_msg, 200, 0, 0, q_out, tag);

    // reset bit aborts a running initialisation
    mode = 0;
    start();
    rd(ADDR_CONTROL, d); check(d[6:4] == ST_BUSY, "BUSY after start");
    wr(ADDR_CONTROL, 8'(1 << CTRL_RESET));
    rd(ADDR_CONTROL, d); check(d[6:4] == ST_IDLE, "reset bit returns to IDLE");
    n_reset++;

    $display("mechanisms: init=%0d ad=%0d enc=%0d dec=%0d partial=%0d skip_ad=%0d empty_msg=%0d final=%0d reset=%0d read_zero=%0d wr_ignored=%0d uart_wr=%0d uart_rd=%0d stray=%0d",
             n_init, n_ad, n_enc, n_dec, n_partial, n_skip_ad, n_empty_msg, n_final, n_reset,
             n_read_zero, n_wr_ignored, n_uart_wr, n_uart_rd, n_stray);
    check(n_init > 0, "initialisation happened");   check(n_ad > 0, "AD absorption happened");
    check(n_enc > 0, "encryption happened");        check(n_dec > 0, "decryption happened");
    check(n_partial > 0, "partial block happened"); check(n_skip_ad > 0, "AD skip happened");
    check(n_empty_msg > 0, "empty message happened"); check(n_final > 0, "finalisation happened");
    check(n_reset > 0, "reset happened");           check(n_read_zero > 0, "zero read happened");
    check(n_wr_ignored > 0, "ignored write happened"); check(n_uart_wr > 0, "UART write happened");
    check(n_uart_rd > 0, "UART read happened");     check(n_stray > 0, "stray byte happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
