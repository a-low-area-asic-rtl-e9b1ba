// tb_aegis128_top: end-to-end test of the AEGIS128 core over its 8-bit APB
// port. A host model loads key and IV, runs initialisation, writes the
// lengths, absorbs the associated data, en- or decrypts the message block by
// block and reads the tag, polling CONTROL for the state. Results are
// compared with the published AEGIS128 known-answer values and with the
// behavioural reference in aegis_ref_pkg. Also exercised: skipped AD phase,
// empty message, partial last blocks (masking), decryption, the reset bit,
// reads that must return zero and writes that must be ignored. BUSY
// durations are checked exactly and the per-operation cycle counts,
// including bus traffic, are compared with the design targets (Initialisation
// 1374, AD block 189, en/decrypt block 197, finalisation 863 cycles) to 15%.
// The core has no parameters; this test runs it at full size.
module tb_aegis128_top;
  import aegis_pkg::*;
  import aegis_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [7:0] paddr = 0, pwdata = 0, prdata;
  int checks = 0, failures = 0;
  longint cyc = 0;
  bit mode = 0;   // decrypt bit sent with every CONTROL write

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  aegis128_top dut (.pclk(clk), .presetn(rst_n), .psel(psel), .penable(penable),
                    .pwrite(pwrite), .paddr(paddr), .pwdata(pwdata), .prdata(prdata));

  // mechanism counters
  int n_init = 0, n_ad = 0, n_enc = 0, n_dec = 0, n_partial = 0, n_skip_ad = 0,
      n_empty_msg = 0, n_final = 0, n_reset = 0, n_read_zero = 0, n_wr_ignored = 0;

  // BUSY durations, measured on the CONTROL state field
  longint busy_start, busy_len;
  logic [7:0] ctrl_last;

  initial begin
    #50ms; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apb_write(logic [7:0] a, logic [7:0] d);
    psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(posedge clk); #1 penable = 1;
    @(posedge clk); #1 psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic apb_read(logic [7:0] a, output logic [7:0] d);
    psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(posedge clk); #1 penable = 1; #1 d = prdata;
    @(posedge clk); #1 psel = 0; penable = 0;
  endtask

  task automatic write_blk(logic [3:0] page, blk_t v);
    for (int k = 0; k < 16; k++) apb_write({page, 4'(k)}, v[8*k +: 8]);
  endtask

  task automatic read_blk(logic [3:0] page, output blk_t v);
    logic [7:0] d;
    for (int k = 0; k < 16; k++) begin apb_read({page, 4'(k)}, d); v[8*k +: 8] = d; end
  endtask

  // Poll CONTROL until the state differs from BUSY; return it.
  task automatic wait_ready(output host_state_e st);
    logic [7:0] d;
    do apb_read(ADDR_CONTROL, d); while (d[6:4] == ST_BUSY);
    st = host_state_e'(d[6:4]);
  endtask

  // Start a BUSY phase and measure how long BUSY lasts (cycle exact, via the
  // state the core drives; the host itself sees it only when polling).
  task automatic start_and_wait(output host_state_e st, output longint busy_cycles);
    longint t0;
    apb_write(ADDR_CONTROL, 8'(1 << CTRL_START) | 8'(mode));
    t0 = cyc;
    while (dut.u_ctrl.state == ST_BUSY) @(posedge clk);
    busy_cycles = cyc - t0;
    wait_ready(st);
  endtask

  task automatic expect_busy(longint got, longint want, string what);
    check(got == longint'(want), $sformatf("%s BUSY cycles %0d, expected %0d", what, got, want));
  endtask

  task automatic expect_near(longint got, int target, string what);
    real r = real'(got) / real'(target);
    $display("  %-16s %5d cycles incl. bus (target %0d)", what, got, target);
    check(r > 0.85 && r < 1.15, $sformatf("%s cycles %0d vs %0d", what, got, target));
  endtask

  // One complete AEAD operation over the bus.
  task automatic run_op(input blk_t key, input blk_t iv,
                        input blk_t ad[$], input longint unsigned adlen,
                        input blk_t msg[$], input longint unsigned msglen,
                        input bit dec, input bit timing,
                        output blk_t out[$], output blk_t tag);
    host_state_e st;
    longint t0, b;
    blk_t v;
    logic [7:0] d;
    out = {};
    t0 = cyc;
    mode = dec;
    apb_write(ADDR_CONTROL, 8'(mode));
    write_blk(PAGE_DATA, key);
    write_blk(PAGE_TAG, iv);
    start_and_wait(st, b);
    check(st == ST_LOAD_LEN, "after initialisation: LOAD_LEN");
    expect_busy(b, 1289, "initialisation");
    if (timing) expect_near(cyc - t0, 1374, "initialisation");
    n_init++;
    // lengths: adlen at 0x20, msglen at 0x28, little endian
    for (int k = 0; k < 8; k++) apb_write(8'h20 + 8'(k), adlen[8*k +: 8]);
    for (int k = 0; k < 8; k++) apb_write(8'h28 + 8'(k), msglen[8*k +: 8]);
    apb_read(ADDR_CONTROL, d);
    check(d[CTRL_DECRYPT] == dec, "mode bit reads back");
    apb_write(ADDR_CONTROL, 8'(1 << CTRL_START) | 8'(mode));
    apb_read(ADDR_CONTROL, d);
    if (ad.size() == 0) n_skip_ad++;
    foreach (ad[i]) begin
      check(d[6:4] == ST_LOAD_AD, "LOAD_AD expected");
      t0 = cyc;
      write_blk(PAGE_DATA, ad[i]);
      if (i == 0) begin
        // the tag register must neither leak nor accept writes here
        apb_read(8'h20, d); check(d == 8'h00, "TAG reads zero in LOAD_AD");
        apb_read(8'h13, d); check(d == 8'h00, "DATA reads zero in LOAD_AD");
        n_read_zero++;
        apb_write(8'h28, 8'hff);   // would corrupt msglen
        n_wr_ignored++;
      end
      start_and_wait(st, b);
      // with no message, finalisation follows the last AD block directly
      expect_busy(b, (i == ad.size() - 1 && msg.size() == 0) ? 128 + 905 : 128, "AD block");
      if (timing && i == 0) expect_near(cyc - t0, 189, "AD block");
      n_ad++;
      d = {1'b0, st, 4'b0};
    end
    if (msg.size() == 0) n_empty_msg++;
    foreach (msg[i]) begin
      check(d[6:4] == ST_LOAD_DATA, "LOAD_DATA expected");
      t0 = cyc;
      write_blk(PAGE_DATA, msg[i]);
      start_and_wait(st, b);
      check(st == ST_READ_CIPHER, "READ_CIPHER expected");
      expect_busy(b, dec ? 135 : 137, "message block");
      read_blk(PAGE_DATA, v);
      out.push_back(v);
      if (timing && i == 0) expect_near(cyc - t0, 197, dec ? "decrypt block" : "encrypt block");
      if (dec) n_dec++; else n_enc++;
      if (i == msg.size() - 1 && msglen % 128 != 0) n_partial++;
      if (i != msg.size() - 1) begin
        apb_write(ADDR_CONTROL, 8'(1 << CTRL_START) | 8'(mode));
        apb_read(ADDR_CONTROL, d);
      end
    end
    t0 = cyc;
    if (msg.size() != 0) begin
      start_and_wait(st, b);
    end else begin
      // finalisation started by itself after the lengths or the last AD block
      while (dut.u_ctrl.state == ST_BUSY) @(posedge clk);
      b = 905;
      wait_ready(st);
    end
    check(st == ST_READ_TAG, "READ_TAG expected");
    expect_busy(b, 905, "finalisation");
    read_blk(PAGE_TAG, tag);
    if (timing) expect_near(cyc - t0, 863, "finalisation");
    n_final++;
    apb_read(8'h10, d); check(d == 8'h00, "DATA reads zero in READ_TAG");
    apb_write(ADDR_CONTROL, 8'(1 << CTRL_START) | 8'(mode));
    apb_read(ADDR_CONTROL, d);
    check(d[6:4] == ST_IDLE, "back to IDLE");
  endtask

  task automatic compare(string name, blk_t key, blk_t iv, blk_t ad[$], longint unsigned adlen,
                         blk_t msg[$], longint unsigned msglen, bit dec, bit timing,
                         output blk_t out[$], output blk_t tag);
    blk_t eout[$], etag;
    run_op(key, iv, ad, adlen, msg, msglen, dec, timing, out, tag);
    aead(key, iv, ad, adlen, msg, msglen, dec, eout, etag);
    foreach (eout[i])
      check(out[i] == eout[i], $sformatf("%s block %0d: %032h expected %032h", name, i, out[i], eout[i]));
    check(tag == etag, $sformatf("%s tag %032h expected %032h", name, tag, etag));
  endtask

  blk_t q_ad[$], q_msg[$], q_out[$], q_out2[$], q_none[$];
  blk_t tag, tag2, key, iv;
  longint unsigned adlen, msglen;
  logic [7:0] d;

  initial begin
    repeat (3) @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1;

    // 1. known answer: key = IV = 0, no AD, one zero block
    q_msg = {128'h0};
    compare("kat1", '0, '0, q_none, 0, q_msg, 128, 0, 1, q_out, tag);
    check(q_out[0] == 128'h7e7db0011f2e6dc12f1a2ba70f051b95, "kat1 ciphertext (published vector)");
    check(tag == 128'hf1d588e87e2122f44295247397a9d2a7, "kat1 tag (published vector)");

    // 2. empty AD and empty message: tag only
    compare("kat2", '0, '0, q_none, 0, q_none, 0, 0, 0, q_out, tag);
    check(tag == 128'hf92171af1457b36cc3874db606802d24, "kat2 tag");

    // 3. 20 bytes of AD, 40 bytes of message, bytes counting up
    key = '0; iv = '0;
    for (int k = 0; k < 16; k++) begin key[8*k +: 8] = 8'(k); iv[8*k +: 8] = 8'(16 + k); end
    q_ad = {128'h0f0e0d0c0b0a09080706050403020100, 128'h13121110};
    q_msg = {128'h0f0e0d0c0b0a09080706050403020100, 128'h1f1e1d1c1b1a19181716151413121110,
             128'h00000000000000002726252423222120};
    compare("ramp", key, iv, q_ad, 160, q_msg, 320, 0, 0, q_out, tag);
    check(q_out[0] == 128'h94c02a0d2388c833099d65f5b1942ae2, "ramp C0 (independent model)");
    check(tag == 128'h9f935faca493290c11adc68077a9c52c, "ramp tag (independent model)");

    // 4. decrypt it again: plaintext and tag must come back
    compare("ramp-dec", key, iv, q_ad, 160, q_out, 320, 1, 1, q_out2, tag2);
    check(q_out2[1] == q_msg[1] && q_out2[2] == q_msg[2], "decrypted plaintext");
    check(tag2 == tag, "decryption tag equals encryption tag");

    // 5. reset bit aborts a running initialisation
    write_blk(PAGE_DATA, '1);
    apb_write(ADDR_CONTROL, 8'(1 << CTRL_START) | 8'(mode));
    apb_read(ADDR_CONTROL, d); check(d[6:4] == ST_BUSY && d[CTRL_BUSY], "busy after start");
    apb_write(ADDR_CONTROL, 8'(1 << CTRL_RESET));
    apb_read(ADDR_CONTROL, d); check(d[6:4] == ST_IDLE, "reset bit returns to IDLE");
    n_reset++;

    // 6. random operations, both directions
    for (int t = 0; t < 3; t++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      iv  = {$urandom, $urandom, $urandom, $urandom};
      adlen  = 8 * ($urandom_range(0, 40));
      msglen = 8 * ($urandom_range(1, 40));
      q_ad = {}; q_msg = {};
      for (int i = 0; i < (adlen + 127) / 128; i++) q_ad.push_back({$urandom, $urandom, $urandom, $urandom} & len_mask(i == (adlen + 127) / 128 - 1 ? adlen : 0));
      for (int i = 0; i < (msglen + 127) / 128; i++) q_msg.push_back({$urandom, $urandom, $urandom, $urandom});
      compare($sformatf("rand%0d", t), key, iv, q_ad, adlen, q_msg, msglen, t[0], 0, q_out, tag);
    end

    $display("mechanisms: init=%0d ad=%0d enc=%0d dec=%0d partial=%0d skip_ad=%0d empty_msg=%0d final=%0d reset=%0d read_zero=%0d wr_ignored=%0d",
             n_init, n_ad, n_enc, n_dec, n_partial, n_skip_ad, n_empty_msg, n_final, n_reset, n_read_zero, n_wr_ignored);
    check(n_init > 0 && n_ad > 0 && n_enc > 0 && n_dec > 0 && n_partial > 0 && n_skip_ad > 0 &&
          n_empty_msg > 0 && n_final > 0 && n_reset > 0 && n_read_zero > 0 && n_wr_ignored > 0,
          "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
