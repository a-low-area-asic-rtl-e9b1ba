// tb_aegis_apb_slave: APB transfers against the register map. Checks that
// writes reach DATA/TAG/CONTROL only in the states that allow them, with the
// byte lane taken from address bits [3:0], that reads of DATA and TAG return
// the register byte only in READ_CIPHER and READ_TAG and 0x00 otherwise, and
// the layout of CONTROL on reads.
module tb_aegis_apb_slave;
  import aegis_pkg::*;
  logic clk = 0, rst_n = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [7:0] paddr = 0, pwdata = 0, prdata;
  host_state_e state;
  logic decrypt, busy;
  logic [127:0] data_q, tag_q;
  bus_wr_t bus_wr;
  logic ctrl_we;
  logic [7:0] ctrl_wdata;
  int checks = 0, failures = 0;
  // what the slave asked for during the last transfer
  bus_wr_t seen_wr;
  logic seen_ctrl;
  logic [7:0] seen_ctrl_data;

  always #5 clk = ~clk;
  aegis_apb_slave dut (.*);

  always @(posedge clk) begin
    if (bus_wr.data_we || bus_wr.tag_we) seen_wr <= bus_wr;
    if (ctrl_we) begin seen_ctrl <= 1; seen_ctrl_data <= ctrl_wdata; end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apb_write(logic [7:0] a, logic [7:0] d);
    seen_wr = '0; seen_ctrl = 0;
    psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(posedge clk); #1 penable = 1;
    @(posedge clk); #1 psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic apb_read(logic [7:0] a, output logic [7:0] d);
    psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(posedge clk); #1 penable = 1; #1 d = prdata;
    @(posedge clk); #1 psel = 0; penable = 0;
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  host_state_e states[7] = '{ST_IDLE, ST_LOAD_LEN, ST_LOAD_AD, ST_LOAD_DATA,
                             ST_READ_CIPHER, ST_READ_TAG, ST_BUSY};
  logic [7:0] d;
  bit data_ok, tag_ok;

  initial begin
    state = ST_IDLE; decrypt = 0; busy = 0;
    for (int k = 0; k < 16; k++) begin data_q[8*k +: 8] = 8'h40 + 8'(k); tag_q[8*k +: 8] = 8'h80 + 8'(k); end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    foreach (states[s]) begin
      state = states[s];
      busy = (state == ST_BUSY);
      decrypt = s[0];
      data_ok = state inside {ST_IDLE, ST_LOAD_AD, ST_LOAD_DATA};
      tag_ok  = state inside {ST_IDLE, ST_LOAD_LEN};
      for (int k = 0; k < 16; k += 5) begin
        apb_write(8'h10 + 8'(k), 8'hA0 + 8'(k));
        check(seen_wr.data_we == data_ok && !seen_wr.tag_we, $sformatf("DATA write enable, state %0d", state));
        if (data_ok) check(seen_wr.idx == 4'(k) && seen_wr.wdata == 8'hA0 + 8'(k), "DATA lane and byte");
        apb_write(8'h20 + 8'(k), 8'hB0 + 8'(k));
        check(seen_wr.tag_we == tag_ok && !seen_wr.data_we, $sformatf("TAG write enable, state %0d", state));
        if (tag_ok) check(seen_wr.idx == 4'(k) && seen_wr.wdata == 8'hB0 + 8'(k), "TAG lane and byte");
        apb_read(8'h10 + 8'(k), d);
        check(d == ((state == ST_READ_CIPHER) ? 8'h40 + 8'(k) : 8'h00), $sformatf("DATA read, state %0d", state));
        apb_read(8'h20 + 8'(k), d);
        check(d == ((state == ST_READ_TAG) ? 8'h80 + 8'(k) : 8'h00), $sformatf("TAG read, state %0d", state));
      end
      apb_write(8'h00, 8'h0A);
      check(seen_ctrl && seen_ctrl_data == 8'h0A, "CONTROL write strobe");
      apb_write(8'h30, 8'h0A);
      check(!seen_ctrl && seen_wr == '0, "unmapped address ignored");
      apb_read(8'h00, d);
      check(d == {1'b0, state, 1'b0, busy, 1'b0, decrypt}, "CONTROL read layout");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
