// tb_aegis_alu: drives every ALU operation on random data and checks the
// accumulator against the reference, including the 17-step byte-serial
// SubBytes (byte 15 only final after step 16) and the 4-step MixColumns.
module tb_aegis_alu;
  import aegis_pkg::*;
  import aegis_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  alu_op_e op;
  logic [4:0] idx;
  logic [127:0] operand, acc, exp_v, x, y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  aegis_alu dut (.clk(clk), .rst_n(rst_n), .op(op), .idx(idx), .operand(operand), .acc(acc));

  task automatic step(alu_op_e o, logic [127:0] v, int i);
    op = o; operand = v; idx = 5'(i);
    @(posedge clk); #1;
  endtask

  task automatic check(logic [127:0] e, string what);
    checks++;
    if (acc !== e) begin
      failures++;
      $display("%s: acc=%032h expected %032h", what, acc, e);
    end
  endtask

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    op = ALU_NOP; idx = 0; operand = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    check('0, "reset");
    for (int t = 0; t < 40; t++) begin
      x = rnd128(); y = rnd128();
      step(ALU_LOAD, x, 0);  check(x, "load");
      step(ALU_NOP, y, 0);   check(x, "nop");
      step(ALU_XOR, y, 0);   check(x ^ y, "xor");
      step(ALU_AND, x, 0);   check((x ^ y) & x, "and");
      step(ALU_LOAD, x, 0);
      step(ALU_SR, y, 0);    check(shift_rows(x), "shiftrows");
      step(ALU_LOAD, x, 0);
      for (int c = 0; c < 4; c++) begin
        step(ALU_MC, y, c);
        exp_v = x;
        for (int k = 0; k <= c; k++) exp_v[32*k +: 32] = mix_col(x[32*k +: 32]);
        check(exp_v, "mixcolumns step");
      end
      check(mix_columns(x), "mixcolumns");
      step(ALU_LOAD, x, 0);
      for (int s = 0; s <= 16; s++) begin
        step(ALU_SB, y, s);
        if (s == 15) begin
          // 16 steps done: bytes 0..14 substituted, byte 15 not yet
          exp_v = sub_bytes(x);
          exp_v[127:120] = x[127:120];
          check(exp_v, "subbytes after 16 steps");
        end
      end
      check(sub_bytes(x), "subbytes after 17 steps");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
