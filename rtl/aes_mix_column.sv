// aes_mix_column: AES MixColumns on one 4-byte column, without multipliers.
//
// Multiplication by 2 is a left shift with a conditional XOR of 0x1b
// (xtime); multiplication by 3 is xtime plus the byte itself. With
// t = a0^a1^a2^a3 each output byte is b_i = a_i ^ t ^ xtime(a_i ^ a_(i+1)),
// so the four bytes are produced in parallel by four xtime units and XOR
// gates, as in the design's low-area MixColumns. Byte 0 of the column (row 0)
// is at bits [7:0]. Purely combinational.
module aes_mix_column (
  input  logic [31:0] col_in,
  output logic [31:0] col_out
);

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  logic [7:0] a [4];
  logic [7:0] t;

  always_comb begin
    for (int i = 0; i < 4; i++) a[i] = col_in[8*i +: 8];
    t = a[0] ^ a[1] ^ a[2] ^ a[3];
    for (int i = 0; i < 4; i++)
      col_out[8*i +: 8] = a[i] ^ t ^ xtime(a[i] ^ a[(i + 1) % 4]);
  end

endmodule
