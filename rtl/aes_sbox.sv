// aes_sbox: the AES S-box as combinational logic with one pipeline stage.
//
// The byte is inverted in GF(2^8) (polynomial x^8+x^4+x^3+x+1, 0 maps to 0)
// and then put through the AES affine transform. There is no lookup table:
// the inverse is x^254, formed by the addition chain
//   x^2, x^3 = x^2*x, x^12 = (x^3)^4, x^15 = x^12*x^3,
//   x^240 = (x^15)^16, x^252 = x^240*x^12, x^254 = x^252*x^2
// where squaring is a fixed XOR network and four GF(2^8) multipliers remain.
// The logic-only S-box with one register stage follows the design; the
// particular inversion circuit is this implementation's choice.
//
// Timing: sbox_out is S(din) of the previous clock (one cycle latency).
// No reset: the register holds data only and is always written.
module aes_sbox (
  input  logic       clk,
  input  logic [7:0] din,
  output logic [7:0] dout
);

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p;
    logic [7:0] t;
    p = '0;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ t;
      t = {t[6:0], 1'b0} ^ (t[7] ? 8'h1b : 8'h00);
    end
    return p;
  endfunction

  function automatic logic [7:0] gf_sq(input logic [7:0] a);
    return gf_mul(a, a);
  endfunction

  function automatic logic [7:0] affine(input logic [7:0] b);
    logic [7:0] s;
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8];
    return s ^ 8'h63;
  endfunction

  logic [7:0] x2, x3, x12, x15, x240, x252, x254;

  always_comb begin
    x2   = gf_sq(din);
    x3   = gf_mul(x2, din);
    x12  = gf_sq(gf_sq(x3));
    x15  = gf_mul(x12, x3);
    x240 = gf_sq(gf_sq(gf_sq(gf_sq(x15))));
    x252 = gf_mul(x240, x12);
    x254 = gf_mul(x252, x2);
  end

  always_ff @(posedge clk) dout <= affine(x254);

endmodule
