// aegis_ref_pkg: behavioural AEGIS128 reference for the testbenches.
//
// Written independently of the RTL: the S-box is found by searching for the
// multiplicative inverse and applying the affine map bit by bit, and
// MixColumns multiplies by 2 and 3 with a generic GF(2^8) multiplier. 128-bit
// words use the RTL's byte order (byte k at bits [8k+7:8k]).
package aegis_ref_pkg;

  typedef logic [127:0] blk_t;
  typedef blk_t state_t [5];

  localparam blk_t C0 = 128'h6279E990593722150D08050302010100;
  localparam blk_t C1 = 128'hDD28B57342311120F12FC26D55183DDB;

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h011b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] x);
    logic [7:0] inv = 8'h00;
    logic [7:0] r;
    for (int y = 1; y < 256; y++) if (gmul(x, 8'(y)) == 8'h01) inv = 8'(y);
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  function automatic logic [7:0] byte_of(blk_t v, int k);
    return v[8*k +: 8];
  endfunction

  function automatic blk_t sub_bytes(blk_t x);
    blk_t o;
    for (int k = 0; k < 16; k++) o[8*k +: 8] = sbox(x[8*k +: 8]);
    return o;
  endfunction

  function automatic blk_t shift_rows(blk_t x);
    blk_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[8*(4*c+r) +: 8] = x[8*(4*((c+r)%4)+r) +: 8];
    return o;
  endfunction

  function automatic logic [31:0] mix_col(logic [31:0] a);
    logic [31:0] o;
    for (int r = 0; r < 4; r++)
      o[8*r +: 8] = gmul(8'h02, a[8*r +: 8]) ^ gmul(8'h03, a[8*((r+1)%4) +: 8]) ^
                    a[8*((r+2)%4) +: 8] ^ a[8*((r+3)%4) +: 8];
    return o;
  endfunction

  function automatic blk_t mix_columns(blk_t x);
    blk_t o;
    for (int c = 0; c < 4; c++) o[32*c +: 32] = mix_col(x[32*c +: 32]);
    return o;
  endfunction

  function automatic blk_t aes_round(blk_t x, blk_t k);
    return mix_columns(shift_rows(sub_bytes(x))) ^ k;
  endfunction

  function automatic void update(ref state_t s, input blk_t m);
    state_t n;
    n[0] = aes_round(s[4], s[0] ^ m);
    for (int j = 1; j < 5; j++) n[j] = aes_round(s[j-1], s[j]);
    s = n;
  endfunction

  function automatic blk_t len_mask(longint unsigned bits);
    blk_t m;
    for (int i = 0; i < 128; i++) m[i] = (bits % 128 == 0) || (longint'(i) < bits % 128);
    return m;
  endfunction

  // Full AEAD. ad/msg hold the blocks (zero padded); lengths are in bits.
  // For decryption msg holds ciphertext blocks and out receives plaintext.
  function automatic void aead(input blk_t key, input blk_t iv,
                               input blk_t ad[$], input longint unsigned adlen,
                               input blk_t msg[$], input longint unsigned msglen,
                               input bit dec, output blk_t out[$], output blk_t tag);
    state_t s;
    blk_t ks, p, tmp;
    s[0] = key ^ iv; s[1] = C1; s[2] = C0; s[3] = key ^ C0; s[4] = key ^ C1;
    for (int i = 0; i < 5; i++) begin update(s, key); update(s, iv); end
    foreach (ad[i]) update(s, ad[i]);
    out = {};
    foreach (msg[i]) begin
      blk_t mk = (i == msg.size() - 1) ? len_mask(msglen) : '1;
      ks = s[1] ^ s[4] ^ (s[2] & s[3]);
      if (dec) begin
        p = (msg[i] ^ ks) & mk;
        out.push_back(p);
      end else begin
        p = msg[i] & mk;
        out.push_back(p ^ ks);
      end
      update(s, p);
    end
    tmp = s[3] ^ {msglen[63:0], adlen[63:0]};
    for (int i = 0; i < 7; i++) update(s, tmp);
    tag = s[0] ^ s[1] ^ s[2] ^ s[3] ^ s[4];
  endfunction

endpackage
