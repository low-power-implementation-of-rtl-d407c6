// aes_pkg: types, constants and byte-level functions shared by the AES-128
// encryption datapath (cipher rounds, cores and the shared key expansion).
//
// A 128-bit block is held as in FIPS-197: byte k of the block (k = 0 is the
// first byte of the input) sits in bits [127-8k -: 8], and the state byte in
// row r, column c is byte r + 4c. The S-box is not stored as a typed-in table:
// make_sbox() computes it at elaboration as the multiplicative inverse in
// GF(2^8) (modulus x^8+x^4+x^3+x+1, 0 maps to 0) followed by the FIPS-197
// affine transform, and the result is a 256-entry constant ROM.
package aes_pkg;

  localparam int unsigned BLOCK_W = 128;   // AES block width
  localparam int unsigned NR      = 10;    // rounds of AES-128

  typedef logic [7:0]           byte_t;
  typedef logic [31:0]          word_t;
  typedef logic [BLOCK_W-1:0]   block_t;
  // Round keys 0..NR; index 0 is the cipher key used by the initial AddRoundKey.
  typedef block_t [NR:0]        round_keys_t;

  // Multiplication by x in GF(2^8).
  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // General multiplication in GF(2^8), shift-and-add.
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = 8'h00;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = xtime(x);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (square and multiply); 0 maps to 0.
  function automatic byte_t gf_inv(byte_t a);
    byte_t r = 8'h01;
    byte_t s = a;
    for (int i = 0; i < 8; i++) begin   // 254 = 8'b1111_1110
      if (i != 0) r = gf_mul(r, s);
      s = gf_mul(s, s);
    end
    return r;
  endfunction

  function automatic byte_t affine(byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  function automatic logic [255:0][7:0] make_sbox();
    logic [255:0][7:0] t;
    for (int i = 0; i < 256; i++) t[i] = affine(gf_inv(byte_t'(i)));
    return t;
  endfunction

  localparam logic [255:0][7:0] SBOX = make_sbox();

  function automatic byte_t sbox(byte_t b);
    return SBOX[b];
  endfunction

  function automatic byte_t get_byte(block_t s, int unsigned k);
    return s[127-8*k -: 8];
  endfunction

  function automatic block_t sub_bytes(block_t s);
    block_t r;
    for (int k = 0; k < 16; k++) r[127-8*k -: 8] = sbox(s[127-8*k -: 8]);
    return r;
  endfunction

  // Row r is rotated left by r columns: out[r][c] = in[r][(c+r) mod 4].
  function automatic block_t shift_rows(block_t s);
    block_t r;
    for (int row = 0; row < 4; row++)
      for (int col = 0; col < 4; col++)
        r[127-8*(row+4*col) -: 8] = s[127-8*(row+4*((col+row)%4)) -: 8];
    return r;
  endfunction

  function automatic word_t mix_column(word_t w);
    byte_t a0 = w[31:24], a1 = w[23:16], a2 = w[15:8], a3 = w[7:0];
    byte_t t  = a0 ^ a1 ^ a2 ^ a3;
    return {a0 ^ t ^ xtime(a0 ^ a1),
            a1 ^ t ^ xtime(a1 ^ a2),
            a2 ^ t ^ xtime(a2 ^ a3),
            a3 ^ t ^ xtime(a3 ^ a0)};
  endfunction

  function automatic block_t mix_columns(block_t s);
    block_t r;
    for (int col = 0; col < 4; col++) r[127-32*col -: 32] = mix_column(s[127-32*col -: 32]);
    return r;
  endfunction

  function automatic word_t sub_word(word_t w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

  // One step of the AES-128 key schedule: round key i from round key i-1.
  function automatic block_t next_round_key(block_t k, byte_t rcon);
    word_t w0 = k[127:96], w1 = k[95:64], w2 = k[63:32], w3 = k[31:0];
    word_t t  = sub_word({w3[23:0], w3[31:24]}) ^ {rcon, 24'h0};
    word_t n0 = w0 ^ t;
    word_t n1 = w1 ^ n0;
    word_t n2 = w2 ^ n1;
    word_t n3 = w3 ^ n2;
    return {n0, n1, n2, n3};
  endfunction

endpackage
