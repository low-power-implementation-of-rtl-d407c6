// aes_ref_pkg: behavioural AES-128 reference model for the testbenches.
//
// Written independently of the RTL: the state is a 4x4 byte matrix, the
// S-box is built once by init() from a brute-force search for the GF(2^8)
// inverse and the affine map written as a matrix-vector product, and the key
// schedule is computed word by word as in FIPS-197. Call init() before any
// other function.
package aes_ref_pkg;

  typedef logic [7:0]   u8;
  typedef logic [127:0] blk;
  typedef u8 state_t [4][4];   // [row][col]

  u8 sbox_tab [256];

  function automatic u8 mul(u8 a, u8 b);
    u8 p = 0;
    u8 aa = a, bb = b;
    while (bb != 0) begin
      if (bb[0]) p ^= aa;
      aa = (aa << 1) ^ ((aa & 8'h80) != 0 ? 8'h1b : 8'h00);
      bb >>= 1;
    end
    return p;
  endfunction

  function automatic void init();
    // affine matrix rows: bit i of result = parity(row_i & b) ^ c_i
    for (int x = 0; x < 256; x++) begin
      u8 inv = 0;
      u8 res;
      u8 cst = 8'h63;
      for (int y = 1; y < 256; y++) if (mul(u8'(x), u8'(y)) == 8'h01) inv = u8'(y);
      for (int i = 0; i < 8; i++) begin
        u8 row = u8'((8'hF1 << i) | (8'hF1 >> (8 - i)));
        res[i] = (^(row & inv)) ^ cst[i];
      end
      sbox_tab[x] = res;
    end
  endfunction

  function automatic state_t to_state(blk b);
    state_t s;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) s[r][c] = b[127 - 8*(4*c + r) -: 8];
    return s;
  endfunction

  function automatic blk from_state(state_t s);
    blk b;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) b[127 - 8*(4*c + r) -: 8] = s[r][c];
    return b;
  endfunction

  // One round on a block; last = 1 skips MixColumns.
  function automatic blk round(blk in, blk rk, bit last);
    state_t s = to_state(in), t;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) t[r][c] = sbox_tab[s[(r)][(c + r) % 4]];
    if (!last)
      for (int c = 0; c < 4; c++)
        for (int r = 0; r < 4; r++)
          s[r][c] = mul(8'h02, t[r][c]) ^ mul(8'h03, t[(r+1)%4][c]) ^ t[(r+2)%4][c] ^ t[(r+3)%4][c];
    else
      s = t;
    return from_state(s) ^ rk;
  endfunction

  function automatic void expand(blk key, output blk rk [11]);
    logic [31:0] w [44];
    u8 rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox_tab[t[31:24]], sbox_tab[t[23:16]], sbox_tab[t[15:8]], sbox_tab[t[7:0]]};
        t[31:24] ^= rc;
        rc = mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int k = 0; k < 11; k++) rk[k] = {w[4*k], w[4*k+1], w[4*k+2], w[4*k+3]};
  endfunction

  function automatic blk encrypt(blk pt, blk rk [11]);
    blk s = pt ^ rk[0];
    for (int i = 1; i <= 10; i++) s = round(s, rk[i], i == 10);
    return s;
  endfunction

  function automatic blk rand_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
