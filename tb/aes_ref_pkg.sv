// aes_ref_pkg -- behavioural AES-128 reference model for the testbenches.
//
// Written independently of the RTL: the GF(2^8) inverse is found by
// exhaustive search, the affine map is applied bit by bit from its matrix
// form, MixColumns is a general matrix-vector product with gmul, and the
// state is kept as a [row][column] array. Tables are built on first use and
// cached in package variables.
package aes_ref_pkg;
  typedef logic [7:0]   b8_t;
  typedef logic [127:0] blk_t;
  typedef b8_t          st_t [4][4];   // [row][col]
  typedef blk_t         rk_t [11];

  b8_t S_T  [256];
  b8_t SI_T [256];
  bit  tables_ok = 0;

  function automatic b8_t rmul(b8_t a, b8_t b);
    b8_t p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = {a[6:0], 1'b0} ^ (8'h1b & {8{a[7]}});
    end
    return p;
  endfunction

  function automatic void build_tables();
    for (int x = 0; x < 256; x++) begin
      b8_t inv = 0, s;
      for (int y = 1; y < 256; y++)
        if (rmul(b8_t'(x), b8_t'(y)) == 8'h01) inv = b8_t'(y);
      for (int i = 0; i < 8; i++)
        s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ (8'h63 >> i) & 1'b1;
      S_T[x] = s;
    end
    for (int x = 0; x < 256; x++) SI_T[S_T[x]] = b8_t'(x);
    tables_ok = 1;
  endfunction

  function automatic b8_t rsbox(b8_t x);
    if (!tables_ok) build_tables();
    return S_T[x];
  endfunction

  function automatic b8_t rinv_sbox(b8_t x);
    if (!tables_ok) build_tables();
    return SI_T[x];
  endfunction

  function automatic st_t to_st(blk_t b);
    st_t s;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) s[r][c] = b[127 - 8*(r + 4*c) -: 8];
    return s;
  endfunction

  function automatic blk_t from_st(st_t s);
    blk_t b;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) b[127 - 8*(r + 4*c) -: 8] = s[r][c];
    return b;
  endfunction

  function automatic blk_t r_sub(blk_t b, bit inv);
    for (int k = 0; k < 16; k++)
      b[8*k +: 8] = inv ? rinv_sbox(b[8*k +: 8]) : rsbox(b[8*k +: 8]);
    return b;
  endfunction

  // Row r rotated left by r (inv = 0) or right by r (inv = 1).
  function automatic blk_t r_shift(blk_t b, bit inv);
    st_t s = to_st(b), t;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (inv) t[r][(c + r) % 4] = s[r][c];
        else     t[r][c] = s[r][(c + r) % 4];
    return from_st(t);
  endfunction

  function automatic blk_t r_mix(blk_t b, bit inv);
    b8_t fwd [4] = '{8'h02, 8'h03, 8'h01, 8'h01};
    b8_t bwd [4] = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    st_t s = to_st(b), t;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        t[r][c] = 0;
        for (int j = 0; j < 4; j++)
          t[r][c] ^= rmul(inv ? bwd[(j - r + 4) % 4] : fwd[(j - r + 4) % 4], s[j][c]);
      end
    return from_st(t);
  endfunction

  function automatic rk_t r_expand(blk_t key);
    logic [31:0] w [44];
    b8_t rc = 8'h01;
    rk_t rk;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {rsbox(t[31:24]), rsbox(t[23:16]), rsbox(t[15:8]), rsbox(t[7:0])};
        t[31:24] ^= rc;
        rc = rmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic blk_t r_encrypt(blk_t pt, blk_t key);
    rk_t rk = r_expand(key);
    blk_t s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = r_shift(r_sub(s, 0), 0);
      if (r != 10) s = r_mix(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic blk_t r_decrypt(blk_t ct, blk_t key);
    rk_t rk = r_expand(key);
    blk_t s = ct ^ rk[10];
    for (int r = 1; r <= 10; r++) begin
      s = r_sub(r_shift(s, 1), 1);
      s ^= rk[10 - r];
      if (r != 10) s = r_mix(s, 1);
    end
    return s;
  endfunction

  function automatic blk_t rand_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction
endpackage
