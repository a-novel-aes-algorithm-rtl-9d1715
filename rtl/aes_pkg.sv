// aes_pkg -- types, sizes and GF(2^8) arithmetic shared by the AES-128 core.
//
// A 128-bit block is held as a packed vector, byte 0 in bits 127:120 and
// byte 15 in bits 7:0. The state is filled column by column: state byte
// (row r, column c) is block byte r + 4c, so column c occupies bits
// 127-32c downto 96-32c, the same split the key schedule uses for its four
// 32-bit key words.
//
// The S-box and inverse S-box are not typed in: they are computed while the
// design elaborates, from the definition of the cipher. The forward S-box
// of byte x is the multiplicative inverse of x in GF(2^8) (modulo
// x^8 + x^4 + x^3 + x + 1, with 0 mapped to 0), raised here as x^254 by
// square-and-multiply, followed by the affine map
//   b' = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63.
// The inverse table is the inverse permutation of the forward one. Both end
// up as 256-entry constant tables, i.e. ROMs after synthesis.
//
// The key length and round count (Nk = 4 words, Nr = 10 rounds) are those of
// AES-128, the configuration this core implements.
package aes_pkg;

  localparam int unsigned NK = 4;    // key words
  localparam int unsigned NR = 10;   // rounds for a 128-bit key

  typedef logic [7:0]   aes_byte_t;
  typedef logic [31:0]  aes_word_t;
  typedef logic [127:0] aes_block_t;

  // Multiply by x (02) in GF(2^8): shift left, reduce with 1B on carry-out.
  function automatic aes_byte_t xtime(aes_byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product by shift-and-add.
  function automatic aes_byte_t gmul(aes_byte_t a, aes_byte_t b);
    aes_byte_t p = 8'h00;
    aes_byte_t t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (a^255 = 1 for a != 0; 0 maps to 0).
  function automatic aes_byte_t ginv(aes_byte_t a);
    aes_byte_t r = 8'h01;
    aes_byte_t sq = a;
    // 254 = 8'b1111_1110
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gmul(r, sq);
      sq = gmul(sq, sq);
    end
    return r;
  endfunction

  function automatic aes_byte_t rotl8(aes_byte_t b, int unsigned n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic aes_byte_t sbox_value(aes_byte_t x);
    aes_byte_t b = ginv(x);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  typedef aes_byte_t [255:0] sbox_table_t;

  function automatic sbox_table_t make_sbox();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_value(aes_byte_t'(i));
    return t;
  endfunction

  function automatic sbox_table_t make_inv_sbox();
    sbox_table_t f = make_sbox();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[f[i]] = aes_byte_t'(i);
    return t;
  endfunction

  localparam sbox_table_t SBOX     = make_sbox();
  localparam sbox_table_t INV_SBOX = make_inv_sbox();

  // Byte k (0 = most significant) of a block.
  function automatic aes_byte_t get_byte(aes_block_t s, int unsigned k);
    return s[127 - 8*k -: 8];
  endfunction

endpackage
