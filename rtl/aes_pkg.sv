// aes_pkg: types and constant functions shared by the AES-128 decryption blocks.
//
// The cipher state is a 4x4 matrix of bytes held as a packed array indexed
// [row][column]. How the 16 bytes of a 128-bit block fill that matrix is a
// parameter of the design (block_order_e): ROW_MAJOR puts bytes 0..3 of the block
// in row 0, which is the layout of the file encryption program the decryptor
// is paired with, so that each 32-bit bus word is one row of the state;
// COLUMN_MAJOR is the FIPS-197 layout, bytes 0..3 in column 0. Byte 0 of a
// block is always bits [127:120].
//
// The S-box tables and the key schedule are not stored as literal tables: they
// are computed here at elaboration time from the field arithmetic of GF(2^8)
// with the reduction polynomial x^8+x^4+x^3+x+1 (0x11b):
//   sbox(x)     = A(x^-1)  with the affine map A(b)_i = b_i ^ b_(i+4) ^ b_(i+5)
//                          ^ b_(i+6) ^ b_(i+7) ^ c_i, c = 0x63 (indices mod 8)
//   inv_sbox(y) = (B(y))^-1 with B(b)_i = b_(i+2) ^ b_(i+5) ^ b_(i+7) ^ d_i,
//                          d = 0x05, and 0^-1 = 0
// where x^-1 is computed as x^254.
package aes_pkg;

  typedef logic [7:0]                 byte_t;
  typedef logic [3:0][7:0]            column_t;   // [row]
  typedef logic [3:0][3:0][7:0]       state_t;    // [row][column]
  typedef logic [10:0][3:0][3:0][7:0] round_keys_t; // [round][row][column]

  typedef enum logic {ROW_MAJOR = 1'b0, COLUMN_MAJOR = 1'b1} block_order_e;

  localparam int unsigned NUM_ROUNDS = 10;

  // Multiply by x (0x02) modulo 0x11b.
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General multiply in GF(2^8).
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = 8'h00;
    byte_t t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (a^254 = 0 for a = 0).
  function automatic byte_t gf_inv(byte_t a);
    byte_t r = 8'h01;
    byte_t sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);   // 254 = 0b11111110
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic byte_t sbox(byte_t x);
    byte_t b = gf_inv(x);
    byte_t s;
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  function automatic byte_t inv_sbox(byte_t y);
    byte_t b;
    for (int i = 0; i < 8; i++)
      b[i] = y[(i+2)%8] ^ y[(i+5)%8] ^ y[(i+7)%8];
    return gf_inv(b ^ 8'h05);
  endfunction

  // Whole inverse S-box as a packed table, entry i in bits [8*i+7 : 8*i].
  function automatic logic [255:0][7:0] inv_sbox_table();
    logic [255:0][7:0] t;
    for (int i = 0; i < 256; i++) t[i] = inv_sbox(byte_t'(i));
    return t;
  endfunction

  // 128-bit block (byte 0 in [127:120]) to state matrix and back.
  function automatic state_t block_to_state(logic [127:0] blk, block_order_e order);
    state_t s;
    for (int n = 0; n < 16; n++) begin
      if (order == ROW_MAJOR) s[n/4][n%4] = blk[127-8*n -: 8];
      else                    s[n%4][n/4] = blk[127-8*n -: 8];
    end
    return s;
  endfunction

  function automatic logic [127:0] state_to_block(state_t s, block_order_e order);
    logic [127:0] blk;
    for (int n = 0; n < 16; n++) begin
      if (order == ROW_MAJOR) blk[127-8*n -: 8] = s[n/4][n%4];
      else                    blk[127-8*n -: 8] = s[n%4][n/4];
    end
    return blk;
  endfunction

  // AES-128 key schedule: round key r is words w[4r..4r+3], word c being
  // column c of the round-key matrix. Round 0 is the cipher key itself.
  function automatic round_keys_t expand_key(state_t key);
    round_keys_t rk;
    column_t     t;
    byte_t       rcon = 8'h01;
    rk[0] = key;
    for (int r = 1; r <= NUM_ROUNDS; r++) begin
      // RotWord + SubWord on the last column of the previous round key.
      for (int i = 0; i < 4; i++) t[i] = sbox(rk[r-1][(i+1)%4][3]);
      t[0] ^= rcon;
      for (int i = 0; i < 4; i++) rk[r][i][0] = rk[r-1][i][0] ^ t[i];
      for (int c = 1; c < 4; c++)
        for (int i = 0; i < 4; i++) rk[r][i][c] = rk[r][i][c-1] ^ rk[r-1][i][c];
      rcon = xtime(rcon);
    end
    return rk;
  endfunction

endpackage
