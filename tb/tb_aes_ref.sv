// tb_aes_ref: reference AES-128 *encryption* for the testbenches.
//
// Written independently of the design's package: the S-box comes from
// log/antilog tables of the generator 0x03 instead of an x^254 power, the key
// schedule works on 32-bit words w[0..43], and the cipher is the forward
// direction, so a decryptor checked against it is checked against the
// definition rather than against itself. Blocks are FIPS-197 byte strings,
// byte 0 in [127:120]; transpose() converts to and from the row-major layout
// of the file encryption program.
package tb_aes_ref;

  function automatic logic [7:0] mul2(logic [7:0] a);
    return (a << 1) ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Computed once, on first use.
  logic [7:0] sbox_t [256];
  bit         sbox_built = 0;

  function automatic void build_sbox();
    logic [7:0] expt [256];
    logic [7:0] logt [256];
    logic [7:0] p, inv;
    p = 8'h01;
    for (int i = 0; i < 255; i++) begin
      expt[i] = p;
      logt[p] = 8'(i);
      p = mul2(p) ^ p;                      // p * 3
    end
    for (int x = 0; x < 256; x++) begin
      inv = (x == 0) ? 8'h00 : expt[(255 - int'(logt[x])) % 255];
      // affine: inv ^ rotl1 ^ rotl2 ^ rotl3 ^ rotl4 ^ 0x63
      sbox_t[x] = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]}
                      ^ {inv[3:0], inv[7:4]} ^ 8'h63;
    end
    sbox_built = 1;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] x);
    if (!sbox_built) build_sbox();
    return sbox_t[x];
  endfunction

  function automatic logic [7:0] inv_sbox(logic [7:0] y);
    for (int x = 0; x < 256; x++) if (sbox(8'(x)) == y) return 8'(x);
    return 8'h00;
  endfunction

  function automatic logic [7:0] blk_byte(logic [127:0] b, int n);
    return b[127-8*n -: 8];
  endfunction

  // Forward ShiftRows(SubBytes()) on FIPS byte order (byte n = row n%4, col n/4).
  function automatic logic [127:0] sub_shift(logic [127:0] b);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = sbox(blk_byte(b, 4*((c+r)%4)+r));
    return o;
  endfunction

  function automatic logic [127:0] mix_columns(logic [127:0] b);
    logic [127:0] o;
    logic [7:0] a [4];
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) a[r] = blk_byte(b, 4*c+r);
      for (int r = 0; r < 4; r++)
        o[127-8*(4*c+r) -: 8] = mul2(a[r]) ^ (mul2(a[(r+1)%4]) ^ a[(r+1)%4])
                               ^ a[(r+2)%4] ^ a[(r+3)%4];
    end
    return o;
  endfunction

  // Round key r (0..10) as a 128-bit FIPS block.
  function automatic logic [127:0] round_key(logic [127:0] key, int r);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rcon;
    rcon = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
        t[31:24] ^= rcon;
        rcon = mul2(rcon);
      end
      w[i] = w[i-4] ^ t;
    end
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] key, logic [127:0] pt);
    logic [127:0] s;
    logic [127:0] rk [11];
    for (int r = 0; r <= 10; r++) rk[r] = round_key(key, r);
    s = pt ^ rk[0];
    for (int r = 1; r <= 9; r++) s = mix_columns(sub_shift(s)) ^ rk[r];
    return sub_shift(s) ^ rk[10];
  endfunction

  // Byte n <-> byte 4*(n%4) + n/4: FIPS order versus row-major order.
  function automatic logic [127:0] transpose(logic [127:0] b);
    logic [127:0] o;
    for (int n = 0; n < 16; n++) o[127-8*(4*(n%4)+n/4) -: 8] = blk_byte(b, n);
    return o;
  endfunction

  // What the file encryption program produces (row-major state layout).
  function automatic logic [127:0] encrypt_row_major(logic [127:0] key, logic [127:0] pt);
    return transpose(encrypt(transpose(key), transpose(pt)));
  endfunction

endpackage
