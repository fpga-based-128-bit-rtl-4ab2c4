// aes_inv_mix_columns: the AES InvMixColumns transform on a whole state.
//
// Each column a[0..3] is multiplied by the circulant matrix
//   | 0e 0b 0d 09 |
//   | 09 0e 0b 0d |
//   | 0d 09 0e 0b |
//   | 0b 0d 09 0e |
// in GF(2^8). The constant products are built from x2, x4 and x8 (repeated
// xtime): 09 = 8+1, 0b = 8+2+1, 0d = 8+4+1, 0e = 8+4+2. Combinational.
module aes_inv_mix_columns
  import aes_pkg::*;
(
  input  state_t state_in,
  output state_t state_out
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      byte_t a [4];
      byte_t m2 [4];
      byte_t m4 [4];
      byte_t m8 [4];
      for (int r = 0; r < 4; r++) begin
        a[r]  = state_in[r][c];
        m2[r] = xtime(a[r]);
        m4[r] = xtime(m2[r]);
        m8[r] = xtime(m4[r]);
      end
      for (int r = 0; r < 4; r++) begin
        state_out[r][c] =
            (m8[r]         ^ m4[r]         ^ m2[r])           // 0e * a[r]
          ^ (m8[(r+1)%4]   ^ m2[(r+1)%4]   ^ a[(r+1)%4])      // 0b * a[r+1]
          ^ (m8[(r+2)%4]   ^ m4[(r+2)%4]   ^ a[(r+2)%4])      // 0d * a[r+2]
          ^ (m8[(r+3)%4]   ^ a[(r+3)%4]);                     // 09 * a[r+3]
      end
    end
  end

endmodule
