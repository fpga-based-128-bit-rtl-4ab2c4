// aes_inv_sbox: the AES inverse substitution box, one byte in, one byte out.
//
// Purely combinational lookup. The 256-entry table is not typed in: it is
// built at elaboration by aes_pkg::inv_sbox_table() from the definition of the
// inverse S-box (inverse affine map followed by the GF(2^8) inverse), so it is
// the same table the decryption program uses. Synthesis maps it to a ROM or
// LUT logic.
module aes_inv_sbox
  import aes_pkg::*;
(
  input  byte_t in_byte,
  output byte_t out_byte
);

  localparam logic [255:0][7:0] TABLE = inv_sbox_table();

  assign out_byte = TABLE[in_byte];

endmodule
