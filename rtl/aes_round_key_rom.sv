// aes_round_key_rom: the statically stored round keys ("expansion keys").
//
// The decryptor works with one fixed 128-bit key, so instead of a key-expansion
// unit it keeps all eleven round keys in a constant table and reads the one the
// current round needs. The table is computed at elaboration from the KEY
// parameter by the standard AES-128 key schedule (aes_pkg::expand_key); KEY is
// laid out like a data block (byte 0 in [127:120]) and ORDER says how its bytes
// fill the key matrix. Combinational read: round in, 128-bit key state out.
// The default key is the FIPS-197 example key 000102...0f; a real build sets
// KEY to the key the images were encrypted with.
module aes_round_key_rom
  import aes_pkg::*;
#(
  parameter logic [127:0] KEY   = 128'h000102030405060708090a0b0c0d0e0f,
  parameter block_order_e ORDER = ROW_MAJOR
) (
  input  logic [3:0] round,      // 0..10
  output state_t     round_key
);

  localparam round_keys_t KEYS = expand_key(block_to_state(KEY, ORDER));

  always_comb begin
    round_key = KEYS[0];
    for (int r = 0; r <= NUM_ROUNDS; r++)
      if (round == 4'(r)) round_key = KEYS[r];
  end

endmodule
