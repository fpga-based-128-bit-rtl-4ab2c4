// aes_inv_shift_sub: InvShiftRows followed by InvSubBytes, as one block.
//
// InvShiftRows rotates row r of the state r positions to the right. It costs no
// logic here: it is only the choice of which input byte feeds which of the 16
// inverse S-boxes (out[r][c] = InvSbox(in[r][(c - r) mod 4])), so the separate
// shift stage of the algorithm disappears into the wiring in front of the
// S-boxes, as the datapath intends. Combinational, zero latency.
module aes_inv_shift_sub
  import aes_pkg::*;
(
  input  state_t state_in,
  output state_t state_out
);

  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      aes_inv_sbox u_sbox (
        .in_byte (state_in[r][(c + 4 - r) % 4]),
        .out_byte(state_out[r][c])
      );
    end
  end

endmodule
