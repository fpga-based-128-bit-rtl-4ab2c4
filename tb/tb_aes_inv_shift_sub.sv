// tb_aes_inv_shift_sub: random states through InvShiftRows/InvSubBytes.
// The check applies the reference forward SubBytes+ShiftRows to the output
// and expects the input back. The state is [row][col]; the reference works on
// FIPS byte strings, so the state is converted with byte n = row n%4, col n/4.
module tb_aes_inv_shift_sub;
  import aes_pkg::*;
  import tb_aes_ref::*;

  state_t s_in, s_out;
  int checks = 0, failures = 0;

  aes_inv_shift_sub dut (.state_in(s_in), .state_out(s_out));

  function automatic logic [127:0] to_fips(state_t s);
    logic [127:0] b;
    for (int n = 0; n < 16; n++) b[127-8*n -: 8] = s[n%4][n/4];
    return b;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      s_in = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (sub_shift(to_fips(s_out)) != to_fips(s_in)) begin
        failures++;
        $display("FAIL in=%032x out=%032x", s_in, s_out);
      end
    end
    // Row 1 of a state whose bytes are all 0x52 except [1][0]=0x09: after the
    // right rotation by one the 0x01 (InvSbox(0x09)) must sit at [1][1].
    s_in = {16{8'h52}};
    s_in[1][0] = 8'h09;
    #1;
    checks++;
    if (s_out[1][1] != 8'h40 || s_out[1][0] != 8'h48) begin
      failures++;
      $display("FAIL rotation direction: row1 = %08x", s_out[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
