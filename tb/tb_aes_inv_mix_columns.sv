// tb_aes_inv_mix_columns: InvMixColumns against the forward transform.
// Random states: the reference forward MixColumns of the output must give the
// input back. One known column: MixColumns(db 13 53 45) = (8e 4d a1 bc), so the
// inverse of 8e 4d a1 bc must be db 13 53 45.
module tb_aes_inv_mix_columns;
  import aes_pkg::*;
  import tb_aes_ref::*;

  state_t s_in, s_out;
  int checks = 0, failures = 0;

  aes_inv_mix_columns dut (.state_in(s_in), .state_out(s_out));

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
      if (mix_columns(to_fips(s_out)) != to_fips(s_in)) begin
        failures++;
        $display("FAIL in=%032x out=%032x", s_in, s_out);
      end
    end
    s_in = '0;
    {s_in[0][2], s_in[1][2], s_in[2][2], s_in[3][2]} = 32'h8e4da1bc;
    #1;
    checks++;
    if ({s_out[0][2], s_out[1][2], s_out[2][2], s_out[3][2]} != 32'hdb135345) begin
      failures++;
      $display("FAIL known column");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
