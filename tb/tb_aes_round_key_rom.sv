// tb_aes_round_key_rom: the stored round keys.
// Two instances: the FIPS-197 appendix A key in FIPS byte order (last round key
// d014f9a8c9ee2589e13f0cc8b6630ca6 is published), and the default key in the
// row-major order, whose round keys are the transposed FIPS ones. All eleven
// rounds of both are compared with the word-based reference key schedule.
module tb_aes_round_key_rom;
  import aes_pkg::*;
  import tb_aes_ref::*;

  localparam logic [127:0] KEY_A = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam logic [127:0] KEY_D = 128'h000102030405060708090a0b0c0d0e0f;

  logic [3:0] round;
  state_t     rk_a, rk_d;
  int checks = 0, failures = 0;

  aes_round_key_rom #(.KEY(KEY_A), .ORDER(COLUMN_MAJOR)) dut_a (.round(round), .round_key(rk_a));
  aes_round_key_rom                                      dut_d (.round(round), .round_key(rk_d));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r <= 10; r++) begin
      round = 4'(r);
      #1;
      check(state_to_block(rk_a, COLUMN_MAJOR) == round_key(KEY_A, r),
            $sformatf("key A round %0d: %032x", r, state_to_block(rk_a, COLUMN_MAJOR)));
      check(state_to_block(rk_d, ROW_MAJOR) == transpose(round_key(transpose(KEY_D), r)),
            $sformatf("default key round %0d", r));
    end
    round = 4'd10;
    #1;
    check(state_to_block(rk_a, COLUMN_MAJOR) == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6,
          "published last round key");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
