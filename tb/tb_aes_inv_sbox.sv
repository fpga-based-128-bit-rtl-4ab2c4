// tb_aes_inv_sbox: exhaustive check of the inverse S-box.
// Every one of the 256 inputs is applied; the output must map back to the
// input through the reference forward S-box, and a few entries are compared
// with published table values (52 09 6a d5 at the start, 0c 7d at the end).
module tb_aes_inv_sbox;
  import tb_aes_ref::*;

  logic [7:0] in_b, out_b;
  int checks = 0, failures = 0;

  aes_inv_sbox dut (.in_byte(in_b), .out_byte(out_b));

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
    for (int i = 0; i < 256; i++) begin
      in_b = 8'(i);
      #1;
      check(sbox(out_b) == in_b, $sformatf("inv_sbox(%02x)=%02x", in_b, out_b));
    end
    in_b = 8'h00; #1; check(out_b == 8'h52, "entry 00");
    in_b = 8'h01; #1; check(out_b == 8'h09, "entry 01");
    in_b = 8'h02; #1; check(out_b == 8'h6a, "entry 02");
    in_b = 8'h03; #1; check(out_b == 8'hd5, "entry 03");
    in_b = 8'hfe; #1; check(out_b == 8'h0c, "entry fe");
    in_b = 8'hff; #1; check(out_b == 8'h7d, "entry ff");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
