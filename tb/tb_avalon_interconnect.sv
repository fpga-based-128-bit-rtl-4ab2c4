// tb_avalon_interconnect: address decoding of the system bus.
// Three bench slaves answer with their own signature and a waitrequest pattern;
// random master accesses must reach exactly the selected slave, with the
// select bits cleared from the address, and the master must see that slave's
// readdata and waitrequest. The unused region must read zero without waiting.
module tb_avalon_interconnect;
  import avalon_pkg::*;

  avm_req_t m_req, aes_req, sd_req, vga_req;
  avm_rsp_t m_rsp, aes_rsp, sd_rsp, vga_rsp;
  int checks = 0, failures = 0;

  avalon_interconnect dut (.*);

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
    logic [1:0] sel;
    logic [15:0] off;
    for (int t = 0; t < 400; t++) begin
      sel = 2'(t % 4);
      off = 16'($urandom);
      m_req = '{address: {sel, off}, read: t[2], write: !t[2], writedata: $urandom};
      aes_rsp = '{readdata: 32'hAE5_0000 | 32'(off), waitrequest: t[3]};
      sd_rsp  = '{readdata: 32'h5D0_0000 | 32'(off), waitrequest: t[4]};
      vga_rsp = '{readdata: 32'h76A_0000 | 32'(off), waitrequest: t[5]};
      #1;
      check((aes_req.read | aes_req.write) == (sel == SEL_AES), "AES strobe");
      check((sd_req.read  | sd_req.write)  == (sel == SEL_SD),  "SD strobe");
      check((vga_req.read | vga_req.write) == (sel == SEL_VGA), "VGA strobe");
      check(aes_req.address == {2'b00, off} && aes_req.writedata == m_req.writedata, "address/data passed");
      case (sel)
        SEL_AES: check(m_rsp == aes_rsp, "AES response");
        SEL_SD:  check(m_rsp == sd_rsp,  "SD response");
        SEL_VGA: check(m_rsp == vga_rsp, "VGA response");
        default: check(m_rsp.readdata == 0 && !m_rsp.waitrequest, "unmapped region");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
