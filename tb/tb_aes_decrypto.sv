// tb_aes_decrypto: the decryptor as a bus slave, against reference encryption.
//
// Instance 0 uses the default (row-major) layout and key; instance 1 the
// FIPS-197 layout, where the published example (key 000102..0f, cipher
// 69c4e0d86a7b0430d8cdb78070b4c55a -> plain 00112233445566778899aabbccddeeff)
// applies directly. Random plain blocks are encrypted by the reference model,
// written as four words, and the four words read back must be the plain
// block. Timing checks: start follows the fourth word by one cycle, eoc comes
// 11 cycles after start, writes wait while a block is in flight or unread,
// and the status register reports busy/eoc.
module tb_aes_decrypto;
  import aes_pkg::*;
  import avalon_pkg::*;
  import tb_aes_ref::*;

  localparam logic [127:0] KEY = 128'h000102030405060708090a0b0c0d0e0f;

  logic clk = 0, rst_n = 0;
  avm_req_t req0, req1;
  avm_rsp_t rsp0, rsp1;
  logic     eoc [2];
  logic     busy [2];
  int checks = 0, failures = 0;
  int write_stalls = 0;

  aes_decrypto                                      dut0 (.clk, .rst_n, .avs_req(req0), .avs_rsp(rsp0), .eoc(eoc[0]), .busy(busy[0]));
  aes_decrypto #(.KEY(KEY), .ORDER(COLUMN_MAJOR))   dut1 (.clk, .rst_n, .avs_req(req1), .avs_rsp(rsp1), .eoc(eoc[1]), .busy(busy[1]));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Cycle bookkeeping, sampled at the falling edge where everything is stable.
  int ncyc = 0;
  int t_start [2], t_eoc [2];
  logic eoc_last [2] = '{1'b0, 1'b0};
  always @(negedge clk) begin
    ncyc++;
    if (dut0.start) t_start[0] = ncyc;
    if (dut1.start) t_start[1] = ncyc;
    for (int i = 0; i < 2; i++) begin
      if (eoc[i] && !eoc_last[i]) t_eoc[i] = ncyc;
      eoc_last[i] = eoc[i];
    end
  end

  function automatic void set_req(int i, avm_req_t r);
    if (i == 0) req0 = r; else req1 = r;
  endfunction
  function automatic avm_req_t get_req(int i);
    return (i == 0) ? req0 : req1;
  endfunction
  function automatic avm_rsp_t get_rsp(int i);
    return (i == 0) ? rsp0 : rsp1;
  endfunction

  int t_acc;
  task automatic bus_write(int i, logic [1:0] addr, logic [31:0] data);
    @(negedge clk);
    set_req(i, '{address: ADDR_W'(addr), read: 1'b0, write: 1'b1, writedata: data});
    #1;
    while (get_rsp(i).waitrequest) begin write_stalls++; @(negedge clk); #1; end
    t_acc = ncyc;
    @(posedge clk);
    #1 set_req(i, '0);
  endtask

  task automatic bus_read(int i, logic [1:0] addr, output logic [31:0] data);
    @(negedge clk);
    set_req(i, '{address: ADDR_W'(addr), read: 1'b1, write: 1'b0, writedata: '0});
    #1;
    while (get_rsp(i).waitrequest) begin @(negedge clk); #1; end
    data = get_rsp(i).readdata;
    @(posedge clk);
    #1 set_req(i, '0);
  endtask

  task automatic decrypt_block(int i, logic [127:0] ct, output logic [127:0] pt, input bit check_timing);
    logic [31:0] w;
    logic [31:0] st;
    for (int k = 0; k < 4; k++) bus_write(i, AES_REG_DATA, ct[127-32*k -: 32]);
    if (check_timing) begin
      @(posedge clk);
      @(negedge clk);
      #1;
      check(t_start[i] == t_acc + 1, $sformatf("start %0d cycles after 4th word", t_start[i] - t_acc));
      // A write offered while the block is in flight must be held off.
      set_req(i, '{address: ADDR_W'(AES_REG_DATA), read: 1'b0, write: 1'b1, writedata: 32'h0});
      #1;
      check(get_rsp(i).waitrequest == 1'b1, "write accepted while busy");
      if (get_rsp(i).waitrequest) write_stalls++;
      set_req(i, '0);
      bus_read(i, AES_REG_STATUS, st);
      check(st[1] == 1'b1 && st[0] == 1'b0, "status busy while computing");
      wait (eoc[i]);
      @(negedge clk);
      #1;
      // ... and also while the result is unread.
      set_req(i, '{address: ADDR_W'(AES_REG_DATA), read: 1'b0, write: 1'b1, writedata: 32'h0});
      #1;
      check(get_rsp(i).waitrequest == 1'b1, "write accepted while result unread");
      set_req(i, '0);
      check(t_eoc[i] - t_start[i] == 11, $sformatf("eoc %0d cycles after start", t_eoc[i] - t_start[i]));
      for (int k = 0; k < 4; k++) begin
        bus_read(i, AES_REG_DATA, w);
        pt[127-32*k -: 32] = w;
      end
    end else begin
      for (int k = 0; k < 4; k++) begin
        bus_read(i, AES_REG_DATA, w);
        pt[127-32*k -: 32] = w;
      end
    end
  endtask

  initial begin
    logic [127:0] pt, ct, got;
    logic [31:0]  st;
    req0 = '0; req1 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Published example, FIPS layout.
    decrypt_block(1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, got, 1'b1);
    check(got == 128'h00112233445566778899aabbccddeeff, $sformatf("FIPS example -> %032x", got));
    bus_read(1, AES_REG_STATUS, st);
    check(st[1:0] == 2'b00, "status idle after drain");

    // Random blocks, both layouts.
    for (int t = 0; t < 40; t++) begin
      pt = {$urandom, $urandom, $urandom, $urandom};
      ct = encrypt_row_major(KEY, pt);
      decrypt_block(0, ct, got, t == 0);
      check(got == pt, $sformatf("row-major block %0d: %032x != %032x", t, got, pt));
      ct = encrypt(KEY, pt);
      decrypt_block(1, ct, got, 1'b0);
      check(got == pt, $sformatf("FIPS block %0d: %032x != %032x", t, got, pt));
    end
    check(write_stalls > 0, "no write ever had to wait");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
