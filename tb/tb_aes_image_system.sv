// tb_aes_image_system: end-to-end run of the whole system at full size.
//
// A behavioural SD card holds a 320x240 8-bit grayscale picture, encrypted
// with AES-128 (key 000102..0f, row-major byte order) and stored as raw bytes
// from address 0 (150 blocks of 512 bytes). A behavioural SRAM sits on the
// frame-buffer pins. The bench then plays the processor's part over the
// system bus, with the same steps the processor software performs:
//   wait for the card to be ready; try one read past the end of the card and
//   expect the error status; then for each 512-byte block start a card read,
//   and for every 16 bytes pop four words from the card, write them to the
//   decryptor, read the four plaintext words back and write them to the frame
//   buffer; finally switch the display on.
// One frame is captured at the video DAC and compared pixel by pixel with the
// picture shown 2x2 on the 640x480 screen. The screen must be black before the
// display is switched on. The card model is set to answer late, with CMD1
// busy replies, with responses starting off the byte boundary and with a wait
// before the data token, so that each mechanism of the hardware is exercised;
// the bench counts how often each one happened and fails if any count is
// zero. No parameter of the design is overridden.
module tb_aes_image_system;
  import avalon_pkg::*;

  localparam logic [127:0] KEY = 128'h000102030405060708090a0b0c0d0e0f;
  localparam int W = 320, H = 240;
  localparam int SD_BLOCK = 512;

  logic clk = 0, rst_n = 1;
  avm_req_t m_req;
  avm_rsp_t m_rsp;
  logic aes_eoc, sd_ready;
  logic sd_cs_n, sd_sclk, sd_mosi, sd_miso;
  logic [17:0] sram_addr;
  logic [15:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_we_n, sram_oe_n, sram_ce_n, sram_ub_n, sram_lb_n;
  logic vga_clk, vga_hs_n, vga_vs_n, vga_blank_n;
  logic [7:0] vga_r, vga_g, vga_b;
  int checks = 0, failures = 0;

  aes_image_system dut (.*);

  sd_card_model card (.cs_n(sd_cs_n), .sclk(sd_sclk), .mosi(sd_mosi), .miso(sd_miso));

  sram_model sram (
    .clk, .addr(sram_addr), .dq_i(sram_dq_o), .dq_o(sram_dq_i),
    .we_n(sram_we_n), .oe_n(sram_oe_n), .ce_n(sram_ce_n), .ub_n(sram_ub_n), .lb_n(sram_lb_n));

  always #10 clk = ~clk;   // 50 MHz

  function automatic logic [7:0] pic(int x, int y);
    return 8'((x * 3 + y * 5 + (x * y >> 4)) ^ (y << 2));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters -----------------------------------
  // Internal states are compared by value: ST_POLL = 3, ST_TOKEN = 7,
  // C_GO_IDLE = 0 in sd_controller; FINAL = 2 in aes_decrypto.
  int n_cmd0_polls = 0, n_token_waits = 0, n_skewed = 0, n_fast = 0;
  int n_aes_start = 0, n_aes_eoc = 0, n_aes_final = 0, n_aes_read_wait = 0;
  int n_vga_write_wait = 0, n_sd_pop_wait = 0, n_dark = 0, n_lit_early = 0;
  bit display_on = 0;
  logic eoc_d = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_sd.spi_done && int'(dut.u_sd.state_q) == 3 && int'(dut.u_sd.cmd_q) == 0 &&
        dut.u_sd.spi_rx == 8'hff) n_cmd0_polls++;
    if (dut.u_sd.spi_done && int'(dut.u_sd.state_q) == 7 && dut.u_sd.card_byte == 8'hff) begin
      n_token_waits++;
      if (dut.u_sd.align_q != 0) n_skewed++;
    end
    if (dut.u_sd.fast_q) n_fast++;
    if (dut.u_aes.start) n_aes_start++;
    if (int'(dut.u_aes.phase_q) == 2) n_aes_final++;
    eoc_d <= aes_eoc;
    if (aes_eoc && !eoc_d) n_aes_eoc++;
    if (m_rsp.waitrequest) begin
      if (m_req.address[17:16] == SEL_AES && m_req.read)  n_aes_read_wait++;
      if (m_req.address[17:16] == SEL_VGA && m_req.write) n_vga_write_wait++;
      if (m_req.address[17:16] == SEL_SD  && m_req.read)  n_sd_pop_wait++;
    end
  end

  always @(posedge vga_clk) if (!display_on && vga_blank_n) begin
    n_dark++;
    if (vga_r != 0 || vga_g != 0 || vga_b != 0) n_lit_early++;
  end

  // ---------------- processor side ----------------------------------------
  task automatic bus_write(logic [17:0] addr, logic [31:0] data);
    @(negedge clk);
    m_req = '{address: addr, read: 1'b0, write: 1'b1, writedata: data};
    #1;
    while (m_rsp.waitrequest) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 m_req = '0;
  endtask

  task automatic bus_read(logic [17:0] addr, output logic [31:0] data);
    @(negedge clk);
    m_req = '{address: addr, read: 1'b1, write: 1'b0, writedata: '0};
    #1;
    while (m_rsp.waitrequest) begin @(negedge clk); #1; end
    data = m_rsp.readdata;
    @(posedge clk);
    #1 m_req = '0;
  endtask

  localparam logic [17:0] SD_DATA   = {2'(SEL_SD), 16'(SD_REG_DATA)};
  localparam logic [17:0] SD_STATUS = {2'(SEL_SD), 16'(SD_REG_STATUS)};
  localparam logic [17:0] AES_DATA  = {2'(SEL_AES), 16'(AES_REG_DATA)};
  localparam logic [17:0] VGA_CTRL  = {2'(SEL_VGA), 16'h8000};

  initial begin
    logic [127:0] pt, ct;
    logic [31:0] w, st;
    logic [31:0] words [4];
    int bad, k, x, y, vis;

    m_req = '0;
    // encrypted picture on the card
    for (int b = 0; b < W * H / 16; b++) begin
      for (int i = 0; i < 16; i++) pt[127 - 8 * i -: 8] = pic((16 * b + i) % W, (16 * b + i) / W);
      ct = tb_aes_ref::encrypt_row_major(KEY, pt);
      for (int i = 0; i < 16; i++) card.mem[16 * b + i] = ct[127 - 8 * i -: 8];
    end
    card.cmd0_delay  = 4;
    card.cmd1_busy   = 3;
    card.skew        = 5;
    card.token_delay = 3;

    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    wait (sd_ready);
    bus_read(SD_STATUS, st);
    check(st[0] && !st[3], $sformatf("status after wake-up %08x", st));
    check(card.cmd1_count == 4, $sformatf("CMD1 sent %0d times", card.cmd1_count));

    // a read past the end of the card is refused with the data error token
    bus_write(SD_DATA, card.capacity - 100);
    wait (sd_ready);
    bus_read(SD_STATUS, st);
    check(st[3] && st[15:8] == 8'h08, $sformatf("error status %08x", st));

    // load and decrypt the picture
    for (int blk = 0; blk < W * H / SD_BLOCK; blk++) begin
      bus_write(SD_DATA, blk * SD_BLOCK);
      for (int a = 0; a < SD_BLOCK / 16; a++) begin
        for (int i = 0; i < 4; i++) bus_read(SD_DATA, words[i]);
        for (int i = 0; i < 4; i++) bus_write(AES_DATA, words[i]);
        for (int i = 0; i < 4; i++) bus_read(AES_DATA, words[i]);
        for (int i = 0; i < 4; i++)
          bus_write({2'(SEL_VGA), 16'(blk * SD_BLOCK / 4 + a * 4 + i)}, words[i]);
      end
    end
    wait (sd_ready);
    bus_read(SD_STATUS, st);
    check(!st[3], $sformatf("error status after the picture %08x", st));

    // all frame-buffer writes reach the SRAM within a few cycles
    repeat (20) @(posedge clk);
    bad = 0;
    for (int unsigned a = 0; a < W * H / 2; a++)
      if (sram.mem[a] != {pic(2 * (a % (W / 2)), a / (W / 2)), pic(2 * (a % (W / 2)) + 1, a / (W / 2))})
        bad++;
    check(bad == 0, $sformatf("frame buffer: %0d words wrong", bad));

    bus_write(VGA_CTRL, 32'h1);
    bus_read(VGA_CTRL, w);
    check(w == 32'h1, "display enable register");
    display_on = 1;

    // capture one frame, vsync falling edge to vsync falling edge
    @(negedge vga_vs_n);
    k = 0; bad = 0;
    fork
      forever begin
        @(posedge vga_clk);
        if (vga_blank_n) begin
          x = k % (2 * W);
          y = k / (2 * W);
          if (vga_r != pic(x / 2, y / 2) || vga_g != vga_r || vga_b != vga_r) begin
            if (bad < 5) $display("pixel (%0d,%0d) = %02x expected %02x", x, y, vga_r, pic(x / 2, y / 2));
            bad++;
          end
          k++;
        end
      end
      @(negedge vga_vs_n);
    join_any
    disable fork;
    check(k == 4 * W * H, $sformatf("%0d visible samples", k));
    check(bad == 0, $sformatf("%0d wrong pixels", bad));

    // every mechanism must have happened at least once
    vis = W * H / 16;
    $display("CMD0 polls without answer %0d, CMD1 sent %0d, token waits %0d (with bit offset %0d)",
             n_cmd0_polls, card.cmd1_count, n_token_waits, n_skewed);
    $display("AES starts %0d, eoc %0d, final rounds %0d, result waits %0d",
             n_aes_start, n_aes_eoc, n_aes_final, n_aes_read_wait);
    $display("card word waits %0d, frame-buffer write waits %0d, dark samples %0d, cycles at fast SCLK %0d",
             n_sd_pop_wait, n_vga_write_wait, n_dark, n_fast);
    check(n_cmd0_polls > 0, "CMD0 never polled without an answer");
    check(card.cmd1_count > 1, "CMD1 never repeated");
    check(n_skewed > 0, "no response arrived off the byte boundary");
    check(n_token_waits > 0, "no wait for the data token");
    check(card.error_tokens > 0, "no data error token");
    check(n_fast > 0, "SCLK never switched to the fast rate");
    check(n_aes_start == vis && n_aes_eoc == vis, "one decryption per 16 bytes");
    check(n_aes_final == vis, "one final round (no InvMixColumns) per block");
    check(n_aes_read_wait > 0, "result read never waited for eoc");
    check(n_sd_pop_wait > 0, "card word read never waited");
    check(n_vga_write_wait > 0, "frame-buffer write never waited");
    check(n_dark > 0 && n_lit_early == 0, $sformatf("display before enable: %0d of %0d lit", n_lit_early, n_dark));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
