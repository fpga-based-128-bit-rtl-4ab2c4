// tb_sd_controller: the SD-card controller against a behavioural card.
//
// Checks the wake-up sequence as seen by the card (80 clocks with nCS high,
// CMD0 frame 40 00 00 00 00 95, CMD1 repeated until the card leaves idle,
// CMD16 with the block length), the SCLK rates before and after wake-up, block
// reads at every response bit offset 0..7 word by word against the card's
// memory, and a read past the card's capacity that must end with the error
// bit and the data error token in the status register. A card that answers
// CMD0 late must raise the no-card status bit, which clears when it answers. Clock dividers are
// shortened to keep the run brief.
module tb_sd_controller;
  import avalon_pkg::*;

  localparam int INIT_HP = 4;
  localparam int FAST_HP = 1;

  logic clk = 0, rst_n = 0;
  avm_req_t req;
  avm_rsp_t rsp;
  logic ready, cs_n, sclk, mosi, miso;
  int checks = 0, failures = 0;

  sd_controller #(.INIT_HALF_PERIOD(INIT_HP), .FAST_HALF_PERIOD(FAST_HP), .NO_CARD_POLLS(8)) dut (
    .clk, .rst_n, .avs_req(req), .avs_rsp(rsp), .ready,
    .sd_cs_n(cs_n), .sd_sclk(sclk), .sd_mosi(mosi), .sd_miso(miso));

  sd_card_model card (.cs_n, .sclk, .mosi, .miso);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SCLK high time in system clocks, measured continuously.
  int hi_len = 0, last_hi = 0;
  always @(posedge clk) begin
    if (sclk) hi_len++;
    else if (hi_len != 0) begin last_hi = hi_len; hi_len = 0; end
  end

  task automatic bus_write(logic [1:0] addr, logic [31:0] data);
    @(negedge clk);
    req = '{address: ADDR_W'(addr), read: 1'b0, write: 1'b1, writedata: data};
    #1;
    while (rsp.waitrequest) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 req = '0;
  endtask

  task automatic bus_read(logic [1:0] addr, output logic [31:0] data);
    @(negedge clk);
    req = '{address: ADDR_W'(addr), read: 1'b1, write: 1'b0, writedata: '0};
    #1;
    while (rsp.waitrequest) begin @(negedge clk); #1; end
    data = rsp.readdata;
    @(posedge clk);
    #1 req = '0;
  endtask

  initial begin
    logic [31:0] w, st, exp;
    int unsigned base;
    req = '0;
    for (int unsigned a = 0; a < 4096; a++) card.mem[a] = 8'($urandom);
    card.cmd1_busy = 4;
    card.cmd0_delay = 12;           // longer than NO_CARD_POLLS polls
    repeat (3) @(posedge clk);
    rst_n = 1;

    // wake-up at the slow clock; the card answers CMD0 late, so the
    // no-card bit must come on and go off again once it answers
    repeat (200) @(posedge clk);
    check(last_hi == INIT_HP, $sformatf("init SCLK high time %0d", last_hi));
    st = '0;
    for (int i = 0; i < 2000 && !st[4]; i++) bus_read(SD_REG_STATUS, st);
    check(st[4] == 1'b1 && st[0] == 1'b0, $sformatf("no-card bit while CMD0 is unanswered, status %08x", st));
    wait (ready);
    bus_read(SD_REG_STATUS, st);
    check(st[4] == 1'b0, "no-card bit cleared after the card answered");
    check(card.clocks_cs_high == 80, $sformatf("%0d clocks with nCS high", card.clocks_cs_high));
    check(card.spi_mode, "card not put in SPI mode by CMD0");
    check(card.last_frame[0] == 48'h40_0000_0000_95, $sformatf("CMD0 frame %012x", card.last_frame[0]));
    check(card.cmd0_count == 1, "CMD0 sent more than once");
    check(card.cmd1_count == 5, $sformatf("CMD1 sent %0d times", card.cmd1_count));
    check(card.cmd16_count == 1 && card.last_frame[16][39:8] == 512, "CMD16 block length");
    check(card.last_frame[1][0] == 1'b1 && card.last_frame[16][0] == 1'b1, "end bit");
    bus_read(SD_REG_STATUS, st);
    check(st[0] == 1'b1 && st[3] == 1'b0, $sformatf("status after wake-up %08x", st));

    // block reads at every bit offset of the card's responses
    for (int s = 0; s < 8; s++) begin
      card.skew = s;
      card.token_delay = s % 3;
      base = 512 * (s % 8);
      bus_write(SD_REG_DATA, base);
      for (int k = 0; k < 128; k++) begin
        bus_read(SD_REG_DATA, w);
        exp = {card.mem[base+4*k], card.mem[base+4*k+1], card.mem[base+4*k+2], card.mem[base+4*k+3]};
        if (w != exp) begin
          check(0, $sformatf("skew %0d word %0d: %08x != %08x", s, k, w, exp));
          break;
        end
      end
      checks++;
      check(card.last_frame[17][39:8] == base && card.last_frame[17][47:40] == 8'h51, "CMD17 frame");
      wait (ready);
      bus_read(SD_REG_STATUS, st);
      check(st[3] == 1'b0, "error bit after a good read");
    end
    check(last_hi == FAST_HP, $sformatf("fast SCLK high time %0d", last_hi));

    // read past the end of the card: data error token
    card.skew = 5;
    bus_write(SD_REG_DATA, card.capacity - 100);
    wait (ready);
    bus_read(SD_REG_STATUS, st);
    check(st[3] == 1'b1 && st[15:8] == 8'h08, $sformatf("error status %08x", st));
    check(card.error_tokens == 1, "card sent no error token");
    // and the next read works again
    card.skew = 0;
    bus_write(SD_REG_DATA, 0);
    bus_read(SD_REG_DATA, w);
    check(w == {card.mem[0], card.mem[1], card.mem[2], card.mem[3]}, "first word after an error");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
