// tb_vga_sram_controller: a whole 320x240 picture through the bus, the SRAM and
// the video output, at the default parameters.
// The picture (pixel value a function of x and y) is written as 19200 bus
// words while the raster runs, so writes collide with display reads and must
// wait. Then the display is enabled and one frame is captured at the DAC
// (sampled on the rising vga_clk): the k-th sample with blank_n high in a
// frame is screen pixel (k%640, k/640) and must equal picture pixel
// (x/2, y/2). Also checked: 307200 visible samples per frame, black while the
// display is disabled, the SRAM contents, and that writes had to wait.
module tb_vga_sram_controller;
  import avalon_pkg::*;

  logic clk = 0, rst_n = 1;
  avm_req_t req;
  avm_rsp_t rsp;
  logic [17:0] sram_addr;
  logic [15:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_we_n, sram_oe_n, sram_ce_n, sram_ub_n, sram_lb_n;
  logic vga_clk, vga_hs_n, vga_vs_n, vga_blank_n;
  logic [7:0] vga_r, vga_g, vga_b;
  int checks = 0, failures = 0;
  int write_waits = 0;

  vga_sram_controller dut (.clk, .rst_n, .avs_req(req), .avs_rsp(rsp),
    .sram_addr, .sram_dq_o, .sram_dq_i, .sram_dq_oe, .sram_we_n, .sram_oe_n,
    .sram_ce_n, .sram_ub_n, .sram_lb_n,
    .vga_clk, .vga_hs_n, .vga_vs_n, .vga_blank_n, .vga_r, .vga_g, .vga_b);

  sram_model sram (.clk, .addr(sram_addr), .dq_i(sram_dq_o), .dq_o(sram_dq_i),
    .we_n(sram_we_n), .oe_n(sram_oe_n), .ce_n(sram_ce_n), .ub_n(sram_ub_n), .lb_n(sram_lb_n));

  always #10 clk = ~clk;   // 50 MHz

  function automatic logic [7:0] pic(int x, int y);
    return 8'(x * 7 + y * 13 + (x >> 3));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(logic [15:0] addr, logic [31:0] data);
    @(negedge clk);
    req = '{address: ADDR_W'(addr), read: 1'b0, write: 1'b1, writedata: data};
    #1;
    while (rsp.waitrequest) begin write_waits++; @(negedge clk); #1; end
    @(posedge clk);
    #1 req = '0;
  endtask

  // visible samples while disabled must be black
  int dark_bad = 0, dark_seen = 0;
  bit enabled = 0;
  always @(posedge vga_clk) if (!enabled && vga_blank_n) begin
    dark_seen++;
    if (vga_r != 0 || vga_g != 0 || vga_b != 0) dark_bad++;
  end

  initial begin
    logic [31:0] w;
    int k, bad, p, x, y;
    req = '0;
    #1 rst_n = 0;             // a real edge, so the SRAM pins are reset before the first clock
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int wi = 0; wi < 320 * 240 / 4; wi++) begin
      for (int j = 0; j < 4; j++) begin
        p = 4 * wi + j;
        w[31-8*j -: 8] = pic(p % 320, p / 320);
      end
      bus_write(16'(wi), w);
    end
    repeat (20) @(posedge clk);
    check(sram.write_count == 320 * 240 / 2, $sformatf("%0d SRAM writes", sram.write_count));
    bad = 0;
    for (int unsigned a = 0; a < 320 * 240 / 2; a++)
      if (sram.mem[a] != {pic(2 * (a % 160), a / 160), pic(2 * (a % 160) + 1, a / 160)}) begin
        bad++;
        $display("SRAM word %0d = %04x", a, sram.mem[a]);
      end
    check(bad == 0, $sformatf("SRAM packing: %0d words wrong", bad));
    check(dark_seen > 0 && dark_bad == 0, $sformatf("disabled display: %0d of %0d not black", dark_bad, dark_seen));
    check(write_waits > 0, "no write ever waited for the SRAM port");
    bus_write(16'h8000, 32'h1);
    enabled = 1;
    // capture one frame, vsync falling edge to vsync falling edge
    @(negedge vga_vs_n);
    k = 0; bad = 0;
    fork
      begin
        forever begin
          @(posedge vga_clk);
          if (vga_blank_n) begin
            x = k % 640;
            y = k / 640;
            if (vga_r != pic(x / 2, y / 2) || vga_g != vga_r || vga_b != vga_r) begin
              if (bad < 5) $display("pixel (%0d,%0d) = %02x expected %02x", x, y, vga_r, pic(x / 2, y / 2));
              bad++;
            end
            k++;
          end
        end
      end
      @(negedge vga_vs_n);
    join_any
    disable fork;
    check(k == 640 * 480, $sformatf("%0d visible samples", k));
    check(bad == 0, $sformatf("%0d wrong pixels", bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
