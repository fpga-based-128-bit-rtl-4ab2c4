// tb_vga_timing: two full frames of 640x480 timing at the default parameters.
// Checks: a pixel every second system clock, 800 pixels per line and 525 lines
// per frame, 640x480 active pixels per frame, hsync low for 96 pixels starting
// 16 pixels after the active part, vsync low for 2 lines starting 10 lines
// after it, and the origin at the top-left.
module tb_vga_timing;
  logic clk = 0, rst_n = 0;
  logic pix_ce, vga_clk, active, hsync_n, vsync_n;
  logic [9:0] h_count, v_count;
  int checks = 0, failures = 0;

  vga_timing dut (.*);

  always #10 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pixels, act, hs_len, hs_start, lines, vs_lines, vs_first, ce_count, clks;
    bit hs_err;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // wait for the start of a frame
    do @(posedge clk); while (!(pix_ce && h_count == 799 && v_count == 524));
    @(negedge clk);
    check(h_count == 0 && v_count == 0 && active, "origin after wrap");
    for (int f = 0; f < 2; f++) begin
      act = 0; lines = 0; vs_lines = 0; vs_first = -1; hs_err = 0; ce_count = 0; clks = 0;
      for (int y = 0; y < 525; y++) begin
        hs_len = 0; hs_start = -1; pixels = 0;
        for (int x = 0; x < 800; x++) begin
          // at a falling edge, counters show the pixel of this period
          if (h_count != 10'(x) || v_count != 10'(y)) hs_err = 1;
          if (active) act++;
          if (active != (x < 640 && y < 480)) hs_err = 1;
          if (!hsync_n) begin hs_len++; if (hs_start < 0) hs_start = x; end
          if (x == 0 && !vsync_n) begin vs_lines++; if (vs_first < 0) vs_first = y; end
          pixels++;
          // one pixel = two system clocks
          repeat (2) begin @(negedge clk); clks++; if (pix_ce) ce_count++; end
        end
        if (y == 0 || y == 300) begin
          check(hs_len == 96 && hs_start == 656, $sformatf("line %0d hsync %0d at %0d", y, hs_len, hs_start));
          check(pixels == 800, "pixels per line");
        end
        lines++;
      end
      check(!hs_err, "counter sequence / active window");
      check(act == 640 * 480, $sformatf("active pixels %0d", act));
      check(lines == 525, "lines per frame");
      check(vs_lines == 2 && vs_first == 490, $sformatf("vsync %0d lines at %0d", vs_lines, vs_first));
      check(ce_count * 2 == clks, "pixel enable every second clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
