// tb_spi_master: byte exchanges with a mode-0 SPI slave written in the bench.
// The slave samples mosi on rising SCLK edges and changes miso after falling
// edges, MSB first. Checks both directions for random bytes at several
// half-period settings, the byte time of 16*half_period clocks, the single
// done pulse, SCLK resting low and mosi resting high between bytes.
module tb_spi_master;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] tx_byte = '0, half_period = 8'd1;
  logic busy, done, sclk, mosi, miso;
  logic [7:0] rx_byte;
  int checks = 0, failures = 0;

  spi_master dut (.*);

  always #5 clk = ~clk;

  // bench slave
  logic [7:0] slave_out, slave_in;
  int nbits = 0;
  initial miso = 1'b1;
  always @(posedge sclk) begin slave_in = {slave_in[6:0], mosi}; nbits++; end
  always @(negedge sclk) begin slave_out = {slave_out[6:0], 1'b1}; miso = slave_out[7]; end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] t, s;
    int t0, t1, dones;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(sclk == 0 && mosi == 1 && !busy, "idle levels after reset");
    for (int hp = 1; hp <= 5; hp += 2) begin
      half_period = 8'(hp);
      for (int n = 0; n < 20; n++) begin
        t = 8'($urandom); s = 8'($urandom);
        slave_out = s; miso = s[7]; nbits = 0;
        @(negedge clk);
        start = 1; tx_byte = t;
        t0 = $time;
        @(negedge clk);
        start = 0;
        dones = 0;
        while (!done) @(negedge clk);
        t1 = $time;
        dones++;
        @(negedge clk);
        if (done) dones++;
        check(rx_byte == s, $sformatf("rx %02x expected %02x", rx_byte, s));
        check(slave_in == t, $sformatf("slave got %02x expected %02x", slave_in, t));
        check(nbits == 8, $sformatf("%0d SCLK pulses", nbits));
        check((t1 - t0) / 10 == 16 * hp + 1, $sformatf("byte took %0d clocks", (t1 - t0) / 10));
        check(dones == 1 && sclk == 0 && mosi == 1 && !busy, "done pulse / idle levels");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
