// tb_aes_output_buffer: one load, eoc, four pops in order, eoc drops.
module tb_aes_output_buffer;
  logic         clk = 0, rst_n = 0, load = 0, pop = 0;
  logic [127:0] block_in = '0;
  logic [31:0]  word_out;
  logic         eoc;
  int checks = 0, failures = 0;

  aes_output_buffer dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] b;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(eoc == 0, "eoc after reset");
    for (int t = 0; t < 30; t++) begin
      b = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      load = 1; block_in = b;
      @(negedge clk);
      load = 0;
      check(eoc == 1, "eoc one cycle after load");
      for (int k = 0; k < 4; k++) begin
        check(eoc == 1, "eoc dropped early");
        check(word_out == b[127-32*k -: 32], $sformatf("word %0d = %08x", k, word_out));
        pop = 1;
        @(negedge clk);
        pop = 0;
        if (t % 3 == 0) begin
          // an idle cycle must not advance the buffer
          check(k == 3 || word_out == b[127-32*(k+1) -: 32], "word held over idle cycle");
          @(negedge clk);
        end
      end
      check(eoc == 0, "eoc still high after four pops");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
