// tb_aes_input_buffer: four pushes make one block and one start pulse.
// Checks the word order (first word -> bits [127:96]), that start is a single
// pulse in the cycle after the fourth push (four cycles of buffering with
// back-to-back pushes), and that gaps between pushes are allowed.
module tb_aes_input_buffer;
  logic         clk = 0, rst_n = 0, push = 0;
  logic [31:0]  word_in = '0;
  logic [127:0] block_out;
  logic [1:0]   fill;
  logic         start;
  int checks = 0, failures = 0;
  int starts = 0;

  aes_input_buffer dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (start) starts++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w [4];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 20; blk++) begin
      int gap = (blk % 2) ? 2 : 0;
      for (int k = 0; k < 4; k++) w[k] = $urandom;
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        push = 1; word_in = w[k];
        @(negedge clk);
        push = 0;
        check(start == 0 || k == 3, "start before the fourth word");
        if (k == 3) begin
          check(start == 1, "no start after the fourth word");
          check(block_out == {w[0], w[1], w[2], w[3]}, $sformatf("block %032x", block_out));
          check(fill == 0, "fill not back to zero");
        end else begin
          check(fill == 2'(k + 1), "fill count");
        end
        repeat (gap) @(negedge clk);
      end
      @(negedge clk);
      check(start == 0, "start longer than one cycle");
    end
    check(starts == 20, $sformatf("%0d start pulses", starts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
