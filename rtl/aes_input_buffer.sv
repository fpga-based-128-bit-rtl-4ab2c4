// aes_input_buffer: gathers four 32-bit bus words into one 128-bit cipher block.
//
// The bus carries 32 bits per transfer, so a block arrives in four pushes. Word
// k of a block carries block bytes 4k..4k+3 (byte 4k in bits [31:24]), i.e. the
// words fill the block from its most significant end. A push of the fourth word
// latches the block and produces a one-cycle start pulse in the following
// cycle, together with the complete block on block_out; the counter then
// starts over for the next block. With one push per cycle the block is
// buffered in four clock cycles.
module aes_input_buffer (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [31:0]  word_in,
  output logic [127:0] block_out,
  output logic [1:0]   fill,       // words held of the block being gathered
  output logic         start
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      block_out <= '0;
      fill      <= '0;
      start     <= 1'b0;
    end else begin
      start <= 1'b0;
      if (push) begin
        block_out <= {block_out[95:0], word_in};
        fill      <= fill + 2'd1;
        if (fill == 2'd3) start <= 1'b1;
      end
    end
  end

endmodule
