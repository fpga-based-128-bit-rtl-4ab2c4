// aes_output_buffer: holds one 128-bit plain block and hands it out in four
// 32-bit words.
//
// load stores a block and raises eoc ("end of computation") in the next cycle.
// While eoc is high, word_out shows the next word to be read, starting with
// block bits [127:96] (block bytes 0..3); each pop advances to the next word,
// and the fourth pop empties the buffer and drops eoc. A load while eoc is
// high is a protocol error: the producer must wait until the block is drained.
module aes_output_buffer (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [127:0] block_in,
  input  logic         pop,
  output logic [31:0]  word_out,
  output logic         eoc
);

  logic [127:0] data_q;
  logic [1:0]   rd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_q <= '0;
      rd_q   <= '0;
      eoc    <= 1'b0;
    end else if (load) begin
      data_q <= block_in;
      rd_q   <= '0;
      eoc    <= 1'b1;
    end else if (pop && eoc) begin
      data_q <= {data_q[95:0], 32'h0};
      rd_q   <= rd_q + 2'd1;
      if (rd_q == 2'd3) eoc <= 1'b0;
    end
  end

  assign word_out = data_q[127:96];

  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n) load |-> !eoc)
    else $error("output buffer loaded before the previous block was read");

endmodule
