// sram_model: behavioural 256K x 16 asynchronous SRAM (the frame-buffer chip),
// for simulation only.
// Reads are combinational: with ce_n and oe_n low and we_n high, dq_o shows the
// addressed word. A write stores dq_i at the address on a rising clk edge at
// which ce_n and we_n are low (the real part is asynchronous; sampling on the
// controller's clock is a simplification of the model). Byte enables are
// honoured. Unwritten words read as zero. write_count counts stored writes.
module sram_model #(
  parameter int unsigned AW = 18
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [15:0]   dq_i,
  output logic [15:0]   dq_o,
  input  logic          we_n,
  input  logic          oe_n,
  input  logic          ce_n,
  input  logic          ub_n,
  input  logic          lb_n
);
  logic [15:0] mem [int unsigned];
  int write_count = 0;

  always_comb begin
    dq_o = 16'h0;
    if (!ce_n && !oe_n && we_n && mem.exists(addr)) dq_o = mem[addr];
  end

  always @(posedge clk) begin
    if (!ce_n && !we_n) begin
      logic [15:0] w;
      w = mem.exists(addr) ? mem[addr] : 16'h0;
      if (!ub_n) w[15:8] = dq_i[15:8];
      if (!lb_n) w[7:0]  = dq_i[7:0];
      mem[addr] = w;
      write_count++;
    end
  end
endmodule
