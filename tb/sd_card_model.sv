// sd_card_model: behavioural MMC/SD card in SPI mode, for simulation only.
//
// It decodes 6-byte command frames from mosi (sampled on the rising SCLK edge)
// and answers on miso (changed on the falling edge) from a queue of bits, so a
// response can be made to start at any bit offset (the variable skew, in bits)
// after ncr filler bytes. Supported: CMD0 (answers 01 after cmd0_delay filler
// bytes), CMD1 (answers 01 "idle" cmd1_busy times, then 00), CMD16 (sets the
// block length), CMD17 (R1 00, token_delay filler bytes, token FE, the block,
// two CRC bytes; a block reaching past capacity gets the data error token 08,
// out of range). Anything else answers 04 (illegal command). Data bytes come
// from mem, an associative array the testbench fills; unwritten bytes read as
// the low byte of their address. Counters and the recorded frames let the
// testbench check what the host sent.
module sd_card_model (
  input  logic cs_n,
  input  logic sclk,
  input  logic mosi,
  output logic miso
);

  logic [7:0] mem [int unsigned];
  int unsigned capacity    = 32'h0100_0000;
  int unsigned block_len   = 512;
  int          skew        = 0;
  int          ncr         = 1;
  int          cmd0_delay  = 3;
  int          cmd1_busy   = 3;
  int          token_delay = 2;

  int          clocks_cs_high = 0;
  int          cmd0_count = 0, cmd1_count = 0, cmd16_count = 0, cmd17_count = 0;
  int          error_tokens = 0;
  logic [47:0] last_frame [int];   // by command index
  bit          spi_mode = 0;

  bit          outq [$];
  bit          in_frame = 0;
  int          nbits = 0;
  logic [47:0] sr;

  initial miso = 1'b1;

  function automatic void push_byte(logic [7:0] b);
    for (int i = 7; i >= 0; i--) outq.push_back(b[i]);
  endfunction

  function automatic void push_fill(int nbytes, int extra_bits);
    for (int i = 0; i < 8 * nbytes + extra_bits; i++) outq.push_back(1'b1);
  endfunction

  function automatic logic [7:0] data_at(int unsigned a);
    return mem.exists(a) ? mem[a] : a[7:0];
  endfunction

  function automatic void command(logic [47:0] f);
    logic [5:0]  idx = f[45:40];
    logic [31:0] arg = f[39:8];
    last_frame[int'(idx)] = f;
    case (idx)
      6'd0: begin
        cmd0_count++;
        if (!cs_n && f[7:0] == 8'h95) spi_mode = 1;
        push_fill(ncr + cmd0_delay, skew);
        push_byte(8'h01);
      end
      6'd1: begin
        cmd1_count++;
        push_fill(ncr, skew);
        push_byte(cmd1_count <= cmd1_busy ? 8'h01 : 8'h00);
      end
      6'd16: begin
        cmd16_count++;
        block_len = arg;
        push_fill(ncr, skew);
        push_byte(8'h00);
      end
      6'd17: begin
        cmd17_count++;
        push_fill(ncr, skew);
        push_byte(8'h00);
        push_fill(token_delay, 0);
        if (arg + block_len > capacity) begin
          error_tokens++;
          push_byte(8'h08);
        end else begin
          push_byte(8'hfe);
          for (int unsigned i = 0; i < block_len; i++) push_byte(data_at(arg + i));
          push_byte(8'ha5);
          push_byte(8'h5a);
        end
      end
      default: begin
        push_fill(ncr, skew);
        push_byte(8'h04);
      end
    endcase
  endfunction

  always @(posedge sclk) begin
    if (cs_n) begin
      clocks_cs_high++;
    end else begin
      if (!in_frame) begin
        if (mosi == 1'b0) begin
          in_frame = 1;
          nbits    = 1;
          sr       = 48'h0;
        end
      end else begin
        sr = {sr[46:0], mosi};
        nbits++;
        if (nbits == 48) begin
          in_frame = 0;
          command(sr);
        end
      end
    end
  end

  always @(negedge sclk or posedge cs_n) begin
    if (cs_n) miso <= 1'b1;
    else if (outq.size() > 0) miso <= outq.pop_front();
    else miso <= 1'b1;
  end

endmodule
