// spi_master: byte-wide SPI master (mode 0) for an MMC/SD card.
//
// A start pulse exchanges one byte: tx_byte goes out on mosi, most significant
// bit first, while eight bits are sampled from miso into rx_byte. SCLK idles low,
// mosi changes after the falling edge and miso is sampled on the rising edge.
// Each SCLK half period lasts half_period system clocks (at least 1), so one
// byte takes 16*half_period cycles; half_period is an input so the card can be
// woken at a slow clock and then read at a fast one. done pulses for one cycle
// when rx_byte is valid; start is ignored while busy. mosi rests high between
// bytes, which is the idle level a card expects. The mode, the rate control
// and the handshake are this design's choices; the document only asks for an
// SPI link to the card, MSB first.
module spi_master (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] tx_byte,
  input  logic [7:0] half_period,
  output logic       busy,
  output logic       done,
  output logic [7:0] rx_byte,
  output logic       sclk,
  output logic       mosi,
  input  logic       miso
);

  logic [7:0] tx_sr, rx_sr;
  logic [7:0] div_q;
  logic [2:0] bit_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      rx_byte <= 8'hff;
      sclk    <= 1'b0;
      tx_sr   <= 8'hff;
      rx_sr   <= 8'hff;
      div_q   <= '0;
      bit_q   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          tx_sr <= tx_byte;
          bit_q <= '0;
          div_q <= (half_period == 0) ? 8'd0 : half_period - 8'd1;
        end
      end else if (div_q != 0) begin
        div_q <= div_q - 8'd1;
      end else begin
        div_q <= (half_period == 0) ? 8'd0 : half_period - 8'd1;
        if (!sclk) begin
          sclk  <= 1'b1;                       // rising edge: sample
          rx_sr <= {rx_sr[6:0], miso};
        end else begin
          sclk <= 1'b0;                        // falling edge: next bit
          if (bit_q == 3'd7) begin
            busy    <= 1'b0;
            done    <= 1'b1;
            rx_byte <= rx_sr;
            tx_sr   <= 8'hff;
          end else begin
            bit_q <= bit_q + 3'd1;
            tx_sr <= {tx_sr[6:0], 1'b1};
          end
        end
      end
    end
  end

  assign mosi = tx_sr[7];

endmodule
