// sd_controller: MMC/SD card reader in SPI mode, as a 32-bit bus slave.
//
// The card holds the encrypted image as raw blocks (no file system). After
// reset the controller wakes the card up on its own, following the usual
// SPI-mode sequence:
//   80 clocks with nCS high; nCS low; CMD0 (40 00 00 00 00 95, the only frame
//   whose CRC matters); 8 clocks; poll until a response arrives; 8 clocks;
//   CMD1; 8 clocks; poll; 8 clocks; CMD1 again while the response still has
//   the idle bit set; then CMD16 to fix the block length at BLOCK_BYTES.
// Every command is a 6-byte frame sent MSB first: {01, index[5:0]}, a 32-bit
// argument, and a CRC byte whose bit 0 is the end bit (0xFF when ignored).
//
// A response may start at any bit, not only on a byte boundary. While polling,
// the first received byte that is not FF gives the offset of the start bit
// (its number of leading ones); from then on every card byte is taken from
// the last two received bytes shifted by that offset, so responses, tokens
// and data all arrive aligned. This costs one extra byte after each response.
//
// Single-block read: a bus write of a byte address issues CMD17. After an R1
// of 00 the controller waits for the data token FE, then packs the
// BLOCK_BYTES data bytes into 32-bit words (first byte in bits [31:24]); each
// word is held until the bus pops it, and SCLK stops meanwhile, so no block
// buffer is needed. The two CRC bytes are discarded. A data error token
// (0000 out_of_range card_ecc_failed cc_error error) or a non-zero R1 ends the
// read with the error bit set and the token/R1 in the status register.
//
// Bus registers (word offsets, see avalon_pkg):
//   0 write  start a block read at the written byte address (waits until ready)
//   0 read   pop the next data word (waits while a read is still producing it)
//   1 read   status: [0] ready  [1] read busy  [2] word valid  [3] error
//                    [4] no response to CMD0 yet after NO_CARD_POLLS polls
//                    [15:8] last error token or R1
// The card is clocked at INIT_HALF_PERIOD during wake-up and FAST_HALF_PERIOD
// afterwards (system clocks per SCLK half period). The command set, CMD0
// framing, wake-up steps and tokens follow the card's SPI protocol as
// documented; the register map, the clock rates, re-issuing CMD1 while busy and
// the hardware (rather than software) sequencing are this design's choices.
module sd_controller
  import avalon_pkg::*;
#(
  parameter int unsigned BLOCK_BYTES      = 512,
  parameter int unsigned INIT_HALF_PERIOD = 64,   // 50 MHz / 128 = 390 kHz
  parameter int unsigned FAST_HALF_PERIOD = 2,    // 50 MHz / 4 = 12.5 MHz
  parameter int unsigned NO_CARD_POLLS    = 1024
) (
  input  logic     clk,
  input  logic     rst_n,
  input  avm_req_t avs_req,
  output avm_rsp_t avs_rsp,
  output logic     ready,
  output logic     sd_cs_n,
  output logic     sd_sclk,
  output logic     sd_mosi,
  input  logic     sd_miso
);

  typedef enum logic [3:0] {
    ST_POWER,   // 10 bytes of FF with nCS high
    ST_CMD,     // 6-byte command frame
    ST_NCR,     // 8 clocks after the command
    ST_POLL,    // wait for the first byte that is not FF
    ST_ALIGN,   // one more byte completes the (possibly unaligned) response
    ST_GAP,     // 8 clocks after the response
    ST_READY,   // idle, waiting for a read request
    ST_TOKEN,   // wait for the data token
    ST_DATA,    // data bytes
    ST_HOLD,    // a full word waits for the bus
    ST_CRC      // two CRC bytes
  } state_e;

  typedef enum logic [1:0] {C_GO_IDLE, C_SEND_OP, C_SET_BLEN, C_READ} cmd_e;

  state_e       state_q;
  cmd_e         cmd_q;
  logic         xfer_q;          // a byte exchange is in flight
  logic         spi_start, spi_busy, spi_done;
  logic [7:0]   spi_tx, spi_rx;
  logic [7:0]   half_period;
  logic [15:0]  cnt_q;
  logic [7:0]   prev_q;          // previous received byte
  logic [2:0]   align_q;         // bit offset of the card's framing
  logic [7:0]   resp_q;          // last R1 or error token
  logic [31:0]  arg_q;           // read address
  logic [31:0]  word_q;
  logic         word_valid_q;
  logic         error_q;
  logic         no_resp_q;
  logic         fast_q;
  logic [47:0]  frame;
  logic [7:0]   card_byte;       // received byte, realigned

  // ---------------- bus slave -------------------------------------------
  wire sel_data   = avs_req.address[1:0] == SD_REG_DATA;
  wire sel_status = avs_req.address[1:0] == SD_REG_STATUS;
  wire reading    = state_q inside {ST_TOKEN, ST_DATA, ST_HOLD} ||
                    (state_q inside {ST_CMD, ST_NCR, ST_POLL, ST_ALIGN, ST_GAP} && cmd_q == C_READ);
  wire bus_start  = avs_req.write && sel_data && state_q == ST_READY;
  wire bus_pop    = avs_req.read  && sel_data && word_valid_q;

  assign ready = state_q == ST_READY;

  always_comb begin
    avs_rsp = '{readdata: '0, waitrequest: 1'b0};
    if (avs_req.write && sel_data) begin
      avs_rsp.waitrequest = state_q != ST_READY;
    end else if (avs_req.read && sel_data) begin
      avs_rsp.waitrequest = !word_valid_q && reading;
      avs_rsp.readdata    = word_q;
    end else if (avs_req.read && sel_status) begin
      avs_rsp.readdata = {16'b0, resp_q, 3'b0, no_resp_q, error_q, word_valid_q, reading, ready};
    end
  end

  // ---------------- byte engine ------------------------------------------
  assign half_period = fast_q ? 8'(FAST_HALF_PERIOD) : 8'(INIT_HALF_PERIOD);

  spi_master u_spi (
    .clk, .rst_n,
    .start       (spi_start),
    .tx_byte     (spi_tx),
    .half_period (half_period),
    .busy        (spi_busy),
    .done        (spi_done),
    .rx_byte     (spi_rx),
    .sclk        (sd_sclk),
    .mosi        (sd_mosi),
    .miso        (sd_miso)
  );

  always_comb begin
    unique case (cmd_q)
      C_GO_IDLE:  frame = {8'h40, 32'h0, 8'h95};
      C_SEND_OP:  frame = {8'h41, 32'h0, 8'hff};
      C_SET_BLEN: frame = {8'h50, 32'(BLOCK_BYTES), 8'hff};
      default:    frame = {8'h51, arg_q, 8'hff};
    endcase
  end

  logic [15:0] window;
  assign window    = {prev_q, spi_rx} << align_q;
  assign card_byte = window[15:8];

  function automatic logic [2:0] leading_ones(logic [7:0] b);
    for (int i = 7; i >= 0; i--) if (!b[i]) return 3'(7 - i);
    return 3'd0;
  endfunction

  // Which states clock a byte, and what they send.
  wire need_xfer = !(state_q inside {ST_READY, ST_HOLD});
  assign spi_tx  = (state_q == ST_CMD) ? frame[47 - 8*cnt_q[2:0] -: 8] : 8'hff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= ST_POWER;
      cmd_q        <= C_GO_IDLE;
      xfer_q       <= 1'b0;
      spi_start    <= 1'b0;
      cnt_q        <= '0;
      prev_q       <= 8'hff;
      align_q      <= '0;
      resp_q       <= 8'hff;
      arg_q        <= '0;
      word_q       <= '0;
      word_valid_q <= 1'b0;
      error_q      <= 1'b0;
      no_resp_q    <= 1'b0;
      fast_q       <= 1'b0;
      sd_cs_n      <= 1'b1;
    end else begin
      spi_start <= 1'b0;
      if (bus_pop) word_valid_q <= 1'b0;

      if (state_q == ST_READY && bus_start) begin
        arg_q   <= avs_req.writedata;
        cmd_q   <= C_READ;
        cnt_q   <= '0;
        error_q <= 1'b0;
        state_q <= ST_CMD;
      end else if (state_q == ST_HOLD) begin
        if (bus_pop) begin
          state_q <= (cnt_q == 16'(BLOCK_BYTES)) ? ST_CRC : ST_DATA;
          if (cnt_q == 16'(BLOCK_BYTES)) cnt_q <= '0;
        end
      end else if (!xfer_q) begin
        if (need_xfer && !spi_busy) begin
          spi_start <= 1'b1;
          xfer_q    <= 1'b1;
        end
      end else if (spi_done) begin
        xfer_q <= 1'b0;
        prev_q <= spi_rx;
        unique case (state_q)
          ST_POWER: begin
            cnt_q <= cnt_q + 16'd1;
            if (cnt_q == 16'd9) begin
              cnt_q   <= '0;
              sd_cs_n <= 1'b0;
              cmd_q   <= C_GO_IDLE;
              state_q <= ST_CMD;
            end
          end
          ST_CMD: begin
            cnt_q <= cnt_q + 16'd1;
            if (cnt_q == 16'd5) begin
              cnt_q   <= '0;
              state_q <= ST_NCR;
            end
          end
          ST_NCR: state_q <= ST_POLL;
          ST_POLL: begin
            if (spi_rx != 8'hff) begin
              align_q <= leading_ones(spi_rx);
              state_q <= ST_ALIGN;
              cnt_q   <= '0;
            end else if (cmd_q == C_GO_IDLE) begin
              cnt_q <= cnt_q + 16'd1;
              if (cnt_q == 16'(NO_CARD_POLLS - 1)) no_resp_q <= 1'b1;
            end
          end
          ST_ALIGN: begin
            resp_q <= card_byte;
            if (cmd_q == C_GO_IDLE) no_resp_q <= 1'b0;
            if (cmd_q == C_READ) begin
              if (card_byte == 8'h00) state_q <= ST_TOKEN;
              else begin
                error_q <= 1'b1;
                state_q <= ST_GAP;
              end
            end else begin
              state_q <= ST_GAP;
            end
          end
          ST_GAP: begin
            cnt_q <= '0;
            unique case (cmd_q)
              C_GO_IDLE: begin cmd_q <= C_SEND_OP; state_q <= ST_CMD; end
              C_SEND_OP: begin
                // idle bit still set: the card is not ready yet, ask again
                if (resp_q[0]) state_q <= ST_CMD;
                else begin cmd_q <= C_SET_BLEN; state_q <= ST_CMD; end
              end
              C_SET_BLEN: begin
                if (resp_q != 8'h00) error_q <= 1'b1;
                fast_q  <= 1'b1;
                state_q <= ST_READY;
              end
              default: state_q <= ST_READY;
            endcase
          end
          ST_TOKEN: begin
            if (card_byte == 8'hfe) begin
              state_q <= ST_DATA;
              cnt_q   <= '0;
            end else if (card_byte != 8'hff) begin
              resp_q  <= card_byte;          // data error token
              error_q <= 1'b1;
              state_q <= ST_GAP;
            end
          end
          ST_DATA: begin
            word_q <= {word_q[23:0], card_byte};
            cnt_q  <= cnt_q + 16'd1;
            if (cnt_q[1:0] == 2'd3) begin
              word_valid_q <= 1'b1;
              state_q      <= ST_HOLD;
            end
          end
          ST_CRC: begin
            cnt_q <= cnt_q + 16'd1;
            if (cnt_q == 16'd1) state_q <= ST_GAP;
          end
          default: state_q <= ST_READY;
        endcase
      end
    end
  end

  a_pop_only_valid: assert property (@(posedge clk) disable iff (!rst_n)
      state_q == ST_HOLD |-> word_valid_q)
    else $error("data word lost before the bus read it");

endmodule
