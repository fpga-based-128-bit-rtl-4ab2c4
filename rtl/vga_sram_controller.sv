// vga_sram_controller: frame buffer in the off-chip SRAM, shown on a VGA
// monitor, with a 32-bit bus slave port for writing the picture.
//
// The SRAM is single-ported, so this block owns it completely: the display
// scan and the writes from the bus both go through the one port scheduled
// here. The picture is IMG_W x IMG_H (320x240) 8-bit grayscale, stored two
// pixels per 16-bit SRAM word (even pixel in the high byte), row after row from
// address 0. On the 640x480 screen every picture pixel becomes a 2x2 block, so
// one SRAM word covers four screen pixels of a line; it is read once per four
// pixels (eight system clocks), leaving the other cycles of the port free.
//
// Port schedule, one operation per system clock, all SRAM pins registered:
//   read  - in the cycle where the raster enters pixel 4g+1, the word for
//           the next group (g+1, or group 0 of the next line at the end of a
//           line) is addressed; it is captured one clock later and becomes the
//           current word when the raster reaches that group.
//   write - a 32-bit bus word (four pixels, first pixel in bits [31:24]) is
//           held in a one-word buffer and written as two SRAM words in free
//           cycles, never two write cycles back to back (we_n returns high in
//           between). A second bus write waits (waitrequest) until the buffer
//           is empty.
// Bus map (word addresses): 0..IMG_W*IMG_H/4-1 picture words (word w holds
// pixels 4w..4w+3, pixel index = y*IMG_W + x); bit 15 set: control register,
// bit 0 = display enable. Reads return the control register. With display
// enable low the screen is black but the sync signals keep running.
// Video outputs are registered and appear one pixel after the raster counter.
// The SRAM controller inside the VGA controller, the 320x240 grayscale picture
// with 2x2 pixels, 640x480 at 25 MHz from 50 MHz and the enable after
// decryption follow the design; the pixel packing, the port schedule and the
// register map are this design's own choices.
module vga_sram_controller
  import avalon_pkg::*;
#(
  parameter int unsigned IMG_W   = 320,
  parameter int unsigned IMG_H   = 240,
  parameter int unsigned SRAM_AW = 18       // 256K x 16 = 512 KB
) (
  input  logic               clk,
  input  logic               rst_n,
  input  avm_req_t           avs_req,
  output avm_rsp_t           avs_rsp,
  // SRAM chip (data bus split into in/out/enable; the pad driver joins them)
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [15:0]        sram_dq_o,
  input  logic [15:0]        sram_dq_i,
  output logic               sram_dq_oe,
  output logic               sram_we_n,
  output logic               sram_oe_n,
  output logic               sram_ce_n,
  output logic               sram_ub_n,
  output logic               sram_lb_n,
  // video DAC
  output logic               vga_clk,
  output logic               vga_hs_n,
  output logic               vga_vs_n,
  output logic               vga_blank_n,
  output logic [7:0]         vga_r,
  output logic [7:0]         vga_g,
  output logic [7:0]         vga_b
);

  localparam int unsigned SCREEN_W  = 2 * IMG_W;
  localparam int unsigned SCREEN_H  = 2 * IMG_H;
  localparam int unsigned BUS_WORDS = IMG_W * IMG_H / 4;
  // blanking intervals of the 640x480 mode, in pixels and lines
  localparam int unsigned H_FP = 16, H_SYNC = 96, H_BP = 48;
  localparam int unsigned V_FP = 10, V_SYNC = 2,  V_BP = 33;
  localparam int unsigned H_TOTAL = SCREEN_W + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = SCREEN_H + V_FP + V_SYNC + V_BP;

  // ---------------- raster -------------------------------------------------
  logic       pix_ce, active, hsync_n, vsync_n;
  logic [9:0] h_count, v_count;

  vga_timing #(
    .H_ACTIVE(SCREEN_W), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(SCREEN_H), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)
  ) u_timing (
    .clk, .rst_n,
    .pix_ce, .vga_clk,
    .h_count, .v_count,
    .active, .hsync_n, .vsync_n
  );

  // ---------------- bus slave ----------------------------------------------
  logic        display_en_q;
  logic        wbuf_full_q;
  logic [1:0]  wbuf_left_q;            // SRAM writes still to do (2, 1)
  logic [31:0] wbuf_data_q;
  logic [SRAM_AW-1:0] wbuf_addr_q;     // SRAM address of the first half

  wire ctrl_sel   = avs_req.address[15];
  wire pix_write  = avs_req.write && !ctrl_sel;
  wire ctrl_write = avs_req.write && ctrl_sel;

  always_comb begin
    avs_rsp.waitrequest = pix_write && wbuf_full_q;
    avs_rsp.readdata    = {31'b0, display_en_q};
  end

  // ---------------- display fetch ------------------------------------------
  logic        fetch_now;
  logic        fetch_ok;
  logic [9:0]  next_group, next_line;

  always_comb begin
    fetch_now  = pix_ce && h_count[1:0] == 2'd0;  // raster moves into 4g+1
    next_group = 10'(h_count[9:2] + 8'd1);
    next_line  = v_count;
    fetch_ok   = 1'b0;
    if (h_count < 10'(SCREEN_W - 4)) begin
      fetch_ok = v_count < 10'(SCREEN_H);
    end else if (h_count == 10'(H_TOTAL - 4)) begin
      next_group = '0;
      next_line  = (v_count == 10'(V_TOTAL - 1)) ? 10'd0 : v_count + 10'd1;
      fetch_ok   = next_line < 10'(SCREEN_H);
    end
  end

  // Screen pixels 4g,4g+1 show picture pixel 2g and 4g+2,4g+3 show 2g+1;
  // both share SRAM word g of picture row y/2, and a row is IMG_W/2 words.
  logic [SRAM_AW-1:0] fetch_word;
  assign fetch_word = SRAM_AW'(32'(next_line[9:1]) * (IMG_W / 2) + 32'(next_group));

  // ---------------- SRAM port ----------------------------------------------
  typedef enum logic [1:0] {OP_IDLE, OP_READ, OP_WRITE} op_e;
  op_e         op_q;
  logic [15:0] next_word_q, cur_word_q;

  wire do_read  = fetch_now && fetch_ok;
  wire do_write = !do_read && wbuf_full_q && op_q != OP_WRITE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q         <= OP_IDLE;
      sram_addr    <= '0;
      sram_dq_o    <= '0;
      sram_dq_oe   <= 1'b0;
      sram_we_n    <= 1'b1;
      sram_oe_n    <= 1'b1;
      wbuf_full_q  <= 1'b0;
      wbuf_left_q  <= '0;
      wbuf_data_q  <= '0;
      wbuf_addr_q  <= '0;
      display_en_q <= 1'b0;
      next_word_q  <= '0;
      cur_word_q   <= '0;
    end else begin
      // capture the word read in the previous cycle
      if (op_q == OP_READ) next_word_q <= sram_dq_i;
      // the raster enters a new group
      if (pix_ce && h_count[1:0] == 2'd3) cur_word_q <= next_word_q;

      if (ctrl_write) display_en_q <= avs_req.writedata[0];
      if (pix_write && !wbuf_full_q) begin
        wbuf_full_q <= 1'b1;
        wbuf_left_q <= 2'd2;
        wbuf_data_q <= avs_req.writedata;
        wbuf_addr_q <= SRAM_AW'({avs_req.address[14:0], 1'b0});
      end

      sram_we_n  <= 1'b1;
      sram_oe_n  <= 1'b1;
      sram_dq_oe <= 1'b0;
      if (do_read) begin
        op_q      <= OP_READ;
        sram_addr <= fetch_word;
        sram_oe_n <= 1'b0;
      end else if (do_write) begin
        op_q       <= OP_WRITE;
        sram_we_n  <= 1'b0;
        sram_dq_oe <= 1'b1;
        if (wbuf_left_q == 2'd2) begin
          sram_addr <= wbuf_addr_q;
          sram_dq_o <= wbuf_data_q[31:16];
        end else begin
          sram_addr <= wbuf_addr_q + SRAM_AW'(1);
          sram_dq_o <= wbuf_data_q[15:0];
          wbuf_full_q <= 1'b0;
        end
        wbuf_left_q <= wbuf_left_q - 2'd1;
      end else begin
        op_q <= OP_IDLE;
      end
    end
  end

  assign sram_ce_n = 1'b0;
  assign sram_ub_n = 1'b0;
  assign sram_lb_n = 1'b0;

  // ---------------- video output -------------------------------------------
  logic [7:0] gray;
  assign gray = h_count[1] ? cur_word_q[7:0] : cur_word_q[15:8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vga_hs_n    <= 1'b1;
      vga_vs_n    <= 1'b1;
      vga_blank_n <= 1'b0;
      vga_r       <= '0;
      vga_g       <= '0;
      vga_b       <= '0;
    end else if (pix_ce) begin
      vga_hs_n    <= hsync_n;
      vga_vs_n    <= vsync_n;
      vga_blank_n <= active;
      vga_r       <= (active && display_en_q) ? gray : 8'h00;
      vga_g       <= (active && display_en_q) ? gray : 8'h00;
      vga_b       <= (active && display_en_q) ? gray : 8'h00;
    end
  end

  a_write_in_range: assert property (@(posedge clk) disable iff (!rst_n)
      pix_write && !wbuf_full_q |-> 32'(avs_req.address[14:0]) < BUS_WORDS)
    else $error("picture write outside the frame buffer");

endmodule
