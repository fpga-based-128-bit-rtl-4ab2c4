// aes_image_system: FPGA top of the encrypted-image viewer.
//
// An encrypted 320x240 8-bit grayscale picture lies as raw blocks on an SD
// card. A processor (outside this RTL; its 32-bit bus master port is a port of
// this module) reads the card through the SD-card SPI controller in 32-bit
// words, passes every four words through the AES-128 decryptor, writes the
// four plain words to the VGA/SRAM controller, and finally enables the
// display, which then shows the picture from the SRAM frame buffer with each
// pixel drawn as a 2x2 block on a 640x480 screen. The three slaves sit on one
// bus behind an address decoder; the processor moves all data, one block at a
// time, because the card is the bottleneck.
//
// Ports: clk is the 50 MHz system clock, rst_n an asynchronous active-low
// reset. m_req/m_rsp: the processor's bus master port (word addresses;
// address[17:16] = 0 AES, 1 SD card, 2 VGA/SRAM). aes_eoc and sd_ready are
// status lines also readable over the bus. sd_*: the card's SPI pins. sram_*:
// the 256K x 16 SRAM chip, data bus split into in/out/enable for the pad.
// vga_*: the video DAC inputs and syncs.
module aes_image_system
  import aes_pkg::*;
  import avalon_pkg::*;
#(
  parameter logic [127:0] KEY              = 128'h000102030405060708090a0b0c0d0e0f,
  parameter block_order_e ORDER            = ROW_MAJOR,
  parameter int unsigned  BLOCK_BYTES      = 512,
  parameter int unsigned  INIT_HALF_PERIOD = 64,
  parameter int unsigned  FAST_HALF_PERIOD = 2,
  parameter int unsigned  IMG_W            = 320,
  parameter int unsigned  IMG_H            = 240
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor bus master port
  input  avm_req_t    m_req,
  output avm_rsp_t    m_rsp,
  output logic        aes_eoc,
  output logic        sd_ready,
  // SD card, SPI mode
  output logic        sd_cs_n,
  output logic        sd_sclk,
  output logic        sd_mosi,
  input  logic        sd_miso,
  // SRAM chip
  output logic [17:0] sram_addr,
  output logic [15:0] sram_dq_o,
  input  logic [15:0] sram_dq_i,
  output logic        sram_dq_oe,
  output logic        sram_we_n,
  output logic        sram_oe_n,
  output logic        sram_ce_n,
  output logic        sram_ub_n,
  output logic        sram_lb_n,
  // VGA DAC
  output logic        vga_clk,
  output logic        vga_hs_n,
  output logic        vga_vs_n,
  output logic        vga_blank_n,
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b
);

  avm_req_t aes_req, sd_req, vga_req;
  avm_rsp_t aes_rsp, sd_rsp, vga_rsp;
  logic     aes_busy;

  avalon_interconnect u_bus (
    .m_req, .m_rsp,
    .aes_req, .aes_rsp,
    .sd_req,  .sd_rsp,
    .vga_req, .vga_rsp
  );

  aes_decrypto #(.KEY(KEY), .ORDER(ORDER)) u_aes (
    .clk, .rst_n,
    .avs_req (aes_req),
    .avs_rsp (aes_rsp),
    .eoc     (aes_eoc),
    .busy    (aes_busy)
  );

  sd_controller #(
    .BLOCK_BYTES      (BLOCK_BYTES),
    .INIT_HALF_PERIOD (INIT_HALF_PERIOD),
    .FAST_HALF_PERIOD (FAST_HALF_PERIOD)
  ) u_sd (
    .clk, .rst_n,
    .avs_req (sd_req),
    .avs_rsp (sd_rsp),
    .ready   (sd_ready),
    .sd_cs_n, .sd_sclk, .sd_mosi, .sd_miso
  );

  vga_sram_controller #(.IMG_W(IMG_W), .IMG_H(IMG_H), .SRAM_AW(18)) u_vga (
    .clk, .rst_n,
    .avs_req (vga_req),
    .avs_rsp (vga_rsp),
    .sram_addr, .sram_dq_o, .sram_dq_i, .sram_dq_oe,
    .sram_we_n, .sram_oe_n, .sram_ce_n, .sram_ub_n, .sram_lb_n,
    .vga_clk, .vga_hs_n, .vga_vs_n, .vga_blank_n,
    .vga_r, .vga_g, .vga_b
  );

endmodule
