// avalon_pkg: the 32-bit memory-mapped bus bundle shared by the processor port,
// the interconnect and the three slaves.
//
// A transfer follows the Avalon-MM rules with wait states: the master holds
// address, read/write and writedata until a cycle in which waitrequest is low;
// that cycle completes the transfer, and for a read, readdata is valid in that
// same cycle. Addresses are word addresses (one address per 32-bit word).
// ADDR_W covers the whole system map; a slave uses only its low bits.
package avalon_pkg;

  localparam int unsigned ADDR_W = 18;
  localparam int unsigned DATA_W = 32;

  typedef struct packed {
    logic [ADDR_W-1:0] address;
    logic              read;
    logic              write;
    logic [DATA_W-1:0] writedata;
  } avm_req_t;

  typedef struct packed {
    logic [DATA_W-1:0] readdata;
    logic              waitrequest;
  } avm_rsp_t;

  // System address map, word addresses, selected by address[17:16].
  localparam logic [1:0] SEL_AES = 2'd0;   // AES decrypto
  localparam logic [1:0] SEL_SD  = 2'd1;   // SD-card SPI controller
  localparam logic [1:0] SEL_VGA = 2'd2;   // VGA / SRAM controller

  // Register offsets inside the AES and SD slaves.
  localparam logic [1:0] AES_REG_DATA   = 2'd0; // W: push cipher word, R: pop plain word
  localparam logic [1:0] AES_REG_STATUS = 2'd1; // R: {.., busy, eoc}
  localparam logic [1:0] SD_REG_DATA    = 2'd0; // W: start block read at byte address, R: pop word
  localparam logic [1:0] SD_REG_STATUS  = 2'd1; // R: status word

endpackage
