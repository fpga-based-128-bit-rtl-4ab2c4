// avalon_interconnect: the system bus between the processor's 32-bit master
// port and the three slaves (AES decrypto, SD-card controller, VGA/SRAM
// controller).
//
// Pure address decoding, no arbitration (there is one master) and no added
// latency: address[17:16] selects the slave (see avalon_pkg), the slave sees
// its read/write strobes only when selected and the address with the select
// bits cleared, and the selected slave's readdata and waitrequest go straight
// back to the master. An access to the unused fourth region completes at once
// and reads as zero. The bus itself is named by the design; the map is this
// design's choice. Most slave-side bits (address and writedata) are plain
// wires from the master and the cleared select bits are constant zero, so a
// synthesis report counts them as outputs without logic; that is intended.
module avalon_interconnect
  import avalon_pkg::*;
(
  input  avm_req_t m_req,
  output avm_rsp_t m_rsp,
  output avm_req_t aes_req,
  input  avm_rsp_t aes_rsp,
  output avm_req_t sd_req,
  input  avm_rsp_t sd_rsp,
  output avm_req_t vga_req,
  input  avm_rsp_t vga_rsp
);

  logic [1:0] sel;
  avm_req_t   local_req;

  always_comb begin
    sel                     = m_req.address[ADDR_W-1 -: 2];
    local_req               = m_req;
    local_req.address[ADDR_W-1 -: 2] = 2'b00;

    aes_req = local_req;
    sd_req  = local_req;
    vga_req = local_req;
    if (sel != SEL_AES) begin aes_req.read = 1'b0; aes_req.write = 1'b0; end
    if (sel != SEL_SD)  begin sd_req.read  = 1'b0; sd_req.write  = 1'b0; end
    if (sel != SEL_VGA) begin vga_req.read = 1'b0; vga_req.write = 1'b0; end

    unique case (sel)
      SEL_AES: m_rsp = aes_rsp;
      SEL_SD:  m_rsp = sd_rsp;
      SEL_VGA: m_rsp = vga_rsp;
      default: m_rsp = '{readdata: '0, waitrequest: 1'b0};
    endcase
  end

endmodule
