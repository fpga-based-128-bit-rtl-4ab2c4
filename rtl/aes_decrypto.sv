// aes_decrypto: iterative AES-128 decryption with a hard-coded key, as a 32-bit
// bus slave.
//
// Datapath (one round of hardware, reused ten times):
//   input buffer --> MUX1 --> InvAddRoundKey --+--> InvMixColumns --> MUX2 --> STATE register
//                     ^            ^           +--------------------> MUX2        |
//                     |     round-key ROM      +--> output buffer                 |
//                     +------ InvShiftRows/InvSubBytes <--------------------------+
// Sequence after the controller's start pulse (four words buffered):
//   cycle 1      STATE <= cipher ^ K10                     (MUX1 = input, MUX2 = bypass)
//   cycles 2..10 STATE <= InvMix(InvSub(InvShift(STATE)) ^ Kr), r = 9..1
//   cycle 11     output buffer <= InvSub(InvShift(STATE)) ^ K0, eoc rises
// so eoc goes high 11 clock cycles after start and the whole block takes
// 4 (buffering) + 1 + 11 cycles. Rounds cannot overlap: each depends on the
// previous one, so there is no pipelining. The original timing counts 1 + 9
// cycles before the result is stored and one more for eoc; its round list also
// has a final round without InvMixColumns, which here gets its own cycle and
// sets eoc as it stores, so eoc still rises 11 cycles after start.
//
// Bus registers (word offsets, see avalon_pkg):
//   0 write  push a cipher word (four per block, block bytes 0..3 first);
//            waits while a block is being decrypted or the last result is unread
//   0 read   pop a plain word (same order); waits until eoc
//   1 read   status {30'b0, busy, eoc}
// KEY and ORDER select the key and the byte-to-matrix layout (see aes_pkg).
// The register set and the wait-state rules are this design's own choice; the
// round structure and cycle counts follow the original datapath.
module aes_decrypto
  import aes_pkg::*;
  import avalon_pkg::*;
#(
  parameter logic [127:0] KEY   = 128'h000102030405060708090a0b0c0d0e0f,
  parameter block_order_e ORDER = ROW_MAJOR
) (
  input  logic     clk,
  input  logic     rst_n,
  input  avm_req_t avs_req,
  output avm_rsp_t avs_rsp,
  output logic     eoc,
  output logic     busy
);

  typedef enum logic [1:0] {IDLE, ROUNDS, FINAL} phase_e;

  phase_e       phase_q;
  logic [3:0]   round_q;
  state_t       state_q;

  logic         push, pop;
  logic         start;
  logic [127:0] in_block;
  logic [1:0]   in_fill;
  logic [31:0]  out_word;

  state_t       key_state;
  state_t       shifted_subbed;
  state_t       ark_in, ark_out;
  state_t       mixed;
  logic [3:0]   key_index;

  // ---------------- bus slave -------------------------------------------
  wire sel_data   = avs_req.address[1:0] == AES_REG_DATA;
  wire sel_status = avs_req.address[1:0] == AES_REG_STATUS;

  assign busy = start || phase_q != IDLE;

  always_comb begin
    avs_rsp = '{readdata: '0, waitrequest: 1'b0};
    push    = 1'b0;
    pop     = 1'b0;
    if (avs_req.write && sel_data) begin
      avs_rsp.waitrequest = busy || eoc;
      push                = !(busy || eoc);
    end else if (avs_req.read && sel_data) begin
      avs_rsp.waitrequest = !eoc;
      avs_rsp.readdata    = out_word;
      pop                 = eoc;
    end else if (avs_req.read && sel_status) begin
      avs_rsp.readdata    = {30'b0, busy, eoc};
    end
  end

  aes_input_buffer u_in_buf (
    .clk, .rst_n,
    .push      (push),
    .word_in   (avs_req.writedata),
    .block_out (in_block),
    .fill      (in_fill),
    .start     (start)
  );

  // ---------------- round datapath ----------------------------------------
  assign key_index = (phase_q == IDLE) ? 4'd10 : round_q;

  aes_round_key_rom #(.KEY(KEY), .ORDER(ORDER)) u_keys (
    .round     (key_index),
    .round_key (key_state)
  );

  aes_inv_shift_sub u_shift_sub (
    .state_in  (state_q),
    .state_out (shifted_subbed)
  );

  // MUX1: fresh cipher block for the initial round, feedback otherwise.
  assign ark_in  = (phase_q == IDLE) ? block_to_state(in_block, ORDER) : shifted_subbed;
  assign ark_out = ark_in ^ key_state;

  aes_inv_mix_columns u_mix (
    .state_in  (ark_out),
    .state_out (mixed)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= IDLE;
      round_q <= '0;
      state_q <= '0;
    end else begin
      unique case (phase_q)
        IDLE: if (start) begin
          state_q <= ark_out;          // MUX2: InvMixColumns bypassed
          round_q <= 4'd9;
          phase_q <= ROUNDS;
        end
        ROUNDS: begin
          state_q <= mixed;            // MUX2: through InvMixColumns
          round_q <= round_q - 4'd1;
          if (round_q == 4'd1) phase_q <= FINAL;
        end
        FINAL: phase_q <= IDLE;        // ark_out (with K0) goes to the output buffer
        default: phase_q <= IDLE;
      endcase
    end
  end

  aes_output_buffer u_out_buf (
    .clk, .rst_n,
    .load     (phase_q == FINAL),
    .block_in (state_to_block(ark_out, ORDER)),
    .pop      (pop),
    .word_out (out_word),
    .eoc      (eoc)
  );

endmodule
