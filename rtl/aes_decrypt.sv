// aes_decrypt: iterative AES-128 decryption core with a four-stage round.
//
// The core runs the equivalent inverse cipher, which has the same shape as
// the encryption round: the state register first takes
// ciphertext ^ last round key, then each of the ten rounds does
//   InvSubBytes register   <= InvSubBytes(state)                 phase 0
//   InvShiftRows register  <= InvShiftRows(InvSubBytes register) phase 1
//   InvMixColumns register <= InvMixColumns(InvShiftRows reg.)   phase 2
//   state                  <= (InvMixColumns or InvShiftRows reg.)
//                             ^ key out                          phase 3
// where key out comes from aes_inv_key_expand: round keys 9..1 passed
// through InvMixColumns, and round key 0 untouched in round 10. In round 10
// InvMixColumns is bypassed (p4 low) and its input is ANDed to zero
// (operand isolation).
//
// Interface/timing: pulse start for one cycle while idle with ciphertext
// and last_key (round key 10 of the encryption, aes_encrypt.final_key)
// valid. done rises 40 cycles after the start edge (41 cycles per block); plaintext is valid
// from then until the next start. One block is processed at a time.
module aes_decrypt
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,       // asynchronous, active low (control unit only)
  input  logic   start,       // load ciphertext and last_key
  input  block_t ciphertext,
  input  block_t last_key,    // round key 10
  output block_t plaintext,
  output logic   busy,
  output logic   done
);
  ctrl_t  ctrl;
  block_t state_q;
  block_t isub;
  block_t isb_q;
  block_t isr_q;
  block_t imix;
  block_t imc_q;
  block_t key_out;
  block_t round_out;

  aes_ctrl u_ctrl (.clk, .rst_n, .start, .ctrl, .busy, .done);

  aes_inv_key_expand u_key (.clk, .ctrl, .last_key, .key_out);

  aes_sub_bytes #(.INVERSE(1'b1)) u_isub (.d(state_q), .q(isub));

  aes_shift_rows #(.INVERSE(1'b1)) u_ishift (.clk, .en(ctrl.p2), .d(isb_q), .q(isr_q));

  // operand isolation: InvMixColumns sees zeros when its result is not used
  aes_inv_mix_columns u_imix (.d(isr_q & {128{ctrl.p4}}), .q(imix));

  assign round_out = (ctrl.p4 ? imc_q : isr_q) ^ key_out;

  always_ff @(posedge clk) begin
    if (ctrl.p1) isb_q <= isub;
    if (ctrl.p3) imc_q <= imix;
    if (ctrl.p0 || ctrl.p5)
      state_q <= ctrl.p0 ? (ciphertext ^ last_key) : round_out;
  end

  assign plaintext = state_q;
endmodule
