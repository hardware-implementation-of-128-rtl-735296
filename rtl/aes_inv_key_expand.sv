// aes_inv_key_expand: AES-128 key schedule run backwards, for decryption.
//
// Decryption starts from the last round key of the encryption (round key
// 10) and recovers round keys 9, 8, ... 0, one per round, using the reversed
// round-constant table IR-con. From the current key w0..w3 the previous one
// is
//   v3 = w3 ^ w2,  v2 = w2 ^ w1,  v1 = w1 ^ w0,
//   v0 = w0 ^ SubWord(RotWord(v3)) ^ {IRC[round], 24'h0}.
// Stages, on the control unit's strobes:
//   phase 0          Xor-1 register  <= {w0, v1, v2, v3}
//   phase 1 (p8)     R-con register  <= SubWord(RotWord(v3)) ^ IRC
//   phase 2          Outkey register <= {v0, v1, v2, v3}, and the key-out
//                    register <= InvMixColumns(v0..v3) in rounds 1..9 or
//                    the plain key in round 10 (p4 low)
//   phase 3 (p7)     K-to-w <= Outkey
// The data path runs the equivalent inverse cipher (InvMixColumns before
// AddRoundKey), so its round keys 9..1 must also pass through
// InvMixColumns; the final round (key 0) uses the key unchanged. The
// InvMixColumns input is ANDed with p4 (operand isolation) so it is idle in
// round 10. The register stage split is this design's own choice.
module aes_inv_key_expand
  import aes_pkg::*;
(
  input  logic   clk,
  input  ctrl_t  ctrl,      // control word from aes_ctrl
  input  block_t last_key,  // round key 10, sampled on the load edge
  output block_t key_out    // key for AddRoundKey (valid in phase 3)
);
  block_t kw_q;    // K-to-w
  block_t x_q;     // Xor-1 register
  word_t  rc_q;    // R-con register
  block_t out_q;   // Outkey register
  block_t kout_q;  // key-out register (after I-Mix)
  word_t  rot;
  word_t  sub;
  byte_t  irc;
  block_t prev_key;
  block_t imix;

  assign rot = {x_q[23:0], x_q[31:24]};  // RotWord(v3)

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    aes_sbox u_sbox (.a(rot[8*i +: 8]), .y(sub[8*i +: 8]));
  end

  aes_rcon #(.INVERSE(1'b1)) u_ircon (.round(ctrl.round), .rc(irc));

  assign prev_key = {x_q[127:96] ^ rc_q, x_q[95:0]};

  aes_inv_mix_columns u_imix (.d(prev_key & {128{ctrl.p4}}), .q(imix));

  always_ff @(posedge clk) begin
    if (ctrl.p7) kw_q <= ctrl.p6 ? out_q : last_key;
    if (ctrl.phase[0])
      x_q <= {kw_q[127:96], kw_q[127:96] ^ kw_q[95:64],
              kw_q[95:64] ^ kw_q[63:32], kw_q[63:32] ^ kw_q[31:0]};
    if (ctrl.p8) rc_q <= sub ^ {irc, 24'h000000};
    if (ctrl.phase[2]) begin
      out_q  <= prev_key;
      kout_q <= ctrl.p4 ? imix : prev_key;
    end
  end

  assign key_out = kout_q;
endmodule
