// aes_key_expand: AES-128 key expansion, pipelined so that one round key is
// produced per round, in step with the round datapath.
//
// The current round key sits in the K-to-w register as four words w0..w3
// (w0 = bits [127:96]). The next key is built in three register stages
// driven by the control unit's phase strobes:
//   phase 0 (p1)  S-box register <= SubWord(RotWord(w3))   (four S-boxes)
//   phase 1 (p8)  R-con register <= S-box register ^ {RC[round], 24'h0}
//   phase 2 (p9)  Xor-1 register <= w4..w7, w4 = w0 ^ R-con register,
//                                   w(i+1) = w(i-3) ^ w(i)
//   phase 3 (p7)  K-to-w <= Xor-1 register (the round key just used)
// The Xor-1 register is the round key the datapath XORs in phase 3. The
// load strobe p0/p7 with p6 = 0 copies the main key into K-to-w. In round
// 10, phase 3, p10 copies the round key into the Outkey register: this last
// round key is what the decryption core starts from. RotWord is plain
// wiring. The split of the key step over these stages is this design's own
// choice; the key-step arithmetic is the standard AES-128 schedule.
module aes_key_expand
  import aes_pkg::*;
(
  input  logic   clk,
  input  ctrl_t  ctrl,       // control word from aes_ctrl
  input  block_t main_key,   // cipher key, sampled on the load edge
  output block_t round_key,  // round key of the current round (valid in phase 3)
  output block_t final_key   // round key 10, held after the block
);
  block_t kw_q;    // K-to-w
  word_t  sub_q;   // S-box register
  word_t  rc_q;    // R-con register
  block_t xor_q;   // Xor-1 register (new round key)
  block_t out_q;   // Outkey register
  word_t  rot;
  word_t  sub;
  byte_t  rc;
  word_t  w4, w5, w6, w7;

  assign rot = {kw_q[23:0], kw_q[31:24]};  // RotWord(w3)

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    aes_sbox u_sbox (.a(rot[8*i +: 8]), .y(sub[8*i +: 8]));
  end

  aes_rcon #(.INVERSE(1'b0)) u_rcon (.round(ctrl.round), .rc(rc));

  assign w4 = kw_q[127:96] ^ rc_q;
  assign w5 = kw_q[95:64]  ^ w4;
  assign w6 = kw_q[63:32]  ^ w5;
  assign w7 = kw_q[31:0]   ^ w6;

  always_ff @(posedge clk) begin
    if (ctrl.p7)  kw_q  <= ctrl.p6 ? xor_q : main_key;
    if (ctrl.p1)  sub_q <= sub;
    if (ctrl.p8)  rc_q  <= sub_q ^ {rc, 24'h000000};
    if (ctrl.p9)  xor_q <= {w4, w5, w6, w7};
    if (ctrl.p10) out_q <= xor_q;
  end

  assign round_key = xor_q;
  assign final_key = out_q;
endmodule
