// aes_encrypt: iterative AES-128 encryption core with a four-stage round.
//
// The state register first takes plaintext ^ main key (initial
// AddRoundKey). Each of the ten rounds then passes the state through four
// registers, one per transformation:
//   SubBytes register   <= SubBytes(state)                    phase 0
//   ShiftRows register  <= ShiftRows(SubBytes register)       phase 1
//   MixColumns register <= MixColumns(ShiftRows register)     phase 2
//   state               <= (MixColumns or ShiftRows register)
//                          ^ round key                        phase 3
// The registers between the transformations cut the combinational depth
// (fewer glitches, higher clock rate) and the key unit (aes_key_expand)
// works through its own stages on the same strobes, so key r is ready in
// phase 3 of round r. In round 10 the multiplexer p4 bypasses MixColumns
// and the MixColumns input is forced to zero by an AND gate with p4
// (operand isolation), so the unused multiplier logic does not toggle.
//
// Interface/timing: pulse start for one cycle while idle with plaintext and
// main_key valid. done rises 40 cycles after the start edge (41 cycles per block); ciphertext
// (the state register) and final_key (round key 10, needed to decrypt) are
// valid from then until the next start. One block is processed at a time.
module aes_encrypt
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,       // asynchronous, active low (control unit only)
  input  logic   start,       // load plaintext and main_key
  input  block_t plaintext,
  input  block_t main_key,
  output block_t ciphertext,
  output block_t final_key,   // last round key
  output logic   busy,
  output logic   done
);
  ctrl_t  ctrl;
  block_t state_q;
  block_t sub;
  block_t sb_q;
  block_t sr_q;
  block_t mix;
  block_t mc_q;
  block_t round_key;
  block_t round_out;

  aes_ctrl u_ctrl (.clk, .rst_n, .start, .ctrl, .busy, .done);

  aes_key_expand u_key (
    .clk, .ctrl, .main_key, .round_key, .final_key
  );

  aes_sub_bytes #(.INVERSE(1'b0)) u_sub (.d(state_q), .q(sub));

  aes_shift_rows #(.INVERSE(1'b0)) u_shift (.clk, .en(ctrl.p2), .d(sb_q), .q(sr_q));

  // operand isolation: MixColumns sees zeros when its result is not used
  aes_mix_columns u_mix (.d(sr_q & {128{ctrl.p4}}), .q(mix));

  assign round_out = (ctrl.p4 ? mc_q : sr_q) ^ round_key;

  always_ff @(posedge clk) begin
    if (ctrl.p1) sb_q <= sub;
    if (ctrl.p3) mc_q <= mix;
    if (ctrl.p0 || ctrl.p5)
      state_q <= ctrl.p0 ? (plaintext ^ main_key) : round_out;
  end

  assign ciphertext = state_q;
endmodule
