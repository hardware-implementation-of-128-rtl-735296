// aes_image_top: AES-128 image encryption / decryption engine.
//
// Two independent cores stand side by side: aes_encrypt turns 128-bit
// plaintext blocks (16 pixels of an 8-bit image) into ciphertext, and
// aes_decrypt turns ciphertext back into plaintext, starting from the last
// round key that the encryption core leaves on enc_final_key. Each core is
// clocked through its own clock-gating cell (aes_clock_gate) whose enable is
// "start or busy", so an idle core's registers receive no clock edges. The
// gating at core level is this design's choice; the cores, their four-stage
// rounds and the key handling follow the block diagrams of the design.
//
// Interface/timing: per core, pulse *_start for one cycle while *_busy is
// low with the block and key valid; *_done pulses 40 cycles later and the
// result stays valid until the next start. Blocks of an image are sent one
// after another (each block independently, no chaining).
module aes_image_top
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,            // asynchronous, active low
  // encryption
  input  logic   enc_start,
  input  block_t enc_plaintext,
  input  block_t enc_key,          // cipher key
  output block_t enc_ciphertext,
  output block_t enc_final_key,    // last round key (decryption key)
  output logic   enc_busy,
  output logic   enc_done,
  // decryption
  input  logic   dec_start,
  input  block_t dec_ciphertext,
  input  block_t dec_key,          // last round key of the encryption
  output block_t dec_plaintext,
  output logic   dec_busy,
  output logic   dec_done
);
  logic enc_gclk;
  logic dec_gclk;

  aes_clock_gate u_enc_cg (.clk, .en(enc_start | enc_busy), .gclk(enc_gclk));
  aes_clock_gate u_dec_cg (.clk, .en(dec_start | dec_busy), .gclk(dec_gclk));

  aes_encrypt u_enc (
    .clk(enc_gclk), .rst_n, .start(enc_start),
    .plaintext(enc_plaintext), .main_key(enc_key),
    .ciphertext(enc_ciphertext), .final_key(enc_final_key),
    .busy(enc_busy), .done(enc_done)
  );

  aes_decrypt u_dec (
    .clk(dec_gclk), .rst_n, .start(dec_start),
    .ciphertext(dec_ciphertext), .last_key(dec_key),
    .plaintext(dec_plaintext),
    .busy(dec_busy), .done(dec_done)
  );
endmodule
