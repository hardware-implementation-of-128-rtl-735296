// aes_sbox: the forward AES S-box as a 256-entry look-up table.
//
// The byte's upper nibble selects the row and the lower nibble the column of
// a 16 x 16 table, as in a ROM. The table is the constant aes_pkg::SBOX, which
// is computed at elaboration from the S-box definition (GF(2^8) inverse then
// affine transform) rather than typed in. Purely combinational: y follows a.
// Using a table rather than computing the inverse in logic follows the
// design's choice of a LUT S-box for speed.
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t a,  // byte to substitute
  output byte_t y   // S-box(a)
);
  assign y = SBOX[a];
endmodule
