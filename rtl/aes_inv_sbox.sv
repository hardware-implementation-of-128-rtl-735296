// aes_inv_sbox: the inverse AES S-box (I-sbox) as a 256-entry look-up table.
//
// Same organisation as aes_sbox: the input byte indexes a 16 x 16 table
// (upper nibble = row, lower nibble = column). The table aes_pkg::INV_SBOX is
// the inverse permutation of the forward table, computed at elaboration.
// Purely combinational.
module aes_inv_sbox
  import aes_pkg::*;
(
  input  byte_t a,  // byte to substitute
  output byte_t y   // S-box^-1(a)
);
  assign y = INV_SBOX[a];
endmodule
