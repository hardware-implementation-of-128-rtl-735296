// aes_inv_mix_columns: the InvMixColumns transformation built from {02}
// multipliers only.
//
// InvMixColumns multiplies each column by the matrix with rows
// (0E 0B 0D 09) rotated. Writing 0E = 8+4+2, 0B = 8+2+1, 0D = 8+4+1 and
// 09 = 8+1, output byte i of a column (x0 = row i, x1, x2, x3 the following
// rows, mod 4) becomes
//   y_i = 4 * ( 2*(x0^x1) ^ 2*(x2^x3) ^ x0 ^ x2 ) ^ 2*(x0^x1) ^ x1 ^ x2 ^ x3
// where every multiplication by 2 or 4 is one or two mult2 stages. There are
// no {09}/{0B}/{0D}/{0E} multipliers and no tables. Combinational.
// The mult2-only structure follows the design's InvMixColumns unit.
module aes_inv_mix_columns
  import aes_pkg::*;
(
  input  block_t d,  // state in
  output block_t q   // inverse-mixed state
);
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        byte_t x0, x1, x2, x3, t01, inner;
        x0 = get_byte(d, r, c);
        x1 = get_byte(d, (r + 1) % 4, c);
        x2 = get_byte(d, (r + 2) % 4, c);
        x3 = get_byte(d, (r + 3) % 4, c);
        t01 = mult2(x0 ^ x1);
        inner = t01 ^ mult2(x2 ^ x3) ^ x0 ^ x2;
        q[127 - 8 * (4 * c + r) -: 8] = mult2(mult2(inner)) ^ t01 ^ x1 ^ x2 ^ x3;
      end
    end
  end
endmodule
