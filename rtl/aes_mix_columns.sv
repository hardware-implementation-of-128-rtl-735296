// aes_mix_columns: the MixColumns transformation on a 128-bit state.
//
// Each 4-byte column (x0, x1, x2, x3) is multiplied by the fixed matrix of
// the polynomial {03}x^3 + {01}x^2 + {01}x + {02}. The matrix product is
// expanded in advance so each output byte is one {02} multiplier, one {03}
// multiplier and three XORs:  y_i = 2*x_i ^ 3*x_(i+1) ^ x_(i+2) ^ x_(i+3)
// (indices mod 4). The multipliers are the shift-and-conditional-XOR
// functions mult2 / mult3 of aes_pkg; no table is used. Combinational.
// Building the unit from pre-expanded rows of mult2/mult3 and XORs follows
// the design; the loop form over rows and columns is this RTL's own.
module aes_mix_columns
  import aes_pkg::*;
(
  input  block_t d,  // state in
  output block_t q   // mixed state
);
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        q[127 - 8 * (4 * c + r) -: 8] = mult2(get_byte(d, r, c))
                                      ^ mult3(get_byte(d, (r + 1) % 4, c))
                                      ^ get_byte(d, (r + 2) % 4, c)
                                      ^ get_byte(d, (r + 3) % 4, c);
      end
    end
  end
endmodule
