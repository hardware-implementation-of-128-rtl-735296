// aes_sub_bytes: SubBytes (INVERSE = 0) or InvSubBytes (INVERSE = 1) on a
// whole 128-bit state.
//
// Sixteen look-up tables in parallel, one per state byte, so the
// transformation takes no clock cycle of its own; the caller registers the
// result (the SubBytes pipeline register). Purely combinational.
// The table-based S-boxes follow the design; grouping the sixteen of them
// in one module with an INVERSE parameter is this RTL's own arrangement.
module aes_sub_bytes
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0  // 0: S-box, 1: inverse S-box
) (
  input  block_t d,  // state in
  output block_t q   // state with every byte substituted
);
  for (genvar i = 0; i < 16; i++) begin : g_byte
    if (INVERSE) begin : g_inv
      aes_inv_sbox u_box (.a(d[8*i +: 8]), .y(q[8*i +: 8]));
    end else begin : g_fwd
      aes_sbox u_box (.a(d[8*i +: 8]), .y(q[8*i +: 8]));
    end
  end
endmodule
