// aes_shift_rows: ShiftRows (INVERSE = 0) or InvShiftRows (INVERSE = 1) merged
// into a 128-bit pipeline register.
//
// The transformation is only a byte permutation, so it costs no logic: each
// of the sixteen 8-bit registers is simply wired to the input byte that must
// land in its position. Row r of the state is rotated left by r bytes
// (ShiftRows) or right by r bytes (InvShiftRows); row 0 is unchanged. With
// the column-major byte order of aes_pkg this gives, for example,
// q[119:112] <= d[87:80] and q[103:96] <= d[7:0] for ShiftRows.
//
// Timing: q takes the permuted d on a rising clk edge when en is high and
// holds otherwise. The register has no reset; it is always written before it
// is read.
// Merging the permutation into a pipeline register follows the design;
// serving both directions through one INVERSE parameter is this RTL's own.
module aes_shift_rows
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0  // 0: ShiftRows, 1: InvShiftRows
) (
  input  logic   clk,
  input  logic   en,  // load strobe
  input  block_t d,   // state in
  output block_t q    // registered, shifted state
);
  block_t perm;

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) begin
        // output byte (r, c) comes from column c + r (left) or c - r (right)
        perm[127 - 8 * (4 * c + r) -: 8] =
          get_byte(d, r, INVERSE ? (c + 4 - r) % 4 : (c + r) % 4);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en) q <= perm;
  end
endmodule
