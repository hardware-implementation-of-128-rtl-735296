// aes_pkg: types, constants and GF(2^8) helpers shared by the AES-128 image
// encryption datapath.
//
// The 128-bit state is kept in the usual column-major byte order: bits
// [127:120] hold s(0,0), [119:112] s(1,0), [111:104] s(2,0), [103:96] s(3,0),
// [95:88] s(0,1) and so on, so each 32-bit word is one column.
//
// Multiplication by {02} (mult2) is a left shift followed by a conditional XOR
// with 8'h1B; multiplication by {03} (mult3) is mult2 plus the operand. These
// are the only multipliers the MixColumns / InvMixColumns units use.
//
// The S-box contents are not typed in as a table: gen_sbox() computes them at
// elaboration time from their definition (multiplicative inverse in GF(2^8)
// followed by the affine transform), and gen_inv_sbox() inverts that table.
// The inverses are found through exponent/logarithm tables built from the
// generator {03}.
//
// The control word of one round (ctrl_t) has 19 bits: eleven register
// strobes / multiplexer selects p0..p10, the round number and a one-hot phase.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  typedef logic [255:0][7:0] sbox_tbl_t;

  localparam int unsigned NUM_ROUNDS = 10;  // AES-128

  // Control word: 11 strobes + 4-bit round + 4-bit one-hot phase = 19 bits.
  typedef struct packed {
    logic [3:0] phase;  // one-hot: bit k set during phase k of a round
    logic [3:0] round;  // 0 while loading, 1..10 during the rounds
    logic       p10;    // load the Outkey (new round key) register
    logic       p9;     // load the Xor-1 register (key word chain)
    logic       p8;     // load the R-con register
    logic       p7;     // load the K-to-w (current key) register
    logic       p6;     // key source select: 1 = new round key, 0 = main key
    logic       p5;     // load the state register after AddRoundKey
    logic       p4;     // round output select: 1 = MixColumns, 0 = bypass (last round)
    logic       p3;     // load the MixColumns register
    logic       p2;     // load the ShiftRows register
    logic       p1;     // load the SubBytes register
    logic       p0;     // load the input register (block XOR main key)
  } ctrl_t;

  // {02} * a
  function automatic byte_t mult2(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  // {03} * a
  function automatic byte_t mult3(input byte_t a);
    return mult2(a) ^ a;
  endfunction

  // Round constant RC[j], j = 1..10 (RC[1] = 01, RC[j] = {02} * RC[j-1]).
  function automatic byte_t rcon(input int unsigned j);
    byte_t r;
    r = 8'h01;
    for (int unsigned i = 1; i < j; i++) r = mult2(r);
    return r;
  endfunction

  function automatic byte_t affine(input byte_t b);
    byte_t o;
    for (int i = 0; i < 8; i++)
      o[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8];
    return o ^ 8'h63;
  endfunction

  function automatic sbox_tbl_t gen_sbox();
    sbox_tbl_t t;
    byte_t     expt [256];
    byte_t     logt [256];
    byte_t     x;
    x = 8'h01;
    for (int i = 0; i < 256; i++) begin
      expt[i] = x;
      x = mult3(x);
    end
    for (int i = 0; i < 256; i++) logt[i] = 8'h00;
    for (int i = 0; i < 255; i++) logt[expt[i]] = byte_t'(i);
    t[0] = affine(8'h00);
    for (int i = 1; i < 256; i++)
      t[i] = affine(expt[(255 - int'(logt[i])) % 255]);
    return t;
  endfunction

  function automatic sbox_tbl_t gen_inv_sbox();
    sbox_tbl_t f;
    sbox_tbl_t t;
    f = gen_sbox();
    for (int i = 0; i < 256; i++) t[f[i]] = byte_t'(i);
    return t;
  endfunction

  localparam sbox_tbl_t SBOX     = gen_sbox();
  localparam sbox_tbl_t INV_SBOX = gen_inv_sbox();

  // Byte (row r, column c) of a column-major state.
  function automatic byte_t get_byte(input block_t s, input int r, input int c);
    return s[127 - 8 * (4 * c + r) -: 8];
  endfunction

endpackage
