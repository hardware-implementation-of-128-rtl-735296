// aes_ref_pkg: behavioural AES-128 reference model for the testbenches.
//
// Written independently of the RTL: GF(2^8) products use a generic
// shift-and-add multiplier, the S-box inverse is x^254 by repeated
// multiplication, the affine map uses byte rotations, and decryption uses
// the textbook inverse cipher (InvShiftRows, InvSubBytes, AddRoundKey,
// InvMixColumns) rather than the equivalent-inverse order of the hardware.
// Blocks are 128-bit values with byte 0 = bits [127:120], byte 4c+r = row r
// of column c.
package aes_ref_pkg;

  typedef logic [127:0] blk_t;
  typedef logic [7:0]   b8_t;

  function automatic b8_t gmul(input b8_t a, input b8_t b);
    b8_t p = 8'h00;
    b8_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1B) : (x << 1);
    end
    return p;
  endfunction

  function automatic b8_t rotl8(input b8_t x, input int n);
    return (x << n) | (x >> (8 - n));
  endfunction

  function automatic b8_t sbox(input b8_t a);
    b8_t inv = 8'h01;
    if (a == 8'h00) inv = 8'h00;
    else for (int i = 0; i < 254; i++) inv = gmul(inv, a);
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  function automatic b8_t inv_sbox(input b8_t a);
    for (int i = 0; i < 256; i++) if (sbox(b8_t'(i)) == a) return b8_t'(i);
    return 8'h00;
  endfunction

  function automatic b8_t gb(input blk_t s, input int i);
    return s[127 - 8 * i -: 8];
  endfunction

  function automatic blk_t sub_bytes(input blk_t s, input bit inv);
    blk_t o;
    for (int i = 0; i < 16; i++) o[127 - 8 * i -: 8] = inv ? inv_sbox(gb(s, i)) : sbox(gb(s, i));
    return o;
  endfunction

  function automatic blk_t shift_rows(input blk_t s, input bit inv);
    blk_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        if (inv) o[127 - 8 * (4 * ((c + r) % 4) + r) -: 8] = gb(s, 4 * c + r);
        else     o[127 - 8 * (4 * c + r) -: 8] = gb(s, 4 * ((c + r) % 4) + r);
    return o;
  endfunction

  function automatic blk_t mix_columns(input blk_t s, input bit inv);
    b8_t m [4];
    blk_t o;
    if (inv) m = '{8'h0E, 8'h0B, 8'h0D, 8'h09};
    else     m = '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        b8_t acc = 8'h00;
        for (int k = 0; k < 4; k++) acc ^= gmul(m[(k - r + 4) % 4], gb(s, 4 * c + k));
        o[127 - 8 * (4 * c + r) -: 8] = acc;
      end
    return o;
  endfunction

  // All eleven round keys; rk[0] is the cipher key.
  typedef blk_t rk_t [11];

  function automatic rk_t expand(input blk_t key);
    rk_t rk;
    logic [31:0] w [44];
    b8_t rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32 * i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i - 1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox(t[31:24]), sbox(t[23:16]), sbox(t[15:8]), sbox(t[7:0])};
        t[31:24] ^= rc;
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i - 4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4 * r], w[4 * r + 1], w[4 * r + 2], w[4 * r + 3]};
    return rk;
  endfunction

  function automatic blk_t encrypt(input blk_t pt, input blk_t key);
    rk_t rk = expand(key);
    blk_t s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s, 1'b0), 1'b0);
      if (r != 10) s = mix_columns(s, 1'b0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic blk_t decrypt(input blk_t ct, input blk_t key);
    rk_t rk = expand(key);
    blk_t s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1'b1), 1'b1);
      s ^= rk[r];
      if (r != 0) s = mix_columns(s, 1'b1);
    end
    return s;
  endfunction

  function automatic blk_t rand_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
