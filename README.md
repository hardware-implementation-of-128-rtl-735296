# AES-128 image encryption engine with a four-stage round

This is a compact AES-128 engine meant for encrypting small images (for
example a 32 x 32 grey-scale picture, 64 blocks of 16 pixels). It has one
round of hardware, used ten times per block. The main idea is to split that
round into four register stages, one per AES transformation, and to generate
the round keys in the same four steps. The round key is then ready exactly
when the state needs it, and no key table is stored. The registers between
transformations keep the logic between flip-flops shallow. That limits
glitching (a source of dynamic power) and allows a high clock rate.

A second, separate core decrypts. It starts from the *last* round key that
the encryption core leaves behind and runs the key schedule backwards.

Three low-power measures are in the RTL:

* registers between the transformations (shorter glitch paths),
* operand isolation on the MixColumns / InvMixColumns inputs,
* a latch-based clock gate in front of each core.

## Data layout

A 128-bit block is the usual AES state in column-major byte order:

| bits      | byte      | bits     | byte      |
|-----------|-----------|----------|-----------|
| [127:120] | row 0, col 0 | [95:88] | row 0, col 1 |
| [119:112] | row 1, col 0 | ...     | ...          |
| [111:104] | row 2, col 0 | [7:0]   | row 3, col 3 |
| [103:96]  | row 3, col 0 |         |              |

Each 32-bit word is one column. The key is split the same way into words
w0 = [127:96] ... w3 = [31:0]. An image is fed in raster order, 16 pixels per
block, first pixel in [127:120]. Each block is encrypted on its own (no
chaining between blocks).

## The round loop (`aes_encrypt`, `aes_decrypt`)

```
             +-----------------------------------------------------------+
             v                                                           |
 block^key ->[state]->SubBytes->[SB]->ShiftRows->[SR]->MixCols->[MC]-+   |
                                                  |                  v   |
                                                  +-------------->(mux p4)->XOR round key-+
```

One load cycle puts `block ^ key` into the state register (the initial
AddRoundKey). Then each round walks through four phases:

| phase | data path (encryption)              | data path (decryption)             | strobe |
|-------|-------------------------------------|------------------------------------|--------|
| 0     | SB <= SubBytes(state)               | SB <= InvSubBytes(state)           | p1     |
| 1     | SR <= ShiftRows(SB)                 | SR <= InvShiftRows(SB)             | p2     |
| 2     | MC <= MixColumns(SR)                | MC <= InvMixColumns(SR)            | p3     |
| 3     | state <= (MC or SR) ^ round key     | state <= (MC or SR) ^ key out      | p5     |

In round 10 the multiplexer (select `p4`) takes SR and skips MC. At the same
time the MixColumns input is ANDed with `p4`, so the unused multiplier sees
constant zeros and does not toggle. This is operand isolation.

ShiftRows is not logic at all. `aes_shift_rows` is the SR register itself,
with each byte input wired to the byte that must land there. For example, out
[119:112] takes in [87:80]. The S-boxes are 256-entry look-up tables
(`aes_sbox`, `aes_inv_sbox`; 16 of them per core plus 4 in each key unit). The
table contents are computed at elaboration from the S-box definition
(GF(2^8) inverse, then the affine map) in `aes_pkg::gen_sbox`. No table is
typed in.

MixColumns uses only the `mult2` and `mult3` functions (shift plus a
conditional XOR with 1B):
`y_i = 2*x_i ^ 3*x_(i+1) ^ x_(i+2) ^ x_(i+3)`.
InvMixColumns uses only `mult2`. It rests on the identity
`y_i = 4*(2*(x0^x1) ^ 2*(x2^x3) ^ x0 ^ x2) ^ 2*(x0^x1) ^ x1 ^ x2 ^ x3`,
which equals `0E*x0 ^ 0B*x1 ^ 0D*x2 ^ 09*x3`. So the inverse needs no
09/0B/0D/0E multipliers.

## Keys generated in step with the rounds

This is the part that takes most care.

**Encryption (`aes_key_expand`).** The K-to-w register holds the current round
key. The next key is built on the same phase strobes as the data path:

| phase | key unit                                             | strobe |
|-------|------------------------------------------------------|--------|
| 0     | S-box reg <= SubWord(RotWord(w3))                    | p1     |
| 1     | R-con reg <= S-box reg ^ {RC[round], 24'h0}          | p8     |
| 2     | Xor-1 reg <= w4..w7 (w4 = w0 ^ R-con reg, w(i+1) = w(i-3) ^ w(i)) | p9 |
| 3     | state uses Xor-1 reg; K-to-w <= Xor-1 reg             | p7     |

RC is 01 02 04 08 10 20 40 80 1B 36 (`aes_rcon`). In round 10, phase 3, the
Outkey register (`p10`) captures round key 10. It appears on
`final_key` / `enc_final_key`, and it is the decryption key.

**Decryption (`aes_inv_key_expand`, `aes_decrypt`).** The decryption core
receives round key 10. It recovers keys 9, 8, ... 0 one per round, using the
reversed constants 36 1B 80 40 20 10 08 04 02 01 (IR-con). From the current
key w0..w3:

```
v3 = w3 ^ w2   v2 = w2 ^ w1   v1 = w1 ^ w0   v0 = w0 ^ SubWord(RotWord(v3)) ^ IRC
```

The stages are: phase 0 Xor-1 (v1..v3), phase 1 S-box and IR-con, phase 2
Outkey plus key out, phase 3 reload K-to-w.

The data path runs the *equivalent inverse cipher*: InvSubBytes,
InvShiftRows, InvMixColumns, then AddRoundKey. That puts the decryption round
in the same shape as the encryption round. It only works if rounds 1..9 XOR
in `InvMixColumns(round key)` rather than the round key. So the key unit
passes each recovered key through its own InvMixColumns before the key-out
register. Round 10 uses the plain cipher key, which `p4` selects.

## Control unit (`aes_ctrl`)

A one-hot four-bit phase ring, a four-bit round counter and a few AND gates
make a 19-bit control word (`aes_pkg::ctrl_t`):

| bits    | field   | meaning |
|---------|---------|---------|
| [18:15] | phase   | one-hot phase, 0 while idle |
| [14:11] | round   | 1..10, 0 while idle |
| 10      | p10     | capture last round key (round 10, phase 3) |
| 9       | p9      | Xor-1 register (encryption key chain), phase 2 |
| 8       | p8      | R-con register, phase 1 |
| 7       | p7      | reload K-to-w: on load and in phase 3 |
| 6       | p6      | K-to-w source: 0 = input key (load), 1 = generated key |
| 5       | p5      | state register, phase 3 |
| 4       | p4      | 1 = use MixColumns result, 0 = bypass (round 10) |
| 3..1    | p3..p1  | MC, SR and SB registers, phases 2, 1, 0 |
| 0       | p0      | load `block ^ key` |

An assertion checks that the phase ring stays one-hot.

## Interface and timing

`aes_image_top` places both cores side by side. Each core gets its own ports
and its own `aes_clock_gate`, whose enable is `start | busy`. The gate is a
latch that is transparent while `clk` is low, followed by an AND gate. An
idle core therefore receives no clock edges. This gate holds the design's
only latch, and the latch is intentional.

| port (per core)                    | dir | width | meaning |
|------------------------------------|-----|-------|---------|
| `clk`, `rst_n`                     | in  | 1     | shared clock; asynchronous active-low reset (control state only) |
| `enc_start` / `dec_start`          | in  | 1     | one-cycle start, sampled while idle; ignored while busy |
| `enc_plaintext`, `enc_key`         | in  | 128   | block and cipher key, sampled on the start edge |
| `dec_ciphertext`, `dec_key`        | in  | 128   | block and round key 10, sampled on the start edge |
| `enc_ciphertext` / `dec_plaintext` | out | 128   | result, valid from `done` until the next start |
| `enc_final_key`                    | out | 128   | round key 10, valid from `enc_done` |
| `*_busy`                           | out | 1     | from the cycle after start through the `done` cycle |
| `*_done`                           | out | 1     | one-cycle pulse |

The edge that samples `start` loads the core. `done` rises 40 cycles later,
so a block takes 41 cycles. There is one block per core at a time. The
datapath registers have no reset; each is written before it is read.
Because the reset is asynchronous, it needs a real falling edge of `rst_n`.

## Performance

At 441.5 MHz (a rate reported for this architecture on a Stratix II FPGA),
41 cycles per block give 1.38 Gbit/s per core. A 32 x 32 8-bit image (64
blocks) takes 2624 cycles, about 5.9 us. Rates of about 6.5 Gbit/s have been
quoted for this architecture at that clock. That would need about 9 cycles
per block, so several blocks would have to be interleaved in the four-stage
loop. This RTL does not do that; it keeps one block in flight.

## Where the RTL makes its own choices

* The exact strobe-to-register assignment and the 19-bit packing of the
  control word. The round loop's structure, the strobe names p0..p10 and the
  19-bit width come from the architecture; how each bit is used is this
  design's reading.
* The split of the key step into its stages, and loading Outkey and
  key-out on the same edge in the decryption key unit.
* Using the plain key in decryption round 10 (needed for correct AES).
* Clock gating at core granularity, and operand isolation on the
  MixColumns inputs only.
* Power gating of the FPGA and switching off unused memory ports are
  platform features. They are not in the RTL.

## Files

| file | contents |
|------|----------|
| `rtl/aes_pkg.sv` | types, `ctrl_t`, `mult2`/`mult3`, round constants, S-box generation |
| `rtl/aes_sbox.sv`, `rtl/aes_inv_sbox.sv` | S-box and inverse S-box look-up tables |
| `rtl/aes_sub_bytes.sv` | 16 S-boxes over a state (`INVERSE` parameter) |
| `rtl/aes_shift_rows.sv` | ShiftRows / InvShiftRows register (`INVERSE`) |
| `rtl/aes_mix_columns.sv`, `rtl/aes_inv_mix_columns.sv` | column mixing |
| `rtl/aes_rcon.sv` | R-con / IR-con table (`INVERSE`) |
| `rtl/aes_ctrl.sv` | control unit |
| `rtl/aes_key_expand.sv`, `rtl/aes_inv_key_expand.sv` | forward and reverse key units |
| `rtl/aes_encrypt.sv`, `rtl/aes_decrypt.sv` | the two cores |
| `rtl/aes_clock_gate.sv` | latch + AND clock gate |
| `rtl/aes_image_top.sv` | top level |
| `tb/aes_ref_pkg.sv` | independent behavioural AES model for the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a watchdog. Any one can be built with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_image_top.sv \
    --top-module tb_aes_image_top -o sim
./obj_dir/sim
```

`tb_aes_image_top` is the end-to-end test, at the design's only
configuration. It does the following:

* generates a 32 x 32 test image,
* encrypts all 64 blocks and checks each against the reference model,
* decrypts each ciphertext on the second core while the first works on the
  next block,
* checks that the decrypted image equals the original,
* checks the 40-cycle latency of every block and that the cipher image's
  histogram is flat (255 of 256 grey levels used, no level more than 9
  times),
* counts the mechanisms: clock stopped on each core, MixColumns bypassed
  with isolated input, a start ignored during a block.

It runs in well under a second. The per-module testbenches also use the
published AES-128 test vectors (key 2b7e1516..., and key 000102...0f with
plaintext 00112233...ff).

Two limits apply. The testbenches run on a two-state simulator. The clock
gate's glitch suppression is checked only at that level, not against real
gate delays.
