# 8-bit AES-128 encryption core with a composite-field S-box

This core encrypts 128-bit blocks under a 128-bit key (AES-128, FIPS-197) and is built for
small area: sensor nodes and other small wireless devices. It has an 8-bit data path, so it
handles one byte per clock cycle. It has two S-boxes, one for the data and one for the key
schedule. Neither uses a 256-entry lookup table. Each computes the byte inverse in the
composite field GF((2^4)^2) and then applies the AES affine transform. The S-box can be
built purely combinational (the default) or as a three-stage pipeline for a higher clock rate.

Only encryption is built. The design has four data-path units:

| unit | module | job |
|---|---|---|
| byte permutation unit | `aes_byte_perm` | holds the 16-byte state; load, unload, ShiftRows, SubBytes (S-box 1), AddRoundKey write-back; provides S-box 2 to the key schedule |
| key expansion unit | `aes_key_exp` | holds the round key; computes the next round key in place, one byte per cycle |
| mixcolumn unit | `aes_mixcol` | gathers four substituted bytes into a column and applies MixColumns (bypassed in round 10) |
| parallel-to-serial converter | `aes_p2s` | returns a mixed column as four bytes, one per cycle |

Around these sit `aes_ctrl`, the sequencer, and `aes_sbox`, the S-box. `aes_core8` is the
top. `aes_pkg` holds the shared types and the GF arithmetic, as functions.

## Host interface

| port | dir | width | use |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `load_in` | in | 1 | high for 16 cycles: `data_in`/`key_in` carry plaintext and key bytes 0..15 |
| `start_in` | in | 1 | one-cycle pulse: start an encryption |
| `busy_out` | out | 1 | high while encrypting; when it falls, the ciphertext can be read |
| `unload_in` | in | 1 | high for 16 cycles: `data_out` steps through ciphertext bytes 0..15 |
| `data_in`, `key_in` | in | 8 | plaintext and key byte |
| `data_out` | out | 8 | ciphertext byte |

Bytes are in FIPS-197 order. Byte *i* is row *i* mod 4 of column *i*/4, and byte 0 is sent first.
`data_out` always shows byte 0 of the state register. In an unload, the value seen in a cycle
where `unload_in` is high is the current byte, and the clock edge moves on to the next one. The
unload rotates the state, so after 16 cycles the ciphertext is back in place and can be read again.
While `busy_out` is high, all three host controls are ignored. A `start_in` that arrives together
with `load_in` or `unload_in` is ignored too.

The key register ends an encryption holding the last round key. The key is therefore sent again
with every block: `load_in` always loads data and key together.

Timing, with S-box latency L (0 for the combinational S-box, 3 for the pipelined one):

```
load      16 cycles
start      1 cycle
busy      10 * (21 + L) cycles  = 210 (default) or 240
unload    16 cycles
```

## How a round runs in place

All ten rounds share one 16-byte state register and one 16-byte key register. Each round is one
pass over the state:

1. **ShiftRows, 1 cycle.** The whole register is permuted at once. This is wiring and costs no
   logic. ShiftRows and SubBytes commute, so doing ShiftRows first is allowed.
2. **Issue, 16 cycles.** Bytes 0..15 are read in order and go through S-box 1.
3. **MixColumns.** The mixcolumn unit collects each group of four bytes, which is now exactly one
   output column. It mixes the column when the fourth byte arrives, or passes it unchanged in
   round 10. It hands the column to the parallel-to-serial converter.
4. **AddRoundKey and write-back.** The converter sends the column's bytes out over the next four
   cycles. Each byte is XORed with the matching round-key byte and written over the same byte of
   the state.

Byte *j* is read in issue cycle *j* and written back in cycle *j* + 4 + L. A column is therefore
always written after all four of its bytes were read, and no later read needs an overwritten
byte. This is why a single state register is enough.

Doing ShiftRows as a byte-serial read order would break this. The next column's bytes would come
from columns that were already written. The round ends when the 16th byte has been written back,
in cycle 19 + L. The next round starts with its ShiftRows cycle.

The initial AddRoundKey costs no cycles. The load stores `data_in ^ key_in`.

## Key schedule on the fly

`aes_key_exp` turns round key *n* into round key *n*+1 in place, byte 0 first:

```
k'[j] = k[j] ^ S(k[12 + (j+1) mod 4]) ^ (j == 0 ? rcon : 0)    j = 0..3
k'[j] = k[j] ^ k'[j-4]                                         j = 4..15
```

Byte *j*-4 has been updated by the time byte *j* needs it. Bytes 12..15 are still old when the
four RotWord/SubWord lookups go to S-box 2. Those lookups are for bytes 13, 14, 15 and 12, sent in
the first four issue cycles. The update starts together with the data pass. It writes byte *j* at
cycle L + *j*, four cycles before the data path needs that byte. An assertion in the top checks
that the update has finished before a round's last write-back. The round constant starts at
{01} on every load and is doubled in GF(2^8) after each round.

## The S-box

`aes_sbox` computes SubBytes as an inversion followed by the affine transform
y_i = x_i ^ x_(i+4) ^ x_(i+5) ^ x_(i+6) ^ x_(i+7) ^ c_i, with c = {63}. The inversion works like
this:

1. **delta** maps the byte to b·x + c, an element of GF(2^4)[x]/(x^2 + x + λ) with λ = {1100}.
2. The inverse is (b·x + c)^-1 = b·d^-1·x + (b + c)·d^-1, where d = λ·b^2 + c·(b + c). This needs:
   - a GF(2^4) squarer and a multiplier by the constant λ (both XOR-only);
   - three GF(2^4) multipliers;
   - one GF(2^4) inverter, which is a small sum of products.
3. **delta^-1** maps the result back. The affine transform follows.

GF(2^4) is built as GF((2^2)^2) with x^2 + x + φ, where φ = {10} and GF(2^2) uses x^2 + x + 1.
The 8×8 matrices for delta and delta^-1 are in `aes_pkg`. They send the root of the AES polynomial
x^8 + x^4 + x^3 + x + 1 to the composite-field element {5f}.

With `PIPELINED = 1`, the S-box has three register stages:

| stage | computes |
|---|---|
| 1 | delta, then d |
| 2 | d^-1 |
| 3 | the two products, delta^-1 and the affine transform |

A new byte can enter every cycle, and each result comes out three edges later.

## Parameters

| parameter | where | default | meaning |
|---|---|---|---|
| `SBOX_PIPELINED` | `aes_core8`, `aes_byte_perm` | 0 | 0: combinational S-boxes (L = 0); 1: three-stage S-boxes (L = 3) |
| `PIPELINED` | `aes_sbox` | 0 | same, for one S-box |

The default is the combinational S-box. Its reference results are a smaller area and a 452.5 MHz
clock in 90 nm CMOS. The pipelined S-box was reported at 526.3 MHz, with a slightly larger area
than the combinational one. Neither figure can be checked from RTL.

## Where this RTL departs from, or goes beyond, its source description

- The connections between the units, the round schedule, the cycle counts and the host-interface
  timing are this design's own. The source names the units and the host signals, but gives no
  block diagram detail or timing. This includes how the `busy_out` level should be read: here it
  is high while busy.
- The state and the key are kept in 256 flip-flops. The FPGA figures reported for the original
  core (about 191 flip-flops) suggest that it keeps part of its storage in shift-register LUTs or
  similar. This design does not copy that.
- "Unload data and key" is read as unloading the data only. There is no key output port.
- Only AES-128 encryption is built. Decryption and 192/256-bit keys are not.
- The pipeline cuts of the three-stage S-box are a balanced split chosen here.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The reference values come from `tb/aes_ref_pkg.sv`, a plain AES
model. That model shares no code with the RTL: it inverts in GF(2^8) by search and runs whole-block
rounds.

| testbench | what it checks |
|---|---|
| `tb_aes_sbox` | all 256 inputs, both S-box variants, latency 0 and 3 |
| `tb_aes_byte_perm` | load, unload, ShiftRows, write-back; both S-boxes at their exact latency |
| `tb_aes_key_exp` | every clock edge of ten updates, for combinational and 3-cycle S-boxes; the FIPS-197 round-10 key |
| `tb_aes_mixcol` | FIPS-197 MixColumns example; random columns; bypass; clear |
| `tb_aes_p2s` | back-to-back and gapped columns |
| `tb_aes_ctrl` | the complete schedule cycle by cycle against a data-path model; ignored commands |
| `tb_aes_core8` | both configurations side by side: FIPS-197 C.1 vector (plaintext 00112233..ff, key 00010203..0f, ciphertext 69c4e0d8 6a7b0430 d8cdb780 70b4c55a), 20 random blocks, busy time 210/240, commands ignored while busy, a count of each mechanism |
| `tb_aes_core8_full` | the top at its defaults: the same vector plus a chain of 8 random blocks |

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_core8.sv --top-module tb_aes_core8
./obj_dir/Vtb_aes_core8
```

Assertions check the following:

- only one state operation happens per cycle;
- the converter never drops a column;
- write-backs only happen inside a round;
- the key update is never restarted early and has finished before a round's last write-back.

Timing closure and area have not been checked. The reference 90 nm results (3.5 to 3.8 kgates,
452.5 to 526.3 MHz) come from a different implementation of the same architecture.
