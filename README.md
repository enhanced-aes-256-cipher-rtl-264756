# A key-dependent AES-256 variant as a pipelined datapath

This RTL implements a modified AES-256 block cipher meant for IoT devices.
The modification targets the weak diffusion of AES's first rounds. It makes
the S-box layer depend on the round key, and it adds two cheap keyed steps to
every round: an XOR with the round key and a byte-wise addition modulo 256. Decryption
undoes each of these with its inverse. The block is 128 bits and the key 256 bits.
There are 14 rounds, as in AES-256.

The hardware is two fully unrolled pipelines. One encrypts and one decrypts.
Each accepts one 128-bit block per clock and returns the result 15 clocks
later. Round keys are generated inside the pipeline, so every block may come
with its own key.

**This is not AES.** Its ciphertexts differ from those of standard AES-256 for
every key. Its strength has not been analysed here beyond a simple avalanche
measurement (below). Use it where this particular variant is wanted, not as a
stand-in for AES.

## The modified round

The state is the usual 4×4 byte matrix. Byte `n` of the 128-bit vector (bits
`127-8n -: 8`) is row `n%4`, column `n/4`. Round keys use the same layout.

### Key-dependent SubBytes (`mod_subbytes`)

Round `r` first reduces its round key `rk[r]` to four bytes, one per row:

    XORK_i = K[i][0] ^ K[i][1] ^ K[i][2] ^ K[i][3]        i = 0..3

Every state byte in row `i` is XORed with `XORK_i` before it enters the
ordinary AES S-box:

    S'[i][j] = SBOX[ S[i][j] ^ XORK_i ]

A change in any key byte therefore changes the S-box input of a whole row.
The inverse (`inv_mod_subbytes`) applies the inverse S-box first and then
removes `XORK_i`:

    S[i][j] = INV_SBOX[ S'[i][j] ] ^ XORK_i

The S-box is a 256-entry table in `aes_pkg`. It is the standard AES S-box:
the multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1, followed by
the affine map `b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`.
The inverse table is not stored. It is built at elaboration time by
inverting the forward table.

### Step order

Rounds 1 to 13 (`enc_round`, `FINAL = 0`):

    modified SubBytes → XOR rk[r] → ShiftRows → (+ rk[r]) mod 256 per byte → MixColumns → XOR rk[r]

The final round 14 (`enc_round`, `FINAL = 1`) has no MixColumns and no extra
XOR. Its modulo addition comes *before* ShiftRows:

    modified SubBytes → (+ rk[14]) mod 256 per byte → ShiftRows → XOR rk[14]

Before round 1 the plaintext is XORed with `rk[0]`, as in AES.

Each decryption round (`dec_round`) runs these steps backwards, each replaced
by its inverse. Undoing round 14 (`FIRST = 1`):

    XOR rk[14] → InvShiftRows → (− rk[14]) mod 256 → inverse modified SubBytes

Undoing rounds 13..1 (`FIRST = 0`):

    XOR rk[r] → InvMixColumns → (− rk[r]) mod 256 → InvShiftRows → XOR rk[r] → inverse modified SubBytes

A final XOR with `rk[0]` gives the plaintext.

Every keyed step in a round uses that round's key `rk[r]`. This covers the
row bytes of SubBytes, the extra XOR, the modulo addition and AddRoundKey.
The modulo operation is per byte: each state byte is added to the key byte in
the same position, and carries stay within the byte. Both points are
interpretations made in this design (see *Where this design makes its own
choices*).

## Key schedule

`key_pre` first transforms the 256-bit cipher key, so that the raw key is
never used directly as a round key. Every key byte goes through the S-box,
and the round constant `01` is XORed into the top byte of each 32-bit word:

    w'_i = SubWord(w_i) ^ 0x01000000        i = 0..7

The transformed key is then expanded with the standard AES-256 schedule.
`rk[0]` and `rk[1]` are its two halves, most significant half first. After
that, each step makes round key `n` from round keys `n-2` and `n-1`
(`key_gen`, `rc = n`). Let `t` be the last word of `rk[n-1]`. For even `n`,
`t` is replaced by `SubWord(RotWord(t)) ^ Rcon(n/2)`; for odd `n`, by
`SubWord(t)`. Then:

    rk[n].w0 = rk[n-2].w0 ^ t
    rk[n].wj = rk[n-2].wj ^ rk[n].w(j-1)

`key_gen_inv` runs one step backwards: from `rk[n-1]` and `rk[n]` it recovers
`rk[n-2]`. `key_expansion` combines `key_pre` with thirteen `key_gen` steps
and outputs all fifteen round keys at once.

## The pipelines

`aescipher256` registers the block after the initial XOR and after each of
the 14 rounds, which makes 15 stages. Each stage also carries a 256-bit key
window, `{rk[r], rk[r+1]}`. Each stage's `key_gen` makes the next round key
from this window and shifts it in beside the block.

`aesdecipher256` needs the round keys in reverse order. At its input, it
expands the key combinationally (`key_expansion`) and keeps only
`{rk[13], rk[14]}`. Stage 0 undoes round 14. Stages 1..13 undo rounds 13..1,
and each steps the window backwards with `key_gen_inv`. Stage 14 applies the
closing XOR with `rk[0]`. This costs one full key expansion at the input of
the decryptor, but after that each stage holds only 256 key bits.

Both cores use the same interface and timing:

| signal | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; all registers update on the rising edge |
| `rst_n` | in | 1 | synchronous, active low; clears the valid bits only |
| `in_valid` | in | 1 | `datain` and `key` are taken on this edge |
| `datain` | in | 128 | plaintext (encryptor) or ciphertext (decryptor) |
| `key` | in | 256 | cipher key; the decryptor takes the key the block was encrypted with |
| `out_valid` | out | 1 | `dataout` holds a result |
| `dataout` | out | 128 | ciphertext (encryptor) or plaintext (decryptor) |

- **Latency:** exactly 15 clocks from the edge that accepts a block to the
  cycle in which `out_valid` is high.
- **Throughput:** one block per clock.
- **Flow control:** none. The output cannot be stalled.
- **Gaps:** cycles with `in_valid` low travel through the pipeline as
  bubbles.
- **Data registers:** they load only when their stage receives a valid
  block, and they are not reset.
- **Reset:** asserting reset drops every block still in flight.
- **Assertion:** each core carries a concurrent assertion of the 15-cycle
  rule, which is active in simulation.

`aes256_top` puts the two cores side by side. They share clock and reset,
and every other port is brought out twice with an `enc_` or `dec_` prefix:
`enc_in_valid`, `enc_datain`, `enc_key`, `enc_out_valid`, `enc_dataout`, and
the same for `dec_`. The two directions run independently.

A 128-bit block holds at most 16 ASCII characters. The testbenches encode a
shorter text by zero-padding it at the left. For example, "ELECTRONICS" becomes
`128'h0000000000454c454354524f4e494353`. Short keys are padded the same way
to 256 bits.

## Files

| file | contents |
|---|---|
| `rtl/aes_pkg.sv` | types (`block_t`, `key256_t`), `NR = 14`, S-box table and computed inverse, GF(2^8) helpers, `rcon`, `SubWord`, `RotWord`, row-XOR |
| `rtl/mod_subbytes.sv`, `rtl/inv_mod_subbytes.sv` | key-dependent SubBytes and its inverse |
| `rtl/add_round_key.sv` | 128-bit XOR; used both for AddRoundKey and for the extra XOR step |
| `rtl/shift_rows.sv`, `rtl/inv_shift_rows.sv` | ShiftRows and its inverse |
| `rtl/mod_add.sv`, `rtl/mod_sub.sv` | byte-wise addition and subtraction modulo 256 |
| `rtl/mix_columns.sv`, `rtl/inv_mix_columns.sv` | MixColumns and InvMixColumns |
| `rtl/key_pre.sv`, `rtl/key_gen.sv`, `rtl/key_gen_inv.sv`, `rtl/key_expansion.sv` | key schedule |
| `rtl/enc_round.sv`, `rtl/dec_round.sv` | one round; combinational |
| `rtl/aescipher256.sv`, `rtl/aesdecipher256.sv` | the pipelines |
| `rtl/aes256_top.sv` | top level: both pipelines |
| `tb/aes_ref_pkg.sv` | behavioural reference model used by every testbench |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_avalanche.sv` | the avalanche experiment |

Every RTL module apart from the two pipelines, their registers, and the top
is purely combinational.

## Where this design makes its own choices

The algorithm as originally described fixes the step order of the rounds,
the key-dependent SubBytes equations, the S-box, 14 rounds and the 256-bit
key. The following points are left open there. They were settled as below;
anyone who needs bit-exact agreement with another implementation of this
variant should check these first:

1. **Modulo addition.** Only "modulo addition / subtraction" with the round
   key is specified. It is implemented per byte, modulo 256.
2. **Keys of the extra steps.** A separate key input is drawn for each step,
   but which round key each one gets is not given. Here every step of round
   `r` uses `rk[r]`.
3. **Key pre-processing.** "An extra substitution step and a round-constant
   addition before the subkeys are created" is specified. Which bytes receive
   which constant is this design's choice: `01` into the top byte of every
   word.
4. **Inverse SubBytes.** Inverse S-box first, then the row key, so that it
   is an exact inverse.
5. **Block size.** 128 bits, as in AES. One summary table in the original
   lists a 256-bit block for AES-256, which contradicts the rest of the
   description.
6. **Byte order.** The standard AES byte order is used.
7. **Initial whitening.** The key XORed onto the plaintext before round 1 is
   `rk[0]`, the first half of the pre-processed key, not the raw key. The
   decryptor's first step likewise removes `rk[14]`.
8. **Everything about timing.** The unrolled pipeline, the valid handshake,
   the reset, the on-the-fly key windows and the backward key walk in the
   decryptor are all choices of this design. No cycle-level behaviour was
   specified.

The published example ciphertexts of this variant could not be used as test
vectors. They depend on the open points above and on how the key text was
encoded. This implementation is therefore checked for self-consistency and
against the reference model, not against outside ciphertexts.

## Verification

`tb/aes_ref_pkg.sv` is a reference model written independently of the RTL:

- The S-box is computed from `x^254` and the affine map, not read from a
  table.
- The state is a byte matrix.
- The key schedule uses the word-by-word `w[0..59]` form.

With the modifications switched off, the model is plain AES-256. The
`tb_key_expansion` testbench confirms that it then reproduces the FIPS-197
AES-256 example (`00112233…eeff` under key `00010203…1f` gives
`8ea2b7ca516745bfeafc49904b496089`). This check covers the model's MixColumns,
ShiftRows, S-box and key schedule.

Each testbench ends with a line `TB_RESULT checks=N failures=M`. The main ones
are:

- **Leaf modules:** every S-box entry, published example values for
  MixColumns and ShiftRows, carry and borrow wrap-around for the modulo
  steps, and thousands of random vectors against the model.
- **`tb_enc_round`, `tb_dec_round`:** each decryption round must exactly undo
  the model's encryption round.
- **`tb_aescipher256`, `tb_aesdecipher256`:** 400 blocks with random gaps and
  key changes. Every result is compared with the model, and the latency must
  be exactly 15.
- **`tb_aes256_top`:** the whole design end to end. Ciphertexts are fed
  straight back into the decryptor with their keys. A reset is pulsed while
  both pipelines are full. The test counts back-to-back blocks, gaps, key
  changes, cycles with both directions busy and blocks dropped by the reset.
  Each of these must happen at least once.
- **`tb_avalanche`:** the experiment described below.

### Avalanche measurement

`tb_avalanche` encrypts five plaintexts, each with a copy that differs in
one bit, under the key "PSGCOLLEGEOTECHNOLOGY". It reads the state after
every round straight from the pipeline registers and reports the percentage
of differing bits, round by round. It prints the same figures for plain
AES-256 (from the reference model) alongside.

With the choices listed above, the variant reaches about 14 % after round 1,
against 12 % for AES. From round 2 on, both stay around 50 %. In this RTL the
added steps raise first-round diffusion only slightly. Larger gains reported
for the variant were not reproduced here; they may depend on the open points
listed above.

## Simulating

Any testbench runs with plain Verilator 5. The example below runs the
end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes256_top.sv \
        --top-module tb_aes256_top -o sim
    ./obj_dir/sim

For another testbench, replace `tb_aes256_top` with its name. Every
testbench finishes in well under a second.

## Size

The encryptor holds 15 × 128 data bits plus 14 × 256 key-window bits in
registers, and the decryptor the same. There are 16 S-box lookups per round,
4 more per key step, and 32 in each `key_pre`. Generic synthesis of the top
gives roughly 11,700 word-level cells, mostly 8-bit XORs. Each S-box is kept
as a 256 × 8 read-only table; on an FPGA it maps to LUTs or block RAM.
