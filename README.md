# Full-parallelism AES-128 encryption and decryption

This is an AES-128 block cipher written as a single combinational network.
A plain AES core has one round circuit and feeds the state back through it ten
times. Here the core has no feedback loop, for two reasons:

* **Loop unrolling (task parallelism).** All ten rounds exist as separate
  hardware, one after the other. Each round has its own key-expansion round
  beside it, which produces that round's key from the previous key while the
  data moves through.
* **Parallel SubBytes and MixColumns (data parallelism).** Inside every round,
  the 16-byte state is handled as four 32-bit columns. Four column-wide
  substitution units ("Sub-4") and four column-wide mixing units ("Mix-4") work
  on those columns at the same time.

A plaintext block and a key go in, and the ciphertext comes out one
propagation delay later. There is no clock, no state machine and no stored
round key. A matching decryption network sits beside the encryption one, and a
mode input selects which result drives the output.

```
            key ─┬───────────► KeyRound1 ──► KeyRound2 ──► ... ──► KeyRound10
                 │                │ k1           │ k2                  │ k10
 plaintext ─► AddKey(k0) ─► Round1 ───────► Round2 ──► ... ──► Round10 (no Mix) ─► ciphertext

 Round r:  [Sub-4][Sub-4][Sub-4][Sub-4] ─► ShiftRows ─► [Mix-4][Mix-4][Mix-4][Mix-4] ─► AddKey(kr)
```

## Data layout

All 128-bit values (plaintext, key, round keys, ciphertext) use the byte order
of the AES standard's examples:

* byte 0 is bits `[127:120]` and byte 15 is bits `[7:0]`;
* the bytes fill the 4×4 state one column at a time, so byte `4*c + r` sits in
  row `r` of column `c`;
* column `c` is the 32-bit slice `[127-32*c -: 32]`, with its row-0 byte in the
  top bits.

With this order, the values printed in FIPS-197 can be used as Verilog hex
literals exactly as they are written. For example, the key
`000102030405060708090a0b0c0d0e0f` and plaintext
`00112233445566778899aabbccddeeff` give `69c4e0d86a7b0430d8cdb78070b4c55a`.

## The encryption network (`aes_encrypt_fp`)

1. **`aes_add_key`**: the plaintext is XORed with the cipher key (round key 0).
2. **Rounds 1 to 9** (`aes_enc_round`, `FINAL = 0`). Each round does the
   following in order:
   * four `aes_sub4` units replace every byte through the S-box;
   * `aes_shift_rows` rotates row `r` left by `r` bytes;
   * four `aes_mix4` units multiply each column by
     `{03}x³ + {01}x² + {01}x + {02}` modulo `x⁴ + 1`;
   * `aes_add_key` XORs in the round key.
3. **Round 10** (`FINAL = 1`): the same round without the Mix-4 stage.
4. **Key expansion beside the rounds.** Beside round `r` sits one
   `aes_key_round` with round constant `rcon(r)` (01, 02, 04, … 1b, 36). It works
   as follows:
   * it rotates the last word of the previous key left by one byte (RotWord);
   * it passes that word through its own Sub-4 unit (SubWord);
   * it XORs in the round constant;
   * it chains the XOR through the four words:
     `w[i] = w[i-1] ^ w[i-4]`.

The key is therefore expanded "online": every key change takes effect with the
next evaluation of the network. No key set-up phase is needed.

The longest path runs through ten S-box lookups, ten ShiftRows permutations
(wiring only), nine Mix-4 stages and eleven key XORs. The Mix-4 stages are the
deepest XOR logic on that path.

## The decryption network (`aes_decrypt_fp`)

This is the least obvious part of the design.

Decryption uses the round keys in reverse order: key 10 first and key 0 last.
Key expansion only runs forwards, so the decryption core cannot compute keys
beside its rounds the way the encryption core does. Instead, it first expands
the whole key with `aes_key_schedule`. That block is ten chained
`aes_key_round`s that output all eleven round keys at once. The inverse rounds
then take those keys in reverse order.

The inverse rounds are **not** mirror images of the encryption rounds. An
`aes_dec_round` applies these steps in order:

1. InvShiftRows (row `r` rotated right by `r`);
2. four inverse Sub-4 units;
3. AddKey;
4. four inverse Mix-4 units (`{0b}x³ + {0d}x² + {09}x + {0e}`).

The network is built as follows:

```
ciphertext ─► AddKey(k10) ─► DecRound(k9) ─► ... ─► DecRound(k1) ─► DecRound(k0, FINAL: no InvMix) ─► plaintext
```

Each decryption round therefore undoes SubBytes and ShiftRows of one encryption
round, but undoes AddKey and MixColumns of the encryption round *before* it.
Keep this in mind when testing a single `aes_dec_round`. Fed with the output of
one `aes_enc_round`, it does not return that round's input. The testbench
`tb_aes_dec_round` checks the property that does hold.

InvShiftRows and inverse SubBytes commute, because one moves bytes and the
other changes each byte on its own. Their order inside a round is a free
choice.

Because decryption needs its own key chain and the inverse Mix-4 is larger than
the forward one, the decryption core is several times larger than the
encryption core.

## The S-box (`aes_sbox`)

An S-box entry is the affine transform (constant `0x63`) of the byte's
multiplicative inverse in GF(2⁸), modulo `x⁸ + x⁴ + x³ + x + 1`. The byte 0
maps to `0x63`.

Here the 256 entries are not typed in. The function
`aes_pkg::make_sbox_table` computes them when the design is elaborated:

* one variable walks through all non-zero field elements as powers of the
  generator `{03}`;
* a second variable walks through the same powers of `{03}⁻¹ = {f6}`, so it
  always holds the inverse of the first;
* each pair gives one table entry;
* the inverse S-box is the forward table turned around.

The result is a constant 16×16-byte lookup table, which synthesis maps to a
256×8 ROM or to logic. Every Sub-4 unit holds four of these tables: 160 in the
encryption rounds, 40 in its key rounds, and another 160 inverse and 40 forward
tables in the decryption core.

Mix-4 needs only the constant products {02}, {03}, {09}, {0b}, {0d} and {0e}.
It builds them from repeated doubling (`xtime`), so it is pure XOR logic.

## Interface and timing

`aes_fp_top` has these ports:

| port       | dir | width | meaning                                     |
|------------|-----|-------|---------------------------------------------|
| `decrypt`  | in  | 1     | 0: encrypt `data_in`; 1: decrypt `data_in`  |
| `key`      | in  | 128   | cipher key                                  |
| `data_in`  | in  | 128   | plaintext or ciphertext                     |
| `data_out` | out | 128   | result                                      |

The ports have no handshake, and the output is valid one combinational delay
after any input changes. In a clocked system, put registers on the inputs and
outputs and let the clock period cover the whole network. This accepts one
block per clock cycle. Pipeline registers between rounds are not part of this
design. They are the obvious change for a higher clock rate, because each
round's state and key would be registered at the same boundary.

`aes_encrypt_fp` and `aes_decrypt_fp` can also be used on their own. Each takes
only its data block and the key. The `NR` parameter of the cores and of
`aes_key_schedule` names the round count (10). Other values are not
meaningful, because only 128-bit keys are supported.

## Module hierarchy

```
aes_fp_top
├── aes_encrypt_fp
│   ├── aes_add_key                      initial AddKey
│   ├── aes_key_round ×10                ── aes_sub4 (KeySubWord) ── aes_sbox ×4
│   └── aes_enc_round ×10                ── aes_sub4 ×4, aes_shift_rows, aes_mix4 ×4 (not in round 10), aes_add_key
└── aes_decrypt_fp
    ├── aes_key_schedule                 ── aes_key_round ×10
    ├── aes_add_key                      AddKey with round key 10
    └── aes_dec_round ×10                ── aes_shift_rows (inverse), aes_sub4 ×4 (inverse), aes_add_key, aes_mix4 ×4 (inverse, not in the last)
aes_pkg                                  types, xtime, affine transform, rcon, S-box table generator
```

## Where this differs from a general AES description

* **128-bit keys only.** AES also defines 192- and 256-bit keys (12 and 14
  rounds, with a different key recurrence). This design fixes ten unrolled
  rounds and the four-word key expansion.
* **Round constant.** Key expansion XORs the standard round constant into the
  first word of each round key. This is needed for the results to be AES.
* **No iterative mode.** The one-round-at-a-time structure, with a multiplexer
  feeding the state back, is not included. This design is only the unrolled
  form.
* **No clocking.** No registers, reset or valid signals are provided (see
  Interface and timing).
* **Decryption is an addition to the unrolled encryption dataflow.** It follows
  the same unrolled, column-parallel style. Pairing the two cores behind a
  `decrypt` select is this design's own arrangement.
* **Timing figures.** Any delay figure depends on the target technology. The
  RTL makes no timing claim beyond "one combinational pass".

## Verification

Every module has a self-checking testbench in `tb/` named `tb_<module>`. Each
one prints `TB_RESULT checks=N failures=M` and stops, with a watchdog that fails
the run if it hangs.

Expected values come from two places:

* `tb/aes_ref_pkg.sv`. This is a behavioural AES model written differently from
  the RTL:
  * the field product is a carry-less multiply followed by polynomial
    reduction;
  * the S-box is found by brute-force inverse search and a bit-wise affine
    formula;
  * the cipher is a textbook loop over a byte array.
* Published values:
  * FIPS-197 Appendix B and C.1 (cipher and inverse cipher);
  * the Appendix A.1 round keys and the round-1 intermediate state;
  * the MixColumns test columns;
  * the pair key `000…046df998d`, plaintext `000…06b97b0d` →
    `b92c02f154b6ed42cd5ae7eac66b3f26`.

What the testbenches cover:

* The S-box test runs all 256 inputs both ways.
* The core and top tests use several hundred random key/block pairs.
* `tb_aes_fp_top` streams one block per cycle with random direction and key
  reuse. It checks round trips (encrypt, then decrypt the result in the next
  cycle). It also counts encryptions, decryptions, mode switches and key
  changes, and fails if any of them never happened. It uses the top at its
  default configuration.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_fp_top.sv \
    --top-module tb_aes_fp_top -Mdir obj_top
./obj_top/Vtb_aes_fp_top
```

Any other testbench works the same way: replace `tb_aes_fp_top` with its name.
Lint a module on its own with
`verilator --lint-only -Wall -Irtl rtl/aes_pkg.sv rtl/<module>.sv --top-module <module>`.
The whole top builds and runs in well under a minute.
