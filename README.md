# Triple AES with two keys

A 128-bit block is encrypted three times in a row with AES-128, using two
independent 128-bit keys, K1 and K2. Sender and receiver both hold both keys.
Recovering the plaintext takes both, and the intermediate results between
the passes give nothing away on their own. Decryption runs the three AES
inverse ciphers in the opposite order.

This RTL implements the scheme in hardware. It has an encryption chain and a
decryption chain that work at the same time. Each chain is three iterative
AES cores. The S-boxes are pure combinational logic built on composite-field
arithmetic, with no look-up tables.

```
            key1 ──► key_expansion ──► rk1 ──┐
            key2 ──► key_expansion ──► rk2 ──┤  (shared by both chains)
                                             ▼
 pt ──► [AES enc, K2] ──► [AES enc, K2] ──► [AES enc, K1] ──► ct      taes_encrypt
dct ──► [AES dec, K1] ──► [AES dec, K2] ──► [AES dec, K2] ──► dpt     taes_decrypt
```

## Key order

By default the first and second passes use K2 and the third uses K1.
Decryption therefore uses K1, then K2, then K2. The classical K1, K2, K1
arrangement is one parameter value away.
`taes_top`, `taes_encrypt` and `taes_decrypt` all take a 3-bit parameter,
`STAGE_KEY2`. When bit *s* is set, encryption stage *s* uses K2, and the
decryption chain mirrors the setting on its own.

| `STAGE_KEY2` | encryption order | decryption order |
|---|---|---|
| `3'b011` (default) | K2, K2, K1 | K1, K2, K2 |
| `3'b010` | K1, K2, K1 | K1, K2, K1 |

Give `taes_top` the same value at both ends of a link.

## The chains: one round per clock, three blocks in flight

Each AES core (`aes_enc_core`, `aes_dec_core`) is iterative. It holds one
128-bit state register and a round counter, and it computes one complete
round per clock with 16 S-boxes side by side.

- **Encryption core.** AddRoundKey with round key 0 is applied as the block
  is accepted. The next 10 cycles each apply
  SubBytes → ShiftRows → MixColumns → AddRoundKey. Round 10 skips
  MixColumns.
- **Decryption core.** It runs the plain inverse cipher. Round key 10 is
  applied as the block is accepted. The next 10 cycles each apply
  InvShiftRows → InvSubBytes → AddRoundKey → InvMixColumns, with round keys
  9 down to 0. The step with round key 0 skips InvMixColumns. The core reads
  the same stored round keys as the encryption core, in reverse order.

Every core port is a valid/ready pair. A transfer happens on a rising edge
where both are high. A core offers its finished result on `out_valid` and
holds it until the result is taken. A core that is empty, or whose result is
being taken in that cycle, raises `in_ready`. So a stage passes its block on
and takes the next one in the same cycle. While one block is in its second
pass, the next block is already in its first, and each chain holds up to
three blocks. A consumer that holds `ready` low stalls the chain back to its
input, and nothing is lost. An assertion in each core checks that an offered
result stays valid and unchanged until it is taken.

| quantity | cycles |
|---|---|
| one AES pass (accept edge to `out_valid`) | 10 |
| block through a whole chain (accept edge to `ct_valid`/`dpt_valid`) | 32 |
| interval between blocks per chain, no back-pressure | 11 |
| `key_load` to `keys_ready` | 10 |

The 11-cycle interval is one handover cycle plus 10 rounds. At clock
frequency *f*, each chain moves 128 bits every 11 cycles, which is
11.6·*f* bit/s.

## The S-box without a table

`sbox` computes SubByte as the GF(2^8) multiplicative inverse followed by the
AES affine transformation. InvSubByte is the inverse affine transformation
followed by the same inverse. Both directions share one inverter, `gf_inv8`,
and an `inv` input selects the direction. The cores tie `inv` to a constant,
so each core keeps only the path it uses.

`gf_inv8` avoids inverting in GF(2^8) directly. It works in the
isomorphic composite field GF((2^4)^2):

1. **Map in.** A fixed 8×8 bit matrix (`iso_map`) takes the byte to b·x + c,
   where b and c are elements of GF(2^4). The extension polynomial is
   x² + x + λ, with λ = {1100}.
2. **Invert.** In that field

       (b·x + c)^-1 = b·d^-1 · x + (b + c)·d^-1,   d = λ·b² + (b + c)·c

   This is the general form b(b²B + bcA + c²)^-1 x + (c + bA)(b²B + bcA + c²)^-1
   with A = 1 and B = λ.
   The step takes one squarer, one constant multiplier by λ, three GF(2^4)
   multipliers, a GF(2^4) inverter and XORs (addition). GF(2^4) is in turn
   built over GF(2^2) with φ = {10}. The GF(2^4) inverter is written out as a
   sum of products.
3. **Map out.** The inverse matrix (`iso_map_inv`) takes the result back to
   GF(2^8).

All of this arithmetic lives as functions in `aes_pkg`. The field constants
and the mapping matrices are a standard choice for table-free AES S-boxes.
`tb_gf_inv8` checks the inverse for all 256 inputs, and `tb_sbox` checks
both S-box directions for all 256 inputs.

## Other transformations

- **`shift_rows`.** This is wiring only: row *r* rotates left by *r* bytes,
  or right by *r* bytes for the inverse.
- **`mix_columns`.** Each column is multiplied by the matrix {02 03 01 01}.
  The inverse multiplies by {05 00 04 00} and then by the forward matrix,
  which equals the matrix {0e 0b 0d 09}.
- **`add_round_key`.** A 128-bit XOR. All four columns are handled in the
  same cycle.
- **`key_expansion`.** The AES-128 key schedule produces one round key per
  clock, using four S-boxes for SubWord. All 11 round keys (1408 bits per
  key) are kept in registers. The decryption chain needs the last round key
  first, and both chains share the table.

State layout follows the AES standard. Byte 0 is bits [127:120], and bytes
fill the 4×4 state column by column.

## Using `taes_top`

1. **Reset.** `rst_n` is asynchronous and active low. It empties both chains
   and clears `keys_ready`.
2. **Load the keys.** Drive `key1` and `key2` and pulse `key_load` for one
   cycle. `keys_ready` rises 10 cycles later. Until then `pt_ready` and
   `dct_ready` stay low. The key inputs may change once expansion has
   started.
3. **Encrypt.** Push plaintext on `pt_valid`/`pt_ready`/`pt_data` and take
   ciphertext from `ct_valid`/`ct_ready`/`ct_data`.
4. **Decrypt.** Push ciphertext on `dct_*` and take plaintext from `dpt_*`.

Results leave each chain in order. Load new keys only when no block is
inside either chain, because the cores read the round-key registers on every
round.

Example, at the default key order: with K1 = K2 = 0, the all-zero block
becomes 66e94bd4ef8a2c3b884cfa59ca342b2e after the first pass,
f795bd4a52e29ed713d313fa20e98dbc after the second and
a10cf66d0fddf3405370b4bf8df5bfb3 after the third.

## What follows the scheme and what was chosen here

These points follow the scheme itself:

- two keys and three AES-128 passes in the K2, K2, K1 order
- decryption in inverse order
- ten rounds per pass
- an iterative, one-round-per-clock core
- stages that overlap on consecutive blocks
- SubByte and InvSubByte in combinational logic through composite-field
  inversion with the formula above

These are this design's own choices:

- the valid/ready handshakes and all cycle timing
- the reset behaviour
- the stored round-key table and the one-key-per-clock schedule
- the `STAGE_KEY2` parameter
- the specific field constants (λ, φ) and mapping matrices
- doing AddRoundKey on all four columns at once, where a column-at-a-time
  datapath would also fit the description
- running the encryption and decryption chains as separate hardware side by
  side

Not included:

- ports that expose the intermediate results between passes (they are the
  internal `data[1]` and `data[2]` of each chain)
- any FPGA-specific mapping or timing constraints

Each chain uses 48 S-boxes, and each key schedule uses 4 more. Synthesis
gives about 21,000 word-level cells and 3,900 flip-flops for the whole top
level.

## Verification

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each one
compares against `tb/aes_ref_pkg.sv`, a reference model written separately
from the RTL. That model builds its S-box by brute-force search for inverses
and uses a generic GF(2^8) multiplier. The testbenches also use known-answer
vectors from the AES standard (FIPS-197 appendices B and C.1). They check:

- the cycle counts in the table above
- back-pressure
- refusal of input before the keys are ready
- three blocks in flight in each chain
- key reloads
- the alternative key order K1, K2, K1

`tb_taes_top` runs the top level at its default parameters. It checks every
ciphertext against the model and feeds it back into the decryption chain,
which must return the original block. It counts each mechanism it exercises
and fails if one never happens. Each testbench prints
`TB_RESULT checks=N failures=M`.

To run a testbench with Verilator (5.x), from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_taes_top.sv --top-module tb_taes_top
./obj_dir/Vtb_taes_top
```

Substitute any other `tb_<module>` to run that module's testbench. For a
lint check of the RTL alone, use
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/aes_pkg.sv rtl/taes_top.sv`.
