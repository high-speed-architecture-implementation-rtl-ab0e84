# Sub-pipelined AES-128 encryptor with a composite-field S-box

This is a fully unrolled AES-128 encryption pipeline. It accepts one 128-bit
plaintext block and its key on every clock and returns one ciphertext on every
clock, 81 clocks after the block entered. There are no look-up tables. Each
S-box computes the inverse in GF(2^8) by mapping the byte into the composite
field GF((2^4)^2), where inversion is a few small multipliers. That logic is
then cut by registers into short stages. Each of the ten rounds has eight
sub-pipeline stages. One extra register splits the GF(2^4) multipliers,
because they are the slowest piece that cannot be divided further.

The architecture follows the article "High Speed Architecture Implementation
of AES using FPGA". It reports 190.11 MHz (24.33 Gbit/s) on a Virtex-E
XCV1000e-8 and 234.36 MHz (29.99 Gbit/s) on a Spartan-3 XC3S4000-5. Those
figures come from the article. They have not been reproduced with this RTL,
which has only been simulated and lint-checked.

## Interface and timing

`aes128_enc_top` (no parameters to set; the sizes live in `aes_pkg`):

| port         | dir | width | meaning                                             |
|--------------|-----|-------|-----------------------------------------------------|
| `clk`        | in  | 1     | clock                                               |
| `rst_n`      | in  | 1     | synchronous, active-low; clears only the valid bits |
| `in_valid`   | in  | 1     | a block is presented this clock                     |
| `plaintext`  | in  | 128   | block; byte 0 (row 0, column 0) in bits 127:120     |
| `key`        | in  | 128   | cipher key for *this* block                         |
| `out_valid`  | out | 1     | `ciphertext` holds a result                         |
| `ciphertext` | out | 128   | same byte order                                     |

- The latency is exactly `8 * 10 + 1 = 81` clocks: one input register after
  the initial AddRoundKey, then eight registers per round. `out_valid` is
  `in_valid` delayed by 81 clocks.
- There is no ready or stall signal. The pipeline always advances, and a
  clock with `in_valid` low becomes a bubble.
- Keys are expanded on the fly, in a pipeline running beside the data. Every
  block may therefore use a different key, and no key-loading phase exists.
- Bytes follow the column-major order of the AES standard. With this order the
  standard's hex vectors can be applied directly:
  `00112233…eeff` under key `000102…0f` gives `69c4e0d86a7b0430d8cdb78070b4c55a`.
- Reset clears only the valid shift registers. The data registers are not
  reset, so blocks that were in flight at reset are dropped.

## One round: where the eight registers sit

This register placement is the heart of the design. `aes_round` is built
from 16 `sbox_pipe` instances, ShiftRow, MixColumn and AddRoundKey:

| stage | logic in front of the register                                   | register |
|-------|------------------------------------------------------------------|----------|
| 1     | δ (isomorphic map) of each byte; `ah ^ al`                        | R1 |
| 2     | first half of GF(2^4) multiply `(ah^al)·al`; in parallel `λ·ah²`  | R2 (inside the multiplier, plus a balancing register on the `λ·ah²` path) |
| 3     | second half of that multiply; `d = λ·ah² ^ (ah^al)·al`           | R3 |
| 4     | `d⁻¹` in GF(2^4)                                                   | R4 |
| 5     | first half of `ah·d⁻¹` and `(ah^al)·d⁻¹`                          | R5 (inside both multipliers) |
| 6     | second half of both multiplies                                   | R6 |
| 7     | δ⁻¹, affine transform, ShiftRow                                  | R7 |
| 8     | MixColumn (not in round 10), AddRoundKey                          | R8 |

How the eight stages are placed is this design's reading of the published
architecture. Its drawing of the round shows six ordinary register cuts and
one extra cut through the two output multipliers. That makes seven, but the
architecture is stated to have eight sub-stages per round and an `8·Nr + 1`
latency. The extra cut is described as sitting inside the GF(2^4) multiplier
itself, after its three GF(2^2) products. The first multiplier of the
inversion is drawn as the same kind of block. This design therefore puts the
internal register in all three GF(2^4) multipliers, which gives eight
registers per round. The `λ·ah²` path gets one matching register so that the
two operands of the adder in stage 3 stay aligned.

The last round has no MixColumn, but it keeps all eight registers. Every
round then has the same latency, and the key pipeline does not need a special
case.

## The composite-field S-box (`sbox_pipe`)

A byte `a` in GF(2^8) (polynomial x^8+x^4+x^3+x+1) is mapped by δ to
`ah·x + al`. Here `ah` and `al` are in GF(2^4), and the field is
GF(2^4)[x]/(x^2 + x + λ). Then

```
d      = λ·ah² ⊕ (ah ⊕ al)·al          (nonzero unless a = 0)
a⁻¹    = (ah·d⁻¹)·x + (ah ⊕ al)·d⁻¹
S(a)   = affine(δ⁻¹(a⁻¹))
```

The field constants are not printed in the source. This design uses a standard
choice for this structure, and the testbenches check it against plain GF(2^8)
arithmetic:

- GF(2^2) = GF(2)[y]/(y^2+y+1), and φ = `2'b10`.
- GF(2^4) = GF(2^2)[x]/(x^2+x+φ), and λ = `4'b1100`.
- The δ and δ⁻¹ matrices are the bit equations in `iso_map.sv` and
  `inv_iso_map.sv`. `iso_map_tb` checks that δ is a field isomorphism: it
  maps 1 to 1 and preserves sums and products.

The building blocks:

- `gf2_mul`: GF(2^2) product in Karatsuba form, with three one-bit products.
- `gf2_mul_phi`: multiply by φ, a single XOR.
- `gf4_mul`: GF(2^4) product of 2-bit halves,
  `p = {pm ^ pl, φ·ph ^ pl}`. The register sits after the three GF(2^2)
  products, so `p` appears one clock after its operands.
- `gf4_sq` and `gf4_mul_lambda`: squaring and multiplying by λ. Both are
  linear, so each is a few XORs.
- `gf4_inv`: GF(2^4) inverse as sum-of-products equations, with 0 mapped
  to 0. Only the function of this block is fixed by the source; the form is
  this design's choice.
- `iso_map`, `inv_iso_map`, `affine_tf`: δ, δ⁻¹ and the AES affine map
  (constant `8'h63`).

## MixColumn

`mix_columns` uses the rearranged form that needs only the `{02}`
multiplier (xtime):
`s'_r = {02}(s_r ⊕ s_{r+1}) ⊕ (s_{r+2} ⊕ s_{r+3}) ⊕ s_{r+1}`, with row
indices taken mod 4. This equals the standard `{02}s_r ⊕ {03}s_{r+1} ⊕ s_{r+2} ⊕ s_{r+3}`.

## Key expansion alongside the data

`key_expansion` is a chain of ten `key_round` stages, one per round. Each
stage has a round constant fixed at elaboration, x^(r-1) in GF(2^8), computed
by `aes_pkg::rcon`. A stage:

1. Feeds RotWord(W3) through four copies of the same `sbox_pipe` used in the
   datapath (6 clocks).
2. Delays W0..W3 by six clocks beside the S-boxes.
3. Forms `W'0 = W0 ^ SubWord ^ Rcon`, `W'1 = W1 ^ W'0`, … and registers the
   result as `rk`. This is 7 clocks after the key entered, which is the clock
   at which the round unit's AddRoundKey needs it.
4. Registers `rk` once more as `key_out`. That is 8 clocks, aligned with the
   next round's input.

The source says the key expansion shares the SubByte unit for SubWord. A
single S-box cannot serve both the data and the key when a new block enters
every clock. Here, sharing means that the key path uses the same pipelined
S-box design, and that it has the same stage timing as the data path.

## Departures and open points

- The eighth register per round, and its balancing register, are placed as
  explained above. This is an interpretation, not something printed.
- The field constants φ, λ and δ are a standard choice. They are not stated in
  the source.
- The valid signal, the reset, the byte order, the key port for each block,
  and the pipelining of the key path are all this design's own choices.
- Only encryption is built, as in the source. Decryption and key lengths of
  192 and 256 bits are mentioned there but not designed.
- The clock rates and slice counts quoted above are FPGA results reported for
  the architecture. They have not been reproduced with this RTL.

## Files

`rtl/` has one module per file:

- `aes_pkg.sv` holds the shared types, the stage counts, `xtime` and `rcon`.
- `aes128_enc_top.sv` is the top level.
- `aes_round.sv`, `key_expansion.sv` and `key_round.sv` are the round and key
  pipelines.
- `sbox_pipe.sv` and its field blocks make up the S-box.
- `shift_rows.sv` and `mix_columns.sv` are the two other round steps.

`tb/` holds one self-checking testbench per module (`<module>_tb.sv`), plus
`aes_ref_pkg.sv`. That package is a reference model written independently of
the RTL: GF(2^8) arithmetic by shift-and-add, the S-box as
`affine(a^254)`, the key schedule and rounds straight from their
definitions, and composite-field arithmetic by polynomial reduction loops.

- `aes128_enc_top_tb` runs the full design at its real size. It sends the two
  FIPS-197 example vectors, then 400 clocks of random blocks, each with a
  random key and with random bubbles. It checks every clock's `out_valid`
  and ciphertext, the 81-clock latency, and an unbroken run of one ciphertext
  per clock. It also resets the design with blocks in flight and checks that
  none of them comes out. It reports how often each of these cases occurred.
- The round, key and S-box testbenches stream data every clock and check the
  exact latencies: 6 clocks for the S-box, 7 and 8 clocks for the key stage,
  8 clocks for the round.
- The small field blocks are tested exhaustively.

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the top of the tree:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/aes128_enc_top_tb.sv \
    --top-module aes128_enc_top_tb -Mdir obj_top
./obj_top/Vaes128_enc_top_tb
```

To run another testbench, replace `aes128_enc_top_tb` with its name. The full
design simulates in about a second.

## Changing it

- The stage counts in `aes_pkg` (`ROUND_STAGES`, `SBOX_STAGES`, `KEY_TAP`,
  `LATENCY`) describe the register placement. They do not drive it. To move a
  register, edit `sbox_pipe`, `aes_round` and `key_round` together, keep
  `KEY_TAP = SBOX_STAGES + 1`, and update the constants. The S-box, round
  and top-level testbenches take their expected latencies from these constants.
- `aes_round` has one parameter, `FINAL`, which leaves out MixColumn.
- `key_expansion` has one parameter, `ROUNDS`, the number of key stages.
