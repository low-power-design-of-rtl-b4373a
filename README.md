# RoBA multiplier and a small encryption path built on it

A RoBA (rounding-based approximate) multiplier replaces the partial-product
array of a multiplier with shifts. Each operand is rounded to its nearest power
of two. Every product that involves a rounded operand is then a shift. One
adder and one subtractor combine three such shifts into an approximation of
`A*B`.

This repository holds synthesizable SystemVerilog for that multiplier in its
three variants. It also holds the encryption path that uses it. That path mixes
a data word with a key word through an XOR and a RoBA multiplication. It then
applies the AES S-Box to every byte and ShiftRows to the result. All RTL is in
`rtl/`. Every block has a self-checking testbench in `tb/`.

## How the multiplier approximates a product

Let `Ar` and `Br` be the powers of two nearest to `A` and `B`. The product can be
written exactly as

    A*B = (Ar - A)*(Br - B) + Ar*B + Br*A - Ar*Br

The multiplier drops the first term and computes

    P = Ar*B + Br*A - Ar*Br

Each of the three remaining terms has a power-of-two factor, so each is a shift
by the position of a single bit. The error is exactly `-(Ar - A)*(Br - B)`:

* It is zero when either operand is a power of two.
* It is negative (the result is too small) when both operands were rounded the
  same way, both up or both down.
* It is positive when one operand was rounded up and the other down.

Rounding moves an operand by at most a third of its value, so the relative
error never exceeds 1/9 (about 11%). Over 1,000 random signed 32-bit pairs, the
mean relative error is about 2.8% and the largest is about 10.7%.

A worked example: `A = 12`, `B = 5`. Then `Ar = 16` and `Br = 4`, so
`P = 16*5 + 4*12 - 16*4 = 64` against the exact 60. The error is
`-(16-12)*(4-5) = +4`.

### Rounding rule

For a value whose leading one sits at bit `m`, the candidates are `2^m` and
`2^(m+1)`. The midpoint between them is `3*2^(m-1)`, which is the bit pattern
`11` followed by zeros. So the rule is:

* If bit `m-1` is 1, round up to `2^(m+1)`.
* Otherwise, round down to `2^m`.

Values exactly at the midpoint round up. Either choice gives the same error
magnitude there, and rounding up makes the rule a two-bit test. Zero rounds to
zero, which keeps `0*B = 0` exact.

The rounding block (`roba_rounding`) returns the power of two as a one-hot word
of `N+1` bits. The extra bit is needed because an unsigned `N`-bit value that
starts with `11` rounds to `2^N`. The shifters take this one-hot word directly
as their shift amount, so there is no encoder in between.

### Datapath

    a ─ sign detector ─ |A| ─┬─ rounding ─ Ar ─┬──────────────┐
                             │                 │              │
    b ─ sign detector ─ |B| ─┼─ rounding ─ Br ─┼──┐           │
                             │                 │  │           │
              shifter: |A| by Br  ─► Br*A ─┐   │  │           │
              shifter: |B| by Ar  ─► Ar*B ─┴─ adder ─ subtractor ─ sign set ─ p
              shifter: Ar  by Br  ─► Ar*Br ──────────┘   (- Ar*Br)

| Block | Module | Width at N = 32 |
|---|---|---|
| sign detector (x2) | `roba_sign_detector` | 32 → sign + 32-bit magnitude |
| rounding (x2) | `roba_rounding` | 32 → 33 one-hot |
| shifter (x3) | `roba_shifter` | 32 or 33 → 65 |
| adder | `roba_adder` | 65 |
| subtractor | `roba_subtractor` | 65 |
| sign set | `roba_sign_set` | 64 |

The adder is 2N+1 bits wide. Each term is below `2^(2N)`, but their sum can
exceed it. The final difference always fits in 2N bits. The largest unsigned
result is `2^(2N) - 2^(N+1)`, reached when both operands are all ones. This has
been confirmed exhaustively for 10-bit operands. `roba_multiplier` asserts that the top bit of the
difference is zero.

### Variants (`MODE`, type `roba_pkg::roba_mode_e`)

| MODE | Name | Operands | Negative result |
|---|---|---|---|
| `ROBA_UNSIGNED` | U-RoBA | unsigned | no sign logic at all |
| `ROBA_SIGNED` (default) | S-RoBA | two's complement | `~x + 1`, exact |
| `ROBA_SIGNED_APPROX` | AS-RoBA | two's complement | `~x`, one LSB below S-RoBA |

In the signed variants the sign detectors turn both operands into magnitudes,
and the sign set negates the magnitude product when the signs differ. AS-RoBA
skips the increment of the two's complement negation, which shortens the path.
One corner case: with a zero operand and a negative other operand, AS-RoBA
returns -1, not 0.

## Encryption path (`crypto_roba_top`)

    data ─┬─ XOR ─ whitened ─┐
    key  ─┴──────────────────┴─ RoBA multiplier ─ 64-bit word
          ─ 8 x AES S-Box ─ ShiftRows (4 rows x 2 columns) ─ register ─ cipher

* **Convolution stage (`conv_unit`).** This stage holds an adder and the RoBA
  multiplier. The adder is addition in GF(2^N), which is XOR: it whitens the
  data with the key. The multiplier then forms `RoBA(data ^ key, key)`, a 2N-bit
  word.
* **S-Box (`aes_sbox`).** This is the standard AES byte substitution: the
  inverse in GF(2^8) modulo `x^8+x^4+x^3+x+1`, then the affine map with
  constant `0x63`. The 256-entry table is computed at elaboration by constant
  functions. A byte `v = 3^k` has inverse `3^(255-k)`, and that is how the table
  is filled. No data file is involved.
* **ShiftRows (`shift_rows`).** The bytes form a state of 4 rows by `NB`
  columns. Byte 0 is in the top bits, and the bytes fill the state column by
  column, as in AES. Row `r` rotates left by `r mod NB` columns. At `NB = 4`
  this is exactly AES ShiftRows. The testbench checks that case against the
  published AES example. The path uses `NB = 2` for its 64-bit word, so rows 1
  and 3 swap their two bytes.

**Interface and timing.** The operands `data` and `key` are each `N = 32` bits
wide. `in_valid`, `data` and `key` are sampled on the rising edge of `clk`.
`cipher` (2N = 64 bits) and `out_valid` change on the next rising edge, so the
latency is one cycle and the path takes one word per cycle. While `in_valid` is
low, `cipher` holds its value. `rst_n` is an asynchronous, active-low reset that
clears both outputs. `N` must be a multiple of 16. The datapath before the
register is purely combinational.

This "encryption" cannot be inverted. The approximate product discards
information, and there is no decryption path. Treat the block as a
demonstration of the RoBA multiplier inside a cipher-like datapath, not as a
secure cipher.

## What comes from the source design and what does not

These parts follow the published design:

* the multiplier block diagram and the identity above;
* the rounding rule, including the `11…` → `2^N` case;
* the three variants and the two negation methods;
* the 32-bit operands and the 65-bit adder;
* the order of the encryption stages: convolution (adder + RoBA multiplier),
  S-Box, then ShiftRows.

These are this implementation's own choices:

* **What the convolution stage computes.** The source names an adder and a
  multiplier fed by data and key, and nothing more. XOR-then-multiply-by-key is
  one reasonable reading.
* **The S-Box and ShiftRows contents.** These are standard AES. The source only
  names the stages.
* **The ShiftRows geometry.** The 4 x 2 state and the `r mod 2` rotation exist
  because the product is 64 bits, not 128.
* **Clocking.** The single output register, the valid flags and the reset are
  not specified by the source.
* **Details of the shifters.** The one-hot shift amount and the 2N+1-bit shifter
  outputs are this implementation's. A 2N-bit output would lose `Ar*Br = 2^(2N)`
  in U-RoBA.
* **The default variant.** S-RoBA is the default because the source's operands
  are two's complement.

Not built:

* the iterated AES rounds and key expansion, which the source mentions only as
  background;
* a "multiple-select" multiplexer (M, 2M, 3M) that the source names without
  saying where it fits.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`. Each also has a watchdog
that ends the run with a failure if it hangs. Expected values come from
reference models written differently from the RTL. `tb/roba_ref_pkg.sv` finds
the nearest power of two by comparing distances in 128-bit integers.
`tb/aes_ref_pkg.sv` builds the S-Box by searching for inverses and applying the
affine map bit by bit.

| Testbench | What it covers |
|---|---|
| `tb_roba_multiplier` | All three variants. All 65,536 operand pairs at N = 8, plus about 2,000 random pairs and corner pairs at N = 32. It also checks the error identity and that a power-of-two operand gives an exact product. |
| `tb_roba_rounding` | Every value at N = 10, plus corner and random values at N = 32. It counts rounding up, rounding down, ties and exact powers of two. |
| `tb_aes_sbox` | All 256 entries, published values, and that the table is a permutation. |
| `tb_shift_rows` | The published AES ShiftRows example at NB = 4, a hand-worked NB = 2 vector, and random states. |
| `tb_conv_unit`, `tb_roba_sign_detector`, `tb_roba_shifter`, `tb_roba_adder`, `tb_roba_subtractor`, `tb_roba_sign_set` | Each block against its own model. |
| `tb_roba_random_vectors` | 1,000 random signed 32-bit pairs through the default multiplier. Each product is checked, and the relative error must stay within 1/9. It prints the mean and largest error and the number of output bit toggles. |
| `tb_crypto_roba_top` | The whole path at default parameters (see below). |

`tb_crypto_roba_top` runs the whole path at its default parameters. It drives
about 3,200 cycles of random words with random idle gaps, a hand-worked vector
and a mid-stream asynchronous reset. It checks the one-cycle latency and that
the output holds during idle cycles. It also counts the following events and
fails if any of them never occurs:

* rounding up, rounding down and ties;
* negative products;
* zero and power-of-two operands;
* idle cycles and reset.

To run one testbench with Verilator:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_crypto_roba_top \
        -y rtl -y tb +libext+.sv -Irtl \
        rtl/roba_pkg.sv tb/roba_ref_pkg.sv tb/aes_ref_pkg.sv tb/tb_crypto_roba_top.sv
    ./obj_dir/Vtb_crypto_roba_top

Replace the top module and the last file name to run another testbench. Each
finishes in seconds.

## Changing the design

* **Operand width.** Set `N` on `crypto_roba_top`, `conv_unit` or
  `roba_multiplier`. The product is `2N` bits wide. The top needs `N` to be a
  multiple of 16.
* **Variant.** Set `MODE` to `ROBA_UNSIGNED`, `ROBA_SIGNED` or
  `ROBA_SIGNED_APPROX`. In U-RoBA the sign detectors and the sign set are not
  instantiated.
* **A full AES ShiftRows.** Use `shift_rows` with `NB = 4` on a 128-bit state.
