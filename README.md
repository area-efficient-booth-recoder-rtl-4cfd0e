# Fused add-multiply unit with S-MB1 sum-to-Booth recoding

This unit computes **Z = X · (A + B)** in one combinational block. This
add-multiply operation is common in DSP kernels such as FFT butterflies and
symmetric FIR filters.

The obvious way to build it is to add A and B with a carry-propagate adder,
Booth-encode the sum, and feed the digits to a Modified Booth (MB) multiplier.
That puts two carry-propagate adders on the critical path: the one that forms
A + B and the multiplier's final one.

This design removes the first one. A + B is already a redundant
(carry-save) number, and the **S-MB1 recoder** turns that pair of numbers
straight into the radix-4 MB digits of their sum. It uses one row of
full/half adders per 2-bit slice, and no carry travels further than one
slice. After the recoder, the unit is an ordinary Booth multiplier: a
partial product generator, a correction-term row, a carry-save reduction
tree and one final adder.

```
 A ─┐                                 ┌──────────┐
    ├─► smb1_recoder ─ MB digits ───► │  pp_gen  │ ─ rows ─┐
 B ─┘        │                        └──────────┘         │
             └── digit signs ─► ct_gen ── correction row ──┤
 X ───────────────────────────► (pp_gen)                   ▼
                                                      csa_tree
                                                     S │   │ C
                                                       ▼   ▼
                                                    csel_adder ──► Z
```

The default size is 8-bit signed A, B and X and a 17-bit Z. Z has 2N+1 bits
because A + B needs N+1 bits.

## The S-MB1 recoder (`rtl/smb1_recoder.sv`)

A radix-4 MB digit y_j ∈ {−2, −1, 0, +1, +2} has weight 4^j. A digit of that
range can be formed from three bits:

    y_j = −2·n_j + s_j + c_j        n_j, s_j, c_j ∈ {0,1}

Here n_j is a *negatively* weighted bit at the slice's odd position, and
s_j, c_j are two positive bits at its even position. The recoder's job is to
produce these three bits for every slice directly from A and B.

Slice j holds bits 2j and 2j+1 of both operands and has three cells:

| cell | inputs | outputs |
|------|--------|---------|
| half adder (HA) | a[2j+1], b[2j+1] | sum `hs` stays at position 2j+1; carry `hc` (weight 4^(j+1)) goes to slice j+1 |
| full adder (FA) | a[2j], b[2j], `hc` from slice j−1 | sum → **s_j**; carry `fc` moves to position 2j+1 |
| HA* (`ha_star`) | `hs`, `fc` (both at 2j+1) | negative sum → **n_j**; carry `sc` goes to slice j+1 and becomes **c_(j+1)** |

HA* is a half adder that rewrites two positive bits as a positive carry and a
negative sum: p + q = 2·(p|q) − (p⊕q). Both signals that cross slice
boundaries (`hc` and `sc`) depend only on the lower slice's own input bits.
The logic depth is therefore three cells plus the digit encoder, whatever the
width. A conventional adder in front of a Booth encoder would instead ripple,
or look ahead, across all N bits.

**Worked example** (the demonstration vector A = 14, B = 13):

| slice | a bits | b bits | HA (hs, hc) | FA (s, fc) | HA* (n, sc) | digit |
|------:|:------:|:------:|:-----------:|:----------:|:-----------:|------:|
| 0 | 10 | 01 | 1, 0 | 1, 0 | 1, 1 | −2+1+0 = −1 |
| 1 | 11 | 11 | 0, 1 | 0, 1 | 1, 1 | −2+0+1 = −1 |
| 2 | 00 | 00 | 0, 0 | 1, 0 | 0, 0 | 0+1+1 = +2 |
| 3 | 00 | 00 | 0, 0 | 0, 0 | 0, 0 | 0 |
| 4 (extra) | | | | | | 0 |

The digits give −1 − 4 + 32 = 27 = 14 + 13.

**Two's complement.** The top bits a[N−1] and b[N−1] have negative weight. In
the top slice the HA's outputs are therefore negative. Its odd position then
holds one positive bit (`fc`) and one negative bit (`hs`), so `ha_star_pn`
replaces HA*. This cell satisfies p − n = 2·(p & ~n) − (p⊕n). The top slice
sends out two carries: the positive `sc` and the negative `hc`. They form one
extra digit y_K = sc − hc ∈ {−1, 0, +1}, so there are N/2 + 1 digits in all.
That covers the full (N+1)-bit range of A + B exactly. It is not a modular
approximation, so the product is exact for every input.

**Digit encoding** (`fam_pkg::mb_digit_t`): `{neg, one, two}`, where the
magnitude is one-hot and `neg` is never set for a zero digit. The encoder is
`fam_pkg::mb_encode`.

## Partial products and the correction term

`pp_gen` builds one row per digit. It selects 0, X or 2X as an (N+1)-bit
word and inverts it for a negative digit. It also inverts the word's sign
bit, then places the row at bit 2j.

Two corrections are left out of the rows and collected in a single row by
`ct_gen`, the "CT" block:

* **+1 for each negative digit**, at bit 2j. This completes the
  two's-complement negation that the inversion began.
* **−Σ 2^(N+2j) mod 2^W**. Inverting a row's sign bit adds 2^N to that
  row, and this constant takes it back out. Because of this, no row needs
  sign extension.

The constant's lowest set bit is bit N. The +1 of each digit with 2j < N is
therefore just wired into an empty bit. The +1 of each higher digit is added
to the constant. At the default size only the top digit is higher, and the
row becomes a choice between two precomputed constants.

The whole sum is formed modulo 2^(2NI+1), where NI is the internal operand
width. Bits of a row that fall above that width are dropped. This is exact
because the product always fits.

## Reduction tree and final adder

`csa_tree` reduces the rows in Wallace-style levels. Each level replaces
every group of three rows with a sum row and a shifted carry row, using
`csa_3to2`, one full adder per bit. Left-over rows pass through unchanged.
The default has six rows (five partial products and the CT row), which
takes three levels: 6 → 4 → 3 → 2.

`csel_adder` is the only carry-propagate adder in the unit. It is a
carry-select adder:

* the low W/2 bits are added once;
* the high bits are added twice, with carry-in 0 and with carry-in 1;
* the low half's carry-out picks the high result.

Each of its three sub-adders is a `cla_adder`. That is a carry-lookahead
adder with 4-bit groups: carries inside a group are sum-of-products
equations, and group carries use group generate/propagate.

## Parameters and number formats (`rtl/fam_smb1_even.sv`)

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 8 | width of A, B and X; Z is 2N+1 bits |
| `SIGNED_OPS` | 1 | 1: two's complement operands; 0: unsigned |

Unsigned operands are zero-extended by one bit inside, so the internal width
is NI = N+1. An odd internal width is sign-extended by one more bit, because
the recoder works on 2-bit slices and needs an even width. Either way, Z
holds the exact product in the chosen format.

The unit is purely combinational. It has no clock, no registers and no
latency. To pipeline it, the natural cut is between `csa_tree` and
`csel_adder`.

## How far to trust it

The arrangement of blocks comes from the published design: the recoder in
place of an adder and MB encoder, a partial product generator, a CT block, a
carry-save tree producing C and S, and a final adder. So do the 8-bit size
and the demonstration vector 24 · (14 + 13) = 648.

The following were not specified there and are this implementation's own
choices:

* the cell-level S-MB1 slice and its sign handling;
* the digit encoding;
* the reading of "CT" as the correction term for negation and sign extension;
* the sign-bit inversion trick;
* the tree's grouping;
* the adder's group size and its W/2 split point.

The source describes the tree block with the text of a carry-select adder
but draws it as a carry-save tree with C and S outputs. Here the tree is
carry-save, and the carry-select structure, built from lookahead adders, is
used for the final adder.

Not provided:

* Two further recoder variants (S-MB2, S-MB3) are known only by name. The
  family of schemes is said to use conventional and signed-bit full and
  half adders, but the structure of these two is not available, so they
  are not implemented.
* The design is an add-multiply unit. Despite the "multiply and
  accumulate" framing, there is no accumulator register.

Verification is by simulation against integer arithmetic:

* `tb_fam_smb1_even`: the default unit over **all 2^24 combinations** of A,
  B and X, plus the demonstration vector. It counts how often each
  mechanism occurs: every digit value −2..+2, the slice-to-slice carries,
  negative top digits, and both carry-select choices. It fails any
  mechanism that never occurs.
* `tb_fam_variants`: signed N = 5 (odd) and N = 2, and unsigned N = 4 and
  N = 5, all exhaustive.
* One testbench per block:
  * `tb_smb1_recoder`: exhaustive at 8, 6 and 2 bits;
  * `tb_ct_gen`: exhaustive;
  * `tb_pp_gen`, `tb_csa_tree`, `tb_cla_adder`, `tb_csel_adder`: random
    vectors plus directed long-carry cases.

No timing, area or power figures are claimed. The claimed advantage, a
shorter recoding path than adder-then-encoder, follows from the structure
described above but has not been measured here.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and finishes. For
example:

```
verilator --binary --timing --assert -Irtl \
  rtl/fam_pkg.sv $(ls rtl/*.sv | grep -v fam_pkg) tb/tb_fam_smb1_even.sv \
  --top-module tb_fam_smb1_even -o sim
./obj_dir/sim
```

List the package first and only once. The exhaustive full-size run takes a
few seconds.

## Files

* `rtl/fam_pkg.sv`: digit type and encoder
* `rtl/fam_smb1_even.sv`: top
* `rtl/smb1_recoder.sv`, `rtl/half_adder.sv`, `rtl/full_adder.sv`,
  `rtl/ha_star.sv`, `rtl/ha_star_pn.sv`: recoder
* `rtl/pp_gen.sv`, `rtl/ct_gen.sv`: partial products and correction row
* `rtl/csa_tree.sv`, `rtl/csa_3to2.sv`: reduction tree
* `rtl/csel_adder.sv`, `rtl/cla_adder.sv`: final adder
* `tb/tb_*.sv`: testbenches as listed above
