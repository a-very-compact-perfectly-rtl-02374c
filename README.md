# Perfectly masked AES S-box, merged with its inverse

An AES S-box leaks its input through power consumption unless that input is
never present in the clear. This design computes SubBytes or InvSubBytes of a
byte `A` that only ever arrives as `A ^ M`. The random input mask `M` and a
second, independent output mask `S` come with it. The result comes back as
`SBOX(A) ^ S`. Inside, every intermediate value has a distribution that does
not depend on `A`, whatever `A` is: it is either uniform or distributed like
the product of two independent uniform values. This property is called
*perfect masking*. It rules out first-order differential power analysis at
the algorithmic level.

The trick is the tower-field form of GF(2^8). Inversion is the only
non-linear part of the S-box. It is rewritten in terms of GF(2^4), and that
in turn in terms of GF(2^2). In GF(2^2), inversion is the same as squaring,
which is linear, so an additive mask passes through it untouched. The
multiplications at the two upper levels are corrected with explicit mask
terms. The multipliers and the square-scale units are the small
normal-basis circuits known from the most compact unmasked S-box. This
RTL implements the configuration with two masks, in which encryption and
decryption share one masked inverter.

## Interface and timing

`masked_sbox` is the top:

| port      | dir | width | meaning                                            |
|-----------|-----|-------|----------------------------------------------------|
| `am`      | in  | 8     | masked input byte `A ^ M`, AES polynomial basis    |
| `m`       | in  | 8     | input mask `M`                                     |
| `s`       | in  | 8     | output mask `S`                                    |
| `encrypt` | in  | 1     | 1: S-box, 0: inverse S-box                         |
| `ym`      | out | 8     | `SBOX(A) ^ S`, or `INV_SBOX(A) ^ S`                |

The block is purely combinational. It has no clock, no reset and no
registers, so the result is valid one propagation delay after the inputs.
All masks are in the ordinary AES basis. To chain S-box and inverse S-box,
the output mask of one becomes the input mask of the next; the end-to-end
testbench does exactly that.

The output is correct for any values of `M` and `S`, including zero. The
security argument, however, needs `M` and `S` to be fresh, uniformly random,
and independent of each other and of the data for every byte. No random
source is included: the masks are inputs.

## Field representation

All three levels use a normal basis, i.e. a conjugate pair whose sum is 1.
This choice is what makes squaring cheap and lets multipliers share factor
sums.

| field   | element bits         | basis       | defining polynomial        | unit  |
|---------|----------------------|-------------|----------------------------|-------|
| GF(2^2) | `{c1,c0}`            | `[w^2, w]`  | `w^2 + w + 1`              | `2'b11` |
| GF(2^4) | `{A1,A0}`, 2 bits each | `[Z^4, Z]`  | `Z^2 + Z + n`, `n = w^2`   | `4'hF` |
| GF(2^8) | `{A1,A0}`, 4 bits each | `[Y^16, Y]` | `Y^2 + Y + N`, `N = w*Z^4` (`4'h4`) | `8'hFF` |

`gf_pkg` holds the GF(2^2) operations as functions:

- multiply: with `e = (a1^a0)&(b1^b0)`, the product is `{e ^ a1&b1, e ^ a0&b0}`;
- square = inverse = bit swap;
- scale by `n`: `{c0, c1^c0}`.

A GF(2^4) product (`gf16_mul`) uses the same formula one level up: three
GF(2^2) products and one scaling by `n`. `gf16_sq_scl` computes `N*X^2`
with three XORs.

The published design uses particular normal bases and optimally factored
basis-change matrices that are not reproduced here. This implementation
picked its own:

- **Norms.** `n` and `N` make both polynomials irreducible. Among the valid
  `N`, this one gives the three-XOR square-scale.
- **Isomorphism.** The AES generator `x` maps to the tower element `8'h6A`.
  That is one of the eight roots of `x^8+x^4+x^3+x+1` in this field. It is
  one of the two that give the sparsest matrices.

The gate structure therefore differs from the published netlist. The
arithmetic is the same.

## The masked inverter

This is the heart of the design and the part to read carefully before
changing anything. In what follows, `~` marks a masked value, `*` is a field
product and `^` is field addition.

**GF(2^8) level** (`masked_inv256`). The input is `A~ = {A1,A0} = A ^ M`,
with `M = {M1,M0}`. The inverter works like this:

1. Compute the GF(2^4) norm of `A`, masked by a 4-bit mask `Q`:
   `B~ = Q ^ N(A1^A0)^2 ^ N(M1^M0)^2 ^ A1*A0 ^ A1*M0 ^ A0*M1 ^ M1*M0`.
2. Invert it with `masked_inv16`. The result `Binv~` is `B^-1 ^ M1`.
3. Compute the upper output half:
   `Ainv1 = S1 ^ A0*Binv~ ^ A0*M1 ^ M0*Binv~ ^ M0*M1`.
4. Switch the mask of the inverse to `M0`: `B2 = Binv~ ^ (M0 ^ M1)`.
5. Compute the lower output half:
   `Ainv0 = S0 ^ A1*B2 ^ A1*M0 ^ M1*B2 ^ M1*M0`.

The output `{Ainv1,Ainv0}` equals `A^-1 ^ S`. Eight GF(2^4) multipliers do
this work. The products `A1*M0`, `A0*M1` and `M1*M0` are computed once and
used twice, which is what makes the mask switch of step 4 pay off.

**GF(2^4) level** (`masked_inv16`). The same pattern repeats with 2-bit
halves `b~ = B ^ Q` and `q = Q`, plus a fresh 2-bit mask `r`:

- `c~ = r ^ n(b1^b0)^2 ^ n(q1^q0)^2 ^ b1*b0 ^ b1*q0 ^ b0*q1 ^ q1*q0`
  (this is the GF(2^2) norm `c`, masked by `r`);
- `ci = swap(c~) ^ (q1 ^ r^2)`. The swap inverts `c` and turns its mask into
  `r^2`; the added term then changes the mask to `q1`;
- `binv1 = m11 ^ b0*ci ^ b0*q1 ^ q0*ci ^ q0*q1`;
- `c2 = ci ^ (q0 ^ q1)`, which switches the mask to `q0`;
- `binv0 = m10 ^ b1*c2 ^ b1*q0 ^ q1*c2 ^ q1*q0`.

The output is `B^-1` masked by `M1 = {m11,m10}`.

**Where the masks come from.** Two masks are supplied; the rest are reused
from them:

- `Q = S1`, the upper half of the output mask. Any four bits of an
  independent `S` would do.
- `r` = the upper GF(2^2) half of `M0`. It is taken from `M0` rather than
  `M1` so that it stays independent of `M1`, which masks the GF(2^4)
  inverse.
- The inner output mask is `M1`.

The published scheme allows these reuses; which bits to use is this
design's choice.

**Order of additions.** Each masked sum must start with its fresh mask and
then add the other terms one at a time. Adding two product terms to each
other first would give a sum whose distribution depends on the data. The
RTL names every partial sum (`b_s1`…`b_s5`, `h_s1`…, `c_s1`…) so that the
intended order is explicit and can be observed in simulation.

Logic synthesis does not respect this order. It re-associates XOR trees
freely, and glitches in CMOS gates can combine terms briefly even when the
netlist is ordered. A physically secure implementation must therefore do
one of two things:

- keep the structure, e.g. by hand-instantiated cells, dont-touch
  constraints or registers between stages; or
- control the timing of the masked multipliers.

This RTL models the algorithm only. It adds no such protection.

## Basis change and the merged S-box/inverse

The inverter works on tower-basis values. Matrix multiplications over GF(2)
convert to and from the AES basis. The affine transform of the S-box is
folded into these matrices, and because the transform is affine the masks
need only its linear part `L`. Let `T` be the AES-to-tower matrix. The four
matrices in `gf_pkg` are:

| matrix      | value     | used for                                      |
|-------------|-----------|-----------------------------------------------|
| `T_ENC_IN`  | `T`       | S-box input                                   |
| `T_DEC_IN`  | `T L^-1`  | inverse S-box input, after adding `63`        |
| `T_ENC_OUT` | `L T^-1`  | S-box output, before adding `63`              |
| `T_DEC_OUT` | `T^-1`    | inverse S-box output                          |

Column `i` of `T` is the tower representation of `8'h6A^i`. Row `r` of each
stored matrix selects the input bits whose parity gives output bit `r`.

`masked_basis_in` converts three values: the masked data, `M` and `S`. For
decryption, the constant `63` is added to the data only. The output mask
`S` is converted with the *inverse* of the matrix the output stage will
apply. That way the final result carries exactly `S` in the AES basis. The
inverses already exist in the table above:

- when encrypting, `S` is converted with `T_DEC_IN`, the inverse of
  `T_ENC_OUT`;
- when decrypting, `S` is converted with `T_ENC_IN`, the inverse of
  `T_DEC_OUT`.

`masked_basis_out` applies `T_ENC_OUT` (and adds `63`) or `T_DEC_OUT`.

Together the two stages have four byte-wide 2:1 selections: data, `M` and
`S` at the input, and the result at the output. That is 32 multiplexer
bits, the count the published two-mask merged design reports.

## Verification

Each module has a self-checking testbench in `tb/`. The reference models in
`tb/tb_ref_pkg.sv` are independent of the RTL formulas:

- tower-field products come from tables of basis-vector products;
- AES arithmetic is done in the polynomial basis (inverse `a^254`, affine
  transform by bit rotation), with FIPS-197 values checked literally.

| testbench              | what it shows |
|------------------------|---------------|
| `tb_gf16_mul`          | all 256 products; `4'hF` is the unit; every nonzero element has an inverse |
| `tb_gf16_sq_scl`       | `N*x^2` for all 16 inputs |
| `tb_masked_inv16`      | all `B, Q, r, T`: correct inverse; histograms of all 16 partial sums identical for every `B` |
| `tb_masked_inv256`     | every `A` with 64 random mask pairs; for three data values, all 65,536 `(M,S)` pairs: histograms of 42 intermediates (both levels) identical |
| `tb_masked_basis_in`   | reference isomorphism preserves products; all three conversions, both directions |
| `tb_masked_basis_out`  | both directions, all bytes |
| `tb_masked_sbox`       | see below |

`tb_masked_sbox` is the end-to-end test. It applies:

- every byte in both directions with 64 random independent mask pairs;
- zero masks, and `S = M`;
- 256 masked hand-overs, where an S-box output is fed, still masked, into
  the inverse S-box.

It also counts events and requires each to happen at least once:
encryptions, decryptions, inversions of zero, switches of direction and
hand-overs.

The two histogram tests turn the security claim into a check. Reordering
an addition so that a sum starts with a data-dependent term makes them
fail. So does feeding a mask that is not independent into the wrong place.

To run a testbench with plain Verilator (5.x), from the directory that holds
`rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/gf_pkg.sv tb/tb_ref_pkg.sv tb/tb_masked_sbox.sv \
    --top-module tb_masked_sbox -o sim
./obj_dir/sim
```

Each testbench ends with `TB_RESULT checks=N failures=0` and has a cycle
watchdog. The largest, `tb_masked_inv256`, runs in a few seconds.

## Size

Generic synthesis to two-input gates gives these counts. They are not
comparable gate for gate with the published figures, which come from a
0.13 µm library with hand substitutions such as NAND/NOR for AND/XOR
combinations.

| block         | gates from generic synthesis | published two-mask figure |
|---------------|------------------------------|---------------------------|
| inverter      | about 213 XOR/XNOR, 139 AND/NAND/NOR/OR, 14 MUX, 9 NOT | 231 XOR, 94 NAND, 6 NOR (504 NAND-equivalents) |
| whole S-box   | about 277 XOR/XNOR, 249 other gates, 43 MUX | 700 NAND-equivalents |

## Departures and limits

- **Bases and matrices** are this design's own (see above). Functionally,
  the S-box is the AES S-box.
- **Only the two-mask configuration is built.** The single-mask variant
  (`S = M`) needs an extra temporary 4-bit mask and two more correction
  additions per half, and is not included.
- **No mask reuse between rounds.** An unrolled AES could precompute the
  data-independent correction terms once per block and pass them between
  rounds. That needs a modified inverter with those terms as inputs, plus
  the AES round datapath, and is not included.
- **No AES datapath and no random number generator.**
- **Algorithmic security only:** see the note on the order of additions and
  glitches above.

## Files

- `rtl/gf_pkg.sv`: types, GF(2^2) functions, basis-change matrices.
- `rtl/gf16_mul.sv`: GF(2^4) multiplier.
- `rtl/gf16_sq_scl.sv`: GF(2^4) square-scale.
- `rtl/masked_inv16.sv`: masked GF(2^4) inverter.
- `rtl/masked_inv256.sv`: masked GF(2^8) inverter.
- `rtl/masked_basis_in.sv`, `rtl/masked_basis_out.sv`: basis changes with
  the affine transform folded in.
- `rtl/masked_sbox.sv`: top.
- `tb/`: one testbench per module, plus `tb_ref_pkg.sv` with the reference
  models.
