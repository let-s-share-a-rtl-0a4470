# Share-reduced Masks-and-MACs AES S-box

Masks and MACs (M&M) guards AES against side-channel and fault attacks at the
same time. It runs two copies of the cipher in parallel. The *value* circuit
works on the data `x`. The *tag* circuit works on the MAC tag `alpha*x`, where
`alpha` is a secret tag key drawn afresh for each encryption and all products
are in the AES field GF(2^8). At the end a check tests whether the tag still
equals `alpha` times the value. Each copy is also masked, meaning every
intermediate is split into random shares. For second-order masking (d = 2)
that is three shares per copy, six in all.

This RTL implements the share-reduced variant of that S-box, from the
publication "Let's Share a Secret: Share-Reduced Design of M&M for the AES
S-box". The value and tag circuits are merged into one masked circuit, and some
shares are *common* to both sharings:

| configuration | `SDEP` | shares | value = XOR of | tag = XOR of | cross products per multiplication | random bits / clock |
|---|---|---|---|---|---|---|
| four shares (default) | 2 | `x0 r0 r1 y0` | `x0 r0 r1` | `r0 r1 y0` | 14 | 234 |
| five shares | 1 | `x0 x1 r y0 y1` | `x0 x1 r` | `r y0 y1` | 17 | 288 |

With two separate circuits the figures would be six shares, 18 cross products
and 324 random bits per clock.

`SDEP` is the number of common ("dependent") shares. Fewer shares mean fewer
registers, fewer nonlinear cross products and less randomness. There is a price
in security. Read the section "Security limits" below before choosing a
configuration.

## Share layout

Shares are numbered `0 .. NS-1`, where `NS = 6 - SDEP`:

* shares `0..2` are the value sharing;
* shares `TS..TS+2` are the tag sharing, with `TS = 3 - SDEP`;
* shares `TS..2` belong to both sharings.

Every port that carries shares uses this layout, at the input, the output and
every internal stage. The S-box output shares recombine to `S(x)` over the
value shares and to `alpha*S(x)` over the tag shares.

## Linear steps are free

Most of the S-box is GF(2)-linear:

* the basis changes into and out of the tower field;
* squaring and scaling by a constant;
* inversion in GF(2^2), which is only a bit swap in a normal basis.

A linear map `F` satisfies `F(a ^ b) = F(a) ^ F(b)`. So it can be applied to
each share on its own, and a common share is processed once for both the value
and the tag. The exception is the very last affine step (see "Stage 6" below),
because the value and the tag need *different* affine maps there.

## Masked multiplication with common shares (`srm_masked_mul`)

This is the core of the design. To multiply two sharings `a` and `b`, the value
result needs every cross product `a_i*b_j` with `i, j` in the value set. The
tag result needs every cross product with `i, j` in the tag set. A product
whose two indices are both common shares appears in both lists, so it is
computed only once. That saves `SDEP^2` of the 18 products.

Each product is assigned to one output share so that both recombinations stay
correct:

* if `i` is an independent share, the product goes to share `i`;
* if both indices are common, it goes to share `i`;
* otherwise (`i` common, `j` independent), it goes to share `j`.

As a result, a common output share only ever holds common-by-common products.
Both sums can therefore include it.

For four shares the 14 products, their output share and their refresh words
are:

| k | product | to | refresh | | k | product | to | refresh |
|---|---|---|---|---|---|---|---|---|
| 0 | x0*x0 | z0 | R0^R1 | | 7 | r1*r0 | z2 | R7^R8 |
| 1 | x0*r0 | z0 | R1^R2 | | 8 | r1*r1 | z2 | R8^R0 |
| 2 | x0*r1 | z0 | R2^R3 | | 9 | y0*y0 | z3 | R0^R9 |
| 3 | r0*x0 | z0 | R3^R4 | | 10 | y0*r0 | z3 | R9^R10 |
| 4 | r1*x0 | z0 | R4^R5 | | 11 | y0*r1 | z3 | R10^R11 |
| 5 | r0*r0 | z1 | R5^R6 | | 12 | r0*y0 | z3 | R11^R12 |
| 6 | r0*r1 | z1 | R6^R7 | | 13 | r1*y0 | z3 | R12^R5 |

The refresh is a ring:

* The nine value-set products (k = 0..8) use `R0..R8` in a closed ring, so all
  masks cancel in `z0^z1^z2`.
* The masks in the common shares `z1^z2` add up to `R5^R0`.
* The tag-only products form a chain. It starts at `R0`, runs through new words
  `R9..R12`, and closes at `R5`, which cancels that leftover.

So 13 random words are used per multiplier, against 18 for two separate
circuits. The five-share case follows the same rule: the chain closes at `R8`,
giving 16 words. `srm_pkg::prod_info` generates these tables for either
`SDEP`.

After refreshing, every product is registered on its own. The products are
XORed into the output shares only after the register, which keeps glitches
from combining shares. A share-wise linear term `lin` can be added to the first
product of each output share before the register. Stages 2 and 3 use it for
their square-and-scale terms, so those terms need no extra flip-flops.

## The pipeline (`srm_sbox`)

The inversion is Canright's normal-basis tower inversion. It is cut into six
register stages, and every stage registers its results.

| stage | operation | registers (four shares) |
|---|---|---|
| 1 | basis change into the tower field, per share (`srm_linear_map`) | 4 x 8 |
| 2 | `lambda = a*b ^ (a^b)^2*NU` over GF(2^4), where `x = {a,b}` | 14 x 4 products + 4 x 8 pass-through |
| 3 | `theta = c*d ^ (c^d)^2*N` over GF(2^2), where `lambda = {c,d}` | 14 x 2 products + 4 x 8 + 4 x 4 pass-through |
| 4 | `theta^-1` (bit swap), then `lambda^-1 = {theta^-1*d, theta^-1*c}` | 2 x 14 x 2 products + 4 x 8 pass-through |
| 5 | `x^-1 = {lambda^-1*b, lambda^-1*a}` | 2 x 14 x 4 products |
| 6 | basis change back and affine maps (`srm_out_map`) | 4 x 8 |

That is 428 data flip-flops for four shares and 526 for five. These equal
`36(d+1)^2 + 88(d+1) - (44 SDEP + 18 SDEP^2)` at `d = 2`. The six valid-pipeline
bits come on top.

Throughput is one byte per clock, with no stalls. Latency is 6 clocks. Each
clock needs `RAND_BITS = 18*(17-SDEP^2)` fresh random bits on `rnd`. The bus is
split from the low bits upward as:

* Stage 2: 13 words x 4 bits;
* Stage 3: 13 x 2;
* Stage 4: two multipliers, 13 x 2 each;
* Stage 5: two multipliers, 13 x 4 each.

Only the valid bits are reset. The masked data registers are not, and their
contents are meaningless until `out_valid` rises.

### Field representation

All levels use normal bases. A tower byte is `{a, b}` = `a*Y^16 + b*Y`, with
`Y^2 + Y + NU = 0` and `NU = Z*W`. A nibble is `{c, d}` = `c*Z^4 + d*Z`, with
`Z^2 + Z + N = 0` and `N = W^2`. A GF(2^2) pair is `{e, f}` = `e*W^2 + f*W`,
with `W^2 + W + 1 = 0`. Inside the AES field the roots are `W = 0xBC`,
`Z = 0xE0` and `Y = 0x12`. Column `k` of `srm_pkg::T2P` is the AES-field value
of tower basis element `k`, and `P2T` is its inverse. `N` and `NU` are one valid
choice among several. The matrices follow from them and must be rederived if
they change.

### Stage 6: why the output shares are recombined

The tag circuit's inversion delivers `(alpha*x)^-1`, not the tag of `x^-1`. So
the tag shares go through their own affine map, `At(t) = M_tag*t ^ alpha*0x63`.
Column `k` of `M_tag` is `alpha * L(2^k * alpha)`, where `L` is the linear part
of the AES affine map. This makes `At((alpha*x)^-1) = alpha*S(x)` directly, with
no multiplication by `alpha^2` after the inversion. The value shares use the
normal map `A(v) = L(v) ^ 0x63`.

A common share cannot take both maps. For four shares the outputs are therefore
formed as:

```
z0 = A(x0) ^ At(r0) ^ At(r1)
z1 = At(r0) ^ A(r0)
z2 = At(r1) ^ A(r1)
z3 = At(y0) ^ A(r0) ^ A(r1)
```

`z0^z1^z2` keeps only `A` terms, giving `S(x)`. `z1^z2^z3` keeps only `At`
terms, giving `alpha*S(x)`. The five-share case does the same with its single
common share `r`. `srm_tag_matrix` computes `M_tag` and `alpha*0x63` from
`alpha`.

## Fault check (`srm_match_check`)

After the computation, the value bytes `c_i` and the tag bytes `tau_i` of a
16-byte block are checked one byte per clock:

* each byte gives `z_i = alpha*c_i ^ tau_i`;
* the `z_i` are ORed into an accumulator;
* after the 16th byte, a zero accumulator releases the block, and anything
  else forces all 128 output bits to zero and raises `fault`.

The block never carries randomness, so a key generator that avoids certain
`alpha` values does not bias the output.

## The top (`srm_top`)

`srm_top` chains these parts:

1. `srm_refresh` re-randomises the incoming sharing with `NS-1` random bytes.
   For four shares it adds `R0^R1, R1^R2, R2^R0, R0^R1`; for five it adds
   `R0^R1, R1^R2, R2^R0, R0^R3, R3^R2`. The pairs cancel in both recombinations.
2. `srm_sbox` computes the S-box.
3. The value and tag bytes of each output are recombined and fed to
   `srm_match_check`.

The S-box shares are also available directly on `sbox_sh`. Feeding S-box
outputs straight into the check stands in for a full AES datapath, which is not
part of this RTL.

Ports: `clk`, `rst_n` (asynchronous, active low), `in_valid`, `in_sh[NS]`,
`rnd[RAND_BITS]`, `rnd_ref[NS-1]`, `alpha`. Outputs: `sbox_valid` and
`sbox_sh[NS]` 6 clocks after the input; `blk_valid`, `blk[127:0]` and `fault`
one clock after the 16th S-box result. `alpha` must stay constant while data
under that key is in the pipeline, because the tag matrix is not pipelined.

## Security limits

* **Critical key `alpha = 1`.** A fault `D` in a common share hits the value
  and the tag alike, so the check sees `D*alpha ^ D`. That is zero exactly when
  `alpha = 1`. With that key a single fault in a common share passes
  undetected, and the end-to-end testbench shows it happening. The key
  generator must exclude `alpha = 1`. That is why the fault check zeroes the
  output instead of randomising it: the output is then not biased by the
  excluded key.
* **`alpha = 0`** leaves value-only faults undetected, as in plain M&M.
* **Four shares give second-order security only in part.** For `x = 0`, the two
  independent shares `x0` and `y0` are equal. Probing those two values reveals
  that `x` is zero. Keeping d-th order probing security requires
  `SDEP <= (d+1)/2`. For `d = 2` that allows `SDEP = 1`, the five-share
  configuration.
* **Zero-value attacks are not countered.** Canright's inversion maps 0 to 0,
  so faults inside the inversion can vanish for `x = 0`. The remedy is to check
  the stage intermediates (lambda-detection), which is not implemented here.
* The tag matrix generation and the fault check work on an *unshared* `alpha`
  and unshared bytes. A hardened version must compute them in shared form. That
  circuit is not part of this RTL.
* No leakage or fault-injection evaluation of this RTL has been done. The
  testbenches check function only.

## Files

| file | content |
|---|---|
| `rtl/srm_pkg.sv` | field arithmetic, basis matrices, share and product tables |
| `rtl/srm_masked_mul.sv` | share-reduced masked multiplier with ring refresh |
| `rtl/srm_linear_map.sv` | Stage 1 basis change |
| `rtl/srm_out_map.sv` | Stage 6 inverse basis change, affine maps, recombination |
| `rtl/srm_tag_matrix.sv` | tag affine matrix and constant from `alpha` |
| `rtl/srm_sbox.sv` | the six-stage S-box |
| `rtl/srm_refresh.sv` | share refresh gadget |
| `rtl/srm_match_check.sv` | 16-byte fault check |
| `rtl/srm_top.sv` | refresh, S-box, tag matrix and check together |
| `tb/tb_srm_ref_pkg.sv` | reference arithmetic for the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example:

```
verilator --binary --timing -Wno-fatal --top-module tb_srm_top \
    -y rtl -y tb +libext+.sv rtl/srm_pkg.sv tb/tb_srm_ref_pkg.sv tb/tb_srm_top.sv
./obj_dir/Vtb_srm_top
```

Replace `tb_srm_top` with any other testbench. Each run takes seconds. The
references in `tb_srm_ref_pkg` do not reuse the RTL's arithmetic:

* the S-box is computed as `x^254` followed by the affine map;
* the tower basis is rebuilt from its roots by powering in the AES field;
* subfield products are formed through the embedding into GF(2^8).

What the testbenches cover:

* `tb_srm_sbox` streams random bytes through the four-share and the five-share
  S-box with random refresh words. It checks both recombinations and the
  6-clock latency.
* `tb_srm_top` runs 60 blocks at the default size. It counts six scenarios and
  requires each to occur:
  * a clean block;
  * a detected value fault;
  * a detected tag fault;
  * a detected common-share fault;
  * a missed common-share fault under `alpha = 1`;
  * a missed value fault under `alpha = 0`.

`tb_srm_top_five` runs the same scenarios on the five-share configuration.

To change the configuration, set `SDEP` on `srm_top` or `srm_sbox`. The widths
of `in_sh`, `rnd` and `rnd_ref` follow from it.
