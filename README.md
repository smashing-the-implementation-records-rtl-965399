# Compact AES S-box in a GF((2^4)^2) normal basis

This is a small combinational AES forward S-box, `s = M * g^-1 + 0x63`. The costly part of the
S-box is the inverse in GF(2^8). Here it is computed in the composite field GF((2^4)^2), with
a normal basis at both levels. The design is kept small by a few choices that work together:

- The input matrix delivers the two 4-bit coordinates of the byte and, at no extra cost,
  twelve pairwise sums of them. Two later stages use those sums.
- The subfield norm `A^17` is computed as one set of closed equations, not as a chain of
  squarer, constant multiplier, multiplier and adder.
- The two output multipliers share their common operand. Each returns 5 redundant bits
  instead of 4. The step that drops the fifth bit is folded into the output matrix, together
  with the change back to the AES basis and the AES affine matrix.

The design follows the lightweight and fast S-box architectures of Reyhani-Masoleh, Taha and
Ashmawy (CHES 2018). The two transformation matrices are theirs. The internal equations were
derived for this RTL from that structure. Every stage is checked exhaustively against plain
GF(2^8) arithmetic.

## Data path

```
 g[7:0] -> sbox_tin --a,b (4+4)------------> sbox_exp17 --d--> sbox_subinv --E--+
              |      --a_ij,b_ij (6+6)-------^        (x^17)    (GF(2^4) inv)   |
              |                                                                 v
              +-------------a, b, a_ij, b_ij---------------------------> sbox_outmul
                                                                          W=BxE, Z=AxE (5+5)
                                                                                |
                                                             s[7:0] <- sbox_tout (+0x63)
```

`sbox_exp17`, `sbox_subinv` and `sbox_outmul` together form `sbox_cfinv`, the composite-field
inverter. `aes_sbox` is the top level: `sbox_tin`, then `sbox_cfinv`, then `sbox_tout`. There
are no registers, no clock and no reset. The output follows the input after the
combinational delay.

## The field representation (read this first)

Every equation in the RTL depends on this basis. The matrices only make sense in it. All
constants below are bytes of the AES field GF(2^8), which uses the polynomial
x^8 + x^4 + x^3 + x + 1.

| symbol | value | property |
|---|---|---|
| beta | `0xED` | beta^5 = 1, so {beta, beta^2, beta^4, beta^8} is a normal basis of GF(2^4) |
| Y | `0x43` | Y^16 = `0x42`, Y + Y^16 = 1 |
| nu | Y * Y^16 = beta | the norm constant that appears in `A^17` |

- A subfield value `x` (type `gf16_t`) is `x0*beta + x1*beta^2 + x2*beta^4 + x3*beta^8`,
  with bit i as the coefficient of beta^(2^i).
- A byte is `A = a*Y + b*Y^16`. Here `a` is the coefficient of Y and `b` the coefficient of
  Y^16.
- The redundant 5-bit form (`gf16r_t`) adds bit 4 as the coefficient of 1. Since
  `1 + beta + beta^2 + beta^4 + beta^8 = 0`, complementing all five bits leaves the value
  unchanged. This is why the multipliers can use NAND instead of AND gates at no cost.
- Squaring a normal-basis value rotates its bits. The subfield inverter therefore uses one
  equation, rotated for each output bit.

The basis was recovered from the published matrices and checked against them. Every column
of `T_OUT` equals the affine matrix M times the matching basis element (`beta^k * Y` or
`beta^k * Y^16`). The inverse of the first eight rows of `T_IN` maps onto the same basis.

## Stages

### Input matrix, `sbox_tin`

This stage applies one 20 x 8 GF(2) matrix, `sbox_pkg::T_IN`, with columns g7..g0:

- Rows 0-7 give a0..a3 and b0..b3.
- Rows 8-19 give a_ij = a_i ^ a_j and b_ij = b_i ^ b_j, in the pair order 01, 02, 03, 12,
  13, 23 (the `pair_e` enum). They are packed into a `shared_t` struct.

Each row is written as a parity equation. Synthesis chooses how the XORs are shared. The
published work gives hand-minimized netlists of 19 XORs (lightweight) and 24 XORs in 3
levels (fast) for this matrix. Those netlists are not reproduced here.

### Norm, `sbox_exp17`

For A = a*Y + b*Y^16, `A^17 = nu*(a+b)^2 + a*b`. This is an element of GF(2^4). In the chosen
basis it reduces to a common term and four short sums. Here `+` is XOR, `*` is AND and `|` is
OR:

```
c4 = a13*b13 + a02*b02
d0 = c4 + (a1 + b1) + a0*b0 + a12*b12
d1 = c4 + (a1 | b1) + (a3 + b3) + a23*b23
d2 = c4 + (a1 + b1) + (a2 | b2) + a03*b03
d3 = c4 + a3*b3 + (a01 | b01)
```

The published diagrams fix which operand pairs feed each output. The functions above were
derived to match them and were verified for all 256 inputs.

### Subfield inverter, `sbox_subinv`

With indices taken mod 4:

```
e_i = d_{i+1} & ~d_{i+2} & (d_i ^ d_{i+3})  |  d_{i+2} & ~(d_i & ~d_{i+3})
```

This gives `e = d^-1`, with 0 mapped to 0. The published circuit for each output bit also
uses d_i ^ d_{i+3} formed from the partial results before c4 is added. That is the same
value, because c4 cancels. Here it is formed from `d`.

### Output multipliers, `sbox_outmul`

Since A^-1 = A^16 * (A^17)^-1 = (a*Y^16 + b*Y) * E, the inverse has two parts:

- **W = B x E** is the coefficient of Y.
- **Z = A x E** is the coefficient of Y^16.

A normal-basis product has cross terms x_i*y_j + x_j*y_i. Each cross term equals
(x_i+x_j)(y_i+y_j) + x_i*y_i + x_j*y_j. In the 5-bit redundant form, the four square terms
x_i*y_i can then be cancelled by adding the all-ones word. That leaves two products per
output bit:

```
r0 = x12*y12 + x0*y0    r1 = x23*y23 + x1*y1    r2 = x03*y03 + x2*y2
r3 = x01*y01 + x3*y3    r4 = x02*y02 + x13*y13
```

The cost per multiplier is 10 products, 5 XORs and 12 operand sums, which comes to 17 XORs.
The six sums of A and B come from the input matrix. The six sums of E are formed once and
shared by both multipliers.

### Output matrix, `sbox_tout`

This stage applies the 8 x 10 matrix `sbox_pkg::T_OUT` to (w0..w4, z0..z4). Element k
produces s_k, and bit 9 of each row multiplies w0. It then XORs in `H = 0x63`. The matrix
does three things at once: it reduces the redundancy, converts to the AES basis and applies
M. The published 16-XOR netlist is again left to synthesis.

## Lightweight and fast forms

`aes_sbox`, and `sbox_cfinv` below it, have one parameter, `FAST` (default 0, lightweight).
Both settings compute the same function.

- With `FAST = 1`, `sbox_exp17` delivers the complemented norm `d' = ~d` (`INV_OUT`).
- `sbox_subinv` then takes `d'` (`INV_IN`), so no extra inverters are needed between the two
  stages.

That polarity change is the only difference between the two forms in this RTL. The published
fast design also uses faster, depth-3 netlists for the two matrices and its own gate choices
inside each stage. At RTL level these are the same equations, so they are not modelled
separately.

## How far to trust it, and where it departs

- **Function.** Correct for all 256 inputs in both forms, checked against an S-box computed
  from GF(2^8) inversion and the affine map. It also matches known table entries, for
  example S(0x00)=0x63, S(0x53)=0xED and S(0xFF)=0x16.
- **Structure.** Stages, widths and sharing follow the published architecture: 8 + 12 outputs
  from the input matrix, 6-bit shared sums per multiplier, 5-bit multiplier outputs and a
  10-bit input to the output matrix.
- **Own choices.**
  - The closed equations of the norm, the inverter and the multipliers were derived here.
  - The matrices are written as parity equations.
  - Gates are described by function, not by cell: AND, not NAND; no XOR3, NAND3 or OAI
    cells.
- **Not reproduced.** The published area and delay figures (182.25 GE and 1.20 ns
  lightweight, 208 GE and 0.78 ns fast, in a 65 nm library) depend on cell-level mapping.
  That mapping is outside this RTL. The published work also gives other equivalent
  formulations (twelve equivalent inverter functions and tool-optimized variants) and the
  heuristics that produced the matrix netlists. Only one formulation per stage is built
  here.

## Files

| file | contents |
|---|---|
| `rtl/sbox_pkg.sv` | types (`gf16_t`, `gf16r_t`, `shared_t`, `pair_e`), `T_IN`, `T_OUT`, `H` |
| `rtl/sbox_tin.sv` | input matrix and shared sums |
| `rtl/sbox_exp17.sv` | norm A^17 |
| `rtl/sbox_subinv.sv` | GF(2^4) inverse |
| `rtl/sbox_outmul.sv` | the two shared 4 x 4 -> 5 multipliers |
| `rtl/sbox_cfinv.sv` | composite-field inverter (the three stages above) |
| `rtl/sbox_tout.sv` | output matrix and constant |
| `rtl/aes_sbox.sv` | top level |
| `tb/sbox_ref_pkg.sv` | reference GF(2^8) arithmetic for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_aes_sbox_full` runs the top with default parameters |

## Simulating

Each testbench sweeps its inputs exhaustively. It ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Wall -Wno-fatal \
  rtl/sbox_pkg.sv tb/sbox_ref_pkg.sv rtl/sbox_tin.sv rtl/sbox_exp17.sv rtl/sbox_subinv.sv \
  rtl/sbox_outmul.sv rtl/sbox_cfinv.sv rtl/sbox_tout.sv rtl/aes_sbox.sv tb/tb_aes_sbox.sv \
  --top-module tb_aes_sbox -Mdir obj -o sim && obj/sim
```

Replace `tb_aes_sbox` with any other `tb_*` module to test one stage. To lint the design on
its own, run the same file list (without the `tb/` files) with `--lint-only -Wall --top-module aes_sbox`.

To use the S-box in a cipher, instantiate `aes_sbox` once per byte, 16 per round for
SubBytes and 4 for the key schedule. Add pipeline registers around it if the clock target
needs them.
