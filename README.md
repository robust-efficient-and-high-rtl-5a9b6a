# Overlap-free Karatsuba multipliers for binary fields

Elliptic-curve cryptography over the binary fields GF(2^m) spends most of its
time and area multiplying field elements. The core of each such multiplication
is a product of two binary polynomials: coefficients are single bits, addition
is XOR, and there are no carries. This RTL computes that product with the
**overlap-free Karatsuba algorithm (OKA)**. Like classic Karatsuba, OKA builds
an n-bit product from three n/2-bit products instead of four. It cuts the
operands by the parity of the coefficient index instead of into high and low
halves. The two halves of the result then land on disjoint bit positions, and
each recursion level costs two XOR delays instead of three. At the lowest
levels the recursion hands over to plain schoolbook multiplication, which is
cheaper at small sizes.

The default size is 233 bits, one of the NIST ECDSA binary fields. The output
is the full, unreduced product: 2n-1 bits for n-bit operands. Reduction modulo
the field polynomial is not part of this design.

## The overlap-free split

Write an n-bit operand as A(x) = Ae(y) + x·Ao(y) with y = x². Ae holds the
coefficients a0, a2, a4, … and Ao holds a1, a3, …. Do the same for B. Then

    G0 = Ae·Be        G1 = (Ae + Ao)·(Be + Bo)        G2 = Ao·Bo
    A·B = (G0 + y·G2)  +  x·(G1 + G0 + G2)

Over GF(2), "+" and "−" are both XOR. Every term of the first bracket is a
polynomial in y = x², so it sits on even bit positions. The second bracket is
multiplied by x, so it sits on odd positions. The final addition is therefore
just wiring: result bit 2i is bit i of G0 + y·G2, and bit 2i+1 is bit i of
G1 + G0 + G2. The only XORs on the path are:

- one XOR level to form the sums Ae + Ao and Be + Bo;
- two XOR levels for the middle term.

The high/low Karatsuba split needs a third level, because its middle term
overlaps both neighbours. For a fully recursive n-bit multiplier, the usual
estimates are:

| | XOR gates | AND gates | delay |
|---|---|---|---|
| Karatsuba (high/low) | 6·n^1.585 − 8n + 2 | n^1.585 | Ta + (3·log2 n − 1)·Tx |
| overlap-free | 6·n^1.585 − 8n + 2 | n^1.585 | Ta + (2·log2 n − 1)·Tx |

Both algorithms need the same gates. Only the depth differs.

**Odd widths.** The NIST sizes are odd. At each level the even half gets
ceil(w/2) coefficients and the odd half gets floor(w/2). The odd half is
zero-extended to the same width, so all three sub-products of a level have
one width. This costs nothing after synthesis: the extra top coefficient of
G2 is a constant zero, and its logic is removed.

## Hybrid strategy (`ofka_mul`)

Splitting all the way down is not the cheapest choice. For small operands,
the schoolbook product (every a_i·b_j ANDed and XOR-summed per output bit)
needs fewer LUTs than more Karatsuba levels. `ofka_mul` therefore applies
`LEVELS` overlap-free splits and puts `clmul_school` multipliers at the
leaves. With the defaults (N = 233, LEVELS = 4):

| level | operand width | products at this level |
|---|---|---|
| 0 | 233 | 1 |
| 1 | 117 | 3 |
| 2 | 59 | 9 |
| 3 | 30 | 27 |
| 4 (schoolbook) | 15 | 81 |

The tree is written flat, as a generate loop over levels:

- Level l holds 3^l operand pairs, `g_lvl[l].xa/xb`, and their products `g_lvl[l].p`.
- Pair j at level l has children 3j (G0), 3j+1 (G1) and 3j+2 (G2) at level l+1.
- The splitting pass runs down the levels. The schoolbook multipliers sit at level `LEVELS`. The interleaving pass runs back up.

`LEVELS` selects the level where the schoolbook method takes over. The
exploration this design follows moves that level between one and four levels
from the bottom. `LEVELS = 0` gives a plain schoolbook multiplier. If
`LEVELS` is too large for `N`, elaboration stops with an error.

The whole multiplier is combinational: there is no clock and no latency. Put
registers around it if your clock period requires them.

## Digit-serial multiplier (`obs_digit_serial`)

This unit computes the same product but reuses one half-size overlap-free
multiplier over several clocks. Its datapath is a loop of four stages:

1. **multiplier**: `ofka_mul`, D × D bits, where D = ceil(N/2) = 117 by default.
2. **adder**: XORs the new digit product with the feedback.
3. **register**: `acc`, 2D − 1 bits.
4. **overlap circuit**: copies finished digits into the result register `res`.

The feedback from the register to the adder is shifted right by d = D bits.

Both operands are cut into K = ceil(N/D) digits. The digit products are taken
column by column: column k holds every pair (a_i, b_j) with i + j = k.

- Within a column, products are added into the unshifted accumulator.
- When a new column starts, the accumulator is fed back shifted right by D. Its low D bits are complete, because no later digit product reaches them. The overlap circuit has already stored them in `res`.
- After the last column, the whole accumulator goes into the top of `res`.

At the defaults, K = 2:

| clock | digit product | feedback | stored into c |
|---|---|---|---|
| 1 | a0·b0 | 0 | bits 0…116 |
| 2 | a0·b1 | acc >> 117 | – |
| 3 | a1·b0 | acc | bits 117…233 |
| 4 | a1·b1 | acc >> 117 | bits 234…464 |

**Handshake and timing.**

- Hold `start` high for one clock while `busy` is low, with `a` and `b` valid. A `start` that arrives while `busy` is high is ignored.
- `busy` stays high for K·K clocks (4 at the defaults).
- Next, `done` pulses high for one cycle, exactly K·K clock edges after the edge that took `start`.
- `c` stays valid until a later operation starts overwriting it, one digit at a time.
- `rst_n` is an asynchronous, active-low reset.
- An assertion checks that the padding bits above the product are zero.

`D` and `LEVELS` can be set independently. For example, N = 16 with D = 4
gives 16 clocks per product.

## The small multipliers

**`ofka_mul4`** is the 4-bit overlap-free multiplier with all its parts
written out. Its internal names follow the published 4-bit simulation:

- `a1`, `b1`: the even halves, {a2, a0}.
- `a2`, `b2`: the odd halves, {a3, a1}.
- `d1`, `d2`: their XOR sums.
- `y = a1·b1`, `z = a2·b2`, `d3 = d1·d2`: products from three 2-bit schoolbook sub-multipliers.
- `mid = d3 + y + z`: the odd-position term.

A reference point: a = 11, b = 8 gives c = 88, with a1 = 1, a2 = 3 and z = 6.

**`mul8_4x4`** is an 8 × 8 **integer** multiplier. It builds the product from
four 4 × 4 products of the nibbles:

- `ac = ah·bh`, `bc = al·bh`, `ad = ah·bl`, `bd = al·bl`
- `c = (ac << 8) + ((ad + bc) << 4) + bd`

The reference point is a = 34, b = 127, which gives c = 4318. That is the
integer product; the carry-less product would be 3870. This block therefore
adds with carries, unlike everything else in this design. Its 4 × 4
sub-multipliers (`mul4_int`) are exact. It uses four sub-products, not the
three of a Karatsuba step.

## Files and hierarchy

```
ofka_top                  four independent units, each with its own ports
├── ofka_mul  (u_obs)     N-bit hybrid multiplier
│   └── clmul_school      3^LEVELS leaf multipliers
├── obs_digit_serial (u_ds)
│   └── ofka_mul          D-bit, LEVELS-1 levels
├── ofka_mul4 (u_m4)
│   └── clmul_school ×3   2-bit
└── mul8_4x4  (u_m8)
    └── mul4_int ×4
ofka_pkg                  default sizes and the width helpers
```

Top-level parameters:

- `N = 233`: the operand width.
- `LEVELS = 4`: overlap-free levels in the combinational multiplier.

The digit-serial unit uses `LEVELS − 1` levels, so its leaves are also 15
bits. Top-level ports have the prefixes `obs_` (combinational multiplier),
`ds_` (digit-serial), `m4_` and `m8_`.

## How far it is checked

Each module has a self-checking testbench in `tb/`. The GF(2) results are
compared with an independent shift-and-XOR model (`tb_ref_pkg`).

- `clmul_school_tb`: exhaustive at 4 bits, plus corner and random operands at 15 bits.
- `ofka_mul_tb`: the 233-bit default, plus instances from 4 to 163 bits at 0 to 4 levels, covering even and odd widths.
- `ofka_mul4_tb`: exhaustive, plus the published points and their internal values.
- `mul8_4x4_tb`: all 65536 operand pairs, plus the published point and its intermediates.
- `obs_digit_serial_tb`: K = 2, 3 and 4. It checks the product, the K·K latency, `busy`/`done`, and that a start while busy is ignored.
- `ofka_top_tb`: the whole design at default parameters. It cross-checks the two 233-bit multipliers against each other and the model. It also counts how often each mechanism happened: accumulation within a column, the shifted feedback, digit hand-off, ignored starts, integer carries in the 8-bit unit, and a non-zero odd-position term.
- `ofka_fields_tb`: multiplies at the other evaluated field sizes (93, 163, 283, 409 and 571 bits). It also runs 233 bits with the schoolbook takeover moved to one, two and three levels.

Nothing here is timed, mapped or measured on an FPGA. The gate-count and
delay estimates above are analytical. The LUT and delay behaviour described
for the algorithm was not reproduced.

## Simulating

The testbenches need no data files. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ofka_pkg.sv tb/tb_ref_pkg.sv tb/ofka_top_tb.sv --top-module ofka_top_tb
./obj_dir/Vofka_top_tb
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`. To try
another field size, override `N` on `ofka_mul` or `ofka_top`. The widest
leaf is ceil(N / 2^LEVELS) bits, so choose `LEVELS` to keep it in a sensible
range (about 10 to 40 bits).

## Departures and open points

- **No modular reduction.** Add a reduction stage for your field polynomial to get a complete GF(2^m) multiplier.
- **Odd-width handling** (ceil/floor halves, zero-extended G2) and **the `LEVELS` knob** are this design's reading of the 233 → 15-bit example.
- **Digit-serial unit.** Only its block structure is taken from the source: multiplier, adder, register, overlap circuit, shift-by-d feedback, half-width inputs. The column order, control FSM, handshake and reset are this design's choices.
- **The 8-bit unit is an integer multiplier.** It follows the published 8-bit simulation values rather than the finite-field framing around it. The "approximate" 4 × 4 multipliers mentioned alongside it are not described anywhere, so exact ones are used.
