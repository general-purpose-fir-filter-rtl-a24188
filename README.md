# A 53-tap FIR filter computed in five 8-bit modulo-257 channels

This is synthesizable SystemVerilog for an FIR filter whose multiply-accumulate
array never carries a signal wider than 9 bits, yet delivers the exact 25-bit
result of a 53-tap filter on 10-bit samples and coefficients. The array does
no binary multiplication. Every product is formed by adding two 8-bit
logarithms modulo 256 and looking the sum up in a 128-word ROM.

It follows a published architecture: the modulus-replication residue number
system with the single modulus 257, together with a redundant input
mapping. That mapping keeps the modular arithmetic from wrapping for most
real signals. Where the source left details open, this design made its own
choices. They are listed in the last section.

The number system comes in four steps:

1. **Samples become polynomials.** A sample `s` is written in powers of
   `X = 8`, as `a3·X³ + a2·X² + a1·X + a0`. Each digit `a0..a2` lies in −4..4
   and `a3` is −1, 0 or +1.
2. **Polynomials become residues.** The degree-2 part `A(X)` is evaluated at
   five points of Z₂₅₇. That gives five independent channels of the ring
   Z₂₅₇ × Z₂₅₇ × Z₂₅₇ × Z₂₅₇ × Z₂₅₇.
3. **Each channel filters on its own.** Channel `c` computes
   `Σₖ A_{n−k}(pₖ)·Bₖ(pₖ) mod 257`. The terms that involve `a3` or `b3`
   skip the modular ring and go to a small binary adder instead.
4. **Back to binary.** The five channel sums are interpolated back into the
   five coefficients of the product polynomial. The binary terms are added
   in, and the whole polynomial is evaluated at `X = 8` by a carry-save array.

## Redundant digits (`input_mapper`, `map_rom`)

The plain split of a 9-bit magnitude into three 3-bit digits gives digits up
to 7. A product coefficient then collects up to three products of two digits
per tap, each up to 49, and a sum over taps soon leaves the range −128..128
that Z₂₅₇ can represent with a sign. The mapper therefore rewrites the
digits, least significant first, much like a canonical signed-digit
recoding:

```
t_i  = m_i + carry_{i-1}            (m_i = digit of |s|, 0..7; t_i = 0..8)
a'_i = t_i        if t_i < 4
a'_i = t_i - 8    if t_i >= 4,  carry_i = 1
a'_3 = carry_2
```

Every digit then takes the sign of `s`. The replacement digit is exactly
`t_i mod 8` read as a 3-bit two's complement number. `map_rom` is the
16 × 3 table of that function, computed at elaboration. The carry is
`t_i[3] | t_i[2]`, because `t = 8` gives the digit 0 but still a carry.

The cost is one extra digit, `a'3`, which can only be −1, 0 or +1. The
product of two mapped operands splits as

```
(a3·X³ + A)(b3·X³ + B) = a3·b3·X⁶ + X³·(a3·B + b3·A) + A·B
```

Only `A·B`, a product of two degree-2 polynomials, goes through the modular
channels. The other terms are sign changes of digits and are summed in plain
binary by `poly_adder`.

In `tb_fir_workload` (a 53-tap low-pass filter driven by two tones at full
scale), 22 of 600 outputs wrap with the redundant digits. The plain split
would have wrapped 425 of them.

## The modular channels (`forward_map`, `index_mapper`, `fermat_alu`, `arith_path`)

**Forward map.** `A(p)` is computed for `p ∈ {0, 1, −1, 2, −2}` (mod 257).
This is a 5 × 3 Vandermonde matrix times the digit vector. Five points are
needed because `A·B` has degree 4.

**Index form.** 257 is prime and 3 generates its multiplicative group, so
every non-zero residue is `3^i` for one 8-bit `i`. `index_mapper` turns a
residue into `{nan, idx}`, with `nan` set for zero. The table is built at
elaboration from the definition.

**Fermat ALU.** Each cell has three register stages:

| stage | logic | output |
|---|---|---|
| 1 | `idx_a + idx_b mod 256` (8-bit adder, carry dropped); `nan_a OR nan_b` | index sum, zero flag |
| 2 | `d1_rom`: index → `3^idx − 1`; a zero product is replaced by `9'h100` | 9-bit diminished-1 product |
| 3 | diminished-1 accumulate with the neighbour's partial sum | `{p, carry}` to the next cell |

*Half ROM.* Because `3^(i+128) ≡ −3^i`, and the diminished-1 code of `−v` is
the bit inverse of the code of `v`, only 128 words are stored. Address bit 7
selects the inverted word.

*Deferred end-around carry.* Diminished-1 addition mod 257 needs the
inverted carry-out added back in, which would be a second carry
propagation. Instead, each cell sends its raw carry-out to the next cell,
which feeds its inverse in as its own carry-in. A partial sum is therefore
the pair `{p, carry}`, with

```
value = (p + !carry + 1) mod 257         p in 0..256; p = 256 only with carry = 1
zero  = {9'h100, 1}                      (the chain starts from this)
```

The cell computes `T = p_in + prod + !carry_in`, which is at most 512 and
needs 10 bits. It then sends on `p_out = {T[9], T[7:0]}` and
`carry_out = T[9] | T[8]`. Adding `9'h100`, the zero product, leaves the
value unchanged. A zero operand therefore needs no bypass path.

**Array.** `arith_path` has five identical rows of `N_TAPS` cells, one per
channel. It uses the transposed FIR form: the current sample's index goes
to every cell of its row, cell `k` holds the index of `h[k]`, and partial
sums move one cell towards cell 0 per clock. After a sample's products have
been added, cell 0 holds `Σₖ h[k]·x[n−k]` for that channel, still in
deferred-carry form.

## Back to binary (`inverse_map`, `poly_adder`, `csa_reconstruct`)

`inverse_map` first settles the pending carry. It then multiplies the five
residues by the inverse Vandermonde matrix, which is computed at elaboration
by Gauss-Jordan elimination mod 257. Each coefficient is centred into
−128..128. This step is exact only if every true coefficient of
`Σ A·B` lies in that range. Otherwise the result wraps. Nothing flags the
wrap, and the filter output is then wrong.

`poly_adder` is a transposed chain like the ALU rows, with 16-bit binary
sums: three for `X³..X⁵` and one for `X⁶`. It reads the coefficients in the
same cycle as the ALUs' first stage, and its result is delayed two cycles to
match.

`csa_reconstruct` places nine rows at these weights:

| row | weight |
|---|---|
| `c0..c4` | 2⁰, 2³, 2⁶, 2⁹, 2¹² |
| `corr0..2` | 2⁹, 2¹², 2¹⁵ |
| `z6` | 2¹⁸ |

It folds them with 3:2 compressors and ends with one carry-propagate add,
modulo 2²⁵. The largest true output, `511·511·53 = 13 839 413`, fits in
25 signed bits.

## Interface and timing (`fir_top`)

| port | width | meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | clock; asynchronous active-low reset (clears every register, all taps to 0) |
| `x_valid`, `x` | 1, 10 | one sample per clock, −511..511 (−512 is treated as −511); `x_valid = 0` inserts a zero |
| `coef_we`, `coef_addr`, `coef` | 1, ⌈log₂N⌉, 10 | write `h[coef_addr]` |
| `y_valid`, `y` | 1, 25 | `y[n] = Σₖ h[k]·x[n−k]`, `LATENCY = 7` cycles after `x[n]` |

The pipeline stages are:

| cycle | work |
|---|---|
| 1 | mapper |
| 2 | forward map and index form |
| 3–5 | ALU stages 1–3 |
| 6 | inverse map |
| 7 | CSA output register |

A coefficient written in cycle `w` applies to every sample presented in
cycle `w−1` or later. During a reload, outputs mix old and new taps, as any
transposed FIR does. `tb_fir_top` models this exactly.

Parameters: `N_TAPS` (default 53). The modulus, `X`, the digit count and the
channel count are package constants in `fir_pkg`. They are not free
parameters: the tables and the inverse matrix depend on them.

## Files

| file | contents |
|---|---|
| `rtl/fir_pkg.sv` | constants, `epoly_t` / `index_t` / `d1acc_t`, table and matrix functions |
| `rtl/fir_top.sv` | top level, coefficient store, pipeline |
| `rtl/input_mapper.sv`, `rtl/map_rom.sv` | redundant digit mapping |
| `rtl/forward_map.sv`, `rtl/index_mapper.sv` | evaluation map, residue → index |
| `rtl/fermat_alu.sv`, `rtl/d1_rom.sv`, `rtl/emodl_adder.sv` | multiply-accumulate cell, half ROM, adder |
| `rtl/arith_path.sv` | 5 × N cell array |
| `rtl/poly_adder.sv`, `rtl/inverse_map.sv`, `rtl/csa_reconstruct.sv` | binary side terms, interpolation, output adder |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_fir_workload.sv` | low-pass workload, wrap statistics |
| `tb/fir_ref_pkg.sv` | reference arithmetic for the testbenches |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops on its own.
For example, to run the full-size end-to-end test:

```
verilator --binary --timing --top-module tb_fir_top -Irtl -Itb -y rtl -y tb \
          rtl/fir_pkg.sv tb/fir_ref_pkg.sv tb/tb_fir_top.sv
./obj_dir/Vtb_fir_top
```

Replace `tb_fir_top` with any other `tb_*` module. All testbenches finish in
well under a second.

`tb_fir_top` runs the top at its default size. It compares every output with
a reference that wraps coefficients the same way as the hardware, and, when
nothing wrapped, also with the exact convolution. It also checks the 7-cycle
latency. It counts zero operands, set top digits, modular wraps, invalid
samples and coefficient writes under traffic, and fails if any of these
never occurred. Each block testbench compares its block with values it
computes itself, mostly through `fir_ref_pkg`, without the RTL's package
functions.

## How far to trust it, and where it departs from the source

These points are exhaustively checked:

- every sample through `input_mapper`;
- every residue through `index_mapper`;
- every index through `d1_rom`.

The ALU, the array, `poly_adder` and `inverse_map` are checked on thousands
of random cases, including zero operands and every carry encoding of a
partial sum.

The following are choices made here. The source leaves them open:

- **Generator and evaluation points.** The generator is 3, and the
  evaluation points are {0, 1, −1, 2, −2}. Any five distinct points would
  work.
- **Digit value 4.** It becomes −4 with a carry, which keeps each ROM word to
  3 bits.
- **Sign and magnitude.** Samples are mapped as a sign and a magnitude.
- **Pipeline.** The cell uses a three-stage pipeline, with the transposed
  array form.
- **Interfaces.** The coefficient write port and the `x_valid` behaviour are
  this design's own.
- **Reset.** Reset is asynchronous and active low.
- **Widths.** The 16-bit width of the binary side sums is a choice made here.

Circuit-level aspects of the original are not represented:

- the dynamic (domino) adders;
- the dynamic ROMs with their sense amplifiers;
- the switching-tree mapper ROMs;
- the single-phase-clock latches.

The adders here are ripple chains of full-adder cells, the ROMs are constant
arrays, and every stage ends in an ordinary flip-flop. Timing, area and power
therefore say nothing about the original 0.35 µm implementation.

The original forms the evaluation map with diminished-1 add/subtract units.
Here it is a modular sum of constant multiples.

Overflow is not detected. An output whose product coefficients left
−128..128 is wrong (see the workload figures above).
