# Approximate single precision floating-point multiplier with a Vedic mantissa multiplier

Most of the area and power of a floating-point multiplier goes into the
24 x 24-bit mantissa product; sign and exponent cost a few dozen gates. This
design saves on the mantissa product in two ways. It organises the product by
the Urdhva-Tiryagbhyam ("vertically and crosswise") sutra of Vedic
arithmetic, which forms all partial products at once and sums them by column.
It also leaves out the one sub-product that hardly affects the kept bits of
the result. What you get is an IEEE 754 binary32 multiplier that returns the
exact product's truncated result or one or two units in the last place (ulp)
below it. In a generic gate mapping it uses about a quarter fewer gates than
the same unit computing exactly.

The unit is purely combinational: `a` and `b` in, `y` out, 32 bits each and
no other pins.

## Datapath

```
 a[31] ─┐
 b[31] ─┴─ XOR ───────────────────────────────── sign ─┐
 a[30:23], b[30:23] ── exp_adder ── ea+eb-127 (10 bit) ┤
 1.a[22:0], 1.b[22:0] ── approx_mant_mul ── 48-bit ────┤
 exponent fields == 0 ── zero_in ──────────────────────┤
                                                       └─ fp_normalizer ── y
```

| module | role |
|---|---|
| `approx_fp_vedic_mul` | top: sign XOR, zero detection, wiring |
| `exp_adder` | `ea + eb - 127` as a 10-bit two's-complement number, so that overflow and underflow stay visible |
| `approx_mant_mul` | approximate 24 x 24 mantissa product: one vertically-and-crosswise level on 12-bit halves, low x low product left out |
| `vedic_mul` | exact W x W Vedic multiplier, used for the three 12 x 12 products that are kept |
| `vedic2x2` | 2 x 2-bit UT cell: four ANDs and two half adders |
| `fp_normalizer` | normalises the product, truncates, handles exponent range, packs the word |
| `fpmul_pkg` | binary32 field widths, bias and the `fp32_t` struct |

## The Vedic multiplier (`vedic_mul`)

The sutra computes a product column by column. Result column *k* is the sum of
all digit products `a[i]*b[j]` with `i + j = k`: the "vertical" one in the
middle and the "crosswise" pairs around it. Add the carry from column *k-1*,
keep the low digit, and pass the rest on as the carry.

`vedic_mul` applies this to base-4 digits, which are 2-bit groups:

* The operands are zero-padded to D = ceil(W/2) digits.
* A `vedic2x2` cell is placed for each of the D x D digit pairs. All partial
  products therefore exist at the same time, with no shifting and no
  sequencing.
* A loop over the 2D-1 columns adds each column's 4-bit products and the
  incoming carry. It keeps two result bits and passes the carry on. The sums
  are written as `+`, so synthesis picks the adder structure.

A 12 x 12 instance has 6 digits, so 36 cells and 11 columns. The column sum
variable is 16 bits wide, enough for a column sum of up to 12 D, i.e. for D
up to several thousand.

## The approximation (`approx_mant_mul`)

One level of the same sutra is applied to the 24-bit mantissas, split into
12-bit halves `a = aH:aL`, `b = bH:bL`:

```
exact   p = aH*bH << 24  +  (aH*bL + aL*bH) << 12  +  aL*bL
approx  p = aH*bH << 24  +  (aH*bL + aL*bH) << 12
```

The three kept products come from three 12 x 12 `vedic_mul` instances. The
fourth instance, and the adder bits that would absorb it, are not built.

Why this costs so little accuracy:

* Both mantissas are at least 2^23, so the product is at least 2^46.
* The normaliser keeps 24 bits below the leading one. The last kept bit
  weighs 2^23 or 2^24.
* The missing term `aL*bL` is below 2^24. After truncation the approximate
  result therefore equals the exact one or is one or two ulp smaller. It is
  never larger.
* The relative error of the mantissa product is below 2^-22. It is smallest
  when the mantissas are large, i.e. close to 2.0.

The error always points toward zero, in the same direction as truncation. In
the end-to-end testbench about 28% of the random operand pairs give a result
below the exact truncated one.

Parameter `APPROX` selects the behaviour:

* `APPROX = 1` (default) is the approximate unit.
* `APPROX = 0` builds the fourth product and gives the exact unit.

Flattened and mapped to generic two-input gates with yosys, the top has about
3000 gates with `APPROX = 1` and about 3980 with `APPROX = 0`. That is a
reduction of roughly 25%. These are technology-independent counts, not
FPGA LUT or timing figures.

## Normalisation, rounding and special values (`fp_normalizer`)

The product of two mantissas of the form 1.f lies in [1, 4):

* If bit 47 is set, the product is shifted right by one and the exponent is
  incremented.
* Otherwise, bit 46 is the leading one.
* The 23 bits below the leading one become the fraction.
* Everything further down is discarded. That is round-toward-zero, with no
  rounding adder.

The approximate product is still at least 2^46, so one of those two bits is
always set.

Exponent range and special operands:

| condition | result |
|---|---|
| operand exponent field 0 (zero or subnormal) | signed zero |
| final exponent <= 0 | signed zero (underflow, no subnormal results) |
| final exponent >= 255 | signed infinity (overflow) |
| operand infinity or NaN | no separate path: its exponent of 255 drives the result to overflow (infinity), except that infinity x 0 gives 0 |

The normaliser also drives `shifted`, `overflow` and `underflow` flags. The top
does not bring them out, which keeps the interface at 96 pins. The testbench
reads them hierarchically.

## Interface and timing

```systemverilog
approx_fp_vedic_mul #(.APPROX(1'b1)) u_mul (
  .a (a),   // fpmul_pkg::fp32_t (or logic [31:0]): IEEE 754 binary32
  .b (b),
  .y (y)    // a * b, fraction truncated, low sub-product omitted
);
```

There is no clock, reset, handshake or state. `y` is valid one propagation
delay after `a` and `b` settle. To pipeline it, put registers around it. A
cut between `approx_mant_mul` and `fp_normalizer` is the natural
two-stage split.

## Where this RTL departs from or goes beyond a plain description of the method

These points are design choices made here. The published description of the
method leaves them open:

* **Which sub-product is dropped.** The method approximates only the mantissa
  product and uses a Vedic multiplier for it, to save gates and adders. The
  exact form of the approximation is this design's own, as described above.
* **Vedic multiplier organisation.** Here it is column-wise on 2-bit digits,
  with 2 x 2 UT cells, under one top level on 12-bit halves. A tree of
  recursive 2 x 2 → 4 x 4 → … blocks is the other common form. It computes
  the same product.
* **Rounding.** Truncation.
* **Special values.** Flush-to-zero and saturation to infinity, with no
  NaN handling.
* **Combinational interface.** The unit has 96 pins: 2 x 32 in and 32 out.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_vedic_mul` | 24-bit instance against `*` (corners plus 20 000 random pairs); 7-bit instance exhaustively, which covers odd-width padding |
| `tb_approx_mant_mul` | approximate output equals `a*b - aL*bL`, exact instance equals `a*b`, error below 2^24 and never positive |
| `tb_exp_adder` | all 65 536 exponent pairs |
| `tb_fp_normalizer` | random products, exponents from -127 to 383, zero flag; each path (shift, no shift, zero, underflow, overflow, normal) must occur |
| `tb_approx_fp_vedic_mul` | the top at default parameters, end to end (see below) |
| `tb_exact_fp_vedic_mul` | the top with `APPROX = 0` against the exact truncated product |

`tb_approx_fp_vedic_mul` checks the top in these steps:

* First, hand-worked products: 1.5 x 2 = 3, -2.5 x 4 = -10, ±0 x π,
  2^127 x 2 = infinity, 2^-126 x 0.5 = 0, infinity x 2 = infinity.
* Then 80 000 random operand pairs, over the full exponent range and over a
  range that keeps the results normal.
* The references come from `tb/fp_ref_pkg.sv`. They are computed in double
  precision, where a 24 x 24-bit mantissa product is exact, and truncated
  back to single precision.
* The unit must equal the approximate reference bit for bit. It must lie
  within 0 to 2 ulp below the exact reference.
* The testbench counts how often each mechanism occurs: normalisation shift
  or none, zero operand, underflow, overflow, negative result, and a result
  that differs from the exact one. Any mechanism that never occurs counts as
  a failure.

## Simulating

With Verilator 5, from the directory above `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -y rtl -y tb \
  rtl/fpmul_pkg.sv tb/fp_ref_pkg.sv tb/tb_approx_fp_vedic_mul.sv \
  --top-module tb_approx_fp_vedic_mul -o sim
./obj_dir/sim
```

`-y` lets Verilator find each module by its file name. For a block
testbench, swap in its file and top module. `fp_ref_pkg.sv` is needed only by
the two top-level testbenches. Each run takes under a second.

To change the format:

* The widths and the bias live in `fpmul_pkg`.
* `exp_adder`, `fp_normalizer`, `approx_mant_mul` and `vedic_mul` are
  parameterised on their widths.
* The top takes its widths from the package, so a different format needs only
  the package edited. The testbenches, however, are written for binary32.
