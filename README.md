# Pipelined double-precision exp() for FPGA, twin-lane streaming

This is a fully pipelined IEEE-754 double precision `exp(x)` unit. It accepts one
argument per clock and returns the result 30 clocks later, within one unit in the
last place (ulp) of the exact value. Two such units sit side by side behind a
streaming controller. The controller reads 128-bit words (two doubles) from a source
memory and writes 128-bit result words to a destination memory, one word per clock.

The architecture follows the article "Highly Efficient Twin Module Structure of
64-bit Exponential Function Implemented on SGI RASC Platform" (Wielgosz, Jamro and
Wiatr). It targeted a Virtex-4 FPGA on an SGI RASC RC100 blade at 200 MHz. This RTL
re-creates it from that description. Where the article gives no detail (widths,
rounding, special values, the memory-side protocol), the choices are this
implementation's own, and they are marked below and in each file's header.

## The arithmetic

The unit avoids a high-degree polynomial. Instead it uses table lookups and one
first-order term, and it needs only three multipliers, each with one narrow operand.

1. **Fixed point with the sign moved to the integer part.** The double becomes
   a two's-complement number with 60 fraction bits. Bits below 2^-60 cannot change a
   double result. Negating in two's complement turns `-(i + f)` into
   `-(i+1) + (1-f)`. So the fraction that indexes the tables is never negative, and
   the tables need no sign bit.
2. **Range reduction.** `x_I = floor(x * log2 e)` and `x_F = x - x_I * ln 2`, so
   `e^x = 2^x_I * e^x_F` with `0 <= x_F < ln 2`. The power of two becomes the result's
   exponent.
3. **Splitting the fraction.** The 60-bit `x_F` is cut into
   `x_M` (bits 2^-1..2^-9), `x_D` (2^-10..2^-18), `x_L` (2^-19..2^-27) and the tail
   `x_T` (2^-28..2^-60):

       e^x_F = e^x_M * e^x_D * e^x_L * e^x_T,   e^x_T ~= 1 + x_T

   The first-order term is enough because `x_T < 2^-27`: the dropped `x_T^2/2` is
   below 2^-55, under half an ulp.
4. **Products as additions.** Each table after the first holds `e^y - 1`, which is
   small. A product `A * (1 + b)` is then computed as `A + A*b`, so one operand of
   each multiplier is short:

       M  = e^x_M + e^x_M * (e^x_D - 1)                   e^x_D - 1 < 2^-8
       L1 = (e^x_L - 1) + x_T + (e^x_L - 1) * x_T         e^x_L - 1 < 2^-18
       Y  = M + M * L1                                    Y = e^x_F, in [1, 2)

   This reading matches every connection of the original block diagram. For
   example, the MSB table value goes both into the first multiplier and, delayed, into
   the adder after it. The article does not write the formulas out.
5. **Normalisation.** `Y` is rounded to 52 fraction bits (to nearest, ties away
   from zero). The exponent is `x_I + 1023`, plus one if `Y` or its rounding
   reached 2.

All intermediate values use 64 fraction bits. The tables store 66 bits (MSB),
56 bits (MID) and 47 bits (LSB). Their contents are computed at start-up by a Taylor
series in 200-bit fixed point inside `exp_lut`, so there are no data files.

### Why `x_I` is biased down

`floor(x * log2 e)` is computed with a truncated constant. Close to an integer, the
estimate could land one too high, which would make `x_F` negative. Before the floor,
`mul_inv_ln2` subtracts 2^-56. The estimate is then never too high. At worst it is
one too low, and `x_F` then exceeds `ln 2` by less than 2^-55. That is still inside
the MSB table, whose 512 entries cover [0, 1). This safeguard is this
implementation's own.

## Reduced-width multipliers

Only the upper half of each product survives rounding, so the multipliers do not
build the low columns of the partial-product array at all. `trunc_mult` sums the
partial products `a[i] & b[j]` only for `i + j >= DROP`. The result is never above
the exact product, and it is below it by less than `DROP * 2^DROP`, which is one lost
carry per column. Guard columns sit between `DROP` and the rounding point. The
exp pipeline drops the lowest 56 of the 128 product fraction columns and keeps 8
guard bits below the 2^-64 rounding point, so each multiplier's error stays below
2^-66. The article gives the principle but not the number of guard bits; 8 is this
implementation's choice. The multiplier is pipelined by rows. The operands are
registered. Then about `BW / LATENCY` rows are added to a running sum in each
clock, and the operands travel alongside. The 6- and 4-clock multipliers of the
pipeline are these multipliers with `LATENCY` set to 6 and 4.

## Pipeline timing

The clock counts of each stage are those of the original block diagram. An argument
entering at clock 0 passes through:

| clock | stage | module |
|---|---|---|
| 1-5 | conversion to fixed point (unpack, shift, invert, +1, register) | `fp_to_fixed` |
| 6-7 | multiply by log2 e, floor; argument delayed 2 alongside | `mul_inv_ln2` |
| 8-12 | `x_F = x - x_I ln2` | `int_frac_sep` |
| 13 | three table reads; Maclaurin term `x_T` registered | `exp_lut` x3, `exp_core` |
| 14 | delay alignment | `exp_core` |
| 15-20 | `e^x_M * (e^x_D - 1)`, 6 clk (MSB value delayed 6) | `trunc_mult` |
| 21 | add and round -> `M` | `exp_core` |
| 15-18, 19, 20, 21 | `(e^x_L - 1) * x_T` 4 clk, round 1, align and add -> `L1`, delay 1 | `trunc_mult`, `exp_core` |
| 22-27 | `M * L1`, 6 clk (`M` delayed 6) | `trunc_mult` |
| 28-29 | round, add -> `Y` | `exp_core` |
| 30 | normalise and pack; `x_I` delayed 17, flags delayed 24 | `exp_normalize` |

`exp_core` has no back-pressure. `in_valid` travels down a 30-bit shift register,
which is the only state that reset clears, and comes out as `out_valid` with the
result.

## Special values and range

None of this is specified in the article; these are this implementation's choices:

| argument | result |
|---|---|
| NaN | quiet NaN `0x7FF8000000000000` |
| +inf, or x >= 1024 | +inf |
| -inf, or x <= -1024 | +0 |
| 709.79 < x < 1024 | +inf (exponent overflow) |
| result below 2^-1022 (x < about -708.4) | +0 (no subnormal results) |
| \|x\| < 2^-60, zeros, subnormals | 1.0 |

## The twin streaming wrapper

`exp_twin` is the top. It holds a `stream_ctrl` and `LANES = 2` instances of
`exp_core`. Lane `i` takes bits `64i+63 .. 64i` of each source word and writes its
result to the same bits of the destination word. The 128-bit path, the two lanes and
the 16 MB banks (a 20-bit word address) are from the platform description. The
job interface and the memory-port signals are this implementation's, standing in
for the vendor's core services:

- **Job:** with `busy` low, pulse `start` with `n_vec`, `src_base` and `dst_base`
  set. `busy` rises. After the last word is written, `done` pulses for one clock and
  `busy` falls. A `start` while busy is ignored.
- **Source port:** `mem0_re` / `mem0_addr` request one word per clock, at
  consecutive addresses. Data returns on `mem0_rdata` with `mem0_rvalid`, with any
  latency. Data returned while no job runs is ignored.
- **Destination port:** `mem1_we`, `mem1_addr` and `mem1_wdata`, one word per clock,
  at consecutive addresses.
- **Timing:** one vector (two results) per clock. A word reaches the destination
  1 + 30 + 1 clocks after its read data returns. A job of `n` vectors completes in
  `n` clocks plus a fixed overhead: the read latency and 34 clocks. The top-level
  testbench checks this count exactly.

Assertions in `stream_ctrl` check that the lanes stay in lock step and that nothing
is written outside a job. At 200 MHz, two results per clock is 2.5 ns per `exp()`.
More lanes need a wider memory path; `LANES` is a parameter.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `exp_twin`, `stream_ctrl` | `LANES` | 2 | exp() lanes per memory word |
| `exp_twin`, `stream_ctrl` | `ADDR_W` | 20 | word address width (16 MB of 16-byte words) |
| `exp_lut` | `SHIFT`, `MINUS_ONE`, `OFRAC`, `OW` | 9, 0, 64, 66 | table for slice weight 2^-SHIFT |
| `trunc_mult` | `AW`, `BW`, `DROP`, `LATENCY` | 8, 8, 0, 1 | operand widths, dropped columns, clocks |
| `exp_pkg` | `FW`, `XW`, `IW`, `RF` | 60, 72, 12, 64 | argument fraction bits, argument width, x_I width, internal fraction bits |

`exp_core` has a `LATENCY` parameter only to size its valid pipeline. The stage
latencies are fixed in the datapath, so it is not a free knob.

## Files

- `rtl/exp_pkg.sv`: widths, constants (log2 e, ln 2), the special-case flag struct
- `rtl/fp_to_fixed.sv`, `rtl/mul_inv_ln2.sv`, `rtl/int_frac_sep.sv`: argument reduction
- `rtl/exp_lut.sv`: the exponent tables
- `rtl/trunc_mult.sv`: the reduced-width multiplier
- `rtl/exp_normalize.sv`: rounding, exponent and special cases
- `rtl/exp_core.sv`: the 30-stage exp() pipeline
- `rtl/delay_line.sv`: register chains for the delay alignments
- `rtl/stream_ctrl.sv`, `rtl/exp_twin.sv`: the memory-to-memory wrapper (top: `exp_twin`)

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. The reference values are computed independently,
mostly from the simulator's own `real` arithmetic and `$exp`:

| testbench | what it checks |
|---|---|
| `tb_exp_twin` | the whole design at default parameters, with behavioural memories. Jobs of 1, 10, 100, 1000, 10,000 and 50,000 vectors (up to 100,000 exp() results), each within 1 ulp of `$exp`. Also the exact job length, one `done` per job, no stray writes. It counts negative, tiny, NaN, overflow and underflow cases and fails if any kind never occurred. |
| `tb_exp_core` | special values, boundaries, multiples of ln 2, 4000 random arguments back to back; 30-clock latency; one result per clock |
| `tb_fp_to_fixed` | exact fixed-point value and flags |
| `tb_mul_inv_ln2` | `floor(x log2 e)` |
| `tb_int_frac_sep` | `x - x_I ln 2` |
| `tb_exp_lut` | all 512 entries of each table |
| `tb_trunc_mult` | bit-level model of the truncated array, exact mode, error bound |
| `tb_exp_normalize` | rounding, exponent overflow and underflow, flags |
| `tb_stream_ctrl` | addressing, ordering, job length, ignored second start (stand-in lanes) |

In these tests, about 94% of results are bit-identical to the C library's `exp()`,
and the rest differ by one ulp. The original reports a maximum error of 1 ulp and an
RMS error of about 0.61 ulp.

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/exp_pkg.sv tb/tb_exp_twin.sv \
              --top-module tb_exp_twin -Mdir obj_twin
    ./obj_twin/Vtb_exp_twin

The full-size `tb_exp_twin` runs in about a second. Testbenches that need the
package name it through the first file; the other files are found via `-Irtl`.

## Departures and limits

- The products are organised as `A + A*b` with tables of `e^y - 1`. This is
  inferred from the block diagram's connections, not stated in the article.
- Widths, guard bits, constant precisions, rounding mode and special-value
  handling are this implementation's choices (see above). The original used a
  modified multiplier structure from an earlier paper, which is not reproduced.
  Here the array is plain and left to synthesis.
- Results that would be subnormal are flushed to zero.
- The pipelines are not tuned for a clock rate. The multipliers add about a sixth
  (or a quarter) of their rows per clock, in ripple adders left to synthesis. Some
  short stages do their work in the first register and carry it through the rest.
  No timing has been measured on any device; 200 MHz is the original's figure, not
  a property shown for this RTL.
- The platform around the design is not included: the vendor core services, the
  NUMAlink host connection and the QDR SRAM banks. The testbench models the
  memories behaviourally.
