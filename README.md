# Squaremax engine

Softmax needs an exponential per element and a division by their sum. Both
are costly in hardware. Squaremax keeps the shape of Softmax and drops both:

    Squaremax(x_i) = ReLU(x_i)^2 / sum_j ReLU(x_j)^2

The outputs are non-negative and sum to one. The weighting grows with the
input, so larger scores still get more weight. The function is meant as a
drop-in replacement for Softmax layers in networks that are trained or
fine-tuned with it, such as the attention layers of vision Transformers.

This repository holds synthesizable SystemVerilog for an 8-lane Squaremax
engine. It takes 16-bit signed integers (Q16.0) and returns 16-bit unsigned
Q1.15 fractions. It has no exponential unit, no divider and no lookup table.
Its only arithmetic units are one 15-bit multiplier per lane, one adder tree
with a 40-bit accumulator, two kinds of leading-one detectors, an 8-entry
constant decoder and shifters.

## How the division disappears

The denominator D (a sum of squares) is written as `D = m x 2^n` with
`1 <= m < 2`. Only three bits of m are kept, `m ~ 1.abc`. Then:

    x / D  ~  x * (1 / 1.abc) * 2^-n

`1/1.abc` has only eight possible values, so a decoder gives it as a
constant `S_abc`. The `2^-n` is a right shift. Because `1.abc <= m`, the
result can only be too large, by at most 1/8 (12.5 %) when abc is truncated
from a long mantissa. The network is expected to be trained or fine-tuned with
exactly this arithmetic, so hardware and software give the same results.

## Number formats and the two shift amounts

This is the part that takes the most care. All widths are fixed in `sqm_pkg`.

| quantity | width | format |
|---|---|---|
| x | 16 | Q16.0, signed |
| ReLU(x) | 15 | unsigned integer |
| square ReLU(x)^2 | 30 | unsigned integer |
| RSQR | 15 | square >> dynamic_shift |
| dynamic_shift | 4 | 0..15 |
| D (accumulator) | 40 | unsigned integer, saturating |
| abc | 3 | mantissa bits of D after its leading one |
| static_shift | 6 | n, position of D's leading one |
| S_abc | 15 | unsigned Q0.15, round(2^15 / (1 + abc/8)), abc=0 -> 32767 |
| Shift(i) | 6 | static_shift - dynamic_shift(i) |
| Squaremax | 16 | unsigned Q1.15 |

**Dynamic scaling (per element).** The multiplier takes 15-bit operands, but
a square has 30 bits. The lane leading-one detector finds the top set bit k
of the square. If k > 14, the square is shifted right by
`dynamic_shift = k - 14`, which puts its leading one at bit 14. Otherwise it
is not shifted. The shifted value is RSQR and the low bits are truncated. An
element therefore keeps 15 significant bits whatever its size.

**Static shift (per vector).** The leading-one detector on D gives n and the
three bits below the leading one.

**Step 2 arithmetic.** With S_abc in Q0.15:

    y = (RSQR * S_abc) >> (n - dynamic_shift)

This gives `2^15 * square / D` up to the 1.abc approximation and truncation.
The shift is never negative. If dynamic_shift > 0, the square is at least
2^15 and D is at least the square, so n >= dynamic_shift + 14. The result
also always fits 16 bits: the product is below 2^30, and the shift is at
least 14 when RSQR is normalised. Since abc is truncated, an output may
exceed its exact value by up to 12.5 %, so a single positive element can
give up to about 1.125 in Q1.15 rather than 1.0.

The Q0.15 format of S_abc and the `static_shift = n` convention are this
design's choices. They are the pair that makes the stated subtraction
`static_shift - dynamic_shift` the exact shift amount. Because 1.0 does not
fit in Q0.15, `S_000` is 32767 rather than 32768.

## Architecture

```
             +-------------------- lane (x8) ---------------------+
 x ------->[reg]--ReLU--+--mux0--+                                 |
 S_abc --->[reg]--------|--mux1--+--> 15x15 multiplier --+--> LOD ---> RSQR, dynamic_shift (Step 1)
 RSQR_in ->[reg]--------+--mux1--+    (2 stages)         |                                 |
                          (Step selects input 0 or 1)    +--> Rsh ---> Squaremax (Step 2)  |
 static_shift, dshift_in ->[reg]--> subtractor --(delayed 2)--^                            |
             +---------------------------|-------------------------------------------------+
                                         | 8 squares (Step 1)
                              adder tree -> 40-bit accumulator -> LOD -> abc -> decoder
                                                                   \-> static_shift
                                                 coefficient registers (S_abc, static_shift)
```

- **Lane (`sqm_lane`)**. It has one multiplier, shared by the two steps.
  In Step 1, both operands are ReLU(x), so the multiplier squares. In Step 2,
  the operands are RSQR and S_abc. Sharing the multiplier is what keeps the
  lane small.
- **Two-stage multiplier (`sqm_mult2s`)**. Stage 1 registers the partial
  products `a*b[7:0]` and `a*b[14:8]`. Stage 2 adds them.
- **Accumulator (`sqm_accumulator`)**. A registered adder tree sums the 8
  squares of a beat. The 40-bit accumulator then adds that sum. The first
  beat of a vector loads the accumulator instead of adding to it.
- **Global LOD and decoder (`sqm_lod_acc`, `sqm_decoder`)**. They turn D into
  static_shift and S_abc. These are held in registers until the next vector's
  Step 1 has finished.

### Pipeline timing

| edge | Step 1 | Step 2 |
|---|---|---|
| 1 | input registers | input registers, shift amount |
| 2 | multiplier stage 1 | multiplier stage 1 |
| 3 | square ready; multiplier stage 2 | product ready; stage 2 |
| 4 | RSQR/dynamic_shift registered (`s1_valid`); adder tree | y registered (`y_valid`) |
| 5 | accumulator | |
| 6 | S_abc/static_shift registered (`coef_valid`) | |

Both steps take one beat of 8 elements per clock, with no stalls. Lane
results appear 4 cycles after their beat. The coefficients are ready 6
cycles after the last Step 1 beat. That 6 matches the latency commonly
quoted for this architecture, but the mapping of that figure onto the
pipeline is this design's interpretation.

## Using the engine (`squaremax`)

1. **Step 1.** Present the vector 8 elements per beat with `in_valid=1` and
   `step=STEP1`. Mark the first beat with `first` and the last with `last`.
   Pad a short final beat with zeros (or negative numbers), which add nothing.
   Collect `rsqr_out`/`dshift_out` on every `s1_valid` cycle. The engine
   does not store them: 19 bits per element must be kept outside, for
   example 8192 x 19 bits for the longest vector.
2. Wait for `coef_valid` (6 cycles after the last beat).
3. **Step 2.** Feed the stored RSQR/dynamic_shift back in the same order with
   `step=STEP2`. `x` is ignored. Read `y` on every `y_valid` cycle.

`coef_valid` drops when a new Step 1 starts. An assertion flags Step 2 beats
issued without valid coefficients. Another flags `first`/`last` marks on
Step 2 beats. The next vector's Step 1 may start as soon as the last Step 2
beat has been issued.

`acc_sat` rises when the sum of squares exceeds 2^40 - 1. The accumulator
then stays at 2^40 - 1, and the outputs are too small by the ratio of the
true sum to that value.

## Limits and departures

- **Vector length.** The target is vectors of up to 8192 elements. The
  40-bit accumulator, however, holds only about 1024 full-scale squares
  (8192 x (2^15-1)^2 is about 2^43). Longer vectors are exact only while
  their sum of squares stays below 2^40. This design saturates rather than
  wraps and reports it on `acc_sat`; the saturation is its own addition. No
  length counter is built, because nothing in the datapath depends on N.
- **Rounding.** RSQR, the abc index and the final shift all truncate. S_abc
  is rounded to nearest. These are choices of this design, and a software
  model must copy them to match bit for bit.
- **All-zero sum.** If no element is positive, then static_shift = 0,
  abc = 0 and all outputs are 0.
- **Interface.** `in_valid`, `first`, `last`, `coef_valid` and the reset
  (active-low, asynchronous, on control and output registers only) are this
  design's own. The only control in the reference architecture is the step
  select.
- **Not verified here.** The clock rate (1.67 GHz in a 40 nm process), area
  and power figures quoted for this architecture depend on the cell library
  and are not checked by anything in this repository.

## Files

| file | contents |
|---|---|
| `rtl/sqm_pkg.sv` | widths, `step_e` |
| `rtl/squaremax.sv` | top: 8 lanes, accumulator, LOD, decoder, coefficient registers |
| `rtl/sqm_lane.sv` | one lane |
| `rtl/sqm_relu.sv` | ReLU, 16 -> 15 bits |
| `rtl/sqm_mult2s.sv` | 15x15 two-stage multiplier |
| `rtl/sqm_lod_lane.sv` | dynamic scaling of a square |
| `rtl/sqm_subtractor.sv` | Shift(i) |
| `rtl/sqm_rsh.sv` | final shifter |
| `rtl/sqm_accumulator.sv` | adder tree and 40-bit accumulator |
| `rtl/sqm_lod_acc.sv` | n and abc of the sum |
| `rtl/sqm_decoder.sv` | S_abc constants |
| `tb/tb_sqm_ref_pkg.sv` | bit-exact reference model used by the testbenches |
| `tb/tb_<module>.sv` | self-checking testbench per module |

`squaremax` has one parameter, `LANES` (default 8). Everything else is fixed
by the number formats.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a watchdog. Example for the end-to-end test, run from the
repository root:

```
verilator --binary --timing --assert --top-module tb_squaremax -y rtl -y tb \
    rtl/sqm_pkg.sv tb/tb_sqm_ref_pkg.sv tb/tb_squaremax.sv
./obj_dir/Vtb_squaremax
```

The two packages are listed first; `-y` finds the modules by file name.
Replace `tb_squaremax` in both places to run another testbench. The full
end-to-end test takes well under a second. The unit
testbenches are exhaustive where the input space is small (ReLU, subtractor,
decoder). Elsewhere they check every leading-one position and thousands of
random values. They also check the multiplier's 2-cycle and the lane's
4-cycle latency, as well as back-to-back beats.

`tb_squaremax` runs the engine at its default size on vectors of 1, 8, 49,
197, 1000 and 8192 elements. It also runs an all-negative vector, a vector
that overflows the accumulator and 40 random ones. It checks every output
against the reference model and against the exact ratio. It checks the
timing of every beat and of the coefficients. It also checks that ReLU
clamping, dynamic scaling, multi-beat sums, every decoder entry, step
switching, Step 1 of a new vector directly after the previous Step 2,
saturation and the all-zero sum each occur at least once.
