# Multiplierless transposed-form FIR filter with coefficient reuse

This is an 18-tap (order-17) low-pass FIR filter with fixed integer
coefficients. It contains no multipliers. It is built to be small, fast and
low-power at the same time, which usually pull against each other. Three
choices make that work:

1. **Transposed form.** Every tap multiplies the *current* input sample. The
   delay registers sit between the adders. The longest combinational path is
   one constant multiplication plus one addition, whatever the filter length.
2. **Coefficient reuse.** Many taps of the filter have the same coefficient
   value, and in transposed form they all multiply the same sample, so one
   product can serve all of them. The 18 default coefficients take only five
   distinct non-zero values, so only five products are built.
3. **Shift-and-add products with shared partial products.** The five
   products are made from wired shifts and a few adders. Small odd multiples
   of the sample (3x, 5x, 7x) are built once and shared by all constants
   (multiple constant multiplication, MCM).

The output is exact. Nothing is rounded, truncated or saturated: every
register is wide enough for the largest value it can hold.

## Data path

```
           +-----------+     5 shared products       18 tap products
x_in ->[x_r]-> mcm_block |--- 16x 25x 34x 149x 614x --> (fan-out by value)
           +-----------+                                  |
                                                          v
  y_out <-[reg]<- (+) <- z1 <-[tap1]<- (+) <- z2 <- ... <-[tap17]<- 0
                   ^                   ^                    ^
                h0*x (=0)            h1*x                h17*x (=0)
```

`fir_opt_top` registers the sample (`x_r`). `mcm_block` forms the distinct
products combinationally. Tap *k* (1 ≤ k ≤ 17) is a `tf_tap`: it adds its
coefficient's product to the partial sum of tap *k+1* and stores the result.
The output register takes tap 0's product plus `z1`.

## How the constant products are built (`mcm_block`)

Each constant is written in **octal digits**. Digit *d* at position *k*
contributes `(d·x) << 3k`, and `d·x` is always one of four shared
*fundamentals*, or a shifted copy of one:

| digit | term      | digit | term       |
|-------|-----------|-------|------------|
| 1     | x         | 5     | 5x = x + 4x |
| 2     | x << 1    | 6     | 3x << 1    |
| 3     | 3x = x + 2x | 7   | 7x = 8x − x |
| 4     | x << 2    |       |            |

A constant with *m* non-zero octal digits costs *m − 1* adders, plus the
shared fundamentals, which are built once and only if some constant needs
them. Take the classic pair 29 and 43:

* 29 = octal 35, so 29x = (3x << 3) + 5x.
* 43 = octal 53, so 43x = (5x << 3) + 3x.

With 3x and 5x shared, both products need four adders in all. Building each
from its binary digits, as a plain shift-and-add multiplier would
(29 = 11101₂, 43 = 101011₂), needs six. The block's default parameters are
this pair, and yosys synthesises it to four adder cells.

Default filter set (the adder count assumes 3x and 5x are shared):

| constant | octal | adders | binary shift-add adders |
|----------|-------|--------|-------------------------|
| 16       | 20    | 0      | 0                       |
| 25       | 31    | 1      | 2                       |
| 34       | 42    | 1      | 1                       |
| 149      | 225   | 2      | 3                       |
| 614      | 1146  | 3      | 4                       |
| shared 3x, 5x | | 2    | –                       |
| **total** |      | **9**  | **10**                  |

Without coefficient reuse the 18 taps would need 24 adders for their
products (the sum over the taps of the 1-bits of their coefficients, minus
one per tap).

The octal rule is a simple, general way of sharing partial products. It is
not an optimal MCM search. Where adder count matters most, a better set of
fundamentals could be found offline. The block's interface would not change.

Everything that depends on the constants is decided while the design
elaborates, by constant functions in `fir_pkg`. These functions find the
distinct values, split them into digits, and check whether 3x, 5x or 7x is
needed. Change the coefficient vector and the hardware follows.

## Growing register widths (`tf_tap`)

Stage *k* holds `Σ_{i≥k} h_i · x[n−i+k]`. With 8-bit signed samples, its
exact range needs `DATA_W + ⌈log2 Σ_{i≥k} h_i⌉` bits. The filter gives each
`tf_tap` its own width. Along the chain the widths grow towards the output:

| stage  | 17 | 16 | 15 | 12–14 | 11 | 10 | 9  | 1–8 | output |
|--------|----|----|----|-------|----|----|----|-----|--------|
| bits   | 8  | 12 | 14 | 15    | 16 | 17 | 18 | 19  | 19     |

Stage 17 has a zero coefficient and an all-zero input, so it only ever
holds zero. Each `tf_tap` asserts, in simulation, that its sum fits its register.
Near the end of the chain a product is wider than the stage. It is cut to
the stage width there, which loses nothing because of this sizing.

## Coefficients

The default set is an 18-tap equiripple low-pass: passband edge 0.365 and
stopband edge 0.475 of the sampling rate, stopband weight 2. It is scaled by
1000, rounded, and then made positive by taking absolute values:

```
signed : 0 16 -25 34 -34 16 34 -149 614 614 -149 34 16 -34 34 -25 16 0
used   : 0 16  25 34  34 16 34  149 614 614  149 34 16  34 34  25 16 0
```

The design method, order, ×1000 scaling and absolute value are those of the
reference filter. Its original band edges are unknown. These edges were
chosen because the result has the property the reference filter was built
around: five distinct non-zero values, with 34 occurring three times and 16
twice in each half.

**Be aware:** taking absolute values changes the frequency response of a
filter with negative taps. The hardware implements the positive set
faithfully. If you want the true low-pass response, this needs extending:
either carry signs per tap (subtract instead of add in `tf_tap`) or use a set
without negative taps.

To use another filter, pass a different `COEF` vector (`fir_pkg::cvec_t`,
tap *i* in element *i*) and `N_TAPS` (at most `MAX_C` = 32) to
`fir_opt_top`. Coefficients are unsigned, below 2^16. Widths, the
distinct-value table and the MCM structure are derived from the vector.

## Interface and timing (`fir_opt_top`)

| port        | dir | width | meaning                                      |
|-------------|-----|-------|----------------------------------------------|
| `clk`       | in  | 1     | clock, rising edge                           |
| `rst_n`     | in  | 1     | synchronous reset, active low; clears all state |
| `in_valid`  | in  | 1     | `x_in` carries a sample this cycle           |
| `x_in`      | in  | 8     | signed two's-complement sample               |
| `out_valid` | out | 1     | `y_out` carries a new output                 |
| `y_out`     | out | 19    | signed exact output, `Σ h_i·x[n−i]`          |

* The filter takes at most one sample per clock.
* The output for a sample appears two cycles after it is presented: it is
  registered at the first edge, and the result at the second.
* While `in_valid` is low the filter holds its whole state, so gaps between
  samples do not disturb the result.
* Parameters: `DATA_W` (sample width, default 8), `N_TAPS` (18), `COEF`.
  The output width `Y_W` is derived from them.

The handshake, the input and output registers and the reset are this
design's own choices. The structure is the part taken from the reference
design: transposed form, one shared MCM block, products reused by
coefficient value, and growing register widths. So is the coefficient recipe.

## Where this departs from, or adds to, the reference design

* The reference describes its optimized filter both as "transposed" and as
  an "optimized direct form". This implementation is transposed. Reusing one
  product for several taps only works when all taps multiply the same sample,
  and the reference's register area for the optimized filter matches its
  transposed filter, not its direct-form one.
* The reference gives partial-product sharing only for the example pair 29
  and 43. Octal digits over {x, 3x, 5x, 7x} are this design's general rule.
  For 29 and 43 the rule reproduces that example exactly.
* The coefficient values, sample width, output width, handshake and reset
  are not given by the reference. They were chosen as described above.
* Adders are plain `+`, left to synthesis; no special fast adder
  architecture is used.

## Files

| file                    | contents                                                |
|-------------------------|---------------------------------------------------------|
| `rtl/fir_pkg.sv`        | types, default coefficients, elaboration-time helpers   |
| `rtl/mcm_block.sv`      | shift-and-add multiple-constant multiplier              |
| `rtl/tf_tap.sv`         | one transposed-form stage (adder + register)            |
| `rtl/fir_opt_top.sv`    | the filter                                              |
| `tb/tb_mcm_block.sv`    | every 8-bit input against integer multiplication, for {29, 43}, the filter set and a set that uses 7x |
| `tb/tb_tf_tap.sv`       | random and extreme operands, random enable, reset       |
| `tb/tb_fir_opt_top.sv`  | whole filter at default size against a reference model |
| `tb/tb_fir_opt_top_alt.sv` | the same test on a filter built for another 18-tap set (seven distinct values, uses 3x, 5x and 7x) |

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. The filter testbench drives:

* an impulse, which must reproduce the coefficients;
* full-scale positive and negative steps, which give the largest output
  magnitude (±1844·128);
* 3000 random samples with random idle gaps.

It checks every output value and the 2-cycle latency. It also counts idle
cycles, outputs from taps that share a product, and full-scale outputs, and
it fails if any of these never happened.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/fir_pkg.sv rtl/mcm_block.sv rtl/tf_tap.sv rtl/fir_opt_top.sv \
    tb/tb_fir_opt_top.sv --top-module tb_fir_opt_top -o sim
./obj_dir/sim
```

Replace the testbench and top-module names to run the other testbenches
(`tb_mcm_block` needs only `fir_pkg.sv` and `mcm_block.sv`; `tb_tf_tap`
needs only `tf_tap.sv`). Each run takes well under a second. Lint with
`verilator --lint-only -Wall` on the same files. The package must be listed
first.
