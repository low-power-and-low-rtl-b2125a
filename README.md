# Table-driven e^z, sinh and cosh in 16-bit fixed point

This RTL computes e^-z, e^+z, sinh(z) and cosh(z) for 16-bit fixed-point
arguments in four or five pipeline clocks. It accepts one argument per clock.
It has no divider, no polynomial evaluator and no iteration, and its only
table holds 64 words. The method is a table-driven approximation called the
*approximate composited-stair function* (ApproxCSF). The exponential is
split into two factors:

* a **stair-step factor** 2^(N/32). It is exact at the grid points
  z = N·ln2/32 and is built from a decoder and a small table;
* a **composited-error factor** 1 ± ε. It corrects for the distance ε
  between z and the grid point below it.

Their product is the result. Keeping only the linear term of e^ε saves a
multiplier and an adder. The error this leaves is at most ε²/2 ≈ 2.3·10⁻⁴,
because ε < ln2/32.

The design targets embedded and machine-learning datapaths, for example a
Gaussian kernel or an activation function. There a 16-bit result with about
four significant digits is enough, and latency and power matter more.

## The arithmetic

For an argument z ≥ 0 in s4.11 format (sign, 4 integer bits, 11 fraction
bits):

```
N   = floor(z · 32/ln2)              integer, 0 ≤ N ≤ 479
m   = N[8:5]  = N div 32             quotient, 4 bits
j   = N[4:0]  = N mod 32             remainder, 5 bits
zn  = N · ln2/32                     the grid point at or below z
ε   = z − zn                         0 ≤ ε < ln2/32 ≈ 0.0217

e^+z ≈ 2^m  · 2^(j/32)  · (1 + ε)
e^-z ≈ 2^-m · 2^(-j/32) · (1 − ε)
```

The factor 2^(j/32) is read from a table. The factor 2^±m needs no shifter.
A 4-to-16 one-hot decoder with bit m set already *is* 2^m when read as an
integer. For 2^-m, the decoder gets the inverted quotient ~m = 15 − m, and
its word moves one place right. That leaves bit 14 − m set, which is 2^-m
when read with 14 fraction bits. A multiplier then joins the decoder word
and the table word.

The argument range is |z| ≤ 15·ln2 = 10.397. Over this range m stays within
4 bits and e^z stays below 2^15. The units do not detect or saturate larger
arguments: m wraps and the result is wrong.

Constants are rounded to nearest:

| constant | value | format | stored integer |
|---|---|---|---|
| C1 = 32/ln2 | 46.16624 | s6.9 | 23637 |
| C2 = ln2/32 | 0.0216608 | s1.16 | 1420 |
| C2 = ln2/32 | 0.0216608 | s1.18 | 5678 |
| table, e^+z half | 2^(+j/32), j = 0..31 | s1.14 | round(2^14 · 2^(j/32)) |
| table, e^-z half | 2^(-j/32), j = 0..31 | s1.14 | round(2^14 · 2^(-j/32)) |

N is formed by truncation: the integer bits of the product are kept. So ε
is never negative, apart from the rounding of the constants.

## Number formats through the pipelines

The formats are the hardest part of the design. Each product is cut back
to a fixed width, and the binary point of a word can depend on the sign of
the argument. The notation sI.F means a sign bit, I integer bits and F
fraction bits.

### e^-z pipeline (`exp_neg`)

| clock | operation | result format |
|---|---|---|
| 1 | z · C1, keep integer part | N: s10 (11 bits) |
| 2 | zn = N · C2; decoder(~m) >> 1; table[j] | zn s4.16; 2^-m s1.14; 2^-(j/32) s1.14 |
| 3 | 1 + zn − z; 2^-m · 2^-(j/32) | 1 − ε s1.16; 2^-(N/32) s1.14 |
| 4 | (1 − ε) · 2^-(N/32) | y: s1.30 (32 bits) |

### e^+z pipeline (`exp_pos`)

| clock | operation | result format |
|---|---|---|
| 1 | z · C1, keep integer part | N: s10 |
| 2 | zn = N · C2; decoder(m); table[j] | zn s4.F; 2^m s15.0; 2^(j/32) s1.14 |
| 3 | 1 + z − zn; 2^m · 2^(j/32) | 1 + ε s1.F; 2^(N/32) s16.14 |
| 4 | (1 + ε) · 2^(N/32) | y: s17.14 (32 bits) |

F is the parameter `EPS_FRAC`. It defaults to 11, the width drawn for the
stand-alone unit. The e^+z branch of the hyperbolic unit is drawn with 16.

### Combined e^z pipeline (`exp_pm`)

This unit covers both signs with one datapath. The argument's magnitude
|z| goes through the reduction above, and the sign s of z acts in three
places:

1. The 64-word table is addressed by {s, j}, so it returns 2^(-j/32) when
   s = 1 and 2^(+j/32) when s = 0.
2. m is XORed with s before the decoder. The decoder word moves right by
   one only when s = 1. The word is therefore 2^m read as s15.0, or 2^-m
   read as s1.14.
3. One add/sub unit forms 1 + r or 1 − r. Here r = |z| − zn in s1.14, and C2
   is held to 18 fraction bits.

The decoder word changes meaning with the sign, so the same bits leave the
stair-step multiplier with two meanings:

* 2^(N/32) in s16.14 when z ≥ 0;
* 2^(-N/32)·2^14, that is 28 fraction bits, when z < 0.

Five low bits are dropped, and the last multiplier forms a 41-bit word y.
The output `y_neg` says how to read y:

| y_neg | argument | value of y |
|---|---|---|
| 0 | z ≥ 0 | e^z = y · 2^-23 (s17.23) |
| 1 | z < 0 | e^z = y · 2^-37 |

The 41 bits keep full resolution for both halves of the range. The cost is
the sign-dependent binary point. If you need a single format, shift y right
by 14 when `y_neg` is 1. That gives s17.23 for every argument.

### sinh / cosh (`hyperbolic`)

This unit joins an e^-a datapath and an e^+a datapath, with a = |z|. The
two share their front end:

* one multiplier forms N from a;
* one multiplier forms zn = N·ln2/32;
* one subtractor forms ε = a − zn.

After that, each branch has its own decoder, its own table half and its own
1 ∓ ε adder, plus two multipliers. The unit therefore has six multipliers in
all. Both branches keep ε with 16 fraction bits. In a fifth clock one
add/sub unit and a one-place shift form

```
cosh(z) = (e^|z| + e^-|z|) / 2
sinh(z) = ±(e^|z| − e^-|z|) / 2      (the sign of z picks the order of the subtraction)
```

To align e^-|z| (s1.30) with e^|z| (s17.14), its 16 low bits are dropped.
The result is 32 bits, s17.14. `cosh_sel` = 1 selects cosh. The select
travels with its argument, so it may change every clock.

| clock | work |
|---|---|
| 1 | \|z\|, N |
| 2 | shared zn; both decoders and table reads |
| 3 | 1 − ε, 1 + ε; 2^-(N/32), 2^(N/32) |
| 4 | e^-\|z\|, e^\|z\| |
| 5 | add/sub, halve |

## Interfaces and timing

Every unit has the same streaming interface. There is no backpressure:

* `in_valid` marks a clock whose argument `z` is taken.
* `out_valid` and `y` appear a fixed number of clocks later.
* The valid chain has an asynchronous active-low reset `rst_n`.
* Data registers have no reset. They load only when a valid token passes,
  which also keeps idle pipelines from toggling.

| module | function | latency | output |
|---|---|---|---|
| `exp_neg #(C2_FRAC, PIPELINED)` | e^-z, 0 ≤ z ≤ 10.397 | 4 (1 if `PIPELINED = 0`) | `y[31:0]` s1.30 |
| `exp_pos #(EPS_FRAC, C2_FRAC)` | e^+z, 0 ≤ z ≤ 10.397 | 4 | `y[31:0]` s17.14 |
| `exp_pm` | e^z, \|z\| ≤ 10.397 | 4 | `y[40:0]` plus `y_neg` |
| `hyperbolic #(C2_FRAC)` | sinh / cosh, \|z\| ≤ 10.397 | 5 | `y[31:0]` s17.14 |
| `approx_csf_top` | all four units side by side | 4 / 4 / 4 / 5 | see below |

Latency is counted as follows. An argument presented with `in_valid` before
rising edge k appears on `y`, with `out_valid` high, after edge k + 3 for the
four-clock units and after edge k + 4 for `hyperbolic`.

`approx_csf_top` gives each unit its own ports. Only clock and reset are
shared, and each unit keeps its default parameters:

| port prefix | unit |
|---|---|
| `neg_*` | e^-z |
| `pos_*` | e^+z |
| `exp_*` | combined e^z |
| `hyp_*` | sinh/cosh |

Helper blocks:

* `csf_pkg` holds the shared constants and the types `z_t` (s4.11) and
  `n_t` (s10).
* `exp2_frac_lut` is the 64-word table. It is combinational; the units
  register its output.
* `pow2_decoder` is the one-hot decoder.

## Accuracy

The first table comes from exhaustive simulation over every s4.11 code in
the range, compared with double-precision results.

| unit, setting | max error | for comparison, the published figure |
|---|---|---|
| `exp_neg` (e^-z on [0, 10.397]) | +1.2·10⁻⁴ / −2.3·10⁻⁴ absolute, MSE 1.6·10⁻⁹ | max 2.98·10⁻⁴, min −2.7·10⁻⁴, MSE 3.7·10⁻⁹ |
| `exp_pm`, z < 0 | 2.3·10⁻⁴ absolute | — |
| `exp_pm`, z ≥ 0 | 15.7 absolute (at e^z ≈ 32 000) | 14.08 |
| `exp_pos`, C2 in s1.16 | 3.3·10⁻³ relative (≈ 103 at the top) | — |
| `exp_pos`, C2 in s1.18 | 5.0·10⁻⁴ relative (≈ 16 at the top) | — |
| `hyperbolic`, C2 in s1.16 (default) | 54.6 absolute | 7.042 |
| `hyperbolic`, `C2_FRAC = 18` | 7.86 absolute | 7.042 |

The second table comes from 10^6 uniformly distributed random arguments
per configuration. The errors are signed (result minus exact value).

| configuration | min | max | mean | std | MSE | MAE |
|---|---|---|---|---|---|---|
| e^-z, `exp_neg` | −2.3·10⁻⁴ | 1.2·10⁻⁴ | −5.0·10⁻⁶ | 4.0·10⁻⁵ | 1.64·10⁻⁹ | 3.2·10⁻⁵ |
| e^z, `exp_pm` | −9.1·10⁻³ | 15.7 | 0.52 | 1.75 | 3.32 | 0.52 |
| sinh/cosh, C2 s1.16 | −54.6 | 54.6 | −2.30 | 10.8 | 121.6 | 4.59 |
| sinh/cosh, C2 s1.18 | −7.86 | 7.86 | 0.28 | 1.34 | 1.87 | 0.55 |

The published statistics are as follows:

* e^-z: mean 2.92·10⁻⁵, std 5.3·10⁻⁵, MSE 3.68·10⁻⁹, MAE 3.8·10⁻⁵.
* e^z and sinh/cosh (the same numbers are published for both): std 1.304,
  MSE 1.855, MAE 0.393.

Two error sources dominate:

* **The rounding of ln2/32.** It is multiplied by N, which goes up to 479.
  In s1.16 this gives a relative error of up to 0.33 % at the top of the
  range. This width is the one drawn for the separate e^±z pipelines and for
  the hyperbolic unit. Only 18 fraction bits reproduce the published
  hyperbolic accuracy: the maximum error is 7.86 against 7.042, and the
  std/MSE are 1.34/1.87 against 1.304/1.855. `C2_FRAC = 18` is therefore
  available in `exp_neg`, `exp_pos` and `hyperbolic`. The default stays at
  the drawn 16 bits.
* **The s16.9 cut in `exp_pm`.** Near z = 0 it limits the absolute error to
  about 2·10⁻³.

## Where this RTL fills gaps or departs from the source description

* **Truncation, not rounding, for N.** The underlying table-driven algorithm
  rounds N to nearest. The hardware description extracts the integer bits,
  so this RTL truncates. With truncation the e^-z error statistics come out
  at the published order of magnitude, and slightly below it.
* **Negative arguments in `hyperbolic`.** The drawn datapath feeds z straight
  into both exponential branches, which only work for z ≥ 0. The stated
  range, however, is symmetric. This RTL takes |z| at the input and reverses
  the subtraction for sinh of a negative argument.
* **Shared ε in `hyperbolic`.** The drawing has two adders per branch.
  Here ε is formed once, and 1 − ε and 1 + ε are both taken from it. The
  values are the same.
* **Hyperbolic latency.** The block diagram shows five clocks, and that is
  what is built. The published tables state 6 and 4 clocks.
* **CEF adder of the stand-alone e^+z pipeline.** The diagram's +/− marks
  can be read as 1 + zn − z. This RTL forms 1 + z − zn. That is the
  definition 1 + ε with ε = z − zn, and the sign marks of the hyperbolic
  diagram agree with it.
* **Widths where the printed formats disagree.**
  * The product z·C1 is labelled s10.21. It actually carries 20 fraction
    bits.
  * The stair-step product inside the hyperbolic unit is labelled s16.6 in
    one drawing and s16.14 in another. This RTL uses s16.14.
  * The final e^-z product is labelled s2.31. It has 30 fraction bits, and
    the output keeps the printed s1.30.
* **Added by this design:**
  * the valid handshake and the reset scheme;
  * the `cosh_sel` encoding (1 = cosh) and its pipelining;
  * the `y_neg` output of `exp_pm`;
  * the `C2_FRAC` option.
* **Non-pipelined e^-z unit.** The source only names it. Here it is
  `exp_neg` with `PIPELINED = 0`: the same datapath without the three inner
  register stages, so the result is registered one clock after its
  argument.
* **Not built:**
  * the extensions sketched as future work: splitting the argument into
    integer and fraction parts for a wider range, replacing the constant
    multipliers by shift-add trees and the third multiplier by a barrel
    shifter, and approximate adders and multipliers.
  * Results outside |z| ≤ 10.397 are not detected.

## Simulating

Each unit has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=F`. The testbenches for the exponential and
hyperbolic units sweep every argument code in range and print the error
statistics. They also check the latency of every result.
`approx_csf_top_tb` drives random independent streams into all four units
at default parameters. It confirms that every mechanism occurs:

* both signs;
* cosh and sinh of both signs;
* function switches;
* back-to-back results;
* idle gaps.

With Verilator 5:

```
verilator --binary --timing --assert -y rtl rtl/csf_pkg.sv \
          tb/approx_csf_top_tb.sv --top-module approx_csf_top_tb -o sim
./obj_dir/sim
```

To run another testbench, replace `approx_csf_top_tb` with `exp_neg_tb`,
`exp_pos_tb`, `exp_pm_tb`, `hyperbolic_tb`, `exp2_frac_lut_tb` or
`pow2_decoder_tb`. `csf_error_metrics_tb` computes the random-argument
statistics above. It also checks each configuration's mean squared error
against a ceiling. `-y rtl` lets Verilator find the modules by file name.
The package must be listed first. Each run takes at most a few seconds.

## Changing the design

* **Constant precision.** Set `C2_FRAC` to 18 on `exp_neg`, `exp_pos` or
  `hyperbolic` to get the accuracy quoted above. It adds two bits to one
  multiplier.
* **Error-term width of the stand-alone e^+z unit.** `EPS_FRAC` can be set
  from 11 to 16.
* **The table.** The formula is in `exp2_frac_lut.sv`. Regenerate the words
  with round(2^14·2^(±j/32)) if you change the word width.
* **A wider argument range.** This needs more quotient bits (`M_W` in
  `csf_pkg`), a wider decoder and wider output words. Every width in the
  pipelines follows from |z| < 15·ln2.
