# Variable-cutoff FIR filter built from fractional delays

This is a lowpass FIR filter whose cutoff frequency is set by one control value and
whose coefficients never change. It starts from a normal fixed-coefficient filter of order 80.
Each of its 80 unit delays is replaced by a small interpolator that delays by
**D = 1 + d** samples, with 0 ≤ d < 1. Stretching every delay by D stretches the
impulse response by D and lowers its peak by about 1/D. As a result:

* the cutoff moves from fc to **fc / D**;
* the transition band narrows in the same ratio, because the response gets longer
  while the coefficients stay the same.

Eight values of D are supported (1 to 1.75), so the cutoff can be set anywhere from
0.17 down to about 0.097. A second mode, coefficient decimation by 2 (CD-II), doubles
whatever cutoff D gives. Changing D or the mode takes effect on the next sample:
there are no coefficients to reload and no memory to rewrite.

Frequencies in this document are in units of π rad/sample, so 1.0 is the Nyquist
frequency.

## The fractional-delay stage (`fd_farrow`)

Each delay is a second-order Lagrange interpolator in the *modified Farrow* form. It
uses two registers, two halvings, four adders and two multiplications by d. Let
x0 = x(n), x1 = x(n−1) and x2 = x(n−2). The stage computes:

```
a  = x0/2            b = x2/2
s2 = a − x1 + b
s3 = d·s2 − a + b
y  = x1 + d·s3
```

Multiplied out, this is

```
y = d(d−1)/2 · x0  +  (1−d²) · x1  +  d(d+1)/2 · x2
```

That is exactly the 3-tap Lagrange interpolator for a delay of 1 + d. Some properties follow:

* At d = 0 the stage is a plain unit delay, so D = 1 gives back the prototype filter
  exactly.
* The DC gain is 1 for every d.
* The L1 gain |h0|+|h1|+|h2| = 1 + d − d² is never more than 1.25.
* The x0 tap is non-zero whenever d > 0, so **y depends combinationally on the
  current input**. See "Timing" below.

d is a 4-bit unsigned fraction (steps of 1/16). Each multiplication by d uses only
shifts and additions (`d_mult`): one left-shifted copy of the operand per set bit of d,
summed, then a single arithmetic right shift by 4. The halvings are arithmetic right
shifts. Both round toward minus infinity.

## The filter chain (`vdf_top`, `vdf_tap_stage`, `coeff_mult_bank`)

The filter is in transposed direct form. The input sample goes to every coefficient
multiplier at once:

```
chain[0] = h[0]·x
chain[k] = FD_k(chain[k−1]) + h[k]·x        k = 1 .. 80
y        = chain[80]   (registered)
```

* `coeff_mult_bank` forms the products. The coefficients are symmetric
  (h[k] = h[80−k]), so only 41 distinct products are computed and each one feeds two
  taps. The coefficients are constants, so synthesis turns each multiplier into
  shifts and additions.
* `vdf_tap_stage` k holds one FD stage and one adder.
* `d_select` turns the 3-bit `dsel` into d. All 80 stages share that d.

| `dsel` | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| D | 1 | 1.0625 | 1.125 | 1.1875 | 1.25 | 1.375 | 1.5 | 1.75 |
| d × 16 | 0 | 1 | 2 | 3 | 4 | 6 | 8 | 12 |
| expected cutoff fc/D | 0.170 | 0.160 | 0.152 | 0.143 | 0.136 | 0.124 | 0.113 | 0.097 |
| measured impulse peak ÷ input | 0.170 | 0.159 | 0.152 | 0.143 | 0.136 | 0.124 | 0.113 | 0.097 |
| measured peak position (samples) | 40 | 42 | 45 | 47 | 50 | 55 | 60 | 70 |

An FIR lowpass filter with cutoff fc has an impulse-response peak of about fc at its
centre. The last two rows come from the end-to-end testbench. They show the
response centre moving to 40·D and the peak falling to fc/D.

Each of these d values has at most two set bits, so each multiplier by d costs at
most one adder in practice. `fd_farrow` itself accepts any d in steps of 1/16, so a
finer or different set of D values only needs a different `d_select`. Keep D < 2:
integer D > 1 produces several passbands.

### CD-II mode (`cd_en`)

Coefficient decimation by 2 keeps h[0], h[2], …, h[80] and removes the gaps between
them. The result is a 41-tap filter with twice the passband width and twice the
transition band. In the chain this is done stage by stage:

* an **even** stage bypasses its FD: `chain[k] = chain[k−1] + h[k]·x`;
* an **odd** stage drops its product: `chain[k] = FD(chain[k−1])`.

Consecutive kept coefficients are therefore separated by exactly one FD. D = 1.375,
1.5 and 1.75 with CD-II should give passband edges of about 0.200, 0.186 and 0.160. The FD
registers keep clocking while they are bypassed. This means switching the mode does
not start from a cleared state: for the first 80 or so samples after a switch, the
output mixes the two configurations.

### Measured frequency response

`tb_vdf_response` records the simulated impulse response for every setting and evaluates its
magnitude response. For each D, the pass and stop edges in the table below are the
prototype's edges (0.14 and 0.20) divided by D. In CD-II mode they are doubled.

| D | pass edge | gain there | stop edge | worst stopband | −6 dB point |
|---|---|---|---|---|---|
| 1 | 0.140 | −0.09 dB | 0.200 | −40.7 dB | 0.170 |
| 1.0625 | 0.132 | −0.10 dB | 0.188 | −37.6 dB | 0.160 |
| 1.125 | 0.125 | −0.12 dB | 0.178 | −37.8 dB | 0.153 |
| 1.1875 | 0.118 | −0.11 dB | 0.168 | −34.9 dB | 0.145 |
| 1.25 | 0.112 | −0.11 dB | 0.160 | −35.8 dB | 0.138 |
| 1.375 | 0.100 | −0.06 dB | 0.146 | −37.9 dB | 0.125 |
| 1.5 | 0.093 | −0.12 dB | 0.133 | −34.9 dB | 0.115 |
| 1.75 | 0.080 | −0.13 dB | 0.114 | −36.6 dB | 0.098 |
| 1.375, CD-II | 0.200 | −0.37 dB | 0.292 | −28.9 dB | 0.250 |
| 1.5, CD-II | 0.186 | −0.48 dB | 0.266 | −28.2 dB | 0.230 |
| 1.75, CD-II | 0.160 | −0.39 dB | 0.228 | −32.4 dB | 0.195 |

The cutoff and transition band scale as intended. The stopband gets worse than the
prototype's −40.7 dB, by up to about 6 dB in normal mode and more with CD-II. The
second-order interpolators cause this: they are accurate only at low frequencies, and
above about 0.2 their error grows. More fraction bits of d would not remove this
error; a higher-order interpolator would.

## Prototype filter and number formats

The prototype is an order-80 lowpass filter with passband edge 0.14, stopband
edge 0.20 and cutoff 0.17. Its coefficients are a Kaiser-windowed sinc:

```
h[n] = round( 2^17 · 2fc · sinc(2fc(n−40)) · I0(β·sqrt(1−((n−40)/40)²)) / I0(β) ),
n = 0..80,  fc = 0.085 cycles/sample,  β = 3.7
```

Passband ripple is about ±0.07 dB and the stopband is below −40 dB. The values for
n = 0..40 are in `vdf_pkg`. For a different prototype, replace `H_HALF` and
`N_ORDER`; the rest of the RTL follows.

| quantity | format |
|---|---|
| input `x` | 16-bit signed integer |
| coefficients | 18-bit signed, 17 fraction bits (Q1.17) |
| partial sums and `y` | 48-bit signed; 1 LSB = 2⁻²¹ of an input LSB |
| d | 4-bit unsigned fraction (1/16 steps) |

The partial sums carry G = 4 guard bits below the product LSB. These absorb the
truncation in each FD stage's halvings and multiplications by d, so the rounding error
added over 80 stages stays far below an input LSB. The filter's DC gain is
131378/2¹⁷ ≈ 1.002. To get 16-bit samples back, take `y >>> 21` (with rounding or
saturation if needed). There are about 10 bits of headroom above the largest
partial sum, so nothing overflows inside.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous, active low; clears all 160 FD registers and the output |
| `in_valid` | in | 1 | a new sample is on `x`; every FD register advances once |
| `x` | in | 16 | input sample |
| `dsel` | in | 3 | D value, per the table above |
| `cd_en` | in | 1 | CD-II mode |
| `out_valid` | out | 1 | high one clock after each accepted sample |
| `y` | out | 48 | output sample, registered |

The filter produces one output per accepted sample, and the latency is one clock.
`dsel` and `cd_en` act on the sample that is present with them.

**Timing.** Every FD stage has a direct path from its input to its output, and the
stages are in series. The combinational path therefore runs from the input
multipliers through all 80 stages, with two multiply-by-d steps in each, to the output
register. That follows from the structure itself. It is acceptable at a low sample rate
but limits the clock. Pipelining the chain would change the arithmetic, and it is not
done here.

## How far it can be trusted, and where it is this design's own

Taken from the published method:

* the interpolator structure and its signs;
* the transposed chain with every unit delay replaced by an FD stage;
* order 80 and the band edges;
* the eight D values;
* shift-and-add multiplication by d;
* sharing of the symmetric products;
* decimation by 2 combined with the fractional delay.

This design's own choices:

* the coefficient values (only the specification was available) and the reading of the band edges in units of π rad/sample;
* all word widths and rounding;
* the `in_valid` and reset behaviour, and the output register;
* the `dsel` encoding;
* the bypass-and-mask way of doing CD-II inside the chain, and support for only decimation factor 2.

The FPGA board and host processor used to run such a filter are not part of this RTL.

Verification:

* Every module has a self-checking testbench in `tb/`, and the testbenches compare against independently computed values.
* `d_mult` is checked against 64-bit multiplication.
* `fd_farrow` is checked against the closed-form Lagrange taps for all 16 values of d, and against the ideal interpolator (within 3 LSB) on random data.
* `tb_vdf_top` runs the full-size filter:
  * the D = 1 impulse response must equal the coefficients exactly, and the CD-II impulse response must equal the even-indexed coefficients;
  * every D value, with and without CD-II, is compared sample by sample with a 64-bit model of the whole chain;
  * peak position and height are checked against 40·D and fc/D;
  * a random stream switches D and the mode on the fly and has gaps in `in_valid`.
* `tb_vdf_response` measures the frequency response of every setting (table above).

Not verified: behaviour at a real clock rate, and synthesis to a particular device.

## Files and simulation

| file | contents |
|---|---|
| `rtl/vdf_pkg.sv` | widths, types, coefficients, D table |
| `rtl/d_mult.sv` | shift-and-add multiply by d |
| `rtl/fd_farrow.sv` | fractional-delay stage |
| `rtl/d_select.sv` | `dsel` → d |
| `rtl/coeff_mult_bank.sv` | symmetric constant multipliers |
| `rtl/vdf_tap_stage.sv` | FD + adder + CD-II bypass |
| `rtl/vdf_top.sv` | the filter |
| `tb/vdf_ref_pkg.sv` | integer reference arithmetic for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_vdf_response.sv` | frequency response of the full filter at every setting |

Each testbench ends by printing `TB_RESULT checks=N failures=M`. To run the
end-to-end test with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/vdf_pkg.sv tb/vdf_ref_pkg.sv rtl/d_mult.sv rtl/fd_farrow.sv rtl/d_select.sv \
  rtl/coeff_mult_bank.sv rtl/vdf_tap_stage.sv rtl/vdf_top.sv tb/tb_vdf_top.sv \
  --top-module tb_vdf_top -o sim
./obj_dir/sim
```

It finishes in well under a second. The other testbenches build the same way, each
with its module and the modules below it.
