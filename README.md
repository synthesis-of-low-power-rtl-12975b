# Hybrid-form reconfigurable FIR filter with VHBCSE constant multipliers

A FIR filter spends most of its hardware on multiplying samples by
coefficients. When the coefficients are fixed, each multiplier can be reduced
to a few shifts and adds, and common bit patterns between coefficients can be
shared (common sub-expression elimination, CSE). A *reconfigurable* filter
cannot do that at design time, because its coefficients change at run time.
This design keeps a general-purpose coefficient input but builds each
multiplier from the same idea applied at run time:

* the coefficient is cut into 2-bit digits, each of which can only ask for
  0, x, 2x or 3x, so these values are formed **once per sample** and shared
  by all digits of all coefficients that multiply that sample (vertical
  binary CSE, 2 bits);
* inside the coefficient, equal halves of a 4-bit or 8-bit group are
  detected on the fly, and the sum of the upper half is then taken from the
  lower half instead of being formed again (horizontal binary CSE, 4 and
  8 bits). Together this is the VHBCSE scheme, *vertical-horizontal binary
  common sub-expression elimination*.

Every adder in the design is a square-root carry-select adder. The taps are
arranged in a **hybrid form**: direct form inside small groups of taps,
transposed form between the groups. An optional LMS mode adapts the
coefficients to a desired response.

Everything is synthesizable SystemVerilog-2017 and has been linted with
Verilator (`-Wall`) and elaborated with Yosys/slang.

## The VHBCSE multiplier (`vhbcse_mult`)

Operands: `x` is a 16-bit two's complement sample, `h` a 17-bit two's
complement coefficient (range -65536 .. 65535). The product `p = h * x` is
exact, 33 bits, and is stored in an output register (one clock of latency).

The multiplier is a chain of five combinational stages. The partial-product
generator depends only on the sample, so it sits outside `vhbcse_mult`: in
the filter one `ppg` per delay-line position feeds every multiplier that
reads that sample. This is the *vertical* part of the scheme, sharing across
coefficients; the digit and half matching below is the *horizontal* part,
inside one coefficient.

| stage | module | what it does |
|---|---|---|
| sign conversion | `sign_conv` | `hm = h[16] ? ~h[15:0] : h[15:0]`. For a negative `h`, `~h[15:0]` equals `|h| - 1`, so `hm` is a 16-bit non-negative number. `neg = h[16]` is passed on. |
| control-logic generator | `cl_gen` | `sel[i] = hm[2i+1:2i]` for the eight 2-bit digits; `m4[j] = (hm[4j+3:4j+2] == hm[4j+1:4j])` for the four nibbles; `m8[k] = (hm[8k+7:8k+4] == hm[8k+3:8k])` for the two bytes. |
| partial-product generator | `ppg` | `x`, `2x` (wiring) and `3x`. Since bit 0 of `2x` is zero, `3x = {(x>>>1) + x, x[0]}`: a single 17-bit adder. |
| multiplexer unit | `mux_unit` | per digit, a 4-to-1 mux picks `0 / x / 2x / 3x`. A mux whose result will not be used (upper digit of a matching nibble, or a digit in the upper nibble of a matching byte) is held at zero so its wires do not toggle. |
| final addition | `final_add` | see below |

The final addition builds the product hierarchically, reusing matches:

```
nibble j:  P4[j] = pp[2j]  + 4   * (m4[j] ? pp[2j]  : pp[2j+1])
byte   k:  P8[k] = P4[2k]  + 16  * (m8[k] ? P4[2k]  : P4[2k+1])
word:      P16   = P8[0]   + 256 * P8[1]                 (= x * hm)
sign:      p     = neg ? -(P16 + x) : P16
```

The last line undoes the sign conversion: for `h < 0`, `x*h = -(x*(|h|-1) + x)`.
The extra `+x` and the negation (`~T + 1`, done as an add with carry-in) are
two more square-root carry-select adders.

Worked example, `h = -21846` (`0x1AAAA`), `x = 3`: `hm = ~0xAAAA = 0x5555`,
all eight digits are `01`, so every mux wants `x`. Every nibble matches
(`m4 = 1111`) and both bytes match (`m8 = 11`): only the muxes of digits 0
and 4 are active, `P4[0] = 3 + 4*3 = 15`, `P8[0] = 15 + 16*15 = 255`,
`P8[1] = 255` (from `P4[4]` alone, in the same way),
`P16 = 255 + 256*255 = 65535` (which is `21845 * 3`), and with the sign
correction `p = -(65535 + 3) = -65538 = 3 * -21846`.

Note on what the matching saves. In a multiplier whose coefficient is a
run-time input, the upper-half adders still exist in silicon; the match only
lets the unused multiplexers sit still. The structure is kept because it is
the VHBCSE datapath, and because the same RTL with a constant coefficient
would let synthesis drop the unused parts.

## The hybrid-form filter (`hybrid_fir`)

```
y[n] = sum_{k=0}^{TAPS-1} h[k] * x[n-k]
```

The `TAPS` taps are split into `M = TAPS / GROUP` groups. Inside a group the
filter is in direct form: one delay line `x[n] .. x[n-GROUP+1]`, **shared by
all groups**, feeds `GROUP` multipliers, and an adder line sums them:

```
b_g[n] = sum_{l<GROUP} h[g*GROUP + l] * x[n-l]
```

Between groups the filter is in transposed form: a chain of partial sums,
delayed by `GROUP` samples per group, accumulates the group results:

```
s_{M-1}[n] = b_{M-1}[n]
s_g[n]     = b_g[n] + s_{g+1}[n - GROUP]
y[n]       = s_0[n]
```

`GROUP = 1` is the classic transposed form (short adder path, many
registers), `GROUP = TAPS` the direct form (few registers, long adder
line); the default `TAPS = 16, GROUP = 4` is in between: four products and
one chain add per output path, 4 partial-product generators for 16
multipliers, 3 sample registers used by the filtering and 3 x 4 x 37-bit
chain registers.

### Timing

| clock | what happens |
|---|---|
| t   | `x_valid` high with `x_in` (and `d_in`) |
| edge ending t | delay line shifts, every tap multiplier stores its product |
| t+1 | group sums and chain sums settle; the error `d - y` is formed |
| edge ending t+1 | `y_out`, `e_out` registered; chain registers shift |
| t+2 | `y_valid` high |

Samples may arrive every clock or with any gaps; everything that holds
history moves only when a sample (or, for the chain, its products) moves,
so gaps do not change the result.

### Changing coefficients while running

`coef_we / coef_addr / coef_wdata` write one tap per clock into `coef_lut`.
A write in clock t is used by the sample of clock t+1 onward. Partial sums
already in the transposed chain were formed with the old coefficients and
keep them, so during the `TAPS - GROUP` samples after a change an output
mixes old and new coefficients, exactly as any transposed-form filter does.
Precisely, group `g`'s contribution to `y[n]` uses the coefficients in force
when sample `n - g*GROUP` was accepted. The testbenches model this rule and
check it bit for bit.

### Adaptive mode (LMS)

With `adapt = 1`, each output also updates all weights by the LMS rule

```
w_k <- sat17( w_k + ( sat17(e >>> E_SHIFT) * x[n-k] ) >>> U_SHIFT ),  e = d[n] - y[n]
```

i.e. a step size `mu = 2^-(E_SHIFT + U_SHIFT)`, by default `2^-28`. The
error is scaled and saturated to the 17-bit coefficient format so that the
`e * x` products can be formed by the same VHBCSE multipliers
(`lms_update` holds one per tap). The updated table is loaded into
`coef_lut` in one clock, two clocks after the sample it was computed from,
so the filter is a delayed LMS; the transposed part of the hybrid form adds
further delay for the higher groups. To feed the update, the sample delay
line is `TAPS` long; filtering itself reads only its first `GROUP` entries.

`d_in` has the same scale as `y_out`: if the coefficients are read as
fractions `h / 2^16`, then `y_out / 2^16` is the filter output in units of
the input. Choose `E_SHIFT`, `U_SHIFT` so that `mu * TAPS * E[x^2] < 1`; the
defaults are stable for inputs of up to about +-4096.

## Ports of the top level

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (clears coefficients, samples, partial sums, outputs) |
| `coef_we`, `coef_addr`, `coef_wdata` | in | 1, log2(TAPS), 17 | write one coefficient |
| `x_valid`, `x_in` | in | 1, 16 | one signed sample |
| `adapt`, `d_in` | in | 1, 33+log2(TAPS) | LMS enable and desired response |
| `y_valid`, `y_out` | out | 1, 33+log2(TAPS) | full-precision signed output |
| `e_out` | out | 34+log2(TAPS) | `d - y` for the same sample |

Parameters: `TAPS` (16), `GROUP` (4, must divide `TAPS`), `E_SHIFT` (16),
`U_SHIFT` (12). Sample and coefficient widths (16 and 17 bits) are fixed in
`vhbcse_pkg`: the 2/4/8-bit grouping is built around the 16-bit magnitude.

## Files

| file | content |
|---|---|
| `rtl/vhbcse_pkg.sv` | widths shared by all modules |
| `rtl/sqrt_csa.sv` | square-root carry-select adder, any width (blocks 2,2,3,4,5,...) |
| `rtl/sign_conv.sv`, `cl_gen.sv`, `ppg.sv`, `mux_unit.sv`, `final_add.sv` | the five multiplier stages |
| `rtl/vhbcse_mult.sv` | the multiplier with its output register |
| `rtl/coef_lut.sv` | coefficient table, single-word write and whole-table load |
| `rtl/lms_update.sv` | LMS weight update |
| `rtl/hybrid_fir.sv` | the filter (top level) |
| `tb/<module>_tb.sv` | one self-checking testbench per module |
| `tb/hybrid_fir_forms_tb.sv` | transposed, direct and 12-tap hybrid instances against the same reference |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself
(each has a watchdog). With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module hybrid_fir_tb \
    -y rtl -y tb +libext+.sv rtl/vhbcse_pkg.sv tb/hybrid_fir_tb.sv
./obj_dir/Vhybrid_fir_tb
```

Replace `hybrid_fir_tb` by any other testbench name. The filter is written
at the bit level (full-adder equations in `sqrt_csa`), so the C++ model of
the full filter is large: building `hybrid_fir_tb` takes about a minute,
`hybrid_fir_forms_tb` (three filters) about three; the simulations
themselves take well under a second.

## What the testbenches check

* `sqrt_csa_tb`: 16-, 37- and 3-bit adders against `+`, carry corners and
  20 000 random operands.
* `sign_conv_tb`, `cl_gen_tb`, `ppg_tb`: exhaustive over all inputs.
* `mux_unit_tb`, `final_add_tb`: random and corner operands; `final_add_tb`
  fills the unused partial products with random junk, which must not
  affect the product; all products compared with `x * h`.
* `vhbcse_mult_tb`: corner operands (including -32768 x -65536), random
  operands, random enable; one-clock latency and hold.
* `coef_lut_tb`, `lms_update_tb`: against shadow models, including write
  priority and saturation.
* `hybrid_fir_tb` (default size, 16 taps): impulse response, 3000 random
  cycles with gaps and in-flight coefficient writes, full-scale products,
  reset in mid-stream, and LMS identification of a random 16-tap system
  (bit-exact against the model, the learnt impulse response within 64 LSB of
  the system, error reduced by more than 20x). It counts and requires
  negative coefficients, nibble and byte matches, gaps, back-to-back samples,
  in-flight rewrites, reset, LMS updates and error saturation; every output
  is checked to arrive exactly two clocks after its sample.
* `hybrid_fir_forms_tb`: pure transposed (`GROUP = 1`), pure direct
  (`GROUP = TAPS`) and a 12-tap filter in groups of 3, each against the
  same hybrid-form reference, over random bursts and coefficient sets.

## Choices made in this implementation

These points are not fixed by the VHBCSE architecture description and were
decided here:

* **Filter size**: 16 taps in groups of 4. No filter order is prescribed.
* **Hybrid form** is implemented as direct-form groups joined in transposed
  form, as described above.
* **Exact products**: the one's complement sign conversion would leave the
  product of a negative coefficient one `x` short; the final addition adds
  it back before the two's complement. The published VHBCSE step list also
  shifts the result right by one bit, for a fixed-point format it does not
  spell out; that shift is *not* applied here: the product is kept at full
  33-bit precision, and the filter output at full precision too, so no
  rounding happens anywhere. Scale `y_out` as your format requires.
* **Where the vertical sharing happens**: one partial-product generator per
  delay-line sample, shared by all multipliers of that sample; the
  multiplexers and the 4-/8-bit half matching sit in every multiplier.
* **Unused multiplexers held at zero** when a half is reused, as the way the
  matching saves power.
* **Square-root carry-select adder** block sizes 2, 2, 3, 4, 5, ...
* **Handshake**: a valid strobe per sample, no back-pressure, fixed
  two-clock latency; synchronous active-low reset.
* **LMS**: power-of-two step size, saturation of the scaled error and of the
  weights, whole-table load two clocks after the sample. The LMS mode is an
  addition around the reconfigurable filter; with `adapt = 0` it is idle.
* **Power and area**: the low-power and low-area claims of the VHBCSE and
  square-root-select-adder approach (for example on a Spartan-3 device)
  are not reproduced or measured here.
