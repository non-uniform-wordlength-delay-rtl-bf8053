# Non-uniform wordlength delay line FIR filter

A parallel (direct-form) FIR filter computes

    y(k) = c_0 x(k) + c_1 x(k-1) + ... + c_N x(k-N)

with a chain of delay registers z_1..z_N holding past samples. Each delay
register output, the *delay signal* Signal_Dn, carries x(k-n) to the
multiplier for c_n. Fixed-point designs usually give the whole delay line one
wordlength. This design does not.

The reason it can differ is simple. If delay signal n carries quantisation
error q_n, the error at the output is

    q_T = q_0 c_0 + q_1 c_1 + ... + q_N c_N

Each delay signal's error reaches the output scaled by its own coefficient. A
low-pass filter's outer taps are one to two orders of magnitude smaller than
its centre taps, so the signals that feed them can drop several fractional bits
while adding almost no output noise. The multiplier on a shorter signal gets
shorter too. A delay register only has to keep the bits that it and the taps
further down the line still need, so the delay line narrows toward its end.

The RTL implements this for a 15-tap low-pass filter. Its transition band runs
from 0.1 to 0.3 of the sample rate (1/5 to 3/5 of the Nyquist frequency), and
its stopband attenuation is 60 dB. The default wordlengths were chosen to keep an 80 dB
signal-to-quantisation-noise ratio (SQNR) against a floating-point filter,
driven by uniform noise on [-1, 1].

## Number format

Every value is signed two's complement `<s, iwl, fwl>`. `iwl` counts the integer
bits including the sign, `fwl` counts the fractional bits, and the stored
integer equals the value times 2^fwl. Delay-line data always has one integer bit
(the sign), so the range is [-1, 1).

| Signal | Format | Chosen by |
|---|---|---|
| input x(k) | `<s,1,15>`, 16 bits | this design |
| z_n, Signal_Dn | `<s,1,fwl>`, fwl from the tables below | wordlength tables |
| coefficient c_n | `<s,1,17>`, `round(c_n * 2^17)` | this design |
| product n | `<s,2,SIG_FWL[n]+17>`, input widths summed | rule: no bits lost |
| partial sums, y(k) | `<s,3,max(SIG_FWL)+17>` = `<s,3,31>`, 34 bits | this design |

Products and sums are exact. The only rounding in the filter happens on the
delay line and on the delay signals, which is the effect being studied. The sum
of |c_n| is 1.33, so two integer bits would hold y. The third is a guard bit.

## The wordlength tables

`nuwl_pkg` holds four assignments of fractional wordlengths, found for the
example filter under an 80 dB SQNR target. Index n is the tap, from c_0 to c_14.

| n | c_n | trunc. Signal_D | trunc. z_n | round Signal_D | round z_n |
|---|---|---|---|---|---|
| 0 | 0.00431622 | 7 | - | 8 | - |
| 1 | 0.00740138 | 8 | 14 | 8 | 14 |
| 2 | -0.01014178 | 8 | 14 | 8 | 14 |
| 3 | -0.04423428 | 10 | 14 | 11 | 14 |
| 4 | -0.03032523 | 10 | 14 | 10 | 14 |
| 5 | 0.09640909 | 12 | 14 | 12 | 14 |
| 6 | 0.28454928 | 14 | 14 | 14 | 14 |
| 7 | 0.3770314 | 14 | 14 | 14 | 14 |
| 8 | 0.28454928 | 14 | 14 | 14 | 14 |
| 9 | 0.09640909 | 12 | 12 | 12 | 12 |
| 10 | -0.03032523 | 10 | 10 | 10 | 10 |
| 11 | -0.04423428 | 10 | 10 | 11 | 11 |
| 12 | -0.01014178 | 8 | 8 | 8 | 8 |
| 13 | 0.00740138 | 8 | 8 | 8 | 8 |
| 14 | 0.00431622 | 7 | 7 | 8 | 8 |

These are the non-uniform tables (`NU_TRUNC_*`, `NU_ROUND_*`). The uniform
tables (`U_TRUNC_*`, `U_ROUND_*`) are the comparison point: every fwl is 14 for
truncation and 13 for rounding.

Each z_n is the largest Signal_D fwl at or after tap n, because a bit dropped
early on the line cannot come back later. Tap 0 is fed straight from the input
and has no register. The rounding table has one exception: z_10 keeps 10 bits
and z_11 keeps 11. The RTL follows the table. z_11 appends a zero bit, so
Signal_D11 really carries 10 significant fractional bits.

Fractional-bit totals:

| | signals uniform | signals non-uniform | saving | delays uniform | delays non-uniform | saving |
|---|---|---|---|---|---|---|
| truncation | 210 | 152 | 27.6 % | 196 | 167 | 14.8 % |
| rounding | 195 | 156 | 20.0 % | 182 | 169 | 7.1 % |

In the default build the delay registers take 181 flip-flops, sign bits
included. The uniform truncation line takes 210.

## Datapath

`nuwl_fir` builds one slice per tap, n = 0..14:

1. **Delay register z_n** (`nuwl_delay`, n >= 1). It loads the previous stage
   (the input when n = 1) on each sample strobe. Where it is narrower than that
   stage, the value is quantised on the way in. Where it is wider, zero bits are
   appended.
2. **Delay signal Signal_Dn** (`fxp_quantize`). It quantises z_n (x for n = 0)
   to SIG_FWL[n] bits.
3. **Multiplier** (`tap_mult`). A (1+SIG_FWL[n]) x 18 full-precision signed
   product with a constant coefficient. A synthesis tool turns it into shifts
   and adds.
4. **Adder** (`tap_add`). It moves the product to the binary point of the
   partial sum and adds it to the chain. psum[14] is y(k).

The registers differ in width, so the top passes them from stage to stage on
`z_ext[]`, a set of wires all sized to the widest stage. Each register keeps its
own width.

### Quantisation modes (`MODE`)

- `Q_TRUNC`: drops the low bits, which rounds toward minus infinity. This is the
  default.
- `Q_ROUND`: adds half an output LSB, then drops the low bits (round half up).
  A positive value within half an LSB of +1 would round past the largest code.
  It is clipped to the largest code instead, and `sat_o` reports it for that
  output sample. Negative values cannot overflow.

All quantisers in one filter use the same mode.

## Interface and timing

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_ni` | in | 1 | asynchronous active-low reset. Clears the delay line, y_o and the flags. |
| `x_valid_i` | in | 1 | sample strobe |
| `x_i` | in | 16 | sample `<s,1,15>` |
| `y_valid_o` | out | 1 | y_o was updated on the last edge |
| `y_o` | out | Y_W (34) | y(k), `<s,3,Y_FWL>` |
| `sat_o` | out | 1 | a rounding quantiser clipped a value for this output |

The filter takes at most one sample per clock. On a rising edge with
`x_valid_i` high, it registers y(k) for the sample on `x_i` and shifts the delay
line. `y_valid_o` is high for the clock that follows. So the latency is one
clock and the throughput one sample per clock. With the strobe low, nothing
moves.

The multiply-and-sum is purely combinational from x and the delay registers to
the output register. Fifteen products summed in a chain make a long path, and
the RTL has no pipelining. Add pipeline stages if the clock target needs them.

### Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `MODE` | `Q_TRUNC` | quantisation mode |
| `SIG_FWL` | `NU_TRUNC_SIG` | fwl of each delay signal |
| `DLY_FWL` | `NU_TRUNC_DLY` | fwl of each delay register (entry 0 unused) |
| `COEF` | `COEF_Q` | integer coefficients, `<s,1,17>` |

The tap count, the coefficient format, the input format and the integer bits
are package constants in `nuwl_pkg`. Any symmetric or non-symmetric coefficient
set works. A new filter needs its own wordlength tables, and those come from an
offline search against a noise target, which is not part of this RTL.

## Design choices beyond the specification

The following are this design's own:

- the input, coefficient and accumulator formats above
- the round-half-up tie rule and saturation in rounding mode
- truncation as floor, not as rounding toward zero
- the sample strobe, the output register and the asynchronous reset to zero
- the `sat_o` status flag

The evaluation this design follows kept coefficients, products and sums in
floating point. Here they are exact fixed point, with the coefficients rounded
to 17 fractional bits.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=N failures=M`
line.

| Testbench | What it covers |
|---|---|
| `tb_fxp_quantize` | Truncation 15->7, rounding 15->8 and 14->12, widening 10->11. Random and extreme codes, checked against real-arithmetic floor/round. Saturation must occur. |
| `tb_nuwl_delay` | A narrowing stage in both modes, a random strobe (load versus hold), reset. |
| `tb_tap_mult` | Full-precision products, including both most-negative codes. |
| `tb_tap_add` | Alignment of a 24-fwl product to a 31-fwl sum. |
| `tb_nuwl_fir` | Default configuration with no parameter overrides. 20,000 random samples with strobe gaps and a mid-stream reset, checked bit for bit against a reference model (`tb_fir_ref_pkg`). Also checks one-clock latency, holding between samples, and SQNR. |
| `tb_nuwl_fir_stopband` | Magnitude response of the non-uniform and uniform truncation filters, measured with sinusoids. Passband (0.01, 0.02 cycles/sample) must be within 0.1 dB of 0 dB. Stopband (0.30 to 0.49) must be below -60 dB. Measured: -63.7 dB at 0.30 for the non-uniform line, -64.4 dB for the uniform one. |
| `tb_nuwl_fir_modes` | All four wordlength assignments side by side on one stimulus. Bit-exact checks, saturation in both rounding lanes, the bit totals and savings above, SQNR for each. |

The reference model works in double precision. Every value in the filter has
fewer than 53 significant bits, so the model reproduces the hardware exactly.
It also runs an unquantised filter with the printed real coefficients, which
gives the SQNR.

SQNR measured on one random run (uniform samples, plus extreme codes mixed in):

| Configuration | SQNR |
|---|---|
| truncation, non-uniform | about 79 dB |
| truncation, uniform | about 85 dB |
| rounding, non-uniform | about 80 dB |
| rounding, uniform | about 83 dB |

The non-uniform truncation table lands about 1 dB below the 80 dB target it
was found for. That is expected if the original search truncated in a slightly
different way or used a different stimulus. The testbenches therefore require
only that each configuration comes within 2 dB of 80 dB.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/nuwl_pkg.sv tb/tb_fir_ref_pkg.sv tb/tb_nuwl_fir.sv \
        --top-module tb_nuwl_fir -o sim
    ./obj_dir/sim

Swap in `tb_nuwl_fir_modes`, `tb_fxp_quantize`, `tb_nuwl_delay`, `tb_tap_mult`
or `tb_tap_add` as the top to run the others. Each one finishes in well under a
second.

## Files

- `rtl/nuwl_pkg.sv`: formats, quantisation-mode enum, coefficients, the four
  wordlength tables
- `rtl/fxp_quantize.sv`: fwl conversion (truncate, round with saturation, widen)
- `rtl/nuwl_delay.sv`: one delay register with its input quantiser
- `rtl/tap_mult.sv`: full-precision multiplier
- `rtl/tap_add.sv`: aligning adder
- `rtl/nuwl_fir.sv`: the filter (top)
- `tb/`: the testbenches above, `tb_fir_ref_pkg.sv` (reference model) and
  `tb_fir_lane.sv` (one configuration lane for `tb_nuwl_fir_modes`)
