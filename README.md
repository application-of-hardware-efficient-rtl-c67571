# Compensated CIC decimator for narrow-band filtering (decimation by 64)

A narrow-band receiver samples far faster than its signal needs. It then has to
cut the rate down by a large factor, here 64, with a clean lowpass in front of
every rate reduction. Doing that with one FIR filter running at the input
rate costs more than a thousand multipliers. This design splits the job into
three stages, so that the only filter running at the full rate is a
multiplier-free cascaded integrator-comb (CIC) filter:

```
 x, 16 bit, rate fs
   |
   v
 CIC decimator        K = 8, P = 2 sections     adders only
   |  22 bit, fs/8, gain 64
   v
 FIR compensator      52 taps, decimate by 4    polyphase
   |  22 bit, fs/32, stage gain 1 (stream still carries the 64)
   v
 FIR lowpass          51 taps, decimate by 2    polyphase, divides by 64
   |
   v
 y, 16 bit, fs/64, DC gain 1
```

A CIC filter is cheap, but its passband is not flat: its magnitude falls off
as |sin(pi f K) / (K sin(pi f))|^P. The second stage is an FIR filter whose
passband gain rises as the inverse of that droop, so the droop cancels. The
third stage sets the final passband edge and stopband. Both FIR stages run at
reduced rates and are written in polyphase form, so no product is computed
for a sample that decimation throws away.

This architecture comes from V. Awasthi and K. Raj, "Application of Hardware
Efficient CIC Compensation Filter in Narrow Band Filtering". Three things are
taken from that paper:

- the stage split 8 * 4 * 2;
- the two CIC sections;
- the cost of the chain: 103 multipliers, 105 adders, 2.42 multiplications
  and 4.63 additions per input sample.

Everything else is this design's own choice: the coefficient values, the
word widths, the rounding and saturation, and the interface. The table under
"Cost" shows how the tap counts follow from the cost figures.

## The CIC stage (`cic_decimator`)

The transfer function is H(z) = ((1 - z^-K) / (1 - z^-1))^P with K = 8 and
P = 2. In words, it is two cascaded moving sums of 8 samples, so its impulse
response is a triangle 1, 2, ..., 8, ..., 2, 1. The stage has three parts:

- **Integrators** (`cic_integrator`, P of them) run on every input sample.
  Each one is an accumulator whose register is its output. This keeps one
  adder between registers, a fully pipelined CIC.
- **Rate divider** (`rate_divider`). It counts integrator outputs and marks
  every K-th one. Only those samples reach the combs: this is the
  down-sampler. The whole design runs on one clock. The divider produces an
  enable, not a divided clock.
- **Combs** (`cic_comb`, P of them) act only on the marked samples, so they
  run at fs/8. Each one subtracts the previous marked sample from the current
  one. After decimation, the K-sample delay of the comb is a single register.

**Why the integrators may overflow.** An integrator fed a nonzero mean grows
without bound, and the design lets it wrap modulo 2^W. The result is still
exact as long as W covers the real output range. Two's-complement wrap is
arithmetic modulo 2^W, and the combs take differences modulo 2^W too. The
output range is the input range times the gain K^P = 64, so
W = 16 + P * log2(K) = 22 bits throughout. The CIC output keeps this gain of
64. The final FIR stage takes it out.

## The polyphase FIR stages (`polyphase_fir_decim`)

One parameterised module serves for both FIR stages. For decimation D and
taps h[0..L-1] it computes

    y[m] = sum_j h[j] * x[m*D + D - 1 - j]

with input samples numbered from 0 after reset. So the first output uses
inputs 0 .. D-1. The structure works as follows:

- The filter is split into D branches. Branch k holds the coefficients
  h[k], h[k+D], h[k+2D], ... and its own delay line of ceil(L/D) samples.
- An input commutator gives each valid sample to one branch, in the order
  D-1, D-2, ..., 0, and then starts again at D-1.
- Each delay line shifts once per D inputs, when its own sample arrives.
- When branch 0 has taken its sample, all L products are summed, one
  multiplier per tap.

Two pipeline registers follow:

1. a full-precision accumulator of IN_W + CW + ceil(log2 L) bits;
2. the output: round(acc / 2^SHIFT), rounding halves up, clipped to OUT_W
   bits. The `sat` output pulses with every clipped sample.

Clipping matters. A lowpass step response overshoots, so a full-scale square
wave drives both FIR stages past full scale. Without saturation such inputs
would wrap to the opposite sign.

The two instances differ in their parameters:

| instance | taps | D | in/out bits | SHIFT | coefficients |
|---|---|---|---|---|---|
| compensator | 52 | 4 | 22 / 22 | 15 | `COMP_COEF` |
| final lowpass | 51 | 2 | 22 / 16 | 15 + 6 | `FINAL_COEF` |

The extra 6 bits of shift in the final stage divide by the CIC gain 2^6.

## Coefficients (`cic_comp_pkg`)

Both sets are signed Q1.15, 16 bits wide. The centre tap of each set is
adjusted so that the taps sum to exactly 2^15, which makes every stage's DC
gain exactly 1. All frequencies below are fractions of the output Nyquist
frequency fs/128.

- **Compensator** (`COMP_COEF`, type II, symmetric). It is a weighted
  least-squares fit in two bands:
  - over 0 .. 0.3 the target is 1 / |H_CIC(f)|, with weight 50;
  - from 3.4 up to this stage's own Nyquist frequency, 8 (in the same
    units), the target is 0, with weight 1. When this stage decimates by 4,
    those frequencies fold below 0.6, into the band the final stage keeps.
- **Final lowpass** (`FINAL_COEF`, type I). It is a Parks-McClellan
  equiripple lowpass with its passband to 0.3 and its stopband from 0.6,
  with a stopband weight of 10.

At these rates the CIC droop inside the final passband is small: 0.01 dB at
0.3. The compensator removes it.

Measured response of the RTL (`tb_passband_response`, sine inputs):

| frequency (x output Nyquist) | 0.02 | 0.1 | 0.2 | 0.3 | 0.4 | 0.45 | 0.6 | 0.8 |
|---|---|---|---|---|---|---|---|---|
| CIC stage alone (dB) | -0.00 | -0.00 | -0.00 | -0.01 | -0.02 | -0.02 | -0.04 | -0.07 |
| whole chain (dB) | -0.005 | -0.026 | -0.020 | -0.033 | -3.06 | -8.17 | -56.0 | -55.4 |

The passband is flat within 0.035 dB up to 0.3. The -3 dB point is near 0.4.
The original paper reports -0.81 dB at 0.4 and -3.55 dB at 0.45. It does not
publish its coefficients, so this chain does not reproduce its exact
band edge.

To change the response, change the two arrays. The RTL does not depend on
their values, only on their lengths and on `COEF_W` and `COEF_FRAC`. Keep the
sum at 2^COEF_FRAC if the DC gain should stay at 1.

## Cost

| | count | per input sample |
|---|---|---|
| multipliers (products per output) | 52 + 51 = 103 | 52/32 + 51/64 = 2.42 |
| adders | CIC 2 + 2, FIR 51 + 50: 105 | 2 + 2/8 + 51/32 + 50/64 = 4.63 |

These totals match the published figures for this architecture. The split
of 103 taps into 52 for the /4 stage and 51 for the /2 stage is the only one
that gives both totals. As written, the RTL has one product per tap.
Synthesis removes the products whose coefficient is zero: 10 in
`COMP_COEF`, 2 in `FINAL_COEF`.

## Interface and timing (`compensated_cic_decimator`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | one clock; asynchronous active-low reset clears all state |
| `in_valid`, `in_data` | in | 1, 16 | input sample, signed. `in_valid` may be high on every clock or have gaps |
| `out_valid`, `out_data` | out | 1, 16 | output sample, one per 64 valid inputs |
| `sat` | out | 1 | pulses with `comp_valid` when a compensator sample was clipped, and with `out_valid` when an output sample was clipped |
| `cic_valid`, `cic_data` | out | 1, 22 | CIC output stream, fs/8, gain 64 |
| `comp_valid`, `comp_data` | out | 1, 22 | compensator output stream, fs/32, gain 64 |

There is no back-pressure: every stream is a valid strobe with data. Assertions in the top check that none of the three decimated
streams is valid in two consecutive clocks. The
latencies are in clock cycles, counted from the cycle in which the last
input sample needed has `in_valid` high:

| stage | output after the input of sample | latency |
|---|---|---|
| CIC | 8m + 7 | 2P = 4 |
| polyphase FIR | D*m + D - 1 (of its own input) | 3 |
| whole chain | 64m + 63 | 4 + 3 + 3 = 10 |

The chain accepts one input sample per clock. The widest combinational path
is the 52-product sum of the compensator. It is evaluated once every 32
inputs, but as written it must settle within one clock. A design that needs
a fast clock should pipeline that sum or share multipliers. Both are
possible because only one result is needed per 4 (or 2) input samples.

## Files

`rtl/`:

- `cic_comp_pkg.sv`: sizes, widths and coefficient sets.
- `cic_integrator.sv`, `cic_comb.sv`, `rate_divider.sv`, `cic_decimator.sv`:
  the CIC stage.
- `polyphase_fir_decim.sv`: the polyphase FIR decimator.
- `compensated_cic_decimator.sv`: the top level.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`, plus
`tb_passband_response.sv`. Each testbench prints
`TB_RESULT checks=N failures=M`.

- `tb_cic_integrator`, `tb_cic_comb` and `tb_rate_divider` compare against
  simple reference models, with random gaps in the valid signal and
  wrap-around.
- `tb_cic_decimator` compares against a direct convolution with the CIC
  triangle. It drives full-scale runs, so the integrators wrap and the
  output reaches +-64 times full scale. It also checks the latency.
- `tb_polyphase_fir_decim` compares three configurations against a direct
  convolution with rounding and clipping: the compensator, the final stage
  and a small 7-tap, decimate-by-3 filter that clips in both directions.
- `tb_compensated_cic_decimator` runs the full-size chain. It checks every
  sample of all three streams, the `sat` flag and the latency against a
  bit-exact convolution model. It counts integrator wraps, outputs of every
  stage, clipping events and input gaps, and requires each to occur at
  least once.
- `tb_passband_response` measures the magnitude response with sine inputs.
  It compares the result with the response computed from the quantised
  coefficients: within 0.05 dB in the passband and 0.1 dB at the band edge,
  and below -50 dB in the stopband.

To run a testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -y rtl rtl/cic_comp_pkg.sv \
    tb/tb_compensated_cic_decimator.sv --top-module tb_compensated_cic_decimator
./obj_dir/Vtb_compensated_cic_decimator
```

Replace the testbench name to run the others. Each one runs in well under a
second.

## Departures and open points

- **One clock instead of two.** A CIC is usually drawn with a clock divider
  that clocks the combs at fs/K. Here the combs use the same clock as the
  integrators, gated by the rate divider's enable.
- **Word widths.** The input precision is not fixed by the architecture;
  16 bits is a choice. The CIC width follows Hogenauer's register-growth
  rule: input bits + P log2 K.
- **Coefficients.** The coefficients, and with them the exact passband edge,
  are this design's own (see above).
- **Decimation phase.** Each decimator keeps samples D-1, 2D-1, ... counted
  from reset.
- **Other compensators.** Two other CIC compensators also appear in the
  literature on this topic, and neither is implemented here:
  - the three-tap roll-off compensator c = [-v, 1, -v] / (1 - 2v);
  - the multiplierless second-order cosine compensator v + u z^-K + v z^-2K,
    with canonical-signed-digit coefficients.

  This design uses a full FIR compensator inside a polyphase decimator.
- **Not verified.** The design has not been timed on a real technology, and
  no power figures exist for it.
