# Kaiser-window FIR filters in folded direct form, with frequency-selective signal gates

A finite impulse response (FIR) filter forms each output as a weighted sum of the last
N+1 input samples, y(n) = h(0)x(n) + h(1)x(n-1) + ... + h(N)x(n-N). When the weights
come from a windowed ideal response they are symmetric, h(k) = h(N-k), and the filter has
linear phase. This RTL exploits that symmetry: each pair of samples that shares a weight is
added before the multiplication, so an order-N filter (N+1 taps, N = 2M) needs only

* N delay stages (the sample history),
* N adders (M to fold the sample pairs, M to sum the products),
* M+1 multipliers.

Four such filters are provided, a lowpass, a highpass, a bandpass and a bandstop, each 37
taps long (N = 36, M = 18). They are designed with a Kaiser window for 60 dB of stopband
attenuation at a sample rate of 4096 Hz.

The design has a second, independent part. It is a set of four frequency-selective gates
for a one-bit square wave. Each gate measures the frequency of its input and passes the
waveform only when that frequency is in the gate's band: below 50 MHz, above 100 MHz,
between 50 and 100 MHz, or outside 50 to 100 MHz. The reference clock is 200 MHz.

## Files

| file | contents |
|---|---|
| `rtl/fir_pkg.sv` | sizes, the `filter_type_e` enum, the four coefficient tables |
| `rtl/delay_ram.sv` | one stage of the delay line |
| `rtl/byte_adder.sv` | signed two-input adder (pre-adders and adder tree) |
| `rtl/nibble_multiplier.sv` | signed multiplier built from 4-bit coefficient digits |
| `rtl/fir_direct_form.sv` | the folded direct-form filter |
| `rtl/freq_gate.sv` | one frequency-selective gate |
| `rtl/fir_fpga_top.sv` | top: four filters and four gates side by side |
| `tb/tb_*.sv` | one self-checking testbench per module, `tb_fir_fpga_top` end to end |

## The folded direct-form filter (`fir_direct_form`)

```
 x_in ──┬──[delay_ram]──┬──[delay_ram]── ... ──[delay_ram]──┐  x(n-N)
  x(n)  │         x(n-1)│                                   │
        │               │      taps k and N-k               │
        └──────►(+)◄────┼───────────────────────────────────┘   M pre-adders (byte_adder)
                 │      └────►(+)◄──── x(n-N+1) ...             + centre tap x(n-M)
               [× h0]        [× h1]   ...   [× hM]              M+1 nibble_multipliers
                 └─────(+)─────┘     ...                        M-adder binary tree
                        ...                                     (byte_adder)
                        (+) ──► [register] ──► y_out            one clock after x_valid
```

* **Delay line.** `tap[0]` is the current input x(n). The 36 `delay_ram` stages hold
  x(n-1) to x(n-36). They shift only in cycles with `x_valid = 1`, so samples may arrive
  at any rate up to one per clock.
* **Folding.** For k = 0..17, `pre[k] = x(n-k) + x(n-36+k)`, and `pre[18]` is the centre
  tap x(n-18). The pre-sums are 9 bits wide, one bit more than the samples.
* **Multipliers.** `pre[k] * h(k)` for k = 0..18. `nibble_multiplier` splits the
  coefficient into 4-bit digits. It multiplies the sample by each digit and adds the
  shifted partial products. The top digit is taken as signed, so the product is the exact
  two's-complement product. Each product is 25 bits.
* **Adder tree.** The 19 products are the leaves of a heap-ordered binary tree:
  node i adds nodes 2i+1 and 2i+2, so there are 18 adders. Every node is
  `ACC_W = 8 + 1 + 16 + clog2(19) = 30` bits wide. The sum is exact and cannot
  overflow for any input.
* **Timing.** The whole sum is combinational from the delay line to one output register.
  `y_out`/`y_valid` appear on the clock edge after the edge that accepted the sample, so
  the latency is one clock and the throughput is one sample per clock. The long
  combinational path (a 25-bit multiply and five tree levels) sets the clock rate. If a
  faster clock is needed, register the products or the tree levels; the valid strobe
  would then need the same delay.
* **Format.** Samples are signed 8-bit integers. Coefficients are signed Q1.15. `y_out`
  therefore has 15 fraction bits: y = y_out / 32768, with no rounding and no saturation.
* **Reset.** `reset` is asynchronous and active high. It clears the sample history and
  the output register.

Setting `FOLDED = 0` builds the unfolded direct form instead: one multiplier per tap
(37), fed straight from the delay line, and a 36-adder tree. The outputs are bit-for-bit
the same; the folded form saves 18 multipliers.

`TAPS`, `DATA_W`, `COEF_W`, `COEFS` and `FOLDED` are parameters. `TAPS` must be odd,
and `COEFS` must hold the (TAPS+1)/2 coefficients h(0) to h(M), with the centre tap last.

## Coefficients (`fir_pkg`)

The coefficients come from the Kaiser-Bessel window method. The values used are
Att = 60 dB, Fs = 4096 Hz, length 37 and Np = 18:

```
alpha   = 0.1102 * (Att - 8.7)                      (for Att >= 50 dB; = 5.653)
A(0)    = 2 (Fb - Fa) / Fs
A(j)    = (sin(2 pi j Fb / Fs) - sin(2 pi j Fa / Fs)) / (pi j),        j = 1..Np
          bandstop: A(0) = 1 - 2 (Fb - Fa) / Fs and A(j) negated
h(Np±j) = A(j) * I0(alpha * sqrt(1 - (j/Np)^2)) / I0(alpha)
```

Here I0 is the zeroth-order modified Bessel function of the first kind. Each h is rounded
to the nearest multiple of 2^-15. The band edges are:

| filter | Fa (Hz) | Fb (Hz) | centre tap h(18) |
|---|---|---|---|
| lowpass  | 0   | 512  | 0.25  |
| highpass | 410 | 2048 | 0.800 |
| bandpass | 512 | 1024 | 0.25  |
| bandstop | 450 | 1050 | 0.707 |

The highpass and bandstop edges are the published design values, and so are the length,
Fs and attenuation. The lowpass and bandpass edges are this design's choice. They are the
50 MHz and 100 MHz band edges of a 200 MHz system, mapped onto the same Fs/2 = 2048 Hz.
The transition band is about ±206 Hz around each edge. For the measured gains of the
built filters, see "Verification" below.

## Frequency-selective gates (`freq_gate`)

Each gate has the ports `clk` (reference), `clk1` (the square wave under test) and
`reset`, and one output that is either a copy of `clk1` or held low. Its generics are
`MAXFREQ = 200`, `LOWFREQ = 50` and `HIGHFREQ = 100`, in MHz.

How it measures:

1. A 32-bit counter clocked by `clk1` counts its rising edges. The counter is also kept
   in Gray code.
2. Two flip-flops in the `clk` domain synchronize the Gray count, which is then converted
   back to binary. Only one bit of a Gray count changes per edge, so a sample taken
   during a change is off by at most one.
3. A window counter ends a window every `MAXFREQ` clocks. That is 1 µs when `clk` runs
   at `MAXFREQ` MHz. At each window end a subtractor forms the number of edges in the
   window, which is the frequency in MHz. Two less-than comparators then apply the rule
   of the gate type (`FTYPE`):

   | `FTYPE` | passes when |
   |---|---|
   | `FT_LOWPASS`  | f < 50 |
   | `FT_HIGHPASS` | f > 100 |
   | `FT_BANDPASS` | 50 < f < 100 |
   | `FT_BANDSTOP` | not (50 < f < 100) |

4. The decision is carried back into the `clk1` domain by two flip-flops on the
   *falling* edge of `clk1`. The AND gate that forms `sig_out = clk1 & enable` can
   therefore only switch while `clk1` is low, so the output never has runt pulses.

Timing and limits:

* The gate is closed from reset until the first window ends, `MAXFREQ` clocks later.
  After that the decision is updated every `MAXFREQ` clocks.
* The output follows a change of frequency within one to two windows, plus two `clk1`
  periods.
* The count can be off by one or two edges because of the synchronizer. Frequencies
  within about 2 MHz of a band edge may therefore be classified either way.
* Because `clk1` is counted in its own domain, it may be faster than `clk`; only the
  counter's timing limits the rate.
* If `clk1` stops while high, the output keeps its last gate state.

## Top level (`fir_fpga_top`)

The four filters share `x_in`/`x_valid` and drive `y_lowpass`, `y_highpass`,
`y_bandpass`, `y_bandstop` and a common `y_valid`. The four gates share `clk1` and drive
`lowpass`, `highpass`, `bandpass` and `bandreject`. They also drive `in_band[3:0]` (the
four decisions, in that order) and `clk1_mhz` (the count of the last window). Both parts
use `clk` and `reset`. For the gate thresholds to mean MHz, `clk` must run at 200 MHz.
The filters do not care about the clock rate; their "4096 Hz" is simply the rate at which
`x_valid` is pulsed.

## Where this design departs from the published one

* **Folded filter.** The published block diagram draws one multiplier per tap, fed
  straight from the delay line, and no pre-adders. Its text counts N registers, N adders
  and M+1 multipliers, which only the folded form achieves. The folded form is the
  default, and the drawn form is available as `FOLDED = 0`.
* **Filter length.** The block diagram is drawn for 54 coefficients (h(0)..h(53)), but
  every filter that was designed has 37 taps. The default here is 37.
* **Widths.** The word lengths are this design's choice. The block names (nibble
  multiplier, byte adder) suggest 4 and 8 bits, but 4-bit coefficients would zero most of
  the weights. Here samples are 8 bits, coefficients 16 bits, and the arithmetic is exact.
* **Lowpass and bandpass coefficients.** These two filters use the band-edge mapping
  described above. They may differ from the coefficients of the original implementation.
* **Gates.** The published implementation has this port set and generics. It uses a
  32-bit clk1 counter, one 32-bit adder, two 32-bit comparators and a latch, but the
  method is not described. The measurement window, the Gray-code crossing, the
  flip-flop in place of the latch and the glitch-free output gating are this design's
  own.
* **Combined top.** The original builds each filter type (lowpass, highpass, bandpass,
  band reject) as a separate design. Here all of them are instances in one top.
* **Converters.** Analog-to-digital and digital-to-analog converters around the filter
  are not part of the RTL. The filter's input and output are digital words.

## Verification

Every module has a self-checking testbench that prints
`TB_RESULT checks=<n> failures=<n>`:

* `tb_delay_ram`: load/hold against a reference register, asynchronous clear.
* `tb_byte_adder`: 8- and 30-bit instances against integer sums, including extremes.
* `tb_nibble_multiplier`: 9×16 and 4×4 instances against integer products, including
  the most negative values.
* `tb_fir_direct_form`: folded lowpass and highpass instances and an unfolded bandstop
  instance, against a 37-tap convolution computed in the testbench. It covers the
  impulse response, full-scale steps and alternating inputs, and random samples with
  random idle cycles. It also checks one-clock latency.
* `tb_freq_gate`: all four gate types at 20, 62.5, 80, 125 and 40 MHz. It checks the
  measured count, the decision, the number of output edges, and that decisions change
  only at window ends.
* `tb_fir_fpga_top`: the whole design at its default parameters. The testbench designs
  the four filters itself from the formulas above, using its own Bessel function. It then
  checks:
  * each filter's impulse response;
  * every output sample against the exact convolution, for sampled tones at 128, 768 and
    1600 Hz with random idle cycles;
  * passband and stopband gain. The measured peak gains are 0.998–1.0015 in the
    passbands and at most 0.0046 (−47 dB) in the stopbands at these tone frequencies,
    with 8-bit input quantization included;
  * each gate output at 20, 80 and 125 MHz.

  It fails if any filter never passed or never stopped a tone, if any gate never passed
  or never blocked, or if the sample stream never had an idle cycle.

## Simulating with Verilator

From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
    rtl/fir_pkg.sv tb/tb_fir_fpga_top.sv --top-module tb_fir_fpga_top
./obj_dir/Vtb_fir_fpga_top
```

Replace `tb_fir_fpga_top` with any other testbench name to run it. Each run takes well
under a second.

To use other filters, compute (TAPS+1)/2 coefficients with the formulas above, round them
to Q1.15 and pass them as `COEFS`, setting `TAPS` to match. To retarget the gates, set
`MAXFREQ` to the reference clock in MHz and `LOWFREQ`/`HIGHFREQ` to the band edges.
