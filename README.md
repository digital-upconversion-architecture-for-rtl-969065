# QAM-16 modulator with digital upconversion by coefficient rotation

This is a digital QAM-16 transmitter. It produces a modulated carrier at an
intermediate frequency (IF) of 48 MHz directly in logic, sampled at 108 MHz
and ready for a 10-bit D/A converter. Analog IF stages usually do this job,
and a digital design usually needs an oscillator and a complex mixer running
at the full sample rate. This design avoids both. The mixing is folded into
the coefficients of the interpolation filters, so the only multipliers are
constant multipliers working at a fraction of the output rate.

The data path carries symbols at 3 MBd (12 Mbit/s). It applies
root-raised-cosine pulse shaping, interpolates ninefold in two threefold
stages, shifts the spectrum to 4/9 of the sample rate, keeps the real part and
pre-compensates the D/A converter's sample-and-hold droop.

## Rates and the frequency plan

Everything is tied to f_N = 1.5 MHz (half the symbol rate):

| point in the chain                        | rate          | MHz  | samples per symbol |
|-------------------------------------------|---------------|------|--------------------|
| symbols, QAM-16 levels                    | f_sym = 2 f_N | 3    | 1                  |
| pulse shaper output, first stage input    | 8 f_N         | 12   | 4                  |
| first stage output, second stage input    | 24 f_N        | 36   | 12                 |
| second stage output, x/sin(x), DAC        | 72 f_N = f_s  | 108  | 36                 |

The carrier is at 16 f_sym = 48 MHz = 4/9 f_s. The modulated band is
(1 + rolloff) f_sym wide, which is 4 MHz here. It therefore sits between
15.33 and 16.67 f_sym, safely below f_s/2 = 18 f_sym. The analog SAW
bandpass that follows the DAC removes the alias images. These lie at
multiples of 4 f_sym from the carrier, and at the mirror 20 f_sym = 60 MHz.

## Why rotated coefficients replace the mixer

Call x(n) = i(n) + j q(n) the complex baseband stream at 8 f_N. A
conventional upconverter zero-stuffs it by 9, filters it with an
interpolation filter g(k), and multiplies the result by the phasor
exp(j 2 pi 4 t / 9). Write the filter output at time t, then multiply it by
the phasor:

    y(t) exp(j w t) = sum_k g(k) exp(j w k) * x_up(t - k) exp(j w (t - k)),   w = 2 pi 4/9

x_up is non-zero only where t - k is a multiple of 9. Since 9 w is a whole
number of turns, the last factor is 1 wherever it matters. So mixing after the
filter is the same as filtering with the rotated impulse response
g(k) exp(j w k). No oscillator and no multiplier on the signal path remain.

The interpolator is built as two threefold stages with the same 12-tap
lowpass h(i), that is g(z) = H(z) H(z^3). The rotation splits over the two
stages:

* **First stage H1**: h(i) rotated by exp(j 2 pi 3 i / 9). This is 4/3 of a
  turn per tap at the higher rate, which is the same as 1/3 of a turn.
* **Second stage H2**: h(i) rotated by exp(j 2 pi 4 i / 9).

The rotated coefficients are complex, so the first stage must process I and Q
jointly: complex input, complex output, four real products per tap, 48 in
all. The second stage only has to deliver the real part, so it needs two
products per tap, 24 in all. These 72 constant multiplications replace the
24 of two real interpolators plus a full-rate complex mixer. In exchange, no
multiplier runs at the full rate. The 48 first-stage products see new data
at 8 f_N, and the 24 second-stage products see new data at 24 f_N.

`tb_upconv_top` checks this equivalence numerically. It compares the
second-stage output with a floating-point interpolate-then-mix model. The
difference is 0.52 LSB rms, and at most 1.9 LSB, which is 10-bit rounding.

## The two rotated interpolation stages (`h1_interp`, `h2_interp`)

Both stages are three-branch polyphase filters. Branch p (p = 0, 1, 2)
holds taps p, p+3, p+6, p+9 and works on a 4-deep delay line of input
samples. The branch sums use the incoming sample and three stored ones. They
are registered when the sample is taken, so the multipliers and adders have a
whole input period to settle: 9 master cycles in H1 and 3 in H2. A commutator
register steps through the branch registers on the output enable, so one
input gives three outputs: output 3n + p comes from branch p. Only the
commutator runs at the output rate. The pulse shaper is built the same way,
with four branches.

In `h1_interp` two commutators run in step, one for the real and one for the
imaginary results. `h2_interp` has one commutator and forms only
Re{g x} = g_re x_re - g_im x_im.

Coefficients are computed when the design is elaborated (`upconv_pkg`). The
formula is round(3 * h(i) * exp(j 2 pi R i / 9) * 2^9), with R = 3 for H1
and R = 4 for H2. They are signed 10-bit words with 9 fraction bits. The
factor 3 makes up for the amplitude lost to zero-stuffing, so each stage has
unity gain in its passband. The prototype is symmetric:

| i, 11-i | h(i)      |
|---------|-----------|
| 0, 11   | -0.01333  |
| 1, 10   | -0.02573  |
| 2, 9    | -0.007119 |
| 3, 8    | 0.07181   |
| 4, 7    | 0.1915    |
| 5, 6    | 0.2848    |

The resulting integer coefficients (real, imaginary) are:

| i  | H1 (R = 3)  | H2 (R = 4)  |
|----|-------------|-------------|
| 0  | -20, 0      | -20, 0      |
| 1  | 20, -34     | 37, -14     |
| 2  | 5, 9        | -8, 7       |
| 3  | 110, 0      | -55, 96     |
| 4  | -147, 255   | 51, -290    |
| 5  | -219, -379  | 76, 431     |
| 6  | 437, 0      | -219, -379  |
| 7  | -147, 255   | 225, 189    |
| 8  | -55, -96    | -104, -38   |
| 9  | -11, 0      | -11, 0      |
| 10 | 20, -34     | 37, -14     |
| 11 | 10, 18      | -16, 13     |

Each branch sum is kept at full precision (32-bit accumulator). It is then
rounded half up by 9 bits and saturated to 10 bits; a `sat` output pulses
when a value is clipped.

Convention: the complex sample is i + jq, and the transmitted signal is
Re{(i + jq) exp(+j w t)} = i cos(w t) - q sin(w t). This differs from the
classical block diagram (I*cos + Q*sin) only in the sign of Q.

## Clocking and the single-rate test mode (`rate_gen`)

There is a single clock, the 108 MHz master clock. `rate_gen` counts modulo
36 and issues one-cycle enables:

* `ce_24fn` every 3rd cycle;
* `ce_8fn` every 9th cycle;
* `ce_sym` every 36th cycle.

All three are high together on the symbol cycle. Each filter section takes a
new input on its input enable and steps its commutator on its output enable.
Every input-enable cycle is also an output-enable cycle, and an assertion in
each filter checks this. On that cycle the commutator emits the last branch
of the previous sample and restarts at branch 0, so the branches stay aligned
without extra state.

`test_bypass = 1` is a test mode that holds every enable high, so every
register in every section is clocked on every master cycle. This is the
single-rate clocking that scan testing of a multirate circuit needs. The
output is then not a valid modulation. After bypass is released, the
commutators realign within one input period. Deriving the slower rates as
enables rather than as divided clocks is this implementation's choice.

## Front end: mapper and pulse shaping

* `qam16_mapper` (combinational) splits a 4-bit symbol into two Gray-coded
  halves: bits [3:2] give I and bits [1:0] give Q. The mapping is
  00 → -3, 01 → -1, 11 → +1, 10 → +3.
* `pulse_shaper` (one instance each for I and Q) is a root-raised-cosine FIR
  with rolloff 1/3 at 4 samples per symbol. The rolloff matches a 2 MHz
  one-sided input bandwidth. The filter has 33 taps, spanning 8 symbols and
  centred on tap 16. It is organised as 4 polyphase branches of 9 taps, the
  last 3 taps being zero. Coefficients are round(511 * rrc(t) / rrc(0)),
  computed at elaboration. The output is the sum divided by 8, rounded and
  saturated to 10 bits. An outer symbol (level 3) peaks at 192, which leaves
  headroom for the I/Q combination (√2) and the x/sin(x) gain (1.43). In
  random QAM-16 traffic no section clips.

## x/sin(x) correction (`sinc_comp`)

The DAC holds each sample for a full period, which attenuates the 48 MHz
carrier by sinc(4/9), about 3 dB. The correction filter is
y(n) = (-9 x(n) + 6 x(n-1) - 9 x(n-2)) / 16. Its gain is 6/16 - 18/16 cos(2 pi f/f_s),
which rises from 1.349 to 1.483 across the signal band (15/36 to 17/36 f_s).
The ideal inverse droop there is 1.355 to 1.489. The filter is symmetric and
therefore linear phase. It is the only section doing arithmetic on every
master cycle.

## Top level (`upconv_top`)

| port          | dir | width | meaning                                                        |
|---------------|-----|-------|----------------------------------------------------------------|
| `clk`         | in  | 1     | 108 MHz master clock                                           |
| `rst_n`       | in  | 1     | asynchronous active-low reset                                  |
| `test_bypass` | in  | 1     | single-rate clocking for scan test                             |
| `sym_in`      | in  | 4     | QAM-16 symbol, taken on cycles where `sym_take` is 1           |
| `sym_take`    | out | 1     | one cycle in 36: `sym_in` is sampled at this clock edge        |
| `dac_data`    | out | 10    | two's complement IF sample, new on every cycle                 |
| `sat_any`     | out | 1     | some section clipped a sample                                  |

Latency: a symbol sampled at the edge of cycle 0 first shows in `dac_data`
after the edge of cycle 26. Each filter stage adds one output period, and
there are hand-over registers between the sections.

Synthesised without the DAC (yosys coarse synthesis), the top is about
455 word-level cells and 451 flip-flop bits. The constant multipliers appear
as multiplier cells, which a gate-level flow would reduce to shift-and-add.

## What is this design's own choice

These parts follow the reference architecture:

* the rates;
* the carrier at 4/9 f_s;
* the two-stage structure;
* the 12-tap prototype and both rotations;
* the multiplication counts;
* the 10-bit data words;
* the 4-fold RRC pulse shaping;
* the x/sin(x) filter at the full rate;
* the bypass for single-rate test clocking.

These choices are this implementation's own:

* the QAM-16 bit mapping;
* the RRC rolloff, span and scaling;
* the x/sin(x) coefficients;
* the coefficient word length and the factor-3 gain;
* rounding and saturation;
* enable-based clocking;
* reset behaviour;
* the `sat` outputs.

Not included:

* the D/A converter and SAW filter, which are analog; `dac_data` is the
  converter's input word;
* scan chains, which a synthesis flow inserts;
* the conventional alternative of a modulo-9 phase counter, sine/cosine table
  and full-rate complex multiplier, which this architecture replaces.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference models in
`tb/upconv_ref_pkg.sv` recompute every coefficient from its formula. They
filter the plain way: zero-stuff, then convolve with the whole impulse
response. This checks the polyphase split, the commutator order and the
latency bit for bit.

* `tb_rate_gen`: enable periods, alignment, bypass, resumption.
* `tb_qam16_mapper`: all 16 symbols.
* `tb_pulse_shaper`, `tb_h1_interp`, `tb_h2_interp`, `tb_sinc_comp`: random
  and full-scale data checked bit-exact, so clipping is exercised. They also
  check tone behaviour:
  * DC into H1 gives a tone at 1/3 of its output rate;
  * a 1/3-rate tone into H2 gives the 4/9 f_s carrier;
  * the x/sin(x) gain at the carrier is 1.433.
* `tb_upconv_top`, which uses the default sizes and runs in under a second:
  * 320 random symbols, bit-exact against the full reference chain at
    26 cycles latency;
  * signal band against the alias bands at 4, 8 and 12 f_sym: 48.3, 47.0
    and 42.5 dB (the floating-point filter is specified at about 45 dB);
  * constant-symbol carrier amplitude 365 and purity;
  * the interpolate-then-mix equivalence above;
  * every commutator position used;
  * one symbol per 36 cycles;
  * the bypass mode.

To simulate with Verilator 5 (from the directory holding `rtl/` and `tb/`):

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/upconv_pkg.sv tb/upconv_ref_pkg.sv tb/tb_upconv_top.sv --top tb_upconv_top
    ./obj_dir/Vtb_upconv_top

Replace `tb_upconv_top` with any other testbench name to run that one.

## Changing it

* Word lengths, coefficient scaling, RRC parameters and the x/sin(x) taps are
  constants in `rtl/upconv_pkg.sv`. The testbench reference package holds its
  own copies of the formulas and must be changed along with them.
* `rate_gen` takes the symbol divider as a parameter, which must be a
  multiple of 12.
* The pulse shaper's phase count and taps per phase are parameters.
* The rotations (`H1_ROT`, `H2_ROT`) encode the carrier at 4/9 f_s. Another
  carrier k/9 f_s would use rotations k and 3k mod 9.
