# Dynamic stochastic computing: a one-bit-per-sample DSP datapath

Stochastic computing (SC) represents a number by the fraction of ones in a
random bit stream. Arithmetic then becomes trivial: an AND gate multiplies two
independent streams, a multiplexer forms a weighted sum. The price is time: to
represent one number to 5-bit accuracy, a conventional SC circuit must process
about 2^5 = 32 bits, so it needs 32 clocks per result.

*Dynamic* stochastic computing (DSC) removes that price for signals. Instead of
spending many bits on one value, every sample of an oversampled signal is
encoded by a single random bit whose probability of being 1 is the sample
value. The resulting bit stream, a *dynamic stochastic sequence* (DSS), has a
time-varying density that follows the signal. The same single-gate SC circuits
act on it sample by sample, and a small tracking counter turns the output
stream back into a multi-bit signal. One result leaves the circuit every clock.

This repository holds synthesizable SystemVerilog for such a system with its
two example applications:

* a **frequency mixer**, which multiplies two signals with one AND gate, and
* a **function estimator**, which evaluates a Bernstein polynomial of a signal,
  f(x(t)), with an adder and a 4-input multiplexer.

## Signal chain

```
  W-bit samples ─► DSNG (comparator) ─► DSS bits ─► SC circuit ─► DSS bit ─► ADDIE ─► N-bit signal
                        ▲                                                    ▲
                        └──────────── shared Sobol generator ────────────────┘
```

Every box processes one sample per clock. No bit stream is stored anywhere.

| block | file | role |
|---|---|---|
| Sobol generator | `rtl/sobol_rng.sv` | one quasi-random number per dimension per clock |
| DSNG | `rtl/dsng.sv` | comparator: bit = (rn < sample) |
| stochastic multiplier | `rtl/sc_mult.sv` | AND (unipolar) or XNOR (bipolar) |
| Bernstein multiplexing circuit | `rtl/bernstein_mux.sv` | adder of ORDER bits selects one of ORDER+1 coefficient bits |
| ADDIE | `rtl/addie.sv` | saturating up/down counter with its own comparator; reconstructs the signal |
| frequency mixer | `rtl/dsc_mixer.sv` | Sobol + 2 DSNGs + AND + 5-bit ADDIE |
| function estimator | `rtl/dsc_func_est.sv` | Sobol + 3 DSNGs + coefficient SNGs + multiplexing circuit + 6-bit ADDIE |
| system top | `rtl/dsc_top.sv` | both applications side by side, separate ports |
| shared constants | `rtl/dsc_pkg.sv` | Sobol polynomial table and direction-number function |

## Encoding: DSNG and the Sobol generator

A DSNG is only a comparator. With a sample `x` given as an unsigned W-bit
fraction `x / 2^W` and a random number `rn` uniform over the same range, the
bit `rn < x` is 1 with probability `x / 2^W`. A new sample and a new random
number each clock give the DSS: bit k has expectation x(kT).

Two streams that are combined by a gate must be statistically independent,
so each stream that must be independent gets its own random number. They all
come from one Sobol low-discrepancy generator with several dimensions: one
dimension per independent stream. Sobol numbers spread more evenly than LFSR
numbers, which lowers the encoding noise. The generator (`sobol_rng`) uses
Gray-code ordering: each step XORs one direction number into the current
point, the one indexed by the number of trailing ones of the step counter.
The direction numbers come from the primitive polynomials and initial values
of the Joe–Kuo table for dimensions 1 to 8 (`dsc_pkg.sv`). They are computed at
elaboration time with the usual recurrence
`m_k = 2a_1 m_{k-1} ^ 4a_2 m_{k-2} ^ … ^ 2^s m_{k-s} ^ m_{k-s}`,
`v_j = m_{j+1} << (RW-1-j)`. After 2^RW points the sequence restarts at 0.
Comparators of width W use the top W bits of the RW-bit numbers.

**Bipolar signals.** For values in [-1, 1) the linear mapping p = (x + 1)/2 is
used. With `BIPOLAR = 1` a DSNG takes a two's-complement sample and inverts
its sign bit, which is exactly that mapping. The multiplier then becomes an
XNOR gate, and the ADDIE gives its result in two's complement. The
top instantiates the unipolar form.

## Reconstruction: the ADDIE

The ADDIE (adaptive digital element) is the part that needs the most care.
It holds an N-bit counter `Y`. An internal comparator draws the bit
`Z = (rn < Y)`, which is 1 with probability `Y / 2^N`, so `Z` is a stochastic
copy of the counter's own value. Each clock the counter moves by the
difference between the input bit and that copy:

```
Y[i+1] = Y[i] + X[i] - Z[i]
```

In expectation, `E[Y[i+1]] = (1 - 2^-N) Y[i] + E[X[i]]`. Unrolled, the output
`y = Y / 2^N` is an exponentially weighted average of past input bits. The
weights fall by a factor (1 - 2^-N) per sample. So the ADDIE is a first-order
low-pass filter with a time constant of about 2^N samples, and **N is a design
decision, not only a precision**:

* a small N follows the signal quickly but leaves much random noise;
* a large N averages better but attenuates and delays the signal if its
  frequency is not far below `fs / 2^N`.

The defaults here are N = 5 for the mixer and N = 6 for the estimator, with
sampling rates of 2^12 to 2^16 samples per second of signal. That means
roughly 100 to 10,000 times oversampling of signals of a few Hz.

Details of this implementation:

* The counter resets to 0. A signal that does not start near 0 therefore
  shows a **warm-up**: the counter needs some multiple of 2^N clocks to catch
  up. This is about 256 samples for the estimator, whose input starts at f = 1.
* The counter cannot underflow, because `Z = 0` whenever `Y = 0`. It can
  overflow, when `Y = 2^N - 1`, `X = 1` and the random number happens to be
  the largest value. Then it **saturates** rather than wrapping.
* Its random number comes from a port, so the shared Sobol generator supplies
  it through a dimension of its own.

## Frequency mixer (`dsc_mixer`)

Two W-bit sample streams `x_s`, `y_s` are encoded by two DSNGs on Sobol
dimensions 1 and 2. An AND gate gives a DSS whose bit k has expectation
x(kT)·y(kT). A 5-bit ADDIE on dimension 3 reconstructs the product. A product
of two sinusoids contains their sum and difference frequencies, so this is a
mixer.

## Function estimator (`dsc_func_est`)

The multiplexing circuit evaluates a Bernstein polynomial of order n = 3:

```
E[out] = Σ_{i=0..3} b_i · C(3,i) x^i (1-x)^(3-i)
```

Three DSNGs encode the same sample three times, on independent Sobol
dimensions. The number of ones among the three bits is binomially distributed
and selects coefficient stream `b_i`. Fed a DSS of x(t), the output is a DSS
of f(x(t)). The coefficients are run-time inputs `coef[i]`. Each is a (W+1)-bit
fraction of 2^W, so that 0 and 1 can be given exactly. Each coefficient has its
own comparator (a conventional SNG). All of them may share one Sobol
dimension, because only one coefficient bit is passed in any clock.

Example: `coef = {0, 47, 116, 256}`, that is b = {0, 2/11, 5/11, 1}, gives
`f(x) = (2x^3 + 3x^2 + 6x) / 11`. For `x(t) = exp(-2t)` the output follows
`(2e^-6t + 3e^-4t + 6e^-2t) / 11`.

## Interface and timing

Both datapaths use the same timing:

* `in_valid` high: the sample on the input is consumed at the next rising
  edge. The Sobol generator advances and the ADDIE counter updates.
* The DSS bits (`*_dss`, `sel`) are combinational functions of the current
  sample and the current random numbers.
* The reconstructed output (`z_rec`, `f_rec`) and `out_valid` change at that
  edge. That is one clock of latency, with one result per clock and no
  backpressure.
* `in_valid` low: everything holds.
* Reset `rst_n` is asynchronous and active low. It sets the Sobol generators
  to point 0 and the counters to 0.

## Accuracy achieved

Testbench results at the default sizes. Each runs one second of signal, and
SNR = 10 log10(Σ target² / Σ error²):

| workload | sampling | ADDIE | SNR here | published value |
|---|---|---|---|---|
| mixer, 1 Hz × 6 Hz sinusoids in [0,1] | 2^14 Hz | 5 bit | 22.5 dB | 22.6 dB |
| mixer, 1 Hz × 6 Hz | 2^16 Hz | 5 bit | 23.7 dB | 24.2 dB |
| estimator, x = e^-2t | 2^12 Hz | 6 bit | 22.3 dB | 23.6 dB |
| estimator, x = e^-2t | 2^16 Hz | 6 bit | 24.1 dB | 26.6 dB |
| mixer, 0.5 Hz × 3 Hz, 2 s | 2^14 Hz | 5 bit | 23.5 dB | – |
| mixer, 1 Hz sinusoid times itself | 2^14 Hz | 5 bit | 26.4 dB | – |

The estimator figures exclude the first 256 samples (warm-up). The published
values are those reported for the same circuits when DSC was introduced. The
observation window and input quantization behind them are not known, which
probably explains the 1–2.5 dB gap for the estimator.

Squaring works because the two inputs are encoded with different Sobol
dimensions. The two DSSs of the same signal are then independent, and the AND
gate gives x² rather than x. A delta-sigma modulator, the other common
one-bit encoding, is deterministic: it would turn the same signal into two
identical streams, and the AND gate would return x itself.

## Choices made in this implementation

These points are not fixed by the circuit idea and were chosen here:

* 8-bit input samples (`W`) and a 16-bit Sobol generator (`RW`).
* The Sobol direction-number table (Joe–Kuo), Gray-code order, and restart
  after 2^RW points.
* One Sobol dimension per independent stream. The coefficient SNGs share one.
* Unipolar operation in the top. Bipolar is a parameter of the mixer and of
  its parts.
* The "accumulator" of the multiplexing circuit is a combinational adder of
  the current bits.
* Coefficients of the estimator are run-time inputs.
* The ADDIE resets to 0 and saturates.
* The `in_valid`/`out_valid` handshake with a latency of one clock.
* The two applications are independent datapaths, each with its own Sobol
  generator.

Not included: the analog-to-digital converter or sample memory that supplies
the input samples. The conventional-SC and fixed-width binary circuits that
DSC is usually compared with are also not included.

## Simulating

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<m>`. Example, for the full system at its
default parameters:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dsc_pkg.sv tb/tb_dsc_top.sv --top-module tb_dsc_top -o sim
./obj_dir/sim
```

Verilator finds the other modules in `rtl/` through `-Irtl`. The package
must be listed first. Testbenches:

* `tb_sobol_rng`: points against bit-reversed Gray code and published first
  points, permutation per dimension, and the (0,m,2)-net property of
  dimensions 1–2.
* `tb_dsng`: exhaustive check, unipolar and bipolar.
* `tb_sc_mult`: exhaustive check plus statistical products.
* `tb_bernstein_mux`: exhaustive check plus the density of f(0.6).
* `tb_addie`: cycle-by-cycle model, saturation, and tracking of a constant
  density.
* `tb_dsc_mixer`, `tb_dsc_func_est`: the workloads above, checked cycle by
  cycle against a model and for SNR. The mixer bench also checks the bipolar
  mode.
* `tb_dsc_top`: both datapaths together at full size for 69,632 samples. It
  covers Sobol wrap, saturation, idle cycles, warm-up and all select values.

Every testbench finishes in well under a second.

## Changing the design

* The ADDIE width (`MIX_N`, `EST_N` at the top) trades noise against
  bandwidth. Pick about `2^N ≪ fs / f_signal`.
* `ORDER` of the estimator may be raised up to 6, with `ORDER + 2` Sobol
  dimensions (8 are tabulated). `coef` then needs `ORDER + 1` entries.
* More independent streams need more Sobol dimensions. Extend the tables in
  `dsc_pkg.sv` with further Joe–Kuo entries.
