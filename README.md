# Decimation filters: CIC, FIR and polyphase stages, and a 64:1 filter chain

A 2-bit sample stream arriving at the full clock rate, such as the output of a
delta-sigma modulator, has to become a 16-bit stream at 1/64 of that rate.
Doing that with one long FIR filter at the input rate would need many
multipliers running on every clock. This design splits the job into a chain of
seven filters:

* five cascaded integrator-comb (CIC) decimators, which need no multipliers
  at all and each halve the rate,
* one short FIR filter for spectral shaping at the reduced rate,
* one long polyphase FIR decimator that halves the rate once more.

Two ideas keep the hardware small. First, the CIC stages use only adders and
subtractors, and their internal registers are just wide enough that
two's-complement wrap-around in the integrators cancels out. Second, every
decimating stage only computes the samples it keeps and reuses its arithmetic
over the clocks between two outputs. A polyphase filter with 123 taps that
decimates by 62, for example, needs only two multipliers.

Every filter is a parameterised module. The chain is one configuration of
them, and the same modules build the stand-alone filters listed under
"Configurations that have been run".

The RTL follows the filter library and filter chain described in
*Automated Hardware Design Methodology for Digital Filters With High-Level
Synthesis*. That work produced its filters with a high-level synthesis flow.
This code is a hand-written SystemVerilog rendering of the same architectures.
It is not the authors' code, and it does not reproduce their area or power
figures.

## Files

| file | contents |
|---|---|
| `rtl/filt_pkg.sv` | CIC register-width rule, coefficient-table type, elaboration-time low-pass coefficient design |
| `rtl/round_sat.sv` | output quantiser: round half up, then clip |
| `rtl/fir_filter.sv` | fully parallel direct-form FIR, optional symmetric folding |
| `rtl/polyphase_decimator.sv` | decimating FIR with shared multiply-accumulate units |
| `rtl/cic_integrator.sv` | CIC integrator section and rate counter |
| `rtl/cic_comb.sv` | CIC comb section with shared subtractors |
| `rtl/cic_decimator.sv` | complete CIC decimator (integrators, combs, rounding) |
| `rtl/filter_chain.sv` | top level: the seven-stage chain |
| `tb/*_tb.sv` | self-checking testbenches, one per module, plus `polyphase_workloads_tb` |
| `tb/tb_ref_pkg.sv` | reference arithmetic used by the testbenches |

## The chain (`filter_chain`)

| stage | type | order | decimation | in bits | out bits | sample rate at input |
|---|---|---|---|---|---|---|
| 1 | CIC | 4 | 2 | 2 | 6 | f |
| 2 | CIC | 4 | 2 | 6 | 10 | f/2 |
| 3 | CIC | 5 | 2 | 10 | 15 | f/4 |
| 4 | CIC | 8 | 2 | 15 | 23 | f/8 |
| 5 | CIC | 14 | 2 | 23 | 18 | f/16 |
| 6 | FIR | 8 | 1 | 18 | 18 | f/32 |
| 7 | polyphase | 122 | 2 | 18 | 16 | f/32 |

The output rate is f/64. Stages 1 to 4 pass on their full internal width, so
they lose nothing. Stage 5's internal width is 23 + 14 = 37 bits, and it rounds
its result to 18 bits. The stages pass samples to each other with a valid
strobe (see "Interface and timing"), so the chain needs no rate controller. A
stage simply runs whenever its predecessor hands it a sample.

Ports: `clk`, `rst_n` (asynchronous, active low), `in_valid`, `in_data[1:0]`,
`out_valid`, `out_data[15:0]` and `out_sat`. `out_sat` comes with `out_valid`
and reports that the polyphase stage clipped this sample, or that stage 5 or
the FIR stage clipped a sample since the previous output.

## Polyphase decimator: how the multipliers are shared

This is the least obvious block. The filter has `TAPS = ORDER+1`
coefficients h(k) and decimates by M. It produces only the outputs it keeps:

    y(m) = sum_k h(k) * x(mM + M - 1 - k)

Between two outputs, M input samples arrive, one per clock when the input
runs at full rate. The design therefore uses

    NMAC = ceil(TAPS / M)

multiply-accumulate units and lets each one work on every clock of the frame.
The coefficient list is padded with zeros to `NMAC*M` entries, and each tap
index is written as `k = i*M + j`, where i = 0..NMAC-1 is the unit and
j = 0..M-1 is the phase.

* A phase counter j counts down from M-1 to 0. It equals the number of samples
  still to come before the output instant.
* On every input, unit i multiplies the delay-line entry at the fixed position
  `i*M` by the coefficient `h(i*M + j)`. Position 0 is the input sample itself.
  When the sample with phase j arrives, position `i*M` holds
  `x(output instant - j - i*M)`, which is exactly the sample that pairs with
  `h(i*M + j)`.
* The NMAC products are added to an accumulator. The accumulator is cleared at
  the start of a frame. At j = 0 the sum is rounded into the output register.

Each unit is thus a multiplier whose coefficient comes through an M-input
multiplexer driven by the phase. Over one frame, unit i works through
coefficients i*M to i*M+M-1, so the units together cover every polyphase
sub-filter of the textbook structure. Some examples:

| order | M | taps (padded) | MAC units |
|---|---|---|---|
| 28 | 8 | 29 (32) | 4 |
| 123 | 62 | 124 (124) | 2 |
| 123 | 2 | 124 (124) | 62 |
| 122 (chain) | 2 | 123 (124) | 62 |

Zero padding makes the same indexing work when the tap count is not a
multiple of M. The padded coefficients are constant zeros, so synthesis
removes them.

## CIC decimator (`cic_decimator` = `cic_integrator` + `cic_comb`)

Transfer function, with N stages, decimation R and differential delay M
(default 1):

    H(z) = ((1 - z^-(R*M)) / (1 - z^-1))^N

The DC gain is (R*M)^N.

**Register width.** All integrator and comb registers have the width

    W = IN_W + ceil(N * log2(R*M))

`filt_pkg::cic_reg_width` computes it. With this width, wrap-around in the
integrators, which is certain on a long input stream, leaves the comb output
exact. Examples: N=3, R=512, 2-bit input gives 29 bits; chain stage 5 gives
37 bits.

**Integrators.** Each integrator adds the *registered* output of the one
before it, so there is never more than one adder between two registers. This
adds N-1 samples of delay and does not otherwise change the response. A counter
of valid input samples forwards every R-th value of the last integrator to a
W-bit output register.

**Combs with shared subtractors.** After decimation, a new sample reaches the
comb section at most once every R clocks. The section therefore has only
`NSUB = ceil(N/R)` subtractors by default. It processes the N comb stages
NSUB at a time, one group per clock, and finishes after `ceil(N/NSUB)` clocks.
Two examples:

* N=8, R=4: two subtractors work for four clocks.
* Chain stage 5 (N=14, R=2): seven subtractors work for two clocks.

`NSUB` is a parameter. Setting it to N gives the fully parallel comb, which is
what the evaluated order-3/R=512 filter reportedly used (three comb
subtractors). An assertion checks that no sample arrives while the comb is
still busy.

**Output.** The W-bit comb result is rounded half up to its OUT_W most
significant bits and registered. The output is therefore the CIC response
scaled by 2^-(W-OUT_W). Rounding can only overflow for the single largest
positive value, which is clipped.

**Which samples are kept.** Output m is the full-rate CIC response at input
index (m+1)R - 1 - (N-1), counting valid inputs from 0 after reset.

## FIR filter (`fir_filter`)

The FIR filter is a direct form with all taps computed in one clock. It takes
one sample and gives one output per clock, with a latency of one clock. The
coefficients are module parameters, so each product is a multiplication by a
constant, which synthesis reduces to shifts and adds. With `FOLD = 1` the
filter relies on linear-phase symmetry h(k) = h(ORDER-k). It adds each mirrored
pair of samples before the multiplication, which halves the number of
products. Elaboration stops with an error if `FOLD` is set and the
coefficients are not symmetric.

## Number formats and quantisation

FIR and polyphase samples and coefficients are signed fractions. A sample of
width w has w-1 fraction bits, and coefficients are `COEF_W = 16` bits with 15
fraction bits. A filter whose coefficients sum to 2^15 therefore has unity DC
gain, whatever its input and output widths. The full-precision sum is shifted
by `IN_W + COEF_W - 1 - OUT_W` bits. When that number is negative, as for an
18-bit input and a 37-bit output, the shift is to the left.

`round_sat` performs all output quantisation. It adds half of the new LSB,
drops the low bits (round half up), and clips to the output range. FIR and
polyphase outputs can clip when the input is near full scale and the
coefficients' absolute sum exceeds one. CIC outputs cannot clip except in the
rounding corner case above.

## Coefficients

The library carries no coefficient files. When no table is passed,
`filt_pkg::fir1_table(taps, cutoff, COEF_W)` computes one during elaboration
as a Hamming-windowed ideal low-pass:

    h(k) = c * sinc(c * (k - (taps-1)/2)) * (0.54 - 0.46 cos(2 pi k / (taps-1)))

Here c is the cutoff as a fraction of the Nyquist frequency and
sinc(t) = sin(pi t)/(pi t). The table is then scaled so that the coefficients
sum to one, multiplied by 2^(COEF_W-1), rounded to integers, and padded with
zeros up to 256 entries (`filt_pkg::MAX_TAPS`). The chain uses c = 0.5 for
both the FIR and the polyphase stage. Any other table of type
`filt_pkg::coef_table_t` can be passed through the `COEFS` parameter. The
values beyond the tap count must be zero.

These coefficient values are placeholders for the application's own
design. The filter structures do not depend on them.

## Interface and timing

All filters share one streaming convention. `in_valid` marks a sample on
`in_data`, and the filter state advances only on such clocks. `out_valid` is a
one-clock pulse that comes with each new `out_data`. There is no back-pressure:
a receiver must accept every output. Reset is asynchronous and active low, and
it clears all state.

| block | outputs | latency (clocks, from the input that completes an output) |
|---|---|---|
| `fir_filter` | one per input | 1 |
| `polyphase_decimator` | one per M inputs | 1 |
| `cic_integrator` | one per R inputs | 1 |
| `cic_comb` | one per input | ceil(N/NSUB) |
| `cic_decimator` | one per R inputs | 2 + ceil(N/NSUB) |

Inputs may arrive on every clock or with any gaps. The one rule is the comb's:
after decimation, consecutive samples must be at least `ceil(N/NSUB)` clocks
apart. The default NSUB guarantees this for any input pattern.

## Where this RTL departs from, or fills in, the original description

* **Interface.** The valid-strobe interface and the asynchronous reset are
  choices made here. The original only mentions channels between the filters.
* **Coefficients and cutoffs.** The original does not give coefficient values,
  coefficient width or cutoff frequencies. The choices above are placeholders.
* **Overflow.** Clipping on FIR and polyphase overflow, and the `out_sat` flag,
  are additions made here.
* **Comb sharing.** The original shows the subtractor sharing with an
  8-stage, R=4 example (two subtractors). For its order-3, R=512 filter it
  reports three comb subtractors. The default here follows the example rule,
  and `NSUB` selects the other behaviour.
* **Integrator placement.** The registered integrator pipeline is this design's
  reading of "delay registers in a feedforward path". The CIC output therefore
  lags the textbook integrator form by N-1 input samples.
* **Polyphase scheduling.** The exact order in which each shared unit walks
  through its coefficients is not given in the original. The
  fixed-tap/rotating-coefficient scheme here is one schedule that uses exactly
  ceil(TAPS/M) units.
* **Not modelled.** The design-automation flow around the filters is not
  modelled: script-driven parameter generation, reference models and
  synthesis. Neither are the reported area, power or design-time results.
* **Three-filter example.** A three-filter example chain appears in the
  original only as an illustration (CIC, FIR, polyphase, with 5-bit input and
  22-bit output) and is not built. Its stage orders are not given, but it can
  be assembled from the same modules.

## Configurations that have been run

| configuration | where |
|---|---|
| the chain above, default parameters, 19 200 inputs | `filter_chain_tb` |
| polyphase, order 28, M=8, 2 -> 13 bits | `polyphase_decimator_tb` |
| polyphase, order 123, M=2 and M=62, 18 -> 37 bits | `polyphase_workloads_tb` |
| CIC, N=3, R=512, 2 -> 16 bits (29-bit registers) | `cic_decimator_tb` |
| the same CIC with three comb subtractors (`NSUB = 3`) | `cic_decimator_tb` |
| CIC, N=4, R=8, 2 -> 14 bits (14-bit registers) | `cic_decimator_tb` |

## Verification

Each testbench drives its block with random data, most of them also with
random gaps in `in_valid`. It compares every output with a reference computed
in the testbench on 64-bit integers. The reference is independent of the RTL
structure:

* CIC stages are checked against a direct convolution with the CIC impulse
  response (N boxcars convolved).
* FIR and polyphase stages are checked against a plain convolution evaluated
  at the kept samples.
* Wrap-around is modelled explicitly.

The testbenches also check output counts and cycle latencies, and each one
fails if the mechanism it targets never occurred. Those mechanisms are clipping,
integrator wrap-around, the shared comb schedule, and the polyphase
accumulation phase.

`filter_chain_tb` checks all seven stage outputs of the full-size chain bit
for bit. It runs in a few seconds. Every testbench prints one line,
`TB_RESULT checks=N failures=M`, and stops itself through a watchdog if it
hangs.

Two things are not verified here. The testbenches take the default
coefficient values from `filt_pkg::fir1_table`, so they confirm the filtering
but not the frequency response of those placeholder coefficients. The
`fir_filter_tb` checks only the symmetry and DC gain of the default table.
Nothing was checked against the original authors' reference outputs, which
are not available.

### Running a testbench with Verilator

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
        rtl/filt_pkg.sv tb/tb_ref_pkg.sv tb/filter_chain_tb.sv \
        --top-module filter_chain_tb -o sim
    ./obj_dir/sim

Replace `filter_chain_tb` with any other testbench name. Lint a module with

    verilator --lint-only -Wall -y rtl +libext+.sv rtl/filt_pkg.sv rtl/filter_chain.sv

One lint warning is expected, `SYNCASYNCNET`: the comb's rate assertions
sample the asynchronous reset to stay quiet while the design is in reset.

## Changing the design

* **Another chain.** Edit the instance list in `filter_chain.sv`. Each CIC
  stage's register width follows from its parameters. Set its `OUT_W` to that
  width for a lossless stage, or narrower to round.
* **Real coefficients.** Pass a `filt_pkg::coef_table_t` through `COEFS`, or
  change `CUTOFF` or `COEF_W`. Raise `filt_pkg::MAX_TAPS` for filters longer
  than 256 padded taps.
* **Trading area for speed in the CIC comb.** Raise `NSUB` up to N.
* **Adding a stage.** A new filter with the same `in_valid`/`in_data`/
  `out_valid`/`out_data` ports drops into the chain unchanged.
