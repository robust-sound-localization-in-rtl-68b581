# PHAT time-delay estimator for two microphones

This design finds which way a sound comes from. Two microphones pick up the
same sound. The design measures how much later it reaches microphone 2 than
microphone 1: the time delay of arrival (TDOA). With the microphone spacing
`d` and the speed of sound `v`, the direction follows as
`asin(delay * v / d)`.

The delay is estimated in the frequency domain, using generalised cross-
correlation with the *phase transform* (PHAT) weighting. Every frequency point
is normalised to unit magnitude, so only phases count. This makes the estimate
robust against reverberation. For one segment of `N` samples per microphone,
the chip computes

    beta* = argmax over beta of  sum_{n=0..N/4} cos( (phase1(n) - phase2(n)) - 2*pi*n*beta/N )

Here `beta` is a candidate delay in samples, and `n = 0..N/4` covers 0 to 5 kHz
at 20 kHz sampling. There are 601 candidates, from -30.0 to +30.0 samples in
steps of 0.1 sample. That covers a full -90..+90 degree view with microphones
up to about 50 cm apart.

The hardware avoids costly operations wherever it can:

- A floating-point FFT gives the spectrum.
- A CORDIC unit turns each frequency point into a phase and discards its
  magnitude.
- The search needs no multiplier. All `2*pi*n*beta/N` terms come from running
  sums, and each cosine comes from an iterative CORDIC.

Four candidate delays are evaluated in parallel. This keeps the whole
computation inside the time it takes to acquire the next segment.

## Data flow

```
ADC 1 --\                                  +--> FFT mic 1 --> phase mic 1 --+
         adc_serial_if --> front_end -->   |                                |
ADC 2 --/   (8 bit, 20 kHz)  window,       |    FFT mic 2 --> phase mic 2 --+--> phase difference
                              float,       |                                          |
                              bit-reverse  |                                          v
                                   |       |                          ML search, 4 lanes of
                                   v       |                          CORDIC cos + accumulator
                     mem_subsystem: 2 ping-pong blocks per mic             |
                     + 1 shared block for imaginary parts                  v
                                                                  tdoa, tdoa_lik, tdoa_valid
```

Acquisition and computation overlap. Each microphone has two 4 kB blocks. The
front end fills one of them with the current segment while the DSP core works
on the other, which holds the previous segment. When a segment is complete the
two blocks swap roles.

A fifth 4 kB block is shared by both microphones. It holds the imaginary parts
during an FFT. After the FFT, each point is reduced to a phase, so the shared
block is free again for the second microphone. For this reason the two FFTs run
one after the other.

## Number formats

**Floating-point word (32 bits).** Samples and FFT terms are stored in this
format:

| bits | field |
|------|-------|
| 31 | sign |
| 30:25 | exponent, bias 31; the value 0 means the number zero |
| 24:0 | mantissa, with a hidden leading one |

The word is `(-1)^s * 1.m * 2^(e-31)`. Results are truncated. Results below the
smallest normal number flush to zero, and results above the largest saturate.
`fp_mul` and `fp_add` are combinational. The butterfly uses four
multipliers and six adders.

**Binary angles (24 bits).** A phase is stored as a signed 24-bit binary angle,
where `2^24` is one full turn. It is sign-extended to 32 bits in the memory
word. Subtracting two such angles wraps around by itself, so the result is
already reduced modulo 2π. The ML search keeps its running angles in 40 bits,
where `2^40` is one turn. At 40 bits, adding up 0.1-sample steps 257 times, for
601 candidates, loses no visible precision.

**Cosine and likelihood.** A cosine is a signed fixed-point value with
`1.0 = 2^16`. The likelihood is the sum of up to 257 cosines, held in a signed
32-bit accumulator.

## The processing of one segment

`dsp_core` runs six steps after each `seg_ready`. The clock counts below are for
`N = 1024`.

| step | engine | what happens | clocks |
|------|--------|--------------|--------|
| 1 | `fft_engine` | FFT of microphone 1, in place. Real parts are in its block, imaginary parts in the shared block. | 25,601 |
| 2 | `phase_calc` | Points 0..N/4 go through `cordic_vectoring`. Each phase overwrites its real part. | 3,599 |
| 3, 4 | same | The same two steps for microphone 2. | 29,200 |
| 5 | `phase_diff` | `phase1 - phase2` is written into microphone 1's block. | 772 |
| 6 | `ml_engine` | Search over the 601 candidates. | 504,794 |

In total this is about 563,000 clocks. At the assumed 16 MHz clock that is
35.2 ms, compared with 51.2 ms to acquire 1024 samples. For N = 512 it is about
281,000 clocks against 409,600, and for N = 256 about 140,000 against 204,800.

**FFT.** `fft_engine` computes a radix-2 decimation-in-time FFT. Each butterfly
takes five clocks:

1. read the upper point
2. read the lower point
3. latch the lower point
4. write the upper result
5. write the lower result

Both results go back to the addresses they were read from. The front end stores
samples at bit-reversed addresses, so the FFT reads its input in the order it
needs and writes its output in natural order.

In the first stage the imaginary inputs are taken as zero rather than read.
The shared block therefore never needs clearing.

Twiddle factors come from `cos_table`, a quarter-wave table of 257 entries. It
is computed at elaboration by an integer CORDIC in `tdoa_pkg::cos_q30`, so no
data file is needed. The same table gives the Hanning window.

**Phase (CORDIC vectoring).** `cordic_vectoring` first aligns the
floating-point real and imaginary parts to their larger exponent and converts
them to 30-bit fixed point. A vector in the left half-plane is turned by ±90°
first, and the angle register starts at ∓90°. Then 20 rotations follow, two per
clock, with `d = +1` when `y < 0`. The rotations drive `y` to zero while the
angle register collects the phase. The result is ready 11 clocks after
`start`.

## The maximum-likelihood search

This is the part that takes the time, and the part that is least obvious.

**No multiplications.** Within one candidate `beta`, the angle `2*pi*n*beta/N`
for frequency point `n` is the previous point's angle plus a step
`s = 2*pi*beta/N`. Going from one candidate to the next adds `2*pi*0.1/N` to
that step. Per segment length, `2*pi*0.1/N` is a constant in 40-bit angle units:
`round(2^40 / (10*N))`.

**Four lanes.** Each pass of the search evaluates candidates `4p .. 4p+3`. Each
lane has its own cosine evaluator (`cordic_cos`), angle register and likelihood
accumulator. A pass works as follows:

- The lanes' steps are set from a base step. The base step starts at
  `-300 * 2*pi*0.1/N` and grows by four candidate steps per pass.
- For each `n = 0..N/4`, one memory read fetches the phase difference. It is
  shared by all four lanes. Each lane then forms
  `theta = d(n) - top24(angle)`, starts its CORDIC, and adds its step to its
  angle register.
- Eleven clocks later, each lane adds its cosine to its likelihood.

A point takes 13 clocks. After the last point, the four likelihoods are
compared with the running maximum. A candidate replaces the maximum only if it
is strictly larger, so on a tie the smaller delay wins.

There are `ceil(601/4) = 151` passes. In the last pass only lane 0 holds a real
candidate, and the other three are ignored.

**Cosine (CORDIC rotation).** `cordic_cos` starts from `x0 = 1/K`, which
compensates the CORDIC gain in advance, with `y0 = 0` and `z0 = theta`. It
rotates so that `z` goes to zero, with `d = +1` when `z >= 0`. The result is
`x = cos(theta)`.

CORDIC only converges for angles within about ±99°. Angles beyond ±90° are
therefore shifted by 180° first, and the result is negated. The iterations keep
four fraction bits more than the output. The error stays below 1e-4.

**Result.** `best_idx` is in 0..600. The core reports `tdoa = best_idx - 300`,
in tenths of a sample. A positive value means that microphone 2 hears the sound
later than microphone 1.

## Interfaces

### `tdoa_top`

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | Clock (16 MHz assumed). Asynchronous active-low reset. |
| `win_sel` | in | Segment length: 0 = 256, 1 = 512, 2 = 1024 samples. Sampled only while `rst_n` is low. |
| `adc_cs_n`, `adc_sclk` | out | Select and serial clock, shared by the two ADCs. |
| `adc_sdata[1:0]` | in | Serial data of ADC 1 (bit 0) and ADC 2 (bit 1). |
| `tdoa_valid` | out | One-clock pulse per processed segment. |
| `tdoa` | out | Signed 11 bits. Delay of microphone 2 behind microphone 1, in 0.1 sample. |
| `tdoa_lik` | out | Likelihood of that delay, with `1.0 = 2^16`. The maximum is `(N/4+1) * 2^16`. |
| `overrun` | out | Pulses when a finished segment was dropped because the core was still busy. |
| `dsp_busy` | out | The DSP core is processing a segment. |

Parameters:

- `CLKS_PER_SAMPLE = 800` gives 20 kHz from 16 MHz.
- `SCLK_HALF = 8` gives a 1 MHz serial clock.

### ADC framing (`adc_serial_if`)

Every `CLKS_PER_SAMPLE` clocks, `adc_cs_n` goes low and 8 clock pulses follow.
The ADCs shift out their result MSB first, changing data after each falling
edge. The interface takes each bit on the rising edge.

The codes are offset binary. They are converted to two's complement by
inverting the MSB.

### Memories

The chip has five `sram_block`s of 1024 × 32 bits each. They are single-port,
with a synchronous read: the data appears one clock after the address.
`mem_subsystem` switches each microphone's A and B blocks between the front end
and the core according to `fill_bank`.

### Engines

All engines use the same handshake:

- `start` is a one-clock pulse.
- `busy` stays high while the engine runs.
- `done` is a one-clock pulse at the end.

Memory requests use the struct `mem_req_t`, which holds the address, the write
enable and the write data, together with a separate `en`.

## Design choices not fixed by the original description

The published description gives the algorithm, the main block structure, the
word format, the memory organisation, the CORDIC iteration rules, the counts
(601 candidates, four lanes, 20 rotations at two per clock) and the segment
sizes. These choices are this design's own:

- **Clock.** No chip clock is published. The design assumes 16 MHz, which meets
  the real-time budget for all three segment lengths.
- **Float details.** The order of the fields, the hidden one, the bias, the
  zero encoding, truncation and saturation are this design's choices.
- **Window product.** The window is applied as a fixed-point 8 × 31-bit product,
  which is then converted to floating point. The original counts four
  floating-point multipliers shared by the FFT and the front end. Here all four
  sit in the FFT butterfly.
- **Bit-reversed storage.** Samples are stored at bit-reversed addresses, and
  the first FFT stage treats the imaginary parts as zero.
- **Points converted to phase.** Only points 0..N/4 are turned into phases,
  because the search uses no others.
- **Overruns.** If a segment completes while the core is busy, that segment is
  dropped and `overrun` pulses. The memory the core works on is never
  overwritten. At the default rates this never happens.
- **Delay range.** The search range is symmetric, -30.0..+30.0 samples.
- **Five-clock butterfly.** The FFT schedule is five clocks per butterfly and
  serial. A pipelined schedule would be faster, but it is not needed for real
  time.
- **RS-232.** The link that carried estimates to a PC was part of the test
  board. Here the estimate is a parallel output.

The analog front end is outside this RTL. That covers the preamplifiers, the
tenth-order switched-capacitor antialiasing filters and the ADCs themselves.
`tb/adc_model.sv` is a behavioural stand-in for an ADC.

## How far it has been checked

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. The testbenches compare against references
computed independently in real arithmetic:

| module | reference checks |
|--------|------------------|
| `fp_mul`, `fp_add` | Real arithmetic on random operands. |
| `fft_butterfly` | Real arithmetic. |
| `fft_engine` | A direct DFT at all three lengths. |
| `cordic_vectoring` | `$atan2`. |
| `cordic_cos` | `$cos`. |
| `hanning_window` | Every coefficient against the formula. |
| `ml_engine` | The likelihood of all 601 candidates computed with `$cos`. |
| `dsp_core` | Integer delays of white noise. |

The timing testbenches also check the clock counts given above.

The end-to-end tests drive the chip through its ADC pins:

- `tdoa_top_tb` samples faster than the core can process. This makes buffer
  swaps, dropped segments and both segment lengths occur. Every estimate must
  be exact.
- `tdoa_top_full_tb` runs the top with no parameter overrides: 1024-sample
  segments at 20 kHz from a 16 MHz clock. It checks two back-to-back estimates,
  and that no segment is dropped. Each result arrives 35.2 ms after its segment
  is complete.
- `tdoa_doa_tb` repeats the geometry of the published white-noise measurement.
  The microphones are 20 cm apart, and a broadband source is placed at seven
  angles from -90° to +90°. A noise source in front is set to eight
  signal-to-noise ratios from 50 dB down to 0 dB, and the delays are
  fractional. At 20 dB and above, every delay must be within 0.15 sample. For
  each SNR the test prints, in the style of the measurements, how many
  estimates were abnormal (direction error above 5°), how many were discarded
  (beyond ±90°), and the RMS error of the rest. The ±90° positions are the hard
  ones. The true delay there is 11.66 samples, where `asin` is steepest. An
  estimate of 11.6 gives 84°, which counts as abnormal. An estimate of 11.7 or
  more lies beyond 90° and is discarded. Apart from those two positions, the
  error is at most 0.14 sample at every SNR except 3 dB, where one estimate is
  0.23 sample off. At 0 dB, one estimate at +90° falls to zero delay. The RMS
  error of the remaining estimates stays below 1° at every SNR.
- `tdoa_room_tb` moves the same test into a simple model of a reverberant
  room. The microphones are 19.8 cm apart. Each segment adds 24 reflections of
  the source. Each reflection comes from its own random direction, and they
  decay with a reverberation time of 0.1 s. Together they carry 3 dB less
  energy than the direct sound. Each microphone also picks up its own
  background noise, 20 dB below the source. At 20 dB and above, every delay
  must be within 0.5 sample, and every direction within ±60° must be within 5°.
  Away from ±90°, the reflections pull estimates by up to 0.3 sample. The one
  exception is a single estimate at 3 dB, which is abnormal. From 50 dB down to
  3 dB the RMS error of the non-abnormal estimates is between 0.6° and 1.6°.
  At 0 dB, with the reflections added, the noise source in front wins and six
  of the seven estimates fall to zero delay.

This testing does not cover speech. The source is always broadband noise.
Temperature drift of the speed of sound, which affects real room
measurements, is not modelled. Gate-level timing is not covered either. The long
combinational path through the floating-point butterfly (multiplier, then two
adders) is a concern at 16 MHz only in slow technologies.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/tdoa_pkg.sv tb/tb_fp_pkg.sv tb/tdoa_top_tb.sv --top-module tdoa_top_tb
./obj_dir/Vtdoa_top_tb
```

Replace `tdoa_top_tb` with any other testbench in `tb/`. Verilator finds the
other modules by file name through `-I`. `tdoa_top_full_tb` simulates about
2.2 million clocks and takes some seconds.

## Files

| file | contents |
|------|----------|
| `rtl/tdoa_pkg.sv` | Sizes, the word and request types, the segment-length enum, CORDIC arctangent constants, the elaboration-time cosine, fixed-to-float conversion, bit reversal. |
| `rtl/tdoa_top.sv` | Chip top. |
| `rtl/adc_serial_if.sv`, `rtl/front_end.sv`, `rtl/hanning_window.sv`, `rtl/cos_table.sv` | Acquisition and windowing. |
| `rtl/sram_block.sv`, `rtl/mem_subsystem.sv` | The five memory blocks and their switching. |
| `rtl/dsp_core.sv` | Sequencer and memory-port switching for the engines. |
| `rtl/fft_engine.sv`, `rtl/fft_butterfly.sv`, `rtl/fp_mul.sv`, `rtl/fp_add.sv` | The FFT. |
| `rtl/phase_calc.sv`, `rtl/cordic_vectoring.sv`, `rtl/phase_diff.sv` | Phase extraction. |
| `rtl/ml_engine.sv`, `rtl/cordic_cos.sv` | The likelihood search. |
| `tb/*_tb.sv` | One testbench per module, plus `tdoa_top_full_tb`, `tdoa_doa_tb` and `tdoa_room_tb`. |
| `tb/tb_fp_pkg.sv`, `tb/adc_model.sv` | Reference float conversion and the ADC model. |
