# Digital IF processor: 200 MS/s real IF to 100 MS/s complex baseband

This design turns the output of a 10-bit, 200 MS/s ADC into a complex
signal at half the rate, with no multipliers outside one lowpass filter.
The ADC samples an IF band of 120–180 MHz in its second Nyquist zone. The
processor:

1. shifts the folded spectrum down by fs/4 (50 MHz),
2. removes the image with a 63-tap lowpass that is 47 MHz wide,
3. keeps every second output, giving 100 MS/s complex samples, and
4. shifts the result up by a quarter of the new rate (25 MHz).

Both frequency shifts are multiplications by powers of j. In hardware they
are only sign changes and exchanges of the real and imaginary words. A
4-state sequencer controls them. The filter runs as two polyphase branches
at the 100 MHz clock, so the design takes in two ADC samples per clock and
puts out one complex sample per clock.

The structure comes from a published FPGA design for a radiometer receiver.
That design covers the register pipeline, the negators, the swap stage, the
control table and the choice of output bits. The filter coefficients, the
reset, the raw-data mode pin and a few conventions are this design's own.
They are listed under "Where this design makes its own choices".

## Frequency plan

A tone at `F_in` in the analog band folds to `200 - F_in` MHz when it is
sampled. It then moves down by 50 MHz and up by 25 MHz:

    F_out = (200 - F_in) - 50 + 25 = 175 - F_in      [MHz, complex, 100 MS/s]

For example, 135 MHz comes out at +40 MHz. The filter's half-power points
are at an input of 127 MHz and 174 MHz, so the output occupies roughly
+1 to +48 MHz of the ±50 MHz complex band. The other half of the real
input's spectrum lands in the filter's stop band.

## How the shifts become sign flips

This is the part of the design that takes the most care. Everything below
is derived from the timing of the RTL, and the testbenches confirm it bit
for bit.

**Input pairs.** The ADC delivers its samples in pairs on two buses. In
this design, bus N (`dn`) carries the earlier sample `x[2j]` and bus M
(`dm`) the later sample `x[2j+1]`.

**fs/4 down-shift.** Multiplying by `exp(-j*pi*n/2)` gives the sequence
1, -j, -1, +j, and so on. The result is that:

- the later sample of each pair (M) becomes the real part;
- the earlier sample (N) becomes the imaginary part;
- both samples of a pair are negated on every other pair.

The overall constant phase is irrelevant. `dif_fs4_down` has one negator per
bus, and `neginput` picks which bus is negated. Bus M arrives there one clock
later than N, because it was re-timed from the `dra` clock domain. So when
`neginput` alternates every clock, M and N of the *same* pair end up with the
same sign. One more register on N puts the two halves of a pair side by side
again.

**Polyphase filter.** After mixing, the 200 MS/s complex stream has real
values only at odd sample times and imaginary values only at even ones. The
design keeps only the odd outputs `y[2j+1]`. Then:

- the real part uses only the even-indexed taps on bus M (32 taps, `dif_fir #(.PHASE(0))`);
- the imaginary part uses only the odd-indexed taps on bus N (31 taps, `dif_fir #(.PHASE(1))`).

Both branches see the same pair in the same clock and have the same latency.

**fs/4 up-shift.** `dif_fs4_up` first keeps bits [19:4] of each 24-bit
result. It then exchanges real and imaginary when `swap` is set, and one
clock later negates each word when `negreal` or `negimag` is set. Because
the two stages read consecutive controller states, the table below produces
`j*w, -w, -j*w, w` on consecutive samples. That is `w * j^(k+1)`, a +25 MHz
shift.

| state | neginput | swap | negimag | negreal |
|-------|----------|------|---------|---------|
| S0    | 0        | 1    | 0       | 0       |
| S1    | 1        | 0    | 0       | 1       |
| S2    | 0        | 1    | 1       | 1       |
| S3    | 1        | 0    | 1       | 0       |

The whole chain runs from one free-running 2-bit counter (`dif_controller`).
After reset it starts in S0. Its phase relative to the data is fixed by the
pipeline, so nothing else needs to know it.

## Pipeline and timing

All registers after the input stage are clocked by `drb`. Edge numbers below
count `drb` edges.

| stage | module | content after edge e |
|-------|--------|----------------------|
| input | `dif_input_sync` | `m_sync` = M of pair e-1 (dra register, then drb register); `n_reg` = N of pair e |
| mix   | `dif_fs4_down` | `m_out`, `n_out` = signed M and N of pair e-2 |
| filter | `dif_fir` ×2 | 24-bit sums whose newest sample is pair e-3 |
| slice | `dif_fs4_up` | bits [19:4], pair e-4 |
| swap  | `dif_fs4_up` | pair e-5 |
| negate | `dif_fs4_up` | `out_real`, `out_imag`: pair e-6 |

- **Processed latency:** the output after edge e belongs to the pair sampled at edge e-6.
- **Raw-mode latency:** the output after edge e belongs to the pair sampled at edge e-2.
- **Throughput:** one complex output per clock, so a 100 MHz `drb` gives the full 200 MS/s input rate.

## The lowpass filter

The coefficients are a 63-tap Kaiser-windowed sinc:

    h[n] = round( 2044 * w(n) * sinc(0.25 * (n-31)) / sum_k w(k) * sinc(0.25 * (k-31)) )

- `n` runs from 0 to 62.
- `w` is a Kaiser window with beta = 6.5.
- `sinc(t) = sin(pi t) / (pi t)`.
- The cutoff is 25 MHz at 200 MS/s (fc = fs/8).

The taps are 10-bit signed integers that sum to 2047, with a centre tap of
511. They are listed in `rtl/dif_pkg.sv`. Because fc = fs/8, every fourth tap
away from the centre is zero. `tb_dif_fir` recomputes the table from the
formula and checks it.

Response of the whole processor, measured in simulation with `tb_dif_sweep`:

| property | value |
|----------|-------|
| half-power band (input) | 127–173 MHz (47.1 MHz by the taps) |
| pass-band ripple, 130–170 MHz input | 0.19 dB |
| worst stop-band level | about −52 dB |

Each branch is a transposed direct form: one constant multiplier per tap
feeds a chain of 24-bit accumulating registers. The latency is one clock.
The largest possible branch result is 512 × Σ|h| < 2^20, so 24 bits never
overflow.

## Output word and headroom

The 16-bit output keeps bits [19:4] of the 24-bit filter result. The scale
was chosen to fit that window:

- A full-scale tone in the pass band (amplitude 500 of 511) reaches about
  2^19 in each branch.
- It therefore fills the 16-bit output (peak about 31 000) without wrapping.

Anything larger wraps, because bits above 19 are dropped and there is no
saturation. Two kinds of input can do this:

- an input built so that every term of a branch sum has the same sign;
- dense full-scale wideband noise.

Uniform noise over the whole ±512 range wraps often enough to spread energy
across the band. Noise at about 40 % of full scale is clean. The negators
wrap in the same way: −512 and −32768 negate to themselves.

Dropping the four LSBs is a truncation. It leaves a mean error of −0.5 LSB on
each word. After the up-shift, that error appears as a tiny tone at +25 MHz,
about 0.7 LSB in amplitude.

## Modes

`raw_mode = 0` gives the processed output. `raw_mode = 1` passes the ADC
samples through unchanged:

- `out_real` = `dm` (the later sample of each pair);
- `out_imag` = `dn` (the earlier sample);
- both are sign-extended and belong to the same pair.

The mode selects between two registered outputs, so a switch takes effect at
once, with no flush.

## Ports of `digital_if_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `dra` | in | 1 | data-ready clock of bus M |
| `drb` | in | 1 | data-ready clock of bus N; the processing clock |
| `rst` | in | 1 | synchronous reset, active high; hold it for at least two cycles of both clocks |
| `raw_mode` | in | 1 | 1: raw samples out, 0: processed |
| `dm`, `dn` | in | 10 | ADC buses, two's complement; `dn` carries the earlier sample |
| `out_real`, `out_imag` | out | 16 | complex output, two's complement |
| `control1` | out | 1 | `drb` forwarded as the sample clock for the capture equipment |
| `control2` | out | 1 | held low |

`dra` and `drb` must have the same frequency. Their phase must leave setup
margin for the single register that re-times bus M. The testbenches run the
two clocks in phase, and `tb_dif_input_sync` also runs them with `dra`
lagging by 3 ns.

## Files

- `rtl/dif_pkg.sv`: widths, the coefficient table, the control struct and the state enum.
- `rtl/dif_controller.sv`: the 4-state sequencer and its table, with assertions that `neginput` alternates.
- `rtl/dif_input_sync.sv`: the bus registers and the re-timing of M.
- `rtl/dif_fs4_down.sv`: the input negators and the N delay.
- `rtl/dif_fir.sv`: one polyphase branch.
- `rtl/dif_fs4_up.sv`: bit selection, swap and output negators.
- `rtl/digital_if_top.sv`: the wiring, the raw-mode path and the output select.

## Simulating

Every testbench checks itself and ends with
`TB_RESULT checks=N failures=M`. A failure count above zero means the test
failed. To run one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal \
        rtl/dif_pkg.sv rtl/dif_controller.sv rtl/dif_input_sync.sv rtl/dif_fs4_down.sv \
        rtl/dif_fir.sv rtl/dif_fs4_up.sv rtl/digital_if_top.sv tb/tb_digital_if_top.sv \
        --top-module tb_digital_if_top -o sim
    ./obj_dir/sim

Substitute any testbench name below. Each one runs in seconds.

| testbench | what it shows |
|-----------|---------------|
| `tb_digital_if_top` | End-to-end, bit for bit, at the design's only size. The reference model filters the interleaved 200 MS/s stream with all 63 taps instead of using the polyphase branches. It covers random input, −512 inputs, an impulse, an input that wraps the output slice, and raw-mode stretches with four mode switches. It counts each mechanism (input negations, swaps, output negations, slice wrap, mode switches) and fails if any never happened. |
| `tb_dif_sweep` | A 135 MHz tone comes out at +40 MHz and fills the 16-bit range. It is also the strongest of all 100 output frequencies on a 1 MHz grid. The test then sweeps 100–200 MHz in 1 MHz steps with 32768 output samples each. The measured gain matches the taps within 0.3 dB, and the band edges and ripple are checked. |
| `tb_dif_noise` | Wideband noise. 100 averaged 32768-point periodograms of the output are compared with the spectrum the taps predict, including stop-band side lobes and the empty mirrored half. |
| `tb_dif_fir` | The coefficient table is checked against its formula. Each branch's impulse response and one-clock latency are checked, and random and worst-case inputs are compared with a direct convolution. |
| `tb_dif_fs4_down`, `tb_dif_fs4_up`, `tb_dif_input_sync`, `tb_dif_controller` | Each stage against its own reference model, with random control lines. |

## Where this design makes its own choices

- **Filter coefficients.** The original filters come from a vendor filter
  compiler, and their taps are not published with the design. The taps here
  meet the published bandwidth (47 MHz) and ripple (< 0.5 dB). They reach
  about 52 dB of stop-band attenuation, against the 60 dB the original
  measured. More coefficient bits would reach 60 dB. They would also push a
  full-scale tone past bit 19, which the fixed [19:4] output window cannot
  hold.
- **Filter structure and latency.** These are this design's own: transposed
  form, one clock. In the original, an extra register on the N path
  compensated for different filter lengths. Here the two branches have equal
  latency, and that register aligns N with the re-timed M.
- **Sample order on the buses.** N carries the earlier sample. This order
  makes `F_out = 175 - F_in` hold exactly, and it makes the two branches
  line up without an extra delay.
- **Reset.** The original relies on flip-flops powering up at zero. Here a
  synchronous active-high reset clears every register and puts the
  sequencer in S0.
- **Raw-data mode.** The original board has a raw-data mode, but its
  published logic does not show how the mode is selected. The `raw_mode`
  pin and the output format are this design's own.
- **Output port names.** The outputs are `out_real` and `out_imag`, because
  `real` is a SystemVerilog keyword.

## Not included

This RTL does not model:

- the ADC itself;
- the 120–180 MHz analog anti-alias filter;
- the capture equipment;
- the board's power supply.

A planned two-channel radiometer would use two copies of this processor and
add their outputs. That system is not specified and is not part of this RTL.
The original implementation fitted an FPGA at an estimated 133 MHz. Timing
and area on any particular device depend on synthesis for that device.
