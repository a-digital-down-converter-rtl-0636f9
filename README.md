# Digital down converter with an on-chip LFM test source

A radar receiver has to bring a wide, fast-sampled intermediate-frequency
signal down to baseband. It then has to lower the sample rate far enough
that a processor can handle the result. This RTL does that in three steps:

1. **Mixing.** The signal is multiplied by a carrier from a numerically
   controlled oscillator.
2. **Filtering.** Anti-alias filters remove what decimation would fold in.
3. **Decimation.** The sample rate is divided by 4, in two stages of 2.

To test itself, the design makes its own input. A second direct digital
synthesizer (DDS) produces a linear-FM (LFM) chirp pulse at the IF. This is
the kind of pulse-compression waveform an airborne radar transmits. The
chirp is mixed with a carrier that restarts with every pulse. The complex
result is split into I and Q. Each of them passes through a two-stage
decimating FIR cascade and is re-quantized to 16 bits. The I/Q pairs leave
as one 32-bit stream, framed with `tlast` for a DMA engine. A processor
drives everything through a small AXI4-Lite register file.

```
              +-----------+   +-------------+
 AXI4-Lite -->| ddc_regs  |-->| chirp_ctrl  |--pinc ramp--> dds (LFM) ----+
              +-----------+   +-------------+                             |  a
                    |  car_pinc      | valid / clr (pulse-synchronous)    v
                    +----------------+---------------> dds (carrier) --> cmpy: a * conj(b)
                                                                          |  64 bit
                                                 I [31:0] <---------------+---------------> Q [63:32]
                                                 decim_chain (I)                decim_chain (Q)
                                                 23 taps /2 -> 63 taps /2       23 taps /2 -> 63 taps /2
                                                 32 b        -> 16 b            32 b        -> 16 b
                                                          \                    /
                                                           iq_combiner {Q, I}, tlast --> m_axis (to DMA)
```

## Sample plan and widths

All blocks run on one clock, one input sample per cycle while a capture
runs. The numbers below assume a 120 MHz clock. With that clock the output
rate is 30 MHz, an output band of ±15 MHz.

| point | width | rate |
|---|---|---|
| DDS outputs (cosine, sine) | 16 + 16 bit | 120 MHz |
| mixer output (I, Q) | 32 + 32 bit | 120 MHz |
| after stage 1 | 32 bit per channel | 60 MHz |
| after stage 2 (output) | 16 bit per channel | 30 MHz |

The 16-bit output width follows the converter's re-quantized configuration.
A full-precision (48-bit) variant exists only as a comparison and is not
built. The other widths in the table are the ones visible on the
converter's reference simulation traces. The clock rate, the decimation
factors and the phase and table widths are this design's own choices.

## How the chirp is made (`chirp_ctrl`, `dds`)

A chirp has the instantaneous frequency f(t) = f0 + k·t, with k = B/Tp
(bandwidth over pulse length). In a DDS the frequency *is* the phase
increment added to the accumulator on every sample. A chirp is therefore a
phase increment that grows by a constant step on every sample:

    pinc[n]   = LFM_PINC0 + n * LFM_STEP            (n < PULSE_LEN)
    phase[n+1] = phase[n] + pinc[n]                 (quadratic phase)

A negative step (two's complement) gives a falling chirp. With the reset
values the chirp runs from 18 to 42 MHz in 12000 samples (100 µs), around a
30 MHz carrier:

- carrier increment: 2^32·30/120 = `0x4000_0000`
- start increment: 2^32·18/120 = `0x2666_6666`
- step: 2^32·(24/120)/12000 ≈ `0x0001_179F`

A START write runs one capture of `CAPT_LEN` samples:

- The first sample carries `clr`. It restarts the phase of **both** DDSs,
  so the carrier stays phase-locked to the pulse.
- The first `PULSE_LEN` samples carry `en`, which enables the LFM DDS
  output.
- The remaining samples are zeros. They flush the filters, so the frame
  also holds the decaying end of the filtered pulse.

A START written while a capture runs is ignored.

Each DDS has a 32-bit phase accumulator and a quarter-wave table of 1024
entries. The table is addressed by the top 12 phase bits and folded into
four quadrants. Entry i is round(32767·sin(2π(i+½)/4096)). The half-step
offset makes the quadrants exact mirrors, so no extra table entry is
needed. The table is computed at elaboration, so there is no data file.
Truncating the phase to 12 bits puts the spurs near −72 dBc, in line with
the ~70 dB SFDR the converter aims for.

## Mixing with the conjugate carrier (`cmpy`)

Both DDS outputs are complex. Multiplying the chirp `a` by the **conjugate**
of the carrier `b` keeps only the difference frequency. This is exactly the
term a down converter needs. No sum term is produced, so no filter is spent
on it:

    I = ar·br + ai·bi        Q = ai·br − ar·bi

The exact result needs 33 bits. It is saturated to 32 bits, which only
matters for −32768 operands; the DDS never produces that value. The
amplitude at the mixer output is 32767² ≈ 2^30.

## Two-stage decimation and re-quantization (`fir_decim`, `decim_chain`)

Each stage is a direct-form FIR with a delay line that shifts on every input.
It computes the dot product only on every second input, the one whose
output survives decimation. It then re-quantizes: add ½ LSB, shift right by
`SHIFT` bits, and saturate to the output width. `out_sat` flags a clipped
output.

The coefficients are a Blackman-windowed sinc with a cutoff of 0.25
cycles/sample. They are scaled to sum to 2^15, which gives unity DC gain at
`SHIFT = 15`. They are computed at elaboration from this formula
(N = number of taps):

    g[i] = sin(2π·FC·x)/(π·x) · (0.42 − 0.5·cos(2πi/(N−1)) + 0.08·cos(4πi/(N−1))),   x = i − (N−1)/2
    h[i] = round(32768 · g[i] / Σg)

| stage | taps | rate in → out | width in → out | SHIFT | what it must stop |
|---|---|---|---|---|---|
| 1 | 23 | 120 → 60 MHz | 32 → 32 | 15 (unity) | 48–72 MHz, which would fold onto ±12 MHz |
| 2 | 63 | 60 → 30 MHz | 32 → 16 | 31 (unity, then top 16 of 32 bits) | beyond ±18 MHz |

The first filter is short because it only has to clear a wide transition
band at the high rate. The long, sharp filter runs at half the rate.

Gain budget: the mixer delivers about 2^30, stage 1 passes it at unity, and
stage 2 keeps the upper 16 bits. A full-scale tone or chirp therefore comes
out at magnitude ≈ 16384, half of the 16-bit range, leaving 6 dB of headroom
for passband ripple. In simulation:

- Stop-band tones (24 MHz, and 54 MHz before stage 1) come out below 16
  LSB, more than 60 dB down. The 24 MHz tone through the whole chain peaks
  at 5 LSB, about 70 dB down.
- The passband magnitude of a tone or of the chirp stays within 0.1 % of
  16384.

## Framing and the register interface (`iq_combiner`, `ddc_regs`)

`iq_combiner` packs each output pair as `{Q[15:0], I[15:0]}`. It raises
`tlast` on every `FRAME_LEN`-th word. The reset values give 12288-sample
captures, which is 3072 output words (3000 from the pulse plus the flushed
tail), and the frame length is set to match. There is no `tready`: the
consumer must take one word every 4 clocks.

AXI4-Lite register map (32-bit registers, byte addresses). Writes need AW
and W together; responses are always OKAY:

| addr | name | access | meaning | reset |
|---|---|---|---|---|
| 0x00 | CTRL | W | bit 0: start a capture (self-clearing, reads 0) | – |
| 0x04 | STATUS | R | bit 0 busy; bits 31:16 captures completed | 0 |
| 0x08 | CAR_PINC | RW | carrier phase increment | 0x4000_0000 |
| 0x0C | LFM_PINC0 | RW | chirp start increment | 0x2666_6666 |
| 0x10 | LFM_STEP | RW | increment change per sample (signed) | 0x0001_179F |
| 0x14 | PULSE_LEN | RW | samples with the chirp on | 12000 |
| 0x18 | CAPT_LEN | RW | samples per capture | 12288 |
| 0x1C | FRAME_LEN | RW | output words per `tlast` | 3072 |

Keep `CAPT_LEN` a multiple of 4 and `FRAME_LEN = CAPT_LEN/4`. The
decimation phase then stays aligned from one capture to the next, and every
frame holds exactly one capture.

## Timing

- DDS: 2 cycles. Mixer: 2 cycles. Each FIR stage: 3 cycles after the input
  that completes its pair. Combiner: 1 cycle.
- Filter group delay: 11 samples at 120 MHz for stage 1, plus 31 samples at
  60 MHz for stage 2. In all, a feature of the pulse appears about 85 clocks
  after it enters the DDSs.
- While a capture runs, output words are exactly 4 clocks apart.

## Files

| file | content |
|---|---|
| `rtl/ddc_pkg.sv` | widths, register addresses, `ddc_cfg_t`, `dds_sample_t` |
| `rtl/ddc_top.sv` | top level, wires the chain, splits I/Q |
| `rtl/ddc_regs.sv` | AXI4-Lite register file |
| `rtl/chirp_ctrl.sv` | capture sequencer, chirp increment ramp |
| `rtl/dds.sv` | phase accumulator + quarter-wave sine/cosine table |
| `rtl/cmpy.sv` | conjugating complex multiplier |
| `rtl/fir_decim.sv` | decimating FIR with re-quantization |
| `rtl/decim_chain.sv` | two-stage cascade for one channel |
| `rtl/iq_combiner.sv` | {Q, I} packing and `tlast` framing |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_ddc_sfdr.sv` | spectral purity of the full converter |

## Verification

Every testbench checks its outputs against values it computes itself, checks
cycle timing, and ends with a `TB_RESULT checks=N failures=M` line.

| testbench | what it checks |
|---|---|
| `tb_dds` | against `$sin`/`$cos` within 1 LSB, with restarts, gating and chirped increments |
| `tb_cmpy` | exact result against 64-bit integer arithmetic |
| `tb_fir_decim` | bit-exact against a reference convolution, with its own copy of the coefficient formula, at both stage shapes |
| `tb_decim_chain` | DC gain, passband, both stop bands, clipping, 1-in-4 rate |
| `tb_chirp_ctrl` | every increment, `en`/`clr` pattern and lengths |
| `tb_ddc_regs` | registers, strobes, held responses |
| `tb_iq_combiner` | packing and `tlast` |

`tb_ddc_top` runs the whole design at its default size. It does four
captures:

1. A tone 3 MHz above the carrier. The output must have magnitude
   ≈ 16384 and turn by +0.2π per word.
2. A tone 24 MHz above the carrier. The output must stay below 20.
3. The reset-value chirp. The magnitude must be flat, the frequency must
   rise from −7.2 to +7.2 MHz across the checked middle of the pulse, and
   the tail must be near zero.
4. A falling chirp, with a START written while busy.

Every frame must be exactly 3072 words, with one `tlast` and one word per
4 clocks. The testbench counts each mechanism it exercised. The run takes a
few seconds.

`tb_ddc_sfdr` measures the spurious-free dynamic range of the whole chain.
It takes a 1024-point DFT, with a Blackman-Harris window, of a tone 3.01 MHz
above the carrier. The carrier and tone increments are chosen so that the
two DDSs' phase-truncation errors do not cancel. The measured SFDR is
71.8 dB; the test requires at least 66 dB. The original converter reports
about 70 dB.

Simulate any testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ddc_pkg.sv tb/tb_ddc_top.sv --top-module tb_ddc_top
./obj_dir/Vtb_ddc_top
```

## Where this RTL departs from, or goes beyond, the original converter

The original design was assembled mostly from FPGA vendor cores. Here the
same functions are written out, and these parts are choices of this RTL:

- **DDS.** Table size, phase width, and the `clr` and `en` inputs.
- **Mixer.** Conjugating mixer and its pipeline.
- **Filters.** Coefficients, tap counts (23 and 63), cutoffs and the
  rounding and saturation rules. The original only says its filters were
  optimised for resources.
- **Sample plan.** The 120 MHz input rate and the factor 2 per stage are
  inferred from a ±15 MHz output band.
- **Control.** The register map, the reset values, the capture and flush
  sequencing, and the `{Q, I}` word format with `tlast` framing.

Not included:

- **Processor side.** The processor system, DMA engine, interconnect, clock
  generator and reset block are not included. The top exposes the AXI4-Lite
  slave and the output stream where they would connect.
- **External input.** There is no ADC input. As in the original test setup,
  the mixer is fed by the on-chip chirp generator. To down-convert an
  external complex IF signal, drive `cmpy.a` from that source instead of
  `u_dds_lfm`.
- **Back-pressure.** The output has no flow control.

## Changing it

- **Filters.** Set `TAPS1`/`TAPS2`, `DECIM1`/`DECIM2` and `SHIFT1`/`SHIFT2`
  on `decim_chain`, and `FC` inside it. The coefficients follow
  automatically. Raising a decimation factor needs a matching cutoff
  (about 0.5/DECIM) and a new `FRAME_LEN`.
- **Output width.** Change `OUT_W` in `ddc_pkg`. To keep the gain, adjust
  `SHIFT2` to 15 + (32 − `OUT_W`).
- **Spur level.** `LUT_W` on `dds` sets it, at about 6 dB per bit. The table
  holds 2^(LUT_W−2) words.
