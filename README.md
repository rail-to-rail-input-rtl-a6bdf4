# 64-channel closed-loop neurostimulator in SystemVerilog

This is RTL for a brain-implant chip that records 64 ECoG channels, detects the
onset of an epileptic seizure from the phase synchrony between two channels,
and answers with programmable current stimulation on any subset of the 64
electrodes. It follows a published 0.13 µm design with three ideas:

1. **Rail-to-rail recording without coupling capacitors.** Each channel
   digitises the *change* of its input (a delta stage in front of a
   delta-sigma loop). Electrode dc offsets anywhere between the supplies
   therefore never saturate it.
2. **One current DAC, three jobs.** Every channel has an 8-bit current DAC.
   While stimulating, it drives the electrode. While recording, it is the
   loop's feedback charge pump. Its code then sets the channel gain, which
   makes the channel an analog multiplier.
3. **FIR filters without multipliers.** A bank of 32 channels, all switched
   to one electrode, produces the 32 products of a symmetric 64-tap filter at
   once. Add-and-delay lines sum them. Rotating the bank over its 32
   electrodes gives 32 band-pass filters per bank and 64 on the chip.

The digital back end is synthesizable. The analog parts of a channel (the
modulator and the current DAC) are integer behavioural models, so the whole
closed loop can be simulated from electrode voltages to stimulation currents.
The radios, the power receiver, the ASK demodulator and the bias voltage DAC
are analog. They are not modelled: their digital sides are ports of the top.

## Block diagram

```
 elec[0..31] ─┐                                   ┌─> stim_i / stim_short
 elec[32..63]─┼─> channel_bank x2 ───────────────┤
 vref ────────┘   32 x neural_channel            ├─> i_out/q_out (monitoring)
                  │   d2s_modulator  (model)     │
                  │   current_dac    (model)     └─> fir_y ──> sync_dsp ──> detect
                  │   quad_decimator                             3 x cordic   │
                  │   channel_mem                                             │
                  32-to-1 electrode mux                                       v
                  32 x fir_add_delay_line (64 taps)                   stim_sequencer
 sampling_ctrl ── paces both banks (OSR windows / FIR slots)

 cmd_bit ─> cmd_decoder ─> config_regs ─> every block, bias_code[8]
 i_out or fir_y ─> tx_framer (tx_clk) ─> tx_short_bit | tx_long_bit
```

Top: `rtl/neurostim_soc.sv`. Shared types, sizes and the register map:
`rtl/ns_pkg.sv`.

## The recording channel

### Delta-squared-sigma loop (`d2s_modulator`)

Each cycle the channel samples its electrode `vin` and the shared reference
electrode `vref`. The feedback integrator Σ2 is the charge that the DAC has
pumped onto a capacitor, so it holds a copy of the previous input. Only the
error `e = (vin − vref) − Σ2` enters the loop. That error stays within a few
DAC steps whatever the dc level. Σ1 integrates the error, and a comparator
decides whether the DAC steps up or down next cycle.

The model is written in integers:

```
e      = (vin - vref) - sigma2
sigma1 = clamp(sigma1 + e, ±256)      -- amplifier swing
bit_up = (sigma1 + 8*e >= 0)
sigma2 = sigma2 + fb_i                -- fb_i = ±DAC current of the last bit
```

The direct `8*e` path and the clamp keep the two-integrator loop stable. They
are modelling choices. Correlated double sampling, amplifier noise and
comparator noise are not modelled.

**Gain as a division.** Over a window the up/down count of the bitstream
equals the input change divided by the DAC step. A DAC code `c` therefore
gives the channel a gain of `1/c`. The coefficient memories hold DAC codes,
and **the tap weight of code c is 1/c, not c**. To program a filter, choose
codes whose reciprocals approximate the wanted coefficient magnitudes.

### Quadrature outputs (`quad_decimator`)

Two up/down counters read the bitstream:

- **I (in-phase).** This counter is never reset. It integrates the derivative
  back into the signal: `I ≈ (vin − vref) / c`.
- **Q (quadrature).** This counter is reset every OSR samples. It keeps the
  derivative, which is 90° ahead of the signal: `Q ≈ Δ(vin − vref) / c` per
  window.

In monitoring mode every channel delivers one I/Q pair per OSR = 1000 cycles.
`iq_valid` comes one cycle after the window's last sample.

Because I counts in units of the DAC step, changing a channel's gain code
changes the unit of its running I value. A mode change restarts every
channel, and that is the way to restart cleanly after changing gains.

### DAC sharing (`neural_channel`, `current_dac`)

The DAC has two 4-bit binary-weighted segments, and the coarse segment's
reference is 16 times the fine one. It can source (push) or sink (pull), and
its LSB current is programmable. A multiplexer in the channel selects its
inputs:

| state            | code                          | direction      | LSB            |
|------------------|-------------------------------|----------------|----------------|
| monitoring       | word 0 (gain code)            | comparator bit | 1 input unit   |
| FIR mode         | word 1 (coefficient code)     | comparator bit | 1 input unit   |
| stimulating      | waveform word at `wave_idx`   | waveform bit   | `stim_ilsb`    |

While a channel stimulates, its modulator and counters hold, and its FIR
product is forced to zero.

## FIR mode: 64 band-pass filters from 64 channels

`sampling_ctrl` divides time into **slots** of `CONV` = 1000 cycles, and 32
slots make a **frame**. In slot `s` the following happens:

1. The 32-to-1 multiplexer of each bank connects all 32 channels to electrode
   `s` of that bank.
2. The first cycle of the slot clears every channel's integrators. The next
   999 cycles are one incremental conversion. Channel `j`, holding code
   `c_j`, ends with `p_j ≈ (x_s − vref) / c_j`, saturated to 10 bits.
3. The 32 products enter the add-and-delay line of electrode `s`, which is a
   transposed-form 64-tap filter. Product `j` feeds tap `j` and tap `63 − j`,
   each with its own sign bit (`fir_neg`). This uses the symmetry
   `|M_i| = |M_63−i|`:

```
s[k] <= s[k+1] ± p[min(k, 63-k)]      s[63] <= ± p[0]      y = s[0]
```

Each of the 64 filters thus gets one new output per frame of 32 000 cycles.
`fir_valid` pulses after the last line of the frame has been updated.

**Matching the chip's rates.** The chip clocks its channels 32 times faster
in this mode to keep the output rate. At a 2.56 MHz clock, a frame of 32 000
cycles gives the 80 S/s filter rate measured on the chip.

**Input range.** A product counts from zero in each slot, so the FIR-mode
input range is about ±999 DAC steps around `vref`. A larger offset saturates
the product at a constant level. A band-pass filter with balanced signs
removes that constant.

**Sampling pulses.** On the chip the 32 channels take their short sampling
pulses one after another, so that the electrode sees the impedance of only
one channel at a time. That staggering happens within one sampling period and
is not modelled. Here all channels of a bank sample in the same cycle.

## Seizure detection (`sync_dsp`, `cordic`)

For each frame, the detector takes the filter outputs `ya` and `yb` of the
channel pair `ch_a` and `ch_b`. For each channel it forms the in-phase value
`y[n−1]` and the quadrature value `y[n−2] − y[n]`. The central difference is
90° from the in-phase value at every frequency, so no Hilbert filter is
needed. Three iterative CORDIC engines (12 micro-rotations, one per clock)
then do the work:

| core | mode      | job                                                           |
|------|-----------|---------------------------------------------------------------|
| 1    | vectoring | 8-bit phase of channel a, then of channel b                   |
| 2    | rotation  | unit phasor (amplitude 256) of the phase difference, summed over `plv_win` frames |
| 3    | vectoring | magnitude of the sum, divided by the CORDIC gain: `plv = 256 · win · coherence` |

`detect` pulses when `plv ≥ plv_thr · plv_win`. Here `plv_thr` is the
coherence threshold in 1/256 units; a subject-specific value is programmed
over the command link. Phases are ready about 30 cycles after the frame. The
coherence result comes about 15 cycles after the last frame of a window.

## Stimulation episodes (`stim_sequencer`)

An episode starts on a detection (when `closed_loop` is set) or on a write to
`A_TRIG`. It then runs in three parts:

- **Pulses.** `n_pulses` pulses go out, one every `pulse_period` cycles.
- **Waveform.** During a pulse, `wave_idx` steps through samples
  `0..wave_len`, each held for `samp_period` cycles. Every channel in
  `stim_mask` plays its own waveform memory, so shapes can differ from
  channel to channel. A biphasic pulse is simply source samples followed by
  sink samples.
- **Shorting.** When the last pulse period ends, `stim_short` connects the
  masked electrodes to VDD/2 for `short_len` cycles. This drains the charge
  left by source/sink mismatch. If a pulse fills its whole period, shorting
  starts the cycle after the pulse.

A trigger during an episode is ignored.

## Command link and registers (`cmd_decoder`, `config_regs`)

The ASK demodulator of the power link provides `cmd_bit` with a strobe
`cmd_bit_valid`. A frame is `8'hA5`, then a 16-bit address, 16-bit data and
an even-parity bit, all MSB first. A frame with bad parity is dropped and
counted in `cmd_errors`.

| address           | content                                                            |
|-------------------|--------------------------------------------------------------------|
| 0x0000            | bit0 FIR mode, bit1 closed loop, bit2 long-range radio, bit3 transmit |
| 0x0001            | `ch_a` [5:0], `ch_b` [13:8]                                       |
| 0x0002 / 0x0003   | coherence threshold (256 = 1.0) / window in frames                |
| 0x0004            | stimulation LSB current                                           |
| 0x0005 / 0x0006   | cycles per waveform sample / last waveform index                  |
| 0x0007 / 0x0008   | pulse period [15:0] / [23:16]                                     |
| 0x0009 / 0x000A   | pulses per episode / shorting cycles                              |
| 0x000B            | manual stimulation trigger                                        |
| 0x0010–0x0013     | stimulation mask, 16 channels per word                            |
| 0x0014–0x0017     | FIR tap sign bits, 16 taps per word                               |
| 0x0020–0x0027     | the eight 8-bit bias voltage DAC codes (`bias_code`)              |
| 0x1000 \| ch<<5 \| w | channel memory: w=0 gain code, w=1 FIR code, w=2..17 waveform `{dir, mag[7:0]}` |

## Radio frames (`tx_framer`)

A frame is `16'hB38F`, a status byte, and 64 words of 16 bits, MSB first. The
status byte holds: FIR mode, closed loop, stimulation busy, shorting, and
detection since the last frame. The words are the I samples in monitoring
mode, or the filter outputs shifted right by 2 in FIR mode. `radio_sel`
chooses the short-range or the long-range line; the other line stays low.

**Two clocks.** The radios run at megabits per second, while the channels run
at a 1 MHz modulator clock, so the framer has two clock domains:

- On `clk`, a new data set is copied into a frame register and a request
  line toggles.
- On the transmitters' own clock `tx_clk`, the request passes two
  synchroniser flops and the frame goes out, one bit every `TX_DIV` `tx_clk`
  cycles. `tx_bit_strobe` marks each new bit.
- After the last bit, an acknowledge toggle travels back through two flops
  and ends `busy`.

The frame register does not change while `busy`, so the transmit side reads
it without further synchronisation. A data set that arrives while `busy` is
skipped and counted. A frame is 1048 bits. It takes 105 µs at 10 Mb/s,
against 1000 µs per monitoring window, so at the chip's rates every window is
sent. `tx_short_bit`, `tx_long_bit` and `tx_bit_strobe` belong to `tx_clk`.

## Sizes

| parameter             | value | origin                                |
|-----------------------|-------|---------------------------------------|
| channels / per bank   | 64 / 32 | chip                                |
| FIR taps / product bits | 64 / 10 | chip                              |
| OSR                   | 1000  | chip                                  |
| slot conversion `CONV`| 1000  | from the chip's 32× clocking in FIR mode |
| DAC                   | 8 bit, 4+4 segments, 16:1 | chip                  |
| phase word            | 8 bit | chip                                  |
| electrode sample, I/Q | 16 bit | own choice                           |
| accumulator           | 18 bit | own choice                           |
| waveform memory       | 16 samples per channel | own choice           |
| CORDIC                | 24-bit operands, 12 iterations | own choice   |

After synthesis the full chip is about 17 000 word-level cells and 94 000
flip-flop bits, of which the 4096 add-and-delay accumulators are the largest
part.

## How far to trust it

**Taken from the chip's description:**

- the delta-squared-sigma channel with a reference-derivative subtraction;
- I/Q from one never-reset and one reset counter;
- gain inversely proportional to the feedback DAC code;
- the 4+4-bit push/pull DAC with a programmable LSB, shared between
  stimulation and recording;
- 32-channel banks computing symmetric 64-tap FIR products through a 32-to-1
  multiplexer into per-electrode add-and-delay lines clocked in turn;
- CORDIC-based phase synchrony with a threshold;
- masked arbitrary-waveform pulse trains followed by shorting to VDD/2;
- an eight-output 8-bit bias DAC;
- two transmitters.

**This design's own choices:**

- the modulator's stabilising path and swing limit;
- clearing the integrators at every FIR slot;
- the quadrature rule used in the detector and the split of work among its
  three cores;
- all word widths, the channel memory map and the register map;
- the command frame and the radio frame formats;
- the stimulation timing fields;
- one modulator sample per `clk` cycle, with no sub-cycle sampling stagger;
- the separate transmit clock and its handshake.

**Departures from the chip:**

- The chip band-pass filters both of its quadrature outputs. Here each filter
  sees the incremental value samples of its electrode, and the detector forms
  the quadrature from a central difference of the filter output.
- The chip has a dedicated single-ended reference channel whose derivative is
  subtracted inside each channel. Here the reference electrode voltage `vref`
  enters every modulator directly, which gives the same difference.
- Clock recovery from the inductive link is not modelled. `clk` and `tx_clk`
  are inputs of the top.

**Limits:**

- The analog models are ideal: there is no noise, mismatch or crosstalk.
- Products of the multiplying channels carry about ±1 count of quantisation.
- The threshold is compared against a coherence that is distorted by the
  unequal I/Q amplitudes of the central difference. Both channels of a pair
  are distorted alike, so phase locking still reads as a coherence near 1.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ns_pkg.sv \
          tb/neural_channel_tb.sv --top-module neural_channel_tb -o sim
./obj_dir/sim
```

Verilator finds the other modules through `-Irtl`. Testbenches:

- `neurostim_soc_tb`: the whole chip end to end at OSR = CONV = 64, in
  seconds. It configures the chip over the command link, including one
  corrupted frame. It then records rail-to-rail channels (+20 000 and −25 000
  input units from the reference), sends frames on both radios, fires a manual
  episode, switches to FIR mode and waits for a closed-loop detection with
  automatic stimulation. Finally it prints how often each mechanism
  happened.
- `neurostim_soc_full_tb`: the same sequence at the default sizes, with
  `tx_clk` five times faster than `clk`. It checks that the radio sends
  every monitoring window. It runs about 700 000 cycles in a few seconds.
- `fir_bandpass_tb`: one full-size bank programmed as a 10 Hz band-pass
  filter at 80 S/s. The codes come from a Hann-windowed cosine as
  `c_j = round(max|h| / |h_j|)`. It feeds 10 Hz and 30 Hz tones to two
  electrodes and compares the output amplitudes with the ideal filter with
  the same rounded weights. The hardware lands within 0.3% of it, with about
  30 dB between the two tones. It runs 3.5 million cycles, in under a minute.
- `stim_workload_tb`: runs two stimulation programs at full length through
  the sequencer and a channel DAC, with one cycle standing for 1 µs and the
  LSB current set to 5 µA. The first is the seizure-abortion burst: biphasic
  150 µA pulses of 100 µs per phase, 5 Hz, 5 s. The second is an unbalanced
  biphasic pulse of 50 µA for 80 µs and 120 µs, followed by shorting. It
  checks pulse counts, spacing, phase lengths, charge per phase and when
  shorting starts.
- Block testbenches (`*_tb.sv`): each compares its block with an independent
  reference. These are closed-loop tracking for the modulator, direct-form
  convolution for the add-and-delay line, floating-point atan2, sin and cos
  for the CORDIC, and cycle-exact schedules for the sequencer and the
  sampling controller.

The shared end-to-end sequence is in `tb/soc_tb_body.svh`. To try other
sizes, override `OSR_P`, `CONV_P` and `TX_DIV` on `neurostim_soc`, or
`NB`/`NT` on `channel_bank` (the bank testbench uses 4 channels and 8 taps).
