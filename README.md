# Bidirectional neural interface back-end: multiplexed recording with adaptive stimulus-artifact cancellation

A brain-computer interface that both records and stimulates has one main problem. A stimulus pulse of a few milliamps puts an artifact of tens to hundreds of millivolts on the recording electrodes. The neural signals being recorded are microvolts. A low-voltage recording front-end saturates during every pulse and loses the signal.

This design removes the artifact before the amplifier. Each stimulator has a small adaptive canceller. It learns, sample by sample, the waveform that the stimulator's pulses produce on each recording channel it affects. During the next pulse it plays that waveform back into the input capacitive DAC (CDAC). The CDAC subtracts it from the electrode signal, so the amplifier and ADC see only the neural signal and a small residual. The residual is the error that trains the template further.

The RTL is the digital side of a 65 nm chip with the following parts:

- a recording chain for 64 channels at 2 kS/s each. A multiplexer scans the channels through one amplifier and one 8-bit SAR ADC. Each channel has a delta-encoding integrator that tracks the slow part of its signal through a 10-bit CDAC.
- four H-bridge current stimulators. Each plays a programmable current waveform and sequences the switches of its output stage.
- four canceller back-ends, one per stimulator. Each serves four sense channels with 32 taps of 10 bits. Together they hold 16 stim-sense pairs, 5120 bits of template memory.

The analog parts are outside the RTL and meet it at the top-level ports. These are the amplifier, CDAC, ADC, electrode multiplexer, charge pumps, high-voltage switches and current DACs; see [Not included](#not-included).

## Recording: a time-multiplexed delta encoder

`rec_sequencer` divides time into **slots** of 16 clock cycles, one channel per slot. A **frame** is one scan of all channels: 64 × 16 = 1024 cycles. At 2.048 MHz that gives 2 kS/s per channel. Setting `ch_last` shortens the scan. With `ch_last = 7`, eight channels are scanned at 16 kS/s each.

`delta_encoder` holds one 10-bit register per channel. The register value drives the CDAC, which subtracts it at the amplifier input in steps of 64 ADC LSBs. After each conversion, a three-level decision moves the register:

| ADC code | register step |
|---|---|
| 192 or above | +1 |
| 64 to 191 | 0 |
| below 64 | -1 |

This keeps the 8-bit ADC inside its range as the signal drifts. The 16-bit output sample is rebuilt as `W(register) + adc_code`. `W` is the sum, over the set register bits, of a programmable 16-bit weight per bit. The ideal weights are `64 << k`, so ideally `W(r) = r << 6`. Measured weights can be written through `wl_*` to calibrate a mismatched CDAC. Registers reset to mid-scale (512), and the output saturates at 65535.

## Artifact cancellation

### From an adaptive FIR filter to a lookup table

The textbook canceller is an FIR filter with LMS adaptation. Its input `x(n)` is the stimulus, its output is subtracted from the recording, and every tap is updated with `c_k += mu·e(n)·x(n-k)`. That costs multipliers and a delay line per tap, and again per channel.

Here the filter input is an **impulse** at the start of each pulse. Three things follow:

- At any time exactly one tap is active: the tap number is the time since the pulse.
- The filter output equals that tap's coefficient, so the coefficients are simply the artifact waveform.
- The update of the active tap reduces to `y(n) += mu·e(n)`.

So each back-end is a memory, a counter and one adder:

```
  stimulator launch ──► tap_counter ── n (frames since pulse) ─┐
                                                               ▼
  channel of this slot ─► sense-channel match ── R ──► SRAM[{n,R}] ──► CDAC (subtract)
                                                           ▲   │
                               ADC residual e ─► lms_update: y + round(e >>> mu), saturate
```

The step size `mu` is a power of two, so the multiplication by `mu` is an arithmetic shift. One update unit per back-end serves all its sense channels. Within a frame it visits every sense channel at tap `n`, and then the tap advances, so the adaptation runs channel-first, tap-second.

### Timing inside one slot

| cycle of slot | what happens |
|---|---|
| 0 (`slot_start`) | Integrator register and template word `{n, R}` are read. |
| 1 | `cdac_int_code` valid. |
| 2 | `cdac_canc_code[s]` valid for every back-end serving this channel (zero otherwise). |
| 4 | `adc_convert`: the analog side samples with both CDAC codes applied. |
| ≤ 15 | `adc_valid` + `adc_code`. The integrator steps, the updated template is written back to the same address, and the output sample appears one cycle later. |

The ADC therefore has 11 cycles (about 5.4 µs at 2.048 MHz) from convert to result. The tap number changes only on the clock edge that ends a frame, so it is constant for all slots of a frame.

### Pulse alignment

The template is only useful if every pulse has the same timing relative to the recording samples. For that reason a stimulator launches its pulses only on a frame boundary. The launch cycle is also the cycle in which the canceller's tap counter opens its window at tap 0. The window stays open for 32 frames: 16 ms at 2 kS/s, or 2 ms at 16 kS/s.

### The update rule and its stability

The error is the ADC code re-centred at zero, `e = adc_code − 128`. It is the signal left after both CDAC subtractions. One template LSB is one CDAC step, which is 64 ADC LSBs. Each pulse therefore reduces the residual at a given tap by the factor `1 − 64/2^mu`:

| `mu_shift` | behaviour |
|---|---|
| 7 | Loop gain 1/2. The residual halves every pulse. For the canceller alone, a full-scale artifact is learned in about 8 pulses. In the closed-loop simulations, with the integrator acting too, 60 pulses at 2 kS/s and 100 pulses at 16 kS/s were allowed, and both reached a residual within one CDAC step. At 16 kS/s, 40 pulses were not enough. The chip is reported to converge within 120 pulses. |
| 6 | Gain 1. Converges in one step when nothing else disturbs the channel. |
| below 6 | Over-correction. The loop oscillates, and with `mu_shift = 0` it runs into saturation. |

The shift rounds to nearest: half of the divisor is added before shifting. A plain arithmetic shift returns −1 for every small negative error and 0 for every small positive one. That bias pushes templates steadily downward, and the residual settles one or more CDAC steps off.

Templates saturate at ±511. `ev_saturate` reports each clipped update.

**Interaction with the integrator and with other cancellers.** On a sense channel, the delta-encoder integrator also reacts to the residual, by up to one CDAC step per sample. Its correction is seen by the next sample, at the next tap. Two back-ends can also serve the same channel with overlapping windows. Then both see the same residual and both correct it, which doubles the loop gain.

The total gain per sample is `64·k/2^mu` for `k` adapting back-ends, plus the integrator. It has to stay well below 2. With `mu_shift = 6` and two back-ends on one channel, the loop settles into a limit cycle instead of converging.

The CDAC adds all template outputs, on the assumption that overlapping artifacts superimpose linearly. The robust configuration is therefore:

- Give each sense channel to **one** back-end.
- Let that back-end learn the sum of all artifacts that reach the channel. This works as long as the stimulators fire with a fixed relation to each other.
- Use `mu_shift = 7`.

The end-to-end testbench uses exactly this configuration. On two channels it superimposes the artifacts of two stimulators.

### Control

| input | effect |
|---|---|
| `cancel_en` | Gates the template outputs to the CDAC. |
| `adapt_en` | Enables write-back. |
| `canc_clear` | Writes zero into all 128 words of every back-end, one word per cycle. `canc_clearing` is high meanwhile, and no slot is served during those 128 cycles. |

The SRAM has no reset, so clear it once after power-up. `sense_ch[s][j]` assigns recording channel numbers to the four template rows of back-end `s`. If the same channel appears twice in one back-end, the lowest row wins.

## Stimulators

`stim_waveform` stores up to 32 samples per stimulator. Each sample is `{neg, mag[7:0]}`:

- `mag` is the IDAC code. With the nominal 10 µA LSB, the maximum is 2.55 mA.
- `neg` selects the current direction.
- A zero sample leaves both electrodes grounded.

A sample lasts `step_div + 1` cycles, and `wave_len` samples are played. This covers square biphasic pulses, half-sines, and rising or decaying exponentials. For example, 32 samples of 128 cycles make a 2 ms pulse at 2.048 MHz. A pulse launches every `period` frames (`period = 50` gives 40 pulses/s at 2 kS/s), or once after `go`. Launches are skipped while a pulse is still playing.

`hbridge_ctrl` turns the sample stream into switch controls (`hb_ctrl_t`) for an H-bridge between electrodes A and R:

- **Sourcing.** The sourcing side's resonant charge pump lifts its electrode through a diode switch. The pump runs only while the supply-enable comparator (`dropout`) says the current DAC is about to lose regulation. This makes the supply voltage just as high as the load needs.
- **Sinking.** The other side sinks the current through its high-voltage adapter into the shared IDAC.
- **Idle pumps.** A pump not in use is held discharging, which reverse-biases its diode.
- **Rest.** At rest both sides are grounded.
- **Break-before-make.** Every change of direction or to rest passes through a 2-cycle gap with all paths open.

Assertions in `hbridge_ctrl` forbid two sinking sides, two running pumps, a grounded side that sinks, and a pump that charges while discharging. `cms_cue` is high while any stimulator plays a pulse. It is intended for the input common-mode suppression switches.

## Top level: `bbci_top`

`bbci_top` wires one `rec_sequencer`, one `delta_encoder`, and four sets of `stim_waveform` + `hbridge_ctrl` + `artifact_canceller`. Stimulator `s` triggers canceller `s`. Configuration is plain input ports; there is no register bus. The `ev_*` outputs are one-cycle event strobes for observation:

| strobe | event |
|---|---|
| `ev_trigger` | pulse launch |
| `ev_update` | template write-back |
| `ev_saturate` | saturated update |
| `ev_break` | break-before-make gap |
| `ev_int_step` | integrator up/down step |
| `ev_frame` | end of frame |

At the default sizes, synthesis gives about 1250 flip-flops, plus 4 × 1280 template bits and 4 × 288 waveform bits as memories.

| module | role |
|---|---|
| `bbci_pkg` | Sizes, `hb_ctrl_t`, `stim_sample_t`, H-bridge states. |
| `rec_sequencer` | Slot/frame timing, multiplexer select, ADC convert. |
| `delta_encoder` | Per-channel integrator, weight look-up, output samples. |
| `tap_counter` | Frames-since-pulse counter and 32-frame window. |
| `artifact_sram` | Single-port synchronous 128 × 10 template memory. |
| `lms_update` | Rounded shift update with saturation. |
| `artifact_canceller` | One back-end: match, read, CDAC output, write-back, clear. |
| `stim_waveform` | Waveform memory, playback, frame-aligned launch, trigger. |
| `hbridge_ctrl` | H-bridge switch sequencing, pump enable, IDAC code. |

## Simulation

Every module in `rtl/` has a self-checking testbench in `tb/<module>_tb.sv`. Each one ends by printing `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module bbci_top_tb \
    -y rtl -y tb rtl/bbci_pkg.sv tb/bbci_top_tb.sv -o sim -Mdir obj
./obj/sim
```

Substitute any other testbench name for `bbci_top_tb`.

`bbci_top_tb` runs the whole design at its default sizes for a few seconds of wall time. It is closed around `tb/bbci_afe_model.sv`, a behavioural model of the analog side:

- tissue coupling of each stimulator onto chosen channels, with a decaying artifact;
- a test tone and an offset per channel;
- the CDAC subtraction;
- an 8-bit ADC that clips;
- a simple pump/dropout loop.

The four stimulators play four different shapes, 40 times a second, with overlapping windows. The test runs in phases:

1. **Cancellation off.** The ADC clips.
2. **60 pulses of adaptation.** Over the last 10 pulses the residual must stay within about one CDAC step on every sense channel, with no clipping.
3. **Forced saturation.** Adaptation runs with `mu_shift = 0` while the CDAC output is off. This drives templates into saturation. A clear follows.
4. **Short scan.** The scan is cut to 8 channels (16 kS/s).

Throughout, the testbench checks frame lengths and channel order, and counts every mechanism: launches, updates, saturations, clears, integrator steps, gaps, pump enables, CMS cue and clipping. A mechanism that never happens counts as a failure.

`bbci_workload_tb` runs two more operating points at the default sizes, and checks the interval between pulses in clock cycles for each:

- **Spike band.** 8 channels at 16 kS/s, with a square biphasic pulse 77 times a second (every 207 frames of 128 cycles).
- **Low rate.** 64 channels at 2 kS/s, with ±150 µA pulses (IDAC code 15) 5 times a second (every 400 frames).

In both cases the ADC must clip while cancellation is off. After adaptation, the residual must stay within one CDAC step. The run takes about 10 s.

## Departures from the chip and open points

- **Chosen where the chip's description is silent:**
  - slot length (16 cycles) and convert position;
  - delta-encoder thresholds;
  - per-bit weight look-up organisation;
  - error definition and rounding;
  - sense-channel map;
  - clear sequence;
  - waveform memory format and depth;
  - frame-aligned launch;
  - 2-cycle break-before-make gap.
- **Template memory.** The chip holds its 5120 template bits in one custom low-voltage SRAM. Here they are four 128-word arrays, one per back-end, with the same total.
- **Interfaces.** The chip can swap templates with off-chip memory over a serial link; that link is not included. Configuration is plain ports; a real chip needs a register or serial interface in front of them.
- **CDAC summation.** The chip adds the four canceller codes and the integrator in the analog CDAC. Here they are separate outputs.
- **Pump discharge.** On the chip, the diode-switch discharge is governed by an analog tracking comparator. Here `discharge_*` is a plain digital enable.
- **Shared-channel stability.** The limit cycle with several back-ends on one channel, described above, is not compensated in hardware.

## Not included

These parts are analog and are represented only by ports and by the testbench model:

- the 12-stage resonant charge pumps (3 GHz, 180 pH);
- diode high-side switches and their tracking comparators;
- high-voltage adapters (cascoded current buffers);
- the 8-bit sinking IDAC;
- supply-enable comparators;
- the 10-bit input CDAC;
- the amplifier;
- the SAR ADC;
- the electrode multiplexer with its autozero and common-mode suppression switches.
