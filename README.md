# Digital readout for a microwave SQUID multiplexer: one 1-GHz RF block

A microwave SQUID multiplexer reads hundreds of transition-edge sensors
(TES) through one coaxial line. Each sensor is coupled through an RF SQUID
to its own superconducting resonator. Room-temperature electronics send a
comb of probe tones, one per resonator, and read the comb back. A sensor's
signal shows up as a phase shift of its tone. A common sawtooth flux ramp
drives every SQUID through several flux quanta per ramp. This turns each
tone's phase into a periodic waveform, and the sensor signal becomes the
*phase offset* of that waveform.

This repository holds synthesizable SystemVerilog for the FPGA firmware of
one 1-GHz slice of that comb (an "RF block"). It is written for the main
array of an x-ray microcalorimeter: 5x5 hydra pixels per TES, 128 channels
per GHz. The firmware does four jobs:

* **Receive.** It splits the 1-Gsps complex ADC stream into frequency
  channels and picks the channel of each resonator.
* **Demodulate.** It turns each resonator's response into an angle and
  removes the flux-ramp modulation. The result is one sensor sample per
  channel and per ramp.
* **Detect events.** It triggers on x-ray pulses and identifies the hydra
  pixel from the pulse rise time. It then grades each event by its
  distance to the neighbouring pulses and reports the matching energy
  estimate: an optimal-filter value or an integral.
* **Transmit.** It builds the probe-tone comb for the 1-Gsps complex DAC
  from one tone generator per channel.

```
 ADC I/Q ─► coarse_channelizer ─► channel_select ─► demodulator x4 ─► event_merge ─► event_processor ─► graded events
 (1 sample/clk)  (2N channels)      (N/4 slots each)   (1 value per ramp)               trigger → hydra_demux → cic_decim
                                         ▲       │                                       → pretrig_delay → optimal_filter
 DAC I/Q ◄── dechannelizer ◄─────────────┘  tones ◄┘
```

The top level is `deep_fpga`. All numbers in the defaults are those of the
main array:

| parameter | default | meaning |
|---|---|---|
| `N` | 128 | FFT size; each of the two channelizers has N bins, giving 2N channels, and N resonator slots in total |
| `TAPS` | 8 | taps per polyphase branch, analysis and synthesis |
| `HYDRA` | 1 | rise-time pixel identification on |
| `NT` | 25 | optimal-filter templates (one per hydra pixel, shared by all TESs) |
| `DECIM` | 4 | CIC decimation after pixel identification |
| `HR_LEN/MR_LEN/LR_LEN` | 4096/1024/256 | record lengths in decimated samples |
| `HR_PRE/MR_PRE/LR_PRE` | 255/63/31 | pretrigger lengths |
| `DELAY` | 512 | pretrigger delay line length (decimated samples) |
| `NS` | 4 | events in flight per channel in the optimal filter |

Other arrays need other parameters:

* The enhanced main array has 40-MHz resonator spacing. It uses `N = 32`,
  with the same records as the main array.
* The ultra-high-resolution array has 6-MHz spacing. It needs `N = 256`,
  `HYDRA = 0`, `DECIM = 1` and one template per TES (`NT = 256`). Its
  records are 1024/256/64 samples, with pretriggers 63/15/7.

## Clocking and data movement

Everything runs on one clock at one sample per clock. `adc_valid` may
stay high on every clock, and the DAC then also gets one sample per clock.

The published firmware works differently. It runs the channelizers at
500 MHz with two samples per clock, and the demodulators and event
processor at 250 MHz. Here the channelizer works on **whole frames**:

* It collects N samples, then runs the polyphase FIR and FFT on the
  complete frame in parallel (`pfb_fir`, `fft`).
* It hands the 2N-channel result on as one array.
* `channel_select` then serializes that array: each demodulator receives
  its N/4 slots on consecutive clocks after each frame.

This keeps the arithmetic easy to follow. The cost is area: the FFT is
fully unrolled. A streaming, two-samples-per-clock FFT would be needed to
meet 1 Gsps in an FPGA.

Per channel, one complex sample arrives every N clocks. For N = 128 at a
1-GHz sample clock, that is 7.8 Msps per channel. With a 500-kHz flux ramp
this gives about 15 samples per ramp.

## Number formats

* Samples: signed 18-bit I/Q (`lxm_pkg::cplx_t`). The 14-bit ADC word
  enters at the top of the 18-bit word.
* Phases and angles: unsigned 16-bit turns, where 2^16 is one full turn.
  The demodulated sensor value is a signed 32-bit unwrapped phase with the
  same scale (65536 per flux quantum).
* Coefficients: signed Q1.17 (`65536` = 0.5).
* Optimal-filter results: signed 64-bit. Templates are signed 16-bit.

`lxm_pkg::cos_sin` is an integer CORDIC function. At elaboration it
computes the FFT twiddles and the frequency-shift tables, so no `real`
arithmetic or data files are needed.

## Configuration

`cfg` (`lxm_pkg::cfg_t`) is a write-only bus: `we`, a 24-bit `addr` and
32-bit `data`. Bits [23:20] of `addr` select a region:

| region | block | address bits [19:0] |
|---|---|---|
| 1 `REG_CHAN` | analysis PFB | coefficient index `t*N + k` (tap t, branch k), Q1.17 |
| 2 `REG_DECHAN` | synthesis PFB | same layout |
| 3 `REG_SEL` | channel select | `d*(N/4) + j`. Data [15:0] is the channel for slot j of demodulator d; data[16] enables the slot's tone |
| 4+d `REG_DEMOD0+d` | demodulator d | [19:16] sub-block, then the entry (table below) |
| 8 `REG_EVENT` | event processor | 0 trigger threshold, 1 direction (0 up, 1 down), 2..5 strict dt_p, strict dt_n, relaxed dt_p, relaxed dt_n; `0x100+i` hydra boundary i |
| 9 `REG_TMPL` | templates | bit 19 selects the MR memory; [18:0] is `template*LEN + k` |

Demodulator sub-blocks (`addr[19:16]`):

* 0..3: the DDSs for LO-I, LO-Q, tone-I and tone-Q. Bit 8 = 0 writes the
  frequency and bit 8 = 1 the phase offset. Bits [7:0] select the slot.
* 4: FIR tap (bits [3:0]).
* 5 and 6: arc centre I and Q, per slot.
* 7: arc rotation angle, per slot.
* 8: flux-ramp DDS (same layout as 0..3).
* 9: mask length.
* 10: integration length.

Two kinds of storage have no reset and must be written before use: the
PFB coefficients and the templates. Every register does reset, to these
defaults:

* FIR: a 16-point average.
* DDS frequencies and offsets: 0.
* Integration length: 1.
* Trigger threshold: 1000, rising.
* Strict thresholds: 3841 (HR record after its pretrigger).
* Relaxed thresholds: 961 (MR record after its pretrigger).
* Hydra boundaries: 2, 4, 6, ...

## Coarse channelization: two channelizers half a bin apart

Resonators are not spaced on the FFT grid. A polyphase filter bank keeps
only about ±30 % of each bin free of leakage and scalloping, so one
channelizer covers only 60 % of the band. The firmware therefore runs two
channelizers on the same ADC stream:

* the "thru" channelizer, on the samples as they are;
* a second channelizer on the samples shifted down by half a bin
  (`freq_shift` with `SIGN = -1`, which multiplies by exp(-jπn/N)).

`coarse_channelizer` interleaves their bins:

* channel 2k is thru bin k, at k·fs/N;
* channel 2k+1 is shifted bin k, at (k+½)·fs/N.

Every frequency in the band therefore lies within a quarter bin of some
channel centre. The FFT's forward transform is scaled by 1/N. A tone at a
bin centre with amplitude A (in ADC units) appears with magnitude about
`16·A·g`, where g is the sum of the branch's coefficients (Q1.17).

Once per N samples, `out_valid` presents the whole 2N-channel frame. The
frame arrives log2(N)+4 clocks after the last sample of that frame.

## Channel select

There is one table, `sel[d][j]`, from slot j of demodulator d to one of
the 2N channels. It is used in both directions:

* **Receive.** Two clocks after each frame, demodulator d receives its N/4
  slots, one per clock (`rx_valid/rx_slot/rx_data`).
* **Transmit.** Tone samples from the demodulators are written into
  channel `sel[d][j]` of a tone frame, if the slot is enabled. At the next
  channelizer frame, the collected tone frame goes to the dechannelizer.
  The collection is then cleared.

## Demodulator (four per RF block, N/4 slots each)

For each slot sample, in pipeline order:

1. **Fine-tuning mixer.** The channel still carries the resonator at an
   intermediate frequency inside its bin. Two independent DDSs mix it to
   zero:
   `y_i = x_i·cos φI + x_q·sin φI` and `y_q = x_q·cos φQ − x_i·sin φQ`.
   Separate I and Q phase offsets correct a quadrature error of the
   analog demodulator.
2. **Probe tone.** Two more DDSs produce the slot's transmit tone,
   `cos φTI + j·sin φTQ`. Separate offsets correct the quadrature of the
   analog modulator. The tone goes back through the channel select. Its
   amplitude is fixed at 8192.
3. **16-tap FIR** low-pass per slot (`demod_fir`).
4. **Arc centring.** The resonator response traces an arc in the I/Q
   plane. The firmware subtracts the arc centre, which was fitted
   beforehand.
5. **Arc rotation and angle.** A rotation CORDIC turns the arc onto the +x
   axis. A vectoring CORDIC then gives its angle. This angle is the sensor
   signal plus the flux-ramp modulation.
6. **Flux-ramp demodulation** (`flux_ramp_demod`):
   * `fr_sync` marks a ramp reset, and each slot's DDS restarts at phase 0.
   * The angle θ is mixed with cos and sin of the modulation frequency.
   * The first `mask_len` samples (the reset transient) are dropped.
   * The next `int_len` samples are summed. Choose `int_len` to cover a
     whole number of modulation periods.
   * A third CORDIC takes the angle of the sum.
   * The result is unwrapped against the previous ramp's value.

   The output is one 32-bit sample per slot and per ramp.

The DDS is a 16-bit phase accumulator per slot plus an offset, feeding a
rotation CORDIC. It takes 18 clocks, and the sample rides along as a tag.

## Event processor

`event_merge` feeds the four demodulator outputs into a single stream. It
has a FIFO of depth N/4 per demodulator and a round-robin arbiter. The
channel number becomes `d·N/4 + j`. A lost sample sets `merge_overflow`.

* **trigger**: per channel, the derivative `d[n] = x[n] − x[n−1]`. It
  fires when d crosses the threshold in the selected direction. Rising:
  `d[n−1] < thr ≤ d[n]`. Falling: `d[n−1] > thr ≥ d[n]`. Together this
  is a slope trigger.
* **hydra_demux**: after a trigger, it counts how long the derivative
  stays positive (the rise time, up to 64 samples). The pixel is the
  number of programmed boundaries that the rise time exceeds. It then
  registers the event: channel, pixel and trigger sample index.
* **cic_decim**: a second-order CIC that decimates by 4, per channel. Its
  gain is removed.
* **pretrig_delay**: a per-channel circular buffer of 512 decimated
  samples. Each event is registered well before its record, including
  the pretrigger part, leaves this delay.
* **optimal_filter**: gives each event one of `NS` slots of its channel.
  As the delayed samples pass, **all three results are computed at once**:
  * HR: the full 4096-point template, three dot products at lags −1, 0
    and +1. The lags allow a later quadratic peak interpolation, which is
    not done here.
  * MR: the quarter-length template, also at three lags.
  * LR: the sum over 256 samples of `x − x(record start)`.

  The event's grade depends on dt_p, the time since the channel's previous
  trigger, and dt_n, the time to its next trigger:
  * HR if both are at least the strict thresholds;
  * LR if both are below the relaxed thresholds;
  * MR otherwise.

  dt_n may still be unknown. The time already elapsed is a lower bound,
  so the grade is settled as soon as no later trigger could change it. The
  event is reported when its grade is settled and its record is complete.
  The report holds the matching result; the other two are dropped.
  Reports come out in order of completion, not trigger order. An event
  that finds all slots of its channel busy is counted in `ev_dropped`.

The template index is the hydra pixel (`HYDRA = 1`) or the channel
(`HYDRA = 0`). `ev_time` is the trigger time in decimated samples of the
channel.

## Tone synthesis

`dechannelizer` mirrors the channelizer:

1. It splits the tone frame into even channels (thru bins) and odd
   channels (shifted bins).
2. It runs an unscaled N-point IFFT and the 8-tap synthesis polyphase FIR
   on each half.
3. It plays both out one sample per clock. The second stream is shifted
   up by half a bin.
4. It sums the two streams and cuts the result to 14 bits with
   saturation.

A constant tone of amplitude A in one channel, with a one-tap rectangular
window of coefficient 0.5, gives a DAC tone of amplitude A/32 at that
channel's frequency.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares the
block with a model written in the testbench and prints one line,
`TB_RESULT checks=N failures=M`. Highlights:

* `tb_fft`, `tb_pfb_fir`, `tb_freq_shift`: compare against direct DFT,
  FIR and complex-exponential sums.
* `tb_coarse_channelizer`: bin-centred tones on thru and shifted bins must
  land in the right channel, and leakage is checked.
* `tb_dechannelizer`: checks the tone's frequency, amplitude and
  continuity across frames.
* `tb_demodulator`: sends a synthetic arc with flux-ramp modulation
  through the whole chain and recovers the injected offset.
* `tb_optimal_filter`: checks exact HR and MR three-lag dot products, LR
  integrals and the grading for scheduled trigger patterns.
* `tb_event_processor`: pulses with different rise times and spacings
  must give the right pixel and grade, and the output must scale
  linearly.
* `tb_deep_fpga`: end to end at N = 8:
  * The test sends eight flux-ramp-modulated resonator tones, with pulses
    on three of them.
  * It checks the samples per ramp, the quiet channels, the pulse step,
    the triggers, the pixels and the HR/MR/LR grades with their spacing.
  * It checks the DAC tone comb, and that nothing overflows or is
    dropped.
* `tb_deep_fpga_full`: the top level at its default parameters.
  * One resonator tone is routed to all 128 slots and carries a burst of
    three pulses.
  * Every channel must report one LR and two MR events, 100 decimated
    samples apart.
  * This takes about four million clocks, about four minutes in
    Verilator.

To simulate a block with plain Verilator, list the package first, then
the RTL, then the testbench:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/lxm_pkg.sv rtl/*.sv tb/tb_deep_fpga.sv --top-module tb_deep_fpga -Mdir obj
./obj/Vtb_deep_fpga
```

The same pattern works for any `tb/tb_<block>.sv`.

## Where this design departs from the published firmware, and what is its own

* **Clocking.** It uses one clock and one sample per clock, with
  frame-parallel PFB and FFT, instead of 500-MHz two-sample channelizers
  and a 250-MHz back end. Channel frames travel as arrays and are
  serialized in the channel select.
* **Own choices where the published description is silent:**
  * the configuration bus and register map;
  * all word widths;
  * the phase format;
  * the DDS built from a CORDIC;
  * the shift direction of the second channelizer and the interleave
    order;
  * the merge of the four demodulator streams;
  * the trigger's exact crossing rule;
  * the rise-time definition and the programmable pixel boundaries;
  * the CIC order (2);
  * the pretrigger delay length;
  * the LR offset (the first record sample);
  * the default grading thresholds;
  * the slot-based concurrency of the optimal filter.
* **Not implemented:**
  * the quadratic interpolation of the three lags, which the original
    also leaves out;
  * any host interface beyond the write bus;
  * read-back of registers.
* **Outside the FPGA, and not modelled:** ADCs, DACs, analog I/Q
  modulator and demodulator, oscillators, amplifiers, the cryogenic
  parts, and the TES bias and flux-ramp generator. The firmware's ports
  stand in for them: `adc_*`, `dac_*`, `fr_sync` and `cfg`.
