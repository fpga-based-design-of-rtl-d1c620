# Hearing aid with response selection by DTMF tones

A hearing aid has to apply a frequency-dependent gain that compensates the wearer's
hearing loss, and it is useful to switch between a few variants of that response: flat,
cutting high-frequency noise, cutting low-frequency noise, or both. The controls for that
switch are hard to reach on a device that sits in the ear. This design needs no control
at all. The wearer plays a DTMF keypad tone, the kind a phone makes, from any hand-held
device. The tone reaches the hearing aid through its normal microphone and converter.
A tone detector running beside the audio filter recognises the key and loads the
matching set of filter coefficients.

The RTL has two blocks working in parallel on the same 16-bit, 10 kHz audio stream:

```
            +--------------------------------------------+
 audio_in --+--> fir_filter (513 taps, 4 coefficient sets) +--> audio_out (16 bit)
   16 bit   |            ^ 4-bit code
            |            |
            +--> dtmf_detector (8 Goertzel channels, 250-sample blocks)
```

Keys `1`, `2`, `3` and `A` select the all-pass (AP), low-pass (LP), high-pass (HP) and
band-pass (BP) coefficient sets. The other twelve keys are still detected and reported,
but they leave the filter response as it is.

## The multiply-accumulate FIR filter

The audio filter is a 513-tap linear-phase FIR filter. Such a long filter can give the
fine-grained magnitude shape needed for hearing-loss compensation while keeping a
linear phase. A direct implementation would need 513 multipliers. This one uses a single
multiplier and a single adder, applied once per tap, so it runs 513 processing cycles
for each audio sample.

The arithmetic is the transposed form of the FIR filter. It keeps one partial sum per
tap in registers `Reg 0 .. Reg N-1`. For each new sample `x(n)`:

```
Reg k   <= x(n) * h(k) + Reg k+1     k = 0 .. N-2
Reg N-1 <= x(n) * h(N-1)
y(n)     = Reg 0
```

`seq_controller` steps `k` upward from 0. Register `k+1` is therefore read before it is
overwritten in the same sample, and it still holds the previous sample's partial sum.
Each step takes two clock phases (`fir_mac_datapath`):

1. **processing cycle** (`p_en`, `mux_sel = k`): register B takes `h(k)` from the ROM,
   and register C takes the output of multiplexer MUX_R. MUX_R selects register `k+1`,
   or zero when `k = N-1`.
2. **load cycle** one clock later (`r_en`, `r_idx = k`): register `k` takes
   `x(n) * B + C`.

The two phases overlap: load of tap `k` happens in the same clock as processing of tap
`k+1`. A sample therefore takes N+1 = 514 clocks. The system clock must be at least
514 × 10 kHz = 5.14 MHz. The processing clock and the per-register load clocks are
written as clock enables of a single system clock, not as derived clocks.

Widths: 16-bit samples and 12-bit coefficients (sign-extended to 16 bits in register
B). Products, partial sums and registers are 32 bits; the sum wraps at 32 bits. The
output is `Reg 0 >>> OUT_SHIFT`, saturated to 16 bits. With `OUT_SHIFT = 11` the
coefficients are in Q1.11, where 2048 means a gain of 1.

**Switching responses.** The coefficient set is latched when a sample arrives, so it
never changes in the middle of a sample's 513 steps. After a switch, the partial sums
already in the registers were built with the old set. Output `y(n)` is then
`sum_k h_s(n-k)(k) · x(n-k)`, where `s(m)` is the set in force when sample `m`
arrived. The filter moves from the old response to the new one over 513 samples
(51 ms). The testbenches check this exact behaviour.

**Coefficient contents.** A fitted instrument would store, for each of the four
noise-attenuation responses, its product with the wearer's loss-compensation response.
The loss-compensation response comes from the audiogram by linear interpolation of the
gains at the test frequencies. The four sets would be computed off-line by iterated
frequency sampling. Those numbers depend on the patient, so `coef_rom` instead holds
generic linear-phase sets computed by a function at start-up. All of them are centred
on tap C = 256, in Q1.11:

| set | taps | shape |
|-----|------|-------|
| AP | `h[C] = 2047` | pure delay of 256 samples |
| LP | `h[C±d] = 409` for `d ≤ 2` | 5-tap average, first null at 2 kHz |
| HP | `h[C] = 1950`, `h[C±d] = -97` for `1 ≤ d ≤ 10` | impulse minus a 21-tap average |
| BP | LP convolved with HP, divided by 2048 | `409·[d≤2] − 19·overlap(d)`, with `overlap = 5` (d≤8), `13−d` (d≤12), else 0 |

To fit a user, replace `placeholder_coef` in `rtl/coef_rom.sv` with the fitted values.

## The DTMF detector

A DTMF digit is the sum of one of four row tones (697, 770, 852, 941 Hz) and one of
four column tones (1209, 1336, 1477, 1633 Hz). `dtmf_detector` cuts the input into
blocks of 250 samples (25 ms). A free-running counter aligns the blocks from reset. Each
sample goes to eight channels, one per frequency.

* **`goertzel_filter`**: the Goertzel resonator
  `s[n] = x[n] + c·s[n-1] − s[n-2]`, with `c = 2cos(2πf/fs)` in Q2.14, computed as
  `round(2^14 · 2cos(2πf/10000))` (the values are in `hearing_aid_pkg`). Its poles lie
  on the unit circle, so the state is cleared at the start of each block. A tone at the
  tuned frequency makes `s` grow linearly through the block. Other tones keep it
  bounded.
* **`energy_calc`**: sums `(s >> 12)²` over the block, saturating at 32 bits. The
  shift keeps a full-scale block inside 32 bits.
* **`dtmf_decision`**: at the end of the block it takes the strongest row channel and
  the strongest column channel. It accepts the block as a digit only if all of these
  hold:
  * both strongest energies reach `E_THRESH` (32768);
  * each exceeds every other channel of its group by at least 2^`REL_SHIFT` = 8
    (9 dB);
  * the raw input crossed zero between `ZC_MIN` = 25 and `ZC_MAX` = 110 times in the
    block. A tone pair between 697 and 1633 Hz gives about 35–82 crossings per 25 ms.
    Low-frequency content (speech, hum) gives fewer; broadband noise gives more.

  An accepted digit loads `{row, col}` into the output register and pulses
  `code_valid`. A rejected block pulses `tone_reject` (energy tests) or `zc_reject`
  (energy tests passed, zero-crossing test failed), and the register keeps the last
  digit. It resets to code 0 (key `1`, all-pass).

The rules of the decision stage and their thresholds belong to this design and are
parameters. The structure of the detector is fixed: eight second-order resonators, a
250-sample energy per channel, one decision and zero-crossing stage, and an output
register. A tone must cover one whole block to be seen, so it must last at least
50 ms to be sure of that.

In simulation, the detector finds all 16 keys at levels of a few thousand LSB. It stays
silent on silence, on a single tone and on strong noise. It rejects a tone pair riding
on a large 60 Hz hum by its zero-crossing count. It still detects a key with broadband
noise of the same power as the tones (0 dB SNR) in every block.

## Timing and interface of the top level

`hearing_aid_top` (parameters `N_TAPS = 513`, `OUT_SHIFT = 11`, `N_BLOCK = 250`):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | system clock, asynchronous active-low reset |
| `sample_valid` | in | 1 | one-clock pulse per audio sample; pulses at least N_TAPS+1 clocks apart |
| `audio_in` | in | 16 | signed sample |
| `audio_out`, `audio_out_valid` | out | 16, 1 | filtered sample, valid in the 4th cycle after the strobe |
| `dtmf_code`, `dtmf_valid` | out | 4, 1 | last detected key `{row, col}`; pulse when written |
| `dtmf_block_done`, `dtmf_tone_reject`, `dtmf_zc_reject` | out | 1 | per-block decision events |
| `dtmf_zc_count`, `dtmf_energy[8]` | out | 9, 8×32 | zero crossings and channel energies of the last block |
| `response` | out | 2 | coefficient set in force (0 AP, 1 LP, 2 HP, 3 BP) |
| `busy` | out | 1 | filter sequence running |

A DTMF decision appears three cycles after the last sample of a block. A new response
takes effect from the next input sample. An assertion in `seq_controller` reports a
sample strobe that arrives while the filter is still busy; that strobe is ignored.

Not included: the audio codec (microphone preamplifier, ADC and DAC) and the FPGA logic
that talks to it, meaning its serial audio and configuration interfaces. The top level
takes and delivers parallel samples with a strobe instead.

## Where this RTL makes its own choices

* Single system clock with clock enables, instead of a sampling clock, a processing
  clock and per-register load clocks.
* The mapping of keys `1 2 3 A` to AP/LP/HP/BP. The design only fixes that four of
  the sixteen codes are used.
* The decision rules, thresholds and zero-crossing range of the DTMF detector, the
  energy pre-scaling, and the reset of the resonators at each block.
* The 1477 Hz column frequency. The block diagram this design follows labels that
  channel 1447 Hz; 1477 Hz is the DTMF standard. With 40 Hz resolution per 250-sample
  block, a 1447 Hz channel would also respond to 1477 Hz.
* Fixed-point formats (Q2.14 resonator coefficient, Q1.11 filter coefficients,
  `OUT_SHIFT`), 32-bit wrap-around accumulation, saturation of the audio output, and
  reset of all registers to zero.
* Placeholder coefficient contents (see above).

## Resources

Synthesis of the top level gives about 17,600 flip-flops and 24,624 ROM bits. Most of
the flip-flops are the 513 × 32-bit partial-sum registers; the ROM is 4 × 513 × 12 bits.
The 513-to-1 multiplexer in front of register C is the largest piece of logic. The
design uses one 16 × 16 multiplier for the filter and eight 16 × 32 multipliers for the
resonators.

## Files and simulation

`rtl/`: `hearing_aid_pkg` (types, widths, Goertzel coefficients, key mapping),
`goertzel_filter`, `energy_calc`, `dtmf_decision`, `dtmf_detector`, `seq_controller`,
`coef_rom`, `fir_mac_datapath`, `fir_filter`, `hearing_aid_top`.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog. `tb_hearing_aid_top` runs
the whole design at its default size for 13 blocks (3250 samples, about 1.7 M clocks).
It compares every output sample with a reference convolution, checks every detected
key and every response switch, and requires that detection, switching, the
ignored-key case, energy rejection and zero-crossing rejection each occur. It takes
well under a minute with Verilator.

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hearing_aid_pkg.sv tb/tb_hearing_aid_top.sv --top-module tb_hearing_aid_top
./obj_dir/Vtb_hearing_aid_top
```

Swap the testbench name to run any other block. The smaller testbenches override sizes
where that keeps them short: `tb_fir_filter` uses 33 taps, `tb_fir_mac_datapath` 16 and
`tb_seq_controller` 9. `tb_coef_rom` and `tb_dtmf_detector` run at the full size.
