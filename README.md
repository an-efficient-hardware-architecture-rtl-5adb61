# Template-matching spike sorter

An electrode in the brain picks up the action potentials ("spikes") of several
nearby neurons on top of background noise. Each neuron's spike has its own
shape, so telling the neurons apart means classifying every spike by its
shape. Transmitting the raw recording off an implant costs a lot of
bandwidth and power (16-bit samples at 24 kHz are 384 kbit/s per electrode).
Sorting the spikes on the implant means only a few bits per spike have to
leave it.

This RTL sorts spikes on line for one electrode using **template matching**.
The expensive part of spike sorting happens once, off line, on a workstation:
feature extraction and clustering of a minute of recorded data. That step
yields a detection threshold, a few typical spike waveforms (the *templates*)
and a maximum distance for a match. These are programmed into the hardware.
From then on the hardware does three cheap things for every sample:

1. **detect**: a non-linear energy operator (NEO) flags samples that are both
   large and fast-changing;
2. **align**: the detected spike is cut out of a window so that its maximum
   always falls on the same sample;
3. **match**: the squared Euclidean distance to each template is accumulated
   one sample per clock, and the nearest template is reported if it is close
   enough.

The output is an NT-bit *spike train* (NT = 3 templates by default). It
pulses one bit for each spike that was recognised. Spikes that look like no
template produce nothing.

```
 x_in ──┬──► neo_detector ──spike_present──┐
        │                                  ▼
        └──────────────────────────► spike_aligner ──aligned_spike (64 x 16 b)──► template_matcher ──► train[2:0]
                                                        aligned_valid                 │  3 x template_sr
                                                                                      │  3 x sda
                                                                                      └─ min_unit
```

## Sizes

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `WL`  | 16 | sample word length. Signed, used as 16.11 fixed point; the fraction position does not matter to the hardware |
| `NSS` | 64 | samples per spike waveform and per template |
| `M`   | 80 | detection window: master buffer and MBA length |
| `AP`  | 23 | alignment point: sample index of the spike maximum |
| `NT`  | 3  | number of templates |
| `SP_DELAY` | 54 = M-1-AP-2 | Spike Present delay line in the aligner (derived) |

The widths are exact, so nothing overflows. The NEO energy has 2·WL+1 =
33 bits. A squared distance has 2·WL+log2(NSS) = 38 bits. The defaults
are in `spike_pkg`. `spike_sorter` passes its parameters down. `NT` can be
raised: the published sweep goes to 30 templates. Raising `NT` adds one
template register, one SDA and one MIN input per template.

The system clock is the sample clock: one sample enters per clock. In the
low-power ASIC target that is 24 kHz. Used as an off-line accelerator, the
same logic runs at the fastest clock the technology allows.

## Detection: the NEO

`neo_detector` keeps three samples and computes

    psi[n] = x[n]^2 - x[n+1]·x[n-1]

using two multipliers. For a sampled Gaussian bump, psi is the squared
amplitude times a factor that grows with frequency. So it rises for spikes
and stays small for slow or small signals. When psi[n] is at least the
programmed threshold, `spike_present` goes high. The threshold is computed
off line as C times the mean of psi over a recording, with C around 8.
`spike_present` for sample n appears 2 clocks after x[n] enters: one clock
to receive x[n+1] and one for the output register.

## Alignment: window, copy, search, cut

Alignment is the least obvious part of the design, and the numbers all
depend on each other.

* **Master Buffer.** An 80-entry shift register. Index 79 holds the newest
  sample and index 0 the oldest.
* **Spike Present delay.** `spike_present` passes through a 54-stage delay
  line before it reaches the control unit. The delay is chosen so that, at
  the moment of the copy, the sample that crossed the threshold sits at
  index AP = 23 of the buffer. That leaves 23 samples before it and 56 after
  it.
* **LOAD.** On a rising edge of the delayed bit, while idle, the control unit
  copies all 80 entries at once into the **MBA** register. The Master Buffer
  keeps shifting; the MBA keeps the snapshot.
* **Search.** The control unit reads one MBA entry per clock, from index
  AP = 23 up to M-(NSS-AP) = 39. That is 17 reads in 17 clocks, covering
  0.7 ms after the threshold crossing at 24 kHz. The first value read goes
  into the max register MR. Each later value replaces it if it is strictly
  larger, and its index is kept. Values are compared signed, so the maximum
  is the most positive sample. On a tie the earliest sample wins.
* **Cut.** The output is `MBA[imax-23 +: 64]`, so the maximum lands on
  sample 23 of the 64-sample spike. Because imax is between 23 and 39, the
  window always lies inside the 80 entries. That is why M = NSS + 16.
  `aligned_valid` is high for one clock.

Timing: a rising `spike_present` sampled at clock e causes LOAD at clock
e+54, search at clocks e+55..e+71, and `aligned_valid` sampled by the matcher
at clock e+72. Counting from the detected sample x[n], that is n+74. The
aligner is busy for 19 clocks. A detection edge that arrives during that
time is ignored and flagged on `sp_ignored`. The same spike often raises
`spike_present` twice, for example on its peak and on its trough, and the
second edge is ignored this way.

The templates must be aligned the same way: maximum at sample 23.

## Matching: ASR, template registers, SDA, MIN

`template_matcher` receives the 64×16-bit aligned spike in parallel into the
**ASR**, a parallel-in, serial-out register. Each template lives in a
`template_sr`, a 64-entry serial shift register. For 64 clocks the ASR and
all template registers shift out one sample each. The template registers are
rotated (output fed back to input), so they are unchanged after the pass. One
`sda` per template adds (x − y)² to its accumulator. It has a registered
square followed by an accumulator, a two-stage pipeline. `min_unit` picks the
smallest of the NT sums; on a tie the lower template number wins. The
comparator sets Min Valid if that sum is **less than or equal** to the
programmed squared distance threshold T_M². Comparing squares avoids a
square root. If Min Valid is set, the matched bit of `train` pulses for one
clock.

Timing, from the clock at which `aligned_valid` is sampled (clock 0):

| clock | action |
|-------|--------|
| 0 | load ASR, clear SDAs |
| 1–64 | feed the 64 sample pairs to the SDAs |
| 65 | last square accumulated |
| 66 | MIN result registered (`min_dist`, `min_idx`) |
| 67 | comparator result registered |
| 68 | `train` and `done` pulse |

That makes 68 clocks from aligned spike to spike train. A total of 142
clocks from the detected sample to the train, about 6 ms at 24 kHz. The
matcher is busy from clock 1 to clock 68. There is **no queue**: an aligned
spike that arrives while the matcher is busy is dropped and flagged
(`dropped` in the matcher, `spike_lost` at the top). This is a deliberate
trade of a few missed spikes, mostly overlapping ones, for area and power.

## Programming and reset

1. Hold `rst` high for at least M = 80 clocks. The data shift registers
   (NEO register, Master Buffer, Spike Present delay) are not reset directly.
   While `rst` is high they shift in zeros, which clears them. The control
   FSMs reset synchronously. After reset the NEO threshold is at its largest
   value, so nothing is detected, and the match threshold is 0.
2. With `prog` high, put the NEO threshold on `neo_thr_in` and T_M² on
   `match_thr_in`. Both registers load on every clock `prog` is high, so hold
   the values steady. Also shift each template in on `tmpl_data`, sample 0
   first, 64 clocks per template, with that template's bit of `tmpl_prog`
   set. Template writes are ignored while the matcher is busy.
3. Drop `prog` and stream samples on `x_in`, one per clock.

## Output port and modes

`mode` selects what goes on `tx_valid`/`tx_data`, registered by one clock:

* `MODE_SORT`: `tx_valid` pulses with each spike-train pulse, and `tx_data`
  carries `train` in its low bits. At 40 spikes/s and 3 bits per spike this
  is 120 bit/s instead of 384 kbit/s.
* `MODE_PASSTHROUGH`: every input sample is forwarded. This mode is for
  recording the data that the off-line parameter estimation needs.

`train` itself is driven in both modes. The status outputs (`psi`,
`spike_present`, `max_idx`, `aligned_valid`, `sort_done`, `min_dist`,
`min_idx`, the busy flags and `spike_lost`) are there for observation and
tuning.

## Where this RTL departs from, or fills in, the published architecture

The block structure, sizes, search range, 17-cycle search, 68-cycle
matching latency, the ≥ detection compare, the ≤ match compare, drop-when-busy
and the programming sequence follow the published architecture. The
following are this implementation's own choices where the description is
silent:

* The length of the Spike Present delay (54) and the resulting placement of
  the detected sample at index 23.
* LOAD happens on the rising edge of the delayed Spike Present, and edges
  during the search are ignored.
* The maximum is the most positive sample, and ties keep the earliest sample.
* The internal pipeline: registered NEO output, two-stage SDA, and registered
  MIN and comparator stages, arranged to give exactly 68 clocks.
* Templates are rotated during matching. `tmpl_prog` is one bit per template.
* Reset values of the threshold registers, the shared tx port, and the status
  outputs.
* The published description gives the match test both as "< T_M²" and as
  "less than or equal". This RTL uses ≤.

Not included: the electrode, band-pass filter and ADC that deliver `x_in`,
and the radio that carries `tx_data` and the programming data. One instance
sorts one electrode. A multi-electrode implant would use one instance per
channel, or share one by time-multiplexing; neither is designed here.

Resource note: synthesised as plain flip-flops, the default build has about
7,100 flip-flop bits. Most of them are in the Master Buffer, the MBA, the
ASR and the templates: 80 + 80 + 64 + 3·64 words of 16 bits. An FPGA flow
maps the serial shift registers into LUT-based shift registers. There are 5
multipliers: 2 in the NEO and 1 per SDA.

## Verification

Every module has a self-checking testbench in `tb/` that compares against a
reference model written independently in the testbench:

| testbench | what it checks |
|-----------|----------------|
| `tb_neo_detector` | psi and the threshold decision against the formula for every sample, with threshold reprogramming |
| `tb_spike_aligner` | MBA contents, first-maximum index, the 64-sample window, exact `aligned_valid` timing (SP_DELAY+18), ignored edges while busy, ties |
| `tb_template_matcher` | distances, minimum, train bit, 68-clock latency, drop while busy, a spike exactly at the threshold, template reuse over many spikes and reprogramming |
| `tb_template_sr`, `tb_sda`, `tb_min_unit` | the building blocks, including full-scale differences and ties |
| `tb_spike_sorter` | the whole sorter at its default size (see below) |
| `tb_sorter_configs` | the same kind of end-to-end run with 10-bit and 32-bit samples and with 7 and 30 templates, side by side (helper `sorter_workload`) |

`tb_spike_sorter` builds a synthetic recording: ±40 LSB uniform noise with
spikes from three Gaussian-shaped "neurons" and from an unknown fourth cell,
and some pairs of spikes only 60 samples apart. It estimates the NEO
threshold from the data as 8 × mean(psi) and programs the noise-free
templates with T_M² = 64·40² + 20000. It then streams about 15,000 samples
through sorting, pass-through and sorting mode again. It requires that:

* every neuron spike is sorted exactly once, to the right bit;
* unknown spikes and the second spike of each close pair are never sorted;
* `train` follows `aligned_valid` by 68 clocks;
* the tx port is correct in both modes;
* detection, alignment, match, rejection, drop-while-busy, programming and
  the mode switch each happen at least once.

The real recordings that the published results were measured on are not
included, so the published sorting accuracy has not been reproduced here.

Simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/spike_pkg.sv tb/tb_spike_sorter.sv --top-module tb_spike_sorter
./obj_dir/Vtb_spike_sorter
```

Replace `tb_spike_sorter` with any other testbench name. Each testbench ends
by printing `TB_RESULT checks=N failures=F`. All of them run in well under a
second.
