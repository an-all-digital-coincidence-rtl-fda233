# All-digital coincidence trigger for a cube-shaped RPC-PET camera

A PET camera sees a positron annihilation as two gamma photons hitting two
detectors at almost the same time. Resistive plate chamber (RPC) detectors
time such a pair to about 300 ps FWHM. A tight coincidence window then cuts
random coincidences and image noise. This RTL finds those coincidences with
no analog timing electronics. Each detector's fast hit signal goes straight
into FPGA input pads and is sampled on a 3 GHz equivalent time grid. All
further processing is synchronous logic at 250 MHz:

- pick out the rising edges;
- line up the channels with programmable digital delays;
- test every channel pair of interest for edges within a window of 2, 3 or
  4 sampling periods;
- keep the pairs that lie inside the selected field of view;
- optionally drop events with more than one coincidence;
- raise the trigger.

The same logic can also sweep one channel's delay and build a coincidence
histogram. The peak of that histogram tells you which delay makes the true
coincidences coincident.

The camera is a cube with one RPC detector on each face, which gives six time
channels. Faces *c* and *c+3* (channels 1–4, 2–5 and 3–6) are opposite.

The design follows the architecture published as *"An All-Digital
Coincidence-Selection and Coincidence-Trigger Generation for a Small Animal
RPC-PET Camera"* (Clemêncio, Loureiro, Landeck). That architecture was built
in a Virtex-5 FPGA. The RTL here is written independently and in portable
form. The section "Choices made here" lists where that source says nothing
and this RTL makes its own choices.

## Signal path

```
hit_in[c] ─► sample_ch ─► delay_line ─► edge_detect ─┐   (one lane per channel)
 3 pads,       12 samples    0..59 T       rising       │
 500 MHz DDR   per 4 ns                    edges        ▼
                                                 coinc_matrix ──► coinc_validation ──► trig, trig_ch
                                                 cw_size           nfov, m_reject        │
                                                                                          ▼
                              delay of channel hist_ch ◄── hist_sweep ◄───────────── (counts trig)
```

| module             | what it does                                                       | latency  |
|--------------------|--------------------------------------------------------------------|----------|
| `sample_ch`        | 3 pads × DDR × 1:4 deserialization into 12 samples per clock        | 1 clk after the word clock edge |
| `delay_line`       | per-channel delay of 0..59 sampling periods (0..19.47 ns)           | 1 clk    |
| `edge_detect`      | marks 0→1 transitions, across word boundaries too                   | 1 clk    |
| `coinc_matrix`     | window test for all 15 channel pairs, as a 3 × 5 matrix             | 1 clk    |
| `coinc_validation` | FOV mask, multiple-coincidence rejection, trigger                   | 1 clk    |
| `hist_sweep`       | automatic delay sweep and per-bin coincidence counting              | —        |
| `coinc_trigger_top`| wires the above together                                            |          |
| `coinc_pkg`        | shared sizes and the matrix layout functions                        |          |

## The time grid

T is one sampling period, 1/3 ns (nominally 330 ps). Each hit line drives
three pads. Pad *p* has its own 500 MHz clock `clk_ph[p]`, which lags pad 0
by *p*·T (0, 333 and 667 ps). Every pad samples on both clock edges, so the
three pads together take one sample every T. Each pad shifts two samples per
fast cycle into a 4-bit register. On every rising edge of the 250 MHz `clk`
(aligned with a rising edge of `clk_ph[0]`) the three registers are
interleaved into one 12-bit word:

```
word[3*j + p] = j-th sample of pad p       bit 0 = oldest sample
```

Seen from outside, every channel becomes a stream of 12-sample words, one per
4 ns clock, each covering exactly 4 ns with no gaps. The word registered at a
clock edge at time t0 holds the samples at t0 − 6 ns + k·T, for k = 0..11. All
later blocks work on these words. A delay of *d* samples is therefore a shift
of the concatenated stream, not a count of clock cycles.

`sample_ch` is the only logic that runs on the fast clocks. In the FPGA this
job belongs to the dedicated input deserializers. Here it is written as plain
flip-flops that give the same result in simulation. For a real device, map it
onto the vendor's DDR input and deserializer primitives and their clocking.

## Coincidence window

Take two hits less than one period T apart. Depending on where they fall
relative to the sampling edges, they land on the same sample or on two
consecutive samples. This holds whichever of the two comes first. The smallest
window that never misses such a pair therefore spans two sampling periods
(2T ≈ 660 ps). In general:

> two edges, at sample numbers *a* and *b* on the common grid, are in
> coincidence when |*a* − *b*| ≤ `cw_size` − 1, with `cw_size` ∈ {2, 3, 4}.

`cw_size` values outside 2..4 are clamped. The check runs in parallel on all
12 sample positions of the current word. It also looks back up to 3 samples
into the previous word, so a pair that straddles a word boundary is found.
`coinc_matrix` reports a coincidence in the clock cycle that holds the *later*
edge of the pair. As a result each pair of edges is reported once, and each
channel pair gives at most one flag per cycle.

A physical pulse pair with a fixed offset slightly larger than T can land
either 1 or 2 samples apart, depending on its phase against the grid. So a
2T window seen in a histogram looks wider than 2T (about 3T FWHM).

## Field of view and the coincidence matrix

Lay the six channels on a ring, with channel *c* opposite channel *c*+3.
Parameter `nfov` sets which pairs may form a coincidence:

| `nfov` | channel 1 is paired with | ring distance of the pair |
|--------|--------------------------|---------------------------|
| 0      | 4                        | 3 (opposite faces)        |
| 1      | 3, 4, 5                  | ≥ 2                       |
| 2      | 2, 3, 4, 5, 6            | ≥ 1 (all other faces)     |

Every other channel follows the same rule. The FOV *level* of a pair is
3 minus its ring distance, and a pair counts when its level ≤ `nfov`. With
`nfov` = 2 there are 15 pairs, and `coinc_matrix` holds them in a 3 × 5 matrix:
3 rows and 2·NFOV_MAX+1 columns. Column 2 holds level 0. Columns 1 and 3
hold level 1, and columns 0 and 4 level 2. Row *r* (0-based) holds the pairs
(*r*, *r*+d) on the right half and (*r*+3, *r*+3+d) on the left half, where
d = 3 − level:

| row | col 0 (lvl 2) | col 1 (lvl 1) | col 2 (lvl 0) | col 3 (lvl 1) | col 4 (lvl 2) |
|-----|---------------|---------------|---------------|---------------|---------------|
| 0   | 4–5           | 4–6           | 1–4           | 1–3           | 1–2           |
| 1   | 5–6           | 5–1           | 2–5           | 2–4           | 2–3           |
| 2   | 6–1           | 6–2           | 3–6           | 3–5           | 3–4           |

(1-based channel numbers.) Each unordered pair appears exactly once. A simpler
layout would give rows 2 and 3 the same five partner offsets as row 1. That
layout repeats pairs 1–2, 1–3 and 2–3 and never tests 4–5, 4–6 and 5–6, which
are adjacent cube faces. It still fills 15 cells. The layout above keeps the
3 × 5 shape and tests each of the 15 distinct pairs. `coinc_pkg` gives the
layout for any even channel count *N*: `pair_a`, `pair_b`, `col_level`.
NFOV_MAX must stay ≤ N/2 − 1.

`coinc_matrix` always computes all entries. The FOV is applied afterwards, in
`coinc_validation`, so changing `nfov` takes effect within one cycle.

## Validation and the trigger

In each cycle `coinc_validation` counts the matrix entries whose level is
≤ `nfov` (`nfov` = 3 acts as 2):

- none: no trigger. Coincidences outside the FOV end here.
- one: `trig` is high for one cycle, and `trig_ch` flags the two channels.
- more than one: this happens when three or more channels fire together, or
  when two separate pairs fall in the same 4 ns cycle. With `m_reject` = 1
  this is a multiple coincidence and is dropped. With `m_reject` = 0 it
  triggers, and `trig_ch` flags every channel involved.

A new decision is made every clock, so the trigger has no dead time.

## Delay compensation and the coincidence histogram

Cables and front-end electronics add a fixed offset between channels. This
offset can be several ns, far more than the window. The offset is measured
with a histogram and then removed with `delay[c]`. To measure it:

1. Set `hist_ch` to the channel to sweep, and `hist_dwell` to the counting
   time per bin in clock cycles (250 000 cycles = 1 ms; 40 bits allow over
   an hour).
2. Pulse `hist_start`. While `hist_busy` is high, `hist_sweep` replaces
   `delay[hist_ch]` with its own bin number *b* = 0..59. For each bin it
   waits 8 cycles for the pipeline to refill with data taken at the new
   delay. It then counts `trig` pulses for `hist_dwell` cycles and stores the
   count.
3. `hist_done` pulses after exactly 60 × (8 + `hist_dwell` + 1) cycles. Read
   bin *b* by setting `hist_rd_addr` = *b*. `hist_rd_data` follows one cycle
   later, and the bins can be read at any time.

The histogram shows a flat floor of random coincidences and a peak at the
bin where the true coincidences line up. Program that bin into `delay[c]`.
To measure an offset in the other direction, sweep the other channel of the
pair. The counts use the current `cw_size`, `nfov` and `m_reject`. The other
channels keep their programmed delays during the sweep.

## Latency and throughput

From the clock edge that registers a sample word to the trigger register:
4 clocks (16 ns). Add the delay, rounded up to whole clocks. From the hit on
the pad to `trig`, the end-to-end test measures at most **22.3 ns** with no
delay. With a 34-step (11.22 ns) delay on one channel it measures **33.7 ns**.
The original system measured about 35 ns and under 50 ns for these cases on
an oscilloscope, including pads, board and output buffers. Those parts are not
modelled here. Throughput is one decision per 4 ns for all 15 pairs.

## Top-level interface (`coinc_trigger_top`)

| port            | dir | width        | meaning |
|-----------------|-----|--------------|---------|
| `clk`           | in  | 1            | 250 MHz processing clock, rising edges aligned with `clk_ph[0]` |
| `rst`           | in  | 1            | synchronous, active high; hold ≥ 8 clocks |
| `clk_ph`        | in  | 3            | 500 MHz pad clocks, `clk_ph[p]` lags by *p*·T |
| `hit_in`        | in  | 6            | fast hit signals (comparator outputs) |
| `delay`         | in  | 6 × 6        | per-channel delay in units of T, 0..59 (larger = 59) |
| `cw_size`       | in  | 3            | window in T, 2..4 |
| `nfov`          | in  | 2            | field of view, 0..2 |
| `m_reject`      | in  | 1            | reject multiple coincidences |
| `hist_start`    | in  | 1            | start a sweep (ignored while busy) |
| `hist_ch`       | in  | 3            | channel whose delay is swept |
| `hist_dwell`    | in  | 40           | clocks counted per bin |
| `hist_busy`, `hist_done` | out | 1, 1 | sweep running / one-cycle end pulse |
| `hist_rd_addr`, `hist_rd_data` | in, out | 6, 32 | histogram read port, 1-cycle latency |
| `trig`          | out | 1            | one-clock trigger pulse |
| `trig_ch`       | out | 6            | channels of the accepted coincidence(s) |

Apart from the histogram controls, configuration inputs are treated as
static. Change them while the hit lines are quiet. A delay change while a
line is high can create or hide one edge.

## Choices made here

The source gives the architecture, the parameters and their ranges: 3 pads at
500 MHz DDR, processing at 250 MHz, delays of 330 ps over 19.47 ns, windows of
2T/3T/4T, nFOV 0..2 with a 3 × 5 matrix, multiple-coincidence rejection, and
the sweep-based histogram. It does not give the following, so this design
chooses:

- **Sampling**: the pad phases come from three phase-shifted pad clocks. The
  sample order within a word and the word alignment are also chosen here.
- **Delay**: a word-wide shift register with a programmable 12-bit tap. It
  gives the same T-step delay as a bit-serial shift register at 3 GHz.
- **Window rule** and reporting in the cycle of the later edge.
- **Matrix layout**: see the table above.
- **Multiplicity**: counted over the allowed matrix entries within one 4 ns
  cycle.
- **Trigger format**: a 1-clock pulse plus per-channel flags. The source only
  names trigger signals to the data acquisition channels. Stretch the pulse
  outside if the acquisition needs a longer one.
- **Histogram**: the sweep is an on-chip state machine. It counts validated
  triggers, waits 8 settle cycles per bin, and uses a 60 × 32-bit bin memory
  and a 40-bit dwell counter.
- **Reset**: synchronous. The edge detector treats a line that is high at
  reset release as already high, not as a hit.
- **Configuration**: plain ports. The host interface that writes them is not
  part of this design.

Not included: the detectors and comparators, the clock generation (PLL/DCM),
the vendor deserializer primitive (`sample_ch` has the same function in
portable logic), the data acquisition channels, and timing constraints for the
fast input capture.

## Verification

Each module has a self-checking testbench in `tb/`. Each computes expected
values its own way, not by reusing the RTL, and ends with a
`TB_RESULT checks=… failures=…` line.

| testbench | checks |
|-----------|--------|
| `tb_sample_ch` | random toggles at ps times; every word bit against the line level at its sampling instant |
| `tb_delay_line` | random words, all delays 0..63 (60..63 clamp to 59), against the shifted stream |
| `tb_edge_detect` | random words; edges against the continuous stream, including word boundaries and a high line at reset |
| `tb_coinc_matrix` | sparse random edges on 6 channels, all window sizes; brute-force pair search against an explicit layout table, which is itself checked to hold all 15 pairs once |
| `tb_coinc_validation` | random matrices, every `nfov`, both `m_reject` settings |
| `tb_hist_sweep` | two full 60-bin sweeps; bin contents, delay per bin, exact sweep length; saturation with a 3-bit counter |
| `tb_coinc_trigger_top` | end to end at default size, described below |

`tb_coinc_trigger_top` drives picosecond-timed pulses on the six hit lines.
A reference model predicts `trig`/`trig_ch` for every clock. The test runs
these phases:

- random pairs, singles and triples under all window sizes, all FOVs, and
  both `m_reject` settings;
- an 11.22 ns cable offset cancelled by a 34-step delay, with the latency
  checked against 35 ns and 50 ns;
- two complete 60-bin histogram sweeps, each with channel 4 lagging channel 1
  by 3.5 ns. The first splits a 19.91 MHz rectangular wave onto both
  channels, as in a bench test with a pulse generator. The second mixes true
  pairs at random times with uncorrelated singles on the same two channels,
  with `nfov` = 0, as a camera would see them.

In both sweeps every bin is compared with the model, and the peak must sit at
bins 10–11 (3.5 ns / T). Only the second sweep may show a floor of random
coincidences, and it must show one. The test counts each mechanism: window hits and misses, each
window size, pairs across word boundaries, FOV rejections, multiple
rejections and acceptances, delay compensation, and the histogram peak. It
fails if any count stays at zero. It runs in about a second.

Run any testbench with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv \
    rtl/coinc_pkg.sv tb/tb_coinc_trigger_top.sv --top-module tb_coinc_trigger_top
./obj_dir/Vtb_coinc_trigger_top
```

## Changing the design

All sizes are parameters with the values above as defaults (`coinc_pkg`):

- `N_CH`: any even channel count. The matrix grows to N/2 × (2·NFOV_MAX+1).
- `NFOV_MAX`: up to N/2 − 1.
- `DELAY_MAX`: the delay line grows by one word per 12 steps, and the
  histogram has DELAY_MAX+1 bins.
- `CW_MAX`: at most 12, the previous-word look-back.
- `PADS`, `PAD_BITS`: the sampling front end. `PAD_BITS` must be even.
  PADS × PAD_BITS samples make one word.
- `COUNT_W`, `DWELL_W`: histogram counter widths.

The testbenches above are written for the default six channels and 12-sample
words.
