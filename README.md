# Folded real-time template-matching spike sorter

This is synthesizable SystemVerilog for a spike sorter that works on the
sample stream of a high-density multi-electrode array (HDMEA). It reports
which neuron fired, and when, a few milliseconds after the spike. Each
neuron has a matched filter: the sum over a few relevant electrodes of that
electrode's recent samples convolved with coefficients derived from the
neuron's spike template. The filter output plus a per-neuron constant gives
a *discriminant function*. When it rises above zero, a spike is likely. The
neuron whose discriminant peaks highest within a short *detection window*
is the one that fired. The algorithm is Bayes-optimal template matching
(BOTM).

Three ideas make the sorter small enough for hundreds of neurons:

* **Few electrodes per neuron.** Each neuron uses only its E = 5 electrodes
  with the highest template energy. A neuron's filter therefore has
  E × T = 5 × 50 = 250 taps, not one filter per electrode of the whole
  array.
* **Folding.** The array is split into N_P = 8 *partitions* with about the
  same number of neurons each. One partition-processing unit (PPU) with
  NF = 82 filters handles one partition at a time and visits all 8 in
  every 50 µs sampling period. That gives 8 × 82 = 656 neuron slots, enough
  for the 650 neurons of the target build.
* **Cheap handling of overlapping spikes.** When neurons that are far apart
  fire together, the candidates in a closed window are split into *spike
  regions* of radius R with a distance test that needs no multiplier. Each
  region reports its strongest neuron. Neurons at the edge of a partition
  sit in a *marginal zone* and are held by every partition that overlaps
  there. Their spikes count only when all of those partitions report them.

The host computes all numbers off-line: filter coefficients, constants, the
electrode choice and neuron positions. It loads them through a
configuration port and can rewrite them while sorting runs.

## One sampling cycle, step by step

```
 electrode stream ──► bpf_mux ──► sample_buffer ──► conn_map picks E electrodes per filter
 (1 electrode/clk)   band-pass    (ping-pong)            │
                                                          ▼
                        ┌──────── per filter j = 0..NF-1 ────────┐
                        │ tap_ram (circular)   coef_ram          │
                        └──────────┬──────────────┬──────────────┘
                                   ▼              ▼
   fold_ctrl ──phases──►  ppu: fir_mac ×NF → disc_unit → dw_detector → spike_localizer
                                                                          │ reports
                                                                          ▼
                                                                   marginal_check ──► spikes
```

1. **Band-pass.** Samples arrive as a stream, one electrode per clock,
   ending with electrode N_ELEC-1. A single direct-form-II biquad
   (`bpf_mux`) filters them. It keeps two state words per electrode and
   defaults to a 500 Hz–3 kHz pass band at 20 kHz. The 10-bit samples are
   scaled by 2^8, so the 20-bit output keeps fractional bits. The filter
   also acts as an interpolation stage that hides the ADC quantisation.
2. **Frame hand-over.** The filtered samples go into one bank of
   `sample_buffer`. When the last electrode is written the banks swap. The
   folds then read the finished frame while the next frame fills the other
   bank.
3. **Folds.** `fold_ctrl` runs the partitions p = 0..N_P-1. For each one:

   | phase | clocks | what happens |
   |-------|--------|--------------|
   | LOAD  | E+2    | for slot e, `conn_map` gives every filter its electrode. `sample_buffer` returns that electrode's new sample, which is written into the filter's `tap_ram` at the first-tap pointer |
   | MAC   | E·T+1  | every filter reads tap (e, age k) and coefficient (e, k) and does one multiply-accumulate per clock |
   | DISC  | 1      | d = sat13((sum >>> d_shift) + c) for all filters |
   | DET   | 1      | zero-threshold and detection-window update for partition p |
   | LOC   | 1, or reports+2 | the localizer reports one spike region per clock |

   A fold with no reports takes E·T + E + 6 = 261 clocks. A whole sampling
   cycle takes N_P × 261 = 2088 clocks plus 1 to 2 clocks per reported
   region, and the input stream needs N_ELEC = 1024 clocks. At 20 kHz
   sampling the design therefore needs a clock of about 45 MHz or more. A
   frame that arrives before the folds have finished sets the sticky
   `overrun` output.
4. **Pointer.** After the last fold the shared first-tap pointer moves back
   by one (mod T) and the sample counter `ts` advances. Because of this,
   the taps are never shifted: the sample of age k sits at (ptr + k) mod T.

## Discriminant and number formats

For neuron i: `d_i(t) = Σ_e Σ_k x_e(t−k) · f_i,e[k] + c_i`. Here x_e is
the band-passed stream of relevant electrode e, and f_i,e is the template
multiplied by the inverse noise covariance (computed by the host). The
constant is c_i = ln p_i − ½ ξᵀC⁻¹ξ.

| quantity | width | note |
|---|---|---|
| electrode sample | 10 bit signed | input |
| band-passed sample / tap | 20 bit signed | input × 256 through the biquad, saturated |
| biquad coefficient | 18 bit, Q3.14 | b0, b1, b2, a1, a2 |
| FIR coefficient | 14 bit signed | |
| filter sum | 42 bit | 34-bit products + 8 guard bits for 250 terms |
| discriminant, constant | 13 bit signed | sum is right-shifted by `d_shift` (default 20), then saturated |

## Detection window and spike regions

This is where the sorter decides, and it is the part most worth reading in
`dw_detector.sv` and `spike_localizer.sv`.

*Window.* Each partition has its own window state in registers, because it
is visited only once per sampling cycle. The state is: an open flag, a
sample count, and, per neuron, the running maximum and the sample at which
it occurred. The window:

* opens on the first sample where any valid neuron's d > 0;
* lasts at least `l_dw_min` samples (default 10);
* then closes at the first sample on which every discriminant is ≤ 0.

A minimum that is too short splits one spike into several windows and
reports false spikes. A window that is too long swallows a second spike.
The adaptive end avoids both. At closing, the candidates are the neurons
whose maximum inside the window is above zero.

*Regions.* `spike_localizer` takes the candidates one region at a time:

1. Report the remaining candidate with the largest maximum. On a tie the
   lower slot wins.
2. Remove it, and every remaining candidate within R of it.

"Within R" is tested in a two-axis coordinate system. Its reference points
lie far outside the array, so close to the radius at least one axis
difference approximates the true distance. Neurons count as close when
|ΔX| < R and |ΔY| < R (`dist_check`; R defaults to 70 µm). A spike seen by
several neighbouring filters therefore yields one report. Two distant
neurons firing together (a temporal overlap) yield two. Each report carries
the global neuron ID, the sample of the maximum and the partition.

Spikes that overlap in both time and space are not resolved beyond what
the matched filters already separate.

## Marginal neurons

Partitions overlap by a marginal zone. A neuron in that zone is loaded
into every partition that contains it, under one global ID. A spike of a
neighbour in one partition can make that copy fire falsely, but a real
spike makes every copy fire. For each global ID the host sets how many
partitions hold it: 1 for ordinary neurons, and 2, 3 or 4 for marginal
ones. `marginal_check` keeps, per ID, a bit mask of the partitions that
have reported it and the sample of the first report:

* A report within `mwin` samples (default 3) of the first one adds its
  partition to the mask. A later report starts a new mask.
* When the mask holds enough distinct partitions, the spike is output and
  the entry cleared.
* The same partition reporting twice does not count twice.
* Ordinary neurons pass through with one clock of delay.

## Configuration port

`cfg` is a packed struct (`cfg_wr_t` in `botm_pkg.sv`) with one write per
clock. Every table has its own write port, so writes may land at any time,
also during sorting. In the testbenches the host writes between sampling
cycles, so the frame from which a new value applies is exactly known.
Rewriting one neuron completely takes about 270 one-word writes (250
coefficients, 5 map entries, constant, ID, position), which fits in the
idle clocks of a sampling cycle at the clock rates named below.

| target | fields used | effect |
|---|---|---|
| CFG_COEF  | part, filt, slot = electrode slot, idx = tap k, data[13:0] | FIR coefficient multiplying the sample of age k |
| CFG_CONST | part, filt, data[12:0] | discriminant constant c |
| CFG_MAP   | part, filt, slot, data = electrode index | connectivity map |
| CFG_NID   | part, filt, data[10] = valid, data[9:0] = global ID | neuron slot (valid flags reset to 0) |
| CFG_NXY   | part, filt, data[31:16] = X, data[15:0] = Y | neuron position for the distance test |
| CFG_MARG  | idx = global ID, data[2:0] | number of partitions holding this neuron (reset value 1) |
| CFG_BPF   | idx 0..4 = b0, b1, b2, a1, a2 | band-pass coefficients |
| CFG_REG   | idx 0 = d_shift, 1 = l_dw_min, 2 = R, 3 = mwin | run-time registers |

## Parameters and memory at the defaults

| parameter | default | meaning |
|---|---|---|
| N_ELEC | 1024 | electrodes in the stream (this design's choice; the target is arrays of thousands of electrodes) |
| N_P | 8 | partitions = folds |
| NF | 82 | filters in the PPU (neurons per partition) |
| E | 5 | relevant electrodes per neuron |
| T | 50 | template length (FIR order 49) |

Each filter slot stores 250 taps × 20 bit and 250 coefficients × 14 bit
per partition. That is 8 500 bit per neuron, so 5.6 Mbit for 656 neurons
in `tap_ram` and `coef_ram`. The per-partition window registers (one 13-bit
maximum and one 32-bit time stamp per neuron) and the sample buffer
(2 × 1024 × 20 bit) come on top.

The sorter is real-time, and its latency does not depend on the number of
neurons. A spike is classified in the sampling cycle in which its window
closes. In the full-size test, spikes whose template begins at sample s
are classified at about s + 55. That is the template length, plus the
minimal window, plus the one frame spent in the sample buffer. At 20 kHz
this is about 2.75 ms.

## Departures from the source design and own choices

* **One clock.** The source design runs four clock domains (input stream,
  folding, system, sampling). Here one clock does all of it, with a
  frame-complete strobe and a phase counter. Its 3-sample synchronisation
  overhead shrinks to one frame of buffering.
* **Pipeline choices.** The sample buffer organisation, the phase lengths,
  the accumulator width, the shift-and-saturate scaling of the
  discriminant, the biquad's fixed-point format and the configuration bus
  are all this design's own.
* **Localization order.** The order is greedy by maximum, with the lower
  slot winning a tie. Marginal reports are matched with a per-ID partition
  mask as they arrive, rather than being compared in a batch at the end of
  the sampling cycle. The result is the same.
* **Parallel electrode reads.** The sample buffer has one read port per
  filter (82 ports), so all filters load their electrode samples in
  parallel. On an FPGA this would be a wide multiplexer or a replicated
  memory. That cost was accepted for simplicity.
* **Not included.** The original algorithm's dedicated resolution of
  spatio-temporal overlaps is not part of this hardware, and neither is
  transmitting spike waveforms. Only IDs and time stamps leave the sorter.

## Files

`rtl/botm_pkg.sv` holds the widths, defaults, the `cfg_wr_t` / `spike_t`
structs and the phase enum. Every other file in `rtl/` holds one module,
described in its header comment. The top level is `rtl/botm_top.sv`.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`tb_botm_top` runs the whole sorter at a small size (16 electrodes,
2 × 3 slots, E = 2, T = 6). It checks the sorter against a behavioural
model of the whole algorithm written in the testbench, and it makes each
mechanism happen at least once:

* a window, and a window stretched past its minimum;
* neighbour suppression and a multi-region window;
* a marginal spike accepted and a marginal report rejected;
* an on-the-fly coefficient rewrite;
* an overrun.

`tb_botm_full` does the same at the default size, with the real band-pass
in the path. It runs in seconds.

```
verilator --binary -Irtl -y rtl rtl/botm_pkg.sv tb/tb_botm_full.sv --top-module tb_botm_full -o sim
./obj_dir/sim
```

Any other testbench builds the same way: replace the testbench file and
the `--top-module` name.
