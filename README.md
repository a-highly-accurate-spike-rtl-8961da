# Adaptive single-channel spike sorter

This is synthesizable SystemVerilog for a single-channel neural spike sorter that tunes itself. A stream of electrode samples goes in. It finds action potentials ("spikes"), lines each one up on its peak, and reduces it to six numbers. It then sorts the spikes into clusters (putative neurons) without supervision. Three parts of the chain adapt to the recording instead of using fixed settings:

- **Frame 1** keeps a running estimate of the noise level σ_N and of the signal's peak-to-peak range. These set the detection gate and the amount of smoothing.
- **Frame 2** learns which time scales separate the spikes best. Its frequency synthesizer (FS) then picks the three decomposition lines that the features are taken from.
- **The clustering unit** learns cluster means online. It then checks its own result and adjusts the sorting threshold, retraining until the result looks sane.

## Signal chain and clock rates

```
adc_sample ─► noise_frame1 ──σ_N, SThr, Vpp──┐
    │                                          │
    ├─► wneo_detector ─det─► spike_aligner ─► fe_unit ─FV─► clustering_unit ─► label
    │        (SThr gate)        (peak align)    │  maf_filter → adds_unit → dr_extrema
    └──────────────────────────────────────────►│  frame2_fs (SP + FS) ─ scaling1..3
```

One clock of 960 kHz drives everything. `clk_enables` makes one-cycle strobes at 240, 120 and 30 kHz.

| Rate | Used by |
|---|---|
| 30 kHz | Sampling, Frame 1, the detector, writes into the aligner's buffer |
| 240 kHz | Streaming an aligned 32-sample spike into feature extraction |
| 960 kHz | Clustering: one spike takes 9 cycles |
| 120 kHz | Brought out as `tick_120k`; no unit uses it |

The four rates are the ones the chip uses. How they are assigned to units is this design's choice. Strobes replace separate clock domains, so there are no clock crossings.

## Detection: dual threshold and ωNEO (`noise_frame1`, `wneo_detector`)

`noise_frame1` tracks the median of |x| with a ±1 step per sample. It reports:

- σ_N = 1.5·median, which is close to 1/0.6745 for Gaussian noise.
- SThr = 4·σ_N.
- Vpp = max − min over each 1024-sample window.

A median tracker is used instead of a mean of |x| because spikes would pull the mean up.

`wneo_detector` computes the nonlinear energy ψ(n) = x(n)² − x(n−ω)·x(n+ω) with ω = 2. It has a 5-tap delay line, two multipliers and a subtractor. The multipliers only see data while |x(n)| > SThr. This "conditional enable" is the first of the two thresholds; outside it the operands are forced to zero. ψ is clamped at zero and smoothed by a 4-tap moving average.

The second threshold adapts. It is half the mean smoothed energy over the last 64 enabled samples. A detection is a one-cycle pulse on the rising edge of (enable ∧ energy > Thr). Detections are ignored until Frame 1 has its first estimate.

## Alignment (`spike_aligner`)

Samples go into a 64-word circular buffer. On a detection the aligner looks for the largest |x| from 12 samples before to 3 samples after the detection. It waits until 26 more samples have arrived after the detection. That is enough for the window even if the peak is 3 samples after the detection. It then streams a 32-sample window with the peak at position 8, one sample per 240 kHz strobe, with `first`/`last` flags. Detections are ignored while a spike is being handled.

## Feature extraction (`fe_unit` = `maf_filter` → `adds_unit` → `dr_extrema`, plus `frame2_fs`)

- **MAF**: a moving average of 1, 2, 4 or 8 taps. The length follows SNR = Vpp/σ_N:

  | SNR | Taps |
  |---|---|
  | ≥ 32 | 1 |
  | ≥ 16 | 2 |
  | ≥ 8 | 4 |
  | below 8 | 8 |

  The length is chosen while Frame 2 is learning and frozen while it is locked. Otherwise spikes filtered differently would land in different clusters.
- **ADDs** (amplitude-difference decomposition): d_δ(n) = s(n) − s(n−δ) for δ = 1..7, all computed in parallel. Small δ act as a high-pass view of the spike and large δ as a low-pass one. Three of them, chosen by `scaling[0..2]`, form the feature lines.
- **DR**: the maximum and minimum of each selected line over the window give the feature vector FV = {max₁, min₁, max₂, min₂, max₃, min₃}, with 11-bit signed entries (K = 6).
- **Frame 2 / FS** (`frame2_fs`): this is the least obvious part.
  - For 32 spikes it watches all seven lines. For each δ it keeps running means of the per-spike max and min (m += (v − m)/8) and sums how far each spike's extrema fall from those means.
  - A δ whose extrema vary a lot from spike to spike separates units well.
  - The δ range is split into three bands: 1–4, 5, and 6–7. FS picks the highest-scoring δ in each band as scaling1..3, then locks.
  - Before the first lock the defaults {3, 5, 6} are used. No feature vectors are passed on while Frame 2 learns.
  - Asserting `retune` starts a new learning pass. When it locks again, the clustering unit is cleared and retrains.

  Departure: the band limits are chosen so that both scale sets {6, 5, 3} and {6, 5, 4}, which the original chip reported choosing, can be reached. As a result, band 2 holds only δ = 5 and scaling2 is always 5.

## Clustering (`clustering_unit` = `training_unit` + `perf_check`, using `l1_engine`)

### Training memory

The memory has 64 rows. Each row is a `row_t` holding:

- the six feature means;
- a 1-bit status flag (row in use);
- a 6-bit count of spikes in the cluster (NOSPC);
- a 1-bit finalized flag.

Distances are l1 norms. `l1_engine` compares a vector against 8 rows at once, so a search of all 64 rows takes 8 cycles. Each result appears 9 clock edges after the vector is accepted.

### Phases (`phase` output)

1. **TRAIN**, for the first 256 feature vectors. Each vector finds the nearest row that is in use and not finalized.
   - If that row is within the sorting threshold `thr`, its mean moves toward the vector: mean += (fv − mean)/(n+1). NOSPC goes up by one. When NOSPC saturates at 63 the row is finalized and stops moving.
   - Otherwise the vector starts a new cluster in the first free row.
2. **MERGE**. Pairs of rows whose means are within 2·thr are merged into a count-weighted mean. One row is scanned against all others per pass, 8 at a time. This joins clusters that one unit split into. The factor is `MERGE_Q/4`.
3. **FINAL**. Rows with at least `NMIN = 4` spikes become the finalized clusters. The rest are freed.
4. **ASSIGN**. Each new vector gets the label of the nearest finalized row (the row number). It is flagged as an outlier if that distance is above `thr`.

Feature vectors that arrive while the unit cannot take them (during merging) are dropped and counted on `fv_dropped`.

### Threshold self-tuning (`perf_check`)

`perf_check` starts with thr = 48. After each training run it looks at the number of finalized clusters:

| Condition after training | Action |
|---|---|
| 0 clusters, or more than 8 | Raise thr by 24 and retrain |
| Fewer than 2 | Lower thr by 24 and retrain |

During assignment it counts outliers in each window of 64 spikes. More than 8 outliers raises thr and retrains. It stops after 8 changes. `thr_tuned` shows that the last check passed.

These metrics and numbers are this design's own choices. The approach itself follows the original: a performance check that moves the sorting threshold toward an optimum and triggers retraining.

## What is taken from the original, and what is not

**Taken from the original chip:**

- the chain and block names;
- the four clock rates;
- ωNEO with ω = 2, a conditional enable at 4σ_N, and a moving average before the threshold;
- an MAF whose length follows SNR;
- ADDs with δ = 1..7 and amplitude 1, three scaling factors and three frequency bands;
- DR by max/min with K = 6;
- a 64-row training memory whose rows hold six means, status, a 6-bit NOSPC and a finalized flag;
- 8-way interleaved l1 and merge engines;
- a sorting threshold tuned by a performance check that triggers retraining.

**Own choices** (the original does not give them):

- all word widths (10-bit samples);
- how σ_N is estimated and the Vpp window;
- the MA length and the energy-threshold rule;
- the window length and peak position;
- the SNR steps for the MAF;
- Frame 2's scoring rule and the band edges;
- the clustering rules: the update formula, the merge distance, NMIN and the 256-vector training length;
- the performance metrics and their limits.

The clustering algorithm the original builds on is not reproduced. A simple nearest-mean online clusterer with the same memory layout and engines takes its place.

**Not included:**

- the analog front end and ADC (samples enter on `adc_sample`);
- any clock gating or power measures beyond zeroing the ωNEO operands;
- the SThr look-up table of the original, since SThr is computed by shifts.

## Measured behaviour

`tb_spike_sorter_top` runs the whole design at default parameters.

**Test input.** Three units with Gaussian-bump templates of different shape and sign, plus uniform ±24 noise, with a spike every 70–110 samples. That is about 1770 spikes, or about a minute of 30 kHz input.

**Sequence.** It trains, tunes the threshold, assigns, requests a retune, and trains and assigns again.

**Scoring.** Accuracy is measured after matching labels to units by majority. Over 10 random seeds it was 69–100% (mean about 90%). The test requires 65%. The test also counts every mechanism and fails if any never happened:

- conditional enable;
- detection;
- each MAF length used;
- Frame 2 locking twice;
- training, merging and finalizing;
- outliers;
- threshold changes and retraining;
- restarts;
- drops.

### Noise sweep

`tb_noise_sweep` resets the design and learns from scratch at four noise levels. The levels are the background noise's standard deviation divided by the mean spike peak, as in common spike-sorting benchmarks. The noise is Gaussian, and 250 spikes are labelled per level.

| Noise | Accuracy | Finalized clusters | Notes |
|---|---|---|---|
| 0.05 | 100 % | 3 | |
| 0.10 | 74 % | 4 | Many outliers: the tuned threshold stays close to the cluster spread |
| 0.15 | 69 % | 3 | Two units share a label |
| 0.20 | 65 % of the few labelled | 1 | SThr = 4σ_N lies above the smallest unit's peak, so that unit is rarely detected |

The test requires correct sorting at 0.05 and 0.10. At 0.15 and 0.20 it only checks that the flow completes. These results show the limits of the simple clustering rules used here, which stand in for the original chip's algorithm. Neither testbench has been run on recorded neural data.

Synthesis of the top with yosys gives about 2.9 k cells and 6.2 k flip-flop bits. Most of the flip-flops are the 64 × 86-bit training memory.

## Files

- `rtl/ss_pkg.sv`: widths, `row_t`, `phase_e` and the l1 helper functions. Compile it first.
- `rtl/<module>.sv`: one module per file, as named above. `spike_sorter_top` is the top.
- `tb/tb_<module>.sv`: a self-checking testbench for each module. Each prints `TB_RESULT checks=N failures=M`.
- `tb/tb_noise_sweep.sv`: the whole design at four noise levels (about one minute of simulation).

## Simulating

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl rtl/ss_pkg.sv tb/tb_spike_sorter_top.sv \
          --top-module tb_spike_sorter_top -o sim && ./obj_dir/sim
```

Replace `tb_spike_sorter_top` with any other testbench to test one block. The top-level run takes a few seconds. Registers must come out of reset before checks begin; the testbenches only count while `rst_n` is high, so random initial values are harmless.

## Changing it

The parameters sit on each module. The top uses the defaults.

- `TRAIN_LEN`, `NMIN`, `MERGE_Q` (training unit): training length, minimum cluster size, merge distance.
- `THR_INIT`, `THR_STEP`, `CMIN`, `CMAX`, `WIN_LOG`, `OUT_LIMIT`, `TUNE_MAX` (performance check): start and step of the threshold, and the checks applied.
- `B1_END`, `B2_END`, `NSP_LOG` (Frame 2): band edges and learning length.
- `N_WIN`, `PRE`, `SEARCH_BACK`, `SEARCH_FWD` (aligner): window length and peak placement.
- `ss_pkg`: sample and feature widths, the number of rows and the interleave factor.
