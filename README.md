# Background subtraction parallel system for thermal cameras

This design separates moving objects from the static scene in a thermal video stream, and it is small enough to sit next to the camera. Each pixel location keeps a small Gaussian mixture model (GMM) of the temperatures it normally shows. Every new pixel is compared with its location's mixture. It is labelled *background* if it fits a dominant component and *foreground* otherwise, and the mixture is updated with the new value. No pixel depends on another, so the work is spread over several identical cores that each take one pixel at a time. The mixtures stay in external memory and travel through the cores together with their pixels.

A second unit, the model estimation unit (MEU), builds the starting mixtures once, at initialisation. It takes a short history of about 100 values per location, clusters them with k-means and refines the result with Expectation-Maximization (EM).

The organisation follows a published FPGA accelerator for this task. Its numbers are used where it gives them: 4 cores in the low-cost configuration and 16 in the large one, batches of up to 16 pixels, 256-bit words, 256-bit FIFOs, a history of about 100 samples, and k-means followed by EM. That description names the steps of the per-pixel algorithm but not its equations. The arithmetic, the update rules, the thresholds and every interface below are therefore this design's own choices. They are marked as such in each file's header comment and listed in the section on departures.

## Block diagram

```
             load bus (256-bit words: pixel + its mixture)
 memory ──►  load_dispatch ──┬─► sync_fifo ─► bsu (core 0) ─┐
                             ├─► sync_fifo ─► bsu (core 1) ─┤
                             ├─►    ...          ...        ├─► writeback_collect ──► memory
                             └─► sync_fifo ─► bsu (core N-1)┘   (fg, fit, pixel, updated mixture)

 history ──► meu: pixel_history_memory ─► kmeans ─► em_estimator ──► initial mixture ──► memory
```

`bsps_top` contains all of this, with `N_CORES` cores (default 4) and `N_MEU` MEUs (default 1). External memory, the camera and the host are outside the design: they drive and take the valid/ready streams of the top.

## The pixel word

A pixel and its mixture make up one 256-bit word, `bsps_pkg::word_t`. The format is the same on the load and write-back sides:

| bits    | field      | meaning |
|---------|------------|---------|
| 255:202 | `pad`      | zero |
| 201     | `fit`      | result only: the pixel fitted its mixture |
| 200     | `fg`       | result only: 1 = foreground |
| 199:192 | `pixel`    | 8-bit pixel value |
| 191:0   | `gmm[3:0]` | four components of 48 bits: `{w, mu, sigma}` |

Each component has three fields:

- `w`: the weight, unsigned Q1.15, where 0x8000 is 1.0. A weight of 0 marks an unused slot.
- `mu`: the mean, unsigned Q8.8, in pixel units.
- `sigma`: the standard deviation, unsigned Q8.8.

The weights of the used slots add up to 1.0. At most `K_MAX = 4` components fit: 8 + 4 × 48 = 200 bits, which leaves room in the 256-bit word.

## The background subtraction core (`bsu`)

This is the heart of the design. For a pixel `x` and its mixture the core works as follows:

1. **Closest component.** Among the used slots it finds the one with the smallest Mahalanobis distance `|x − mu| / sigma`. Candidates are compared by cross-multiplication, `d_a·sigma_b < d_b·sigma_a`, so no divider is needed. Ties go to the lower slot.
2. **Fit test.** The pixel fits if `|x − mu| < LAMBDA·sigma` for that component, with `LAMBDA = 2.5` (Q4.4, parameter `LAMBDA_Q4 = 40`).
3. **Background decision.** The pixel is background if it fits and the components *heavier* than the matched one weigh less than `BG_T = 0.9` together. In other words, the matched component belongs to the dominant part of the mixture. This is the usual ranked-weight rule, without sorting.
4. **Update.** The update acts on a target slot `t`:
   - If the pixel fits, `t` is the matched component.
   - Otherwise a new component is made in the first free slot. If there is none, it replaces the component with the smallest weight.

   With `alpha = 2^-ALPHA_SH = 1/128`, the update rules are:

   | what | rule |
   |---|---|
   | weights `j ≠ t` | `w_j ← w_j − (w_j >> 7)` |
   | weight `t` | `1.0 − Σ_{j≠t} w_j`, so the weights stay normalised |
   | fitted `t` | `mu ← mu + (x − mu) >>> 7`; `var ← var + ((x − mu)² − var) >>> 7`; `sigma ← sqrt(var)`, never below `SIGMA_MIN = 0.5` |
   | new `t` | `mu ← x`, `sigma ← SIGMA_INIT = 8.0` |

   The new component's weight comes out of the normalisation rule. It is about `alpha` when it takes a free slot, and the old weight plus about `alpha` when it replaces one.

**Timing.** The core handles one pixel at a time. A pixel is accepted when the core is idle. One cycle evaluates steps 1–4 as combinational logic. A fitted pixel then runs a 16-cycle square root (`isqrt`). The result is offered 20 cycles after the input handshake for a fit, and 2 cycles after it for a new component. It is held until taken, and the next pixel is accepted the cycle after that. In a real frame nearly all pixels fit, so a core spends about 21–22 cycles per pixel.

## The streaming system (`bsps_top`, `load_dispatch`, `sync_fifo`, `writeback_collect`)

- **Loading.** `load_dispatch` deals the words from the load bus round-robin: word *n* goes to core *n* mod `N_CORES`. A batch is one pixel per core, and `ld_batch_done` pulses at the end of each batch. The word is broadcast and only the addressed core sees `valid`. If that core's FIFO is full, the bus stalls.
- **Buffering.** Every core has a 256-bit FIFO (`sync_fifo`, depth 4) in front of it, so a memory that delivers in bursts keeps all cores busy.
- **Write-back.** `writeback_collect` takes the results in the same round-robin order, so they leave in exactly the order the pixels came in. Back-pressure on `wb_ready` holds the results in the cores.
- **Frame-to-frame dependency.** The mixture written back for pixel *p* of frame *f* is the one that must be loaded with pixel *p* of frame *f+1*. With a real frame this is never a hazard: a whole frame lies between the two. With tiny test images the host must wait for the write-back, and the testbenches do this.
- **Throughput.** An unthrottled frame measures 20.7 cycles per pixel and core. That is 397,373 cycles for 320×240 and 1,589,242 for 640×480 with 4 cores: about 528 and 132 frames/s at 210 MHz. The published accelerator reports 28.15 and 7.04 frames/s for this configuration, which is about 389 cycles per pixel and core. No FPGA timing analysis was run here, so the clock rate itself is not verified.
- **Memory traffic.** Each pixel reads one 256-bit word and writes one. At 640×480 and 25 frames/s that is 245.8 MB/s each way.

## The model estimation unit (`meu`, `pixel_history_memory`, `kmeans`, `em_estimator`)

The MEU works on one pixel location at a time. It runs through four phases:

1. **Load.** It accepts `N_HIST = 100` samples on `hist_valid/hist_ready` into `pixel_history_memory`. The memory has one write port and a registered read port.
2. **k-means** (`kmeans`):
   - The `K_MAX` centres start evenly spread between the smallest and largest sample: `c_k = min + (max−min)(2k+1)/(2K_MAX)`.
   - Each pass assigns every sample to its nearest centre, then moves each centre to the mean of its samples, computed with a sequential divider.
   - A centre that receives no sample is dropped. The passes stop when no centre moves, or after 10 passes.
   - Finally, neighbouring clusters are merged when their samples leave a gap of at most `MERGE_GAP = 2` levels: the largest sample of the lower cluster against the smallest of the upper one. This stops one broad mode from being cut into several pieces. In one dimension the centres stay sorted, so neighbours are consecutive slots.
3. **EM** (`em_estimator`):
   - Pass 0 is a hard E-step: each sample belongs to its nearest centre. This turns the centres into a full first mixture.
   - Then come `EM_ITERS = 5` soft passes. Each computes `z_k = (x−mu_k)²/(2 var_k)`, `p_k = (w_k/sigma_k)·exp(−z_k)` and `r_k = p_k/Σp`. If every `p_k` underflows, the sample goes to the component with the smallest `z_k`.
   - The M-step gives `w_k = N_k/N`, `mu_k = Σ r x / N_k`, `var_k = Σ r x² / N_k − mu_k²` and `sigma_k = sqrt(var_k)`. The mean enters the variance with 16 fraction bits, because a Q8.8 mean loses too much precision there. A component whose weight drops below `W_MIN = 0.05` is removed, and the remaining weights are renormalised.
   - `exp(−z)` is computed as `2^(−z·log2 e)`: the integer part becomes a shift, and `2^(−f) ≈ 1 − f/2` covers the fraction (at most about 6 % error).
4. **Output.** The mixture is offered on `model_valid/model_ready`, with unused slots all zero. The host stores it as the location's first mixture.

All divisions share one 64-bit restoring divider, and all roots share one square-root unit. The unit only runs at initialisation, so it was built for size, not speed. It takes 76,000 to 150,000 cycles per location (89,000 on average in the system test). For a 320×240 frame that is about 33 s at 210 MHz.

**How the number of components is chosen.** A component disappears in three ways: a k-means cluster gets no samples, it merges with a neighbour that leaves no gap, or an EM component falls below `W_MIN`. Modes whose samples are separated by a gap come out as one component each; this is tested with one, two and three modes. Two modes whose noise overlaps so much that no gap is left come out as one wide component. The published method settles the number of components with a Bayesian criterion that it does not describe, and that criterion is not reproduced here.

## Departures from the published description, and open points

- **Update and classification rules.** The published method adapts the mixture in a Bayesian way and refers to other work for the details. The rules in the BSU section are a standard on-line mixture update instead. All of its constants are parameters: `ALPHA_SH`, `LAMBDA_Q4`, `BG_T`, `SIGMA_INIT`, `SIGMA_MIN`.
- **Number of components.** It is decided by pruning and merging, as described above, not by the published criterion.
- **Our own choices.** The word layout, the fixed-point formats, the pixel width (8 bits) and `K_MAX = 4` are this design's choices. So are the FIFO depth, the round-robin order, the valid/ready handshakes, the iteration counts and the exp approximation.
- **MEU count.** There is one MEU by default, as in both published configurations. `N_MEU` sets another ratio of cores to MEUs. Each MEU then has its own history and model streams; how a host shares locations among them is up to the host.
- **No host CPU option.** The published description also allows the starting mixtures to come from a CPU outside the chip. This needs nothing from the design: such mixtures enter through the load stream like any other.
- **Not checked.** FPGA resource use and power were not evaluated.

## Parameters

| module | parameter | default | notes |
|---|---|---|---|
| `bsps_top` | `N_CORES` | 4 | 1–16; 4 is the low-cost configuration, 16 the large one |
| `bsps_top` | `FIFO_DEPTH` | 4 | per core |
| `bsps_top`, `meu` | `N_HIST` | 100 | history length |
| `bsps_top` | `N_MEU` | 1 | model estimation units, each with its own streams (ports become `N_MEU` wide) |
| `bsu` | `ALPHA_SH`, `LAMBDA_Q4`, `BG_T`, `SIGMA_INIT`, `SIGMA_MIN` | 7, 40 (2.5), 29491 (0.9), 0x0800 (8.0), 0x0080 (0.5) | |
| `meu` | `KM_ITERS`, `EM_ITERS`, `W_MIN`, `SIGMA_MIN` | 10, 5, 1638 (0.05), 0x0080 | |
| `kmeans` | `MERGE_GAP` | 2 | pixel levels |
| `bsps_pkg` | `PIX_W`, `K_MAX`, `WORD_W` | 8, 4, 256 | changing them changes the word layout |

## Files

`rtl/` holds one module or package per file:

| file | role |
|---|---|
| `bsps_pkg.sv` | shared types, constants and the `exp` approximation |
| `bsps_top.sv` | top level |
| `bsu.sv` | background subtraction core |
| `sync_fifo.sv` | per-core FIFO |
| `load_dispatch.sv` | shared load bus |
| `writeback_collect.sv` | write-back path |
| `meu.sv` | model estimation unit |
| `pixel_history_memory.sv` | history memory |
| `kmeans.sv` | k-means stage |
| `em_estimator.sv` | EM stage |
| `seq_div.sv` | sequential divider (helper) |
| `isqrt.sv` | sequential square root (helper) |

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`, plus the following:

- `tb_bsps_top.sv`: the whole system at its default parameters. It estimates the mixtures of 64 locations through the MEU, then streams 40 frames with a moving hot object, a background change, and one location that sees six different objects pass in a row, so that the weakest component gets replaced. Every result is checked against a reference model, and it counts the FIFO-full and write-back stalls, batches, fit updates, new and replaced components, both classes and component pruning.
- `tb_frame_workload.sv`: one 320×240 and one 640×480 frame at full speed. Every pixel is checked, and the frame rates are compared with the published ones.
- `tb_bsps_16core.sv`: the large configuration, 16 cores with two MEUs. Both MEUs estimate at the same time, then one 320×240 frame is checked word by word. It takes 100,571 cycles, limited by the one-word-per-cycle load bus.
- `bsu_ref_pkg.sv`: an integer reference model of one BSU step.
- `hist_gen_pkg.sv`: history generation and mixture checks for the MEU tests.

Every testbench ends with `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/bsps_pkg.sv tb/bsu_ref_pkg.sv tb/hist_gen_pkg.sv tb/tb_bsps_top.sv \
    --top-module tb_bsps_top -y rtl -y tb +libext+.sv -o sim
./obj_dir/sim
```

Replace `tb_bsps_top` with any other testbench, in both places. The system test simulates about 7 M cycles in about 10 s. The frame workload runs in a few seconds. Every register is reset, so the results do not depend on the simulator's initial values.

## Verification status

- All testbenches pass.
- A deliberately broken copy of each block fails its testbench.
- The BSU is checked bit-exactly against the integer reference on directed and random mixtures, including its cycle counts. The whole system is checked the same way, word by word.
- The MEU is checked statistically: per mode, the weight must match to ±0.03, the mean to ±0.5 and the variance to ±25 %. It is not checked bit-exactly.
- k-means is checked bit-exactly against a reference implementation of the same procedure.
