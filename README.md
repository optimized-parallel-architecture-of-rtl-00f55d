# Parallel Kalman filter for multi-target radar tracking

This is synthesizable SystemVerilog for a hardware tracker. It follows up to 100 radar targets from frame to frame. Each target's x and y motion is estimated by a constant-velocity Kalman filter in fixed point. The direction a target moves along each axis is not known in advance, so every track is predicted four ways at once: x moving down or up, combined with y moving down or up. A nearest-neighbour search then picks the combination and the measurement of the current frame that fit best. Only that combination is updated and kept.

The architecture is the FPGA design described in the article "Optimized Parallel Architecture of Kalman Filter for Radar Tracking Applications". That article gives the filter equations, the four parallel "block operations", the nearest-neighbour association, the two-stage DMA/BRAM system and the use of pipelining and dataflow overlap. It gives no RTL. Everything at register level here is this design's own: the widths, the divider, the handshakes, the record layout and the memory port. Section [Design choices](#what-follows-the-article-and-what-is-chosen-here) lists where the RTL follows the article and where it chooses for itself.

## The filter along one axis

Each axis of a track has a state (p, s), its position and its speed along the axis, and a symmetric 2×2 covariance P. The radar measures position only, so H = [1 0]. For a direction σ = ±1 and a frame interval dt, with t = σ·dt:

| step | equations | module |
|---|---|---|
| prediction | p' = p + t·s, s' = s; P' = A P Aᵀ + Q with A = [1 t; 0 1] | `kf_predict` |
| gain | S = P'₀₀ + R; K = (P'₀₀/S, P'₀₁/S) | `kf_gain` |
| update | e = z − p'; p = p' + K₀e, s = s' + K₁e; P = (I−KH)P'(I−KH)ᵀ + K R Kᵀ | `kf_update` |

The covariance update uses the Joseph form, which the article prints. It costs a few more multipliers than (I−KH)P' and tolerates the truncation of fixed-point arithmetic better. When a frame has no measurements, the update passes the prediction through unchanged ("coasting").

`s` is a speed magnitude. The sign of the motion comes from the hypothesis that wins the association. It is recorded in the track's info word.

## Four block operations and the association

The second stage is built around four hypotheses per track. These are the article's "block operations":

| block operation | x motion | y motion | `blockop_e` |
|---|---|---|---|
| 1 | x − v | y + v | `OP1` |
| 2 | x − v | y − v | `OP2` |
| 3 | x + v | y + v | `OP3` |
| 4 | x + v | y − v | `OP4` |

The x and y axes are independent, so four axis filters suffice: X-negative, X-positive, Y-negative and Y-positive. Each has its own `kf_predict` and `kf_gain`, and they all work on the same track in the same clock. Their four predicted positions form the four block-operation positions.

`nn_assoc` reads the frame's measurements from the measurement RAM, one per clock. It computes the four squared Euclidean distances of each measurement in parallel, at full precision (2W+3 bits). It keeps the overall minimum. Ties go to the lower measurement index, then to the lower block operation. The winner selects two things:

- which x hypothesis and which y hypothesis go to the two `kf_update` units;
- the measurement (zx, zy) they are updated with.

Several tracks may pick the same measurement. There is no exclusive assignment and no validation gate.

## Second-stage pipeline (`kf_core`)

This is the part that needs the most care when changing the design.

```
 latch ──read──► 4× kf_predict ──► 4× kf_gain (43 clk) ──► hand-off ──► nn_assoc ──► 2× kf_update ──► latch
  (1 clk)           (1 clk)        + delay line for the       register     (n_meas+4 clk)    (2 clk)      write
                                   predicted states
 └──────────────────────── front pipeline, stalls on fe_en ───────────┘
```

- **Front pipeline.** Tracks are read from the latch back to back. Prediction and gain are fully pipelined with initiation interval 1. The gain has no divider loop: `fx_recip` computes 1/S as a restoring division with one quotient bit per register stage, 2·FRAC_BITS+1 = 41 stages. Two multiplications by 1/S then give K. While the gain is computed, the predicted states travel alongside in a `pipe_delay` shift register.
- **Hand-off and stall.** The gain pipeline's last register is the input channel of the association unit. When it holds a track and `nn_assoc` is still busy, `fe_en` falls and every register of the front pipeline holds, including the latch read port. The latch output register keeps its value while `rd_en` is low.
- **Overlap.** A track's covariance and gain are computed while the previous track is being associated (the measurement step). The association is the slowest step, so a frame takes about `n_trk·(n_meas+4)` clocks plus roughly 50 clocks of pipeline fill. The simulated 100×100 frame takes 10,449 clocks in the core.
- **Write-back.** The two update units work in lock step and never stall. Their result, plus an info word, replaces the track's record in the latch. The info word holds the block operation, whether there was a measurement, and the measurement index.

Two assertions in `kf_core` catch broken control: the update units must stay in lock step, and no record may be written outside the frame's tracks.

## Frames, the latch and the DMA (`kf_radar_top`)

`kf_radar_top` runs a frame in three steps when `start` is pulsed:

1. **Load** (`kf_dma`). The frame's measurements are copied from external memory into the measurement RAM (`bram_sdp`). If `load_tracks` is set, `n_trk` initial track records are copied into the track latch first. Read requests are issued as fast as the memory grants them. Returning words are packed into one wide RAM word per record.
2. **Filter** (`kf_core`), as above.
3. **Store** (`kf_dma`). The updated records are written from the latch to `res_base`.

`kf_latch` is the filter's feedback path. It is a block RAM holding one record per track. Its write port takes initial values from the DMA or results from the update step. With `load_tracks` clear, a frame continues from the states left by the previous frame. The external memory only receives a copy of them.

The top's memory port expects a DDR2 controller (not included) behind a simple interface:

- A request (`mem_req`, `mem_we`, `mem_addr`, `mem_wdata`) is taken in a clock where `mem_gnt` is high.
- Read data returns in order on `mem_rvalid`/`mem_rdata`, any number of clocks later.
- One word holds one W-bit number.

### Record layout

Records are word-addressed at `base + record·words + field`. Inside the RAMs, field f is at bits `[f·W +: W]`.

| word | track record (11 words) | measurement record (2 words) |
|---|---|---|
| 0–4 | px, sx, Px00, Px01, Px11 | zx, zy |
| 5–9 | py, sy, Py00, Py01, Py11 | |
| 10 | info: [1:0] block operation, [2] had measurement, [9:3] measurement index | |

## Number format and parameters

All values are two's complement with `INT_BITS` integer bits (sign included) and `FRAC_BITS` fraction bits. A product is the full product shifted right arithmetically by `FRAC_BITS` and cut to W bits. There is no rounding and no saturation, except that 1/S saturates. Keep positions within ±2^(INT_BITS−1).

| parameter | default | meaning |
|---|---|---|
| `INT_BITS`, `FRAC_BITS` | 10, 20 | high-precision format. Use 8, 12 for the medium-precision variant. |
| `MAX_TRACKS` | 100 | tracks per frame (RAM depth) |
| `MAX_MEAS` | 100 | measurements per frame |
| `ADDR_W` | 24 | external word address width |

`dt`, Q (`q00`, `q01`, `q11`) and R (`r_meas`) are run-time inputs of the top.

Cost of the defaults: the gain units hold most of the flip-flops, because four 41-stage dividers each carry their divisor along. The latch is 100 × 330 bits and the measurement RAM 100 × 60 bits. A multi-cycle divider shared by the four axes would be much smaller, at the price of throughput.

## Performance

The numbers below come from simulating the default build with a memory that grants 70 % of requests.

| frame | clocks |
|---|---|
| 100 tracks, 100 measurements, tracks loaded | 14,078 |
| same, tracks kept in the latch | ≈ 12,530 |
| filter step alone | 10,449 |
| 50 tracks, 50 measurements, tracks kept in the latch | ≈ 3,750 |
| 25 tracks, 25 measurements, tracks kept in the latch | ≈ 1,285 |

The time grows with the product of tracks and measurements, because every track scans every measurement. The number format does not change the clock count: the 8.12 build takes the same number of clocks as the 10.20 build, only fewer bits per clock.

The article reports a maximum clock of 5.96 MHz for its high-precision build. At that clock, 12,500 clocks would be about 2.1 ms per frame. Its measured time at 100 targets was 5.2 ms. This RTL has not been synthesized for an FPGA here, so its own maximum clock is unknown.

## What follows the article and what is chosen here

Taken from the article:

- the prediction, gain and Joseph-form update equations;
- the 10.20 and 8.12 fixed-point formats;
- the four block operations (x±v, y±v) computed in parallel;
- nearest-neighbour association between frames;
- the structure: first stage DMA → BRAM; second stage prediction → covariance and gain → update; results back to external memory;
- a latch fed by initial values and by the update;
- pipelined loops, with covariance and gain overlapping the measurement step;
- up to 100 targets.

Chosen here, where the article says nothing or only names a part:

- the constant-velocity transition matrix and the direction-signed time step;
- H = [1 0], so the innovation is a scalar;
- the speed magnitude plus winning-direction state;
- squared Euclidean distance, the tie rules, and non-exclusive matching without gating;
- coasting when there is no measurement;
- the restoring reciprocal divider;
- truncating arithmetic;
- every latency, the stall/hand-off scheme, the DMA protocol, the record layout and the memory port;
- the start/done control and the statistics outputs;
- 100 measurements per frame.

The article calls R "the actual measurement" in one place and defines it as the measurement-noise covariance in another. The covariance meaning is used.

The article's resource and latency tables come from a high-level-synthesis flow and do not describe this RTL.

Not included:

- the DDR2 SDRAM and its controller;
- the radar, the digitizing card and the data-collection chain;
- the GPU version of the filter.

## Simulation

Every block has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`. They compare against `tb_kf_ref_pkg`, a model of the same fixed-point arithmetic in 64-bit integers written from the equations. `ddr2_model` is a behavioural external memory with random grants.

Build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/kf_pkg.sv tb/tb_kf_ref_pkg.sv tb/tb_kf_radar_top.sv \
    --top-module tb_kf_radar_top -o sim
./obj_dir/sim
```

Substitute the testbench name for the other blocks: `tb_kf_predict`, `tb_kf_gain`, `tb_kf_update`, `tb_nn_assoc`, `tb_bram_sdp`, `tb_kf_latch`, `tb_kf_dma`, `tb_kf_core`.

`tb_kf_radar_top` runs the default-size design end to end through six frames:

- tracks loaded from memory;
- three frames continued from the latch;
- a frame with no measurements;
- a reload of 40 tracks with clutter.

After each frame it checks every result word against the model. It also checks that each block operation won at least once, that tracks coasted, that the pipeline stalled, that the memory applied back-pressure, and that at least 90 % of the tracks end within one unit of the true targets. It takes about 20 seconds.

The reference package is written for the default 10.20 format only. `tb_kf_workloads` builds the top in the 8.12 format instead. It tracks scenes of 25, 50 and 100 targets for four frames each. It judges the results against the true motion: at least 90 % of tracks must end within 1.0 of the true position and 0.5 of the true speed. It also bounds the frame time. It has no model to compare against bit for bit.

## Files

| file | content |
|---|---|
| `rtl/kf_pkg.sv` | format defaults, record field indices, direction and block-operation types |
| `rtl/kf_radar_top.sv` | top: frame sequencer, RAMs, DMA, core |
| `rtl/kf_core.sv` | second stage: four-way prediction/gain pipeline, association, update |
| `rtl/kf_predict.sv`, `rtl/kf_gain.sv`, `rtl/kf_update.sv` | one-axis filter steps |
| `rtl/fx_recip.sv` | pipelined fixed-point reciprocal |
| `rtl/nn_assoc.sv` | nearest-neighbour association |
| `rtl/kf_latch.sv`, `rtl/bram_sdp.sv` | track store and block RAM |
| `rtl/kf_dma.sv` | external memory ↔ RAM transfers |
| `rtl/pipe_delay.sv` | stallable delay line |
| `tb/` | testbenches, reference model, external memory model |
