# SALT digital processing chain in SystemVerilog

SALT is the 128-channel front-end chip of the LHCb Upstream Tracker, a silicon
strip detector. Each channel amplifies and shapes the charge of one strip and
digitises it with a 6-bit successive-approximation ADC. Data leave the chip at
the 40 MHz bunch-crossing rate, so raw samples cannot be shipped. The chip
cleans every event on chip and sends only the strips that carry a signal.

This RTL implements that digital chain. Every clock it takes one event of 128
ADC codes. It removes each channel's baseline (the *pedestal*), then the offset
that all channels share in that event (the *common mode*). It then keeps only
the channels that stand clearly above their own noise, grouped into
*clusters* of neighbouring strips. The analogue front end and the ADCs are not
part of the RTL: the top-level `adc` input stands in for them.

## The chain at a glance

```
 adc[128] ──► pedestal_sub ──► cm_sub ──┬──► zero_suppress ──► zs, hit, cl_start, n_clusters
  (6 bit)     adc - p[i]      ps - cm   │      x > k·rms[i]
              p[i] learnt              └──► cluster_thr ─(S[i])─┘
              (ped_follow ×128)              noise per channel
                    ▲                              ▲
                    └──── train_ctrl: pedestal events, then noise events
```

| stage | module | result | width |
|---|---|---|---|
| 1 | `pedestal_sub` (128 × `ped_follow`) | `ps = adc - pedestal`, 0 if masked | 7 bit signed |
| 2 | `cm_sub` | `cs = ps - cm`, one `cm` per event | 8 bit signed |
| 2 | `cluster_thr` | `S[i]` = 1024 × mean square noise | 24 bit |
| 3 | `zero_suppress` | hit map, cluster starts, cluster count, suppressed data | 8 bit signed |

Each stage is one register. An event goes in with `valid` and comes out
3 clocks later with `out_valid`. There is no back-pressure: the chain accepts
an event every clock, and gaps in `valid` travel through as gaps. The top
`salt_dsp_top` connects the stages and the training sequencer. It carries the
noise-training flag down the pipeline beside its event. It also delays the
common mode so that `cm` lines up with the output event.

## Pedestal following

The pedestal of a strip is its ADC reading with no particle. It differs from
strip to strip and drifts slowly. Each channel learns it as a running average
with weight 1/N, where N = 1024.

The average is kept as a *sum* `P` that is N times the pedestal. The pedestal
is then just the upper bits of `P`, `p = P >> 10`, with the lower 10 bits
holding the fraction. In each training event:

```
delta = adc - p                 (signed)
delta = clamp(delta, -15, +15)
P     = P + delta
```

So `p` moves by `delta/1024` per event. The limit of 15 counts keeps a single
large pulse (a real particle, or a glitch) from dragging the pedestal. Because
`p` is truncated, a constant input settles exactly on that input. From above,
`delta` stays at -1 until `P` falls just below `(a+1)·N`, where `p = a`. From
below, it keeps rising until `P = a·N`.

`P` starts at 32 × N, the middle of the 6-bit range. The farthest pedestal
(0 or 63) is then at most 32 counts away. With the correction held at 15,
settling takes at most 32 × 1024 / 15 ≈ 2185 events. This is well inside the
4096 training events that the chain uses by default. The end-to-end test
checks that all 128 pedestals end within one count of their true value.

`P` cannot overflow or underflow. A positive correction never takes `p` above
the ADC value that caused it, and a negative one never takes it below. So the
sum needs only 6 + 10 = 16 bits.

Pedestals change only in training events. Outside training they are frozen,
which makes the output of a run repeatable. The subtraction in a training
event uses the pedestal from *before* that event's update.

A masked channel (a broken strip) outputs 0 from stage 1 onwards. It also
stays out of the common mode, out of the noise measurement and out of the
hits.

## Common mode and hit rejection

Pick-up and supply noise shift all the strips of an event together. `cm_sub`
estimates this shift as the mean of the pedestal-subtracted channels and
subtracts it from every channel. A strip hit by a particle would pull the mean
up, so any channel above the run-time value `hit_rej` is left out of the mean.
A channel exactly at `hit_rej` is kept. The 128-input sum and the count of the
channels kept are combinational. They feed one signed divider, which
truncates toward zero. If every channel is rejected, the common mode is 0.
`cs` is two bits wider than the ADC, so `ps - cm` cannot overflow.

## Cluster thresholds without square roots

Each channel's cluster threshold is its RMS noise times a factor k. `cluster_thr`
measures the noise with the same kind of running average as the pedestal. It
keeps `S = 1024 × mean(cs²)`:

```
S = S - (S >> 10) + cs²
```

`S` updates only in noise-training events. It also updates only for channels
that took part in the common-mode mean, so a channel carrying a signal does
not raise its own threshold. `S` starts at 1 count² × N.

Zero suppression never takes a square root. For a positive sample `x`,
`x > k·rms` is the same as `x²·N > k²·S`. So `zero_suppress` compares
`(x² << 10)` with `thr_k2 × S` in 32 bits, where `thr_k2 = k²` is an input.
With `thr_k2 = 9`, for example, a channel needs 3 σ.

## Zero suppression and clusters

A channel is a hit when all of these hold:

```
!mask[i]  &&  x > thr_min  &&  x²·1024 > thr_k2 · S[i]
```

`thr_min` is a floor that keeps an almost noise-free channel from firing on
1-count samples. Only positive samples can be hits. A cluster is a run of
adjacent hits of any length. It starts at every hit whose lower neighbour is
not a hit. The output event carries these:

- `zs`: the data, with every non-hit set to 0.
- `hit`: the hit map.
- `cl_start`: the first strip of each cluster.
- `n_clusters`: the number of clusters.

Width and charge per cluster follow from `hit` and `zs`.

## Training sequence

`train_ctrl` runs the optional calibration. A pulse on `train_start` makes that
event and the next 4095 events pedestal-training events. The 4096 events after
them are noise-training events. Then `train_done` pulses and everything
freezes. A new `train_start` restarts the sequence at any time. `train_phase`
and `train_count` show where the sequence is. Only cycles with `valid` count.

Pedestals are learnt first because the noise is measured on pedestal- and
common-mode-subtracted data.

## Configuration inputs

| input | meaning |
|---|---|
| `mask[127:0]` | 1 = broken strip. Its output is 0 and it is left out of the mean, the noise and the hits. |
| `hit_rej` | signed. Channels above it are left out of the common-mode mean. |
| `thr_k2` | the threshold factor squared (k²). |
| `thr_min` | a sample must exceed this to be a hit. |

These are plain static inputs with no register interface. Change them only
while the pipeline is empty: stages 1–3 read `mask` at different times.

## Parameters

`salt_pkg` holds the defaults, and every module takes them as parameters:

| parameter | default | origin |
|---|---|---|
| `NCH` | 128 | SALT channel count |
| `ADC_W` | 6 | SALT ADC resolution |
| `LOG2N` | 10 | averaging weight N = 1024 |
| `PED_CLAMP` | 15 | largest pedestal correction |
| `PED_INIT` | 32 | start pedestal; this design's choice, see below |
| `TRAIN_EVENTS` | 4096 | pedestal training length |
| `NOISE_EVENTS` | 4096 | noise training length; this design's choice |

## How far to trust it, and where it departs from the SALT description

These parts follow the published description of the SALT algorithms:

- The order of the steps.
- The running-average pedestal with N = 1024, the ±15 limit and the
  N-scaled start value.
- The 4096 training events.
- Masking to 0.
- The mean common mode that leaves out channels above a hand-tuned
  hit-rejection value.
- Per-channel thresholds derived from RMS noise.
- Clusters.

These are this design's own choices:

- **Pedestal start value.** The published start value is 512 × N, which
  belongs to a 10-bit data range. The SALT ADC has 6 bits, so this design
  starts at mid-scale, 32. For 10-bit data, set `ADC_W = 10` and
  `PED_INIT = 512`. The `tb_salt_beetle_range` bench runs the chain that
  way.
- **Correction formula.** The published update formulas mix the scaled sum
  and the pedestal. This design reads them as `delta = adc - P/N` and
  `P += delta`. That is the only reading consistent with the scaled start
  value and with `p = P/N`.
- **Sign of the limit.** A correction beyond the limit keeps its sign (±15).
- **Rounding.** `P/N` truncates, and so does the mean.
- **Noise measurement.** How the noise is measured and compared is this
  design's own: the running mean square, its weight, the training flag, the
  squared comparison, `k` and `thr_min`. So is the cluster rule, adjacent
  hits of any length.
- **Pipeline and outputs.** The pipeline depth, the training sequencer and
  the parallel output format are this design's own.
- **No output packets.** The output is the whole cleaned event in parallel,
  every clock. No packet format is defined here, so there is no packet
  builder, buffer or serialiser.
- **Not modelled.** The analogue front end and the SAR ADC are not modelled.

No timing analysis was done. Whether the 128-input adder and divider of the
common-mode stage close at 40 MHz in a given process is open. A pipeline
register between the sum and the divider would be the first remedy.

## Simulation

Every testbench checks against its own reference model and ends with a line
`TB_RESULT checks=N failures=M`. Each also has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/salt_pkg.sv tb/tb_salt_dsp_top.sv --top-module tb_salt_dsp_top
./obj_dir/Vtb_salt_dsp_top
```

Replace the testbench name to run another test:

- `tb_salt_dsp_top` covers the whole chain at its default size (128
  channels, 4096 + 4096 training events, 3000 data events, about 11 200
  events in all). It simulates strips with their own pedestals, a common
  offset per event, noise, and 1–3 strip signals. It checks every output
  event, the 3-clock latency, the training flags, the clamp flags, and the
  final pedestals and noise sums. It also counts clamped corrections, masked
  channels, hit rejection, an empty common-mode mean, noise updates, single-
  and multi-strip clusters, input gaps and the end of training. It fails if
  any of these never happened.
- `tb_salt_beetle_range` runs the chain with 10-bit data and pedestals near
  512 counts (`ADC_W = 10`, `PED_INIT = 512`). It prints the mean pedestal
  error after every 256 training events. This curve shows how long the
  training must be: about 20 counts after 256 events, about 1 count after
  3600 events and 0.7 counts after 4096 events. The bench checks that the
  curve falls and ends below one count. It also checks that the
  pedestal-subtracted noise is centred on zero and that noise-only events
  give no clusters.
- `tb_ped_follow`, `tb_pedestal_sub`, `tb_cm_sub`, `tb_cluster_thr`,
  `tb_zero_suppress` and `tb_train_ctrl` test one module each, with random
  stimulus and reduced sizes where that speeds them up.

## Files

- `rtl/salt_pkg.sv`: default sizes and the training-phase enum.
- `rtl/ped_follow.sv`: one channel's pedestal follower.
- `rtl/pedestal_sub.sv`: 128 followers, subtraction and masking (stage 1).
- `rtl/cm_sub.sv`: common mode with hit rejection (stage 2).
- `rtl/cluster_thr.sv`: per-channel noise sums.
- `rtl/zero_suppress.sv`: hits and clusters (stage 3).
- `rtl/train_ctrl.sv`: the training sequencer.
- `rtl/salt_dsp_top.sv`: the complete chain.
- `tb/`: one self-checking testbench per module and one for the top.
