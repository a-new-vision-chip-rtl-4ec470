# Spiking vision chip: SPAD imaging with spike-domain processing

A single-photon avalanche diode (SPAD) pixel produces a spike, not an analog
value. It either fired during its gate window or it did not. This design keeps
the whole visual path in that form. A gated 128x128 SPAD array delivers 1-bit
spike maps at up to 100,000 maps per second. An array of 256
integrate-and-fire (IF) processing elements then works on those spikes. It
needs no multipliers, only accumulators.

The same PE array does two jobs:

* **Preprocessor.** Each PE owns pixels. It counts each pixel's spikes over
  several maps (temporal accumulation). It maps the count through a denoising
  function, solves indirect time-of-flight (iToF) depth from four phase
  counts, and turns the result back into a rate-coded spike train.
* **Spiking CNN.** The PEs are chained column-parallel. Each convolution
  kernel is shared across a layer and broadcast to all PEs. The array has
  1024 neurons (4 per PE), so it performs 1024 synaptic operations per clock.

A light-change detector watches a subsample of the spike stream. When the
ambient light changes, it retunes the sensor's exposure within one spike-map
period.

The RTL is SystemVerilog (IEEE 1800-2017). It is synthesizable apart from the
SPAD pixel array, which is a behavioural model because the real part is analog.

## Block diagram

```
                 exposure                       light_adapt  (8x8 subsample, CNT change)
          +-----------------------------------------+  ^
          v                                           |  rows
   imaging_ctrl --RST/gate per row--> spad_pixel_array -+--> sensor_if --masked write--> data_sram
   (rolling shutter, iToF gating,         (behavioural)            (bit-plane spike maps)    ^ port B
    laser_mod)                                                                              |
                                                                        port A (256 x 16 bit lanes)
   inst_sram --64-bit instr--> pe_ctrl --command (broadcast)--> pe_array (256 x pe) <-------+
                                  ^                                  each pe: 4 IF neurons,
   host_* ports (MPU side) -------+                                  depth_solver
```

| File | Role |
|---|---|
| `rtl/vc_pkg.sv` | instruction format, opcodes, PE command struct, imaging modes |
| `rtl/vision_chip_top.sv` | top level: everything above, host ports |
| `rtl/spad_pixel_array.sv` | behavioural model of the gated SPAD pixels |
| `rtl/imaging_ctrl.sv` | rolling-shutter RST/gate sequencer, 2D and iToF modes |
| `rtl/sensor_if.sv` | writes spike rows into the data memory as bit planes |
| `rtl/light_adapt.sv` | light-change detection and exposure feedback |
| `rtl/data_sram.sv` | 256 kB data memory, 512 x (256 x 16 bit) |
| `rtl/inst_sram.sv` | 64 kB instruction memory, 8192 x 64 bit |
| `rtl/pe_ctrl.sv` | instruction sequencer |
| `rtl/pe_array.sv` | 256 PEs, configurable chain length, neighbour sharing |
| `rtl/pe.sv` | one PE: 4 IF neurons, ALU, spike register |
| `rtl/depth_solver.sv` | four-phase iToF depth, one per PE |

## Spike maps and the imaging sequence

At 80 MHz a spike map takes 800 cycles (10 us). Each row follows a fixed
schedule: RST for one cycle, then the gate (SEL) opens for `exposure` cycles,
then the row is read. Row r runs this schedule `r*6` cycles after row 0. This
rolling shutter keeps only a few rows exposed at once, which spreads the
avalanche current drawn from the SPAD bias. Successive schedules overlap modulo
the frame. Any exposure up to 798 cycles therefore still yields one map every
800 cycles. Each row samples the exposure when it is reset, so a new exposure
never cuts a running window short.

In **iToF mode** the controller also drives `laser_mod`, a square wave of 8
cycles (10 MHz). A row's gate opens only while that wave, delayed by 0, 90,
180 or 270 degrees (`phase`), is high. Several maps per phase give the counts
CNT0, CNT90, CNT180 and CNT270.

`sensor_if` stores map `k` as bit `k mod 16` of each pixel's 16-bit lane. With
128 columns and 256 lanes, rows 2m and 2m+1 share word `base + m`. Pixel
(r, c) sits in lane `(r mod 2)*128 + c`, directly above PE
`(r mod 2)*128 + c`. The last 16 maps of a pixel are thus one lane. A PE
reaches any of them with a single `LDS` (load spike) instruction that names
the bit.

## The processing element

Each PE holds four 16-bit signed membrane potentials `V0..V3`. It also has a
1-bit spike register `spk`, which neighbours can see, and four output-spike
bits. Every clock it executes the command broadcast by `pe_ctrl`:

| op | effect in every PE |
|---|---|
| `SYN`, `SYNW` | `V[n] += spk ? w[n] : 0` for the masked n. Four 8-bit weights are integrated per clock, with saturation. The weights come from the instruction (`SYN`) or from the weight register (`SYNW`). |
| `FIRE thr` | for each masked n: if `V[n] >= thr` then output spike and `V[n] = 0` (fire-reset) |
| `ADDV`, `SUBV` | `V[d] += V[s]`, `V[d] -= V[s]` (saturating) |
| `MAP key,val` | if `V[s] == key` then `V[d] = val` |
| `CLR mask` | zero the masked potentials |
| `LDS addr,bit` | `spk = lane[bit]` |
| `SHIFT` | `spk` = right neighbour's `spk`, or 0 at the end of a chain |
| `LDV`, `STV` | load or store `V[d]` from or to the PE's lane |
| `STS` | store the four output spikes (lane bits 3:0) |
| `DEPTH` | `V[d] =` iToF depth code from `V0..V3`, taking 10 cycles |

Several mechanisms are built from these operations:

* **Temporal accumulation.** Use `LDS` on each map's bit and `SYN` with
  weight 1. This gives a pixel's avalanche count.
* **Denoising f-function.** The enhancement is
  `f(R) = log_(1-PDE)((1-R)/(1-dt*DCR))`, with `R` the firing ratio. It
  corrects for photon detection efficiency and dark counts. It is applied as
  a table. For T accumulated maps there are only T+1 possible counts, so T+1
  `MAP` instructions apply any table to all 256 pixels at once. The host
  computes the table in fixed point.
* **Rate coding.** Repeat `ADDV V2 += V1` and `FIRE`. The number of output
  spikes then follows the enhanced value or the depth. A spike-counting layer
  is `STS` followed by `LDS` and `SYN` of weight 1.
* **Depth.** `depth_solver` forms `a = CNT0 - CNT180` and
  `b = CNT90 - CNT270`. It returns `quadrant + ratio`, in units of a quarter
  modulation period (`c/(8f)` in distance):

  | signs | value |
  |---|---|
  | a>0, b>=0 | b/(a+b) |
  | a<=0, b>0 | 1 + (-a)/(b-a) |
  | a<0, b<=0 | 2 + b/(a+b) |
  | a>=0, b<0 | 3 + a/(a-b) |

  The code is `{quadrant[1:0], ratio[7:0]}`. The ratio comes from a restoring
  divider at one bit per cycle. Full scale is `c/(2f)`, which is 15 m at
  10 MHz.

## Convolution on PE chains

`CFG n` cuts the 256 PEs into chains of `8<<n` PEs (8, 16, ..., 256). Each
chain processes one feature-map row, one output column per PE. For one kernel
row, the program does this:

1. `LDS` the input row.
2. `SYN` with the kernel's column-0 weights.
3. Then, for each further kernel column, `SHIFT` and `SYN` again. After k
   shifts, PE x sees input column x+k.

The last PE of a chain reads 0, which is the zero padding at the row's right
edge. Kernels of any width up to 7x7 take 7 shift/integrate steps per row.
Each `SYN` updates four output channels, so the 256 PEs perform 1024 synaptic
operations per clock. That is 81.9 G synaptic operations per second at
80 MHz (20.48 G in pixel-wise preprocessing mode, one neuron per PE).

Weights are usually kept in data memory. `SETW g` points at weight group g:
four 8-bit weights in lanes `2j` and `2j+1` of word `g/128`, where
`j = g mod 128`. Each `LDW` loads the next group into the weight register, and
`SYNW` uses it. A loop body can thus walk through a whole kernel.
`tb/tb_snn_conv.sv` runs the first layer of a 5-layer MNIST network this way
(conv5-12 on 28x28). It uses 8 chains of 32 PEs with 1024 neurons in parallel,
keeps the membrane potentials in memory between time steps, and takes 4356
cycles for 4 time steps.

## The sequencer and its instruction word

`pe_ctrl` fetches 64-bit instructions (see `vc_pkg.sv` for the field layout).
Fetch overlaps execution, so these take one cycle:

* `SYN`, `SYNW`, `SHIFT`, the ALU ops, `FIRE`, `MAP`, `CLR`
* the stores
* the scalar ops: two address base registers (`SETB`/`ADDB`, used by an
  address when `bsel` selects them), two loop counters (`SETC`/`DJNZ`, with
  taken jumps free), `SETW`, `CFG`

These take longer:

* Loads (`LDS`, `LDV`, `LDW`) take two cycles.
* `DEPTH` holds the sequencer until every PE's solver is done.
* `WAITF` holds it until the sensor has written a new spike map since the
  program started or since the previous `WAITF`.
* `HALT` ends the program and pulses `host_done`.

While no program runs, the host owns data memory port A. It uses that time to
load weights and inputs and to read results.

## Light adaptation

`light_adapt` keeps the pixels of every 16th row and column, an 8x8 subsample.
It counts their spikes over a window of `window` maps. The first window after
a start, a change or a host exposure load becomes the reference. A later
window that differs from the reference by more than `thr` spikes halves the
exposure (the scene got brighter) or doubles it (darker), within
1..798 cycles. The new exposure is out one cycle after the last subsampled row
is read, and each row uses it from its next reset. Adaptation thus completes
within one 10 us map period.

## Parameters (top level)

| parameter | default | meaning |
|---|---|---|
| `ROWS`, `COLS` | 128, 128 | SPAD array |
| `NPE` | 256 | PEs = data-memory lanes |
| `DS_DEPTH` | 512 | data words of 256 x 16 bit (256 kB) |
| `IS_DEPTH` | 8192 | 64-bit instructions (64 kB) |
| `FRAME_CYCLES` | 800 | clocks per spike map (10 us at 80 MHz) |
| `ROW_CYCLES` | 6 | rolling-shutter row offset |
| `MOD_CYCLES` | 8 | iToF modulation period (10 MHz) |

`sensor_if` assumes `NPE` is a multiple of `COLS`.

## What follows the source design and what is this design's own

These points follow the source design:

* the overall architecture: gated SPAD sensor, reconfigurable IF-neuron PE
  array, MPU, and on-chip light feedback
* the 128x128 array, 80 MHz clock, 100k maps/s, 256 PEs and 1024 neurons
* the 256 kB data and 64 kB instruction memories
* 1-bit spikes, 8-bit weights, a membrane potential of up to 16 bits, and the
  fire-reset rule
* PE chains of 8 to 256 with neighbour sharing, and kernels up to 7x7
* the depth function, the f-function, the 8x8 subsampled light-change
  detection, and the 2D and iToF modes

These are this design's own choices, since the source does not specify them:

* **Instructions and memory.** The whole instruction set and sequencer. The
  memory organisation into 16-bit lanes, the bit-plane spike-map layout and
  the sensor's masked write port.
* **PE details.** Four neurons per PE. Saturating arithmetic. A
  per-instruction 16-bit threshold. Table mapping by `MAP`. One depth solver
  per PE, with its handling of zero differences.
* **Imaging.** Row timing (6 cycles), modulation frequency (10 MHz) and the
  phase-gating scheme.
* **Light adaptation.** The factor-of-two exposure step with re-baselining.

The source's MPU, a general controller, is not included. Its interfaces are
the `host_*` ports, and a testbench plays its part. Also left out: the SPAD
high-voltage and gate supplies, which have no logic; the colour filter, which
is optical; and the networks' trained weights.

Known limits:

* The depth resolution at the simulated 4 maps per phase is coarse, because
  each map gives one bit per pixel. More maps per phase mean more bit planes
  than fit one lane, so the counts would be accumulated across words.
* The MNIST layers are simulated one at a time with random inputs and
  weights: conv5-12 in full, and pooling, a fully connected layer (64 inputs,
  10 outputs) and spike counting at reduced size. The second convolution
  (conv5-64) and a whole inference chained layer to layer have not been run.
* Rate coding of depth values uses the same `ADDV`/`FIRE` loop as the 2D
  path, but the 3D test checks the depth codes, not a spike train made
  from them.
* Inference rate (300 inferences/s in the source) was not measured.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.

| testbench | what it shows |
|---|---|
| `tb_vision_chip_top` | full-size chip, default parameters. 2D: 4 maps, accumulation, f-table, rate coding and spike counting for all 16384 pixels; adaptation to a brighter scene. 3D: mode switch, 16 iToF maps at 4 phases, per-PE depth checked against the depth function, depth increasing with delay. |
| `tb_snn_conv` | full-size chip running conv5-12 on 28x28 over 4 time steps; all spikes and potentials checked |
| `tb_snn_pool_fc` | full-size chip running 2x2 average pooling (4 channels, 24x24), a fully connected layer with 10 outputs for 4 images at once on 4 chains, and spike counting; all spikes, potentials and counts checked |
| `tb_pe`, `tb_pe_array`, `tb_pe_ctrl` | PE operations against a reference model; chain cutting and convolution for chain lengths 8/16/32 and kernel widths 3/5/7; sequencer timing, loops, frame wait, weight loads |
| `tb_depth_solver` | depth code against the formula, 10-cycle latency |
| `tb_imaging_ctrl`, `tb_spad_pixel_array`, `tb_sensor_if`, `tb_light_adapt` | the imaging path |
| `tb_data_sram`, `tb_inst_sram` | memories |

Run one with plain Verilator from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/vc_pkg.sv tb/tb_vision_chip_top.sv \
          --top-module tb_vision_chip_top -o sim
./obj_dir/sim
```

Verilator has only two signal states, so start the simulation with
`+verilator+rand+reset+2` to catch anything left uninitialised. The
full-size top-level testbench takes well under a minute of simulation.
