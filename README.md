# HEVC intra prediction accelerator

This RTL predicts one square block of video samples from the samples around it.
It follows HEVC intra prediction: the block is a prediction unit (PU) of 4x4,
8x8, 16x16 or 32x32 samples. Its neighbours are the column to its left, the row
above it and the corner between them. The accelerator can compute one of the 35
HEVC intra modes:

- planar (mode 0)
- DC (mode 1)
- 33 angular directions (modes 2 to 34)

It can also sweep all 35 modes. In a sweep it compares every prediction with
the original block and keeps the mode whose prediction is closest. That is the
mode decision an encoder makes for every PU.

The architecture is a published FPGA design for the Zynq-7000: an accelerator
for the intra prediction step of an HEVC encoder. It has five parts:

- one block RAM that holds all neighbours as a single array
- a DC unit built from an adder tree and shifters
- four processing elements (PEs) that share planar and angular work, each with
  carry-save multipliers instead of DSP blocks
- a control unit that walks every PU size with counters
- block RAM for the predicted samples

Four PEs run side by side, so four samples leave the datapath every clock.
Where the published description stops, this implementation makes its own
choices. Each one is listed under "Departures and open points" below.

## Block diagram

```
             host (processor system)                    
   ref_wr_*  |     org_wr_*  |   start/log2n/mode/...  |  pred_rd_*, best_*
             v               v                         v
        +---------+    +-----------+            +------------+
        | ref_ram |    | sample_ram|<-----------| intra_ctrl |  counters, FSM,
        |2x129 x 8|    | 2 x orig. |  word addr | (addresses)|  per-lane addresses
        +---------+    +-----------+            +------------+
          8 read ports       |                        | s1_* (stage 1 control)
          |    |             |                        |
   +------+    +---------+   |                        |
   v                     v   |                        |
+---------+      +--------------+                     |
| dc_unit |      | intra_pe x 4 |<-- csa_mult x 4 each|
+---------+      +--------------+                     |
     \                 /      |                       |
      +-- output mux -+       v                       |
             |         +---------------+              |
             +-------->| mode_decision |  SAD, best   |
             |         +---------------+              |
             v                 | new_best             |
       +----------------+      v                      |
       | sample_ram     | bank pointer                |
       | 2 x PU (pred)  |                             |
       +----------------+                             |
```

## The single reference array (the part to understand first)

All neighbours sit in one array `R` of `4*NMAX+1` samples (129 for NMAX = 32).
The corner sits at a fixed position, with the left column on one side of it and
the row above on the other:

```
 index:   0 ...................... 63   64   65 ..................... 128
 sample:  p[-1][63] ...... p[-1][0]     C    p[0][-1] ........ p[63][-1]
          left column, bottom-to-top  corner  above row, left-to-right
```

`L[y] = p[-1][y]` is stored at `63 - y` and `T[x] = p[x][-1]` at `65 + x`.
These positions hold for every PU size: an NxN PU uses `L[0..2N-1]` and
`T[0..2N-1]`, and the rest of the array is ignored.

In HEVC, an angular mode first builds a "main reference" `ref[k]`. For a
vertical mode (18..34):

- `ref[0]` is the corner.
- `ref[k] = T[k-1]` for positive `k`.
- For negative angles, `ref[k]` with negative `k` is a sample of the left
  column, projected onto the row above with the inverse angle:
  `ref[k] = L[-1 + ((k*invAngle + 128) >> 8)]`.

Horizontal modes (2..17) are the mirror image: swap L with T and x with y.
Because the corner sits between the two halves, the main reference needs no
copy:

| mode family | `k >= 0`        | `k < 0` (projected side)         |
|-------------|-----------------|----------------------------------|
| vertical    | `R[64 + k]`     | `R[64 - 1 - s]`, `s = -1 + ((k*invAngle+128)>>8)` |
| horizontal  | `R[64 - k]`     | `R[64 + 1 + s]`                  |

The control unit evaluates this table for every lane every clock (see
`ref_addr()` in `intra_ctrl.sv`). The sample at `(x, y)` of a vertical mode is
then

```
pos  = (y+1) * angle;  iIdx = pos >>> 5;  iFact = pos & 31
pred = ((32-iFact) * ref[x+iIdx+1] + iFact * ref[x+iIdx+2] + 16) >> 5
```

A horizontal mode swaps x and y. Each lane reads its own two addresses, so the
angular, planar and DC modes all use the same raster order: row by row, four
horizontally adjacent samples per clock. No transpose buffer is needed for
the horizontal modes.

## Planar and angular: the processing element

Each of the four `intra_pe` instances computes one sample per clock as a sum
of four weighted samples:

| mode    | weights and samples                                                   | round | shift        |
|---------|-----------------------------------------------------------------------|-------|--------------|
| planar  | `(N-1-x)*L[y] + (N-1-y)*T[x] + (x+1)*T[N] + (y+1)*L[N]`               | `+N`  | `log2(N)+1`  |
| angular | `(32-iFact)*ref_a + iFact*ref_b` (the other two weights are 0)        | `+16` | `5`          |

For every lane the reference memory delivers two samples: `L[y]`/`T[x]` for
planar, or the two samples around the projected position for angular. The
planar corner samples `T[N]` and `L[N]` are read once per PU and held in
registers. Weights fit in 6 bits (0..32). Each product comes from `csa_mult`:
the partial products are folded row by row into a carry-save sum/carry pair,
and one carry-propagate adder at the end produces the result. No DSP blocks
are used. `csa_mult` defaults to 32x32 bits; the PEs instantiate it at 8x6.

The PE has two register stages. The first registers the sum of products; the
second registers the rounded, shifted sample. Its outputs `s1` (planar) and
`s2` (angular) are the two roundings of the same sum, and `pred` is the one
selected.

## DC

`dc_unit` gathers the N above and N left samples into a 64-entry buffer. The
reference memory's eight read ports deliver four of each per clock. Entries a
smaller PU does not use stay zero, so one 64-input adder tree serves every
size. Then `dcVal = (sum + N) >> (log2(N)+1)`. For luma blocks smaller than
32x32, the first row and column are smoothed towards the neighbours, using
only shifts and adds:

```
(0,0): (L[0] + 2*dcVal + T[0] + 2) >> 2
(x,0): (T[x] + 3*dcVal + 2) >> 2
(0,y): (L[y] + 3*dcVal + 2) >> 2
```

The DC lanes have the same two-clock latency as the PEs. A multiplexer picks
one or the other by mode.

## Schedule and timing

For each PU, `intra_ctrl` runs these phases:

| phase | clocks                       | what happens                                                        |
|-------|------------------------------|---------------------------------------------------------------------|
| SETUP | `N/4 + 1`                    | DC gathering (4 above + 4 left per clock), then T[N], L[N]          |
| RUN   | `N*N/4` per mode             | four samples per clock, raster order                                |
| DRAIN | `DRAIN_CYC` (2) between modes, `DRAIN_CYC+3` after the last | pipeline empties, cost settles |
| DONE  | 1                            | `done` pulse                                                        |

The pipeline, counted from the clock in which the control unit issues a group
of four:

```
issue (addresses) -> block-RAM read -> PE stage 1 (sum) -> PE stage 2 (round) = out_valid
      t                 t+1                t+2                 t+3
mode_decision closes a mode at t+4; the best-bank pointer flips at t+5.
```

Clocks from `start` to `done`, with M modes (1 or 35):
`(N/4 + 1) + M*(N*N/4 + DRAIN_CYC) + 3`. The unit returns to idle one clock
after `done`, so back-to-back PUs are one clock further apart than that.

| PU    | start to done, one mode | all 35 modes | PU period, one mode | samples/clock |
|-------|-------------------------|--------------|---------------------|---------------|
| 4x4   | 11                      | 215          | 12                  | 1.33          |
| 8x8   | 24                      | 636          | 25                  | 2.56          |
| 16x16 | 74                      | 2318         | 75                  | 3.41          |
| 32x32 | 270                     | 9042         | 271                 | 3.78          |

The published design reaches 143.65 MHz on the Zynq-7000. At that clock, four
samples per clock is 574.6 Msample/s peak. 3840x2160 4:2:0 video at 30 fps
needs 373.2 Msample/s when each sample is predicted in one mode.

The input memories are double-buffered (see "Using the top"). So the next PU
is written while the current one is predicted, and the PU period is the longer
of two times: predicting (the table above), or writing. Writing means the
4N+1 neighbours at one sample per clock, and in parallel N*N/4 original words.
For 16x16 and 32x32, predicting is the longer. For 8x8 and 4x4, the neighbour
writes (33 and 17 clocks) are the longer. Measured with a streaming host over
a 64x64 picture region (`tb_workload_4k30`), at 143.65 MHz:

| PU    | clocks per PU | Msample/s | 4K30 (373.2) |
|-------|---------------|-----------|--------------|
| 4x4   | 20.0          | 115.1     | falls short  |
| 8x8   | 35.9          | 256.4     | falls short  |
| 16x16 | 77            | 477.6     | fits         |
| 32x32 | 273           | 538.8     | fits         |

The testbench host adds a clock or two per PU on top of the minimum. Even
with free loading, 8x8 PUs alone would give 367.7 Msample/s, just short. A
picture coded mostly with 16x16 and 32x32 PUs meets the rate. Whether a real
mix of sizes meets it depends on the mix. A full 35-mode search at this rate
would need 13 Gsample/s and does not fit. (Clock frequencies are not
properties of this RTL; no timing closure has been done.)

## Mode decision and the two output banks

`mode_decision` adds up the absolute differences between each predicted group
and the matching original samples. When a mode ends, it compares the mode's
SAD with the best so far. The comparison is strict, so on a tie the mode
computed first wins; modes run 0, 1, 2, ... 34.

The output memory has two PU-sized banks. One holds the best prediction so
far, and the current mode writes into the other. When a mode becomes the new
best, the bank pointer flips. When `done` pulses, the best mode's samples can
be read through `pred_rd_*` in the same word order. Each word holds four
samples; sample `x0+i` of row `y` is in byte `i` of word `y*(N/4) + x0/4`.
Every group is also streamed on `out_*` as it is produced.

## Using the top (`intra_pred_top`)

1. Write the neighbours with `ref_wr_en/addr/data`, one sample per clock, at
   the addresses shown above (corner at 64).
2. Write the original PU with `org_wr_en/addr/data`, four samples per word, in
   the same word order as the output. This is needed only if the mode decision
   is wanted.
3. Pulse `start` for one clock, with:
   - `log2n` (2..5)
   - `all_modes`
   - `mode` (used when `all_modes` is 0)
   - `luma` (turns on the DC edge filter below 32x32)
4. `busy` stays high until `done` pulses. Then `best_mode` and `best_cost`
   are valid, and `pred_rd_data` returns the word at `pred_rd_addr` one clock
   later.

The reference memory and the original-sample memory each have two banks.
Steps 1 and 2 always write the load bank. `start` hands the load bank to the
datapath and turns the other bank into the new load bank. So the next PU can
be written while the current one runs, and it can be started as soon as
`done` has pulsed. The published architecture mentions loading and processing
data at the same time; the two-bank scheme is this implementation's way of
doing it. Every neighbour the next PU needs has to be written again, because
the load bank still holds the PU from two starts back. A PU can be started
only once; starting again without new writes predicts from stale data.
A `start` while `busy` is high is ignored.

Reset (`rst_n`) is asynchronous and active low. Memory contents are not reset.

Parameters: `NMAX` (32, largest PU), `LANES` (4, samples per clock),
`BIT_DEPTH` (8), `DRAIN_CYC` (2). The address arithmetic assumes
`LANES = 4` and `NMAX <= 32`. The 5-bit coordinates and the setup counter are
sized for these values.

## Departures and open points

- **Numbering.** Modes are numbered as in HEVC: planar 0, DC 1.
- **DC rounding.** The DC value is rounded as in the HEVC reference software:
  `+N` before the shift.
- **Planar.** This is the standard HEVC planar equation.
- **Filters not built.** HEVC also smooths the reference samples before some
  modes, and filters the first row or column of modes 10 and 26. Neither
  filter is part of the published architecture, and neither is built. The host
  has to supply already-filtered neighbours if bit-exact HEVC output is
  needed. The DC edge filter is built.
- **Clock count.** The published design reports 467 clocks for a 32x32 block
  and 6 clocks per PE. This schedule needs 270 clocks for one 32x32 mode with
  a 2-stage PE. The published figures cannot be reproduced from the
  description.
- **Mode decision.** The cost metric (SAD), the two-bank output memory and the
  separate original-sample buffer are this implementation's own. So are the
  load/process banks of the input memories. The published
  design only says that the best mode is chosen. Its single block RAM of 36 Kb
  could not hold 35 predictions of a 32x32 block. The memories here add up to
  34,832 bits: two banks each of neighbours (2 x 129 x 8), original samples
  (2 x 256 x 32) and predictions (2 x 256 x 32). That is within the same 36 Kb
  budget, but spread over separate memories instead of one.
- **64x64 PUs.** A 64x64 PU is predicted as four 32x32 blocks. Splitting it up
  is left to the host.
- **Host side.** The processor system and DDR memory are outside the RTL. The
  host protocol above is this implementation's own.

## Files

| file | contents |
|------|----------|
| `rtl/intra_pkg.sv` | mode kinds, FSM states, HEVC angle and inverse-angle tables |
| `rtl/ref_ram.sv` | two-bank reference sample memory, 1 write / 8 read ports |
| `rtl/csa_mult.sv` | carry-save array multiplier |
| `rtl/intra_pe.sv` | planar/angular processing element |
| `rtl/dc_unit.sv` | DC adder tree and edge filter |
| `rtl/intra_ctrl.sv` | control unit, address generation |
| `rtl/sample_ram.sv` | word-wide simple dual-port RAM |
| `rtl/mode_decision.sv` | SAD accumulation and best-mode register |
| `rtl/intra_pred_top.sv` | top level |
| `tb/intra_model_pkg.sv` | HEVC reference model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_workload_4k30` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Example with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/intra_pkg.sv tb/intra_model_pkg.sv tb/tb_intra_pred_top.sv \
    --top-module tb_intra_pred_top -o sim
./obj_dir/sim
```

Other testbenches are built the same way; replace the last file and the
top-module name.

What the testbenches establish:

- `tb_intra_pred_top` runs the top at its default size. For 4x4, 8x8, 16x16
  and 32x32 it sweeps all 35 modes and checks every streamed sample against
  the model, the chosen mode and its SAD, the read-back of the best bank, and
  the exact clock count. Single-mode runs cover DC without the filter. Most
  PUs are written while the previous one is running. It counts each mechanism
  (filtered and unfiltered DC, planar, positive and projected negative angles,
  pure horizontal/vertical, sweep, bank swap, kept best, load while busy,
  start while busy) and fails if any never occurs.
- `tb_workload_4k30` streams a 64x64 region of a synthetic picture through
  the top, PU by PU for each size. The next PU is loaded while the current one
  runs. It checks every sample and each PU's clock count, and reports the
  sustained rate given in "Schedule and timing".
- `tb_intra_ctrl` checks every lane address of every mode and size against the
  model, through a behavioural memory.
- The unit testbenches check `csa_mult` (32x32 and 8x6), `intra_pe`,
  `dc_unit`, `mode_decision`, `ref_ram` and `sample_ram` against arithmetic
  done in the testbench. They also check latencies.

The model in `tb/intra_model_pkg.sv` is written from the HEVC equations with
separate left/above arrays. It shares no addressing code with the RTL, but it
models the same subset: no reference smoothing, and no filter for modes 10
and 26. It has not been compared with the HEVC reference software.
