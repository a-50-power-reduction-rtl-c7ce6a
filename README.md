# Elastic-pipeline H.264 decoder core with slot-based voltage scaling

A hardwired H.264 HDTV decoder is normally clocked so that every macroblock
(MB) pipeline step finishes within the worst case. At 1920x1088, 30 frames/s
(8160 MBs per frame) and 108 MHz, that is 440 cycles per MB. Most MBs need
far fewer cycles: zero coefficient blocks, copy-type prediction modes and
integer motion vectors are all cheaper. A fixed-step pipeline can only gate
the clock during those idle cycles.

This core saves those cycles and turns them into a lower clock frequency and
supply voltage:

* **Elastic pipeline.** A new pipeline step begins as soon as every stage
  has finished its MB, not after a fixed 440 cycles.
* **Slot-based DVS controller.** The time saved this way builds up as a
  margin. The controller spends it, slot by slot, on a lower mode from
  108 / 81 / 54 / 27 MHz at 1.00 / 0.85 / 0.70 / 0.55 V. The real-time
  deadline is never put at risk.
* **Interface SRAMs.** Double- and triple-banked SRAMs isolate the scaled
  core from the fixed-voltage bus to external DRAM.

The RTL is SystemVerilog-2017, synthesizable, and checked with Verilator.

## Pipeline and process timing

There are six MB stages. Stage *k* works on a different MB from stage *k+1*
in the same step (called a *process* below):

| stage | function                          | in this RTL |
|-------|-----------------------------------|-------------|
| 0     | CABAC arithmetic decoding         | external (done level is a port) |
| 1     | syntax element decoding (SED)     | external (writes coefficients and `sed_info`) |
| 2     | inverse quantisation + 4x4 inverse transform | `iq_idct` |
| 3     | intra **or** inter prediction     | `intra_pred16`, `inter_pred` |
| 4     | prediction error adder            | `pred_err_adder` |
| 5     | loop (deblocking) filter          | external (reads the reconstructed MB) |

IQ/IDCT and prediction do not depend on each other, so both run in the
same process. Either the intra or the inter predictor works in a process,
never both. Their outputs go into one shared predicted-picture buffer,
selected by the MB's intra flag.

For MB *n*:

* **Process p.** The SED delivers its coefficients and side information
  (`mb_info_t`).
* **Process p+1.** IQ/IDCT and prediction run.
* **Process p+2.** The adder forms the reconstructed MB.
* **Process p+3.** The loop filter reads the reconstructed MB.

### The elastic handshake (`elastic_pipe_ctrl`)

Each stage holds its `done` output high once it has finished its MB. The
controller drives a combinational `start`:

```
start = run && !hold && &stage_done
```

Each stage lowers `done` on the cycle after `start` and begins the next MB.
A process therefore lasts as long as its slowest stage, plus one handover
cycle. The controller also reports:

* `proc_count`, the number of processes started;
* `proc_cycles`, the length of the last process;
* `over_wcec`, set when the last process was longer than 440 cycles.

`hold` comes from the DVS controller. It stops new processes while the
clock and supply are changing.

Stage latencies in cycles (each includes the done cycle):

| stage | cycles |
|-------|--------|
| IQ/IDCT | 2 + 8 per coded 4x4 block + 5 per zero block (24 blocks) |
| intra prediction | 97 (vertical/horizontal copy modes) or 98 (DC and plane) |
| inter prediction | 97 (integer luma vector) or 161 (fractional luma vector) |
| adder | 98 (96 four-sample words) |

## Slot-based DVS (`dvs_feedback_ctrl`)

The controller divides a frame into `SLOTS_PER_FRAME` slots (default 60) of
`MBS_PER_SLOT` MBs each (default 136). Each slot gets an equal share of the
1/30 s frame time.

All time is counted in ticks of 1/324 MHz. The four clock periods are then
whole numbers of ticks: 12, 6, 4 and 3. A slot lasts
`SLOT_TICKS = MBS_PER_SLOT * 440 * 3` ticks. A transition takes `T_TRANS`
ticks (default 16200, i.e. 50 µs).

These are the rules:

1. **First slot.** The first slot of every frame runs at 108 MHz. No margin
   exists yet at that point.
2. **Choosing the next mode.** When the last process of slot *s* has
   finished, the controller knows the elapsed time `t_now`. It picks the
   lowest mode *k* that satisfies:

   ```
   MBS_PER_SLOT*440*period(k)          -- worst case of the whole next slot at mode k
   + (k != current ? T_TRANS : 0)      -- the change itself
   + T_TRANS                           -- reserve for returning to 108 MHz later
   <= (s+2)*SLOT_TICKS - t_now
   ```

   The reserve term guarantees that a slot can always fall back to full
   speed and still meet its deadline, whatever the MB contents are.
   "Lowest" means slowest frequency.
3. **Last slot.** After the last slot the controller returns to 108 MHz for
   the next frame. That transition is charged to the frame that is ending.
4. **Holding the pipeline.** While a transition is running, `hold` keeps the
   pipeline stopped.
5. **Closing the slot.** `hold` is also high from the start of a slot's last
   process until that process completes. The decision above is made then.
6. **Two-set configuration.** `NUM_SETS = 2` restricts the choice to 108 and
   54 MHz.

The controller's outputs are:

* `mode`, `freq_mhz` and `vdd_mv`, the request to the clock generator and
  regulator. Neither of those is part of this RTL.
* `slot_idx`, `frame_cnt` and `n_transitions`.
* `n_deadline_miss`, which counts slots that ended after their deadline. It
  must stay at zero.

## Buffers between stages and to the outside

* **`dbuf_sram`: two banks, swapped on every `start`.** One bank is written
  for the coming process while the other is read for the current one. Read
  latency is one cycle. The top has four instances, each one MB deep:

  | instance | width | depth |
  |---|---|---|
  | coefficients | 24 blocks × 256 bits | 24 |
  | prediction error | 4 samples × 16 bits | 96 |
  | predicted picture | 4 samples × 8 bits | 96 |
  | reconstructed MB | 4 samples × 8 bits | 96 |

  On silicon the two banks of an interface buffer run at different supplies:
  one with the core, one with the bus. In this RTL both use one clock.
* **`seq_buf_3bank`: three banks of 256 × 32 bits (3 kB), for the
  CABAC-decoded binary sequences.**
  * The bus side fills the banks in turn. A bank is handed over when it is
    full, or earlier when `wr_last` closes it.
  * The SED side reads words and returns each bank after its last word.
  * One MB's sequence has no fixed length, so it often spans two banks.
    The third bank lets the bus side keep writing meanwhile.
  * `straddle_cnt` counts MBs that spanned two banks.

  An assertion checks that both sides never hold the same bank.

Buffer word layout (predicted, reconstructed and residual data):

| words | content | address |
|---|---|---|
| 0–63 | luma | `y*4 + x/4` |
| 64–79 | Cb | `64 + y*2 + x/4` |
| 80–95 | Cr | `80 + y*2 + x/4` |

Sample *j* of a word is the one at `x = 4*(x/4) + j`.

## Stage datapaths

* **`iq_idct`.** Handles the 24 blocks in order: 16 luma blocks, then 4 Cb,
  then 4 Cr.
  * Zero blocks, flagged in `coded`, skip the arithmetic and write zeros.
  * Coded blocks are scaled by `c * v(qp%6, position) << (qp/6)`, using the
    standard H.264 normalisation values *v* with a flat scaling matrix.
  * Then come a row pass and a column pass of the 4x4 integer transform
    (butterflies with the >>1 odd terms), and finally `(x + 32) >> 6`.
* **`intra_pred16`.** Implements the four Intra_16x16 luma modes (vertical,
  horizontal, DC, plane) and the four chroma modes (DC per 4x4 block,
  horizontal, vertical, plane).
  * Neighbours and their availability are inputs, captured at `start`.
  * It writes one four-sample word per cycle.
* **`inter_pred`.** Works on one 16x16 partition with one motion vector. Its
  inputs are a 21x21 luma reference window and two 9x9 chroma windows,
  delivered by the DRAM side.
  * Integer luma vector: the window is copied.
  * Fractional luma vector: the 6-tap (1,−5,20,20,−5,1) half-sample filter
    runs first, then the 2-tap averaging quarter-sample filter. A word takes
    two cycles: one computes and registers the half-sample values, the next
    combines them.
  * Chroma uses eighth-sample bilinear weights.
* **`pred_err_adder`.** Adds four 16-bit residuals to four 8-bit predictions
  per cycle and clips the result to 0..255. An MB takes 96 words.

## Where this RTL departs from, or goes beyond, the original design

The RTL omits these parts:

* **CABAC decoder, SED and loop filter.** These are the standard's
  algorithms, and their internals are not specified here. The top brings
  their handshakes and data paths out as ports. The testbenches stand in
  for them, with random latencies.
* **Neighbour-pixel RAM for intra prediction.** This is the one
  single-banked buffer. It is left out, and neighbours are top-level inputs.
* **Intra_4x4 modes, sub-MB partitions, bi-prediction and weighted
  prediction.**
* **Luma DC and chroma DC Hadamard transforms, and scaling matrices.**
* **External DRAM, local bus, clock generator and voltage regulator.**

Details that are this design's own choice:

* The choice of widths, handshakes, stage cycle counts and buffer layouts.
* The 1/324 MHz time base.
* The exact form of the mode-selection inequality, including the reserve
  for the return transition.
* Holding the whole pipeline during a transition.
* One clock for both sides of the interface buffers.

## Verification

Each block has a self-checking testbench in `tb/` that compares against
independent reference models in `tb/h264_ref_pkg.sv`:

* the transform and scaling;
* all intra modes;
* the 6-tap, quarter-sample and chroma interpolation.

The testbenches also check cycle counts where they matter:

* 98 cycles for the adder;
* the IQ/IDCT cost per block;
* process length = slowest stage + 1.

The DVS testbenches keep their own time account and recompute every mode
decision. `tb_dvs_feedback_ctrl` covers four sets and
`tb_dvs_feedback_ctrl_2set` covers two.

`tb_h264_dvs_top` runs 120 random MBs through the whole core, with small
slots (4 MBs, 5 slots per frame, 300-tick transitions). It checks every
reconstructed sample read by the loop-filter port. It fails unless each of
these happened at least once:

* zero and coded blocks;
* every intra luma and chroma mode;
* integer and fractional inter MBs;
* a process shorter than the worst case;
* both mode decreases and increases;
* transition holds;
* frame boundaries;
* MBs that span two sequence-buffer banks;
* a full sequence buffer blocking the writer.

`tb_h264_dvs_top_full` runs the top at its default parameters through one
whole 8160-MB frame with 60 slots and 50 µs transitions. It does the same
checks, over about 3.2 million sample checks. It takes under a minute.

Every testbench ends with `TB_RESULT checks=N failures=M`.

To simulate with plain Verilator (5.x), from the directory holding `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/dvs_pkg.sv tb/h264_ref_pkg.sv tb/tb_h264_dvs_top.sv \
    --top-module tb_h264_dvs_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace the testbench name to run any other test.

To change the operating point, override the parameters of `h264_dvs_top`:

* `MBS_PER_SLOT` and `SLOTS_PER_FRAME` (their product is the frame size in
  MBs);
* `T_TRANS`, in 1/324 MHz ticks;
* `NUM_SETS`.

The mode table lives in `dvs_pkg`.
