# Three-stream continuous-HMM speech decoder

This is synthesizable SystemVerilog for the decoding half of a phone recogniser. It
works with continuous-density hidden Markov models (HMMs). The host PC turns speech
into 39-element feature vectors, one per 10 ms frame. The hardware takes those
vectors and does the two expensive steps:

1. **Observation probabilities.** For every frame and every state of every HMM, it
   computes the probability that the state emitted the feature vector. The model
   is an uncorrelated multivariate Gaussian. The sum runs in floating point,
   one vector element per clock cycle.
2. **Viterbi decoding.** It updates the best path cost into every state and
   records each state's most likely predecessor.

The hardware does not backtrack. The host does that from the predecessor words the
design writes to RAM.

The main idea is to **decode three speech files at the same time**. Producing the
probabilities takes about forty times longer than the Viterbi update, and each
observation vector only has to be read once per frame. So three probability units
share one stream of model data (means and weights), one unit per file. One Viterbi
decoder serves the three units in turn, and its path-cost memory keeps the three
files apart.

The default size is the monophone system: 49 three-state HMMs (`N_HMM = 49`).
The same RTL with `N_HMM = 634` is the biphone/triphone system.

## The arithmetic

The decoder works with costs, which are negative natural logarithms. The cost of
observation `O` in state `j` is:

```
cost_j(O) = C_j + sum_{i=0..38} (O_i - mu_ji)^2 * w_ji
w_ji = 1 / (2 sigma_ji^2)
C_j  = (39/2) ln(2 pi) + sum_i ln sigma_ji
```

`w` and `C` depend only on the model, so the host computes them in advance and
stores them next to the means. Each element then needs one subtraction, one
squaring and one multiplication.

`C_j` is fed in as a **fortieth element**, which keeps the datapath uniform:

- its mean word is 0;
- its weight word is `C_j`;
- the observation buffer supplies 1.0 at index 39.

So `(1 - 0)^2 * C_j = C_j` flows through the same subtract, square and multiply
pipeline. Every state therefore takes exactly 40 cycles.

Number formats:

| quantity | format |
|---|---|
| observation, mean, weight, partial sums | IEEE-754 single precision (24-bit significand). Round to nearest-even. Denormals flush to zero. No NaN handling. |
| observation cost and path costs | signed 32-bit fixed point with 8 fractional bits (`hmm_pkg::cost_t`). Converted with rounding half away from zero. |
| cost arithmetic | saturating, within [-2^30, 2^30-1] |
| `COST_INF` (2^30-1) | an impossible or pruned path. Any sum that contains it stays `COST_INF`. |

## Data flow and timing

```
 board RAM: obs bank ─────────────┬────────────┬────────────┐
 board RAM: mean+weight banks ─┬──┼─[delay 40]─┼─[delay 40]─┼─┐
                               │  │          │ │          │ │ │
                          obs_prob_unit 0  obs_prob_unit 1  obs_prob_unit 2
                               │ (file 0)        │ (file 1)      │ (file 2)
                               └──── frame_done / read port ─────┘
                                               │
                                       viterbi_decoder ──► predecessor bank
```

- **frame_sequencer** walks the `3*N_HMM` states of a frame. It reads 40
  elements per state, so each frame is exactly `3*N_HMM*40` cycles and frames
  follow each other with no gap. The mean and weight banks share one address.
- **Observation reads.** In the first 120 cycles of a frame the sequencer also
  reads the three files' observation vectors, one after another. File `f` is read
  during cycles `40f .. 40f+38`.
- **Model delay lines.** Unit 1 gets the model stream through one 40-cycle
  delay line (`model_delay`), and unit 2 through two. So each unit sees its own
  observation vector at the same moment as the model data for state 0. From then
  on each unit replays the vector from its `obs_buffer` for every further state.
- **Inside `obs_prob_unit`.** The pipeline is: observation buffer, then
  `fp_addsub` (`O - mu`), then `fp_mul` (square), then `fp_mul` (times `w`), then
  `fp_accumulator`, then `fp_to_fixed`, then `prob_buffer`. Each stage accepts
  one element per cycle and takes one cycle. One state's cost is finished every
  40 cycles. The last cost of a frame reaches the buffer 6 cycles after the
  frame's last model beat.
- **Ping-pong buffer.** `prob_buffer` has two pages. A unit writes frame `t+1`
  into one page while the decoder reads frame `t` from the other. When a page is
  complete the unit pulses `frame_done`.
- **Decoder arbitration.** The three `frame_done` pulses arrive 40 cycles apart.
  One decoder pass takes `N_HMM + 4` cycles, so requests often arrive while a
  pass is running. The decoder queues them and serves the pending file with the
  lowest index first.

At 49 HMMs a frame of all three files takes 5880 cycles. At 50 MHz that is 117.6 us,
or 39.2 us per observation. A 10 ms frame therefore runs about 255 times faster than
real time. At 634 HMMs a frame takes 76080 cycles. At 33 MHz that is 768.5 us per
observation, about 13 times real time. Both figures match what the original
implementation reports on its FPGA: 39.3 us and 769 us.

## The Viterbi decoder

Every HMM is a left-to-right model with three emitting states. Each state has a
self loop and a step forward. State 0 is entered from outside the model, and
state 2 leaves the model through an exit transition. For state `j` of HMM `m` at
frame `t`:

```
delta_t(j) = min( delta_{t-1}(j) + a_jj , delta_{t-1}(j-1) + a_(j-1)j ) + cost_j(O_t)
psi_t(j)   = 1 if the second term won (ties go to the self loop)
```

For state 0, the "previous state" is the cheapest model exit of the previous
frame, taken over all HMMs of that file, plus this HMM's entry cost. There is no
language model, so every HMM shares the same single best predecessor.

One pass over a file handles one HMM per cycle in four pipeline steps:

| cycle | work |
|---|---|
| c0 | Read the three observation costs (from the file's `prob_buffer`), the previous path costs (`delta_buffer`), the transition costs (`trans_ram`) and the entry cost (`lm_block`'s RAM). |
| c1 | **scaler**: subtract the file's smallest path cost of the previous frame, so the best path restarts at 0 and costs cannot overflow. Replace any cost more than `PRUNE_TH` above the best with `COST_INF`, which prunes that path. The best exit cost is rescaled the same way. **init_switch**: pick the file's observation costs. On the file's first frame, set every previous cost to `COST_INF` and the best exit to 0, so each HMM starts in state 0 at its entry cost. |
| c2 | **hmm_processor**: three `hmm_node`s update the three states at once. |
| c3 | Write the new costs back to `delta_buffer`. The scaler tracks their minimum. `lm_block` tracks the cheapest exit and the HMM that gave it (lower index wins a tie). Emit one predecessor record. |

One cycle after the last HMM, the file's minimum and best exit are latched for its
next frame, and a best-exit record is emitted.

`PRUNE_TH` is 250 nats by default (`250 <<< 8`).

## Output: predecessor words and backtracking

The decoder writes one 32-bit word per HMM per frame per file to the predecessor
bank, plus one best-exit word:

```
address = (t*3 + f) * (N_HMM + 1) + m       m < N_HMM : predecessor bits of HMM m
                                            m = N_HMM : best-exit word
predecessor word: bits 2:0 = psi of states 0,1,2 (1 = came from the state before)
best-exit word:   bit 31 = 1, bits 15:0 = HMM with the cheapest exit at frame t
```

To backtrack file `f` over `T` frames, the host does this:

1. Start at frame `T-1` in state 2 of the HMM named by that frame's best-exit
   word.
2. At frame `t`, in HMM `m` and state `j`, look at psi bit `j`.
   - If it is 0, the path stays in `(m, j)` at `t-1`.
   - If it is 1 and `j > 0`, the path moves to `(m, j-1)`.
   - If it is 1 and `j = 0`, HMM `m` began at frame `t`. The path came from
     state 2 of the HMM named by frame `t-1`'s best-exit word.
3. At frame 0 every path starts in state 0. The HMMs in which the path begins,
   read in order, are the recognised phone sequence.

## Board interface

The design uses four 32-bit RAM banks of 512K words each, with the read data one
cycle after the read request:

| bank | contents | address |
|---|---|---|
| observations | element `e` of file `f`, frame `t` | `(t*3 + f)*39 + e` |
| means | element `e` of global state `s = 3m + j` | `s*40 + e` (element 39 = 0.0) |
| weights | `1/(2 sigma^2)` | same address as the means (element 39 = `C_j`) |
| predecessors | write only | see above |

Before `start`, the host loads two tables:

- the transition costs through `trans_we/trans_waddr/trans_wdata`. Each word is
  an `hmm_pkg::trans_t`: `a00 a01 a11 a12 a22 a2x`, as fixed-point costs.
- the entry costs through `ent_*`.

Pulse `start` with `num_frames` set. `done` rises when the last frame of all three
files has been decoded.

## Files

| file | block |
|---|---|
| `rtl/hmm_pkg.sv` | types, constants, float and saturating cost arithmetic |
| `rtl/hmm_recognizer_top.sv` | whole design |
| `rtl/frame_sequencer.sv` | RAM read generation |
| `rtl/model_delay.sv` | model-stream delay line |
| `rtl/obs_prob_unit.sv` | one observation probability unit |
| `rtl/obs_buffer.sv`, `rtl/prob_buffer.sv` | its input and output buffers |
| `rtl/fp_addsub.sv`, `rtl/fp_mul.sv`, `rtl/fp_accumulator.sv`, `rtl/fp_to_fixed.sv` | its arithmetic stages |
| `rtl/viterbi_decoder.sv` | decoder core |
| `rtl/init_switch.sv`, `rtl/scaler.sv`, `rtl/lm_block.sv`, `rtl/hmm_processor.sv` (+ `rtl/hmm_node.sv`), `rtl/delta_buffer.sv`, `rtl/trans_ram.sv` | its parts |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_workload_triphone.sv` | end-to-end test at 634 HMMs |
| `tb/tb_util_pkg.sv` | real-to-float conversion and the reference Viterbi decoder |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself. It also
has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_hmm_recognizer_top \
    -y rtl -y tb +libext+.sv rtl/hmm_pkg.sv tb/tb_util_pkg.sv tb/tb_hmm_recognizer_top.sv
./obj_dir/Vtb_hmm_recognizer_top
```

`tb_hmm_recognizer_top` runs the default design (49 HMMs) for 6 frames of three
files, which takes a few seconds. It makes these checks:

- It fills the RAM models with values on a 1/4 and 1/8 grid, so every
  floating-point operation is exact. The expected costs can then be computed
  with real numbers, and a reference decoder gives the exact predecessor words.
- It compares every word in the predecessor bank.
- It checks the 5880-cycle frame period and the total run length.
- It requires each of these mechanisms to happen at least once: pruning, entry
  from another model's exit, forward steps, queued decoder requests, page swaps
  and first-frame initialisation.

`tb_workload_triphone` runs the same test with 634 HMMs for 5 frames.

The unit testbenches cover:

- float results within half an ulp of exact double-precision results;
- rounding and saturation of the fixed-point conversion;
- buffer contents and pages;
- the exact cycle pattern of the sequencer;
- the scaler and pruning rules;
- tie-breaking;
- the decoder against the reference model, with queued requests.

## What is this design's own choice

The published description gives the architecture: one element per cycle, the
fortieth-element constant, three units with a delayed model stream, the five-part
decoder with three nodes and a single shared predecessor, and transition costs in
on-chip RAM. It leaves the following open, and this RTL fills them in as follows:

- **Float format and rounding.** Single precision is inferred from its 24-bit
  multipliers. Each float unit has one pipeline stage. The accumulator adds in a
  single cycle, so its feedback loop is the critical path.
- **Fixed-point cost format.** Signed 32-bit with 8 fractional bits, saturating.
- **Model topology.** Left-to-right, with self loops, entry and exit.
- **Tie-breaking.** The self loop wins a tie between candidates. The lower HMM
  index wins a tie for the best exit.
- **Scaling and pruning.** The scaler subtracts the previous frame's minimum and
  cuts at a fixed beam, `PRUNE_TH`.
- **Decoder order.** The scaler sits just before the init/switch stage instead of
  after it. This gives the same arithmetic.
- **Probability buffer.** It is double-buffered.
- **Interface details.** All RAM layouts, the predecessor word format, the table
  load ports and the start/done handshake are this design's.
- **Arbitration.** Lowest pending file first.
- **Reset.** Asynchronous active-low reset for control state. Memories are not
  reset.

The PC, its pre-processing and backtracking software, and the board's RAM chips and
PCI arbitration are not part of this RTL. The top brings the RAM bank ports out
instead.

## Limits

- The predecessor bank holds `512K / (3*(N_HMM+1))` frames per run. That is 3495
  frames (35 s of speech) at 49 HMMs, but only 275 frames (2.75 s) at 634 HMMs,
  unless the host empties the bank during the run.
- The decoder does not check that a file's buffer page is still unread before the
  unit overwrites it. With the ping-pong pages this cannot happen: a pass takes
  `N_HMM + 4` cycles, far less than a frame.
- Observation costs outside about ±4 million nats saturate.
