# A Viterbi decoder core for continuous-HMM phone recognition

This core does the expensive half of a small speech recogniser. Software turns
speech into a sequence of 39-element feature vectors, one every 10 ms. The
core scores each vector against 49 phone models (monophone hidden Markov
models with 3 emitting states each, 147 states in all). For every state it
keeps the probability of the best path that ends there, and it records which
state that path came from. The host then backtracks through those predecessor
records to read off the most likely phone sequence.

Two things are computed for every frame:

* **Observation costs.** Each state's output density is a diagonal Gaussian,
  so every frame needs 147 Gaussians of 39 dimensions each (5,733
  multiply-accumulates). This work sets the frame time. It is done on chip,
  one dimension per clock cycle.
* **The Viterbi step.** Each state takes the better of "stay" and "arrive".
  It adds its observation cost and notes where the winning path came from.
  This takes one cycle per state and runs hidden behind the Gaussian work.

At 44 MHz a frame takes 5,929 cycles (134.8 µs), which is about 74 times faster
than real time with 10 ms frames.

## Scores are costs

Every probability p is carried as the unsigned fixed-point cost −ln p. So the
Viterbi recursion

    delta_t(j) = max_i [ delta_{t-1}(i) · a_ij ] · b_j(O_t)
    psi_t(j)   = argmax_i [ delta_{t-1}(i) · a_ij ]

becomes

    delta_t(j) = min_i [ delta_{t-1}(i) + a_ij ] + b_j(O_t)

In this form "the most probable" always means "the smallest". Every addition
saturates. The all-ones value (`COST_INF`, 32 bits) means probability zero, and
adding anything to it leaves it at `COST_INF`.

### Observation cost

The negative log of a diagonal Gaussian is

    b_j(O_t) = [ (L/2)·ln(2π) + Σ_i ln σ_ji ]  +  Σ_i (O_i − μ_ji)² · 1/(2σ_ji²)

The bracketed term does not depend on the observation. The host computes it
once per state as `gconst_j`, and it also supplies `ivar_ji = 1/(2σ_ji²)`.
Features, means, `ivar` and `gconst` are all IEEE-754 single-precision
numbers. `obs_prob_unit` evaluates the sum in single precision with a 4-stage
pipeline:

1. d = O_i − μ_ji
2. d²
3. d² · ivar
4. accumulate, starting from `gconst_j`

It takes one dimension per cycle, with no gap between states. Each operation
is rounded to nearest even (`fp32_add`, `fp32_mul`). Subnormal values are
flushed to zero. NaN and infinity are not handled, since feature data are
finite.

The finished sum is converted once per state into the cost format of the
Viterbi part:

* an unsigned 32-bit number with 12 fractional bits of a nat (`COST_FRAC`);
* rounded down;
* a negative sum becomes 0, and a sum of 2^20 nats or more becomes `COST_INF`.

A density above 1 would give a negative cost. To keep costs non-negative the
host may add the same offset to every `gconst_j`. Scaling removes that offset
again (next section).

Transition and exit costs are 16-bit values in the same units, so each one is
at most 16 nats.

### Model topology and the between-HMM path

Each model is left to right. A state has a self loop and a transition to the
next state, and there are no skips. The transition memory holds two costs per
state j:

* `a_self(j)`: the cost of staying in j.
* `a_in(j)`: the cost of entering j. For states after the first this is the
  cost from state j−1. For the first state of a model it is the cost of
  entering the model.

There is no language model, so any phone may follow any other. The best way of
leaving *any* model is therefore the same for every model entry:

    exit* = min over models m of [ delta_{t-1}(last state of m) + exit_m ]

`exit_m` is the model's exit cost, held in a small LUT-style memory. The first
state of each model then uses `exit*` as its "arrive from" score. Its
predecessor becomes the last state of the winning model. This is how a path
crosses from one phone to the next. The predecessor records therefore encode
the phone sequence as well as the state sequence.

The add-compare-select (`hmm_block`) therefore computes, per state:

    stay  = delta'(j)   + a_self(j)
    enter = delta'(j−1) + a_in(j)      or   exit*' + a_in(j) for a first state
    delta_t(j) = min(stay, enter) + b_j
    psi_t(j)   = j if stay <= enter, otherwise j−1 or the winning exit state

Ties go to the self loop.

### Scaling

Costs only grow from frame to frame, so every frame the core first finds the
minimum score over all states. It then subtracts that minimum from every score
before the add-compare-select (`scaler`). The best path therefore starts each
frame at 0, and scores stay far from saturation. `exit*` is computed from
unscaled scores, so the same minimum is subtracted from it as well
(`between_hmm_scale`). Subtracting one constant from every candidate changes no
decision. `COST_INF` is never scaled.

### The first frame

At the first frame of an utterance there is no previous score. The init switch
(`init_switch`) sets the start scores directly:

* the first state of every model starts at b_j(O_0);
* every other state starts at `COST_INF`.

No predecessors are written for this frame.

## Data path and schedule

```
 board memory ──► obs_prob_unit ──b_j──► init_switch ◄── delta_ram ◄──────────┐
 (O_t, μ/ivar,                           │  delta_{t-1}(j), unscaled         │
  gconst)                                ├──► scaler (min) ─► scaled ─► hmm_block ─► delta_t(j)
                                         └──► between_hmm_max ──► between_hmm_scale ─┘   │
                 between_prob_ram (exit_m) ─┘        trans_prob_ram (a_self, a_in) ─┘    ▼
                                                                        psi_t(j) ─► board memory
```

`decoder_ctrl` runs each frame in phases. Cycle counts are from the start
pulse, with L = 39 and N = 147.

| phase | cycles | what happens |
|---|---|---|
| LOAD | L | Reads O_t from the board memory into the engine's register file. |
| COMPUTE | N·L | Streams one {μ, ivar} word per cycle, state by state. When b_j comes out of the pipeline, the controller reads delta_{t-1}(j) and the transition word of state j. On the next cycle it hands state j to `hmm_block`. The result and psi_t(j) are registered, then written back to `delta_ram` and to the predecessor bank. |
| DRAIN | 7 | Waits for the last state to be written. |
| SCAN | N + 3 | Reads every delta_t(j) once more through the init switch. The scaler latches the frame minimum and `between_hmm_max` latches `exit*` and its state. Both are used by the next frame. After the last frame they identify where the backtrack starts. |

Total: L + N·L + N + 10 = 5,929 cycles. The Gaussian stream accounts for
97 % of it. The add-compare-select of state j runs while the Gaussian of
state j+1 is computed. `hmm_block` keeps the old scaled score of state j−1 in
a register, so `delta_ram` can be overwritten in place.

## Host interface

All board memories are read synchronously, with data one cycle after the
address.

| port group | contents |
|---|---|
| `obs_*` | Observation bank: word i holds O_i, single precision. |
| `model_*` | Model bank, 64 bits wide (two 32-bit banks read in parallel): word j·L + i holds `{mean[63:32], ivar[31:0]}`, both single precision. |
| `gconst_*` | Constant bank: word j holds `gconst_j`, single precision. |
| `psi_*` | Predecessor bank, written only. One word per state per frame, in state order. Numbering starts at word 0 on the first frame of each utterance, so frame t (t ≥ 1) fills words (t−1)·N … t·N−1. A word holds the predecessor state index. |
| `cfg_trans_*` | Loads the on-chip transition table: 147 × {a_self, a_in}. Use only while the core is idle. |
| `cfg_exit_*` | Loads the on-chip exit table: 49 × exit_m. Use only while the core is idle. |

To decode an utterance:

1. Load the tables through `cfg_trans_*` and `cfg_exit_*`.
2. For each frame, write O_t, pulse `start` (with `first` = 1 on the first
   frame), and wait for `done`. `busy` is high in between.
3. After the last frame, read `best_exit_state`: the best path ends in that
   state. (`frame_min_state` gives the best state overall.) Follow psi
   backwards from there.

## Modules

| file | role |
|---|---|
| `viterbi_pkg.sv` | Sizes, word widths, `cost_t`/`trans_t`/`fp32_t`, saturating add and scale, float-to-cost conversion |
| `viterbi_decoder.sv` | Top level, wiring only |
| `decoder_ctrl.sv` | Frame sequencer, address generation, predecessor address counter |
| `obs_prob_unit.sv` | Gaussian cost pipeline with the observation register file |
| `fp32_add.sv`, `fp32_mul.sv` | Single-precision adder and multiplier, combinational |
| `init_switch.sv` | Start scores at the first frame, otherwise the fed-back score |
| `scaler.sv` | Frame minimum (scan) and subtraction |
| `between_hmm_max.sv` | Best model exit and its state |
| `between_hmm_scale.sv` | Scales the best exit by the frame minimum |
| `hmm_block.sv` | Add-compare-select, delta_t(j) and psi_t(j) |
| `trans_prob_ram.sv` | Transition costs, synchronous read (block RAM) |
| `between_prob_ram.sv` | Model exit costs, combinational read (LUT RAM) |
| `delta_ram.sv` | Path scores between frames, simple dual port |

## How far to trust it, and where it departs from the original system

Taken from the original design:

* the model set (49 three-state monophones, 39-dimensional features, no
  language model);
* the log-domain recursion with scaling by the frame minimum;
* the split into init switch, scaler, between-HMM search and scaling, and HMM
  block;
* the use of block RAM for transition probabilities and LUT RAM for
  between-HMM probabilities;
* on-chip Gaussian evaluation;
* the 44 MHz clock and the 134 µs-per-frame target.

This implementation's own choices:

* **Number format after the Gaussian.** The Gaussian is evaluated in single
  precision, like the original data. Path scores and transition costs are fixed
  point (above), so path decisions can differ from an all-floating-point
  decoder when two paths are within 1/4096 nat of each other.
* **Topology.** Left to right, self loop plus next state, with one exit cost per
  model and one entry cost per model.
* **Start of an utterance.** Only the first state of each model may start.
* **Schedule, memory layout and handshake.** The controller, the bank word
  layout and the start/done protocol are all this design's own.
* **Reset.** Asynchronous active-low. Memories are not reset and must be
  loaded before use.

Not included:

* **Discrete-HMM variant.** Observation probabilities are not read from
  external memory.
* **Shared-memory arbitration.** The board's protocol for handing the memory
  banks between host and FPGA is not modelled. `start` and `done` stand for it.
* **Backtracking.** Left to the host.
* **Feature extraction.** Left to the host.

## Simulation

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
Build one with Verilator 5, for example:

```
verilator --binary --timing --assert -y rtl -y tb \
          rtl/viterbi_pkg.sv tb/fp_ref_pkg.sv tb/tb_viterbi_decoder.sv \
          --top-module tb_viterbi_decoder
./obj_dir/Vtb_viterbi_decoder
```

The sequencer also carries two assertions, active with `--assert`: observation
costs arrive only during the update pass, and the update and scan passes never
overlap.

`tb_viterbi_decoder` runs the whole core at its default size. It plays the
host and the board memories, and decodes two utterances of random data (10
frames). A reference model recomputes every Gaussian in correctly rounded
single precision (`tb/fp_ref_pkg.sv`) and every Viterbi step with 64-bit
integers. The testbench checks:

* every predecessor word, both its address and its value;
* the frame minimum and the best exit after every frame;
* the frame length, which must be exactly 5,929 cycles.

It also counts the design's mechanisms: init frame, model entry through the
between-HMM path, in-model move, self loop, non-zero scaling, log-zero states,
and the restart of the predecessor address at a new utterance. It fails if any
of them never happened. The whole run takes well under a second.

`tb_recognition` is a recognition run at full size. It builds an utterance
of 8 random phones, with each state lasting 2 or 3 frames. Every frame is the
true state's mean vector plus small noise. The testbench decodes the
utterance, backtracks from `best_exit_state` through the predecessor words,
and checks that the recovered state path is the true one, frame for frame.

The block testbenches are run the same way with their own `tb_*.sv` file.
`tb_fp32_ops` checks the adder and multiplier bit for bit on 20,000 random
operand pairs, including cancellations and rounding ties.
`tb_decoder_ctrl`, `tb_scaler`, `tb_between_hmm_max` and `tb_hmm_block` use
smaller sizes.

## Changing the size

`viterbi_decoder` takes `NM` (models), `SPM` (states per model) and `DIM`
(feature length). State, model and address widths follow from these.

* Frame time scales as DIM·NM·SPM.
* Word widths and the cost format (`COST_W`, `COST_FRAC`, `TP_W`, `PSI_AW`)
  are in `viterbi_pkg`.
