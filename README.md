# Viterbi decoder for a discrete-HMM speech recogniser

Recognising speech with hidden Markov models comes down to Viterbi decoding.
For every 10 ms frame of speech, every state of every model asks one question:
what is the most likely path that ends here, given everything heard so far?
The answer for state *j* at frame *t* depends only on the answers at frame
*t-1*. So all states can be worked on at once, and the work is nothing but
additions and comparisons.

This RTL is the decoder of such a recogniser. A host PC quantises the speech
into one 8-bit symbol per frame and sends the symbols in. For each frame the
decoder works out the best-path score of all 147 states: 49 monophone models
of 3 states each. It writes each state's best predecessor to external memory.
Once the utterance has ended, the host follows those predecessors backwards to
recover the most likely sequence of models. Deltas, the working scores, never
leave the chip.

The organisation follows a published FPGA implementation: an HMM Block of
processing nodes, a Scaler, a between-HMM block and a "Delta Delay" frame
store, handling one HMM at a time. Widths and table sizes are taken from that
implementation. Its internal timing, encodings and interfaces were not
published, so they are this design's own. Each file's header comment says
which parts are which.

## The recursion, in costs

Probabilities are stored as **costs**: an unsigned 15-bit value standing for a
scaled negative logarithm. Multiplying probabilities becomes adding costs, and
"most likely" becomes "smallest". For state *j* of a model, at frame *t*, with
observation symbol *O_t*:

```
delta_t(j) = min over i of [ delta_{t-1}(i) + a_ij ]  +  b_j(O_t)
psi_t(j)   = the i that gave the minimum
```

- `a_ij` is the cost of the transition from state *i* to state *j* of the same
  model. Every model has a full 3x3 matrix.
- `b_j(o)` is a 256-entry table per state, indexed by the 8-bit symbol.
- State 0 is the entry state. It also has a fourth candidate: the
  **between-HMM cost**, which means arriving from the exit of whichever model
  ended best in the previous frame. There is no language model, so this one
  value is shared by every model:

```
between_t = min over models m of [ delta_t(m, state 2) + exit_cost(m) ]
```

The predecessor code `psi` is 2 bits. Values 0, 1 and 2 name a state of the
same model. Value 3 (`PSI_ENTRY`) means "entered from another model". Each
frame the decoder also reports which model gave `between_t`, so the host can
follow the path across model boundaries.

**Probability zero.** The all-ones cost, `LOG_ZERO` = 0x7FFF, means
probability zero. A sum with a `LOG_ZERO` operand is treated as impossible,
never as a large number. This keeps forbidden transitions (for example,
backwards in a left-to-right model) forbidden however the scores are scaled.
When two candidates cost the same, the lowest predecessor index wins.

## Scaling: why 15 bits are enough

Costs only ever grow from one frame to the next, so they would soon overflow
any fixed width. The **scaler** sits between the nodes and the frame store and
does two things:

1. **Subtracts an offset.** Every result of frame *t* has the offset *c_t*
   taken off. *c_t* is the smallest scaled delta of frame *t-1*, and it is 0 in
   the first frame.
   - Nothing goes negative. Costs are never negative, so every delta of frame
     *t* is at least the smallest delta it was built from, which is at least
     *c_t*. The same holds for the between-HMM candidate.
   - The best state stays near zero. Each frame, the best scaled delta is at
     most one transition cost plus one observation cost.
2. **Discards underflows.** A result still at or above `LOG_ZERO` after the
   subtraction is a path whose probability has underflowed. It becomes
   `LOG_ZERO`, and it is flagged on `psi_discard` so the host knows its
   predecessor code means nothing. An impossible input (`ACC_INF`) is handled
   the same way.

Inside a node, a delta is held with 17 bits (`ACC_W`). The largest possible sum
is 3 x 0x7FFE, which still fits below the 17-bit all-ones code `ACC_INF`.
The scaler narrows it back to 15 bits.

All scores of an utterance are relative to the sum of the offsets applied so
far. That is harmless for decoding. To recover an absolute path cost, add the
offsets back: the end-to-end testbench does this, reading the scaler's offset
register hierarchically.

If every path dies (all deltas become `LOG_ZERO`), the offset returns to 0 and
the utterance produces nothing but zeros until the next `start`.

## One HMM per cycle: the datapath

```
             host symbol O_t
                  |
  decoder_ctrl ---+--> issue HMM m (one per cycle, m = 0..48)
      |                  |               |                   |
      |         off-chip RAM word   trans_mem          delta_delay (read bank)
      |         {m, O_t}: b_0..b_2  3x3 a_ij of m      delta_{t-1}(m, 0..2), between
      |                  \               |                  /
      |                   `------ all arrive RAM_LAT cycles later
      |                                  |
      |                          hmm_block: 3 x viterbi_node      (2 cycles)
      |                                  |
      |                               scaler                      (1 cycle)
      |                     /            |             \
      |      delta_delay (write bank)  between_hmm   predecessor record -> off-chip RAM
      |
      +--> after the pipeline drains: frame_end
             scaler offset <- frame minimum
             delta_delay banks swap, between value taken
             frame report: best exit model and its cost
```

- **`decoder_ctrl`** takes an observation on a valid/ready handshake. It
  issues the 49 models on consecutive cycles and waits `DRAIN = RAM_LAT + 3`
  cycles for the pipeline to empty. It then pulses `frame_end`. A `start`
  pulse between frames begins a new utterance.
- **Read alignment.** Three reads start together for each model: the off-chip
  observation costs, the transition matrix, and the previous deltas. Each of
  them takes `RAM_LAT` cycles. `trans_mem` and `delta_delay` add register
  stages to match the external memory, so all operands reach the nodes in the
  same cycle. This is the synchronisation job of the "Delta Delay".
- **`hmm_block`** holds three `viterbi_node`s, one per state. They share the
  model's previous deltas. Only node 0 has the entry candidate
  (`ENTRY = 1`).
- **`delta_delay`** has two banks. Frame *t* is written into one bank while
  frame *t-1* is read from the other. After `start`, and until the first
  `frame_end`, it reads `LOG_ZERO` for every delta and 0 for the between
  value. The first frame therefore starts every model in state 0, with
  `delta_0 = b_0(O_0)`; the other states have probability zero.
- **`between_hmm`** keeps a running minimum of exit delta + exit cost as the
  models go by. It holds the exit costs in a 49-entry table (distributed RAM,
  read asynchronously). `delta_delay` picks up the result at `frame_end`.

A frame must finish before the next can start, because the between value of
frame *t* is needed by every entry state of frame *t+1*. With the defaults,
`frame_done` comes 55 cycles after the cycle in which the observation was
accepted, and the next observation can be taken one cycle later. That makes
**56 cycles per observation** (`NUM_HMM + RAM_LAT + 5`).

## Interfaces (`hmm_decoder_top`)

| Group | Signals | Use |
|---|---|---|
| Model loading | `cfg_we, cfg_sel, cfg_hmm, cfg_from, cfg_to, cfg_data` | `cfg_sel = 0` writes `a[cfg_hmm][cfg_from -> cfg_to]`; `cfg_sel = 1` writes `exit_cost[cfg_hmm]`. Load before decoding; the tables are not reset. |
| Host | `start`, `obs_valid/obs_ready/obs_data[7:0]` | `start` is honoured only between frames. An observation transfers when valid and ready are both high. Once offered, it must be held until accepted (an assertion checks this). |
| Observation costs (external RAM read) | `obs_ram_re`, `obs_ram_addr[13:0] = {hmm, symbol}`, `obs_ram_rdata` (3 x 15 bits) | One word per (model, symbol) holds the three states' costs. Data must be returned exactly `RAM_LAT` cycles after `obs_ram_re`. |
| Predecessor records (external RAM write) | `psi_we`, `psi_addr[19:0]`, `psi_wdata` (3 x 2 bits), `psi_discard[2:0]` | One record per model per frame. The address starts at 0 after `start`, so record (t, m) is at `t*49 + m`. |
| Frame report | `frame_done`, `frame_idx`, `best_exit_hmm`, `best_exit_cost` | Valid in the cycle `frame_done` is high. `best_exit_cost` = `LOG_ZERO` means no model could be left in that frame. |

**Backtracking on the host.**
1. Start at the last frame, in state 2 of `best_exit_hmm`.
2. Read the record for (t, m) and take the state's code.
3. Codes 0 to 2 move to that state of the same model at frame *t-1*.
4. Code 3 moves to state 2 of the model that frame *t-1* reported as
   `best_exit_hmm`.
5. Repeat until frame 0, where the path must be in state 0.

The sequence of models visited, in reverse, is the recognised phone string.

## Table sizes

| Table | Contents | Size | Where |
|---|---|---|---|
| Observation costs | 147 states x 256 symbols x 15 bits | 564,480 bits (about 70 KB) | external RAM |
| Transition costs | 49 x 3 x 3 x 15 bits | 6,615 bits (827 bytes) | `trans_mem`, block RAM |
| Exit costs | 49 x 15 bits | 735 bits | `between_hmm`, distributed RAM |
| Deltas | 2 banks x 49 x 3 x 15 bits | 4,410 bits | `delta_delay` |

At 100 frames per second, the 56 cycles per observation leave a great deal of
headroom. Any clock above about 6 kHz keeps up with live speech. The decoder is
really meant for transcribing recorded speech much faster than real time.

## Where this RTL departs from the original implementation

- **Pipeline.** The original one-HMM-at-a-time design used narrower
  arithmetic. It had a 117-cycle pipeline and a predicted 2.5 us per
  observation at 86.4 MHz, about 216 cycles. Here the arithmetic is full width:
  two node stages plus one scaler stage, 56 cycles per observation. The cycle
  count is not meant to match the original.
- **Scaling rule.** The original says only that deltas are scaled to reduce
  precision and that underflowed values are discarded. Subtracting the previous
  frame's minimum is this design's choice.
- **Encodings and protocols.** The following are all choices of this design:
  - the cost encoding and `LOG_ZERO`
  - the 2-bit predecessor code and the per-frame best-exit report
  - the valid/ready host handshake (the board's 8-bit ports only say
    "handshaking")
  - the external RAM word layout, address map and latency
- **Entry state.** The full 3x3 transition matrix per model is inferred from
  the transition table size. Treating state 0 as the only entry state and
  state 2 as the only exit state is an assumption.
- **Not built.** Two earlier, wider versions process 7 models, or all 49, in
  parallel. They are not included. So are the quantiser, the backtracking
  software and the board's RAM, which belong to the host and the board. The
  testbench models the RAM.

## Files

| File | Contents |
|---|---|
| `rtl/viterbi_pkg.sv` | sizes (`NUM_HMM`, `NUM_STATES`, `COST_W`, ...), cost types, `LOG_ZERO`, `psi_t` |
| `rtl/viterbi_node.sv` | one state: add-compare-select, then add the observation cost |
| `rtl/hmm_block.sv` | three nodes = one model per cycle |
| `rtl/trans_mem.sv` | transition costs, one 3x3 matrix per read |
| `rtl/scaler.sv` | offset subtraction and underflow discard |
| `rtl/between_hmm.sv` | exit-cost table and best-exit search |
| `rtl/delta_delay.sv` | two-bank delta store, initial values, read alignment |
| `rtl/decoder_ctrl.sv` | observation handshake and frame sequencing |
| `rtl/hmm_decoder_top.sv` | the decoder |
| `rtl/pipe_delay.sv` | register chain used for alignment |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Verification

Each testbench compares its module against a reference computed in the
testbench. It prints `TB_RESULT checks=N failures=M`, and a watchdog ends it if
it hangs.

`hmm_decoder_top_tb` runs the decoder at its default size. It generates a
random model (mostly left-to-right transitions, with some impossible and some
very unlikely observation costs) and loads it. It plays the host and the
external RAM, and decodes two utterances: 300 frames (a 3-second sentence)
and 25 frames. For every frame it checks:

- all 147 predecessor codes and discard flags, and the record addresses
- the best exit model and cost
- the 55-cycle frame time

Finally it backtracks the best path from the records and checks that the
path's cost, recomputed from the model, equals the decoder's final score.

The test also counts how often each mechanism occurred, and fails if any never
happened. The mechanisms are:

- utterance start
- entry from another model
- self-loop
- forward move
- scaler discard
- non-zero scaling offset
- host held off while the decoder is busy

To simulate with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/viterbi_pkg.sv tb/hmm_decoder_top_tb.sv --top-module hmm_decoder_top_tb
./obj_dir/Vhmm_decoder_top_tb
```

Any other testbench runs the same way: replace the file and top-module names.
The full-size run takes well under a second.

## Changing the design

- **Model size.** `NUM_HMM` and `COST_W` in `viterbi_pkg` set the model count
  and the cost width. `NUM_STATES` is tied to 3 by the 2-bit predecessor code
  and the `PSI_*` names.
- **External RAM latency.** Set `RAM_LAT` on `hmm_decoder_top`. The drain time
  and the alignment stages follow from it.
- **Record memory size.** Set `PSI_AW` and `FRAME_W`. The defaults hold
  1,048,576 records, about 21,000 frames or 3.5 minutes of speech.
