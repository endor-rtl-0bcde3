# Endor-NMP: near-memory hardware for nearly-decode-only LLM reasoning

Tree-search reasoning with a large language model (beam search or MCTS guided
by a process reward model, PRM) grows a tree of *actions*: each action is a
short piece of generated text, and a new action continues the path from the
root through its ancestors. Run naively, every new action repeats a prefill
over the whole path. Endor keeps the key/value (KV) cache of every action that
has been generated, so a new action only has to *decode* on top of the KV
caches of its ancestors. The workload then becomes almost pure decode: thin
matrix-vector products that are limited by memory bandwidth, not compute.
That is the work near-memory processing (NMP) on DRAM DIMMs does well.

Two further ideas make the scheme pay:

* **Score-aware KV caching.** The KV caches of a whole tree do not fit next to
  the compute, so a cache management unit (CMU) decides which action caches
  stay in the NMP memory and which go to off-chip memory. Each action carries
  a score

      score = reward + #reuse / #total

  where `reward` is the PRM's reward for the action and `#reuse/#total` is how
  often the action has been on a path that was looked up. The resident action
  with the lowest score is evicted first.
* **Action prediction.** The LLM does not wait for the PRM to pick the next
  action. It carries on with the candidate whose tokens had the highest summed
  log-likelihood. When the PRM later picks another candidate, the CMU saves
  the wrongly continued action to off-chip memory and loads the right one.

This repository holds synthesizable SystemVerilog for one Endor-NMP DIMM. It
covers the rank-level and bank-level compute, the all-reduce, the shared
buffer, the CMU and the predictor. It also has a self-checking testbench for
every module.

## Hierarchy

```
endor_top                      one DIMM
 ├─ shared_buffer              256 KB, 16384 lines x 128 bit, two ports
 ├─ rank_nmp  x NUM_RANKS (2)  buffer-chip logic of one DRAM rank
 │   ├─ act_buffer             512 lines x 8 elements
 │   ├─ sfu                    softmax / SiLU  (exp_unit, seq_div)
 │   └─ bank_nmp x NUM_BANKS (16)  8 MACs + adder tree + accumulator
 ├─ allreduce                  sums the ranks' partial lines (+ DIMM-Link peer)
 ├─ action_predictor           log-likelihood argmax, hit/miss against the PRM
 └─ cmu                        cache management unit
     ├─ tree_table             path of every action from the root
     ├─ info_table             resident tag + slot of every action
     ├─ score_table            reward, #reuse, #total, score
     ├─ priority_queue         resident actions sorted by score
     └─ cmu_ctrl               off-chip <-> shared buffer DMA (sync_fifo x2)
```

`endor_pkg` holds the shared constants, types and command structs. The
hardware specification sets these sizes:

* 2 ranks, each with 4 bank groups x 4 banks.
* 256 MACs per DIMM: 2 x 16 x 8 lanes.
* Two softmax units, one SFU per rank.
* A 256 KB buffer.
* A 1 GHz clock.

Anything else is this design's own choice, noted where it is made.

Outside the RTL, with their signals brought out as top-level ports:

* the central processor (host GPU);
* the DRAM banks (`bk_rd_*`: one line of 8 elements per bank per cycle);
* off-chip memory (`om_*`);
* the DIMM-Link controller (`link_*` reduce stream, and the `hs_*` port into
  the shared buffer).

## Cache management unit

This is the part with the most state and the least obvious behaviour.

### Tables

| table | per action ID (128) | written by |
|---|---|---|
| tree table | path root..action, up to 16 IDs, and its depth | NEW (copy parent's path, append own ID) |
| info table | tag (resident Y/N), slot number | NEW, eviction, load, BACKUP |
| score table | reward, #reuse; plus one global #total | REWARD, LOOKUP |
| priority queue | (ID, score) of every resident action, ascending | every score change of a resident action |

Slots are fixed regions of the shared buffer. There are `NUM_SLOTS` = 16
slots of `SLOT_LINES` = 1024 lines (16 KB) each. The address of slot `s` is
`s * SLOT_LINES`. In off-chip memory, action `id` is stored at line
`id * SLOT_LINES`.

### Commands

Commands use a valid/ready handshake. `op_done` pulses once a command has
finished.

* **NEW id, parent (or root).**
  1. Copy the parent's path into the tree table and append `id`.
  2. Reset the action's reward and reuse count.
  3. Give the action a slot for the KV cache that the NMP is about to write.
     Take a free slot if there is one. Otherwise evict the priority-queue
     head, which is written back to off-chip memory.
  4. Report the slot on `nmp_addr_*`.
* **REWARD id, r.**
  1. Store the reward and recompute the score with the formula above. The ratio uses a
     24-bit sequential divider and takes about 24 cycles.
  2. If the action is resident, remove it from the priority queue and insert
     it again at its new place.
* **LOOKUP id.**
  1. Increment `#total`.
  2. Walk the path from the root. For each action on it, increment `#reuse`
     and rescore the action.
  3. If the action is resident (**hit**), report its address.
  4. If it is not (**miss**): take a free slot, or evict the lowest score
     (**eviction**). Load the block from off-chip memory, then report its
     address.
  5. While the walk runs, every action already on the path is held out of
     the priority queue (*pinned*). A miss further down the path therefore
     cannot evict an ancestor that was just reported. At the end of the walk
     the whole path goes back into the queue with its new scores.
* **BACKUP id, alt.** This is the misprediction path.
  1. Write action `id` back to off-chip memory, free its slot and take it out
     of the queue.
  2. Run LOOKUP on `alt`.

`endor_top` turns a predictor miss into a BACKUP on its own. While that
BACKUP runs, host commands wait.

Counters `n_hit`, `n_miss`, `n_evict` and `n_backup` record the hit rate and
the replacement activity. `n_backup` counts BACKUP commands. If the wrongly
predicted action has already been evicted, nothing is written back.

### Number format of the score

Rewards and scores are unsigned Q8.8 (`score_t`). The ratio
`#reuse/#total` is computed as `(#reuse << 8) / #total`, which gives an
8-bit fraction. If `#total` is 0, the ratio is 0. The sum saturates at the
maximum value.

### Replacement order

The priority queue is a sorted shift register of `NUM_SLOTS` entries:

* **Insert:** one cycle. A new entry goes behind all entries with a score less
  than or equal to its own.
* **Remove:** one cycle. The gap closes.
* **Head:** always the entry with the lowest score. It is the victim.

### Known limits

* A whole path must fit into the slots at once, because it is pinned during
  the walk. Keep `MAX_DEPTH <= NUM_SLOTS`, as the defaults do. An assertion
  (`a_victim`) flags a miss that finds neither a free slot nor an unpinned
  victim.
* A path longer than `MAX_DEPTH` drops its oldest ancestors.

## Mapping of a decode step

A decode step uses six rank commands (`rank_cmd_t`, one command at a time per
rank, `done` pulses at the end):

| op | does | where |
|---|---|---|
| GEMV | y = W·x, rows spread over the 16 bank-NMPs | banks |
| SOFTMAX | softmax(scale·x) over `len` elements | SFU |
| SILU | x·sigmoid(x) | SFU |
| LOAD / STORE | move lines between the shared buffer and the act buffer | rank |
| ALLREDUCE | send partial lines to the all-reduce unit, write back the sums | DIMM |

**GEMV.** In pass `p`, bank `b` computes row `p*16 + b`. Each cycle one act-buffer line of x
(8 elements) is broadcast to all banks. Each bank reads the matching 8 weights
from bank line `wbase + p*len + i`. After the pass, the 16 results are
saturated to Q8.8 and written to the act buffer.

A GEMV command takes `passes * (len + 1 + 16/8) + 2` cycles.

**Attention.** The heads are split over the ranks. Each step is:

1. Load the head's K and V slices from the CMU slot addresses.
2. GEMV for S = K·q.
3. SOFTMAX with `scale` = 1/sqrt(d).
4. GEMV for PV.

**FFN.** Each rank holds a slice of the weights. Each step is:

1. GEMV.
2. SILU.
3. GEMV.
4. ALLREDUCE.

The all-reduce unit waits until every rank, and the DIMM-Link peer when
`link_en` is set, offers a line. It adds the lines element by element with
saturation and returns the sum to all of them one cycle later.

The central processor issues the command sequence. There is no on-chip
sequencer for whole layers.

## Number formats

* **Activations, weights and KV values:** signed Q8.8 (`data_t`).
* **MAC products:** accumulate into a 40-bit Q16.16 `acc_t` with no overflow.
  Results are saturated back to Q8.8.
* **exp:** `exp_unit` computes e^x for x ≤ 0 as 2^(x·log2 e). It shifts for
  the integer part and uses a quadratic for the fraction. The output is
  Q1.16 and the error is below 0.6 %.
* **Softmax normalisation:** one reciprocal per vector from `seq_div`.
* **SiLU:** one division per element.

## Action predictor

The host streams `(candidate, log-probability)` pairs as tokens are decoded.
The predictor sums them per candidate (`CANDS` = 4, 24-bit sums).

* On `predict`, it outputs the argmax candidate, which has action ID
  `pred_base_id + cand`.
* When the PRM's choice arrives on `prm_valid`/`prm_sel`, the predictor
  flags a hit or a miss, with `wrong_id` and `right_id`.

Whether a discarded candidate is decoded to the end or stopped early is the
host's decision.

## Where this RTL departs from the source design

* **Attention split.** The published dataflow splits the query per bank into
  partial tokens, reduces the partial scores and scatters the probabilities
  back. Here each bank computes whole rows with x broadcast. This needs no
  reduction inside a rank, but gives a different bank data layout.
* **Rank count.** The block diagram draws four rank-NMPs and a four-multiplier
  tree per bank. The specification table (2 ranks, 256 MACs) was followed
  instead, which gives 8 multipliers per bank.
* **DRAM timing.** DDR4-3200 timing is not modelled. A bank read returns one
  line one cycle later.
* **Early termination.** The source design decodes a discarded action fully
  only when it is likely to be reused, but gives no criterion. That decision
  is left to the host.
* **Write-back.** Evicted blocks are always written back; there is no dirty
  bit.
* **Rescoring.** Only actions touched by a command are rescored. The other
  entries keep an older `#total` in their score until they are touched.
* **Slot storage.** KV slots are regions of the 256 KB shared buffer. The
  source design keeps the action caches in the DIMM's DRAM (gigabytes), so
  the slot count and size here are a small-scale stand-in. A full 7B-model
  action cache (about 512 KB per token) does not fit in a slot.
* **Number formats.** The source design gives no number formats. Q8.8 is this
  design's choice.

## Simulating

Every module has a testbench `tb/tb_<module>.sv`. Each one:

* is self-checking and compares against values worked out in the testbench;
* prints `TB_RESULT checks=N failures=M` at the end;
* has a watchdog.

Run one with plain Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/endor_pkg.sv tb/tb_cmu.sv --top-module tb_cmu
./obj_dir/Vtb_cmu +verilator+rand+reset+2
```

`tb_endor_top` runs the whole DIMM at default parameters. It uses
`tb/offchip_mem_model.sv`, a behavioural off-chip memory with random ready
and 2–6 cycles of latency. Its test:

1. Runs rank GEMVs on both ranks.
2. Runs softmax and SiLU.
3. Runs all-reduces, with and without the DIMM-Link peer.
4. Creates a tree of actions and fills all slots.
5. Forces evictions.
6. Makes hits and misses.
7. Makes one predictor hit and one predictor miss. The miss triggers an
   automatic BACKUP.

It counts every mechanism and fails if any never happened. `tb_cmu` uses 4
slots of 4 lines to follow a hand-worked replacement scenario.

`tb_reasoning_tree` runs a whole search tree through `endor_top` at default
parameters. The tree has 70 actions, the average size for a grade-school
math problem:

* Each step looks up the parent's path and creates 4 candidates, each with a
  reward.
* The predictor guesses a candidate, and the reward model agrees about 70 %
  of the time.
* Deep paths restart from a shallow action, and random actions are revisited
  at the end.

After every lookup it checks two things:

* the reported addresses match the path that the testbench keeps itself;
* every slot still holds its action's signature after any number of trips to
  off-chip memory.

Over five seeds the cache hit rate was between 0.65 and 0.82. The run takes
about 200 000–280 000 cycles.
