# A 60,000-word continuous speech recognizer core in SystemVerilog

This is the RTL for a hardware speech recognizer. It decodes continuous speech against a
60,000-word vocabulary in real time, with an on-chip budget of a few megabits.
Recognition here is a hidden Markov model (HMM) search, and it has two halves:

* **Acoustic scoring (GMM).** Every 10 ms frame of speech is a vector of 25 features. The
  acoustic model has 1987 tied HMM states. Each state is a mixture of 16 diagonal Gaussians. For
  each frame the log likelihood of every state is needed.
* **Search (Viterbi).** A beam search runs over a lexicon tree, with n-gram language model
  transitions between words. It keeps only the active nodes (about 3000 per frame) and writes
  word-end records to a lattice. The host back-tracks that lattice to get the sentence.

The design is organised around one fact: a 60k-word model is far too big to keep on chip. The
model lives in external memory, and the hardware must touch that memory as little as possible.
It does so in two ways:

* **The GMM side** scores all 1987 states for a whole block of up to 20 frames at once. Each
  parameter is then read once per block instead of once per frame. The parameters are also
  streamed in run-length-coded form.
* **The Viterbi side** puts caches in front of its two heaviest tables: the n-gram transitions
  and the map of which lexicon nodes are active. It prunes with an adaptive threshold instead of
  sorting. It expands the full language model list only on every 7th frame.

The top level is `hmm3_top`. Source files are in `rtl/` and self-checking testbenches in `tb/`.

## Data flow

```
 features ──► mfcc_buffer ─┐
 compressed    gmm_input   │   20 frame-parallel    gmm_result_buffer
 parameters ─► _buffer ──► rle_decoder ─► gmm_param_buffer ─► gmm_pe x20 ──► (2 banks, 1987 x 20)
                                                                                   │
                        global_sequencer (elastic pipeline between the two cores)  │
                                                                                   ▼
 external memory ◄──► viterbi_core: node fetcher ─► 8 x viterbi_path ─► shared updater
  (dictionary, LM,       │ ngram_cache (2-way)      node_map_cache  active_node_workspace x2
   node map)             │ threshold_calc           trellis_writer ──► lattice to host
```

## GMM core (`gmm_core`)

**Parameter compression.** A state has 16 mixtures. Each mixture has one 32-bit constant and 25
(mean, precision) pairs, so a state is 832 32-bit words. Most neighbouring words share their top
16 bits. The stream therefore has three kinds of 18-bit symbol:

* `RUN` sets a new shared top half.
* `LIT` gives a top half for the next word only.
* `LOW` gives the low half and emits one word.

`rle_decoder` turns one symbol per clock back into words.

**Buffering.** `gmm_input_buffer` is a ping-pong buffer that takes the stream a state at a time.
The decoder fills one bank of `gmm_param_buffer` while the processors read the other bank. This
is how decoding the next state overlaps computing the current one.

**Processing elements.** Each `gmm_pe` handles one frame of the block, so 20 work in parallel.
Per mixture it accumulates `C - Σ (x-μ)²·prec >> 16` over the 25 dimensions and keeps the
maximum over mixtures (max approximation of the log-sum). **Early termination:** once a partial
sum is already below the best finished mixture, that element stops for the rest of the mixture.
When every active element has stopped, the core skips to the next mixture (`mix_skip`).

**Timing.** Decoding takes about one clock per symbol, around 870 symbols per state. Computing a
state takes about 16 × 28 clocks and hides under the decoding. A block of 1987 states therefore
takes about 1.73 M clocks, which is about 86 k clocks per frame for 20-frame blocks. Rows go to
`gmm_result_buffer`, a double buffer of 1987 × 20 scores (24 bits each) per bank.

## Elastic pipeline (`global_sequencer`)

The GMM core fills one result bank while the Viterbi core searches the other bank frame by frame.
A bank goes back to the GMM core only when all of its frames have been searched. Either core can
therefore run one block ahead, and a frame with a heavy search borrows time from lighter frames.
The block size (`lookahead`) is set per run, from 1 to 20.

## Viterbi core (`viterbi_core`): the hard part

### One frame

1. **Fetch.** The node fetcher walks the current workspace. For each active node it does three
   things:
   - reads the node's dictionary record from external memory: HMM state, self-loop and next-node
     log probabilities, word-end flag and word ID;
   - adds that state's GMM score for this frame;
   - queues *jobs*.
2. **Word-internal jobs.** These are the self loop and the step to the next node.
   **Modified unigram:** the next-node probability stored in the dictionary already includes the
   change in the unigram look-ahead of the next node. A word-internal step is therefore one
   addition, with no language model lookup.
3. **Word-end jobs.** At a word end the fetcher does three things:
   - writes a lattice record through `trellis_writer`, which gives the record its index;
   - reads the word's n-gram list header;
   - queues one cross-word job per list entry.

   **Two-stage LM search:** on a *detailed* frame (every 7th frame) up to 1500 entries are taken.
   Other frames take only the first 100. Lists are stored best first.
   **Simplified trigram:** the list for the pair (best predecessor word, word) is used. If that
   pair has no list, the word's bigram list is used.
4. **Paths.** Eight `viterbi_path` units take jobs. Each path runs these stages:
   - looks up the transition in `ngram_cache`, or reads it from external memory on a miss;
   - adds the score;
   - compares it with the threshold and drops it if below (this is the pruning);
   - hands the result to the shared updater.

   A path waiting for external memory does not hold up the other seven.
5. **Updater.** The updater is the single owner of `node_map_cache` and the next-frame
   workspace, and it needs two clocks per transition. It looks up the destination node:
   - if the node is active and the new score is higher, it overwrites it;
   - if the node is not active, it creates it at the end of the workspace;
   - if the workspace is full, it counts an **overflow** and drops the node.

   Map entries are written through to external memory. A write queue has priority on the
   external port. On a map cache miss the external copy is read.

### Node map details

`node_map_cache` is direct-mapped. It has separate halves for word-start nodes and for other
nodes, and 2 × 8192 lines of 29 bits (about 475 kbit).

Entries are never cleared between frames. Each entry carries an 8-bit frame tag. The updater also
checks that the workspace slot it points to really holds that node and lies inside this frame's
count. A stale entry therefore costs at most a miss, never a wrong score.

`ngram_cache` is two-way with 4096 sets. A fill goes to way 0, and the old way-0 entry moves to
way 1. Both caches clear themselves by sweeping one line per clock after reset or `flush`. A lookup
during a sweep simply misses.

### Dynamic beam (`threshold_calc`)

There is no sort. After each frame the block divides the score sum of the new frame by the node
count to get the average score (a restoring divider, about 50 clocks). It then updates the
threshold:

* first frame: `thr = avg − margin`
* later frames: `thr += (avg − avg_prev) + (count − 3000)`

The threshold therefore follows the score level and pulls the node count toward the 3000 target.

## Interfaces of `hmm3_top`

| Ports | Use |
|---|---|
| `start`, `total_frames`, `lookahead`, `done`, `busy` | Run one utterance |
| `cfg_init_node`, `cfg_thr_init`, `cfg_margin` | Start node and starting threshold |
| `cfg_trigram` | Use the simplified trigram |
| `cfg_top_n`, `cfg_detail_n`, `cfg_detail_cycle` | Two-stage search settings (0 = 100 / 1500 / 7) |
| `feat_*` | Features, valid/ready, 25 × 16-bit words per frame, in frame order |
| `sym_*` | Compressed parameters, valid/ready, states 0..1986 in order, once per block |
| `ext_req_*`, `ext_rsp_*` | External memory: one request per clock; responses carry the requester ID and may take any latency (the testbench returns them in order) |
| `trl_*` | Lattice records: word, score, predecessor record index, frame |
| `thr`, `active_count`, `events` | Monitoring; `events` pulses for each mechanism |

External request kinds are dictionary record, word list header, trigram list header, n-gram
entry, map read and map write (`ext_kind_e` in `hmm_pkg`). Record layouts are the packed
structs in `hmm_pkg.sv`.

## Default sizes

| Parameter | Default | Meaning |
|---|---|---|
| `FRAMES` | 20 | Look-ahead frames per GMM block |
| `STATES` | 1987 | Tied HMM states |
| `MIX`, `DIMS` | 16, 25 | Mixtures per state, feature dimensions |
| `PATHS` | 8 | Parallel transition paths |
| `DEPTH` | 8192 | Workspace entries per frame (target beam 3000) |
| `NG_SETS` | 4096 | n-gram cache sets (2 ways) |
| `MAP_IDX_W` | 13 | Node map cache index bits per half |
| `TARGET` | 3000 | Node count the threshold aims at |
| `TOP_N`, `DETAIL_N`, `DETAIL_CYCLE` | 100, 1500, 7 | Two-stage LM search |

Field widths allow the following:

* 20-bit lexicon node IDs;
* 16-bit word IDs (a 60,001-word vocabulary fits);
* 24-bit transition IDs (the 8.4 M trigram transitions fit);
* 32-bit scores.

## What follows the published design and what does not

The following follow the published design:

* the split into a GMM core and a Viterbi core with an elastic pipeline;
* 20-frame blocks over all 1987 states;
* run-length-coded parameters with double input and parameter buffers;
* 20 frame-parallel max-mixture processors with early termination;
* 8 Viterbi paths;
* the 2-way n-gram cache with its fill rule;
* the split node map;
* the dynamic threshold;
* the modified unigram, the two-stage search (7 / 100 / 1500) and the simplified trigram.

The following are this design's own choices:

* all record formats, the symbol encoding details and the external port protocol;
* the shared two-clock updater;
* frame tags in the node map;
* the cache clear sweep;
* adding the GMM score when a node is expanded;
* the fixed-point scaling (`>>16` in the Gaussian term, 24-bit GMM results, LM scores shifted left
  by 4);
* the exact threshold update gain;
* the workspace depth of 8192.

The following are not included, and their traffic arrives on the ports:

* feature extraction (MFCC);
* the level-2 cache and SDRAM that sit behind the external port;
* the host's back-track;
* PLL and pads.

The published first-generation design used up to 50 look-ahead frames. This core is built for 20;
`FRAMES` is a parameter.

## How far it has been checked

Each block has a testbench in `tb/` that compares it with a model written independently inside
the testbench. Each testbench prints `TB_RESULT checks=… failures=…`.

* **GMM:** bit-exact against a reference computation of the same fixed-point formula
  (`tb_model_pkg.sv`), through compression, decoding and early termination.
* **Caches, buffers, threshold and sequencer:** against shadow models, including latency.
* **`tb_hmm3_top`** runs the whole core end to end at reduced sizes: 8 states, a 64-entry
  workspace, small caches, 30 frames in 10-frame blocks. It uses a behavioural external memory
  (`tb_ext_mem.sv`) with 8-clock latency and back-pressure, and a synthetic lexicon and language
  model. It checks every GMM row, the numbering and ordering of lattice records, and the
  workspace bound. It requires each of these mechanisms to happen at least once:
  - mixture skip;
  - GMM/Viterbi overlap, and Viterbi waiting for GMM;
  - n-gram hit and miss, map hit and miss;
  - node creation, overwrite, pruning and overflow;
  - detailed frame and trigram;
  - a miss hidden behind another path;
  - external stall.
* **`tb_hmm3_top_full`** runs the top with every parameter at its default: 1987 states, 24 frames
  in a 20-frame and a 4-frame block. It checks every GMM row against the reference. At this size
  the few frames never reach pruning or overflow, so those are only reported.

**Limitation:** the Viterbi search is checked by its mechanisms and by the structure of the
lattice, not against a software decoder on real speech. Recognition accuracy has not been
measured. The timing figures above come from simulation clock counts, not from a synthesized
netlist.

## Simulating

With Verilator 5 (the two testbenches below are examples):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/hmm_pkg.sv tb/tb_model_pkg.sv tb/tb_gmm_core.sv --top-module tb_gmm_core -o sim
./obj_dir/sim

verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/hmm_pkg.sv tb/tb_model_pkg.sv tb/tb_hmm3_top.sv --top-module tb_hmm3_top -o sim
```

Replace the testbench name for any other block. Testbench names are `tb_<module>`. The
`viterbi_core` and `viterbi_path` blocks are exercised through `tb_hmm3_top`.

`tb_model_pkg.sv` holds the synthetic acoustic model and the compressor. It also holds the
reference GMM and the synthetic dictionary and language model that `tb_ext_mem` serves. Change
these functions to try other data.
