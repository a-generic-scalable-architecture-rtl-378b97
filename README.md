# Speech recognition accelerator: senone scoring and N-best Viterbi search

A large-vocabulary speech recogniser spends most of its time in two places:

- scoring every Gaussian-mixture state ("senone") of the acoustic model against each 10 ms feature vector;
- the Viterbi beam search over the HMMs of the active words.

Both stream large models from memory. This design moves both into one chip that sits next to a host CPU on a quad SPI link. The CPU keeps the front end (feature extraction) and the second decode pass. It sends feature vectors two frames at a time, and it reads back a **word lattice**: every word the first pass thinks may have ended, with its predecessor, score and timing. The CPU then rescores that lattice with a trigram model.

The design point is:

- 8000 senones of 8 mixtures each over 39-dimensional features;
- a 64K-word bigram language model;
- a 100 MHz clock.

The models live in NOR flash, which reads random lines quickly:

- the acoustic model in flash with 768-bit lines;
- the words, HMMs and bigrams in flash with 256-bit lines.

The list of active HMMs lives in DRAM.

Three ideas shape the architecture:

1. **Score everything, every frame.** With wide beams nearly all senones are active anyway. So the senone score unit (SSU) does not wait for the search to say which senones it needs. It scores the whole model, and runs fully in parallel with the search.
2. **Two frames per model read.** The SSU holds a block of two feature vectors and applies each mixture read from flash to both. This halves the acoustic-model bandwidth. The cost is two frames of latency, plus a score memory that holds two blocks.
3. **Word-dependent N-best search with a lattice output.** The Viterbi unit (VU) keeps up to N copies of a word's first HMM, one per distinct predecessor word. This lets the lattice hold alternatives that a 1-best search would drop.

```
 CPU ==quad SPI==> qspi_slave --> icu ---------------------------------------+
                                   | feature_buffer (2 banks x 2 frames)     |
                                   v                                         |
 acoustic flash (768b) <--> ssu: ssu_flash_ctrl -> distance_calc -> log_add  |
                                   v                                         |
                          senone_score_sram (2 blocks x 2 frames)            |
                                   v                                         |
 LM flash (256b) <--> vu: vu_flash_ctrl, word_activation, phone_score x3,    |
 DRAM        <--> dram_ctrl       adaptive_pruning x2                        |
                                   v                                         |
                          lattice_buffer (FIFO) --> READ_LATTICE ------------+
```

All scores are 32-bit signed logarithms in base 1.0003, where larger is better. `NEG_INF` (-2^30) marks an unreachable state. The saturating adder `sadd` keeps `NEG_INF` sticky, so an unreached state can never become reachable through arithmetic (`rtl/asr_pkg.sv`).

## Host protocol (`qspi_slave`, `icu`)

The link works as follows:

- Every command is one chip-select frame, with a 1-byte opcode followed by its payload.
- SPI mode 0; each byte is sent as two nibbles, high nibble first.
- The slave oversamples `sclk`, `cs_n` and the IO lines with the system clock through 2-flop synchronisers, so `sclk` must be at most clk/10. A 50 MHz SPI clock would need its own clock domain, which is not built.
- There is no acknowledgement: the CPU paces itself, using the status counters.

| Op | Command | Payload |
|---|---|---|
| 01 | SET_ACOUSTIC_MODEL | 4 B: flash line of the acoustic library |
| 02 | SET_LANGUAGE_MODEL | 4 B: flash line of the language model |
| 03 / 04 | SET_HMM_INIT_BEAM / SET_WORD_INIT_BEAM | 4 B: beam width T0 (positive, log units) |
| 05 / 06 | SET_MAXHMMPF / SET_MAXWPF | 4 B: target HMMs / words per frame |
| 07 | SET_MAX_N_BEST | 4 B: first-HMM copies per word |
| 08 / 09 / 0A | SET_FEATURE_LENGTH / SET_HMM_LENGTH / SET_MAX_MIXTURES | 4 B |
| 0B | LOAD_FEATURE_BLOCK | 2 x feature_length signed 16-bit features, frame 0 first |
| 0C | READ_LATTICE | 1 B: maximum entries. The response is a count byte, then 14 B per entry |
| 0D | SET_UTTERANCE_ID | 4 B: starts a new utterance |
| 0E | INIT | none: loads the log-add table from flash |
| 0F / 10 | PAUSE / RESUME | none |

Other payload details:

- Multi-byte values are big-endian.
- Each lattice entry is word(2), predecessor(2), score(4), start frame(2), last-HMM start frame(2), end frame(2), with the most significant byte first.

The ICU schedules the pipeline. The SSU scores block *n* while the VU decodes the two frames of block *n-1*. The SSU may not start block *n* until the VU has finished block *n-2*, because that block's scores occupy the bank the SSU will write.

A feature block that arrives while the previous one still waits for the SSU is dropped and counted in `stats.feature_overrun`. `stats` also counts blocks scored and frames decoded. These counters run across utterances, so the host takes differences.

## Senone scoring (`ssu`)

A senone's score for feature vector *y* is the log of a weighted sum of Gaussians:

    score = logadd over mixtures m of ( w_m + r_m - sum_n (y[n] - mu_m[n])^2 * p_m[n] )

The terms are:

- `w_m`: the log mixture weight;
- `r_m`: the log of the Gaussian's normalising reciprocal;
- `p_m[n]`: the precision.

The 1/2 and the change of logarithm base are folded into the precision when the model is built. The datapath therefore needs no multiply by a constant.

### Acoustic library format (`ssu_flash_ctrl`)

The library is a packed stream of 32-bit words, 24 words per 768-bit flash line, starting at the library offset:

```
<num_senones>
  <senone_id[31:16] | length[15:0]>          length = words in the rest of the record
    <mixture_length>                          = feature_length + 2
    <log weight> <log reciprocal>
    <precision[31:16] | mean[15:0]> x feature_length
    ... next mixture ...
  ... next senone ...
```

The controller reads lines strictly in order, with one read outstanding. It keeps a two-line window, so a mixture that straddles a line boundary can still be cut into groups of four dimensions for the four lanes. `hold` stops the stream when the datapath is busy, and `dim_en` masks the unused lanes of the last group. Records of any feature length up to 39 are walked correctly; lengths 12, 13 and 39 are tested.

### Distance and log-add (`distance_calc`, `log_add`)

`distance_calc` has four lanes, and each lane holds both frames. Each lane computes `(y - mu)^2 * p >> 16`. A two-level adder tree and an accumulator then sum the groups of one mixture. The result is one distance per frame, a fixed number of cycles after the mixture's last group.

`ssu` forms each mixture score as `w + r - distance`. It folds the mixture scores into the senone score with one `log_add` per frame. At the last mixture it writes both frames' scores into the score memory.

`log_add` computes `log(A+B) = max(a,b) + T[(|a-b|) >> 3]`. The table has 4096 entries of 16 bits, with

    T[k] = round( log_1.0003 (1 + 1.0003^(-8k)) )

Differences beyond the table add nothing. The table is loaded at INIT from flash lines 0–85, at 48 entries per line. It is not in a ROM, so the base or the quantisation can be changed without touching the RTL. The unit takes two cycles.

### Rate

A mixture costs about `ceil(39/4) = 10` lane groups plus pipeline overhead: about 20 cycles. The testbenches require at most 24 cycles per mixture plus 16 per senone.

At the design point this is 8000 × 8 × 20 ≈ 1.28 M cycles per two-frame block. That is 12.8 ms per 20 ms of speech at 100 MHz.

### Score memory (`senone_score_sram`, `feature_buffer`)

The score memory has 2 banks (blocks) × 2 frames × `NUM_SENONES` 32-bit words. The SSU writes into one bank while the VU reads the other, with a one-cycle read latency.

The feature buffer is double-banked in the same way. The host fills one bank while the SSU reads four dimensions of both frames per cycle from the other.

## Viterbi search (`vu`)

This is the most involved part. A **frame** of the VU is one pass over the active list, which is kept in DRAM sorted by word ID. Each entry (`al_entry_t`) is one HMM instance:

- word, predecessor word and position of the HMM in the word;
- the frame the word was entered and the frame this HMM was entered;
- an entry score, and the three state scores.

The frame runs in four phases.

1. **Bigram prefetch.** The words that exited into the lattice in the previous frame are held in up to `SLOTS` (16) slots. For each slot, `vu_flash_ctrl` reads the word's bigram row from flash into the prefetch buffer. A row is up to 14 successors in ascending word order, each with its log probability.
2. **Stream and activate.** `dram_ctrl` reads the old list a page at a time and feeds it to `word_activation`, which merges the new words in (see below). For each entry that comes out:
   - the word line is fetched once per word;
   - the HMM line (three states of {self-loop, entry transition, senone ID}) is fetched through the HMM cache;
   - the three senone scores of the frame are read;
   - three `phone_score` units compute `s_j = max(s_j + a_jj, s_{j-1} + a_{j-1,j}) + b_j`.

   State 0's left neighbour is the entry score.
3. **Prune, propagate, exit, merge.**
   - An entry whose best state is below the HMM threshold is dropped.
   - If its last state passes the HMM threshold, the next HMM of the word is created right behind it, with that score as its entry score.
   - If it is the word's last HMM and its last state passes the word threshold, the word is written to the lattice. Up to `maxwpf` such words also take a slot for the next frame.
   - Entries meeting in the output with the same (word, predecessor, HMM) are merged, keeping the better scores.
   - The result is written back to DRAM as the next frame's list.
4. **Beam update.** Two `adaptive_pruning` units update the HMM beam and the word beam (see below). The thresholds for the next frame are `best - beam`, where `best` is the best state score of this frame.

If the lattice FIFO is full, the VU stalls on the word write until the host drains it (`stats.stall_cycles`). `PAUSE` holds the VU between entries.

At the start of an utterance:

- the lists are emptied;
- word 0 is treated as the sentence-start word, placed in slot 0 with score 0;
- the thresholds are open (`NEG_INF`), because there is no previous best score to measure a beam from.

### HMM cache and language model layout (`vu_flash_ctrl`)

The language model lives in flash lines of 256 bits, at offsets from `lm_offset`:

| Region | Line | Contents |
|---|---|---|
| words | `lm_offset + word` | [15:0] unigram prob, [23:16] number of HMMs, [32+16k +: 16] HMM ID k (k < 12) |
| HMMs | `lm_offset + 65536 + hmm` | state s at [48s +: 48] = {self-loop, entry transition, senone ID} |
| bigrams | `lm_offset + 131072 + 2*word` | 2 lines of 7 × {prob[31:16], dest[15:0]} |

The HMM cache has five entries, indexed by the HMM's position in the word. It is cleared whenever the word changes. Consecutive entries of one word, such as the N-best copies, therefore read each HMM line only once. `n_hits` and `n_misses` count its use.

### Word activation (`word_activation`)

This block is the heart of the N-best search. It does a streaming merge of two sorted sequences: the old active list, and the successors of the slot words.

Each slot has a head pointer into its bigram row. Because both the list and the rows are sorted by word ID, the heads advance in step with the list, and no searching is needed. For an old entry of word *d*, one of three things happens:

- **bypass**: no slot has *d* at its head, so the entry passes unchanged;
- **modify**: it is a first-HMM entry whose predecessor is a slot word with *d* at its head. It keeps the better of its own entry score and `slot score + bigram prob`;
- **insert**: after the last old entry of *d*, every slot still pointing at *d* appends a new entry (*d*, slot word, HMM 0). Its entry score is `slot score + bigram prob` and its states are `NEG_INF`.

No more than `max_n_best` first-HMM entries per word are passed on. Extra new entries are dropped (`stats.nbest_capped`). Old and new streams use a valid/take handshake.

### Adaptive pruning (`adaptive_pruning`)

The beam follows the number of survivors:

    T(t+1) = T(t) + alpha * (1.1 * Nset - N(t)),   alpha = 1/5

The beam is only adapted when `N(t) > Nset`. Otherwise it returns to the initial beam T0. It is clamped to [0, T0], so it never becomes wider than the initial beam. One unit uses `maxhmmpf` and the HMM count; the other uses `maxwpf` and the word exits.

### Active list in DRAM (`dram_ctrl`)

The list is kept in DRAM with one entry per DRAM word. The controller alternates whole pages:

- it reads a page (`PAGE` = 16 entries) of the old list into a read buffer;
- it writes a page of the new list from the write buffer.

This keeps DRAM accesses in long bursts. The base addresses and the count are latched at `start`. `flush` writes the last partial page. The old and new lists ping-pong between two DRAM regions.

## Interfaces of the top (`asr_accel`)

The top has these ports:

- `sclk`, `cs_n`, `io_in[3:0]`, `io_out[3:0]`, `io_oe`: the quad SPI.
- `af_req`, `af_addr`, `af_rvalid`, `af_rdata[767:0]`: the acoustic flash.
- `vf_*` with 256-bit data: the language model flash.
- `dr_req`, `dr_we`, `dr_addr`, `dr_wdata`, `dr_rvalid`, `dr_rdata`: the DRAM.
- `stats`: event counters.

The flash ports and the DRAM port behave as follows:

- Both flash ports take a line address with a one-cycle request, and return the line on `*_rvalid` any number of cycles later.
- The DRAM port takes one request per cycle and must return read data in order.

The memories themselves are not part of the RTL. `tb/nor_flash_model.sv` and `tb/dram_model.sv` are simple behavioural models:

- the flash model has an 8-cycle (80 ns) latency and is pipelined;
- the DRAM model has a 6-cycle latency.

Parameters of the top, with the design point as defaults:

| Parameter | Default | |
|---|---|---|
| `NUM_SENONES` | 8000 | senone score memory per frame |
| `MAX_FEAT` | 39 | feature dimensions |
| `LANES` | 4 | distance lanes |
| `SLOTS` | 16 | words that can exit per frame and seed the next |
| `LAT_DEPTH` | 1024 | lattice FIFO entries (14 B each) |
| `AL_MAX` | 65536 | entries per active-list region in DRAM |

## Where this design departs from the original architecture

- **The VU is a state machine, not a 22-stage pipeline.** It handles one active entry at a time. The results are the same, but the throughput is lower. Real-time operation at the 64K-word point was not shown in simulation.
- **Only bigram successors are activated.** Two things are not built:
  - the unigram back-off, which would activate every word after an exit;
  - the word activation map for context-independent senones.

  A word with no stored bigram from the exiting word is never entered.
- **Bigram rows have a fixed size:** 2 lines, up to 14 successors per word. Longer rows, which the original design chains through next-line pointers, are cut.
- **Score memory is 128 KB.** The scores are 32 bits wide, which doubles the 64 KB that 16-bit scores would need.
- **Lattice:** 1024 entries of 14 B (14 KB), against 16 KB in the original.
- **SPI** is sampled by the system clock, so `sclk` ≤ clk/10 instead of a 50 MHz link.
- **Merging is local.** Two entries with the same (word, predecessor, HMM) are merged only when they meet next to each other in the output stream. A new first-HMM copy is appended after the word's old entries. When it later advances, its HMM-1 entry can therefore sit apart from an older entry with the same key, and both copies survive. This is rare, and both copies are valid paths. Their scores are not combined, though, and the lattice can receive the same word twice. The random VU test flags this case, and it occurs with some random seeds.
- **Words exit every frame** their last state passes the word threshold. They do not exit only when the last HMM is deactivated. This gives more lattice entries, never fewer.
- **This design's own choices:**
  - the opcode values;
  - the byte order;
  - all bit positions in the flash line formats;
  - the sentence-start word 0;
  - the log-add quantisation (difference / 8).

## Verification

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each one compares the module against a reference model written independently in the testbench, and ends with a `TB_RESULT checks=… failures=…` line:

- The SSU and flash-control benches build random acoustic libraries (`tb/acoustic_lib.svh`), compute the senone scores with real arithmetic, and check the cycle budget.
- The VU bench runs an exact Viterbi reference on a small language model, and checks invariants on a random one.
- `tb/tb_asr_accel.sv` drives the full chip at its default parameters, entirely over SPI. It runs two utterances:
  - **Utterance 1:** 26 blocks, 120 senones and 30 words. It checks the senone scores of the last block bit-exactly, and the consistency of the lattice. It also requires that every mechanism occurs at least once: a full-lattice stall, a feature overrun, PAUSE/RESUME, cache hits and misses, word modify and insert, the N-best cap, merges and pruning.
  - **Utterance 2:** a one-word language model whose lattice is compared exactly with a reference search.

  It takes about 720k cycles.

To simulate, build with verilator:

```
verilator --binary --timing --assert -Itb -Irtl -y rtl -y tb \
    rtl/asr_pkg.sv tb/tb_asr_accel.sv --top-module tb_asr_accel
./obj_dir/Vtb_asr_accel
```

Replace `tb_asr_accel` with any `tb_<module>` to run a single block.
