# Fault-tolerant HMM word recognizer with on-line speech reconstruction

This is the hardware half of a small speech recognition system. Software on a
DSP samples and filters the speech, cuts it into 10 ms frames, runs LPC/cepstral
analysis and vector-quantizes each frame into a 7-bit *code label*. The hardware
takes that label stream and decides which word of a small vocabulary was
spoken. Each word has its own hidden Markov model (HMM), and all the HMMs score
the labels in parallel. The hardware is cheap: byte-wide scores and one small
memory per HMM state. Three mechanisms make it dependable:

* **Concurrent consistency check (CCC).** Every accumulator update is shifted
  right by one bit, so an 8-bit datapath never overflows.
* **Transparent BIST.** A march test checks all trained-score memories and
  leaves their contents as they were, so it can run between words in the field.
* **On-line speech signal reconstruction.** When no word model recognizes the
  recent input, labels from a pseudorandom Markov generator of the leading
  word replace the input for a few labels. A second bank of HMMs then scores
  this reconstructed stream.

The RTL follows the structure of F. Vargas, R. D. Fagundes and D. Barros Jr.,
*Speech Recognition Systems: From a Conventional SW Implementation to a
Reliable Noise-Immunity HW-SW Version*. That paper gives the block structure
and the algorithms in outline. Widths, handshakes, timing and several
algorithmic details were chosen here. Each such choice is listed below and in
the header comment of its file.

Default configuration: 3 words, 3-state HMMs, 128-entry × 8-bit cache memory
per state, 8-bit scores. Each subsystem holds 3 × 3 × 128 = 1152 bytes of
trained data.

## Block structure

```
 obs_label ─┬──────────────────► Subsystem-I  (3 × hmm_block) ──► scores_i
            │                                        │
            │   label_generator ×3        vac ◄──────┘ noise test, model select
            │          │                   │
            └──► 2x1 MUX chain ◄── Enable(n)
                       │
                       └───────► Subsystem-II (3 × hmm_block) ──► logic_decision ──► result
 tbist_ctrl ──(bist_ctl_t broadcast)──► one tbist_lane beside each of the 18 cache memories
```

| file | role |
|---|---|
| `srs_pkg.sv` | default sizes and the BIST control bundle type `bist_ctl_t` |
| `srs_top.sv` | top level: the two subsystems, generators, MUX chain, controller, decision, BIST |
| `hmm_subsystem.sv` | one HMM block per word (instantiated twice: Subsystem-I and -II) |
| `hmm_block.sv` | one word's HMM: cache memories, pre-accumulators, adders, accumulators |
| `ccc_mac.sv` | adder plus consistency-check shift for one state |
| `cache_mem.sv` | 128 × 8 single-port synchronous RAM (trained transition scores) |
| `tbist_ctrl.sv` | transparent BIST sequencer (signature prediction, then march test) |
| `tbist_lane.sv` | per-memory BIST datapath: recovers the original value, makes write data, MISR, compare |
| `misr.sv` | 16-bit multiple-input signature register |
| `label_generator.sv` | pseudorandom left-to-right Markov label source for one word |
| `vac.sv` | Viterbi Algorithm Controller: sequencing, noise detection, MUX enables, BIST slot |
| `logic_decision.sv` | picks the highest final score and compares it with a threshold |

## The HMM block and the consistency check

Every state `s` of a word model has a cache memory addressed by the code label.
It returns that state's trained score for the label: an unsigned byte, where
larger means more probable. One label takes two clock cycles:

1. **Read / select.** The label addresses all cache memories. Each
   pre-accumulator loads the better of the two paths into its state: stay,
   `acc[s]`, or advance from the previous state, `acc[s-1]`. State 0 can only
   stay. The first label of a word loads 0 instead, which restarts the search.
2. **Add / shift.** `acc[s] = (pre[s] + cache[s][label]) >> 1`, computed in a
   9-bit adder. The shift keeps the carry, so the result always fits in 8 bits.

The word's score is the accumulator of the last state.

The paper gives the CCC as "shift the accumulators right by one after every
MAC". The consequence is worth knowing. Each label's contribution to the score
halves at every later step, so the score is an exponentially weighted recent
match quality, not a full-length log-likelihood. This keeps the scores of
different words in order, and the paper credits the CCC with raising
recognition from about 40 % to about 90 % in its 2-word prototype. It also
means the final score is dominated by the last few labels of a word. The stay/advance `max()` is the
simplest left-to-right Viterbi step. The paper points to other work for its
exact transition structure.

`ccc_en=0` turns the shift off. This reproduces the unprotected datapath,
where the 8-bit sum wraps, and sets the sticky `ovf` flag. It exists only for
comparison; the design is meant to run with `ccc_en=1`.

## Transparent BIST

One `tbist_ctrl` drives the address and a control bundle (`bist_ctl_t`) to
every cache memory of both subsystems at once. This is why the test time does
not depend on the vocabulary size. Beside each memory, a `tbist_lane` derives
its write data and signature from that memory's own contents. A run has two
passes over the memory, each in four march elements. S1/S2 walk the addresses
upward and S3/S4 downward. `a` is the value a word held before the test.

| element | prediction pass (reads only) | test pass |
|---|---|---|
| S1 | R | R a, W ~a, W a, W ~a |
| S2 | R (inverted), R | R ~a, W a, R a, W ~a |
| S3 | R (inverted) | R ~a, W a, W ~a, W a |
| S4 | R, R (inverted) | R a, W ~a, R ~a, W a |

* The **prediction pass** only reads. It compacts each read into the lane's
  MISR, inverted wherever the test pass will read `~a`. This gives the
  signature a fault-free memory must produce.
* The signature is then saved and the same MISR is cleared.
* In the **test pass** the first read of each element recovers `a`: as read,
  or inverted when that element expects `~a`. All writes are `a` or `~a`.
  S1 and S2 leave `~a` in every word, S3 and S4 leave `a`, so after S4 the
  memory holds its original data. Every read goes into the MISR unmodified.
* At the end the two signatures are compared. `bist_pass` is low if any of
  the 18 lanes differs.

Timing: one memory operation per cycle. A run lasts 22 × DEPTH + 5 cycles
(2821 at the default size), plus one cycle for `bist_pass` to update. The
controller (`vac`) starts a run only between labels: on request, when
`bist_req` is high and no label is offered, or periodically, after every
`bist_every` words (0 turns this off). A periodic run goes ahead of the next
word's first label. `obs_ready` stays low until the run ends. Because the test
preserves the memory, a periodic run needs no save and restore of the trained
data; only its trigger (a word count) is a choice made here. The
paper's prototype needed 60 ms for a run against 1.32 ms for a word, but it
does not give its clock rate, so those times cannot be compared with the cycle
counts here.

MISR width (16 bits) and polynomial (x^16 + x^12 + x^5 + 1) are choices made
here. The paper only names a MISR.

## On-line reconstruction

Subsystem-I always scores the incoming labels. After each label the
controller looks at its scores. Nothing is tested during the first
`WARMUP = 3` labels of a word, because the scores start from zero. After that:

* If even the highest Subsystem-I score is below `recon_thr`, the controller
  treats the segment as noise.
* It then sets the one-hot `enable[n]` of the leading word `n` for `HOLD = 5`
  labels.
* During that period the MUX chain puts `label_generator` n's output on the
  Subsystem-II input instead of the incoming labels. Afterwards it falls back
  to the input.
* The first label of every word always comes from the input.

Subsystem-II scores the reconstructed stream, and `logic_decision` picks the
word from those scores.

Each generator runs a random left-to-right Markov process over its word's
states. A 16-bit LFSR picks one of 8 host-loaded labels for the current state.
It also decides whether to advance: the process advances when an LFSR byte is
≥ that state's host-loaded stay threshold. All generators step with every
label and return to state 0 at the end of a word, so a generator's state
roughly follows the position inside the word.

The paper draws one 2x1 MUX per word with an `Enable(n)` signal. An earlier
version of this design took that literally: each Subsystem-II block got its
own generator whenever its own score was low. This favoured the wrong words,
because their blocks were then fed labels made to match them. The chain of
2x1 MUXes used here means all Subsystem-II blocks see the same
reconstructed stream, and only the leading word's generator can drive it.
The noise test (highest score below the threshold) and the choice of the
leading word are this design's reading of "the model selected by the
controller". How well the scheme works depends heavily on the trained models,
the threshold and `HOLD`. On the synthetic models of `tb_srs_noise`, a
threshold of 150 helped at 60–90 % noise and hurt at 50 % and below, while
120 mostly hurt. Those numbers describe the synthetic models only. The paper's
own results for this scheme come from a software simulation.

## Interface (srs_top)

* **Label stream**: `obs_valid`/`obs_ready` handshake, with `obs_label`,
  `obs_first` and `obs_last`. Keep `obs_valid` and the label stable until
  `obs_ready`. A label is accepted at most every 3 cycles.
* **Results**: `result_valid` pulses in the third cycle after the cycle in
  which a word's last label is taken. It comes with `result_word`,
  `result_score` and `result_recognized` (`result_score >= decide_thr`).
  `scores_i`, `scores_ii`, `enable`, `switch_cnt` and `ovf` are for
  monitoring.
* **Loading**: the host writes trained bytes with `host_we` and
  (`host_word`, `host_state`, `host_addr`, `host_wdata`). A write goes to the
  same word in both subsystems. Generator label sets are loaded with
  `gen_tbl_we` and stay thresholds with `gen_stay_we`. Load only while no
  label is in flight and no BIST runs.
* **BIST**: raise `bist_req` until `bist_busy` rises, or set `bist_every`
  to N > 0 for a run after every N words. `bist_done` pulses at the end of a
  run, and `bist_pass` holds the verdict of the last run.
* **Reset**: `rst_n` is asynchronous and active-low. It clears all control and
  score registers. Memory contents are not reset.

Parameters of `srs_top`: `NW` words, `NS` states, `DEPTH` labels (the label
width is log2 of it), `W` score bits, `NT` labels per generator state, and
`HOLD`.

## Verification

Each module has a self-checking testbench in `tb/` that compares against an
independent model in the testbench and prints
`TB_RESULT checks=N failures=M`.

* `tb_srs_top` runs the whole design at its default size. A cycle-level
  reference model covers both subsystems, the switching rule, the generators'
  LFSRs and the decision, and is checked after every label. The test also
  checks:
  * every mechanism happens at least once: a switch to a generator and back,
    overflow with the CCC off, recognized and unrecognized words, a BIST pass,
    a BIST fail on a cell flipped mid-test, a label held off by a BIST, and
    periodic runs started by `bist_every`;
  * the 3-cycle label rate and the result latency;
  * the BIST length.
* `tb_srs_noise` is the noise-immunity workload: 3 words of 30 labels, with
  25–90 % of the labels replaced by random ones, recognized with the
  reconstruction off and on. It also compares the 8-bit datapath with the CCC
  off and on. On its synthetic models, clean words are recognized 57 % of the
  time without the shift and 100 % with it.
* The unit tests cover the rest. `tb_tbist_ctrl` checks the exact march access
  trace, the cycle count, that contents are preserved, and that stuck-at
  faults are caught. `tb_ccc_mac` tests all input pairs exhaustively.

To run one with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_srs_top \
    rtl/srs_pkg.sv -y rtl -y tb tb/tb_srs_top.sv -o sim && ./obj_dir/sim
```

Every testbench runs in a few seconds at most.

## Departures and open points

* The signal analysis chain (A/D, filters, windowing, LPC/cepstrum, vector
  quantization with its codebook) is software on the DSP and is not here. Its
  output is the `obs_*` stream.
* HMM transition structure, score encoding and word start: chosen here
  (stay/advance `max()`, unsigned "higher is better" bytes, restart from 0).
* The paper mentions "XOR bit-a-bit" operations in the decision. The decision
  here is a plain magnitude comparison.
* The paper's controller generates a common clock. Here it issues a common
  step strobe on one system clock.
* The paper also suggests larger systems: 6-state HMMs, 256-entry memories,
  up to thousands of words. `NS`, `DEPTH` and `NW` are parameters, but
  memories of hundreds of kilobytes would need SRAM macros in place of
  `cache_mem`.
