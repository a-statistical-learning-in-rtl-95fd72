# On-chip fault diagnosis with a dynamic k-nearest-neighbour classifier

Aging makes some paths of a chip slow before they fail. If the chip runs a
delay-fault test at a raised clock, it can find those paths early. The
difficulty is locating them. A fault dictionary maps failing tests to
candidate faults, but with a small dictionary several sub-circuits usually look
guilty at once. This design turns the pass/fail result of such a test into one
fault count per repairable sub-circuit. It then uses a hardware k-nearest-neighbour
classifier to rank the sub-circuits from most to least likely faulty.

The classifier is *dynamic*. The system repairs or isolates the sub-circuit it
was given, retests, and reports back. If the first guess was wrong, the
classifier overwrites one of its training vectors with the case it just got
wrong. It therefore adapts to fault patterns that its training set did not
contain.

Everything is written in synthesizable SystemVerilog-2017 and is parameterised
on the three sizes that matter:

| parameter | default | meaning |
|---|---|---|
| `M` | 10 | sub-circuits = features per vector = labels |
| `K` | 5 | nearest neighbours |
| `N` | 256 | training vectors |
| `FEAT_W` | 8 | bits per fault count |
| `NUM_TESTS` | 64 | tests in the pass/fail vector (front end) |
| `NUM_FAULTS` | 64 | faults in the dictionary (front end) |
| `ASYNC_CORE` | 0 | 1 = classifier on its own clock `core_clk` (see Clocking) |

`NUM_TESTS` and `NUM_FAULTS` are placeholders: no particular dictionary size
is implied.

## Data flow

```
 test controller ──pf_vector──► casp_frontend ──counts[M]──┐
 dictionary memory ◄─test idx──┘  (pf_register,            │ SRC_SEL
                   ──dict_data─►   fault_accumulator, fmic)  ▼
                                              dknn_axi_slave ◄──AXI4-Lite── host CPU
                                                 └── dknn_core (classifier + training memory)
```

`slic_dknn_top` contains the front end and the AXI slave, and the slave
contains the classifier core. The host writes a test vector into registers,
or sets `CTRL.SRC_SEL` to take the front end's counts. It raises a flag and
then walks through the predictions with a flag handshake. The test controller,
the dictionary memory and the host are outside the design. Their signals are
ports of the top.

## Front end: from pass/fail bits to fault counts

* **`pf_register`** holds the pass/fail bit of every test, loaded in parallel.
  It rotates by one position per step, so that one bit per cycle leaves at
  `pf_out` and the register returns to its original contents after
  `NUM_TESTS` steps.
* **`fault_accumulator`** has one flip-flop per dictionary fault. While test
  *t* is presented, each flip-flop whose fault the dictionary row of *t* can
  sensitise is set if the test failed. The flip-flops are then shifted out
  serially, one fault per cycle.
* **`fmic`** (fault-to-module index counter) counts the serial stream. A fault
  index counter (FI) advances with every bit. `M-1` module index registers
  split the range 0…NUM_FAULTS into `M` intervals, one per sub-circuit. `M`
  comparators test `lo ≤ FI < hi`, and `M` saturating counters count the set
  bits that fall into their interval. The registers reset to an even split
  and can be rewritten through `mir_we/mir_idx/mir_value`.
* **`casp_frontend`** sequences them. After `pf_load` it takes `NUM_TESTS`
  cycles to accumulate and `NUM_FAULTS` cycles to count. `counts_valid` pulses
  exactly `NUM_TESTS + NUM_FAULTS` cycles after `pf_load`.

A fault counts toward a sub-circuit when it is *compatible* with the
failures: a failing test could have sensitised it. The module registers assume
that dictionary faults are numbered so that each sub-circuit owns one
contiguous range.

## Classifier core (`dknn_core`)

The classifier is a one-dimensional systolic array. Each training vector
enters it once. The phases run strictly one after another:

1. **Ideal resolution check, `M` cycles** (`ideal_resolution`). The test
   vector is scanned one feature per cycle, counting non-zero features and
   remembering the last one.
   * Exactly one non-zero feature: that sub-circuit is the answer
     (`pred_ideal`), and no search runs.
   * No non-zero feature: `no_fault` is reported.
2. **Stream, `N` cycles.** The synchronous training memory
   (`training_memory`, `N × (M·FEAT_W + log2 M)` bits) is read one vector per
   cycle.
   * There is one distance PE (`distance_pe`) per dimension. PE *m* adds
     `|test[m] − train[m]|` to the partial distance from PE *m−1* and passes the
     label and training index along.
   * PE *m* works on the vector that entered *m* steps earlier, so
     dimension *m* of each training vector is delayed by a skew FIFO
     (`skew_fifo`) of depth *m*.
   * The distance width is `FEAT_W + log2 M + 1` bits.
3. **Masking stall.** A training vector whose label names a sub-circuit with
   a *zero* test count cannot be a neighbour: that sub-circuit is known to be
   fault-free in this test.
   * When such a vector is read, nothing in the pipeline moves (`adv`=0). Only
   the read pointer advances.
   * The skipped vectors are counted (`stall_count`). They cost no time:
   each one still takes its single read cycle.
4. **Flush, `M+K` steps** of bubbles push the last vectors into the sorter.
5. **Distance sort** (`distance_sort_pe` × K). Each cell keeps the smallest
   distance seen and passes the larger one on. A tie goes to the lower
   training index. Without that rule, the order in which equal distances
   meet in a skewed systolic chain could decide which neighbour is kept.
   After the flush, cell *k* holds the (k+1)-th nearest neighbour.
6. **Count, `K` cycles** (`label_counter`). One sorter cell is read per cycle,
   and the counter of its label is incremented.
7. **Label sort, `2M` cycles** (`label_sort_pe` × M). The M (count, label)
   pairs go through a second sorting chain.
   * A higher count wins.
   * On equal counts, each label gets a K-bit word. Bit `K-1-k` is set if
     the k-th nearest neighbour carries that label, so the nearest neighbour
     is the MSB. The larger word wins: the label that owns the nearer
     neighbour.
   * A full tie goes to the lower label.
8. **Predict.** `pred_valid` presents rank 0, then rank 1, 2, … for each
   `fb_valid` with `fb_found=0`. After `M` rejected ranks the core gives up.
9. **Learn.** If the true sub-circuit was found at rank > 0, the core looks
   among the K neighbours for the nearest one carrying the rank-0 label, the
   first wrong guess. That training entry is overwritten with the test vector
   and the true label: one memory write, `replaced`=1, `replaced_idx`=entry.
   An ideal-resolution answer never learns: a wrong answer there yields no
   better label. With `learn_en` low (CTRL.NO_LEARN) the training set is
   never changed, and the core is a plain static KNN classifier.

### Timing

From `start` to the first `pred_valid` of a searched vector takes
**N + 4M + 2K + 4 cycles**, which is 310 at the defaults. The count does not
depend on how many vectors are skipped. The core reports it on `latency` for
every classification.

The architecture this is modelled on overlaps the phases and quotes
`M + K + N + M` cycles (276), or 259 cycles for the (10,5,256) build. Here the
phases are deliberately sequential: each PE array can then be checked on its
own, at the cost of about 50 cycles per vector. Later predictions of the same
vector take one cycle after the feedback. A vector resolved by the ideal
resolution check is answered after the M-cycle scan plus about two control
cycles.

## Host interface (`dknn_axi_slave`)

The host interface is an AXI4-Lite slave with 32-bit data and an 8-bit byte
address. Each direction has one transaction in flight, and every response is
OKAY.

| addr | name | access | bits |
|---|---|---|---|
| 0x00 | CTRL | rw | [0] NEW_DATA, [1] PRED_ACK, [2] FOUND, [3] SRC_SEL, [4] NO_LEARN |
| 0x04 | STATUS | ro | [0] DATA_ACK, [1] PRED_VALID, [2] BUSY, [3] IDEAL, [4] NO_FAULT, [5] EXT_VALID, [6] DONE, [7] REPLACED |
| 0x08 | PREDICTION | ro | [7:0] sub-circuit, [15:8] rank, [31:16] last replaced training index |
| 0x0C | TRAIN_CTRL | wo | write stores the staged training vector: [15:0] index, [23:16] label (ignored while busy) |
| 0x10 | LATENCY | ro | [15:0] cycles to first prediction, [31:16] skipped training vectors |
| 0x40 + 4w | TEST_FEAT | rw | test features, 4 per word, feature *i* in word *i/4*, byte *i%4* |
| 0x80 + 4w | TRAIN_FEAT | rw | staging area for one training vector, same packing |

DONE and REPLACED are sticky until the next NEW_DATA. `irq` is high while a
prediction waits to be acknowledged.

Every exchange is a four-phase handshake on level flags. This tolerates a
host that is far slower than the core, or not real-time.

```
host: write features, CTRL.NEW_DATA=1      core: STATUS.DATA_ACK=1 (started)
host: CTRL.NEW_DATA=0                      core: DATA_ACK=0
loop:
  core: STATUS.PRED_VALID=1                host: read PREDICTION, retest
  host: CTRL={FOUND=r, PRED_ACK=1}         core: PRED_VALID=0, consumes r
  host: CTRL.PRED_ACK=0                    core: next rank (if r=0) or finish
```

To load the training set, write the features to TRAIN_FEAT, then write
TRAIN_CTRL with the index and label. The training memory keeps its contents
over reset and has no initial contents.

### Clocking

By default (`ASYNC_CORE = 0`) everything runs on the bus clock, and
`core_clk` is ignored. With `ASYNC_CORE = 1` the classifier core runs on
`core_clk`, for example four times the bus clock from a clock manager, while
the registers stay on the bus clock.

* The level-flag protocol makes the crossing simple. NEW_DATA and PRED_ACK
  enter the core domain through two-flop synchronizers (`cdc_sync`). The
  handshake state (DATA_ACK, the acknowledge latch, DONE and REPLACED) lives
  in the core domain. It is registered there and synchronized back as STATUS.
* Feature words, FOUND, and the prediction and latency values are not
  synchronized. The handshake holds each of them still for several cycles of
  both clocks before it is sampled.
* A TRAIN_CTRL write flips a toggle that the core domain turns into one memory
  write and then echoes back. Until the echo arrives, the slave holds off the
  next bus write, so this works for any clock ratio.
* The core's reset is synchronized into its domain.

Host code for the two builds is the same. Only the number of polls between
flag changes differs.

## Where this departs from, or adds to, the architecture it follows

* Sequential phases and the longer latency (see Timing).
* The lower-index tie rule in the distance sort, and the lower-label rule on a
  full tie in the label sort.
* A `no_fault` outcome for an all-zero vector, and a give-up after `M`
  rejected ranks.
* The replacement target is found in one cycle by a priority search over the
  K sorter cells, rather than iteratively.
* The clock crossing of the `ASYNC_CORE` build is this design's own (see
  Clocking).
* The front end's sequencing is this design's own: accumulate first, then
  count, with no overlap. So are its parallel pass/fail load, its test and
  fault counts, and the even reset split of the module registers.
* The register map, `SRC_SEL`, `FOUND`, `NO_LEARN` and the LATENCY register are this
  design's own. The source only specifies 32-bit user registers and the flag
  handshake.

## Size (generic yosys synthesis, default parameters)

| unit | flip-flop bits | memory bits | cells |
|---|---|---|---|
| `dknn_core` | 1218 | 21504 | 970 |
| `dknn_axi_slave` (with core) | 1467 | 21504 | 1092 |
| `casp_frontend` | 295 | 0 | 183 |
| `slic_dknn_top` | 1762 | 21504 | 1273 |

Doubling `M` doubles the distance PEs, skew FIFOs, label-sort PEs and the
memory width. Doubling `K` only adds distance-sort PEs and widens the counters.

## Verification

Every module has a self-checking testbench in `tb/`. Expected values come from
independent models: `dknn_ref_pkg` is a plain software DKNN reference with the
same tie rules. Each testbench has a watchdog and ends with a `TB_RESULT
checks=… failures=…` line.

| testbench | what it covers |
|---|---|
| `tb_pf_register`, `tb_fault_accumulator`, `tb_fmic`, `tb_casp_frontend` | front end units and the exact `NUM_TESTS + NUM_FAULTS` latency |
| `tb_training_memory`, `tb_skew_fifo`, `tb_distance_pe`, `tb_ideal_resolution` | storage, delay lines, distance step, ideal check |
| `tb_distance_sort_pe`, `tb_label_counter`, `tb_label_sort_pe` | sorter chains against sorted references, including ties |
| `tb_dknn_core` | ideal, no-fault, masked search, rank walk, replacement, latency |
| `tb_dknn_axi_slave` | the whole host protocol, training load, both vector sources |
| `tb_dknn_axi_slave_async` | the same with `ASYNC_CORE = 1` and a core clock 2.7× the bus clock |
| `tb_slic_dknn_top` | end to end at default parameters: front end counts into the classifier through the AXI port, all mechanisms counted |
| `tb_dknn_workloads` | eight workloads on (10,5,256) ×3, (20,5,256), (10,10,256), (10,5,300), (10,5,50), (10,1,256) |

`tb_dknn_workloads` runs five workloads. Each classifies all its test vectors
against the reference model.
* A 741-vector run of the default build, the same size as the reference
  timing run.
* A 740-vector run in which two sub-circuits never appear in the training
  set, so only learning can supply them. It runs twice on identical data:
  once as DKNN and once as static KNN (`learn_en`=0).
* 150 vectors each on the M=20 and K=10 builds.
* 100 vectors each on N=300, N=50 and K=1 builds, the ends of the
  training-set and neighbourhood sweeps.

The data are synthetic: a dominant count on the true sub-circuit plus random
counts elsewhere. The error rates it prints therefore describe that data, not
a real dictionary.

On the 740-vector run, learning lowers the first-guess error from 47 % to
40 %. It also cuts the average number of predictions per vector from 3.2 to
1.9.

The 741-vector run takes 226,263 core cycles, which is 4.5 ms at 50 MHz, with
host transfers excluded.

Each testbench was also run against a deliberately broken copy of its module.
Examples: a rotation that does not wrap, a comparator with an inclusive upper
bound, the masking rule removed, swapped register fields. All of them failed.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_slic_dknn_top \
  -y rtl -y tb +libext+.sv rtl/dknn_pkg.sv tb/dknn_ref_pkg.sv tb/tb_slic_dknn_top.sv
./obj_dir/Vtb_slic_dknn_top
```

Replace the top module and last file for other testbenches.
`tb_slic_dknn_top` runs in a few seconds, and `tb_dknn_workloads` in about
ten.

## Files

* `rtl/dknn_pkg.sv` holds the default sizes and the width functions.
* `rtl/` has one module per file, named as above; `rtl/cdc_sync.sv` is the
  synchronizer of the two-clock build.
* `tb/` holds the testbenches.
  * `tb/dknn_ref_pkg.sv` is the reference model.
  * `tb/dknn_workload_run.sv` is the workload driver.
