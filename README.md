# Trellis-coded modulation ECC for 2-bit/cell flash memory

Multilevel flash stores two bits per cell as one of four threshold levels.
Code-storage flash reads short words (16 to 64 bits) and needs a short read
latency. A separate block code (Hamming, BCH) adds many cells to words this
short. The alternative built here is trellis-coded modulation (TCM). The error
correcting code and the mapping of bits onto cell levels are designed
together, so most of the protection comes from how points are placed among
the cell levels, not from extra cells.

The RTL implements the TCM on-chip ECC architecture of Sun, Devarajan, Rose
and Zhang ("Multilevel Flash Memory On-Chip Error Correction Based on Trellis
Coded Modulation"). It has three systems that share one code:

| system | user bits | + termination | steps | cells | read path | read latency |
|---|---|---|---|---|---|---|
| (11,8) TCM  | 16 | 19 = 7+7+5   | 2 x 4-D + 1 x 3-D          | 11 | fully parallel, unrolled Viterbi | 1 cycle   |
| (20,16) TCM | 32 | 35 = 5x7     | 5 x 4-D                    | 20 | 4 sense circuits, 1 step/clock   | 7 cycles  |
| (38,32) TCM | 64 | 67 = 9x7+4   | 9 x 4-D + 1 uncoded 2-D    | 38 | 4 sense circuits, 1 step/clock   | 12 cycles |

For comparison, single-error-correcting 4-ary Hamming codes for the same
words take 11, 19 and 36 cells. Codes correcting two 4-ary symbols (shortened
BCH) take 13, 23 and 39 cells. The published simulations show these TCM
systems with a bit error rate about five orders of magnitude below the
Hamming codes. Against the 2-error-correcting BCH codes they are about as good
or up to an order of magnitude better, with 15%, 13% and 2.6% fewer cells.
The published read latencies are 12.3 ns, 30.3 ns and 66.3 ns in 0.18 µm
CMOS, sensing included.

## The code

Each trellis step takes n = 7 bits and writes m = 4 cells, that is 8 bits
of cell capacity. So the code adds 1 redundant bit per 4 cells.

* **Convolutional encoder** (`conv_encoder`). The code is rate 2/3 with
  memory order 3, so the trellis has 8 states. Two of the seven bits, x1 and
  x2, enter the encoder. The state is `{c,b,a} = {x2[t-2], x2[t-1], x1[t-1]}`:

      z0 = b        z1 = x1 ^ a        z2 = x2 ^ a ^ c        next = {b, x2, x1}

  z0 depends only on the state, so the four branches leaving a state share
  the top partition level. The encoder is feed-forward, so zero inputs clear
  its state. That is how a word is terminated: one zero on x1 and two zeros on
  x2 (3 bits) bring it back to state 0.
* **Set partitioning (4-D modulation)** (`tcm_modulator`). A cell at level
  `2h+p` has an upper bit h and a parity p. The coded bits z select one of 8
  subsets of the 4^4 grid of cell levels. Subset z is the set of points whose
  cell parities are

      p1 = u,  p2 = u^z1,  p3 = u^z2,  p4 = u^z0^z1^z2

  for either value of the coset bit u. The subset is a coset of
  2Z^4 ∪ (2Z^4 + 1111), and two points inside it are at squared distance 4 or
  more (level spacing 1). The other five bits `{h4,h3,h2,h1,u}` select one of
  the 32 points of the subset. With this labelling the code's squared free
  distance is 4, the limit set by the parallel transitions. An uncoded 4-level
  cell has squared distance 1.
* **Step bit order.** Step bit 0 is x1, bit 1 is x2, and bits 2..6 are
  `u,h1,h2,h3,h4`. User bits fill every position that termination does not
  force to zero, in order: step 0 first, bit 0 first.
* **Last step of a word.**
  * 16 bits: the last step is **3-D**. It takes 5 bits (x1 = x2 = 0 plus
    `u,h1,h2`) and writes 3 cells. The 2-D constellation of cells 3-4 is
    collapsed onto one cell: the 2-D subset with parities (p3,p4) becomes
    level `2*p3+p4`.
  * 64 bits: the last step is **2-D** and bypasses the trellis. Four bits go
    straight to two cells: `cell1 = bits[1:0]`, `cell2 = bits[3:2]`. These four
    bits are unprotected. An error in those two cells is not corrected, and
    the decoder returns the most likely level of each cell.

## Read path

    cell read value ─► sense_12level ─► therm_to_q ─► demodulator tree ─► Viterbi ─► word
                      (11 comparators)   (0..11)      (8 metrics +        (8 states,
                                                       decisions/step)     register exchange)

* **12-level sensing** (`sense_12level`, behavioural model). This is an
  analog current-mode circuit. The selected cell's current is compared with 11
  programmed reference cells at once (comparators COMP1..COMP11). In the model
  the cell current is an 8-bit read-value code. `therm_to_q` counts the
  comparators that fired, giving a 4-bit read q = 0..11. That is three times
  the resolution of a plain 4-level read, and the demodulator uses it as soft
  information.
* **Cell metric** (`tcm_pkg::cell_metric`). The cell metric is a 4-bit
  negative log-likelihood of read q for stored level L. It is computed from
  the centre of q's quantisation bin, the level mean and the level's spread,
  in half-nat units, saturated at 15:

      metric = round((rep(q) - mu_L)^2 / sd_L^2) + round(2 ln(sd_L / sd_inner))

  The level model has the two outer distributions wider than the inner ones:
  standard deviations 32, 8, 8 and 16 on an 8-bit scale with means 24, 120,
  162 and 224. The references are packed around the three decision
  boundaries. All these numbers are parameters of `tcm_pkg`. Change them to
  match a real cell population.
* **Demodulator**. The demodulator is a tree:
  * 1-D stage (`demod_1d`, one per cell): the best even level and the best
    odd level, with their metrics.
  * 2-D stage (`demod_2d`, one per cell pair): four 2-D subsets, where each
    metric is a plain sum.
  * 4-D stage (`demod_4d`): for each of the 8 subsets, it compares its two
    cosets and keeps the better one.

  The stage outputs 8 branch metrics of 6 bits and 8 five-bit decisions. The
  branch metrics are exact: at most 4 x 15 = 60, so they never saturate.
  `tcm_demod_4d` is the full tree. It also outputs the best point of the
  uncoded 2-D constellation, which decodes the 64-bit bypass step.
  `tcm_demod_3d` is the variant for the collapsed 3-D step.
* **Viterbi decoder**. The decoder is state-parallel, with 8 add-compare-select
  units (`viterbi_acs`) and register exchange. Each state's survivor register
  holds the complete decoded step bits so far, so no traceback is needed.
  Decoding starts in state 0, and branches that termination forbids are
  pruned. The result is the survivor of state 0 after the last step. Path
  metrics are 12-bit and saturating. A word has at most 10 x 60 of metric, so
  no normalisation is needed.
  * `viterbi_rx` processes one step per clock. It is used by the 32-bit and
    64-bit systems.
  * `viterbi_unrolled` chains the ACS stages combinationally over all steps.
    After termination pruning the 16-bit word has only 8 complete paths.

Because the branch metrics are exact and the trellis is terminated, the
decoded word is always a **maximum-likelihood codeword** under the cell
metric. The testbenches check exactly this property on noisy reads. When two
codewords have equal metrics (possible because the cell metric saturates), the
tie is broken in a fixed order among the four predecessors.

## Hierarchy, interfaces and timing

```
tcm_flash_top                 three systems side by side; cell array outside
└─ tcm_ecc_system #(DATA_BITS, PARALLEL_READ)
   ├─ tcm_encoder             conv_encoder + tcm_modulator per step, 1-cycle
   ├─ read_path_par (16-bit)  11 x sense_12level/therm_to_q, 2 x tcm_demod_4d,
   │                          tcm_demod_3d, viterbi_unrolled
   └─ read_path_seq (32/64)   column selector, 4 x sense_12level/therm_to_q,
                              tcm_demod_4d (+ tcm_demod_3d if needed), viterbi_rx
tcm_pkg                       constants, types, word format, code and metric functions
```

* Clocking: one rising-edge clock and an asynchronous active-low reset
  `rst_n`.
* Write side: `wr_valid_i`/`wr_data_i` is sampled on a clock edge. One cycle
  later `prog_valid_o` is high and `prog_cells_o[i]` holds the levels (0..3)
  to program.
* Read side: the cell array supplies `rd_cells_i[i]`, the read values of the
  addressed word's cells, which must stay stable until the result appears.
  * 16-bit system: `rd_valid_o` and `rd_data_o` come one cycle after
    `rd_start_i`.
  * 32-bit and 64-bit systems: the read starts on `rd_start_i`, and
    `rd_busy_o` stays high until `rd_valid_o`. `rd_valid_o` pulses
    NSTEP + 2 cycles after the start cycle (7 and 12 cycles). A start while
    busy is ignored.
* Sizes: the supported word sizes are those where (DATA_BITS + 3) mod 7 is 0,
  4 or 5. An elaboration error rejects any other size.
  `tcm_pkg::num_steps`, `num_cells` and `is_data` derive the whole word
  format from DATA_BITS.

## What is taken from the published design and what is chosen here

These come from the published design:
* the parameters n = 7, k = 2, r = 1, m = 4, memory order 3;
* the 3 termination zeros;
* the step structure and cell counts of the three systems;
* Wei-style hierarchical partition into eight 4-D sub-lattices;
* 12-level quantisation with 11 comparators against reference cells;
* the 1-D, 2-D, 4-D demodulator tree and the 6-bit branch metrics;
* the state-parallel register-exchange Viterbi decoder;
* four sensing circuits and one demodulator for 32/64 bits;
* 11 sensing circuits, two 4-D and one 3-D demodulators with an unrolled
  decoder for 16 bits.

These are this design's own choices, because the published description does
not give them:
* the generator equations. They were picked by an exhaustive search for a
  non-catastrophic feed-forward code that reaches d²free = 4 with this
  labelling. They are not Wei's published code;
* the subset labelling and the step bit order;
* the 3-D collapse mapping and the 2-D bypass mapping;
* the read-value scale, level means and spreads, and reference currents;
* the metric formula and its widths (4/5/6 bits), and the 12-bit path
  metrics;
* the tie-breaking rules;
* the pipeline and cycle latencies;
* the column selector of the serial read path;
* the encoder, which encodes a whole word in one cycle.

The published design optimised the unrolled 16-bit decoder beyond plain
unrolling. Here that decoder is three chained ACS stages, and any further
simplification is left to synthesis.

Not modelled: the flash cell array and its program/erase circuits, the
analog behaviour and 300 ps delay of the sensing circuit, and any timing or
area target.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. They compare against `tb/tcm_ref_pkg.sv`, a
separately written reference model. That model covers the word format (given
as per-size tables), a bit-level encoder, the quantiser, the metric (in real
arithmetic), and an exhaustive trellis search for the maximum-likelihood cost.

* `tb_conv_encoder`, `tb_tcm_modulator`: exhaustive. The modulator test also
  checks the partition: all 256 points are distinct, and the distance inside
  a subset is at least 4.
* `tb_tcm_encoder`: random and one-hot words for the 64-, 32- and 16-bit
  formats.
* `tb_sense_12level`, `tb_demod_1d`, `tb_demod_2d`, `tb_demod_4d`,
  `tb_tcm_demod_4d`, `tb_tcm_demod_3d`: exhaustive or random, with brute-force
  searches over all points of each subset.
* `tb_viterbi_rx`, `tb_viterbi_unrolled`: random branch metrics, with idle
  cycles between steps. The decoded path must be valid and terminated, and its
  metric must equal the reference minimum.
* `tb_read_path_par`, `tb_read_path_seq`, `tb_tcm_ecc_system`: reference
  encoding, then clean reads, reads with one cell pushed past the midpoint
  towards a neighbouring level, and noisy reads. Latencies are checked too.
* `tb_tcm_flash_top`: the full design at its default sizes, with a
  behavioural cell array (`tb/flash_core_model.sv`). It writes and reads back
  all three systems. It counts corrected single-cell errors in every system,
  including the 16-bit 3-D step. It also counts hard-decision reads of the
  64-bit bypass step, starts ignored while busy, and clean and noisy reads.
  A mechanism that never occurs counts as a failure.

To run one testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/tcm_pkg.sv tb/tcm_ref_pkg.sv tb/tb_tcm_flash_top.sv \
    --top-module tb_tcm_flash_top -o sim
./obj_dir/sim
```

Substitute another `tb_*.sv` file and module to run another testbench.
`tb_tcm_flash_top` runs the top at its default parameters. Each simulation
takes under a second once built.

The published bit-error-rate curves go down to error rates far below one in
a million. A Monte Carlo study at those rates needs far more decoded words
than RTL simulation can run. The
testbenches check maximum-likelihood decoding instead. The BER of this RTL
depends on the chosen reference currents and metric, which are not the
published ones.
