# Low-power Viterbi decoder with T-algorithm pre-computation and a dual-port survivor memory

This is a Viterbi decoder for a rate-1/2 convolutional code. It decodes one received symbol
pair per clock. It saves work in two ways:

* **T-algorithm pruning.** After every trellis step, each state whose path metric is more
  than `T` worse than the best one is purged. A purged state is not updated and is not used
  by the next step, so its add-compare-select (ACS) logic and metric register stay idle. In
  the test streams (isolated errors, about 1 channel bit in 50), on average 2.3 of 4 states
  are alive at K = 3 and 20 of 64 at K = 7. The cost is the best
  metric itself, which a plain T-algorithm finds by searching all new metrics inside the ACS
  feedback loop. Here that search is pre-computed: a separate unit works out the best new
  metric from the *current* metrics, alongside the ACS array, so no search follows the ACS.
* **Survivor memory in dual-port RAM.** The decision bits go into two small dual-port RAM
  banks. The trace-back needs two reads per written column. The bank being written uses one
  port for the write; the other bank serves both trace-back pointers on its two ports. So
  trace-back runs at full rate and needs no register-exchange network.

The RTL is parameterised in constraint length, generator polynomials, hard or soft
decision, threshold and trace-back depth. Its defaults are K = 3 with generators 7 and 5
(octal), hard decision, T = 2, and trace-back depth L = 5(K-1) = 10.

## Data path

```
rx ──► bmu ──► pmu ───────────────────────────► tbu ─────────────────► filo_out ──► out_bit
       4 branch   ACS array (acs × 2^(K-1))     2 × dpram banks          two L-bit
       metrics    metric register               trace pointer            buffers,
                  t_precomp (best new metric)   decode pointer           output register
                  T-algorithm purge             bits, last column first
                  decision register
```

| Module        | Role |
|---------------|------|
| `vd_pkg`      | shared types (RAM port modes, semaphore owner), code helpers (`branch_label`), metric widths |
| `bmu`         | branch metric unit: distance from the received pair to each of the 4 code symbols |
| `acs`         | one add-compare-select element (two adders, comparator, selector) |
| `t_precomp`   | pre-computes the best new path metric for the T-algorithm |
| `pmu`         | path metric unit: ACS array wired by the trellis, metric register, purge, normalisation, decision register |
| `dpram`       | true dual-port RAM with busy arbitration, interrupt mailboxes and semaphores |
| `tbu`         | survivor memory (two `dpram` banks) and the two-pointer trace-back |
| `filo_out`    | first-in-last-out reorder of each decoded block, output register |
| `viterbi_top` | the complete decoder |

## Code and trellis conventions

The encoder register is `{u, s}`. Here `u` is the new input bit (most significant) and `s`
holds the K-1 previous bits, newest first. The first transmitted bit is `c1 = ^({u,s} & G0)`
and the second is `c0 = ^({u,s} & G1)`. The next state is `s' = {u, s[K-2:1]}`. A branch is
labelled by its code symbol `{c1, c0}`, so a branch metric unit needs only four metrics.

Seen from the new state: `s'` is reached from the two states `{s'[K-3:0], b}` with
`b = 0, 1`, and the input bit is `u = s'[K-2]`. The decision bit stored for `s'` is `b`.
Trace-back therefore steps `s_prev = {s[K-3:0], d[s]}`, and the bit decoded at a column is
the top bit of that column's state.

## Branch metrics (`bmu`)

* **Hard decision (`SOFT = 0`).** `rx` is two bits. Each metric is the Hamming distance: the
  received pair is XORed with the expected symbol and the ones are counted. The range is 0..2.
* **Soft decision (`SOFT = 1`).** `rx` is two 3-bit values: 000 is the strongest 0, 011 the
  weakest 0, 100 the weakest 1 and 111 the strongest 1. The ideal values are `x0 = 0` for a 0
  and `x0 = 7` for a 1.
  * The squared Euclidean distance `(x-x0)² + (y-y0)²` includes `x² + y²`. That term is the
    same for all four symbols, so it is dropped, which leaves
    `Mb* = (x0² - 2·x·x0) + (y0² - 2·y·y0)`.
  * With constant `x0`, each term is either 0 or `49 - 14x`, so no multiplier is needed.
  * `Mb*` is formed in two's complement (range -98..98). The unit then adds 98 so its output
    is unsigned (0..196).
  * Adding one constant to all four metrics changes no decision.

## Path metrics and T-algorithm purging (`pmu`, `acs`, `t_precomp`)

Each state has a metric register and an *alive* flag. On every accepted symbol:

1. Every new state's ACS adds the branch metrics to its two predecessors' metrics. It
   ignores a purged predecessor, selects the smaller sum (branch 0 on a tie) and outputs the
   decision bit. A new state is a candidate if at least one predecessor is alive.
2. At the same time, `t_precomp` produces the best new metric. The minimum of all new
   metrics equals `min over c of (bm[c] + G[c])`, where `G[c]` is the smallest metric among
   the live states that have an outgoing branch labelled `c`. The four `G[c]` depend only on
   the current metric registers. The wide minimum tree therefore runs in parallel with the
   branch metric and ACS logic. After the branch metrics, only four adders and a 4-input
   minimum remain.
3. A candidate survives if `new_metric - best <= T`; all other states are purged. A purged
   state keeps its old register contents (enable off) and comes back once a live predecessor
   reaches it within `T`.
4. Surviving metrics are stored *minus the best metric*. The best state therefore always has
   metric 0, and live metrics lie in `0..T`. The metric registers are only
   `ceil(log2(T+1))` bits wide, and no separate overflow handling is needed.
5. The decision vector is registered (`dec`, `dec_valid` for one cycle).

The trace-back start point (`best_state`) is the lowest-numbered live state whose metric is
0. Finding it takes only an equality test per state, not a search.

Reset makes state 0 alive with metric 0 and purges the others, which matches an encoder that
starts in state 0.

Choosing `T`: the default T = 2 suits hard decision at K = 3. With it, about 1.7 states are
purged per step in the test stream, and isolated channel errors are still corrected. For soft
decision, one hard bit error corresponds to a metric step of 98. The test configurations use
T = 100 at K = 3 and T = 200 at K = 7. A larger `T` purges less; when `T` exceeds the
largest metric spread, the decoder becomes a plain Viterbi decoder.

## Survivor memory and trace-back (`tbu`)

This is the least obvious part of the design.

The decision columns are grouped into blocks of L columns (L = 5(K-1), the trace-back
depth). Block `q` is stored in bank `q mod 2`, half `(q div 2) mod 2`. Each bank therefore
holds 2L words of 2^(K-1) bits, and four blocks are kept in total. While block `q` is being
written, one column per step, two pointers walk backwards through the *other* bank:

| Pointer | Port | Reads (period q) | Starts from | Produces |
|---|---|---|---|---|
| write | left port of bank `q mod 2` | — (writes block `q`) | — | — |
| trace | left port of the other bank | block `q-1`, last column first | best state captured when block `q-1` was completed | the state at the end of block `q-2`, after L steps |
| decode | right port of the other bank | block `q-3`, last column first | the state the trace pointer handed over at the start of this period | one decoded bit per step, column L-1 down to 0 |

Blocks `q-1` and `q-3` have the same parity, so both read pointers use the same bank, one
per port. The bank being written needs only its left port, so the two banks never see a port
collision. An assertion checks this. Writing block `q` overwrites block `q-4`, which was
decoded in the previous period.

Why the decode pointer works on `q-3` rather than `q-2`: the state at the end of block `q-2`
is known only after the trace pointer has walked all of block `q-1`, at the end of period
`q`. That state is used during period `q+1`, on block `(q+1)-3`. Each decoded bit is thus
preceded by at least L columns of trace-back that converge to the survivor path.

RAM reads are synchronous, so the data read in one step is used in the next. At the first
step of a period, the state handed to the decode pointer is computed from the trace
pointer's last read of the previous period. At the same moment, the trace pointer is
reloaded with the new start state. The unit outputs nothing until the fourth block.

## Reordering and output (`filo_out`)

The decode pointer emits a block's bits last column first. `filo_out` uses two L-bit buffers
in turn:

* Incoming bits are stored by column index in one buffer.
* For every incoming bit, one bit of the previous block is read out of the other buffer, from
  column 0 up.
* The buffers swap when column 0 (the block's last bit) arrives.
* The output bit is registered.

## Interface and timing (`viterbi_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | synchronous reset, active low |
| `in_valid` | in | 1 | `rx` holds a received pair |
| `rx` | in | 2·Q | `{first bit, second bit}`; Q = 1 (hard) or 3 (soft) |
| `out_valid` | out | 1 | `out_bit` holds a decoded bit |
| `out_bit` | out | 1 | decoded source bit, in source order |

* **Latency.** With `in_valid` held high, the bit sent with the symbol accepted on clock edge
  `n` appears on `out_bit` after edge `n + 4L + 2`. That is 42 clocks at the defaults.
* **Throughput.** One decoded bit per clock.
* **Stalls.** The whole pipeline advances only on accepted symbols, so `in_valid` may drop at
  any time. The last 4L bits of a stream are pushed out by 4L further symbols; any symbols
  will do, for example the encoder's zero tail.
* **Start of output.** Output begins with the fourth block after reset.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `K` | 3 | constraint length (≥ 3) |
| `G0`, `G1` | 'o7, 'o5 | generator polynomials; the most significant bit taps the new input bit |
| `SOFT` | 0 | 0: hard decision, 1-bit symbols; 1: soft decision, 3-bit symbols |
| `T_THRESH` | 2 | T-algorithm threshold, in branch metric units |
| `L` | 5(K-1) | trace-back depth, the block length of the survivor memory |

The widths follow from these: metric register `ceil(log2(T+1))` bits, survivor word
2^(K-1) bits, and survivor memory 2 banks × 2L words.

## The dual-port RAM (`dpram`)

`tbu` uses only the RAM's two independent ports. The module also provides the control
features a standalone dual-port RAM has, so that it can be reused on its own:

* **Per-port write mode.** `WRITE_FIRST`: read data shows the new word. `READ_FIRST`: it
  shows the old word. `NO_CHANGE`: it keeps its previous value.
* **Reads.** Synchronous; the read data holds while the port is idle.
* **Busy.** If both ports access the same word in one cycle and at least one of them writes,
  one port wins and the other sees `busy`; the loser's access is dropped. Priority
  alternates, and the left port wins the first collision.
* **Interrupt mailboxes.** A right-port write to word DEPTH-1 raises `l_int`, and a
  left-port read of that word clears it. A left-port write to word DEPTH-2 raises `r_int`,
  and a right-port read of that word clears it.
* **Semaphores.** There are `NSEM` flags (8 by default). A port takes a free flag with
  `*_sem_req`/`*_sem_idx`; the left port wins if both ask in the same cycle. A port frees a
  flag it holds with `*_sem_rel`. `*_sem_own` shows which flags each port holds.

## What follows the published design and what is this implementation's own

These parts follow the published description:

* the block chain: branch metric unit, ACS with metric register, decision register, survivor
  path memory, output register;
* the XOR and count-ones hard-decision metric;
* the `Mb*` soft metric computed in two's complement, and the 3-bit reliability code;
* the ACS structure (two adders, compare, select, decision to the survivor memory);
* the T-algorithm with a pre-computed optimal metric;
* dual-port RAM as the survivor memory, implemented as two block memories;
* trace-back depth 5(K-1);
* a FILO buffer to restore bit order;
* a dual-port RAM with read/write modes, busy lines, interrupts and semaphores.

These are choices made here, because the description leaves them open:

* the code: rate 1/2, K = 3, generators 7/5;
* the threshold T = 2;
* the ideal soft values 0 and 7, and the +98 bias;
* grouping by branch label as the single pre-computation step;
* normalisation to the best metric, and holding the registers of purged states;
* the trace-back start at a metric-0 state;
* the block schedule of the trace and decode pointers, and the bank mapping;
* the double-buffered FILO;
* the valid/reset interface (7 pins rather than a minimal 5);
* the RAM's arbitration rule, mailbox addresses and semaphore count.

**Not included.** A transition metric unit for trellis-coded modulation, which would replace
the branch metric unit in a TCM receiver. Its function is not specified.

**Reference implementation results.** A reference FPGA implementation is reported with 69
registers, 111 LUTs, 2 block memories, 5 IO and a 6.077 ns minimum clock period. At the
defaults, this RTL has 48 flip-flop bits (memories not counted) and 180 memory bits. The two
survivor banks account for 160 of those bits; the reorder buffer accounts for the other 20.
The code behind the reference numbers is not known, so the two sets of figures are not
directly comparable.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_bmu` | all inputs, both modes, against the Hamming distance and against `(x-x0)²+(y-y0)²-x²-y²+98` |
| `tb_acs` | all 4096 input combinations, including purged predecessors |
| `tb_t_precomp` | random metrics at K = 3 and K = 5 against a search over every trellis branch |
| `tb_pmu` | a step-by-step model of the T-algorithm (metrics, alive flags, decisions, purge count, start state); random stalls; purging and revival must both occur |
| `tb_dpram` | two instances covering all three modes; random traffic against a model, including busy (both sides win), interrupts and semaphores |
| `tb_tbu` (+`tbu_check`) | decision columns built from a known path at K = 3 and K = 5; every bit, its column index and its exact output step |
| `tb_filo_out` | reversed blocks with gaps; order and one-block delay |
| `tb_viterbi_top` | the full decoder at its defaults, using its own encoder. Isolated channel errors; 3000 symbols back to back with latency and throughput checked for every bit, then 3000 with random stalls. Counts corrected errors, purges, revivals, bank swaps and stalls |
| `tb_viterbi_variants` (+`vd_stream_check`) | soft decision at K = 3, hard decision at K = 7 (171/133, L = 30), soft decision at K = 7 |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/vd_pkg.sv tb/tb_viterbi_top.sv --top-module tb_viterbi_top -o sim
./obj_dir/sim
```

**Limits of the testing.** The decoders are tested with isolated channel errors. All
configurations above decode those without a single bit error. Bit error rate under heavier
noise, and the loss the T-algorithm causes there, have not been measured. Signals are
two-state in simulation; every register that is read is reset, except the RAM arrays; words
read before they are first written only reach results that are discarded before output starts.
