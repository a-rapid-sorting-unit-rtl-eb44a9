# Rapid sorting unit built from shifting register files

A search engine scores a huge, unbounded stream of records and only wants
the best few hundred. Sorting networks can do this at clock rate, but they
need O(n log n) comparators, all n inputs at once, and must re-sort the
previous best together with every new batch. This design keeps the best
scores with a far cheaper structure: a **shifter sorter**, a register file
of n cells that behaves as a priority queue. Every clock it inserts one new
score in order and drops the lowest one, with one comparator, one 2-to-1
mux and one register per cell and no control logic at all. Several shifter
sorters run in parallel to take several scores per clock, and are merged
("collapsed") into one when the stream ends.

The RTL follows the architecture of the paper *A Rapid Sorting Unit based
on Programmable Shifting Register Files* (Ribas-Xirgo, Castells-Rufas,
Montón-Macián, Carrabina-Bordoll). It contains three things:

| unit | what it is | default size |
|---|---|---|
| `rsu` | the complete rapid sorting unit (RSU): two shifter sorters, a dual-port RAM for the 96-bit datum references, flush sequencing | 2 x 127 cells, 32-bit scores, 256 x 96-bit RAM, returns the best 127 |
| `linear_sorter` | generic linear composition of k shifter sorters | k = 4, n = 128, 32-bit |
| `tree_sorter` | generic binary-tree composition of k shifter sorters | k = 4, n = 128, 32-bit |

`rsu_top` instantiates the three side by side; they share only clock and
reset.

## The shifter sorter

Cells are ordered R_0 <= R_1 <= ... <= R_{n-1}: R_0 is the lowest kept
score, R_{n-1} the best. The new word D is broadcast to every cell. Cell i
compares, p_i = (R_i >= D), and

    D_i   = p_i ? D : R_i          (offered to cell i-1)
    R_i' = p_i ? R_i : D_{i+1}     (D_n = D for the last cell)

So cells whose value is at least D hold, the cell at the insertion point
takes D, the cells below it take their right neighbour's value (a left
shift), and D_0 = min(D, R_0) leaves the array as W. Equal scores: an older
equal score stays above the new one. The array therefore always holds the
n best of everything it has seen (`ss_pe.sv`, `shifter_sorter.sv`).

Two control inputs are added for the RSU and the compositions:

* `flush` forces every p_i low, so the array shifts left by one word
  whatever the scores: R_0 leaves, D enters the top cell.
* `clr` reloads the reset values; `en` freezes the array for a clock.

The key can be the upper part of a wider word (`KW` < `DW`); the lower bits
travel with their key. The RSU uses this to carry a RAM address with every
score.

## RSU: scores move, references stay put

Moving 128-bit (score, reference) pairs through every cell would cost a lot
of registers and power. The RSU stores each 96-bit reference once, in a
256 x 96 RAM, and moves only a 32-bit score plus an 8-bit address tag.

Each sorter has 127 cells and one extra register, **X**, that catches the
word shifted out. Each of the 128 positions (X and cells) owns one RAM
address from reset on: 0..127 for the left sorter, 128..255 for the right
one. The trick that makes the address bookkeeping free:

* X always holds the entry that was dropped last, so **X's address is the
  free slot** of that sorter.
* An incoming pair writes its reference to RAM at X's address and enters
  the sorter as {score, X's address}, in the same clock.
* Whatever is dropped now, the new pair itself if its score is too low or
  the former lowest cell, moves into X, and its address becomes the free
  slot.

No reference is ever copied, and the 128 addresses of a sorter are always
held by its 128 positions. Lane 0 feeds the left sorter and RAM port 0,
lane 1 the right sorter and RAM port 1, so the unit takes two pairs per
clock.

## RSU: the two flush stages

After `flush_start` the two sorters are merged and read out, 2 x 128 clocks
in all:

1. **Stage 1, 128 clocks.** The right sorter flushes: its X and then its
   127 cells, lowest first, leave through X into the left sorter, which is
   still sorting but takes its input from the right X buffer (the
   "serial" position of the input mux). The left sorter then holds the 127
   best scores of both.
2. **Stage 2, 128 clocks.** Both sorters flush. The left sorter's words
   leave one per clock through its X buffer; X's address reads RAM port 0,
   and score and reference appear together on the output one clock later.
   The first word of this stage is the stale X content and is skipped, so
   `out_valid` marks exactly 127 results, in ascending order of score.

Zero scores are shifted in while flushing, so both sorters end empty and a
new search can start with no reset. While flushing, the address shifted
into the right sorter with each zero score is the one leaving the left X
buffer. That keeps every address owned by exactly one position across
searches; an assertion in `rsu.sv` checks that the two X buffers never
name the same slot, and the testbenches check that all 256 tags stay
distinct.

Timing: `in_ready` is high in the sort phase. `flush_start` is sampled
there; `done` is high on the last of the 256 flush clocks, after which the
unit is sorting again. Inputs presented while flushing are ignored. The
127 reads take the last 127 flush clocks; each result is valid one clock
after its read, so the last one is on the clock after `done`.

## Composing k sorters: linear and tree collapse

With k sorters, k scores enter per clock, one per sorter (`in_valid`
qualifies a burst clock). When the stream ends the `idle` line rises and
the sorters are collapsed into S_0, the root:

* **Linear** (`linear_sorter`): S_i inserts the word shifted out of
  S_{i+1} and S_{k-1} inserts "infinity", which pushes its whole content
  out. After n(k-1) clocks (384 by default) S_0 holds the n best of the
  stream and `data_ready` rises.
* **Tree** (`tree_sorter`, k a power of two): log2(k) rounds of n clocks.
  In round l every sorter whose index is a multiple of 2^(l+1) absorbs
  sorter i + 2^l, which is fed infinity (or the output of an already
  collapsed sorter) and so empties in n clocks. For k = 4: S_0 absorbs S_1
  while S_2 absorbs S_3, then S_0 absorbs S_2; 2n = 256 clocks. The mux
  select comes from the collapse counter.

Infinity is the all-ones score, so **real scores must stay below all ones**.
After the collapse all sorters hold; on the final collapse clock the
non-root sorters load zero instead of infinity so the next burst can start
at once, and S_0 keeps the best n across bursts (a running top n). `clr`
empties everything for a new search. `idle` must stay high until
`data_ready` rises. The result is read in parallel from `result`
(ascending, `result[n-1]` the best); `w0` is the word S_0 drops.

The shifted-out word passes combinationally through all k sorters during a
linear collapse (log2 k sorters for the tree), so the collapse clock path
grows with k.

## Choices this RTL makes

The paper gives the cell equations, the RSU organisation and the flush
sequence, but leaves a number of details open. This RTL fills them as
follows:

* Active-low asynchronous reset; scores start at zero, the lowest score.
* Handshakes are this design's: lane valids, `in_ready`, `flush_start`,
  `done`, `out_valid` for the RSU; `in_valid`, `idle`, `clr`,
  `data_ready` for the compositions.
* The RAM has synchronous read and write; the output score is registered
  to line up with the reference.
* Results leave the RSU lowest-first.
* The address recycling during the flush (above) replaces the figure's
  connection of the right sorter's input address to its own X buffer,
  which would duplicate addresses after a flush.
* The tree collapse is written for any power-of-two k from the
  trailing-zero rule above; the round number comes from comparing the
  counter with multiples of n, so n need not be a power of two.
* Non-root sorters are zeroed at the end of a collapse, as described
  above.

## Sizes and limits

* The RSU returns the best **127** pairs, not 128: stage 2 moves 128 words
  but the first is the stale X entry. Getting the best 128 or 256 needs
  `N` = 128 or 256 cells per sorter; the RAM (2(N+1) words) and the
  address width follow from `N`. `tb_rsu_workloads` runs 3000-pair
  searches at N = 127, 128 and 256.
* The RSU is fixed at two sorters (the RAM has two ports). The generic
  compositions take any k (a power of two for the tree).
* Scores are unsigned; in the compositions all ones is reserved.
* Synthesis results (area, clock rate) of this RTL have not been
  measured against the paper's FPGA figures.

## Files

| file | contents |
|---|---|
| `rtl/rsu_pkg.sv` | default sizes, RSU phase type |
| `rtl/ss_pe.sv` | one processing element |
| `rtl/shifter_sorter.sv` | n-cell shifter sorter |
| `rtl/rsu_sorter_unit.sv` | RSU sorter: cells with address tags plus X buffer |
| `rtl/rsu_dpram.sv` | reference RAM, port 0 read/write, port 1 write |
| `rtl/rsu_ctrl.sv` | RSU sequencer (sort, flush stage 1, flush stage 2) |
| `rtl/rsu.sv` | complete RSU |
| `rtl/flush_counter.sv` | collapse counter with data_ready |
| `rtl/linear_sorter.sv`, `rtl/tree_sorter.sv` | k-sorter compositions |
| `rtl/rsu_top.sv` | the three units side by side |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_rsu_top.sv` | whole design at reduced sizes, several searches and bursts |
| `tb/tb_rsu_top_full.sv` | whole design at the default sizes, one complete operation each |
| `tb/tb_rsu_workloads.sv`, `tb/rsu_search_runner.sv` | best-127, best-128 and best-256 searches on the RSU |

Every testbench compares against a model of its own (sorted queues), prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog. The
end-to-end tests also count how often each mechanism happened (lane gaps,
rejected pairs, both flush stages, ignored inputs, collapse rounds, results
kept across bursts) and fail if one never did.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/rsu_pkg.sv tb/tb_rsu.sv --top-module tb_rsu
    ./obj_dir/Vtb_rsu

Replace `tb_rsu` by any testbench name. The full-size test
(`tb_rsu_top_full`) runs in well under a second. For lint:

    verilator --lint-only -Wall -Irtl rtl/rsu_pkg.sv rtl/rsu_top.sv --top-module rsu_top

To change sizes, override the parameters of `rsu_top` (`RSU_N`, `SW`, `RW`,
`GEN_K`, `GEN_N`) or of the individual modules.
