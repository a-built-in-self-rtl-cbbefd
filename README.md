# Built-in self-repair for a word-oriented memory

A memory array with a few spare rows and spare columns can be saved when some
of its words are bad, provided the bad words can all be covered by the spares.
Deciding *which* rows and columns to replace is the repair analysis. This RTL
tests the memory, analyses the failures while the test runs, finds a repair
that uses the **fewest possible spares** (an optimal repair rate: whenever a
repair exists, it is found) after **a single test pass**, applies it, and
verifies the repaired memory.

Two ideas keep the hardware small:

* **Must-repair analysis during the test.** A row with more bad words than
  there are spare columns can only be fixed by a spare row (and the same for
  columns). Such rows and columns are committed at once; every other fault is
  kept in a small CAM, the *fault-list*. If that list overflows, no repair
  exists and the test stops early.
* **Enumerating repair strategies with a combinational circuit** instead of a
  stack-based search. A *repair strategy* is a bit string that says, for each
  still-uncovered fault met in fault-list order, whether a row (1) or a column
  (0) spare covers it. A one-cycle k-subset enumerator steps through all such
  strings; each is evaluated against the fault-list and abandoned the moment it
  fails or stops being cheaper than the best one found.

The default configuration is a 256-word memory of 8-bit words (16 rows x 16
word columns), two spare rows and two spare columns.

## One self-repair run

`start` (a one-clock pulse on `bisr_top`) launches this sequence:

| phase | what happens | clocks (default) |
|---|---|---|
| write1 | every address, 0 upward, gets the next word of the pattern generator | 256 |
| read1 | addresses are read 255 downward; the generator steps *backward* to regenerate each expected word; every mismatch goes, in the same clock, to the must-repair analyzer and to the fault log | 257 |
| analyse | `BIST_Done`; the solver searches the repair strategies | 2 ... 59 |
| repair | the solution is copied into the memory's repair registers | 2 |
| write2 / read2 | the same pattern again, now through the spares | 513 |
| done | `test_pass` = repairable and no mismatch in read2 | |

Besides the word-by-word comparison, both read passes are compacted into an
8-bit signature and compared with the signature of a defect-free memory:
`sig_ok_test` and `sig_ok_verify` report the two results.

If the analyzer finds the array unrepairable during read1 (fault-list overflow,
or a must-repair with no spare of that kind left), read1 stops at once and the
run ends with `unrepairable = 1`. While the run is active, `test_mode` switches
the memory's input multiplexer from the normal port to the test engine; after
it, the normal port sees the repaired memory. A complete repaired run at the
default size takes about 1050 clocks.

## Must-repair analyzer (`mra`)

Each fault is a (row, column) pair: the row and the word column of a failing
word. The analyzer holds two CAM pairs:

* **fault-list**: a row CAM and a column CAM, written together, with
  `FL = 2*r*c` entries (8 by default). Only faults not yet covered are kept.
* **solution record**: a row CAM of `r` entries and a column CAM of `c`
  entries. Their valid bits are the `L` registers; `L_Save` remembers the
  part committed by must-repair analysis.

For each incoming fault, in one clock:

1. If its row or column is already in the solution record
   (`R_Covered`/`C_Covered`) it is dropped; an exact repeat of a stored fault
   is dropped too.
2. Two parallel counters count the fault-list entries with the same row and
   with the same column. If `c` entries share the row, the row now has `c+1`
   uncovered faults and needs a spare row (`R_MustRepair`); if `r` entries
   share the column, it needs a spare column (`C_MustRepair`). The row (or
   column) is written into the solution record and into `L_Save`, and the
   fault-list entries it covers are invalidated, so later counts see only
   uncovered faults. If both conditions hold, the row is taken.
3. Otherwise the fault goes into the lowest free fault-list entry.

`fail` (sticky) is raised when a must-repair finds its spares used up
(`R_RedundancyFull`/`C_RedundancyFull`), or when a fault arrives and the
fault-list is full (`overflow`). The second case is safe to call unrepairable:
after must-repair analysis, no row holds more than `c` uncovered faults and no
column more than `r`, so `r` rows and `c` columns can cover at most `2rc`
faults.

During the final analysis an address counter inside the analyzer walks the
fault-list, one entry per clock. For the current entry it reports `ent_valid`,
`ent_last`, `R_Covered`, `C_Covered` and the redundancy-full flags, and it obeys
three commands from the solver: `R_Insert` / `C_Insert` add the entry's row /
column to the solution record, and `RESTART` restores `L` from `L_Save` (back
to the must-repair solution) and returns the counter to entry 0.

## Solver and repair strategies (`solver`, `ksubset_enum`)

With `ur` rows and `uc` columns already committed, `k = (r-ur) + (c-uc)`
spares are free, and a strategy is a `k`-bit string with `r-ur` ones. For
`r = c = 2` and nothing committed, the strategies in evaluation order are

| strategy | bits |
|---|---|
| RRCC | 1100 |
| RCRC | 1010 |
| RCCR | 1001 |
| CRRC | 0110 |
| CRCR | 0101 |
| CCRR | 0011 |

The first one puts all rows first; `ksubset_enum` produces the next one
combinationally: it takes the lowest 1 that has a 0 directly below it (found
with a prefix-OR network), moves it down one place, and packs all 1s below it
right under it. When there is no such 1, the strategy is the last.

Evaluation of one strategy walks the fault-list. Every valid entry that the
solution record does not already cover consumes the next strategy bit
(most significant first) and is covered by its row or column. The cost counter
starts at `ur + uc` and counts insertions. The strategy fails, and `RESTART`
is issued in the same clock so the next strategy starts on the next clock, if

* it has no bit left, or it picks a spare type that is already full, or
* the new cost would not be below the best cost so far (`Better` drops).

A strategy that reaches the last entry is the best so far: it and its cost are
saved (`RepairStrategyOpt`, `UsedRepairElOpt`, which starts at `r+c+1`). Only
the strategy is stored, not the solution, so after the last strategy a
**recovery** pass loads the saved strategy and evaluates it once more, without
the cost test. The solution record then holds the optimal repair, and
`BISR_Done` is raised (with `Unrepairable` if no strategy succeeded).

A failing strategy costs one clock per entry visited, so the analysis needs at
most `2 + C(k, r-ur) * FL + FL + 1` clocks: 59 at the default size.

Example (the case the testbench calls "example"): bit 0 is wrong in words 14,
9 and 4. All three are in row 0. The first two enter the fault-list; the third
finds two entries in its row (`= c`) and row 0 becomes a must-repair. The
fault-list is then empty, the first strategy succeeds at cost 1, and row 0 is
replaced by spare row 0. The fault log reads 14, 9, 4.

## Pattern generator (`bs_lfsr`)

An 8-stage Fibonacci LFSR (taps x^8 + x^6 + x^5 + x^4 + 1, period 255, seed
`0011_0010`) followed by a swap stage: when stage 4 is 0, the outputs of
stages 1 and 2 are exchanged; when it is 1 they pass unchanged. The
swap is meant to lower the number of transitions in the applied patterns
(a power saving; the testbenches do not measure it).
The state can step backward as well as forward, which lets the read pass run
from the top address down without storing the patterns.

## Precomputation CAM (`pb_cam`)

All four CAMs of the analyzer are precomputation-based CAMs. Each entry stores,
next to its word, a short parameter of it (here the number of ones). A search
first compares the key's parameter with all stored parameters and performs the
full-width comparison only for entries whose parameter matched; `param_hit`
shows which entries got that far. The match result is that of an ordinary CAM;
the benefit is fewer wide comparisons.

## Memory with spares (`repairable_mem`) and the other blocks

* `repairable_mem`: the 16 x 16 array of 8-bit words, two spare rows (each
  replaces all 16 words of a row) and two spare word columns (each replaces one
  word position in all rows, so a word with several bad bits needs one spare).
  Where a repaired row and a repaired column cross, the spare row is used.
  Writes are synchronous, reads return data one clock later. The `inj_*`
  inputs force chosen bits of chosen main-array words to a stuck value on
  read: they model physical defects for simulation and are not meant for a
  real chip (tie `inj_en` to 0 there).
* `mem_bist`: the test controller, pattern sequencing and word comparator.
* `signature_analyzer`: output response compactor, golden signature and
  comparator. A multiple-input signature register (same polynomial as the
  pattern generator) folds every word of a read pass into 8 bits. The golden
  signature is a constant worked out during elaboration by replaying the
  defect-free test: the generator's words, read back from the top address
  down. Compaction is lossy, and one signature cannot say *where* a fault is.
  So it only gives a pass/fail status per pass. The fault addresses for repair
  come from the word comparator.
* `input_mux`: normal port vs. test engine in front of the memory.
* `fault_log`: sixteen 8-bit registers that record the failing addresses of
  the first pass in order of detection, readable afterwards through
  `fl_rd_idx` / `fl_rd_addr`.
* `parallel_counter`: the one-counting adder tree used by the analyzer.
* `bisr_pkg`: shared sizes, the request struct and the state enums.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `ROW_W`, `COL_W` | 4, 4 | row and word-column address bits (8-bit word address) |
| `DATA_W` | 8 | word width (also the LFSR length) |
| `R`, `C` | 2, 2 | spare rows and spare columns; the fault-list has `2*R*C` entries |
| `NF` | 16 | stuck-at defect entries of the simulation model |
| `LOG_N` | 16 | fault log registers |

The LFSR taps and seed live in `bisr_pkg`; a different `DATA_W` needs matching
taps with the last stage tapped.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/bisr_pkg.sv tb/tb_bisr_top.sv --top-module tb_bisr_top -o sim
./obj_dir/sim
```

Replace `tb_bisr_top` with any other testbench in `tb/`. The simulator should
start registers at random values (the designs reset what they read; the
memory arrays are written before they are read).

What the testbenches check:

* `tb_bisr_top` (whole design, default sizes): a clean memory, the three-word
  example above, a column must-repair with a covered fault, fault-list overflow
  with early stop, an array only the search can prove unrepairable, and 40
  random defect sets. An exhaustive search in the testbench gives the minimum
  number of spares, which must equal the design's cost; the repair must cover
  every visible fault, the verify pass must be clean, and the normal port must
  read back data written to a repaired word. A clean first pass must give the
  golden signature, a pass with one wrong word must not, and every repaired
  verify pass must. Each mechanism must occur.
* `tb_solver`: 400 random fault sets through analyzer and solver, checked
  against the exhaustive search, including the analysis-time bound.
* `tb_mra`, `tb_mem_bist`, `tb_bs_lfsr`, `tb_ksubset_enum`, `tb_pb_cam`,
  `tb_parallel_counter`, `tb_fault_log`, `tb_repairable_mem`, `tb_input_mux`,
  `tb_signature_analyzer`:
  the blocks on their own, against independent models (the exact table of
  strategies, a bit-level LFSR model over a full period, reference CAM arrays,
  exact BIST timing of 2*256+2 clocks to `BIST_Done`, every single-word
  corruption of a compacted pass, and so on).

## How this relates to the original description

Taken from it: the analyzer's structure (fault-list and solution-record CAM
pairs, `2rc` fault-list entries, the `= c` / `= r` must-repair tests with
parallel counters, `L` and `L_Save`, covered and redundancy-full signals), the
solver's registers and signals (`RESTART`, `R_Insert`, `C_Insert`, `Better`,
the first-strategy and k-subset enumerator blocks, recovery by re-evaluating
the stored strategy), the order of the repair strategies, early termination on
overflow, the bit-swapping LFSR with select-0-means-swap, the precomputation
CAM, 8-bit words and addresses, sixteen fault address registers, the two
write/read passes and the descending read order, and the compactor, golden
signature and comparator of the basic self-test structure.

Choices made here, where the description is silent:

* the 4/4 split of the address into row and word column, and spare columns
  that replace whole word columns (the description claims support for
  word-oriented memories without saying how);
* invalidating covered fault-list entries, dropping repeated faults, and
  giving a row must-repair precedence over a column one;
* the strategy bit order, skipping of empty fault-list entries, and omitting
  the cost test in the recovery pass;
* the LFSR polynomial and the swap and select stage positions; backward
  stepping of the LFSR;
* the ones-count parameter of the precomputation CAM;
* the compactor type and polynomial, one signature per read pass, and
  computing the golden signature at elaboration;
* the phase sequencing, one-clock memory read latency, the stuck-at defect
  model, and the behaviour of the fault log when full.

Not built: the scan-chain ordering that the description pairs with the
bit-swapping LFSR for logic circuits. The power (373 mW vs. 113 mW) and minimum-period (8.313 ns vs.
2.872 ns) figures reported for an FPGA implementation were not reproduced.
