# Mesh sieving device for the number field sieve

This is RTL for a special-purpose circuit that runs the *sieving step* of integer
factoring with the number field sieve (NFS). It replaces the usual sieve array with a
mesh of very simple processing units that sort. Each unit holds one factor-base entry:
a prime `p`, the offset `r` of the next sieve position that `p` divides, and a flag `i`
for the side (algebraic or rational). Sort the entries by `r` and every prime dividing
the same position ends up in a contiguous run of units. Neighbour-only steps then sum
`floor(log2 p)` over each run, compare the sums with thresholds, and mark the entries of
the positions that look smooth on both sides. A second sort gathers the marked entries
into the first rows, from where they are copied to an output buffer. Every prime also
comes out with the positions it divides, so the later smoothness tests do not have to
find those primes by trial division.

The mesh never holds sieve counters. It holds only the factor base, and only local
arithmetic carries it from one subinterval to the next. The host loads data once per
sieve line (per value of `b`).

The design also has the *trial-division pipeline*. It removes the small primes, which
are too small for the mesh, from the candidate values.

## The sieving problem in the form the mesh sees it

For a fixed `b`, the line `-A <= a < A` is cut into subintervals of length `S`
(2^22 by default). An entry `(p, r, i)` states that `p` divides `F_i(a, b)` at
`a = start + r`, where `start` is the first `a` of the current subinterval. Every `p`
held in the mesh is larger than `S`, so it hits a subinterval at most once. Primes
smaller than `S` can still use the mesh as `k` entries `(k*p, r + (l-1)*p, i)` for
`l = 1..k`, with `k*p > S`. The mesh treats `k*p` like a prime, and its log is then
`floor(log2(k*p))`. The host prepares these entries. The hardware needs nothing extra
for them.

For subinterval `u` (counting from 1), a marked entry `(p, r, i)` reports the position
`a = -A + (u-1)*S + r`.

## Snake order and runs

Unit `(x, y)` is in column `x` and row `y`. The *snake order* runs left to right in even
rows and right to left in odd rows. Each unit's predecessor and successor in this order
are therefore mesh neighbours, and every step below talks only to them.

After the first sort (by the 25-bit key `r||i`, ascending), the entries for one residue
`r` form one block. The side-1 entries (`i = 0` in the RTL) come first and the side-2
entries (`i = 1`) follow. A *run* is the set of units with the same `r` and the same side.
The two runs of a residue meet in the middle of its block:

    ... | p1 p2 p3 (r, side 1) | q1 q2 (r, side 2) | ...
                         ^ run end  ^ run end

Every step is built on the same idea. The side-1 run collects its sum at its **last**
unit and the side-2 run at its **first** unit, so both sums end up next to each other.
In the RTL these two units are the *run end*. The opposite unit of each run is the
*run start*.

## One subinterval, step by step

The controller broadcasts one command per clock to every unit. Each unit works out its
own role from its coordinates and two flags. A unit has the following registers:

| register | width | meaning |
|---|---|---|
| `p`, `r` | 24 + 24 | prime (or `k*p`), offset of its next hit |
| `i`, `ok` | 1 + 1 | side, hit mark |
| `c` | 8 | log sum accumulator |
| `T1`, `T2` | 8 + 8 | thresholds |
| `rx_key` | 25 | partner key during a sort step |
| `first`, `last` | 1 + 1 | position in its run |

| step | command(s) | clocks | what happens |
|---|---|---|---|
| — | `SET_T` | 1 | thresholds into every unit |
| I | `CE_A`/`CE_B` | `2*M*(2*log2 M + 1)` | sort by `r||i`, ascending, snake order |
| II | `LOG` | 1 | `c = floor(log2 p)` |
| III | `FLAGS` | 1 | compare `r||i` with both neighbours: `first`, `last` |
| IV | `SUM` x `NREP_SUM` | 10 | run end: `c += value from upstream`; others: take it; run end sends 0 |
| V | `OK_SET`, `OK_MATCH` | 2 | run end: `ok = c > T_i`; then `ok` survives only if the other side's run end sent the same `ok||r` |
| VI | `FLAGS`, `BCAST` x `NREP_BC` | 11 | `ok` travels from the run end back through the run |
| VII | `CE_A`/`CE_B` | `2*M + 2*(M*(log2 R + 1) + R*log2 R)` | column sort by `ok||r` descending, then sort of the first `R = OUT_ROWS` rows |
| VII | (`out_we`) | 1 | first `R` rows into the output buffer |
| VIII | `SHIFT` | 1 | `r = r - S`, plus `p` if negative |

*Upstream* means the predecessor for side 1 and the successor for side 2. In step IV each
`SUM` moves the `c` values one unit towards the run end, and the run end adds what
arrives. A run of `L` units needs `L - 1` repetitions, so `NREP_SUM = 10` covers up to
11 prime factors per side. Step VI has the same limit. Longer runs give partial sums. The
mesh does not detect them.

Step V works because the two run ends of a residue are neighbours. The side-1 run end
compares its own `ok||r` with the word of its successor. The side-2 run end compares with
the word of its predecessor. If a residue has no run on the other side, the `r` values
differ and `ok` is cleared. A position is therefore marked only if both sides pass.

A compare-exchange step takes two clocks, and the 25-bit link carries a different word in
each. In the first clock each unit sends its key: `r||i` in step I, `ok||r` in step VII.
In the second clock it sends the other 25 bits (`p||ok` or `p||i`). Both units of a pair
evaluate the same comparison. On an exchange, each one takes the partner's key from
`rx_key` and the rest of the record from the link.

Run time from `start` to `done`, at the default `NREP_SUM = NREP_BC = 10`, `OUT_ROWS = 4`:

| M | clocks |
|---|---|
| 8 | 220 |
| 64 | 2220 |
| 128 | 4908 |
| 2048 (full device) | 110636 |

## Sorting: shearsort instead of Schimmler's algorithm

The intended sort is Schimmler's mesh algorithm, which needs about `8M` compare-exchange
steps. Its schedule is not reproduced here. The controller runs **shearsort** instead,
built from the same elementary step. Shearsort does `log2(M) + 1` phases of odd-even
transposition along the rows (in snake directions), with column phases between them, and
each phase has `M` steps. It is correct and simple, but it needs `(2*log2 M + 1)*M` steps.
At `M = 2048` that is 23M steps instead of about 8M, so a subinterval takes about
110,600 clocks instead of about 41,000.

Step VII first sorts only the columns. The hits then lie in the first rows, and the first
`OUT_ROWS` rows are then shear-sorted into **snake order**, not left-to-right. This order
only affects the sequence in which hits appear in the output buffer.

Swapping in Schimmler's schedule would change only `sieve_ctrl`. The units already
support row and column steps of either parity, in both directions, limited to the first
`rows_lim` rows.

## Loading and the host interface (`sieve_top`)

- **Load.** Each `ld_valid`/`ld_ready` handshake takes one `(ld_p, ld_r, ld_i)` entry.
  The controller turns it into two shift commands: `r||i`, then `p`. These push every
  entry one unit further along the snake, and the new one enters at unit (0,0). Loading
  `M*M` entries takes `2*M*M` clocks. The first entry loaded ends in the last unit.
  Unused units should be loaded with `p = 0`: their log is 0, so they add nothing to any
  sum. One may still appear in the output, with `p = 0`, if its `r` lands on a hit.
- **Run.** Pulse `start` while idle, with `t1`/`t2` valid. `busy` stays high until `done`
  pulses. The controller's assertion checks that `start` comes only while idle.
- **Result.** `rd_addr` -> `rd_data` has one clock of latency, over `OUT_ROWS*M` entries.
  Entries with `ok = 1` are the hits, and `n_hits` counts them. If a column holds more
  than `OUT_ROWS` hits, the extra ones are lost, which is the price of the shortened
  step VII.
- **Next subinterval:** pulse `start` again. **Next `b`:** reload all entries with
  `r = b*root mod p`.

## Trial-division pipeline (`trial_div_pipeline`)

Candidate values `F1(a, b)` and `F2(a, b)` enter one per clock, each with a tag.
Stage `k` holds a divisor `d_k`. If `d_k` divides the value, the stage passes on
`value / d_k`, otherwise it passes the value on unchanged. The result leaves after
`NSTAGES` clocks. The default of 12,251 stages matches the primes below 2^17 that the
mesh leaves out at `S = 2^22`. The divisors are loaded through a shift chain: pulse
`div_shift` `NSTAGES` times, last stage's divisor first. Each stage divides at most once.
To remove repeated small factors, load prime powers into extra stages: 16, 4 and 2 remove
every power of two up to 2^7. The value width of 256 bits is this design's own choice.
The pipeline does not record which divisors it removed.

## Parameters and sizes

| parameter | default | full device | note |
|---|---|---|---|
| `M` (top, mesh) | 64 | 2048 | reduced, see below |
| `S` | 2^22 | 2^22 | subinterval length |
| `OUT_ROWS` | 4 | 4 | rows copied to the output buffer |
| `NREP_SUM` | 10 | 10 | step IV repetitions |
| `NREP_BC` | 10 | not given | step VI repetitions |
| `NSTAGES` | 12251 | 12251 | trial-division stages |
| `W` | 256 | not given | trial-division value width |

The full device is a 2^11 x 2^11 mesh (4,194,304 units). It holds the roughly 4.05
million entries for primes `2^17 < p < 2^24` on both sides of a 512-bit factorisation.
`M` defaults to 64 because elaboration memory grows at least linearly with the number of
units: about 2-3 GB per tool at 64 x 64 and four times that at 128 x 128. A
4-million-unit array is far beyond what the RTL tools can handle.
The RTL itself is written for any `M` that is a power of two, `M >= OUT_ROWS`. The sub-modules `sieve_pu`,
`sieve_ctrl` and `sieve_out_buffer` keep 2048 as their default.

## Where this design goes beyond or departs from the description it follows

- Sort schedule: shearsort, not Schimmler's algorithm (see above). This costs about 2.7
  times more sort steps.
- Step VII sorts the first rows into snake order, not left-to-right.
- Step IV: the run start stores 0, not the value sent by its upstream neighbour. That
  neighbour belongs to another run, and its value would otherwise leak into this run's
  sum.
- Step VI: the run end keeps its `ok` flag. The literal rule ("store the flag of the
  successor/predecessor") would make it copy the 0 sent by a one-unit run on the other
  side.
- Entries whose `r` is beyond the current subinterval (`r >= S`) are processed like any
  other. A residue that already passes its thresholds there is reported early, and again
  when its subinterval comes.
- The `c` counter saturates at 255.
- The load path is a shift chain along the snake, 2 clocks per entry, fed by a 49-bit
  valid/ready port.
- The output buffer's hit counter `n_hits` is an addition.
- Not built: the spare rows and columns for bypassing defective units, which are only
  named. Also not built: the general-purpose processors around the pipeline (candidate
  filtering, bit-length check, cofactor factoring, the table with "to do" flags) and the
  host that computes the `(p, b*r mod p, i)` entries.
- Optional variants were left out. One stores `floor(log2 p)` as a fourth field, so that
  multiples `k*p` add the log of `p` and not of `k*p`. Others are the faster
  re-initialisation for a new `b` and the skipping of even `a` for even `b`. Here `c` is
  always computed from the stored `p` (step II).

## Files

| file | content |
|---|---|
| `rtl/sieve_pkg.sv` | widths, entry record `rec_t`, command word `cmd_t`, `floor_log2` |
| `rtl/sieve_pu.sv` | processing unit |
| `rtl/sieve_mesh.sv` | `M x M` array, neighbour wiring, first rows out |
| `rtl/sieve_ctrl.sv` | sequencer: load commands and the step I-VIII program |
| `rtl/sieve_out_buffer.sv` | output buffer |
| `rtl/sieve_top.sv` | device top |
| `rtl/trial_div_stage.sv`, `rtl/trial_div_pipeline.sv` | trial-division pipeline |
| `tb/tb_*.sv` | self-checking testbenches |

## Verification

Each testbench prints `TB_RESULT checks=N failures=F` and has a watchdog.

- `tb_sieve_pu`: every unit operation against hand-computed values. This covers both
  exchange roles and both keys, run ends versus interior units, threshold edges, and the
  step VIII update with and without wrap-around.
- `tb_sieve_mesh`: the 8x8 array driven by hand-written command sequences. It checks the
  snake load chain, sorted order and entry conservation for both keys, and the `ok` flags
  after steps II-VI against hits computed in the testbench.
- `tb_sieve_ctrl`: the command stream. It counts each command, the sort steps of each job
  with direction, key and rows limit, and parity alternation, and checks the run length.
- `tb_sieve_out_buffer`: parallel write, read-back, hit count.
- `tb_trial_div_pipeline`: 200 values with planted factors, including powers of two,
  against a software model, checking latency and tags.
- `tb_sieve_top` (M = 8, S = 64): the end-to-end test. It loads, sieves four
  subintervals, reloads and sieves two more. Each output buffer is compared with hits
  computed independently by grouping the entries in software, and the clocks from
  `start` to `done` are checked. It counts hits, one-sided near misses, multi-unit sums,
  `ok` broadcasts, wrap-arounds in step VIII, empty units and reloads, and fails if any
  of them never occurs.
- `tb_sieve_top_full`: the same end-to-end test with every parameter at its default
  (64 x 64 mesh, `S = 2^22`) and primes between 2^22 and 2^24. It takes several minutes,
  mostly to build the simulator.

To run one with verilator, for example the end-to-end test:

    verilator --binary --timing --assert -Wno-fatal \
        rtl/sieve_pkg.sv rtl/sieve_pu.sv rtl/sieve_mesh.sv rtl/sieve_ctrl.sv \
        rtl/sieve_out_buffer.sv rtl/sieve_top.sv tb/tb_sieve_top.sv \
        --top-module tb_sieve_top -o sim && ./obj_dir/sim

Verilator has only two logic states. The testbenches reset or initialise everything they
read.
