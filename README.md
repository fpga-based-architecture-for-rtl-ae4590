# A one-candidate-per-clock testor search engine (BT algorithm)

Feature selection with testor theory starts from a Boolean *basic matrix*
(BM): each of its M rows records, for one pair of objects from different
classes, which of the N features tell the two apart (1 = dissimilar). A set of
features is a **testor** when no row is all zero on those columns: the
features then separate every such pair. An **irreducible testor** is a testor
with no proper subset that is also a testor. Finding all irreducible testors is
exponential in N, since the candidates are all 2^N feature subsets.

This design searches that space in hardware. It follows the BT ("Bottom-Top")
algorithm, which walks the subsets in binary order and skips large runs of
them that cannot hold a new irreducible testor. Every row of the matrix is
checked against the current candidate at the same time. The next candidate is
computed in the same clock, so the engine tests one candidate per cycle,
whatever the number of rows. Testors are streamed out as they are found. The
last step, dropping the testors that are not irreducible, is left to whoever
consumes the stream.

## Encoding

A candidate is an N-bit vector α = (α1, …, αN), where αj = 1 means feature j is
included. **Bit N-1 holds column 1 and bit 0 holds column N**, so the binary
order of the tuples is plain unsigned order. With this encoding, "the last 1"
of a tuple (its rightmost included column) is its **lowest set bit**. Matrix
rows use the same encoding. Row 0 is the top row.

## How the search skips candidates

The search starts at α = (0,…,0,1). At each step one of two jumps is taken.

**α is a testor → jump_1.** Adding features after the last 1 of α gives
supersets of a testor. They are testors too, but none can be irreducible. So
the search skips all of them: with p the position of the lowest set bit, the
next candidate is α + 2^p. (In column terms this is α + 2^(N-k), where k is the
column of the last 1.) Example with N = 9:
`011001000` → `011010000`, skipping the 7 tuples `011001001` … `011001111`.

**α is not a testor → jump_2.** Let v be the topmost row that is all zero on
α's columns, and let p be the lowest set bit of v. As long as the columns
before p stay as they are, the row v stays all zero until column p is
included. So the next candidate keeps α's bits above p, sets bit p and clears
every bit below it. Since v AND α = 0, bit p of α was 0, and the new candidate
is always larger. Example: α = `011001001`, v = `100100000` gives
`011100000`, skipping 31 non-testors.

**End.** The search ends when jump_1 carries out of the top bit, which means
the next tuple would come after (1,…,1). jump_2 can never carry out. There is a
second way to end, which is this design's own addition: if the failing row is
all zero, no subset at all can be a testor, so the search stops at once.

How far the jumps reach depends on the matrix. They are longer when rows with
more zeros are on top and columns with more zeros are on the right. Sorting
the matrix this way leaves the set of irreducible testors unchanged, as long
as the mapping back to the original features is kept. Sorting is done before
the matrix is built into the design.

BT visits every irreducible testor. It also visits some reducible ones. The
consumer can filter the stream as it arrives: a testor is irreducible exactly
when removing any single feature from it leaves a set that is not a testor.

## Datapath

```
              +--------------------- bt_bm ----------------------+
  cand ------>| bt_vx[0..M-1]: |(ROW_i & cand)  --AND--> is_testor |
   ^          | bt_prio_enc (first failing row) -> row mux -> v  |
   |          +---------------------------------------------------+
   |                         is_testor |        | v
   |          +------------------ bt_cand_gen --------------------+
   +----------| cand_q <= is_testor ? jump_1(cand) : jump_2(cand,v)|
              +---------------------------------------------------+
```

* **bt_vx** holds one matrix row as a constant. It reports whether the
  candidate includes at least one column where that row has a 1.
* **bt_bm** places M of those rows side by side. The candidate is a testor
  when all M rows pass. A priority encoder finds the lowest failing row index.
  That index drives a multiplexer over the constant rows, which returns v,
  much as a register file returns the word at a read address.
* **bt_jump1** and **bt_jump2** are each a priority encoder for the lowest set
  bit, plus an adder (jump_1) or a mask (jump_2).
* **bt_cand_gen** holds the candidate register and the idle/run/done state.
  It also has the multiplexer that picks the jump.
* **bt_prio_enc** is the one encoder used in all three places.

The matrix is a **parameter** (`BM_ROWS`, a packed `[M-1:0][N-1:0]` array).
It costs no flip-flops: its ones and zeros are folded into the AND gates. The
price is that a new matrix needs a new elaboration and synthesis. The only
state in the design is the candidate (N bits), two counters (N+1 bits each)
and a 2-bit state.

The critical path runs from the candidate register, through the N-input
AND/OR of each row, the M-input AND and the M-way priority encoder, the row
multiplexer and the N-bit encoder of jump_2, and back into the register. Its
depth grows with log M and log N, and there is no pipelining. Choosing one
candidate per cycle over a higher clock rate is the point of the design.

## Interface and timing (`bt_testor_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | while not busy: clear counters, load (0,…,0,1), run |
| `busy` / `done` | out | 1 | running / finished (`done` holds until the next `start`) |
| `testor_valid` | out | 1 | current candidate is a testor |
| `testor_ready` | in | 1 | consumer takes it; valid and not ready stalls the search |
| `testor` | out | N | the testor, held stable while stalled |
| `cand_count` | out | N+1 | candidates evaluated since `start` |
| `testor_count` | out | N+1 | testors handed out since `start` |

* `busy` rises in the first cycle after `start`. In that cycle the first
  candidate is already being evaluated.
* `testor_valid` and `testor` are combinational from the candidate register.
  They change one cycle after each step.
* When `testor_ready` is held high, a search takes exactly `cand_count`
  cycles. Each stall adds one cycle.
* The fraction of candidates visited is c = `cand_count` / 2^N. The run time at
  clock f is 2^N · c / f.
* An assertion checks that an offered testor stays valid and stable until it
  is taken. Another checks that candidates strictly increase.

## Parameters and default matrix

| parameter | default | meaning |
|---|---|---|
| `N` | 30 | columns (features) |
| `M` | 100 | rows |
| `BM_ROWS` | `bt_example_matrix(32'h0123_4567, 190)` | the matrix |

30 × 100 is the largest matrix in the run-time comparison usually quoted for
this architecture. Matrices of 100 columns by 100 to 300 rows have also been
built, and at 100 × 300 they fill about 71 % of the slices of a mid-size
Virtex-II Pro. Both RTL tools accept N = 100 with M = 300. Setting N and M
changes the size; nothing else in the RTL depends on it.

`rtl/bt_example_matrix.svh` holds a constant function that produces the
default matrix. It draws each bit from a 32-bit xorshift generator (shifts
13, 17, 5). A bit is 1 when the low 10 bits of the state are below the
threshold, so 190 gives about 18.6 % ones. An all-zero row is drawn again. The
rows are then sorted stably by ascending count of ones, and the columns are
ordered by descending count of ones from left to right. To search a real
matrix, pass your own `BM_ROWS`, already reduced to basic rows and sorted as
above, and keep your own map from columns back to features.

## Measured behaviour

All results below are complete searches on the pseudo-random matrices (seed
0x01234567, threshold 190). Each run matched, in candidates, testors and a
signature over all testors, an independent software run of BT on the same
matrix:

| matrix | candidates visited | c | testors | time at 50 MHz |
|---|---|---|---|---|
| 20 × 100 | 7,463 | 0.71 % | 1,909 | 0.15 ms |
| 24 × 100 | 205,247 | 1.22 % | 67,422 | 4.1 ms |
| 26 × 100 | 3,182,299 | 4.74 % | 1,113,285 | 64 ms |
| 28 × 100 | 5,576,795 | 2.08 % | 1,670,854 | 112 ms |
| 29 × 100 | 12,496,598 | 2.33 % | 4,603,377 | 250 ms |
| 30 × 100 (default) | 29,453,407 | 2.74 % | 11,215,873 | 589 ms |

Scanning all 2^30 tuples of the 30 × 100 case at one per cycle would take
21.5 s at 50 MHz. On random matrices of this size, BT has been reported to
visit about 2.4 % of the tuples, which is close to the 2.74 % seen here. The
value of c depends strongly on the data.

A matrix with fewer columns can run on the 30-column engine unchanged: pad it
with all-zero columns on the right. The first candidate lands on a zero
column, fails on the top row and jumps past all of them. No later step lands
on one again. So the padded search yields the same testors.

## Verification

Each testbench checks its results against values it computes itself and ends
with a `TB_RESULT checks=… failures=…` line.

| testbench | what it checks |
|---|---|
| `tb_bt_vx` | row test against a bit-by-bit search, corner and random candidates |
| `tb_bt_bm` | all 4096 candidates of a 12 × 20 matrix: verdict, failing row, v |
| `tb_bt_jump1` | exhaustive at N = 9, random at N = 30, carry out |
| `tb_bt_jump2` | all disjoint (α, v) pairs at N = 9 (v sampled), random at N = 30 |
| `tb_bt_cand_gen` | exact candidate sequence against a BT loop, random stalls, end on carry and on a zero row |
| `tb_bt_testor_top` | 12 × 24 end to end against brute force over all 4096 subsets |
| `tb_bt_full` | the default 30 × 100 engine, one full search (about 20 s in Verilator) |
| `tb_bt_table1` | full searches at 20…29 × 100, plus the padded 20-column case |
| `tb_bt_table2` | 100 × {100,150,200,250,300}: first 200,000 candidates, step by step |

More on `tb_bt_testor_top`:

* Every streamed value must be a testor, and the values must strictly
  increase.
* Every irreducible testor must appear in the stream.
* Filtering the stream must give exactly the brute-force set of irreducible
  testors.
* It counts each mechanism and fails if one never happens: jump_1, jump_2, a
  stall, the end by carry, the end on a zero row, and a restart.

Run one with plain Verilator from the project root, for example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/bt_pkg.sv tb/tb_bt_full.sv --top tb_bt_full -o sim
obj_dir/sim
```

## Departures and own choices

* **Testor output.** The algorithm only says to store each testor found. Here
  testors leave on a valid/ready stream, and a consumer that is not ready
  stalls the search. There is no on-chip result memory and no host-bus
  interface. The board link a host would use (for example over PCI) is not
  part of this RTL. Connect it to `start`/`busy`/`done`, the stream and the
  counters.
* **Irreducibility filtering** happens after the engine, as described above.
  It is not in the RTL.
* **Basic-matrix construction and sorting** happen in software before
  elaboration. The RTL only applies the same ordering to its own example
  matrix.
* **Own additions:**
  * start/busy/done control;
  * the two counters;
  * the end on an all-zero row;
  * a synchronous reset;
  * the `fail_row` debug output of `bt_bm`;
  * the default pseudo-random matrix.
* The flip-flop counts of an FPGA build that includes a host link will not
  match this core. The core's own state is 3N + 4 bits.
