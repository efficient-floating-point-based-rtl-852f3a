# Floating-point block LU decomposition engine

This engine factors a large dense matrix `A` (n x n, double precision, no
pivoting) in place into a unit lower triangular `L` and an upper triangular
`U`, working on b x b blocks. Its main idea is to keep deeply pipelined
floating-point units busy every cycle. The LU array has pipelines tens of
cycles deep, and the next column of a block depends on the previous one. To
fill those pipelines, the array does not work on one block at a time. It
works on a *stack* of `S` independent blocks whose elements are interleaved
word by word. When fewer than `S` useful blocks are available, *zero
matrices* fill the empty slots. They cost cycles and energy but keep the
dependencies satisfied.

The architecture follows the block LU accelerator described in "Efficient
Floating-point based Block LU Decomposition on FPGAs" (Daga, Govindu,
Prasanna, Gangadharpalli, Sridhar). The RTL here is an independent
implementation of it. Where the description leaves the organisation open,
the choices are this design's own, and they are listed under
[Departures and limits](#departures-and-limits).

## Block algorithm

Split `A` into the diagonal block `A11` (b x b), the blocks below it (`A21`),
the blocks to its right (`A12`) and the rest (`A22`). Each iteration does
four things:

| operation | what it computes | unit |
|-----------|------------------|------|
| opLU  | `A11 = L11 U11`, the diagonal block's LU | LU array |
| opL   | `L21 = A21 U11^-1`, one block at a time | LU array |
| opU   | `U12 = L11^-1 A12`, one block at a time | LU array |
| opMMS | `A22 <- A22 - L21 U12`, for every trailing block | multiply array + subtraction PE |

It then repeats on the updated `A22`. With `nb = n/b` blocks per side,
iteration `k` (0-based) has one opLU, `r = nb-1-k` opL and `r` opU blocks,
and `r^2` opMMS block updates.

## The LU array (`lu_array`, `lu_pe1`, `lu_pe`)

The array is a ring of `B` processing elements:

```
  memory --> PE1 ==upper==> PE2 ==> PE3 ==> ... ==> PEB --+
             ^  \                                         |
             |   \--lower--> PE2 --> PE3 --> ... --> PEB  |
             +--------------------------------------------+  (return into PE1)
   results <-- PE1
```

* **PE1** (`lu_pe1`) holds the divider. Its input port forwards the incoming
  stream onto the upper path after one register. Each column comes back
  round the ring, and PE1 finishes it there.
* **PE(K+2)** (`lu_pe`, K = 0 .. B-2) holds a multiplier followed by a
  subtractor. It applies elimination step K,
  `a(i,y) <- a(i,y) - l(i,K) * u(K,y)`, to every column that passes on the
  upper path.
* The **lower path** carries the L values PE1 produces out to the PEs. Each
  PE keeps column K of L and forwards everything after one register.

**Stream order.** Blocks enter column by column. Within a column, the
elements are taken row by row, and for each row the `S` slots of the stack
follow each other: `(row 0: slot 0..S-1), (row 1: slot 0..S-1), ...`. One
word enters every clock, so a stack takes `S*B*B` cycles.

**Tags instead of central control.** Every word carries a 28-bit tag
(`blu_pkg::lu_tag_t`). The tag holds a valid bit, the operation, the stack
parity, the slot, the row and the column. Each PE's control unit decides
from the tag alone whether to latch, compute or pass. Its address generator
turns (parity, slot, row) into an address of its storage. Words that a PE
does not change are delayed by the same number of cycles, so the stream
never reorders.

**What each PE does with a word (i = row, y = column):**

| op | PE(K+2), upper path | PE1, returning word |
|----|---------------------|---------------------|
| opLU | row K of a column y > K: latch as `u(K,y)`. Rows i > K of columns y > K: subtract `lwork(i) * u`. | row y: store the pivot and output it as U. Rows i > y: divide by the pivot and output as L. Rows above y: output as U. |
| opU  | row K: latch as `u`. Rows i > K: subtract `l11(i) * u`. | output unchanged (these words are U12). |
| opL  | columns y > K: subtract `lwork(i) * u11row(y)`. | divide by the kept diagonal `u11(y,y)` and output as L. |
| zero | pass | drop |

The storage of `lu_pe` has three parts:

* `lwork[2][S][B]`: L column K of every block in the stack. It is written
  from the lower path and is double-buffered by stack parity.
* `l11[B]` and `u11row[B]`: column K of L11 and row K of U11. They are kept
  from slot 0 of the opLU stack.
* `ureg[S]`: `u(K,y)` of the column now passing, one word per slot.

opU and opL reuse the factors the PEs collected while the diagonal block
went through. So opL and opU blocks can enter right behind the opLU stack,
with no reload, and a single stack may mix them.

**The stacking rule.** Column y+1 of a block must not reach PE(K+2) before
the L values of column y of that same block have arrived there. Column y
has to travel the whole ring, through the divider and down the lower path.
Column y+1 follows it `S*B` cycles later. The condition is

```
S*B >= (B-1)*(LAT_MUL + LAT_SUB) + LAT_DIV + 1
```

With the double-precision defaults (B = 10, multiplier 12, subtractor 19,
divider 32 stages), this means 320 >= 312, so S = 32. That is the smallest
stack larger than the 31-cycle multiply-subtract latency, which is the rule
of thumb the source gives. A smaller `S` gives wrong results silently. Keep
the inequality when you change parameters.

Latency of a word from the array input to the result port:
`1 + (B-1)*(LAT_MUL+LAT_SUB) + LAT_DIV` (312 cycles at the defaults).

## The multiply array and subtraction PE (`mm_array`, `mm_pe`, `ms_pe`)

opMMS needs neither stacking nor zero padding. PE' k holds row k of U12.
Each output element `C(i,j)` is a *token* on lane A, carrying a partial sum
that starts at zero. As the token passes PE' 0, 1, ..., B-1, each PE adds its
term `L21(i,k) * U12(k,j)`. The partial sums never wait on one another, so
the deep adder pipeline causes no hazard.

Lane B runs alongside lane A, in step with it. It first preloads U12, taking
`B*B` cycles per block column. After that it delivers the **next** row of
L21 while the tokens of the current row pass. Each PE latches its element
into `lnext` and moves it to `lcur` when the first token of the next row
arrives. A sweep over `R` rows therefore takes `(R+1)*B` cycles and yields
one result per clock.

The subtraction PE takes `A22 - C`. The A22 operand is read when its token
enters the multiply array. It waits, together with its write-back address,
in a 512-entry FIFO inside `ms_pe` until the product arrives. Assertions
check the FIFO for overflow and underflow.

## Scheduling (`block_lu_ctrl`)

For each iteration, the FSM works through these phases:

1. **LU**: one stack. Slot 0 holds the diagonal block; slots 1..S-1 hold zero
   matrices.
2. **LUS**: the `r` opL and `r` opU blocks, interleaved L, U, L, U and packed
   `S` per stack. The last stack is zero-padded. Stacks follow each other
   without gaps.
3. **Drain**: wait for the LU array to empty.
4. **opMMS**: for each block column q, preload `U12(k,q)`, then sweep all
   `r*B` rows of L21 so that every block (p,q) is updated.
5. **Drain**: wait for the last subtraction result to be written.

Results are written back in place. A small table maps each (parity, slot)
pair to the block it came from. The cycle count of a run is

```
sum over iterations of  S*B^2*(1 + ceil(2r/S)) + LU_LAT + 5
                      + [r > 0] * ( r*(B^2 + (r*B + 1)*B) + B*(LAT_MUL+LAT_SUB) + LAT_SUB + 5 )
```

Here `LU_LAT` is the array latency given above. The testbenches check this
count exactly.

**Against the published figures.** The phases above run one after the
other, while the source overlaps opMMS of one iteration with the next
iteration's LU work. This engine is therefore slower than the source's
latency formula:

| n | this engine, cycles | source formula, cycles | ms at 100 MHz (this / source) |
|---|----|----|----|
| 100  | 100,426    | 41,568     | 1.00 / 0.42 |
| 300  | 1,152,946  | 876,768    | 11.5 / 8.77 |
| 500  | 4,689,466  | 4,070,368  | 46.9 / 40.7 |
| 800  | 18,155,346 | 16,783,968 | 181.6 / 167.8 |
| 1000 | 34,906,666 | 32,876,768 | 349.1 / 328.8 |

For large matrices the gap is small, because opMMS dominates and already
runs at one result per clock.

## Floating-point units (`fp_sub`, `fp_mul`, `fp_div`, `fp_recip`)

The arithmetic is IEEE-754 binary64 by default, with round-to-nearest-even.
Subnormals are read and produced as zero, and infinities and NaNs propagate.
Each unit is a combinational core followed by `LAT` register stages: 19 for
the subtractor, 12 for the multiplier and 32 for the divider, matching the
component depths the source reports. A synthesis flow is expected to retime
the cores into those stages; timing closure has not been shown. The adder in
the multiply array is `fp_sub` with the sign of the product flipped.

For single precision, the source replaces the divider with a table
reciprocator and a multiplier, and this engine does the same:

* `fp_recip` looks up an 8192 x 24-bit table addressed by the top 13
  fraction bits. Its relative error is below about 2^-14 and its latency
  is 4. The table is computed at elaboration.
* `fp_div_recip` multiplies the dividend, delayed while the table is read,
  by that reciprocal. Its default latency is 4 + 7 = 11.
* Setting `USE_RECIP = 1` together with `EXP_W = 8, MAN_W = 23` makes PE1
  use `fp_div_recip`, with `LAT_DIV` as the pair's total depth. Quotients
  are then accurate to about 2^-13 rather than correctly rounded.

## Memory and host interface (`block_mem`, `block_lu_top`)

`block_mem` holds the matrix. Word (r, c) is at address `r*NMAX + c`, and
`NMAX = 1000` gives a 1,000,000-word array. The array has four read ports
(LU stream, lane B, A22 operands, host), each with one cycle of latency. It
has three write ports (LU results, subtraction results, host). It stands in
for the external memory of the original design.

To run a decomposition:

1. While `busy` is low, write the matrix through `host_wr_*`.
2. Set `nblk = n/B` and pulse `start`.
3. Wait for the one-cycle `done` pulse.
4. Read the combined L\U matrix back through `host_rd_*`. The unit diagonal
   of L is not stored.

The `stat_*` outputs count, for the last run:

* busy cycles;
* stacks and zero-matrix slots;
* opLU, opL and opU blocks;
* opMMS block updates and U12 preloads.

### Parameters (`block_lu_top`)

| name | default | meaning |
|------|---------|---------|
| `EXP_W`, `MAN_W` | 11, 52 | floating-point format |
| `B` | 10 | block size, the number of PEs in each array (the largest that fits one FPGA in double precision, per the source) |
| `S` | 32 | stack size; must satisfy the stacking rule |
| `NMAX` | 1000 | largest matrix dimension (memory pitch) |
| `LAT_MUL`, `LAT_SUB`, `LAT_DIV` | 12, 19, 32 | pipeline depths |
| `USE_RECIP` | 0 | 1: reciprocator-plus-multiplier divider (single precision only) |

`n` must be a multiple of `B`. The matrix must be factorable without
pivoting, for example diagonally dominant.

## Verification

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_fp_sub`, `tb_fp_mul`, `tb_fp_div` | 3000 random and corner-case operands, bit-exact against the simulator's IEEE double arithmetic, plus the pipeline depth |
| `tb_fp_recip` | table contents, relative error < 2^-13, zero and infinity, latency |
| `tb_fp_div_recip` | single-precision quotients within 2^-12 of exact, signs, zero dividends, latency |
| `tb_lu_pe`, `tb_lu_pe1` | every PE rule in the table above, tags and timing |
| `tb_lu_array` | a stack of 5 independent LUs, then a stack of opL/opU blocks with zero padding, bit-exact; rate and latency |
| `tb_mm_array`, `tb_ms_pe`, `tb_block_mem` | products bit-exact and in order, FIFO pairing, memory ports |
| `tb_block_lu_top` | reduced engine (B = 4, S = 5, short pipelines), a 16 x 16 matrix end to end |
| `tb_block_lu_full` | the engine at its default parameters, a 100 x 100 matrix end to end (about 100k cycles) |
| `tb_block_lu_n1000` | default parameters, a 1000 x 1000 matrix (the largest the memory holds; 34.9M cycles, a few minutes of simulation) |
| `tb_block_lu_sp` | single precision with the reciprocator divider: n = 48, B = 4, S = 19, depths 7/12/11 (18,927 cycles). Results are compared within a tolerance of a double-precision reference. |

The end-to-end tests (shared code in `tb/tb_blu_harness.sv`) check four
things:

* A reference block LU, computed with the same order of double-precision
  operations, matches the result bit for bit.
* The operation, stack and zero-slot counts are right.
* The cycle count matches the formula above.
* Zero padding, multi-stack opL/opU phases and opMMS each occurred at least
  once.

They also print the source formula's cycle count for comparison.

Simulating with Verilator, for example:

```
verilator --binary --timing --assert --top-module tb_block_lu_full \
  -y rtl -y tb +libext+.sv rtl/blu_pkg.sv tb/tb_block_lu_full.sv
./obj_dir/Vtb_block_lu_full
```

Replace the top module and file to run another testbench. `rtl/blu_pkg.sv`
must come first.

## Departures and limits

* **No overlap of opMMS with the next iteration.** The source runs them in
  parallel; here the phases are sequential (see the cycle table).
* **opL/opU issue rate.** The source quotes `s*b^2 + s*b` cycles for them
  because of schedule conflicts. Here they cost `S*B^2` per stack, like
  opLU, because the factors are already held in the PEs.
* **PE storage.** The source gives "2 x b" words per PE. Here each elimination
  PE holds `2*S*B + 2*B + S` words, because it needs per-slot L columns for
  stacks and the kept L11/U11 factors.
* **Multiply array and subtraction PE.** The source takes the multiply array
  from earlier work and gives no detail. The two-lane chain and the FIFO
  pairing are this design's own.
* **Memory.** A single multi-port on-chip array replaces external memory and
  per-array memory banks. It is convenient for simulation, but it is not
  what an FPGA would use for a 1000 x 1000 matrix.
* **Single precision** is an elaboration option, tested at n = 48, b = 4,
  s = 19. The source's sweeps over b and s (n = 48 and n = 1000) each need
  their own elaboration and are not all run. Some points break the stacking
  rule. For example, s = 10 with b = 4 gives 40 < 69. Energy, area and
  power are not modelled.
* **No pivoting**, as in the source; subnormals flush to zero.
