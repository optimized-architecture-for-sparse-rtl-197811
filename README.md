# Sparse LU decomposition engine

This engine factorises a square matrix A into a unit lower triangular L and an
upper triangular U with partial pivoting, so that **PA = LU**. It is meant for
sparse matrices with no particular structure. It keeps the usual right-looking
Gaussian elimination, but does no work where a zero makes it unnecessary:

* a row whose entry in the pivot column is zero is not touched during that
  elimination step;
* a row that is updated is updated only in the columns where the pivot row
  has a nonzero entry;
* rows are never copied when they are interchanged: a row pointer table is
  updated instead.

The running time therefore depends on the sparsity pattern, including the
fill-in created along the way, and not only on N. The matrix is stored densely
in one on-chip memory, so every fill-in always has room.

## Interface and stream protocol

`lu_top` (parameter `N`, default 10, at most 256):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `reset` | in | 1 | clock; synchronous active-high reset |
| `input_valid`, `A_elem` | in | 1, 4 | one input element per cycle, row-major, unsigned integer 0..15 |
| `input_ready` | out | 1 | high while the engine takes input elements |
| `output_valid` | out | 1 | `L_elem`, `U_elem`, `perm_idx` valid |
| `L_elem`, `U_elem` | out | 16 | element (r,c) of L and of U, signed Q8.8 |
| `perm_idx` | out | 8 | original row index of output row r, i.e. P |
| `nnz_l`, `nnz_u`, `nnz_valid` | out | 16, 16, 1 | nonzero counts of L (unit diagonal included) and U |
| `est_l`, `est_u`, `est_valid` | out | 16, 16, 1 | symbolic upper bounds of those counts |

Operation:

1. After reset the engine is in the load phase and `input_ready` is high. Send
   the N×N elements of A in row-major order, one per cycle with
   `input_valid`. Gaps are allowed. Elements sent while `input_ready` is low
   are dropped. `input_ready` drops in the cycle after the last element.
2. Factorisation starts on its own. Its length depends on the data (see
   *Timing*).
3. The result leaves in row-major order, one position (r,c) per cycle with
   `output_valid`. `L_elem` is L(r,c): 1.0 (256) on the diagonal and 0
   above it. `U_elem` is U(r,c): 0 below the diagonal. There is no
   back-pressure on the output. `perm_idx` gives the original row of A that
   became row r.
4. One cycle after the last element, `nnz_valid` rises with the two nonzero
   counts. The engine then returns to the load phase for the next matrix.

`est_valid` rises with the two bounds while the factorisation is still
running (see *Storage estimate*). It falls when the next matrix has been
loaded.

### Number format

Every matrix word is signed 16-bit fixed point with 8 fraction bits (Q8.8:
256 = 1.0, 0xFDC0 = −2.25), so values range from −128 to +127.996. Inputs are
converted by `A << 8`. The arithmetic works as follows:

* the pivot reciprocal is `sign(P)·floor(2^24/|P|)`, where P is the raw pivot
  word. This is 1/pivot with 16 fraction bits, in a 32-bit word;
* the multiplier is `L(i,j) = (A(i,j)·recip) >>> 16`;
* the update is `A(i,k) = A(i,k) − ((L(i,j)·U(j,k)) >>> 8)`.

Every result saturates to 16 bits, and every shift truncates toward −∞.
Because of this truncation the errors are biased. Against a double-precision
factorisation with the same row order, L stays within ±0.05 on the 10×10
test matrices. The error of U grows with the size of its entries, and reaches
about 0.7 in those tests once the entries are in the tens.

## How one elimination step works

The loop controller (`lu_control`) runs the steps j = 0 … N−1. Each step has
three phases in strict sequence. Each phase starts with a one-cycle `start`
pulse and ends with that unit's `done` pulse. The phase also decides which
unit drives the matrix memory through the memory interface (`lu_mem_if`). The
units address rows *logically*. The memory interface translates each logical
row to a physical row through the row table (`lu_row_lut`), on every read and
every write.

1. **Pivot search** (`lu_pivot_search`). The unit reads A(i,j) for
   i = j … N−1, one word per cycle. It compares each magnitude as it arrives
   and keeps the largest value and its row in registers. On a tie the first
   row wins. An all-zero column gives row j and value 0.
2. **Pivot update and row interchange** (`lu_pivot_update`). On its start
   cycle the unit swaps the table pointers of rows j and p. It starts a
   restoring divider (`lu_recip_div`, 25 quotient bits, 26 cycles) on the
   pivot. While the divider runs, it reads the new row j at columns
   j+1 … N−1 and keeps only the nonzero entries: their values and their
   columns, in order. This list is the part of U that the next phase needs.
3. **Row update** (`lu_row_update`). For each row i > j the unit reads
   A(i,j):
   * If A(i,j) is zero, the row is skipped (2 cycles).
   * Otherwise it writes L(i,j) = A(i,j)·recip in place. Then it streams over
     the nonzero list of the pivot row: it reads A(i,k) one cycle and writes
     the updated word the next, one column per cycle (3 + nnz cycles per row).

A zero pivot (singular column) needs no special handling. The divider returns
0 at once. Every entry below the pivot is also zero, so every row is skipped.
After the last step the matrix memory holds L − I + U, in physical row order.
The output stream reads it back through the row table.

## Storage estimate (symbolic decomposition)

`lu_symbolic` predicts how many words L and U may need, using only the
nonzero pattern of A. Partial pivoting picks pivot rows by value, so an exact
prediction is impossible. The unit computes a bound that holds for every
possible pivot choice:

1. At step j, every row i ≥ j with a structural nonzero in column j is a
   candidate pivot row.
2. If the column cancels to zero numerically, row j stays the pivot row.
3. Every candidate row therefore receives the union of the candidates'
   patterns and of row j's pattern. No row can end up with a nonzero outside
   this union.
4. L column j is bounded by the candidate count, and by its diagonal alone if
   there is no candidate. U row j is bounded by the union from column j on.

The pattern is a table of N row words of N bits, filled from the input
stream. Step j takes three passes:

* a scan over rows j … N−1 (one row word per cycle) that forms the union and
  the candidate count;
* one cycle that adds up the bounds;
* a merge pass that ORs the union into every candidate row.

The whole bound takes about N² cycles. The unit starts when the matrix has
been loaded and works alongside the numerical phases, so for N = 10 (about
110 cycles against 300 or more) the bound is ready before any result leaves
the engine. On random 10×10 test matrices it is 0–25 % above the true L count
and 0–90 % above the true U count (for example 27/48 against 22/25 on a sparse
10×10 matrix).

## Timing

The memory has a single read port and a single write port, and the read data
arrives one cycle after the request. The cycles from the last input element
to the first output element are:

    4 + Σ_j [ (N−j+2)                      pivot search
            + max(28, N−j+2)               pivot update (N−j+2, or 2 at j=N−1,
                                           when the pivot is zero)
            + Σ_{i>j} (A(i,j)=0 ? 2 : nnz_j=0 ? 2 : 3+nnz_j)  + 1   row update
            + 3 ]                          controller hand-over

Here nnz_j is the number of nonzeros to the right of the pivot in the pivot
row, and A(i,j) are the values at step j, fill-in included. The output stream
then takes N² + 1 cycles. Measured values:

| matrix | nonzero density | cycles, last input → first output |
|---|---|---|
| 10×10 | 10–50 % | about 300–720 |
| 100×100 | 10–50 % | about 186,000–334,000 |

For 100×100 matrices, fill-in makes the later steps nearly dense. The gain
from sparsity then comes mostly from the early steps.

For the default build (N = 10), a generic synthesis gives about 690
word-level cells and 820 flip-flop bits. It also gives the 1,600-bit matrix
memory and the 160-bit pattern table of the symbolic unit.

## Files

| file | contents |
|---|---|
| `rtl/lu_pkg.sv` | word types, phase enum, memory request struct, fixed-point functions |
| `rtl/lu_top.sv` | top level, wiring of all units |
| `rtl/lu_control.sv` | step loop and phase FSM |
| `rtl/lu_mem_if.sv` | load stream, phase multiplexer, row translation, output stream |
| `rtl/lu_matrix_mem.sv` | N×N word memory, 1 synchronous read + 1 write port |
| `rtl/lu_row_lut.sv` | logical → physical row pointer table |
| `rtl/lu_pivot_search.sv` | streaming maximum-magnitude search |
| `rtl/lu_pivot_update.sv` | row interchange, reciprocal, pivot row nonzero list |
| `rtl/lu_recip_div.sv` | sequential reciprocal divider |
| `rtl/lu_row_update.sv` | sparse row skip, multipliers, pipelined multiply-subtract |
| `rtl/lu_nnz_counter.sv` | exact nonzero counts of L and U from the output stream |
| `rtl/lu_symbolic.sv` | symbolic decomposition: nonzero bound from the pattern of A |
| `tb/lu_ref_pkg.sv` | bit-exact software model, cycle model, double-precision comparison |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_lu_top` (N = 10) and `tb_lu_n100` (N = 100) end to end |

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
through a watchdog.

* `tb_lu_top` runs the default build (N = 10) on 12 random matrices. It
  covers nonzero densities of 10–50 %, with and without a guaranteed nonzero
  diagonal. The checks are:
  * every L, U and `perm_idx` word against the bit-exact model;
  * both nonzero counts, and that the symbolic bounds equal the model's
    bounds and are never below the exact counts;
  * the exact cycle count given by the formula above;
  * the L precision against double precision.

  It also counts the following events, and fails if any of them never
  happens: row interchanges, skipped rows, updated rows, zero pivots, pivot
  rows with zeros, and inputs dropped while the engine is busy.
* `tb_lu_n100` does the same for 100×100 matrices, one at each density from
  10 % to 50 %, plus one with an all-zero column.
* The unit testbenches check each module on its own against a memory model or
  stimulus models. This includes exact cycle counts for the pivot search, the
  pivot update, the row update and the symbolic unit.

Running with plain Verilator (5.x), from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/lu_pkg.sv tb/lu_ref_pkg.sv rtl/lu_*.sv tb/tb_lu_top.sv \
        --top-module tb_lu_top -o sim && ./obj_dir/sim

For another testbench, change the last file and `--top-module`. To change the
matrix size, set `N` on `lu_top`, up to 256. This is limited by the 8-bit
index type `idx_t` in `lu_pkg`. The memory grows as N² words.

## Where this design makes its own choices

The engine follows a published architecture that names five parts: memory
interface logic, pivot operation, pivot update with row interchange, row and
column update, and loop/control logic. That architecture also fixes the
16-bit L/U and 4-bit A streams, and it says how the pivot search and the row
pointer table work. The following choices are this design's own:

* **Fixed point instead of floating point.** The source describes the update
  unit as floating point, but its published result words are plainly 16-bit
  Q8.8 values, and this engine follows those. Saturation, truncation and the
  reciprocal format are also choices of this design.
* **Normalisation as a reciprocal.** The pivot is inverted once, so each
  multiplier costs one multiplication and no division.
* **Sequential units.** The three phases of a step run one after another.
  Only the pivot row fetch overlaps the division. No units run concurrently
  across steps. There is a single row update unit. The source suggests
  replicating update units as far as the FPGA allows, but gives neither their
  number nor how they share the matrix memory.
* **Dense storage.** The matrix memory is a dense N×N array. Sparsity saves
  time, not storage.
* **Symbolic decomposition.** The source names a symbolic step that
  estimates the storage of L and U, but does not say how it works. The
  structural bound described above, and running it alongside the numerical
  work, are this design's own. Because the memory is dense, the estimate only
  reaches output ports and sizes no storage.
* **Added ports.** `input_ready`, `perm_idx`, the nonzero counts and their
  bounds were added. Without `perm_idx` the permutation could not be
  recovered.
* **Clock rate.** Latencies are only given in cycles. The source's absolute
  times depend on a clock rate it does not state. Its FPGA resource and power
  figures describe its own implementation, not this RTL.
