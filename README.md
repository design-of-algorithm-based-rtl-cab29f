# Algorithm-based fault-tolerant array processors

A systolic array is fast because many simple processing elements (PEs) work
in lock-step. A single PE that computes wrong values can corrupt many
results, though, since the partial results that pass through it flow on to
its neighbours. Algorithm-based fault tolerance (ABFT) protects the matrix
*data* rather than the hardware:

- the input matrix is extended with checksum rows or columns;
- the array computes on the extended matrix as usual;
- the outputs are checked, and corrected where possible, against the
  checksums that have come through the computation.

This only works if one faulty PE can damage at most one element of each code
vector. Whether that holds depends on how the algorithm is mapped onto the
array. This design uses a linear space-time mapping that meets that
condition.

The RTL has four processors built this way, for two algorithms:

| processor | module | PEs | protection |
|---|---|---|---|
| C = A·B, 2-D array | `mm_ft_2d` | (M+2)·R | corrects one error per column of C |
| C = A·B, linear array | `mm_ft_linear` | M+2 | corrects one error per column of C |
| Givens QR, triangular array | `givens_ft_2d` | N(N+3)/2 | detects errors, per row of R |
| Givens QR, linear array | `givens_ft_linear` | N+1 | detects errors, per row of R |

`abft_array_top` puts all four side by side, each with its own ports. Clock
and active-low asynchronous reset are shared.

## Space-time mapping

Each algorithm is a three-dimensional dependence graph with one node per
index point (i, j, k). Two things decide the array:

- A **space** matrix S sends node (i, j, k) to a PE.
- A **schedule** vector W gives the node its clock cycle.

A dependence vector d becomes a link that moves over S·d PEs and takes W·d
cycles. When S·d = 0, the link becomes storage inside the PE, with W·d words.

Fault tolerance needs one more thing: the elements of a code vector (one
column of C, or one row of R) must run on different PEs. Then a single bad PE
spoils at most one element of each.

| processor | S | W | node runs at |
|---|---|---|---|
| `mm_array_2d` | PE (i, k) | [1 1 1] | i + j + k |
| `mm_array_linear` | PE i | [1 1 N] | i + j + N·k |
| `givens_array_2d` | PE (k, j), j ≥ k | [1 1 1] | i + j + k |
| `givens_linear` | PE j | [N 1 1] | N·i + j + k |

The node indices are (i, j, k). For Givens, k is the rotation level.

## Weighted checksum code (matrix multiplication)

`wcc_encoder` adds two rows under A:

- WCS1 = Σ a_i, the plain column sum;
- WCS2 = Σ 2^i·a_i, a sum weighted by powers of two.

C = A·B is linear in A, so every column of the extended product is also a
code word.

`wcc_checker` computes two syndromes:

- s1 = Σ c_i − c_WCS1
- s2 = Σ 2^i·c_i − c_WCS2

The code has distance 3. The checker decides:

| syndromes | status | action |
|---|---|---|
| s1 = s2 = 0 | `WCC_OK` | none |
| s2 = 2^p·s1, s1 ≠ 0 | `WCC_DATA_FIXED` | c_p −= s1; `out_pos` = p |
| exactly one of s1, s2 is zero | `WCC_CHECK_ERR` | data left as is (only a checksum is wrong) |
| anything else | `WCC_UNCORRECTABLE` | none |

All matrix-multiplication arithmetic is exact integer arithmetic, so the
checks are exact. The widths come from the parameters:

- A and B elements are DW-bit signed;
- coded rows are AW = DW+M bits;
- accumulators are CW = AW+DW+⌈log2 R⌉+1 bits.

With these widths nothing overflows.

## Matrix multiplication, 2-D array (`mm_ft_2d`)

Each PE (`mm_pe`) holds one element a(i,k) of the coded A. Elements of B move
down the columns and partial sums of C move right along the rows, one cycle
per PE. Each PE computes c ← c + a·b.

Around the mesh (`mm_array_2d`) the wrapper adds:

- the encoder;
- a skew line that delays column k of B by k cycles;
- a de-skew line on the outputs;
- the checker.

Using it:

- Load A with `a_load`.
- Send one column of B per cycle (`b_vld`, `b_col`). Any number of columns
  can stream back to back.
- One corrected column of C comes out R+M+2 cycles after its column of B,
  with its status.

## Matrix multiplication, linear array (`mm_ft_linear`)

Projecting along both j and k leaves M+2 PEs (`mm_lpe`):

- PE i keeps row i of the coded A in an R-word register file.
- Because W·d_c = N, each PE keeps the partial sums of row i of C in an
  N-word circulating memory.
- B is streamed row by row (N elements per row, R rows).
- Each b carries tags (k, first, last) that tell the PE when to start and
  when to finish a sum. `mm_array_linear` generates these tags.

The last node runs N·R + M + 1 cycles after the first input. A corrected
column appears M+3 cycles after its last b(R−1, j).

## Givens reduction with a checksum column

A gets one extra column: the sum of each row. Givens rotations act on whole
rows at once, so every row of the resulting triangular R still sums to its
last element. `givens_checker` flags row k when

    |r(k,N) − Σ_j r(k,j)| > TOL

A single checksum column can detect an error but not locate it. The Givens
processors only report errors: `row_err` for each row, and `any_err`.

### Fixed point and the boundary cell

The data are signed fixed point, W=32 bits with F=12 fraction bits. DW-bit
integer inputs are converted on entry.

- **Boundary PE** (`givens_bpe`, on the diagonal):
  - takes the square root of r² + x² (bit by bit, unrolled into one cycle);
  - divides to get c = r/rn and s = x/rn;
  - sends (c, s) to the right.
- **Internal PEs** (`givens_ipe`) compute
  - r ← c·r + s·x
  - x′ ← c·x − s·r

  with products rounded to nearest.

The boundary PE also updates its own r with the rounded c·r + s·x, *not*
with rn. The two agree up to rounding. But only the rotated value gets
exactly the same rounding as the other elements of the row, and that is what
keeps the checksum identity within TOL.

The default tolerance is 256 LSB (1/16). For the default sizes (8-bit
inputs, N=4) it sits far above the rounding drift.

An error added to r(k,j) changes the row sum of row k by that error. Later
rotations at level k split it between row k (factor c) and the element sent
down to the next level (factor s). An error is therefore detected if what
stays in some row exceeds TOL. Errors smaller than TOL are never detected.
If you change the sizes or F, choose TOL again.

### Triangular array (`givens_ft_2d`)

PE (k, j) for j ≥ k keeps r(k, j). Rows of A enter at the top, skewed by
column. x values move down and rotations move right, one cycle per PE.
Every row passes every level. A row that enters before level k is filled
rotates against r = 0, which just moves it into place.

Using it:

- Pulse `clear`.
- Send one row per cycle (`row_vld`, `row_in`).
- `done` fires M+2N cycles after the first row, together with `row_err` and
  `any_err`.
- `r_mat` holds R and its checksum column.

### Linear array (`givens_ft_linear`)

PE j (`givens_lpe`) runs all nodes (i, j, k) of column j. Under W = [N 1 1],
each row takes the PE for N cycles, one for each level k:

| level | PE j acts as |
|---|---|
| k = j | the boundary cell |
| k < j | an internal cell |
| k > j | idle |

The projected dependences become local storage:

- an N-word memory holds column j of R;
- a register carries x from one level to the next;
- rotations travel right with their level tag.

A row can be accepted only every N cycles. `row_rdy` gives that pace, and
an assertion in `givens_lpe` checks it. `done` fires N(M+1)+1 cycles after
the first row.

The idle slots of the triangular node space stay in this schedule. A
data-compacted version, which would fold them away to raise PE utilisation,
is not built.

## Fault-injection hooks

Each processor has `fault_*` ports that choose one PE and an XOR mask:

| processor | mask is XORed onto |
|---|---|
| matrix multipliers | the PE's result, on every cycle it computes |
| Givens arrays | the r value the PE stores |

The hooks model a PE that produces arbitrary wrong values, while the links
between PEs stay correct. Tie `fault_en` to 0 in real use. The hooks are part
of this design, not of the method.

## Where this design makes its own choices

- **Sizes and widths.** No numbers are fixed by the method. The defaults are
  in `abft_pkg`:
  - matrix multiplication: M=R=N=4, DW=8;
  - Givens: M=6, N=4, DW=8, W=32, F=12, TOL=256.
- **Linear matrix multiplier schedule.** W=[1 N 1] gives the same run time;
  [1 1 N] was taken. The sizes are general, not restricted to r = n.
- **Linear Givens schedule.** W = [N 1 1] is used: a first weight of N is the
  smallest that keeps each PE free of two nodes in the same cycle.
- **Interfaces.** Valid strobes, skew and de-skew lines, and the row pacing
  are additions for driving the arrays from a host.
- **Not built:**
  - data compaction of the linear Givens array;
  - the alternative arrays from other work, such as a p-diagonal matrix
    multiplier and another linear Givens array.

## Files

| file | content |
|---|---|
| `rtl/abft_pkg.sv` | default sizes, `wcc_status_e`, integer square root |
| `rtl/delay_line.sv` | generic valid+data delay (skew lines) |
| `rtl/wcc_encoder.sv`, `rtl/wcc_checker.sv` | weighted checksum code |
| `rtl/mm_pe.sv`, `rtl/mm_array_2d.sv`, `rtl/mm_ft_2d.sv` | 2-D matrix multiplier |
| `rtl/mm_lpe.sv`, `rtl/mm_array_linear.sv`, `rtl/mm_ft_linear.sv` | linear matrix multiplier |
| `rtl/givens_bpe.sv`, `rtl/givens_ipe.sv`, `rtl/givens_array_2d.sv`, `rtl/givens_ft_2d.sv` | triangular Givens array |
| `rtl/givens_lpe.sv`, `rtl/givens_linear.sv`, `rtl/givens_ft_linear.sv` | linear Givens array |
| `rtl/givens_checker.sv` | row-checksum test |
| `rtl/abft_array_top.sv` | the four processors side by side |
| `tb/tb_<module>.sv` | self-checking testbench for each module |

## Simulating

Every testbench checks itself against a model written inside the testbench.
It ends with the line `TB_RESULT checks=<n> failures=<n>` and has a
watchdog.

`tb_abft_array_top` runs all four processors at their default sizes. It
checks:

- clean runs;
- corrected data errors;
- checksum-only errors;
- detected Givens errors;
- row pacing.

It counts each of these and fails if any of them never happened.

With Verilator 5, list the package first:

    verilator --binary --timing -Wno-fatal -Irtl \
        rtl/abft_pkg.sv rtl/*.sv tb/tb_abft_array_top.sv \
        --top-module tb_abft_array_top
    ./obj_dir/Vtb_abft_array_top

(The package appears twice on that command line. Verilator ignores the
second copy. You can also list the files by hand.)

To test a single block, replace the testbench and top-module names. For
example, use `tb/tb_givens_linear.sv` with `--top-module tb_givens_linear`.
The testbenches use `$urandom` and need no other files.
