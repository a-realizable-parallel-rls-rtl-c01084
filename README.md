# Rectangular systolic RLS parameter estimator

This is RTL for a recursive least squares (RLS) parameter estimator built as a
rectangular systolic array of identical cells. The model is

    y(k) = theta^T phi(k) + e(k)

with an n-element regressor phi(k) and n unknown parameters theta. Rather
than keeping an inverse covariance matrix, the estimator keeps the
upper-triangular Cholesky factor R of the information matrix and the vector
r = R theta. With each new sample it updates both by an orthogonal
transformation (the "square-root" RLS update):

    Q^T(k) [ beta(k) R(k-1)   beta(k) r(k-1) ]   =   [ R(k)   r(k)     ]
           [ phi^T(k)         y(k)           ]       [ 0^T    alpha(k) ]

beta(k) is the square root of the forgetting factor. alpha(k) is the
a posteriori residual term, which some applications need more than theta
itself. Q is built from Givens rotations, one for each row of R.

The classic hardware for this update is the triangular Gentleman–Kung /
McWhirter array. That array needs two kinds of cell, and its shape is tied to
n. This design instead projects the same computation along the
column index of R. The result is an **n x N rectangle of one cell type**:

* **row i** of the array holds row i of the augmented factor `[R r]`,
* **column c** applies the update for one time step, k+c,
* the factor circulates: it leaves column N-1 after N updates and goes
  straight back into column 0.

The rotation parameters (c, s) stay inside the cell that made them. Only
updated elements of R move sideways, and only rotated data moves downward.
theta = R^-1 r is **not** computed here. `R_out` holds the factor after every
block of N samples, ready for an external back-substitution (or a Faddeev
array).

## The cell (`rls_cell`)

Every cell is the same. Each cycle it receives one element of a row of
`[R r]` from the left and one data element from above. The row always
arrives with its diagonal element first, and that element is flagged
`first`.

| mode | when | computes | stores / sends |
|---|---|---|---|
| 1, boundary | `first` (r = R_ii, x = phi_i) | r' = sqrt(beta^2 r^2 + x^2), c = beta r / r', s = x / r' | stores c, s, beta; sends r' right, nothing down |
| 2, internal | rest of the row | r' = beta c r + s x, x' = c x - beta s r | sends r' right, x' down |

If r' = 0 the cell stores c = 1 and s = 0, which is the identity rotation.
beta enters the top of each column with phi_1. It travels down the column
beside the data, and every cell latches it in mode 1. Each cell produces one
result per cycle with one cycle of latency. The square root and the two
divisions are digit-by-digit recurrences, unrolled into single-cycle
combinational logic.

## Schedule and feedback: how the rectangle works (`rls_array`)

This is the part that needs care. Number the rows i = 0..n-1, the columns
c = 0..N-1, and the elements of a factor row j = i..n (j = n is r_i). Then in
block p (time steps pN .. pN+N-1):

    element j of row i is processed by column c at cycle  p*N + j + i + c

A few facts follow from this one formula:

* **Moving right.** Row i of column c passes R_ij to column c+1, which needs
  it exactly one cycle later. The link is just the cell's output register.
* **Moving down.** Row i rotates data element j and passes it to row i+1,
  which needs it exactly one cycle later, at the same column. Row i+1 first
  sees element i+1. That element meets R_(i+1)(i+1) and starts mode 1 there.
* **Feedback.** Column N-1 hands row i element j to column 0 at cycle
  p*N + j + i + N, which is exactly the slot for block p+1. The feedback is
  therefore a plain wire from the last cell's output register, with no
  buffer. This works as long as a row's n+1-i elements fit into one block
  period, which means **N >= n+1**. The array checks this at elaboration.
* **Utilisation.** With the default N = n+1, row 0 works every cycle. Row i
  works n+1-i cycles out of n+1, so the bottom row works 2 of them. For large
  n, that is about 50 % of the array.
* **Skew.** Column c runs c cycles behind column 0. `rls_top` therefore
  delays the data of column c by c cycles on the way in. It delays alpha
  from column c by N-1-c cycles on the way out. The user presents the
  elements of a block's N samples in parallel, and gets the block's N alphas
  back together.

At start-up the initial factor enters column 0 through the same input as the
feedback: row i, element j, at cycle j + i. The two sources never carry data
in the same cycle, and an assertion checks this. After the first block only
the feedback drives that input. The engine then runs until reset.

The R stream leaving every cell is brought out (`col_r`). The factor after
every single update is therefore observable, not only the factor after each
block.

## Interface and timing (`rls_top`)

Parameters: `NP` (n, default 4) and `NI` (N, default `NP+1`).

| port | dir | meaning |
|---|---|---|
| `start` | in | pulse while idle: load `init_R` and start running |
| `init_R[i][j]` | in | initial factor. Columns i..NP-1 of row i are R, column NP is r, entries below the diagonal are ignored |
| `in_ready` | out | the engine consumes data this cycle (phases 0..NP of every block) |
| `in_valid` | in | data is present. If it is low while `in_ready` is high, the whole engine stalls for that cycle |
| `x_in[c]`, `beta_in[c]` | in | element `phase` of the data vector `[phi^T y]` of sample c of the current block (`phase` = NP is y), and that sample's beta (read in phase 0) |
| `alpha_out[c]`, `alpha_valid` | out | alpha of every sample of a block, all valid in the same cycle |
| `R_out`, `R_valid` | out | `[R r]` after every block of NI samples. `R_valid` is a one-cycle pulse |
| `phase`, `blocks_started`, `running`, `stall` | out | status |
| `col_r`, `mode` | out | R stream and mode of every cell |

One block takes NI advancing cycles, a cycle being "advancing" when it is
not stalled. If NI > NP+1, phases NP+1..NI-1 take no data. Counted in
advancing cycles, alpha appears 2*NP+NI-1 cycles after phase 0 of its block.
`R_valid` follows the last row's final element out of the last column.

All words are signed Q15.16: 32 bits, 16 of them fractional. Products
truncate (arithmetic shift) and saturate. The square root is the floor of the
exact root of a 64-bit sum of squares. Quotients truncate toward zero and
are limited to [-1, 1], as c and s always are. beta must lie in (0, 1].

## Files

| file | contents |
|---|---|
| `rtl/rls_pkg.sv` | word format, link structs `rlink_t` (R stream: valid, first, value) and `xlink_t` (data stream: valid, value, beta), mode enum, fixed-point multiply, divide and square root |
| `rtl/rls_cell.sv` | the cell |
| `rtl/rls_array.sv` | NP x NI grid with the feedback loop |
| `rtl/rls_delay.sv` | enable-gated delay line (input skew, alpha de-skew) |
| `rtl/rls_ctrl.sv` | block phase, data handshake and stall, initial factor stream |
| `rtl/rls_capture.sv` | collects the rows leaving the last column into `R_out` |
| `rtl/rls_top.sv` | the engine |
| `tb/rls_ref_pkg.sv` | independent sequential reference model (plain 64-bit integer arithmetic, real-valued square root) |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_rls_expand` |
| `tb/rls_top_driver.sv` | stimulus and checker for one `rls_top` of any size, used by `tb_rls_expand` |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M`, and each has a
cycle-count watchdog.

* `tb_rls_cell` runs random boundary/internal sequences, the zero-norm case,
  idle cycles and the hold behaviour when `en` is low.
* `tb_rls_delay` uses depths 0, 1 and 5 with a random enable.
* `tb_rls_ctrl` runs NP=3, NI=4. It checks the phase, the data requests, the
  stall/enable handshake and the initial-factor timing.
* `tb_rls_capture` drives overlapping skewed row streams, with stalls.
* `tb_rls_array` runs NP=3, NI=5, which includes an idle phase. Every
  cell's R output, every alpha and the feedback are checked bit-exactly
  against the sequential model.
* `tb_rls_top` runs at the default size (NP=4, NI=5) for 80 blocks, with
  random stalls and varying beta. Alpha and `R_out` are checked bit-exactly
  for every block, along with the alpha latency and the
  utilisation of each row (NP+1-i busy cycles out of every NI). The testbench then solves
  `R theta = r` on the final factor. The result recovers the true parameters
  (0.5, -1.25, 2.0, 0.75) to within 0.002.

* `tb_rls_expand` (with `tb/rls_top_driver.sv`) runs the same engine at
  three other sizes side by side: n=1 with N=2, n=3 with N=6 (two idle phases
  per block) and n=6 with N=7. All three are checked bit-exactly. This
  exercises the claim that the design grows simply by adding rows and
  columns of the same cell.

The array is bit-exact with the plain sequential algorithm, because every
cell performs the same operations in the same order. This is what the
testbenches rely on.

To simulate, for example the full engine:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/rls_pkg.sv tb/rls_ref_pkg.sv rtl/rls_cell.sv rtl/rls_array.sv \
      rtl/rls_delay.sv rtl/rls_ctrl.sv rtl/rls_capture.sv rtl/rls_top.sv \
      tb/tb_rls_top.sv --top-module tb_rls_top
    ./obj_dir/Vtb_rls_top

## What is fixed by the architecture and what is a choice here

Taken from the architecture:

* the cell equations of both modes;
* one cell type in an n x N rectangle;
* rows carry `[R r]` and columns carry time steps;
* rotation parameters stored in the cells;
* the last column feeding the first;
* N = n+1 as the main configuration, with its utilisation pattern;
* input skew and output re-alignment across the columns.

Choices made in this design:

* the Q15.16 word format and the rounding;
* single-cycle arithmetic;
* the `first` flag that selects the cell mode;
* beta carried down the column beside the data;
* c = 1, s = 0 for a zero norm;
* the valid/ready handshake, with a global stall;
* the start-up load through the feedback input;
* the matrix register on the output;
* a synchronous active-low reset;
* n = 4 as the default size.

The schedule uses no extra feedback delay. If N < n+1, a row no longer fits
in one block period. That case would need buffers in the feedback path, which
are not built, so the array refuses that configuration.

Not included:

* computing theta (weight flushing), which is left to a separate unit;
* the folded three-dimensional layout, which is a physical arrangement of the
  same logic;
* the triangular array, which is only the comparison baseline.

Each cell holds two 17-step dividers and a 32-step square root in
combinational logic. A real implementation would pipeline these or share
them, and would probably choose a narrower word. Both changes are local to
`rls_pkg.sv` and `rls_cell.sv`, but a pipelined cell changes the
one-cycle-per-hop schedule described above.
