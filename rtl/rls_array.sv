// rls_array: the rectangular systolic array of NP rows by NI columns.
//
// Row i (0-based) of the array holds row i of the augmented factor [R r]
// in flight: its NP+1-i elements R_ii .. R_i,NP-1, r_i stream from left to
// right, one element per cycle, diagonal first. Column c applies the update of
// one time step k+c: the data vector [phi^T(k+c) y(k+c)] enters row 0 from
// the top, one element per cycle, and each row passes the rotated remainder
// down to the next. Below the last row only one element per time step is
// left: alpha(k+c), the a posteriori residual term.
//
// Schedule (cycles counted in advancing cycles, block p of NI time steps):
//   element j of row i is processed by column c at cycle p*NI + j + i + c.
// Column NI-1's output of row i is fed straight back into column 0 of row i,
// which reaches it exactly one block period (NI cycles) later. The feedback
// path is one register (the cell output) and needs no buffer as long as
// NI >= NP+1; with NI = NP+1 the top row is busy every cycle and row i is busy
// NP+1-i cycles out of NI.
//
// Ports: r_init[i] carries the initial R(k-1), r(k-1) into column 0 during the
// first block (it must be idle whenever the feedback carries data); x_top[c]
// is the already staggered data stream of column c; r_last[i] is row i leaving
// column NI-1, i.e. the factor after every NI updates; alpha_raw[c] is the
// bottom of column c (valid once per block, not re-aligned); col_r[c][i] gives
// the R stream leaving every cell, so intermediate factors can be observed.
module rls_array
  import rls_pkg::*;
#(
  parameter int unsigned NP = 4,       // number of parameters n
  parameter int unsigned NI = NP + 1   // columns N: updates per pass
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  rlink_t r_init    [NP],
  input  xlink_t x_top     [NI],
  output rlink_t r_last    [NP],
  output xlink_t alpha_raw [NI],
  output rlink_t col_r     [NI][NP],
  output cell_mode_e mode  [NI][NP]
);

  // ro[c][i]: R stream leaving column c, row i. xv[r][c]: data entering row r of column c.
  rlink_t ro [NI][NP];
  rlink_t fb [NP];
  xlink_t xv [NP+1][NI];

  // Feedback loop: the last column's output re-enters column 0.
  for (genvar i = 0; i < NP; i++) begin : g_feedback
    assign fb[i]     = ro[NI-1][i].valid ? ro[NI-1][i] : r_init[i];
    assign r_last[i] = ro[NI-1][i];

    a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
      en |-> !(ro[NI-1][i].valid && r_init[i].valid));
  end

  for (genvar c = 0; c < NI; c++) begin : g_col
    assign xv[0][c]     = x_top[c];
    assign alpha_raw[c] = xv[NP][c];
    for (genvar i = 0; i < NP; i++) begin : g_row
      rls_cell u_cell (
        .clk    (clk),
        .rst_n  (rst_n),
        .en     (en),
        .r_in   ((c == 0) ? fb[i] : ro[(c == 0) ? 0 : c-1][i]),
        .x_in   (xv[i][c]),
        .r_out  (ro[c][i]),
        .x_out  (xv[i+1][c]),
        .mode_o (mode[c][i])
      );
      assign col_r[c][i] = ro[c][i];
    end
  end

  initial begin
    assert (NI >= NP + 1)
      else $error("rls_array: NI must be at least NP+1 for the feedback without buffers");
  end

endmodule
