// rls_top: rectangular systolic RLS update engine (square-root, Givens form).
//
// The engine keeps the upper-triangular Cholesky factor R of the information
// matrix and the vector r = R*theta, and updates them with one data vector
// phi(k), output y(k) and square-rooted forgetting factor beta(k) per time step:
//     Q^T [beta R(k-1)  beta r(k-1); phi^T(k)  y(k)] = [R(k)  r(k); 0  alpha(k)]
// A block of NI time steps is applied by the NI columns of an NP x NI array
// of identical cells (rls_array). The factor circulates: it enters column 0,
// gains one update per column, leaves column NI-1 as R(k+NI-1) and is fed
// straight back into column 0 for the next block. The parameter estimate
// theta = R^-1 r is not computed here; R_out / R_valid present the factor
// after every block for an external back-substitution.
//
// Interface (one block = NI advancing cycles):
//   start            pulse while idle: load init_R (row i: R_i,i..R_i,NP-1 in
//                    columns i..NP-1, r_i in column NP) and begin running.
//   in_ready         the engine consumes a data element this cycle. In phase
//                    t (0..NP) of a block, x_in[c] must hold element t of the
//                    data vector [phi^T y] of time step c of the block (t = NP
//                    is y), and beta_in[c] the beta of that time step (read in
//                    phase 0). in_valid low while in_ready is high stalls the
//                    whole engine for that cycle.
//   alpha_out[c]     alpha of time step c of a block; all NI values are valid
//                    together while alpha_valid is high.
//   R_out, R_valid   the factor [R r] after each block of NI updates.
// Inputs to column c are delayed by c cycles and outputs of column c by
// NI-1-c cycles, so the array's diagonal wavefront is hidden from the user.
// The cell array, its schedule, the feedback and the input skew / output
// re-alignment follow the rectangular architecture; the handshake with its
// global stall, the start-up load and the matrix output are choices of this
// design, as are the default NP = 4 and the word format.
// Latency from phase 0 of a block to alpha_valid is 2*NP+NI-1 advancing cycles.
module rls_top
  import rls_pkg::*;
#(
  parameter int unsigned NP = 4,       // number of parameters n
  parameter int unsigned NI = NP + 1   // columns N = updates per block
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  fx_t    init_R    [NP][NP+1],
  input  logic   in_valid,
  output logic   in_ready,
  input  fx_t    x_in      [NI],
  input  fx_t    beta_in   [NI],
  output fx_t    alpha_out [NI],
  output logic   alpha_valid,
  output fx_t    R_out     [NP][NP+1],
  output logic   R_valid,
  output logic   running,
  output logic   stall,
  output logic [31:0] blocks_started,
  output logic [$clog2(NI+1)-1:0] phase,
  output rlink_t col_r     [NI][NP],
  output cell_mode_e mode  [NI][NP]
);

  logic   en;
  logic   need_data;
  rlink_t r_init    [NP];
  rlink_t r_last    [NP];
  xlink_t x_top     [NI];
  xlink_t alpha_raw [NI];
  xlink_t alpha_al  [NI];

  rls_ctrl #(.NP(NP), .NI(NI)) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .start          (start),
    .init_R         (init_R),
    .in_valid       (in_valid),
    .need_data      (need_data),
    .en             (en),
    .running        (running),
    .phase          (phase),
    .r_init         (r_init),
    .blocks_started (blocks_started),
    .stall          (stall)
  );

  assign in_ready = need_data;

  for (genvar c = 0; c < NI; c++) begin : g_io
    xlink_t x_raw;
    always_comb begin
      x_raw.valid = need_data && in_valid;
      x_raw.val   = x_in[c];
      x_raw.beta  = beta_in[c];
    end

    rls_delay #(.DEPTH(c), .T(xlink_t)) u_skew (
      .clk (clk), .rst_n (rst_n), .en (en), .d (x_raw), .q (x_top[c])
    );

    rls_delay #(.DEPTH(NI - 1 - c), .T(xlink_t)) u_deskew (
      .clk (clk), .rst_n (rst_n), .en (en), .d (alpha_raw[c]), .q (alpha_al[c])
    );

    assign alpha_out[c] = alpha_al[c].val;
  end

  // The re-aligned residuals of a block are valid together; column 0 stands for all.
  assign alpha_valid = alpha_al[0].valid && en;

  rls_array #(.NP(NP), .NI(NI)) u_array (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (en),
    .r_init    (r_init),
    .x_top     (x_top),
    .r_last    (r_last),
    .alpha_raw (alpha_raw),
    .col_r     (col_r),
    .mode      (mode)
  );

  rls_capture #(.NP(NP)) u_capture (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (en),
    .r_last  (r_last),
    .R_out   (R_out),
    .R_valid (R_valid)
  );

  for (genvar c = 1; c < NI; c++) begin : g_chk
    a_alpha_aligned: assert property (@(posedge clk) disable iff (!rst_n)
      en |-> (alpha_al[c].valid == alpha_al[0].valid));
  end

endmodule
