// rls_cell: the single cell type of the rectangular RLS array.
//
// Every cell of the array is this one module. It sits at one row i of the
// triangular factor [R r] and one time step (column) of the block. The row of
// [R r] arrives from the left one element per cycle, diagonal element first;
// the matching element of the data vector arrives from above in the same cycle.
//
//   Mode 1 (boundary), chosen when r_in.first is set (r = R_ii, x = phi_i):
//       r' = sqrt(beta^2 r^2 + x^2),  c = beta r / r',  s = x / r'
//     c, s and beta (taken from x_in.beta) are stored in the cell. Nothing is
//     sent downward in this cycle. If r' is zero the cell stores c = 1, s = 0.
//   Mode 2 (internal), for every later element of the row:
//       r' = beta c r + s x,          x' = c x - beta s r
//     using the stored c, s, beta; x' goes down to the next row together with
//     the stored beta.
//
// The rotation parameters therefore never travel between cells; only the
// updated elements of R (right) and the rotated data (down) do. The mode
// equations follow the cell description of the architecture; the word format,
// the zero-norm convention and the way beta reaches a cell (alongside the
// data stream) are choices of this design.
//
// Timing: one result per cycle, one cycle of latency (r_out and x_out are
// registers). 'en' is the array-wide advance signal: when it is low the cell
// holds all of its state.
module rls_cell
  import rls_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  rlink_t r_in,
  input  xlink_t x_in,
  output rlink_t r_out,
  output xlink_t x_out,
  output cell_mode_e mode_o   // mode used by the element now in r_out
);

  fx_t c_q, s_q, beta_q;

  // Mode 1 arithmetic
  fx_t br_b, rp_b, c_b, s_b;
  // Mode 2 arithmetic
  fx_t br_i, rp_i, xp_i;

  always_comb begin
    br_b = fx_mul(x_in.beta, r_in.val);
    rp_b = fx_hypot(br_b, x_in.val);
    if (rp_b == '0) begin
      c_b = FX_ONE;
      s_b = '0;
    end else begin
      c_b = fx_div(br_b, rp_b);
      s_b = fx_div(x_in.val, rp_b);
    end
  end

  always_comb begin
    br_i = fx_mul(beta_q, r_in.val);
    rp_i = fx_sat(fx2_t'(fx_mul(c_q, br_i)) + fx2_t'(fx_mul(s_q, x_in.val)));
    xp_i = fx_sat(fx2_t'(fx_mul(c_q, x_in.val)) - fx2_t'(fx_mul(s_q, br_i)));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_q    <= FX_ONE;
      s_q    <= '0;
      beta_q <= FX_ONE;
      r_out  <= '0;
      x_out  <= '0;
      mode_o <= MODE_BOUNDARY;
    end else if (en) begin
      r_out.valid <= r_in.valid;
      r_out.first <= r_in.valid && r_in.first;
      x_out.valid <= r_in.valid && !r_in.first;
      if (r_in.valid && r_in.first) begin
        c_q         <= c_b;
        s_q         <= s_b;
        beta_q      <= x_in.beta;
        r_out.val   <= rp_b;
        x_out.val   <= '0;
        x_out.beta  <= x_in.beta;
        mode_o      <= MODE_BOUNDARY;
      end else if (r_in.valid) begin
        r_out.val   <= rp_i;
        x_out.val   <= xp_i;
        x_out.beta  <= beta_q;
        mode_o      <= MODE_INTERNAL;
      end
    end
  end

  // Every element of the R row meets exactly one data element.
  a_streams_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    en |-> (r_in.valid == x_in.valid));

endmodule
