// rls_pkg: types and fixed-point arithmetic shared by the rectangular RLS array.
//
// All data (regressor elements, outputs, elements of R and r, the rotation
// parameters c and s, and the square-rooted forgetting factor beta) are signed
// two's-complement fixed-point words of FX_W bits with FX_F fractional bits
// (Q15.16 by default). Products are formed at double width and shifted back
// with an arithmetic right shift (truncation toward minus infinity); every
// result is saturated to the word range. The square root is an exact integer
// square root (floor) of a double-width sum of squares, and the divisions
// truncate toward zero. The word format is a choice of this design: the
// architecture is meant for fixed-point arithmetic but no word length is fixed.
//
// Two link types carry the systolic streams:
//   rlink_t  moves left to right along a row: one element of a row of [R r]
//            per cycle, with 'first' marking the diagonal element R_ii that
//            selects the boundary mode of the receiving cell.
//   xlink_t  moves top to bottom along a column: one element of the (partly
//            rotated) data vector [phi^T y] per cycle, together with the beta
//            of the time step that column is processing.
package rls_pkg;

  localparam int unsigned FX_W = 32;
  localparam int unsigned FX_F = 16;

  typedef logic signed [FX_W-1:0]   fx_t;
  typedef logic signed [2*FX_W-1:0] fx2_t;

  localparam fx_t FX_ONE = fx_t'(1) <<< FX_F;
  localparam fx_t FX_MAX = {1'b0, {(FX_W-1){1'b1}}};
  localparam fx_t FX_MIN = {1'b1, {(FX_W-1){1'b0}}};

  typedef struct packed {
    logic valid;
    logic first;
    fx_t  val;
  } rlink_t;

  typedef struct packed {
    logic valid;
    fx_t  val;
    fx_t  beta;
  } xlink_t;

  typedef enum logic {
    MODE_BOUNDARY = 1'b0,
    MODE_INTERNAL = 1'b1
  } cell_mode_e;

  // Saturate a double-width value to one word.
  function automatic fx_t fx_sat(input fx2_t v);
    if (v > fx2_t'(FX_MAX)) return FX_MAX;
    if (v < fx2_t'(FX_MIN)) return FX_MIN;
    return fx_t'(v);
  endfunction

  // Fixed-point product a*b.
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    fx2_t p;
    p = fx2_t'(a) * fx2_t'(b);
    return fx_sat(p >>> FX_F);
  endfunction

  // Fixed-point quotient num/den for den > 0 and |num| <= den, as it is for
  // the rotation parameters c and s. Restoring long division, one quotient
  // bit per step, truncating toward zero; the result lies in [-1.0, 1.0].
  function automatic fx_t fx_div(input fx_t num, input fx_t den);
    logic [FX_W:0]   n_abs;
    logic [FX_W:0]   d;
    logic [FX_W:0]   rem;
    logic [FX_F:0]   q;
    n_abs = num[FX_W-1] ? (FX_W+1)'(-fx2_t'(num)) : (FX_W+1)'(num);
    d     = (FX_W+1)'(den);
    q     = '0;
    rem   = n_abs;
    if (rem >= d) begin
      q[FX_F] = 1'b1;
      rem     = rem - d;
    end
    for (int k = FX_F - 1; k >= 0; k--) begin
      rem = rem << 1;
      if (rem >= d) begin
        q[k] = 1'b1;
        rem  = rem - d;
      end
    end
    return num[FX_W-1] ? -fx_t'(q) : fx_t'(q);
  endfunction

  // Floor of the square root of a double-width unsigned value: the classic
  // digit-by-digit method, one result bit per step, shifts and subtractions only.
  function automatic logic [FX_W-1:0] isqrt(input logic [2*FX_W-1:0] v);
    logic [2*FX_W-1:0] op;
    logic [2*FX_W-1:0] res;
    logic [2*FX_W-1:0] one;
    op  = v;
    res = '0;
    one = (2*FX_W)'(1) << (2*FX_W - 2);
    for (int k = 0; k < int'(FX_W); k++) begin
      if (op >= res + one) begin
        op  = op - (res + one);
        res = (res >> 1) + one;
      end else begin
        res = res >> 1;
      end
      one = one >> 2;
    end
    return FX_W'(res);
  endfunction

  // Square root of (a^2 + b^2), both fixed point, result fixed point (>= 0).
  function automatic fx_t fx_hypot(input fx_t a, input fx_t b);
    logic [2*FX_W-1:0] aa;
    logic [2*FX_W-1:0] bb;
    logic [FX_W-1:0]   rt;
    aa = (2*FX_W)'(fx2_t'(a) * fx2_t'(a));
    bb = (2*FX_W)'(fx2_t'(b) * fx2_t'(b));
    rt = isqrt(aa + bb);
    if (rt[FX_W-1]) return FX_MAX;
    return fx_t'(rt);
  endfunction

endpackage
