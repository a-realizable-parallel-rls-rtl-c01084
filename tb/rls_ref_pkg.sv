// rls_ref_pkg: independent reference model for the RLS array testbenches.
//
// It performs the square-root RLS update in the plain sequential order
// (for each time step, for each row i: generate the rotation on R_ii, then
// apply it along the row), with the same fixed-point conventions as the
// hardware: Q15.16 words, products truncated by an arithmetic shift and
// saturated, floor square root, quotients truncated toward zero, c = 1 and
// s = 0 for a zero norm. The arithmetic is written directly with 64-bit
// integers and a real-valued square root, not with the design's functions.
package rls_ref_pkg;

  localparam int MAXN = 8;
  localparam int FB   = 16;

  typedef int mat_t [MAXN][MAXN+1];
  typedef int vec_t [MAXN+1];

  function automatic int sat(input longint v);
    if (v > 64'sd2147483647) return 32'sh7fffffff;
    if (v < -64'sd2147483648) return 32'sh80000000;
    return int'(v);
  endfunction

  function automatic int mul(input int a, input int b);
    longint p;
    p = longint'(a) * longint'(b);
    return sat(p >>> FB);
  endfunction

  function automatic int div(input int a, input int b);
    longint q;
    q = (longint'(a) * 65536) / longint'(b);
    return sat(q);
  endfunction

  // floor(sqrt(v)) for 0 <= v < 2^63
  function automatic int root(input longint unsigned v);
    longint unsigned r;
    r = longint'($sqrt(real'(v)));
    while (r * r > v) r--;
    while ((r + 1) * (r + 1) <= v) r++;
    if (r > 64'h7fffffff) return 32'sh7fffffff;
    return int'(r);
  endfunction

  function automatic void boundary(input int beta, input int r, input int x,
                                   output int rp, output int c, output int s);
    int br;
    longint unsigned ss;
    br = mul(beta, r);
    ss = longint'(br) * longint'(br) + longint'(x) * longint'(x);
    rp = root(ss);
    if (rp == 0) begin
      c = 65536;
      s = 0;
    end else begin
      c = div(br, rp);
      s = div(x, rp);
    end
  endfunction

  function automatic void internal(input int beta, input int c, input int s,
                                   input int r, input int x,
                                   output int rp, output int xp);
    int br;
    br = mul(beta, r);
    rp = sat(longint'(mul(c, br)) + longint'(mul(s, x)));
    xp = sat(longint'(mul(c, x)) - longint'(mul(s, br)));
  endfunction

  // One time step: update rows 0..n-1 of R (column n holds r) with data
  // vector x[0..n] (x[n] = y); returns alpha.
  function automatic int update(input int n, inout mat_t R, input vec_t x, input int beta);
    vec_t xv;
    int c, s, rp, xp;
    xv = x;
    for (int i = 0; i < n; i++) begin
      boundary(beta, R[i][i], xv[i], rp, c, s);
      R[i][i] = rp;
      for (int j = i + 1; j <= n; j++) begin
        internal(beta, c, s, R[i][j], xv[j], rp, xp);
        R[i][j] = rp;
        xv[j]   = xp;
      end
    end
    return xv[n];
  endfunction

  function automatic int to_fx(input real v);
    return int'($floor(v * 65536.0 + 0.5));
  endfunction

  function automatic real to_real(input int v);
    return real'(v) / 65536.0;
  endfunction

endpackage
