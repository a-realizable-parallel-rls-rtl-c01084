// tb_rls_array: self-checking test of the rectangular cell array.
//
// NP = 3 parameters, NI = 5 columns (one idle phase per block, so the schedule
// with slack is covered). The testbench itself plays the sequencer and the
// skew lines: it feeds the initial factor into column 0 (row i, element j at
// advancing cycle j + i), and element t of time step c of block p into the top
// of column c at advancing cycle p*NI + t + c, with random stall cycles. After
// every advancing cycle it checks the R stream leaving every cell (the factor
// after each single update, which proves the feedback from the last column to
// the first), the rows leaving the last column, and the alpha leaving the
// bottom of each column, against the sequential reference model.
module tb_rls_array;
  import rls_pkg::*;
  import rls_ref_pkg::*;

  localparam int unsigned NP = 3;
  localparam int unsigned NI = 5;
  localparam int BLOCKS = 12;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       en;
  rlink_t     r_init    [NP];
  xlink_t     x_top     [NI];
  rlink_t     r_last    [NP];
  xlink_t     alpha_raw [NI];
  rlink_t     col_r     [NI][NP];
  cell_mode_e mode      [NI][NP];

  int checks = 0;
  int failures = 0;

  mat_t R0;
  mat_t Rref [BLOCKS][NI];     // factor after the update of column c in block p
  int   aref [BLOCKS][NI];
  vec_t xs   [BLOCKS][NI];
  int   bs   [BLOCKS][NI];

  rls_array #(.NP(NP), .NI(NI)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    automatic int g = 0;
    automatic int n_fb = 0;
    automatic int n_alpha = 0;
    mat_t R;
    // reference
    for (int i = 0; i < MAXN; i++)
      for (int j = 0; j <= MAXN; j++) R0[i][j] = 0;
    for (int i = 0; i < NP; i++)
      for (int j = i; j <= NP; j++)
        R0[i][j] = (j == i) ? to_fx(0.5) + int'($urandom_range(65536)) : int'($urandom_range(131072)) - 65536;
    R = R0;
    for (int p = 0; p < BLOCKS; p++)
      for (int c = 0; c < NI; c++) begin
        for (int t = 0; t <= MAXN; t++) xs[p][c][t] = 0;
        for (int t = 0; t <= NP; t++) xs[p][c][t] = int'($urandom_range(131072)) - 65536;
        bs[p][c] = 62000 + int'($urandom_range(3536));
        aref[p][c] = update(NP, R, xs[p][c], bs[p][c]);
        Rref[p][c] = R;
      end

    rst_n = 1'b0;
    en = 1'b1;
    foreach (r_init[i]) r_init[i] = '0;
    foreach (x_top[c]) x_top[c] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    while (g < BLOCKS * int'(NI) + 3 * int'(NP)) begin
      for (int i = 0; i < NP; i++) begin
        int j;
        j = g - i;
        r_init[i] = '0;
        if (j >= i && j <= int'(NP)) r_init[i] = '{valid: 1'b1, first: (j == i), val: R0[i][j]};
      end
      for (int c = 0; c < NI; c++) begin
        int m, p, t;
        m = g - c;
        x_top[c] = '0;
        if (m >= 0) begin
          p = m / int'(NI);
          t = m % int'(NI);
          // after the last block the factor keeps circulating: feed null updates
          if (t <= int'(NP))
            x_top[c] = (p < BLOCKS) ? '{valid: 1'b1, val: xs[p][c][t], beta: bs[p][c]}
                                    : '{valid: 1'b1, val: 0, beta: 65536};
        end
      end
      en = ($urandom_range(5) != 0);
      @(posedge clk);
      #1;
      if (en) begin
        for (int c = 0; c < NI; c++) begin
          for (int i = 0; i < NP; i++) begin
            int m, p, j;
            m = g - i - c;
            p = (m >= 0) ? m / int'(NI) : -1;
            j = (m >= 0) ? m % int'(NI) : -1;
            if (p >= 0 && p < BLOCKS && j >= i && j <= int'(NP)) begin
              check(col_r[c][i].valid && col_r[c][i].first == (j == i) &&
                    col_r[c][i].val == Rref[p][c][i][j],
                    $sformatf("block %0d col %0d R[%0d][%0d] = %0d expected %0d",
                              p, c, i, j, col_r[c][i].val, Rref[p][c][i][j]));
              check(mode[c][i] == ((j == i) ? MODE_BOUNDARY : MODE_INTERNAL), "mode");
              if (c == 0 && p > 0) n_fb++;
              if (c == int'(NI) - 1)
                check(r_last[i] == col_r[c][i], "r_last is the last column");
            end else if (p < BLOCKS) begin
              check(!col_r[c][i].valid, $sformatf("col %0d row %0d idle at g=%0d", c, i, g));
            end
          end
          begin
            int m;
            m = g - (2 * int'(NP) - 1) - c;
            if (m >= 0 && m % int'(NI) == 0 && m / int'(NI) < BLOCKS) begin
              check(alpha_raw[c].valid && alpha_raw[c].val == aref[m / int'(NI)][c],
                    $sformatf("alpha block %0d col %0d = %0d expected %0d",
                              m / int'(NI), c, alpha_raw[c].val, aref[m / int'(NI)][c]));
              n_alpha++;
            end else if (m < BLOCKS * int'(NI)) begin
              check(!alpha_raw[c].valid, "alpha idle");
            end
          end
        end
        g++;
      end
    end
    check(n_fb > 0, "feedback used");
    check(n_alpha == BLOCKS * int'(NI), $sformatf("alphas %0d", n_alpha));
    $display("feedback elements=%0d alphas=%0d", n_fb, n_alpha);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
