// tb_rls_top: end-to-end test of the RLS update engine at its default size.
//
// A linear system y = theta^T phi + e with four known parameters is sampled
// with random regressors and small noise. The testbench starts the engine
// from a small diagonal factor and streams the data through the valid/ready
// handshake, withholding data at random to force stalls, and varies beta from
// block to block. For every block it checks all NI residual terms alpha
// (bit-exact against the sequential reference model, all valid together) and
// the factor [R r] after the block, and it measures the latency from the first
// data phase of a block to its alpha output. At the end it solves R theta = r
// by back-substitution and checks that the estimate is close to the true
// parameters. It counts the mechanisms of the design (boundary and internal
// cell modes, feedback from the last column to the first, stalls, re-aligned
// residual outputs, factor outputs) and fails if any never happened, and it
// checks the utilisation of each row: NP+1-i busy cycles out of every NI.
module tb_rls_top;
  import rls_pkg::*;
  import rls_ref_pkg::*;

  localparam int unsigned NP = 4;
  localparam int unsigned NI = 5;
  localparam int BLOCKS = 80;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       start;
  fx_t        init_R    [NP][NP+1];
  logic       in_valid;
  logic       in_ready;
  fx_t        x_in      [NI];
  fx_t        beta_in   [NI];
  fx_t        alpha_out [NI];
  logic       alpha_valid;
  fx_t        R_out     [NP][NP+1];
  logic       R_valid;
  logic       running;
  logic       stall;
  logic [31:0] blocks_started;
  logic [$clog2(NI+1)-1:0] phase;
  rlink_t     col_r     [NI][NP];
  cell_mode_e mode      [NI][NP];

  int checks = 0;
  int failures = 0;

  rls_top dut (.*);

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

  real  theta [NP] = '{0.5, -1.25, 2.0, 0.75};
  mat_t Rm;
  mat_t Rref [BLOCKS+2];
  int   aref [BLOCKS+2][NI];
  vec_t xs   [BLOCKS+2][NI];
  int   bs   [BLOCKS+2][NI];
  int   gen = 0;

  // Create the NI samples of the next block and run them through the reference.
  function automatic void gen_block();
    for (int c = 0; c < NI; c++) begin
      real yv;
      int  nz;
      nz = int'($urandom_range(2000)) - 1000;
      yv = real'(nz) / 100000.0;   // noise within +-0.01
      for (int t = 0; t <= MAXN; t++) xs[gen][c][t] = 0;
      for (int t = 0; t < NP; t++) begin
        xs[gen][c][t] = int'($urandom_range(131072)) - 65536;
        yv += theta[t] * to_real(xs[gen][c][t]);
      end
      xs[gen][c][NP] = to_fx(yv);
      bs[gen][c] = (gen % 3 == 0) ? to_fx(0.995) : to_fx(0.99);
      aref[gen][c] = update(NP, Rm, xs[gen][c], bs[gen][c]);
    end
    Rref[gen] = Rm;
    gen++;
  endfunction

  initial begin
    automatic int g = 0;              // advancing cycles since start
    automatic int n_alpha = 0, n_R = 0, n_stall = 0, n_bnd = 0, n_int = 0, n_fb = 0;
    automatic int lat_ok = 0;
    real est [NP];
    fx_t Rfin [NP][NP+1];
    automatic int busy [NP] = '{default: 0};

    for (int i = 0; i < MAXN; i++)
      for (int j = 0; j <= MAXN; j++) Rm[i][j] = 0;
    for (int i = 0; i < NP; i++) begin
      Rm[i][i] = to_fx(0.01);
      for (int j = 0; j <= NP; j++) init_R[i][j] = Rm[i][j];
    end
    rst_n = 1'b0;
    start = 1'b0;
    in_valid = 1'b0;
    foreach (x_in[c]) begin
      x_in[c] = '0;
      beta_in[c] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1 start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;

    while (n_alpha < BLOCKS || n_R < BLOCKS) begin
      // drive this cycle's inputs from the engine's block and phase
      in_valid = 1'b0;
      if (in_ready) begin
        int p;
        p = int'(blocks_started) - 1;
        while (gen <= p && gen < BLOCKS + 2) gen_block();
        if (p > BLOCKS + 1) p = BLOCKS + 1;
        in_valid = ($urandom_range(4) != 0);
        for (int c = 0; c < NI; c++) begin
          x_in[c]    = in_valid ? xs[p][c][int'(phase)] : fx_t'($urandom);
          beta_in[c] = in_valid ? bs[p][c] : fx_t'($urandom);
        end
        check(int'(phase) == g % int'(NI), "phase");
      end
      #1;
      if (stall) n_stall++;
      if (alpha_valid) begin
        if (n_alpha < BLOCKS) begin
          for (int c = 0; c < NI; c++)
            check(alpha_out[c] == aref[n_alpha][c],
                  $sformatf("alpha block %0d step %0d = %0d expected %0d",
                            n_alpha, c, alpha_out[c], aref[n_alpha][c]));
          // latency from the block's phase-0 cycle, in advancing cycles
          check(g - n_alpha * int'(NI) == 2 * int'(NP) + int'(NI) - 1,
                $sformatf("alpha latency %0d", g - n_alpha * int'(NI)));
          lat_ok++;
        end
        n_alpha++;
      end
      if (R_valid) begin
        if (n_R == BLOCKS - 1) Rfin = R_out;
        if (n_R < BLOCKS)
          for (int i = 0; i < NP; i++)
            for (int j = 0; j <= NP; j++)
              check(R_out[i][j] == Rref[n_R][i][j],
                    $sformatf("block %0d R[%0d][%0d] = %0d expected %0d",
                              n_R, i, j, R_out[i][j], Rref[n_R][i][j]));
        n_R++;
      end
      @(posedge clk);
      if (running && !stall) g++;
      #1;
      for (int c = 0; c < NI; c++)
        for (int i = 0; i < NP; i++)
          if (col_r[c][i].valid && !stall) begin
            if (col_r[c][i].first) n_bnd++; else n_int++;
            if (c == 0 && g > 2 * int'(NP)) n_fb++;
            // utilisation of column 0 over 50 whole blocks of steady state
            if (c == 0 && g > 20 * int'(NI) && g <= 70 * int'(NI)) busy[i]++;
          end
    end

    // estimate: back-substitution R theta = r on the final factor
    for (int i = NP - 1; i >= 0; i--) begin
      real acc;
      acc = to_real(Rfin[i][NP]);
      for (int j = i + 1; j < NP; j++) acc -= to_real(Rfin[i][j]) * est[j];
      est[i] = acc / to_real(Rfin[i][i]);
      $display("theta[%0d] = %f (true %f)", i, est[i], theta[i]);
      check(est[i] - theta[i] < 0.05 && theta[i] - est[i] < 0.05, $sformatf("estimate of theta[%0d]", i));
    end

    $display("alpha blocks=%0d R blocks=%0d stalls=%0d boundary=%0d internal=%0d feedback=%0d",
             n_alpha, n_R, n_stall, n_bnd, n_int, n_fb);
    // row i works NP+1-i cycles of every NI: the top row always, the bottom row 2 of NI
    for (int i = 0; i < NP; i++)
      check(busy[i] == 50 * (int'(NP) + 1 - i), $sformatf("row %0d busy %0d of 250 cycles", i, busy[i]));
    check(n_stall > 0, "stall happened");
    check(n_bnd > 0, "boundary mode happened");
    check(n_int > 0, "internal mode happened");
    check(n_fb > 0, "feedback happened");
    check(lat_ok > 0, "re-aligned alpha output happened");
    check(n_R > 0, "factor output happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
