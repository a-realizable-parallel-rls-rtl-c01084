// rls_top_driver: drives and checks one rls_top of a given size.
//
// Used by tb_rls_expand to run the engine at several problem orders side by
// side. It starts the engine from a small diagonal factor, feeds BLOCKS blocks
// of random samples of a linear system through the valid/ready handshake with
// random stalls, and compares every block's alpha values and factor with the
// sequential reference model, bit for bit. After the checked blocks it keeps
// the engine fed with null updates (zero data, beta = 1), raises 'done' and
// reports its check and failure counts on its ports.
module rls_top_driver
  import rls_pkg::*;
  import rls_ref_pkg::*;
#(
  parameter int unsigned NP = 2,
  parameter int unsigned NI = NP + 1,
  parameter int BLOCKS = 30
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

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

  rls_top #(.NP(NP), .NI(NI)) dut (.*);

  mat_t Rm;
  mat_t Rref [BLOCKS];
  int   aref [BLOCKS][NI];
  vec_t xs   [BLOCKS][NI];
  int   bs   [BLOCKS][NI];
  int   gen = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL NP=%0d NI=%0d: %s", NP, NI, what);
    end
  endtask

  function automatic void gen_block();
    for (int c = 0; c < NI; c++) begin
      for (int t = 0; t <= MAXN; t++) xs[gen][c][t] = 0;
      for (int t = 0; t <= NP; t++) xs[gen][c][t] = int'($urandom_range(131072)) - 65536;
      bs[gen][c] = 60000 + int'($urandom_range(5536));
      aref[gen][c] = update(NP, Rm, xs[gen][c], bs[gen][c]);
    end
    Rref[gen] = Rm;
    gen++;
  endfunction

  initial begin
    automatic int n_alpha = 0;
    automatic int n_R = 0;
    automatic int n_stall = 0;
    checks = 0;
    failures = 0;
    done = 1'b0;
    for (int i = 0; i < MAXN; i++)
      for (int j = 0; j <= MAXN; j++) Rm[i][j] = 0;
    for (int i = 0; i < NP; i++) begin
      Rm[i][i] = to_fx(0.01);
      for (int j = 0; j <= NP; j++) init_R[i][j] = Rm[i][j];
    end
    start = 1'b0;
    in_valid = 1'b0;
    foreach (x_in[c]) begin
      x_in[c] = '0;
      beta_in[c] = '0;
    end
    @(posedge rst_n);
    @(posedge clk);
    #1 start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    forever begin
      in_valid = 1'b0;
      if (in_ready) begin
        int p;
        p = int'(blocks_started) - 1;
        while (gen <= p && gen < BLOCKS) gen_block();
        in_valid = ($urandom_range(3) != 0);
        for (int c = 0; c < NI; c++) begin
          x_in[c]    = (p < BLOCKS) ? xs[p][c][int'(phase)] : 0;
          beta_in[c] = (p < BLOCKS) ? bs[p][c] : 65536;
        end
      end
      #1;
      if (stall) n_stall++;
      if (alpha_valid) begin
        if (n_alpha < BLOCKS)
          for (int c = 0; c < NI; c++)
            check(alpha_out[c] == aref[n_alpha][c], $sformatf("alpha block %0d step %0d", n_alpha, c));
        n_alpha++;
      end
      if (R_valid) begin
        if (n_R < BLOCKS)
          for (int i = 0; i < NP; i++)
            for (int j = 0; j <= NP; j++)
              check(R_out[i][j] == Rref[n_R][i][j], $sformatf("block %0d R[%0d][%0d]", n_R, i, j));
        n_R++;
      end
      if (!done && n_alpha >= BLOCKS && n_R >= BLOCKS) begin
        check(n_stall > 0, "stalls happened");
        $display("NP=%0d NI=%0d: %0d blocks checked, %0d stall cycles", NP, NI, BLOCKS, n_stall);
        done = 1'b1;
      end
      @(posedge clk);
      #1;
    end
  end

endmodule
