// tb_rls_capture: self-checking test of the factor collection.
//
// Generates the skewed row streams that leave the last array column (row i,
// element j of block p at advancing cycle p*NI + j + i, diagonal first) for
// NP = 3, NI = 4 with random values and random stall cycles, and checks that
// R_valid pulses once per block, one cycle after the last element of the last
// row, with R_out equal to the block's matrix (zeros below the diagonal),
// although the next block's first rows overlap the current block's last rows.
module tb_rls_capture;
  import rls_pkg::*;

  localparam int unsigned NP = 3;
  localparam int unsigned NI = 4;
  localparam int BLOCKS = 40;

  logic   clk = 1'b0;
  logic   rst_n;
  logic   en;
  rlink_t r_last [NP];
  fx_t    R_out  [NP][NP+1];
  logic   R_valid;

  int checks = 0;
  int failures = 0;
  fx_t mats [BLOCKS][NP][NP+1];

  rls_capture #(.NP(NP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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
    automatic int seen = 0;
    automatic int expect_at = -1;
    for (int p = 0; p < BLOCKS; p++)
      for (int i = 0; i < NP; i++)
        for (int j = 0; j <= NP; j++) mats[p][i][j] = (j < i) ? 0 : fx_t'($urandom);
    rst_n = 1'b0;
    en = 1'b1;
    foreach (r_last[i]) r_last[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    while (g < BLOCKS * NI + 2 * NP + 2) begin
      // present the stream element for advancing cycle g
      for (int i = 0; i < NP; i++) begin
        r_last[i] = '0;
        for (int p = 0; p < BLOCKS; p++) begin
          int j;
          j = g - p * int'(NI) - i;
          if (j >= i && j <= int'(NP)) begin
            r_last[i].valid = 1'b1;
            r_last[i].first = (j == i);
            r_last[i].val   = mats[p][i][j];
          end
        end
      end
      en = ($urandom_range(4) != 0);
      @(posedge clk);
      if (en) begin
        // last element of the last row of some block just went in
        if (((g - 2 * (int'(NP) - 1) - 1) % int'(NI)) == 0 && g >= 2 * int'(NP) - 1 &&
            (g - 2 * (int'(NP) - 1) - 1) / int'(NI) < BLOCKS)
          expect_at = (g - 2 * (int'(NP) - 1) - 1) / int'(NI);
        g++;
      end
      #1;
      if (expect_at >= 0) begin
        check(R_valid, $sformatf("R_valid for block %0d", expect_at));
        begin
          for (int i = 0; i < NP; i++)
            for (int j = 0; j <= NP; j++)
              check(R_out[i][j] == mats[expect_at][i][j],
                    $sformatf("block %0d R[%0d][%0d]", expect_at, i, j));
          seen++;
        end
        expect_at = -1;
      end else begin
        check(!R_valid, "no spurious R_valid");
      end
    end
    check(seen == BLOCKS, $sformatf("blocks seen %0d", seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
