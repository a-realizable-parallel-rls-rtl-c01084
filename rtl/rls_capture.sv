// rls_capture: assembles the factor leaving the last column into a matrix.
//
// The rows of [R r] leave the array as skewed streams, row i one cycle behind
// row i-1, each starting with its diagonal element. Each row has its own
// element counter and working buffer; when a row's last element (r_i) arrives
// the row is committed to a pending copy, and when the last row commits, the
// pending matrix is copied to R_out and R_valid pulses for one cycle. The
// pending copy is needed because the first rows of the next block already
// arrive before the last row of the current block has finished. Entries
// below the diagonal of R_out are zero. R_out[i][NP] is r_i.
//
// This collection is this design's way of presenting the updated factor; the
// architecture itself only makes the factor available on the last column.
module rls_capture
  import rls_pkg::*;
#(
  parameter int unsigned NP = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  rlink_t r_last [NP],
  output fx_t    R_out  [NP][NP+1],
  output logic   R_valid
);

  localparam int unsigned CW = $clog2(NP + 2);

  fx_t          work [NP][NP+1];
  fx_t          pend [NP][NP+1];
  logic [CW-1:0] col_q [NP];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      R_valid <= 1'b0;
      for (int i = 0; i < int'(NP); i++) begin
        col_q[i] <= '0;
        for (int j = 0; j <= int'(NP); j++) begin
          work[i][j]  <= '0;
          pend[i][j]  <= '0;
          R_out[i][j] <= '0;
        end
      end
    end else begin
      R_valid <= 1'b0;
      if (en) begin
        for (int i = 0; i < int'(NP); i++) begin
          if (r_last[i].valid) begin
            int j;
            j = r_last[i].first ? i : int'(col_q[i]);
            col_q[i]   <= CW'(j + 1);
            work[i][j] <= r_last[i].val;
            if (j == int'(NP)) begin
              for (int k = 0; k <= int'(NP); k++)
                pend[i][k] <= (k == int'(NP)) ? r_last[i].val : (k < i ? '0 : work[i][k]);
              if (i == int'(NP) - 1) begin
                R_valid <= 1'b1;
                for (int a = 0; a < int'(NP) - 1; a++)
                  for (int k = 0; k <= int'(NP); k++)
                    R_out[a][k] <= pend[a][k];
                for (int k = 0; k <= int'(NP); k++)
                  R_out[i][k] <= (k == int'(NP)) ? r_last[i].val : (k < i ? '0 : work[i][k]);
              end
            end
          end
        end
      end
    end
  end

endmodule
