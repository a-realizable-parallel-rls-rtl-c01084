// rls_delay: a chain of DEPTH registers with a common advance enable.
//
// The rectangular array needs its inputs staggered and its outputs re-aligned:
// column c of the array works one cycle after column c-1, so the data vector
// for column c is delayed by c cycles on the way in, and the residual alpha
// leaving the bottom of column c is delayed by N-1-c cycles on the way out,
// so that all N residuals of a block leave together. This module is one such
// delay line for any packed type. DEPTH = 0 is a plain wire, and then the
// clock, reset and enable inputs are unused.
//
// Timing: when en is high every stage moves one place; when it is low the
// line holds, so the delay counts advancing cycles, not clock cycles.
module rls_delay #(
  parameter int unsigned DEPTH = 1,
  parameter type         T     = logic [7:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  T     d,
  output T     q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    T stage [DEPTH];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int k = 0; k < int'(DEPTH); k++) stage[k] <= '0;
      end else if (en) begin
        stage[0] <= d;
        for (int k = 1; k < int'(DEPTH); k++) stage[k] <= stage[k-1];
      end
    end
    assign q = stage[DEPTH-1];
  end

endmodule
