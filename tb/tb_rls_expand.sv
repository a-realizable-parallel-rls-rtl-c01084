// tb_rls_expand: the same engine at several problem orders.
//
// The array grows by adding rows and columns of the one cell type; nothing
// else changes. This testbench runs three sizes side by side: one parameter
// with two columns, three parameters with six columns (so every block has two
// idle phases), and six parameters with seven columns. Each is checked
// bit-exactly, block by block, against the sequential reference model by an
// rls_top_driver.
module tb_rls_expand;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic done [3];
  int   chk  [3];
  int   fail [3];

  always #5 clk = ~clk;

  rls_top_driver #(.NP(1), .NI(2), .BLOCKS(40)) u_n1 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  rls_top_driver #(.NP(3), .NI(6), .BLOCKS(30)) u_n3 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  rls_top_driver #(.NP(6), .NI(7), .BLOCKS(30)) u_n6 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]));

  function automatic void report(input int extra_fail);
    int checks, failures;
    checks = 0;
    failures = extra_fail;
    for (int k = 0; k < 3; k++) begin
      checks += chk[k];
      failures += fail[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    report(1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done[0] && done[1] && done[2]);
    report(0);
    $finish;
  end
endmodule
