// tb_rls_cell: self-checking test of one array cell.
//
// Drives sequences of one boundary element followed by internal elements, as
// a row of the factor would arrive, with random R, data and beta values, and
// compares the registered outputs with the reference model. Also checks the
// stream flags, the mode output, that nothing goes down in boundary mode, the
// zero-norm convention, that an idle input produces idle outputs, and that
// 'en' low freezes the cell.
module tb_rls_cell;
  import rls_pkg::*;
  import rls_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       en;
  rlink_t     r_in;
  xlink_t     x_in;
  rlink_t     r_out;
  xlink_t     x_out;
  cell_mode_e mode_o;

  int checks = 0;
  int failures = 0;
  int n_boundary = 0;
  int n_internal = 0;

  rls_cell dut (.*);

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

  function automatic int rnd(input int mag);  // uniform in [-mag, mag]
    return int'($urandom_range(2 * mag)) - mag;
  endfunction

  // Present one element, clock it in, and check the outputs against expectations.
  task automatic step(input bit first, input int r, input int x, input int beta,
                      input int exp_r, input bit exp_xv, input int exp_x, input int exp_beta);
    r_in = '{valid: 1'b1, first: first, val: r};
    x_in = '{valid: 1'b1, val: x, beta: beta};
    @(posedge clk); #1;
    check(r_out.valid && (r_out.first == first), "r_out flags");
    check(r_out.val == exp_r, $sformatf("r_out %0d expected %0d (first=%0b)", r_out.val, exp_r, first));
    check(x_out.valid == exp_xv, "x_out valid");
    if (exp_xv) begin
      check(x_out.val == exp_x, $sformatf("x_out %0d expected %0d", x_out.val, exp_x));
      check(x_out.beta == exp_beta, "x_out beta");
    end
    check(mode_o == (first ? MODE_BOUNDARY : MODE_INTERNAL), "mode");
    if (first) n_boundary++; else n_internal++;
  endtask

  initial begin
    int beta, r, x, rp, c, s, xp, len;
    rst_n = 1'b0;
    en    = 1'b1;
    r_in  = '0;
    x_in  = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int t = 0; t < 400; t++) begin
      beta = (t % 4 == 0) ? 65536 : 60000 + int'($urandom_range(5536));
      len  = 1 + int'($urandom_range(6));
      // boundary element; occasionally a zero norm
      r = (t % 37 == 5) ? 0 : int'($urandom_range(8 * 65536));
      x = (t % 37 == 5) ? 0 : rnd(4 * 65536);
      boundary(beta, r, x, rp, c, s);
      step(1'b1, r, x, beta, rp, 1'b0, 0, 0);
      for (int e = 0; e < len; e++) begin
        r = rnd(8 * 65536);
        x = rnd(4 * 65536);
        internal(beta, c, s, r, x, rp, xp);
        step(1'b0, r, x, 99, rp, 1'b1, xp, beta);
      end
      // an idle cycle now and then
      if (t % 3 == 0) begin
        r_in = '0;
        x_in = '0;
        @(posedge clk); #1;
        check(!r_out.valid && !x_out.valid, "idle output");
      end
    end

    // zero norm: c must be 1 and s 0, so an internal step passes beta*r and x through
    r_in = '{valid: 1'b1, first: 1'b1, val: 0};
    x_in = '{valid: 1'b1, val: 0, beta: 65536};
    @(posedge clk); #1;
    check(r_out.val == 0, "zero norm r'");
    r_in = '{valid: 1'b1, first: 1'b0, val: 12345};
    x_in = '{valid: 1'b1, val: -777, beta: 0};
    @(posedge clk); #1;
    check(r_out.val == 12345 && x_out.val == -777, "zero norm rotation is identity");

    // en low holds everything
    r_in = '{valid: 1'b1, first: 1'b1, val: 3 * 65536};
    x_in = '{valid: 1'b1, val: 4 * 65536, beta: 65536};
    en = 1'b0;
    @(posedge clk); #1;
    check(r_out.val == 12345 && x_out.val == -777, "hold when en is low");
    en = 1'b1;
    @(posedge clk); #1;
    check(r_out.val == 5 * 65536 && r_out.first, "3-4-5 boundary");

    check(n_boundary > 0 && n_internal > 0, "both modes exercised");
    $display("boundary=%0d internal=%0d", n_boundary, n_internal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
