// tb_rls_delay: self-checking test of the enable-gated delay line.
//
// Three instances (depths 0, 1 and 5) are fed the same random byte stream
// with a randomly toggling enable. A queue per depth models the line: it
// shifts only on enabled cycles, and the output must equal the value that
// entered DEPTH enabled cycles earlier (zero before that, after reset).
module tb_rls_delay;
  logic       clk = 1'b0;
  logic       rst_n;
  logic       en;
  logic [7:0] d;
  logic [7:0] q0, q1, q5;

  int checks = 0;
  int failures = 0;

  rls_delay #(.DEPTH(0), .T(logic [7:0])) u0 (.clk, .rst_n, .en, .d, .q(q0));
  rls_delay #(.DEPTH(1), .T(logic [7:0])) u1 (.clk, .rst_n, .en, .d, .q(q1));
  rls_delay #(.DEPTH(5), .T(logic [7:0])) u5 (.clk, .rst_n, .en, .d, .q(q5));

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
    logic [7:0] m1 [$];
    logic [7:0] m5 [$];
    automatic int holds = 0;
    rst_n = 1'b0;
    en = 1'b1;
    d = '0;
    m1 = {8'd0};
    m5 = {8'd0, 8'd0, 8'd0, 8'd0, 8'd0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      d  = 8'($urandom);
      en = ($urandom_range(3) != 0);
      #1;
      check(q0 == d, "depth 0 is a wire");
      check(q1 == m1[0], $sformatf("depth 1: %0d expected %0d", q1, m1[0]));
      check(q5 == m5[0], $sformatf("depth 5: %0d expected %0d", q5, m5[0]));
      @(posedge clk);
      if (en) begin
        void'(m1.pop_front()); m1.push_back(d);
        void'(m5.pop_front()); m5.push_back(d);
      end else holds++;
      #1;
    end
    check(holds > 0, "enable low occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
