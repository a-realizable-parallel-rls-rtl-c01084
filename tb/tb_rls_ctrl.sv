// tb_rls_ctrl: self-checking test of the sequencer.
//
// With NP = 3 and NI = 4 (one idle phase per block) the test starts the
// controller and, cycle by cycle, checks against a counting model: the phase
// and block count, need_data only in phases 0..NP, the stall/enable handshake
// when in_valid is withheld, and the initial-factor stream (row i, element j
// at advancing cycle j + i after start, diagonal marked first, values taken
// from init_R, nothing after the first block). A second start while running
// must be ignored.
module tb_rls_ctrl;
  import rls_pkg::*;

  localparam int unsigned NP = 3;
  localparam int unsigned NI = 4;

  logic   clk = 1'b0;
  logic   rst_n;
  logic   start;
  fx_t    init_R [NP][NP+1];
  logic   in_valid;
  logic   need_data;
  logic   en;
  logic   running;
  logic [$clog2(NI+1)-1:0] phase;
  rlink_t r_init [NP];
  logic [31:0] blocks_started;
  logic   stall;

  int checks = 0;
  int failures = 0;

  rls_ctrl #(.NP(NP), .NI(NI)) dut (.*);

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
    automatic int stalls = 0;
    automatic int init_elems = 0;
    rst_n = 1'b0;
    start = 1'b0;
    in_valid = 1'b0;
    for (int i = 0; i < NP; i++)
      for (int j = 0; j <= NP; j++) init_R[i][j] = 100 * i + j + 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    check(!running && !need_data && en, "idle after reset");
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    for (int t = 0; t < 300; t++) begin
      int ph, blk;
      in_valid = ($urandom_range(4) != 0);
      if (t == 50) start = 1'b1;
      #1;
      ph  = g % NI;
      blk = g / NI + 1;
      check(running, "running");
      check(int'(phase) == ph, $sformatf("phase %0d expected %0d", phase, ph));
      check(int'(blocks_started) == blk, "block count");
      check(need_data == (ph <= NP), "need_data");
      check(stall == (need_data && !in_valid), "stall");
      check(en == !stall, "en");
      for (int i = 0; i < NP; i++) begin
        int j;
        j = g - i;
        if (j >= i && j <= NP) begin
          check(r_init[i].valid && r_init[i].first == (j == i) && r_init[i].val == init_R[i][j],
                $sformatf("init row %0d element %0d at g=%0d", i, j, g));
          if (en) init_elems++;
        end else begin
          check(!r_init[i].valid, $sformatf("init row %0d idle at g=%0d", i, g));
        end
      end
      if (stall) stalls++;
      @(posedge clk);
      if (en) g++;
      #1;
      start = 1'b0;
    end
    check(stalls > 0, "stalls occurred");
    check(init_elems == (NP + 1) * (NP + 2) / 2 - 1, $sformatf("init elements %0d", init_elems));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
