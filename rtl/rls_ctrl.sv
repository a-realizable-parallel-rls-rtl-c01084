// rls_ctrl: sequencing and input handshake of the rectangular RLS array.
//
// After 'start' the array runs continuously in blocks of NI advancing cycles.
// In phase t = 0..NP of each block the array consumes element t of the data
// vectors [phi^T y] of the NI time steps of the block (one word per column,
// t = NP being y); phases NP+1..NI-1 (present only when NI > NP+1) take no
// data. The controller raises need_data in the consuming phases. If the
// source has no data (in_valid low) in such a cycle, 'en' goes low and the
// whole array, its delay lines and this controller hold for that cycle: the
// systolic schedule simply stretches. This valid/stall handshake is this
// design's choice of the hand-shaking the architecture allows for.
//
// During the first block only, the controller feeds the initial factor
// init_R (row i holds R_ii..R_i,NP-1 in columns i..NP-1 and r_i in column NP;
// the entries below the diagonal are ignored) into column 0 of the array:
// row i, element j at advancing cycle j + i after start, diagonal element
// marked 'first'. From then on the feedback from the last column takes over.
// 'start' is accepted only while idle; the array then runs until reset.
module rls_ctrl
  import rls_pkg::*;
#(
  parameter int unsigned NP = 4,
  parameter int unsigned NI = NP + 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  fx_t    init_R [NP][NP+1],
  input  logic   in_valid,
  output logic   need_data,
  output logic   en,
  output logic   running,
  output logic [$clog2(NI+1)-1:0] phase,
  output rlink_t r_init [NP],
  output logic [31:0] blocks_started,
  output logic   stall
);

  localparam int unsigned INIT_LEN = 2 * NP;   // last init element at cycle 2*NP-1
  localparam int unsigned PW = $clog2(NI + 1);
  localparam int unsigned GW = $clog2(INIT_LEN + 1);

  logic [GW-1:0] g_q;        // advancing cycles since start, saturates at INIT_LEN
  logic [PW-1:0] phase_q;

  assign phase     = phase_q;
  assign need_data = running && (phase_q <= PW'(NP));
  assign stall     = need_data && !in_valid;
  assign en        = !stall;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running        <= 1'b0;
      g_q            <= '0;
      phase_q        <= '0;
      blocks_started <= '0;
    end else if (!running) begin
      if (start) begin
        running        <= 1'b1;
        g_q            <= '0;
        phase_q        <= '0;
        blocks_started <= 32'd1;
      end
    end else if (en) begin
      if (g_q != GW'(INIT_LEN)) g_q <= g_q + 1'b1;
      if (phase_q == PW'(NI - 1)) begin
        phase_q        <= '0;
        blocks_started <= blocks_started + 1;
      end else begin
        phase_q <= phase_q + 1'b1;
      end
    end
  end

  // Initial factor stream: row i, element j = g - i, for i <= j <= NP.
  always_comb begin
    for (int i = 0; i < int'(NP); i++) begin
      int j;
      j = int'(g_q) - i;
      r_init[i] = '0;
      if (running && (g_q < GW'(INIT_LEN)) && j >= i && j <= int'(NP)) begin
        r_init[i].valid = 1'b1;
        r_init[i].first = (j == i);
        r_init[i].val   = init_R[i][j];
      end
    end
  end

endmodule
