// min_select: choice of the optimum switching state S_opt with minimum cost.
//
// A three-level tree of seven C&M cells finds g_min among the eight costs
// g0..g7 (level 1: pairs (g0,g1) (g2,g3) (g4,g5) (g6,g7); level 2: the two
// pairs of winners; level 3: the final pair). Each cell's select line also
// drives a 2:1 multiplexer M0..M6 over the switching states, taken pairwise
// in the same order (S0,S1), (S2,S3), ..., so S_opt follows the winning cost
// through the tree. Costs g[i] belong to state S_i of the state table in
// fsmpc_pkg.
//
// The tree is pipelined with a register after each level: `g_min`, `s_opt`
// and `valid_out` appear three cycles after `valid_in` and are held. Ties go
// to the lower-numbered candidate, so S0 wins over S7 (same zero vector).
module min_select
  import fsmpc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      valid_in,
  input  cost_t     g [NSTATES],
  output logic      valid_out,
  output cost_t     g_min,
  output sw_state_t s_opt
);
  // level 1
  cost_t     gm_l1 [4];
  logic      sel_l1 [4];
  cost_t     gm_l1_q [4];
  sw_state_t sw_l1_q [4];
  // level 2
  cost_t     gm_l2 [2];
  logic      sel_l2 [2];
  cost_t     gm_l2_q [2];
  sw_state_t sw_l2_q [2];
  // level 3
  cost_t     gm_l3;
  logic      sel_l3;
  logic [1:0] vpipe;

  for (genvar i = 0; i < 4; i++) begin : g_lvl1
    cm_cell u_cm (.g_a(g[2*i]), .g_b(g[2*i+1]), .g_min(gm_l1[i]), .sel(sel_l1[i]));
  end
  for (genvar i = 0; i < 2; i++) begin : g_lvl2
    cm_cell u_cm (.g_a(gm_l1_q[2*i]), .g_b(gm_l1_q[2*i+1]), .g_min(gm_l2[i]), .sel(sel_l2[i]));
  end
  cm_cell u_cm6 (.g_a(gm_l2_q[0]), .g_b(gm_l2_q[1]), .g_min(gm_l3), .sel(sel_l3));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vpipe     <= '0;
      valid_out <= 1'b0;
      g_min     <= '0;
      s_opt     <= '0;
      for (int i = 0; i < 4; i++) begin
        gm_l1_q[i] <= '0;
        sw_l1_q[i] <= '0;
      end
      for (int i = 0; i < 2; i++) begin
        gm_l2_q[i] <= '0;
        sw_l2_q[i] <= '0;
      end
    end else begin
      vpipe     <= {vpipe[0], valid_in};
      valid_out <= vpipe[1];
      if (valid_in) begin
        for (int i = 0; i < 4; i++) begin
          gm_l1_q[i] <= gm_l1[i];
          sw_l1_q[i] <= sel_l1[i] ? state_bits(2*i+1) : state_bits(2*i);   // M0..M3
        end
      end
      if (vpipe[0]) begin
        for (int i = 0; i < 2; i++) begin
          gm_l2_q[i] <= gm_l2[i];
          sw_l2_q[i] <= sel_l2[i] ? sw_l1_q[2*i+1] : sw_l1_q[2*i];         // M4, M5
        end
      end
      if (vpipe[1]) begin
        g_min <= gm_l3;
        s_opt <= sel_l3 ? sw_l2_q[1] : sw_l2_q[0];                         // M6
      end
    end
  end
endmodule
