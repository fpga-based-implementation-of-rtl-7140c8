// fsmpc_ab: finite-set model predictive current controller, stationary alpha-beta frame.
//
// Once per sampling period the controller predicts, for each of the eight
// switching states of the two-level inverter, the load current at the next
// sample, scores each prediction by its distance to the current reference,
// and applies the state with the lowest score for the whole next period. No
// modulator is involved: the chosen state drives the gates directly.
//
// Datapath, started by the `sample` strobe:
//   clarke           phase currents -> (i_alpha, i_beta)               1 cycle
//   predict_cost_ab  x8, one per voltage vector v0..v7                 2 cycles
//   min_select       C&M tree -> g_min, S_opt                          3 cycles
//   switch_gen       S_opt -> gates G1..G6, index number, held         1 cycle
// `done` pulses when the new gates are applied, LATENCY = 7 cycles after
// `sample`. The references are captured at `sample` and are used as the
// references of the next instant (i*(k+1) ~ i*(k)); the eight voltage
// vectors are constants of the state table, computed from VDC.
//
// The model, cost, tree and gate generation follow the method; word lengths,
// pipelining and the strobe/done handshake are this design's.
module fsmpc_ab
  import fsmpc_pkg::*;
#(
  parameter coef_t K1  = K1_DEFAULT,
  parameter coef_t K2  = K2_DEFAULT,
  parameter real   VDC = VDC_V
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sample,
  input  fx_t        i_a,
  input  fx_t        i_b,
  input  fx_t        i_c,
  input  fx_t        ref_alpha,
  input  fx_t        ref_beta,
  output logic       done,
  output logic [5:0] gate,
  output logic [2:0] index,
  output cost_t      g_min,
  output fx_t        i_alpha,
  output fx_t        i_beta
);
  localparam int LATENCY = 7;

  logic      clarke_v;
  fx_t       ref_a_q, ref_b_q;
  logic      cost_v [NSTATES];
  cost_t     g [NSTATES];
  logic      sel_v;
  cost_t     sel_g;
  sw_state_t sel_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_a_q <= '0;
      ref_b_q <= '0;
    end else if (sample) begin
      ref_a_q <= ref_alpha;
      ref_b_q <= ref_beta;
    end
  end

  clarke u_clarke (
    .clk, .rst_n, .valid_in(sample), .x_a(i_a), .x_b(i_b), .x_c(i_c),
    .valid_out(clarke_v), .x_alpha(i_alpha), .x_beta(i_beta)
  );

  for (genvar s = 0; s < NSTATES; s++) begin : g_vec
    localparam fx_t VA = valpha(VDC, s);
    localparam fx_t VB = vbeta(VDC, s);
    fx_t ip_a_unused, ip_b_unused;
    predict_cost_ab #(.K1(K1), .K2(K2)) u_cost (
      .clk, .rst_n, .valid_in(clarke_v),
      .i_alpha, .i_beta, .v_alpha(VA), .v_beta(VB),
      .ref_alpha(ref_a_q), .ref_beta(ref_b_q),
      .valid_out(cost_v[s]), .ip_alpha(ip_a_unused), .ip_beta(ip_b_unused), .g(g[s])
    );
  end

  min_select u_min (
    .clk, .rst_n, .valid_in(cost_v[0]), .g,
    .valid_out(sel_v), .g_min(sel_g), .s_opt(sel_s)
  );

  switch_gen u_sw (
    .clk, .rst_n, .valid_in(sel_v), .s_opt(sel_s), .g_min_in(sel_g),
    .valid_out(done), .gate, .index, .g_min
  );

  // the result must be applied before the next sample starts
  a_done_in_time: assert property (@(posedge clk) disable iff (!rst_n)
    sample |-> ##LATENCY done);
endmodule
