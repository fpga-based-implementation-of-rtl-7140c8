// fsmpc_dq: finite-set model predictive current controller, rotating dq frame.
//
// Same principle as the alpha-beta controller, but the prediction and cost
// are formed in a frame turning with the reference angle theta*, so the
// references are constant (i_d*, i_q*) instead of sinusoids. The price is a
// rotation of the measured current and of every candidate voltage vector, a
// source of sin/cos(theta*) and the cross-coupling (feed-forward) terms of the
// dq load model.
//
// Datapath, started by the `sample` strobe:
//   clarke + theta_gen/cordic_sincos in parallel   ITER+2 cycles (CORDIC)
//   park x9 (current, vectors v0..v7)               1 cycle
//   predict_cost_dq x8                              3 cycles
//   min_select                                      3 cycles
//   switch_gen                                      1 cycle
// `done` pulses when the new gates apply, LATENCY = CORDIC_ITER + 10 cycles
// after `sample` (26 with the default 16 iterations). theta_gen holds
// theta*(k) at the strobe and moves on to theta*(k+1) after it.
//
// Model, cost, rotations, CORDIC as the sin/cos source, tree and gate
// generation follow the method; word lengths, pipelining, the phase
// accumulator and the handshake are this design's.
module fsmpc_dq
  import fsmpc_pkg::*;
#(
  parameter coef_t       K1          = K1_DEFAULT,
  parameter coef_t       K2          = K2_DEFAULT,
  parameter coef_t       K3          = K3_DEFAULT,
  parameter real         VDC         = VDC_V,
  parameter logic [31:0] THETA_STEP  = THETA_STEP_DEFAULT,
  parameter int          CORDIC_ITER = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sample,
  input  fx_t        i_a,
  input  fx_t        i_b,
  input  fx_t        i_c,
  input  fx_t        ref_d,
  input  fx_t        ref_q,
  output logic       done,
  output logic [5:0] gate,
  output logic [2:0] index,
  output cost_t      g_min,
  output angle_t     theta,
  output fx_t        i_d,
  output fx_t        i_q
);
  localparam int LATENCY = CORDIC_ITER + 10;

  fx_t       ref_d_q, ref_q_q;
  logic      clarke_v_unused, cordic_busy_unused;
  fx_t       i_alpha, i_beta;
  logic      trig_v;
  trig_t     cos_t, sin_t;
  logic      park_i_v;
  logic      park_v_v_unused [NSTATES];
  fx_t       v_d [NSTATES];
  fx_t       v_q [NSTATES];
  logic      cost_v [NSTATES];
  cost_t     g [NSTATES];
  logic      sel_v;
  cost_t     sel_g;
  sw_state_t sel_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_d_q <= '0;
      ref_q_q <= '0;
    end else if (sample) begin
      ref_d_q <= ref_d;
      ref_q_q <= ref_q;
    end
  end

  clarke u_clarke (
    .clk, .rst_n, .valid_in(sample), .x_a(i_a), .x_b(i_b), .x_c(i_c),
    .valid_out(clarke_v_unused), .x_alpha(i_alpha), .x_beta(i_beta)
  );

  theta_gen #(.STEP(THETA_STEP)) u_theta (
    .clk, .rst_n, .advance(sample), .theta
  );

  cordic_sincos #(.ITER(CORDIC_ITER)) u_cordic (
    .clk, .rst_n, .start(sample), .angle(theta),
    .busy(cordic_busy_unused), .done(trig_v), .cos_o(cos_t), .sin_o(sin_t)
  );

  // measured current into the reference frame
  park u_park_i (
    .clk, .rst_n, .valid_in(trig_v), .x_alpha(i_alpha), .x_beta(i_beta),
    .cos_t, .sin_t, .valid_out(park_i_v), .x_d(i_d), .x_q(i_q)
  );

  for (genvar s = 0; s < NSTATES; s++) begin : g_vec
    localparam fx_t VA = valpha(VDC, s);
    localparam fx_t VB = vbeta(VDC, s);
    fx_t ip_d_unused, ip_q_unused;

    park u_park_v (
      .clk, .rst_n, .valid_in(trig_v), .x_alpha(VA), .x_beta(VB),
      .cos_t, .sin_t, .valid_out(park_v_v_unused[s]), .x_d(v_d[s]), .x_q(v_q[s])
    );

    predict_cost_dq #(.K1(K1), .K2(K2), .K3(K3)) u_cost (
      .clk, .rst_n, .valid_in(park_i_v),
      .i_d, .i_q, .v_d(v_d[s]), .v_q(v_q[s]),
      .ref_d(ref_d_q), .ref_q(ref_q_q),
      .valid_out(cost_v[s]), .ip_d(ip_d_unused), .ip_q(ip_q_unused), .g(g[s])
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

  a_done_in_time: assert property (@(posedge clk) disable iff (!rst_n)
    sample |-> ##LATENCY done);
endmodule
