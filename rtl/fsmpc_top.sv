// fsmpc_top: the two FS-MPC current controllers of a two-level VSI side by side.
//
// One sampling timer (Ts) starts both controllers on the same strobe:
//   - fsmpc_ab, the predictive controller in the stationary alpha-beta frame,
//     tracking sinusoidal references (ab_ref_alpha, ab_ref_beta);
//   - fsmpc_dq, the predictive controller in the rotating dq frame, tracking
//     constant references (dq_ref_d, dq_ref_q) at the angle theta* it
//     generates itself.
// They are alternatives for driving one inverter; each has its own current
// inputs and gate outputs, so either can be wired to the power stage and both
// can be compared on the same clock. Phase currents arrive already converted
// to Q8.10 amperes (ADC front end outside this design); each controller's
// g_min and index number are brought out for observation (e.g. on a DAC).
//
// Gates: *_gate[0..5] = G1..G6 (leg a upper/lower, leg b, leg c), held for a
// full sampling period; *_done pulses when a new state is applied.
module fsmpc_top
  import fsmpc_pkg::*;
#(
  parameter int unsigned TS_CYCLES = TS_CYCLES_DEFAULT
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       sample,
  // alpha-beta controller
  input  fx_t        ab_i_a,
  input  fx_t        ab_i_b,
  input  fx_t        ab_i_c,
  input  fx_t        ab_ref_alpha,
  input  fx_t        ab_ref_beta,
  output logic       ab_done,
  output logic [5:0] ab_gate,
  output logic [2:0] ab_index,
  output cost_t      ab_g_min,
  // dq controller
  input  fx_t        dq_i_a,
  input  fx_t        dq_i_b,
  input  fx_t        dq_i_c,
  input  fx_t        dq_ref_d,
  input  fx_t        dq_ref_q,
  output logic       dq_done,
  output logic [5:0] dq_gate,
  output logic [2:0] dq_index,
  output cost_t      dq_g_min,
  output angle_t     dq_theta
);
  fx_t ab_i_alpha_unused, ab_i_beta_unused, dq_i_d_unused, dq_i_q_unused;

  sample_timer #(.TS_CYCLES(TS_CYCLES)) u_timer (.clk, .rst_n, .sample);

  fsmpc_ab u_ab (
    .clk, .rst_n, .sample,
    .i_a(ab_i_a), .i_b(ab_i_b), .i_c(ab_i_c),
    .ref_alpha(ab_ref_alpha), .ref_beta(ab_ref_beta),
    .done(ab_done), .gate(ab_gate), .index(ab_index), .g_min(ab_g_min),
    .i_alpha(ab_i_alpha_unused), .i_beta(ab_i_beta_unused)
  );

  fsmpc_dq u_dq (
    .clk, .rst_n, .sample,
    .i_a(dq_i_a), .i_b(dq_i_b), .i_c(dq_i_c),
    .ref_d(dq_ref_d), .ref_q(dq_ref_q),
    .done(dq_done), .gate(dq_gate), .index(dq_index), .g_min(dq_g_min),
    .theta(dq_theta), .i_d(dq_i_d_unused), .i_q(dq_i_q_unused)
  );
endmodule
