// predict_cost_dq: predictive model and cost of one voltage vector, dq frame.
//
// With the voltage vector and load current already rotated into the
// reference frame, the forward-Euler model including the cross-coupling
// (feed-forward) terms predicts
//   i_d^p(k+1) = k1 i_d(k) + k2 (v_d + k3 i_q(k))
//   i_q^p(k+1) = k1 i_q(k) + k2 (v_q - k3 i_d(k))
// with k3 = w* L, and the cost is
//   g = |i_d* - i_d^p| + |i_q* - i_q^p|
//
// The structure (k3 products, feed-forward adder/subtractor, k2 and k1
// products, adders, error, abs, final adder) follows the per-vector cost
// diagram of the method. Three register stages, this design's choice:
//   1: feed-forward sums v_d + k3 i_q and v_q - k3 i_d (floored to Q8.10)
//   2: predictions
//   3: cost, with `valid_out` three cycles after `valid_in`
// Coefficients are Q4.14 parameters; results are held between samples.
module predict_cost_dq
  import fsmpc_pkg::*;
#(
  parameter coef_t K1 = K1_DEFAULT,
  parameter coef_t K2 = K2_DEFAULT,
  parameter coef_t K3 = K3_DEFAULT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid_in,
  input  fx_t   i_d,
  input  fx_t   i_q,
  input  fx_t   v_d,
  input  fx_t   v_q,
  input  fx_t   ref_d,
  input  fx_t   ref_q,
  output logic  valid_out,
  output fx_t   ip_d,
  output fx_t   ip_q,
  output cost_t g
);
  localparam int PW = FX_W + COEF_W + 2;

  logic                 v1, v2;
  logic signed [PW-1:0] ff_d_w, ff_q_w, acc_d, acc_q;
  fx_t                  ff_d, ff_q, i_d_q1, i_q_q1, ref_d_q1, ref_q_q1, ref_d_q2, ref_q_q2;
  logic signed [FX_W:0] err_d, err_q;
  logic        [FX_W:0] abs_d, abs_q;

  always_comb begin
    ff_d_w = PW'(v_d) * (PW'(1) <<< COEF_F) + PW'(K3 * i_q);
    ff_q_w = PW'(v_q) * (PW'(1) <<< COEF_F) - PW'(K3 * i_d);
    acc_d  = PW'(K1 * i_d_q1) + PW'(K2 * ff_d);
    acc_q  = PW'(K1 * i_q_q1) + PW'(K2 * ff_q);
    err_d  = (FX_W+1)'(ref_d_q2) - (FX_W+1)'(ip_d);
    err_q  = (FX_W+1)'(ref_q_q2) - (FX_W+1)'(ip_q);
    abs_d  = err_d[FX_W] ? (FX_W+1)'(-err_d) : (FX_W+1)'(err_d);
    abs_q  = err_q[FX_W] ? (FX_W+1)'(-err_q) : (FX_W+1)'(err_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v1, v2, valid_out} <= '0;
      ff_d     <= '0;
      ff_q     <= '0;
      i_d_q1   <= '0;
      i_q_q1   <= '0;
      ref_d_q1 <= '0;
      ref_q_q1 <= '0;
      ref_d_q2 <= '0;
      ref_q_q2 <= '0;
      ip_d     <= '0;
      ip_q     <= '0;
      g        <= '0;
    end else begin
      v1        <= valid_in;
      v2        <= v1;
      valid_out <= v2;
      if (valid_in) begin
        ff_d     <= sat_fx(48'(ff_d_w >>> COEF_F));
        ff_q     <= sat_fx(48'(ff_q_w >>> COEF_F));
        i_d_q1   <= i_d;
        i_q_q1   <= i_q;
        ref_d_q1 <= ref_d;
        ref_q_q1 <= ref_q;
      end
      if (v1) begin
        ip_d     <= sat_fx(48'(acc_d >>> COEF_F));
        ip_q     <= sat_fx(48'(acc_q >>> COEF_F));
        ref_d_q2 <= ref_d_q1;
        ref_q_q2 <= ref_q_q1;
      end
      if (v2) g <= COST_W'(abs_d) + COST_W'(abs_q);
    end
  end
endmodule
