// predict_cost_ab: predictive model and cost of one voltage vector, alpha-beta frame.
//
// For the candidate inverter voltage v = (v_alpha, v_beta) the forward-Euler
// model of the RL load predicts the next load current
//   i_alpha^p(k+1) = k1 i_alpha(k) + k2 v_alpha
//   i_beta^p(k+1)  = k1 i_beta(k)  + k2 v_beta
// and the cost is the sum of absolute tracking errors against the reference,
// which is taken as i*(k+1) ~ i*(k) (no extrapolation):
//   g = |i_alpha* - i_alpha^p| + |i_beta* - i_beta^p|
//
// Structure (four multipliers, two adders, two subtractors, two abs, one
// adder) follows the per-vector cost diagram of the method. k1/k2 are Q4.14
// parameters; products are summed at full width, floored to Q8.10 and
// saturated. Two register stages: predictions one cycle after `valid_in`,
// cost (with `valid_out`) two cycles after. Results are held between samples.
module predict_cost_ab
  import fsmpc_pkg::*;
#(
  parameter coef_t K1 = K1_DEFAULT,
  parameter coef_t K2 = K2_DEFAULT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid_in,
  input  fx_t   i_alpha,
  input  fx_t   i_beta,
  input  fx_t   v_alpha,
  input  fx_t   v_beta,
  input  fx_t   ref_alpha,
  input  fx_t   ref_beta,
  output logic  valid_out,
  output fx_t   ip_alpha,
  output fx_t   ip_beta,
  output cost_t g
);
  localparam int PW = FX_W + COEF_W + 1;

  logic signed [PW-1:0] acc_a, acc_b;
  logic                 v1;
  fx_t                  ref_a_q, ref_b_q;
  logic signed [FX_W:0] err_a, err_b;
  logic        [FX_W:0] abs_a, abs_b;

  always_comb begin
    acc_a = PW'(K1 * i_alpha) + PW'(K2 * v_alpha);
    acc_b = PW'(K1 * i_beta)  + PW'(K2 * v_beta);
    err_a = (FX_W+1)'(ref_a_q) - (FX_W+1)'(ip_alpha);
    err_b = (FX_W+1)'(ref_b_q) - (FX_W+1)'(ip_beta);
    abs_a = err_a[FX_W] ? (FX_W+1)'(-err_a) : (FX_W+1)'(err_a);
    abs_b = err_b[FX_W] ? (FX_W+1)'(-err_b) : (FX_W+1)'(err_b);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      valid_out <= 1'b0;
      ip_alpha  <= '0;
      ip_beta   <= '0;
      ref_a_q   <= '0;
      ref_b_q   <= '0;
      g         <= '0;
    end else begin
      v1        <= valid_in;
      valid_out <= v1;
      if (valid_in) begin
        ip_alpha <= sat_fx(48'(acc_a >>> COEF_F));
        ip_beta  <= sat_fx(48'(acc_b >>> COEF_F));
        ref_a_q  <= ref_alpha;
        ref_b_q  <= ref_beta;
      end
      if (v1) g <= COST_W'(abs_a) + COST_W'(abs_b);
    end
  end
endmodule
