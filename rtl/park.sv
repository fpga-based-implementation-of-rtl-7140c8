// park: alpha-beta -> dq rotation by the reference angle theta*.
//
//   x_d =  cos(theta*) x_alpha + sin(theta*) x_beta
//   x_q = -sin(theta*) x_alpha + cos(theta*) x_beta
//
// cos/sin arrive in Q2.16 from the CORDIC; the products are summed at full
// width, floored to Q8.10 and saturated. Operands are taken when `valid_in`
// is high and the result appears one clock later with `valid_out`, then held.
// In the dq controller one instance turns the measured current and one
// instance each turns the eight inverter voltage vectors.
module park
  import fsmpc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid_in,
  input  fx_t   x_alpha,
  input  fx_t   x_beta,
  input  trig_t cos_t,
  input  trig_t sin_t,
  output logic  valid_out,
  output fx_t   x_d,
  output fx_t   x_q
);
  logic signed [FX_W+TRIG_W:0] sum_d, sum_q;

  always_comb begin
    sum_d = (FX_W+TRIG_W+1)'(cos_t * x_alpha) + (FX_W+TRIG_W+1)'(sin_t * x_beta);
    sum_q = (FX_W+TRIG_W+1)'(cos_t * x_beta)  - (FX_W+TRIG_W+1)'(sin_t * x_alpha);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      x_d       <= '0;
      x_q       <= '0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) begin
        x_d <= sat_fx(48'(sum_d >>> TRIG_F));
        x_q <= sat_fx(48'(sum_q >>> TRIG_F));
      end
    end
  end
endmodule
