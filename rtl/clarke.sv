// clarke: abc -> alpha-beta transform of three phase quantities.
//
//   x_alpha = x_a
//   x_beta  = (x_b - x_c) / sqrt(3)
//
// This is the amplitude-invariant Clarke transform used by the predictive
// model. 1/sqrt(3) is a Q4.14 constant; the product is floored to Q8.10 and
// saturated. Inputs are captured when `valid_in` is high and the result
// appears one clock later with `valid_out`; it is then held until the next
// `valid_in`, so later stages may read it at any time during the sample.
module clarke
  import fsmpc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic valid_in,
  input  fx_t  x_a,
  input  fx_t  x_b,
  input  fx_t  x_c,
  output logic valid_out,
  output fx_t  x_alpha,
  output fx_t  x_beta
);
  logic signed [FX_W:0]          diff_bc;
  logic signed [FX_W+COEF_W:0]   prod;

  always_comb begin
    diff_bc = (FX_W+1)'(x_b) - (FX_W+1)'(x_c);
    prod    = diff_bc * INV_SQRT3;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      x_alpha   <= '0;
      x_beta    <= '0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) begin
        x_alpha <= x_a;
        x_beta  <= sat_fx(48'(prod >>> COEF_F));
      end
    end
  end
endmodule
