// tb_clarke: random phase values; alpha must equal x_a, beta must match
// (x_b - x_c)/sqrt(3) computed in floating point within 2 LSB; result one
// cycle after valid_in and held while valid_in is low.
module tb_clarke;
  import fsmpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, vin = 1'b0, vout;
  fx_t a, b, c, al, be;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  clarke dut (.clk, .rst_n, .valid_in(vin), .x_a(a), .x_b(b), .x_c(c),
              .valid_out(vout), .x_alpha(al), .x_beta(be));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    real exp_b;
    a = '0; b = '0; c = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      a = fx_t'($urandom_range(0, 40960) - 20480);   // +-20 A
      b = fx_t'($urandom_range(0, 40960) - 20480);
      c = (n % 3 == 0) ? fx_t'(-a - b) : fx_t'($urandom_range(0, 40960) - 20480);
      vin = 1'b1;
      @(negedge clk);
      vin = 1'b0;
      check(vout == 1'b1, "valid_out one cycle after valid_in");
      exp_b = (real'(b) - real'(c)) / $sqrt(3.0);
      check(al == a, "alpha = a");
      check((real'(be) - exp_b) < 2.0 && (exp_b - real'(be)) < 2.0, $sformatf("beta %0d vs %f", be, exp_b));
      a = fx_t'(1234); b = fx_t'(-999); c = fx_t'(77);
      @(negedge clk);
      check(vout == 1'b0 && (real'(be) - exp_b) < 2.0 && (exp_b - real'(be)) < 2.0, "held without valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
