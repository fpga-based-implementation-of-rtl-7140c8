// tb_theta_gen: the angle must advance by STEP (default: 50 Hz at 50 us,
// 1/400 turn) only on strobes, wrap after a full turn, and show theta(k)
// on the strobe edge.
module tb_theta_gen;
  import fsmpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, adv = 1'b0;
  angle_t theta;
  int checks = 0, failures = 0;
  longint k = 0;
  always #5 clk = ~clk;

  theta_gen dut (.clk, .rst_n, .advance(adv), .theta);

  initial begin
    longint expected;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      adv = ($urandom_range(0, 2) != 0);
      expected = ((k * 64'd10737418) % (64'd1 << 32)) >> 12;
      checks++;
      if (theta != angle_t'(expected)) begin
        failures++;
        $display("FAIL k=%0d theta=%0d expected=%0d", k, theta, expected);
      end
      if (adv) k++;
    end
    // 400 samples of a 50 Hz reference: one full turn back to near zero
    checks++;
    if (THETA_STEP_DEFAULT != 32'd10737418) begin
      failures++;
      $display("FAIL default step %0d", THETA_STEP_DEFAULT);
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
