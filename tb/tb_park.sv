// tb_park: random vectors and angles; d/q outputs against a floating-point
// rotation within 2 LSB, one cycle after valid_in.
module tb_park;
  import fsmpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, vin = 1'b0, vout;
  fx_t xa, xb, xd, xq;
  trig_t ct, st;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  park dut (.clk, .rst_n, .valid_in(vin), .x_alpha(xa), .x_beta(xb), .cos_t(ct), .sin_t(st),
            .valid_out(vout), .x_d(xd), .x_q(xq));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    real ph, ed, eq;
    xa = '0; xb = '0; ct = '0; st = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      ph = 6.283185307 * real'($urandom_range(0, 9999)) / 10000.0;
      ct = trig_t'($rtoi($floor($cos(ph) * 65536.0 + 0.5)));
      st = trig_t'($rtoi($floor($sin(ph) * 65536.0 + 0.5)));
      xa = fx_t'($urandom_range(0, 180000) - 90000);
      xb = fx_t'($urandom_range(0, 180000) - 90000);
      vin = 1'b1;
      @(negedge clk);
      vin = 1'b0;
      ed = (real'(ct) * real'(xa) + real'(st) * real'(xb)) / 65536.0;
      eq = (real'(ct) * real'(xb) - real'(st) * real'(xa)) / 65536.0;
      check(vout, "valid_out");
      check((real'(xd) - ed) < 2.0 && (ed - real'(xd)) < 2.0, $sformatf("d %0d vs %f", xd, ed));
      check((real'(xq) - eq) < 2.0 && (eq - real'(xq)) < 2.0, $sformatf("q %0d vs %f", xq, eq));
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
