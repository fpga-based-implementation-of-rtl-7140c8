// tb_cordic_sincos: cos/sin of random angles and of the quadrant borders
// against $cos/$sin, within 8 LSB of Q2.16 (about 1.2e-4); `done` must be
// high ITER+2 = 18 cycles after the cycle in which `start` was high.
module tb_cordic_sincos;
  import fsmpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, busy, done;
  angle_t angle;
  trig_t c, s;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  cordic_sincos dut (.clk, .rst_n, .start, .angle, .busy, .done, .cos_o(c), .sin_o(s));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(angle_t a);
    int lat;
    real ph, ec, es;
    @(negedge clk);
    angle = a;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    check(lat == 18, $sformatf("latency %0d", lat));
    ph = 2.0 * 3.14159265358979 * real'(a) / real'(1 << ANGLE_W);
    ec = $cos(ph) * 65536.0;
    es = $sin(ph) * 65536.0;
    check((real'(c) - ec) < 8.0 && (ec - real'(c)) < 8.0, $sformatf("cos(%0d) %0d vs %f", a, c, ec));
    check((real'(s) - es) < 8.0 && (es - real'(s)) < 8.0, $sformatf("sin(%0d) %0d vs %f", a, s, es));
  endtask

  initial begin
    angle = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int q = 0; q < 8; q++) begin
      run(angle_t'(q << (ANGLE_W - 3)));
      run(angle_t'((q << (ANGLE_W - 3)) - 1));
    end
    for (int n = 0; n < 200; n++) run(angle_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
