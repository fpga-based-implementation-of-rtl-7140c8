// tb_predict_cost_dq: random dq currents, references and voltages; the
// predictions with decoupling terms and the cost are recomputed in floating
// point from k1 = 0.95, k2 = 0.005, k3 = 2*pi*50*0.01, and must agree within
// the fixed-point quantisation. Cost three cycles after valid_in.
module tb_predict_cost_dq;
  import fsmpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, vin = 1'b0, vout;
  fx_t id, iq, vd, vq, rd, rq, pd, pq;
  cost_t g;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  predict_cost_dq dut (.clk, .rst_n, .valid_in(vin), .i_d(id), .i_q(iq),
    .v_d(vd), .v_q(vq), .ref_d(rd), .ref_q(rq),
    .valid_out(vout), .ip_d(pd), .ip_q(pq), .g);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic real absr(real x);
    return x < 0.0 ? -x : x;
  endfunction

  function automatic real q(real x);
    return real'($rtoi(x * 1024.0)) / 1024.0;
  endfunction

  initial begin
    real rid, riq, rvd, rvq, rrd, rrq, epd, epq, eg, k3;
    k3 = 2.0 * 3.14159265358979 * 50.0 * 0.01;
    {id, iq, vd, vq, rd, rq} = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      rid = q(real'($urandom_range(0, 20000)) / 1000.0 - 10.0);
      riq = q(real'($urandom_range(0, 20000)) / 1000.0 - 10.0);
      rvd = q(real'($urandom_range(0, 190000)) / 1000.0 - 95.0);
      rvq = q(real'($urandom_range(0, 190000)) / 1000.0 - 95.0);
      rrd = q(real'($urandom_range(0, 8000)) / 1000.0 - 4.0);
      rrq = q(real'($urandom_range(0, 8000)) / 1000.0 - 4.0);
      @(negedge clk);
      id = fx_t'($rtoi(rid * 1024.0));
      iq = fx_t'($rtoi(riq * 1024.0));
      vd = fx_t'($rtoi(rvd * 1024.0));
      vq = fx_t'($rtoi(rvq * 1024.0));
      rd = fx_t'($rtoi(rrd * 1024.0));
      rq = fx_t'($rtoi(rrq * 1024.0));
      vin = 1'b1;
      @(negedge clk);
      vin = 1'b0;
      {id, iq, vd, vq, rd, rq} = '0;
      epd = 0.95 * rid + 0.005 * (rvd + k3 * riq);
      epq = 0.95 * riq + 0.005 * (rvq - k3 * rid);
      @(negedge clk);
      check(!vout, "no valid_out after two cycles");
      check(absr(real'(pd) / 1024.0 - epd) < 0.004, $sformatf("ip_d %f vs %f", real'(pd) / 1024.0, epd));
      check(absr(real'(pq) / 1024.0 - epq) < 0.004, $sformatf("ip_q %f vs %f", real'(pq) / 1024.0, epq));
      @(negedge clk);
      check(vout, "valid_out three cycles after valid_in");
      eg = absr(rrd - epd) + absr(rrq - epq);
      check(absr(real'(g) / 1024.0 - eg) < 0.008, $sformatf("g %f vs %f", real'(g) / 1024.0, eg));
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
