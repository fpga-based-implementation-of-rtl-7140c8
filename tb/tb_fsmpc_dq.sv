// tb_fsmpc_dq: random phase currents and dq references, one sample every 40
// cycles. An independent floating-point model rotates the measured current
// and the eight voltage vectors by theta*(k) = k * 2*pi/400 (50 Hz at 50 us)
// and evaluates the dq cost with decoupling terms for every state; the state
// applied must be optimal within 0.02 A (fixed-point rounding on near-ties),
// g_min must match, and `done` must be high 26 cycles after `sample`.
module tb_fsmpc_dq;
  import fsmpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, sample = 1'b0, done;
  fx_t ia, ib, ic, rd, rq, od, oq;
  logic [5:0] gate;
  logic [2:0] index;
  cost_t gmin;
  angle_t theta;
  int checks = 0, failures = 0;
  int hist [8];
  always #5 clk = ~clk;

  fsmpc_dq dut (.clk, .rst_n, .sample, .i_a(ia), .i_b(ib), .i_c(ic),
    .ref_d(rd), .ref_q(rq), .done, .gate, .index, .g_min(gmin), .theta,
    .i_d(od), .i_q(oq));

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

  function automatic real cost_of(int s, real th, real id, real iq, real rfd, real rfq);
    sw_state_t b;
    real va, vb, vd, vq, k3;
    k3 = 2.0 * 3.14159265358979 * 50.0 * 0.01;
    b  = state_bits(s);
    va = 145.0 / 3.0 * real'(2 * int'(b[2]) - int'(b[1]) - int'(b[0]));
    vb = 145.0 / $sqrt(3.0) * real'(int'(b[1]) - int'(b[0]));
    vd =  $cos(th) * va + $sin(th) * vb;
    vq = -$sin(th) * va + $cos(th) * vb;
    return absr(rfd - (0.95 * id + 0.005 * (vd + k3 * iq)))
         + absr(rfq - (0.95 * iq + 0.005 * (vq - k3 * id)));
  endfunction

  initial begin
    real fa, fb, fc, frd, frq, ial, ibe, id, iq, th, best, got, k3;
    longint k;
    int lat, chosen;
    k3 = 2.0 * 3.14159265358979 * 50.0 * 0.01;
    {ia, ib, ic, rd, rq} = '0;
    foreach (hist[i]) hist[i] = 0;
    k = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      fa  = real'($urandom_range(0, 10000)) / 1000.0 - 5.0;
      fb  = real'($urandom_range(0, 10000)) / 1000.0 - 5.0;
      fc  = -fa - fb;
      frd = real'($urandom_range(0, 10000)) / 1000.0 - 5.0;
      frq = real'($urandom_range(0, 10000)) / 1000.0 - 5.0;
      ial = real'($rtoi(fa * 1024.0)) / 1024.0;
      ibe = (real'($rtoi(fb * 1024.0)) - real'($rtoi(fc * 1024.0))) / 1024.0 / $sqrt(3.0);
      th  = 2.0 * 3.14159265358979 * real'((k * 64'd10737418) % (64'd1 << 32)) / (2.0 ** 32);
      id  =  $cos(th) * ial + $sin(th) * ibe;
      iq  = -$sin(th) * ial + $cos(th) * ibe;
      if (n % 10 == 0) begin             // reference the zero vector reaches
        frd = 0.95 * id + 0.005 * k3 * iq;
        frq = 0.95 * iq - 0.005 * k3 * id;
      end
      repeat (12) @(negedge clk);
      ia = fx_t'($rtoi(fa * 1024.0));
      ib = fx_t'($rtoi(fb * 1024.0));
      ic = fx_t'($rtoi(fc * 1024.0));
      rd = fx_t'($rtoi(frd * 1024.0));
      rq = fx_t'($rtoi(frq * 1024.0));
      sample = 1'b1;
      @(negedge clk);
      sample = 1'b0;
      {ia, ib, ic, rd, rq} = '0;
      lat = 1;
      while (!done && lat < 80) begin
        @(negedge clk);
        lat++;
      end
      check(lat == 26, $sformatf("done after %0d edges", lat));
      frd = real'($rtoi(frd * 1024.0)) / 1024.0;
      frq = real'($rtoi(frq * 1024.0)) / 1024.0;
      best = 1.0e9;
      chosen = -1;
      for (int s = 0; s < 8; s++) begin
        real c;
        c = cost_of(s, th, id, iq, frd, frq);
        if (c < best) best = c;
        if (state_bits(s) == index && chosen < 0) chosen = s;
      end
      got = cost_of(chosen, th, id, iq, frd, frq);
      hist[chosen]++;
      check(got <= best + 0.02, $sformatf("k=%0d state S%0d cost %f, best %f", k, chosen, got, best));
      check(absr(real'(gmin) / 1024.0 - best) < 0.02, $sformatf("g_min %f vs %f", real'(gmin) / 1024.0, best));
      check(gate == {~index[0], index[0], ~index[1], index[1], ~index[2], index[2]}, "gates match index");
      k++;
    end
    for (int s = 0; s < 7; s++) check(hist[s] > 0, $sformatf("state S%0d never chosen", s));
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
