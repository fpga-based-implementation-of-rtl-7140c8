// tb_fsmpc_ab: random phase currents and alpha-beta references, one sample
// every 20 cycles. An independent floating-point model evaluates all eight
// switching states; the state the controller applies must be optimal (its
// cost within 0.01 A of the true minimum, which absorbs fixed-point rounding
// on near-ties), g_min must match the minimum, the gates must match the index,
// and `done` must follow `sample` by exactly 7 cycles.
module tb_fsmpc_ab;
  import fsmpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, sample = 1'b0, done;
  fx_t ia, ib, ic, ra, rb, oa, ob;
  logic [5:0] gate;
  logic [2:0] index;
  cost_t gmin;
  int checks = 0, failures = 0;
  int hist [8];
  always #5 clk = ~clk;

  fsmpc_ab dut (.clk, .rst_n, .sample, .i_a(ia), .i_b(ib), .i_c(ic),
    .ref_alpha(ra), .ref_beta(rb), .done, .gate, .index, .g_min(gmin),
    .i_alpha(oa), .i_beta(ob));

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

  function automatic real cost_of(int s, real ial, real ibe, real ral, real rbe);
    sw_state_t b;
    real va, vb;
    b  = state_bits(s);
    va = 145.0 / 3.0 * real'(2 * int'(b[2]) - int'(b[1]) - int'(b[0]));
    vb = 145.0 / $sqrt(3.0) * real'(int'(b[1]) - int'(b[0]));
    return absr(ral - (0.95 * ial + 0.005 * va)) + absr(rbe - (0.95 * ibe + 0.005 * vb));
  endfunction

  initial begin
    real fa, fb, fc, fra, frb, ial, ibe, best, got;
    int lat, chosen;
    {ia, ib, ic, ra, rb} = '0;
    foreach (hist[i]) hist[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      fa  = real'($urandom_range(0, 10000)) / 1000.0 - 5.0;
      fb  = real'($urandom_range(0, 10000)) / 1000.0 - 5.0;
      fc  = -fa - fb;
      fra = real'($urandom_range(0, 10000)) / 1000.0 - 5.0;
      frb = real'($urandom_range(0, 10000)) / 1000.0 - 5.0;
      if (n % 10 == 0) begin             // reference the zero vector reaches
        fra = 0.95 * fa;
        frb = 0.95 * (fb - fc) / $sqrt(3.0);
      end
      repeat (12) @(negedge clk);
      ia = fx_t'($rtoi(fa * 1024.0));
      ib = fx_t'($rtoi(fb * 1024.0));
      ic = fx_t'($rtoi(fc * 1024.0));
      ra = fx_t'($rtoi(fra * 1024.0));
      rb = fx_t'($rtoi(frb * 1024.0));
      sample = 1'b1;
      @(negedge clk);
      sample = 1'b0;
      {ia, ib, ic, ra, rb} = '0;          // measured values need only be valid at the strobe
      lat = 1;
      while (!done && lat < 50) begin
        @(negedge clk);
        lat++;
      end
      check(lat == 7, $sformatf("done after %0d edges", lat));   // high 7 cycles after the strobe
      ial = real'($rtoi(fa * 1024.0)) / 1024.0;
      ibe = (real'($rtoi(fb * 1024.0)) - real'($rtoi(fc * 1024.0))) / 1024.0 / $sqrt(3.0);
      best = 1.0e9;
      chosen = -1;
      for (int s = 0; s < 8; s++) begin
        real c;
        c = cost_of(s, ial, ibe, real'($rtoi(fra * 1024.0)) / 1024.0, real'($rtoi(frb * 1024.0)) / 1024.0);
        if (c < best) best = c;
        if (state_bits(s) == index && chosen < 0) chosen = s;
      end
      got = cost_of(chosen, ial, ibe, real'($rtoi(fra * 1024.0)) / 1024.0, real'($rtoi(frb * 1024.0)) / 1024.0);
      hist[chosen]++;
      check(got <= best + 0.01, $sformatf("state S%0d cost %f, best %f", chosen, got, best));
      check(absr(real'(gmin) / 1024.0 - best) < 0.01, $sformatf("g_min %f vs %f", real'(gmin) / 1024.0, best));
      check(gate == {~index[0], index[0], ~index[1], index[1], ~index[2], index[2]}, "gates match index");
    end
    // every active vector and the zero vector must have been chosen
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
