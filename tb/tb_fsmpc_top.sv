// tb_fsmpc_top: closed-loop run of both controllers at full size.
//
// Each controller drives its own model of the two-level inverter (Vdc = 145 V)
// feeding an RL load (R = 10 ohm, L = 10 mH), integrated exactly over each
// 50 us sampling period: i(k+1) = a i(k) + (1 - a)/R v(k), a = exp(-R Ts/L).
// The reference is a 50 Hz current of 2.5 A amplitude, stepped to 4 A at
// 0.062 s and back to 2.5 A at 0.14 s; the run lasts 0.2 s (4000 samples,
// 20 million clock cycles at the default 100 MHz / Ts = 50 us). The
// alpha-beta controller gets the sinusoidal alpha-beta reference, the dq
// controller i_d* = amplitude, i_q* = 0.
//
// Checked every sample, for both controllers: the applied state is optimal
// for a floating-point model of the predictive cost (within fixed-point
// rounding), g_min matches that model, and no leg is ever shoot-through.
// Checked over the run: tracking error (sum of |alpha| and |beta| errors)
// below 0.6 A except in the first 2 ms and 1 ms after each step; at each step
// a g_min spike above 0.6 A that falls below 0.5 A within 1 ms; every
// distinct switching state (S0..S6) chosen at least once. Reported:
// g_min spike and settling time per step, THD of i_a at 2.5 A and 4 A, and
// the average device switching frequency.
module tb_fsmpc_top;
  import fsmpc_pkg::*;

  localparam int  NSAMP   = 4000;
  localparam int  K_STEP1 = 1240;         // 0.062 s / 50 us
  localparam int  K_STEP2 = 2800;         // 0.14 s / 50 us
  localparam real PI_R    = 3.14159265358979;
  localparam real TS      = 50.0e-6;

  logic clk = 1'b0, rst_n = 1'b0, sample;
  fx_t ab_ia, ab_ib, ab_ic, ab_ra, ab_rb, dq_ia, dq_ib, dq_ic, dq_rd, dq_rq;
  logic ab_done, dq_done;
  logic [5:0] ab_gate, dq_gate;
  logic [2:0] ab_index, dq_index;
  cost_t ab_gmin, dq_gmin;
  angle_t dq_theta;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fsmpc_top dut (
    .clk, .rst_n, .sample,
    .ab_i_a(ab_ia), .ab_i_b(ab_ib), .ab_i_c(ab_ic), .ab_ref_alpha(ab_ra), .ab_ref_beta(ab_rb),
    .ab_done, .ab_gate, .ab_index, .ab_g_min(ab_gmin),
    .dq_i_a(dq_ia), .dq_i_b(dq_ib), .dq_i_c(dq_ic), .dq_ref_d(dq_rd), .dq_ref_q(dq_rq),
    .dq_done, .dq_gate, .dq_index, .dq_g_min(dq_gmin), .dq_theta
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  function automatic real absr(real x);
    return x < 0.0 ? -x : x;
  endfunction

  function automatic real q10(real x);
    return real'($rtoi(x * 1024.0)) / 1024.0;
  endfunction

  // inverter voltage vector of a 3-bit state {Sa, Sb, Sc}
  function automatic real v_al(logic [2:0] b);
    return 145.0 / 3.0 * real'(2 * int'(b[2]) - int'(b[1]) - int'(b[0]));
  endfunction
  function automatic real v_be(logic [2:0] b);
    return 145.0 / $sqrt(3.0) * real'(int'(b[1]) - int'(b[0]));
  endfunction

  function automatic real cost_ab(logic [2:0] b, real ial, real ibe, real ral, real rbe);
    return absr(ral - (0.95 * ial + 0.005 * v_al(b))) + absr(rbe - (0.95 * ibe + 0.005 * v_be(b)));
  endfunction

  function automatic real cost_dq(logic [2:0] b, real th, real ial, real ibe, real rfd, real rfq);
    real id, iq, vd, vq, k3;
    k3 = 2.0 * PI_R * 50.0 * 0.01;
    id =  $cos(th) * ial + $sin(th) * ibe;
    iq = -$sin(th) * ial + $cos(th) * ibe;
    vd =  $cos(th) * v_al(b) + $sin(th) * v_be(b);
    vq = -$sin(th) * v_al(b) + $cos(th) * v_be(b);
    return absr(rfd - (0.95 * id + 0.005 * (vd + k3 * iq)))
         + absr(rfq - (0.95 * iq + 0.005 * (vq - k3 * id)));
  endfunction

  // plant state (alpha-beta load current) of each loop
  real ab_i_al = 0.0, ab_i_be = 0.0, dq_i_al = 0.0, dq_i_be = 0.0;
  // what each controller was given at the last strobe
  real ab_m_al, ab_m_be, ab_m_ra, ab_m_rb, dq_m_al, dq_m_be, dq_m_rd, dq_th;
  int  k = -1;
  int  ab_hist [8], dq_hist [8];   // by index number
  int  ab_track_bad = 0, dq_track_bad = 0, tracked = 0;
  real ab_spike [2], dq_spike [2];
  int  ab_settle [2], dq_settle [2];
  longint ab_sw = 0, dq_sw = 0;
  logic [5:0] ab_gate_prev = 6'b101010, dq_gate_prev = 6'b101010;
  // DFT accumulators of i_a over whole cycles, per current level (0: 2.5 A, 1: 4 A)
  real ab_re [2][200], ab_im [2][200], dq_re [2][200], dq_im [2][200];

  function automatic real amp_of(int kk);
    return (kk >= K_STEP1 && kk < K_STEP2) ? 4.0 : 2.5;
  endfunction

  function automatic real thd(real re [200], real im [200]);
    real h = 0.0;
    for (int n = 2; n < 200; n++) h += re[n] * re[n] + im[n] * im[n];
    return 100.0 * $sqrt(h / (re[1] * re[1] + im[1] * im[1]));
  endfunction

  // count device switchings (changes of the upper gates)
  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < 3; l++) begin
      if (ab_gate[2*l] != ab_gate_prev[2*l]) ab_sw++;
      if (dq_gate[2*l] != dq_gate_prev[2*l]) dq_sw++;
    end
    ab_gate_prev <= ab_gate;
    dq_gate_prev <= dq_gate;
    check(ab_gate[0] != ab_gate[1] && ab_gate[2] != ab_gate[3] && ab_gate[4] != ab_gate[5]
       && dq_gate[0] != dq_gate[1] && dq_gate[2] != dq_gate[3] && dq_gate[4] != dq_gate[5],
          "complementary gates");
  end

  // results of sample k: check optimality of the state each controller applied
  always @(negedge clk) if (rst_n && k >= 0) begin
    if (ab_done) begin
      real best, got;
      best = 1.0e9;
      for (int s = 0; s < 8; s++) begin
        real c;
        c = cost_ab(state_bits(s), ab_m_al, ab_m_be, ab_m_ra, ab_m_rb);
        if (c < best) best = c;
      end
      got = cost_ab(ab_index, ab_m_al, ab_m_be, ab_m_ra, ab_m_rb);
      check(got <= best + 0.01, $sformatf("ab k=%0d cost %f best %f", k, got, best));
      check(absr(real'(ab_gmin) / 1024.0 - best) < 0.01, $sformatf("ab k=%0d g_min %f vs %f", k, real'(ab_gmin) / 1024.0, best));
      ab_hist[ab_index]++;
    end
    if (dq_done) begin
      real best, got;
      best = 1.0e9;
      for (int s = 0; s < 8; s++) begin
        real c;
        c = cost_dq(state_bits(s), dq_th, dq_m_al, dq_m_be, dq_m_rd, 0.0);
        if (c < best) best = c;
      end
      got = cost_dq(dq_index, dq_th, dq_m_al, dq_m_be, dq_m_rd, 0.0);
      check(got <= best + 0.02, $sformatf("dq k=%0d cost %f best %f", k, got, best));
      check(absr(real'(dq_gmin) / 1024.0 - best) < 0.02, $sformatf("dq k=%0d g_min %f vs %f", k, real'(dq_gmin) / 1024.0, best));
      dq_hist[dq_index]++;
      // step mechanisms: g_min spike right after each step, then settling
      for (int e = 0; e < 2; e++) begin
        int ks;
        ks = (e == 0) ? K_STEP1 : K_STEP2;
        if (k >= ks && k < ks + 40) begin
          if (real'(ab_gmin) / 1024.0 > ab_spike[e]) ab_spike[e] = real'(ab_gmin) / 1024.0;
          if (real'(dq_gmin) / 1024.0 > dq_spike[e]) dq_spike[e] = real'(dq_gmin) / 1024.0;
          if (ab_settle[e] < 0 && k > ks && real'(ab_gmin) / 1024.0 < 0.5) ab_settle[e] = k - ks;
          if (dq_settle[e] < 0 && k > ks && real'(dq_gmin) / 1024.0 < 0.5) dq_settle[e] = k - ks;
        end
      end
    end
  end

  // plant and references: advance at the strobe, before the controllers sample
  always @(negedge clk) if (rst_n && sample) begin
    real a, bcoef, amp, th, ab_ref_al, ab_ref_be, err;
    a     = $exp(-10.0 * TS / 10.0e-3);
    bcoef = (1.0 - a) / 10.0;
    if (k >= 0) begin
      ab_i_al = a * ab_i_al + bcoef * v_al(ab_index);
      ab_i_be = a * ab_i_be + bcoef * v_be(ab_index);
      dq_i_al = a * dq_i_al + bcoef * v_al(dq_index);
      dq_i_be = a * dq_i_be + bcoef * v_be(dq_index);
    end
    k++;
    amp = amp_of(k);
    th  = 2.0 * PI_R * real'((longint'(k) * 64'd10737418) % (64'd1 << 32)) / (2.0 ** 32);
    ab_ref_al = amp * $cos(th);
    ab_ref_be = amp * $sin(th);
    // tracking error of the current now measured against the reference now
    if (k > 40 && !(k >= K_STEP1 && k < K_STEP1 + 20) && !(k >= K_STEP2 && k < K_STEP2 + 20)) begin
      tracked++;
      err = absr(ab_i_al - ab_ref_al) + absr(ab_i_be - ab_ref_be);
      if (err > 0.6) ab_track_bad++;
      err = absr(dq_i_al - ab_ref_al) + absr(dq_i_be - ab_ref_be);
      if (err > 0.6) dq_track_bad++;
    end
    // DFT of i_a over two whole cycles at each level
    for (int lv = 0; lv < 2; lv++) begin
      int k0;
      k0 = (lv == 0) ? 400 : 1600;
      if (k >= k0 && k < k0 + 800) begin
        for (int n = 1; n < 200; n++) begin
          real w;
          w = 2.0 * PI_R * real'(n) * real'(k - k0) / 400.0;
          ab_re[lv][n] += ab_i_al * $cos(w);
          ab_im[lv][n] += ab_i_al * $sin(w);
          dq_re[lv][n] += dq_i_al * $cos(w);
          dq_im[lv][n] += dq_i_al * $sin(w);
        end
      end
    end
    // phase currents from the alpha-beta current of each load
    ab_ia = fx_t'($rtoi(ab_i_al * 1024.0));
    ab_ib = fx_t'($rtoi((-0.5 * ab_i_al + 0.5 * $sqrt(3.0) * ab_i_be) * 1024.0));
    ab_ic = fx_t'($rtoi((-0.5 * ab_i_al - 0.5 * $sqrt(3.0) * ab_i_be) * 1024.0));
    dq_ia = fx_t'($rtoi(dq_i_al * 1024.0));
    dq_ib = fx_t'($rtoi((-0.5 * dq_i_al + 0.5 * $sqrt(3.0) * dq_i_be) * 1024.0));
    dq_ic = fx_t'($rtoi((-0.5 * dq_i_al - 0.5 * $sqrt(3.0) * dq_i_be) * 1024.0));
    ab_ra = fx_t'($rtoi(ab_ref_al * 1024.0));
    ab_rb = fx_t'($rtoi(ab_ref_be * 1024.0));
    dq_rd = fx_t'($rtoi(amp * 1024.0));
    dq_rq = '0;
    // what the controllers will see, as the fixed-point inputs carry it
    ab_m_al = q10(real'(ab_ia) / 1024.0);
    ab_m_be = (real'(ab_ib) - real'(ab_ic)) / 1024.0 / $sqrt(3.0);
    ab_m_ra = real'(ab_ra) / 1024.0;
    ab_m_rb = real'(ab_rb) / 1024.0;
    dq_m_al = real'(dq_ia) / 1024.0;
    dq_m_be = (real'(dq_ib) - real'(dq_ic)) / 1024.0 / $sqrt(3.0);
    dq_m_rd = real'(dq_rd) / 1024.0;
    dq_th   = 2.0 * PI_R * real'(dq_theta) / (2.0 ** ANGLE_W);
  end

  initial begin
    real t_all;
    {ab_ia, ab_ib, ab_ic, ab_ra, ab_rb, dq_ia, dq_ib, dq_ic, dq_rd, dq_rq} = '0;
    foreach (ab_hist[i]) begin
      ab_hist[i] = 0;
      dq_hist[i] = 0;
    end
    for (int e = 0; e < 2; e++) begin
      ab_spike[e] = 0.0; dq_spike[e] = 0.0; ab_settle[e] = -1; dq_settle[e] = -1;
      for (int n = 0; n < 200; n++) begin
        ab_re[e][n] = 0.0; ab_im[e][n] = 0.0; dq_re[e][n] = 0.0; dq_im[e][n] = 0.0;
      end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (k == NSAMP);
    repeat (100) @(posedge clk);
    t_all = real'(NSAMP) * TS;
    $display("samples %0d, tracked %0d; tracking errors > 0.6 A: ab %0d dq %0d", k, tracked, ab_track_bad, dq_track_bad);
    for (int e = 0; e < 2; e++)
      $display("step %0d: g_min spike ab %.3f dq %.3f A; settling ab %0d us dq %0d us",
               e + 1, ab_spike[e], dq_spike[e], ab_settle[e] * 50, dq_settle[e] * 50);
    $display("THD of i_a at 2.5 A: ab %.2f %% dq %.2f %%; at 4 A: ab %.2f %% dq %.2f %%",
             thd(ab_re[0], ab_im[0]), thd(dq_re[0], dq_im[0]), thd(ab_re[1], ab_im[1]), thd(dq_re[1], dq_im[1]));
    $display("average device switching frequency: ab %.0f Hz dq %.0f Hz",
             real'(ab_sw) / 3.0 / 2.0 / t_all, real'(dq_sw) / 3.0 / 2.0 / t_all);
    $display("times each index 0..7 was chosen, ab: %0d %0d %0d %0d %0d %0d %0d %0d",
             ab_hist[0], ab_hist[1], ab_hist[2], ab_hist[3], ab_hist[4], ab_hist[5], ab_hist[6], ab_hist[7]);
    $display("times each index 0..7 was chosen, dq: %0d %0d %0d %0d %0d %0d %0d %0d",
             dq_hist[0], dq_hist[1], dq_hist[2], dq_hist[3], dq_hist[4], dq_hist[5], dq_hist[6], dq_hist[7]);
    check(ab_track_bad == 0, "ab tracking");
    check(dq_track_bad == 0, "dq tracking");
    for (int e = 0; e < 2; e++) begin
      // steady-state g_min stays near 0.25 A; a step must raise it clearly
      check(ab_spike[e] > 0.6 && dq_spike[e] > 0.6, $sformatf("g_min spike at step %0d", e + 1));
      check(ab_settle[e] > 0 && ab_settle[e] <= 20 && dq_settle[e] > 0 && dq_settle[e] <= 20,
            $sformatf("settling after step %0d", e + 1));
    end
    for (int s = 0; s < 7; s++) begin
      check(ab_hist[state_bits(s)] > 0, $sformatf("ab state S%0d never chosen", s));
      check(dq_hist[state_bits(s)] > 0, $sformatf("dq state S%0d never chosen", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd10 * 64'd20_200_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
