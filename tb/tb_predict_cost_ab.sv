// tb_predict_cost_ab: random currents, references and each of the eight
// voltage vectors; predictions and cost are recomputed in floating point from
// k1 = 0.95, k2 = 0.005 and the real vector values, and must agree within
// the quantisation of the coefficients and of the Q8.10 format. Predictions
// one cycle and cost two cycles after valid_in.
module tb_predict_cost_ab;
  import fsmpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, vin = 1'b0, vout;
  fx_t ia, ib, va, vb, ra, rb, pa, pb;
  cost_t g;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  predict_cost_ab dut (.clk, .rst_n, .valid_in(vin), .i_alpha(ia), .i_beta(ib),
    .v_alpha(va), .v_beta(vb), .ref_alpha(ra), .ref_beta(rb),
    .valid_out(vout), .ip_alpha(pa), .ip_beta(pb), .g);

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

  initial begin
    real ria, rib, rva, rvb, rra, rrb, epa, epb, eg;
    int s;
    {ia, ib, va, vb, ra, rb} = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      s   = n % 8;
      ria = real'($urandom_range(0, 20000)) / 1000.0 - 10.0;   // +-10 A
      rib = real'($urandom_range(0, 20000)) / 1000.0 - 10.0;
      rra = real'($urandom_range(0, 16000)) / 1000.0 - 8.0;
      rrb = real'($urandom_range(0, 16000)) / 1000.0 - 8.0;
      rva = 145.0 / 3.0 * real'(2 * int'(state_bits(s)[2]) - int'(state_bits(s)[1]) - int'(state_bits(s)[0]));
      rvb = 145.0 / $sqrt(3.0) * real'(int'(state_bits(s)[1]) - int'(state_bits(s)[0]));
      @(negedge clk);
      ia = fx_t'($rtoi(ria * 1024.0));
      ib = fx_t'($rtoi(rib * 1024.0));
      ra = fx_t'($rtoi(rra * 1024.0));
      rb = fx_t'($rtoi(rrb * 1024.0));
      va = valpha(VDC_V, s);
      vb = vbeta(VDC_V, s);
      vin = 1'b1;
      @(negedge clk);
      vin = 1'b0;
      ia = '0; ib = '0; ra = '0; rb = '0;      // inputs need only be valid with valid_in
      epa = 0.95 * real'($rtoi(ria * 1024.0)) / 1024.0 + 0.005 * rva;
      epb = 0.95 * real'($rtoi(rib * 1024.0)) / 1024.0 + 0.005 * rvb;
      check(absr(real'(pa) / 1024.0 - epa) < 0.004, $sformatf("ip_alpha %f vs %f", real'(pa) / 1024.0, epa));
      check(absr(real'(pb) / 1024.0 - epb) < 0.004, $sformatf("ip_beta %f vs %f", real'(pb) / 1024.0, epb));
      check(!vout, "no valid_out after one cycle");
      @(negedge clk);
      check(vout, "valid_out two cycles after valid_in");
      eg = absr(real'($rtoi(rra * 1024.0)) / 1024.0 - epa) + absr(real'($rtoi(rrb * 1024.0)) / 1024.0 - epb);
      check(absr(real'(g) / 1024.0 - eg) < 0.008, $sformatf("g %f vs %f (state %0d)", real'(g) / 1024.0, eg, s));
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
