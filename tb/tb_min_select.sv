// tb_min_select: random cost sets (with forced ties and with the minimum at
// every position), issued both spaced out and back to back; g_min and S_opt
// must match a linear search for the first minimum, three cycles after
// valid_in.
module tb_min_select;
  import fsmpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, vin = 1'b0, vout;
  cost_t g [NSTATES];
  cost_t gmin;
  sw_state_t sopt;
  int checks = 0, failures = 0;
  cost_t     exp_g [$];
  sw_state_t exp_s [$];
  always #5 clk = ~clk;

  min_select dut (.clk, .rst_n, .valid_in(vin), .g, .valid_out(vout), .g_min(gmin), .s_opt(sopt));

  always @(posedge clk) if (rst_n && vout) begin
    checks++;
    if (exp_g.size() == 0) begin
      failures++;
      $display("FAIL unexpected valid_out");
    end else begin
      cost_t eg;
      sw_state_t es;
      eg = exp_g.pop_front();
      es = exp_s.pop_front();
      if (gmin != eg || sopt != es) begin
        failures++;
        $display("FAIL g_min=%0d s_opt=%b expected %0d %b", gmin, sopt, eg, es);
      end
    end
  end

  // latency: valid_out exactly three edges after valid_in
  logic [2:0] vhist;
  always @(posedge clk) begin
    vhist <= {vhist[1:0], vin};
    if (rst_n) begin
      checks++;
      if (vout != vhist[2]) begin
        failures++;
        $display("FAIL latency");
      end
    end
  end

  initial begin
    int best;
    vhist = '0;
    foreach (g[i]) g[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      foreach (g[i]) g[i] = cost_t'($urandom_range(0, (n % 3 == 0) ? 7 : 1_000_000));
      g[n % 8] = cost_t'($urandom_range(0, 3));
      best = 0;
      for (int i = 1; i < NSTATES; i++) if (g[i] < g[best]) best = i;
      exp_g.push_back(g[best]);
      exp_s.push_back(state_bits(best));
      vin = 1'b1;
      if (n % 2 == 0) begin
        @(negedge clk);
        vin = 1'b0;
        foreach (g[i]) g[i] = '0;
      end
    end
    @(negedge clk);
    vin = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_g.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_g.size());
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
