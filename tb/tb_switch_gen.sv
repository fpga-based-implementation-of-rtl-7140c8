// tb_switch_gen: every switching state in turn; the gates must be
// {~Sc, Sc, ~Sb, Sb, ~Sa, Sa} (G6..G1), the index must be the state read as a
// binary number, and outputs must hold while valid_in is low. Reset state S0.
module tb_switch_gen;
  import fsmpc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, vin = 1'b0, vout;
  sw_state_t s;
  cost_t gi, go;
  logic [5:0] gate;
  logic [2:0] index;
  int checks = 0, failures = 0;
  // index numbers of S0..S7 as listed in the state table
  int idx_of [8] = '{0, 4, 6, 2, 3, 1, 5, 7};
  always #5 clk = ~clk;

  switch_gen dut (.clk, .rst_n, .valid_in(vin), .s_opt(s), .g_min_in(gi),
                  .valid_out(vout), .gate, .index, .g_min(go));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    s = '0; gi = '0;
    repeat (2) @(posedge clk);
    #1;
    check(gate == 6'b101010 && index == 3'd0, "reset applies S0");
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 64; n++) begin
      int k;
      k = n % 8;
      @(negedge clk);
      s = state_bits(k);
      gi = cost_t'($urandom);
      vin = 1'b1;
      @(negedge clk);
      vin = 1'b0;
      check(vout, "valid_out");
      check(gate[0] == s[2] && gate[1] == !s[2], "leg a");
      check(gate[2] == s[1] && gate[3] == !s[1], "leg b");
      check(gate[4] == s[0] && gate[5] == !s[0], "leg c");
      check(int'(index) == idx_of[k], $sformatf("index %0d for S%0d", index, k));
      check(go == gi, "g_min passed");
      s = ~s;
      @(negedge clk);
      check(int'(index) == idx_of[k] && gate[0] == !s[2], "held without valid_in");
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
