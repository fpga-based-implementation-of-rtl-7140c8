// tb_sample_timer: checks that the strobe is one cycle wide, that the first
// comes TS_CYCLES cycles after reset release and that the period is exactly
// TS_CYCLES, for a short period (7) and for the default period (5000).
module tb_sample_timer;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic s_short, s_def;
  int checks = 0, failures = 0;
  int cyc = 0, last_short = 0, last_def = 0, n_short = 0, n_def = 0;

  always #5 clk = ~clk;

  sample_timer #(.TS_CYCLES(7)) dut_short (.clk, .rst_n, .sample(s_short));
  sample_timer                  dut_def   (.clk, .rst_n, .sample(s_def));

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (s_short) begin
      checks++;
      if (cyc - last_short != 7) begin
        failures++;
        $display("FAIL short period %0d", cyc - last_short);
      end
      last_short <= cyc;
      n_short++;
    end
    if (s_def) begin
      checks++;
      if (cyc - last_def != 5000) begin
        failures++;
        $display("FAIL default period %0d", cyc - last_def);
      end
      last_def <= cyc;
      n_def++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // cyc counts edges from release; the first strobe is seen at cyc = TS_CYCLES,
    // so with last_* = 0 the first gap checked is TS_CYCLES as well
    repeat (3 * 5000 + 20) @(posedge clk);
    checks++;
    if (n_short < 2000 || n_def != 3) begin
      failures++;
      $display("FAIL strobe counts %0d %0d", n_short, n_def);
    end
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
