// tb_cm_cell: random and equal cost pairs; g_min must be the smaller cost and
// sel must say which input won (0 on a tie).
module tb_cm_cell;
  import fsmpc_pkg::*;
  cost_t a, b, m;
  logic sel;
  int checks = 0, failures = 0;

  cm_cell dut (.g_a(a), .g_b(b), .g_min(m), .sel);

  initial begin
    for (int n = 0; n < 1000; n++) begin
      a = cost_t'($urandom);
      b = (n % 10 == 0) ? a : cost_t'($urandom);
      if (n % 7 == 0) b = cost_t'(a + 1);
      if (n % 11 == 0) b = cost_t'(a - 1);
      #1;
      checks++;
      if (m != ((b < a) ? b : a) || sel != (b < a)) begin
        failures++;
        $display("FAIL a=%0d b=%0d min=%0d sel=%0d", a, b, m, sel);
      end
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
