// sample_timer: sampling-period strobe for the FS-MPC controllers.
//
// The predictive controller evaluates all switching states once per sampling
// period Ts and applies the winner for the whole period. This counter divides
// the system clock down to Ts and raises `sample` for exactly one clock cycle
// at the end of every period: the first strobe comes TS_CYCLES cycles after
// reset is released, then one every TS_CYCLES cycles.
//
// Ts = 50 us follows the method; the 100 MHz clock, which makes the default
// TS_CYCLES = 5000, is this design's assumption.
module sample_timer #(
  parameter int unsigned TS_CYCLES = fsmpc_pkg::TS_CYCLES_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  output logic sample
);
  localparam int CW = (TS_CYCLES > 1) ? $clog2(TS_CYCLES) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      sample <= 1'b0;
    end else if (cnt == CW'(TS_CYCLES - 1)) begin
      cnt    <= '0;
      sample <= 1'b1;
    end else begin
      cnt    <= cnt + 1'b1;
      sample <= 1'b0;
    end
  end

  initial assert (TS_CYCLES >= 2) else $error("TS_CYCLES must be at least 2");
endmodule
