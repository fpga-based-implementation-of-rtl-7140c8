// theta_gen: reference phase angle theta* for the rotating dq frame.
//
// A 32-bit phase accumulator advances by STEP on every sampling strobe, so
// theta*(k) = k * w* * Ts. The output is the upper ANGLE_W bits of the
// accumulator as a binary angle (2^ANGLE_W = one turn). On the clock edge
// where `advance` is high the output still shows theta*(k); a block that
// captures it on that edge (the CORDIC) gets the angle of the current sample,
// and the accumulator moves on to theta*(k+1).
//
// The default STEP is for a 50 Hz reference at Ts = 50 us, 2^32/400; the
// frequency is this design's assumption, read from the plotted load currents.
module theta_gen
  import fsmpc_pkg::*;
#(
  parameter logic [31:0] STEP = THETA_STEP_DEFAULT
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   advance,
  output angle_t theta
);
  logic [31:0] acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       acc <= '0;
    else if (advance) acc <= acc + STEP;
  end

  assign theta = acc[31 -: ANGLE_W];
endmodule
