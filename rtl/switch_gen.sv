// switch_gen: gate signals and index number from the optimum switching state.
//
// S_opt = {Sa, Sb, Sc} is sliced into the upper-switch gates G1 = Sa,
// G3 = Sb, G5 = Sc; the lower switch of each leg gets the complement
// (G2 = ~Sa, G4 = ~Sb, G6 = ~Sc). The index number is S_opt read as a binary
// number, so the state can be watched as a value 0..7. Everything, with
// g_min, is registered when `valid_in` is high and held for the rest of the
// sampling period, one cycle after `valid_in`.
//
// gate[0] = G1, gate[1] = G2, ... gate[5] = G6. Reset applies S0 = 000
// (all three lower switches on, the zero vector); no dead time is inserted.
// Both are this design's choices.
module switch_gen
  import fsmpc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      valid_in,
  input  sw_state_t s_opt,
  input  cost_t     g_min_in,
  output logic      valid_out,
  output logic [5:0] gate,
  output logic [2:0] index,
  output cost_t     g_min
);
  logic sa, sb, sc;

  always_comb begin
    {sa, sb, sc} = s_opt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      gate      <= 6'b101010;
      index     <= '0;
      g_min     <= '0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) begin
        gate  <= {~sc, sc, ~sb, sb, ~sa, sa};
        index <= s_opt;
        g_min <= g_min_in;
      end
    end
  end

  // each leg is always complementary: never both switches of a leg on
  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n)
    gate[0] != gate[1] && gate[2] != gate[3] && gate[4] != gate[5])
    else $error("shoot-through: both switches of a leg on");
endmodule
