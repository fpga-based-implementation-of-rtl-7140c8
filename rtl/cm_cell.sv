// cm_cell: one compare-and-multiplex ("C&M") cell of the minimum search.
//
// A comparator decides whether the second cost is smaller than the first;
// its output is the select line `sel` of a 2:1 multiplexer that passes the
// smaller cost to `g_min`. The same `sel` steers the matching switching-state
// multiplexer elsewhere. On equal costs `sel` = 0 keeps the first input, a
// tie rule that is this design's choice. Purely combinational.
module cm_cell
  import fsmpc_pkg::*;
(
  input  cost_t g_a,
  input  cost_t g_b,
  output cost_t g_min,
  output logic  sel
);
  always_comb begin
    sel   = (g_b < g_a);
    g_min = sel ? g_b : g_a;
  end
endmodule
