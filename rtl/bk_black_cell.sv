// bk_black_cell -- black cell of the Brent-Kung prefix tree.
//
// Combines a more significant group (g_hi, p_hi) with the adjacent less
// significant group (g_lo, p_lo) into the merged group:
//   g_out = g_hi | (p_hi & g_lo)     group generate
//   p_out = p_hi & p_lo              group propagate
// Two AND gates and one OR gate. Used wherever the merged group does not yet
// reach bit 0, so its propagate is still needed further down the tree.
//
// Timing: purely combinational, an AND-OR level.
module bk_black_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  input  logic p_lo,
  output logic g_out,
  output logic p_out
);

  always_comb begin
    g_out = g_hi | (p_hi & g_lo);
    p_out = p_hi & p_lo;
  end

endmodule
