// bk_gray_cell -- gray cell of the Brent-Kung prefix tree.
//
// Combines a more significant group (g_hi, p_hi) with a less significant
// group whose generate g_lo already spans down to bit 0 (including the
// carry-in), so the result is a final carry:
//   g_out = g_hi | (p_hi & g_lo)
// No group propagate is formed: once a group reaches bit 0 its propagate is
// never used again, which is what saves the AND gate against a black cell.
//
// Timing: purely combinational, an AND-OR level.
module bk_gray_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  output logic g_out
);

  always_comb g_out = g_hi | (p_hi & g_lo);

endmodule
