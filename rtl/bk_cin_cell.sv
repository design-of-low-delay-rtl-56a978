// bk_cin_cell -- carry-in cell ("M") at bit 0 of the carry generation stage.
//
// Folds the adder's carry-in into bit 0 so that everything above it sees an
// ordinary prefix problem with no separate carry-in:
//   c0 = g0 | (p0 & cin)
// c0 is the carry out of bit 0 and takes the place of G0 in the prefix tree.
// Which cell does this and its inputs (P0, G0, Cin) follow the adder's
// diagrams; the AND-OR form is the standard carry equation.
//
// Timing: purely combinational, an AND-OR level.
module bk_cin_cell (
  input  logic g0,
  input  logic p0,
  input  logic cin,
  output logic c0
);

  always_comb c0 = g0 | (p0 & cin);

endmodule
