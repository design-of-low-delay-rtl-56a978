// brent_kung_adder -- WIDTH-bit parallel-prefix (Brent-Kung) adder.
//
// sum = a + b + cin, cout = carry out of the top bit. The adder has the three
// stages of its block diagram:
//   1. pre-processing  (bk_preprocess):  P = a ^ b, G = a & b per bit;
//   2. carry generation (bk_carry_tree): carry-in cell at bit 0, then a
//      Brent-Kung tree of black and gray cells giving every carry in
//      2*clog2(WIDTH)-1 cell levels instead of WIDTH ripple steps;
//   3. post-processing (bk_postprocess): sum[i] = P[i] ^ carry into bit i.
// WIDTH = 32 is the main configuration; WIDTH = 16 gives the 16-bit variant.
// The stage split, the cell equations, the carry-in cell and the 32-bit width
// follow the design; the cout output and the exact tree wiring are this
// design's own choices (see bk_carry_tree).
//
// Interface: a, b operands, cin carry-in; sum, cout results.
// Timing: purely combinational, no clock and no registers.
module brent_kung_adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH-1:0] p, g, c;

  bk_preprocess  #(.WIDTH(WIDTH)) u_pre  (.a(a), .b(b), .p(p), .g(g));
  bk_carry_tree  #(.WIDTH(WIDTH)) u_cgen (.g(g), .p(p), .cin(cin), .c(c));
  bk_postprocess #(.WIDTH(WIDTH)) u_post (.p(p), .c(c), .cin(cin), .sum(sum), .cout(cout));

endmodule
