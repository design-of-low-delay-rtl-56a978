// bk_postprocess -- post-processing (sum) stage of the Brent-Kung adder.
//
// Each sum bit is the bit propagate XORed with the carry coming out of the
// bit below it: s[i] = p[i] ^ c[i-1], with the adder carry-in taking the
// place of c[-1] for bit 0. The carry out of the whole adder is the carry
// out of the top bit, c[WIDTH-1].
//
// Interface: p is the propagate vector from pre-processing, c the carry
// vector from the carry generation stage (c[i] = carry out of bit i), cin the
// adder carry-in; sum and cout are the adder results.
// Timing: purely combinational, one XOR level.
module bk_postprocess #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] c,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  always_comb begin
    sum  = p ^ {c[WIDTH-2:0], cin};
    cout = c[WIDTH-1];
  end

endmodule
