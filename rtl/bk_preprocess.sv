// bk_preprocess -- pre-processing stage of the Brent-Kung adder.
//
// For every bit position i it forms the bit propagate P[i] = A[i] ^ B[i] and
// the bit generate G[i] = A[i] & B[i]. These two vectors are the only inputs
// the carry generation stage needs; P is also reused by the post-processing
// stage to form the sum. The equations are the ones the adder is defined by.
//
// Interface: a, b are the WIDTH-bit operands; p, g are the WIDTH-bit
// propagate and generate vectors, bit i belonging to operand bit i.
// Timing: purely combinational, one gate level.
module bk_preprocess #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] p,
  output logic [WIDTH-1:0] g
);

  always_comb begin
    p = a ^ b;
    g = a & b;
  end

endmodule
