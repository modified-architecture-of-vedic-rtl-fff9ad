// subtractor: W-bit two's-complement subtractor, diff = a - b modulo 2^W.
//
// In the Nikhilam multiplier it forms each operand's complement
// (radix - operand, Column 2 of the Nikhilam method, a signed value) and the
// difference of the two operands' exponents.
//
// Interface: a, b (W bits) in; diff (W bits) out.
// Timing: purely combinational.
//
// The reference design only names the subtractors; the realisation as
// a + ~b + 1 is this design's choice.
module subtractor #(
  parameter int unsigned W = 17
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] diff
);

  assign diff = a + ~b + W'(1);

endmodule
