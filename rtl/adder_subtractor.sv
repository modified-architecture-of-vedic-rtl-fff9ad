// adder_subtractor: W-bit adder/subtractor, y = a + b when sub = 0 and
// y = a - b when sub = 1, both modulo 2^W.
//
// How it works: b is inverted when sub is set and sub is fed in as the carry
// into a single adder.
//
// In the Nikhilam multiplier one instance subtracts the aligned complement of
// the second operand from the first operand (left-hand part of the result),
// the other adds the complements' product to the scaled left-hand part.
//
// Interface: a, b (W bits), sub in; y (W bits) out.
// Timing: purely combinational.
//
// The reference design only names the block and its 33-bit width; the
// one-adder realisation is this design's choice.
module adder_subtractor #(
  parameter int unsigned W = 33
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] y
);

  logic [W-1:0] b_eff;

  assign b_eff = b ^ {W{sub}};
  assign y     = a + b_eff + W'(sub);

endmodule
