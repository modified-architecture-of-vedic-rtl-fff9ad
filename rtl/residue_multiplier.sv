// residue_multiplier: signed W x W multiplier of the two operand complements
// (the "Multiplier" box of the Nikhilam architecture). Its product is the
// right-hand part of the Nikhilam result.
//
// How it works: the complements are two's-complement numbers; the product is
// formed by the synthesis tool's signed multiplier.
//
// Interface: a, b (W bits, signed) in; prod (2*W bits, signed) out.
// Timing: purely combinational.
//
// The 17 x 17 size comes from the reference design's synthesis report; the
// signed encoding and the use of the built-in operator are this design's
// choices.
module residue_multiplier #(
  parameter int unsigned W = 17
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] prod
);

  assign prod = (2 * W)'(a) * (2 * W)'(b);

endmodule
