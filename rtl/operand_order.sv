// operand_order: compares the two operands and routes the larger to the
// "first operand" path of the Nikhilam multiplier and the smaller to the
// second. The first operand then has the larger (or equal) radix, so the
// exponent difference k1 - k2 used to align the second complement is never
// negative and a left shifter suffices.
//
// How it works: one W-bit magnitude comparator and two 2:1 multiplexers.
//
// Interface: in_a, in_b (W bits) in; greater, lesser (W bits) and swapped
// (1 when in_b > in_a) out.
// Timing: purely combinational.
//
// The reference design lists one 16-bit comparator in its synthesis report
// but does not draw it; its use to order the operands is this design's
// reading.
module operand_order
  import vedic_pkg::*;
#(
  parameter int unsigned W = OPERAND_W
) (
  input  logic [W-1:0] in_a,
  input  logic [W-1:0] in_b,
  output logic [W-1:0] greater,
  output logic [W-1:0] lesser,
  output logic         swapped
);

  assign swapped = (in_b > in_a);
  assign greater     = swapped ? in_b : in_a;
  assign lesser   = swapped ? in_a : in_b;

endmodule
