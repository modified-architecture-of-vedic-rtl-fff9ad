// rsu: modified Radix Selection Unit of the Nikhilam multiplier.
//
// It picks the radix (the "base" of the Nikhilam method) for one operand: the
// Exponent Determinant finds n, the position of the operand's highest set bit,
// and a shifter moves the (W+1)-bit constant 1 left by n, giving radix = 2^n.
// So the radix is the largest power of two not above the operand, and the
// operand's complement radix - num is never positive (except for num = 0,
// where the radix is 1).
//
// Interface: num (W bits) in; radix (W+1 bits) out. The radix port is one bit
// wider than the operand, as the (n+1)-bit constant it is shifted from; since
// n <= W-1, its top bit is always 0.
// Timing: purely combinational.
//
// The structure (ED followed by a shifter fed with a (W+1)-bit 1) follows the
// reference design's modified RSU; the radix for num = 0 is this design's
// choice (it is what the ED's output 0 gives).
module rsu
  import vedic_pkg::*;
#(
  parameter int unsigned W = OPERAND_W
) (
  input  logic [W-1:0] num,
  output logic [W:0]   radix
);

  localparam int unsigned EW = expo_w(W);

  logic [EW-1:0] n;

  exponent_determinant #(.W(W)) u_ed (
    .num (num),
    .expo(n)
  );

  lshifter #(.W(W + 1), .SW(EW)) u_shift (
    .din  ((W + 1)'(1)),
    .shamt(n),
    .dout (radix)
  );

endmodule
