// nikhilam_mult: modified W x W Vedic multiplier based on the Nikhilam sutra
// ("all from 9 and the last from 10"), top level.
//
// Method. Each operand is written as a power-of-two radix minus a complement:
//   N1 = 2^k1 - c1,  N2 = 2^k2 - c2,   with k1 >= k2.
// Then
//   N1 * N2 = (N1 - c2 * 2^(k1-k2)) * 2^k2 + c1 * c2
// i.e. a left-hand part (first operand minus the cross complement, aligned to
// the first radix) scaled by the second radix, plus a right-hand part (product
// of the complements). This is the decimal pencil method (89 x 92: 89 - 8 = 81
// on the left, 11 x 8 = 88 on the right, 8188) generalised to two different
// binary radices.
//
// Datapath (all combinational):
//   operand_order      larger operand -> N1 path, smaller -> N2 path
//   rsu x2             radix R = 2^k, the largest power of two <= operand
//   subtractor x2      complement c = R - N (17-bit signed, <= 0, or 1 for N=0)
//   exponent_determinant x2 on the radices: k1, k2
//   subtractor         d = k1 - k2
//   lshifter           c2 << d
//   adder_subtractor   lhs = N1 - (c2 << d)        (subtract mode)
//   lshifter           lhs << k2
//   residue_multiplier c1 * c2                      (signed 17 x 17)
//   adder_subtractor   output1 = (lhs << k2) + c1*c2 (add mode)
// The 33-bit sums are taken modulo 2^33; the exact product is below 2^32, so
// the result is exact for every pair of operands, including zero.
//
// Interface: n1, n2 (W bits, unsigned) in; output1 (2*W+1 bits) out. The port
// names and the 33-bit product follow the reference simulation.
// Timing: purely combinational, no clock or reset; output1 settles one
// datapath delay after n1/n2 change.
//
// The block diagram (two RSUs, subtractors, exponent determinants on the
// radices, multiplier, shifters, two adder-subtractors) and the widths
// (17-bit subtractors and radix shifters, 17x17 multiplier, 33-bit adders)
// follow the reference design. The operand ordering comparator, the
// orientation of the complement (radix - operand) and the modulo-2^33
// signed arithmetic are this design's reading of it.
module nikhilam_mult
  import vedic_pkg::*;
#(
  parameter int unsigned W = OPERAND_W
) (
  input  logic [W-1:0]   n1,
  input  logic [W-1:0]   n2,
  output logic [2*W:0]   output1
);

  localparam int unsigned RW = W + 1;          // radix / complement width
  localparam int unsigned EW = expo_w(RW);     // exponent of a radix
  localparam int unsigned PW = 2 * W + 1;      // product width

  // Operand ordering
  // The swap flag is not needed further on: the product is symmetric.
  logic [W-1:0] greater, lesser;

  operand_order #(.W(W)) u_order (
    .in_a   (n1),
    .in_b   (n2),
    .greater    (greater),
    .lesser  (lesser),
    .swapped()
  );

  // Radix selection
  logic [RW-1:0] radix1, radix2;

  rsu #(.W(W)) u_rsu1 (.num(greater), .radix(radix1));
  rsu #(.W(W)) u_rsu2 (.num(lesser), .radix(radix2));

  // Complements c = radix - operand
  logic [RW-1:0] c1, c2;

  subtractor #(.W(RW)) u_sub_c1 (.a(radix1), .b(RW'(greater)), .diff(c1));
  subtractor #(.W(RW)) u_sub_c2 (.a(radix2), .b(RW'(lesser)), .diff(c2));

  // Exponents of the radices and their difference
  logic [EW-1:0] k1, k2, kd;

  exponent_determinant #(.W(RW)) u_ed1 (.num(radix1), .expo(k1));
  exponent_determinant #(.W(RW)) u_ed2 (.num(radix2), .expo(k2));

  subtractor #(.W(EW)) u_sub_k (.a(k1), .b(k2), .diff(kd));

  // Left-hand part: N1 - c2 * 2^(k1-k2), then scaled by 2^k2
  logic [PW-1:0] c2_ext, c2_aligned, lhs, lhs_scaled;

  assign c2_ext = PW'($signed(c2));

  lshifter #(.W(PW), .SW(EW)) u_shift_c2 (
    .din  (c2_ext),
    .shamt(kd),
    .dout (c2_aligned)
  );

  adder_subtractor #(.W(PW)) u_addsub_lhs (
    .a  (PW'(greater)),
    .b  (c2_aligned),
    .sub(1'b1),
    .y  (lhs)
  );

  lshifter #(.W(PW), .SW(EW)) u_shift_lhs (
    .din  (lhs),
    .shamt(k2),
    .dout (lhs_scaled)
  );

  // Right-hand part: c1 * c2. Only the low 33 bits of the 34-bit signed
  // product enter the modulo-2^33 sum, so its top bit is left unused.
  logic signed [2*RW-1:0] rhs;

  residue_multiplier #(.W(RW)) u_mult (
    .a   (c1),
    .b   (c2),
    .prod(rhs)
  );

  // Result
  adder_subtractor #(.W(PW)) u_addsub_out (
    .a  (lhs_scaled),
    .b  (rhs[PW-1:0]),
    .sub(1'b0),
    .y  (output1)
  );

endmodule
