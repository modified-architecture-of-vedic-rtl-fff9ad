// lshifter: logical left shifter used in three places of the Nikhilam
// multiplier: inside each Radix Selection Unit (to turn an exponent n into the
// radix 2^n), to align the complement of the second operand by the exponent
// difference, and to scale the left-hand part of the product by the radix of
// the second operand.
//
// How it works: a barrel shifter of SW stages; stage s shifts by 2^s when
// bit s of the shift amount is set. Bits shifted out at the top are lost and
// zeros enter at the bottom.
//
// Interface: din (W bits), shamt (SW bits) in; dout (W bits) out.
// Timing: purely combinational.
//
// The reference design names the shifters and their widths; the barrel
// structure is this design's choice.
module lshifter #(
  parameter int unsigned W  = 17,
  parameter int unsigned SW = 5
) (
  input  logic [W-1:0]  din,
  input  logic [SW-1:0] shamt,
  output logic [W-1:0]  dout
);

  logic [W-1:0] stage [SW+1];

  assign stage[0] = din;

  for (genvar s = 0; s < SW; s++) begin : g_stage
    assign stage[s+1] = shamt[s] ? (stage[s] << (2 ** s)) : stage[s];
  end

  assign dout = stage[SW];

endmodule
