// exponent_determinant: the "Exponent Determinant" (ED) of the Nikhilam
// multiplier. It returns the maximum power of two present in its input, that
// is the index of the most significant 1 bit, so that 2^expo <= num < 2^(expo+1).
//
// How it works: a priority encoder written as a loop from the least to the
// most significant bit; the last set bit found wins.
//
// Interface: num (W bits, unsigned) in, expo (expo_w(W) bits) out.
// Timing: purely combinational.
//
// The function of the block is the reference design's; the priority-encoder
// structure and the value 0 for an all-zero input are this design's choices.
module exponent_determinant
  import vedic_pkg::*;
#(
  parameter int unsigned W = OPERAND_W
) (
  input  logic [W-1:0]         num,
  output logic [expo_w(W)-1:0] expo
);

  always_comb begin
    expo = '0;
    for (int unsigned i = 0; i < W; i++) begin
      if (num[i]) expo = expo_w(W)'(i);
    end
  end

endmodule
