// vedic_pkg: constants shared by the Nikhilam multiplier.
//
// OPERAND_W is the operand width of the multiplier (16 x 16 bits). The other
// widths follow from it: the radix of an operand needs one bit more than the
// operand (2^16 does not fit in 16 bits), the product bus is 2*W+1 bits wide,
// which is the 33-bit product port of the reference design. The function
// expo_w() gives the width of a bit index into a word.
package vedic_pkg;

  localparam int unsigned OPERAND_W = 16;

  // Width of a bit-position index into a word of w bits (at least 1).
  function automatic int unsigned expo_w(int unsigned w);
    return (w > 1) ? $clog2(w) : 1;
  endfunction

endpackage
