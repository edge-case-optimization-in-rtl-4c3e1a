// ns: Nikhilam-sutra multiplier by the constant 0xFF.
//
// For a byte x, x * 0xFF = x * 0x100 - x = (x - 1) * 0x100 + (0xFF - (x - 1)).
// The high byte of the product is therefore x - 1, and the low byte is the
// complement of that from 0xFF. Subtracting from an all-ones value never
// borrows, so the subtraction is a plain bitwise XOR with 0xFF. Example:
// 0x23 * 0xFF -> high byte 0x22, low byte 0x22 ^ 0xFF = 0xDD, product 0x22DD.
//
// The structure (one decrement feeding an XOR with 0xFF, the two bytes
// concatenated) is the one described for this block. The rule holds for every
// x from 1 to 0xFF; for x = 0 the decrement wraps and the output is 0xFF00
// rather than 0. The block is kept exactly as described and the zero case is
// left to the selecting logic around it (see vedic_top).
//
// Interface: in[7:0] multiplicand, out[15:0] = in * 0xFF. Purely
// combinational, no clock.
module ns
  import vedic_pkg::*;
(
  input  byte_t in,
  output prod_t out
);

  byte_t upper_byte;
  byte_t lower_byte;

  always_comb begin
    upper_byte = in - byte_t'(1);
    lower_byte = upper_byte ^ ALL_ONES;
    out        = {upper_byte, lower_byte};
  end

endmodule
