// ys_f: Yavadunam-sutra squarer for the inputs 0xF0 to 0xFF.
//
// A byte x = 0xF0 + n falls short of the base 0x100 by d = 0x10 - n, the
// deficiency of its low nibble from 0x10. Then
//     x^2 = (x - d) * 0x100 + d^2 .
// The block computes d (5 bits, 1..16), the high byte x - d, and d^2 from the
// fast_mult table. d^2 can be 0x100 (for x = 0xF0), so its ninth bit is
// carried into the high byte, and the low byte is the lower eight bits of
// d^2. Example: x = 0xFF, d = 1, high byte 0xFE, low byte 0x01 -> 0xFE01.
//
// Structure and names (deficiency, upper byte, upper sum with the carry bit,
// the fast_mult instance) follow the described design. The result is only a
// square when the high nibble of x is 0xF; for other inputs the output is
// meaningless and the selecting logic (vedic_top) must not use it.
//
// Interface: in[7:0], out[15:0] = in * in for in in 0xF0..0xFF. Purely
// combinational.
module ys_f
  import vedic_pkg::*;
(
  input  byte_t in,
  output prod_t out
);

  defic_t deficiency;
  byte_t  upper_byte;
  byte_t  upper_sum;
  dsq_t   defic_sq;

  fast_mult fs_instance (
    .in  (deficiency),
    .out (defic_sq)
  );

  always_comb begin
    deficiency = NIB_BASE - defic_t'(in[NIB_W-1:0]);
    upper_byte = in - byte_t'(deficiency);
    upper_sum  = upper_byte + byte_t'(defic_sq[DATA_W]);
    out        = {upper_sum, defic_sq[DATA_W-1:0]};
  end

endmodule
