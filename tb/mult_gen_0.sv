// Behavioural model of the general-purpose multiplier that vedic_top
// expects outside itself: an unsigned 8x8 combinational multiplier with no
// pipeline stages, ports A, B and P. Testbench use only.
module mult_gen_0
  import vedic_pkg::*;
(
  input  byte_t A,
  input  byte_t B,
  output prod_t P
);
  assign P = prod_t'(A) * prod_t'(B);
endmodule
