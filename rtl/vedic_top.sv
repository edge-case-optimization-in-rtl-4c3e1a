// vedic_top: 8x8 unsigned multiplier that takes Vedic shortcuts on edge cases.
//
// Every product goes through a chain of 2:1 selectors that starts from the
// general multiplier's result and lets later, higher-priority stages replace
// it:
//   1. general product a * b            (external multiplier, mult_p)
//   2. b == 0xFF  -> ns(a)              Nikhilam, a * 0xFF
//   3. a == 0xFF  -> ns(b)              Nikhilam, b * 0xFF
//   4. a == b and a[7:4] == 0xF -> ys_f(a)   Yavadunam square, 0xF0..0xFF
//   5. a == 0 or b == 0 -> 0
// The last stage wins. It also covers the one input on which the Nikhilam
// rule fails (0 * 0xFF), and when both operands are 0xFF the squarer and
// the second Nikhilam instance agree. The order of the stages, the compares
// (two byte compares with zero, a == b, a nibble compare with a constant)
// and the AND/OR that form the select signals are those of the described
// top level; which of the two Nikhilam instances watches which operand is
// this implementation's reading and does not change any product.
//
// The general multiplier is a vendor IP core (combinational, no pipeline
// stages), so it stays outside this module: mult_a / mult_b carry the
// operands out to it and mult_p brings its 16-bit product back. Any
// combinational unsigned 8x8 multiplier fits there. The select flags are
// brought out too (path_*), one-hot, saying which unit produced the result.
//
// Interface: a[7:0], b[7:0] in, p[15:0] = a * b out. Purely combinational,
// no clock: the result is valid one combinational delay after the operands.
module vedic_top
  import vedic_pkg::*;
(
  input  byte_t a,
  input  byte_t b,
  output prod_t p,
  // external general multiplier
  output byte_t mult_a,
  output byte_t mult_b,
  input  prod_t mult_p,
  // which unit produced p
  output logic  path_zero,
  output logic  path_ys,
  output logic  path_ns_b,
  output logic  path_ns_a,
  output logic  path_general
);

  prod_t ns_a_out;   // a * 0xFF
  prod_t ns_b_out;   // b * 0xFF
  prod_t ys_out;     // a * a

  ns instance1 (.in(a), .out(ns_a_out));
  ns instance2 (.in(b), .out(ns_b_out));
  ys_f instance3 (.in(a), .out(ys_out));

  assign mult_a = a;
  assign mult_b = b;

  logic sel_b_ones, sel_a_ones, sel_square, sel_zero;
  prod_t stage1, stage2, stage3;

  always_comb begin
    sel_b_ones = (b == ALL_ONES);
    sel_a_ones = (a == ALL_ONES);
    sel_square = (a == b) && (a[DATA_W-1:NIB_W] == NIB_ONES);
    sel_zero   = (a == '0) || (b == '0);

    stage1 = sel_b_ones ? ns_a_out : mult_p;
    stage2 = sel_a_ones ? ns_b_out : stage1;
    stage3 = sel_square ? ys_out   : stage2;
    p      = sel_zero   ? '0       : stage3;

    path_zero    = sel_zero;
    path_ys      = !sel_zero && sel_square;
    path_ns_b    = !sel_zero && !sel_square && sel_a_ones;
    path_ns_a    = !sel_zero && !sel_square && !sel_a_ones && sel_b_ones;
    path_general = !sel_zero && !sel_square && !sel_a_ones && !sel_b_ones;
  end

endmodule
