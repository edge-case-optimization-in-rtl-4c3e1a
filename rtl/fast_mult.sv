// fast_mult: hard-coded squarer for the values 0 to 0x10.
//
// The Yavadunam squarer needs the square of its deficiency, a number between
// 1 and 16. Instead of a multiplier it reads the square from a small constant
// table indexed by the 5-bit value. The table is filled at elaboration by the
// formula entry[i] = i * i for i = 0..16; the remaining indices 17..31 cannot
// occur and hold 0. Synthesis turns the table into a ROM or a few LUTs.
//
// A 5-bit index and a 9-bit result (16 * 16 = 0x100 needs the ninth bit)
// are what the design uses; filling the table from the formula rather than a
// hand-written list is this implementation's choice.
//
// Interface: in[4:0] value to square, out[8:0] its square. Purely
// combinational.
module fast_mult
  import vedic_pkg::*;
(
  input  defic_t in,
  output dsq_t   out
);

  localparam int unsigned DEPTH = 1 << $bits(defic_t);
  localparam int unsigned MAX_IN = 1 << NIB_W;  // 0x10

  typedef dsq_t table_t [DEPTH];

  function automatic table_t square_table();
    table_t t;
    for (int unsigned i = 0; i < DEPTH; i++)
      t[i] = (i <= MAX_IN) ? dsq_t'(i * i) : '0;
    return t;
  endfunction

  localparam table_t SQUARES = square_table();

  assign out = SQUARES[in];

endmodule
