// Shared types and constants of the 8-bit edge-case multiplier.
//
// Operands are unsigned bytes and products unsigned 16-bit words. The two
// Vedic shortcuts work in base 0x100 (the Nikhilam multiplier takes 0xFF as
// its fixed coefficient, "base minus one") and per nibble (the Yavadunam
// squarer measures the deficiency of the low nibble from 0x10). The 8-bit
// width follows the design as described; the named constants are only there
// so the modules read in terms of the method rather than bare numbers.
package vedic_pkg;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned PROD_W = 2 * DATA_W;
  localparam int unsigned NIB_W  = DATA_W / 2;

  typedef logic [DATA_W-1:0] byte_t;
  typedef logic [PROD_W-1:0] prod_t;
  typedef logic [NIB_W-1:0]  nibble_t;
  // Deficiency of a nibble from 0x10: 1..16, so one bit wider than a nibble.
  typedef logic [NIB_W:0]    defic_t;
  // Square of a deficiency: up to 0x100, so one bit wider than a byte.
  typedef logic [DATA_W:0]   dsq_t;

  localparam byte_t   ALL_ONES  = '1;                  // 0xFF, Nikhilam coefficient
  localparam defic_t  NIB_BASE  = defic_t'(1) << NIB_W; // 0x10, Yavadunam base
  localparam nibble_t NIB_ONES  = '1;                  // 0xF, high nibble of the squarer's range

endpackage
