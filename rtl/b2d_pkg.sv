// b2d_pkg: constants and types shared by the binary-to-decimal display converter.
//
// RADIX is the width of one decade. The segment
// patterns drive a common-anode seven-segment display: a segment lights when its
// bit is 0. Bit k drives segment k, numbered 0 top, 1 upper right, 2 lower
// right, 3 bottom, 4 lower left, 5 upper left, 6 middle. The ten digit patterns
// and the all-dark blank pattern are the ones the design was specified with; the
// numbering matches the DE1-style board the converter was built for.
package b2d_pkg;

  localparam int unsigned RADIX     = 10;

  // Width of the decade index produced from an n-bit number: (2^n - 1) / 10 is
  // always below 2^(n-3), since dividing by ten drops more than three bits.
  function automatic int unsigned decade_bits(int unsigned n_bits);
    return n_bits - 3;
  endfunction

  typedef logic [6:0] seg7_t;

  localparam seg7_t SEG_BLANK = 7'b1111111;
  localparam seg7_t SEG_ZERO  = 7'b1000000;
  localparam seg7_t SEG_ONE   = 7'b1111001;
  localparam seg7_t SEG_TWO   = 7'b0100100;
  localparam seg7_t SEG_THREE = 7'b0110000;
  localparam seg7_t SEG_FOUR  = 7'b0011001;
  localparam seg7_t SEG_FIVE  = 7'b0010010;
  localparam seg7_t SEG_SIX   = 7'b0000010;
  localparam seg7_t SEG_SEVEN = 7'b1111000;
  localparam seg7_t SEG_EIGHT = 7'b0000000;
  localparam seg7_t SEG_NINE  = 7'b0010000;

endpackage
