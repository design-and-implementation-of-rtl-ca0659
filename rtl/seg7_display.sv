// seg7_display: digit to seven-segment decoder.
//
// Maps the value m, 0 to 9, onto the seven active-low segment drives n of one
// display (bit k drives segment k; see b2d_pkg for the numbering and the
// patterns). Any other value of m leaves all segments dark. The patterns and
// the blanking of out-of-range values are those the design was specified with;
// the input width IN_BITS equals the converter's word width N_BITS there, so
// its default is 10.
//
// Purely combinational. Ports: m (IN_BITS) in, n (7) out, 0 = segment lit.
module seg7_display
  import b2d_pkg::*;
#(
  parameter int unsigned IN_BITS = 10
) (
  input  logic [IN_BITS-1:0] m,
  output seg7_t              n
);

  if (IN_BITS < 4) begin : g_bad_width
    $error("seg7_display: IN_BITS must be at least 4 to hold 0-9");
  end

  always_comb begin
    unique case (m)
      IN_BITS'(0): n = SEG_ZERO;
      IN_BITS'(1): n = SEG_ONE;
      IN_BITS'(2): n = SEG_TWO;
      IN_BITS'(3): n = SEG_THREE;
      IN_BITS'(4): n = SEG_FOUR;
      IN_BITS'(5): n = SEG_FIVE;
      IN_BITS'(6): n = SEG_SIX;
      IN_BITS'(7): n = SEG_SEVEN;
      IN_BITS'(8): n = SEG_EIGHT;
      IN_BITS'(9): n = SEG_NINE;
      default:     n = SEG_BLANK;
    endcase
  end

endmodule
