// convert_b_to_d: N-digit binary-to-decimal converter for seven-segment displays.
//
// Shows the N_BITS-bit unsigned number sw in decimal on N_DIGITS displays,
// hex[0] the units digit. Each digit comes from one stage of three blocks:
// compare finds the stage input's decade index (input / 10), convert subtracts
// ten times that index to leave the digit (input mod 10), and seg7_display
// lights the digit. Stage 0 takes sw; every later stage takes the decade
// index of the stage before, zero-extended to N_BITS bits, so stage i sees
// sw / 10^i and shows digit i. This ripple of stages, the word width kept at
// N_BITS in every stage, and the defaults (10 input bits from ten switches,
// four displays, so 0..1023) follow the specified design. Leading zeros are
// shown, not blanked. With too few digits for 2^N_BITS - 1 the displays show
// sw modulo 10^N_DIGITS; the last stage's decade index is then the part that
// is not shown and is left unconnected, as it is at the defaults (always 0).
//
// Purely combinational: no clock, no reset, no registers. The delay from sw to
// hex[N_DIGITS-1] is N_DIGITS compare/convert stages in series.
// Ports: sw (N_BITS) in; hex[i] (7 bits, active low, bit k = segment k) out.
module convert_b_to_d
  import b2d_pkg::*;
#(
  parameter int unsigned N_BITS   = 10,
  parameter int unsigned N_DIGITS = 4
) (
  input  logic [N_BITS-1:0]        sw,
  output seg7_t [N_DIGITS-1:0]     hex
);

  localparam int unsigned C_BITS = decade_bits(N_BITS);

  if (N_DIGITS < 1) begin : g_bad_digits
    $error("convert_b_to_d: N_DIGITS must be at least 1");
  end

  logic [N_BITS-1:0] stage_in [N_DIGITS];  // sw / 10^i
  logic [C_BITS-1:0] decade   [N_DIGITS];  // sw / 10^(i+1)
  logic [N_BITS-1:0] digit    [N_DIGITS];  // (sw / 10^i) mod 10

  assign stage_in[0] = sw;

  for (genvar i = 0; i < N_DIGITS; i++) begin : g_digit
    compare #(.N_BITS(N_BITS)) u_compare (
      .b (stage_in[i]),
      .c (decade[i])
    );

    convert #(.N_BITS(N_BITS)) u_convert (
      .x (stage_in[i]),
      .z (decade[i]),
      .y (digit[i])
    );

    seg7_display #(.IN_BITS(N_BITS)) u_seg7_display (
      .m (digit[i]),
      .n (hex[i])
    );

    if (i + 1 < N_DIGITS) begin : g_next
      assign stage_in[i+1] = N_BITS'(decade[i]);
    end
  end

endmodule
