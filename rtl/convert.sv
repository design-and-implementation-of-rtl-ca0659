// convert: digit extractor of one digit stage.
//
// Takes the N_BITS-bit stage input x and its decade index z (from compare,
// N_BITS-3 bits) and outputs y = x - 10*z, which is the decimal digit 0-9 of
// x (x modulo 10), on N_BITS bits as specified. The specification
// selects, for every possible z, the difference x - 10*z; that selection
// collapses into one subtraction of a constant multiple, which is how it is
// written here (a shift-and-add of z by ten, then a subtract).
//
// With a z that is not x / 10 the output is x - 10*z wrapped to N_BITS bits;
// inside the converter z always comes from compare on the same x.
// Purely combinational. Ports: x (N_BITS) in, z (N_BITS-3) in, y (N_BITS) out.
module convert
  import b2d_pkg::*;
#(
  parameter int unsigned N_BITS = 10
) (
  input  logic [N_BITS-1:0]              x,
  input  logic [decade_bits(N_BITS)-1:0] z,
  output logic [N_BITS-1:0]              y
);

  if (N_BITS < 4) begin : g_bad_width
    $error("convert: N_BITS must be at least 4");
  end

  logic [N_BITS-1:0] tens;  // 10 * z = 8z + 2z, wrapped to N_BITS bits

  always_comb begin
    tens = (N_BITS'(z) << 3) + (N_BITS'(z) << 1);
    y    = x - tens;
  end

endmodule
