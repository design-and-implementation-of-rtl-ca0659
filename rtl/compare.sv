// compare: decade detector of one digit stage.
//
// Tells which decade [0,9], [10,19], [20,29], ... the N_BITS-bit input b lies
// in and outputs the decade index c, that is b / 10, on N_BITS-3 bits. The
// decade test follows the specified behaviour: the input is held against the
// decade bounds 10, 20, 30, ... and c counts the bounds it reaches. Here that
// is a bank of constant comparators, one per bound, with the highest bound
// reached giving c; the comparators are this design's own way of writing the
// count. N_BITS-3 bits always hold the index, since (2^n - 1) / 10 < 2^(n-3).
//
// Purely combinational, no clock: c follows b after the comparator delay.
// Ports: b (N_BITS) in, c (N_BITS-3) out.
module compare
  import b2d_pkg::*;
#(
  parameter int unsigned N_BITS = 10
) (
  input  logic [N_BITS-1:0]              b,
  output logic [decade_bits(N_BITS)-1:0] c
);

  localparam int unsigned C_BITS = decade_bits(N_BITS);
  localparam int unsigned N_DEC  = 2 ** C_BITS;  // decade indices c can hold

  if (N_BITS < 4 || N_BITS > 28) begin : g_bad_width
    $error("compare: N_BITS must lie in 4..28");
  end

  always_comb begin
    c = '0;
    // Bounds in ascending order: the last one b reaches sets the index.
    for (int unsigned k = 1; k < N_DEC; k++) begin
      if (32'(b) >= k * RADIX) c = C_BITS'(k);
    end
  end

endmodule
