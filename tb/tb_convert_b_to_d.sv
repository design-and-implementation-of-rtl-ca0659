// tb_convert_b_to_d: end-to-end test of the converter at its default size.
//
// Drives every value of the 10-bit switch input (0..1023) into the default
// four-display converter, decodes each display's drive word back to a digit
// with the independent segment reference, and compares the four digits with
// the decimal digits of the input worked out here. It also checks the two
// board readings 511 -> "0511" and 1023 -> "1023".
//
// Mechanisms counted, each must happen at least once: a decade index passed
// on from stage i to stage i+1 (input >= 10^(i+1)), a leading zero shown on the
// top display, the largest input, and every digit each display can show.
module tb_convert_b_to_d;
  import b2d_pkg::*;
  import tb_seg_ref_pkg::*;

  localparam int N_BITS   = 10;
  localparam int N_DIGITS = 4;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N_BITS-1:0]          sw;
  seg7_t [N_DIGITS-1:0]       hex;

  convert_b_to_d dut (.sw(sw), .hex(hex));

  int ripple_into [N_DIGITS];     // inputs whose digit i+1 came from stage i
  int leading_zero = 0;
  int max_input    = 0;
  int seen [N_DIGITS][10];

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic apply_and_check(int v);
    int p;
    @(negedge clk);
    sw = N_BITS'(v);
    @(posedge clk);
    p = 1;
    for (int i = 0; i < N_DIGITS; i++) begin
      int got, exp;
      exp = (v / p) % 10;
      got = decode_pattern(hex[i]);
      check($sformatf("sw=%0d HEX%0d", v, i), got, exp);
      if (got >= 0 && got < 10) seen[i][got]++;
      if (i + 1 < N_DIGITS && v >= p * 10) ripple_into[i + 1]++;
      p = p * 10;
    end
    if (v < 1000 && decode_pattern(hex[N_DIGITS-1]) == 0) leading_zero++;
    if (v == 2 ** N_BITS - 1) max_input++;
  endtask

  task automatic require(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL never happened: %s", what);
    end else
      $display("  %-34s %0d", what, count);
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2 ** N_BITS; v++) apply_and_check(v);

    // The two readings shown on the board.
    apply_and_check(511);
    check("511 reads as 0511", 1000 * decode_pattern(hex[3]) + 100 * decode_pattern(hex[2])
          + 10 * decode_pattern(hex[1]) + decode_pattern(hex[0]), 511);
    check("HEX3 shows a zero at 511", int'(hex[3]), int'(7'b1000000));
    apply_and_check(1023);
    check("1023 reads as 1023", 1000 * decode_pattern(hex[3]) + 100 * decode_pattern(hex[2])
          + 10 * decode_pattern(hex[1]) + decode_pattern(hex[0]), 1023);

    $display("Mechanisms:");
    for (int i = 1; i < N_DIGITS; i++)
      require($sformatf("decade index into stage %0d", i), ripple_into[i]);
    require("leading zero shown", leading_zero);
    require("largest input", max_input);
    for (int i = 0; i < N_DIGITS; i++) begin
      automatic int p = 1;
      for (int k = 0; k < i; k++) p = p * 10;
      for (int d = 0; d < 10; d++)
        if (d * p <= 2 ** N_BITS - 1) require($sformatf("HEX%0d shows %0d", i, d), seen[i][d]);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
