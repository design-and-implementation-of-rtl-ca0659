// tb_convert_b_to_d_general: the converter at sizes other than the default.
//
// Three instances, each driven with every input value:
//   5 bits, 2 displays  (0..31, the size of the worked truth tables)
//   14 bits, 5 displays (0..16383, a wider word and one more stage)
//   10 bits, 2 displays (too few displays: they must show the input mod 100)
// Each display is decoded with the independent segment reference and compared
// with the decimal digit worked out here.
module tb_convert_b_to_d_general;
  import b2d_pkg::*;
  import tb_seg_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [4:0]     sw_a;
  seg7_t [1:0]    hex_a;
  logic [13:0]    sw_b;
  seg7_t [4:0]    hex_b;
  logic [9:0]     sw_c;
  seg7_t [1:0]    hex_c;

  convert_b_to_d #(.N_BITS(5),  .N_DIGITS(2)) dut_a (.sw(sw_a), .hex(hex_a));
  convert_b_to_d #(.N_BITS(14), .N_DIGITS(5)) dut_b (.sw(sw_b), .hex(hex_b));
  convert_b_to_d #(.N_BITS(10), .N_DIGITS(2)) dut_c (.sw(sw_c), .hex(hex_c));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2 ** 14; v++) begin
      int p;
      @(negedge clk);
      sw_a = 5'(v);
      sw_b = 14'(v);
      sw_c = 10'(v);
      @(posedge clk);
      p = 1;
      for (int i = 0; i < 5; i++) begin
        check($sformatf("14-bit sw=%0d HEX%0d", v, i), decode_pattern(hex_b[i]), (v / p) % 10);
        if (i < 2 && v < 32)
          check($sformatf("5-bit sw=%0d HEX%0d", v, i), decode_pattern(hex_a[i]), (v / p) % 10);
        if (i < 2 && v < 1024)
          check($sformatf("10-bit/2 sw=%0d HEX%0d", v, i), decode_pattern(hex_c[i]), (v / p) % 10);
        p = p * 10;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
