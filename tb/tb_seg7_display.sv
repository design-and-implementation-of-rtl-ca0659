// tb_seg7_display: self-checking test of the seven-segment decoder.
//
// Drives every value of a 10-bit and of a 4-bit decoder input and compares the
// drive word with the reference built from the list of lit segments per digit
// (values above 9 must leave the display dark). Also checks the pattern for 5
// lights exactly segments 0, 2, 3, 5 and 6.
module tb_seg7_display;
  import tb_seg_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [9:0] m10;
  logic [6:0] n10;
  logic [3:0] m4;
  logic [6:0] n4;

  seg7_display                 dut10 (.m(m10), .n(n10));
  seg7_display #(.IN_BITS(4))  dut4  (.m(m4),  .n(n4));

  task automatic check(string what, logic [6:0] got, logic [6:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      @(negedge clk);
      m10 = 10'(v);
      m4  = 4'(v);
      @(posedge clk);
      check($sformatf("m=%0d (10 bit)", v), n10, ref_pattern(v < 10 ? v : 99));
      if (v < 16)
        check($sformatf("m=%0d (4 bit)", v), n4, ref_pattern(v < 10 ? v : 99));
    end
    @(negedge clk);
    m10 = 10'd5;
    @(posedge clk);
    check("five lights 0,2,3,5,6", n10, 7'b0010010);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
