// tb_compare: self-checking test of the decade detector.
//
// Drives every input of a 10-bit and a 5-bit compare and checks the output
// against b / 10 worked out by the testbench. The 5-bit instance is also held
// against the listed truth-table rows (00000->00, 01001->00, 01010->01,
// 10011->01, 10100->10, 11101->10, 11110->11, 11111->11).
module tb_compare;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [9:0] b10;
  logic [6:0] c10;
  logic [4:0] b5;
  logic [1:0] c5;

  compare                dut10 (.b(b10), .c(c10));
  compare #(.N_BITS(5))  dut5  (.b(b5),  .c(c5));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int tab_in  [8] = '{0, 9, 10, 19, 20, 29, 30, 31};
  int tab_out [8] = '{0, 0, 1,  1,  2,  2,  3,  3};

  initial begin
    for (int v = 0; v < 1024; v++) begin
      @(negedge clk);
      b10 = 10'(v);
      b5  = 5'(v);
      @(posedge clk);
      check($sformatf("10-bit b=%0d", v), int'(c10), v / 10);
      if (v < 32) check($sformatf("5-bit b=%0d", v), int'(c5), v / 10);
    end
    foreach (tab_in[k]) begin
      @(negedge clk);
      b5 = 5'(tab_in[k]);
      @(posedge clk);
      check($sformatf("table row b=%0d", tab_in[k]), int'(c5), tab_out[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
