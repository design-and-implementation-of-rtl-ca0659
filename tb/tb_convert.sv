// tb_convert: self-checking test of the digit extractor.
//
// For every 10-bit input x with its true decade index z = x / 10, y must be
// x mod 10. Further pairs with an unrelated z (random) must give x - 10*z
// wrapped to 10 bits. A 5-bit instance is held against the listed truth-table
// rows (x, z) -> y.
module tb_convert;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [9:0] x10, y10;
  logic [6:0] z10;
  logic [4:0] x5, y5;
  logic [1:0] z5;

  convert                dut10 (.x(x10), .z(z10), .y(y10));
  convert #(.N_BITS(5))  dut5  (.x(x5),  .z(z5),  .y(y5));

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

  int tab_x [10] = '{0, 1, 5, 9, 10, 15, 19, 20, 29, 31};
  int tab_z [10] = '{0, 0, 0, 0, 1,  1,  1,  2,  2,  3};
  int tab_y [10] = '{0, 1, 5, 9, 0,  5,  9,  0,  9,  1};

  initial begin
    for (int v = 0; v < 1024; v++) begin
      @(negedge clk);
      x10 = 10'(v);
      z10 = 7'(v / 10);
      @(posedge clk);
      check($sformatf("x=%0d z=%0d", v, v / 10), int'(y10), v % 10);
    end
    for (int k = 0; k < 500; k++) begin
      int xv, zv;
      xv = int'($urandom_range(1023));
      zv = int'($urandom_range(127));
      @(negedge clk);
      x10 = 10'(xv);
      z10 = 7'(zv);
      @(posedge clk);
      check($sformatf("x=%0d z=%0d (free)", xv, zv), int'(y10), (xv - 10 * zv) & 1023);
    end
    foreach (tab_x[k]) begin
      @(negedge clk);
      x5 = 5'(tab_x[k]);
      z5 = 2'(tab_z[k]);
      @(posedge clk);
      check($sformatf("table row x=%0d z=%0d", tab_x[k], tab_z[k]), int'(y5), tab_y[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
