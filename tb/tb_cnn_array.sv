// tb_cnn_array: self-checking test of the toroidal cell grid.
//
// Runs two grids against the reference model, iteration by iteration:
// a 4 x 5 grid with r = 1, 8-bit data and 8-bit coefficients, and a 5 x 6
// grid with r = 2, 1-bit data and 4-bit coefficients. Non-square grids make
// any mix-up of rows and columns or of the wrap-around visible.
module tb_cnn_array;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int c1, f1, c2, f2;
  logic d1, d2;

  cnn_array_harness #(.ROWS(4), .COLS(5), .R(1), .D(8), .C(8)) h1 (
    .clk, .rst_n, .checks(c1), .failures(f1), .finished(d1));
  cnn_array_harness #(.ROWS(5), .COLS(6), .R(2), .D(1), .C(4)) h2 (
    .clk, .rst_n, .checks(c2), .failures(f2), .finished(d2));

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2 + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (d1 && d2);
    checks = c1 + c2;
    failures = f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
