// tb_cnn_output_latch: self-checking test of the output register.
//
// Two instances, 8-bit outputs (values +1 / -1) and 1-bit outputs (1 / 0),
// on a 3 x 4 grid. Checks that outputs follow the cells only on `capture`,
// hold otherwise, set `valid`, and that clear drops everything.
module tb_cnn_output_latch;
  localparam int ROWS = 3, COLS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, capture;
  logic [ROWS-1:0][COLS-1:0] y;
  logic [ROWS-1:0][COLS-1:0][7:0] yo8;
  logic [ROWS-1:0][COLS-1:0][0:0] yo1;
  logic v8, v1;

  cnn_output_latch #(.ROWS(ROWS), .COLS(COLS), .DATA_W(8)) dut8 (
    .clk, .rst_n, .clear, .capture, .y, .y_out(yo8), .valid(v8));
  cnn_output_latch #(.ROWS(ROWS), .COLS(COLS), .DATA_W(1)) dut1 (
    .clk, .rst_n, .clear, .capture, .y, .y_out(yo1), .valid(v1));

  int checks = 0, failures = 0;
  logic [ROWS-1:0][COLS-1:0] held;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; capture = 0; y = '0; held = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("valid after reset", v8, 0);
    check("data after reset", yo8, 0);
    y = (ROWS * COLS)'($urandom);
    capture = 1;
    @(negedge clk);
    capture = 0;
    held = y;
    for (int n = 0; n < 200; n++) begin
      y = ($urandom_range(0, 1) == 1) ? '1 : ($urandom_range(0, 1) == 1) ? '0
          : (ROWS * COLS)'($urandom);
      capture = ($urandom_range(0, 2) == 0);
      @(negedge clk);
      if (capture) held = y;
      capture = 0;
      for (int i = 0; i < ROWS; i++)
        for (int j = 0; j < COLS; j++) begin
          check("y8", yo8[i][j], held[i][j] ? 8'h01 : 8'hFF);
          check("y1", yo1[i][j], held[i][j]);
        end
      if (n == 100) begin
        clear = 1;
        @(negedge clk);
        clear = 0;
        check("clear valid", v8, 0);
        check("clear data", yo8, 0);
        held = '0;
        // next capture rearms
        capture = 1;
        @(negedge clk);
        capture = 0;
        held = y;
      end
      check("valid", v8 && v1, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
