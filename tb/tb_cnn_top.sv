// tb_cnn_top: end-to-end test of the network at its default size
// (3 x 3 cells, r = 1, 8-bit data, 8-bit coefficients, 64-iteration limit).
// cnn_top_driver supplies the stimulus and the checks; see there.
module tb_cnn_top;
  import cnn_pkg::*;
  localparam int ROWS = 3, COLS = 3, R = 1, D = 8, C = 8, MAX_ITER = 64;
  localparam int K = nbr_count(R);
  localparam int AW = $clog2(2 * K + 1);
  localparam int IT_W = $clog2(MAX_ITER + 1);
  localparam int SW = state_width(D, C, R);

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, tmpl_we, load, clear, start, busy, done, converged, y_valid;
  logic [AW-1:0] tmpl_addr;
  logic [C-1:0] tmpl_wdata;
  logic [ROWS-1:0][COLS-1:0][D-1:0] u_in, x0_in, y_out;
  logic [IT_W-1:0] iter_count;
  logic [ROWS-1:0][COLS-1:0][SW-1:0] x_state;
  int checks, failures;
  logic finished;

  cnn_top dut (
    .clk, .rst_n, .tmpl_we, .tmpl_addr, .tmpl_wdata, .load, .u_in, .x0_in,
    .clear, .start, .busy, .done, .converged, .iter_count, .y_out, .y_valid,
    .x_state);

  cnn_top_driver #(.ROWS(ROWS), .COLS(COLS), .R(R), .D(D), .C(C),
                   .MAX_ITER(MAX_ITER), .RUNS(120)) drv (
    .clk, .rst_n, .tmpl_we, .tmpl_addr, .tmpl_wdata, .load, .u_in, .x0_in,
    .clear, .start, .busy, .done, .converged, .iter_count, .y_out, .y_valid,
    .x_state, .checks, .failures, .finished);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1;
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
