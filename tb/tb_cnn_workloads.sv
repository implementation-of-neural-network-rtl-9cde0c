// tb_cnn_workloads: end-to-end runs of the network in every configuration
// of the evaluation: the four r = 1 / r = 2 networks (1-, 4- and 8-bit data,
// 4- and 8-bit coefficients) and the 2-, 3- and 8-bit networks that run the
// corner ("angle embossment") and edge templates with 4-bit coefficients.
// Each configuration gets its own cnn_top and cnn_top_driver, which checks
// results, iteration counts and latency against the reference model and
// exercises every control mechanism.
module tb_cnn_workloads;
  import cnn_pkg::*;
  localparam int MAX_ITER = 64;
  localparam int IT_W = $clog2(MAX_ITER + 1);

  logic clk = 0;
  always #5 clk = ~clk;

  // Table 1: r = 1, 1-bit data, 4-bit coefficients
  localparam int T1A_K = nbr_count(1);
  localparam int T1A_AW = $clog2(2 * T1A_K + 1);
  localparam int T1A_SW = state_width(1, 4, 1);
  logic t1a_rst_n, t1a_we, t1a_load, t1a_clear, t1a_start, t1a_busy, t1a_done, t1a_conv, t1a_valid, t1a_fin;
  logic [T1A_AW-1:0] t1a_addr;
  logic [4-1:0] t1a_wdata;
  logic [3-1:0][3-1:0][1-1:0] t1a_u, t1a_x0, t1a_y;
  logic [IT_W-1:0] t1a_iter;
  logic [3-1:0][3-1:0][T1A_SW-1:0] t1a_x;
  int t1a_checks, t1a_failures;

  cnn_top #(.ROWS(3), .COLS(3), .R(1), .DATA_W(1), .COEF_W(4), .MAX_ITER(MAX_ITER)) t1a_dut (
    .clk, .rst_n(t1a_rst_n), .tmpl_we(t1a_we), .tmpl_addr(t1a_addr), .tmpl_wdata(t1a_wdata),
    .load(t1a_load), .u_in(t1a_u), .x0_in(t1a_x0), .clear(t1a_clear), .start(t1a_start),
    .busy(t1a_busy), .done(t1a_done), .converged(t1a_conv), .iter_count(t1a_iter),
    .y_out(t1a_y), .y_valid(t1a_valid), .x_state(t1a_x));

  cnn_top_driver #(.ROWS(3), .COLS(3), .R(1), .D(1), .C(4), .MAX_ITER(MAX_ITER), .RUNS(60)) t1a_drv (
    .clk, .rst_n(t1a_rst_n), .tmpl_we(t1a_we), .tmpl_addr(t1a_addr), .tmpl_wdata(t1a_wdata),
    .load(t1a_load), .u_in(t1a_u), .x0_in(t1a_x0), .clear(t1a_clear), .start(t1a_start),
    .busy(t1a_busy), .done(t1a_done), .converged(t1a_conv), .iter_count(t1a_iter),
    .y_out(t1a_y), .y_valid(t1a_valid), .x_state(t1a_x),
    .checks(t1a_checks), .failures(t1a_failures), .finished(t1a_fin));

  // Table 1: r = 1, 4-bit data, 4-bit coefficients
  localparam int T1B_K = nbr_count(1);
  localparam int T1B_AW = $clog2(2 * T1B_K + 1);
  localparam int T1B_SW = state_width(4, 4, 1);
  logic t1b_rst_n, t1b_we, t1b_load, t1b_clear, t1b_start, t1b_busy, t1b_done, t1b_conv, t1b_valid, t1b_fin;
  logic [T1B_AW-1:0] t1b_addr;
  logic [4-1:0] t1b_wdata;
  logic [3-1:0][3-1:0][4-1:0] t1b_u, t1b_x0, t1b_y;
  logic [IT_W-1:0] t1b_iter;
  logic [3-1:0][3-1:0][T1B_SW-1:0] t1b_x;
  int t1b_checks, t1b_failures;

  cnn_top #(.ROWS(3), .COLS(3), .R(1), .DATA_W(4), .COEF_W(4), .MAX_ITER(MAX_ITER)) t1b_dut (
    .clk, .rst_n(t1b_rst_n), .tmpl_we(t1b_we), .tmpl_addr(t1b_addr), .tmpl_wdata(t1b_wdata),
    .load(t1b_load), .u_in(t1b_u), .x0_in(t1b_x0), .clear(t1b_clear), .start(t1b_start),
    .busy(t1b_busy), .done(t1b_done), .converged(t1b_conv), .iter_count(t1b_iter),
    .y_out(t1b_y), .y_valid(t1b_valid), .x_state(t1b_x));

  cnn_top_driver #(.ROWS(3), .COLS(3), .R(1), .D(4), .C(4), .MAX_ITER(MAX_ITER), .RUNS(60)) t1b_drv (
    .clk, .rst_n(t1b_rst_n), .tmpl_we(t1b_we), .tmpl_addr(t1b_addr), .tmpl_wdata(t1b_wdata),
    .load(t1b_load), .u_in(t1b_u), .x0_in(t1b_x0), .clear(t1b_clear), .start(t1b_start),
    .busy(t1b_busy), .done(t1b_done), .converged(t1b_conv), .iter_count(t1b_iter),
    .y_out(t1b_y), .y_valid(t1b_valid), .x_state(t1b_x),
    .checks(t1b_checks), .failures(t1b_failures), .finished(t1b_fin));

  // Table 1: r = 1, 8-bit data, 8-bit coefficients
  localparam int T1C_K = nbr_count(1);
  localparam int T1C_AW = $clog2(2 * T1C_K + 1);
  localparam int T1C_SW = state_width(8, 8, 1);
  logic t1c_rst_n, t1c_we, t1c_load, t1c_clear, t1c_start, t1c_busy, t1c_done, t1c_conv, t1c_valid, t1c_fin;
  logic [T1C_AW-1:0] t1c_addr;
  logic [8-1:0] t1c_wdata;
  logic [3-1:0][3-1:0][8-1:0] t1c_u, t1c_x0, t1c_y;
  logic [IT_W-1:0] t1c_iter;
  logic [3-1:0][3-1:0][T1C_SW-1:0] t1c_x;
  int t1c_checks, t1c_failures;

  cnn_top #(.ROWS(3), .COLS(3), .R(1), .DATA_W(8), .COEF_W(8), .MAX_ITER(MAX_ITER)) t1c_dut (
    .clk, .rst_n(t1c_rst_n), .tmpl_we(t1c_we), .tmpl_addr(t1c_addr), .tmpl_wdata(t1c_wdata),
    .load(t1c_load), .u_in(t1c_u), .x0_in(t1c_x0), .clear(t1c_clear), .start(t1c_start),
    .busy(t1c_busy), .done(t1c_done), .converged(t1c_conv), .iter_count(t1c_iter),
    .y_out(t1c_y), .y_valid(t1c_valid), .x_state(t1c_x));

  cnn_top_driver #(.ROWS(3), .COLS(3), .R(1), .D(8), .C(8), .MAX_ITER(MAX_ITER), .RUNS(60)) t1c_drv (
    .clk, .rst_n(t1c_rst_n), .tmpl_we(t1c_we), .tmpl_addr(t1c_addr), .tmpl_wdata(t1c_wdata),
    .load(t1c_load), .u_in(t1c_u), .x0_in(t1c_x0), .clear(t1c_clear), .start(t1c_start),
    .busy(t1c_busy), .done(t1c_done), .converged(t1c_conv), .iter_count(t1c_iter),
    .y_out(t1c_y), .y_valid(t1c_valid), .x_state(t1c_x),
    .checks(t1c_checks), .failures(t1c_failures), .finished(t1c_fin));

  // Table 1: r = 2, 1-bit data, 4-bit coefficients (5 x 5 cells)
  localparam int T1D_K = nbr_count(2);
  localparam int T1D_AW = $clog2(2 * T1D_K + 1);
  localparam int T1D_SW = state_width(1, 4, 2);
  logic t1d_rst_n, t1d_we, t1d_load, t1d_clear, t1d_start, t1d_busy, t1d_done, t1d_conv, t1d_valid, t1d_fin;
  logic [T1D_AW-1:0] t1d_addr;
  logic [4-1:0] t1d_wdata;
  logic [5-1:0][5-1:0][1-1:0] t1d_u, t1d_x0, t1d_y;
  logic [IT_W-1:0] t1d_iter;
  logic [5-1:0][5-1:0][T1D_SW-1:0] t1d_x;
  int t1d_checks, t1d_failures;

  cnn_top #(.ROWS(5), .COLS(5), .R(2), .DATA_W(1), .COEF_W(4), .MAX_ITER(MAX_ITER)) t1d_dut (
    .clk, .rst_n(t1d_rst_n), .tmpl_we(t1d_we), .tmpl_addr(t1d_addr), .tmpl_wdata(t1d_wdata),
    .load(t1d_load), .u_in(t1d_u), .x0_in(t1d_x0), .clear(t1d_clear), .start(t1d_start),
    .busy(t1d_busy), .done(t1d_done), .converged(t1d_conv), .iter_count(t1d_iter),
    .y_out(t1d_y), .y_valid(t1d_valid), .x_state(t1d_x));

  cnn_top_driver #(.ROWS(5), .COLS(5), .R(2), .D(1), .C(4), .MAX_ITER(MAX_ITER), .RUNS(60)) t1d_drv (
    .clk, .rst_n(t1d_rst_n), .tmpl_we(t1d_we), .tmpl_addr(t1d_addr), .tmpl_wdata(t1d_wdata),
    .load(t1d_load), .u_in(t1d_u), .x0_in(t1d_x0), .clear(t1d_clear), .start(t1d_start),
    .busy(t1d_busy), .done(t1d_done), .converged(t1d_conv), .iter_count(t1d_iter),
    .y_out(t1d_y), .y_valid(t1d_valid), .x_state(t1d_x),
    .checks(t1d_checks), .failures(t1d_failures), .finished(t1d_fin));

  // Tables 2/3: 2-bit data
  localparam int T2A_K = nbr_count(1);
  localparam int T2A_AW = $clog2(2 * T2A_K + 1);
  localparam int T2A_SW = state_width(2, 4, 1);
  logic t2a_rst_n, t2a_we, t2a_load, t2a_clear, t2a_start, t2a_busy, t2a_done, t2a_conv, t2a_valid, t2a_fin;
  logic [T2A_AW-1:0] t2a_addr;
  logic [4-1:0] t2a_wdata;
  logic [3-1:0][3-1:0][2-1:0] t2a_u, t2a_x0, t2a_y;
  logic [IT_W-1:0] t2a_iter;
  logic [3-1:0][3-1:0][T2A_SW-1:0] t2a_x;
  int t2a_checks, t2a_failures;

  cnn_top #(.ROWS(3), .COLS(3), .R(1), .DATA_W(2), .COEF_W(4), .MAX_ITER(MAX_ITER)) t2a_dut (
    .clk, .rst_n(t2a_rst_n), .tmpl_we(t2a_we), .tmpl_addr(t2a_addr), .tmpl_wdata(t2a_wdata),
    .load(t2a_load), .u_in(t2a_u), .x0_in(t2a_x0), .clear(t2a_clear), .start(t2a_start),
    .busy(t2a_busy), .done(t2a_done), .converged(t2a_conv), .iter_count(t2a_iter),
    .y_out(t2a_y), .y_valid(t2a_valid), .x_state(t2a_x));

  cnn_top_driver #(.ROWS(3), .COLS(3), .R(1), .D(2), .C(4), .MAX_ITER(MAX_ITER), .RUNS(60)) t2a_drv (
    .clk, .rst_n(t2a_rst_n), .tmpl_we(t2a_we), .tmpl_addr(t2a_addr), .tmpl_wdata(t2a_wdata),
    .load(t2a_load), .u_in(t2a_u), .x0_in(t2a_x0), .clear(t2a_clear), .start(t2a_start),
    .busy(t2a_busy), .done(t2a_done), .converged(t2a_conv), .iter_count(t2a_iter),
    .y_out(t2a_y), .y_valid(t2a_valid), .x_state(t2a_x),
    .checks(t2a_checks), .failures(t2a_failures), .finished(t2a_fin));

  // Tables 2/3: 3-bit data
  localparam int T2B_K = nbr_count(1);
  localparam int T2B_AW = $clog2(2 * T2B_K + 1);
  localparam int T2B_SW = state_width(3, 4, 1);
  logic t2b_rst_n, t2b_we, t2b_load, t2b_clear, t2b_start, t2b_busy, t2b_done, t2b_conv, t2b_valid, t2b_fin;
  logic [T2B_AW-1:0] t2b_addr;
  logic [4-1:0] t2b_wdata;
  logic [3-1:0][3-1:0][3-1:0] t2b_u, t2b_x0, t2b_y;
  logic [IT_W-1:0] t2b_iter;
  logic [3-1:0][3-1:0][T2B_SW-1:0] t2b_x;
  int t2b_checks, t2b_failures;

  cnn_top #(.ROWS(3), .COLS(3), .R(1), .DATA_W(3), .COEF_W(4), .MAX_ITER(MAX_ITER)) t2b_dut (
    .clk, .rst_n(t2b_rst_n), .tmpl_we(t2b_we), .tmpl_addr(t2b_addr), .tmpl_wdata(t2b_wdata),
    .load(t2b_load), .u_in(t2b_u), .x0_in(t2b_x0), .clear(t2b_clear), .start(t2b_start),
    .busy(t2b_busy), .done(t2b_done), .converged(t2b_conv), .iter_count(t2b_iter),
    .y_out(t2b_y), .y_valid(t2b_valid), .x_state(t2b_x));

  cnn_top_driver #(.ROWS(3), .COLS(3), .R(1), .D(3), .C(4), .MAX_ITER(MAX_ITER), .RUNS(60)) t2b_drv (
    .clk, .rst_n(t2b_rst_n), .tmpl_we(t2b_we), .tmpl_addr(t2b_addr), .tmpl_wdata(t2b_wdata),
    .load(t2b_load), .u_in(t2b_u), .x0_in(t2b_x0), .clear(t2b_clear), .start(t2b_start),
    .busy(t2b_busy), .done(t2b_done), .converged(t2b_conv), .iter_count(t2b_iter),
    .y_out(t2b_y), .y_valid(t2b_valid), .x_state(t2b_x),
    .checks(t2b_checks), .failures(t2b_failures), .finished(t2b_fin));

  // Tables 2/3: 8-bit data
  localparam int T2C_K = nbr_count(1);
  localparam int T2C_AW = $clog2(2 * T2C_K + 1);
  localparam int T2C_SW = state_width(8, 4, 1);
  logic t2c_rst_n, t2c_we, t2c_load, t2c_clear, t2c_start, t2c_busy, t2c_done, t2c_conv, t2c_valid, t2c_fin;
  logic [T2C_AW-1:0] t2c_addr;
  logic [4-1:0] t2c_wdata;
  logic [3-1:0][3-1:0][8-1:0] t2c_u, t2c_x0, t2c_y;
  logic [IT_W-1:0] t2c_iter;
  logic [3-1:0][3-1:0][T2C_SW-1:0] t2c_x;
  int t2c_checks, t2c_failures;

  cnn_top #(.ROWS(3), .COLS(3), .R(1), .DATA_W(8), .COEF_W(4), .MAX_ITER(MAX_ITER)) t2c_dut (
    .clk, .rst_n(t2c_rst_n), .tmpl_we(t2c_we), .tmpl_addr(t2c_addr), .tmpl_wdata(t2c_wdata),
    .load(t2c_load), .u_in(t2c_u), .x0_in(t2c_x0), .clear(t2c_clear), .start(t2c_start),
    .busy(t2c_busy), .done(t2c_done), .converged(t2c_conv), .iter_count(t2c_iter),
    .y_out(t2c_y), .y_valid(t2c_valid), .x_state(t2c_x));

  cnn_top_driver #(.ROWS(3), .COLS(3), .R(1), .D(8), .C(4), .MAX_ITER(MAX_ITER), .RUNS(60)) t2c_drv (
    .clk, .rst_n(t2c_rst_n), .tmpl_we(t2c_we), .tmpl_addr(t2c_addr), .tmpl_wdata(t2c_wdata),
    .load(t2c_load), .u_in(t2c_u), .x0_in(t2c_x0), .clear(t2c_clear), .start(t2c_start),
    .busy(t2c_busy), .done(t2c_done), .converged(t2c_conv), .iter_count(t2c_iter),
    .y_out(t2c_y), .y_valid(t2c_valid), .x_state(t2c_x),
    .checks(t2c_checks), .failures(t2c_failures), .finished(t2c_fin));

  int checks, failures;
  always_comb begin
    checks = t1a_checks + t1b_checks + t1c_checks + t1d_checks + t2a_checks + t2b_checks + t2c_checks;
    failures = t1a_failures + t1b_failures + t1c_failures + t1d_failures + t2a_failures + t2b_failures + t2c_failures;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1;
    wait (t1a_fin && t1b_fin && t1c_fin && t1d_fin && t2a_fin && t2b_fin && t2c_fin);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
